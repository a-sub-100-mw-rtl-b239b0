// crcs_tb: the coarse-search sequencer against a behavioural controller and a reference model.
//
// The controller model accepts a command, waits a random number of cycles, and returns for
// every lane the first minimum of a synthetic cost surface over the points the command asks
// for (one point for OP_POINT, npts points along the line for OP_LINE). This is the same rule
// the real mv_select applies. Each lane's surface is a bowl around a random target, plus a small
// hash term. Flat stretches (zero slope) make ties happen. The reference model runs the
// initial vector search and the two recursive cross searches independently. It compares
// every issued command (operation, axis, length, start vectors) and the final per-lane vector,
// SAD and RCS choice. Timing: the cycles from start to fin, minus the cycles the controller
// model held each command, must be the same fixed overhead in every run (1 issue cycle per
// command, plus 2 for start and the result register).
module crcs_tb;
  import ime_pkg::*;
  localparam int LONG = 40, SHORT = 16;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, cmd_valid, cmd_ready, cmd_done, busy, fin;
  logic [8:0] x0;
  logic [7:0] y0;
  mv_t  [3:0] iv;
  ime_cmd_t   cmd;
  sad_t [7:0] best_sad, res_sad;
  mv_t  [7:0] best_mv, res_mv;
  logic [7:0] res_rcs2;
  int checks = 0, failures = 0;

  crcs #(.LONG(LONG), .SHORT(SHORT)) dut (.*);

  // ---------------------------------------------------------------- cost surface
  int tx [8], ty [8], sx [8], sy [8], seed;
  function automatic sad_t cost(int k, int x, int y);
    int c;
    c = sx[k] * (x > tx[k] ? x - tx[k] : tx[k] - x) + sy[k] * (y > ty[k] ? y - ty[k] : ty[k] - y);
    c += ((x * 7 + y * 13 + k * 5 + seed) & 32'h7fff) % 5;
    return sad_t'(c);
  endfunction

  // ---------------------------------------------------------------- controller model
  int held;        // cycles the model spent on commands in this run
  int ncmd;
  ime_cmd_t exp_cmd [10];
  task automatic serve();
    ime_cmd_t c;
    int lat;
    forever begin
      @(posedge clk);
      cmd_done <= 1'b0;
      if (cmd_valid && cmd_ready) begin
        c = cmd;
        cmd_ready <= 1'b0;
        // command check
        checks++;
        if (ncmd < 10) begin
          if (c.op != exp_cmd[ncmd].op || c.map != MAP_COARSE || c.x0 != x0 || c.y0 != y0 ||
              (c.op == OP_LINE && (c.vaxis != exp_cmd[ncmd].vaxis || c.npts != exp_cmd[ncmd].npts)) ||
              c.ctr != exp_cmd[ncmd].ctr) begin
            failures++;
            $display("cmd %0d mismatch op=%0d vaxis=%0d npts=%0d", ncmd, c.op, c.vaxis, c.npts);
          end
        end else failures++;
        ncmd++;
        lat = $urandom_range(1, 12);
        held += lat;
        repeat (lat - 1) @(posedge clk);
        for (int k = 0; k < 8; k++) begin
          sad_t bs;
          mv_t  bm;
          int n;
          bs = '1; bm = '0;
          n = (c.op == OP_LINE) ? int'(c.npts) : 1;
          for (int i = 0; i < n; i++) begin
            int x, y;
            sad_t s;
            x = int'(c.ctr[k].x) + ((c.op == OP_LINE && !c.vaxis) ? i : 0);
            y = int'(c.ctr[k].y) + ((c.op == OP_LINE &&  c.vaxis) ? i : 0);
            s = cost(k, x, y);
            if (s < bs) begin bs = s; bm.x = MV_W'(x); bm.y = MV_W'(y); end
          end
          best_sad[k] <= bs;
          best_mv[k]  <= bm;
        end
        cmd_done  <= 1'b1;
        cmd_ready <= 1'b1;
      end
    end
  endtask

  // ---------------------------------------------------------------- reference
  function automatic void line_best(int k, int cx, int cy, bit vert, int ext,
                                    inout sad_t bs, inout int bx, inout int by);
    for (int i = -ext; i <= ext; i++) begin
      int x, y;
      sad_t s;
      x = cx + (vert ? 0 : i);
      y = cy + (vert ? i : 0);
      s = cost(k, x, y);
      if (s < bs) begin bs = s; bx = x; by = y; end
    end
  endfunction

  sad_t e_sad [8];
  mv_t  e_mv  [8];
  bit   e_r2  [8];
  int   n_r2_wins, n_ties;

  task automatic reference();
    for (int k = 0; k < 8; k++) begin
      sad_t ib, r1, r2, ls;
      int ix, iy, x1, y1, x2, y2, lx, ly;
      ib = '1; ix = 0; iy = 0;
      for (int j = 0; j < 4; j++) begin
        sad_t s;
        s = cost(k, int'(iv[j].x), int'(iv[j].y));
        if (s < ib) begin ib = s; ix = int'(iv[j].x); iy = int'(iv[j].y); end
      end
      // RCS(1): H long, V short, H short; RCS(2): V long, H short, V short
      r1 = ib; x1 = ix; y1 = iy;
      for (int s = 0; s < 3; s++) begin
        ls = '1; lx = 0; ly = 0;
        line_best(k, x1, y1, s == 1, s == 0 ? LONG : SHORT, ls, lx, ly);
        if (ls < r1) begin r1 = ls; x1 = lx; y1 = ly; end
      end
      r2 = ib; x2 = ix; y2 = iy;
      for (int s = 0; s < 3; s++) begin
        ls = '1; lx = 0; ly = 0;
        line_best(k, x2, y2, s != 1, s == 0 ? LONG : SHORT, ls, lx, ly);
        if (ls < r2) begin r2 = ls; x2 = lx; y2 = ly; end
      end
      e_r2[k]  = (r2 < r1);
      e_sad[k] = e_r2[k] ? r2 : r1;
      e_mv[k].x = MV_W'(e_r2[k] ? x2 : x1);
      e_mv[k].y = MV_W'(e_r2[k] ? y2 : y1);
      if (e_r2[k]) n_r2_wins++;
      if (r1 == r2) n_ties++;
    end
  endtask

  // Expected command list. Lines start at centre - ext; the centres are the reference's
  // intermediate results, so they are rebuilt here step by step.
  task automatic expected_cmds();
    mv_t ibm [8], c1 [8], c2 [8];
    sad_t ibs [8], s1 [8], s2 [8];
    for (int j = 0; j < 4; j++) begin
      exp_cmd[j] = '0;
      exp_cmd[j].op = OP_POINT;
      for (int k = 0; k < 8; k++) exp_cmd[j].ctr[k] = iv[j];
    end
    for (int k = 0; k < 8; k++) begin
      ibs[k] = '1; ibm[k] = '0;
      for (int j = 0; j < 4; j++)
        if (cost(k, int'(iv[j].x), int'(iv[j].y)) < ibs[k]) begin
          ibs[k] = cost(k, int'(iv[j].x), int'(iv[j].y)); ibm[k] = iv[j];
        end
      c1[k] = ibm[k]; s1[k] = ibs[k]; c2[k] = ibm[k]; s2[k] = ibs[k];
    end
    for (int st = 4; st < 10; st++) begin
      bit r2, vert;
      int s, ext;
      r2 = (st >= 7);
      s = r2 ? st - 7 : st - 4;
      ext = (s == 0) ? LONG : SHORT;
      vert = r2 ? (s != 1) : (s == 1);
      exp_cmd[st] = '0;
      exp_cmd[st].op = OP_LINE;
      exp_cmd[st].vaxis = vert;
      exp_cmd[st].npts = 8'(2 * ext + 1);
      for (int k = 0; k < 8; k++) begin
        mv_t cen;
        sad_t ls;
        int lx, ly;
        cen = r2 ? c2[k] : c1[k];
        exp_cmd[st].ctr[k].x = cen.x - (vert ? MV_W'(0) : MV_W'(ext));
        exp_cmd[st].ctr[k].y = cen.y - (vert ? MV_W'(ext) : MV_W'(0));
        ls = '1; lx = 0; ly = 0;
        line_best(k, int'(cen.x), int'(cen.y), vert, ext, ls, lx, ly);
        if (r2) begin
          if (ls < s2[k]) begin s2[k] = ls; c2[k].x = MV_W'(lx); c2[k].y = MV_W'(ly); end
        end else begin
          if (ls < s1[k]) begin s1[k] = ls; c1[k].x = MV_W'(lx); c1[k].y = MV_W'(ly); end
        end
      end
    end
  endtask

  initial begin
    #5_000_000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int t0, t1, nfin, overhead;
    rst_n = 0; start = 0; x0 = '0; y0 = '0; iv = '0;
    cmd_ready = 1; cmd_done = 0; best_sad = '0; best_mv = '0;
    n_r2_wins = 0; n_ties = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork serve(); join_none
    for (int run = 0; run < 60; run++) begin
      seed = int'($urandom_range(0, 1000));
      for (int k = 0; k < 8; k++) begin
        tx[k] = $urandom_range(0, 120) - 60;
        ty[k] = $urandom_range(0, 60) - 30;
        sx[k] = $urandom_range(0, 4);       // 0: flat in x, ties along the line
        sy[k] = $urandom_range(0, 4);
      end
      for (int j = 0; j < 4; j++) begin
        iv[j].x = MV_W'($urandom_range(0, 80) - 40);
        iv[j].y = MV_W'($urandom_range(0, 40) - 20);
      end
      x0 = 9'($urandom_range(0, 300));
      y0 = 8'($urandom_range(0, 150));
      reference();
      expected_cmds();
      ncmd = 0; held = 0; nfin = 0;
      @(negedge clk);
      start = 1;
      t0 = $time / 10;
      @(negedge clk);
      start = 0;
      checks++;
      if (!busy) failures++;
      while (!fin) @(negedge clk);
      t1 = $time / 10;
      overhead = t1 - t0 - held;
      checks++;
      if (overhead != 10 * 1 + 2) begin
        failures++;
        $display("run %0d: overhead %0d", run, overhead);
      end
      checks++;
      if (ncmd != 10) failures++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (res_sad[k] != e_sad[k] || res_mv[k] != e_mv[k] || res_rcs2[k] != e_r2[k]) begin
          failures++;
          $display("run %0d lane %0d: got sad %0d mv (%0d,%0d) r2 %0b exp %0d (%0d,%0d) %0b", run, k,
                   res_sad[k], res_mv[k].x, res_mv[k].y, res_rcs2[k], e_sad[k], e_mv[k].x, e_mv[k].y, e_r2[k]);
        end
      end
      @(negedge clk);
      checks++;
      if (busy) failures++;
    end
    // both RCS branches must have produced results, and ties (RCS(1) kept) must have happened
    checks++;
    if (n_r2_wins == 0 || n_ties == 0) begin
      failures++;
      $display("coverage: rcs2 wins %0d ties %0d", n_r2_wins, n_ties);
    end
    $display("rcs2 wins %0d ties %0d", n_r2_wins, n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
