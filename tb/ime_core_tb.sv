// ime_core_tb: end-to-end test of the IME core at its default sizes (320x160 search window,
// coarse search +-40/+-16). The search window is filled with a textured picture in which the
// two fields are equal (so every field combination has a true match), the template buffer
// with an MB pair cut from the picture at a known displacement plus a little noise. Every
// search the core runs is repeated here by brute force on the same picture:
//  * full searches in all five block sizes, frame and field, ranges 4 and 8: best SAD of every
//    lane equals the exhaustive minimum and the reported vector has that SAD; one run's cycle
//    count is checked against the schedule;
//  * one-time block matching at random vectors: exact SAD of every lane;
//  * horizontal and vertical one-dimensional searches with a different start in every lane;
//  * the complete coarse search (initial vectors + CRCS) and the image analysis, for a
//    template that moves as a whole (expect FSMP) and one whose two MBs move apart (FSSB).
// It counts how often each mechanism occurred (paired rings, vertical chaining, REG_VS
// stalls, SRU reloads, cross-path rotation, left/right/vertical shifts, every block mode,
// field mode, both fine-search choices) and fails if one never did.
module ime_core_tb;
  import ime_pkg::*;
  localparam int W = 320, H = 160;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic        sw_wr_en, tb_wr_en, tb_wr_half;
  logic [8:0]  sw_wr_x;
  logic [7:0]  sw_wr_y;
  row8_t       sw_wr_data, tb_wr_data;
  logic [4:0]  tb_wr_row;
  logic        cmd_valid, cmd_ready, done;
  ime_cmd_t    cmd;
  sad_t [7:0]  best_sad;
  mv_t  [7:0]  best_mv;
  logic [7:0]  lane_valid;
  logic        crcs_start, crcs_busy, crcs_fin;
  logic [8:0]  crcs_x0;
  logic [7:0]  crcs_y0;
  mv_t  [3:0]  crcs_iv;
  mv_t  [7:0]  crcs_mv;
  sad_t [7:0]  crcs_sad;
  logic [7:0]  crcs_rcs2;
  logic [5:0]  ia_cond;
  logic        fsmp, stall, reload;
  rr_op_t      rr_op_mon;

  ime_core dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------------ picture and template
  pix_t pic [H][W];
  pix_t tmpl [32][16];

  function automatic pix_t texture(int x, int y);
    int unsigned h;
    h = (x * 73856093) ^ ((y / 2) * 19349663) ^ 32'h5bd1e995;
    h = h ^ (h >> 13);
    h = h * 32'h27d4eb2d;
    return pix_t'(h >> 20);
  endfunction

  function automatic int wx(int x); return ((x % W) + W) % W; endfunction
  function automatic int wy(int y); return ((y % H) + H) % H; endfunction

  // ------------------------------------------------------------------ reference SADs
  // Loop bound held in a variable so the reference loops stay loops in the simulator.
  int n8 = 8;
  // 8x8 block k of the template for a command, at vector (dx, dy) in search-point units
  function automatic int ref_sad8(ime_cmd_t c, int k, int dx, int dy);
    int s = 0;
    for (int r = 0; r < n8; r++)
      for (int col = 0; col < n8; col++) begin
        int tr, tc, sx, sy, a, b;
        if (c.map == MAP_COARSE) begin
          // field 16x8 block: upper/lower k[2], template field k[1], SW field k[0]
          tr = 2 * ((k / 4) * 8 + r) + (k / 2) % 2;
          tc = 2 * col;
          sx = c.x0 + 2 * (col + dx);
          sy = c.y0 + k % 2 + 2 * ((k / 4) * 8 + r + dy);
        end else if (c.field) begin
          tr = 2 * (((k / 2) % 2) * 8 + r) + ((k >= 4) ? 1 : 0);
          tc = (k % 2) * 8 + col;
          sx = c.x0 + tc + dx;
          sy = c.y0 + ((k >= 4) ? c.swpar_bot : c.swpar_top) + 2 * (((k / 2) % 2) * 8 + r + dy);
        end else begin
          tr = (k / 2) * 8 + r;
          tc = (k % 2) * 8 + col;
          sx = c.x0 + tc + dx;
          sy = c.y0 + tr + dy;
        end
        a = pic[wy(sy)][wx(sx)];
        b = tmpl[tr][tc];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  // merged SAD of lane k for the block mode, -1 if the lane carries no block
  function automatic bit lane_ok(blk_mode_e m, int k);
    unique case (m)
      BM_8X8:   return 1'b1;
      BM_16X8:  return k % 2 == 0;
      BM_8X16:  return (k / 2) % 2 == 0;
      BM_16X16: return k % 4 == 0;
      default:  return k == 0;
    endcase
  endfunction
  function automatic bit member(blk_mode_e m, int k, int i);
    unique case (m)
      BM_8X8:   return i == k;
      BM_16X8:  return i == k || i == k + 1;
      BM_8X16:  return i == k || i == k + 2;
      BM_16X16: return i >= k && i < k + 4;
      default:  return 1'b1;
    endcase
  endfunction
  function automatic int ref_sad(ime_cmd_t c, int k, int dx, int dy);
    blk_mode_e m;
    int s;
    m = (c.map == MAP_COARSE) ? BM_8X8 : c.mode;
    if (!lane_ok(m, k)) return -1;
    s = 0;
    for (int i = 0; i < n8; i++)
      if (member(m, k, i)) s += ref_sad8(c, i, dx, dy);
    return s;
  endfunction

  // ------------------------------------------------------------------ mechanism counters
  int n_left, n_right, n_up, n_pair, n_chain, n_stall, n_reload, n_rot, n_field;
  int n_mode [5];
  int n_fsmp, n_fssb;

  always @(posedge clk) if (rst_n) begin
    if (rr_op_mon.shift == SH_LEFT)  n_left++;
    if (rr_op_mon.shift == SH_RIGHT) n_right++;
    if (rr_op_mon.shift == SH_UP)    n_up++;
    if (rr_op_mon.shift inside {SH_LEFT, SH_RIGHT} && dut.rr_cfg.ring_pair) n_pair++;
    if (rr_op_mon.shift == SH_UP && dut.rr_cfg.mode inside {BM_8X16, BM_16X16, BM_16X32}) n_chain++;
    if (stall)  n_stall++;
    if (reload) n_reload++;
    if (dut.xp_rotate && rr_op_mon.ld_en) n_rot++;
    if (rr_op_mon.shift != SH_NONE && dut.rr_cfg.field) n_field++;
    if (rr_op_mon.shift != SH_NONE) n_mode[int'(dut.rr_cfg.mode)]++;
  end

  // ------------------------------------------------------------------ command helper
  int last_cycles;
  task automatic run(ime_cmd_t c);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(posedge clk);
    #1 cmd_valid = 0;
    last_cycles = 0;
    do begin
      @(posedge clk);
      #1 last_cycles++;
    end while (!done);
  endtask

  task automatic check_fs(ime_cmd_t c, int r);
    for (int k = 0; k < 8; k++) begin
      int mn, s;
      mn = -1;
      for (int dy = -r; dy <= r; dy++)
        for (int dx = -r; dx <= r; dx++) begin
          s = ref_sad(c, k, int'(c.ctr[0].x) + dx, int'(c.ctr[0].y) + dy);
          if (s >= 0 && (mn < 0 || s < mn)) mn = s;
        end
      if (mn < 0) continue;
      checks += 3;
      if (int'(best_sad[k]) != mn) begin
        failures++;
        $display("FS mode %0d field %0d lane %0d: SAD %0d, expected %0d", c.mode, c.field, k, best_sad[k], mn);
      end
      if (ref_sad(c, k, int'(best_mv[k].x), int'(best_mv[k].y)) != mn) failures++;
      if (int'(best_mv[k].x) < int'(c.ctr[0].x) - r || int'(best_mv[k].x) > int'(c.ctr[0].x) + r ||
          int'(best_mv[k].y) < int'(c.ctr[0].y) - r || int'(best_mv[k].y) > int'(c.ctr[0].y) + r)
        failures++;
    end
  endtask

  // line of points from start s along an axis: best (first minimum) SAD for lane k
  function automatic int line_min(ime_cmd_t c, int k, int n, bit vert, output mv_t at);
    int mn = -1;
    for (int q = 0; q < n; q++) begin
      int dx, dy, s;
      dx = int'(c.ctr[k].x) + (vert ? 0 : q);
      dy = int'(c.ctr[k].y) + (vert ? q : 0);
      s = ref_sad(c, k, dx, dy);
      if (mn < 0 || s < mn) begin mn = s; at.x = MV_W'(dx); at.y = MV_W'(dy); end
    end
    return mn;
  endfunction

  // ------------------------------------------------------------------ reference coarse search
  task automatic ref_crcs(int x0, int y0, mv_t iv [4], output mv_t res [8], output int rsad [8]);
    ime_cmd_t c;
    c = '0; c.map = MAP_COARSE; c.x0 = 9'(x0); c.y0 = 8'(y0);
    for (int k = 0; k < 8; k++) begin
      mv_t ib, best [2];
      int ibs, bs [2];
      ibs = -1;
      for (int i = 0; i < 4; i++) begin
        int s;
        s = ref_sad(c, k, int'(iv[i].x), int'(iv[i].y));
        if (ibs < 0 || s < ibs) begin ibs = s; ib = iv[i]; end
      end
      for (int rc = 0; rc < 2; rc++) begin
        best[rc] = ib; bs[rc] = ibs;
        for (int st = 0; st < 3; st++) begin
          int ext;
          bit vert;
          mv_t cen;
          ext  = (st == 0) ? 40 : 16;
          vert = (rc == 0) ? (st == 1) : (st != 1);
          cen  = best[rc];
          for (int q = -ext; q <= ext; q++) begin
            int dx, dy, s;
            dx = int'(cen.x) + (vert ? 0 : q);
            dy = int'(cen.y) + (vert ? q : 0);
            s = ref_sad(c, k, dx, dy);
            if (s < bs[rc]) begin bs[rc] = s; best[rc].x = MV_W'(dx); best[rc].y = MV_W'(dy); end
          end
        end
      end
      if (bs[1] < bs[0]) begin res[k] = best[1]; rsad[k] = bs[1]; end
      else               begin res[k] = best[0]; rsad[k] = bs[0]; end
    end
  endtask

  function automatic bit ref_fsmp(mv_t m [8]);
    int pairs [6][2] = '{'{0, 3}, '{4, 7}, '{0, 4}, '{1, 5}, '{2, 6}, '{3, 7}};
    for (int i = 0; i < 6; i++) begin
      int dx, dy;
      dx = int'(m[pairs[i][0]].x) - int'(m[pairs[i][1]].x);
      dy = int'(m[pairs[i][0]].y) - int'(m[pairs[i][1]].y);
      if ((dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy) >= 4) return 1'b0;
    end
    return 1'b1;
  endfunction

  // template: upper MB displaced by (ux, uy) pels, lower MB by (lx, ly), from (tx, ty)
  task automatic load_template(int tx, int ty, int ux, int uy, int lx, int ly);
    for (int r = 0; r < 32; r++)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        tb_wr_en = 1; tb_wr_row = 5'(r); tb_wr_half = h[0];
        for (int c = 0; c < 8; c++) begin
          int v, sx, sy;
          sx = tx + h * 8 + c + ((r < 16) ? ux : lx);
          sy = ty + r + ((r < 16) ? uy : ly);
          v = int'(pic[wy(sy)][wx(sx)]) + int'($urandom_range(0, 2)) - 1;
          v = (v < 0) ? 0 : ((v > 255) ? 255 : v);
          tb_wr_data[c] = pix_t'(v);
          tmpl[r][h * 8 + c] = pix_t'(v);
        end
      end
    @(negedge clk);
    tb_wr_en = 0;
  endtask

  // ------------------------------------------------------------------ test sequence
  initial begin
    ime_cmd_t c;
    rst_n = 0;
    sw_wr_en = 0; tb_wr_en = 0; tb_wr_half = 0; sw_wr_x = 0; sw_wr_y = 0; tb_wr_row = 0;
    sw_wr_data = '0; tb_wr_data = '0; cmd_valid = 0; cmd = '0;
    crcs_start = 0; crcs_x0 = 0; crcs_y0 = 0; crcs_iv = '0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) pic[y][x] = texture(x, y);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill the search window over the memory bus
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 8) begin
        @(negedge clk);
        sw_wr_en = 1; sw_wr_x = 9'(x); sw_wr_y = 8'(y);
        for (int i = 0; i < 8; i++) sw_wr_data[i] = pic[y][x + i];
      end
    @(negedge clk);
    sw_wr_en = 0;

    // template: whole MB pair at (+3, -2) pels from (150, 70)
    load_template(150, 70, 3, -2, 3, -2);

    // ---------------------------------------------------------- full searches
    for (int m = 0; m < 5; m++)
      for (int f = 0; f < 2; f++) begin
        int r;
        bit wide;
        wide = (m == 1 || m == 3 || m == 4);
        r = (wide && (m + f) % 2 == 0) ? 8 : 4;
        c = '0;
        c.op = OP_FS; c.map = MAP_TILE; c.mode = blk_mode_e'(m); c.field = f[0];
        c.swpar_top = 1'b0; c.swpar_bot = 1'b1; c.range = 4'(r);
        c.x0 = 9'd150; c.y0 = 8'd70;
        c.ctr[0].x = f ? 10'sd1 : 10'sd2;
        c.ctr[0].y = f ? -10'sd1 : -10'sd1;
        run(c);
        check_fs(c, r);
        if (m == 3 && f == 0) begin
          // 16x16 frame, +-R (R = 4 here): 16 load cycles, 2R lines of 2R shifts plus one
          // vertical shift (the 8 REG_VS half-rows fit under the 2R shifts: no stall), the
          // last line of 2R shifts, and 4 cycles until done (counted from after the accept edge)
          checks++;
          if (last_cycles != 16 + 2 * r * (2 * r + 1) + 2 * r + 4) begin
            failures++;
            $display("FS 16x16 cycles %0d", last_cycles);
          end
        end
        if (m == 4 && f == 0) begin
          checks++;
          if (best_mv[0].x != 10'sd3 || best_mv[0].y != -10'sd2) failures++;
        end
      end

    // ---------------------------------------------------------- one-time block matching
    for (int t = 0; t < 6; t++) begin
      c = '0;
      c.op = OP_POINT; c.map = (t % 3 == 2) ? MAP_COARSE : MAP_TILE; c.mode = BM_8X8;
      c.field = t[0]; c.swpar_top = t[1]; c.swpar_bot = !t[1];
      c.x0 = 9'd150; c.y0 = 8'd70;
      for (int k = 0; k < 8; k++) begin
        c.ctr[k].x = MV_W'($urandom_range(0, 40)) - 10'sd20;
        c.ctr[k].y = MV_W'($urandom_range(0, 20)) - 10'sd10;
      end
      run(c);
      for (int k = 0; k < 8; k++) begin
        checks += 2;
        if (int'(best_sad[k]) != ref_sad(c, k, int'(c.ctr[k].x), int'(c.ctr[k].y))) failures++;
        if (best_mv[k] != c.ctr[k]) failures++;
      end
    end

    // ---------------------------------------------------------- one-dimensional searches
    for (int t = 0; t < 4; t++) begin
      c = '0;
      c.op = OP_LINE; c.map = t[1] ? MAP_COARSE : MAP_TILE; c.mode = BM_8X8;
      c.vaxis = t[0]; c.npts = 8'(20 + 7 * t);
      c.x0 = 9'd150; c.y0 = 8'd70;
      for (int k = 0; k < 8; k++) begin
        c.ctr[k].x = MV_W'($urandom_range(0, 10)) - 10'sd8;
        c.ctr[k].y = MV_W'($urandom_range(0, 10)) - 10'sd8;
      end
      run(c);
      for (int k = 0; k < 8; k++) begin
        mv_t at;
        int mn;
        mn = line_min(c, k, int'(c.npts), c.vaxis, at);
        checks += 2;
        if (int'(best_sad[k]) != mn) begin
          failures++;
          $display("LINE %0d lane %0d: SAD %0d expected %0d", t, k, best_sad[k], mn);
        end
        if (best_mv[k] != at) failures++;
      end
    end

    // ---------------------------------------------------------- coarse search + analysis
    for (int t = 0; t < 2; t++) begin
      mv_t iv [4];
      mv_t res [8];
      int rsad [8];
      if (t == 1) load_template(120, 64, 4, 2, -20, 8);   // MBs move apart
      else        load_template(120, 64, 4, 2, 4, 2);     // MB pair moves as a whole
      // candidates in coarse units (2 pels, 1 field line): the true vectors and two others
      iv[0] = '{x: 10'sd0, y: 10'sd0};
      iv[1] = '{x: 10'sd2, y: 10'sd1};
      iv[2] = '{x: -10'sd10, y: 10'sd4};
      iv[3] = '{x: 10'sd5, y: -10'sd3};
      @(negedge clk);
      crcs_x0 = 9'd120; crcs_y0 = 8'd64;
      for (int i = 0; i < 4; i++) crcs_iv[i] = iv[i];
      crcs_start = 1;
      @(negedge clk);
      crcs_start = 0;
      do begin
        @(posedge clk);
        #1;
      end while (!crcs_fin);
      ref_crcs(120, 64, iv, res, rsad);
      for (int k = 0; k < 8; k++) begin
        checks += 2;
        if (crcs_mv[k] != res[k]) begin
          failures++;
          $display("CRCS %0d lane %0d: mv (%0d,%0d) expected (%0d,%0d)", t, k,
                   crcs_mv[k].x, crcs_mv[k].y, res[k].x, res[k].y);
        end
        if (int'(crcs_sad[k]) != rsad[k]) failures++;
      end
      checks++;
      if (fsmp != ref_fsmp(res)) failures++;
      if (fsmp) n_fsmp++; else n_fssb++;
      $display("coarse search %0d: fine search %s, lane 0 vector (%0d,%0d), lane 7 vector (%0d,%0d)", t,
               fsmp ? "FSMP" : "FSSB", int'(crcs_mv[0].x), int'(crcs_mv[0].y), int'(crcs_mv[7].x), int'(crcs_mv[7].y));
    end

    // ---------------------------------------------------------- mechanisms
    $display("mechanisms: left %0d right %0d vertical %0d paired-ring %0d chained %0d stall %0d reload %0d rotate %0d field %0d",
             n_left, n_right, n_up, n_pair, n_chain, n_stall, n_reload, n_rot, n_field);
    $display("block modes: %0d %0d %0d %0d %0d, FSMP %0d FSSB %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_fsmp, n_fssb);
    begin
      int mech [15];
      mech = '{n_left, n_right, n_up, n_pair, n_chain, n_stall, n_reload, n_rot, n_field,
               n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_fsmp};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("mechanism %0d never occurred", i); end
      end
      checks++;
      if (n_fssb == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
