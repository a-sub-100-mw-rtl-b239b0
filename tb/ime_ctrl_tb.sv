// ime_ctrl_tb: drives the controller alone and watches the operations it issues.
//  * full searches in every block mode, frame and field, range 4 and 8: every vector of the
//    square is evaluated exactly once, consecutive points are neighbours (snake order), the
//    number of REG_VS stall cycles and the total cycle count match the schedule worked out
//    here from the number of REG_VS half-rows each line must fill;
//  * one-dimensional searches, horizontal and vertical: the points, the cross-path rotation
//    and the number of SRU reload cycles;
//  * one-time block matching: one evaluated point after 8 load cycles.
module ime_ctrl_tb;
  import ime_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, cmd_valid, cmd_ready;
  ime_cmd_t cmd;
  logic sw_rd_en, sw_hsub, sw_vsub, xp_rotate;
  logic [8:0] sw_rd_x;
  logic [7:0] sw_rd_y;
  logic tb_rd_en, tb_rstep2, tb_cstep2, tb_transpose;
  logic [4:0] tb_row0;
  logic [3:0] tb_col0;
  rr_cfg_t rr_cfg;
  rr_op_t rr_op;
  rr_tag_t rr_tag;
  logic mv_clear, done, stall, reload;
  int checks = 0, failures = 0;

  ime_ctrl dut (.*);

  // observation
  int n_eval, n_stall, n_reload, n_rot, cycles;
  bit seen [int];
  mv_t last_mv;
  int  snake_bad;
  bit  running;

  always @(posedge clk) if (running) begin
    cycles++;
    if (stall) n_stall++;
    if (reload) n_reload++;
    if (rr_tag.eval) begin
      int key;
      key = (int'(rr_tag.mv[0].x) + 512) * 1024 + int'(rr_tag.mv[0].y) + 512;
      if (seen.exists(key)) snake_bad++;
      seen[key] = 1;
      if (n_eval > 0) begin
        int d;
        d = ((rr_tag.mv[0].x > last_mv.x) ? int'(rr_tag.mv[0].x - last_mv.x) : int'(last_mv.x - rr_tag.mv[0].x)) +
            ((rr_tag.mv[0].y > last_mv.y) ? int'(rr_tag.mv[0].y - last_mv.y) : int'(last_mv.y - rr_tag.mv[0].y));
        if (d != 1) snake_bad++;
      end
      last_mv = rr_tag.mv[0];
      n_eval++;
    end
    if (xp_rotate && rr_op.ld_en) n_rot++;
  end

  task automatic run(ime_cmd_t cm);
    @(negedge clk);
    cmd = cm; cmd_valid = 1;
    n_eval = 0; n_stall = 0; n_reload = 0; n_rot = 0; cycles = 0; snake_bad = 0;
    seen.delete();
    @(posedge clk);
    running = 1;
    #1 cmd_valid = 0;
    checks++;
    if (!mv_clear || cmd_ready) failures++;
    do begin
      @(posedge clk);
      #1;
    end while (!done);
    running = 0;
  endtask

  initial begin
    ime_cmd_t c;
    rst_n = 0; cmd_valid = 0; cmd = '0; running = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------------------------------------------------- full searches
    for (int m = 0; m < 5; m++)
      for (int f = 0; f < 2; f++)
        for (int rr = 4; rr <= 8; rr += 4) begin
          int r_eff, nv, exp_stall, exp_cycles, bottoms;
          bit wide;
          c = '0;
          c.op = OP_FS; c.map = MAP_TILE; c.mode = blk_mode_e'(m); c.field = f[0];
          c.range = 4'(rr); c.x0 = 9'd100; c.y0 = 8'd50;
          c.ctr[0].x = 10'sd3; c.ctr[0].y = -10'sd2;
          wide = (m == 1 || m == 3 || m == 4);
          r_eff = (wide && rr == 8) ? 8 : 4;
          // SBSAs that take the new row from REG_VS
          if (m == 0 || m == 1) bottoms = 8;
          else if (m == 4 && !f) bottoms = 2;
          else bottoms = 4;
          nv = 2 * bottoms;
          exp_stall = (nv > 2 * r_eff) ? 2 * r_eff * (nv - 2 * r_eff) : 0;
          // 16 load cycles, 2R lines of max(2R, nv) cycles plus the vertical shift, the last
          // line of 2R shifts, then the drain through the array pipeline and the done pulse (5)
          exp_cycles = 16 + 2 * r_eff * ((nv > 2 * r_eff ? nv : 2 * r_eff) + 1) + 2 * r_eff + 5;
          run(c);
          checks += 5;
          if (n_eval != (2 * r_eff + 1) * (2 * r_eff + 1)) failures++;
          if (snake_bad != 0) failures++;
          if (n_stall != exp_stall) failures++;
          if (cycles != exp_cycles) failures++;
          if (rr_cfg.ring_pair != wide) failures++;
          // corners of the square were searched
          checks += 2;
          if (!seen.exists((3 - r_eff + 512) * 1024 + (-2 - r_eff + 512))) failures++;
          if (!seen.exists((3 + r_eff + 512) * 1024 + (-2 + r_eff + 512))) failures++;
          $display("FS mode %0d field %0d R %0d: %0d points, %0d cycles (exp %0d), %0d stalls (exp %0d)",
                   m, f, r_eff, n_eval, cycles, exp_cycles, n_stall, exp_stall);
        end

    // ---------------------------------------------------------- one-dimensional searches
    for (int ax = 0; ax < 2; ax++)
      for (int i = 0; i < 3; i++) begin
        int np, exp_rel;
        np = (i == 0) ? 1 : ((i == 1) ? 17 : 81);
        c = '0;
        c.op = OP_LINE; c.map = MAP_COARSE; c.vaxis = ax[0]; c.npts = 8'(np);
        c.x0 = 9'd60; c.y0 = 8'd40;
        for (int k = 0; k < 8; k++) begin c.ctr[k].x = MV_W'(k - 3); c.ctr[k].y = MV_W'(2 * k - 5); end
        run(c);
        exp_rel = (np >= 2) ? 8 * ((np - 2) / 8) : 0;
        checks += 3;
        if (n_eval != np) failures++;
        if (n_reload != exp_rel) failures++;
        if (n_rot != (ax ? 16 + exp_rel : 0)) failures++;
        checks++;
        if (cycles != 16 + (np - 1) + exp_rel + 5) failures++;
        // last point of lane 0
        checks++;
        if (ax == 0 && int'(last_mv.x) != -3 + np - 1) failures++;
        if (ax == 1 && int'(last_mv.y) != -5 + np - 1) failures++;
        $display("LINE axis %0d: %0d points, %0d reload cycles, %0d cycles", ax, n_eval, n_reload, cycles);
      end

    // ---------------------------------------------------------- one-time matching
    c = '0;
    c.op = OP_POINT; c.map = MAP_TILE; c.mode = BM_16X16; c.x0 = 9'd10; c.y0 = 8'd20;
    run(c);
    checks += 2;
    if (n_eval != 1) failures++;
    if (cycles != 8 + 5) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
