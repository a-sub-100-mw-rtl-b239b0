// image_analysis_tb: random coarse vectors, both near each other and scattered, checked
// against the six conditions written out directly.
module image_analysis_tb;
  import ime_pkg::*;
  mv_t [7:0] mv;
  logic [5:0] cond;
  logic fsmp;
  int checks = 0, failures = 0, n_fsmp = 0, n_fssb = 0;
  image_analysis dut (.mv(mv), .cond(cond), .fsmp(fsmp));

  function automatic int mvdist(mv_t a, mv_t b);
    int dx, dy;
    dx = int'(a.x) - int'(b.x);
    dy = int'(a.y) - int'(b.y);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int spread;
      logic [5:0] e;
      mv_t base;
      spread = (t % 3 == 0) ? 2 : ((t % 3 == 1) ? 3 : 20);
      base.x = MV_W'($urandom_range(0, 100)) - 10'sd50;
      base.y = MV_W'($urandom_range(0, 60)) - 10'sd30;
      for (int k = 0; k < 8; k++) begin
        mv[k].x = base.x + MV_W'($urandom_range(0, spread)) - MV_W'(spread / 2);
        mv[k].y = base.y + MV_W'($urandom_range(0, spread)) - MV_W'(spread / 2);
      end
      #1;
      e[0] = mvdist(mv[0], mv[3]) < 4;   // upper TT - upper BB
      e[1] = mvdist(mv[4], mv[7]) < 4;   // lower TT - lower BB
      e[2] = mvdist(mv[0], mv[4]) < 4;   // upper TT - lower TT
      e[3] = mvdist(mv[1], mv[5]) < 4;   // TB
      e[4] = mvdist(mv[2], mv[6]) < 4;   // BT
      e[5] = mvdist(mv[3], mv[7]) < 4;   // BB
      checks += 2;
      if (cond != e) failures++;
      if (fsmp != (&e)) failures++;
      if (fsmp) n_fsmp++; else n_fssb++;
    end
    $display("image_analysis: FSMP %0d times, FSSB %0d times", n_fsmp, n_fssb);
    checks++;
    if (n_fsmp == 0 || n_fssb == 0) begin
      failures = failures + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
