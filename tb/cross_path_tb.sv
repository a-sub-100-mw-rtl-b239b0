// cross_path_tb: random 8x8 blocks through the cross path, straight and rotated.
module cross_path_tb;
  import ime_pkg::*;
  logic  rotate;
  blk8_t din, dout;
  int checks = 0, failures = 0;
  cross_path dut (.rotate(rotate), .din(din), .dout(dout));
  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) din[r][c] = pix_t'($urandom);
      rotate = t[0];
      #1;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          checks++;
          if (dout[r][c] != (rotate ? din[c][r] : din[r][c])) failures++;
        end
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
