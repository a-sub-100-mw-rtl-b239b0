// mv_select_tb: random SAD streams with random lane masks; the kept minimum and its vector
// are compared with a running model (strict minimum: the first of equal SADs stays).
module mv_select_tb;
  import ime_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clear, valid;
  logic [7:0] lane_valid;
  sad_t [7:0] sad, best_sad, rs;
  mv_t  [7:0] mv, best_mv, rm;
  int checks = 0, failures = 0;
  mv_select dut (.*);
  initial begin
    rst_n = 0; clear = 0; valid = 0; lane_valid = '0; sad = '0; mv = '0;
    rs = '1; rm = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clear = (t % 97 == 0);
      valid = ($urandom_range(0, 3) != 0);
      lane_valid = 8'($urandom);
      for (int k = 0; k < 8; k++) begin
        sad[k] = sad_t'($urandom_range(0, 300));   // small range: ties occur
        mv[k].x = MV_W'($urandom); mv[k].y = MV_W'($urandom);
      end
      if (clear) begin rs = '1; rm = '0; end
      else if (valid)
        for (int k = 0; k < 8; k++)
          if (lane_valid[k] && sad[k] < rs[k]) begin rs[k] = sad[k]; rm[k] = mv[k]; end
      @(posedge clk); #1;
      checks += 2;
      if (best_sad != rs) failures++;
      if (best_mv != rm) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
