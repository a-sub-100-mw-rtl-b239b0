// reg_vs_tb: random half-row writes into REG_VS, compared with a copy after every write.
module reg_vs_tb;
  import ime_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, half;
  logic [2:0] sel;
  row8_t wdata;
  row16_t rows [N_SBSA];
  row16_t ref_rows [N_SBSA];
  int checks = 0, failures = 0;
  reg_vs dut (.*);
  initial begin
    we = 0; sel = 0; half = 0; wdata = '0;
    for (int k = 0; k < 8; k++)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        we = 1; sel = 3'(k); half = h[0];
        for (int c = 0; c < 8; c++) begin wdata[c] = pix_t'($urandom); ref_rows[k][h*8+c] = wdata[c]; end
      end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = t[0] | t[1]; sel = 3'($urandom); half = 1'($urandom);
      for (int c = 0; c < 8; c++) wdata[c] = pix_t'($urandom);
      if (we) for (int c = 0; c < 8; c++) ref_rows[sel][half*8+c] = wdata[c];
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (rows[k] != ref_rows[k]) failures++;
      end
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
