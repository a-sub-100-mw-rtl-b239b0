// tb_buffer_tb: fills the 16x32 template buffer, then reads random blocks with every
// combination of line step, column step and transposition and compares with a copy; checks
// the one-cycle read latency.
module tb_buffer_tb;
  import ime_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, whalf, rd_en, rstep2, cstep2, transpose;
  logic [4:0] wrow, row0;
  logic [3:0] col0;
  row8_t wdata;
  blk8_t rdata;
  pix_t ref_mem [32][16];
  int checks = 0, failures = 0;

  tb_buffer dut (.*);

  initial begin
    we = 0; rd_en = 0; whalf = 0; wrow = 0; wdata = '0;
    row0 = 0; col0 = 0; rstep2 = 0; cstep2 = 0; transpose = 0;
    for (int r = 0; r < 32; r++)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        we = 1; wrow = 5'(r); whalf = h[0];
        for (int c = 0; c < 8; c++) begin
          wdata[c] = pix_t'($urandom);
          ref_mem[r][h*8+c] = wdata[c];
        end
      end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      rd_en = 1; row0 = 5'($urandom); col0 = 4'($urandom);
      rstep2 = t[0]; cstep2 = t[1]; transpose = t[2];
      @(negedge clk);
      rd_en = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          pix_t e;
          e = ref_mem[5'(int'(row0) + (rstep2 ? 2*r : r))][4'(int'(col0) + (cstep2 ? 2*c : c))];
          checks++;
          if ((transpose ? rdata[c][r] : rdata[r][c]) != e) failures++;
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
