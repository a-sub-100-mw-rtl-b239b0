// pe_tb: exhaustive check of the processing element, |sw - tb| for all 65,536 pixel pairs.
module pe_tb;
  import ime_pkg::*;
  pix_t sw, tbp, ad;
  int checks = 0, failures = 0;
  pe dut (.sw(sw), .tb(tbp), .ad(ad));
  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        int e;
        sw = pix_t'(a); tbp = pix_t'(b);
        #1;
        e = (a > b) ? a - b : b - a;
        checks++;
        if (int'(ad) != e) begin
          failures++;
          if (failures < 5) $display("pe: |%0d-%0d| got %0d", a, b, ad);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
