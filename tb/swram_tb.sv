// swram_tb: fills the whole 320x160 search window through the write port, then reads
// rectangles at random positions (including ones that wrap at the edges) in all four
// sub-sampling forms and random sizes, and compares every pixel with a copy. Also checks
// that a read returns its data exactly one cycle after the request (back-to-back reads)
// and that a write in the same cycle as a read of another line does not disturb it.
module swram_tb;
  import ime_pkg::*;
  localparam int W = 320, H = 160;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, hsub, vsub;
  logic [8:0] wr_x, rd_x;
  logic [7:0] wr_y, rd_y;
  logic [3:0] rd_w, rd_h;
  row8_t wr_data;
  blk8_t rdata;
  pix_t pic [H][W];
  int checks = 0, failures = 0;

  swram #(.W(W), .H(H)) dut (.*);

  task automatic check_block(int x, int y, logic hs, logic vs, int w, int h);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        pix_t e;
        e = (r < h && c < w) ? pic[(y + (vs ? 2*r : r)) % H][(x + (hs ? 2*c : c)) % W] : '0;
        checks++;
        if (rdata[r][c] != e) begin
          failures++;
          if (failures < 6) $display("swram: (%0d,%0d) h%0d v%0d r%0d c%0d got %0h exp %0h",
                                     x, y, hs, vs, r, c, rdata[r][c], e);
        end
      end
  endtask

  initial begin
    int px, py, phs, pvs, pw, ph;
    wr_en = 0; rd_en = 0; hsub = 0; vsub = 0; wr_x = 0; wr_y = 0; rd_x = 0; rd_y = 0;
    rd_w = 8; rd_h = 8; wr_data = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 8) begin
        @(negedge clk);
        wr_en = 1; wr_x = 9'(x); wr_y = 8'(y);
        for (int c = 0; c < 8; c++) begin
          wr_data[c] = pix_t'($urandom);
          pic[y][x+c] = wr_data[c];
        end
      end
    @(negedge clk); wr_en = 0;
    // back-to-back random reads: the data of read n is checked while read n+1 is issued
    px = -1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (px >= 0) check_block(px, py, phs[0], pvs[0], pw, ph);
      rd_en = 1;
      rd_x = 9'($urandom_range(0, W - 1));
      rd_y = 8'($urandom_range(0, H - 1));
      hsub = 1'($urandom); vsub = 1'($urandom);
      rd_w = (t % 4 == 0) ? 4'($urandom_range(1, 8)) : 4'd8;
      rd_h = (t % 4 == 0) ? 4'($urandom_range(1, 8)) : 4'd8;
      // an unaligned write to a line that is not being read
      wr_en = (t % 5 == 0);
      wr_y = 8'((int'(rd_y) + 20) % H);
      wr_x = 9'($urandom_range(0, W - 1));
      for (int c = 0; c < 8; c++) wr_data[c] = pix_t'($urandom);
      px = rd_x; py = rd_y; phs = hsub; pvs = vsub; pw = rd_w; ph = rd_h;
      @(posedge clk);
      if (wr_en) for (int c = 0; c < 8; c++) pic[wr_y][(int'(wr_x) + c) % W] = wr_data[c];
      // lines touched by the pending read must not have been written
    end
    @(negedge clk);
    check_block(px, py, phs[0], pvs[0], pw, ph);
    rd_en = 0; wr_en = 0;
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
