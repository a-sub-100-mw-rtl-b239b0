// tb_buffer: template-block buffer, a register file holding the current macroblock pair
// (16 columns x 32 lines of luma). It is written one 8-pixel half line per cycle and read as
// one 8x8 block per cycle: the block starts at (row0, col0) and takes every line or every
// other line (field template), every column or every other column (horizontally sub-sampled
// template); 'transpose' swaps rows and columns to match a block rotated by the cross path.
// Addresses wrap inside the 16x32 buffer. Timing: the block appears one cycle after rd_en.
//
// Published design: a register file holding the current image data. Own choices: its
// shape, the strided reads and the transposed read.
module tb_buffer
  import ime_pkg::*;
(
  input  logic        clk,
  input  logic        we,
  input  logic [4:0]  wrow,
  input  logic        whalf,      // 0: columns 0..7, 1: columns 8..15
  input  row8_t       wdata,
  input  logic        rd_en,
  input  logic [4:0]  row0,
  input  logic [3:0]  col0,
  input  logic        rstep2,
  input  logic        cstep2,
  input  logic        transpose,
  output blk8_t       rdata
);
  pix_t mem [32][16];

  always_ff @(posedge clk) begin
    if (we)
      for (int c = 0; c < 8; c++) mem[wrow][whalf*8 + c] <= wdata[c];
    if (rd_en)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          logic [4:0] rr;
          logic [3:0] cc;
          rr = row0 + (rstep2 ? 5'(2*r) : 5'(r));
          cc = col0 + (cstep2 ? 4'(2*c) : 4'(c));
          if (transpose) rdata[c][r] <= mem[rr][cc];
          else           rdata[r][c] <= mem[rr][cc];
        end
  end
endmodule
