// cross_path: sits between the search-window buffer and the RRSA and rotates an 8x8 block on
// demand. With 'rotate' set it swaps rows and columns (out[r][c] = in[c][r]), so that the
// columns of the search window become the rows of the array and a vertical one-dimensional
// search can be run with the same left shift as a horizontal one. Combinational.
//
// Published design: a cross path that rotates blocks so a vertical search can use the left
// shift. Own choice: the rotation is an 8x8 transpose, combinational.
//
// Synthesis lists the 64 diagonal output pixels as wired straight to inputs: a transpose
// leaves the diagonal in place.
module cross_path
  import ime_pkg::*;
(
  input  logic  rotate,
  input  blk8_t din,
  output blk8_t dout
);
  always_comb
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        dout[r][c] = rotate ? din[c][r] : din[r][c];
endmodule
