// reg_vs: registers for vertical shift (REG_VS). For each of the eight SBSAs it holds one
// 16-pixel row, in the SBSA's chain order (positions 0..15, PU and SRU), which enters the
// bottom of that SBSA on the next vertical shift. The row is filled 8 pixels (one chain half)
// per cycle from the search-window buffer while the array is still shifting horizontally,
// so the vertical step of a full search needs no extra load cycle.
// Timing: written at the clock edge, read combinationally.
//
// Published design: REG_VS supplies the next line for vertical shifts during a full search.
// Own choices: the row width and the half-row write port.
module reg_vs
  import ime_pkg::*;
(
  input  logic          clk,
  input  logic          we,
  input  logic [2:0]    sel,    // SBSA whose row is written
  input  logic          half,   // 0: chain positions 0..7, 1: positions 8..15
  input  row8_t         wdata,
  output row16_t        rows [N_SBSA]
);
  always_ff @(posedge clk)
    if (we)
      for (int c = 0; c < 8; c++) rows[sel][half*8 + c] <= wdata[c];
endmodule
