// swram_col: one pixel column of one SWRAM block, the cells that share one bit-line group
// behind the read circuit. A simple dual-port array: one synchronous write and one
// synchronous read per cycle (the search-window buffer is one-read / one-write).
// Timing: rdata holds the addressed pixel one cycle after re.
//
// Own choice: how the buffer's array is cut into columns; the published buffer is a
// custom SRAM.
module swram_col
  import ime_pkg::*;
#(
  parameter int unsigned DEPTH = 100
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  pix_t                      wdata,
  input  logic                      re,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output pix_t                      rdata
);
  pix_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
