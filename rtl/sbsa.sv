// sbsa: sub block systolic array. One SBSA is an 8-row by 16-column chain of pixel
// registers: 8 columns form the processing unit (PU, 8x8 processing elements) and the other 8
// the shift register unit (SRU, 8x8 shift register elements that only buffer search-window
// pixels for the PU). Each PE also holds one template pixel, so the PU computes the SAD of
// one 8x8 template block against the 8x8 search-window pixels in front of it.
//
// Every row of the chain can shift one position left or right; the pixel that enters at the
// end comes from the ring multiplexer outside (rin for a left shift, lin for a right shift),
// which the RRSA closes either on this SBSA (8-wide ring, PU+SRU) or on its neighbour (16-wide
// ring over two SBSAs). A vertical shift moves every row up by one and takes a new bottom row
// (all 16 positions) from the SBSA below or from REG_VS; row 0 leaves on 'top'. One half of
// the chain (8 columns, all rows) can be written directly from the search-window buffer
// (initial load), and the template can be written in one cycle.
//
// PU_LEFT selects the orientation drawn for the design: 1 puts the PU at chain positions
// 0..7 and the SRU at 8..15 (the right-hand SBSAs 1,3,5,7), 0 mirrors it (SBSAs 0,2,4,6), so
// that the PUs of a pair are adjacent in the middle and the SRUs sit at the outer ends.
//
// Timing: state changes at the clock edge; 'sad' is combinational from the state.
// Only one of shift / chain load is expected per cycle; a load takes priority.
//
// Published design: the PU of 8x8 PEs, the SRU of 8x8 shift registers, left / right /
// vertical shifts and a direct initial load. Own choices: whole 16-pixel rows move on a
// vertical shift, and loads take priority over shifts.
module sbsa
  import ime_pkg::*;
#(
  parameter bit PU_LEFT = 1'b1
) (
  input  logic        clk,
  input  shift_e      shift,
  input  logic        ld_en,     // write ld_blk into chain half ld_half
  input  logic        ld_half,
  input  blk8_t       ld_blk,
  input  logic        tb_en,     // write the template
  input  blk8_t       tb_blk,
  input  row8_t       lin,       // per row: pixel entering position 0 on a right shift
  input  row8_t       rin,       // per row: pixel entering position 15 on a left shift
  input  row16_t      bin,       // row entering at the bottom on a vertical shift
  output row8_t       end0,      // per row: chain position 0
  output row8_t       end15,     // per row: chain position 15
  output row16_t      top,       // row 0, sent to the SBSA above
  output sad8_t       sad        // SAD of the PU against the template
);

  localparam int unsigned PU_BASE = PU_LEFT ? 0 : 8;

  row16_t chain [8];
  blk8_t  tbr;

  always_ff @(posedge clk) begin
    if (ld_en) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          chain[r][ld_half*8 + c] <= ld_blk[r][c];
    end else begin
      unique case (shift)
        SH_LEFT:
          for (int r = 0; r < 8; r++) begin
            for (int p = 0; p < 15; p++) chain[r][p] <= chain[r][p+1];
            chain[r][15] <= rin[r];
          end
        SH_RIGHT:
          for (int r = 0; r < 8; r++) begin
            for (int p = 1; p < 16; p++) chain[r][p] <= chain[r][p-1];
            chain[r][0] <= lin[r];
          end
        SH_UP: begin
          for (int r = 0; r < 7; r++) chain[r] <= chain[r+1];
          chain[7] <= bin;
        end
        default: ;
      endcase
    end
    if (tb_en) tbr <= tb_blk;
  end

  always_comb begin
    for (int r = 0; r < 8; r++) begin
      end0[r]  = chain[r][0];
      end15[r] = chain[r][15];
    end
    top = chain[0];
  end

  // 8x8 processing elements and the SAD adder
  pix_t ad [8][8];
  for (genvar r = 0; r < 8; r++) begin : g_row
    for (genvar c = 0; c < 8; c++) begin : g_col
      pe u_pe (.sw(chain[r][PU_BASE + c]), .tb(tbr[r][c]), .ad(ad[r][c]));
    end
  end

  always_comb begin
    sad = '0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        sad += sad8_t'(ad[r][c]);
  end

endmodule
