// mv_select: keeps, for each of the eight SAD lanes of the array, the smallest SAD seen since
// the last clear and the motion vector at which it occurred. A new SAD replaces the kept one
// only if it is strictly smaller, so among equal SADs the first searched point wins.
// Timing: 'clear' and updates take effect at the clock edge; clear has priority.
//
// The published design only shows SAD and vector going to the controller; the per-lane
// first minimum is this design's own choice.
module mv_select
  import ime_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         valid,        // sad/mv carry a search point
  input  logic [7:0]   lane_valid,
  input  sad_t [7:0]   sad,
  input  mv_t  [7:0]   mv,
  output sad_t [7:0]   best_sad,
  output mv_t  [7:0]   best_mv
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad <= '1;
      best_mv  <= '0;
    end else if (clear) begin
      best_sad <= '1;
      best_mv  <= '0;
    end else if (valid) begin
      for (int k = 0; k < 8; k++)
        if (lane_valid[k] && sad[k] < best_sad[k]) begin
          best_sad[k] <= sad[k];
          best_mv[k]  <= mv[k];
        end
    end
  end
endmodule
