// image_analysis: chooses the fine search after the coarse search. It takes the eight
// motion vectors found for the field 16x8 blocks, lane k = {block k[2] (0 upper, 1 lower),
// template field k[1] (0 top, 1 bottom), search-window field k[0] (0 top, 1 bottom)}, and
// tests two temporal and four spatial conditions, each the distance |dx| + |dy| between two
// vectors against the threshold THR:
//   temporal: upper TT-BB, lower TT-BB;  spatial: upper-lower for TT, TB, BT and BB.
// If all six hold, the vectors are locally distributed and the MB-pair fine search (FSMP) is
// chosen; otherwise the small-block fine search (FSSB). Combinational.
//
// Published design: conditions (1)-(6) on the eight field 16x8 vectors and the threshold
// 4. Own choices: the L1 distance, 'under' as strictly less, the lane order, and condition (3)
// read as upper TT against lower TT, matching the pattern of (4)-(6).
module image_analysis
  import ime_pkg::*;
#(
  parameter int unsigned THR = 4
) (
  input  mv_t [7:0]  mv,
  output logic [5:0] cond,   // cond[i] = condition (i+1) holds
  output logic       fsmp    // 1: FSMP, 0: FSSB
);
  localparam int U_TT = 0, U_TB = 1, U_BT = 2, U_BB = 3;
  localparam int L_TT = 4, L_TB = 5, L_BT = 6, L_BB = 7;

  function automatic logic close(mv_t a, mv_t b);
    logic signed [MV_W:0] dx, dy;
    logic [MV_W+1:0]      d;
    dx = (MV_W+1)'(a.x) - (MV_W+1)'(b.x);
    dy = (MV_W+1)'(a.y) - (MV_W+1)'(b.y);
    d  = (MV_W+2)'(dx < 0 ? -dx : dx) + (MV_W+2)'(dy < 0 ? -dy : dy);
    return d < (MV_W+2)'(THR);
  endfunction

  always_comb begin
    cond[0] = close(mv[U_TT], mv[U_BB]);
    cond[1] = close(mv[L_TT], mv[L_BB]);
    cond[2] = close(mv[U_TT], mv[L_TT]);
    cond[3] = close(mv[U_TB], mv[L_TB]);
    cond[4] = close(mv[U_BT], mv[L_BT]);
    cond[5] = close(mv[U_BB], mv[L_BB]);
    fsmp    = &cond;
  end
endmodule
