// crcs: coarse-search sequencer. It runs the coarse stage of the search on the eight field
// 16x8 blocks of an MB pair (MAP_COARSE: upper/lower block x template field x search-window
// field, horizontally 1/2 sub-sampled) by issuing commands to the controller and reading the
// per-lane winners from mv_select after each one:
//
//  1. initial vector search: one-time block matching at each of four candidate vectors
//     (iv[0..3], supplied by the host); the best becomes the search centre of each lane.
//  2. complementally recursive cross search: two recursive cross searches start from that
//     centre. RCS(1) searches a horizontal line of +-LONG points, then a vertical line of
//     +-SHORT points through the best point so far, then a horizontal line of +-SHORT; RCS(2)
//     does the same with vertical and horizontal exchanged. Each line is centred on the best
//     point of the same RCS so far.
//  3. per lane, the vector of the RCS with the smaller SAD is the result (RCS(1) on a tie).
//
// The two RCSs run one after the other on the array. Vectors are in coarse-search units: two
// pels horizontally, one field line vertically. Interface: 'start' (while idle) begins a run;
// 'fin' pulses when res_mv / res_sad are valid; 'busy' is high in between.
//
// Published design: the initial vector search, the two three-step RCSs with +-40 / +-16 lines
// and the choice of the smaller SAD. Own choices: four host-supplied initial vectors, running
// the two RCSs one after the other, and RCS(1) winning a tie.
//
// Synthesis lists some command bits as constant: the coarse search always uses MAP_COARSE,
// 8x8 mode, and no frame/field or range fields.
module crcs
  import ime_pkg::*;
#(
  parameter int unsigned LONG  = 40,   // points each side on the first RCS step
  parameter int unsigned SHORT = 16    // points each side on the second and third steps
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [8:0]   x0,
  input  logic [7:0]   y0,
  input  mv_t  [3:0]   iv,
  // controller side
  output logic         cmd_valid,
  output ime_cmd_t     cmd,
  input  logic         cmd_ready,
  input  logic         cmd_done,
  input  sad_t [7:0]   best_sad,
  input  mv_t  [7:0]   best_mv,
  // result
  output logic         busy,
  output logic         fin,
  output mv_t  [7:0]   res_mv,
  output sad_t [7:0]   res_sad,
  output logic [7:0]   res_rcs2     // lane k's result came from RCS(2)
);

  typedef enum logic [1:0] { P_IDLE, P_ISSUE, P_WAIT, P_FIN } phase_e;

  phase_e      ph;
  logic [3:0]  step;     // 0..3 init, 4..6 RCS(1), 7..9 RCS(2)
  logic [8:0]  x0_q;
  logic [7:0]  y0_q;
  mv_t  [3:0]  iv_q;
  sad_t [7:0]  ib_sad, r1_sad, r2_sad;
  mv_t  [7:0]  ib_mv,  r1_mv,  r2_mv;

  // command of the current step
  always_comb begin
    int ext;
    logic vert, rcs2;
    int s;
    mv_t cen;
    cen = '0;
    cmd = '0;
    cmd.map  = MAP_COARSE;
    cmd.mode = BM_8X8;
    cmd.x0   = x0_q;
    cmd.y0   = y0_q;
    rcs2 = (step >= 7);
    s    = rcs2 ? int'(step) - 7 : int'(step) - 4;
    ext  = (s == 0) ? int'(LONG) : int'(SHORT);
    // RCS(1): H, V, H; RCS(2): V, H, V
    vert = rcs2 ? (s != 1) : (s == 1);
    if (step < 4) begin
      cmd.op = OP_POINT;
      for (int k = 0; k < 8; k++) cmd.ctr[k] = iv_q[step[1:0]];
    end else begin
      cmd.op    = OP_LINE;
      cmd.vaxis = vert;
      cmd.npts  = 8'(2 * ext + 1);
      for (int k = 0; k < 8; k++) begin
        if (s == 0) cen = ib_mv[k];
        else        cen = rcs2 ? r2_mv[k] : r1_mv[k];
        if (vert) cen.y = cen.y - MV_W'(ext);
        else      cen.x = cen.x - MV_W'(ext);
        cmd.ctr[k] = cen;
      end
    end
  end

  assign cmd_valid = (ph == P_ISSUE);
  assign busy      = (ph != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= P_IDLE;
      step <= '0;
      x0_q <= '0; y0_q <= '0; iv_q <= '0;
      ib_sad <= '1; r1_sad <= '1; r2_sad <= '1;
      ib_mv <= '0; r1_mv <= '0; r2_mv <= '0;
      res_mv <= '0; res_sad <= '0; res_rcs2 <= '0;
      fin <= 1'b0;
    end else begin
      fin <= 1'b0;
      unique case (ph)
        P_IDLE:
          if (start) begin
            x0_q <= x0; y0_q <= y0; iv_q <= iv;
            ib_sad <= '1;
            step <= '0;
            ph <= P_ISSUE;
          end
        P_ISSUE:
          if (cmd_ready) ph <= P_WAIT;
        P_WAIT:
          if (cmd_done) begin
            for (int k = 0; k < 8; k++) begin
              if (step < 4) begin
                if (best_sad[k] < ib_sad[k]) begin
                  ib_sad[k] <= best_sad[k];
                  ib_mv[k]  <= best_mv[k];
                end
              end else if (step < 7) begin
                if (step == 4 || best_sad[k] < r1_sad[k]) begin
                  r1_sad[k] <= (step == 4 && !(best_sad[k] < ib_sad[k])) ? ib_sad[k] : best_sad[k];
                  r1_mv[k]  <= (step == 4 && !(best_sad[k] < ib_sad[k])) ? ib_mv[k]  : best_mv[k];
                end
              end else begin
                if (step == 7 || best_sad[k] < r2_sad[k]) begin
                  r2_sad[k] <= (step == 7 && !(best_sad[k] < ib_sad[k])) ? ib_sad[k] : best_sad[k];
                  r2_mv[k]  <= (step == 7 && !(best_sad[k] < ib_sad[k])) ? ib_mv[k]  : best_mv[k];
                end
              end
            end
            if (step == 9) ph <= P_FIN;
            else begin
              step <= step + 1'b1;
              ph <= P_ISSUE;
            end
          end
        P_FIN: begin
          for (int k = 0; k < 8; k++) begin
            res_rcs2[k] <= (r2_sad[k] < r1_sad[k]);
            res_mv[k]   <= (r2_sad[k] < r1_sad[k]) ? r2_mv[k]  : r1_mv[k];
            res_sad[k]  <= (r2_sad[k] < r1_sad[k]) ? r2_sad[k] : r1_sad[k];
          end
          fin <= 1'b1;
          ph <= P_IDLE;
        end
        default: ph <= P_IDLE;
      endcase
    end
  end

endmodule
