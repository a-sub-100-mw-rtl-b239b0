// ime_core: integer-pel motion estimation processor core for one reference frame.
//
// The search window of the reference frame (320 x 160 pixels, enough for a +-128 x +-64
// search of a 16x32 MB pair) sits in the search-window buffer (swram), the current MB pair in
// the template buffer (tb_buffer). The controller (ime_ctrl) reads 8x8 blocks from both, the
// search-window blocks through the cross path, and drives the reconfigurable ring-connected
// systolic array (rrsa), which computes up to eight block SADs per cycle. mv_select keeps the
// best SAD and vector of every block lane. A command interface lets a host run full searches,
// one-dimensional searches and one-time block matches; the coarse-search sequencer (crcs)
// runs the initial vector search and the complementally recursive cross search on its own,
// and image_analysis turns the eight coarse field-16x8 vectors into the choice between the
// two fine searches (fsmp = 1: search the MB pair as a whole; 0: search the small blocks).
// The best vectors and SADs are also the output towards fractional-pel estimation.
//
// Interfaces: search-window writes of 8 pixels of one line per cycle (memory bus); template
// writes of 8 pixels per cycle; a valid/ready command port; done pulses when best_sad /
// best_mv hold the result of the last command. More reference frames are handled by
// instantiating one core per frame side by side.
//
// Published design: the block diagram (buffer, cross path, template buffer, systolic array,
// controller) and the hierarchical search. Own choices: the load and command ports in place
// of the CPU and memory buses, and the host sequencing the fine search.
//
// Synthesis lists lane_valid[0] as constant: lane 0 carries a SAD in every block mode.
module ime_core
  import ime_pkg::*;
#(
  parameter int unsigned SW_W = 320,
  parameter int unsigned SW_H = 160,
  parameter int unsigned CRCS_LONG  = 40,
  parameter int unsigned CRCS_SHORT = 16,
  parameter int unsigned THR_PATH   = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // search-window buffer write (memory bus)
  input  logic                     sw_wr_en,
  input  logic [$clog2(SW_W)-1:0]  sw_wr_x,
  input  logic [$clog2(SW_H)-1:0]  sw_wr_y,
  input  row8_t                    sw_wr_data,
  // template buffer write
  input  logic                     tb_wr_en,
  input  logic [4:0]               tb_wr_row,
  input  logic                     tb_wr_half,
  input  row8_t                    tb_wr_data,
  // host commands
  input  logic                     cmd_valid,
  output logic                     cmd_ready,
  input  ime_cmd_t                 cmd,
  output logic                     done,
  output sad_t [7:0]               best_sad,
  output mv_t  [7:0]               best_mv,
  output logic [7:0]               lane_valid,
  // coarse search
  input  logic                     crcs_start,
  input  logic [8:0]               crcs_x0,
  input  logic [7:0]               crcs_y0,
  input  mv_t  [3:0]               crcs_iv,
  output logic                     crcs_busy,
  output logic                     crcs_fin,
  output mv_t  [7:0]               crcs_mv,
  output sad_t [7:0]               crcs_sad,
  output logic [7:0]               crcs_rcs2,
  // image analysis of the coarse vectors
  output logic [5:0]               ia_cond,
  output logic                     fsmp,
  // activity of the array
  output logic                     stall,
  output logic                     reload,
  output rr_op_t                   rr_op_mon
);

  // command arbitration: the coarse sequencer owns the controller while it runs
  logic     c_valid, c_ready;
  ime_cmd_t c_cmd;
  logic     s_valid;
  ime_cmd_t s_cmd;

  assign c_valid   = crcs_busy ? s_valid : cmd_valid;
  assign c_cmd     = crcs_busy ? s_cmd   : cmd;
  assign cmd_ready = c_ready && !crcs_busy;

  // controller
  logic                     sw_rd_en, sw_hsub, sw_vsub, xp_rotate;
  logic [$clog2(SW_W)-1:0]  sw_rd_x;
  logic [$clog2(SW_H)-1:0]  sw_rd_y;
  logic                     tb_rd_en, tb_rstep2, tb_cstep2, tb_transpose;
  logic [4:0]               tb_row0;
  logic [3:0]               tb_col0;
  rr_cfg_t                  rr_cfg;
  rr_op_t                   rr_op;
  rr_tag_t                  rr_tag, tag_out;
  logic                     mv_clear;
  sad_t [7:0]               sad;

  ime_ctrl #(.W(SW_W), .H(SW_H)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid(c_valid), .cmd_ready(c_ready), .cmd(c_cmd),
    .sw_rd_en, .sw_rd_x, .sw_rd_y, .sw_hsub, .sw_vsub, .xp_rotate,
    .tb_rd_en, .tb_row0, .tb_col0, .tb_rstep2, .tb_cstep2, .tb_transpose,
    .rr_cfg, .rr_op, .rr_tag,
    .mv_clear, .done, .stall, .reload
  );

  // search-window buffer and cross path
  blk8_t sw_blk, xp_blk, tb_blk;

  swram #(.W(SW_W), .H(SW_H)) u_swram (
    .clk,
    .wr_en(sw_wr_en), .wr_x(sw_wr_x), .wr_y(sw_wr_y), .wr_data(sw_wr_data),
    .rd_en(sw_rd_en), .rd_x(sw_rd_x), .rd_y(sw_rd_y),
    .hsub(sw_hsub), .vsub(sw_vsub), .rd_w(4'd8), .rd_h(4'd8),
    .rdata(sw_blk)
  );

  cross_path u_cross_path (.rotate(xp_rotate), .din(sw_blk), .dout(xp_blk));

  tb_buffer u_tb_buffer (
    .clk,
    .we(tb_wr_en), .wrow(tb_wr_row), .whalf(tb_wr_half), .wdata(tb_wr_data),
    .rd_en(tb_rd_en), .row0(tb_row0), .col0(tb_col0),
    .rstep2(tb_rstep2), .cstep2(tb_cstep2), .transpose(tb_transpose),
    .rdata(tb_blk)
  );

  // systolic array
  rrsa u_rrsa (
    .clk, .rst_n,
    .cfg(rr_cfg), .op(rr_op), .ld_blk(xp_blk), .tb_blk(tb_blk),
    .tag_in(rr_tag), .sad(sad), .lane_valid(lane_valid), .tag_out(tag_out)
  );

  mv_select u_mv_select (
    .clk, .rst_n,
    .clear(mv_clear), .valid(tag_out.eval), .lane_valid(lane_valid),
    .sad(sad), .mv(tag_out.mv),
    .best_sad, .best_mv
  );

  // coarse search and image analysis
  crcs #(.LONG(CRCS_LONG), .SHORT(CRCS_SHORT)) u_crcs (
    .clk, .rst_n,
    .start(crcs_start), .x0(crcs_x0), .y0(crcs_y0), .iv(crcs_iv),
    .cmd_valid(s_valid), .cmd(s_cmd), .cmd_ready(c_ready), .cmd_done(done),
    .best_sad, .best_mv,
    .busy(crcs_busy), .fin(crcs_fin), .res_mv(crcs_mv), .res_sad(crcs_sad),
    .res_rcs2(crcs_rcs2)
  );

  image_analysis #(.THR(THR_PATH)) u_image_analysis (
    .mv(crcs_mv), .cond(ia_cond), .fsmp(fsmp)
  );

  assign rr_op_mon = rr_op;

endmodule
