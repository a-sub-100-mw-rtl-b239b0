// rrsa: reconfigurable ring-connected systolic array. Eight SBSAs are arranged as a 2 x 4
// grid (SBSA k at column k%2, row k/2); their PUs together form a 16 x 32 processing-element
// array, so one MB pair (16x32), two 16x16, four 16x8 or 8x16, or eight 8x8 template blocks can
// be matched in one cycle. Per cycle the array takes one operation: a left, right or vertical
// shift of every SBSA, a direct load of one half (8 columns) of one SBSA's chain, a load of
// one half-row of REG_VS, and/or a template load of one SBSA.
//
// Reconfiguration (cfg):
//  * ring_pair = 0: every SBSA's rows are closed into 16-pixel rings (PU + SRU), so its PU can
//    slide over 8 extra columns (an 8-wide block searched +-4).
//    ring_pair = 1: the two SBSAs of a grid row form 32-pixel rings, SRU|PU|PU|SRU, for 16-wide
//    blocks searched +-8. Nothing leaves a ring, so a search can turn back without reloading.
//  * mode selects which SBSAs are chained vertically (the top row of SBSA k+2 enters the bottom
//    of SBSA k on a vertical shift) and how the eight 8x8 SADs are added into block SADs.
//    SBSAs at the bottom of a chain take their new row from REG_VS. In field mode grid rows
//    0-1 carry the top-field template and rows 2-3 the bottom field, so no chain crosses them.
//
// SAD lanes (sad[k] with lane_valid[k]): 8x8 -> lane k = SBSA k; 16x8 -> lanes 0,2,4,6 =
// SBSA k + k+1; 8x16 -> lanes 0,1,4,5 = SBSA k + k+2; 16x16 -> lanes 0,4 = grid rows
// (0,1) and (2,3); 16x32 -> lane 0 = all eight.
//
// Timing: an operation applied at clock edge t changes the state; the SADs of that state are
// registered at edge t+1 and appear in sad[] together with the tag that came with the
// operation (tag_out), i.e. two cycles after the operation was presented.
//
// Published design: eight SBSAs, horizontal rings, vertical connections, PE arrays from 8x8 to
// 16x32 in frame and field mode. Own choices: the grid placement, the lane numbering and the
// registered SAD output.
//
// Synthesis lists some output bits as constant: lane_valid[0] (lane 0 carries a SAD in every
// mode) and the top bits of lanes that only ever carry 8x8, 16x8 or 8x16 sums.
module rrsa
  import ime_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  rr_cfg_t     cfg,
  input  rr_op_t      op,
  input  blk8_t       ld_blk,     // search-window block (through the cross path)
  input  blk8_t       tb_blk,     // template block
  input  rr_tag_t     tag_in,
  output sad_t [7:0]  sad,
  output logic [7:0]  lane_valid,
  output rr_tag_t     tag_out
);

  row8_t  end0  [8];
  row8_t  end15 [8];
  row16_t top   [8];
  row8_t  lin   [8];
  row8_t  rin   [8];
  row16_t bin   [8];
  sad8_t  sad8  [8];
  row16_t vs_rows [N_SBSA];

  // ring and vertical multiplexers
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic [2:0] p;
      p = cfg.ring_pair ? 3'(k ^ 1) : 3'(k);
      lin[k] = end15[p];
      rin[k] = end0[p];
      if (k < 6 && vchained(k, cfg.mode, cfg.field)) bin[k] = top[k+2];
      else                          bin[k] = vs_rows[k];
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_sbsa
    sbsa #(.PU_LEFT(k % 2 == 1)) u_sbsa (
      .clk    (clk),
      .shift  (op.shift),
      .ld_en  (op.ld_en && op.ld_sel == 3'(k)),
      .ld_half(op.ld_half),
      .ld_blk (ld_blk),
      .tb_en  (op.tb_en && op.tb_sel == 3'(k)),
      .tb_blk (tb_blk),
      .lin    (lin[k]),
      .rin    (rin[k]),
      .bin    (bin[k]),
      .end0   (end0[k]),
      .end15  (end15[k]),
      .top    (top[k]),
      .sad    (sad8[k])
    );
  end

  reg_vs u_reg_vs (
    .clk  (clk),
    .we   (op.vs_en),
    .sel  (op.ld_sel),
    .half (op.ld_half),
    .wdata(ld_blk[0]),
    .rows (vs_rows)
  );

  // SAD merging
  sad_t [7:0] sad_d;
  logic [7:0] valid_d;
  always_comb begin
    sad_d   = '0;
    valid_d = '0;
    unique case (cfg.mode)
      BM_16X8:
        for (int k = 0; k < 8; k += 2) begin
          sad_d[k]   = sad_t'(sad8[k]) + sad_t'(sad8[k+1]);
          valid_d[k] = 1'b1;
        end
      BM_8X16:
        for (int k = 0; k < 8; k++)
          if ((k / 2) % 2 == 0) begin
            sad_d[k]   = sad_t'(sad8[k]) + sad_t'(sad8[k+2]);
            valid_d[k] = 1'b1;
          end
      BM_16X16:
        for (int k = 0; k < 8; k += 4) begin
          sad_d[k]   = sad_t'(sad8[k]) + sad_t'(sad8[k+1]) + sad_t'(sad8[k+2]) + sad_t'(sad8[k+3]);
          valid_d[k] = 1'b1;
        end
      BM_16X32: begin
        for (int k = 0; k < 8; k++) sad_d[0] += sad_t'(sad8[k]);
        valid_d[0] = 1'b1;
      end
      default:
        for (int k = 0; k < 8; k++) begin
          sad_d[k]   = sad_t'(sad8[k]);
          valid_d[k] = 1'b1;
        end
    endcase
  end

  rr_tag_t tag_d1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_d1  <= '0;
      tag_out <= '0;
      sad     <= '0;
    end else begin
      tag_d1  <= tag_in;
      tag_out <= tag_d1;
      sad     <= sad_d;
    end
  end
  assign lane_valid = valid_d;

endmodule
