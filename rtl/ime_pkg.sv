// ime_pkg: types and constants shared by the integer-pel motion estimation (IME) core.
//
// Pixels are 8-bit luma samples. An 8x8 block is indexed [row][column]. A SAD of one 8x8
// block fits 14 bits (64 x 255); the largest merged block, 16x32, needs 17 bits. Motion
// vectors are kept in "search-point" units: one unit is one step of the systolic array, i.e.
// one pel horizontally (two pels when the search window is horizontally sub-sampled) and one
// frame line (one field line in field modes) vertically.
//
// The block sizes and modes are the published ones; widths and encodings are this design's
// own.
//
// N_SBSA is read by reg_vs and rrsa only; a lint of another module that imports the package
// reports it unused.
package ime_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned N_SBSA = 8;       // sub block systolic arrays in the RRSA
  localparam int unsigned SAD8_W = 14;      // SAD of one 8x8 block
  localparam int unsigned SAD_W  = 17;      // SAD of a merged block, up to 16x32
  localparam int unsigned MV_W   = 10;      // signed motion-vector component

  typedef logic [PIX_W-1:0]          pix_t;
  typedef pix_t [7:0]                row8_t;    // 8 pixels of one line, [column]
  typedef pix_t [15:0]               row16_t;   // one row of an SBSA chain (PU + SRU)
  typedef pix_t [7:0][7:0]           blk8_t;    // 8x8 block, [row][column]
  typedef logic [SAD8_W-1:0]         sad8_t;
  typedef logic [SAD_W-1:0]          sad_t;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // Block sizes the RRSA can be configured for (width x height).
  typedef enum logic [2:0] {
    BM_8X8   = 3'd0,
    BM_16X8  = 3'd1,
    BM_8X16  = 3'd2,
    BM_16X16 = 3'd3,
    BM_16X32 = 3'd4
  } blk_mode_e;

  // Shift operation applied to every SBSA of the RRSA in one cycle.
  typedef enum logic [1:0] {
    SH_NONE  = 2'd0,
    SH_LEFT  = 2'd1,
    SH_RIGHT = 2'd2,
    SH_UP    = 2'd3
  } shift_e;

  // Static configuration of the RRSA for one search.
  typedef struct packed {
    blk_mode_e mode;       // how SBSA SADs are merged and SBSAs chained vertically
    logic      ring_pair;  // 1: horizontal rings span two SBSAs (16-wide blocks)
    logic      field;      // 1: field MBAFF mode (rows 0-1 top field, rows 2-3 bottom)
  } rr_cfg_t;

  // One cycle of RRSA work issued by the controller.
  typedef struct packed {
    shift_e      shift;    // shift of all SBSAs
    logic        ld_en;    // write ld_blk into one half (8 columns) of SBSA ld_sel's chain
    logic        vs_en;    // write row 0 of ld_blk into one half of REG_VS for SBSA ld_sel
    logic [2:0]  ld_sel;
    logic        ld_half;  // chain half: 0 = chain positions 0..7, 1 = positions 8..15
    logic        tb_en;    // write tb_blk as the template of SBSA tb_sel
    logic [2:0]  tb_sel;
  } rr_op_t;

  // Marks an RRSA state that is a complete search point, and the vector of each lane.
  typedef struct packed {
    logic           eval;
    mv_t [7:0]      mv;
  } rr_tag_t;

  // Controller commands.
  typedef enum logic [1:0] {
    OP_FS    = 2'd0,   // full search, snake order, +-range around ctr[0]
    OP_LINE  = 2'd1,   // one-dimensional search of npts points from ctr[k] per lane
    OP_POINT = 2'd2    // one-time block matching at ctr[k] per lane
  } cmd_op_e;

  // How the eight SBSAs map onto template blocks.
  typedef enum logic {
    MAP_TILE   = 1'b0, // SBSA k holds 8x8 tile (k%2, k/2) of the 16x32 MB pair (field: k<4 top field)
    MAP_COARSE = 1'b1  // SBSA k holds field 16x8 block {upper/lower=k[2], TB field=k[1]}
                       // searched in SW field k[0], horizontally 1/2 sub-sampled
  } map_e;

  typedef struct packed {
    cmd_op_e    op;
    map_e       map;
    blk_mode_e  mode;
    logic       field;      // MAP_TILE only: field MBAFF mode
    logic       swpar_top;  // MAP_TILE field mode: SW field searched by the top-field template
    logic       swpar_bot;  // MAP_TILE field mode: SW field searched by the bottom-field template
    logic       vaxis;      // OP_LINE: 0 = horizontal, 1 = vertical (uses the cross path)
    logic [3:0] range;      // OP_FS: 4 or 8
    logic [7:0] npts;       // OP_LINE: number of points, 1..255
    logic [8:0] x0;         // SW column of the MB pair for a zero vector
    logic [7:0] y0;         // SW line of the MB pair for a zero vector
    mv_t [7:0]  ctr;        // per-lane start / centre vector
  } ime_cmd_t;


  // Vertical chaining of the RRSA: does SBSA k take its bottom row from SBSA k+2 on a
  // vertical shift (otherwise from REG_VS)? Grid rows are chained in pairs for 8x16 and
  // 16x16 blocks, all four for a frame 16x32 block; field templates never cross rows 1-2.
  function automatic logic vchained(int k, blk_mode_e mode, logic field);
    int row;
    row = k / 2;
    if (row >= 3) return 1'b0;
    unique case (mode)
      BM_8X16, BM_16X16: return (row % 2) == 0;
      BM_16X32:          return field ? ((row % 2) == 0) : 1'b1;
      default:           return 1'b0;
    endcase
  endfunction

endpackage
