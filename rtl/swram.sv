// swram: search-window buffer. It holds a W x H window of the reference picture
// (default 320 x 160 pixels = 409,600 bits) and returns any rectangle of up to 8x8 pixels at
// any position in one cycle, optionally taking every other column (horizontal 1/2
// sub-sampling, a 16x8 area), every other line (vertical 1/2 sub-sampling, one field of a
// 8x16 area) or both (16x16 area).
//
// Pixel mapping. The window is kept in 8 banks of two blocks (left, right): line n goes to
// bank n mod 8, to the left block when (n / 8) is even and to the right block otherwise, so
// that any 8 consecutive lines, and any 8 lines of one field within 16, fall into 8 different
// bank-blocks. Inside a block a picture line occupies W/32 word-line rows of 32 pixels, and
// pixel x of a line sits in row x/32 at column slot x mod 32, the slots being ordered as 8
// groups of 4 (group x mod 8, position (x mod 32)/8 in the group). Every slot has its own row
// address, computed from the requested rectangle (a global word line qualified by a local
// select), so 8 pixels at any x, or 8 pixels at stride 2, always hit 8 different slots and a
// rectangle needs no second cycle whatever its alignment ("segmentation-free").
//
// Interface: one write port of 8 consecutive pixels of one line at (wr_x, wr_y); one read port
// returning an 8x8 block rdata[row][col] one cycle after rd_en. Pixels outside rd_w x rd_h are
// returned as 0. Coordinates wrap at the window edges. The array sizes are this design's
// reading of the figure of the buffer; the per-slot row address is its own choice.
module swram
  import ime_pkg::*;
#(
  parameter int unsigned W = 320,   // window width in pixels, a multiple of 32
  parameter int unsigned H = 160    // window height in lines, a multiple of 16
) (
  input  logic                  clk,
  // write port
  input  logic                  wr_en,
  input  logic [$clog2(W)-1:0]  wr_x,
  input  logic [$clog2(H)-1:0]  wr_y,
  input  row8_t                 wr_data,
  // read port
  input  logic                  rd_en,
  input  logic [$clog2(W)-1:0]  rd_x,
  input  logic [$clog2(H)-1:0]  rd_y,
  input  logic                  hsub,     // take every other column
  input  logic                  vsub,     // take every other line
  input  logic [3:0]            rd_w,     // 1..8 columns
  input  logic [3:0]            rd_h,     // 1..8 rows
  output blk8_t                 rdata
);

  localparam int unsigned ROWS_PER_LINE = W / 32;
  localparam int unsigned LINES_PER_BLK = H / 16;
  localparam int unsigned DEPTH = ROWS_PER_LINE * LINES_PER_BLK;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);

  // ---------------------------------------------------------------- address decode
  typedef logic [3:0] blkid_t;   // bank * 2 + side

  function automatic blkid_t blk_of(logic [3:0] line);
    return blkid_t'({line[2:0], line[3]});
  endfunction

  function automatic logic [XW-1:0] wrap_x(int unsigned v);
    return XW'((v >= W) ? v - W : v);
  endfunction

  function automatic logic [YW-1:0] wrap_y(int unsigned v);
    return YW'((v >= H) ? v - H : v);
  endfunction

  logic [YW-1:0] rline [8];
  logic [XW-1:0] rcol  [8];
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      rline[i] = wrap_y(int'(rd_y) + (vsub ? 2*i : i));
      rcol[i]  = wrap_x(int'(rd_x) + (hsub ? 2*i : i));
    end
  end

  // X decoding, per bank-block: the one line of the rectangle stored there, if any. It lies
  // d = (bank - y) mod 8 lines below the first line; for a field read (stride 2) d must be even
  // and the line is d or d + 8 below, whichever belongs to this block's side.
  logic [AW-1:0] rbase [16];
  logic          bact  [16];
  always_comb begin
    for (int b = 0; b < 16; b++) begin
      logic [2:0]    d;
      logic [YW-1:0] ln;
      d  = 3'(b / 2) - rd_y[2:0];
      ln = wrap_y(int'(rd_y) + int'(d));
      if (vsub && ln[3] != 1'(b % 2)) ln = wrap_y(int'(rd_y) + int'(d) + 8);
      bact[b]  = (ln[3] == 1'(b % 2)) && (!vsub || !d[0]);
      rbase[b] = AW'((int'(ln) / 16) * ROWS_PER_LINE);
    end
  end

  // Y decoding, per column slot: the pixel of the rectangle on this slot, if any, and the
  // word-line row of its line that holds it.
  logic [AW-1:0] roff [32];
  logic          sact [32];
  always_comb begin
    for (int s = 0; s < 32; s++) begin
      logic [4:0] d;
      d = 5'(s) - rd_x[4:0];
      sact[s] = hsub ? (!d[0] && d < 5'd16) : (d < 5'd8);
      roff[s] = AW'(int'(wrap_x(int'(rd_x) + int'(d))) / 32);
    end
  end

  logic [AW-1:0] raddr [16][32];
  logic          re    [16][32];
  always_comb
    for (int b = 0; b < 16; b++)
      for (int s = 0; s < 32; s++) begin
        raddr[b][s] = rbase[b] + roff[s];
        re[b][s]    = rd_en && bact[b] && sact[s];
      end

  // Write decode: 8 consecutive pixels of one line, in one bank-block.
  logic [AW-1:0] waddr [32];
  logic          wsel  [32];
  pix_t          wpix  [32];
  always_comb
    for (int s = 0; s < 32; s++) begin
      logic [4:0] d;
      d = 5'(s) - wr_x[4:0];
      wsel[s]  = (d < 5'd8);
      wpix[s]  = wr_data[d[2:0]];
      waddr[s] = AW'((int'(wr_y) / 16) * ROWS_PER_LINE + int'(wrap_x(int'(wr_x) + int'(d))) / 32);
    end
  wire blkid_t wblk = blk_of(wr_y[3:0]);

  // ---------------------------------------------------------------- cell arrays
  pix_t cell_q [16][32];
  for (genvar b = 0; b < 16; b++) begin : g_blk
    for (genvar s = 0; s < 32; s++) begin : g_slot
      swram_col #(.DEPTH(DEPTH)) u_col (
        .clk  (clk),
        .we   (wr_en && wsel[s] && wblk == blkid_t'(b)),
        .waddr(waddr[s]),
        .wdata(wpix[s]),
        .re   (re[b][s]),
        .raddr(raddr[b][s]),
        .rdata(cell_q[b][s])
      );
    end
  end

  // ---------------------------------------------------------------- read circuit
  // Which block and slot each output pixel comes from, registered with the read.
  blkid_t     sel_blk  [8];
  logic [4:0] sel_slot [8];
  logic [7:0] row_ok, col_ok;
  always_ff @(posedge clk)
    if (rd_en)
      for (int i = 0; i < 8; i++) begin
        sel_blk[i]  <= blk_of(rline[i][3:0]);
        sel_slot[i] <= rcol[i][4:0];
        row_ok[i]   <= (4'(i) < rd_h);
        col_ok[i]   <= (4'(i) < rd_w);
      end

  always_comb
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        rdata[r][c] = (row_ok[r] && col_ok[c]) ? cell_q[sel_blk[r]][sel_slot[c]] : '0;

endmodule
