// ime_ctrl: controller of the IME core. It accepts one search command at a time and turns
// it into a cycle-by-cycle sequence of search-window reads, template reads and RRSA
// operations. Three kinds of search are supported:
//
//  OP_FS    full search of +-range points around ctr[0] in snake order (right along the top
//           line, one line down, left, one line down, ...). All eight SBSAs work on the tiles of
//           one MB pair at the same vector. After an initial load of every PU and SRU half
//           (16 cycles) the array only shifts: horizontal rings supply the next column, and the
//           REG_VS rows for the next line are read from the search-window buffer while the
//           current line is still being shifted. The range is 4 for 8-wide blocks (16-pixel
//           rings) and 4 or 8 for 16-wide blocks (32-pixel rings over two SBSAs).
//           If a line has fewer shifts than REG_VS half-rows to fill, the missing cycles are
//           spent as stall cycles (no shift), counted on 'stall'.
//  OP_LINE  one-dimensional search of npts consecutive points from ctr[k], independently per
//           SBSA, horizontally (vaxis = 0) or vertically (vaxis = 1). Only the left shift is
//           used; a vertical search has the cross path rotate each block (and the template is
//           read rotated) so that moving down becomes moving left. Every 8 points the eight SRU
//           halves that ran empty are reloaded, one per cycle ('reload').
//  OP_POINT one-time block matching at ctr[k] per SBSA: only the PU halves and templates
//           are loaded, no SRU or REG_VS.
//
// Two mappings of SBSAs onto the template exist: MAP_TILE (the MB pair's 8x8 tiles, frame or
// field) and MAP_COARSE (the coarse search: eight field 16x8 blocks, horizontally
// sub-sampled to 8x8, each searched in one search-window field; vectors then count two pels
// horizontally and one field line vertically).
//
// Timing: a command is taken when cmd_valid and cmd_ready are high. Reads are issued in the
// cycle an operation is generated; the RRSA operation, its tag and the cross-path control are
// registered so they arrive together with the read data one cycle later. mv_clear pulses when
// a command is taken; done pulses once the last point's SAD has reached mv_select.
//
// Published design: snake-order FS over +-4 / +-8, left-shift-only line search with the cross
// path for vertical lines and SRU reloads every 8 points, and one-time matching with PU loads
// only. Own choices: the command format, the schedule, and stall cycles where a line needs
// more REG_VS half-rows than it has shifts (the published FS has no stalls).
module ime_ctrl
  import ime_pkg::*;
#(
  parameter int unsigned W = 320,   // search-window width (must match swram)
  parameter int unsigned H = 160    // search-window height
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  ime_cmd_t              cmd,
  // search-window buffer read
  output logic                  sw_rd_en,
  output logic [$clog2(W)-1:0]  sw_rd_x,
  output logic [$clog2(H)-1:0]  sw_rd_y,
  output logic                  sw_hsub,
  output logic                  sw_vsub,
  output logic                  xp_rotate,   // cross path, aligned with the read data
  // template buffer read
  output logic                  tb_rd_en,
  output logic [4:0]            tb_row0,
  output logic [3:0]            tb_col0,
  output logic                  tb_rstep2,
  output logic                  tb_cstep2,
  output logic                  tb_transpose,
  // RRSA
  output rr_cfg_t               rr_cfg,
  output rr_op_t                rr_op,
  output rr_tag_t               rr_tag,
  // status
  output logic                  mv_clear,
  output logic                  done,
  output logic                  stall,       // FS cycle spent loading REG_VS without a shift
  output logic                  reload       // LINE cycle spent reloading an SRU
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_FS_LINE, S_LN_SHIFT, S_LN_RELOAD, S_DRAIN
  } state_e;

  state_e   st;
  ime_cmd_t c;          // command being executed
  logic [4:0] cnt;      // load / reload index
  logic [4:0] j;        // FS: current line
  logic [4:0] sh_left;  // FS: horizontal shifts left in the line
  logic [4:0] vs_idx;   // FS: next REG_VS half-row candidate (k*2 + h)
  logic [7:0] q;        // LINE: point index held by the PUs
  logic [3:0] m;        // LINE: shifts in the current group of 8
  logic [2:0] drain;

  // ------------------------------------------------------------------ geometry
  function automatic int ox(int k);
    return (c.map == MAP_TILE) ? (k % 2) * 8 : 0;
  endfunction

  function automatic logic fld();
    return (c.map == MAP_COARSE) || c.field;
  endfunction

  function automatic logic pair_ring();
    return (c.map == MAP_TILE) &&
           (c.mode == BM_16X8 || c.mode == BM_16X16 || c.mode == BM_16X32);
  endfunction

  function automatic int range_r();
    if (pair_ring() && c.range >= 8) return 8;
    return 4;
  endfunction

  function automatic int wrapi(int v, int n);
    int r;
    r = v % n;
    return (r < 0) ? r + n : r;
  endfunction

  // Search-window position of row 'rowoff' of SBSA k's block whose first column is at
  // point offset dxp and whose first row is at point offset dyp.
  function automatic logic [$clog2(W)+$clog2(H)-1:0] sw_pos(int k, int dxp, int dyp, int rowoff);
    int x, y, oyf, par;
    x = int'(c.x0) + (ox(k) + dxp) * ((c.map == MAP_COARSE) ? 2 : 1);
    if (!fld()) begin
      y = int'(c.y0) + (k / 2) * 8 + dyp + rowoff;
    end else begin
      if (c.map == MAP_TILE) begin
        oyf = ((k / 2) % 2) * 8;
        par = (k >= 4) ? int'(c.swpar_bot) : int'(c.swpar_top);
      end else begin
        oyf = (k / 4) * 8;
        par = k % 2;
      end
      y = int'(c.y0) + par + 2 * (oyf + dyp + rowoff);
    end
    return {$clog2(W)'(wrapi(x, W)), $clog2(H)'(wrapi(y, H))};
  endfunction

  // FS: point offset of the first column of chain half h of SBSA k at ring rotation s.
  function automatic int fs_dxp(int k, int h, int s);
    int i, base;
    base = int'(c.ctr[0].x) - range_r();
    if (pair_ring()) begin
      i = wrapi((k % 2) * 16 + h * 8 - 8, 32);
      return base + wrapi(i + s, 32) - ox(k);
    end else begin
      i = (k % 2 == 1) ? h * 8 : wrapi(h * 8 + 8, 16);
      return base + wrapi(i + s, 16);
    end
  endfunction

  function automatic logic pu_half(int k);
    return (k % 2 == 1) ? 1'b0 : 1'b1;
  endfunction

  // LINE / POINT: vector of lane k at point q
  function automatic mv_t line_mv(int k, logic [MV_W-1:0] qq);
    mv_t v;
    v = c.ctr[k];
    if (c.op == OP_LINE && c.vaxis) v.y = v.y + MV_W'(qq);
    else                            v.x = v.x + MV_W'(qq);
    return v;
  endfunction

  function automatic rr_cfg_t cfg_of();
    rr_cfg_t r;
    r.mode      = (c.map == MAP_COARSE) ? BM_8X8 : c.mode;
    r.field     = fld();
    r.ring_pair = (c.op == OP_FS) && pair_ring();
    return r;
  endfunction

  // ------------------------------------------------------------------ operation generator
  rr_op_t  op_n;
  rr_tag_t tag_n;
  logic    rot_n;
  logic    rd_n;
  logic [$clog2(W)+$clog2(H)-1:0] pos_n;
  logic    stall_n, reload_n;
  logic    vs_found;
  logic [4:0] vs_next;

  always_comb begin
    int k, h, nr, s_end, mm;
    logic [MV_W-1:0] dx;
    logic do_vs;
    blk_mode_e mode_n;
    k        = 0;
    h        = 0;
    mm       = 0;
    dx       = 0;
    do_vs    = 1'b0;
    op_n     = '0;
    tag_n    = '0;
    rot_n    = 1'b0;
    rd_n     = 1'b0;
    pos_n    = '0;
    tb_rd_en = 1'b0;
    tb_row0  = '0;
    tb_col0  = '0;
    tb_rstep2 = 1'b0;
    tb_cstep2 = 1'b0;
    tb_transpose = 1'b0;
    stall_n  = 1'b0;
    reload_n = 1'b0;
    nr       = range_r();
    s_end    = (j % 2 == 0) ? 2 * nr : 0;

    // next REG_VS half-row to fill: halves of SBSAs at the bottom of a vertical chain
    mode_n   = (c.map == MAP_COARSE) ? BM_8X8 : c.mode;
    vs_found = 1'b0;
    vs_next  = '0;
    for (int i = 15; i >= 0; i--)
      if (5'(i) >= vs_idx && !((i / 2) < 6 && vchained(i / 2, mode_n, fld()))) begin
        vs_found = 1'b1;
        vs_next  = 5'(i);
      end

    unique case (st)
      S_LOAD: begin
        if (c.op == OP_POINT) begin
          k = int'(cnt);
          h = int'(pu_half(k));
          rd_n = 1'b1;
          pos_n = sw_pos(k, int'(c.ctr[k].x), int'(c.ctr[k].y), 0);
          op_n.ld_en = 1'b1;
          op_n.ld_sel = 3'(k);
          op_n.ld_half = h[0];
        end else begin
          k = int'(cnt) / 2;
          if (c.op == OP_FS) begin
            h = int'(cnt) % 2;
            pos_n = sw_pos(k, fs_dxp(k, h, 0), int'(c.ctr[0].y) - nr, 0);
          end else begin
            // LINE: PU half with point 0, then the SRU half with point 8
            h = (cnt % 2 == 0) ? int'(pu_half(k)) : int'(!pu_half(k));
            if (c.vaxis) pos_n = sw_pos(k, int'(c.ctr[k].x), int'(c.ctr[k].y) + int'(cnt[0]) * 8, 0);
            else         pos_n = sw_pos(k, int'(c.ctr[k].x) + int'(cnt[0]) * 8, int'(c.ctr[k].y), 0);
            rot_n = c.vaxis;
          end
          rd_n = 1'b1;
          op_n.ld_en = 1'b1;
          op_n.ld_sel = 3'(k);
          op_n.ld_half = h[0];
        end
        // template of SBSA cnt
        if (cnt < 8) begin
          k = int'(cnt);
          op_n.tb_en = 1'b1;
          op_n.tb_sel = 3'(k);
          tb_rd_en = 1'b1;
          tb_transpose = (c.op == OP_LINE) && c.vaxis;
          if (c.map == MAP_COARSE) begin
            tb_row0 = 5'(2 * (k / 4) * 8 + (k / 2) % 2);
            tb_rstep2 = 1'b1;
            tb_cstep2 = 1'b1;
          end else if (c.field) begin
            tb_row0 = 5'(2 * ((k / 2) % 2) * 8 + ((k >= 4) ? 1 : 0));
            tb_col0 = 4'((k % 2) * 8);
            tb_rstep2 = 1'b1;
          end else begin
            tb_row0 = 5'((k / 2) * 8);
            tb_col0 = 4'((k % 2) * 8);
          end
        end
        // the last load completes the first search point
        if ((c.op == OP_POINT && cnt == 7) || (c.op != OP_POINT && cnt == 15)) begin
          tag_n.eval = 1'b1;
          for (int l = 0; l < 8; l++)
            tag_n.mv[l] = (c.op == OP_FS)
                        ? mv_t'{x: c.ctr[0].x - MV_W'(nr), y: c.ctr[0].y - MV_W'(nr)}
                        : line_mv(l, '0);
        end
      end

      S_FS_LINE: begin
        do_vs = (int'(j) < 2 * nr) && vs_found;
        if (sh_left != 0) begin
          mm = 2 * nr - int'(sh_left) + 1;
          op_n.shift = (j % 2 == 0) ? SH_LEFT : SH_RIGHT;
          dx = MV_W'((j % 2 == 0) ? mm : 2 * nr - mm);
          tag_n.eval = 1'b1;
          for (int l = 0; l < 8; l++)
            tag_n.mv[l] = mv_t'{x: c.ctr[0].x - MV_W'(nr) + dx,
                                y: c.ctr[0].y - MV_W'(nr) + MV_W'(j)};
        end
        if (do_vs) begin
          k = int'(vs_next) / 2;
          h = int'(vs_next) % 2;
          rd_n = 1'b1;
          pos_n = sw_pos(k, fs_dxp(k, h, s_end), int'(c.ctr[0].y) - nr + int'(j), 8);
          op_n.vs_en = 1'b1;
          op_n.ld_sel = 3'(k);
          op_n.ld_half = h[0];
          stall_n = (sh_left == 0);
        end
        if (sh_left == 0 && !do_vs && int'(j) < 2 * nr) begin
          op_n.shift = SH_UP;
          tag_n.eval = 1'b1;
          for (int l = 0; l < 8; l++)
            tag_n.mv[l] = mv_t'{x: c.ctr[0].x - MV_W'(nr) + MV_W'(s_end),
                                y: c.ctr[0].y - MV_W'(nr) + MV_W'(j) + 1'b1};
        end
      end

      S_LN_SHIFT: begin
        op_n.shift = SH_LEFT;
        tag_n.eval = 1'b1;
        for (int l = 0; l < 8; l++) tag_n.mv[l] = line_mv(l, MV_W'(int'(q) + 1));
      end

      S_LN_RELOAD: begin
        k = int'(cnt);
        h = int'(!pu_half(k));   // the SRU half; the PU half keeps its place in the ring
        rd_n = 1'b1;
        rot_n = c.vaxis;
        if (c.vaxis) pos_n = sw_pos(k, int'(c.ctr[k].x), int'(c.ctr[k].y) + int'(q) + 8, 0);
        else         pos_n = sw_pos(k, int'(c.ctr[k].x) + int'(q) + 8, int'(c.ctr[k].y), 0);
        op_n.ld_en = 1'b1;
        op_n.ld_sel = 3'(k);
        op_n.ld_half = h[0];
        reload_n = 1'b1;
      end

      default: ;
    endcase
  end

  assign sw_rd_en = rd_n;
  assign {sw_rd_x, sw_rd_y} = pos_n;
  assign sw_hsub  = (c.map == MAP_COARSE);
  assign sw_vsub  = fld();
  assign rr_cfg   = cfg_of();
  assign cmd_ready = (st == S_IDLE);
  assign stall    = stall_n;
  assign reload   = reload_n;

  // ------------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      c <= '0;
      cnt <= '0; j <= '0; sh_left <= '0; vs_idx <= '0;
      q <= '0; m <= '0; drain <= '0;
      rr_op <= '0; rr_tag <= '0; xp_rotate <= 1'b0;
      mv_clear <= 1'b0; done <= 1'b0;
    end else begin
      rr_op     <= op_n;
      rr_tag    <= tag_n;
      xp_rotate <= rot_n;
      mv_clear  <= 1'b0;
      done      <= 1'b0;
      unique case (st)
        S_IDLE:
          if (cmd_valid) begin
            c <= cmd;
            cnt <= '0;
            mv_clear <= 1'b1;
            st <= S_LOAD;
          end
        S_LOAD: begin
          cnt <= cnt + 1'b1;
          if (c.op == OP_POINT && cnt == 7) begin
            st <= S_DRAIN; drain <= '0;
          end else if (c.op != OP_POINT && cnt == 15) begin
            if (c.op == OP_FS) begin
              st <= S_FS_LINE;
              j <= '0;
              sh_left <= 5'(2 * range_r());
              vs_idx <= '0;
            end else if (c.npts <= 1) begin
              st <= S_DRAIN; drain <= '0;
            end else begin
              st <= S_LN_SHIFT;
              q <= '0; m <= '0;
            end
          end
        end
        S_FS_LINE: begin
          if (sh_left != 0) sh_left <= sh_left - 1'b1;
          if (sh_left == 1 && int'(j) == 2 * range_r()) begin
            // last shift of the last line
            st <= S_DRAIN; drain <= '0;
          end else if (int'(j) < 2 * range_r() && vs_found) vs_idx <= vs_next + 1'b1;
          else if (sh_left == 0) begin
            if (int'(j) < 2 * range_r()) begin
              j <= j + 1'b1;
              sh_left <= 5'(2 * range_r());
              vs_idx <= '0;
            end else begin
              st <= S_DRAIN; drain <= '0;
            end
          end
        end
        S_LN_SHIFT: begin
          q <= q + 1'b1;
          m <= m + 1'b1;
          if (q + 1'b1 == c.npts - 1'b1) begin
            st <= S_DRAIN; drain <= '0;
          end else if (m == 7) begin
            st <= S_LN_RELOAD;
            cnt <= '0;
            m <= '0;
          end
        end
        S_LN_RELOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == 7) st <= S_LN_SHIFT;
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3) begin
            done <= 1'b1;
            st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
