// rrsa_tb: random operation sequences on the whole array under every configuration. The
// model keeps the array as one 32 x 32 grid of pixels (SBSA k at rows 8*(k/2), columns
// 16*(k%2), the PUs forming columns 8..23) and applies the shifts to that grid: rows of 16
// (single rings) or 32 (paired rings) rotate, and vertical shifts move whole column groups of
// chained SBSAs up, taking the new row from REG_VS. The merged SADs and the tag are compared
// two cycles after each operation.
module rrsa_tb;
  import ime_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  rr_cfg_t cfg;
  rr_op_t op;
  blk8_t ld_blk, tb_blk;
  rr_tag_t tag_in, tag_out;
  sad_t [7:0] sad;
  logic [7:0] lane_valid;
  int checks = 0, failures = 0;

  rrsa dut (.*);

  pix_t G [32][32];
  pix_t VS [8][16];
  pix_t T [8][8][8];

  function automatic int sad8(int k);
    int s = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int a, b;
        a = G[(k/2)*8 + r][8 + (k%2)*8 + c];
        b = T[k][r][c];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  // group of SBSA rows chained vertically: returns the last row of the group starting at row
  function automatic int group_end(int row);
    unique case (cfg.mode)
      BM_8X16, BM_16X16: return row | 1;
      BM_16X32:          return cfg.field ? (row | 1) : 3;
      default:           return row;
    endcase
  endfunction

  function automatic void expect_sads(output int e [8], output logic [7:0] v);
    int s [8];
    for (int k = 0; k < 8; k++) begin s[k] = sad8(k); e[k] = 0; end
    v = '0;
    unique case (cfg.mode)
      BM_8X8:   for (int k = 0; k < 8; k++) begin e[k] = s[k]; v[k] = 1; end
      BM_16X8:  for (int k = 0; k < 8; k += 2) begin e[k] = s[k] + s[k+1]; v[k] = 1; end
      BM_8X16:  foreach (e[k]) if (k == 0 || k == 1 || k == 4 || k == 5) begin e[k] = s[k] + s[k+2]; v[k] = 1; end
      BM_16X16: begin e[0] = s[0]+s[1]+s[2]+s[3]; e[4] = s[4]+s[5]+s[6]+s[7]; v[0] = 1; v[4] = 1; end
      default:  begin e[0] = s[0]+s[1]+s[2]+s[3]+s[4]+s[5]+s[6]+s[7]; v[0] = 1; end
    endcase
  endfunction

  task automatic apply_model();
    if (op.ld_en)
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
        G[(op.ld_sel/2)*8 + r][(op.ld_sel%2)*16 + op.ld_half*8 + c] = ld_blk[r][c];
    else if (op.shift == SH_LEFT || op.shift == SH_RIGHT) begin
      int len;
      len = cfg.ring_pair ? 32 : 16;
      for (int gr = 0; gr < 32; gr++)
        for (int b = 0; b < 32; b += len) begin
          pix_t tmp [32];
          for (int i = 0; i < len; i++) tmp[i] = G[gr][b + i];
          for (int i = 0; i < len; i++)
            G[gr][b + i] = (op.shift == SH_LEFT) ? tmp[(i + 1) % len] : tmp[(i + len - 1) % len];
        end
    end else if (op.shift == SH_UP) begin
      int row;
      row = 0;
      while (row < 4) begin
        int last;
        last = group_end(row);
        for (int cb = 0; cb < 2; cb++)
          for (int col = 0; col < 16; col++) begin
            for (int gr = row*8; gr < last*8 + 7; gr++) G[gr][cb*16 + col] = G[gr+1][cb*16 + col];
            G[last*8 + 7][cb*16 + col] = VS[last*2 + cb][col];
          end
        row = last + 1;
      end
    end
    if (op.vs_en) for (int c = 0; c < 8; c++) VS[op.ld_sel][op.ld_half*8 + c] = ld_blk[0][c];
    if (op.tb_en) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) T[op.tb_sel][r][c] = tb_blk[r][c];
  endtask

  int n_mode [5];
  int n_pair = 0, n_up = 0;

  initial begin
    int e_prev [8];
    logic [7:0] v_prev;
    mv_t tag_prev;
    logic check_ok;
    rst_n = 0; op = '0; tag_in = '0; ld_blk = '0; tb_blk = '0;
    cfg = '{mode: BM_8X8, ring_pair: 1'b0, field: 1'b0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill everything
    for (int k = 0; k < 8; k++)
      for (int h = 0; h < 3; h++) begin
        @(negedge clk);
        for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
          ld_blk[r][c] = pix_t'($urandom); tb_blk[r][c] = pix_t'($urandom);
        end
        op = '0; op.ld_sel = 3'(k); op.ld_half = h[0];
        op.ld_en = (h < 2); op.tb_en = (h == 2); op.tb_sel = 3'(k);
        @(posedge clk); apply_model();
        @(negedge clk);
        op = '0; op.vs_en = 1; op.ld_sel = 3'(k); op.ld_half = h[0];
        for (int c = 0; c < 8; c++) ld_blk[0][c] = pix_t'($urandom);
        @(posedge clk); apply_model();
      end
    check_ok = 0;
    for (int t = 0; t < 6000; t++) begin
      int kind, e [8];
      logic [7:0] v;
      @(negedge clk);
      if (t % 300 == 0) begin
        cfg.mode = blk_mode_e'($urandom_range(0, 4));
        cfg.field = 1'($urandom);
        cfg.ring_pair = (cfg.mode == BM_16X8 || cfg.mode == BM_16X16 || cfg.mode == BM_16X32);
        check_ok = 0;
      end
      op = '0;
      kind = $urandom_range(0, 11);
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
        ld_blk[r][c] = pix_t'($urandom); tb_blk[r][c] = pix_t'($urandom);
      end
      op.ld_sel = 3'($urandom); op.ld_half = 1'($urandom); op.tb_sel = 3'($urandom);
      if (kind == 0) op.ld_en = 1;
      else if (kind == 1) op.tb_en = 1;
      else if (kind < 5) op.shift = SH_LEFT;
      else if (kind < 8) op.shift = SH_RIGHT;
      else op.shift = SH_UP;
      if (kind >= 2 && $urandom_range(0, 2) == 0) op.vs_en = 1;
      tag_in.eval = 1'($urandom);
      for (int k = 0; k < 8; k++) begin tag_in.mv[k].x = MV_W'(t); tag_in.mv[k].y = MV_W'(k); end
      @(posedge clk);
      #1;
      // result of the previous operation
      if (check_ok) begin
        checks++;
        if (lane_valid != v_prev) failures++;
        for (int k = 0; k < 8; k++)
          if (v_prev[k]) begin
            checks++;
            if (int'(sad[k]) != e_prev[k]) begin
              failures++;
              if (failures < 6) $display("rrsa t=%0d mode=%0d lane %0d sad %0d exp %0d", t, cfg.mode, k, sad[k], e_prev[k]);
            end
          end
        checks++;
        if (tag_out.mv[0] != tag_prev) failures++;
      end
      apply_model();
      expect_sads(e, v);
      e_prev = e; v_prev = v;
      tag_prev = tag_in.mv[0];
      check_ok = 1;
      n_mode[int'(cfg.mode)]++;
      if (cfg.ring_pair && op.shift inside {SH_LEFT, SH_RIGHT}) n_pair++;
      if (op.shift == SH_UP && cfg.mode != BM_8X8 && cfg.mode != BM_16X8) n_up++;
    end
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (n_mode[m] == 0) failures++;
    end
    checks++;
    if (n_pair == 0 || n_up == 0) failures++;
    $display("rrsa: cycles per mode %0d %0d %0d %0d %0d, paired-ring shifts %0d, chained vertical shifts %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_pair, n_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
