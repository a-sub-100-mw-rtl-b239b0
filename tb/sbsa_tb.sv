// sbsa_tb: two SBSAs, one of each orientation, each with its rows closed into a 16-pixel
// ring, take the same random sequence of loads, left/right/vertical shifts and template
// loads. A model of the ring (PU first, then SRU) predicts the PU contents; the SAD is
// compared with the SAD of the model after every cycle, and the chain ends and top row with
// the model.
module sbsa_tb;
  import ime_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  shift_e shift;
  logic ld_en, ld_half, tb_en;
  blk8_t ld_blk, tb_blk;
  row16_t bin;
  row8_t  lin_a, rin_a, end0_a, end15_a, lin_b, rin_b, end0_b, end15_b;
  row16_t top_a, top_b;
  sad8_t  sad_a, sad_b;
  int checks = 0, failures = 0;

  // A: PU at chain positions 0..7; B: PU at 8..15. Rings closed on themselves.
  sbsa #(.PU_LEFT(1'b1)) dut_a (.clk, .shift, .ld_en, .ld_half, .ld_blk, .tb_en, .tb_blk,
    .lin(lin_a), .rin(rin_a), .bin, .end0(end0_a), .end15(end15_a), .top(top_a), .sad(sad_a));
  sbsa #(.PU_LEFT(1'b0)) dut_b (.clk, .shift, .ld_en, .ld_half, .ld_blk, .tb_en, .tb_blk,
    .lin(lin_b), .rin(rin_b), .bin, .end0(end0_b), .end15(end15_b), .top(top_b), .sad(sad_b));
  assign lin_a = end15_a;  assign rin_a = end0_a;
  assign lin_b = end15_b;  assign rin_b = end0_b;

  // model: ring[r][i], i = 0..7 the PU columns, 8..15 the SRU, in ring order
  pix_t ring_a [8][16];
  pix_t ring_b [8][16];
  pix_t tmpl [8][8];

  function automatic int pos_of(bit pu_left, int i);
    // chain position holding ring index i
    return pu_left ? i : (i + 8) % 16;
  endfunction

  function automatic int model_sad(bit pu_left);
    int s = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int a, b;
        a = pu_left ? ring_a[r][c] : ring_b[r][c];
        b = tmpl[r][c];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  int n_shl = 0, n_shr = 0, n_shu = 0;

  initial begin
    shift = SH_NONE; ld_en = 0; ld_half = 0; tb_en = 0; ld_blk = '0; tb_blk = '0; bin = '0;
    // initial load of both halves and the template
    for (int h = 0; h < 3; h++) begin
      @(negedge clk);
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
        ld_blk[r][c] = pix_t'($urandom); tb_blk[r][c] = pix_t'($urandom);
      end
      ld_en = (h < 2); ld_half = h[0]; tb_en = (h == 2);
      @(posedge clk);
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
        if (h < 2) begin
          // A: half h is ring indices h*8..; B: half h is ring indices (h*8+8)%16..
          ring_a[r][h*8 + c] = ld_blk[r][c];
          ring_b[r][(h*8 + 8) % 16 + c] = ld_blk[r][c];
        end else tmpl[r][c] = tb_blk[r][c];
      end
    end
    for (int t = 0; t < 3000; t++) begin
      int kind;
      @(negedge clk);
      ld_en = 0; tb_en = 0; shift = SH_NONE;
      kind = $urandom_range(0, 9);
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
        ld_blk[r][c] = pix_t'($urandom); tb_blk[r][c] = pix_t'($urandom);
      end
      for (int p = 0; p < 16; p++) bin[p] = pix_t'($urandom);
      if (kind == 0) begin ld_en = 1; ld_half = 1'($urandom); end
      else if (kind == 1) tb_en = 1;
      else if (kind < 5) shift = SH_LEFT;
      else if (kind < 8) shift = SH_RIGHT;
      else shift = SH_UP;
      @(posedge clk);
      if (ld_en) begin
        for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
          ring_a[r][ld_half*8 + c] = ld_blk[r][c];
          ring_b[r][(ld_half*8 + 8) % 16 + c] = ld_blk[r][c];
        end
      end
      if (tb_en) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) tmpl[r][c] = tb_blk[r][c];
      if (shift == SH_LEFT) begin
        n_shl++;
        for (int r = 0; r < 8; r++) begin
          pix_t a0, b0;
          a0 = ring_a[r][0]; b0 = ring_b[r][0];
          for (int i = 0; i < 15; i++) begin ring_a[r][i] = ring_a[r][i+1]; ring_b[r][i] = ring_b[r][i+1]; end
          ring_a[r][15] = a0; ring_b[r][15] = b0;
        end
      end
      if (shift == SH_RIGHT) begin
        n_shr++;
        for (int r = 0; r < 8; r++) begin
          pix_t a15, b15;
          a15 = ring_a[r][15]; b15 = ring_b[r][15];
          for (int i = 15; i > 0; i--) begin ring_a[r][i] = ring_a[r][i-1]; ring_b[r][i] = ring_b[r][i-1]; end
          ring_a[r][0] = a15; ring_b[r][0] = b15;
        end
      end
      if (shift == SH_UP) begin
        n_shu++;
        for (int r = 0; r < 7; r++) for (int i = 0; i < 16; i++) begin
          ring_a[r][i] = ring_a[r+1][i]; ring_b[r][i] = ring_b[r+1][i];
        end
        for (int i = 0; i < 16; i++) begin
          ring_a[7][i] = bin[pos_of(1, i)];
          ring_b[7][i] = bin[pos_of(0, i)];
        end
      end
      #1;
      checks += 4;
      if (int'(sad_a) != model_sad(1)) failures++;
      if (int'(sad_b) != model_sad(0)) failures++;
      for (int i = 0; i < 16; i++) begin
        if (top_a[pos_of(1, i)] != ring_a[0][i]) begin failures++; break; end
      end
      for (int i = 0; i < 16; i++) begin
        if (top_b[pos_of(0, i)] != ring_b[0][i]) begin failures++; break; end
      end
    end
    $display("sbsa: %0d left, %0d right, %0d vertical shifts", n_shl, n_shr, n_shu);
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
