// tb_snap_core: self-checking test of one compute core (7 x 3 PEs, seven
// AIMs, core reducer, output arbiter). A random sparse 3 x 3 CONV layer
// (IA 6 x 7 x 8 channels, 4 kernels) runs in diagonal mode, one pass per IA
// row h with row i receiving pixel (h, i); then an FC layer (48 inputs, 14
// outputs) runs in row mode. The psums leaving the core are accumulated
// here (those outside the output map ignored) and compared with a direct
// convolution. The output ready is random, so lanes back up. The core must
// also emit fewer psums than the PEs produce (core-level reduction).
module tb_snap_core;
  import snap_pkg::*;
  `include "tb_pe_util.svh"
  localparam int ROWS = 7, COLS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, ld_valid = 0, start = 0, done, ov, ordy;
  core_cfg_t cfg_in = '0;
  logic [ROWS-1:0] rm = '0;
  logic [COLS-1:0] cm = '0;
  ld_word_t lw = '0;
  psum_t o;
  logic [7:0] macs;

  snap_core dut (.clk, .rst_n, .cfg_we, .cfg_in, .ld_valid, .ld_rowmask(rm), .ld_colmask(cm), .ld_word(lw),
    .start, .done, .out_valid(ov), .out(o), .out_ready(ordy), .mac_count(macs));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  task automatic ld(logic [ROWS-1:0] r, logic [COLS-1:0] c, ld_word_t x);
    rm = r; cm = c; lw = x; ld_valid = 1; @(posedge clk); #1; ld_valid = 0;
  endtask

  longint acc [1024];
  longint ref_oa [1024];
  int n_out = 0, n_pe_psums = 0;
  always @(posedge clk) begin
    if (ov && ordy) begin
      n_out++;
      if (o.inrange) acc[o.addr] += o.val;
    end
    n_pe_psums += $countones(dut.pe_pop);
  end
  initial ordy = 1;
  always @(negedge clk) ordy = ($urandom_range(3) != 0);

  int ia3 [8][8][64];
  int wt [3][3][64][16];

  function automatic int rnd_val(int density);
    if ($urandom_range(99) >= density) return 0;
    return $urandom_range(1999) - 1000;
  endfunction

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int H, W, C, K, OH, OW, cyc;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    H = 6; W = 7; C = 8; K = 4; OH = H - 2; OW = W - 2;
    for (int h = 0; h < H; h++) for (int w = 0; w < W; w++) for (int c = 0; c < C; c++) ia3[h][w][c] = rnd_val(50);
    for (int r = 0; r < 3; r++) for (int s = 0; s < 3; s++) for (int c = 0; c < C; c++) for (int k = 0; k < K; k++)
      wt[r][s][c][k] = rnd_val(50);
    for (int a = 0; a < 1024; a++) begin acc[a] = 0; ref_oa[a] = 0; end
    for (int k = 0; k < K; k++) for (int x = 0; x < OH; x++) for (int y = 0; y < OW; y++)
      for (int r = 0; r < 3; r++) for (int s = 0; s < 3; s++) for (int c = 0; c < C; c++)
        ref_oa[(k * OH + x) * OW + y] += longint'(ia3[x+r][y+s][c]) * wt[r][s][c][k];
    cfg_in = '{mode: MODE_DIAG, oh: HW_W'(OH), ow: HW_W'(OW)}; cfg_we = 1; @(posedge clk); #1; cfg_we = 0;
    for (int s = 0; s < 3; s++) begin
      int e, nseg;
      e = 0; nseg = 0;
      for (int k = 0; k < K; k++) for (int r = 0; r < 3; r++) begin
        int e0;
        e0 = e;
        for (int c = 0; c < C; c++) if (wt[r][s][c][k] != 0) begin ld('1, COLS'(1 << s), mk_w(e, wt[r][s][c][k], c)); e++; end
        if (e > e0) begin ld('1, COLS'(1 << s), mk_seg(nseg, e0, r, k)); nseg++; end
      end
      ld('1, COLS'(1 << s), mk_wmeta(e, nseg, s));
    end
    for (int h = 0; h < H; h++) begin
      for (int i = 0; i < ROWS; i++) begin
        int e;
        e = 0;
        for (int c = 0; c < C; c++) if (ia3[h][i][c] != 0) begin ld(ROWS'(1 << i), '1, mk_ia(e, ia3[h][i][c], c)); e++; end
        ld(ROWS'(1 << i), '1, mk_iameta(e, h, i));
      end
      start = 1; @(posedge clk); #1; start = 0;
      cyc = 0;
      while (!done && cyc < 20000) begin @(posedge clk); #1; cyc++; end
      check(done, $sformatf("pass %0d finished", h));
    end
    for (int a = 0; a < K * OH * OW; a++)
      check(acc[a] == ref_oa[a], $sformatf("conv OA[%0d] = %0d, expected %0d", a, acc[a], ref_oa[a]));
    check(n_out < n_pe_psums, $sformatf("core reduction: %0d psums out of %0d PE psums", n_out, n_pe_psums));
    $display("diagonal mode: %0d PE psums reduced to %0d", n_pe_psums, n_out);

    // FC, row mode: row i holds kernels 2i, 2i+1; column j channel group j
    C = 48; K = 14;
    for (int c = 0; c < C; c++) ia3[0][0][c] = rnd_val(50);
    for (int c = 0; c < C; c++) for (int k = 0; k < K; k++) wt[0][0][c][k] = rnd_val(50);
    for (int k = 0; k < K; k++) begin
      acc[k] = 0; ref_oa[k] = 0;
      for (int c = 0; c < C; c++) ref_oa[k] += longint'(ia3[0][0][c]) * wt[0][0][c][k];
    end
    cfg_in = '{mode: MODE_ROW, oh: 1, ow: 1}; cfg_we = 1; @(posedge clk); #1; cfg_we = 0;
    for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) begin
      int e, nseg;
      e = 0; nseg = 0;
      for (int k = 2 * i; k < 2 * i + 2; k++) begin
        int e0;
        e0 = e;
        for (int c = 16 * j; c < 16 * j + 16; c++) if (wt[0][0][c][k] != 0) begin
          ld(ROWS'(1 << i), COLS'(1 << j), mk_w(e, wt[0][0][c][k], c)); e++;
        end
        if (e > e0) begin ld(ROWS'(1 << i), COLS'(1 << j), mk_seg(nseg, e0, 0, k)); nseg++; end
      end
      ld(ROWS'(1 << i), COLS'(1 << j), mk_wmeta(e, nseg, 0));
    end
    for (int j = 0; j < COLS; j++) begin
      int e;
      e = 0;
      for (int c = 16 * j; c < 16 * j + 16; c++) if (ia3[0][0][c] != 0) begin ld('1, COLS'(1 << j), mk_ia(e, ia3[0][0][c], c)); e++; end
      ld('1, COLS'(1 << j), mk_iameta(e, 0, 0));
    end
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 0;
    while (!done && cyc < 20000) begin @(posedge clk); #1; cyc++; end
    check(done, "FC pass finished");
    for (int k = 0; k < K; k++)
      check(acc[k] == ref_oa[k], $sformatf("FC OA[%0d] = %0d, expected %0d", k, acc[k], ref_oa[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
