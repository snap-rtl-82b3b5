// tb_snap_workload_synth: synthetic sparse workloads on the full SNAP top.
//
// Runs the same 3 x 3 CONV (IA 8 x 9 pixels x 8 channels, 2 kernels,
// stride 1) at the three IA/W density pairs the published evaluation uses:
// dense 1.0/1.0, medium 0.4/0.4 and sparse 0.1/0.1. The mapping is that of
// the end-to-end test: PE column j holds the W bundle of kernel column
// s = j, PE row i the IA pixel (h, w0 + i), and the passes over (h, w0) are
// spread over the four cores in diagonal reduction mode. For each density
// the OA buffer is compared with a direct convolution, and the number of
// multiplications the PEs performed (summed from mac_count) must equal the
// number of effectual W-IA pairs, i.e. pairs where both values are nonzero
// and share a channel, counted here from the data. Cycle counts and the
// resulting multiplier utilisation are printed; they describe this small
// layer and are not compared with the chip's measured figures.
module tb_snap_workload_synth;
  import snap_pkg::*;
  `include "tb_pe_util.svh"
  localparam int NCORE = 4, ROWS = 7, COLS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0;
  core_cfg_t cfg_in = '0;
  logic [NCORE-1:0] ld_valid = '0;
  logic [ROWS-1:0] ld_rowmask [NCORE];
  logic [COLS-1:0] ld_colmask [NCORE];
  ld_word_t ld_word [NCORE];
  logic start = 0, done;
  logic h_req = 0, h_we = 0, h_gnt;
  logic [12:0] h_addr = '0;
  logic signed [ACC_W-1:0] h_wdata = '0, h_rdata;
  logic comp_start = 0, comp_relu = 0, comp_busy;
  logic [K_W-1:0] comp_k_num = '0;
  logic [4:0] comp_shift = '0;
  logic c_valid, c_last, c_empty, c_ready;
  logic signed [DW-1:0] c_data;
  logic [CIDX_W-1:0] c_cidx;
  logic [9:0] mac_count;

  snap_top dut (.clk, .rst_n, .cfg_we, .cfg_in, .ld_valid, .ld_rowmask, .ld_colmask, .ld_word,
    .start, .done, .h_req, .h_we, .h_addr, .h_wdata, .h_gnt, .h_rdata,
    .comp_start, .comp_k_num, .comp_relu, .comp_shift, .comp_busy,
    .c_valid, .c_data, .c_cidx, .c_last, .c_empty, .c_ready, .mac_count);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask


  // ---------------- bus helpers ----------------
  task automatic ld(int c, logic [ROWS-1:0] rm, logic [COLS-1:0] cm, ld_word_t x);
    ld_rowmask[c] = rm; ld_colmask[c] = cm; ld_word[c] = x; ld_valid[c] = 1;
    @(posedge clk); #1; ld_valid[c] = 0;
  endtask
  task automatic set_cfg(red_mode_e m, int oh, int ow);
    cfg_in = '{mode: m, oh: HW_W'(oh), ow: HW_W'(ow)}; cfg_we = 1;
    @(posedge clk); #1; cfg_we = 0;
  endtask
  task automatic clear_oa(int n);
    for (int a = 0; a < n; a++) begin
      h_req = 1; h_we = 1; h_addr = 13'(a); h_wdata = 0;
      @(posedge clk); #1;
      while (!h_gnt) begin @(posedge clk); #1; end
    end
    h_req = 0; h_we = 0;
  endtask
  task automatic rd_oa(int a, output int v);
    h_req = 1; h_we = 0; h_addr = 13'(a);
    @(posedge clk); #1; h_req = 0;
    v = h_rdata;
  endtask
  task automatic run_pass(output int cyc);
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 1;
    while (!done && cyc < 20000) begin @(posedge clk); #1; cyc++; end
    check(done, "pass finished");
  endtask

  // ---------------- layer data ----------------
  int ia3 [16][16][64];     // IA[h][w][c]
  int wt  [3][3][64][64];   // W[r][s][c][k]
  longint ref_oa [8192];

  function automatic int rnd_val(int density);
    if ($urandom_range(99) >= density) return 0;
    return $urandom_range(1999) - 1000;
  endfunction

  // load W bundle for columns: diagonal conv, column j = kernel column s=j
  task automatic load_w_conv(int c, int R, int C, int K, int s, int col);
    int e, nseg;
    e = 0; nseg = 0;
    for (int k = 0; k < K; k++)
      for (int r = 0; r < R; r++) begin
        int e0;
        e0 = e;
        for (int ch = 0; ch < C; ch++) if (wt[r][s][ch][k] != 0) begin
          ld(c, '1, COLS'(1 << col), mk_w(e, wt[r][s][ch][k], ch)); e++;
        end
        if (e > e0) begin ld(c, '1, COLS'(1 << col), mk_seg(nseg, e0, r, k)); nseg++; end
      end
    check(e <= WRF_DEPTH && nseg <= NSEG, "W bundle fits the W RF");
    ld(c, '1, COLS'(1 << col), mk_wmeta(e, nseg, s));
  endtask

  // IA bundle of pixel (h, w), channels [c0, c1), to the PEs in rm x cm
  task automatic load_ia(int c, logic [ROWS-1:0] rm, logic [COLS-1:0] cm, int h, int w, int c0, int c1, bit valid_pix);
    int e;
    e = 0;
    if (valid_pix)
      for (int ch = c0; ch < c1; ch++) if (ia3[h][w][ch] != 0) begin
        ld(c, rm, cm, mk_ia(e, ia3[h][w][ch], ch)); e++;
      end
    ld(c, rm, cm, mk_iameta(e, h, w));
  endtask

  int cyc;
  int n_macs = 0;
  bit counting = 0;
  always @(posedge clk) if (counting) n_macs += int'(mac_count);

  initial begin
    #400000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int H, W, C, K, R, S, OH, OW, v, npass, busy, eff;
    int dens [3] = '{100, 40, 10};
    for (int c = 0; c < NCORE; c++) begin ld_rowmask[c] = '0; ld_colmask[c] = '0; ld_word[c] = '0; end
    c_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    H = 8; W = 9; C = 8; K = 2; R = 3; S = 3; OH = H - R + 1; OW = W - S + 1;
    for (int d = 0; d < 3; d++) begin
      for (int h = 0; h < H; h++) for (int w = 0; w < W; w++) for (int ch = 0; ch < C; ch++)
        ia3[h][w][ch] = rnd_val(dens[d]);
      for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int ch = 0; ch < C; ch++)
        for (int k = 0; k < K; k++) wt[r][s][ch][k] = rnd_val(dens[d]);
      for (int a = 0; a < K * OH * OW; a++) ref_oa[a] = 0;
      for (int k = 0; k < K; k++) for (int x = 0; x < OH; x++) for (int y = 0; y < OW; y++)
        for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int ch = 0; ch < C; ch++)
          ref_oa[(k * OH + x) * OW + y] += longint'(ia3[x+r][y+s][ch]) * wt[r][s][ch][k];
      // every IA pixel meets every W entry of its channel once
      eff = 0;
      for (int h = 0; h < H; h++) for (int w = 0; w < W; w++) for (int ch = 0; ch < C; ch++)
        if (ia3[h][w][ch] != 0)
          for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int k = 0; k < K; k++)
            if (wt[r][s][ch][k] != 0) eff++;
      set_cfg(MODE_DIAG, OH, OW);
      clear_oa(K * OH * OW);
      for (int c = 0; c < NCORE; c++)
        for (int j = 0; j < COLS; j++) load_w_conv(c, R, C, K, j, j);
      npass = 0; busy = 0; n_macs = 0; counting = 1;
      begin
        int tasks_h[$], tasks_w[$];
        tasks_h.delete(); tasks_w.delete();
        for (int h = 0; h < H; h++) for (int w0 = 0; w0 < W; w0 += ROWS) begin
          tasks_h.push_back(h); tasks_w.push_back(w0);
        end
        while (tasks_h.size() > 0) begin
          for (int c = 0; c < NCORE; c++) begin
            if (tasks_h.size() > 0) begin
              int h, w0;
              h = tasks_h.pop_front(); w0 = tasks_w.pop_front();
              for (int i = 0; i < ROWS; i++)
                load_ia(c, ROWS'(1 << i), '1, h, w0 + i, 0, C, (w0 + i) < W);
            end else begin
              for (int i = 0; i < ROWS; i++) load_ia(c, ROWS'(1 << i), '1, 0, 0, 0, 0, 0);
            end
          end
          run_pass(cyc); npass++; busy += cyc;
        end
      end
      counting = 0;
      for (int a = 0; a < K * OH * OW; a++) begin
        rd_oa(a, v);
        check(v == int'(ref_oa[a]), $sformatf("density %0d%%: OA[%0d] = %0d, expected %0d", dens[d], a, v, ref_oa[a]));
      end
      check(n_macs == eff, $sformatf("density %0d%%: %0d multiplications, %0d effectual pairs", dens[d], n_macs, eff));
      $display("IA/W density %0d%%: %0d passes, %0d busy cycles, %0d multiplications, utilisation %0d%% of %0d multipliers",
               dens[d], npass, busy, n_macs, (100 * n_macs) / (busy * NCORE * ROWS * COLS * NMUL), NCORE * ROWS * COLS * NMUL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
