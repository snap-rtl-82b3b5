// tb_snap_top: end-to-end test of the SNAP top at its default size
// (four cores of 7 x 3 PEs, 32-entry AIMs, 8192-word OA buffer).
//
// Three layers with random sparse IA and W (about half the values zero):
//  1. 3 x 3 CONV in diagonal mode, IA 8 x 9 x 8 channels, 4 kernels.
//     Column j of a core holds the W bundle of kernel column s = j (loaded
//     once), row i receives IA pixel (h, w0 + i); passes over (h, w0) are
//     spread over the four cores.
//  2. pointwise CONV in row mode, IA 4 x 7 x 24, 8 kernels: channels split
//     into three groups, group j to PE column j; row i gets one pixel.
//  3. FC in row mode, 48 inputs, 56 outputs: column j gets channel group j,
//     row i of core c gets a group of two kernels.
// After each layer the OA buffer is read back and compared with a direct
// convolution computed here; after layer 1 the compression unit's stream
// is compared with ReLU/shift/saturate of the reference. The test counts
// how often each mechanism occurred (AIM prefetch, PE stall, each Table I
// pattern, merge with the last written psum, lane wait, edge psum drop,
// global accumulator contention, both reduction modes, empty pixel) and
// counts a failure for any that never happened.
module tb_snap_top;
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

  // ---------------- mechanism counters ----------------
  int n_prefetch = 0, n_stall = 0, n_merge = 0, n_wait = 0, n_drop = 0, n_contend = 0;
  int n_pat[4] = '{0, 0, 0, 0};
  int n_diag = 0, n_row = 0, n_empty_pix = 0, n_macs = 0, n_cycles_busy = 0;

  for (genvar c = 0; c < NCORE; c++) begin : g_mon
    for (genvar i = 0; i < ROWS; i++) begin : g_r
      for (genvar j = 0; j < COLS; j++) begin : g_c
        always @(posedge clk) begin
          if (dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.aim_rsp_valid &&
              !dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.dec_empty) n_prefetch++;
          if (dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.stall &&
              dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.state_q == 1) n_stall++;
          if (dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.state_q == 1 &&
              dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.s1_valid_q == 3'b111)
            n_pat[dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.pat]++;
          if (dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.add_last &&
              dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.state_q == 1 &&
              !dut.g_core[c].u_core.g_row[i].g_col[j].u_pe.stall) n_merge++;
          // a PE holds a psum but its lane cannot reduce yet
          if (dut.g_core[c].u_core.pe_head_valid[i*COLS+j] && !dut.g_core[c].u_core.pe_pop[i*COLS+j])
            n_wait++;
        end
      end
    end
  end
  always @(posedge clk) begin
    if (dut.u_gacc.drop_fire) n_drop++;
    if ($countones(dut.core_valid) > 1) n_contend++;
    if (c_valid && c_ready && c_empty && c_last) n_empty_pix++;
    n_macs += int'(mac_count);
    if (!done) n_cycles_busy++;
  end

  // ---------------- bus helpers ----------------
  task automatic ld(int c, logic [ROWS-1:0] rm, logic [COLS-1:0] cm, ld_word_t x);
    ld_rowmask[c] = rm; ld_colmask[c] = cm; ld_word[c] = x; ld_valid[c] = 1;
    @(posedge clk); #1; ld_valid[c] = 0;
  endtask
  task automatic set_cfg(red_mode_e m, int oh, int ow);
    cfg_in = '{mode: m, oh: HW_W'(oh), ow: HW_W'(ow)}; cfg_we = 1;
    @(posedge clk); #1; cfg_we = 0;
    if (m == MODE_DIAG) n_diag++; else n_row++;
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
  initial begin
    #400000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int H, W, C, K, R, S, OH, OW, v, npass;
    for (int c = 0; c < NCORE; c++) begin ld_rowmask[c] = '0; ld_colmask[c] = '0; ld_word[c] = '0; end
    c_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;

    // =========== layer 1: 3x3 CONV, diagonal mode ===========
    H = 8; W = 9; C = 8; K = 4; R = 3; S = 3; OH = H - R + 1; OW = W - S + 1;
    for (int h = 0; h < H; h++) for (int w = 0; w < W; w++) for (int ch = 0; ch < C; ch++)
      ia3[h][w][ch] = rnd_val(55);
    for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int ch = 0; ch < C; ch++)
      for (int k = 0; k < K; k++) wt[r][s][ch][k] = rnd_val(50);
    for (int a = 0; a < K * OH * OW; a++) ref_oa[a] = 0;
    for (int k = 0; k < K; k++) for (int x = 0; x < OH; x++) for (int y = 0; y < OW; y++)
      for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int ch = 0; ch < C; ch++)
        ref_oa[(k * OH + x) * OW + y] += longint'(ia3[x+r][y+s][ch]) * wt[r][s][ch][k];
    set_cfg(MODE_DIAG, OH, OW);
    clear_oa(K * OH * OW);
    for (int c = 0; c < NCORE; c++)
      for (int j = 0; j < COLS; j++) load_w_conv(c, R, C, K, j, j);
    npass = 0;
    begin
      int tasks_h[$], tasks_w[$];
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
        run_pass(cyc); npass++;
      end
    end
    for (int a = 0; a < K * OH * OW; a++) begin
      rd_oa(a, v);
      check(v == int'(ref_oa[a]), $sformatf("conv OA[%0d] = %0d, expected %0d", a, v, ref_oa[a]));
    end
    $display("layer 1 (3x3 CONV): %0d passes", npass);

    // compression of layer 1 output
    begin
      int exp_d[$], exp_c[$], exp_l[$], got;
      int shift;
      shift = 6;
      for (int x = 0; x < OH; x++) for (int y = 0; y < OW; y++) begin
        int any;
        any = 0;
        for (int k = 0; k < K; k++) begin
          longint t;
          t = ref_oa[(k * OH + x) * OW + y];
          if (t < 0) t = 0;
          t = t >>> shift;
          if (t > 32767) t = 32767;
          if (t != 0) begin exp_d.push_back(int'(t)); exp_c.push_back(k); exp_l.push_back(int'(k == K - 1)); any = 1; end
          else if (k == K - 1 && !any) begin exp_d.push_back(0); exp_c.push_back(k); exp_l.push_back(1); end
        end
      end
      comp_k_num = K_W'(K); comp_relu = 1; comp_shift = 5'(shift);
      comp_start = 1; @(posedge clk); #1; comp_start = 0;
      got = 0;
      while (comp_busy) begin
        c_ready = ($urandom_range(3) != 0);
        #1;
        if (c_valid && c_ready) begin
          if (got < exp_d.size())
            check(c_data == exp_d[got] && c_cidx == exp_c[got] && c_last == exp_l[got],
                  $sformatf("compressed word %0d: %0d/%0d/%0d vs %0d/%0d/%0d", got, c_data, c_cidx, c_last,
                            exp_d[got], exp_c[got], exp_l[got]));
          got++;
        end
        @(posedge clk); #1;
      end
      c_ready = 1;
      check(got == exp_d.size(), $sformatf("compressed words %0d vs %0d", got, exp_d.size()));
    end

    // =========== layer 2: pointwise CONV, row mode ===========
    H = 4; W = 7; C = 24; K = 8;
    for (int h = 0; h < H; h++) for (int w = 0; w < W; w++) for (int ch = 0; ch < C; ch++)
      ia3[h][w][ch] = rnd_val(50);
    for (int ch = 0; ch < C; ch++) for (int k = 0; k < K; k++) wt[0][0][ch][k] = rnd_val(50);
    for (int a = 0; a < K * H * W; a++) ref_oa[a] = 0;
    for (int k = 0; k < K; k++) for (int x = 0; x < H; x++) for (int y = 0; y < W; y++)
      for (int ch = 0; ch < C; ch++)
        ref_oa[(k * H + x) * W + y] += longint'(ia3[x][y][ch]) * wt[0][0][ch][k];
    set_cfg(MODE_ROW, H, W);
    clear_oa(K * H * W);
    // W: channel group j to column j, all kernels, r = 0
    for (int c = 0; c < NCORE; c++)
      for (int j = 0; j < COLS; j++) begin
        int e, nseg;
        e = 0; nseg = 0;
        for (int k = 0; k < K; k++) begin
          int e0;
          e0 = e;
          for (int ch = j * 8; ch < j * 8 + 8; ch++) if (wt[0][0][ch][k] != 0) begin
            ld(c, '1, COLS'(1 << j), mk_w(e, wt[0][0][ch][k], ch)); e++;
          end
          if (e > e0) begin ld(c, '1, COLS'(1 << j), mk_seg(nseg, e0, 0, k)); nseg++; end
        end
        ld(c, '1, COLS'(1 << j), mk_wmeta(e, nseg, 0));
      end
    begin
      int pix;
      pix = 0;
      while (pix < H * W) begin
        for (int c = 0; c < NCORE; c++)
          for (int i = 0; i < ROWS; i++)
            for (int j = 0; j < COLS; j++) begin
              int p;
              p = pix + c * ROWS + i;
              load_ia(c, ROWS'(1 << i), COLS'(1 << j), (p < H * W) ? p / W : 0, (p < H * W) ? p % W : 0,
                      j * 8, j * 8 + 8, p < H * W);
            end
        run_pass(cyc);
        pix += NCORE * ROWS;
      end
    end
    for (int a = 0; a < K * H * W; a++) begin
      rd_oa(a, v);
      check(v == int'(ref_oa[a]), $sformatf("pointwise OA[%0d] = %0d, expected %0d", a, v, ref_oa[a]));
    end

    // =========== layer 3: FC, row mode ===========
    C = 48; K = 56;
    for (int ch = 0; ch < C; ch++) ia3[0][0][ch] = rnd_val(50);
    for (int ch = 0; ch < C; ch++) for (int k = 0; k < K; k++) wt[0][0][ch][k] = rnd_val(50);
    for (int k = 0; k < K; k++) begin
      ref_oa[k] = 0;
      for (int ch = 0; ch < C; ch++) ref_oa[k] += longint'(ia3[0][0][ch]) * wt[0][0][ch][k];
    end
    set_cfg(MODE_ROW, 1, 1);
    clear_oa(K);
    for (int c = 0; c < NCORE; c++)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          int e, nseg;
          e = 0; nseg = 0;
          for (int k = (c * ROWS + i) * 2; k < (c * ROWS + i) * 2 + 2; k++) begin
            int e0;
            e0 = e;
            for (int ch = j * 16; ch < j * 16 + 16; ch++) if (wt[0][0][ch][k] != 0) begin
              ld(c, ROWS'(1 << i), COLS'(1 << j), mk_w(e, wt[0][0][ch][k], ch)); e++;
            end
            if (e > e0) begin ld(c, ROWS'(1 << i), COLS'(1 << j), mk_seg(nseg, e0, 0, k)); nseg++; end
          end
          ld(c, ROWS'(1 << i), COLS'(1 << j), mk_wmeta(e, nseg, 0));
        end
    for (int c = 0; c < NCORE; c++)
      for (int j = 0; j < COLS; j++) load_ia(c, '1, COLS'(1 << j), 0, 0, j * 16, j * 16 + 16, 1);
    run_pass(cyc);
    for (int k = 0; k < K; k++) begin
      rd_oa(k, v);
      check(v == int'(ref_oa[k]), $sformatf("FC OA[%0d] = %0d, expected %0d", k, v, ref_oa[k]));
    end

    // =========== mechanisms ===========
    $display("prefetch=%0d stall=%0d merge=%0d lane_wait=%0d drop=%0d contention=%0d",
             n_prefetch, n_stall, n_merge, n_wait, n_drop, n_contend);
    $display("patterns ABC=%0d AB|C=%0d A|BC=%0d A|B|C=%0d diag=%0d row=%0d empty_pixel=%0d",
             n_pat[0], n_pat[1], n_pat[2], n_pat[3], n_diag, n_row, n_empty_pix);
    $display("multiplications=%0d in %0d busy cycles", n_macs, n_cycles_busy);
    check(n_prefetch > 0, "AIM list prefetched");
    check(n_stall > 0, "PE stalled on full OA psum RF");
    check(n_merge > 0, "psum merged with last written psum");
    check(n_wait > 0, "lane waited for a slower PE");
    check(n_drop > 0, "psum outside the output map dropped");
    check(n_contend > 0, "cores contended for the global accumulator");
    for (int p = 0; p < 4; p++) check(n_pat[p] > 0, $sformatf("Table I pattern %0d used", p));
    check(n_diag > 0 && n_row > 0, "both reduction modes used");
    check(n_empty_pix > 0, "pixel with no nonzero OA compressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
