// tb_snap_pe: self-checking test of one processing element with its AIM.
// The published example (W -2,9,2,1,-5 with c-idx 0,2,9,4,5 against IA
// 3,-4,7,-1,3 with c-idx 0,2,5,7,9) must give one psum of -71. Then random
// W bundles of up to 64 entries in up to 16 (r, k) segments against random
// IA bundles: every segment with a matching channel must give exactly one
// psum, in segment order, with value sum(W*IA) over matching channels, key
// {k, r} and OA address of (h - r, w - s, k). The psum consumer pops at
// random so that the OA psum RF fills and the pipeline stalls. Cycle count:
// a pass must take at most ceil(nmatch/3) + 4 cycles per chunk + 8.
module tb_snap_pe;
  import snap_pkg::*;
  `include "tb_pe_util.svh"
  localparam int N = AIM_N;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_en = 0, start = 0, done, pop;
  ld_word_t ld = '0;
  logic [HW_W-1:0] oh = 8'd16, ow = 8'd16;
  logic [2:0] req, gnt, rsp;
  logic [CIDX_W-1:0] wc [3][N], ic [3][N];
  logic [N-1:0] wv [3], iv [3];
  vpos_t list [N];
  logic hv;
  psum_t head;
  logic [1:0] macs;

  snap_aim #(.N(N), .NPE(3)) u_aim (.clk, .rst_n, .req, .req_wcidx(wc), .req_wvalid(wv),
    .req_iacidx(ic), .req_iavalid(iv), .gnt, .rsp_valid(rsp), .rsp_list(list));
  assign req[2:1] = '0;
  for (genvar p = 1; p < 3; p++) begin : g_idle
    assign wv[p] = '0; assign iv[p] = '0;
    for (genvar i = 0; i < N; i++) begin : g_i
      assign wc[p][i] = '0; assign ic[p][i] = '0;
    end
  end

  snap_pe dut (.clk, .rst_n, .ld_en, .ld, .oh, .ow, .start, .done,
    .aim_req(req[0]), .aim_wcidx(wc[0]), .aim_wvalid(wv[0]), .aim_iacidx(ic[0]), .aim_iavalid(iv[0]),
    .aim_gnt(gnt[0]), .aim_rsp_valid(rsp[0]), .aim_rsp_list(list),
    .head_valid(hv), .head, .pop, .mac_count(macs));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic put(ld_word_t x);
    ld = x; ld_en = 1; @(posedge clk); #1; ld_en = 0;
  endtask

  int pop_pct = 100;
  int stalls = 0;
  always @(posedge clk) if (dut.stall && dut.state_q != 0) stalls++;

  psum_t got[$];
  always_ff @(posedge clk) if (pop && hv) got.push_back(head);
  always_comb pop = hv && (($urandom % 100) < pop_pct);

  int wd[64], wci[64], seg_of[64], iad[32], iac[32];
  int sptr[16], sr[16], sk[16];

  task automatic run_pass(int nw, int nseg, int ni, int h, int w, int s, output int cycles);
    for (int e = 0; e < nw; e++) put(mk_w(e, wd[e], wci[e]));
    for (int j = 0; j < nseg; j++) put(mk_seg(j, sptr[j], sr[j], sk[j]));
    put(mk_wmeta(nw, nseg, s));
    for (int e = 0; e < ni; e++) put(mk_ia(e, iad[e], iac[e]));
    put(mk_iameta(ni, h, w));
    got.delete();
    start = 1; @(posedge clk); #1; start = 0;
    cycles = 1;
    while (!done && cycles < 5000) begin @(posedge clk); #1; cycles++; end
    while (hv) begin @(posedge clk); #1; end
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    // published example
    wd[0:4] = '{-2, 9, 2, 1, -5}; wci[0:4] = '{0, 2, 9, 4, 5};
    iad[0:4] = '{3, -4, 7, -1, 3}; iac[0:4] = '{0, 2, 5, 7, 9};
    sptr[0] = 0; sr[0] = 0; sk[0] = 0;
    run_pass(5, 1, 5, 2, 2, 0, cyc);
    check(got.size() == 1 && got[0].val == -71, $sformatf("example psum (%0d psums)", got.size()));
    check(got.size() == 1 && got[0].addr == 2*16 + 2 && got[0].inrange, "example address");

    for (int t = 0; t < 150; t++) begin
      int nw, nseg, ni, h, w, s, nmatch, nexp, idx;
      longint ev[16];
      bit has[16];
      pop_pct = (t % 3 == 0) ? 15 : 100;
      nw = $urandom_range(64, 1);
      nseg = $urandom_range(16, 1); if (nseg > nw) nseg = nw;
      ni = $urandom_range(32, 1);
      h = $urandom_range(17); w = $urandom_range(17); s = $urandom_range(2);
      // IA: distinct increasing channels
      idx = $urandom_range(2);
      for (int e = 0; e < ni; e++) begin iad[e] = $urandom_range(65535) - 32768; iac[e] = idx; idx += 1 + $urandom_range(2); end
      // segments: strictly increasing (k, r)
      sptr[0] = 0; sr[0] = $urandom_range(1); sk[0] = $urandom_range(3);
      for (int j = 1; j < nseg; j++) begin
        sptr[j] = sptr[j-1] + 1 + $urandom_range((nw - sptr[j-1] - 1) - (nseg - 1 - j));
        if ($urandom_range(1)) begin sr[j] = sr[j-1] + 1; sk[j] = sk[j-1]; end
        else begin sr[j] = $urandom_range(2); sk[j] = sk[j-1] + 1; end
      end
      for (int j = 0; j < nseg; j++) begin
        int cprev, eend;
        cprev = -1;
        eend = (j + 1 < nseg) ? sptr[j+1] : nw;
        for (int e = sptr[j]; e < eend; e++) begin
          seg_of[e] = j;
          wd[e] = $urandom_range(65535) - 32768;
          // channels increase inside a segment; some channels hit the IA
          cprev = cprev + 1 + $urandom_range(3);
          wci[e] = cprev;
        end
      end
      nmatch = 0;
      for (int j = 0; j < nseg; j++) begin ev[j] = 0; has[j] = 0; end
      for (int e = 0; e < nw; e++)
        for (int i = 0; i < ni; i++)
          if (wci[e] == iac[i]) begin
            ev[seg_of[e]] += longint'(wd[e]) * longint'(iad[i]); has[seg_of[e]] = 1; nmatch++;
          end
      run_pass(nw, nseg, ni, h, w, s, cyc);
      nexp = 0;
      for (int j = 0; j < nseg; j++) if (has[j]) begin
        int x, y;
        x = h - sr[j]; y = w - s;
        if (nexp < got.size()) begin
          check(got[nexp].val == ACC_W'(ev[j]), $sformatf("t%0d seg %0d value %0d vs %0d", t, j, got[nexp].val, ev[j]));
          check(got[nexp].key == {K_W'(sk[j]), R_W'(sr[j])}, $sformatf("t%0d seg %0d key", t, j));
          check(got[nexp].inrange == (x >= 0 && y >= 0 && x < 16 && y < 16), $sformatf("t%0d seg %0d range", t, j));
          if (got[nexp].inrange) check(got[nexp].addr == OA_AW'((sk[j] * 16 + x) * 16 + y), $sformatf("t%0d seg %0d addr", t, j));
        end
        nexp++;
      end
      check(got.size() == nexp, $sformatf("t%0d psum count %0d vs %0d", t, got.size(), nexp));
      if (pop_pct == 100)
        check(cyc <= (nmatch + 2) / 3 + 4 * ((nw + 31) / 32) + 8,
              $sformatf("t%0d cycles %0d for %0d nmatch", t, cyc, nmatch));
    end
    check(stalls > 0, "pipeline stalled on a full OA psum RF at least once");
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
