// tb_snap_w_rf: self-checking test of the W register file.
// Loads the published example bundle (A..F with c-idx 0,2,3,0,1,3, pos-ptr
// 0,3, r-idx 0,1, k-idx 0,0) and checks data, c-idx and the (r, k) lookup
// of every entry, then random bundles with up to 16 segments.
module tb_snap_w_rf;
  import snap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_en = 0;
  ld_word_t ld;
  logic [CIDX_W-1:0] cidx [WRF_DEPTH];
  logic [LEN_W-1:0] len;
  logic [S_W-1:0] s;
  logic [WA_W-1:0] ra [3];
  logic signed [DW-1:0] rd [3];
  logic [R_W-1:0] rr [3];
  logic [K_W-1:0] rk [3];

  snap_w_rf dut (.clk, .rst_n, .ld_en, .ld, .cidx, .len, .s, .rd_addr(ra), .rd_data(rd), .rd_r(rr), .rd_k(rk));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(ld_word_t w);
    ld = w; ld_en = 1; @(posedge clk); #1; ld_en = 0;
  endtask

  int dat[WRF_DEPTH], ci[WRF_DEPTH], er[WRF_DEPTH], ek[WRF_DEPTH];

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exc[6] = '{0, 2, 3, 0, 1, 3};
    ld = '0; ra = '{default: '0};
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int i = 0; i < 6; i++) begin
      ld_word_t w = '0;
      w.kind = LD_W; w.addr = WA_W'(i); w.data = DW'(10 + i); w.cidx = CIDX_W'(exc[i]);
      put(w);
    end
    begin ld_word_t w = '0; w.kind = LD_WSEG; w.addr = 0; w.len = 0; w.r = 0; w.k = 0; put(w); end
    begin ld_word_t w = '0; w.kind = LD_WSEG; w.addr = 1; w.len = 3; w.r = 1; w.k = 0; put(w); end
    begin ld_word_t w = '0; w.kind = LD_WMETA; w.len = 6; w.k = 2; w.s = 1; put(w); end
    check(len == 6 && s == 1, "bundle length and s");
    for (int i = 0; i < 6; i += 3) begin
      for (int l = 0; l < 3; l++) ra[l] = WA_W'(i + l);
      #1;
      for (int l = 0; l < 3; l++)
        check(rd[l] == 10 + i + l && cidx[i+l] == exc[i+l] && rr[l] == ((i + l) >= 3) && rk[l] == 0,
              $sformatf("example entry %0d", i + l));
    end
    // random bundles
    for (int t = 0; t < 30; t++) begin
      int n, nseg, p;
      int ptr[NSEG];
      n = $urandom_range(WRF_DEPTH, 1);
      nseg = $urandom_range(NSEG, 1);
      if (nseg > n) nseg = n;
      ptr[0] = 0;
      for (int j = 1; j < nseg; j++) ptr[j] = ptr[j-1] + 1 + $urandom_range((n - ptr[j-1] - 1) - (nseg - 1 - j));
      for (int j = 0; j < nseg; j++) begin
        ld_word_t w = '0;
        w.kind = LD_WSEG; w.addr = WA_W'(j); w.len = LEN_W'(ptr[j]);
        w.r = R_W'($urandom); w.k = K_W'($urandom);
        put(w);
        for (int e = ptr[j]; e < n; e++) begin er[e] = w.r; ek[e] = w.k; end
      end
      for (int e = 0; e < n; e++) begin
        ld_word_t w = '0;
        w.kind = LD_W; w.addr = WA_W'(e); w.data = DW'($urandom); w.cidx = CIDX_W'($urandom);
        dat[e] = int'(w.data); ci[e] = w.cidx;
        put(w);
      end
      begin ld_word_t w = '0; w.kind = LD_WMETA; w.len = LEN_W'(n); w.k = K_W'(nseg); put(w); end
      for (int e = 0; e < n; e++) begin
        p = $urandom_range(2);
        ra[p] = WA_W'(e); #1;
        check(rd[p] == DW'(dat[e]) && cidx[e] == ci[e] && rr[p] == er[e] && rk[p] == ek[e],
              $sformatf("test %0d entry %0d port %0d", t, e, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
