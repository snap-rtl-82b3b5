// tb_snap_aim: self-checking test of the associative index matching unit.
// Checks the published example (W c-idx 0,2,9,4,5 against IA c-idx
// 0,2,5,7,9 gives pairs (1,0),(1,1),(1,4),(0,-),(1,2)), then random
// bundles from three requesters at once: each is served once in three
// cycles, its list arrives one cycle after its grant and equals a direct
// search of the IA array.
module tb_snap_aim;
  import snap_pkg::*;
  localparam int N = AIM_N, NPE = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NPE-1:0]    req, gnt, rsp_valid;
  logic [CIDX_W-1:0] wc [NPE][N], ic [NPE][N];
  logic [N-1:0]      wv [NPE], iv [NPE];
  vpos_t             list [N];

  snap_aim #(.N(N), .NPE(NPE)) dut (.clk, .rst_n, .req, .req_wcidx(wc), .req_wvalid(wv),
    .req_iacidx(ic), .req_iavalid(iv), .gnt, .rsp_valid, .rsp_list(list));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_list(int p);
    for (int i = 0; i < N; i++) begin
      bit found = 0; int pos = 0;
      for (int j = 0; j < N; j++)
        if (!found && wv[p][i] && iv[p][j] && wc[p][i] == ic[p][j]) begin found = 1; pos = j; end
      check(list[i].valid == found && (!found || list[i].pos == pos),
            $sformatf("pe %0d row %0d: got %0d/%0d want %0d/%0d", p, i, list[i].valid, list[i].pos, found, pos));
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int wex[5] = '{0, 2, 9, 4, 5};
    int iex[5] = '{0, 2, 5, 7, 9};
    int vex[5] = '{1, 1, 1, 0, 1};
    int pex[5] = '{0, 1, 4, 0, 2};
    req = '0;
    for (int p = 0; p < NPE; p++) begin
      wv[p] = '0; iv[p] = '0;
      for (int i = 0; i < N; i++) begin wc[p][i] = '0; ic[p][i] = '0; end
    end
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    // published example on requester 1
    for (int i = 0; i < 5; i++) begin
      wc[1][i] = CIDX_W'(wex[i]); ic[1][i] = CIDX_W'(iex[i]); wv[1][i] = 1; iv[1][i] = 1;
    end
    req = 3'b010;
    #1; check(gnt == 3'b010, "grant of a single request");
    @(posedge clk); #1; req = '0;
    check(rsp_valid == 3'b010, "response one cycle after grant");
    for (int i = 0; i < 5; i++)
      check(list[i].valid == vex[i] && (vex[i] == 0 || list[i].pos == pex[i]),
            $sformatf("example row %0d", i));
    check_list(1);
    // random rounds, three requesters competing
    for (int round = 0; round < 40; round++) begin
      logic [NPE-1:0] served;
      served = '0;
      for (int p = 0; p < NPE; p++) begin
        int nw, ni, c;
        nw = $urandom_range(N); ni = $urandom_range(N);
        // IA c-idx distinct and increasing, W c-idx random
        c = $urandom_range(3);
        for (int j = 0; j < N; j++) begin
          ic[p][j] = CIDX_W'(c); c += 1 + $urandom_range(2);
          iv[p][j] = (j < ni);
          wc[p][j] = CIDX_W'($urandom_range(100));
          wv[p][j] = (j < nw);
        end
      end
      req = '1;
      for (int t = 0; t < NPE; t++) begin
        logic [NPE-1:0] g;
        #1; g = gnt;
        check($onehot(g) && (g & served) == '0, "round-robin grant");
        served |= g;
        @(posedge clk); #1;
        req &= ~g;
        check(rsp_valid == g, "response follows grant");
        for (int p = 0; p < NPE; p++) if (g[p]) check_list(p);
      end
      check(served == '1, "all requesters served");
      req = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
