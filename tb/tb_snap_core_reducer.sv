// tb_snap_core_reducer: self-checking test of the core reducer (3 x 3 PEs).
// Each PE is given a random ordered stream of keyed psums, some keys
// missing, and releases them at random times. In diagonal mode the lanes
// are the five diagonals i - j, in row mode the three rows. For every lane
// the emitted psums must be one per key present in any member stream, in
// key order, with the sum of the members' values; the lane must never emit
// before all members have either a psum or have finished. The downstream
// ready is random.
module tb_snap_core_reducer;
  import snap_pkg::*;
  localparam int ROWS = 3, COLS = 3, NPE = 9, NL = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  red_mode_e mode;
  logic [NPE-1:0] hv, pdone, ppop;
  psum_t head [NPE];
  logic [NL-1:0] lv, lr, lf;
  psum_t lo [NL];

  snap_core_reducer #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .mode, .pe_head_valid(hv), .pe_head(head),
    .pe_done(pdone), .pe_pop(ppop), .lane_valid(lv), .lane_out(lo), .lane_ready(lr), .lane_fire(lf));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int lane_of(red_mode_e m, int p);
    return (m == MODE_DIAG) ? (p / COLS + COLS - 1 - p % COLS) : p / COLS;
  endfunction

  psum_t  q [NPE][$];
  logic   ready_out [NPE];   // stream head released
  longint exp_sum [NL][64];
  bit     exp_has [NL][64];
  int     nwait = 0;

  always_comb
    for (int p = 0; p < NPE; p++) begin
      hv[p]    = (q[p].size() > 0) && ready_out[p];
      head[p]  = (q[p].size() > 0) ? q[p][0] : '0;
      pdone[p] = (q[p].size() == 0);
    end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int got [NL];
    rst_n = 0; lr = '0; mode = MODE_DIAG;
    for (int p = 0; p < NPE; p++) ready_out[p] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int cyc;
      mode = (t % 2) ? MODE_ROW : MODE_DIAG;
      for (int l = 0; l < NL; l++) begin
        got[l] = 0;
        for (int kk = 0; kk < 64; kk++) begin exp_sum[l][kk] = 0; exp_has[l][kk] = 0; end
      end
      for (int p = 0; p < NPE; p++) begin
        q[p].delete();
        for (int kk = 0; kk < 40; kk++) if ($urandom_range(2) != 0) begin
          psum_t x;
          x.inrange = 1; x.key = KEY_W'(kk); x.addr = OA_AW'(1000 * lane_of(mode, p) + kk);
          x.val = ACC_W'($urandom_range(2000000) - 1000000);
          q[p].push_back(x);
          exp_sum[lane_of(mode, p)][kk] += longint'(x.val);
          exp_has[lane_of(mode, p)][kk] = 1;
        end
      end
      cyc = 0;
      while (cyc < 5000) begin
        bit all_empty;
        for (int p = 0; p < NPE; p++) ready_out[p] = ($urandom_range(3) != 0);
        lr = NL'($urandom);
        #1;
        // a lane that fires must have every member ready
        for (int l = 0; l < NL; l++) if (lf[l])
          for (int p = 0; p < NPE; p++) if (lane_of(mode, p) == l)
            check(hv[p] || pdone[p], "lane fired while a member had nothing");
        for (int l = 0; l < NL; l++) if (lv[l] && lr[l]) begin
          int kk;
          while (got[l] < 64 && !exp_has[l][got[l]]) got[l]++;
          kk = got[l];
          check(kk < 64 && lo[l].key == KEY_W'(kk) && lo[l].val == ACC_W'(exp_sum[l][kk]) &&
                lo[l].addr == OA_AW'(1000 * l + kk),
                $sformatf("t%0d lane %0d key %0d: got key %0d val %0d", t, l, kk, lo[l].key, lo[l].val));
          got[l]++;
        end
        if ((ppop & ~hv) != 0) check(0, "pop without head");
        for (int p = 0; p < NPE; p++) if (hv[p] && !ppop[p]) nwait++;
        @(posedge clk);
        for (int p = 0; p < NPE; p++) if (ppop[p] && hv[p]) void'(q[p].pop_front());
        cyc++;
        all_empty = 1;
        for (int p = 0; p < NPE; p++) if (q[p].size() > 0) all_empty = 0;
        if (all_empty && lv == '0) break;
      end
      for (int l = 0; l < NL; l++) begin
        while (got[l] < 64 && !exp_has[l][got[l]]) got[l]++;
        check(got[l] >= 40 || got[l] == 64, $sformatf("t%0d lane %0d emitted all psums", t, l));
      end
    end
    check(nwait > 0, "a lane waited for a slower PE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
