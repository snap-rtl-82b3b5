// tb_snap_seq_decoder: self-checking test of the sequence decoder.
// First the published example: list (1,0),(1,1),(1,4),(0,-),(1,2) gives W
// addresses 0,1,2 with IA addresses 0,1,4 in the first cycle and W 4 with
// IA 2 in the second. Then random lists, a second list loaded while the
// first is being dispatched (prefetch), random pop stalls; every dispatched
// pair is compared with a queue built from the lists, and the cycle count
// of each list is checked to be ceil(valid pairs / 3).
module tb_snap_seq_decoder;
  import snap_pkg::*;
  localparam int N = AIM_N;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             load = 0, pop = 0, clear = 0;
  vpos_t            ll [N];
  logic [WA_W-1:0]  base = '0;
  logic [1:0]       slots_free;
  logic [2:0]       ov;
  logic [WA_W-1:0]  wa [3];
  logic [POS_W-1:0] ia [3];
  logic             empty;

  snap_seq_decoder dut (.clk, .rst_n, .clear, .load, .load_list(ll), .load_base(base), .slots_free,
    .pop, .out_valid(ov), .out_waddr(wa), .out_iaaddr(ia), .empty);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int exp_w[$], exp_i[$];

  task automatic make_list(int b, int density);
    base = WA_W'(b);
    for (int i = 0; i < N; i++) begin
      ll[i].valid = ($urandom_range(99) < density);
      ll[i].pos   = POS_W'($urandom_range(N-1));
      if (ll[i].valid) begin exp_w.push_back(b + i); exp_i.push_back(ll[i].pos); end
    end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) ll[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    check(empty && slots_free == 2, "empty after reset");
    // published example
    ll[0] = '{1'b1, 5'd0}; ll[1] = '{1'b1, 5'd1}; ll[2] = '{1'b1, 5'd4};
    ll[3] = '{1'b0, 5'd0}; ll[4] = '{1'b1, 5'd2};
    load = 1; @(posedge clk); #1; load = 0;
    check(!empty && slots_free == 1, "list stored");
    check(ov == 3'b111 && wa[0] == 0 && wa[1] == 1 && wa[2] == 2 &&
          ia[0] == 0 && ia[1] == 1 && ia[2] == 4, "example cycle 0");
    pop = 1; @(posedge clk); #1;
    check(ov == 3'b001 && wa[0] == 4 && ia[0] == 2, "example cycle 1");
    @(posedge clk); #1; pop = 0;
    check(empty && ov == 0, "example list consumed in two cycles");

    // random lists with prefetch and stalls
    for (int r = 0; r < 60; r++) begin
      int got, cyc, nexp;
      make_list(32 * (r % 2), $urandom_range(100));
      nexp = exp_w.size();
      load = 1; @(posedge clk); #1; load = 0;
      // second list arrives while the first is dispatched
      make_list(32 * ((r + 1) % 2), $urandom_range(100));
      got = 0; cyc = 0;
      if (slots_free != 0) begin load = 1; end
      while (!empty || load) begin
        pop = ($urandom_range(3) != 0);
        #0;
        if (pop) begin
          for (int l = 0; l < 3; l++) if (ov[l]) begin
            check(exp_w.size() > 0 && wa[l] == WA_W'(exp_w[0]) && ia[l] == exp_i[0],
                  $sformatf("round %0d lane %0d", r, l));
            void'(exp_w.pop_front()); void'(exp_i.pop_front());
            got++;
          end
          if (ov != 0) cyc++;
        end
        @(posedge clk); #1; load = 0; pop = 0;
      end
      check(exp_w.size() == 0, $sformatf("round %0d: all pairs dispatched", r));
      check(got >= nexp, "count");
      exp_w.delete(); exp_i.delete();
    end
    // a list of exactly k pairs takes ceil(k/3) dispatch cycles
    for (int k = 0; k <= 10; k++) begin
      int cyc;
      for (int i = 0; i < N; i++) ll[i] = '{(i < k) ? 1'b1 : 1'b0, POS_W'(i)};
      load = 1; @(posedge clk); #1; load = 0;
      cyc = 0; pop = 1;
      while (!empty && cyc < 20) begin @(posedge clk); #1; cyc++; end
      pop = 0;
      check(cyc == (k + 2) / 3, $sformatf("%0d pairs took %0d cycles", k, cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
