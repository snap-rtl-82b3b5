// tb_snap_oa_psum_rf: self-checking test of the OA psum RF.
// Random bursts of one to three pushes per cycle and random pops, only
// pushing when space is reported; the popped order is compared with a
// reference queue, and space/head_valid with the queue's fill level.
module tb_snap_oa_psum_rf;
  import snap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int D = 8;
  logic [2:0] push;
  psum_t pd [3];
  logic space, hv, pop;
  psum_t head;

  snap_oa_psum_rf #(.DEPTH(D)) dut (.clk, .rst_n, .push, .push_data(pd), .space, .head_valid(hv), .head, .pop);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  psum_t q[$];
  int full_seen = 0;

  initial begin
    push = 0; pop = 0; pd = '{default: '0};
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int t = 0; t < 3000; t++) begin
      int n;
      check(hv == (q.size() > 0), "head_valid");
      check(space == (q.size() + 3 <= D), "space");
      if (!space) full_seen++;
      if (hv) check(head == q[0], $sformatf("t%0d head order", t));
      n = space ? $urandom_range(3) : 0;
      push = 3'((1 << n) - 1);
      for (int l = 0; l < 3; l++) begin
        pd[l] = '{inrange: 1'b1, key: KEY_W'($urandom), addr: OA_AW'($urandom), val: ACC_W'($urandom)};
      end
      pop = hv && ($urandom_range(2) == 0);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      for (int l = 0; l < n; l++) q.push_back(pd[l]);
      #1;
    end
    check(full_seen > 0, "RF filled up at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
