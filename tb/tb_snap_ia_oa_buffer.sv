// tb_snap_ia_oa_buffer: self-checking test of the unified IA/OA buffer.
// Random host writes and reads (read data one cycle later) interleaved with
// accumulation-port read-modify-writes, against a reference array; a host
// write to the bank being written by the accumulation port must be refused
// (h_gnt low) and succeed when repeated.
module tb_snap_ia_oa_buffer;
  import snap_pkg::*;
  localparam int D = 8192;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [12:0] aa, ha;
  logic signed [ACC_W-1:0] ard, awd, hwd, hrd;
  logic awe, hreq, hwe, hgnt;

  snap_ia_oa_buffer dut (.clk, .acc_addr(aa), .acc_rdata(ard), .acc_we(awe), .acc_wdata(awd),
    .h_req(hreq), .h_we(hwe), .h_addr(ha), .h_wdata(hwd), .h_gnt(hgnt), .h_rdata(hrd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int mem [D];
  int conflicts = 0;

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    awe = 0; hreq = 0; hwe = 0; aa = 0; ha = 0; awd = 0; hwd = 0;
    @(posedge clk); #1;
    for (int a = 0; a < D; a++) begin
      hreq = 1; hwe = 1; ha = 13'(a); hwd = a * 3; mem[a] = a * 3;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 20000; t++) begin
      int pend_rd;
      bit do_rd;
      // accumulation port
      aa = 13'($urandom_range(D - 1)); awe = $urandom_range(1);
      #1;
      check(ard == mem[aa], "accumulation read");
      awd = ard + 5;
      // host port
      hreq = $urandom_range(1); hwe = $urandom_range(1);
      ha = ($urandom_range(3) == 0) ? aa ^ 13'h10 : 13'($urandom_range(D - 1));
      hwd = $urandom;
      #1;
      if (hreq && hwe && awe && ha[3:0] == aa[3:0]) begin
        check(!hgnt, "bank conflict refused"); conflicts++;
      end else check(hgnt, "no conflict granted");
      do_rd = hreq && !hwe; pend_rd = mem[ha];
      @(posedge clk);
      if (awe) mem[aa] = awd;
      if (hreq && hwe && hgnt) mem[ha] = hwd;
      #1;
      if (do_rd) check(hrd == pend_rd, "host read data");
      awe = 0; hreq = 0;
    end
    check(conflicts > 0, "bank conflict exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
