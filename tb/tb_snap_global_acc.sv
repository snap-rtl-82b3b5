// tb_snap_global_acc: self-checking test of the global accumulator with
// the OA buffer. Four producers offer random psums (some outside the output
// map) with random valid patterns; every accepted in-range psum must end up
// added to its word, out-of-range ones dropped, one psum accepted per cycle
// whenever any is offered, and no producer starved (round robin).
module tb_snap_global_acc;
  import snap_pkg::*;
  localparam int NC = 4, D = 8192;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [NC-1:0] iv, ir;
  psum_t ip [NC];
  logic [12:0] ma;
  logic signed [ACC_W-1:0] mrd, mwd;
  logic mwe, afire, dfire;
  logic hreq = 0, hwe = 0, hgnt;
  logic [12:0] ha = 0;
  logic signed [ACC_W-1:0] hwd = 0, hrd;

  snap_global_acc #(.NCORE(NC), .DEPTH(D)) dut (.clk, .rst_n, .in_valid(iv), .in_psum(ip), .in_ready(ir),
    .mem_addr(ma), .mem_rdata(mrd), .mem_we(mwe), .mem_wdata(mwd), .acc_fire(afire), .drop_fire(dfire));
  snap_ia_oa_buffer #(.DEPTH(D)) u_buf (.clk, .acc_addr(ma), .acc_rdata(mrd), .acc_we(mwe), .acc_wdata(mwd),
    .h_req(hreq), .h_we(hwe), .h_addr(ha), .h_wdata(hwd), .h_gnt(hgnt), .h_rdata(hrd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  longint ref_m [256];
  int served [NC];
  int drops = 0;

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    iv = '0; ip = '{default: '0};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      hreq = 1; hwe = 1; ha = 13'(a); hwd = 0; ref_m[a] = 0; @(posedge clk); #1;
    end
    hreq = 0; hwe = 0;
    for (int t = 0; t < 5000; t++) begin
      iv = NC'($urandom);
      for (int c = 0; c < NC; c++) begin
        ip[c].inrange = ($urandom_range(9) != 0);
        ip[c].addr = OA_AW'($urandom_range(255));
        ip[c].key = '0;
        ip[c].val = ACC_W'($urandom_range(20000) - 10000);
      end
      #1;
      check((iv == 0) ? (ir == 0) : ($onehot(ir) && (ir & iv) != 0), "one grant per cycle");
      for (int c = 0; c < NC; c++) if (ir[c]) begin
        served[c]++;
        if (ip[c].inrange) ref_m[ip[c].addr] += ip[c].val; else drops++;
      end
      @(posedge clk); #1;
    end
    iv = '0;
    for (int c = 0; c < NC; c++) check(served[c] > 1000, $sformatf("producer %0d served %0d", c, served[c]));
    check(drops > 0, "out-of-range psums dropped");
    for (int a = 0; a < 256; a++) begin
      hreq = 1; ha = 13'(a); @(posedge clk); #1; hreq = 0;
      check(hrd == ACC_W'(ref_m[a]), $sformatf("word %0d = %0d, expected %0d", a, hrd, ref_m[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
