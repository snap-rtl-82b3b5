// tb_snap_compress: self-checking test of the OA compression unit.
// A random output map (many zeros, negative and large values) sits in a
// buffer model that answers one cycle after a granted request and refuses
// some requests. The stream must contain, pixel by pixel, exactly the
// nonzero results of ReLU (or not), arithmetic shift and 16-bit saturation
// with their channel index, the last word of each pixel marked, and one
// empty-marked word for a pixel without any nonzero value.
module tb_snap_compress;
  import snap_pkg::*;
  localparam int D = 8192;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, relu, busy, mreq, mgnt, ov, ol, oe, ordy;
  logic [HW_W-1:0] oh, ow;
  logic [K_W-1:0] kn;
  logic [4:0] sh;
  logic [12:0] ma;
  logic signed [ACC_W-1:0] mrd;
  logic signed [DW-1:0] od;
  logic [CIDX_W-1:0] oc;

  snap_compress #(.DEPTH(D)) dut (.clk, .rst_n, .start, .oh, .ow, .k_num(kn), .relu, .shift(sh), .busy,
    .m_req(mreq), .m_addr(ma), .m_gnt(mgnt), .m_rdata(mrd),
    .o_valid(ov), .o_data(od), .o_cidx(oc), .o_last(ol), .o_empty(oe), .o_ready(ordy));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int mem [D];
  always_ff @(posedge clk) if (mreq && mgnt) mrd <= mem[ma];
  initial mgnt = 1;
  always @(negedge clk) mgnt = ($urandom_range(4) != 0);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nemp = 0, nsat = 0;
    ordy = 1;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int t = 0; t < 12; t++) begin
      int ed[$], ec[$], el[$], ee[$], got;
      ed.delete(); ec.delete(); el.delete(); ee.delete();
      oh = HW_W'($urandom_range(5, 1)); ow = HW_W'($urandom_range(5, 1)); kn = K_W'($urandom_range(9, 1));
      relu = t % 2; sh = 5'($urandom_range(4));
      for (int a = 0; a < D; a++) mem[a] = 0;
      for (int k = 0; k < kn; k++) for (int x = 0; x < oh; x++) for (int y = 0; y < ow; y++)
        case ($urandom_range(5))
          0, 1, 2: mem[(k * oh + x) * ow + y] = 0;
          3: mem[(k * oh + x) * ow + y] = $urandom_range(4000000) - 2000000;
          default: mem[(k * oh + x) * ow + y] = $urandom_range(200) - 100;
        endcase
      for (int x = 0; x < oh; x++) for (int y = 0; y < ow; y++) begin
        bit any;
        any = 0;
        for (int k = 0; k < kn; k++) begin
          longint v;
          v = mem[(k * oh + x) * ow + y];
          if (relu && v < 0) v = 0;
          v = v >>> sh;
          if (v > 32767) begin v = 32767; nsat++; end
          if (v < -32768) begin v = -32768; nsat++; end
          if (v != 0) begin ed.push_back(int'(v)); ec.push_back(k); el.push_back(k == kn - 1); ee.push_back(0); any = 1; end
          else if (k == kn - 1 && !any) begin ed.push_back(0); ec.push_back(k); el.push_back(1); ee.push_back(1); nemp++; end
        end
      end
      start = 1; @(posedge clk); #1; start = 0;
      got = 0;
      while (busy) begin
        ordy = ($urandom_range(2) != 0);
        #1;
        if (ov && ordy) begin
          if (got < ed.size())
            check(od == DW'(ed[got]) && oc == CIDX_W'(ec[got]) && ol == el[got] && oe == ee[got],
                  $sformatf("t%0d word %0d: %0d/%0d/%0d/%0d vs %0d/%0d/%0d/%0d", t, got, od, oc, ol, oe,
                            ed[got], ec[got], el[got], ee[got]));
          got++;
        end
        @(posedge clk); #1;
      end
      check(got == ed.size(), $sformatf("t%0d words %0d vs %0d", t, got, ed.size()));
    end
    check(nemp > 0, "empty pixel exercised");
    check(nsat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
