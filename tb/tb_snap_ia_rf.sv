// tb_snap_ia_rf: self-checking test of the IA register file.
// Loads the published example IA bundle (values a..d with c-idx 0,2,3,5 at
// pixel (2,2)) and random bundles, and reads every entry on every port.
module tb_snap_ia_rf;
  import snap_pkg::*;
  `include "tb_pe_util.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_en = 0;
  ld_word_t ld;
  logic [CIDX_W-1:0] cidx [IARF_DEPTH];
  logic [LEN_W-1:0] len;
  logic [HW_W-1:0] h, w;
  logic [POS_W-1:0] ra [3];
  logic signed [DW-1:0] rd [3];

  snap_ia_rf dut (.clk, .rst_n, .ld_en, .ld, .cidx, .len, .h, .w, .rd_addr(ra), .rd_data(rd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic put(ld_word_t x);
    ld = x; ld_en = 1; @(posedge clk); #1; ld_en = 0;
  endtask

  int dat[IARF_DEPTH], ci[IARF_DEPTH];

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exc[4] = '{0, 2, 3, 5};
    ld = '0; ra = '{default: '0};
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int i = 0; i < 4; i++) begin
      ld_word_t x = '0; x.kind = LD_IA; x.addr = WA_W'(i); x.data = DW'(100 + i); x.cidx = CIDX_W'(exc[i]); put(x);
    end
    begin ld_word_t x = '0; x.kind = LD_IAMETA; x.len = 4; x.h = 2; x.w = 2; put(x); end
    check(len == 4 && h == 2 && w == 2, "bundle pixel and length");
    for (int i = 0; i < 4; i++) begin
      ra[i % 3] = POS_W'(i); #1;
      check(rd[i % 3] == 100 + i && cidx[i] == exc[i], $sformatf("example entry %0d", i));
    end
    for (int t = 0; t < 20; t++) begin
      begin
        int l, hh, ww;
        l = $urandom_range(IARF_DEPTH); hh = $urandom_range(255); ww = $urandom_range(255);
        put(mk_iameta(l, hh, ww));
        check(len == LEN_W'(l) && h == HW_W'(hh) && w == HW_W'(ww), "bundle pixel and length");
      end
      for (int e = 0; e < IARF_DEPTH; e++) begin
        ld_word_t x = '0; x.kind = LD_IA; x.addr = WA_W'(e); x.data = DW'($urandom); x.cidx = CIDX_W'($urandom);
        dat[e] = int'(x.data); ci[e] = x.cidx; put(x);
      end
      for (int e = 0; e < IARF_DEPTH; e++)
        for (int p = 0; p < 3; p++) begin
          ra[p] = POS_W'(e); #1;
          check(rd[p] == DW'(dat[e]) && cidx[e] == ci[e], $sformatf("entry %0d port %0d", e, p));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
