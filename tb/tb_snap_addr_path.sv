// tb_snap_addr_path: self-checking test of the PE address path.
// Random pixels, kernel positions and lane patterns: the Table I pattern,
// the key, the 1-D address (k*OH + x)*OW + y and the range flag of every
// output are compared with values computed here from (x, y, k) =
// (h - r, w - s, k). Each of the four Table I rows is required to occur.
module tb_snap_addr_path;
  import snap_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] valid;
  logic [HW_W-1:0] h, w, oh, ow;
  logic [S_W-1:0] s;
  logic [R_W-1:0] r [3];
  logic [K_W-1:0] k [3];
  red_pat_e pat;
  logic [2:0] ovld;
  logic [KEY_W-1:0] okey [3];
  logic [OA_AW-1:0] oaddr [3];
  logic oin [3];

  snap_addr_path dut (.valid, .h, .w, .s, .r, .k, .oh, .ow, .pat, .out_valid(ovld),
    .out_key(okey), .out_addr(oaddr), .out_inrange(oin));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int seen[4];

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int nv, grp[3], ng, first[3], x, y, ea;
      bit ein;
      h = HW_W'($urandom_range(20)); w = HW_W'($urandom_range(20));
      oh = HW_W'($urandom_range(20, 1)); ow = HW_W'($urandom_range(20, 1));
      s = S_W'($urandom_range(3));
      nv = $urandom_range(3, 1);
      valid = 3'((1 << nv) - 1);
      r[0] = R_W'($urandom_range(3)); k[0] = K_W'($urandom_range(5));
      for (int l = 1; l < 3; l++) begin
        if ($urandom_range(1)) begin r[l] = r[l-1]; k[l] = k[l-1]; end
        else begin
          r[l] = R_W'(r[l-1] + 1);
          k[l] = k[l-1];
          if (r[l] > 3) begin r[l] = 0; k[l] = K_W'(k[l-1] + 1); end
        end
      end
      #1;
      // expected grouping
      ng = 0;
      for (int l = 0; l < nv; l++) begin
        if (l == 0 || r[l] != r[l-1] || k[l] != k[l-1]) begin first[ng] = l; ng++; end
      end
      check(ovld == 3'((1 << ng) - 1), $sformatf("t%0d out_valid %b ng %0d", t, ovld, ng));
      for (int g = 0; g < ng; g++) begin
        int l;
        l = first[g];
        x = int'(h) - int'(r[l]); y = int'(w) - int'(s);
        ein = x >= 0 && y >= 0 && x < int'(oh) && y < int'(ow);
        ea = ((int'(k[l]) * int'(oh) + (x & 8'hff)) * int'(ow) + (y & 8'hff)) & ((1 << OA_AW) - 1);
        check(okey[g] == {k[l], r[l]}, $sformatf("t%0d key %0d", t, g));
        check(oin[g] == ein, $sformatf("t%0d inrange %0d", t, g));
        if (ein) check(oaddr[g] == OA_AW'(ea), $sformatf("t%0d addr %0d: %0d vs %0d", t, g, oaddr[g], ea));
      end
      if (nv == 3) begin
        red_pat_e ep;
        bit ab, bc;
        ab = (r[0] == r[1] && k[0] == k[1]); bc = (r[1] == r[2] && k[1] == k[2]);
        ep = (ab && bc) ? PAT_ABC : ab ? PAT_AB_C : bc ? PAT_A_BC : PAT_A_B_C;
        check(pat == ep, $sformatf("t%0d pattern", t));
        seen[pat]++;
      end
    end
    for (int p = 0; p < 4; p++) check(seen[p] > 0, $sformatf("Table I row %0d exercised", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
