// tb_snap_compute_path: self-checking test of the PE compute path.
// Random signed operands under every Table I pattern, with and without the
// last written psum added to Out[0]; outputs compared with sums of the
// products computed here. Includes the published example products
// (-2)(3), 9(-4), 2(3) reduced to one psum.
module tb_snap_compute_path;
  import snap_pkg::*;
  int checks = 0, failures = 0;
  logic signed [DW-1:0] w [3], ia [3];
  red_pat_e pat;
  logic add_last;
  logic signed [ACC_W-1:0] last_val, out [3];

  snap_compute_path dut (.w, .ia, .pat, .add_last, .last_val, .out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    w = '{-16'sd2, 16'sd9, 16'sd2}; ia = '{16'sd3, -16'sd4, 16'sd3};
    pat = PAT_ABC; add_last = 0; last_val = 0; #1;
    check(out[0] == -36, "published example A+B+C");
    for (int t = 0; t < 4000; t++) begin
      longint a, b, c, l, e0, e1, e2;
      for (int i = 0; i < 3; i++) begin w[i] = DW'($urandom); ia[i] = DW'($urandom); end
      pat = red_pat_e'($urandom_range(3));
      add_last = $urandom_range(1);
      last_val = ACC_W'($urandom);
      #1;
      a = longint'(w[0]) * longint'(ia[0]);
      b = longint'(w[1]) * longint'(ia[1]);
      c = longint'(w[2]) * longint'(ia[2]);
      l = add_last ? longint'(last_val) : 0;
      case (pat)
        PAT_ABC:   begin e0 = a + b + c; e1 = 0; e2 = 0; end
        PAT_AB_C:  begin e0 = a + b; e1 = c; e2 = 0; end
        PAT_A_BC:  begin e0 = a; e1 = b + c; e2 = 0; end
        default:   begin e0 = a; e1 = b; e2 = c; end
      endcase
      e0 += l;
      check(out[0] == ACC_W'(e0) && out[1] == ACC_W'(e1) && out[2] == ACC_W'(e2),
            $sformatf("t%0d pattern %0d", t, pat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
