// snap_compute_path: compute path of a PE.
//
// Three 16-bit signed multipliers produce the psums A, B and C. Psum
// expansion forms A, A+B, A+B+C, B, B+C and C, and the reduction pattern
// chosen by the address path selects Out[0..2] as in Table I. Out[0] is
// further added to the last written psum when add_last is set, which
// continues a channel reduction across cycles. A lane without a pair must
// be given zero operands by the caller. The structure follows the published
// PE; the 32-bit accumulator width is this design's own. Combinational.
module snap_compute_path
  import snap_pkg::*;
(
  input  logic signed [DW-1:0]    w   [NMUL],
  input  logic signed [DW-1:0]    ia  [NMUL],
  input  red_pat_e                pat,
  input  logic                    add_last,
  input  logic signed [ACC_W-1:0] last_val,
  output logic signed [ACC_W-1:0] out [NMUL]
);

  logic signed [ACC_W-1:0] a, b, c;
  logic signed [ACC_W-1:0] ab, bc, abc;
  logic signed [ACC_W-1:0] o0;

  assign a   = ACC_W'(w[0] * ia[0]);
  assign b   = ACC_W'(w[1] * ia[1]);
  assign c   = ACC_W'(w[2] * ia[2]);
  assign ab  = a + b;
  assign bc  = b + c;
  assign abc = ab + c;

  always_comb begin
    o0     = a;
    out[1] = '0;
    out[2] = '0;
    unique case (pat)
      PAT_ABC:   o0 = abc;
      PAT_AB_C:  begin o0 = ab; out[1] = c;  end
      PAT_A_BC:  begin o0 = a;  out[1] = bc; end
      PAT_A_B_C: begin o0 = a;  out[1] = b;  out[2] = c; end
    endcase
    out[0] = o0 + (add_last ? last_val : '0);
  end

endmodule
