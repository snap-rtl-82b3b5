// snap_addr_path: address path and reduction controller of a PE.
//
// For the three W-IA pairs dispatched in a cycle it computes the OA index
// (x, y, k) = (h - r, w - s, k), whether it lies inside the output map, the
// 1-D OA address (k*OH + x)*OW + y and the order key {k, r}. The reduction
// controller then picks a Table I pattern: A+B+C, A+B|C, A|B+C or A|B|C. The
// channel-first order keeps pairs of one (r, k) segment together, so the
// pattern is chosen by comparing the keys of neighbouring lanes for
// equality. Out[n] gets the key, address and range flag of its first psum.
// The index formula and Table I are the published ones; the address layout
// and key are this design's own. Purely combinational.
module snap_addr_path
  import snap_pkg::*;
(
  input  logic [NMUL-1:0]    valid,       // lanes carrying a pair, from lane 0
  input  logic [HW_W-1:0]    h,
  input  logic [HW_W-1:0]    w,
  input  logic [S_W-1:0]     s,
  input  logic [R_W-1:0]     r   [NMUL],
  input  logic [K_W-1:0]     k   [NMUL],
  input  logic [HW_W-1:0]    oh,
  input  logic [HW_W-1:0]    ow,
  output red_pat_e           pat,
  output logic [NMUL-1:0]    out_valid,
  output logic [KEY_W-1:0]   out_key     [NMUL],
  output logic [OA_AW-1:0]   out_addr    [NMUL],
  output logic               out_inrange [NMUL]
);

  logic [KEY_W-1:0]   key   [NMUL];
  logic [OA_AW-1:0]   addr  [NMUL];
  logic               inr   [NMUL];

  // Address computation.
  always_comb begin
    for (int unsigned l = 0; l < NMUL; l++) begin
      logic signed [HW_W+1:0] x, y;
      x       = $signed({2'b00, h}) - $signed({{(HW_W-R_W+2){1'b0}}, r[l]});
      y       = $signed({2'b00, w}) - $signed({{(HW_W-S_W+2){1'b0}}, s});
      inr[l]  = (x >= 0) && (y >= 0) &&
                (x < $signed({2'b00, oh})) && (y < $signed({2'b00, ow}));
      key[l]  = {k[l], r[l]};
      addr[l] = OA_AW'((OA_AW'(k[l]) * OA_AW'(oh) + OA_AW'(x[HW_W-1:0])) * OA_AW'(ow)
                       + OA_AW'(y[HW_W-1:0]));
    end
  end

  // Reduction controller (Table I). A missing lane counts as a new address.
  logic eq_ab, eq_bc;
  assign eq_ab = valid[1] && (key[0] == key[1]);
  assign eq_bc = valid[2] && valid[1] && (key[1] == key[2]);

  always_comb begin
    if (eq_ab && eq_bc)       pat = PAT_ABC;
    else if (eq_ab)           pat = PAT_AB_C;
    else if (eq_bc)           pat = PAT_A_BC;
    else                      pat = PAT_A_B_C;

    out_valid = '0;
    for (int unsigned n = 0; n < NMUL; n++) begin
      out_key[n]     = key[0];
      out_addr[n]    = addr[0];
      out_inrange[n] = inr[0];
    end
    out_valid[0] = valid[0];
    unique case (pat)
      PAT_ABC: ;
      PAT_AB_C: begin
        out_valid[1] = valid[2];
        out_key[1] = key[2]; out_addr[1] = addr[2]; out_inrange[1] = inr[2];
      end
      PAT_A_BC: begin
        out_valid[1] = valid[1];
        out_key[1] = key[1]; out_addr[1] = addr[1]; out_inrange[1] = inr[1];
      end
      PAT_A_B_C: begin
        out_valid[1] = valid[1];
        out_valid[2] = valid[2];
        out_key[1] = key[1]; out_addr[1] = addr[1]; out_inrange[1] = inr[1];
        out_key[2] = key[2]; out_addr[2] = addr[2]; out_inrange[2] = inr[2];
      end
    endcase
  end

endmodule
