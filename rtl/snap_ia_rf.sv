// snap_ia_rf: IA register file of a PE.
//
// Holds one compressed IA bundle: up to 32 nonzero activations of a single
// pixel (h, w) with their channel indices, the bundle's length and its
// pixel. The c-idx array goes whole to the AIM; three combinational read
// ports feed the multipliers. The format follows the published design; the
// 32-entry size (equal to the AIM width) and the load-bus interface are this
// design's own. Writes take effect at the clock edge.
module snap_ia_rf
  import snap_pkg::*;
#(
  parameter int unsigned DEPTH = IARF_DEPTH,
  parameter int unsigned NRD   = NMUL
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld_en,
  input  ld_word_t              ld,
  output logic [CIDX_W-1:0]     cidx [DEPTH],
  output logic [LEN_W-1:0]      len,
  output logic [HW_W-1:0]       h,
  output logic [HW_W-1:0]       w,
  input  logic [POS_W-1:0]      rd_addr [NRD],
  output logic signed [DW-1:0]  rd_data [NRD]
);

  logic signed [DW-1:0] data_q [DEPTH];
  logic [CIDX_W-1:0]    cidx_q [DEPTH];
  logic [LEN_W-1:0]     len_q;
  logic [HW_W-1:0]      h_q, w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_q <= '0;
      h_q   <= '0;
      w_q   <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) begin
        data_q[i] <= '0;
        cidx_q[i] <= '0;
      end
    end else if (ld_en) begin
      if (ld.kind == LD_IA) begin
        data_q[ld.addr[POS_W-1:0]] <= ld.data;
        cidx_q[ld.addr[POS_W-1:0]] <= ld.cidx;
      end else if (ld.kind == LD_IAMETA) begin
        len_q <= ld.len;
        h_q   <= ld.h;
        w_q   <= ld.w;
      end
    end
  end

  assign cidx = cidx_q;
  assign len  = len_q;
  assign h    = h_q;
  assign w    = w_q;

  always_comb
    for (int unsigned p = 0; p < NRD; p++) rd_data[p] = data_q[rd_addr[p]];

endmodule
