// snap_w_rf: W register file of a PE.
//
// Holds one compressed W bundle in the channel-first format: a data array
// and a channel-index (c-idx) array, plus the pos-ptr, r-idx and k-idx arrays
// that mark where each (r, k) segment starts, the bundle's kernel column s,
// its length and its number of segments. The c-idx array is brought out
// whole for the AIM. Three combinational read ports return the W value of
// an address together with the r and k of its segment: the segment is the
// last one whose pos-ptr is not above the address. The storage format is the
// published one; the sizes (64 entries, 16 segments) and the load-bus
// interface are this design's own. Writes take effect at the clock edge.
module snap_w_rf
  import snap_pkg::*;
#(
  parameter int unsigned DEPTH = WRF_DEPTH,
  parameter int unsigned NS    = NSEG,
  parameter int unsigned NRD   = NMUL
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld_en,
  input  ld_word_t              ld,
  output logic [CIDX_W-1:0]     cidx   [DEPTH],
  output logic [LEN_W-1:0]      len,
  output logic [S_W-1:0]        s,
  input  logic [WA_W-1:0]       rd_addr [NRD],
  output logic signed [DW-1:0]  rd_data [NRD],
  output logic [R_W-1:0]        rd_r    [NRD],
  output logic [K_W-1:0]        rd_k    [NRD]
);

  logic signed [DW-1:0] data_q [DEPTH];
  logic [CIDX_W-1:0]    cidx_q [DEPTH];
  logic [LEN_W-1:0]     ptr_q  [NS];
  logic [R_W-1:0]       ridx_q [NS];
  logic [K_W-1:0]       kidx_q [NS];
  logic [LEN_W-1:0]     len_q;
  logic [SEG_W:0]       nseg_q;
  logic [S_W-1:0]       s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_q  <= '0;
      nseg_q <= '0;
      s_q    <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) begin
        data_q[i] <= '0;
        cidx_q[i] <= '0;
      end
      for (int unsigned j = 0; j < NS; j++) begin
        ptr_q[j]  <= '0;
        ridx_q[j] <= '0;
        kidx_q[j] <= '0;
      end
    end else if (ld_en) begin
      unique case (ld.kind)
        LD_W: begin
          data_q[ld.addr] <= ld.data;
          cidx_q[ld.addr] <= ld.cidx;
        end
        LD_WSEG: begin
          ptr_q[ld.addr[SEG_W-1:0]]  <= ld.len;
          ridx_q[ld.addr[SEG_W-1:0]] <= ld.r;
          kidx_q[ld.addr[SEG_W-1:0]] <= ld.k;
        end
        LD_WMETA: begin
          len_q  <= ld.len;
          nseg_q <= ld.k[SEG_W:0];
          s_q    <= ld.s;
        end
        default: ;
      endcase
    end
  end

  assign cidx = cidx_q;
  assign len  = len_q;
  assign s    = s_q;

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) begin
      rd_data[p] = data_q[rd_addr[p]];
      rd_r[p]    = ridx_q[0];
      rd_k[p]    = kidx_q[0];
      for (int unsigned j = 1; j < NS; j++) begin
        if ((SEG_W+1)'(j) < nseg_q && ptr_q[j] <= LEN_W'(rd_addr[p])) begin
          rd_r[p] = ridx_q[j];
          rd_k[p] = kidx_q[j];
        end
      end
    end
  end

endmodule
