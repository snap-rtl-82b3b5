// snap_oa_psum_rf: OA psum register file of a PE.
//
// A first-in first-out store of channel-reduced psums that wait for the
// core reducer. Up to NW psums are written per cycle (the valid push lanes
// must be packed from lane 0) and one is read per cycle from the head. The
// space output says that NW more psums fit, which is the condition the PE
// uses to let its pipeline advance. The published design names this RF;
// its depth and FIFO organisation are this design's own. Head outputs are
// combinational from the registers; pushes and pops take effect at the edge.
module snap_oa_psum_rf
  import snap_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NW    = NMUL
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NW-1:0]    push,
  input  psum_t            push_data [NW],
  output logic             space,
  output logic             head_valid,
  output psum_t            head,
  input  logic             pop
);

  localparam int unsigned AW = $clog2(DEPTH);

  psum_t           mem_q [DEPTH];
  logic [AW-1:0]   rd_q, wr_q;
  logic [AW:0]     cnt_q;

  assign head_valid = (cnt_q != 0);
  assign head       = mem_q[rd_q];
  assign space      = (int'(cnt_q) + int'(NW) <= int'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      int unsigned npush;
      logic        do_pop;
      npush  = 0;
      do_pop = pop && head_valid;
      for (int unsigned l = 0; l < NW; l++) begin
        if (push[l]) begin
          mem_q[AW'((int'(wr_q) + l) % DEPTH)] <= push_data[l];
          npush++;
        end
      end
      wr_q  <= AW'((int'(wr_q) + npush) % DEPTH);
      rd_q  <= do_pop ? AW'((int'(rd_q) + 1) % DEPTH) : rd_q;
      cnt_q <= cnt_q + (AW+1)'(npush) - (AW+1)'(do_pop);
    end
  end

  // Pushing beyond the free space would overwrite unread psums.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (push == '0) || space)
    else $error("OA psum RF overflow");

endmodule
