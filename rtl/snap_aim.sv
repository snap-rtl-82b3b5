// snap_aim: associative index matching (AIM) unit, shared by NPE PEs.
//
// An N x N comparator array compares every W channel index of a chunk with
// every IA channel index of an IA bundle. Each row (one W entry) drives a
// priority encoder that reports whether the row matched and at which IA
// position; the N (valid, position) pairs form the valid-position list a PE
// dispatches from. This structure follows the published design.
//
// Sharing: NPE PEs raise req together with their c-idx arrays. A round-robin
// arbiter grants one per cycle (gnt is combinational), the comparison runs in
// that cycle and the list is registered, so rsp_valid[p] and rsp_list appear
// one cycle after gnt[p]. The arbiter and the one-cycle latency are this
// design's own choices. An IA position matches only where req_iavalid is set,
// a W row only where req_wvalid is set; the lowest matching IA position wins.
module snap_aim
  import snap_pkg::*;
#(
  parameter int unsigned N   = AIM_N,
  parameter int unsigned NPE = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NPE-1:0]         req,
  input  logic [CIDX_W-1:0]      req_wcidx  [NPE][N],
  input  logic [N-1:0]           req_wvalid [NPE],
  input  logic [CIDX_W-1:0]      req_iacidx [NPE][N],
  input  logic [N-1:0]           req_iavalid[NPE],
  output logic [NPE-1:0]         gnt,
  output logic [NPE-1:0]         rsp_valid,
  output vpos_t                  rsp_list [N]
);

  localparam int unsigned PW = (NPE > 1) ? $clog2(NPE) : 1;

  logic [PW-1:0] rr_q;          // requester served last
  logic [PW-1:0] sel;
  logic          any;

  // Round-robin choice, starting after the last served requester.
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int unsigned o = 1; o <= NPE; o++) begin
      int unsigned p;
      p = (int'(rr_q) + o) % NPE;
      if (!any && req[p]) begin
        any = 1'b1;
        sel = PW'(p);
      end
    end
    gnt = '0;
    if (any) gnt[sel] = 1'b1;
  end

  // Comparator array and one priority encoder per row.
  logic [N-1:0] match [N];
  vpos_t        list_d [N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        match[i][j] = req_wvalid[sel][i] && req_iavalid[sel][j] &&
                      (req_wcidx[sel][i] == req_iacidx[sel][j]);
      end
    end
    for (int unsigned i = 0; i < N; i++) begin
      list_d[i] = '0;
      for (int j = int'(N) - 1; j >= 0; j--) begin
        if (match[i][j]) begin
          list_d[i].valid = 1'b1;
          list_d[i].pos   = POS_W'(j);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q      <= PW'(NPE - 1);
      rsp_valid <= '0;
      for (int unsigned i = 0; i < N; i++) rsp_list[i] <= '0;
    end else begin
      rsp_valid <= gnt;
      if (any) begin
        rr_q <= sel;
        for (int unsigned i = 0; i < N; i++) rsp_list[i] <= list_d[i];
      end
    end
  end

endmodule
