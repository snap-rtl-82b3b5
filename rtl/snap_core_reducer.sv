// snap_core_reducer: core-level (pixel-dimension) psum reduction.
//
// The PEs of a core are grouped into reduction lanes. In diagonal mode
// (general R x S CONV) PE(i, j) belongs to lane i - j + COLS - 1, so that
// the PEs which received IA pixel w0+i and W column s=j, and therefore
// produce psums of the same OA column w0+i-j, are summed; there are
// ROWS + COLS - 1 lanes. In row mode (pointwise CONV and FC) lane i is PE
// row i. Lane grouping follows the published design.
//
// Alignment (this design's own): every PE of a lane walks the same (r, k)
// segments in the same order but may produce nothing for a segment. A lane
// therefore waits until each member PE has a psum at its head or has
// finished its pass, then adds all head psums carrying the smallest key
// {k, r}, pops them and stores the sum in the lane's output register. The
// wait is what stalls the faster PEs of a lane. A lane output is held until
// lane_ready; a new sum can enter in the cycle the old one leaves.
module snap_core_reducer
  import snap_pkg::*;
#(
  parameter int unsigned ROWS = 7,
  parameter int unsigned COLS = 3,
  localparam int unsigned NPE   = ROWS * COLS,
  localparam int unsigned NLANE = ROWS + COLS - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  red_mode_e         mode,
  input  logic [NPE-1:0]    pe_head_valid,
  input  psum_t             pe_head [NPE],
  input  logic [NPE-1:0]    pe_done,
  output logic [NPE-1:0]    pe_pop,
  output logic [NLANE-1:0]  lane_valid,
  output psum_t             lane_out [NLANE],
  input  logic [NLANE-1:0]  lane_ready,
  output logic [NLANE-1:0]  lane_fire     // a reduction happened this cycle
);

  // Lane membership of PE p = i*COLS + j.
  function automatic int unsigned lane_of(red_mode_e m, int unsigned p);
    int unsigned i, j;
    i = p / COLS;
    j = p % COLS;
    return (m == MODE_DIAG) ? (i + COLS - 1 - j) : i;
  endfunction

  logic [NLANE-1:0] can_take;
  assign can_take = ~lane_valid | lane_ready;

  psum_t sum_d [NLANE];

  always_comb begin
    pe_pop    = '0;
    lane_fire = '0;
    for (int unsigned l = 0; l < NLANE; l++) begin
      logic             ready_all, any;
      logic [KEY_W-1:0] mink;
      psum_t            s;
      ready_all = 1'b1;
      any       = 1'b0;
      mink      = '0;
      s         = '0;
      for (int unsigned p = 0; p < NPE; p++) begin
        if (lane_of(mode, p) == l) begin
          if (!pe_head_valid[p] && !pe_done[p]) ready_all = 1'b0;
          if (pe_head_valid[p] && (!any || pe_head[p].key < mink)) begin
            mink = pe_head[p].key;
            s    = pe_head[p];
            any  = 1'b1;
          end
        end
      end
      s.val = '0;
      if (ready_all && any && can_take[l]) begin
        lane_fire[l] = 1'b1;
        for (int unsigned p = 0; p < NPE; p++) begin
          if (lane_of(mode, p) == l && pe_head_valid[p] && pe_head[p].key == mink) begin
            pe_pop[p] = 1'b1;
            s.val     = s.val + pe_head[p].val;
          end
        end
      end
      sum_d[l] = s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_valid <= '0;
      for (int unsigned l = 0; l < NLANE; l++) lane_out[l] <= '0;
    end else begin
      for (int unsigned l = 0; l < NLANE; l++) begin
        if (lane_fire[l]) begin
          lane_valid[l] <= 1'b1;
          lane_out[l]   <= sum_d[l];
        end else if (lane_ready[l]) begin
          lane_valid[l] <= 1'b0;
        end
      end
    end
  end

endmodule
