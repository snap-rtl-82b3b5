// snap_global_acc: global accumulator.
//
// Collects the psums leaving the NCORE cores and adds each into the OA
// buffer word at its address (read-accumulate-write), which merges psums of
// the same OA coming from several cores, from several passes and from the
// edge lanes of the diagonal reduction. One psum is accepted per cycle,
// chosen round robin among the cores (valid/ready). The read is
// combinational on the buffer's accumulation port and the sum is written at
// the same clock edge, so back-to-back psums to one address need no
// forwarding. Psums whose OA index fell outside the output map, or whose
// address is beyond the buffer, are accepted and dropped. The published
// design names this unit and its purpose; the arbitration and single-cycle
// read-accumulate-write are this design's own.
module snap_global_acc
  import snap_pkg::*;
#(
  parameter int unsigned NCORE = 4,
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NCORE-1:0]        in_valid,
  input  psum_t                   in_psum [NCORE],
  output logic [NCORE-1:0]        in_ready,
  output logic [AW-1:0]           mem_addr,
  input  logic signed [ACC_W-1:0] mem_rdata,
  output logic                    mem_we,
  output logic signed [ACC_W-1:0] mem_wdata,
  output logic                    acc_fire,   // a psum was accumulated
  output logic                    drop_fire   // a psum was dropped
);

  localparam int unsigned CW = (NCORE > 1) ? $clog2(NCORE) : 1;
  logic [CW-1:0] rr_q, pick;
  logic          any;

  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int unsigned o = 1; o <= NCORE; o++) begin
      int unsigned c;
      c = (int'(rr_q) + o) % NCORE;
      if (!any && in_valid[c]) begin
        any  = 1'b1;
        pick = CW'(c);
      end
    end
    in_ready = '0;
    if (any) in_ready[pick] = 1'b1;
  end

  psum_t p;
  logic  keep;
  assign p         = in_psum[pick];
  assign keep      = p.inrange && (p.addr < OA_AW'(DEPTH));
  assign mem_addr  = AW'(p.addr);
  assign mem_we    = any && keep;
  assign mem_wdata = mem_rdata + p.val;
  assign acc_fire  = mem_we;
  assign drop_fire = any && !keep;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   rr_q <= CW'(NCORE - 1);
    else if (any) rr_q <= pick;
  end

endmodule
