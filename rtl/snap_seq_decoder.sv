// snap_seq_decoder: sequence decoder of a PE.
//
// Turns valid-position lists from the AIM into W-IA data addresses. A list
// is stored as a Valid RF (one bit per W entry of the chunk) and a Pos RF
// (the matching IA position). Each cycle a three-way priority encoder finds
// the first three set valid bits: their list indices plus the chunk's base
// give the W RF addresses, their stored positions give the IA RF addresses.
// When pop is asserted the three are invalidated, and once a list has no
// valid bit left the next one is used. This follows the published design.
//
// Prefetch: two list slots, so the PE can request the next chunk's list
// while the current one is being dispatched; the number of slots is this
// design's own choice. A list without any valid bit is not stored at all.
// Lane 0 (multiplier A) carries the lowest W address, lane 2 the highest.
// Outputs are combinational from the slot registers; load and pop take
// effect at the next clock edge.
module snap_seq_decoder
  import snap_pkg::*;
#(
  parameter int unsigned N    = AIM_N,
  parameter int unsigned WAW  = WA_W,
  parameter int unsigned WAYS = NMUL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,      // drop both lists
  input  logic                 load,
  input  vpos_t                load_list [N],
  input  logic [WAW-1:0]       load_base,
  output logic [1:0]           slots_free,
  input  logic                 pop,
  output logic [WAYS-1:0]      out_valid,
  output logic [WAW-1:0]       out_waddr  [WAYS],
  output logic [POS_W-1:0]     out_iaaddr [WAYS],
  output logic                 empty
);

  logic [N-1:0]     vld_q  [2];
  logic [POS_W-1:0] pos_q  [2][N];
  logic [WAW-1:0]   base_q [2];
  logic [1:0]       busy_q;
  logic             head_q;

  logic [N-1:0] load_vld;
  always_comb
    for (int unsigned i = 0; i < N; i++) load_vld[i] = load_list[i].valid;

  // Three-way priority encoder over the head slot.
  logic [N-1:0] pick;
  always_comb begin
    int unsigned n;
    n         = 0;
    pick      = '0;
    out_valid = '0;
    for (int unsigned l = 0; l < WAYS; l++) begin
      out_waddr[l]  = '0;
      out_iaaddr[l] = '0;
    end
    if (busy_q[head_q]) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (vld_q[head_q][i] && n < WAYS) begin
          pick[i]       = 1'b1;
          out_valid[n]  = 1'b1;
          out_waddr[n]  = base_q[head_q] + WAW'(i);
          out_iaaddr[n] = pos_q[head_q][i];
          n++;
        end
      end
    end
  end

  assign empty      = (busy_q == 2'b00);
  assign slots_free = 2'(!busy_q[0]) + 2'(!busy_q[1]);

  // Slot a new list goes to: the one after the head if the head is busy.
  logic tail;
  assign tail = busy_q[head_q] ? !head_q : head_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      head_q <= 1'b0;
      for (int s = 0; s < 2; s++) begin
        vld_q[s]  <= '0;
        base_q[s] <= '0;
        for (int unsigned i = 0; i < N; i++) pos_q[s][i] <= '0;
      end
    end else if (clear) begin
      busy_q <= '0;
      head_q <= 1'b0;
      vld_q[0] <= '0;
      vld_q[1] <= '0;
    end else begin
      if (pop && busy_q[head_q]) begin
        vld_q[head_q] <= vld_q[head_q] & ~pick;
        if ((vld_q[head_q] & ~pick) == '0) begin
          busy_q[head_q] <= 1'b0;
          head_q         <= !head_q;
        end
      end
      if (load && load_vld != '0 && !busy_q[tail]) begin
        vld_q[tail]  <= load_vld;
        base_q[tail] <= load_base;
        busy_q[tail] <= 1'b1;
        for (int unsigned i = 0; i < N; i++) pos_q[tail][i] <= load_list[i].pos;
        // An idle decoder keeps its head on the slot just filled.
        if (!busy_q[head_q]) head_q <= tail;
      end
    end
  end

endmodule
