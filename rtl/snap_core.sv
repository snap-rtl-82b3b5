// snap_core: one SNAP compute core.
//
// ROWS x COLS PEs (7 x 3 in the published chip, 63 multipliers), one AIM
// per PE row shared by the COLS PEs of that row, the configuration
// controller, the core reducer and an output arbiter. The published design
// gives this organisation.
//
// Operation: the host loads the PE register files through the load bus
// (one word per cycle, row and column masks select the PEs), writes the
// layer configuration, and pulses start. Every PE then runs its pass; the
// core reducer sums psums along the lanes of the configured mode, and the
// output arbiter (round robin over lanes, one psum per cycle, this design's
// own choice) sends them to the global accumulator with a valid/ready
// handshake. done rises when every PE has finished and no psum is left in
// the core; it falls at the next start.
module snap_core
  import snap_pkg::*;
#(
  parameter int unsigned ROWS       = 7,
  parameter int unsigned COLS       = 3,
  parameter int unsigned N          = AIM_N,
  parameter int unsigned PSUM_DEPTH = 8,
  localparam int unsigned NPE   = ROWS * COLS,
  localparam int unsigned NLANE = ROWS + COLS - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  core_cfg_t         cfg_in,
  input  logic              ld_valid,
  input  logic [ROWS-1:0]   ld_rowmask,
  input  logic [COLS-1:0]   ld_colmask,
  input  ld_word_t          ld_word,
  input  logic              start,
  output logic              done,
  output logic              out_valid,
  output psum_t             out,
  input  logic              out_ready,
  output logic [7:0]        mac_count     // multiplications this cycle
);

  core_cfg_t      cfg;
  logic [NPE-1:0] pe_ld_en;

  snap_cfg_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_in, .cfg,
    .ld_valid, .ld_rowmask, .ld_colmask, .pe_ld_en
  );

  // PE <-> AIM wiring, indexed by row and column.
  logic [COLS-1:0]   a_req      [ROWS];
  logic [CIDX_W-1:0] a_wcidx    [ROWS][COLS][N];
  logic [N-1:0]      a_wvalid   [ROWS][COLS];
  logic [CIDX_W-1:0] a_iacidx   [ROWS][COLS][N];
  logic [N-1:0]      a_iavalid  [ROWS][COLS];
  logic [COLS-1:0]   a_gnt      [ROWS];
  logic [COLS-1:0]   a_rsp      [ROWS];
  vpos_t             a_list     [ROWS][N];

  logic [NPE-1:0]    pe_done, pe_head_valid, pe_pop;
  psum_t             pe_head  [NPE];
  logic [1:0]        pe_macs  [NPE];

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    snap_aim #(.N(N), .NPE(COLS)) u_aim (
      .clk, .rst_n,
      .req(a_req[i]), .req_wcidx(a_wcidx[i]), .req_wvalid(a_wvalid[i]),
      .req_iacidx(a_iacidx[i]), .req_iavalid(a_iavalid[i]),
      .gnt(a_gnt[i]), .rsp_valid(a_rsp[i]), .rsp_list(a_list[i])
    );
    for (genvar j = 0; j < COLS; j++) begin : g_col
      snap_pe #(.N(N), .PSUM_DEPTH(PSUM_DEPTH)) u_pe (
        .clk, .rst_n,
        .ld_en(pe_ld_en[i*COLS+j]), .ld(ld_word),
        .oh(cfg.oh), .ow(cfg.ow),
        .start, .done(pe_done[i*COLS+j]),
        .aim_req(a_req[i][j]), .aim_wcidx(a_wcidx[i][j]), .aim_wvalid(a_wvalid[i][j]),
        .aim_iacidx(a_iacidx[i][j]), .aim_iavalid(a_iavalid[i][j]),
        .aim_gnt(a_gnt[i][j]), .aim_rsp_valid(a_rsp[i][j]), .aim_rsp_list(a_list[i]),
        .head_valid(pe_head_valid[i*COLS+j]), .head(pe_head[i*COLS+j]),
        .pop(pe_pop[i*COLS+j]), .mac_count(pe_macs[i*COLS+j])
      );
    end
  end

  logic [NLANE-1:0] lane_valid, lane_ready, lane_fire;
  psum_t            lane_out [NLANE];

  snap_core_reducer #(.ROWS(ROWS), .COLS(COLS)) u_red (
    .clk, .rst_n, .mode(cfg.mode),
    .pe_head_valid, .pe_head, .pe_done, .pe_pop,
    .lane_valid, .lane_out, .lane_ready, .lane_fire
  );

  // Output arbiter: round robin over the lanes.
  localparam int unsigned LW = $clog2(NLANE);
  logic [LW-1:0] rr_q, pick;
  logic          any;

  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int unsigned o = 1; o <= NLANE; o++) begin
      int unsigned l;
      l = (int'(rr_q) + o) % NLANE;
      if (!any && lane_valid[l]) begin
        any  = 1'b1;
        pick = LW'(l);
      end
    end
  end

  always_comb begin
    lane_ready = '0;
    if (any && out_ready) lane_ready[pick] = 1'b1;
  end

  assign out_valid = any;
  assign out       = lane_out[pick];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  rr_q <= LW'(NLANE - 1);
    else if (any && out_ready)   rr_q <= pick;
  end

  assign done = (&pe_done) && (pe_head_valid == '0) && (lane_valid == '0);

  always_comb begin
    mac_count = '0;
    for (int unsigned p = 0; p < NPE; p++) mac_count += 8'(pe_macs[p]);
  end

endmodule
