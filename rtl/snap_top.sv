// snap_top: SNAP sparse neural acceleration processor.
//
// NCORE compute cores (four in the published chip, each 7 x 3 PEs with
// three 16-bit multipliers per PE, 252 multipliers in all), the global
// accumulator, the unified IA/OA buffer and the OA compression unit.
//
// Data movement into the cores (the dispatcher and W buffers) is not part
// of this RTL: each core's RF load bus is a port. A pass is:
//   1. write the layer configuration (cfg_we, cfg_in; goes to all cores);
//   2. load W and IA bundles into the PE register files over ld_*;
//   3. pulse start; done rises once every core has finished and all its
//      psums have been added into the OA buffer.
// Passes accumulate into the OA buffer, which the host clears or reads over
// the h_* port. comp_start then runs the compression unit over the output
// map (k_num kernels); it owns the buffer's host port while comp_busy is
// high, and its compressed stream leaves on c_*. mac_count reports the
// multiplications performed in the current cycle.
module snap_top
  import snap_pkg::*;
#(
  parameter int unsigned NCORE      = 4,
  parameter int unsigned ROWS       = 7,
  parameter int unsigned COLS       = 3,
  parameter int unsigned N          = AIM_N,
  parameter int unsigned PSUM_DEPTH = 8,
  parameter int unsigned NBANK      = 16,
  parameter int unsigned OA_DEPTH   = 8192,
  localparam int unsigned AW        = $clog2(OA_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic                    cfg_we,
  input  core_cfg_t               cfg_in,
  // RF load buses, one per core
  input  logic [NCORE-1:0]        ld_valid,
  input  logic [ROWS-1:0]         ld_rowmask [NCORE],
  input  logic [COLS-1:0]         ld_colmask [NCORE],
  input  ld_word_t                ld_word    [NCORE],
  // pass control
  input  logic                    start,
  output logic                    done,
  // OA buffer host port
  input  logic                    h_req,
  input  logic                    h_we,
  input  logic [AW-1:0]           h_addr,
  input  logic signed [ACC_W-1:0] h_wdata,
  output logic                    h_gnt,
  output logic signed [ACC_W-1:0] h_rdata,
  // compression
  input  logic                    comp_start,
  input  logic [K_W-1:0]          comp_k_num,
  input  logic                    comp_relu,
  input  logic [4:0]              comp_shift,
  output logic                    comp_busy,
  output logic                    c_valid,
  output logic signed [DW-1:0]    c_data,
  output logic [CIDX_W-1:0]       c_cidx,
  output logic                    c_last,
  output logic                    c_empty,
  input  logic                    c_ready,
  // activity
  output logic [9:0]              mac_count
);

  core_cfg_t cfg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg_q <= '{mode: MODE_DIAG, oh: '0, ow: '0};
    else if (cfg_we) cfg_q <= cfg_in;
  end

  logic [NCORE-1:0] core_done, core_valid, core_ready;
  psum_t            core_out [NCORE];
  logic [7:0]       core_macs [NCORE];

  for (genvar c = 0; c < NCORE; c++) begin : g_core
    snap_core #(.ROWS(ROWS), .COLS(COLS), .N(N), .PSUM_DEPTH(PSUM_DEPTH)) u_core (
      .clk, .rst_n, .cfg_we, .cfg_in,
      .ld_valid(ld_valid[c]), .ld_rowmask(ld_rowmask[c]), .ld_colmask(ld_colmask[c]),
      .ld_word(ld_word[c]),
      .start, .done(core_done[c]),
      .out_valid(core_valid[c]), .out(core_out[c]), .out_ready(core_ready[c]),
      .mac_count(core_macs[c])
    );
  end

  logic [AW-1:0]           acc_addr;
  logic signed [ACC_W-1:0] acc_rdata, acc_wdata;
  logic                    acc_we, acc_fire, drop_fire;

  snap_global_acc #(.NCORE(NCORE), .DEPTH(OA_DEPTH)) u_gacc (
    .clk, .rst_n,
    .in_valid(core_valid), .in_psum(core_out), .in_ready(core_ready),
    .mem_addr(acc_addr), .mem_rdata(acc_rdata), .mem_we(acc_we), .mem_wdata(acc_wdata),
    .acc_fire, .drop_fire
  );

  // Host port shared by the host and the compression unit.
  logic                    m_req, b_req, b_we, b_gnt;
  logic [AW-1:0]           m_addr, b_addr;
  logic signed [ACC_W-1:0] b_rdata;

  assign b_req  = comp_busy ? m_req  : h_req;
  assign b_we   = comp_busy ? 1'b0   : h_we;
  assign b_addr = comp_busy ? m_addr : h_addr;
  assign h_gnt  = !comp_busy && b_gnt;
  assign h_rdata = b_rdata;

  snap_ia_oa_buffer #(.NBANK(NBANK), .DEPTH(OA_DEPTH)) u_buf (
    .clk,
    .acc_addr, .acc_rdata, .acc_we, .acc_wdata,
    .h_req(b_req), .h_we(b_we), .h_addr(b_addr), .h_wdata, .h_gnt(b_gnt), .h_rdata(b_rdata)
  );

  snap_compress #(.DEPTH(OA_DEPTH)) u_comp (
    .clk, .rst_n, .start(comp_start),
    .oh(cfg_q.oh), .ow(cfg_q.ow), .k_num(comp_k_num), .relu(comp_relu), .shift(comp_shift),
    .busy(comp_busy),
    .m_req, .m_addr, .m_gnt(b_gnt), .m_rdata(b_rdata),
    .o_valid(c_valid), .o_data(c_data), .o_cidx(c_cidx), .o_last(c_last), .o_empty(c_empty),
    .o_ready(c_ready)
  );

  assign done = (&core_done) && (core_valid == '0);

  always_comb begin
    mac_count = '0;
    for (int unsigned c = 0; c < NCORE; c++) mac_count += 10'(core_macs[c]);
  end

endmodule
