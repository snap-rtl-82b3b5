// snap_ia_oa_buffer: unified multi-banked IA/OA buffer.
//
// NBANK word-interleaved banks (bank = address mod NBANK), each a register
// array of ACC_W-bit words. Two ports:
//  * accumulation port (global accumulator): combinational read of acc_addr,
//    write of acc_wdata to the same address at the clock edge when acc_we;
//  * host port (loading, clearing and reading, also used by the compression
//    unit): h_req with h_we writes, without h_we reads, the read data
//    appearing on h_rdata one cycle after the request. h_gnt is low, and
//    the request must be held, when a host write meets an accumulation
//    write to the same bank.
// Sixteen banks are the published number; the depth, word width, port set
// and conflict rule are this design's own, and the banks are register
// arrays rather than SRAM macros.
module snap_ia_oa_buffer
  import snap_pkg::*;
#(
  parameter int unsigned NBANK = 16,
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = $clog2(NBANK),
  localparam int unsigned BD   = DEPTH / NBANK
) (
  input  logic                    clk,
  input  logic [AW-1:0]           acc_addr,
  output logic signed [ACC_W-1:0] acc_rdata,
  input  logic                    acc_we,
  input  logic signed [ACC_W-1:0] acc_wdata,
  input  logic                    h_req,
  input  logic                    h_we,
  input  logic [AW-1:0]           h_addr,
  input  logic signed [ACC_W-1:0] h_wdata,
  output logic                    h_gnt,
  output logic signed [ACC_W-1:0] h_rdata
);

  logic signed [ACC_W-1:0] bank_q [NBANK][BD];

  logic [BW-1:0]    acc_bank, h_bank;
  logic [AW-BW-1:0] acc_row,  h_row;
  assign acc_bank = acc_addr[BW-1:0];
  assign acc_row  = acc_addr[AW-1:BW];
  assign h_bank   = h_addr[BW-1:0];
  assign h_row    = h_addr[AW-1:BW];

  assign acc_rdata = bank_q[acc_bank][acc_row];
  assign h_gnt     = !(h_req && h_we && acc_we && (h_bank == acc_bank));

  always_ff @(posedge clk) begin
    if (acc_we) bank_q[acc_bank][acc_row] <= acc_wdata;
    if (h_req && h_we && h_gnt) bank_q[h_bank][h_row] <= h_wdata;
    if (h_req && !h_we) h_rdata <= bank_q[h_bank][h_row];
  end

endmodule
