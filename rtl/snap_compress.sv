// snap_compress: OA compression before writeback.
//
// After a layer, walks the output map pixel by pixel ((x, y) row-major) and,
// for each pixel, kernels k = 0 .. k_num-1. Each OA word is read from the
// OA buffer's host port at address (k*OH + x)*OW + y, optionally passed
// through ReLU, shifted right arithmetically by shift and saturated to 16
// bits. Nonzero results leave as (data, channel index k) words, which is
// the compressed IA bundle format of the next layer; o_last marks the last
// word of a pixel. A pixel with no nonzero OA is sent as one word with
// o_empty set, so that pixel boundaries are kept. The output handshake is
// valid/ready. One OA takes three cycles (read, data, emit). Compressing the
// output is the published design's; the activation, rounding and stream
// format are this design's own. busy is high from start until the last word
// has been taken.
module snap_compress
  import snap_pkg::*;
#(
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [HW_W-1:0]         oh,
  input  logic [HW_W-1:0]         ow,
  input  logic [K_W-1:0]          k_num,
  input  logic                    relu,
  input  logic [4:0]              shift,
  output logic                    busy,
  // OA buffer host port
  output logic                    m_req,
  output logic [AW-1:0]           m_addr,
  input  logic                    m_gnt,
  input  logic signed [ACC_W-1:0] m_rdata,
  // compressed stream
  output logic                    o_valid,
  output logic signed [DW-1:0]    o_data,
  output logic [CIDX_W-1:0]       o_cidx,
  output logic                    o_last,
  output logic                    o_empty,
  input  logic                    o_ready
);

  typedef enum logic [1:0] {C_IDLE, C_READ, C_DATA, C_EMIT} cst_e;
  cst_e state_q;

  logic [HW_W-1:0] x_q, y_q;
  logic [K_W-1:0]  k_q;
  logic            any_q;          // a nonzero OA was sent for this pixel

  logic signed [DW-1:0] v_q;
  logic                 emit_q;    // current word is sent

  logic last_k, last_pix;
  assign last_k   = (k_q == k_num - 1'b1);
  assign last_pix = (x_q == oh - 1'b1) && (y_q == ow - 1'b1);

  assign m_req  = (state_q == C_READ);
  assign m_addr = AW'((OA_AW'(k_q) * OA_AW'(oh) + OA_AW'(x_q)) * OA_AW'(ow) + OA_AW'(y_q));
  assign busy   = (state_q != C_IDLE);

  // Activation, shift and saturation.
  logic signed [ACC_W-1:0] act, shd;
  logic signed [DW-1:0]    sat;
  always_comb begin
    act = (relu && m_rdata < 0) ? '0 : m_rdata;
    shd = act >>> shift;
    if (shd > ACC_W'(32767))       sat = 16'sh7fff;
    else if (shd < -ACC_W'(32768)) sat = -16'sh8000;
    else                           sat = DW'(shd);
  end

  assign o_valid = (state_q == C_EMIT) && emit_q;
  assign o_data  = v_q;
  assign o_cidx  = CIDX_W'(k_q);
  assign o_last  = last_k;
  assign o_empty = (v_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_IDLE;
      x_q <= '0; y_q <= '0; k_q <= '0;
      any_q <= 1'b0; v_q <= '0; emit_q <= 1'b0;
    end else begin
      unique case (state_q)
        C_IDLE: if (start && oh != 0 && ow != 0 && k_num != 0) begin
          x_q <= '0; y_q <= '0; k_q <= '0; any_q <= 1'b0;
          state_q <= C_READ;
        end
        C_READ: if (m_gnt) state_q <= C_DATA;
        C_DATA: begin
          v_q     <= sat;
          emit_q  <= (sat != 0) || (last_k && !any_q);
          state_q <= C_EMIT;
        end
        C_EMIT: if (!emit_q || o_ready) begin
          any_q <= (any_q || emit_q) && !last_k;
          if (!last_k) begin
            k_q     <= k_q + 1'b1;
            state_q <= C_READ;
          end else begin
            k_q <= '0;
            if (last_pix) state_q <= C_IDLE;
            else begin
              state_q <= C_READ;
              if (y_q == ow - 1'b1) begin
                y_q <= '0;
                x_q <= x_q + 1'b1;
              end else y_q <= y_q + 1'b1;
            end
          end
        end
      endcase
    end
  end

endmodule
