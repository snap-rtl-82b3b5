// snap_pe: processing element with PE-level channel-dimension reduction.
//
// A PE holds one W bundle (W RF) and one IA bundle (IA RF). After start it
// walks the W bundle in 32-entry chunks: for each chunk it sends the chunk's
// c-idx array and the IA c-idx array to its row's AIM and stores the
// returned valid-position list in the sequence decoder. The list of the next
// chunk is requested as soon as a decoder slot is free (prefetch). Each
// cycle the decoder dispatches up to three W-IA pairs.
//
// Pipeline (this design's own): stage 1 registers the three pairs' operands
// and indices read from the RFs; stage 2 multiplies, lets the address path
// choose the Table I pattern, adds Out[0] to the last written psum when their
// keys agree, and writes the psums that can no longer grow into the OA psum
// RF. The last written psum stays open in a register until a psum with a
// different key arrives or the pass ends. Both stages stall together while
// the OA psum RF lacks room for three psums.
//
// Interface: the load bus writes the RFs while the PE is idle or done.
// start begins a pass; done stays high from the end of the pass until the
// next start. The OA psum RF head goes to the core reducer, which pops it.
module snap_pe
  import snap_pkg::*;
#(
  parameter int unsigned N          = AIM_N,
  parameter int unsigned PSUM_DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // RF load bus
  input  logic                  ld_en,
  input  ld_word_t              ld,
  // layer configuration
  input  logic [HW_W-1:0]       oh,
  input  logic [HW_W-1:0]       ow,
  // pass control
  input  logic                  start,
  output logic                  done,
  // AIM request / response
  output logic                  aim_req,
  output logic [CIDX_W-1:0]     aim_wcidx  [N],
  output logic [N-1:0]          aim_wvalid,
  output logic [CIDX_W-1:0]     aim_iacidx [N],
  output logic [N-1:0]          aim_iavalid,
  input  logic                  aim_gnt,
  input  logic                  aim_rsp_valid,
  input  vpos_t                 aim_rsp_list [N],
  // psums to the core reducer
  output logic                  head_valid,
  output psum_t                 head,
  input  logic                  pop,
  // activity, for performance counting
  output logic [1:0]            mac_count
);

  localparam int unsigned NCHUNK = WRF_DEPTH / N;
  localparam int unsigned CW     = $clog2(NCHUNK + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DONE} pe_state_e;
  pe_state_e state_q;

  // ---------------- register files ----------------
  logic [CIDX_W-1:0]    w_cidx  [WRF_DEPTH];
  logic [LEN_W-1:0]     w_len;
  logic [S_W-1:0]       w_s;
  logic [WA_W-1:0]      w_rd_addr [NMUL];
  logic signed [DW-1:0] w_rd_data [NMUL];
  logic [R_W-1:0]       w_rd_r    [NMUL];
  logic [K_W-1:0]       w_rd_k    [NMUL];

  logic [CIDX_W-1:0]    ia_cidx [IARF_DEPTH];
  logic [LEN_W-1:0]     ia_len;
  logic [HW_W-1:0]      ia_h, ia_w;
  logic [POS_W-1:0]     ia_rd_addr [NMUL];
  logic signed [DW-1:0] ia_rd_data [NMUL];

  snap_w_rf u_wrf (
    .clk, .rst_n, .ld_en, .ld,
    .cidx(w_cidx), .len(w_len), .s(w_s),
    .rd_addr(w_rd_addr), .rd_data(w_rd_data), .rd_r(w_rd_r), .rd_k(w_rd_k)
  );

  snap_ia_rf u_iarf (
    .clk, .rst_n, .ld_en, .ld,
    .cidx(ia_cidx), .len(ia_len), .h(ia_h), .w(ia_w),
    .rd_addr(ia_rd_addr), .rd_data(ia_rd_data)
  );

  // ---------------- list requests (with prefetch) ----------------
  logic [CW-1:0] nchunk, req_chunk_q, rsp_chunk_q;
  logic          outstanding_q;
  logic [1:0]    slots_free;

  assign nchunk = CW'((int'(w_len) + int'(N) - 1) / int'(N));

  assign aim_req = (state_q == S_RUN) && (req_chunk_q < nchunk) &&
                   !outstanding_q && (slots_free != 2'd0);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned e;
      e              = int'(req_chunk_q) * N + i;
      aim_wcidx[i]   = w_cidx[e % WRF_DEPTH];
      aim_wvalid[i]  = (e < int'(w_len));
      aim_iacidx[i]  = ia_cidx[i];
      aim_iavalid[i] = (i < int'(ia_len));
    end
  end

  // ---------------- sequence decoder ----------------
  logic [NMUL-1:0]  dec_valid;
  logic [WA_W-1:0]  dec_waddr  [NMUL];
  logic [POS_W-1:0] dec_iaaddr [NMUL];
  logic             dec_empty;
  logic             dec_pop;
  logic             stall;

  snap_seq_decoder u_dec (
    .clk, .rst_n,
    .clear(start),
    .load(aim_rsp_valid),
    .load_list(aim_rsp_list),
    .load_base(WA_W'(int'(rsp_chunk_q) * N)),
    .slots_free,
    .pop(dec_pop),
    .out_valid(dec_valid),
    .out_waddr(dec_waddr),
    .out_iaaddr(dec_iaaddr),
    .empty(dec_empty)
  );

  assign w_rd_addr  = dec_waddr;
  assign ia_rd_addr = dec_iaaddr;
  assign dec_pop    = (state_q == S_RUN) && !stall && (dec_valid != '0);

  // ---------------- stage 1: operands ----------------
  logic [NMUL-1:0]      s1_valid_q;
  logic signed [DW-1:0] s1_w_q  [NMUL];
  logic signed [DW-1:0] s1_ia_q [NMUL];
  logic [R_W-1:0]       s1_r_q  [NMUL];
  logic [K_W-1:0]       s1_k_q  [NMUL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid_q <= '0;
      for (int unsigned l = 0; l < NMUL; l++) begin
        s1_w_q[l] <= '0; s1_ia_q[l] <= '0; s1_r_q[l] <= '0; s1_k_q[l] <= '0;
      end
    end else if (start) begin
      s1_valid_q <= '0;
    end else if (!stall) begin
      s1_valid_q <= dec_pop ? dec_valid : '0;
      for (int unsigned l = 0; l < NMUL; l++) begin
        s1_w_q[l]  <= dec_valid[l] ? w_rd_data[l]  : '0;
        s1_ia_q[l] <= dec_valid[l] ? ia_rd_data[l] : '0;
        s1_r_q[l]  <= w_rd_r[l];
        s1_k_q[l]  <= w_rd_k[l];
      end
    end
  end

  // ---------------- stage 2: multiply and reduce ----------------
  red_pat_e               pat;
  logic [NMUL-1:0]        o_valid;
  logic [KEY_W-1:0]       o_key     [NMUL];
  logic [OA_AW-1:0]       o_addr    [NMUL];
  logic                   o_inrange [NMUL];
  logic signed [ACC_W-1:0] o_val    [NMUL];

  psum_t last_q;
  logic  last_valid_q;
  logic  add_last;

  snap_addr_path u_addr (
    .valid(s1_valid_q), .h(ia_h), .w(ia_w), .s(w_s), .r(s1_r_q), .k(s1_k_q),
    .oh, .ow, .pat, .out_valid(o_valid), .out_key(o_key), .out_addr(o_addr),
    .out_inrange(o_inrange)
  );

  assign add_last = last_valid_q && o_valid[0] && (o_key[0] == last_q.key);

  snap_compute_path u_comp (
    .w(s1_w_q), .ia(s1_ia_q), .pat, .add_last, .last_val(last_q.val), .out(o_val)
  );

  // Psums closed this cycle, packed from lane 0, and the new open psum.
  logic [NMUL-1:0] push;
  psum_t           push_data [NMUL];
  logic            new_last_valid;
  psum_t           new_last;
  logic            rf_space;

  psum_t cand [NMUL];
  always_comb
    for (int unsigned n = 0; n < NMUL; n++) begin
      cand[n].inrange = o_inrange[n];
      cand[n].key     = o_key[n];
      cand[n].addr    = o_addr[n];
      cand[n].val     = o_val[n];
    end

  always_comb begin
    int unsigned np;
    int          top;
    np             = 0;
    push           = '0;
    for (int unsigned l = 0; l < NMUL; l++) push_data[l] = '0;
    new_last_valid = last_valid_q;
    new_last       = last_q;
    top            = -1;
    for (int unsigned n = 0; n < NMUL; n++) if (o_valid[n]) top = n;

    if (state_q == S_RUN && s1_valid_q != '0) begin
      if (last_valid_q && !add_last) begin
        push[np] = 1'b1; push_data[np] = last_q; np++;
      end
      for (int n = 0; n < int'(NMUL); n++) begin
        if (o_valid[n]) begin
          if (n == top) begin
            new_last_valid = 1'b1;
            new_last       = cand[n];
          end else begin
            push[np] = 1'b1; push_data[np] = cand[n]; np++;
          end
        end
      end
    end else if (state_q == S_FLUSH && last_valid_q) begin
      push[0]        = 1'b1;
      push_data[0]   = last_q;
      new_last_valid = 1'b0;
    end
  end

  assign stall = !rf_space;

  snap_oa_psum_rf #(.DEPTH(PSUM_DEPTH)) u_psum_rf (
    .clk, .rst_n,
    .push(stall ? '0 : push), .push_data,
    .space(rf_space), .head_valid, .head, .pop
  );

  // ---------------- control ----------------
  logic pass_drained;
  assign pass_drained = (req_chunk_q == nchunk) && !outstanding_q && dec_empty &&
                        (s1_valid_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      req_chunk_q   <= '0;
      rsp_chunk_q   <= '0;
      outstanding_q <= 1'b0;
      last_valid_q  <= 1'b0;
      last_q        <= '0;
    end else if (start) begin
      state_q       <= S_RUN;
      req_chunk_q   <= '0;
      outstanding_q <= 1'b0;
      last_valid_q  <= 1'b0;
    end else begin
      if (aim_req && aim_gnt) begin
        req_chunk_q   <= req_chunk_q + 1'b1;
        rsp_chunk_q   <= req_chunk_q;
        outstanding_q <= 1'b1;
      end else if (aim_rsp_valid) begin
        outstanding_q <= 1'b0;
      end
      if (!stall) begin
        last_valid_q <= new_last_valid;
        last_q       <= new_last;
      end
      unique case (state_q)
        S_RUN:   if (pass_drained) state_q <= S_FLUSH;
        S_FLUSH: if (!stall) state_q <= S_DONE;
        default: ;
      endcase
    end
  end

  assign done = (state_q == S_DONE);

  always_comb begin
    mac_count = '0;
    if (state_q == S_RUN && !stall)
      for (int unsigned l = 0; l < NMUL; l++) mac_count += 2'(s1_valid_q[l]);
  end

  // The AIM answers only a granted request.
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   aim_rsp_valid |-> outstanding_q)
    else $error("AIM response without request");

endmodule
