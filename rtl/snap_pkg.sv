// snap_pkg: types and constants shared by the SNAP sparse DNN accelerator.
//
// Operand and accumulator widths, the fixed AIM size, the psum record that
// travels from a PE to the OA buffer, the valid-position pair produced by
// the associative index matcher, the word format of the RF load bus and the
// layer configuration of a core. 16-bit fixed-point operands and a 32-entry
// AIM follow the published design; all index widths and the 32-bit
// accumulator are this design's own choices.
package snap_pkg;

  // Operand width (16-bit fixed point) and accumulator width.
  localparam int unsigned DW     = 16;
  localparam int unsigned ACC_W  = 32;

  // Associative index matching: N x N comparator array, N = 32.
  localparam int unsigned AIM_N  = 32;
  localparam int unsigned POS_W  = $clog2(AIM_N);

  // Index widths of the compressed format.
  localparam int unsigned CIDX_W = 12;  // channel index
  localparam int unsigned R_W    = 4;   // kernel row index r
  localparam int unsigned S_W    = 4;   // kernel column index s
  localparam int unsigned K_W    = 12;  // kernel (output channel) index k
  localparam int unsigned HW_W   = 8;   // IA / OA pixel coordinates h, w, x, y
  localparam int unsigned OA_AW  = 20;  // 1-D OA address carried with a psum

  // W RF and IA RF sizes of a PE.
  localparam int unsigned WRF_DEPTH = 64;          // two AIM chunks
  localparam int unsigned WA_W      = $clog2(WRF_DEPTH);
  localparam int unsigned NSEG      = 16;          // pos-ptr segments per W bundle
  localparam int unsigned SEG_W     = $clog2(NSEG);
  localparam int unsigned IARF_DEPTH = AIM_N;
  localparam int unsigned LEN_W     = WA_W + 1;    // holds 0..WRF_DEPTH

  // Order key of a psum within a pass: the (k, r) segment it belongs to.
  localparam int unsigned KEY_W = K_W + R_W;

  // Multipliers per PE and the reduction patterns of Table I.
  localparam int unsigned NMUL = 3;

  typedef enum logic [1:0] {
    PAT_ABC   = 2'd0,   // AddrA = AddrB = AddrC : A+B+C
    PAT_AB_C  = 2'd1,   // AddrA = AddrB < AddrC : A+B, C
    PAT_A_BC  = 2'd2,   // AddrA < AddrB = AddrC : A, B+C
    PAT_A_B_C = 2'd3    // all different          : A, B, C
  } red_pat_e;

  // Core-level reduction mode.
  typedef enum logic {
    MODE_DIAG = 1'b0,   // general R x S CONV: reduce along PE diagonals
    MODE_ROW  = 1'b1    // pointwise CONV and FC: reduce along PE rows
  } red_mode_e;

  // One entry of a valid-position list.
  typedef struct packed {
    logic             valid;
    logic [POS_W-1:0] pos;
  } vpos_t;

  // A psum on its way to the OA buffer.
  typedef struct packed {
    logic                    inrange;  // (x, y) inside the output map
    logic [KEY_W-1:0]        key;      // {k, r}: order within a pass
    logic [OA_AW-1:0]        addr;     // (k*OH + x)*OW + y
    logic signed [ACC_W-1:0] val;
  } psum_t;

  // RF load bus word kinds.
  typedef enum logic [2:0] {
    LD_W      = 3'd0,  // W entry:   addr, data, cidx
    LD_WSEG   = 3'd1,  // segment:   addr = segment, len = pos-ptr, r, k
    LD_WMETA  = 3'd2,  // W bundle:  len = entries, k = segments, s
    LD_IA     = 3'd3,  // IA entry:  addr, data, cidx
    LD_IAMETA = 3'd4   // IA bundle: len = entries, h, w
  } ld_kind_e;

  typedef struct packed {
    ld_kind_e                kind;
    logic [WA_W-1:0]         addr;
    logic signed [DW-1:0]    data;
    logic [CIDX_W-1:0]       cidx;
    logic [R_W-1:0]          r;
    logic [K_W-1:0]          k;
    logic [LEN_W-1:0]        len;
    logic [S_W-1:0]          s;
    logic [HW_W-1:0]         h;
    logic [HW_W-1:0]         w;
  } ld_word_t;

  // Layer configuration of a core.
  typedef struct packed {
    red_mode_e       mode;
    logic [HW_W-1:0] oh;   // output rows
    logic [HW_W-1:0] ow;   // output columns
  } core_cfg_t;

endpackage
