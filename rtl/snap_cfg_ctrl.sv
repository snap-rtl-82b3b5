// snap_cfg_ctrl: configuration controller of a compute core.
//
// Holds the layer configuration of the core (reduction mode and output map
// size) and turns a load-bus word addressed by a row mask and a column mask
// into write enables of the PE register files. Setting one column bit and
// all row bits broadcasts a W bundle down a PE column; one row bit and all
// column bits broadcasts an IA bundle along a row; single bits multicast to
// one PE. These are the broadcasts and multicasts of the three mappings of
// the published design (diagonal CONV, pointwise CONV, FC); the mask
// interface itself is this design's own. The configuration register is
// written at the clock edge; the enables are combinational.
module snap_cfg_ctrl
  import snap_pkg::*;
#(
  parameter int unsigned ROWS = 7,
  parameter int unsigned COLS = 3,
  localparam int unsigned NPE = ROWS * COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  core_cfg_t         cfg_in,
  output core_cfg_t         cfg,
  input  logic              ld_valid,
  input  logic [ROWS-1:0]   ld_rowmask,
  input  logic [COLS-1:0]   ld_colmask,
  output logic [NPE-1:0]    pe_ld_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg <= '{mode: MODE_DIAG, oh: '0, ow: '0};
    else if (cfg_we) cfg <= cfg_in;
  end

  always_comb
    for (int unsigned i = 0; i < ROWS; i++)
      for (int unsigned j = 0; j < COLS; j++)
        pe_ld_en[i*COLS + j] = ld_valid && ld_rowmask[i] && ld_colmask[j];

endmodule
