// tb_snap_cfg_ctrl: self-checking test of the core configuration controller.
// The configuration register must hold what was written, and every row and
// column mask pattern (column broadcast, row broadcast, single PE, random)
// must enable exactly the PEs at the crossing of the selected rows and
// columns, and none when ld_valid is low.
module tb_snap_cfg_ctrl;
  import snap_pkg::*;
  localparam int ROWS = 7, COLS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cfg_we = 0, ld_valid = 0;
  core_cfg_t cfg_in = '0, cfg;
  logic [ROWS-1:0] rm;
  logic [COLS-1:0] cm;
  logic [ROWS*COLS-1:0] en;

  snap_cfg_ctrl #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .cfg_we, .cfg_in, .cfg, .ld_valid,
    .ld_rowmask(rm), .ld_colmask(cm), .pe_ld_en(en));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rm = '0; cm = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int t = 0; t < 20; t++) begin
      core_cfg_t c;
      c = core_cfg_t'($urandom);
      cfg_in = c; cfg_we = 1; @(posedge clk); #1; cfg_we = 0;
      cfg_in = '0; @(posedge clk); #1;
      check(cfg == c, "configuration held");
    end
    for (int t = 0; t < 300; t++) begin
      case (t % 4)
        0: begin rm = '1; cm = COLS'(1 << (t % COLS)); end
        1: begin rm = ROWS'(1 << (t % ROWS)); cm = '1; end
        2: begin rm = ROWS'(1 << (t % ROWS)); cm = COLS'(1 << (t % COLS)); end
        default: begin rm = ROWS'($urandom); cm = COLS'($urandom); end
      endcase
      ld_valid = (t % 7 != 0);
      #1;
      for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++)
        check(en[i*COLS+j] == (ld_valid && rm[i] && cm[j]), $sformatf("t%0d PE(%0d,%0d)", t, i, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
