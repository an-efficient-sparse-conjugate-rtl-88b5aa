// tb_cg_top_full: end-to-end test of cg_top with every parameter at its
// default (128 PEs, 844-word local memories, 563-word vector banks, adder
// latency 16, multiplier and divider latency 30).  The test host cg_host_tb
// builds a sparse SPD system of 512 unknowns (4 rows per PE), schedules it
// with two copies of p and runs a complete conjugate-gradient solve until
// the processor raises done, checking against a double-precision CG.
module tb_cg_top_full;
  import cg_pkg::*;
  localparam int NPE = NPE_DEF;
  localparam int NSW = (2 * $clog2(NPE) - 1) * (NPE / 2);
  localparam int VAW = $clog2(VB_DEPTH), LAW = $clog2(LM_DEPTH), LW = $clog2(NPE);
  logic clk, rst, in_valid, done;
  logic [LAW-1:0] cfg_rows;
  logic [LW:0]    cfg_ndup;
  f32_t cfg_thresh, alpha, beta, rs_new;
  f32_t nz [NPE], x_out [NPE];
  logic [NSW-1:0] pn_ctrl;
  logic [3:0] pe_op [NPE];
  logic [VAW-1:0] vm_raddr [NPE];
  logic vm_we [NPE], x_valid [NPE];
  logic [1:0] spe_op, rf_bsel, rf_we;

  cg_host_tb #(.ROWS(4), .NDUP(2), .WATCHDOG(2000000)) u_host (.*);
  cg_top dut (.*);
endmodule
