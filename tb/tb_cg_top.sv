// tb_cg_top: end-to-end test of cg_top at a reduced size (8 PEs, 6 rows per
// PE, two copies of p, the default latencies and memory depths).  The test
// host cg_host_tb builds a sparse SPD system, schedules it and runs a
// complete conjugate-gradient solve until the processor raises done.
module tb_cg_top;
  import cg_pkg::*;
  localparam int NPE = 8;
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

  cg_host_tb #(.NPE(NPE), .ROWS(6), .NDUP(2)) u_host (.*);
  cg_top #(.NPE(NPE)) dut (.*);
endmodule
