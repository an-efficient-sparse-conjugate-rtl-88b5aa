// cg_top: sparse conjugate-gradient processor.  NPE processing elements share
// a banked vector memory through a Benes permutation network, a scalar
// register file, an adder tree and a special processing element (SPE).
//
// The processor has no instruction fetch: a host computes a static schedule
// once (A does not change between iterations) and streams one control word
// plus NPE stream words per cycle, in the order it computed.  A control word
// carries the network setting (pn_ctrl), one vector-memory read address and
// one write-enable bit per bank, a 4-bit opcode per PE, a 2-bit SPE opcode
// and 2+2 register-file bits.  The stream words are the nonzeros of A in
// their scheduled slots (a zero for a stall), or initial r and x.  When
// in_valid is low the cycle is a bubble: in_valid is the clock enable of the
// whole data path, so every pipeline, counter and memory holds its state and
// the static schedule resumes exactly where it stopped (the interleaved
// partial sums of the sparse product stay aligned with their slots).
//
// Data path and cycle alignment for a control word in cycle t:
//   t    vector-memory reads and PE local reads are issued; SPE and RF act
//   t+1  bank words pass the network (its setting is delayed one cycle to
//        meet them) and reach the PEs with the broadcast scalar
//   t+2  COPY_P words leave the PEs and are written to the banks with the
//        write-enable bits of word t (delayed two cycles here)
// PE dot-product products feed the adder tree, whose per-cycle sums feed the
// SPE reduction.  The SPE divides rs_new/rs_old when the word's broadcast
// select is RF_B_RSNEW and rs_old/sum otherwise; its sum and quotient are
// written into the register file by the RF write code.  done rises when the
// SPE's convergence test finds rs_new below cfg_thresh.
//
// The block structure (Fig. 1 of the architecture), the per-cycle control
// bits and the static scheduling follow the architecture; the cycle
// alignment, the bubble rule and the divider operand selection are this
// design's own choices.
module cg_top
  import cg_pkg::*;
#(
  parameter int unsigned NPE    = NPE_DEF,
  parameter int unsigned LMD    = LM_DEPTH,
  parameter int unsigned VBD    = VB_DEPTH,
  parameter int unsigned ADD_L  = ADD_LAT,
  parameter int unsigned MUL_L  = MUL_LAT,
  parameter int unsigned DIV_L  = DIV_LAT,
  localparam int unsigned NSW   = (2 * $clog2(NPE) - 1) * (NPE / 2),
  localparam int unsigned VAW   = $clog2(VBD),
  localparam int unsigned LAW   = $clog2(LMD),
  localparam int unsigned LW    = $clog2(NPE)
) (
  input  logic           clk,
  input  logic           rst,
  // configuration, fixed for a solve
  input  logic [LAW-1:0] cfg_rows,    // rows per PE (= words of p per bank and duplicate)
  input  logic [LW:0]    cfg_ndup,    // copies of p in the vector memory
  input  f32_t           cfg_thresh,  // squared absolute error bound
  // per-cycle stream: control word and stream words
  input  logic           in_valid,
  input  f32_t           nz       [NPE],
  input  logic [NSW-1:0] pn_ctrl,
  input  logic [3:0]     pe_op    [NPE],
  input  logic [VAW-1:0] vm_raddr [NPE],
  input  logic           vm_we    [NPE],
  input  logic [1:0]     spe_op,
  input  logic [1:0]     rf_bsel,
  input  logic [1:0]     rf_we,
  // results
  output logic           done,
  output logic           x_valid  [NPE],
  output f32_t           x_out    [NPE],
  output f32_t           alpha,
  output f32_t           beta,
  output f32_t           rs_new
);
  // ---------------- control word decode ------------------------------------
  logic en;
  assign en = in_valid;

  pe_op_e   op_v [NPE];
  spe_op_e  spe_op_v;
  rf_bsel_e bsel_v;
  rf_we_e   rfwe_v;
  always_comb begin
    for (int k = 0; k < int'(NPE); k++) op_v[k] = pe_op_e'(pe_op[k]);
    spe_op_v = spe_op_e'(spe_op);
    bsel_v   = rf_bsel_e'(rf_bsel);
    rfwe_v   = rf_we_e'(rf_we);
  end

  // ---------------- vector memory and network ------------------------------
  f32_t           vm_rd   [NPE];
  f32_t           p_perm  [NPE];
  f32_t           vm_wd   [NPE];
  logic           pe_wv   [NPE];
  logic           we_d1   [NPE];
  logic           we_d2   [NPE];
  logic [NSW-1:0] pn_d1;

  always_ff @(posedge clk) begin
    if (en) pn_d1 <= pn_ctrl;
    for (int k = 0; k < int'(NPE); k++) begin
      if (rst) begin
        we_d1[k] <= 1'b0;
        we_d2[k] <= 1'b0;
      end else if (en) begin
        we_d1[k] <= vm_we[k];
        we_d2[k] <= we_d1[k];
      end
    end
  end

  vector_memory #(.NPE(NPE), .DEPTH(VBD)) u_vm (
    .clk, .en, .rst, .cfg_rows(VAW'(cfg_rows)), .cfg_ndup,
    .rd_addr(vm_raddr), .rd_data(vm_rd), .wr_en(we_d2), .wr_data(vm_wd)
  );

  benes_network #(.N(NPE), .W(32)) u_pn (.ctrl(pn_d1), .din(vm_rd), .dout(p_perm));

  // ---------------- register file and SPE ----------------------------------
  f32_t bcast, rs_old, spe_sum, spe_quot, div_num, div_den;
  logic sum_v, quot_v;

  register_file u_rf (
    .clk, .en, .rst, .bsel(bsel_v), .we(rfwe_v), .spe_sum, .spe_quot,
    .bcast, .alpha, .beta, .rs_old, .rs_new
  );

  assign div_num = (bsel_v == RF_B_RSNEW) ? rs_new : rs_old;
  assign div_den = (bsel_v == RF_B_RSNEW) ? rs_old : spe_sum;

  logic tree_v;
  f32_t tree_sum;
  f32_t dots [NPE];
  logic dot_v [NPE];

  adder_tree #(.N(NPE), .LAT(ADD_L)) u_tree (
    .clk, .en, .rst, .in_valid(dot_v[0]), .din(dots), .out_valid(tree_v), .sum(tree_sum)
  );

  spe #(.LAT(ADD_L), .DIV_L(DIV_L)) u_spe (
    .clk, .en, .rst, .op(spe_op_v), .in_valid(tree_v), .in_data(tree_sum),
    .num(div_num), .den(div_den), .thresh(cfg_thresh),
    .sum(spe_sum), .sum_valid(sum_v), .quot(spe_quot), .quot_valid(quot_v), .done
  );

  // ---------------- processing elements ------------------------------------
  for (genvar k = 0; k < int'(NPE); k++) begin : g_pe
    pe #(.DEPTH(LMD), .ADD_L(ADD_L), .MUL_L(MUL_L)) u_pe (
      .clk, .en, .rst, .cfg_rows, .op(op_v[k]), .a_in(nz[k]), .bcast, .p_in(p_perm[k]),
      .dot_valid(dot_v[k]), .dot(dots[k]), .vm_wvalid(pe_wv[k]), .vm_wdata(vm_wd[k]),
      .x_valid(x_valid[k]), .x_out(x_out[k])
    );
  end

  // A vector-memory write must meet words produced by COPY_P.
  logic any_we, any_wv;
  always_comb begin
    any_we = 1'b0;
    any_wv = 1'b0;
    for (int k = 0; k < int'(NPE); k++) begin
      any_we |= we_d2[k];
      any_wv |= pe_wv[k];
    end
  end
  always_ff @(posedge clk)
    assert (rst || !en || !any_we || any_wv)
      else $error("vector-memory write enable without COPY_P data");
endmodule
