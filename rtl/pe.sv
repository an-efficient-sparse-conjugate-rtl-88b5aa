// pe: processing element of the CG processor.  NPE of them run in lockstep,
// each owning a slice of the rows of A and of the vectors r, x and Ap.
//
// Inside: a floating point multiplier (latency MUL_L), an adder/subtractor
// (latency ADD_L) whose output can be fed back to its input, operand
// multiplexers, and two local memories.  LMA holds r (words 0 .. XBASE-1)
// and x (words XBASE .. LM_DEPTH-1, XBASE = LM_DEPTH/2); LMB holds Ap, which
// is overwritten by the new p once Ap is no longer needed.  Both are
// LM_DEPTH words with one synchronous read and one write port, so every CG
// step finds its operands in different memories.
//
// Each cycle the PE takes a 4-bit opcode (cg_pkg::pe_op_e) and the stream word
// a_in (a nonzero of A, or initial data).  Timing, for an op issued in
// cycle t: local-memory reads are issued in t; the PE uses the broadcast
// scalar bcast and the permuted vector element p_in in t+1; the product
// leaves the multiplier in t+1+MUL_L and enters the adder in that cycle; the
// adder result is written back in t+1+MUL_L+ADD_L.  Dot-product products
// appear on dot/dot_valid in t+1+MUL_L; COPY_P and READ_X data appear in
// t+2 on vm_wdata/vm_wvalid and x_out/x_valid.
//
// Sparse matrix-vector product: the adder pipeline holds ADD_L interleaved
// partial sums (one per row group).  SPMV_FIRST starts a row with a*p + 0,
// SPMV_MAC adds a*p to the partial sum returning from the adder output,
// the *_LAST forms write the finished row to LMB, and SPMV_STALL (a bank
// conflict) adds zero.  A NOP also recirculates the partial sum, and en = 0
// freezes the whole PE, so neither an idle slot nor a missing control word
// disturbs the interleaving.  Ap rows are stored in the order their
// last nonzero was issued: a row counter, cleared when an SpMV phase begins,
// supplies the LMB address.  Dense operations walk local rows 0 ..
// cfg_rows-1 with a counter that restarts whenever the opcode changes and
// wraps at cfg_rows (so COPY_P can be repeated once per duplicate).
//
// From the architecture: the operand sources of Tables I and II, a
// pipelined accumulator shared by ADD_L interleaved row groups, stalls as
// "plus zero", 4 control bits per PE and counter-generated local addresses.
// This design's own choices: the opcode set, the LMA layout, keeping p' in
// LMB until it is copied, and the LOAD/READ opcodes for initial data and
// the solution.  LMA has one write port: a LOAD_R/LOAD_X must not coincide
// with a write-back of AXPY_X/AXPY_R (the schedule keeps them apart; the
// write-back wins).
module pe
  import cg_pkg::*;
#(
  parameter int unsigned DEPTH = LM_DEPTH,
  parameter int unsigned ADD_L = ADD_LAT,
  parameter int unsigned MUL_L = MUL_LAT,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned XBASE = DEPTH / 2
) (
  input  logic          clk,
  input  logic          en,         // clock enable: the whole PE holds when low
  input  logic          rst,
  input  logic [AW-1:0] cfg_rows,   // local rows of this PE (<= XBASE)
  input  pe_op_e        op,         // cycle t
  input  f32_t          a_in,       // cycle t
  input  f32_t          bcast,      // cycle t+1
  input  f32_t          p_in,       // cycle t+1
  output logic          dot_valid,
  output f32_t          dot,
  output logic          vm_wvalid,
  output f32_t          vm_wdata,
  output logic          x_valid,
  output f32_t          x_out
);
  // ---------------- local memories -----------------------------------------
  f32_t lma [DEPTH];
  f32_t lmb [DEPTH];

  // ---------------- stage 0: address generation ----------------------------
  pe_op_e        last_op;      // last non-NOP opcode
  logic [AW-1:0] cnt, addr0, rowc, row0;
  logic          is_dense, is_spmv, is_last;
  logic [AW-1:0] lma_ra, lmb_ra, wb_addr0;

  always_comb begin
    is_spmv  = op inside {PE_SPMV_FIRST, PE_SPMV_MAC, PE_SPMV_FL, PE_SPMV_LAST, PE_SPMV_STALL};
    is_dense = op inside {PE_DOT_PAP, PE_DOT_RR, PE_AXPY_X, PE_AXPY_R, PE_UPDATE_P, PE_INIT_P,
                          PE_COPY_P, PE_LOAD_R, PE_LOAD_X, PE_READ_X};
    is_last  = op inside {PE_SPMV_FL, PE_SPMV_LAST};
    addr0    = (op != last_op) ? '0 : cnt;
    row0     = (is_spmv && !(last_op inside {PE_SPMV_FIRST, PE_SPMV_MAC, PE_SPMV_FL,
                                             PE_SPMV_LAST, PE_SPMV_STALL})) ? '0 : rowc;
    lma_ra   = (op inside {PE_AXPY_X, PE_READ_X, PE_LOAD_X}) ? AW'(XBASE) + addr0 : addr0;
    lmb_ra   = addr0;
    wb_addr0 = is_spmv ? row0 : lma_ra;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_op <= PE_NOP;
      cnt     <= '0;
      rowc    <= '0;
    end else if (en) begin
      if (op != PE_NOP) last_op <= op;
      if (is_dense) cnt <= (addr0 == cfg_rows - 1'b1) ? '0 : addr0 + 1'b1;
      if (is_spmv)  rowc <= is_last ? row0 + 1'b1 : row0;
    end
  end

  // ---------------- stage 1: operands ---------------------------------------
  pe_op_e        op1;
  f32_t          a1, lma_q, lmb_q;
  logic [AW-1:0] wb1;

  always_ff @(posedge clk) begin
    if (rst)     op1 <= PE_NOP;
    else if (en) op1 <= op;
    if (en) begin
      a1    <= a_in;
      wb1   <= wb_addr0;
      lma_q <= lma[lma_ra];
      lmb_q <= lmb[lmb_ra];
    end
  end

  f32_t mul_a, mul_b, add_c;
  always_comb begin
    mul_a = a1;
    mul_b = p_in;
    add_c = lma_q;
    unique case (op1)
      PE_DOT_PAP:  begin mul_a = p_in;  mul_b = lmb_q; end
      PE_DOT_RR:   begin mul_a = lma_q; mul_b = lma_q; end
      PE_AXPY_X:   begin mul_a = bcast; mul_b = p_in;  end
      PE_AXPY_R:   begin mul_a = bcast; mul_b = lmb_q; end
      PE_UPDATE_P: begin mul_a = bcast; mul_b = p_in;  end
      PE_INIT_P:   begin mul_a = '0;    mul_b = '0;    end
      default: ;
    endcase
  end

  // COPY_P and READ_X outputs (cycle t+2)
  always_ff @(posedge clk) begin
    if (rst) begin
      vm_wvalid <= 1'b0;
      x_valid   <= 1'b0;
    end else if (en) begin
      vm_wvalid <= (op1 == PE_COPY_P);
      x_valid   <= (op1 == PE_READ_X);
    end
    if (en) begin
      vm_wdata <= lmb_q;
      x_out    <= lma_q;
    end
  end

  // ---------------- multiplier and tag pipeline ----------------------------
  f32_t   pm, cm;
  logic   mv;
  logic [3:0]    opm_raw;
  logic [AW-1:0] wbm;
  pe_op_e        opm;

  fp_mul #(.LAT(MUL_L)) u_mul (
    .clk, .en, .rst, .in_valid(op1 != PE_NOP), .a(mul_a), .b(mul_b), .out_valid(mv), .y(pm)
  );
  pipe_delay #(.W(4 + AW + 32), .D(MUL_L)) u_tag_m (
    .clk, .en, .d({op1, wb1, add_c}), .q({opm_raw, wbm, cm})
  );
  assign opm = mv ? pe_op_e'(opm_raw) : PE_NOP;

  assign dot_valid = (opm == PE_DOT_PAP) || (opm == PE_DOT_RR);
  assign dot       = pm;

  // ---------------- adder with feedback ------------------------------------
  f32_t ad_a, ad_b, ad_y;
  logic ad_sub, av;
  logic [3:0]    opa_raw;
  logic [AW-1:0] wba;
  pe_op_e        opa;

  always_comb begin
    ad_a   = ad_y;      // default: recirculate the partial sum (+0)
    ad_b   = '0;
    ad_sub = 1'b0;
    unique case (opm)
      PE_SPMV_FIRST, PE_SPMV_FL:  begin ad_a = pm; ad_b = '0; end
      PE_SPMV_MAC, PE_SPMV_LAST:  begin ad_a = ad_y; ad_b = pm; end
      PE_AXPY_X, PE_UPDATE_P,
      PE_INIT_P:                  begin ad_a = cm; ad_b = pm; end
      PE_AXPY_R:                  begin ad_a = cm; ad_b = pm; ad_sub = 1'b1; end
      default: ;
    endcase
  end

  fp_add #(.LAT(ADD_L)) u_add (
    .clk, .en, .rst, .in_valid(opm != PE_NOP), .a(ad_a), .b(ad_b), .sub(ad_sub),
    .out_valid(av), .y(ad_y)
  );
  pipe_delay #(.W(4 + AW), .D(ADD_L)) u_tag_a (
    .clk, .en, .d({opm, wbm}), .q({opa_raw, wba})
  );
  assign opa = av ? pe_op_e'(opa_raw) : PE_NOP;

  // ---------------- local memory writes ------------------------------------
  logic          lma_we, lmb_we;
  logic [AW-1:0] lma_wa;
  f32_t          lma_wd;

  always_comb begin
    lma_we = 1'b0;
    lma_wa = wba;
    lma_wd = ad_y;
    if (opa inside {PE_AXPY_X, PE_AXPY_R}) begin
      lma_we = 1'b1;
    end else if (op inside {PE_LOAD_R, PE_LOAD_X}) begin
      lma_we = 1'b1;
      lma_wa = lma_ra;
      lma_wd = a_in;
    end
    lmb_we = opa inside {PE_SPMV_FL, PE_SPMV_LAST, PE_UPDATE_P, PE_INIT_P};
  end

  always_ff @(posedge clk) begin
    if (en && lma_we) lma[lma_wa] <= lma_wd;
    if (en && lmb_we) lmb[wba]    <= ad_y;
  end
endmodule
