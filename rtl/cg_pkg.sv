// cg_pkg: types and constants shared by the sparse conjugate-gradient processor.
//
// The processor is a set of NPE processing elements (PEs) fed every cycle by a
// statically scheduled control word.  This package holds the per-PE 4-bit opcode
// (the compact PE control encoding: fewer than 16 distinct PE operations, so
// 4 bits per PE), the 2-bit special processing element (SPE) opcode, the 2+2-bit
// register-file control, and the default sizes of the main configuration
// (128 PEs, 844-deep local memories, 563-deep vector-memory banks, single
// precision, adder latency 16, multiplier and divider latency 30).
// The opcode values and the split of operations into opcodes are this design's
// own choice; the field widths follow the control encoding of the architecture.
package cg_pkg;

  // ---------------- default sizes of the main configuration ----------------
  localparam int unsigned NPE_DEF     = 128;  // processing elements = vector banks
  localparam int unsigned LM_DEPTH    = 844;  // depth of each PE local memory
  localparam int unsigned VB_DEPTH    = 563;  // depth of each vector-memory bank
  localparam int unsigned DW          = 32;   // data width (IEEE-754 single)
  localparam int unsigned ADD_LAT     = 16;   // floating point add/sub latency
  localparam int unsigned MUL_LAT     = 30;   // floating point multiply latency
  localparam int unsigned DIV_LAT     = 30;   // floating point divide latency

  typedef logic [31:0] f32_t;

  // ---------------- PE operations (4 control bits per PE) ------------------
  typedef enum logic [3:0] {
    PE_NOP        = 4'd0,   // idle; the accumulator loop recirculates
    PE_SPMV_FIRST = 4'd1,   // acc <- a*p           (first nonzero of a row)
    PE_SPMV_MAC   = 4'd2,   // acc <- acc + a*p
    PE_SPMV_FL    = 4'd3,   // single-nonzero row: Ap[row] <- a*p
    PE_SPMV_LAST  = 4'd4,   // Ap[row] <- acc + a*p (last nonzero of a row)
    PE_SPMV_STALL = 4'd5,   // bank conflict: acc <- acc + 0
    PE_DOT_PAP    = 4'd6,   // product p*Ap sent to the adder tree
    PE_DOT_RR     = 4'd7,   // product r*r  sent to the adder tree
    PE_AXPY_X     = 4'd8,   // x  <- x + s*p        (s = broadcast scalar)
    PE_AXPY_R     = 4'd9,   // r  <- r - s*Ap
    PE_UPDATE_P   = 4'd10,  // p' <- r + s*p        (kept in LMB until copied)
    PE_COPY_P     = 4'd11,  // p' sent to the vector memory write port
    PE_LOAD_R     = 4'd12,  // r  <- stream word (initial residual b - A x0)
    PE_LOAD_X     = 4'd13,  // x  <- stream word (initial guess x0)
    PE_READ_X     = 4'd14,  // x  sent to the result port
    PE_INIT_P     = 4'd15   // p' <- r                (first search direction)
  } pe_op_e;

  // ---------------- SPE operations (2 control bits) ------------------------
  typedef enum logic [1:0] {
    SPE_NOP    = 2'd0,
    SPE_REDUCE = 2'd1,  // close the running serial reduction and publish its sum
    SPE_DIV    = 2'd2,  // scalar division num / den
    SPE_CMP    = 2'd3   // convergence test: last sum < threshold
  } spe_op_e;

  // ---------------- register file (2 + 2 control bits) ---------------------
  typedef enum logic [1:0] {
    RF_B_ALPHA  = 2'd0,
    RF_B_RSOLD  = 2'd1,
    RF_B_BETA   = 2'd2,  // rs_new / rs_old
    RF_B_RSNEW  = 2'd3
  } rf_bsel_e;

  typedef enum logic [1:0] {
    RF_W_NONE  = 2'd0,
    RF_W_ALPHA = 2'd1,  // alpha  <- SPE quotient
    RF_W_RSNEW = 2'd2,  // rs_new <- SPE sum
    RF_W_BETA  = 2'd3   // beta   <- SPE quotient, rs_old <- rs_new
  } rf_we_e;

  // Number of 2x2 switches of an n-input Benes network: (2*log2(n)-1)*n/2.
  function automatic int unsigned benes_switches(int unsigned n);
    return (2 * $clog2(n) - 1) * (n / 2);
  endfunction

  // IEEE-754 single precision helpers shared by the arithmetic units.
  localparam f32_t F32_QNAN = 32'h7fc0_0000;

  // Round a normalised 24-bit significand with guard bit g and sticky bit s
  // to nearest-even, pack it with exponent e (unbiased + 127, may be out of
  // range) and sign.  Results below the normal range flush to zero, results
  // above it become infinity.
  function automatic f32_t f32_pack(logic sign, int e, logic [23:0] m, logic g, logic s);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m} + 25'((g & (s | m[0])) ? 1 : 0);
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 255)     return {sign, 8'hff, 23'd0};
    else if (er <= 0)  return {sign, 31'd0};
    else               return {sign, 8'(er), mr[22:0]};
  endfunction

endpackage
