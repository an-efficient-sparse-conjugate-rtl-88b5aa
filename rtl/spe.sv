// spe: the special processing element, one per processor, for the operations
// CG needs only a few times per iteration: serial reduction of the adder-tree
// output stream into one scalar, scalar division, and the convergence test.
//
// Serial reduction uses 1 + log2(LAT) adders.  Adder A0 accumulates every
// valid input into one of LAT interleaved partial sums circulating through
// its own pipeline (each output is fed back and added to the next input, or
// to zero).  Opcode SPE_REDUCE closes the sum: for LAT cycles the circulating
// partial sums are re-injected with a "final" tag, so exactly LAT tagged
// values leave A0 on consecutive cycles; a chain of log2(LAT) pairwise adder
// stages then halves that stream at each stage down to one value, which is
// written to `sum` with a one-cycle sum_valid pulse about (2+log2(LAT))*LAT
// cycles after SPE_REDUCE.  Inputs may arrive with gaps; SPE_REDUCE must be
// issued after the last input.
// SPE_DIV starts num/den on the divider (latency DIV_L); the quotient is
// held in `quot` with a quot_valid pulse.  SPE_CMP sets done when sum is
// below the threshold (the squared absolute error), one cycle later.
// The three operations, their 2-bit selection and the logarithmic adder
// count of the reduction follow the architecture; the particular reduction
// schedule is this design's own.
module spe
  import cg_pkg::*;
#(
  parameter int unsigned LAT   = ADD_LAT,
  parameter int unsigned DIV_L = DIV_LAT,
  localparam int unsigned NLV  = $clog2(LAT)
) (
  input  logic    clk,
  input  logic    en,        // clock enable: the SPE holds when low
  input  logic    rst,
  input  spe_op_e op,
  input  logic    in_valid,
  input  f32_t    in_data,
  input  f32_t    num,
  input  f32_t    den,
  input  f32_t    thresh,
  output f32_t    sum,
  output logic    sum_valid,
  output f32_t    quot,
  output logic    quot_valid,
  output logic    done
);
  // ---------------- accumulator A0 with LAT circulating partial sums -------
  logic [$clog2(LAT+1)-1:0] flush_cnt;
  logic flushing;
  f32_t a0_y, fb;
  logic a0_live_out, a0_fin_out, fb_live, a0_live_in;

  assign flushing   = (flush_cnt != 0);
  assign fb_live    = a0_live_out & ~a0_fin_out;
  assign fb         = fb_live ? a0_y : '0;
  assign a0_live_in = flushing | fb_live | in_valid;

  always_ff @(posedge clk) begin
    if (rst)                    flush_cnt <= '0;
    else if (!en)               flush_cnt <= flush_cnt;
    else if (op == SPE_REDUCE)  flush_cnt <= ($clog2(LAT+1))'(LAT);
    else if (flushing)          flush_cnt <= flush_cnt - 1'b1;
  end

  fp_add #(.LAT(LAT)) u_a0 (
    .clk, .en, .rst, .in_valid(a0_live_in), .a(fb), .b(in_valid ? in_data : '0), .sub(1'b0),
    .out_valid(a0_live_out), .y(a0_y)
  );
  pipe_delay_v #(.D(LAT)) u_fin (.clk, .en, .rst, .d(flushing), .q(a0_fin_out));

  // ---------------- pairwise stages: LAT values -> 1 -----------------------
  f32_t st_d [NLV+1];
  logic st_v [NLV+1];
  assign st_d[0] = a0_y;
  assign st_v[0] = a0_live_out & a0_fin_out;

  for (genvar k = 0; k < int'(NLV); k++) begin : g_stage
    f32_t hold;
    logic odd;      // a first operand is waiting in hold
    always_ff @(posedge clk) begin
      if (rst) begin
        odd  <= 1'b0;
        hold <= '0;
      end else if (en && st_v[k]) begin
        odd <= ~odd;
        if (!odd) hold <= st_d[k];
      end
    end
    fp_add #(.LAT(LAT)) u_add (
      .clk, .en, .rst, .in_valid(st_v[k] & odd), .a(hold), .b(st_d[k]), .sub(1'b0),
      .out_valid(st_v[k+1]), .y(st_d[k+1])
    );
  end

  // ---------------- divider ------------------------------------------------
  f32_t q_y;
  logic q_v;
  fp_div #(.LAT(DIV_L)) u_div (
    .clk, .en, .rst, .in_valid(op == SPE_DIV), .a(num), .b(den), .out_valid(q_v), .y(q_y)
  );

  // ---------------- result registers and convergence test ------------------
  function automatic logic f32_lt(f32_t x, f32_t y);
    if (x[30:0] == 0 && y[30:0] == 0) return 1'b0;       // +0 == -0
    if (x[31] != y[31])               return x[31];
    if (!x[31])                       return x[30:0] < y[30:0];
    return x[30:0] > y[30:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sum        <= '0;
      sum_valid  <= 1'b0;
      quot       <= '0;
      quot_valid <= 1'b0;
      done       <= 1'b0;
    end else if (en) begin
      sum_valid  <= st_v[NLV];
      quot_valid <= q_v;
      if (st_v[NLV]) sum  <= st_d[NLV];
      if (q_v)       quot <= q_y;
      if (op == SPE_CMP) done <= f32_lt(sum, thresh);
    end
  end
endmodule
