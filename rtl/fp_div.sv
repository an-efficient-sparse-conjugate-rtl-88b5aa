// fp_div: pipelined IEEE-754 single-precision divider, y = a / b, with a
// latency of LAT cycles (30 in the main configuration); the special
// processing element uses it for alpha = rs_old / (p'Ap) and
// beta = rs_new / rs_old.  The significand quotient is taken to 27 bits
// with a sticky remainder bit and rounded to nearest-even in one
// combinational stage followed by LAT registers.  x/0 gives infinity, 0/0
// and inf/inf give NaN, subnormals are flushed to zero.  The latency follows
// the architecture; the internal organisation is this design's choice.
module fp_div
  import cg_pkg::*;
#(
  parameter int unsigned LAT = DIV_LAT
) (
  input  logic clk,
  input  logic en,      // clock enable: the pipeline holds when low
  input  logic rst,
  input  logic in_valid,
  input  f32_t a,
  input  f32_t b,
  output logic out_valid,
  output f32_t y
);
  f32_t res;

  always_comb begin : p_div
    logic        s;
    logic [7:0]  ea, eb;
    logic [49:0] num, q, r;
    int          e;
    s   = a[31] ^ b[31];
    ea  = a[30:23];
    eb  = b[30:23];
    num = '0; q = '0; r = '0; e = 0;
    if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0)) begin
      res = F32_QNAN;
    end else if (ea == 8'hff) begin
      res = (eb == 8'hff) ? F32_QNAN : {s, 8'hff, 23'd0};
    end else if (eb == 8'hff) begin
      res = {s, 31'd0};
    end else if (eb == 0) begin
      res = (ea == 0) ? F32_QNAN : {s, 8'hff, 23'd0};
    end else if (ea == 0) begin
      res = {s, 31'd0};
    end else begin
      num = {1'b1, a[22:0], 26'd0};
      q   = num / 50'({1'b1, b[22:0]});
      r   = num % 50'({1'b1, b[22:0]});
      e   = int'(ea) - int'(eb) + 127;
      if (q[26]) res = f32_pack(s, e,     q[26:3], q[2], q[1] | q[0] | (r != 0));
      else       res = f32_pack(s, e - 1, q[25:2], q[1], q[0] | (r != 0));
    end
  end

  pipe_delay   #(.W(32), .D(LAT)) u_d (.clk, .en, .d(res), .q(y));
  pipe_delay_v #(.D(LAT))         u_v (.clk, .en, .rst, .d(in_valid), .q(out_valid));
endmodule
