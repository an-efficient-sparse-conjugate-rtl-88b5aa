// fp_mul: pipelined IEEE-754 single-precision multiplier, y = a * b, with a
// latency of LAT cycles (30 in the main configuration) and one operation per
// cycle.  The 24x24-bit significand product is formed, normalised by at most
// one place and rounded to nearest-even in one combinational stage; LAT
// registers follow.  Subnormals are read as and flushed to zero; NaN and
// infinity follow IEEE rules.  The latency follows the architecture; the
// internal organisation is this design's choice.
module fp_mul
  import cg_pkg::*;
#(
  parameter int unsigned LAT = MUL_LAT
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

  always_comb begin : p_mul
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    int          e;
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    p  = '0;
    e  = 0;
    if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0)) begin
      res = F32_QNAN;
    end else if (ea == 8'hff || eb == 8'hff) begin
      if (ea == 0 || eb == 0) res = F32_QNAN;        // inf * 0
      else                    res = {s, 8'hff, 23'd0};
    end else if (ea == 0 || eb == 0) begin
      res = {s, 31'd0};
    end else begin
      p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
      e = int'(ea) + int'(eb) - 127;
      if (p[47]) res = f32_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
      else       res = f32_pack(s, e,     p[46:23], p[22], |p[21:0]);
    end
  end

  pipe_delay   #(.W(32), .D(LAT)) u_d (.clk, .en, .d(res), .q(y));
  pipe_delay_v #(.D(LAT))         u_v (.clk, .en, .rst, .d(in_valid), .q(out_valid));
endmodule
