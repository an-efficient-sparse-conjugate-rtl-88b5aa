// fp_add: pipelined IEEE-754 single-precision adder/subtractor, y = a + b
// (sub = 0) or y = a - b (sub = 1), with a latency of LAT clock cycles
// (16 in the main configuration) and one new operation accepted per cycle.
//
// The sum is formed in one combinational stage (align the smaller operand
// with guard and sticky bits, add or subtract significands, renormalise,
// round to nearest-even) and then carried through LAT registers, leaving
// retiming to the synthesis tool.  Subnormal inputs are read as zero and
// subnormal results flush to zero; NaN and infinity follow IEEE rules (a
// NaN result is the canonical quiet NaN).  The latency follows the
// architecture's adder; the rounding/flush behaviour is this design's choice.
// in_valid travels beside the data and appears as out_valid.
module fp_add
  import cg_pkg::*;
#(
  parameter int unsigned LAT = ADD_LAT
) (
  input  logic clk,
  input  logic en,      // clock enable: the pipeline holds when low
  input  logic rst,
  input  logic in_valid,
  input  f32_t a,
  input  f32_t b,
  input  logic sub,
  output logic out_valid,
  output f32_t y
);
  f32_t res;

  always_comb begin : p_add
    logic        sa, sb, sl, ss;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb, ml, ms;
    int          el, d;
    logic [53:0] sh;
    logic [26:0] xl, xs, diff;
    logic [27:0] sum;
    logic        stk;
    int          lz;
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    res = '0;
    sl = 1'b0; ss = 1'b0; ml = '0; ms = '0; el = 0; d = 0; sh = '0;
    xl = '0; xs = '0; diff = '0; sum = '0; stk = 1'b0; lz = 0;
    if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0)) begin
      res = F32_QNAN;
    end else if (ea == 8'hff || eb == 8'hff) begin
      if (ea == 8'hff && eb == 8'hff && sa != sb) res = F32_QNAN;
      else if (ea == 8'hff)                       res = {sa, 8'hff, 23'd0};
      else                                        res = {sb, 8'hff, 23'd0};
    end else if (ea == 0 && eb == 0) begin
      res = {sa & sb, 31'd0};
    end else if (ea == 0) begin
      res = {sb, b[30:0]};
    end else if (eb == 0) begin
      res = a;
    end else begin
      // order by magnitude
      if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
        sl = sa; ss = sb; el = int'(ea); d = int'(ea) - int'(eb); ml = ma; ms = mb;
      end else begin
        sl = sb; ss = sa; el = int'(eb); d = int'(eb) - int'(ea); ml = mb; ms = ma;
      end
      if (d > 27) d = 27;
      xl = {ml, 3'b000};
      sh = {ms, 3'b000, 27'd0} >> d;
      stk = |sh[26:0];
      xs = sh[53:27];
      xs[0] = xs[0] | stk;
      if (sl == ss) begin
        sum = {1'b0, xl} + {1'b0, xs};
        if (sum[27]) begin
          sum = {1'b0, sum[27:2], sum[1] | sum[0]};
          el = el + 1;
        end
        res = f32_pack(sl, el, sum[26:3], sum[2], sum[1] | sum[0]);
      end else begin
        diff = xl - xs;
        if (diff == 0) begin
          res = '0;
        end else begin
          lz = 0;
          for (int i = 26; i >= 0; i--) begin
            if (diff[i]) break;
            lz++;
          end
          diff = diff << lz;
          el = el - lz;
          res = f32_pack(sl, el, diff[26:3], diff[2], diff[1] | diff[0]);
        end
      end
    end
  end

  pipe_delay   #(.W(32), .D(LAT)) u_d (.clk, .en, .d(res), .q(y));
  pipe_delay_v #(.D(LAT))         u_v (.clk, .en, .rst, .d(in_valid), .q(out_valid));
endmodule
