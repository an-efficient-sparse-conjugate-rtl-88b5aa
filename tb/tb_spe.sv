// tb_spe: self-checking testbench for the special processing element.
// Serial reduction: streams of 1 to 200 random values, with random gaps, are
// reduced and compared with a double-precision sum (relative error 1e-5 of
// the sum of magnitudes); the result must appear (2+log2(16))*16+1 cycles
// after SPE_REDUCE.  Division: quotients are compared with the rounded
// reference and must appear DIV_L+1 cycles after SPE_DIV.  Convergence test:
// done must follow sum < threshold.
module tb_spe;
  import cg_pkg::*;
  import fp_ref_pkg::*;
  localparam int LAT = 16, DIVL = 30;
  localparam int RED_LAT = (2 + $clog2(LAT)) * LAT + 1;
  logic clk = 0, rst = 1;
  spe_op_e op;
  logic iv;
  f32_t din, num, den, thresh, sum, quot;
  logic sum_valid, quot_valid, done;
  int checks = 0, failures = 0, cyc = 0;

  spe #(.LAT(LAT), .DIV_L(DIVL)) dut (
    .clk, .en(1'b1), .rst, .op, .in_valid(iv), .in_data(din), .num, .den, .thresh,
    .sum, .sum_valid, .quot, .quot_valid, .done
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("%s", s);
  endtask

  initial begin
    int lens [6] = '{1, 5, 16, 17, 60, 200};
    op = SPE_NOP; iv = 0; din = 0; num = 0; den = 0; thresh = 32'h3f80_0000;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 6; t++) begin
      real s, m, d;
      int c0, n;
      s = 0; m = 0; n = 0;
      while (n < lens[t]) begin
        if ($urandom_range(3, 0) != 0) begin
          f32_t v;
          v = rand_f32(5);
          iv = 1; din = v; n++;
          s += to_real(v);
          m += (to_real(v) < 0) ? -to_real(v) : to_real(v);
        end else iv = 0;
        @(negedge clk);
      end
      iv = 0;
      repeat ($urandom_range(5, 0)) @(negedge clk);
      op = SPE_REDUCE;
      c0 = cyc;
      @(negedge clk);
      op = SPE_NOP;
      while (!sum_valid && cyc - c0 < 1000) @(negedge clk);
      checks++;
      if (cyc - c0 != RED_LAT) fail($sformatf("reduction latency %0d expected %0d", cyc - c0, RED_LAT));
      d = to_real(sum) - s;
      if (d < 0) d = -d;
      checks++;
      if (d > 1e-5 * m) fail($sformatf("sum %f expected %f (n=%0d)", to_real(sum), s, lens[t]));
      // convergence test against thresholds just above and below the sum
      thresh = to_f32(to_real(sum) * ((to_real(sum) > 0) ? 1.5 : 0.5));
      op = SPE_CMP;
      @(negedge clk);
      op = SPE_NOP;
      checks++;
      if (done !== 1'b1) fail("done not set");
      thresh = to_f32(to_real(sum) * ((to_real(sum) > 0) ? 0.5 : 1.5));
      op = SPE_CMP;
      @(negedge clk);
      op = SPE_NOP;
      checks++;
      if (done !== 1'b0) fail("done set");
    end
    // division
    for (int t = 0; t < 100; t++) begin
      f32_t e;
      int c0;
      num = rand_f32(30);
      den = rand_f32(30);
      e = to_f32(to_real(num) / to_real(den));
      op = SPE_DIV;
      c0 = cyc;
      @(negedge clk);
      op = SPE_NOP;
      while (!quot_valid && cyc - c0 < 100) @(negedge clk);
      checks++;
      if (cyc - c0 != DIVL + 1) fail($sformatf("division latency %0d", cyc - c0));
      checks++;
      if (ulp_diff(quot, e) > 1 || quot[31] != e[31]) fail($sformatf("quot %h expected %h", quot, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
