// tb_adder_tree: self-checking testbench for adder_tree at 128 inputs.
// Random vectors are issued one per cycle (with gaps); each sum must appear
// exactly log2(128)*16 cycles later and match a double-precision reference
// within a relative error of 1e-5 of the sum of magnitudes.
module tb_adder_tree;
  import fp_ref_pkg::*;
  localparam int N = 128, LAT = 16, TOT = 7 * LAT, NV = 300;
  logic clk = 0, rst = 1, iv = 0, ov;
  logic [31:0] din [N];
  logic [31:0] sum;
  real   exp_q [$], mag_q [$];
  int    t_q   [$];
  int cyc = 0, k = 0, checks = 0, failures = 0;

  adder_tree #(.N(N), .LAT(LAT)) dut (.clk, .en(1'b1), .rst, .in_valid(iv), .din, .out_valid(ov), .sum);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    iv <= 1'b0;
    if (!rst && k < NV && $urandom_range(4, 0) != 0) begin
      real s, m;
      s = 0; m = 0;
      for (int i = 0; i < N; i++) begin
        logic [31:0] v;
        v = rand_f32(6);
        din[i] <= v;
        s += to_real(v);
        m += (to_real(v) < 0) ? -to_real(v) : to_real(v);
      end
      iv <= 1'b1;
      exp_q.push_back(s); mag_q.push_back(m); t_q.push_back(cyc + 1);
      k <= k + 1;
    end
  end

  always @(posedge clk) if (!rst && ov) begin
    real e, m, d;
    int t;
    e = exp_q.pop_front(); m = mag_q.pop_front(); t = t_q.pop_front();
    checks++;
    d = to_real(sum) - e;
    if (d < 0) d = -d;
    if (d > 1e-5 * m || cyc - t != TOT) begin
      failures++;
      if (failures < 5) $display("sum %f expected %f, latency %0d", to_real(sum), e, cyc - t);
    end
  end

  initial begin
    for (int i = 0; i < N; i++) din[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (k == NV);
    repeat (TOT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
