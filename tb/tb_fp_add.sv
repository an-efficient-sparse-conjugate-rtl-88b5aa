// tb_fp_add: self-checking testbench for fp_add.  Random single-precision
// operands are issued one per cycle; each result must appear exactly LAT
// cycles after its operands with out_valid set, and must match a
// double-precision reference rounded to single within one unit in the last
// place.  A few exact special cases are checked bit for bit.
module tb_fp_add;
  import fp_ref_pkg::*;
  localparam int unsigned LAT = 16;
  localparam int N = 2000;
  logic clk = 0, rst = 1, iv = 0, ov;
  logic [31:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;
  logic [31:0] exp_q [$];
  int          t_q   [$];
  int cyc = 0;
  logic [31:0] sa [4], sb [4], sy [4];

  fp_add #(.LAT(LAT)) dut (.clk, .en(1'b1), .rst, .in_valid(iv), .a, .b, .sub(1'b0), .out_valid(ov), .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: results arrive in order, LAT cycles after issue
  always @(posedge clk) if (!rst && ov) begin
    logic [31:0] e;
    int t;
    e = exp_q.pop_front();
    t = t_q.pop_front();
    checks++;
    if (cyc - t != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", cyc - t, LAT);
    end
    if ((e[30:23] == 8'hff || y[30:23] == 8'hff || e[30:23] == 0 || y[30:23] == 0) ? (e != y) :
        (e[31] != y[31] || ulp_diff(e, y) > 1)) begin
      failures++;
      if (failures < 10) $display("mismatch: got %h expected %h", y, e);
    end
  end

  // stimulus: operand pair k is driven in cycle k (after reset) and its
  // expected result is queued with its issue cycle
  int k = 0;
  always @(posedge clk) begin
    iv <= 1'b0;
    if (!rst && k < N + 4) begin
      logic [31:0] x, z, e;
      if (k < 4) begin
        x = sa[k]; z = sb[k]; e = sy[k];
      end else begin
        x = rand_f32(20);
        z = rand_f32(20);
        if (k % 7 == 3) z = {~x[31], x[30:23], 23'($urandom)};  // near cancellation
        e = to_f32(to_real(x) + to_real(z));
      end
      a <= x; b <= z; iv <= 1'b1;
      exp_q.push_back(e);
      t_q.push_back(cyc + 1);
      k <= k + 1;
    end
  end

  initial begin
    sa = '{32'h3f80_0000, 32'h4040_0000, 32'h7f80_0000, 32'h0000_0000};
    sb = '{32'h3f80_0000, 32'hc040_0000, 32'h3f80_0000, 32'h4000_0000};
    sy = '{32'h4000_0000, 32'h0000_0000, 32'h7f80_0000, 32'h4000_0000};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (k == N + 4);
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results never appeared", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
