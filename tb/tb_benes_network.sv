// tb_benes_network: self-checking testbench for benes_network at N = 128.
// For each random permutation the testbench computes the switch settings
// with the classic looping algorithm (level by level: route the two words of
// every input switch through different sub-networks, close each loop through
// the output switches, then recurse into the two sub-permutations), applies
// them, and checks that every input word reaches its target output.  The
// all-zero setting must be the identity.
module tb_benes_network;
  localparam int N   = 128;
  localparam int W   = 32;
  localparam int L   = $clog2(N);
  localparam int NSW = (2 * L - 1) * (N / 2);
  localparam int TRIALS = 300;

  logic           clk = 0;
  logic [NSW-1:0] ctrl;
  logic [W-1:0]   din  [N];
  logic [W-1:0]   dout [N];
  int checks = 0, failures = 0;
  int perm [N];

  benes_network #(.N(N), .W(W)) dut (.ctrl, .din, .dout);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // switch settings that send input i to output p[i]
  function automatic logic [NSW-1:0] route(int p [N]);
    logic [NSW-1:0] c;
    int cur [N], nxt [N], inv [N];
    int sub [2][N];
    bit vis [N];
    c = '0;
    cur = p;
    for (int l = 0; l < L; l++) begin
      int n, cin, cout;
      n    = N >> l;
      cin  = l;
      cout = 2 * L - 2 - l;
      for (int b = 0; b < (1 << l); b++) begin
        if (n == 2) begin
          c[cin * (N/2) + b] = (cur[b*2] == 1);
          continue;
        end
        for (int i = 0; i < n; i++) begin
          inv[cur[b*n + i]] = i;
          vis[i] = 0;
        end
        for (int s0 = 0; s0 < n/2; s0++) begin
          int x, u, o, o2, x2;
          if (vis[s0]) continue;
          vis[s0] = 1;
          x = 2 * s0;
          u = 0;
          c[cin * (N/2) + b*(n/2) + s0] = 1'b0;
          forever begin
            o = cur[b*n + x];
            c[cout * (N/2) + b*(n/2) + o/2] = 1'((o & 1) ^ u);
            sub[u][x/2] = o/2;
            o2 = o ^ 1;
            x2 = inv[o2];
            sub[1-u][x2/2] = o2/2;
            if (vis[x2/2]) break;
            vis[x2/2] = 1;
            c[cin * (N/2) + b*(n/2) + x2/2] = 1'((x2 & 1) ^ (1 - u));
            x = x2 ^ 1;
          end
        end
        for (int i = 0; i < n/2; i++) begin
          nxt[(2*b)   * (n/2) + i] = sub[0][i];
          nxt[(2*b+1) * (n/2) + i] = sub[1][i];
        end
      end
      if (n > 2) cur = nxt;
    end
    return c;
  endfunction

  initial begin
    // identity with all switches straight
    ctrl = '0;
    for (int i = 0; i < N; i++) din[i] = $urandom;
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (dout[i] !== din[i]) failures++;
    end
    for (int t = 0; t < TRIALS; t++) begin
      // random permutation (Fisher-Yates); some trials use a shift or reversal
      for (int i = 0; i < N; i++) perm[i] = i;
      if (t % 10 == 1)      for (int i = 0; i < N; i++) perm[i] = (i + t) % N;
      else if (t % 10 == 2) for (int i = 0; i < N; i++) perm[i] = N - 1 - i;
      else begin
        for (int i = N - 1; i > 0; i--) begin
          int j, tmp;
          j = $urandom_range(i, 0);
          tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
        end
      end
      for (int i = 0; i < N; i++) din[i] = $urandom;
      ctrl = route(perm);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dout[perm[i]] !== din[i]) begin
          failures++;
          if (failures < 5) $display("trial %0d: input %0d did not reach output %0d", t, i, perm[i]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
