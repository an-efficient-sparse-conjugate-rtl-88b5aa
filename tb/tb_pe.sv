// tb_pe: self-checking testbench for one processing element (default local
// memory depth and latencies).  It plays the role of the schedule and of the
// permutation network: it loads r and x, runs a sparse row-times-vector
// product of 20 rows with 1 to 6 nonzeros each, interleaved over the 16 adder
// slots, with random bank-conflict stalls and bubbles (cycles with the clock enable low), and then every dense
// step of a CG iteration (p'Ap, x update, r update, r'r, p update, two copies
// of p, read-out of x).  A single-precision reference, rounded operation by
// operation in the PE's order, predicts every output; outputs must appear
// with the documented latency (dot products 1+MUL_L cycles after issue,
// copy and read-out 2 cycles after issue).
module tb_pe;
  import cg_pkg::*;
  import fp_ref_pkg::*;
  localparam int ROWS = 20, ADDL = 16, MULL = 30, NCOL = 32;
  localparam int AW = $clog2(LM_DEPTH);
  logic clk = 0, rst = 1, en = 1;
  pe_op_e op;
  f32_t a_in, bcast, p_in, dot, vm_wdata, x_out;
  logic dot_valid, vm_wvalid, x_valid;
  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_bubble = 0;

  pe dut (
    .clk, .en, .rst, .cfg_rows(AW'(ROWS)), .op, .a_in, .bcast, .p_in,
    .dot_valid, .dot, .vm_wvalid, .vm_wdata, .x_valid, .x_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (en) cyc <= cyc + 1;   // counts enabled cycles
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic f32_t fm(f32_t a, f32_t b); return to_f32(to_real(a) * to_real(b)); endfunction
  function automatic f32_t fa(f32_t a, f32_t b); return to_f32(to_real(a) + to_real(b)); endfunction
  function automatic f32_t fs(f32_t a, f32_t b); return to_f32(to_real(a) - to_real(b)); endfunction

  // expected outputs: value and issue cycle
  f32_t dot_q [$], vm_q [$], x_q [$];
  int   dot_t [$], vm_t [$], x_t [$];

  task automatic cmp(f32_t got, f32_t e, int lat, int want, string what);
    checks++;
    if ((e[30:0] == 0 ? got[30:0] != 0 : (ulp_diff(got, e) > 2 || got[31] != e[31])) || lat != want) begin
      failures++;
      if (failures < 8) $display("%s: %h expected %h, latency %0d expected %0d", what, got, e, lat, want);
    end
  endtask

  always @(posedge clk) if (!rst && en) begin
    if (dot_valid) begin
      checks++;
      if (dot_q.size() == 0) failures++;
      else cmp(dot, dot_q.pop_front(), cyc - dot_t.pop_front(), 1 + MULL, "dot");
    end
    if (vm_wvalid) begin
      if (vm_q.size() == 0) begin checks++; failures++; end
      else cmp(vm_wdata, vm_q.pop_front(), cyc - vm_t.pop_front(), 2, "copy p");
    end
    if (x_valid) begin
      if (x_q.size() == 0) begin checks++; failures++; end
      else cmp(x_out, x_q.pop_front(), cyc - x_t.pop_front(), 2, "read x");
    end
  end

  // one issue slot: drive op/a_in now, p_in/bcast for it one cycle later;
  // now and then the clock enable drops for a cycle first
  f32_t p_pend, b_pend;
  task automatic issue(pe_op_e o, f32_t a, f32_t p, f32_t b);
    if (!rst && $urandom_range(15, 0) == 0) begin
      en = 0;
      @(negedge clk);
      en = 1;
      n_bubble++;
    end
    op = o; a_in = a;
    p_in = p_pend; bcast = b_pend;
    p_pend = p; b_pend = b;
    @(negedge clk);
  endtask
  task automatic idle(int n);
    repeat (n) issue(PE_NOP, 0, 0, 0);
  endtask

  f32_t pg [NCOL];            // vector p seen through the network
  f32_t av [ROWS][6];
  int   ac [ROWS][6];
  int   nnz [ROWS], done_n [ROWS];
  f32_t acc [ROWS];
  f32_t ap [ROWS], r [ROWS], x [ROWS], pl [ROWS], pn [ROWS];
  int   order;
  f32_t alpha, beta;

  initial begin
    op = PE_NOP; a_in = 0; bcast = 0; p_in = 0; p_pend = 0; b_pend = 0;
    for (int c = 0; c < NCOL; c++) pg[c] = rand_f32(3);
    for (int i = 0; i < ROWS; i++) begin
      nnz[i] = $urandom_range(6, 1);
      done_n[i] = 0;
      for (int j = 0; j < 6; j++) begin av[i][j] = rand_f32(3); ac[i][j] = $urandom_range(NCOL-1, 0); end
      r[i] = rand_f32(3); x[i] = rand_f32(3); pl[i] = rand_f32(3);
    end
    alpha = rand_f32(2); beta = rand_f32(2);
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- load r and x
    for (int k = 0; k < ROWS; k++) issue(PE_LOAD_R, r[k], 0, 0);
    for (int k = 0; k < ROWS; k++) issue(PE_LOAD_X, x[k], 0, 0);
    idle(3);
    // ---- SpMV: row i lives in adder slot i % 16; rows i and i+16 share a slot
    order = 0;
    for (int u = 0; order < ROWS; u++) begin
      int s, row;
      s = u % ADDL;
      row = -1;
      for (int i = s; i < ROWS; i += ADDL) if (done_n[i] < nnz[i]) begin row = i; break; end
      if (row < 0) begin
        issue(PE_SPMV_STALL, 0, 0, 0);
      end else if ($urandom_range(5, 0) == 0) begin
        issue(PE_SPMV_STALL, 0, 0, 0);       // bank conflict in this slot
        n_stall++;
      end else if ($urandom_range(7, 0) == 0) begin
        en = 0;                              // bubble: no control word this cycle
        @(negedge clk);
        en = 1;
        n_bubble++;
        issue(PE_SPMV_STALL, 0, 0, 0);
      end else begin
        int j;
        pe_op_e o;
        f32_t prod;
        j = done_n[row];
        prod = fm(av[row][j], pg[ac[row][j]]);
        acc[row] = (j == 0) ? prod : fa(acc[row], prod);
        if (nnz[row] == 1)          o = PE_SPMV_FL;
        else if (j == 0)            o = PE_SPMV_FIRST;
        else if (j == nnz[row] - 1) o = PE_SPMV_LAST;
        else                        o = PE_SPMV_MAC;
        issue(o, av[row][j], pg[ac[row][j]], 0);
        done_n[row]++;
        if (done_n[row] == nnz[row]) begin
          ap[order] = acc[row];             // local index = order of completion
          order++;
        end
      end
    end
    idle(60);
    // ---- p'Ap
    for (int k = 0; k < ROWS; k++) begin
      dot_q.push_back(fm(pl[k], ap[k])); dot_t.push_back(cyc);
      issue(PE_DOT_PAP, 0, pl[k], 0);
    end
    idle(5);
    // ---- x <- x + alpha p ; r <- r - alpha Ap
    for (int k = 0; k < ROWS; k++) begin
      x[k] = fa(x[k], fm(alpha, pl[k]));
      issue(PE_AXPY_X, 0, pl[k], alpha);
    end
    for (int k = 0; k < ROWS; k++) begin
      r[k] = fs(r[k], fm(alpha, ap[k]));
      issue(PE_AXPY_R, 0, 0, alpha);
    end
    idle(60);
    // ---- r'r
    for (int k = 0; k < ROWS; k++) begin
      dot_q.push_back(fm(r[k], r[k])); dot_t.push_back(cyc);
      issue(PE_DOT_RR, 0, 0, 0);
    end
    // ---- p' <- r (first direction), copy, then p' <- r + beta p, two copies
    for (int k = 0; k < ROWS; k++) issue(PE_INIT_P, 0, 0, 0);
    idle(60);
    for (int k = 0; k < ROWS; k++) begin
      vm_q.push_back(r[k]); vm_t.push_back(cyc);
      issue(PE_COPY_P, 0, 0, 0);
    end
    for (int k = 0; k < ROWS; k++) begin
      pn[k] = fa(r[k], fm(beta, pl[k]));
      issue(PE_UPDATE_P, 0, pl[k], beta);
    end
    idle(60);
    for (int k = 0; k < 2 * ROWS; k++) begin
      vm_q.push_back(pn[k % ROWS]); vm_t.push_back(cyc);
      issue(PE_COPY_P, 0, 0, 0);
    end
    // ---- read x
    for (int k = 0; k < ROWS; k++) begin
      x_q.push_back(x[k]); x_t.push_back(cyc);
      issue(PE_READ_X, 0, 0, 0);
    end
    idle(60);
    checks++;
    if (dot_q.size() || vm_q.size() || x_q.size()) begin
      failures++;
      $display("missing outputs: %0d %0d %0d", dot_q.size(), vm_q.size(), x_q.size());
    end
    checks++;
    if (n_stall == 0 || n_bubble == 0) failures++;
    $display("stalls=%0d bubbles=%0d", n_stall, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
