// cg_host_tb: test host for cg_top.  It plays the accelerator's host and its
// control-word stream: it builds a random sparse symmetric positive-definite
// system, computes the static schedule, streams the control words of a whole
// conjugate-gradient solve into the processor, and checks the result against
// a double-precision CG run on the same system.
//
// Schedule (computed once, as the architecture prescribes):
//  * index allocation: indices are taken in batches of NPE; in each batch
//    the index with the largest column workload (nonzeros) goes to the bank
//    with the smallest accumulated load, and so on; every bank receives
//    ROWS indices.  Row i and element i of r, x, p live with bank/PE bank[i].
//  * each PE's rows are split into ADD_L groups of similar nonzero count;
//    group g owns the cycles u with u mod ADD_L = g (the adder slots).
//  * SpMV allocation (Algorithm 2) per group: in every step each PE takes
//    one element of its current row whose p entry lies in a bank not yet
//    used in that step (any of the NDUP rotated copies); if none, it stalls.
//  * a row's local index is the order in which its last element issues,
//    which is where the PE stores its Ap entry; p, r and x use the same index.
//  * the Benes settings for each step come from the looping algorithm.
//  * between dependent phases the stream leaves idle gaps: write-back
//    latency, tree and reduction latency, and COPY_W cycles after the last
//    COPY_P so that the last copy of p is in the vector memory before the
//    next SpMV reads it.
// The stream also carries bubbles (in_valid low with random junk in the
// fields), which must change nothing.
//
// Mechanisms counted (each must occur): bank-conflict stalls, reads from a
// duplicate copy of p, rows with a single nonzero, bubbles, the convergence
// flag.  It prints TB_RESULT and ends the simulation.
module cg_host_tb
  import cg_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int unsigned NPE   = NPE_DEF,
  parameter int unsigned ADD_L = ADD_LAT,
  parameter int unsigned MUL_L = MUL_LAT,
  parameter int unsigned DIV_L = DIV_LAT,
  parameter int unsigned LMD   = LM_DEPTH,
  parameter int unsigned VBD   = VB_DEPTH,
  parameter int unsigned ROWS  = 4,      // rows per PE
  parameter int unsigned NDUP  = 2,      // copies of p in the vector memory
  parameter int unsigned MAXIT = 40,
  parameter int unsigned WATCHDOG = 400000,
  localparam int unsigned NSW  = (2 * $clog2(NPE) - 1) * (NPE / 2),
  localparam int unsigned VAW  = $clog2(VBD),
  localparam int unsigned LAW  = $clog2(LMD),
  localparam int unsigned LW   = $clog2(NPE)
) (
  output logic           clk,
  output logic           rst,
  output logic [LAW-1:0] cfg_rows,
  output logic [LW:0]    cfg_ndup,
  output f32_t           cfg_thresh,
  output logic           in_valid,
  output f32_t           nz       [NPE],
  output logic [NSW-1:0] pn_ctrl,
  output logic [3:0]     pe_op    [NPE],
  output logic [VAW-1:0] vm_raddr [NPE],
  output logic           vm_we    [NPE],
  output logic [1:0]     spe_op,
  output logic [1:0]     rf_bsel,
  output logic [1:0]     rf_we,
  input  logic           done,
  input  logic           x_valid  [NPE],
  input  f32_t           x_out    [NPE],
  input  f32_t           alpha,
  input  f32_t           beta,
  input  f32_t           rs_new
);
  localparam int N = NPE * ROWS;
  localparam int L = $clog2(NPE);
  localparam real THRESH = 1.0e-6;
  localparam int TREE_W = 1 + MUL_L + L * ADD_L + 4;               // dot -> SPE input
  localparam int RED_W  = (2 + $clog2(ADD_L)) * ADD_L + 4;         // REDUCE -> sum
  localparam int WB_W   = 1 + MUL_L + ADD_L + 4;                   // issue -> write-back
  localparam int COPY_W = 4;                                       // COPY_P -> vector memory written

  int checks = 0, failures = 0;
  int n_stall = 0, n_dupread = 0, n_single = 0, n_bubble = 0, n_done = 0, n_iter = 0;

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- the system --------------------------------------------
  real  A [N][N];
  int   rcol [N][$];
  f32_t rval [N][$];
  f32_t b [N];
  int   bank [N], loc [N], rowof [NPE][ROWS];

  // ---------------- Benes routing (looping algorithm) ---------------------
  function automatic logic [NSW-1:0] route(int p [NPE]);
    logic [NSW-1:0] c;
    int cur [NPE], nxt [NPE], inv [NPE];
    int sub [2][NPE];
    bit vis [NPE];
    c = '0;
    cur = p;
    for (int l = 0; l < L; l++) begin
      int n, cin, cout;
      n = NPE >> l; cin = l; cout = 2 * L - 2 - l;
      for (int bb = 0; bb < (1 << l); bb++) begin
        if (n == 2) begin
          c[cin * (NPE/2) + bb] = (cur[bb*2] == 1);
          continue;
        end
        for (int i = 0; i < n; i++) begin inv[cur[bb*n + i]] = i; vis[i] = 0; end
        for (int s0 = 0; s0 < n/2; s0++) begin
          int x, u, o, o2, x2;
          if (vis[s0]) continue;
          vis[s0] = 1; x = 2 * s0; u = 0;
          forever begin
            o = cur[bb*n + x];
            c[cout * (NPE/2) + bb*(n/2) + o/2] = 1'((o & 1) ^ u);
            sub[u][x/2] = o/2;
            o2 = o ^ 1; x2 = inv[o2];
            sub[1-u][x2/2] = o2/2;
            if (vis[x2/2]) break;
            vis[x2/2] = 1;
            c[cin * (NPE/2) + bb*(n/2) + x2/2] = 1'((x2 & 1) ^ (1 - u));
            x = x2 ^ 1;
          end
        end
        for (int i = 0; i < n/2; i++) begin
          nxt[(2*bb) * (n/2) + i] = sub[0][i];
          nxt[(2*bb+1) * (n/2) + i] = sub[1][i];
        end
      end
      if (n > 2) cur = nxt;
    end
    return c;
  endfunction

  // ---------------- control-word driver ------------------------------------
  typedef struct {
    pe_op_e op [NPE];
    f32_t   a  [NPE];
    int     rbank [NPE];   // bank read for PE k, -1 none
    int     raddr [NPE];
    logic   we;
    spe_op_e spe;
    rf_bsel_e bsel;
    rf_we_e   rfw;
    logic   ident;         // network straight through
  } word_t;

  function automatic word_t nop_word(rf_bsel_e bs);
    word_t w;
    for (int k = 0; k < NPE; k++) begin w.op[k] = PE_NOP; w.a[k] = 0; w.rbank[k] = -1; w.raddr[k] = 0; end
    w.we = 0; w.spe = SPE_NOP; w.bsel = bs; w.rfw = RF_W_NONE; w.ident = 1;
    return w;
  endfunction

  task automatic send(word_t w);
    int perm [NPE];
    bit used [NPE];
    // bubble with junk first, now and then
    if ($urandom_range(19, 0) == 0) begin
      in_valid = 0;
      for (int k = 0; k < NPE; k++) begin
        pe_op[k] = 4'($urandom); nz[k] = $urandom; vm_raddr[k] = VAW'($urandom); vm_we[k] = 1'($urandom);
      end
      spe_op = 2'($urandom); rf_we = 2'($urandom); pn_ctrl = '0;
      n_bubble++;
      @(negedge clk);
    end
    in_valid = 1;
    for (int k = 0; k < NPE; k++) begin
      pe_op[k] = w.op[k]; nz[k] = w.a[k]; vm_we[k] = w.we; vm_raddr[k] = '0; used[k] = 0; perm[k] = -1;
    end
    for (int k = 0; k < NPE; k++) if (w.rbank[k] >= 0) begin
      vm_raddr[w.rbank[k]] = VAW'(w.raddr[k]);
      perm[w.rbank[k]] = k;
      used[k] = 1;
    end
    if (w.ident) pn_ctrl = '0;
    else begin
      // complete the partial bank -> PE map to a permutation
      int f;
      f = 0;
      for (int j = 0; j < NPE; j++) if (perm[j] < 0) begin
        while (used[f]) f++;
        perm[j] = f; used[f] = 1;
      end
      pn_ctrl = route(perm);
    end
    spe_op = w.spe; rf_bsel = w.bsel; rf_we = w.rfw;
    @(negedge clk);
  endtask

  task automatic idle(int n, rf_bsel_e bs);
    repeat (n) send(nop_word(bs));
  endtask

  // dense phase: every PE runs op over its ROWS local rows; p read from its own bank
  task automatic dense(pe_op_e o, rf_bsel_e bs, bit readp, bit from_b);
    for (int j = 0; j < ROWS; j++) begin
      word_t w;
      w = nop_word(bs);
      for (int k = 0; k < NPE; k++) begin
        w.op[k] = o;
        if (from_b) w.a[k] = b[rowof[k][j]];
        if (readp) begin w.rbank[k] = k; w.raddr[k] = j; end
      end
      send(w);
    end
  endtask

  task automatic spe_cmd(spe_op_e s, rf_bsel_e bs);
    word_t w;
    w = nop_word(bs); w.spe = s; send(w);
  endtask
  task automatic rf_cmd(rf_we_e r, rf_bsel_e bs);
    word_t w;
    w = nop_word(bs); w.rfw = r; send(w);
  endtask

  // ---------------- x read-out collector -----------------------------------
  f32_t xs [NPE][ROWS];
  int   xcnt [NPE];
  always @(posedge clk) if (in_valid && !rst) begin
    for (int k = 0; k < NPE; k++) if (x_valid[k]) begin
      if (xcnt[k] < ROWS) xs[k][xcnt[k]] = x_out[k];
      xcnt[k]++;
    end
  end

  // ---------------- main ---------------------------------------------------
  // SpMV schedule storage
  word_t spmv [$];

  initial begin
    int   wl [N];
    int   bload [NPE];
    int   grp_rows [NPE][ADD_L][$];
    int   gload [ADD_L];
    int   fin_cycle [N];
    int   nsteps [ADD_L];
    int   T;
    real  xr [N], rr [N], pr [N], apr [N], rso, rsn, al, be;
    int   iters_hw;

    rst = 1; in_valid = 0;
    cfg_rows = LAW'(ROWS); cfg_ndup = (LW+1)'(NDUP); cfg_thresh = to_f32(THRESH);
    for (int k = 0; k < NPE; k++) begin
      nz[k] = 0; pe_op[k] = 0; vm_raddr[k] = 0; vm_we[k] = 0; xcnt[k] = 0;
    end
    pn_ctrl = 0; spe_op = 0; rf_bsel = 0; rf_we = 0;

    // ---- random SPD system: symmetric off-diagonals, dominant diagonal
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) A[i][j] = 0;
    for (int i = 0; i < N; i++) begin
      int kk;
      kk = (i % 5 == 0) ? 0 : $urandom_range(3, 0);
      for (int t = 0; t < kk; t++) begin
        int j;
        real v;
        j = $urandom_range(N - 1, 0);
        if (j == i) continue;
        v = to_real(to_f32((real'($urandom_range(2000, 0)) - 1000.0) / 1000.0));
        A[i][j] = v; A[j][i] = v;
      end
    end
    for (int i = 0; i < N; i++) begin
      real s;
      s = 0.5;
      for (int j = 0; j < N; j++) if (j != i) s += (A[i][j] < 0) ? -A[i][j] : A[i][j];
      A[i][i] = to_real(to_f32(s * (1.0 + real'($urandom_range(100, 0)) / 100.0)));
      for (int j = 0; j < N; j++) if (A[i][j] != 0) begin
        rcol[i].push_back(j); rval[i].push_back(to_f32(A[i][j]));
      end
      if (rcol[i].size() == 1) n_single++;
      b[i] = to_f32((real'($urandom_range(2000, 0)) - 1000.0) / 1000.0);
    end

    // ---- index allocation (batches of NPE, heaviest index -> lightest bank)
    for (int i = 0; i < N; i++) wl[i] = rcol[i].size();    // column count = row count (symmetric)
    for (int k = 0; k < NPE; k++) bload[k] = 0;
    for (int base = 0; base < N; base += NPE) begin
      int idx [NPE], bk [NPE];
      for (int t = 0; t < NPE; t++) begin idx[t] = base + t; bk[t] = t; end
      for (int a1 = 0; a1 < NPE; a1++) for (int a2 = a1 + 1; a2 < NPE; a2++) begin
        if (wl[idx[a2]] > wl[idx[a1]]) begin int tmp; tmp = idx[a1]; idx[a1] = idx[a2]; idx[a2] = tmp; end
        if (bload[bk[a2]] < bload[bk[a1]]) begin int tmp; tmp = bk[a1]; bk[a1] = bk[a2]; bk[a2] = tmp; end
      end
      for (int t = 0; t < NPE; t++) begin
        bank[idx[t]] = bk[t];
        bload[bk[t]] += wl[idx[t]];
      end
    end

    // ---- rows of each PE into ADD_L groups of similar load (heaviest first)
    for (int k = 0; k < NPE; k++) begin
      int rs [$];
      rs.delete();
      for (int i = 0; i < N; i++) if (bank[i] == k) rs.push_back(i);
      for (int q1 = 0; q1 < rs.size(); q1++)          // heaviest row first
        for (int q2 = q1 + 1; q2 < rs.size(); q2++)
          if (rcol[rs[q2]].size() > rcol[rs[q1]].size()) begin
            int tmp; tmp = rs[q1]; rs[q1] = rs[q2]; rs[q2] = tmp;
          end
      for (int g = 0; g < ADD_L; g++) gload[g] = 0;
      foreach (rs[q]) begin
        int gb;
        gb = 0;
        for (int g = 1; g < ADD_L; g++) if (gload[g] < gload[gb]) gb = g;
        grp_rows[k][gb].push_back(rs[q]);
        gload[gb] += rcol[rs[q]].size();
      end
    end

    // ---- Algorithm 2, one run per group
    begin
      typedef struct { pe_op_e op; f32_t a; int col; int d; } slot_t;
      slot_t steps [ADD_L][$][NPE];
      T = 0;
      for (int g = 0; g < ADD_L; g++) begin
        int cur [NPE];
        int cidx [NPE][$];
        int qpos [NPE];
        int m;
        bit busy;
        m = 0;
        for (int k = 0; k < NPE; k++) begin cur[k] = -1; qpos[k] = 0; end
        forever begin
          bit usedb [NPE];
          slot_t st [NPE];
          busy = 0;
          for (int k = 0; k < NPE; k++) begin
            if (cidx[k].size() == 0 && qpos[k] < grp_rows[k][g].size()) begin
              cur[k] = grp_rows[k][g][qpos[k]]; qpos[k]++;
              for (int e = 0; e < rcol[cur[k]].size(); e++) cidx[k].push_back(e);
            end
            if (cidx[k].size() != 0) busy = 1;
          end
          if (!busy) break;
          for (int j = 0; j < NPE; j++) usedb[j] = 0;
          for (int k = 0; k < NPE; k++) begin
            st[k].op = PE_SPMV_STALL; st[k].a = 0; st[k].col = -1; st[k].d = 0;
            if (cidx[k].size() == 0) continue;
            begin
              int pick, dd;
              pick = -1; dd = 0;
              for (int d = 0; d < NDUP && pick < 0; d++)
                for (int q = 0; q < cidx[k].size(); q++) begin
                  int bj;
                  bj = (bank[rcol[cur[k]][cidx[k][q]]] + d) % NPE;
                  if (!usedb[bj]) begin pick = q; dd = d; break; end
                end
              if (pick < 0) begin
                n_stall++;
                continue;
              end
              begin
                int e, first, last;
                e = cidx[k][pick];
                first = (cidx[k].size() == rcol[cur[k]].size());
                cidx[k].delete(pick);
                last = (cidx[k].size() == 0);
                usedb[(bank[rcol[cur[k]][e]] + dd) % NPE] = 1;
                if (dd > 0) n_dupread++;
                st[k].op  = (first && last) ? PE_SPMV_FL : first ? PE_SPMV_FIRST :
                            last ? PE_SPMV_LAST : PE_SPMV_MAC;
                st[k].a   = rval[cur[k]][e];
                st[k].col = rcol[cur[k]][e];
                st[k].d   = dd;
                if (last) fin_cycle[cur[k]] = m * ADD_L + g;
              end
            end
          end
          steps[g].push_back(st);
          m++;
        end
        nsteps[g] = m;
        if (m * ADD_L > T) T = m * ADD_L;
      end
      // local index of a row = order of completion within its PE
      for (int k = 0; k < NPE; k++) begin
        int rs [$];
        rs.delete();
        for (int i = 0; i < N; i++) if (bank[i] == k) rs.push_back(i);
        for (int q1 = 0; q1 < rs.size(); q1++)        // by completion cycle
          for (int q2 = q1 + 1; q2 < rs.size(); q2++)
            if (fin_cycle[rs[q2]] < fin_cycle[rs[q1]]) begin
              int tmp; tmp = rs[q1]; rs[q1] = rs[q2]; rs[q2] = tmp;
            end
        foreach (rs[q]) begin loc[rs[q]] = q; rowof[k][q] = rs[q]; end
      end
      // control words of the SpMV
      for (int u = 0; u < T; u++) begin
        word_t w;
        int g, m;
        g = u % ADD_L; m = u / ADD_L;
        w = nop_word(RF_B_ALPHA);
        w.ident = 0;
        for (int k = 0; k < NPE; k++) w.op[k] = PE_SPMV_STALL;
        if (m < nsteps[g]) for (int k = 0; k < NPE; k++) begin
          w.op[k] = steps[g][m][k].op;
          w.a[k]  = steps[g][m][k].a;
          if (steps[g][m][k].col >= 0) begin
            w.rbank[k] = (bank[steps[g][m][k].col] + steps[g][m][k].d) % NPE;
            w.raddr[k] = steps[g][m][k].d * ROWS + loc[steps[g][m][k].col];
          end
        end
        spmv.push_back(w);
      end
    end
    $display("N=%0d NPE=%0d SpMV cycles=%0d (%0d nonzeros), stalls=%0d duplicate reads=%0d",
             N, NPE, T, 0, n_stall, n_dupread);

    // ---- reference CG in double precision
    for (int i = 0; i < N; i++) begin xr[i] = 0; rr[i] = to_real(b[i]); pr[i] = rr[i]; end
    rso = 0;
    for (int i = 0; i < N; i++) rso += rr[i] * rr[i];

    // ---- run the processor
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    dense(PE_LOAD_R, RF_B_ALPHA, 0, 1);
    begin
      word_t w;
      for (int j = 0; j < ROWS; j++) begin
        w = nop_word(RF_B_ALPHA);
        for (int k = 0; k < NPE; k++) begin w.op[k] = PE_LOAD_X; w.a[k] = 0; end
        send(w);
      end
    end
    dense(PE_INIT_P, RF_B_ALPHA, 0, 0);
    idle(WB_W, RF_B_ALPHA);
    for (int j = 0; j < ROWS * NDUP; j++) begin
      word_t w;
      w = nop_word(RF_B_ALPHA);
      for (int k = 0; k < NPE; k++) w.op[k] = PE_COPY_P;
      w.we = 1;
      send(w);
    end
    dense(PE_DOT_RR, RF_B_ALPHA, 0, 0);
    idle(TREE_W, RF_B_ALPHA);
    spe_cmd(SPE_REDUCE, RF_B_ALPHA);
    idle(RED_W, RF_B_ALPHA);
    rf_cmd(RF_W_RSNEW, RF_B_ALPHA);
    rf_cmd(RF_W_BETA, RF_B_ALPHA);        // rs_old <- r0'r0

    iters_hw = 0;
    for (int it = 0; it < MAXIT; it++) begin
      // reference iteration
      for (int i = 0; i < N; i++) begin
        apr[i] = 0;
        foreach (rcol[i][q]) apr[i] += to_real(rval[i][q]) * pr[rcol[i][q]];
      end
      begin
        real pap;
        pap = 0;
        for (int i = 0; i < N; i++) pap += pr[i] * apr[i];
        al = rso / pap;
        rsn = 0;
        for (int i = 0; i < N; i++) begin
          xr[i] += al * pr[i];
          rr[i] -= al * apr[i];
          rsn += rr[i] * rr[i];
        end
        be = rsn / rso;
        for (int i = 0; i < N; i++) pr[i] = rr[i] + be * pr[i];
        rso = rsn;
      end
      // hardware iteration
      foreach (spmv[u]) send(spmv[u]);
      idle(WB_W, RF_B_ALPHA);
      dense(PE_DOT_PAP, RF_B_ALPHA, 1, 0);
      idle(TREE_W, RF_B_ALPHA);
      spe_cmd(SPE_REDUCE, RF_B_ALPHA);
      idle(RED_W, RF_B_ALPHA);
      spe_cmd(SPE_DIV, RF_B_RSOLD);        // alpha = rs_old / p'Ap
      idle(DIV_L + 3, RF_B_ALPHA);
      rf_cmd(RF_W_ALPHA, RF_B_ALPHA);
      idle(2, RF_B_ALPHA);
      checks++;
      if (!(to_real(alpha) <= al * 1.01 && to_real(alpha) >= al * 0.99)) begin
        failures++;
        $display("iteration %0d: alpha %g, reference %g", it, to_real(alpha), al);
      end
      dense(PE_AXPY_X, RF_B_ALPHA, 1, 0);
      dense(PE_AXPY_R, RF_B_ALPHA, 0, 0);
      idle(WB_W, RF_B_ALPHA);
      dense(PE_DOT_RR, RF_B_ALPHA, 0, 0);
      idle(TREE_W, RF_B_ALPHA);
      spe_cmd(SPE_REDUCE, RF_B_ALPHA);
      idle(RED_W, RF_B_ALPHA);
      rf_cmd(RF_W_RSNEW, RF_B_ALPHA);
      spe_cmd(SPE_CMP, RF_B_ALPHA);
      idle(2, RF_B_ALPHA);
      iters_hw++;
      n_iter++;
      $display("iteration %0d: rs_new %g (reference %g), done=%0d", it, to_real(rs_new), rsn, done);
      checks++;
      if (!((to_real(rs_new) <= rsn * 1.1 + 1e-9) && (to_real(rs_new) >= rsn * 0.9 - 1e-9))) begin
        failures++;
        $display("  rs_new differs from the reference");
      end
      if (done) begin n_done++; break; end
      spe_cmd(SPE_DIV, RF_B_RSNEW);        // beta = rs_new / rs_old
      idle(DIV_L + 3, RF_B_ALPHA);
      rf_cmd(RF_W_BETA, RF_B_BETA);
      dense(PE_UPDATE_P, RF_B_BETA, 1, 0);
      idle(WB_W, RF_B_ALPHA);
      for (int j = 0; j < ROWS * NDUP; j++) begin
        word_t w;
        w = nop_word(RF_B_ALPHA);
        for (int k = 0; k < NPE; k++) w.op[k] = PE_COPY_P;
        w.we = 1;
        send(w);
      end
      idle(COPY_W, RF_B_ALPHA);            // last copy lands before the next SpMV reads
    end

    // ---- read x and compare
    dense(PE_READ_X, RF_B_ALPHA, 0, 0);
    idle(4, RF_B_ALPHA);
    begin
      real xmax, res, bn;
      xmax = 0;
      for (int i = 0; i < N; i++) if ((xr[i] < 0 ? -xr[i] : xr[i]) > xmax) xmax = (xr[i] < 0 ? -xr[i] : xr[i]);
      for (int k = 0; k < NPE; k++) begin
        checks++;
        if (xcnt[k] != ROWS) begin failures++; $display("PE %0d returned %0d x values", k, xcnt[k]); end
        for (int j = 0; j < ROWS; j++) begin
          real d;
          d = to_real(xs[k][j]) - xr[rowof[k][j]];
          if (d < 0) d = -d;
          checks++;
          if (d > 1e-3 * xmax + 1e-6) begin
            failures++;
            if (failures < 10) $display("x[%0d] = %g, reference %g", rowof[k][j], to_real(xs[k][j]), xr[rowof[k][j]]);
          end
        end
      end
      // true residual of the hardware solution
      res = 0; bn = 0;
      for (int i = 0; i < N; i++) begin
        real s;
        s = to_real(b[i]);
        foreach (rcol[i][q]) s -= to_real(rval[i][q]) * to_real(xs[bank[rcol[i][q]]][loc[rcol[i][q]]]);
        res += s * s;
        bn += to_real(b[i]) * to_real(b[i]);
      end
      $display("iterations=%0d  |b-Ax|^2=%g  |b|^2=%g", iters_hw, res, bn);
      checks++;
      if (res > 1e-4 * bn) failures++;
    end
    $display("mechanisms: stalls=%0d duplicate_reads=%0d single_nonzero_rows=%0d bubbles=%0d done=%0d iterations=%0d",
             n_stall, n_dupread, n_single, n_bubble, n_done, n_iter);
    checks += 5;
    if (n_stall == 0)   begin failures++; $display("no stall happened"); end
    if (n_dupread == 0) begin failures++; $display("no duplicate read happened"); end
    if (n_single == 0)  begin failures++; $display("no single-nonzero row"); end
    if (n_bubble == 0)  begin failures++; $display("no bubble happened"); end
    if (n_done == 0)    begin failures++; $display("convergence flag never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
