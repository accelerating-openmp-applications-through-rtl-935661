// tb_omp_accel_top: end-to-end test of the fork-join accelerator at its
// default size (4 slave threads, 1 lock, 16-line L1s, 256-line L2).
//
// Runs the three case-study kernels and the introductory worksharing loop
// from data placed in the off-chip memory
// model, then has L2 write back and compares memory with results computed
// here in plain SystemVerilog:
//   1. y = A x, 8x8, static schedule (one chunk of 2 rows per thread);
//   2. y = A x, 8x8, dynamic schedule with 1-row chunks (8 tasks on 4 threads);
//   3. r = b . x, 32 elements, dynamic schedule with 2-element chunks, so P0
//      must stall when every slave receive FIFO is full;
//   4. Gauss-Seidel on a 6x6 interior grid as a single task: bit-exact
//      against a sequential reference, including the number of sweeps;
//   5. Gauss-Seidel on an 8x8 interior grid over 4 threads: the threads race
//      for the dmax lock and write neighbouring bytes of shared lines. The
//      result depends on timing, so it is checked against properties: the
//      loop ended because dmax <= eps, every value lies within the boundary
//      range and every point nearly satisfies the 5-point average;
//   6. a[i] = (b[i] + b[i+1]) / 2 for i = 0..999 under a static schedule on
//      the 4 threads, 250 iterations each. The task boundaries fall inside
//      cache lines of a, so two L1 caches write back parts of the same line.
// It counts how often each mechanism occurs and fails if one never does.
module tb_omp_accel_top;
  import omp_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done, l2_flush, l2_flush_done;
  run_cfg_t    cfg;
  word_t       result;
  logic [15:0] iterations;
  logic        mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t    mem_req;
  mem_rsp_t    mem_rsp;

  omp_accel_top dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .result, .iterations,
    .l2_flush, .l2_flush_done,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp
  );

  offchip_mem_model u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req (mem_req),
    .rsp_valid (mem_rsp_valid), .rsp (mem_rsp)
  );

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall, n_dyn, n_static, n_reduce, n_partial_wb, n_flush_list, n_flush_all;
  int n_l1_fill, n_l2_evict, n_lock_grant, n_lock_reject, n_l2_flush_wb;
  initial begin
    n_stall = 0; n_dyn = 0; n_static = 0; n_reduce = 0; n_partial_wb = 0;
    n_flush_list = 0; n_flush_all = 0; n_l1_fill = 0; n_l2_evict = 0;
    n_lock_grant = 0; n_lock_reject = 0; n_l2_flush_wb = 0;
  end

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.p0_treq_valid && !dut.p0_treq_ready) n_stall++;
    if (dut.p0_treq_valid && dut.p0_treq_ready) begin
      if (dut.p0_treq.any_free) n_dyn++; else n_static++;
    end
    if (dut.p0_trsp_valid && dut.p0_trsp_ready && dut.p0_trsp.reduction) n_reduce++;
    for (int k = 0; k <= N; k++) begin
      if (dut.l_req_valid[k] && dut.l_req_ready[k]) begin
        if (dut.l_req[k].op == L2_LINE_WRITE && dut.l_req[k].mask != '1 && dut.l_req[k].mask != '0)
          n_partial_wb++;
        if (dut.l_req[k].op == L2_LINE_READ) n_l1_fill++;
      end
      if (dut.c_req_valid[k] && dut.c_req_ready[k]) begin
        if (dut.c_req[k].op == L1_FLUSH_LIST) n_flush_list++;
        if (dut.c_req[k].op == L1_FLUSH_ALL)  n_flush_all++;
      end
    end
    for (int t = 0; t < N; t++) begin
      if (dut.t_srsp_valid[t] && dut.t_srsp_ready[t]) begin
        if (dut.t_srsp[t].owner_valid && dut.t_srsp[t].owner == tid_t'(t + 1)) n_lock_grant++;
        else if (dut.t_srsp[t].owner_valid) n_lock_reject++;
      end
    end
    if (mem_req_valid && mem_req_ready && mem_req.we) begin
      if (dut.u_l2.state_q == dut.u_l2.S_EVICT) n_l2_evict++;
      else n_l2_flush_wb++;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  task automatic do_reset();
    start = 1'b0; l2_flush = 1'b0; cfg = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  task automatic run(input run_cfg_t c, output int took);
    int t0;
    @(negedge clk);
    cfg = c; start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    took = cycles - t0;
    l2_flush = 1'b1;
    @(negedge clk);
    l2_flush = 1'b0;
    while (!l2_flush_done) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic int sval(input int lim);
    return int'($urandom_range(0, 2 * lim)) - lim;
  endfunction

  // ---------------- matrix-vector ----------------
  localparam int MV = 8;
  localparam int A_B = 'h0000, X_B = 'h0400, Y_B = 'h0800;
  int A [MV*MV];
  int X [MV];

  task automatic test_matvec(input bit dynamic, input int chunk);
    run_cfg_t c;
    int took;
    u_mem.clear();
    for (int i = 0; i < MV*MV; i++) begin A[i] = sval(20); u_mem.wr(A_B + 4*i, A[i]); end
    for (int j = 0; j < MV; j++)    begin X[j] = sval(20); u_mem.wr(X_B + 4*j, X[j]); end
    do_reset();
    c = '0;
    c.kernel = K_MATVEC; c.dynamic_sched = dynamic; c.first = 0; c.last = MV;
    c.chunk = 16'(chunk); c.n = MV; c.m = MV;
    c.base_a = A_B; c.base_b = X_B; c.base_c = Y_B;
    run(c, took);
    for (int i = 0; i < MV; i++) begin
      int s = 0;
      for (int j = 0; j < MV; j++) s += A[i*MV+j] * X[j];
      check(u_mem.rd(Y_B + 4*i) == word_t'(s),
            $sformatf("matvec dyn=%0d y[%0d]=%0d exp %0d", dynamic, i, $signed(u_mem.rd(Y_B + 4*i)), s));
    end
    check(iterations == 1, "matvec: one parallel region");
    $display("matvec dynamic=%0d chunk=%0d: %0d cycles", dynamic, chunk, took);
  endtask

  // ---------------- dot product ----------------
  localparam int DN = 32;
  localparam int B_B = 'h1000, DX_B = 'h1400, R_B = 'h1800;

  task automatic test_dot();
    run_cfg_t c;
    int took, s;
    int stall0;
    u_mem.clear();
    s = 0;
    for (int i = 0; i < DN; i++) begin
      int b, x;
      b = sval(50); x = sval(50);
      u_mem.wr(B_B + 4*i, b); u_mem.wr(DX_B + 4*i, x);
      s += b * x;
    end
    u_mem.wr(R_B, 32'hDEAD_BEEF);
    do_reset();
    c = '0;
    c.kernel = K_DOT; c.dynamic_sched = 1'b1; c.first = 0; c.last = DN; c.chunk = 2;
    c.n = DN; c.base_a = B_B; c.base_b = DX_B; c.base_c = R_B;
    stall0 = n_stall;
    run(c, took);
    check(result == word_t'(s), $sformatf("dot: result %0d exp %0d", $signed(result), s));
    check(u_mem.rd(R_B) == word_t'(s), $sformatf("dot: r in memory %0d exp %0d", $signed(u_mem.rd(R_B)), s));
    check(n_stall > stall0, "dot: 16 tasks on 4 threads must stall P0");
    $display("dot n=%0d: %0d cycles", DN, took);
  endtask

  // ---------------- Gauss-Seidel ----------------
  localparam int U_B = 'h2000, DM_B = 'h3000;
  localparam int GMAX = 10;
  int G [GMAX][GMAX];

  task automatic gs_init(input int n);
    u_mem.clear();
    for (int i = 0; i < n + 2; i++)
      for (int j = 0; j < n + 2; j++) begin
        if (i == 0)           G[i][j] = 4000;
        else if (i == n + 1)  G[i][j] = 0;
        else if (j == 0)      G[i][j] = 1000 * i;
        else if (j == n + 1)  G[i][j] = 500;
        else                  G[i][j] = 0;
        u_mem.wr(U_B + 4*(i*(n+2) + j), G[i][j]);
      end
  endtask

  task automatic test_gs_single();
    localparam int n = 6;
    localparam int EPS = 4;
    run_cfg_t c;
    int took, it, dmax;
    gs_init(n);
    // sequential reference with the same integer arithmetic
    it = 0;
    do begin
      dmax = 0;
      for (int i = 1; i <= n; i++)
        for (int j = 1; j <= n; j++) begin
          int t, v, d;
          t = G[i][j];
          v = (G[i-1][j] + G[i+1][j] + G[i][j-1] + G[i][j+1]) >>> 2;
          G[i][j] = v;
          d = (t > v) ? t - v : v - t;
          if (d > dmax) dmax = d;
        end
      it++;
    end while (dmax > EPS && it < 200);
    do_reset();
    c = '0;
    c.kernel = K_GS; c.first = 1; c.last = n + 1; c.chunk = n; c.n = n;
    c.base_a = U_B; c.base_c = DM_B; c.sid = 0; c.eps = EPS; c.max_iter = 200;
    run(c, took);
    check(iterations == 16'(it), $sformatf("gs single: %0d sweeps, exp %0d", iterations, it));
    check(result == word_t'(dmax), $sformatf("gs single: dmax %0d exp %0d", result, dmax));
    for (int i = 1; i <= n; i++)
      for (int j = 1; j <= n; j++)
        check(u_mem.rd(U_B + 4*(i*(n+2)+j)) == word_t'(G[i][j]),
              $sformatf("gs single u[%0d][%0d]=%0d exp %0d", i, j,
                        $signed(u_mem.rd(U_B + 4*(i*(n+2)+j))), G[i][j]));
    $display("gs single n=%0d: %0d sweeps, %0d cycles", n, it, took);
  endtask

  task automatic test_gs_team();
    localparam int n = 8;
    localparam int EPS = 4;
    run_cfg_t c;
    int took;
    gs_init(n);
    do_reset();
    c = '0;
    c.kernel = K_GS; c.first = 1; c.last = n + 1; c.chunk = 2; c.n = n;
    c.base_a = U_B; c.base_c = DM_B; c.sid = 0; c.eps = EPS; c.max_iter = 300;
    run(c, took);
    check($signed(result) <= EPS, $sformatf("gs team: final dmax %0d > eps", $signed(result)));
    check(iterations > 5 && iterations < 300, $sformatf("gs team: %0d sweeps", iterations));
    check(u_mem.rd(DM_B) == result, "gs team: dmax in memory equals P0's");
    for (int i = 1; i <= n; i++)
      for (int j = 1; j <= n; j++) begin
        int v, s, r;
        v = $signed(u_mem.rd(U_B + 4*(i*(n+2)+j)));
        s = $signed(u_mem.rd(U_B + 4*((i-1)*(n+2)+j))) + $signed(u_mem.rd(U_B + 4*((i+1)*(n+2)+j)))
          + $signed(u_mem.rd(U_B + 4*(i*(n+2)+j-1))) + $signed(u_mem.rd(U_B + 4*(i*(n+2)+j+1)));
        r = 4*v - s;
        check(v >= 0 && v <= 8000, $sformatf("gs team u[%0d][%0d]=%0d out of range", i, j, v));
        check(r <= 4*(2*EPS+2) && r >= -4*(2*EPS+2),
              $sformatf("gs team u[%0d][%0d] residual %0d", i, j, r));
      end
    $display("gs team n=%0d: %0d sweeps, %0d cycles", n, iterations, took);
  endtask

  // ---------------- worksharing loop a[i] = (b[i] + b[i+1]) / 2 -------------
  localparam int AVN = 1000;
  localparam int AB_B = 'h4000, AA_B = 'h5000;

  task automatic test_avg();
    run_cfg_t c;
    int took, st0, pw0;
    int b [AVN+1];
    u_mem.clear();
    for (int i = 0; i <= AVN; i++) begin b[i] = sval(100000); u_mem.wr(AB_B + 4*i, b[i]); end
    for (int i = 0; i < AVN; i++) u_mem.wr(AA_B + 4*i, 32'h5A5A_5A5A);
    do_reset();
    c = '0;
    c.kernel = K_AVG; c.first = 0; c.last = AVN; c.chunk = AVN / N; c.n = AVN;
    c.base_a = AB_B; c.base_c = AA_B;
    st0 = n_static; pw0 = n_partial_wb;
    run(c, took);
    check(n_static - st0 == N, $sformatf("avg: %0d start requests, exp %0d", n_static - st0, N));
    check(n_partial_wb > pw0, "avg: shared lines of a written back in parts");
    check(iterations == 1, "avg: one parallel region");
    for (int i = 0; i < AVN; i++)
      check(u_mem.rd(AA_B + 4*i) == word_t'((b[i] + b[i+1]) >>> 1),
            $sformatf("avg a[%0d]=%0d exp %0d", i, $signed(u_mem.rd(AA_B + 4*i)), (b[i] + b[i+1]) >>> 1));
    check(u_mem.rd(AB_B + 4*AVN) == word_t'(b[AVN]), "avg: b unchanged");
    $display("avg n=%0d: %0d cycles", AVN, took);
  endtask

  initial begin
    do_reset();
    test_matvec(1'b0, 2);
    test_matvec(1'b1, 1);
    test_dot();
    test_gs_single();
    test_gs_team();
    test_avg();

    $display("mechanisms: stall=%0d dynamic=%0d static=%0d reduction=%0d partial_wb=%0d flush_list=%0d flush_all=%0d l1_fill=%0d l2_evict=%0d lock_grant=%0d lock_reject=%0d l2_flush_wb=%0d",
             n_stall, n_dyn, n_static, n_reduce, n_partial_wb, n_flush_list, n_flush_all,
             n_l1_fill, n_l2_evict, n_lock_grant, n_lock_reject, n_l2_flush_wb);
    check(n_stall > 0,       "mechanism: task network stall");
    check(n_dyn > 0,         "mechanism: dynamic (load-balanced) dispatch");
    check(n_static > 0,      "mechanism: static dispatch");
    check(n_reduce > 0,      "mechanism: finish_reduction");
    check(n_partial_wb > 0,  "mechanism: partial-line write-back (per-byte dirty)");
    check(n_flush_list > 0,  "mechanism: flush_list");
    check(n_flush_all > 0,   "mechanism: flush_all");
    check(n_l1_fill > 0,     "mechanism: L1 miss fill");
    check(n_l2_evict > 0,    "mechanism: L2 dirty eviction");
    check(n_lock_grant > 0,  "mechanism: lock granted");
    check(n_lock_reject > 0, "mechanism: lock rejected and retried");
    check(n_l2_flush_wb > 0, "mechanism: L2 flush write-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
