// tb_omp_accel_nested: the accelerator with two-level nested parallelism:
// 2 slave positions, each a sub-master with 2 subthreads (6 threads in all).
// Runs y = A x (12x6, one 6-row chunk per position, split three ways by each
// sub-master), a 40-element dot product (5 load-balanced chunks, partial
// sums added at both levels) and Gauss-Seidel on an 8x8 grid, whose lock is
// contended by all 6 threads. Results are checked as in the flat test, and
// the test fails if no subthread start request or subthread finish was seen.
module tb_omp_accel_nested;
  import omp_pkg::*;

  localparam int N = 2, NSUB = 2, NT = N * (1 + NSUB);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done, l2_flush, l2_flush_done;
  run_cfg_t    cfg;
  word_t       result;
  logic [15:0] iterations;
  logic        mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t    mem_req;
  mem_rsp_t    mem_rsp;

  omp_accel_top #(.N(N), .NSUB(NSUB)) dut (
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
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_sub_start, n_sub_finish, n_grant_sub;
  initial begin n_sub_start = 0; n_sub_finish = 0; n_grant_sub = 0; end
  always @(posedge clk) if (rst_n) begin
    if (dut.g_slave[0].g_nested.sub_req_valid && dut.g_slave[0].g_nested.sub_req_ready) n_sub_start++;
    if (dut.g_slave[1].g_nested.sub_req_valid && dut.g_slave[1].g_nested.sub_req_ready) n_sub_start++;
    if (dut.g_slave[0].g_nested.sub_rsp_valid) n_sub_finish++;
    if (dut.g_slave[1].g_nested.sub_rsp_valid) n_sub_finish++;
    for (int t = N; t < NT; t++)
      if (dut.t_srsp_valid[t] && dut.t_srsp[t].owner_valid && dut.t_srsp[t].owner == tid_t'(t + 1)) n_grant_sub++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    start = 1'b0; l2_flush = 1'b0; cfg = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  task automatic run(input run_cfg_t c);
    @(negedge clk);
    cfg = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    l2_flush = 1'b1;
    @(negedge clk);
    l2_flush = 1'b0;
    while (!l2_flush_done) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic int sval(input int lim);
    return int'($urandom_range(0, 2 * lim)) - lim;
  endfunction

  initial begin
    run_cfg_t c;
    int A [72], X [6], s;
    // ---- y = A x, 12 x 6 ----
    u_mem.clear();
    for (int i = 0; i < 72; i++) begin A[i] = sval(30); u_mem.wr('h000 + 4*i, A[i]); end
    for (int j = 0; j < 6; j++)  begin X[j] = sval(30); u_mem.wr('h400 + 4*j, X[j]); end
    do_reset();
    c = '0; c.kernel = K_MATVEC; c.first = 0; c.last = 12; c.chunk = 6; c.n = 12; c.m = 6;
    c.base_a = 'h000; c.base_b = 'h400; c.base_c = 'h800;
    run(c);
    for (int i = 0; i < 12; i++) begin
      s = 0;
      for (int j = 0; j < 6; j++) s += A[i*6+j] * X[j];
      check(u_mem.rd('h800 + 4*i) == word_t'(s), $sformatf("y[%0d]=%0d exp %0d", i, $signed(u_mem.rd('h800 + 4*i)), s));
    end
    // ---- dot product, 40 elements, dynamic chunks of 8 ----
    u_mem.clear();
    s = 0;
    for (int i = 0; i < 40; i++) begin
      int b, x;
      b = sval(60); x = sval(60);
      u_mem.wr('h1000 + 4*i, b); u_mem.wr('h1400 + 4*i, x);
      s += b * x;
    end
    do_reset();
    c = '0; c.kernel = K_DOT; c.dynamic_sched = 1; c.first = 0; c.last = 40; c.chunk = 8; c.n = 40;
    c.base_a = 'h1000; c.base_b = 'h1400; c.base_c = 'h1800;
    run(c);
    check(result == word_t'(s) && u_mem.rd('h1800) == word_t'(s), $sformatf("dot %0d exp %0d", $signed(result), s));
    // ---- Gauss-Seidel 8x8 over all 6 threads ----
    u_mem.clear();
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        u_mem.wr('h2000 + 4*(i*10 + j), (i == 0) ? 4000 : (j == 0 ? 1000 * (i % 9) : (j == 9 ? 500 : 0)));
    do_reset();
    c = '0; c.kernel = K_GS; c.first = 1; c.last = 9; c.chunk = 4; c.n = 8;
    c.base_a = 'h2000; c.base_c = 'h3000; c.eps = 4; c.max_iter = 300;
    run(c);
    check($signed(result) <= 4 && iterations > 5 && iterations < 300,
          $sformatf("gs: %0d sweeps, dmax %0d", iterations, $signed(result)));
    for (int i = 1; i <= 8; i++)
      for (int j = 1; j <= 8; j++) begin
        int v, r;
        v = $signed(u_mem.rd('h2000 + 4*(i*10+j)));
        r = 4*v - ($signed(u_mem.rd('h2000 + 4*((i-1)*10+j))) + $signed(u_mem.rd('h2000 + 4*((i+1)*10+j)))
                 + $signed(u_mem.rd('h2000 + 4*(i*10+j-1))) + $signed(u_mem.rd('h2000 + 4*(i*10+j+1))));
        check(v >= 0 && v <= 8000 && r <= 40 && r >= -40, $sformatf("gs u[%0d][%0d]=%0d residual %0d", i, j, v, r));
      end
    $display("nested: subthread starts=%0d finishes=%0d subthread lock grants=%0d", n_sub_start, n_sub_finish, n_grant_sub);
    check(n_sub_start > 0 && n_sub_start == n_sub_finish, "subthread start requests all finished");
    check(n_grant_sub > 0, "subthreads entered the critical region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
