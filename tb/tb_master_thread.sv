// tb_master_thread: P0 with 3 slave positions. Behavioural slaves take start
// requests with random back-pressure and answer with finish responses after
// a random delay; a behavioural L1 port stands in for P0's cache. Checked:
// the chunks (lo, hi) and, for static scheduling, the destinations
// (k mod N)+1; that the entry flush_all comes before the first start request
// of every region; the reduction sum and its store; the Gauss-Seidel loop
// stopping at the first dmax <= eps; and that P0 stalls while the network
// refuses requests.
module tb_master_thread;
  import omp_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  run_cfg_t cfg;
  word_t result;
  logic [15:0] iterations;
  logic task_req_valid, task_req_ready, task_rsp_valid, task_rsp_ready;
  task_req_t task_req; task_rsp_t task_rsp;
  logic l1_req_valid, l1_req_ready, l1_rsp_valid, l1_rsp_ready;
  l1_req_t l1_req; l1_rsp_t l1_rsp;
  int checks = 0, failures = 0;

  master_thread #(.N(N)) dut (.*);
  l1_port_model u_l1 (.clk, .rst_n, .req_valid (l1_req_valid), .req_ready (l1_req_ready),
                      .req (l1_req), .rsp_valid (l1_rsp_valid), .rsp_ready (l1_rsp_ready),
                      .rsp (l1_rsp));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // behavioural slaves
  task_req_t got [$];
  task_req_t pendq [$];
  int region_starts, flush_at_start, stalls;
  word_t dmax_sched [$];
  localparam int DM_W = 'h200;
  bit rdy_rnd;
  assign task_req_ready = rdy_rnd && pendq.size() < 4;
  always @(posedge clk) if (rst_n) begin
    rdy_rnd <= ($urandom_range(0, 3) != 0);
    if (task_req_valid && !task_req_ready) stalls++;
    if (task_req_valid && task_req_ready) begin
      got.push_back(task_req);
      pendq.push_back(task_req);
    end
    if (task_rsp_valid && task_rsp_ready) begin
      void'(pendq.pop_front());
      task_rsp_valid <= 0;
    end else if (!task_rsp_valid && pendq.size() > 0 && $urandom_range(0, 2) == 0) begin
      task_rsp_valid <= 1;
      task_rsp <= '{src: tid_t'(1), reduction: (pendq[0].kernel == K_DOT),
                     value: word_t'(pendq[0].lo * 100 + pendq[0].hi)};
    end
  end

  // entry flush_all must precede the first start request of a region
  int fa_seen;
  bit in_region;
  always @(posedge clk) if (rst_n) begin
    if (l1_req_valid && l1_req_ready && l1_req.op == L1_FLUSH_ALL) begin fa_seen++; in_region = 0; end
    if (task_req_valid && task_req_ready && !in_region) begin
      in_region = 1;
      region_starts++;
      if (fa_seen == region_starts) flush_at_start++;
      if (task_req.kernel == K_GS && dmax_sched.size() > 0) u_l1.mem[DM_W / 4] = dmax_sched.pop_front();
    end
  end

  task automatic run(input run_cfg_t c);
    @(negedge clk); cfg = c; start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic check_chunks(input run_cfg_t c, input int regions);
    int k, lo;
    k = 0;
    for (int r = 0; r < regions; r++) begin
      lo = c.first;
      for (int t = 0; lo < c.last; t++) begin
        int hi;
        hi = (c.last - lo > c.chunk) ? lo + c.chunk : c.last;
        chk(k < got.size(), "enough start requests");
        if (k < got.size()) begin
          chk(got[k].lo == 16'(lo) && got[k].hi == 16'(hi),
              $sformatf("chunk %0d: %0d..%0d exp %0d..%0d", t, got[k].lo, got[k].hi, lo, hi));
          chk(got[k].any_free == c.dynamic_sched, "scheduling mode flag");
          if (!c.dynamic_sched) chk(got[k].dest == tid_t'(t % N + 1), $sformatf("static dest %0d", got[k].dest));
          chk(got[k].kernel == c.kernel && got[k].base_a == c.base_a && got[k].base_c == c.base_c, "parameters forwarded");
        end
        k++; lo = hi;
      end
    end
    chk(k == got.size(), $sformatf("%0d start requests, expected %0d", got.size(), k));
  endtask

  initial begin
    run_cfg_t c;
    int s;
    start = 0; cfg = '0; task_rsp_valid = 0; task_rsp = '0;
    region_starts = 0; flush_at_start = 0; stalls = 0; fa_seen = 0; in_region = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // static matrix-vector: 10 rows, chunks of 3 -> 4 tasks on 3 slaves
    c = '0; c.kernel = K_MATVEC; c.first = 0; c.last = 10; c.chunk = 3; c.n = 10; c.m = 10;
    c.base_a = 'h10; c.base_b = 'h20; c.base_c = 'h30;
    got.delete(); run(c);
    check_chunks(c, 1);
    chk(iterations == 1, "one region");

    // dynamic dot product: 0..17 in chunks of 4 -> 5 tasks
    c = '0; c.kernel = K_DOT; c.dynamic_sched = 1; c.first = 0; c.last = 17; c.chunk = 4; c.n = 17;
    c.base_a = 'h40; c.base_b = 'h80; c.base_c = 'h100;
    got.delete(); run(c);
    check_chunks(c, 1);
    s = 0;
    for (int lo = 0; lo < 17; lo += 4) s += lo * 100 + ((lo + 4 > 17) ? 17 : lo + 4);
    chk(result == word_t'(s), $sformatf("reduction %0d exp %0d", result, s));
    chk(u_l1.mem['h100 / 4] == word_t'(s), "r stored through the L1 port");
    chk(u_l1.last_req.op == L1_FLUSH_LIST && u_l1.last_req.addr == 'h100, "r flushed last");

    // Gauss-Seidel loop: dmax sequence 90, 40, 7, 3 with eps 5 -> 4 sweeps
    dmax_sched = '{90, 40, 7, 3, 1, 1};
    c = '0; c.kernel = K_GS; c.first = 1; c.last = 7; c.chunk = 2; c.n = 6;
    c.base_a = 'h400; c.base_c = DM_W; c.eps = 5; c.max_iter = 50;
    got.delete(); run(c);
    chk(iterations == 4, $sformatf("gs: %0d sweeps, expected 4", iterations));
    chk(result == 3, $sformatf("gs: final dmax %0d", result));
    check_chunks(c, 4);
    // iteration limit
    dmax_sched = '{90, 80, 70, 60};
    c.max_iter = 2;
    got.delete(); run(c);
    chk(iterations == 2 && result == 80, $sformatf("gs limit: %0d sweeps, dmax %0d", iterations, result));

    chk(flush_at_start == region_starts && region_starts == 8,
        $sformatf("entry flush before the fork in %0d of %0d regions", flush_at_start, region_starts));
    chk(stalls > 0, "P0 stalled on a refusing task network");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
