// tb_nested_master: sub-master P_i-P0 with 3 subthreads. A behavioural L1
// port holds the data of its own share; behavioural subthreads answer each
// subthread start request after a random delay with a partial sum derived
// from lo and hi. Checked: the task is split into 4 nearly equal parts (own
// part first, then subthreads 1..3 in order); the own part is computed
// correctly; the finish_reduction sent upward carries own + subthread sums
// and is not sent before the last subthread has finished; short tasks send
// fewer subthread requests; a matrix-vector task gives a plain finish.
module tb_nested_master;
  import omp_pkg::*;
  localparam int NSUB = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic task_req_valid, task_req_ready, task_rsp_valid, task_rsp_ready;
  task_req_t task_req; task_rsp_t task_rsp;
  logic sub_req_valid, sub_req_ready, sub_rsp_valid, sub_rsp_ready;
  task_req_t sub_req; task_rsp_t sub_rsp;
  logic l1_req_valid, l1_req_ready, l1_rsp_valid, l1_rsp_ready;
  l1_req_t l1_req; l1_rsp_t l1_rsp;
  logic sync_req_valid, sync_req_ready, sync_rsp_valid, sync_rsp_ready, busy;
  sync_req_t sync_req; sync_rsp_t sync_rsp;
  int checks = 0, failures = 0;

  nested_master #(.TID(1), .NSUB(NSUB)) dut (.*);
  l1_port_model u_l1 (.clk, .rst_n, .req_valid (l1_req_valid), .req_ready (l1_req_ready),
                      .req (l1_req), .rsp_valid (l1_rsp_valid), .rsp_ready (l1_rsp_ready),
                      .rsp (l1_rsp));
  assign sync_req_ready = 1'b0;    // no critical region in these tasks
  assign sync_rsp_valid = 1'b0;
  assign sync_rsp       = '0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // behavioural subthreads
  task_req_t got [$];
  task_req_t pend [$];
  int outstanding;
  bit rdy;
  assign sub_req_ready = rdy;
  always @(posedge clk) if (rst_n) begin
    rdy <= ($urandom_range(0, 2) != 0);
    if (sub_req_valid && sub_req_ready) begin got.push_back(sub_req); pend.push_back(sub_req); end
    if (sub_rsp_valid && sub_rsp_ready) begin sub_rsp_valid <= 0; void'(pend.pop_front()); end
    else if (!sub_rsp_valid && pend.size() > 0 && $urandom_range(0, 9) == 0) begin
      sub_rsp_valid <= 1;
      sub_rsp <= '{src: pend[0].dest, reduction: pend[0].kernel == K_DOT,
                   value: word_t'(pend[0].lo * 1000 + pend[0].hi)};
    end
    if (task_rsp_valid) chk(pend.size() == 0 && !sub_rsp_valid, "finish only after every subthread finished");
  end

  task automatic run(input task_req_t t, output task_rsp_t r);
    @(negedge clk); task_req_valid = 1; task_req = t;
    while (!task_req_ready) @(negedge clk);
    @(negedge clk); task_req_valid = 0;
    while (!task_rsp_valid) @(negedge clk);
    r = task_rsp;
    @(negedge clk);
  endtask

  initial begin
    task_req_t t; task_rsp_t r;
    int B [64], X [64];
    task_req_valid = 0; task_req = '0; task_rsp_ready = 1; sub_rsp_valid = 0; sub_rsp = '0;
    for (int i = 0; i < 4096; i++) u_l1.mem[i] = '0;
    for (int i = 0; i < 64; i++) begin
      B[i] = int'($urandom_range(0, 40)) - 20; X[i] = int'($urandom_range(0, 40)) - 20;
      u_l1.mem['h100/4 + i] = B[i]; u_l1.mem['h200/4 + i] = X[i];
    end
    repeat (2) @(posedge clk); rst_n = 1;

    for (int tc = 0; tc < 3; tc++) begin
      int lo, hi, len, part, own_hi, s, k, p;
      lo = (tc == 0) ? 5 : (tc == 1) ? 10 : 20;
      hi = (tc == 0) ? 23 : (tc == 1) ? 12 : 60;
      got.delete();
      t = '0; t.kernel = K_DOT; t.lo = 16'(lo); t.hi = 16'(hi); t.base_a = 'h100; t.base_b = 'h200;
      run(t, r);
      len = hi - lo; part = (len + NSUB) / (NSUB + 1);
      own_hi = (lo + part < hi) ? lo + part : hi;
      s = 0;
      for (int i = lo; i < own_hi; i++) s += B[i] * X[i];
      k = 0;
      for (p = own_hi; p < hi; p += part) begin
        int ph; ph = (p + part < hi) ? p + part : hi;
        chk(k < got.size() && got[k].lo == 16'(p) && got[k].hi == 16'(ph) && got[k].dest == tid_t'(k + 1) && !got[k].any_free,
            $sformatf("task %0d sub %0d: %0d..%0d to %0d, exp %0d..%0d to %0d", tc, k,
                      k < got.size() ? got[k].lo : 0, k < got.size() ? got[k].hi : 0,
                      k < got.size() ? got[k].dest : 0, p, ph, k + 1));
        s += p * 1000 + ph;
        k++;
      end
      chk(got.size() == k, $sformatf("task %0d: %0d subthread requests, exp %0d", tc, got.size(), k));
      chk(r.src == 1 && r.reduction && r.value == word_t'(s),
          $sformatf("task %0d: finish_reduction %0d exp %0d", tc, $signed(r.value), s));
    end
    // matrix-vector task: plain finish, own rows written through LL_i
    got.delete();
    t = '0; t.kernel = K_MATVEC; t.lo = 0; t.hi = 8; t.m = 1; t.base_a = 'h100; t.base_b = 'h200; t.base_c = 'h400;
    run(t, r);
    chk(!r.reduction, "matvec: plain finish");
    for (int i = 0; i < 2; i++) chk(u_l1.mem['h400/4 + i] == word_t'(B[i] * X[0]), $sformatf("own row %0d", i));
    chk(u_l1.mem['h400/4 + 2] == 0, "rows of subthreads not computed locally");
    chk(got.size() == 3, "three subthread requests for 8 rows");
    chk(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
