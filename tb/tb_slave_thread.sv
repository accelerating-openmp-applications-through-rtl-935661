// tb_slave_thread: slave thread 2 with a behavioural L1 port and a
// behavioural lock unit that rejects the first two requests of every
// critical region. Runs a matrix-vector task, a dot-product task and one
// Gauss-Seidel sweep over two rows and a slice of the averaging loop
// a[i] = (b[i]+b[i+1])/2, and compares memory and the finish responses with
// results computed here. Also checked: flush_all before every
// finish response; in the critical region flush_list before the dmax load and
// before the release; dmax touched only while the lock is held; and the
// two queued start requests run one after the other.
module tb_slave_thread;
  import omp_pkg::*;
  localparam int TID = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic task_req_valid, task_req_ready, task_rsp_valid, task_rsp_ready;
  task_req_t task_req; task_rsp_t task_rsp;
  logic l1_req_valid, l1_req_ready, l1_rsp_valid, l1_rsp_ready;
  l1_req_t l1_req; l1_rsp_t l1_rsp;
  logic sync_req_valid, sync_req_ready, sync_rsp_valid, sync_rsp_ready, busy;
  sync_req_t sync_req; sync_rsp_t sync_rsp;
  int checks = 0, failures = 0;

  slave_thread #(.TID(TID)) dut (.*);
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

  // behavioural lock: reject twice, then grant; release answers NULL
  bit held; int rejects; int n_grant, n_reject;
  localparam int DM = 'h3F0;
  assign sync_req_ready = !sync_rsp_valid;
  always @(posedge clk) if (rst_n) begin
    if (sync_rsp_valid && sync_rsp_ready) sync_rsp_valid <= 0;
    if (sync_req_valid && sync_req_ready) begin
      sync_rsp_valid <= 1;
      chk(sync_req.tid == tid_t'(TID) && sync_req.sid == 3, "sync request carries threadID and synchID");
      if (held) begin
        held <= 0; sync_rsp <= '{tid: tid_t'(TID), owner_valid: 1'b0, owner: '0};
      end else if (rejects < 2) begin
        rejects <= rejects + 1; n_reject++;
        sync_rsp <= '{tid: tid_t'(TID), owner_valid: 1'b1, owner: tid_t'(7)};
      end else begin
        rejects <= 0; held <= 1; n_grant++;
        sync_rsp <= '{tid: tid_t'(TID), owner_valid: 1'b1, owner: tid_t'(TID)};
      end
    end
  end

  // protocol monitor on the L1 port
  l1_op_e last_op; addr_t last_addr; int n_fin, n_fin_after_flush, cr_ok, cr_bad;
  always @(posedge clk) if (rst_n) begin
    if (l1_req_valid && l1_req_ready) begin
      if (l1_req.addr == DM && l1_req.op != L1_FLUSH_ALL) begin
        if (held) cr_ok++; else cr_bad++;
        if (l1_req.op == L1_LOAD) chk(last_op == L1_FLUSH_LIST && last_addr == DM, "flush_list before dmax load");
      end
      last_op <= l1_req.op; last_addr <= l1_req.addr;
    end
    if (sync_req_valid && sync_req_ready && held)
      chk(last_op == L1_FLUSH_LIST && last_addr == DM, "flush_list before release");
    if (task_rsp_valid && task_rsp_ready) begin
      n_fin++;
      if (last_op == L1_FLUSH_ALL) n_fin_after_flush++;
    end
  end

  task automatic send(input task_req_t t);
    @(negedge clk); task_req_valid = 1; task_req = t;
    while (!task_req_ready) @(negedge clk);
    @(negedge clk); task_req_valid = 0;
  endtask

  task automatic wait_fin(output task_rsp_t r);
    while (!task_rsp_valid) @(negedge clk);
    r = task_rsp;
    @(negedge clk);
  endtask

  function automatic int rdw(input int a); return $signed(u_l1.mem[a / 4]); endfunction

  initial begin
    task_req_t t; task_rsp_t r;
    int A [20], X [5], B [10], DX [10], U [6][6];
    int s, dm;
    task_req_valid = 0; task_req = '0; task_rsp_ready = 1;
    sync_rsp_valid = 0; sync_rsp = '0; held = 0; rejects = 0; n_grant = 0; n_reject = 0;
    n_fin = 0; n_fin_after_flush = 0; cr_ok = 0; cr_bad = 0;
    for (int i = 0; i < 4096; i++) u_l1.mem[i] = '0;
    // matrix 4x5 at 0x000, x at 0x100, y at 0x180
    for (int i = 0; i < 20; i++) begin A[i] = int'($urandom_range(0, 40)) - 20; u_l1.mem[i] = A[i]; end
    for (int j = 0; j < 5; j++) begin X[j] = int'($urandom_range(0, 40)) - 20; u_l1.mem['h100/4 + j] = X[j]; end
    // dot vectors at 0x200, 0x280
    for (int i = 0; i < 10; i++) begin
      B[i] = int'($urandom_range(0, 200)) - 100; DX[i] = int'($urandom_range(0, 200)) - 100;
      u_l1.mem['h200/4 + i] = B[i]; u_l1.mem['h280/4 + i] = DX[i];
    end
    // 6x6 grid (n = 4) at 0x300, dmax at DM
    for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) begin
      U[i][j] = (i == 0) ? 800 : (j == 5 ? 400 : int'($urandom_range(0, 100)));
      u_l1.mem['h300/4 + i*6 + j] = U[i][j];
    end
    u_l1.mem[DM/4] = 3;
    repeat (2) @(posedge clk); rst_n = 1;

    // two tasks queued back to back: matvec rows 1..3, then dot 3..9
    t = '0; t.kernel = K_MATVEC; t.lo = 1; t.hi = 4; t.n = 4; t.m = 5;
    t.base_a = 'h000; t.base_b = 'h100; t.base_c = 'h180;
    send(t);
    t = '0; t.kernel = K_DOT; t.lo = 3; t.hi = 10; t.n = 10;
    t.base_a = 'h200; t.base_b = 'h280;
    send(t);
    wait_fin(r);
    chk(r.src == tid_t'(TID) && !r.reduction, "matvec: plain finish response");
    for (int i = 0; i < 4; i++) begin
      s = 0;
      for (int j = 0; j < 5; j++) s += A[i*5+j] * X[j];
      if (i >= 1) chk(rdw('h180 + 4*i) == s, $sformatf("y[%0d]=%0d exp %0d", i, rdw('h180 + 4*i), s));
      else        chk(rdw('h180) == 0, "row outside the chunk untouched");
    end
    wait_fin(r);
    s = 0;
    for (int i = 3; i < 10; i++) s += B[i] * DX[i];
    chk(r.reduction && r.value == word_t'(s), $sformatf("dot: finish_reduction %0d exp %0d", $signed(r.value), s));

    // one Gauss-Seidel sweep over rows 2..3
    t = '0; t.kernel = K_GS; t.lo = 2; t.hi = 4; t.n = 4; t.base_a = 'h300; t.base_c = DM; t.sid = 3;
    send(t);
    wait_fin(r);
    dm = 3;
    for (int i = 2; i < 4; i++) begin
      int dl; dl = 0;
      for (int j = 1; j <= 4; j++) begin
        int o, v, d;
        o = U[i][j];
        v = (U[i-1][j] + U[i+1][j] + U[i][j-1] + U[i][j+1]) >>> 2;
        U[i][j] = v;
        d = (o > v) ? o - v : v - o;
        if (d > dl) dl = d;
      end
      if (dm < dl) dm = dl;
    end
    for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++)
      chk(rdw('h300 + 4*(i*6+j)) == U[i][j], $sformatf("u[%0d][%0d]=%0d exp %0d", i, j, rdw('h300 + 4*(i*6+j)), U[i][j]));
    chk(rdw(DM) == dm, $sformatf("dmax %0d exp %0d", rdw(DM), dm));
    // averaging loop, i = 5..12, b at 0x400, a at 0x500
    begin
      int AV [16];
      for (int i = 0; i < 16; i++) begin
        AV[i] = int'($urandom_range(0, 2000)) - 1000 - (i == 7 ? 100000 : 0);
        u_l1.mem['h400/4 + i] = AV[i];
      end
      t = '0; t.kernel = K_AVG; t.lo = 5; t.hi = 13; t.base_a = 'h400; t.base_c = 'h500;
      send(t);
      wait_fin(r);
      chk(!r.reduction, "avg: plain finish response");
      for (int i = 0; i < 16; i++)
        if (i >= 5 && i < 13) chk(rdw('h500 + 4*i) == ((AV[i] + AV[i+1]) >>> 1),
                                   $sformatf("a[%0d]=%0d exp %0d", i, rdw('h500 + 4*i), (AV[i] + AV[i+1]) >>> 1));
        else                  chk(rdw('h500 + 4*i) == 0, "a outside the slice untouched");
    end
    chk(n_grant == 2 && n_reject == 4, $sformatf("critical entered %0d times after %0d rejects", n_grant, n_reject));
    chk(cr_bad == 0 && cr_ok > 0, "dmax accessed only inside the critical region");
    chk(n_fin == 4 && n_fin_after_flush == 4, "flush_all before every finish");
    chk(!busy, "idle after the last task");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
