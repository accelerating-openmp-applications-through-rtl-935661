// tb_task_net: static delivery to the named slave, load-balanced delivery to
// a slave with a free receive slot only, stalling when none is free, and the
// merge of finish responses (none lost, none duplicated).
module tb_task_net;
  import omp_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic p0_req_valid, p0_req_ready, p0_rsp_valid, p0_rsp_ready;
  task_req_t p0_req, s_req;
  task_rsp_t p0_rsp;
  logic [N-1:0] s_req_valid, s_req_ready, s_rsp_valid, s_rsp_ready;
  task_rsp_t s_rsp [N];
  int checks = 0, failures = 0;

  task_net #(.N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  int got [N];
  initial begin
    p0_req_valid = 0; p0_req = '0; p0_rsp_ready = 0; s_req_ready = '1; s_rsp_valid = '0;
    for (int i = 0; i < N; i++) s_rsp[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // static: each dest reaches exactly its slave
    for (int d = 1; d <= N; d++) begin
      @(negedge clk);
      p0_req_valid = 1; p0_req = '0; p0_req.dest = tid_t'(d); p0_req.lo = 16'(d * 10);
      s_req_ready = '1;
      #1;
      chk(p0_req_ready, "static accepted when slave free");
      chk(s_req_valid == (N'(1) << (d - 1)), $sformatf("static dest %0d: valid %b", d, s_req_valid));
      chk(s_req.lo == 16'(d * 10), "payload passes");
      s_req_ready = ~(N'(1) << (d - 1));
      #1;
      chk(!p0_req_ready && s_req_valid == '0, "static stalls when its slave is full");
    end
    // dynamic: goes only to free slaves, stalls when none
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      p0_req_valid = 1; p0_req.any_free = 1; p0_req.dest = '0;
      s_req_ready = N'($urandom);
      #1;
      chk(p0_req_ready == (s_req_ready != '0), "dynamic ready iff some slave free");
      chk((s_req_valid & ~s_req_ready) == '0, "dynamic never targets a full slave");
      chk($countones(s_req_valid) == (s_req_ready != '0 ? 1 : 0), "exactly one target");
    end
    // round-robin spread when all free
    @(negedge clk);
    for (int i = 0; i < N; i++) got[i] = 0;
    s_req_ready = '1;
    for (int i = 0; i < 4 * N; i++) begin
      #1;
      for (int k = 0; k < N; k++) if (s_req_valid[k]) got[k]++;
      @(negedge clk);
    end
    for (int k = 0; k < N; k++) chk(got[k] == 4, $sformatf("load balance slave %0d got %0d", k + 1, got[k]));
    p0_req_valid = 0;
    // backward merge
    for (int k = 0; k < N; k++) got[k] = 0;
    s_rsp_valid = '1;
    for (int k = 0; k < N; k++) s_rsp[k] = '{src: tid_t'(k + 1), reduction: 1'b1, value: word_t'(k * 7)};
    for (int c = 0; c < 40 && s_rsp_valid != '0; c++) begin
      @(negedge clk);
      p0_rsp_ready = ($urandom_range(0, 1) == 1);
      #1;
      if (p0_rsp_valid && p0_rsp_ready) begin
        int s;
        s = int'(p0_rsp.src) - 1;
        chk(s_rsp_ready == (N'(1) << s), "ready only to the forwarded slave");
        chk(p0_rsp.value == word_t'(s * 7), "response payload");
        got[s]++;
        @(posedge clk); #1;
        s_rsp_valid[s] = 1'b0;
      end
    end
    for (int k = 0; k < N; k++) chk(got[k] == 1, $sformatf("finish from slave %0d delivered %0d times", k + 1, got[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
