// tb_sync_net: random synchronization requests from 4 threads to 2 P_synch
// ports. Each request must reach the port named by its synchID exactly once;
// each port response must reach the thread it names.
module tb_sync_net;
  import omp_pkg::*;
  localparam int N = 4, NS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] t_req_valid, t_req_ready, t_rsp_valid, t_rsp_ready;
  sync_req_t t_req [N];
  sync_rsp_t t_rsp [N];
  logic [NS-1:0] p_req_valid, p_req_ready, p_rsp_valid, p_rsp_ready;
  sync_req_t p_req [NS];
  sync_rsp_t p_rsp [NS];
  int checks = 0, failures = 0;

  sync_net #(.N(N), .NSYNCH(NS)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  int sent [N], seen [N], rsp_seen [N], rsp_sent [N];
  initial begin
    t_req_valid = '0; t_rsp_ready = '1; p_req_ready = '0; p_rsp_valid = '0;
    for (int t = 0; t < N; t++) begin t_req[t] = '0; sent[t] = 0; seen[t] = 0; rsp_seen[t] = 0; rsp_sent[t] = 0; end
    for (int p = 0; p < NS; p++) p_rsp[p] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int t = 0; t < N; t++)
        if (!t_req_valid[t] && $urandom_range(0, 3) == 0) begin
          t_req_valid[t] = 1;
          t_req[t] = '{tid: tid_t'(t + 1), sid: sid_t'($urandom_range(0, NS - 1))};
        end
      p_req_ready = NS'($urandom);
      // port responses addressed to random threads
      for (int p = 0; p < NS; p++)
        if (!p_rsp_valid[p] && $urandom_range(0, 2) == 0) begin
          p_rsp_valid[p] = 1;
          p_rsp[p] = '{tid: tid_t'($urandom_range(1, N)), owner_valid: 1'b1, owner: tid_t'(p)};
        end
      t_rsp_ready = N'($urandom);
      #1;
      for (int p = 0; p < NS; p++)
        if (p_req_valid[p]) chk(p_req[p].sid == sid_t'(p), "request at the port of its synchID");
      for (int t = 0; t < N; t++)
        if (t_rsp_valid[t]) chk(t_rsp[t].tid == tid_t'(t + 1), "response at the thread it names");
      @(posedge clk);
      for (int p = 0; p < NS; p++) if (p_req_valid[p] && p_req_ready[p]) seen[int'(p_req[p].tid) - 1]++;
      for (int t = 0; t < N; t++) if (t_req_valid[t] && t_req_ready[t]) sent[t]++;
      for (int t = 0; t < N; t++) if (t_rsp_valid[t] && t_rsp_ready[t]) rsp_seen[t]++;
      for (int p = 0; p < NS; p++) if (p_rsp_valid[p] && p_rsp_ready[p]) rsp_sent[int'(p_rsp[p].tid) - 1]++;
      #1;
      for (int t = 0; t < N; t++) if (t_req_valid[t] && t_req_ready[t]) t_req_valid[t] = 0;
      for (int p = 0; p < NS; p++) if (p_rsp_valid[p] && p_rsp_ready[p]) p_rsp_valid[p] = 0;
    end
    for (int t = 0; t < N; t++) begin
      chk(sent[t] == seen[t] && sent[t] > 100, $sformatf("thread %0d: %0d accepted, %0d delivered", t + 1, sent[t], seen[t]));
      chk(rsp_sent[t] == rsp_seen[t] && rsp_seen[t] > 100, $sformatf("thread %0d: responses %0d/%0d", t + 1, rsp_seen[t], rsp_sent[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
