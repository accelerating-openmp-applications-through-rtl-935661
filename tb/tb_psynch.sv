// tb_psynch: the acquire / release / reject rules of P_synch on two ports,
// directed first, then random requests against a model of R_synch; checks
// the one-cycle response latency.
module tb_psynch;
  import omp_pkg::*;
  localparam int NS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NS-1:0] req_valid, req_ready, rsp_valid, rsp_ready, locked;
  sync_req_t req [NS];
  sync_rsp_t rsp [NS];
  int checks = 0, failures = 0;

  psynch #(.NSYNCH(NS)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  bit   held [NS];
  tid_t own  [NS];

  // send one request on port p and check the answer
  task automatic ask(input int p, input int tid);
    bit eh; tid_t eo;
    eh = held[p]; eo = own[p];
    if (!held[p]) begin eh = 1; eo = tid_t'(tid); end
    else if (own[p] == tid_t'(tid)) begin eh = 0; eo = '0; end
    held[p] = eh; own[p] = eo;
    @(negedge clk);
    req_valid[p] = 1; req[p] = '{tid: tid_t'(tid), sid: sid_t'(p)};
    chk(req_ready[p], "port ready");
    @(negedge clk);
    req_valid[p] = 0;
    chk(rsp_valid[p], "response one cycle after the request");
    chk(rsp[p].tid == tid_t'(tid), "response goes to the sender");
    chk(rsp[p].owner_valid == eh && (!eh || rsp[p].owner == eo),
        $sformatf("port %0d tid %0d: R_synch {%0d,%0d} exp {%0d,%0d}", p, tid,
                  rsp[p].owner_valid, rsp[p].owner, eh, eo));
    chk(locked[p] == eh, "locked flag");
  endtask

  initial begin
    req_valid = '0; rsp_ready = '1;
    for (int p = 0; p < NS; p++) begin req[p] = '0; held[p] = 0; own[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    chk(locked == '0, "all NULL after reset");
    ask(0, 1);   // acquire
    chk(held[0] && own[0] == 1, "model: thread 1 owns port 0");
    ask(0, 2);   // reject
    ask(1, 2);   // other port independent: acquire
    ask(0, 1);   // release
    ask(0, 2);   // acquire now
    ask(1, 2);   // release
    for (int i = 0; i < 400; i++) ask($urandom_range(0, NS-1), $urandom_range(1, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
