// tb_l1l2_net: three L1 masters issue line requests; an L2 model answers
// each one with data derived from the address, addressed to the requester.
// Every master must get exactly its own answers, and no master may starve.
module tb_l1l2_net;
  import omp_pkg::*;
  localparam int NM = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NM-1:0] m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  l2_req_t m_req [NM];
  l2_rsp_t m_rsp, l2_rsp;
  logic l2_req_valid, l2_req_ready, l2_rsp_valid, l2_rsp_ready;
  l2_req_t l2_req;
  int checks = 0, failures = 0;

  l1l2_net #(.NM(NM)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic line_t pat(input addr_t a);
    return {8{a, ~a}};
  endfunction

  // L2 model: one request at a time, answers 2 cycles later
  l2_req_t held; bit busy; int dly;
  always @(posedge clk) if (rst_n) begin
    if (l2_rsp_valid && l2_rsp_ready) l2_rsp_valid <= 0;
    if (l2_req_valid && l2_req_ready) begin held <= l2_req; busy <= 1; dly <= 2; end
    else if (busy && !l2_rsp_valid) begin
      if (dly == 0) begin
        l2_rsp_valid <= 1; l2_rsp <= '{dst: held.src, data: pat(held.addr)}; busy <= 0;
      end else dly <= dly - 1;
    end
  end
  assign l2_req_ready = !busy && !l2_rsp_valid;

  bit    outstanding [NM];
  addr_t want [NM];
  int    done_cnt [NM];
  initial begin
    m_req_valid = '0; m_rsp_ready = '1; busy = 0; l2_rsp_valid = 0; l2_rsp = '0;
    for (int k = 0; k < NM; k++) begin m_req[k] = '0; outstanding[k] = 0; done_cnt[k] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int k = 0; k < NM; k++)
        if (!outstanding[k] && !m_req_valid[k]) begin
          m_req_valid[k] = 1;
          m_req[k] = '0;
          m_req[k].src  = tid_t'(k);
          m_req[k].addr = addr_t'({$urandom_range(0, 4095), 4'h0});
          want[k] = m_req[k].addr;
        end
      m_rsp_ready = NM'($urandom);
      #1;
      for (int k = 0; k < NM; k++)
        if (m_rsp_valid[k]) chk(m_rsp.dst == tid_t'(k), "response steered to its requester");
      @(posedge clk);
      for (int k = 0; k < NM; k++) begin
        if (m_rsp_valid[k] && m_rsp_ready[k]) begin
          chk(outstanding[k] && m_rsp.data == pat(want[k]), $sformatf("master %0d data", k));
          outstanding[k] = 0; done_cnt[k]++;
        end
        if (m_req_valid[k] && m_req_ready[k]) begin outstanding[k] = 1; end
      end
      #1;
      for (int k = 0; k < NM; k++) if (outstanding[k]) m_req_valid[k] = 0;
    end
    for (int k = 0; k < NM; k++) chk(done_cnt[k] > 100, $sformatf("master %0d served %0d times", k, done_cnt[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
