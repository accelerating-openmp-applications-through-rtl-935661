// tb_l2_cache: a 4-line L2 cache in front of the off-chip memory model, so
// most requests evict. Random masked line writes and line reads are checked
// against a flat reference; after flush_req every line must be in memory.
// Also checked: a hit is answered two cycles after the request.
module tb_l2_cache;
  import omp_pkg::*;
  localparam int LINES = 4;
  localparam int NL    = 64;        // lines the test touches
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid, rsp_ready;
  l2_req_t req; l2_rsp_t rsp;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, flush_req, flush_done;
  mem_req_t mem_req; mem_rsp_t mem_rsp;
  int checks = 0, failures = 0;

  l2_cache #(.LINES(LINES)) dut (.*);
  offchip_mem_model #(.LINES(4096)) u_mem (
    .clk, .rst_n, .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req (mem_req),
    .rsp_valid (mem_rsp_valid), .rsp (mem_rsp));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  line_t ref_l [NL];

  task automatic xfer(input l2_op_e o, input int ln, input line_t d, input mask_t m,
                      output line_t rd, output int lat);
    @(negedge clk);
    req_valid = 1;
    req = '{op: o, src: tid_t'(ln % 5), addr: addr_t'(ln * 16), data: d, mask: m};
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0; lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    chk(rsp.dst == tid_t'(ln % 5), "answer addressed to the requester");
    rd = rsp.data;
  endtask

  initial begin
    line_t r; int lat;
    req_valid = 0; req = '0; rsp_ready = 1; flush_req = 0;
    u_mem.clear();
    for (int l = 0; l < NL; l++) begin
      ref_l[l] = {4{$urandom}};
      u_mem.mem[l] = ref_l[l];
    end
    repeat (2) @(posedge clk); rst_n = 1;
    xfer(L2_LINE_READ, 5, '0, '0, r, lat);
    chk(r == ref_l[5], "miss read data");
    xfer(L2_LINE_READ, 5, '0, '0, r, lat);
    chk(lat == 2, $sformatf("hit latency %0d, expected 2", lat));
    for (int i = 0; i < 2000; i++) begin
      int ln; line_t d; mask_t m;
      ln = $urandom_range(0, NL - 1);
      if ($urandom_range(0, 1) == 1) begin
        d = {4{$urandom}}; m = mask_t'($urandom);
        xfer(L2_LINE_WRITE, ln, d, m, r, lat);
        for (int b = 0; b < 16; b++) if (m[b]) ref_l[ln][b*8 +: 8] = d[b*8 +: 8];
      end else begin
        xfer(L2_LINE_READ, ln, '0, '0, r, lat);
        chk(r == ref_l[ln], $sformatf("line %0d read", ln));
      end
    end
    @(negedge clk); flush_req = 1; @(negedge clk); flush_req = 0;
    while (!flush_done) @(negedge clk);
    for (int l = 0; l < NL; l++) chk(u_mem.mem[l] == ref_l[l], $sformatf("memory line %0d after flush", l));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
