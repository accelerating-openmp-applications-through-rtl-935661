// tb_l1_cache: one L1 cache (8 lines) in front of an L2 model that merges
// line writes by their byte mask. Random loads and byte/word stores are
// checked against a flat reference memory. Also checked: a hit answers two
// cycles after the request; a flush_list entry that is not the last gets no
// answer; flush_all leaves nothing dirty and nothing valid; and bytes that
// "another thread" changes in L2 inside a line this cache also wrote are
// not overwritten when the line is flushed (no false-sharing error).
module tb_l1_cache;
  import omp_pkg::*;
  localparam int LINES = 8;
  localparam int MEMB  = 1024;          // bytes the test touches
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid, rsp_ready;
  l1_req_t req; l1_rsp_t rsp;
  logic l2_req_valid, l2_req_ready, l2_rsp_valid, l2_rsp_ready;
  l2_req_t l2_req; l2_rsp_t l2_rsp;
  int checks = 0, failures = 0;

  l1_cache #(.ID(3), .LINES(LINES)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // L2 model
  logic [7:0] l2m [MEMB];
  logic [7:0] ref_m [MEMB];
  bit pend; l2_req_t h;
  int n_wr, n_rd;
  assign l2_req_ready = !pend && !l2_rsp_valid;
  always @(posedge clk) if (rst_n) begin
    if (l2_rsp_valid && l2_rsp_ready) l2_rsp_valid <= 0;
    if (l2_req_valid && l2_req_ready) begin
      h <= l2_req; pend <= 1;
      chk(l2_req.src == 3, "requests carry the cache's ID");
    end else if (pend) begin
      pend <= 0; l2_rsp_valid <= 1; l2_rsp.dst <= h.src;
      if (h.op == L2_LINE_WRITE) begin
        n_wr++;
        for (int b = 0; b < 16; b++) if (h.mask[b]) l2m[(h.addr % MEMB) + b] = h.data[b*8 +: 8];
      end else n_rd++;
      for (int b = 0; b < 16; b++) l2_rsp.data[b*8 +: 8] <= l2m[(h.addr % MEMB) + b];
    end
  end

  task automatic op(input l1_op_e o, input int a, input word_t wd, input logic [3:0] be,
                    input bit last, output word_t rd, output int lat);
    @(negedge clk);
    req_valid = 1; req = '{op: o, addr: addr_t'(a), wdata: wd, be: be, last: last};
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    if (o == L1_FLUSH_LIST && !last) begin
      repeat (30) begin
        @(negedge clk);
        chk(!rsp_valid, "no answer to a flush_list entry that is not last");
      end
      rd = '0;
      return;
    end
    while (!rsp_valid) begin @(negedge clk); lat++; end
    rd = rsp.rdata;
  endtask

  initial begin
    word_t r; int lat;
    req_valid = 0; req = '0; rsp_ready = 1; pend = 0; l2_rsp_valid = 0; l2_rsp = '0;
    n_wr = 0; n_rd = 0;
    for (int i = 0; i < MEMB; i++) begin l2m[i] = 8'($urandom); ref_m[i] = l2m[i]; end
    repeat (2) @(posedge clk); rst_n = 1;

    // miss then hit latency
    op(L1_LOAD, 'h40, 0, 0, 0, r, lat);
    chk(r == {ref_m['h43], ref_m['h42], ref_m['h41], ref_m['h40]}, "first load data");
    op(L1_LOAD, 'h44, 0, 0, 0, r, lat);
    chk(lat == 2, $sformatf("hit latency %0d, expected 2", lat));

    // random traffic with conflicts (addresses span 8x the cache)
    for (int i = 0; i < 3000; i++) begin
      int a; word_t wd; logic [3:0] be;
      a  = $urandom_range(0, MEMB / 4 - 1) * 4;
      wd = $urandom; be = 4'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        op(L1_STORE, a, wd, be, 0, r, lat);
        for (int b = 0; b < 4; b++) if (be[b]) ref_m[a + b] = wd[b*8 +: 8];
      end else begin
        op(L1_LOAD, a, 0, 0, 0, r, lat);
        chk(r == {ref_m[a+3], ref_m[a+2], ref_m[a+1], ref_m[a]}, $sformatf("load %h", a));
      end
      if (i % 500 == 499) begin
        op(L1_FLUSH_ALL, 0, 0, 0, 1, r, lat);
        chk(dut.valid_q == '0, "flush_all invalidates every line");
        for (int k = 0; k < MEMB; k++) chk(l2m[k] == ref_m[k], $sformatf("L2 byte %h after flush_all", k));
      end
    end

    // false sharing: this cache writes byte 0 of a line, "another thread"
    // writes byte 5 of the same line in L2 meanwhile
    op(L1_FLUSH_ALL, 0, 0, 0, 1, r, lat);
    op(L1_LOAD, 'h100, 0, 0, 0, r, lat);
    op(L1_STORE, 'h100, 32'h000000AA, 4'b0001, 0, r, lat);
    l2m['h105] = 8'h55;
    op(L1_FLUSH_LIST, 'h300, 0, 0, 0, r, lat);    // other line, not last
    op(L1_FLUSH_LIST, 'h104, 0, 0, 1, r, lat);    // same line, last
    chk(l2m['h100] == 8'hAA, "own byte written back");
    chk(l2m['h105] == 8'h55, "other thread's byte kept (per-byte dirty)");
    chk(l2m['h101] == ref_m['h101], "untouched byte unchanged");
    chk(!dut.valid_q[('h100 / 16) % LINES], "flush_list invalidates the line");
    op(L1_LOAD, 'h104, 0, 0, 0, r, lat);
    chk(r[15:8] == 8'h55, "reload after flush_list sees L2's data");
    chk(n_wr > 50 && n_rd > 500, $sformatf("traffic: %0d line writes, %0d line reads", n_wr, n_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
