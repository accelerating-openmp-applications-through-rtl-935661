// tb_msg_fifo: random push/pop traffic against a queue model; checks order,
// data, the full flag at DEPTH entries and the one-cycle fall-through.
module tb_msg_fifo;
  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, full;
  logic [15:0] in_data, out_data;
  int checks = 0, failures = 0;

  msg_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  logic [15:0] q[$];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); in_valid = 1; in_data = 16'(100 + i);
      chk(in_ready, "ready while not full");
      @(posedge clk); q.push_back(in_data);
      #1;
      if (i == 0) chk(out_valid && out_data == 16'd100, "fall-through after one push");
    end
    @(negedge clk); in_valid = 0;
    chk(full && !in_ready, "full after DEPTH pushes");
    // random traffic
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 1) == 1);
      in_data   = 16'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      chk(out_valid == (q.size() != 0), "out_valid matches occupancy");
      chk(full == (q.size() == DEPTH), "full matches occupancy");
      if (out_valid && q.size() != 0) chk(out_data == q[0], "data order");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
