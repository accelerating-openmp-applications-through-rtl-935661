// offchip_mem_model: behavioural model of the off-chip memory behind the
// memory controller (not synthesizable logic; for simulation only).
//
// It answers the L2 cache's line requests: a write stores the whole line, a
// read returns the line LATENCY cycles later on rsp_valid. It accepts one
// request at a time and, when STALL is set, withholds ready on a
// pseudo-random third of the cycles to exercise back-pressure. Testbenches
// load and inspect the contents through the word-level tasks.
module offchip_mem_model
  import omp_pkg::*;
#(
  parameter int unsigned LINES   = 4096,
  parameter int unsigned LATENCY = 4,
  parameter bit          STALL   = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);
  line_t mem [LINES];
  int    cnt;
  logic  pending;
  line_t pdata;
  logic  rnd;

  assign req_ready = !pending && !(STALL && rnd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      cnt       <= 0;
      rsp_valid <= 1'b0;
      rnd       <= 1'b0;
      rsp       <= '0;
    end else begin
      rnd       <= ($urandom_range(0, 2) == 0);
      rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        if (req.we) mem[req.addr[ADDR_W-1:OFF_W]] <= req.data;
        else begin
          pending <= 1'b1;
          cnt     <= LATENCY;
          pdata   <= mem[req.addr[ADDR_W-1:OFF_W]];
        end
      end
      if (pending) begin
        if (cnt == 0) begin
          pending   <= 1'b0;
          rsp_valid <= 1'b1;
          rsp.data  <= pdata;
        end else cnt <= cnt - 1;
      end
    end
  end

  function automatic word_t rd(input int unsigned byte_addr);
    return mem[byte_addr / LINE_BYTES][(byte_addr % LINE_BYTES) * 8 +: 32];
  endfunction

  task automatic wr(input int unsigned byte_addr, input word_t v);
    mem[byte_addr / LINE_BYTES][(byte_addr % LINE_BYTES) * 8 +: 32] = v;
  endtask

  task automatic clear();
    for (int i = 0; i < LINES; i++) mem[i] = '0;
  endtask
endmodule
