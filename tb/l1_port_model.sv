// l1_port_model: behavioural stand-in for an L1 cache at a thread's master
// port (simulation only). A flat word memory answers loads and stores after
// a random 1..3 cycle delay; flush_list (last entry) and flush_all are
// acknowledged the same way and counted, so a testbench can check that a
// thread flushes where it must. A flush_list entry without 'last' gets no
// answer, as in the real cache.
module l1_port_model
  import omp_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  l1_req_t req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output l1_rsp_t rsp
);
  word_t   mem [WORDS];
  bit      pend;
  int      dly;
  int      n_flush_all, n_flush_list, n_load, n_store;
  l1_req_t last_req;

  assign req_ready = !pend && !rsp_valid;

  initial begin
    n_flush_all = 0; n_flush_list = 0; n_load = 0; n_store = 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      dly       <= 0;
    end else begin
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        last_req <= req;
        unique case (req.op)
          L1_LOAD:       n_load++;
          L1_STORE:      n_store++;
          L1_FLUSH_LIST: n_flush_list++;
          default:       n_flush_all++;
        endcase
        if (req.op == L1_STORE)
          for (int b = 0; b < 4; b++)
            if (req.be[b]) mem[req.addr / 4 % WORDS][b*8 +: 8] <= req.wdata[b*8 +: 8];
        if (!(req.op == L1_FLUSH_LIST && !req.last)) begin
          pend <= 1'b1;
          dly  <= $urandom_range(0, 2);
        end
      end else if (pend) begin
        if (dly == 0) begin
          pend      <= 1'b0;
          rsp_valid <= 1'b1;
          rsp.rdata <= mem[last_req.addr / 4 % WORDS];
        end else dly <= dly - 1;
      end
    end
  end
endmodule
