// task_net: the task network between the master thread P0 and N slaves.
//
// Forward (1-to-N): P0 sends start requests. A request with dest set is
// delivered to that slave (static scheduling: the chunk belongs to a fixed
// thread). A request with any_free set is delivered to any slave whose
// receive FIFO is not full (load balancing for dynamic scheduling); among the
// free slaves the choice is round-robin. When no suitable slave can take the
// request, p0_req_ready stays low and P0 stalls until a slave frees a slot.
// Backward (N-to-1): finish responses from the slaves are merged round-robin
// into P0's receive port.
// Both directions are single-stage and combinational: the FIFOs at the slave
// receive ports and the response registers of the slaves hold the messages.
// The source article suggests butterfly or torus networks; a single-stage
// crossbar with the same delivery rules is this design's simpler choice.
module task_net
  import omp_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // from P0
  input  logic      p0_req_valid,
  output logic      p0_req_ready,
  input  task_req_t p0_req,
  output logic      p0_rsp_valid,
  input  logic      p0_rsp_ready,
  output task_rsp_t p0_rsp,
  // to slaves 1..N (index 0 is slave 1)
  output logic      [N-1:0] s_req_valid,
  input  logic      [N-1:0] s_req_ready,
  output task_req_t         s_req,
  input  logic      [N-1:0] s_rsp_valid,
  output logic      [N-1:0] s_rsp_ready,
  input  task_rsp_t         s_rsp [N]
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  // forward
  logic          f_any;
  logic [IW-1:0] f_idx;
  logic [IW-1:0] sel;
  logic          sel_ok;

  rr_arb #(.N(N)) u_free_arb (
    .clk, .rst_n,
    .req     (s_req_ready),
    .advance (p0_req_valid && p0_req_ready && p0_req.any_free),
    .any     (f_any),
    .idx     (f_idx)
  );

  always_comb begin
    if (p0_req.any_free) begin
      sel    = f_idx;
      sel_ok = f_any;
    end else begin
      sel    = IW'(p0_req.dest - 1'b1);
      sel_ok = (p0_req.dest >= 1) && (p0_req.dest <= tid_t'(N)) && s_req_ready[sel];
    end
    s_req        = p0_req;
    s_req_valid  = '0;
    s_req_valid[sel] = p0_req_valid && sel_ok;
    p0_req_ready = sel_ok;
  end

  // backward
  logic          b_any;
  logic [IW-1:0] b_idx;

  rr_arb #(.N(N)) u_rsp_arb (
    .clk, .rst_n,
    .req     (s_rsp_valid),
    .advance (p0_rsp_ready),
    .any     (b_any),
    .idx     (b_idx)
  );

  always_comb begin
    p0_rsp_valid = b_any;
    p0_rsp       = s_rsp[b_idx];
    s_rsp_ready  = '0;
    s_rsp_ready[b_idx] = b_any && p0_rsp_ready;
  end
endmodule
