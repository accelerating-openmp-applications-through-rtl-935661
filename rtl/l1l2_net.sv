// l1l2_net: the L1-to-L2 network.
//
// Forward (NM-to-1): line read / line write requests of the NM L1 caches are
// merged round-robin into the single L2 port. Backward (1-to-NM): each L2
// response carries the requester's identifier (dst) and is steered to that
// L1 cache. Requester k carries identifier k (k = 0 is P0's cache).
// The source article suggests butterfly networks; a single-stage arbiter and
// demultiplexer with the same behaviour is this design's choice.
module l1l2_net
  import omp_pkg::*;
#(
  parameter int unsigned NM = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    [NM-1:0] m_req_valid,
  output logic    [NM-1:0] m_req_ready,
  input  l2_req_t          m_req [NM],
  output logic    [NM-1:0] m_rsp_valid,
  input  logic    [NM-1:0] m_rsp_ready,
  output l2_rsp_t          m_rsp,
  output logic             l2_req_valid,
  input  logic             l2_req_ready,
  output l2_req_t          l2_req,
  input  logic             l2_rsp_valid,
  output logic             l2_rsp_ready,
  input  l2_rsp_t          l2_rsp
);
  localparam int unsigned IW = $clog2(NM > 1 ? NM : 2);
  logic          g_any;
  logic [IW-1:0] g_idx;

  rr_arb #(.N(NM)) u_arb (
    .clk, .rst_n,
    .req     (m_req_valid),
    .advance (l2_req_ready),
    .any     (g_any),
    .idx     (g_idx)
  );

  always_comb begin
    l2_req_valid = g_any;
    l2_req       = m_req[g_idx];
    m_req_ready  = '0;
    m_req_ready[g_idx] = g_any && l2_req_ready;
  end

  always_comb begin
    m_rsp       = l2_rsp;
    m_rsp_valid = '0;
    l2_rsp_ready = 1'b0;
    for (int k = 0; k < NM; k++) begin
      if (l2_rsp.dst == tid_t'(k)) begin
        m_rsp_valid[k] = l2_rsp_valid;
        l2_rsp_ready   = m_rsp_ready[k];
      end
    end
  end
endmodule
