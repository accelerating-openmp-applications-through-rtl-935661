// sync_net: the synchronization network between N threads and P_synch.
//
// Forward: a thread's synchronization request {threadID, synchID} is routed
// to P_synch slave port number synchID (the synchID is the destination
// output port). Requests for the same port are arbitrated round-robin; a
// request for a synchID outside 0..NSYNCH-1 would never be delivered and is
// flagged by an assertion.
// Backward: each P_synch port answers the thread named in the response. A
// thread has at most one request outstanding, so responses for the same
// thread never compete; a fixed priority resolves the case anyway.
// Thread index t (0..N-1) carries threadID t+1. Single-stage, combinational;
// the source article leaves the network's structure open.
module sync_net
  import omp_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned NSYNCH = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      [N-1:0]      t_req_valid,
  output logic      [N-1:0]      t_req_ready,
  input  sync_req_t              t_req [N],
  output logic      [N-1:0]      t_rsp_valid,
  input  logic      [N-1:0]      t_rsp_ready,
  output sync_rsp_t              t_rsp [N],
  output logic      [NSYNCH-1:0] p_req_valid,
  input  logic      [NSYNCH-1:0] p_req_ready,
  output sync_req_t              p_req [NSYNCH],
  input  logic      [NSYNCH-1:0] p_rsp_valid,
  output logic      [NSYNCH-1:0] p_rsp_ready,
  input  sync_rsp_t              p_rsp [NSYNCH]
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [N-1:0]  want   [NSYNCH];
  logic          g_any  [NSYNCH];
  logic [IW-1:0] g_idx  [NSYNCH];

  for (genvar p = 0; p < NSYNCH; p++) begin : g_port
    always_comb begin
      for (int t = 0; t < N; t++)
        want[p][t] = t_req_valid[t] && (t_req[t].sid == sid_t'(p));
    end
    rr_arb #(.N(N)) u_arb (
      .clk, .rst_n,
      .req     (want[p]),
      .advance (p_req_ready[p]),
      .any     (g_any[p]),
      .idx     (g_idx[p])
    );
    assign p_req_valid[p] = g_any[p];
    assign p_req[p]       = t_req[g_idx[p]];
  end

  always_comb begin
    t_req_ready = '0;
    for (int p = 0; p < NSYNCH; p++)
      if (g_any[p] && p_req_ready[p]) t_req_ready[g_idx[p]] = 1'b1;
  end

  always_comb begin
    t_rsp_valid = '0;
    p_rsp_ready = '0;
    for (int t = 0; t < N; t++) t_rsp[t] = '0;
    for (int p = 0; p < NSYNCH; p++) begin
      for (int t = 0; t < N; t++) begin
        if (p_rsp_valid[p] && p_rsp[p].tid == tid_t'(t + 1) && !t_rsp_valid[t]) begin
          t_rsp_valid[t] = 1'b1;
          t_rsp[t]       = p_rsp[p];
          p_rsp_ready[p] = t_rsp_ready[t];
        end
      end
    end
  end

`ifndef SYNTHESIS
  for (genvar t = 0; t < N; t++) begin : g_chk
    a_sid_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  t_req_valid[t] |-> t_req[t].sid < sid_t'(NSYNCH));
  end
`endif
endmodule
