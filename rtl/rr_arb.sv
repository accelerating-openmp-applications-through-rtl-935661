// rr_arb: round-robin arbiter used by the networks.
//
// Grants one of N requesters, searching from the one after the last winner,
// so every requester is served within N grants. The grant is combinational
// from 'req'; the priority pointer moves only when 'advance' is high (the
// granted message was accepted), so a request that waits keeps its grant.
module rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic                 any,
  output logic [$clog2(N > 1 ? N : 2)-1:0] idx
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] last_q;

  always_comb begin
    any = 1'b0;
    idx = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last_q) + k) % N;
      if (!any && req[c]) begin
        any = 1'b1;
        idx = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              last_q <= IW'(N - 1);
    else if (advance && any) last_q <= idx;
  end
endmodule
