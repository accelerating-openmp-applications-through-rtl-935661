// msg_fifo: the sending/receiving FIFO of a message port.
//
// Every bidirectional port of the architecture has FIFO interfaces on both
// sides; this is that FIFO. It stores DEPTH messages of any packed type T in
// a circular buffer. Both sides use valid/ready: a message moves when valid
// and ready are both high at a rising clock edge. The head is shown on
// out_data whenever out_valid is high (first-word fall-through), so a message
// written in one cycle can be read in the next. 'full' is exported because the
// load-balancing task network looks for slaves whose receive FIFO is not full.
// Depth, width and the fall-through timing are this design's choices.
module msg_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic full
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem_q [DEPTH];
  logic [PW-1:0] rd_q, wr_q;
  logic [PW:0]   cnt_q;

  logic push, pop;
  assign full      = (cnt_q == (PW+1)'(DEPTH));
  assign in_ready  = !full;
  assign out_valid = (cnt_q != '0);
  assign out_data  = mem_q[rd_q];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= next_ptr(wr_q);
      if (pop)  rd_q <= next_ptr(rd_q);
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem_q[wr_q] <= in_data;
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  cnt_q <= (PW+1)'(DEPTH));
`endif
endmodule
