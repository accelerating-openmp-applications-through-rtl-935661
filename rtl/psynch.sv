// psynch: P_synch, the lock unit behind OpenMP critical and atomic regions.
//
// It has NSYNCH slave ports, one per synchronization identifier, and a small
// state machine with a status register R_synch per port. R_synch starts as
// NULL. For a request {threadID, synchID} arriving at port synchID:
//   R_synch == NULL                -> R_synch = threadID      (acquire)
//   R_synch == threadID            -> R_synch = NULL          (release)
//   R_synch holds another thread   -> unchanged               (reject)
// and the port answers the sender with the new value of R_synch; the thread
// compares it with its own ID to learn whether it holds the lock. A rejected
// thread retries later.
// Timing: a request is taken when the port's response register is empty or
// is being emptied; the response appears the next cycle. The rules above are
// the source article's; the encoding of NULL (owner_valid = 0) and the one-deep
// response register are this design's.
module psynch
  import omp_pkg::*;
#(
  parameter int unsigned NSYNCH = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      [NSYNCH-1:0] req_valid,
  output logic      [NSYNCH-1:0] req_ready,
  input  sync_req_t              req [NSYNCH],
  output logic      [NSYNCH-1:0] rsp_valid,
  input  logic      [NSYNCH-1:0] rsp_ready,
  output sync_rsp_t              rsp [NSYNCH],
  output logic      [NSYNCH-1:0] locked
);
  for (genvar p = 0; p < NSYNCH; p++) begin : g_port
    logic      held_q;   // R_synch != NULL
    tid_t      owner_q;  // R_synch value when held
    logic      rv_q;
    sync_rsp_t rsp_q;

    assign req_ready[p] = !rv_q || rsp_ready[p];
    assign rsp_valid[p] = rv_q;
    assign rsp[p]       = rsp_q;
    assign locked[p]    = held_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        held_q  <= 1'b0;
        owner_q <= '0;
        rv_q    <= 1'b0;
        rsp_q   <= '0;
      end else begin
        if (rsp_ready[p]) rv_q <= 1'b0;
        if (req_valid[p] && req_ready[p]) begin
          logic nh;
          tid_t no;
          nh = held_q;
          no = owner_q;
          if (!held_q) begin
            nh = 1'b1;
            no = req[p].tid;
          end else if (owner_q == req[p].tid) begin
            nh = 1'b0;
            no = '0;
          end
          held_q  <= nh;
          owner_q <= no;
          rv_q    <= 1'b1;
          rsp_q   <= '{tid: req[p].tid, owner_valid: nh, owner: no};
        end
      end
    end
  end
endmodule
