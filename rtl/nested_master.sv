// nested_master: P_i-P0, the sub-master that replaces a slave thread P_i to
// give a second level of nested parallelism.
//
// Towards P0 it looks exactly like a slave thread: a slave port to the
// original task network (with its receive FIFO) and a finish response when
// its task is done. Inside, it is the master of its own team: for a start
// request covering iterations lo..hi-1 it cuts the range into NSUB+1 nearly
// equal parts, runs the first part itself and sends one subthread start
// request per remaining part over its own task network to subthread k
// (static destinations 1..NSUB). It waits for its own part and for a finish
// response from every subthread it started, adds up their partial sums when
// the kernel is a reduction, and only then sends its own finish (or
// finish_reduction) response to P0.
// Its own computation runs on an embedded slave_thread core, whose L1 and
// synchronization ports are this block's ports to the original L1 cache LL_i
// and to the synchronization network. The core ends every part with
// flush_all, so LL_i is clean and empty whenever a new start request
// arrives; no separate entry flush is issued.
// The structure follows the source article's nested-parallelism scheme; the even
// split of the chunk and the reuse of the slave core are this design's.
module nested_master
  import omp_pkg::*;
#(
  parameter int unsigned TID        = 1,
  parameter int unsigned NSUB       = 2,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // slave port to the original task network
  input  logic      task_req_valid,
  output logic      task_req_ready,
  input  task_req_t task_req,
  output logic      task_rsp_valid,
  input  logic      task_rsp_ready,
  output task_rsp_t task_rsp,
  // master port to the team's own task network
  output logic      sub_req_valid,
  input  logic      sub_req_ready,
  output task_req_t sub_req,
  input  logic      sub_rsp_valid,
  output logic      sub_rsp_ready,
  input  task_rsp_t sub_rsp,
  // master port to the L1 cache LL_i (from the embedded core)
  output logic      l1_req_valid,
  input  logic      l1_req_ready,
  output l1_req_t   l1_req,
  input  logic      l1_rsp_valid,
  output logic      l1_rsp_ready,
  input  l1_rsp_t   l1_rsp,
  // master port to the synchronization network (from the embedded core)
  output logic      sync_req_valid,
  input  logic      sync_req_ready,
  output sync_req_t sync_req,
  input  logic      sync_rsp_valid,
  output logic      sync_rsp_ready,
  input  sync_rsp_t sync_rsp,
  output logic      busy
);
  typedef enum logic [2:0] {N_IDLE, N_LOCAL, N_FORK, N_JOIN, N_FIN} state_e;

  logic      q_valid, q_ready;
  task_req_t q_data;
  msg_fifo #(.T(task_req_t), .DEPTH(FIFO_DEPTH)) u_rx (
    .clk, .rst_n,
    .in_valid  (task_req_valid),
    .in_ready  (task_req_ready),
    .in_data   (task_req),
    .out_valid (q_valid),
    .out_ready (q_ready),
    .out_data  (q_data),
    .full      ()
  );

  // embedded core for this thread's own share
  logic      core_req_valid, core_req_ready, core_rsp_valid, core_rsp_ready;
  task_req_t core_req;
  task_rsp_t core_rsp;
  slave_thread #(.TID(TID), .FIFO_DEPTH(1)) u_core (
    .clk, .rst_n,
    .task_req_valid (core_req_valid), .task_req_ready (core_req_ready), .task_req (core_req),
    .task_rsp_valid (core_rsp_valid), .task_rsp_ready (core_rsp_ready), .task_rsp (core_rsp),
    .l1_req_valid, .l1_req_ready, .l1_req, .l1_rsp_valid, .l1_rsp_ready, .l1_rsp,
    .sync_req_valid, .sync_req_ready, .sync_req, .sync_rsp_valid, .sync_rsp_ready, .sync_rsp,
    .busy ()
  );

  state_e      state_q;
  task_req_t   t_q;
  logic [15:0] part_q;     // iterations per part
  logic [15:0] lo_q;       // start of the next subthread part
  logic [15:0] k_q;        // next subthread, 1..NSUB
  logic [15:0] sent_q, recv_q;
  logic        local_done_q;
  word_t       sum_q;

  logic [15:0] len, sub_hi;
  word_t       add;
  assign add = ((core_rsp_valid && core_rsp.reduction) ? core_rsp.value : '0)
             + ((sub_rsp_valid  && sub_rsp.reduction)  ? sub_rsp.value  : '0);
  assign len    = (q_data.hi > q_data.lo) ? q_data.hi - q_data.lo : 16'd0;
  assign sub_hi = (t_q.hi - lo_q > part_q) ? lo_q + part_q : t_q.hi;

  assign busy           = (state_q != N_IDLE);
  assign q_ready        = (state_q == N_IDLE);
  assign core_rsp_ready = 1'b1;
  assign sub_rsp_ready  = 1'b1;
  assign task_rsp_valid = (state_q == N_FIN);
  assign task_rsp       = '{src: tid_t'(TID), reduction: (t_q.kernel == K_DOT), value: sum_q};

  always_comb begin
    core_req_valid = (state_q == N_LOCAL);
    core_req       = t_q;
    core_req.hi    = (t_q.hi - t_q.lo > part_q) ? t_q.lo + part_q : t_q.hi;
    sub_req_valid  = (state_q == N_FORK) && (lo_q < t_q.hi) && (k_q <= 16'(NSUB));
    sub_req        = t_q;
    sub_req.any_free = 1'b0;
    sub_req.dest   = tid_t'(k_q);
    sub_req.lo     = lo_q;
    sub_req.hi     = sub_hi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= N_IDLE;
      t_q          <= '0;
      part_q       <= '0;
      lo_q         <= '0;
      k_q          <= '0;
      sent_q       <= '0;
      recv_q       <= '0;
      local_done_q <= 1'b0;
      sum_q        <= '0;
    end else begin
      if (core_rsp_valid) local_done_q <= 1'b1;
      if (sub_rsp_valid)  recv_q       <= recv_q + 1'b1;
      sum_q <= sum_q + add;
      unique case (state_q)
        N_IDLE: if (q_valid) begin
          t_q          <= q_data;
          part_q       <= (len + 16'(NSUB)) / 16'(NSUB + 1);
          sent_q       <= '0;
          recv_q       <= '0;
          local_done_q <= 1'b0;
          sum_q        <= '0;
          k_q          <= 16'd1;
          state_q      <= N_LOCAL;
        end
        N_LOCAL: if (core_req_ready) begin
          lo_q    <= core_req.hi;
          state_q <= N_FORK;
        end
        N_FORK: begin
          if (sub_req_valid && sub_req_ready) begin
            lo_q   <= sub_hi;
            k_q    <= k_q + 1'b1;
            sent_q <= sent_q + 1'b1;
          end
          if (!(lo_q < t_q.hi && k_q <= 16'(NSUB))) state_q <= N_JOIN;
        end
        N_JOIN: if (local_done_q && recv_q == sent_q) state_q <= N_FIN;
        N_FIN:  if (task_rsp_ready) state_q <= N_IDLE;
        default: state_q <= N_IDLE;
      endcase
    end
  end
endmodule
