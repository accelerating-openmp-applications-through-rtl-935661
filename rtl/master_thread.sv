// master_thread: P0, the master hardware thread that forks and joins.
//
// On 'start' P0 runs one OpenMP parallel region (or, for Gauss-Seidel, the
// do-while loop around one), configured by 'cfg':
//   1. Gauss-Seidel only: store dmax = 0 through its L1 cache.
//   2. flush_all its L1 cache and wait for the acknowledgement (implicit
//      flush on entry to the parallel region).
//   3. Fork: cut the iterations first..last-1 into chunks of 'chunk' and send
//      one start request per chunk over the task network. With static
//      scheduling chunk k goes to slave (k mod N)+1; with dynamic scheduling
//      the request is marked any_free and the network hands it to any slave
//      with room. When the network cannot accept a request P0 stalls.
//   4. Join: finish responses are accepted at any time, also while forking;
//      the region ends when as many finish responses have arrived as start
//      requests were sent. finish_reduction responses are summed into r.
//   5. Dot product: store r at cfg.base_c and flush it to L2.
//      Gauss-Seidel: load dmax (fetched from L2, as the entry flush
//      invalidated the cache); if dmax > eps and fewer than max_iter sweeps
//      were made, go back to step 1.
// Then 'done' pulses for one cycle, with 'result' (r, or the last dmax) and
// 'iterations' (number of parallel regions run) valid until the next start.
// The sequence follows the source article; the configuration record, the chunk
// arithmetic and the iteration limit are this design's.
module master_thread
  import omp_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  run_cfg_t  cfg,
  output logic      busy,
  output logic      done,
  output word_t     result,
  output logic [15:0] iterations,
  // master port to the task network
  output logic      task_req_valid,
  input  logic      task_req_ready,
  output task_req_t task_req,
  input  logic      task_rsp_valid,
  output logic      task_rsp_ready,
  input  task_rsp_t task_rsp,
  // master port to the L1 cache
  output logic      l1_req_valid,
  input  logic      l1_req_ready,
  output l1_req_t   l1_req,
  input  logic      l1_rsp_valid,
  output logic      l1_rsp_ready,
  input  l1_rsp_t   l1_rsp
);
  typedef enum logic [3:0] {
    M_IDLE, M_MREQ, M_MWAIT, M_INIT, M_FLUSH, M_FORK, M_JOIN,
    M_STORE_R, M_FLUSH_R, M_LOAD_DMAX, M_CHECK, M_DONE
  } state_e;

  state_e   state_q, ret_q;
  run_cfg_t cfg_q;
  l1_req_t  mreq_q;
  word_t    ld_q;
  word_t    r_q;
  logic [15:0] lo_q;       // first iteration of the next chunk
  logic [15:0] sent_q;     // start requests sent in this region
  logic [15:0] recv_q;     // finish responses received in this region
  logic [15:0] iter_q;
  logic [15:0] dest_q;     // next static destination, 0..N-1

  logic [15:0] hi;
  assign hi = (cfg_q.last - lo_q > cfg_q.chunk) ? lo_q + cfg_q.chunk : cfg_q.last;

  logic fire_req, fire_rsp;
  assign fire_req = task_req_valid && task_req_ready;
  assign fire_rsp = task_rsp_valid && task_rsp_ready;

  assign busy           = (state_q != M_IDLE);
  assign done           = (state_q == M_DONE);
  assign result         = r_q;
  assign iterations     = iter_q;
  assign task_rsp_ready = 1'b1;
  assign l1_req_valid   = (state_q == M_MREQ);
  assign l1_req         = mreq_q;
  assign l1_rsp_ready   = (state_q == M_MWAIT);

  always_comb begin
    task_req_valid  = (state_q == M_FORK) && (lo_q < cfg_q.last);
    task_req        = '0;
    task_req.kernel = cfg_q.kernel;
    task_req.any_free = cfg_q.dynamic_sched;
    task_req.dest   = tid_t'(dest_q + 1'b1);
    task_req.lo     = lo_q;
    task_req.hi     = hi;
    task_req.n      = cfg_q.n;
    task_req.m      = cfg_q.m;
    task_req.base_a = cfg_q.base_a;
    task_req.base_b = cfg_q.base_b;
    task_req.base_c = cfg_q.base_c;
    task_req.sid    = cfg_q.sid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= M_IDLE;
      ret_q   <= M_IDLE;
      cfg_q   <= '0;
      mreq_q  <= '0;
      ld_q    <= '0;
      r_q     <= '0;
      lo_q    <= '0;
      sent_q  <= '0;
      recv_q  <= '0;
      iter_q  <= '0;
      dest_q  <= '0;
    end else begin
      if (fire_rsp) begin
        recv_q <= recv_q + 1'b1;
        if (task_rsp.reduction) r_q <= r_q + task_rsp.value;
      end
      unique case (state_q)
        M_IDLE: if (start) begin
          cfg_q   <= cfg;
          r_q     <= '0;
          iter_q  <= '0;
          state_q <= M_INIT;
        end
        M_MREQ:  if (l1_req_ready) state_q <= M_MWAIT;
        M_MWAIT: if (l1_rsp_valid) begin
          ld_q    <= l1_rsp.rdata;
          state_q <= ret_q;
        end
        M_INIT: begin
          if (cfg_q.kernel == K_GS) begin
            mreq_q  <= '{op: L1_STORE, addr: cfg_q.base_c, wdata: '0, be: 4'hF, last: 1'b0};
            ret_q   <= M_FLUSH;
            state_q <= M_MREQ;
          end else begin
            state_q <= M_FLUSH;
          end
        end
        M_FLUSH: begin
          mreq_q  <= '{op: L1_FLUSH_ALL, addr: '0, wdata: '0, be: '0, last: 1'b1};
          ret_q   <= M_FORK;
          state_q <= M_MREQ;
          lo_q    <= cfg_q.first;
          sent_q  <= '0;
          recv_q  <= fire_rsp ? 16'd1 : 16'd0;
          dest_q  <= '0;
        end
        M_FORK: begin
          if (fire_req) begin
            lo_q   <= hi;
            sent_q <= sent_q + 1'b1;
            dest_q <= (dest_q == 16'(N - 1)) ? '0 : dest_q + 1'b1;
          end
          if (lo_q >= cfg_q.last) state_q <= M_JOIN;
        end
        M_JOIN: begin
          if (recv_q == sent_q) begin
            iter_q <= iter_q + 1'b1;
            unique case (cfg_q.kernel)
              K_DOT:   state_q <= M_STORE_R;
              K_GS:    state_q <= M_LOAD_DMAX;
              default: state_q <= M_DONE;
            endcase
          end
        end
        M_STORE_R: begin
          mreq_q  <= '{op: L1_STORE, addr: cfg_q.base_c, wdata: r_q, be: 4'hF, last: 1'b0};
          ret_q   <= M_FLUSH_R;
          state_q <= M_MREQ;
        end
        M_FLUSH_R: begin
          mreq_q  <= '{op: L1_FLUSH_LIST, addr: cfg_q.base_c, wdata: '0, be: '0, last: 1'b1};
          ret_q   <= M_DONE;
          state_q <= M_MREQ;
        end
        M_LOAD_DMAX: begin
          mreq_q  <= '{op: L1_LOAD, addr: cfg_q.base_c, wdata: '0, be: '0, last: 1'b0};
          ret_q   <= M_CHECK;
          state_q <= M_MREQ;
        end
        M_CHECK: begin
          r_q <= ld_q;
          if ($signed(ld_q) > $signed(cfg_q.eps) && iter_q < cfg_q.max_iter)
            state_q <= M_INIT;
          else
            state_q <= M_DONE;
        end
        M_DONE: state_q <= M_IDLE;
        default: state_q <= M_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // a request once offered stays offered, unchanged, until it is taken
  a_task_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      task_req_valid && !task_req_ready |=> task_req_valid && $stable(task_req));
  a_l1_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      l1_req_valid && !l1_req_ready |=> l1_req_valid && $stable(l1_req));
  a_no_extra_finish: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == M_JOIN) |-> recv_q <= sent_q);
`endif
endmodule
