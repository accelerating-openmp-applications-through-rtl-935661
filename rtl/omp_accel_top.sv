// omp_accel_top: application-specific fork-join accelerator for OpenMP-style
// parallel regions.
//
// The master thread P0 forks a team of slave threads P1..PN over the task
// network and joins them when all finish responses are back. Every thread has
// a private non-coherent write-back L1 cache with per-byte dirty bits; the L1
// caches reach the shared L2 cache over the L1-to-L2 network, and L2 reaches
// off-chip memory through the memory controller, whose port is brought out
// here (mem_*). Slave threads reach the lock unit P_synch over the
// synchronization network to run critical regions.
//
// Interface: pulse 'start' with a run configuration 'cfg'; 'done' pulses when
// the parallel region (or the Gauss-Seidel loop) is complete, with 'result'
// and 'iterations' valid. Pulse 'l2_flush' afterwards to have L2 write every
// dirty line to memory; 'l2_flush_done' pulses when that is finished.
// Identifiers: P0 and its cache are 0, slave Pi and its cache are i.
// With NSUB > 0 every slave position holds a sub-master P_i-P0
// (nested_master) with its own task network and NSUB subthreads, whose L1
// caches join the same L1-to-L2 network and whose threads join the same
// synchronization network (two-level nested parallelism). NSUB = 0, the
// default, is the single-level architecture.
// The block structure follows the source article's architecture figure; P0 has no
// synchronization port because none of the kernels has a critical
// region in P0. Sizes are parameters.
module omp_accel_top
  import omp_pkg::*;
#(
  parameter int unsigned N          = 4,    // slave threads
  parameter int unsigned NSYNCH     = 1,    // P_synch ports (synchronization identifiers)
  parameter int unsigned L1_LINES   = 16,
  parameter int unsigned L2_LINES   = 256,
  parameter int unsigned FIFO_DEPTH = 2,    // slave receive FIFO depth
  parameter int unsigned NSUB       = 0     // subthreads per slave position (0: no nesting)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  run_cfg_t    cfg,
  output logic        busy,
  output logic        done,
  output word_t       result,
  output logic [15:0] iterations,
  input  logic        l2_flush,
  output logic        l2_flush_done,
  // memory controller port of the L2 cache
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_req_t    mem_req,
  input  logic        mem_rsp_valid,
  input  mem_rsp_t    mem_rsp
);
  localparam int unsigned NT = N * (1 + NSUB);   // all threads below P0
  localparam int unsigned NM = NT + 1;           // all L1 caches

  // task network
  logic      p0_treq_valid, p0_treq_ready, p0_trsp_valid, p0_trsp_ready;
  task_req_t p0_treq;
  task_rsp_t p0_trsp;
  logic      [N-1:0] s_treq_valid, s_treq_ready, s_trsp_valid, s_trsp_ready;
  task_req_t s_treq;
  task_rsp_t s_trsp [N];

  // thread <-> L1
  logic    [NM-1:0] c_req_valid, c_req_ready, c_rsp_valid, c_rsp_ready;
  l1_req_t          c_req [NM];
  l1_rsp_t          c_rsp [NM];

  // L1 <-> network
  logic    [NM-1:0] l_req_valid, l_req_ready, l_rsp_valid, l_rsp_ready;
  l2_req_t          l_req [NM];
  l2_rsp_t          l_rsp;

  // network <-> L2
  logic    l2_req_valid, l2_req_ready, l2_rsp_valid, l2_rsp_ready;
  l2_req_t l2_req;
  l2_rsp_t l2_rsp;

  // synchronization
  logic      [NT-1:0] t_sreq_valid, t_sreq_ready, t_srsp_valid, t_srsp_ready;
  sync_req_t          t_sreq [NT];
  sync_rsp_t          t_srsp [NT];
  logic      [NSYNCH-1:0] p_sreq_valid, p_sreq_ready, p_srsp_valid, p_srsp_ready, locked;
  sync_req_t              p_sreq [NSYNCH];
  sync_rsp_t              p_srsp [NSYNCH];

  master_thread #(.N(N)) u_p0 (
    .clk, .rst_n, .start, .cfg, .busy, .done, .result, .iterations,
    .task_req_valid (p0_treq_valid), .task_req_ready (p0_treq_ready), .task_req (p0_treq),
    .task_rsp_valid (p0_trsp_valid), .task_rsp_ready (p0_trsp_ready), .task_rsp (p0_trsp),
    .l1_req_valid   (c_req_valid[0]), .l1_req_ready (c_req_ready[0]), .l1_req (c_req[0]),
    .l1_rsp_valid   (c_rsp_valid[0]), .l1_rsp_ready (c_rsp_ready[0]), .l1_rsp (c_rsp[0])
  );

  task_net #(.N(N)) u_task_net (
    .clk, .rst_n,
    .p0_req_valid (p0_treq_valid), .p0_req_ready (p0_treq_ready), .p0_req (p0_treq),
    .p0_rsp_valid (p0_trsp_valid), .p0_rsp_ready (p0_trsp_ready), .p0_rsp (p0_trsp),
    .s_req_valid  (s_treq_valid),  .s_req_ready  (s_treq_ready),  .s_req  (s_treq),
    .s_rsp_valid  (s_trsp_valid),  .s_rsp_ready  (s_trsp_ready),  .s_rsp  (s_trsp)
  );

  // Thread (and L1 cache) numbering: slave position i (0-based) is thread
  // i+1; subthread k of position i is thread N + i*NSUB + k + 1.
  for (genvar i = 0; i < N; i++) begin : g_slave
    if (NSUB == 0) begin : g_flat
      slave_thread #(.TID(i + 1), .FIFO_DEPTH(FIFO_DEPTH)) u_thread (
        .clk, .rst_n,
        .task_req_valid (s_treq_valid[i]), .task_req_ready (s_treq_ready[i]), .task_req (s_treq),
        .task_rsp_valid (s_trsp_valid[i]), .task_rsp_ready (s_trsp_ready[i]), .task_rsp (s_trsp[i]),
        .l1_req_valid   (c_req_valid[i+1]), .l1_req_ready (c_req_ready[i+1]), .l1_req (c_req[i+1]),
        .l1_rsp_valid   (c_rsp_valid[i+1]), .l1_rsp_ready (c_rsp_ready[i+1]), .l1_rsp (c_rsp[i+1]),
        .sync_req_valid (t_sreq_valid[i]), .sync_req_ready (t_sreq_ready[i]), .sync_req (t_sreq[i]),
        .sync_rsp_valid (t_srsp_valid[i]), .sync_rsp_ready (t_srsp_ready[i]), .sync_rsp (t_srsp[i]),
        .busy           ()
      );
    end else begin : g_nested
      localparam int unsigned B = N + i * NSUB;   // index of subthread 0 minus 1
      logic      sub_req_valid, sub_req_ready, sub_rsp_valid, sub_rsp_ready;
      task_req_t sub_req, ss_req;
      task_rsp_t sub_rsp;
      logic      [NSUB-1:0] ss_req_valid, ss_req_ready, ss_rsp_valid, ss_rsp_ready;
      task_rsp_t            ss_rsp [NSUB];

      nested_master #(.TID(i + 1), .NSUB(NSUB), .FIFO_DEPTH(FIFO_DEPTH)) u_sub_p0 (
        .clk, .rst_n,
        .task_req_valid (s_treq_valid[i]), .task_req_ready (s_treq_ready[i]), .task_req (s_treq),
        .task_rsp_valid (s_trsp_valid[i]), .task_rsp_ready (s_trsp_ready[i]), .task_rsp (s_trsp[i]),
        .sub_req_valid, .sub_req_ready, .sub_req, .sub_rsp_valid, .sub_rsp_ready, .sub_rsp,
        .l1_req_valid   (c_req_valid[i+1]), .l1_req_ready (c_req_ready[i+1]), .l1_req (c_req[i+1]),
        .l1_rsp_valid   (c_rsp_valid[i+1]), .l1_rsp_ready (c_rsp_ready[i+1]), .l1_rsp (c_rsp[i+1]),
        .sync_req_valid (t_sreq_valid[i]), .sync_req_ready (t_sreq_ready[i]), .sync_req (t_sreq[i]),
        .sync_rsp_valid (t_srsp_valid[i]), .sync_rsp_ready (t_srsp_ready[i]), .sync_rsp (t_srsp[i]),
        .busy           ()
      );

      task_net #(.N(NSUB)) u_sub_task_net (
        .clk, .rst_n,
        .p0_req_valid (sub_req_valid), .p0_req_ready (sub_req_ready), .p0_req (sub_req),
        .p0_rsp_valid (sub_rsp_valid), .p0_rsp_ready (sub_rsp_ready), .p0_rsp (sub_rsp),
        .s_req_valid  (ss_req_valid),  .s_req_ready  (ss_req_ready),  .s_req  (ss_req),
        .s_rsp_valid  (ss_rsp_valid),  .s_rsp_ready  (ss_rsp_ready),  .s_rsp  (ss_rsp)
      );

      for (genvar k = 0; k < NSUB; k++) begin : g_sub
        slave_thread #(.TID(B + k + 1), .FIFO_DEPTH(FIFO_DEPTH)) u_thread (
          .clk, .rst_n,
          .task_req_valid (ss_req_valid[k]), .task_req_ready (ss_req_ready[k]), .task_req (ss_req),
          .task_rsp_valid (ss_rsp_valid[k]), .task_rsp_ready (ss_rsp_ready[k]), .task_rsp (ss_rsp[k]),
          .l1_req_valid   (c_req_valid[B+k+1]), .l1_req_ready (c_req_ready[B+k+1]), .l1_req (c_req[B+k+1]),
          .l1_rsp_valid   (c_rsp_valid[B+k+1]), .l1_rsp_ready (c_rsp_ready[B+k+1]), .l1_rsp (c_rsp[B+k+1]),
          .sync_req_valid (t_sreq_valid[B+k]), .sync_req_ready (t_sreq_ready[B+k]), .sync_req (t_sreq[B+k]),
          .sync_rsp_valid (t_srsp_valid[B+k]), .sync_rsp_ready (t_srsp_ready[B+k]), .sync_rsp (t_srsp[B+k]),
          .busy           ()
        );
      end
    end
  end

  for (genvar k = 0; k < NM; k++) begin : g_l1
    l1_cache #(.ID(k), .LINES(L1_LINES)) u_l1 (
      .clk, .rst_n,
      .req_valid    (c_req_valid[k]), .req_ready (c_req_ready[k]), .req (c_req[k]),
      .rsp_valid    (c_rsp_valid[k]), .rsp_ready (c_rsp_ready[k]), .rsp (c_rsp[k]),
      .l2_req_valid (l_req_valid[k]), .l2_req_ready (l_req_ready[k]), .l2_req (l_req[k]),
      .l2_rsp_valid (l_rsp_valid[k]), .l2_rsp_ready (l_rsp_ready[k]), .l2_rsp (l_rsp)
    );
  end

  l1l2_net #(.NM(NM)) u_l1l2_net (
    .clk, .rst_n,
    .m_req_valid  (l_req_valid), .m_req_ready (l_req_ready), .m_req (l_req),
    .m_rsp_valid  (l_rsp_valid), .m_rsp_ready (l_rsp_ready), .m_rsp (l_rsp),
    .l2_req_valid, .l2_req_ready, .l2_req,
    .l2_rsp_valid, .l2_rsp_ready, .l2_rsp
  );

  l2_cache #(.LINES(L2_LINES)) u_l2 (
    .clk, .rst_n,
    .req_valid (l2_req_valid), .req_ready (l2_req_ready), .req (l2_req),
    .rsp_valid (l2_rsp_valid), .rsp_ready (l2_rsp_ready), .rsp (l2_rsp),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp,
    .flush_req (l2_flush), .flush_done (l2_flush_done)
  );

  sync_net #(.N(NT), .NSYNCH(NSYNCH)) u_sync_net (
    .clk, .rst_n,
    .t_req_valid (t_sreq_valid), .t_req_ready (t_sreq_ready), .t_req (t_sreq),
    .t_rsp_valid (t_srsp_valid), .t_rsp_ready (t_srsp_ready), .t_rsp (t_srsp),
    .p_req_valid (p_sreq_valid), .p_req_ready (p_sreq_ready), .p_req (p_sreq),
    .p_rsp_valid (p_srsp_valid), .p_rsp_ready (p_srsp_ready), .p_rsp (p_srsp)
  );

  psynch #(.NSYNCH(NSYNCH)) u_psynch (
    .clk, .rst_n,
    .req_valid (p_sreq_valid), .req_ready (p_sreq_ready), .req (p_sreq),
    .rsp_valid (p_srsp_valid), .rsp_ready (p_srsp_ready), .rsp (p_srsp),
    .locked
  );
endmodule
