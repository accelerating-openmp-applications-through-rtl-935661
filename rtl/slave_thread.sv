// slave_thread: a slave hardware thread P_i of the fork-join team.
//
// The thread idles until a start request arrives in its receive FIFO, runs
// the task the request describes, flushes its L1 cache (flush_all, the
// implicit flush at the end of a parallel region), waits for the
// acknowledgement and sends a finish response to P0; then it takes the next
// start request. The receive FIFO's 'full' is what the load-balancing task
// network looks at.
//
// The task is one of four kernels, chosen by the request:
//   K_MATVEC  rows lo..hi-1 of y = A x:  y[i] = sum_j A[i*m+j] * x[j]
//   K_DOT     elements lo..hi-1 of r = b . x; the partial sum goes back in a
//             finish_reduction response
//   K_GS      one Gauss-Seidel sweep over grid rows lo..hi-1 of the
//             (n+2) x (n+2) grid u:
//               u[i][j] = (u[i-1][j] + u[i+1][j] + u[i][j-1] + u[i][j+1]) / 4
//             keeping dmaxL, the largest |change| of the row. After each row
//             the thread enters the critical region: it asks P_synch for lock
//             'sid', retries after a pseudo-random back-off while another
//             thread holds it, then flush_list(dmax), load dmax, store
//             max(dmax, dmaxL), flush_list(dmax), and releases the lock.
//   K_AVG     elements lo..hi-1 of the worksharing loop a[i] = (b[i]+b[i+1])/2
//             with b at base_a and a at base_c. Neighbouring tasks write
//             different words of the same cache line; the per-byte dirty bits
//             of the L1 caches keep those writes apart.
// All arithmetic is 32-bit two's-complement integer (the source article's
// examples are floating point); the divisions by 4 and by 2 are arithmetic
// shifts.
// Each memory access is one blocking request to the L1 cache, so the thread
// is a plain state machine rather than the deep pipeline the source article
// mentions. The kernels and the lock protocol follow the source article; the
// integer arithmetic, the update formula of the Gauss-Seidel step (elided in
// the source article) and the back-off range are this design's.
module slave_thread
  import omp_pkg::*;
#(
  parameter int unsigned TID        = 1,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // slave port to the task network
  input  logic      task_req_valid,
  output logic      task_req_ready,
  input  task_req_t task_req,
  output logic      task_rsp_valid,
  input  logic      task_rsp_ready,
  output task_rsp_t task_rsp,
  // master port to the L1 cache
  output logic      l1_req_valid,
  input  logic      l1_req_ready,
  output l1_req_t   l1_req,
  input  logic      l1_rsp_valid,
  output logic      l1_rsp_ready,
  input  l1_rsp_t   l1_rsp,
  // master port to the synchronization network
  output logic      sync_req_valid,
  input  logic      sync_req_ready,
  output sync_req_t sync_req,
  input  logic      sync_rsp_valid,
  output logic      sync_rsp_ready,
  input  sync_rsp_t sync_rsp,
  output logic      busy
);
  typedef enum logic [5:0] {
    ST_IDLE, ST_MREQ, ST_MWAIT,
    MV_ROW, MV_LDA, MV_LDX, MV_MAC, MV_NEXT,
    DT_LDB, DT_LDX, DT_MAC,
    AV_LD0, AV_LD1, AV_ST,
    GS_ROW, GS_LDC, GS_LDN, GS_LDS, GS_LDW, GS_LDE, GS_UPD, GS_NEXTJ,
    CR_REQ, CR_WAIT, CR_BACKOFF, CR_FL1, CR_LD, CR_CMP, CR_FL2, CR_REL, CR_REL_WAIT,
    ST_END, ST_FIN
  } state_e;

  // receive FIFO of the task port
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

  state_e    state_q, ret_q;
  task_req_t t_q;
  l1_req_t   mreq_q;
  word_t     ld_q;          // last loaded word
  word_t     tmp_q;         // first operand / old grid value
  word_t     acc_q;         // dot product, neighbour sum
  word_t     dmaxl_q;
  logic [15:0] i_q, j_q;
  logic [15:0] lfsr_q;
  logic [3:0]  wait_q;

  assign busy           = (state_q != ST_IDLE);
  assign q_ready        = (state_q == ST_IDLE);
  assign l1_req_valid   = (state_q == ST_MREQ);
  assign l1_req         = mreq_q;
  assign l1_rsp_ready   = (state_q == ST_MWAIT);
  assign sync_req_valid = (state_q == CR_REQ) || (state_q == CR_REL);
  assign sync_req       = '{tid: tid_t'(TID), sid: t_q.sid};
  assign sync_rsp_ready = (state_q == CR_WAIT) || (state_q == CR_REL_WAIT);
  assign task_rsp_valid = (state_q == ST_FIN);
  assign task_rsp       = '{src: tid_t'(TID), reduction: (t_q.kernel == K_DOT), value: acc_q};

  // word address helpers
  function automatic addr_t waddr(input addr_t base, input logic [31:0] index);
    return base + addr_t'(index << 2);
  endfunction

  logic [15:0] stride;
  assign stride = t_q.n + 16'd2;

  function automatic logic [31:0] grid(input logic [15:0] r, input logic [15:0] c,
                                       input logic [15:0] w);
    return 32'(r) * 32'(w) + 32'(c);
  endfunction

  word_t gs_new, gs_diff, prod, avg;
  assign gs_new  = word_t'($signed(acc_q + ld_q) >>> 2);
  assign gs_diff = ($signed(tmp_q) > $signed(gs_new)) ? tmp_q - gs_new : gs_new - tmp_q;
  assign prod    = tmp_q * ld_q;
  assign avg     = word_t'($signed(tmp_q + ld_q) >>> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      ret_q   <= ST_IDLE;
      t_q     <= '0;
      mreq_q  <= '0;
      ld_q    <= '0;
      tmp_q   <= '0;
      acc_q   <= '0;
      dmaxl_q <= '0;
      i_q     <= '0;
      j_q     <= '0;
      lfsr_q  <= 16'hACE1 ^ 16'(TID * 16'h1F35);
      wait_q  <= '0;
    end else begin
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      unique case (state_q)
        ST_IDLE: if (q_valid) begin
          t_q   <= q_data;
          i_q   <= q_data.lo;
          acc_q <= '0;
          unique case (q_data.kernel)
            K_MATVEC: state_q <= MV_ROW;
            K_DOT:    state_q <= DT_LDB;
            K_AVG:    state_q <= AV_LD0;
            default:  state_q <= GS_ROW;
          endcase
        end

        ST_MREQ:  if (l1_req_ready) state_q <= ST_MWAIT;
        ST_MWAIT: if (l1_rsp_valid) begin
          ld_q    <= l1_rsp.rdata;
          state_q <= ret_q;
        end

        // ---- y = A x ---------------------------------------------------
        MV_ROW: begin
          if (i_q >= t_q.hi) state_q <= ST_END;
          else begin
            acc_q   <= '0;
            j_q     <= '0;
            state_q <= MV_LDA;
          end
        end
        MV_LDA: begin
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, grid(i_q, j_q, t_q.m)),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= MV_LDX;
          state_q <= ST_MREQ;
        end
        MV_LDX: begin
          tmp_q   <= ld_q;
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_b, 32'(j_q)),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= MV_MAC;
          state_q <= ST_MREQ;
        end
        MV_MAC: begin
          acc_q <= acc_q + prod;
          j_q   <= j_q + 1'b1;
          if (j_q + 1'b1 == t_q.m) begin
            mreq_q  <= '{op: L1_STORE, addr: waddr(t_q.base_c, 32'(i_q)),
                         wdata: acc_q + prod, be: 4'hF, last: 1'b0};
            ret_q   <= MV_NEXT;
            state_q <= ST_MREQ;
          end else begin
            state_q <= MV_LDA;
          end
        end
        MV_NEXT: begin
          i_q     <= i_q + 1'b1;
          state_q <= MV_ROW;
        end

        // ---- r = b . x -------------------------------------------------
        DT_LDB: begin
          if (i_q >= t_q.hi) state_q <= ST_END;
          else begin
            mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, 32'(i_q)),
                         wdata: '0, be: '0, last: 1'b0};
            ret_q   <= DT_LDX;
            state_q <= ST_MREQ;
          end
        end
        DT_LDX: begin
          tmp_q   <= ld_q;
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_b, 32'(i_q)),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= DT_MAC;
          state_q <= ST_MREQ;
        end
        DT_MAC: begin
          acc_q   <= acc_q + prod;
          i_q     <= i_q + 1'b1;
          state_q <= DT_LDB;
        end

        // ---- a[i] = (b[i] + b[i+1]) / 2 ----------------------------------
        AV_LD0: begin
          if (i_q >= t_q.hi) state_q <= ST_END;
          else begin
            mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, 32'(i_q)),
                         wdata: '0, be: '0, last: 1'b0};
            ret_q   <= AV_LD1;
            state_q <= ST_MREQ;
          end
        end
        AV_LD1: begin
          tmp_q   <= ld_q;
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, 32'(i_q) + 32'd1),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= AV_ST;
          state_q <= ST_MREQ;
        end
        AV_ST: begin
          mreq_q  <= '{op: L1_STORE, addr: waddr(t_q.base_c, 32'(i_q)),
                       wdata: avg, be: 4'hF, last: 1'b0};
          i_q     <= i_q + 1'b1;
          ret_q   <= AV_LD0;
          state_q <= ST_MREQ;
        end

        // ---- one Gauss-Seidel sweep -------------------------------------
        GS_ROW: begin
          if (i_q >= t_q.hi) state_q <= ST_END;
          else begin
            dmaxl_q <= '0;
            j_q     <= 16'd1;
            state_q <= GS_LDC;
          end
        end
        GS_LDC: begin
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, grid(i_q, j_q, stride)),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= GS_LDN;
          state_q <= ST_MREQ;
        end
        GS_LDN: begin
          tmp_q   <= ld_q;
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, grid(i_q - 1'b1, j_q, stride)),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= GS_LDS;
          state_q <= ST_MREQ;
        end
        GS_LDS: begin
          acc_q   <= ld_q;
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, grid(i_q + 1'b1, j_q, stride)),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= GS_LDW;
          state_q <= ST_MREQ;
        end
        GS_LDW: begin
          acc_q   <= acc_q + ld_q;
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, grid(i_q, j_q - 1'b1, stride)),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= GS_LDE;
          state_q <= ST_MREQ;
        end
        GS_LDE: begin
          acc_q   <= acc_q + ld_q;
          mreq_q  <= '{op: L1_LOAD, addr: waddr(t_q.base_a, grid(i_q, j_q + 1'b1, stride)),
                       wdata: '0, be: '0, last: 1'b0};
          ret_q   <= GS_UPD;
          state_q <= ST_MREQ;
        end
        GS_UPD: begin
          if ($signed(gs_diff) > $signed(dmaxl_q)) dmaxl_q <= gs_diff;
          mreq_q  <= '{op: L1_STORE, addr: waddr(t_q.base_a, grid(i_q, j_q, stride)),
                       wdata: gs_new, be: 4'hF, last: 1'b0};
          ret_q   <= GS_NEXTJ;
          state_q <= ST_MREQ;
        end
        GS_NEXTJ: begin
          j_q <= j_q + 1'b1;
          if (j_q == t_q.n) state_q <= CR_REQ;
          else              state_q <= GS_LDC;
        end

        // ---- critical region: if (dmax < dmaxL) dmax = dmaxL -------------
        CR_REQ:  if (sync_req_ready) state_q <= CR_WAIT;
        CR_WAIT: if (sync_rsp_valid) begin
          if (sync_rsp.owner_valid && sync_rsp.owner == tid_t'(TID)) begin
            state_q <= CR_FL1;
          end else begin
            wait_q  <= lfsr_q[3:0];
            state_q <= CR_BACKOFF;
          end
        end
        CR_BACKOFF: begin
          if (wait_q == '0) state_q <= CR_REQ;
          else              wait_q  <= wait_q - 1'b1;
        end
        CR_FL1: begin
          mreq_q  <= '{op: L1_FLUSH_LIST, addr: t_q.base_c, wdata: '0, be: '0, last: 1'b1};
          ret_q   <= CR_LD;
          state_q <= ST_MREQ;
        end
        CR_LD: begin
          mreq_q  <= '{op: L1_LOAD, addr: t_q.base_c, wdata: '0, be: '0, last: 1'b0};
          ret_q   <= CR_CMP;
          state_q <= ST_MREQ;
        end
        CR_CMP: begin
          if ($signed(ld_q) < $signed(dmaxl_q)) begin
            mreq_q  <= '{op: L1_STORE, addr: t_q.base_c, wdata: dmaxl_q, be: 4'hF, last: 1'b0};
            ret_q   <= CR_FL2;
            state_q <= ST_MREQ;
          end else begin
            state_q <= CR_FL2;
          end
        end
        CR_FL2: begin
          mreq_q  <= '{op: L1_FLUSH_LIST, addr: t_q.base_c, wdata: '0, be: '0, last: 1'b1};
          ret_q   <= CR_REL;
          state_q <= ST_MREQ;
        end
        CR_REL:      if (sync_req_ready) state_q <= CR_REL_WAIT;
        CR_REL_WAIT: if (sync_rsp_valid) begin
          i_q     <= i_q + 1'b1;
          state_q <= GS_ROW;
        end

        // ---- end of task: implicit flush, then finish --------------------
        ST_END: begin
          mreq_q  <= '{op: L1_FLUSH_ALL, addr: '0, wdata: '0, be: '0, last: 1'b1};
          ret_q   <= ST_FIN;
          state_q <= ST_MREQ;
        end
        ST_FIN: if (task_rsp_ready) state_q <= ST_IDLE;

        default: state_q <= ST_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // requests once offered stay offered, unchanged, until they are taken
  a_l1_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      l1_req_valid && !l1_req_ready |=> l1_req_valid && $stable(l1_req));
  a_sync_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      sync_req_valid && !sync_req_ready |=> sync_req_valid && $stable(sync_req));
  a_task_rsp_hold: assert property (@(posedge clk) disable iff (!rst_n)
      task_rsp_valid && !task_rsp_ready |=> task_rsp_valid && $stable(task_rsp));
  a_release_ok: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == CR_REL_WAIT && sync_rsp_valid) |-> !sync_rsp.owner_valid);
`endif
endmodule
