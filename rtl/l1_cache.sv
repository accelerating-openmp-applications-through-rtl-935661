// l1_cache: private, non-coherent, write-back L1 data cache of one thread.
//
// Each hardware thread keeps its temporary view of shared memory here. The
// cache has a slave port to its thread and a master port to the L1-to-L2
// network. It keeps no coherence state; instead every byte of a line has its
// own dirty bit, and a line is written to L2 together with that byte mask, so
// L2 updates only the bytes this thread wrote. Two threads writing different
// bytes of the same line therefore do not overwrite each other's data
// (no false-sharing error).
//
// Requests from the thread (one at a time, each answered on the response
// channel except a flush_list entry that is not the last one):
//   load        read a word; on a miss the victim line is written back if
//               it has dirty bytes, then the line is read from L2;
//   store       write the enabled bytes of a word and mark them dirty
//               (write-allocate: a miss first fetches the line);
//   flush_list  one address per request; the line holding it is written
//               back with its dirty mask if dirty, then invalidated; the
//               acknowledgement comes after the entry marked 'last';
//   flush_all   every dirty line is written back, every line invalidated,
//               then one acknowledgement.
// Organisation: direct mapped, LINES lines of 16 bytes. A hit costs two
// cycles from request to response. The direct-mapped organisation, the size,
// write-allocate and the one-entry-per-request flush list are this design's
// choices; write-back, per-byte dirty bits and the two flush requests follow
// the source article.
module l1_cache
  import omp_pkg::*;
#(
  parameter int unsigned ID    = 0,
  parameter int unsigned LINES = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // slave port to the thread
  input  logic    req_valid,
  output logic    req_ready,
  input  l1_req_t req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output l1_rsp_t rsp,
  // master port to the L1-to-L2 network
  output logic    l2_req_valid,
  input  logic    l2_req_ready,
  output l2_req_t l2_req,
  input  logic    l2_rsp_valid,
  output logic    l2_rsp_ready,
  input  l2_rsp_t l2_rsp
);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - IDX_W - OFF_W;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_WB, S_WB_WAIT, S_FILL, S_FILL_WAIT, S_SCAN, S_RESP
  } state_e;

  state_e state_q;
  l1_req_t req_q;
  word_t   rdata_q;

  line_t             data_q  [LINES];
  logic [TAG_W-1:0]  tag_q   [LINES];
  mask_t             dirty_q [LINES];
  logic [LINES-1:0]  valid_q;

  logic [IDX_W-1:0] cur_q;     // line being written back / filled / scanned

  logic [IDX_W-1:0] r_idx;
  logic [TAG_W-1:0] r_tag;
  logic [1:0]       r_word;
  logic             hit;

  assign r_idx  = req_q.addr[OFF_W +: IDX_W];
  assign r_tag  = req_q.addr[ADDR_W-1 -: TAG_W];
  assign r_word = req_q.addr[3:2];
  assign hit    = valid_q[r_idx] && (tag_q[r_idx] == r_tag);

  assign req_ready    = (state_q == S_IDLE);
  assign rsp_valid    = (state_q == S_RESP);
  assign rsp.rdata    = rdata_q;
  assign l2_rsp_ready = (state_q == S_WB_WAIT) || (state_q == S_FILL_WAIT);

  always_comb begin
    l2_req_valid = (state_q == S_WB) || (state_q == S_FILL);
    l2_req       = '0;
    l2_req.src   = tid_t'(ID);
    if (state_q == S_WB) begin
      l2_req.op   = L2_LINE_WRITE;
      l2_req.addr = {tag_q[cur_q], cur_q, {OFF_W{1'b0}}};
      l2_req.data = data_q[cur_q];
      l2_req.mask = dirty_q[cur_q];
    end else begin
      l2_req.op   = L2_LINE_READ;
      l2_req.addr = {r_tag, r_idx, {OFF_W{1'b0}}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      req_q   <= '0;
      rdata_q <= '0;
      cur_q   <= '0;
      valid_q <= '0;
      for (int i = 0; i < LINES; i++) begin
        dirty_q[i] <= '0;
        tag_q[i]   <= '0;
      end
    end else begin
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          req_q   <= req;
          state_q <= (req.op == L1_FLUSH_ALL) ? S_SCAN : S_LOOKUP;
          cur_q   <= '0;
        end

        S_LOOKUP: begin
          cur_q <= r_idx;
          unique case (req_q.op)
            L1_LOAD, L1_STORE: begin
              if (hit) begin
                rdata_q <= data_q[r_idx][r_word*32 +: 32];
                if (req_q.op == L1_STORE) begin
                  for (int b = 0; b < 4; b++) begin
                    if (req_q.be[b]) begin
                      data_q[r_idx][r_word*32 + b*8 +: 8] <= req_q.wdata[b*8 +: 8];
                      dirty_q[r_idx][r_word*4 + b]        <= 1'b1;
                    end
                  end
                end
                state_q <= S_RESP;
              end else if (valid_q[r_idx] && |dirty_q[r_idx]) begin
                state_q <= S_WB;
              end else begin
                state_q <= S_FILL;
              end
            end
            default: begin // L1_FLUSH_LIST
              if (hit && |dirty_q[r_idx]) begin
                state_q <= S_WB;
              end else begin
                if (hit) valid_q[r_idx] <= 1'b0;
                state_q <= req_q.last ? S_RESP : S_IDLE;
              end
            end
          endcase
        end

        S_WB: if (l2_req_ready) state_q <= S_WB_WAIT;

        S_WB_WAIT: if (l2_rsp_valid) begin
          dirty_q[cur_q] <= '0;
          valid_q[cur_q] <= 1'b0;
          unique case (req_q.op)
            L1_FLUSH_ALL:  state_q <= (cur_q == IDX_W'(LINES - 1)) ? S_RESP : S_SCAN;
            L1_FLUSH_LIST: state_q <= req_q.last ? S_RESP : S_IDLE;
            default:       state_q <= S_FILL;
          endcase
          if (req_q.op == L1_FLUSH_ALL) cur_q <= cur_q + 1'b1;
        end

        S_FILL: if (l2_req_ready) state_q <= S_FILL_WAIT;

        S_FILL_WAIT: if (l2_rsp_valid) begin
          data_q[r_idx]  <= l2_rsp.data;
          tag_q[r_idx]   <= r_tag;
          valid_q[r_idx] <= 1'b1;
          dirty_q[r_idx] <= '0;
          state_q        <= S_LOOKUP;
        end

        S_SCAN: begin
          if (valid_q[cur_q] && |dirty_q[cur_q]) begin
            state_q <= S_WB;
          end else begin
            valid_q[cur_q] <= 1'b0;
            if (cur_q == IDX_W'(LINES - 1)) state_q <= S_RESP;
            else                            cur_q   <= cur_q + 1'b1;
          end
        end

        S_RESP: if (rsp_ready) state_q <= S_IDLE;

        default: state_q <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_l2_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      l2_req_valid && !l2_req_ready |=> l2_req_valid && $stable(l2_req));
`endif
endmodule
