// l2_cache: the single shared, write-back L2 cache.
//
// It serves line read and line write requests from the L1 caches through the
// L1-to-L2 network and keeps its lines in on-chip storage, while the
// application data lives in off-chip memory behind the memory controller.
// A line write carries a byte mask (the L1's per-byte dirty bits) and only
// the masked bytes are merged into the line, so partial lines from different
// L1 caches combine correctly. Every request is answered on the response
// channel: the line for a read, an acknowledgement for a write.
// Organisation: direct mapped, LINES lines of 16 bytes; a miss writes the
// victim back to memory if it is dirty and then reads the line (also for a
// line write, which is then merged). Memory writes need no answer; a memory
// read is answered by one beat on mem_rsp.
// flush_req makes the cache write every dirty line back to memory and then
// pulse flush_done, so the final results can be read from memory; the
// source article keeps final data in L2 and does not describe this, it is this
// design's addition. Direct mapping and the sizes are also this design's.
module l2_cache
  import omp_pkg::*;
#(
  parameter int unsigned LINES = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  l2_req_t  req,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output l2_rsp_t  rsp,
  // master port to the memory controller
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  input  mem_rsp_t mem_rsp,
  // write back everything
  input  logic     flush_req,
  output logic     flush_done
);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - IDX_W - OFF_W;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_EVICT, S_FILL, S_FILL_WAIT, S_RESP, S_SCAN, S_SCAN_WB
  } state_e;

  state_e  state_q;
  l2_req_t req_q;
  line_t   rdata_q;

  line_t            data_q  [LINES];
  logic [TAG_W-1:0] tag_q   [LINES];
  logic [LINES-1:0] valid_q;
  logic [LINES-1:0] dirty_q;
  logic [IDX_W-1:0] scan_q;

  logic [IDX_W-1:0] r_idx;
  logic [TAG_W-1:0] r_tag;
  logic             hit;
  assign r_idx = req_q.addr[OFF_W +: IDX_W];
  assign r_tag = req_q.addr[ADDR_W-1 -: TAG_W];
  assign hit   = valid_q[r_idx] && (tag_q[r_idx] == r_tag);

  function automatic line_t merge(input line_t old, input line_t nw, input mask_t m);
    line_t r;
    r = old;
    for (int b = 0; b < LINE_BYTES; b++)
      if (m[b]) r[b*8 +: 8] = nw[b*8 +: 8];
    return r;
  endfunction

  assign req_ready  = (state_q == S_IDLE) && !flush_req;
  assign rsp_valid  = (state_q == S_RESP);
  assign rsp.dst    = req_q.src;
  assign rsp.data   = rdata_q;

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    unique case (state_q)
      S_EVICT: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = {tag_q[r_idx], r_idx, {OFF_W{1'b0}}};
        mem_req.data  = data_q[r_idx];
      end
      S_FILL: begin
        mem_req_valid = 1'b1;
        mem_req.addr  = {r_tag, r_idx, {OFF_W{1'b0}}};
      end
      S_SCAN_WB: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = {tag_q[scan_q], scan_q, {OFF_W{1'b0}}};
        mem_req.data  = data_q[scan_q];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      req_q      <= '0;
      rdata_q    <= '0;
      valid_q    <= '0;
      dirty_q    <= '0;
      scan_q     <= '0;
      flush_done <= 1'b0;
      for (int i = 0; i < LINES; i++) tag_q[i] <= '0;
    end else begin
      flush_done <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (flush_req) begin
            scan_q  <= '0;
            state_q <= S_SCAN;
          end else if (req_valid) begin
            req_q   <= req;
            state_q <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (hit) begin
            if (req_q.op == L2_LINE_WRITE) begin
              data_q[r_idx]  <= merge(data_q[r_idx], req_q.data, req_q.mask);
              dirty_q[r_idx] <= 1'b1;
            end else begin
              rdata_q <= data_q[r_idx];
            end
            state_q <= S_RESP;
          end else if (valid_q[r_idx] && dirty_q[r_idx]) begin
            state_q <= S_EVICT;
          end else begin
            state_q <= S_FILL;
          end
        end
        S_EVICT: if (mem_req_ready) begin
          dirty_q[r_idx] <= 1'b0;
          valid_q[r_idx] <= 1'b0;
          state_q        <= S_FILL;
        end
        S_FILL: if (mem_req_ready) state_q <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_rsp_valid) begin
          data_q[r_idx]  <= mem_rsp.data;
          tag_q[r_idx]   <= r_tag;
          valid_q[r_idx] <= 1'b1;
          dirty_q[r_idx] <= 1'b0;
          state_q        <= S_LOOKUP;
        end
        S_RESP: if (rsp_ready) state_q <= S_IDLE;
        S_SCAN: begin
          if (valid_q[scan_q] && dirty_q[scan_q]) begin
            state_q <= S_SCAN_WB;
          end else if (scan_q == IDX_W'(LINES - 1)) begin
            flush_done <= 1'b1;
            state_q    <= S_IDLE;
          end else begin
            scan_q <= scan_q + 1'b1;
          end
        end
        S_SCAN_WB: if (mem_req_ready) begin
          dirty_q[scan_q] <= 1'b0;
          if (scan_q == IDX_W'(LINES - 1)) begin
            flush_done <= 1'b1;
            state_q    <= S_IDLE;
          end else begin
            scan_q  <= scan_q + 1'b1;
            state_q <= S_SCAN;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
