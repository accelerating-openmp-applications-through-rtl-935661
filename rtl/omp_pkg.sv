// omp_pkg: message formats and shared constants of the fork-join accelerator.
//
// Every connection between components is a message port: a request/response
// pair of valid/ready channels, with FIFOs at the receiving end. This package
// defines the payload of each kind of message:
//   - task network:      start requests from the master thread P0 to slave
//                        threads, finish (and finish_reduction) responses back;
//   - synchronization:   requests {threadID, synchID} to P_synch and responses
//                        carrying the current value of R_synch;
//   - thread-to-L1:      load, store, flush_list and flush_all;
//   - L1-to-L2:          line read and line write (with per-byte dirty mask);
//   - L2-to-memory:      whole-line read and write to the memory controller.
// The message kinds follow the architecture; all widths are this design's
// choice: 32-bit data words, 16-bit byte addresses, 16-byte cache lines.
package omp_pkg;

  localparam int unsigned DATA_W     = 32;
  localparam int unsigned ADDR_W     = 16;
  localparam int unsigned LINE_BYTES = 16;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned TID_W      = 8;   // thread / requester identifier
  localparam int unsigned SID_W      = 8;   // synchronization identifier

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [LINE_BYTES-1:0] mask_t;
  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [SID_W-1:0]  sid_t;

  // Application kernels: the three case studies and the introductory
  // worksharing loop.
  typedef enum logic [1:0] {
    K_MATVEC = 2'd0,   // y = A x, one task = a range of rows
    K_DOT    = 2'd1,   // r = b . x, one task = a range of elements, reduction
    K_GS     = 2'd2,   // one Gauss-Seidel sweep over a range of grid rows
    K_AVG    = 2'd3    // a[i] = (b[i] + b[i+1]) / 2, one task = a range of i
  } kernel_e;

  // Start request: "a start request with all initial input parameters".
  typedef struct packed {
    kernel_e  kernel;
    logic     any_free;   // 1: load-balancing delivery to any free slave
    tid_t     dest;       // slave thread 1..N when any_free = 0
    logic [15:0] lo;      // first iteration of the chunk
    logic [15:0] hi;      // one past the last iteration of the chunk
    logic [15:0] n;       // problem size n
    logic [15:0] m;       // problem size m (matrix columns)
    addr_t    base_a;     // A, b or the grid u
    addr_t    base_b;     // x
    addr_t    base_c;     // y, or the shared variable dmax
    sid_t     sid;        // synchronization identifier of the critical region
  } task_req_t;

  // Finish response, or finish_reduction response carrying a partial sum.
  typedef struct packed {
    tid_t  src;
    logic  reduction;
    word_t value;
  } task_rsp_t;

  typedef struct packed {
    tid_t tid;
    sid_t sid;
  } sync_req_t;

  // owner_valid = 0 encodes R_synch = NULL.
  typedef struct packed {
    tid_t tid;          // destination thread
    logic owner_valid;
    tid_t owner;
  } sync_rsp_t;

  typedef enum logic [1:0] {
    L1_LOAD       = 2'd0,
    L1_STORE      = 2'd1,
    L1_FLUSH_LIST = 2'd2,
    L1_FLUSH_ALL  = 2'd3
  } l1_op_e;

  // One flush_list entry per request; 'last' closes the list and asks for
  // the acknowledgement.
  typedef struct packed {
    l1_op_e     op;
    addr_t      addr;
    word_t      wdata;
    logic [3:0] be;
    logic       last;
  } l1_req_t;

  typedef struct packed {
    word_t rdata;
  } l1_rsp_t;

  typedef enum logic {
    L2_LINE_READ  = 1'b0,
    L2_LINE_WRITE = 1'b1
  } l2_op_e;

  typedef struct packed {
    l2_op_e op;
    tid_t   src;
    addr_t  addr;     // line aligned
    line_t  data;
    mask_t  mask;     // byte dirty bits of a line write
  } l2_req_t;

  typedef struct packed {
    tid_t  dst;
    line_t data;
  } l2_rsp_t;

  typedef struct packed {
    logic  we;
    addr_t addr;      // line aligned
    line_t data;
  } mem_req_t;

  typedef struct packed {
    line_t data;
  } mem_rsp_t;

  // Run configuration of the master thread P0.
  typedef struct packed {
    kernel_e     kernel;
    logic        dynamic_sched;  // 0: static chunks to fixed slaves; 1: load balanced
    logic [15:0] first;          // first loop iteration
    logic [15:0] last;           // one past the last loop iteration
    logic [15:0] chunk;          // iterations per task
    logic [15:0] n;
    logic [15:0] m;
    addr_t       base_a;
    addr_t       base_b;
    addr_t       base_c;         // y, r or dmax
    sid_t        sid;
    word_t       eps;            // Gauss-Seidel convergence threshold
    logic [15:0] max_iter;       // Gauss-Seidel iteration limit
  } run_cfg_t;

endpackage
