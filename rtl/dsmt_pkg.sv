// dsmt_pkg: shared sizes, types and helper functions of the DSMT thread-control
// subsystem. The default sizes are those of the evaluated machine: 8 contexts,
// 64-entry instruction queues and load/store queues, 32-entry reorder buffers,
// a 2K-entry 2-way branch target buffer and a 4-ported data cache. The register
// count (32 integer + 32 floating point, as in a MIPS-like ISA), the 32-bit
// word and address width and the small table sizes not given by the
// architecture description are this design's own choices.
package dsmt_pkg;

  localparam int NCTX      = 8;    // hardware contexts
  localparam int XLEN      = 32;   // register / data word width
  localparam int AW        = 32;   // byte address width
  localparam int NREG      = 64;   // logical registers per context
  localparam int RW        = $clog2(NREG);
  localparam int CW        = $clog2(NCTX);
  localparam int IQ_DEPTH  = 64;   // instruction queue entries per context
  localparam int ROB_DEPTH = 32;   // reorder buffer entries per context
  localparam int MOB_DEPTH = 64;   // load/store queue entries per context
  localparam int BTB_SETS  = 1024; // 2K entries, 2-way
  localparam int DC_PORTS  = 4;    // data cache ports
  localparam int FETCH_PORTS = 2;  // I-cache ports (ICount2.8)

  // Processor operating mode (pre-DSMT is still part of non-DSMT mode).
  typedef enum logic [1:0] {
    MODE_NON  = 2'd0,
    MODE_PRE  = 2'd1,
    MODE_FULL = 2'd2
  } dsmt_mode_e;

  // Context state; whether the context is speculative is the separate S bit.
  typedef enum logic [1:0] {
    CTX_INVALID = 2'd0,
    CTX_RUNNING = 2'd1,
    CTX_HOLD    = 2'd2,
    CTX_SYNC    = 2'd3
  } ctx_state_e;

  // Result of the relative-IPC comparison (full-DSMT against pre-DSMT).
  typedef enum logic [1:0] {
    IPC_NONE = 2'd0,
    IPC_LT   = 2'd1,
    IPC_EQ   = 2'd2,
    IPC_GT   = 2'd3
  } ipc_cmp_e;

  // Decoded instruction as delivered by the (external) fetch/decode front end.
  // op is opaque to the thread-control logic and goes to the execution units.
  typedef struct packed {
    logic [AW-1:0] pc;
    logic [3:0]    op;
    logic          dest_v;
    logic [RW-1:0] dest;
    logic          src1_v;
    logic [RW-1:0] src1;
    logic          src2_v;
    logic [RW-1:0] src2;
    logic [15:0]   imm;
    logic          stride_cand;  // add-immediate with dest == src1
    logic          is_branch;
    logic          is_call;      // subroutine call or system call
    logic          is_load;
    logic          is_store;
  } uop_t;

  // Flags a ROB entry carries to commit.
  typedef struct packed {
    logic [AW-1:0] pc;
    logic          is_branch;
    logic          is_load;
    logic          is_store;
    logic          is_call;
  } rob_flags_t;

  // Distance of context c after context head in the circular context order.
  function automatic int unsigned ring_dist(input int unsigned c, input int unsigned head,
                                            input int unsigned n);
    return (c + n - head) % n;
  endfunction

endpackage
