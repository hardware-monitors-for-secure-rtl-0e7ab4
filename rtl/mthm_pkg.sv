// mthm_pkg: types and constants shared by the multi-task hardware monitor.
//
// The monitor checks every instruction of the running task against a
// deterministic state machine (the monitoring graph) of that task. Widths
// that appear in the signal traces of the prototype are used as they are:
// 4-bit hash, 16-bit valid-hash vector, 14-bit graph address, 32-bit graph
// words, 4-bit PID and GID. The bit layout of a graph entry and of a slot
// header is this design's choice (see graph_entry_t).
package mthm_pkg;

  localparam int unsigned INSTR_W  = 32;  // processor instruction width
  localparam int unsigned HASH_W   = 4;   // instruction hash width
  localparam int unsigned NHASH    = 16;  // one-hot hash / valid-hash width
  localparam int unsigned GADDR_W  = 14;  // graph memory address width
  localparam int unsigned GDATA_W  = 32;  // graph memory word width
  localparam int unsigned BASE_W   = 16;  // group base address register width
  localparam int unsigned NGROUPS  = 16;  // group base address registers
  localparam int unsigned PID_W    = 4;   // process identifier width
  localparam int unsigned GID_W    = 4;   // graph identifier width
  localparam int unsigned NNEXT_W  = 5;   // number of next states, 0..16
  localparam int unsigned OFFS_W   = 11;  // offset in state group
  localparam int unsigned K_W      = 4;   // rank of the matching hash

  // Each graph slot starts with HDR_WORDS words holding the 16 group base
  // addresses (two 16-bit values per word); the first state row follows.
  localparam int unsigned HDR_WORDS = 8;
  localparam logic [GADDR_W-1:0] START_PTR = GADDR_W'(HDR_WORDS);

  // Operation register codes written by the operating system.
  typedef enum logic [1:0] {
    OP_NONE   = 2'd0,
    OP_CREATE = 2'd1,
    OP_SWITCH = 2'd2,
    OP_DELETE = 2'd3
  } op_e;

  // One row of a monitoring graph (one DFA state).
  typedef struct packed {
    logic [NNEXT_W-1:0] nnext;   // number of next states (outgoing edges)
    logic [OFFS_W-1:0]  offset;  // offset of the successor block in its group
    logic [NHASH-1:0]   valid;   // one bit per hash value allowed next
  } graph_entry_t;

  // Write into a monitor graph memory (from the DMA).
  typedef struct packed {
    logic               en;
    logic [GADDR_W-1:0] addr;
    logic [GDATA_W-1:0] data;
  } gmem_wr_t;

  // Graph copy request from a monitor.
  typedef struct packed {
    logic               req;
    logic [GID_W-1:0]   gid;
    logic [GADDR_W-1:0] dst;  // frame address of the destination slot
  } dma_req_t;

endpackage
