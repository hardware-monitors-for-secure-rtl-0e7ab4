// sequencing_logic: next address pointer of the monitoring graph.
//
// States are grouped by the fan-out of their predecessor: group g holds
// the successor blocks of all states with g outgoing edges, each block g
// rows long. The successor of the current state for the matching hash is
//   next_ptr = base[g] + g * offset + k
// with g = number of next states, offset = the block index stored in the
// current entry, k = rank of the matching hash. The base register of group
// g is addressed with g-1 (`group`). The result is relative to the start
// (frame address) of the graph slot. Combinational.
//
// The group/offset scheme follows the prototype's sequencing logic; the
// exact formula and bit widths are this design's.
module sequencing_logic
  import mthm_pkg::*;
(
  input  logic [NNEXT_W-1:0] nnext,
  input  logic [OFFS_W-1:0]  offset,
  input  logic [K_W-1:0]     k,
  output logic [3:0]         group,
  input  logic [BASE_W-1:0]  group_base,
  output logic [GADDR_W-1:0] next_ptr
);

  logic [NNEXT_W+OFFS_W-1:0] block_start;

  assign group       = 4'(nnext - NNEXT_W'(1));
  assign block_start = nnext * offset;
  assign next_ptr    = GADDR_W'(group_base) + GADDR_W'(block_start) + GADDR_W'(k);

endmodule
