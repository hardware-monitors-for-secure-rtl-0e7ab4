// graph_memory: monitor graph memory.
//
// Holds the monitoring graphs of the processes currently known to one
// monitor, one graph per slot of SLOT words. One synchronous read port
// serves the monitor (one lookup per instruction, data one cycle after the
// address); one write port is used by the DMA to copy a graph in, so a copy
// never stalls monitoring of the running process. Addresses are GADDR_W
// bits; the upper bits beyond the depth are ignored.
//
// One memory divided into per-graph slots follows the prototype; the slot
// size and the registered read port are this design's choices.
module graph_memory
  import mthm_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic               clk,
  input  logic [GADDR_W-1:0] raddr,
  output logic [GDATA_W-1:0] rdata,
  input  gmem_wr_t           wr
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [GDATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr.en) mem[wr.addr[AW-1:0]] <= wr.data;
    rdata <= mem[raddr[AW-1:0]];
  end

endmodule
