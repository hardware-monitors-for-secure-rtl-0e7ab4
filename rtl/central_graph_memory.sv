// central_graph_memory: the shared store of the monitoring graphs of all
// installed applications.
//
// Graphs are downloaded through the write port (we/waddr/wdata) by the
// installation mechanism, independently of monitoring. The DMA controller
// reads it through a synchronous read port (data one cycle after the
// address). The depth is this design's choice; the prototype does not
// state it.
module central_graph_memory
  import mthm_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic [AW-1:0]      raddr,
  output logic [GDATA_W-1:0] rdata,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [GDATA_W-1:0] wdata
);

  logic [GDATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
