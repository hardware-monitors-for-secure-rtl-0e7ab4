// base_addr_regfile: the 16 group base address registers of the graph
// being monitored.
//
// They are loaded by the control FSM from the header words at the start of
// a graph slot: header word i carries the base of group 2i+1 in bits 31:16
// and of group 2i+2 in bits 15:0 (groups counted from 1, registers from 0).
// One header word is written per cycle (`we`, `widx`, `wdata`). The read
// port is combinational. Registers reset to 0xFFFF, the marker of an
// unused group.
//
// The 16 group registers and their loading from the graph are the
// prototype's; the two-per-word header layout and the reset value are this
// design's.
module base_addr_regfile
  import mthm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [2:0]           widx,
  input  logic [GDATA_W-1:0]   wdata,
  input  logic [3:0]           group,
  output logic [BASE_W-1:0]    base
);

  logic [BASE_W-1:0] regs [NGROUPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NGROUPS; i++) regs[i] <= '1;
    end else if (we) begin
      regs[{widx, 1'b0}] <= wdata[31:16];
      regs[{widx, 1'b1}] <= wdata[15:0];
    end
  end

  assign base = regs[group];

endmodule
