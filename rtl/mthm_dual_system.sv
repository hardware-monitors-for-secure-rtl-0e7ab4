// mthm_dual_system: monitoring subsystem for a dual-core embedded processor.
//
// Each core has its own multi-task hardware monitor (mthm_monitor) that
// checks the core's instruction stream and follows the task management of
// the core's operating system. Graphs of all applications live in one
// centralized graph memory; a monitor that needs a graph it does not hold
// requests a copy, the arbiter grants the single DMA controller to one
// monitor at a time (lower index first) and the DMA copies the graph into
// that monitor's graph memory while both monitors keep checking.
//
// Ports per core (index 0 = Monitor1): the processor interface bus, the
// retired-instruction stream and the recovery signal to the core's
// interrupt controller. The cgm_* port downloads graphs into the
// centralized memory and the lut_* port fills the DMA's GID-to-address
// table. The cores, their DDR2 memory and the graph installation mechanism
// are outside this module.
module mthm_dual_system
  import mthm_pkg::*;
#(
  parameter int unsigned NUM_MON    = 2,
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned SLOT_DEPTH = 1024,
  parameter int unsigned PROCS      = 4,
  parameter int unsigned CGM_DEPTH  = 4096,
  localparam int unsigned CGM_AW    = $clog2(CGM_DEPTH),
  localparam int unsigned LEN_W     = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  // per-core processor interface
  input  logic               cpu_we      [NUM_MON],
  input  logic [1:0]         cpu_addr    [NUM_MON],
  input  logic [31:0]        cpu_wdata   [NUM_MON],
  output logic [31:0]        cpu_rdata   [NUM_MON],
  // per-core instruction stream and recovery
  input  logic               instr_valid [NUM_MON],
  input  logic [INSTR_W-1:0] instr       [NUM_MON],
  output logic               recovery    [NUM_MON],
  // graph download into the centralized graph memory
  input  logic               cgm_we,
  input  logic [CGM_AW-1:0]  cgm_waddr,
  input  logic [GDATA_W-1:0] cgm_wdata,
  // GID-to-address table download
  input  logic               lut_we,
  input  logic [GID_W-1:0]   lut_gid,
  input  logic [CGM_AW-1:0]  lut_start,
  input  logic [LEN_W-1:0]   lut_len,
  // observation
  output logic [GADDR_W-1:0] addr_ptr    [NUM_MON],
  output logic               dma_done
);

  dma_req_t           mon_req    [NUM_MON];
  logic               mon_finish [NUM_MON];
  gmem_wr_t           mon_wr     [NUM_MON];
  logic               mon_busy   [NUM_MON];

  for (genvar m = 0; m < NUM_MON; m++) begin : g_mon
    mthm_monitor #(.SLOTS(SLOTS), .SLOT_DEPTH(SLOT_DEPTH), .PROCS(PROCS)) u_mon (
      .clk, .rst_n,
      .cpu_we(cpu_we[m]), .cpu_addr(cpu_addr[m]), .cpu_wdata(cpu_wdata[m]), .cpu_rdata(cpu_rdata[m]),
      .instr_valid(instr_valid[m]), .instr(instr[m]), .recovery(recovery[m]),
      .dma_req(mon_req[m]), .dma_finish(mon_finish[m]), .dma_wr(mon_wr[m]),
      .addr_ptr(addr_ptr[m]), .busy(mon_busy[m])
    );
  end

  logic               dma_start;
  logic [GID_W-1:0]   dma_gid;
  logic [GADDR_W-1:0] dma_dst;
  gmem_wr_t           dma_wr;
  logic [CGM_AW-1:0]  cgm_raddr;
  logic [GDATA_W-1:0] cgm_rdata;

  graph_arbiter #(.N(NUM_MON)) u_arb (
    .clk, .rst_n, .req(mon_req), .finish(mon_finish), .wr_out(mon_wr),
    .dma_start, .dma_gid, .dma_dst, .dma_done, .dma_wr
  );

  dma_controller #(.LUT_ENTRIES(1 << GID_W), .CGM_AW(CGM_AW), .LEN_W(LEN_W)) u_dma (
    .clk, .rst_n, .dma_start, .gid(dma_gid), .dst(dma_dst), .dma_done, .wr(dma_wr),
    .cgm_raddr, .cgm_rdata, .lut_we, .lut_gid, .lut_start, .lut_len
  );

  central_graph_memory #(.DEPTH(CGM_DEPTH)) u_cgm (
    .clk, .raddr(cgm_raddr), .rdata(cgm_rdata),
    .we(cgm_we), .waddr(cgm_waddr), .wdata(cgm_wdata)
  );

endmodule
