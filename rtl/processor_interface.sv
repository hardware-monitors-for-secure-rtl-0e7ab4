// processor_interface: the register set through which the operating system
// talks to the monitor.
//
// Four registers at word addresses 0..3: Operation (1 task create,
// 2 context switch, 3 task delete), GID, PID and Enable. The OS writes GID
// and PID first and then the Operation register, which starts the monitor's
// control FSM. When the FSM takes the operation (`op_take`) the Operation
// register is cleared, so back-to-back operations are never confused.
// Enable = 1 means a user task is running and must be monitored; the OS
// writes 0 before its own work. The Done bit is set by the FSM when the
// monitor has finished an operation and is cleared when the OS writes a new
// operation or sets Enable. Reading address 0 returns Done in bit 31, an
// error flag in bit 30 and the pending operation in bits 1:0 (this status
// layout is this design's choice); addresses 1..3 read back GID, PID and
// Enable. Writes take effect at the clock edge; reads are combinational.
module processor_interface
  import mthm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // processor side
  input  logic                 cpu_we,
  input  logic [1:0]           cpu_addr,
  input  logic [31:0]          cpu_wdata,
  output logic [31:0]          cpu_rdata,
  // monitor side
  output op_e                  op,
  output logic [GID_W-1:0]     gid,
  output logic [PID_W-1:0]     pid,
  output logic                 enable,
  input  logic                 op_take,
  input  logic                 done_set,
  input  logic                 err_set,
  output logic                 done
);

  localparam logic [1:0] A_OP = 2'd0, A_GID = 2'd1, A_PID = 2'd2, A_EN = 2'd3;

  logic err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op     <= OP_NONE;
      gid    <= '0;
      pid    <= '0;
      enable <= 1'b0;
      done   <= 1'b0;
      err    <= 1'b0;
    end else begin
      if (op_take) op <= OP_NONE;
      if (done_set) begin
        done <= 1'b1;
        err  <= err_set;
      end
      if (cpu_we) begin
        unique case (cpu_addr)
          A_OP: begin
            op   <= op_e'(cpu_wdata[1:0]);
            done <= 1'b0;
            err  <= 1'b0;
          end
          A_GID: gid <= cpu_wdata[GID_W-1:0];
          A_PID: pid <= cpu_wdata[PID_W-1:0];
          A_EN: begin
            enable <= cpu_wdata[0];
            if (cpu_wdata[0]) done <= 1'b0;
          end
        endcase
      end
    end
  end

  always_comb begin
    unique case (cpu_addr)
      A_OP:    cpu_rdata = {done, err, 28'd0, op};
      A_GID:   cpu_rdata = 32'(gid);
      A_PID:   cpu_rdata = 32'(pid);
      default: cpu_rdata = {31'd0, enable};
    endcase
  end

endmodule
