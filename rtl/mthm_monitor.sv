// mthm_monitor: multi-task hardware monitor for one processor core.
//
// Every instruction the core executes (instr_valid/instr) is hashed to 4
// bits and checked against the valid-hash vector of the graph entry the
// address pointer points at. A match moves the pointer to the successor
// state (sequencing logic: group base + next-states * offset + k); a miss
// raises `recovery`, which the core turns into an interrupt that kills the
// task. The entry is read from the graph memory at frame address + address
// pointer; the read address is formed from the pointer's next value, so the
// entry of the current state is ready one cycle after each step and one
// instruction per cycle can be checked with a single memory lookup.
//
// The operating system reports task create, context switch and task delete
// through the processor interface (Operation/GID/PID/Enable registers and
// the Done bit); the control FSM updates the PID addresses, PID-to-GID and
// GID-to-frame storages, the address pointer, the frame address and the
// base address register file, and requests graph copies from the DMA
// (dma_req/dma_finish), whose writes arrive on dma_wr.
//
// Checking is active while Enable is 1, a process is current and the FSM is
// idle. `recovery` rises in the cycle after the offending instruction and
// stays high, with the pointer frozen, until the OS clears Enable.
module mthm_monitor
  import mthm_pkg::*;
#(
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned SLOT_DEPTH = 1024,
  parameter int unsigned PROCS      = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor interface bus
  input  logic               cpu_we,
  input  logic [1:0]         cpu_addr,
  input  logic [31:0]        cpu_wdata,
  output logic [31:0]        cpu_rdata,
  // instruction stream from the core
  input  logic               instr_valid,
  input  logic [INSTR_W-1:0] instr,
  output logic               recovery,
  // graph copy
  output dma_req_t           dma_req,
  input  logic               dma_finish,
  input  gmem_wr_t           dma_wr,
  // observation
  output logic [GADDR_W-1:0] addr_ptr,
  output logic               busy
);

  // processor interface
  op_e              pi_op;
  logic [GID_W-1:0] pi_gid;
  logic [PID_W-1:0] pi_pid;
  logic             pi_enable, op_take, done_set, err_set, pi_done;

  processor_interface u_pi (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .op(pi_op), .gid(pi_gid), .pid(pi_pid), .enable(pi_enable),
    .op_take, .done_set, .err_set, .done(pi_done)
  );

  // storages
  logic [PID_W-1:0]   pa_key, pg_key;
  logic [GID_W-1:0]   gf_key, pg_gid, pg_wgid;
  logic               pa_hit, pa_free, pa_insert, pa_save, pa_kill;
  logic               pg_hit, pg_free, pg_insert, pg_kill;
  logic               gf_hit, gf_alloc_ok, gf_inc, gf_insert, gf_dec;
  logic [GADDR_W-1:0] pa_ptr, pa_wptr, gf_frame, gf_alloc_frame;
  logic [PROCS-1:0]   pa_valid, pg_valid;
  logic [2:0]         gf_count;
  logic [2:0]         gf_active [SLOTS];

  pid_addr_table #(.ENTRIES(PROCS)) u_pid_addr (
    .clk, .rst_n, .key(pa_key), .hit(pa_hit), .ptr(pa_ptr), .free(pa_free),
    .insert(pa_insert), .save(pa_save), .kill(pa_kill), .wptr(pa_wptr), .valid(pa_valid)
  );

  pid_gid_table #(.ENTRIES(PROCS)) u_pid_gid (
    .clk, .rst_n, .key(pg_key), .hit(pg_hit), .gid(pg_gid), .free(pg_free),
    .insert(pg_insert), .kill(pg_kill), .wgid(pg_wgid), .valid(pg_valid)
  );

  gid_frame_table #(.ENTRIES(SLOTS), .SLOT_DEPTH(SLOT_DEPTH), .CNT_W(3)) u_gid_frame (
    .clk, .rst_n, .key(gf_key), .hit(gf_hit), .frame(gf_frame), .count(gf_count),
    .alloc_ok(gf_alloc_ok), .alloc_frame(gf_alloc_frame),
    .inc(gf_inc), .insert(gf_insert), .dec(gf_dec), .active(gf_active)
  );

  // control FSM
  logic               ptr_load, rd_ovr, base_we, cur_valid;
  logic [GADDR_W-1:0] ptr_value, frame, fsm_rd_addr;
  logic [2:0]         base_widx;
  logic [GDATA_W-1:0] base_wdata, rdata;
  logic [PID_W-1:0]   cur_pid;

  control_fsm u_ctrl (
    .clk, .rst_n,
    .op(pi_op), .pi_gid, .pi_pid, .op_take, .done_set, .err_set,
    .pa_key, .pa_hit, .pa_ptr, .pa_free, .pa_insert, .pa_save, .pa_kill, .pa_wptr,
    .pg_key, .pg_hit, .pg_gid, .pg_free, .pg_insert, .pg_kill, .pg_wgid,
    .gf_key, .gf_hit, .gf_frame, .gf_alloc_ok, .gf_alloc_frame, .gf_inc, .gf_insert, .gf_dec,
    .ptr(addr_ptr), .ptr_load, .ptr_value, .frame,
    .rd_ovr, .rd_addr(fsm_rd_addr), .rd_data(rdata),
    .base_we, .base_widx, .base_wdata,
    .dma_req, .dma_finish,
    .busy, .cur_pid, .cur_valid
  );

  // hash path
  logic [HASH_W-1:0]  hash;
  logic [NHASH-1:0]   onehot;
  logic               match;
  logic [K_W-1:0]     k;
  graph_entry_t       entry;
  logic [3:0]         group;
  logic [BASE_W-1:0]  group_base;
  logic [GADDR_W-1:0] next_ptr;

  assign entry = graph_entry_t'(rdata);

  hash_unit u_hash (.instr, .hash, .onehot);

  hash_compare u_cmp (.onehot, .valid_hash(entry.valid), .match, .k);

  base_addr_regfile u_base (
    .clk, .rst_n, .we(base_we), .widx(base_widx), .wdata(base_wdata),
    .group, .base(group_base)
  );

  sequencing_logic u_seq (
    .nnext(entry.nnext), .offset(entry.offset), .k, .group,
    .group_base, .next_ptr
  );

  // address pointer with FSM override, recovery flag
  logic               active, step;
  logic [GADDR_W-1:0] ptr_d;

  assign active = pi_enable && cur_valid && !busy && !recovery;
  assign step   = instr_valid && active;

  always_comb begin
    if (ptr_load)           ptr_d = ptr_value;
    else if (step && match) ptr_d = next_ptr;
    else                    ptr_d = addr_ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_ptr <= START_PTR;
      recovery <= 1'b0;
    end else begin
      addr_ptr <= ptr_d;
      if (!pi_enable)         recovery <= 1'b0;
      else if (step && !match) recovery <= 1'b1;
    end
  end

  // graph memory: read at frame + next pointer, DMA writes
  logic [GADDR_W-1:0] raddr;
  assign raddr = rd_ovr ? fsm_rd_addr : frame + ptr_d;

  graph_memory #(.DEPTH(SLOTS * SLOT_DEPTH)) u_gmem (
    .clk, .raddr, .rdata, .wr(dma_wr)
  );

endmodule
