// control_fsm: the monitor's controller. Keeps the monitoring state in step
// with the task management of the operating system.
//
// An operation is taken from the processor interface when its Operation
// register is non-zero (and the register is flushed in the same cycle):
//
// Context switch (PID = next process)
//   SAVE    store the address pointer of the running process in the PID
//           addresses storage
//   LOOK    find GID and saved pointer of the next process
//   FRAME   find the frame address of its graph in the GID-to-frame storage
//   BASE    if the graph differs from the one whose group base addresses
//           are loaded, read the 8 header words of the slot (one per cycle,
//           overriding the graph memory read address) into the base
//           address register file
//   RESTORE load the address pointer with the saved value
//   FINISH  set Done
// Task create (GID, PID): insert the PID in both PID storages with the
//   pointer at the first state row; if the graph is already in a slot only
//   its active count grows, otherwise a slot is allocated and a graph copy
//   is requested from the DMA, and Done waits for its end.
// Task delete (PID): clear the PID rows (Kill_PID), decrement the active
//   count of its graph (Update_GID) and stop monitoring if it was running.
//
// The steps are those of the prototype; the state encoding and the timing
// are this design's: Done is visible 15 cycles after the Operation write
// for a context switch that reloads base addresses (6 if the graph is the
// same), 3 for a create whose graph is present (plus the copy otherwise),
// 3 for a delete. Unknown PIDs, full tables and a re-created PID set the
// error flag with Done.
module control_fsm
  import mthm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // processor interface
  input  op_e                op,
  input  logic [GID_W-1:0]   pi_gid,
  input  logic [PID_W-1:0]   pi_pid,
  output logic               op_take,
  output logic               done_set,
  output logic               err_set,
  // PID addresses storage
  output logic [PID_W-1:0]   pa_key,
  input  logic               pa_hit,
  input  logic [GADDR_W-1:0] pa_ptr,
  input  logic               pa_free,
  output logic               pa_insert,
  output logic               pa_save,
  output logic               pa_kill,
  output logic [GADDR_W-1:0] pa_wptr,
  // PID to GID binding storage
  output logic [PID_W-1:0]   pg_key,
  input  logic               pg_hit,
  input  logic [GID_W-1:0]   pg_gid,
  input  logic               pg_free,
  output logic               pg_insert,
  output logic               pg_kill,
  output logic [GID_W-1:0]   pg_wgid,
  // GID to frame binding storage
  output logic [GID_W-1:0]   gf_key,
  input  logic               gf_hit,
  input  logic [GADDR_W-1:0] gf_frame,
  input  logic               gf_alloc_ok,
  input  logic [GADDR_W-1:0] gf_alloc_frame,
  output logic               gf_inc,
  output logic               gf_insert,
  output logic               gf_dec,
  // address pointer override and frame address
  input  logic [GADDR_W-1:0] ptr,
  output logic               ptr_load,
  output logic [GADDR_W-1:0] ptr_value,
  output logic [GADDR_W-1:0] frame,
  // graph memory read override and base address register file write
  output logic               rd_ovr,
  output logic [GADDR_W-1:0] rd_addr,
  input  logic [GDATA_W-1:0] rd_data,
  output logic               base_we,
  output logic [2:0]         base_widx,
  output logic [GDATA_W-1:0] base_wdata,
  // DMA
  output dma_req_t           dma_req,
  input  logic               dma_finish,
  // status
  output logic               busy,
  output logic [PID_W-1:0]   cur_pid,
  output logic               cur_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_CS_SAVE, S_CS_LOOK, S_CS_FRAME, S_CS_BASE, S_CS_RESTORE,
    S_CR_CHECK, S_CR_DMA, S_DL, S_FINISH
  } state_e;

  state_e             state;
  logic [PID_W-1:0]   req_pid;
  logic [GID_W-1:0]   req_gid;
  logic [GID_W-1:0]   new_gid;
  logic [GADDR_W-1:0] new_ptr;
  logic [GADDR_W-1:0] dst;
  logic [GID_W-1:0]   base_gid;
  logic               base_valid;
  logic [3:0]         cnt;
  logic               err;

  // table keys
  assign pa_key = (state == S_CS_SAVE) ? cur_pid : req_pid;
  assign pg_key = req_pid;
  always_comb begin
    unique case (state)
      S_CS_FRAME: gf_key = new_gid;
      S_DL:       gf_key = pg_gid;
      default:    gf_key = req_gid;
    endcase
  end

  // combinational controls
  always_comb begin
    op_take   = 1'b0;
    done_set  = 1'b0;
    err_set   = err;
    pa_insert = 1'b0;
    pa_save   = 1'b0;
    pa_kill   = 1'b0;
    pa_wptr   = START_PTR;
    pg_insert = 1'b0;
    pg_kill   = 1'b0;
    pg_wgid   = req_gid;
    gf_inc    = 1'b0;
    gf_insert = 1'b0;
    gf_dec    = 1'b0;
    ptr_load  = 1'b0;
    ptr_value = new_ptr;
    rd_ovr    = 1'b0;
    rd_addr   = frame + GADDR_W'(cnt[2:0]);
    base_we   = 1'b0;
    base_widx = 3'(cnt - 4'd1);
    base_wdata = rd_data;
    dma_req   = '{req: 1'b0, gid: req_gid, dst: dst};
    unique case (state)
      S_IDLE:    op_take = (op != OP_NONE);
      S_CS_SAVE: begin
        pa_save = cur_valid;
        pa_wptr = ptr;
      end
      S_CS_BASE: begin
        rd_ovr  = 1'b1;
        base_we = (cnt != 4'd0);
      end
      S_CS_RESTORE: ptr_load = 1'b1;
      S_CR_CHECK: begin
        if (pa_free && pg_free && !pa_hit) begin
          if (gf_hit) begin
            gf_inc = 1'b1; pa_insert = 1'b1; pg_insert = 1'b1;
          end else if (gf_alloc_ok) begin
            gf_insert = 1'b1; pa_insert = 1'b1; pg_insert = 1'b1;
          end
        end
      end
      S_CR_DMA: dma_req.req = 1'b1;
      S_DL: begin
        pa_kill = pg_hit;
        pg_kill = pg_hit;
        gf_dec  = pg_hit;
      end
      S_FINISH: done_set = 1'b1;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      req_pid    <= '0;
      req_gid    <= '0;
      new_gid    <= '0;
      new_ptr    <= '0;
      dst        <= '0;
      frame      <= '0;
      base_gid   <= '0;
      base_valid <= 1'b0;
      cnt        <= '0;
      err        <= 1'b0;
      cur_pid    <= '0;
      cur_valid  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (op != OP_NONE) begin
          req_pid <= pi_pid;
          req_gid <= pi_gid;
          err     <= 1'b0;
          unique case (op)
            OP_SWITCH: state <= S_CS_SAVE;
            OP_CREATE: state <= S_CR_CHECK;
            default:   state <= S_DL;
          endcase
        end
        S_CS_SAVE: state <= S_CS_LOOK;
        S_CS_LOOK: begin
          if (pg_hit && pa_hit) begin
            new_gid <= pg_gid;
            new_ptr <= pa_ptr;
            state   <= S_CS_FRAME;
          end else begin
            cur_valid <= 1'b0;
            err       <= 1'b1;
            state     <= S_FINISH;
          end
        end
        S_CS_FRAME: begin
          cnt <= '0;
          if (!gf_hit) begin
            cur_valid <= 1'b0;
            err       <= 1'b1;
            state     <= S_FINISH;
          end else begin
            frame <= gf_frame;
            state <= (base_valid && base_gid == new_gid) ? S_CS_RESTORE : S_CS_BASE;
          end
        end
        S_CS_BASE: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'(HDR_WORDS)) begin
            base_gid   <= new_gid;
            base_valid <= 1'b1;
            state      <= S_CS_RESTORE;
          end
        end
        S_CS_RESTORE: begin
          cur_pid   <= req_pid;
          cur_valid <= 1'b1;
          state     <= S_FINISH;
        end
        S_CR_CHECK: begin
          if (!(pa_free && pg_free) || pa_hit || !(gf_hit || gf_alloc_ok)) begin
            err   <= 1'b1;
            state <= S_FINISH;
          end else if (gf_hit) begin
            state <= S_FINISH;
          end else begin
            dst   <= gf_alloc_frame;
            state <= S_CR_DMA;
          end
        end
        S_CR_DMA: if (dma_finish) state <= S_FINISH;
        S_DL: begin
          if (!pg_hit) err <= 1'b1;
          if (cur_valid && cur_pid == req_pid) cur_valid <= 1'b0;
          state <= S_FINISH;
        end
        S_FINISH: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // A graph copy request, once raised, stays up until the arbiter reports
  // the copy finished.
  a_dma_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    (dma_req.req && !dma_finish) |=> dma_req.req);

endmodule
