// pid_addr_table: PID addresses storage.
//
// One row per monitored process: PID, saved address pointer (the graph
// state the process stopped in) and a valid bit. `key` is looked up
// combinationally (`hit`, `ptr`). Updates at the clock edge:
//   insert - write {key, wptr} into the lowest row whose valid bit is 0
//   save   - overwrite the pointer of the row matching key
//   kill   - clear the valid bit of the row matching key
// `free` says whether an empty row exists. `valid` exposes the valid bits.
//
// The storage and its Insert/Save/Kill operations follow the prototype; the
// lowest-free-row placement and the row count (one per process) are this
// design's.
module pid_addr_table
  import mthm_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PID_W-1:0]   key,
  output logic               hit,
  output logic [GADDR_W-1:0] ptr,
  output logic               free,
  input  logic               insert,
  input  logic               save,
  input  logic               kill,
  input  logic [GADDR_W-1:0] wptr,
  output logic [ENTRIES-1:0] valid
);

  logic [PID_W-1:0]   pids [ENTRIES];
  logic [GADDR_W-1:0] ptrs [ENTRIES];
  logic [$clog2(ENTRIES)-1:0] hit_idx, free_idx;

  always_comb begin
    hit = 1'b0;  hit_idx  = '0;
    free = 1'b0; free_idx = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (valid[i] && pids[i] == key) begin
        hit = 1'b1; hit_idx = $bits(hit_idx)'(i);
      end
      if (!valid[i]) begin
        free = 1'b1; free_idx = $bits(free_idx)'(i);
      end
    end
  end

  assign ptr = ptrs[hit_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        pids[i] <= '0;
        ptrs[i] <= '0;
      end
    end else begin
      if (insert && free) begin
        valid[free_idx] <= 1'b1;
        pids[free_idx]  <= key;
        ptrs[free_idx]  <= wptr;
      end
      if (save && hit) ptrs[hit_idx] <= wptr;
      if (kill && hit) valid[hit_idx] <= 1'b0;
    end
  end

endmodule
