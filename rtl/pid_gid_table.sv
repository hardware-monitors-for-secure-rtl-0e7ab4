// pid_gid_table: PID to GID binding storage.
//
// One row per monitored process: PID, the graph identifier (GID) of the
// application it runs, and a valid bit. Several processes may share one
// GID. `key` is looked up combinationally (`hit`, `gid`). At the clock
// edge `insert` writes {key, wgid} into the lowest empty row and `kill`
// clears the valid bit of the row matching key. `free` says whether an
// empty row exists.
//
// The storage and its Insert_PID/Kill_PID operations follow the prototype;
// the row count and placement are this design's.
module pid_gid_table
  import mthm_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PID_W-1:0]   key,
  output logic               hit,
  output logic [GID_W-1:0]   gid,
  output logic               free,
  input  logic               insert,
  input  logic               kill,
  input  logic [GID_W-1:0]   wgid,
  output logic [ENTRIES-1:0] valid
);

  logic [PID_W-1:0] pids [ENTRIES];
  logic [GID_W-1:0] gids [ENTRIES];
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

  assign gid = gids[hit_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        pids[i] <= '0;
        gids[i] <= '0;
      end
    end else begin
      if (insert && free) begin
        valid[free_idx] <= 1'b1;
        pids[free_idx]  <= key;
        gids[free_idx]  <= wgid;
      end
      if (kill && hit) valid[hit_idx] <= 1'b0;
    end
  end

endmodule
