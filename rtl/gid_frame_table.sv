// gid_frame_table: GID to frame binding storage.
//
// One row per graph slot of the monitor graph memory: the GID of the graph
// held there, a loaded bit and the number of active processes using it.
// The frame (start) address of slot i is i * SLOT_DEPTH. Lookup of `key`
// is combinational: `hit` means the graph is already in the graph memory
// (even if no process uses it at the moment), and `frame` gives its slot.
// `alloc_ok`/`alloc_frame` name the slot a new graph would take: the lowest
// never-loaded slot, else the lowest slot with no active process (its
// graph is then replaced). At the clock edge:
//   inc    - add one active process to the slot matching key
//   insert - bind key to the allocation slot with one active process
//   dec    - remove one active process from the slot matching key
//
// The storage, its active count and the fixed slot frames follow the
// prototype; keeping an idle graph loaded for reuse and the eviction order
// are this design's choices.
module gid_frame_table
  import mthm_pkg::*;
#(
  parameter int unsigned ENTRIES    = 4,
  parameter int unsigned SLOT_DEPTH = 1024,
  parameter int unsigned CNT_W      = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [GID_W-1:0]   key,
  output logic               hit,
  output logic [GADDR_W-1:0] frame,
  output logic [CNT_W-1:0]   count,
  output logic               alloc_ok,
  output logic [GADDR_W-1:0] alloc_frame,
  input  logic               inc,
  input  logic               insert,
  input  logic               dec,
  output logic [CNT_W-1:0]   active [ENTRIES]
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic [GID_W-1:0] gids   [ENTRIES];
  logic             loaded [ENTRIES];
  logic [IW-1:0]    hit_idx, new_idx, idle_idx;
  logic             new_ok, idle_ok;

  always_comb begin
    hit = 1'b0;    hit_idx  = '0;
    new_ok = 1'b0; new_idx  = '0;
    idle_ok = 1'b0; idle_idx = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (loaded[i] && gids[i] == key) begin
        hit = 1'b1; hit_idx = IW'(i);
      end
      if (!loaded[i]) begin
        new_ok = 1'b1; new_idx = IW'(i);
      end
      if (loaded[i] && active[i] == '0) begin
        idle_ok = 1'b1; idle_idx = IW'(i);
      end
    end
  end

  assign alloc_ok    = new_ok | idle_ok;
  assign frame       = GADDR_W'(hit_idx) * GADDR_W'(SLOT_DEPTH);
  assign alloc_frame = GADDR_W'(new_ok ? new_idx : idle_idx) * GADDR_W'(SLOT_DEPTH);
  assign count       = active[hit_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        gids[i]   <= '0;
        loaded[i] <= 1'b0;
        active[i] <= '0;
      end
    end else begin
      if (insert && alloc_ok) begin
        gids[new_ok ? new_idx : idle_idx]   <= key;
        loaded[new_ok ? new_idx : idle_idx] <= 1'b1;
        active[new_ok ? new_idx : idle_idx] <= CNT_W'(1);
      end else if (inc && hit && active[hit_idx] != '1) begin
        active[hit_idx] <= active[hit_idx] + CNT_W'(1);
      end else if (dec && hit && active[hit_idx] != '0) begin
        active[hit_idx] <= active[hit_idx] - CNT_W'(1);
      end
    end
  end

endmodule
