// hash_compare: checks an instruction hash against the valid hashes of the
// current graph entry.
//
// `match` is high when the bit of the one-hot hash is set in `valid_hash`;
// a low `match` for a monitored instruction is an attack. `k` is the rank
// of the matching hash among the set valid-hash bits (number of set bits
// below it), which selects the successor row inside the block of next
// states. Combinational.
//
// The one-hot comparison follows the prototype; selecting the successor by
// rank k is this design's reading of the sequencing logic.
module hash_compare
  import mthm_pkg::*;
(
  input  logic [NHASH-1:0] onehot,
  input  logic [NHASH-1:0] valid_hash,
  output logic             match,
  output logic [K_W-1:0]   k
);

  logic [NHASH-1:0] below;  // valid bits below the one-hot bit

  always_comb begin
    below = valid_hash & (onehot - NHASH'(1));
    k = '0;
    for (int i = 0; i < NHASH; i++)
      k = k + K_W'(below[i]);
  end

  assign match = |(onehot & valid_hash);

endmodule
