// hash_unit: instruction hash calculation and one-hot encoding.
//
// The hash of an instruction is the number of ones in its 32 bits. The
// count (0..32) is reduced to HASH_W bits by keeping its low bits (counts
// are taken modulo 16); the reduction is this design's choice, the
// population count is the prototype's hash. The one-hot form has bit
// `hash` set. Purely combinational: the result is valid in the cycle the
// instruction is presented.
module hash_unit
  import mthm_pkg::*;
#(
  parameter int unsigned INSTR_BITS = INSTR_W
) (
  input  logic [INSTR_BITS-1:0] instr,
  output logic [HASH_W-1:0]     hash,
  output logic [NHASH-1:0]      onehot
);

  logic [$clog2(INSTR_BITS+1)-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < INSTR_BITS; i++)
      ones = ones + $bits(ones)'(instr[i]);
  end

  assign hash   = ones[HASH_W-1:0];
  assign onehot = NHASH'(1) << hash;

endmodule
