// tb_hash_compare: checks match and rank k of the hash comparison against
// a bit-by-bit reference for random valid-hash vectors and hashes.
module tb_hash_compare;
  import mthm_pkg::*;
  logic [15:0] onehot, valid_hash;
  logic        match;
  logic [3:0]  k;
  int checks = 0, failures = 0;

  hash_compare dut (.onehot, .valid_hash, .match, .k);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      automatic int h = $urandom_range(0, 15);
      automatic int rank = 0;
      bit exp_m;
      valid_hash = (i % 3 == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'($urandom());
      onehot = 16'h1 << h;
      #1;
      exp_m = valid_hash[h];
      for (int b = 0; b < h; b++) rank += int'(valid_hash[b]);
      checks++;
      if (match !== exp_m || (exp_m && k !== 4'(rank))) begin
        failures++;
        $display("FAIL valid=%h h=%0d match=%b k=%0d exp %b %0d", valid_hash, h, match, k, exp_m, rank);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
