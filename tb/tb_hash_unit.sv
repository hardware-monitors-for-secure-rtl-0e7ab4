// tb_hash_unit: checks the instruction hash (number of ones modulo 16) and
// its one-hot form for directed and random instructions.
module tb_hash_unit;
  import mthm_pkg::*;
  logic [31:0] instr;
  logic [3:0]  hash;
  logic [15:0] onehot;
  int checks = 0, failures = 0;

  hash_unit dut (.instr, .hash, .onehot);

  task automatic check_one(logic [31:0] w);
    int ones = 0;
    instr = w;
    #1;
    for (int i = 0; i < 32; i++) ones += int'(w[i]);
    checks++;
    if (hash !== 4'(ones % 16) || onehot !== (16'h1 << (ones % 16))) begin
      failures++;
      $display("FAIL instr=%h hash=%0d onehot=%h expected %0d", w, hash, onehot, ones % 16);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0000_0000);
    check_one(32'hFFFF_FFFF);
    check_one(32'h0000_FFFF);
    check_one(32'h0000_7FFF);
    check_one(32'h8000_0001);
    for (int i = 0; i < 2000; i++) check_one($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
