// tb_sequencing_logic: checks group index = next states - 1 and
// next pointer = base + next states * offset + k, including the example
// rows of the grouped graph memory layout (group 2 at 0x0002, state e with
// three next states at offset 0, and so on).
module tb_sequencing_logic;
  import mthm_pkg::*;
  logic [4:0]  nnext;
  logic [10:0] offset;
  logic [3:0]  k, group;
  logic [15:0] group_base;
  logic [13:0] next_ptr;
  int checks = 0, failures = 0;
  logic [15:0] bases [16];

  sequencing_logic dut (.nnext, .offset, .k, .group, .group_base, .next_ptr);
  assign group_base = bases[group];

  task automatic check_one(int n, int o, int kk);
    int exp;
    nnext = 5'(n); offset = 11'(o); k = 4'(kk);
    #1;
    exp = (int'(bases[n-1]) + n * o + kk) % (1 << 14);
    checks++;
    if (group !== 4'(n - 1) || next_ptr !== 14'(exp)) begin
      failures++;
      $display("FAIL n=%0d o=%0d k=%0d group=%0d next=%h exp=%h", n, o, kk, group, next_ptr, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bases[0] = 16'h0000; bases[1] = 16'h0002; bases[2] = 16'h0006;
    for (int i = 3; i < 16; i++) bases[i] = 16'(16 * i);
    check_one(2, 0, 1);   // a -> second successor in group 1 block 0
    check_one(2, 1, 0);   // c -> group 1 block 1
    check_one(1, 1, 0);   // b -> group 2 row 3
    check_one(3, 0, 2);   // e -> group 3 row 8
    for (int i = 0; i < 16; i++) bases[i] = 16'($urandom_range(8, 4000));
    for (int i = 0; i < 3000; i++) begin
      automatic int n = $urandom_range(1, 16);
      check_one(n, $urandom_range(0, 200), $urandom_range(0, n - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
