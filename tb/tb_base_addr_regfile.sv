// tb_base_addr_regfile: checks the reset value 0xFFFF, that header word i
// loads groups 2i+1 (bits 31:16) and 2i+2 (bits 15:0), and that a write
// only changes its own pair of registers.
module tb_base_addr_regfile;
  import mthm_pkg::*;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [2:0]  widx = 0;
  logic [31:0] wdata = 0;
  logic [3:0]  group = 0;
  logic [15:0] base;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  base_addr_regfile dut (.clk, .rst_n, .we, .widx, .wdata, .group, .base);
  always #5 clk = ~clk;

  task automatic check_all();
    for (int g = 0; g < 16; g++) begin
      group = 4'(g);
      #1;
      checks++;
      if (base !== model[g]) begin
        failures++;
        $display("FAIL group %0d base=%h exp=%h", g + 1, base, model[g]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 16; g++) model[g] = 16'hFFFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      we = 1; widx = 3'($urandom_range(0, 7)); wdata = $urandom();
      model[2*widx] = wdata[31:16];
      model[2*widx+1] = wdata[15:0];
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
