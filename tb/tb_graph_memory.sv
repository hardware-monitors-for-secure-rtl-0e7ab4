// tb_graph_memory: random writes and reads against an array model; checks
// that read data appears one cycle after the address and that a write on
// the DMA port does not disturb a read of another address in the same
// cycle.
module tb_graph_memory;
  import mthm_pkg::*;
  localparam int DEPTH = 4096;
  logic        clk = 0;
  logic [13:0] raddr = 0;
  logic [31:0] rdata;
  gmem_wr_t    wr;
  logic [31:0] model [DEPTH];
  bit          written [DEPTH];
  int checks = 0, failures = 0;

  graph_memory #(.DEPTH(DEPTH)) dut (.clk, .raddr, .rdata, .wr);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, last;
    wr = '0;
    // fill the whole memory first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr = '{en: 1'b1, addr: 14'(i), data: $urandom()};
      model[i] = wr.data;
      written[i] = 1;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // write a random word
      a = $urandom_range(0, DEPTH - 1);
      wr = '{en: 1'b1, addr: 14'(a), data: $urandom()};
      model[a] = wr.data;
      written[a] = 1;
      // read a different, written address in the same cycle
      do last = $urandom_range(0, DEPTH - 1); while (!written[last] || last == a);
      raddr = 14'(last);
      @(negedge clk);
      wr.en = 0;
      checks++;
      if (rdata !== model[last]) begin
        failures++;
        $display("FAIL addr %h rdata=%h exp=%h", last, rdata, model[last]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
