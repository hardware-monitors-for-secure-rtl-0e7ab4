// tb_central_graph_memory: fills the memory through the download port and
// reads it back through the DMA port, checking one-cycle read latency.
module tb_central_graph_memory;
  import mthm_pkg::*;
  localparam int DEPTH = 4096;
  logic        clk = 0, we = 0;
  logic [11:0] raddr = 0, waddr = 0;
  logic [31:0] rdata, wdata = 0;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  central_graph_memory #(.DEPTH(DEPTH)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 12'(a); wdata = $urandom(); model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      raddr = 12'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %h rdata=%h exp=%h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
