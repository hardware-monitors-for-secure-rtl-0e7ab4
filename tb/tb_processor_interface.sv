// tb_processor_interface: the OS-side register protocol. Writes GID, PID
// and Operation as the task create / context switch / task delete code
// does, checks what the monitor side sees, that taking the operation
// flushes the Operation register, that Done is set by the monitor and
// cleared by a new operation or by Enable, and the read-back values.
module tb_processor_interface;
  import mthm_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        cpu_we = 0;
  logic [1:0]  cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  op_e         op;
  logic [3:0]  gid, pid;
  logic        enable, op_take = 0, done_set = 0, err_set = 0, done;
  int checks = 0, failures = 0;

  processor_interface dut (.clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .op, .gid, .pid, .enable, .op_take, .done_set, .err_set, .done);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic iowr(int a, int v);
    @(negedge clk);
    cpu_we = 1; cpu_addr = 2'(a); cpu_wdata = 32'(v);
    @(negedge clk);
    cpu_we = 0;
  endtask

  task automatic iord(int a, output logic [31:0] v);
    cpu_addr = 2'(a);
    #1 v = cpu_rdata;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk("reset op", 32'(op), 0);
    chk("reset enable", 32'(enable), 0);
    for (int r = 0; r < 50; r++) begin
      automatic int g = $urandom_range(0, 15), p = $urandom_range(0, 15), o = $urandom_range(1, 3);
      iowr(3, 0);                       // OS activity: monitoring off
      chk("enable off", 32'(enable), 0);
      if (o == 1) iowr(1, g);
      iowr(2, p);
      iowr(0, o);
      chk("op", 32'(op), 32'(o));
      chk("pid", 32'(pid), 32'(p));
      if (o == 1) chk("gid", 32'(gid), 32'(g));
      iord(2, v); chk("read pid", v, 32'(p));
      iord(0, v); chk("read op / done", v, 32'(o));
      // monitor takes the operation: Operation register flushed
      @(negedge clk); op_take = 1;
      @(negedge clk); op_take = 0;
      chk("op flushed", 32'(op), 0);
      // monitor reports done (error on every fourth)
      @(negedge clk); done_set = 1; err_set = (r % 4 == 0);
      @(negedge clk); done_set = 0; err_set = 0;
      iord(0, v); chk("done bit", v, {1'b1, (r % 4 == 0), 30'd0});
      chk("done out", 32'(done), 1);
      if (r % 2 == 0) begin
        iowr(3, 1);                     // task resumes: monitoring on, Done cleared
        chk("enable on", 32'(enable), 1);
        iord(3, v); chk("read enable", v, 1);
        chk("done cleared by enable", 32'(done), 0);
      end else begin
        iowr(0, 2);                     // a new operation clears Done
        chk("done cleared by op", 32'(done), 0);
        @(negedge clk); op_take = 1;
        @(negedge clk); op_take = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
