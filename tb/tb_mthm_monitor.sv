// tb_mthm_monitor: one monitor driven the way the operating system and the
// core drive it, with a simple DMA model that copies generated graphs.
//
// Processes are created (graph copied in, or shared with a process already
// using it), switched between, run along random control-flow paths and
// deleted; the address pointer is compared after every instruction with
// the row predicted by the graph generator. An attack instruction must
// raise `recovery` in the next cycle and freeze the pointer. Checked cycle
// counts (from the Operation write to Done): context switch 15 with base
// reload and 6 without (the prototype reports 18), create with the graph
// present 3 (prototype about 20), delete 3 (prototype 8). Also checked:
// slot reuse when a graph has no active process, the error flag for an
// unknown PID and for a full graph memory, and that instructions are not
// checked while Enable is 0.
module tb_mthm_monitor;
  import mthm_pkg::*;
  import tb_graph_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        cpu_we = 0;
  logic [1:0]  cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic        instr_valid = 0;
  logic [31:0] instr = 0;
  logic        recovery;
  dma_req_t    dma_req;
  logic        dma_finish = 0;
  gmem_wr_t    dma_wr;
  logic [13:0] addr_ptr;
  logic        busy;

  int checks = 0, failures = 0;
  graph_gen g [6];
  int p_gid [16], p_last [16], p_row [16];
  int copies = 0, last_dst = -1;

  mthm_monitor dut (.clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .instr_valid, .instr, .recovery, .dma_req, .dma_finish, .dma_wr, .addr_ptr, .busy);
  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // DMA model: copies graph `gid` word by word into dst, then finishes
  initial begin
    dma_wr = '0;
    forever begin
      @(negedge clk);
      if (dma_req.req) begin
        automatic int gi = int'(dma_req.gid);
        automatic int d = int'(dma_req.dst);
        last_dst = d;
        copies++;
        for (int w = 0; w < g[gi].size; w++) begin
          dma_wr = '{en: 1'b1, addr: 14'(d + w), data: g[gi].img[w]};
          @(negedge clk);
        end
        dma_wr = '0;
        dma_finish = 1;
        @(negedge clk);
        dma_finish = 0;
      end
    end
  end

  task automatic iowr(int a, int v);
    @(negedge clk);
    cpu_we = 1; cpu_addr = 2'(a); cpu_wdata = 32'(v);
    @(negedge clk);
    cpu_we = 0; cpu_addr = 0;
  endtask

  // issue an operation and return the cycles until Done reads 1
  task automatic os_op(int op, int pid, int gid, output int cycles, output bit err);
    iowr(3, 0);
    if (op == 1) iowr(1, gid);
    iowr(2, pid);
    @(negedge clk);
    cpu_we = 1; cpu_addr = 0; cpu_wdata = 32'(op);
    @(negedge clk);
    cpu_we = 0;
    cycles = 0;
    #1;
    while (!cpu_rdata[31]) begin
      @(negedge clk);
      #1;
      cycles++;
      if (cycles > 5000) break;
    end
    err = cpu_rdata[30];
  endtask

  task automatic create(int pid, int gid, bit expect_copy, bit expect_err = 0);
    int c, n_before;
    bit e;
    n_before = copies;
    os_op(1, pid, gid, c, e);
    chk($sformatf("create pid %0d error flag", pid), int'(e), int'(expect_err));
    chk($sformatf("create pid %0d graph copied", pid), copies - n_before, int'(expect_copy));
    if (!expect_copy && !expect_err) chk("create cycles (graph present)", c, 3);
    if (expect_copy) chk("create with copy waits for the copy", int'(c >= g[gid].size), 1);
    if (!expect_err) begin
      p_gid[pid] = gid;
      p_last[pid] = g[gid].n;   // virtual start state
      p_row[pid] = 8;
    end
  endtask

  task automatic switch_to(int pid, int exp_cycles);
    int c;
    bit e;
    os_op(2, pid, 0, c, e);
    chk("switch error flag", int'(e), 0);
    chk("context switch cycles", c, exp_cycles);
    chk("context switch within 18 cycles", int'(c <= 18), 1);
    chk("pointer restored", int'(addr_ptr), p_row[pid]);
    iowr(3, 1);
  endtask

  task automatic kill_task(int pid);
    int c;
    bit e;
    os_op(3, pid, 0, c, e);
    chk("delete error flag", int'(e), 0);
    chk("delete cycles", c, 3);
    chk("delete within 8 cycles", int'(c <= 8), 1);
  endtask

  // run n instructions of process pid along a random path
  task automatic run(int pid, int n);
    graph_gen gg = g[p_gid[pid]];
    for (int i = 0; i < n; i++) begin
      automatic int s = p_last[pid];
      automatic int r = $urandom_range(0, gg.nsucc[s] - 1);
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        instr_valid = 0;          // pipeline bubble
        instr = $urandom();
        @(negedge clk);
      end
      instr_valid = 1;
      instr = gg.instr_of(gg.succ[s][r]);
      @(negedge clk);
      instr_valid = 0;
      p_row[pid] = gg.row_after(s, r);
      p_last[pid] = gg.succ[s][r];
      chk("address pointer", int'(addr_ptr), p_row[pid]);
      chk("no recovery on valid code", int'(recovery), 0);
    end
  endtask

  // attack: an instruction outside the graph
  task automatic attack(int pid);
    graph_gen gg = g[p_gid[pid]];
    @(negedge clk);
    instr_valid = 1;
    instr = gg.bad_instr(p_last[pid]);
    @(posedge clk);
    #1;
    chk("recovery one cycle after the attack instruction", int'(recovery), 1);
    @(negedge clk);
    // further attack code is not tracked
    instr = gg.instr_of(gg.succ[p_last[pid]][0]);
    @(negedge clk);
    instr_valid = 0;
    chk("recovery held", int'(recovery), 1);
    chk("pointer frozen", int'(addr_ptr), p_row[pid]);
    iowr(3, 0);                   // interrupt: OS takes over
    @(negedge clk);
    chk("recovery released by the OS", int'(recovery), 0);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    bit e;
    for (int i = 0; i < 6; i++) begin
      g[i] = new();
      g[i].build(20 + 15 * i);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // instructions while no process is monitored are ignored
    iowr(3, 1);
    @(negedge clk); instr_valid = 1; instr = 32'hFFFF_0000;
    @(negedge clk); instr_valid = 0;
    chk("no recovery without a process", int'(recovery), 0);

    create(1, 0, 1);
    chk("first graph in slot 0", last_dst, 0);
    create(2, 1, 1);
    chk("second graph in slot 1", last_dst, 1024);
    create(3, 0, 0);              // shares graph 0
    switch_to(1, 15);
    run(1, 150);
    switch_to(2, 15);             // other graph: base reload
    run(2, 150);
    switch_to(3, 15);
    run(3, 100);
    switch_to(1, 6);              // same graph: no base reload
    run(1, 100);
    // Enable = 0: OS code is not checked
    iowr(3, 0);
    @(negedge clk); instr_valid = 1; instr = g[0].bad_instr(p_last[1]);
    @(negedge clk); instr_valid = 0;
    chk("OS code not checked", int'(recovery), 0);
    chk("pointer kept while disabled", int'(addr_ptr), p_row[1]);
    iowr(3, 1);
    run(1, 50);
    switch_to(2, 15);
    run(2, 80);
    attack(2);
    kill_task(2);                    // graph 1 now idle
    os_op(2, 2, 0, c, e);         // switching to a deleted PID fails
    chk("unknown PID error", int'(e), 1);
    create(4, 2, 1);
    chk("third graph in slot 2", last_dst, 2048);
    create(5, 3, 1);
    chk("fourth graph in slot 3", last_dst, 3072);
    kill_task(3);
    create(6, 4, 1);              // replaces idle graph 1
    chk("idle slot 1 reused", last_dst, 1024);
    create(2, 1, 0, 1);           // every slot in use: error
    switch_to(6, 15);
    run(6, 120);
    switch_to(4, 15);
    run(4, 120);
    switch_to(5, 15);
    run(5, 120);
    switch_to(1, 15);
    run(1, 80);
    kill_task(5);
    create(7, 5, 1);              // replaces idle graph 3
    chk("idle slot 3 reused", last_dst, 3072);
    switch_to(7, 15);
    run(7, 120);
    attack(7);
    kill_task(7);
    switch_to(6, 15);
    run(6, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
