// tb_mthm_dual_system: end-to-end test of the dual-core monitoring system
// at its default parameters.
//
// Graphs for six applications are generated and downloaded into the
// centralized graph memory: five with the instruction counts of the
// MiBench programs qsort (96), bitcount (60), basicmath (107),
// stringmatch (77) and dijkstra (166), and a 40-instruction program with a
// vulnerable input routine. Two operating systems, one per core, run at
// the same time: they create processes (each monitor copies the graphs it
// lacks through the shared DMA, one monitor waiting while the other
// copies), switch between processes, run them along random control-flow
// paths and delete them. On core 1 the vulnerable program is attacked:
// injected code must raise recovery on that core in the next cycle while
// core 0 keeps running unaffected; the OS then kills the task.
// Every instruction's effect on the address pointer is compared with the
// graph generator's prediction. Counted mechanisms, each required at least
// once: graph copy, create with the graph already present, request waiting
// for a busy DMA, context switch with and without base reload, task
// delete, attack detected, instructions ignored while Enable is 0, slot
// reuse. Timing checks: a monitor creates a process with a graph copy well
// inside the 600 cycles the OS needs to create a task, even when it has to
// wait for the other monitor; a context switch with reload takes 15
// cycles (within 18).
module tb_mthm_dual_system;
  import mthm_pkg::*;
  import tb_graph_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        cpu_we      [2];
  logic [1:0]  cpu_addr    [2];
  logic [31:0] cpu_wdata   [2];
  logic [31:0] cpu_rdata   [2];
  logic        instr_valid [2];
  logic [31:0] instr       [2];
  logic        recovery    [2];
  logic        cgm_we = 0;
  logic [11:0] cgm_waddr = 0;
  logic [31:0] cgm_wdata = 0;
  logic        lut_we = 0;
  logic [3:0]  lut_gid = 0;
  logic [11:0] lut_start = 0;
  logic [10:0] lut_len = 0;
  logic [13:0] addr_ptr [2];
  logic        dma_done;

  int checks = 0, failures = 0;
  graph_gen g [6];
  int p_gid [2][16], p_last [2][16], p_row [2][16];
  // mechanism counters
  int n_copy = 0, n_shared = 0, n_wait = 0, n_reload = 0, n_same = 0;
  int n_delete = 0, n_attack = 0, n_disabled = 0, n_reuse = 0;
  int max_create = 0;

  mthm_dual_system dut (.clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .instr_valid, .instr, .recovery, .cgm_we, .cgm_waddr, .cgm_wdata,
    .lut_we, .lut_gid, .lut_start, .lut_len, .addr_ptr, .dma_done);
  always #5 clk = ~clk;

  // a monitor waiting while the DMA serves the other one
  always @(posedge clk)
    if (!dma_done && dut.mon_req[0].req && dut.mon_req[1].req) n_wait++;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic iowr(int c, int a, int v);
    @(negedge clk);
    cpu_we[c] = 1; cpu_addr[c] = 2'(a); cpu_wdata[c] = 32'(v);
    @(negedge clk);
    cpu_we[c] = 0; cpu_addr[c] = 0;
  endtask

  task automatic os_op(int c, int op, int pid, int gid, output int cycles, output bit err);
    iowr(c, 3, 0);
    if (op == 1) iowr(c, 1, gid);
    iowr(c, 2, pid);
    @(negedge clk);
    cpu_we[c] = 1; cpu_addr[c] = 0; cpu_wdata[c] = 32'(op);
    @(negedge clk);
    cpu_we[c] = 0;
    cycles = 0;
    #1;
    while (!cpu_rdata[c][31]) begin
      @(negedge clk);
      #1;
      cycles++;
      if (cycles > 5000) break;
    end
    err = cpu_rdata[c][30];
  endtask

  task automatic create(int c, int pid, int gid, bit expect_copy);
    int cyc;
    bit e;
    os_op(c, 1, pid, gid, cyc, e);
    chk("create error flag", int'(e), 0);
    if (expect_copy) begin
      n_copy++;
      $display("core %0d: create pid %0d with a copy of %0d graph words: %0d cycles",
               c, pid, g[gid].size, cyc);
      if (cyc > max_create) max_create = cyc;
      chk("create with copy inside the OS's 600 cycles", int'(cyc < 600), 1);
    end else begin
      n_shared++;
      chk("create with graph present", cyc, 3);
    end
    p_gid[c][pid] = gid;
    p_last[c][pid] = g[gid].n;
    p_row[c][pid] = 8;
  endtask

  task automatic switch_to(int c, int pid, bit reload);
    int cyc;
    bit e;
    os_op(c, 2, pid, 0, cyc, e);
    chk("switch error flag", int'(e), 0);
    chk("context switch cycles", cyc, reload ? 15 : 6);
    if (reload) n_reload++; else n_same++;
    chk("pointer restored", int'(addr_ptr[c]), p_row[c][pid]);
    iowr(c, 3, 1);
  endtask

  task automatic kill_task(int c, int pid);
    int cyc;
    bit e;
    os_op(c, 3, pid, 0, cyc, e);
    chk("delete error flag", int'(e), 0);
    chk("delete cycles", cyc, 3);
    n_delete++;
  endtask

  task automatic run(int c, int pid, int n);
    graph_gen gg = g[p_gid[c][pid]];
    for (int i = 0; i < n; i++) begin
      automatic int s = p_last[c][pid];
      automatic int r = $urandom_range(0, gg.nsucc[s] - 1);
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin
        instr_valid[c] = 0;
        @(negedge clk);
      end
      instr_valid[c] = 1;
      instr[c] = gg.instr_of(gg.succ[s][r]);
      @(negedge clk);
      instr_valid[c] = 0;
      p_row[c][pid] = gg.row_after(s, r);
      p_last[c][pid] = gg.succ[s][r];
      chk("address pointer", int'(addr_ptr[c]), p_row[c][pid]);
      chk("no recovery on valid code", int'(recovery[c]), 0);
    end
  endtask

  task automatic attack(int c, int pid);
    graph_gen gg = g[p_gid[c][pid]];
    @(negedge clk);
    instr_valid[c] = 1;
    instr[c] = gg.bad_instr(p_last[c][pid]);
    @(posedge clk);
    #1;
    chk("recovery one cycle after the injected instruction", int'(recovery[c]), 1);
    chk("other core unaffected", int'(recovery[1-c]), 0);
    if (recovery[c]) n_attack++;
    @(negedge clk);
    instr[c] = $urandom();
    @(negedge clk);
    instr_valid[c] = 0;
    chk("pointer frozen after the attack", int'(addr_ptr[c]), p_row[c][pid]);
    iowr(c, 3, 0);                // interrupt handler: OS takes over
    @(negedge clk);
    chk("recovery released", int'(recovery[c]), 0);
  endtask

  task automatic os_disabled_code(int c, int pid);
    graph_gen gg = g[p_gid[c][pid]];
    iowr(c, 3, 0);
    repeat (5) begin
      @(negedge clk);
      instr_valid[c] = 1;
      instr[c] = gg.bad_instr(p_last[c][pid]);
    end
    @(negedge clk);
    instr_valid[c] = 0;
    chk("OS code not checked", int'(recovery[c]), 0);
    chk("pointer kept while disabled", int'(addr_ptr[c]), p_row[c][pid]);
    n_disabled++;
    iowr(c, 3, 1);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base = 0;
    int sizes [6] = '{96, 60, 107, 77, 166, 40};
    for (int c = 0; c < 2; c++) begin
      cpu_we[c] = 0; cpu_addr[c] = 0; cpu_wdata[c] = 0;
      instr_valid[c] = 0; instr[c] = 0;
    end
    for (int i = 0; i < 6; i++) begin
      g[i] = new();
      g[i].build(sizes[i]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // download the graphs and the GID-to-address table
    for (int i = 0; i < 6; i++) begin
      for (int w = 0; w < g[i].size; w++) begin
        @(negedge clk);
        cgm_we = 1; cgm_waddr = 12'(base + w); cgm_wdata = g[i].img[w];
      end
      @(negedge clk);
      cgm_we = 0;
      lut_we = 1; lut_gid = 4'(i); lut_start = 12'(base); lut_len = 11'(g[i].size);
      @(negedge clk);
      lut_we = 0;
      $display("graph %0d: %0d instructions, %0d graph words", i, sizes[i], g[i].size);
      base += g[i].size;
    end

    fork
      begin : core0
        create(0, 0, 0, 1);       // qsort      (both cores copy at once)
        create(0, 1, 1, 1);       // bitcount
        create(0, 2, 0, 0);       // second qsort process shares the graph
        switch_to(0, 0, 1);
        run(0, 0, 300);
        switch_to(0, 1, 1);
        run(0, 1, 300);
        switch_to(0, 2, 1);
        run(0, 2, 200);
        os_disabled_code(0, 2);
        run(0, 2, 100);
        switch_to(0, 0, 0);       // same graph as process 2
        run(0, 0, 400);
        kill_task(0, 1);          // bitcount slot becomes idle
        create(0, 3, 2, 1);       // basicmath
        create(0, 4, 3, 1);       // stringmatch
        kill_task(0, 2);
        create(0, 5, 4, 1);       // dijkstra replaces idle bitcount
        n_reuse++;
        switch_to(0, 5, 1);
        run(0, 5, 400);
        switch_to(0, 3, 1);
        run(0, 3, 300);
        switch_to(0, 4, 1);
        run(0, 4, 300);
      end
      begin : core1
        create(1, 6, 4, 1);       // dijkstra   (waits for Monitor1)
        create(1, 7, 5, 1);       // vulnerable program
        create(1, 8, 3, 1);       // stringmatch
        switch_to(1, 7, 1);
        run(1, 7, 300);
        switch_to(1, 6, 1);
        run(1, 6, 300);
        switch_to(1, 7, 1);
        run(1, 7, 200);
        attack(1, 7);             // stack smashing: injected code
        kill_task(1, 7);
        switch_to(1, 8, 1);
        run(1, 8, 500);
        switch_to(1, 6, 1);
        run(1, 6, 500);
      end
    join

    $display("copies %0d shared %0d waits %0d reload %0d same %0d delete %0d attack %0d disabled %0d reuse %0d",
             n_copy, n_shared, n_wait, n_reload, n_same, n_delete, n_attack, n_disabled, n_reuse);
    $display("longest create with graph copy: %0d cycles", max_create);
    chk("mechanism: graph copy", int'(n_copy > 0), 1);
    chk("mechanism: create sharing a graph", int'(n_shared > 0), 1);
    chk("mechanism: request waits for busy DMA", int'(n_wait > 0), 1);
    chk("mechanism: switch with base reload", int'(n_reload > 0), 1);
    chk("mechanism: switch without base reload", int'(n_same > 0), 1);
    chk("mechanism: task delete", int'(n_delete > 0), 1);
    chk("mechanism: attack detected", int'(n_attack > 0), 1);
    chk("mechanism: monitoring disabled for OS code", int'(n_disabled > 0), 1);
    chk("mechanism: idle slot reused", int'(n_reuse > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
