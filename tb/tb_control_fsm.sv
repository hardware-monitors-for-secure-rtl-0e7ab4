// tb_control_fsm: drives the control FSM alone. The PID addresses, PID to
// GID and GID to frame storages, the graph memory read port and the DMA
// are modelled in the testbench, so the FSM's table commands are checked
// one by one: the pointer saved for the old process, the header words read
// from frame + 0..7 into base registers 0..7, the pointer restored for the
// new process, the insert/increment/allocate commands of a create with and
// without a graph copy, the kill/decrement commands of a delete, the error
// flag for an unknown PID, and the cycle counts (context switch 15 or 6,
// create 3, delete 3, create with copy = copy time + 3).
module tb_control_fsm;
  import mthm_pkg::*;
  logic        clk = 0, rst_n = 0;
  op_e         op = OP_NONE;
  logic [3:0]  pi_gid = 0, pi_pid = 0;
  logic        op_take, done_set, err_set;
  logic [3:0]  pa_key, pg_key, gf_key, pg_gid, pg_wgid;
  logic        pa_hit, pa_free, pa_insert, pa_save, pa_kill;
  logic        pg_hit, pg_free, pg_insert, pg_kill;
  logic        gf_hit, gf_alloc_ok, gf_inc, gf_insert, gf_dec;
  logic [13:0] pa_ptr, pa_wptr, gf_frame, gf_alloc_frame, ptr, ptr_value, frame, rd_addr;
  logic        ptr_load, rd_ovr, base_we, busy, cur_valid;
  logic [31:0] rd_data, base_wdata;
  logic [2:0]  base_widx;
  dma_req_t    dma_req;
  logic        dma_finish = 0;
  logic [3:0]  cur_pid;
  int checks = 0, failures = 0;

  // table models: PID p valid?, saved ptr, gid; GID g loaded?, slot, count
  bit   m_pv [16] = '{default: 0};
  int   m_pptr [16] = '{default: 0};
  int   m_pgid [16] = '{default: 0};
  bit   m_gl [16] = '{default: 0};
  int   m_gslot [16] = '{default: 0};
  int   m_gcnt [16] = '{default: 0};
  int   next_slot = 0;
  int   n_pv;

  control_fsm dut (.*);
  always #5 clk = ~clk;

  always_comb begin
    n_pv = 0;
    for (int i = 0; i < 16; i++) n_pv += int'(m_pv[i]);
    pa_hit = m_pv[pa_key];
    pa_ptr = 14'(m_pptr[pa_key]);
    pa_free = (n_pv < 4);
    pg_hit = m_pv[pg_key];
    pg_gid = 4'(m_pgid[pg_key]);
    pg_free = (n_pv < 4);
    gf_hit = m_gl[gf_key];
    gf_frame = 14'(m_gslot[gf_key] * 1024);
    gf_alloc_ok = (next_slot < 4);
    gf_alloc_frame = 14'(next_slot * 1024);
  end
  // graph memory model: header word i of slot s = {s, i}
  always_ff @(posedge clk) rd_data <= {18'(rd_addr / 1024), 14'(rd_addr % 1024)};

  // address pointer register as in the monitor
  always_ff @(posedge clk) if (ptr_load) ptr <= ptr_value;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // run one operation; watch the FSM's commands each cycle
  task automatic do_op(op_e o, int pid, int gid, int copy_len, output int cycles,
                       output bit err, output int saves, output int base_words);
    bit was_dma, was_done, e_s, copied;
    bit p_save, p_ins, p_inc, p_gins, p_kill, p_dec;
    int k_pa, k_gf, v_ptr, v_gid;
    @(negedge clk);
    op = o; pi_pid = 4'(pid); pi_gid = 4'(gid);
    cycles = 0; saves = 0; base_words = 0; err = 0; copied = 0;
    forever begin
      // the interface flushes Operation at the edge after op_take
      if (op != OP_NONE && cycles > 0) op = OP_NONE;
      #1;
      // commands take effect in the tables at the next clock edge
      p_save = pa_save; p_ins = pa_insert; p_inc = gf_inc; p_gins = gf_insert;
      p_kill = pa_kill; p_dec = gf_dec; k_pa = int'(pa_key); k_gf = int'(gf_key);
      v_ptr = int'(pa_wptr); v_gid = int'(pg_wgid);
      if (pa_save) begin
        saves++;
        chk("save key is the running PID", int'(pa_key), int'(cur_pid));
      end
      if (rd_ovr && base_words < 7)
        chk("header read address", int'(rd_addr), int'(frame) + base_words + int'(base_we));
      if (base_we) begin
        chk("base register index", int'(base_widx), base_words);
        chk("base data from the slot header", int'(base_wdata), (int'(frame) / 1024) * 16384 + base_words);
        base_words++;
      end
      if (pa_insert) begin
        chk("insert pointer at first state row", int'(pa_wptr), 8);
        chk("PID tables inserted together", int'(pg_insert), 1);
      end
      if (pa_kill) begin
        chk("PID tables killed together", int'(pg_kill), 1);
        chk("graph count decremented", int'(gf_dec), 1);
        chk("decrement key is the PID's GID", int'(gf_key), m_pgid[pa_key]);
      end
      was_dma = dma_req.req; was_done = done_set; e_s = err_set;
      @(posedge clk);
      #1;
      dma_finish = 0;
      if (p_save) m_pptr[k_pa] = v_ptr;
      if (p_ins) begin m_pv[k_pa] = 1; m_pptr[k_pa] = 8; m_pgid[k_pa] = v_gid; end
      if (p_inc) m_gcnt[k_gf]++;
      if (p_gins) begin m_gl[k_gf] = 1; m_gslot[k_gf] = next_slot; m_gcnt[k_gf] = 1; next_slot++; end
      if (p_kill) m_pv[k_pa] = 0;
      if (p_dec) m_gcnt[k_gf]--;
      if (was_dma) begin
        chk("copy destination", int'(dma_req.dst), m_gslot[gid] * 1024);
        chk("copy GID", int'(dma_req.gid), gid);
        if (!copied) begin
          copied = 1;
          @(negedge clk);
          cycles++;
          repeat (copy_len) begin @(negedge clk); cycles++; end
          dma_finish = 1;
          continue;
        end
      end
      if (was_done) begin
        err = e_s;
        @(negedge clk);
        cycles++;
        break;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 1000) break;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, s, b;
    bit e;
    for (int i = 0; i < 16; i++) begin
      m_pv[i] = 0; m_pptr[i] = 0; m_pgid[i] = 0;
      m_gl[i] = 0; m_gslot[i] = 0; m_gcnt[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    do_op(OP_CREATE, 3, 5, 40, c, e, s, b);
    chk("create with copy: error", int'(e), 0);
    chk("create with copy: cycles (copy model takes 40 + 2)", c, 40 + 5);
    do_op(OP_CREATE, 4, 5, 0, c, e, s, b);
    chk("create, graph present: cycles", c, 3);
    chk("graph shared by two processes", m_gcnt[5], 2);
    do_op(OP_CREATE, 7, 9, 10, c, e, s, b);
    chk("second graph slot", m_gslot[9], 1);
    // first switch: nothing running, nothing saved
    do_op(OP_SWITCH, 3, 0, 0, c, e, s, b);
    chk("switch: error", int'(e), 0);
    chk("switch: no save when idle", s, 0);
    chk("switch: 8 header words", b, 8);
    chk("switch: cycles", c, 15);
    chk("switch: pointer restored", int'(ptr), 8);
    chk("switch: frame", int'(frame), 0);
    chk("switch: running PID", int'(cur_pid), 3);
    // the process runs: the pointer moves on
    @(negedge clk); force ptr = 14'd77; @(negedge clk); release ptr;
    do_op(OP_SWITCH, 7, 0, 0, c, e, s, b);
    chk("switch: old pointer saved", m_pptr[3], 77);
    chk("switch: one save", s, 1);
    chk("switch: frame of slot 1", int'(frame), 1024);
    chk("switch: cycles", c, 15);
    @(negedge clk); force ptr = 14'd91; @(negedge clk); release ptr;
    do_op(OP_SWITCH, 3, 0, 0, c, e, s, b);
    chk("switch back: pointer restored", int'(ptr), 77);
    @(negedge clk); force ptr = 14'd55; @(negedge clk); release ptr;
    do_op(OP_SWITCH, 4, 0, 0, c, e, s, b);
    chk("same graph: no header read", b, 0);
    chk("same graph: cycles", c, 6);
    chk("same graph: pointer of new process", int'(ptr), 8);
    chk("pointer of 3 saved", m_pptr[3], 55);
    do_op(OP_DELETE, 4, 0, 0, c, e, s, b);
    chk("delete: cycles", c, 3);
    chk("delete: running process stops", int'(cur_valid), 0);
    chk("delete: graph count", m_gcnt[5], 1);
    do_op(OP_SWITCH, 4, 0, 0, c, e, s, b);
    chk("switch to deleted PID: error", int'(e), 1);
    do_op(OP_DELETE, 12, 0, 0, c, e, s, b);
    chk("delete unknown PID: error", int'(e), 1);
    do_op(OP_CREATE, 3, 5, 0, c, e, s, b);
    chk("create existing PID: error", int'(e), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
