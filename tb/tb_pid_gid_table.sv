// tb_pid_gid_table: random insert / kill / lookup sequences against a
// reference model of the PID to GID binding storage (lowest empty row
// first, several PIDs may share a GID, kill clears the valid bit).
module tb_pid_gid_table;
  import mthm_pkg::*;
  localparam int E = 4;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  key = 0, gid, wgid = 0;
  logic        hit, free, insert = 0, kill = 0;
  logic [E-1:0] valid;
  bit          m_v [E];
  int          m_pid [E], m_gid [E];
  int checks = 0, failures = 0;

  pid_gid_table #(.ENTRIES(E)) dut (.clk, .rst_n, .key, .hit, .gid, .free,
    .insert, .kill, .wgid, .valid);
  always #5 clk = ~clk;

  function automatic int find(int p);
    for (int i = 0; i < E; i++) if (m_v[i] && m_pid[i] == p) return i;
    return -1;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2000; r++) begin
      automatic int p = $urandom_range(0, 7), i, f;
      automatic int g = $urandom_range(0, 3);
      automatic int o = $urandom_range(0, 1);
      @(negedge clk);
      key = 4'(p); wgid = 4'(g);
      #1;
      i = find(p);
      f = -1;
      for (int j = E - 1; j >= 0; j--) if (!m_v[j]) f = j;
      chk("hit", int'(hit), int'(i >= 0));
      if (i >= 0) chk("gid", int'(gid), m_gid[i]);
      chk("free", int'(free), int'(f >= 0));
      insert = (o == 0) && (i < 0);
      kill   = (o == 1);
      if (insert && f >= 0) begin m_v[f] = 1; m_pid[f] = p; m_gid[f] = g; end
      if (kill && i >= 0) m_v[i] = 0;
      @(negedge clk);
      insert = 0; kill = 0;
      for (int j = 0; j < E; j++) chk("valid", int'(valid[j]), int'(m_v[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
