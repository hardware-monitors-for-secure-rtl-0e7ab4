// tb_gid_frame_table: random insert / inc / dec / lookup sequences against
// a reference model of the GID to frame binding storage: frames are slot
// index * 1024, a loaded graph stays findable when its count is 0, a new
// graph takes a never-used slot first and then an idle one.
module tb_gid_frame_table;
  import mthm_pkg::*;
  localparam int E = 4, SD = 1024;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  key = 0;
  logic        hit, alloc_ok, inc = 0, insert = 0, dec = 0;
  logic [13:0] frame, alloc_frame;
  logic [2:0]  count;
  logic [2:0]  active [E];
  bit          m_l [E];
  int          m_g [E], m_c [E];
  int checks = 0, failures = 0;

  gid_frame_table #(.ENTRIES(E), .SLOT_DEPTH(SD), .CNT_W(3)) dut (.clk, .rst_n, .key, .hit,
    .frame, .count, .alloc_ok, .alloc_frame, .inc, .insert, .dec, .active);
  always #5 clk = ~clk;

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
    for (int r = 0; r < 3000; r++) begin
      automatic int g = $urandom_range(0, 7), i = -1, a = -1, o = $urandom_range(0, 2);
      @(negedge clk);
      key = 4'(g);
      #1;
      for (int j = E - 1; j >= 0; j--) if (m_l[j] && m_g[j] == g) i = j;
      for (int j = E - 1; j >= 0; j--) if (m_l[j] && m_c[j] == 0) a = j;
      for (int j = E - 1; j >= 0; j--) if (!m_l[j]) a = j;
      chk("hit", int'(hit), int'(i >= 0));
      if (i >= 0) begin
        chk("frame", int'(frame), i * SD);
        chk("count", int'(count), m_c[i]);
      end
      chk("alloc_ok", int'(alloc_ok), int'(a >= 0));
      if (a >= 0) chk("alloc_frame", int'(alloc_frame), a * SD);
      insert = (o == 0) && (i < 0);
      inc    = (o == 0) && (i >= 0);
      dec    = (o == 1) || (o == 2 && $urandom_range(0, 1) == 1);
      if (insert && a >= 0) begin m_l[a] = 1; m_g[a] = g; m_c[a] = 1; end
      else if (inc && m_c[i] < 7) m_c[i]++;
      else if (dec && i >= 0 && m_c[i] > 0) m_c[i]--;
      @(negedge clk);
      insert = 0; inc = 0; dec = 0;
      for (int j = 0; j < E; j++) chk("active", int'(active[j]), m_c[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
