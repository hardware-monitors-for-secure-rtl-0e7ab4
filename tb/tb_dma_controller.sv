// tb_dma_controller: loads graphs of random length into a centralized graph
// memory, fills the GID-to-address table, requests copies to random
// destination frames and checks every written address and word, that
// dma_done falls after dma_start and rises after the last write, and that
// a copy of L words takes L + 3 cycles (one word per cycle).
module tb_dma_controller;
  import mthm_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        dma_start = 0, dma_done;
  logic [3:0]  gid = 0;
  logic [13:0] dst = 0;
  gmem_wr_t    wr;
  logic [11:0] cgm_raddr;
  logic [31:0] cgm_rdata;
  logic        lut_we = 0;
  logic [3:0]  lut_gid = 0;
  logic [11:0] lut_start = 0;
  logic [10:0] lut_len = 0;
  logic        cgm_we = 0;
  logic [11:0] cgm_waddr = 0;
  logic [31:0] cgm_wdata = 0;
  logic [31:0] model [4096];
  int          g_start [16], g_len [16];
  int checks = 0, failures = 0;

  dma_controller dut (.clk, .rst_n, .dma_start, .gid, .dst, .dma_done, .wr,
    .cgm_raddr, .cgm_rdata, .lut_we, .lut_gid, .lut_start, .lut_len);
  central_graph_memory #(.DEPTH(4096)) u_cgm (.clk, .raddr(cgm_raddr), .rdata(cgm_rdata),
    .we(cgm_we), .waddr(cgm_waddr), .wdata(cgm_wdata));
  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // graphs of 0..200 words placed back to back
    for (int g = 0; g < 16; g++) begin
      g_start[g] = next;
      g_len[g] = (g == 5) ? 0 : $urandom_range(1, 200);
      next += g_len[g];
      @(negedge clk);
      lut_we = 1; lut_gid = 4'(g); lut_start = 12'(g_start[g]); lut_len = 11'(g_len[g]);
    end
    @(negedge clk); lut_we = 0;
    for (int a = 0; a < next; a++) begin
      @(negedge clk);
      cgm_we = 1; cgm_waddr = 12'(a); cgm_wdata = $urandom(); model[a] = cgm_wdata;
    end
    @(negedge clk); cgm_we = 0;
    for (int r = 0; r < 30; r++) begin
      automatic int g = (r < 16) ? r : $urandom_range(0, 15);
      automatic int d = $urandom_range(0, 3) * 1024;
      automatic int n = 0, cyc = 0;
      chk("idle done", int'(dma_done), 1);
      @(negedge clk);
      dma_start = 1; gid = 4'(g); dst = 14'(d);
      @(negedge clk);
      dma_start = 0; gid = 4'($urandom()); dst = 14'($urandom());
      cyc = 1;
      chk("done falls", int'(dma_done), 0);
      while (!dma_done) begin
        if (wr.en) begin
          chk("wr addr", int'(wr.addr), d + n);
          chk("wr data", int'(wr.data == model[g_start[g] + n]), 1);
          n++;
        end
        @(negedge clk);
        cyc++;
      end
      chk("words copied", n, g_len[g]);
      chk("copy cycles", cyc, g_len[g] + 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
