// tb_graph_arbiter: two requesters and a DMA model that is busy for a
// random number of cycles after each start and writes a word on every busy
// cycle. Checks fixed priority on simultaneous requests (Monitor1 first),
// that a request arriving while the DMA is busy waits for dma_done, that
// the GID and destination of the granted monitor reach the DMA, that writes
// go only to the granted monitor, and that each request is finished once.
module tb_graph_arbiter;
  import mthm_pkg::*;
  logic       clk = 0, rst_n = 0;
  dma_req_t   req    [2];
  logic       finish [2];
  gmem_wr_t   wr_out [2];
  logic       dma_start, dma_done;
  logic [3:0] dma_gid;
  logic [13:0] dma_dst;
  gmem_wr_t   dma_wr;
  int checks = 0, failures = 0;
  int busy_left = 0;
  int cur = -1;            // monitor the model believes is served
  int served [$];
  int wr_seen [2];
  int waited = 0;

  graph_arbiter #(.N(2)) dut (.clk, .rst_n, .req, .finish, .wr_out,
    .dma_start, .dma_gid, .dma_dst, .dma_done, .dma_wr);
  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // DMA model: done low while busy
  always_ff @(posedge clk) begin
    if (dma_start && busy_left == 0) busy_left <= $urandom_range(2, 12);
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  assign dma_done = (busy_left == 0);
  assign dma_wr = '{en: (busy_left > 0), addr: dma_dst, data: 32'(busy_left)};

  // requesters: hold req until finish
  always @(negedge clk) begin
    for (int m = 0; m < 2; m++) begin
      if (finish[m]) begin
        chk("finish of served", m, cur);
        served.push_back(m);
        req[m].req <= 1'b0;
        cur = -1;
      end
      if (wr_out[m].en) wr_seen[m]++;
    end
    if (dma_start) begin
      // granted monitor: the one whose GID/destination reached the DMA
      cur = int'(dma_gid) % 2;
      chk("dst follows gid", int'(dma_dst), 100 + int'(dma_gid));
    end
    if (cur >= 0) chk("no write to idle monitor", int'(wr_out[1-cur].en), 0);
    if (!dma_done && (req[0].req || req[1].req) && cur >= 0 && req[1-cur].req) waited++;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0;
    req[0] = '0; req[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      automatic int first = served.size();
      @(negedge clk);
      // Monitor1 uses even GIDs, Monitor2 odd ones; destination = 100 + GID
      if (r % 3 == 0) begin
        req[0].gid = 4'(2 * $urandom_range(0, 7));
        req[1].gid = 4'(2 * $urandom_range(0, 7) + 1);
        req[0].dst = 14'(100 + req[0].gid);
        req[1].dst = 14'(100 + req[1].gid);
        req[0].req = 1'b1;
        req[1].req = 1'b1;
        total += 2;
      end else begin
        automatic int m = $urandom_range(0, 1);
        req[m].gid = 4'(2 * $urandom_range(0, 7) + m);
        req[m].dst = 14'(100 + req[m].gid);
        req[m].req = 1'b1;
        total += 1;
        repeat ($urandom_range(0, 6)) @(negedge clk);
        if (!req[1-m].req) begin
          req[1-m].gid = 4'(2 * $urandom_range(0, 7) + 1 - m);
          req[1-m].dst = 14'(100 + req[1-m].gid);
          req[1-m].req = 1'b1;
          total += 1;
        end
      end
      while (req[0].req || req[1].req) @(negedge clk);
      // simultaneous requests on an idle DMA: Monitor1 is served first
      if (r % 3 == 0) chk("priority to Monitor1", served[first], 0);
    end
    chk("all requests served", served.size(), total);
    chk("requests waited for a busy DMA", int'(waited > 0), 1);
    chk("writes reached Monitor1", int'(wr_seen[0] > 0), 1);
    chk("writes reached Monitor2", int'(wr_seen[1] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
