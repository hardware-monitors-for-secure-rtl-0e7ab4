// graph_arbiter: shares one DMA controller and centralized graph memory
// among N monitors.
//
// A monitor holds req[i].req high (with GID and destination frame) until
// it sees finish[i]. When the DMA is idle (dma_done high) the arbiter
// grants the lowest-numbered requester (Monitor1 first), pulses dma_start
// with that requester's GID and destination, routes the DMA writes to that
// monitor only, and holds the grant until dma_done is high again; then it
// pulses finish for the granted monitor and waits one cycle for the request
// to drop. A monitor that asks while the DMA is busy waits.
//
// Fixed priority for Monitor1 over Monitor2 and waiting while the DMA is
// busy follow the prototype; the four-state handshake is this design's.
module graph_arbiter
  import mthm_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  dma_req_t           req     [N],
  output logic               finish  [N],
  output gmem_wr_t           wr_out  [N],
  output logic               dma_start,
  output logic [GID_W-1:0]   dma_gid,
  output logic [GADDR_W-1:0] dma_dst,
  input  logic               dma_done,
  input  gmem_wr_t           dma_wr
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [1:0] {A_IDLE, A_START, A_BUSY, A_RELEASE} astate_e;

  astate_e       state;
  logic [IW-1:0] grant, pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int i = N-1; i >= 0; i--)
      if (req[i].req) begin
        any  = 1'b1;
        pick = IW'(i);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      grant <= '0;
    end else begin
      unique case (state)
        A_IDLE:    if (any && dma_done) begin
          grant <= pick;
          state <= A_START;
        end
        A_START:   state <= A_BUSY;
        A_BUSY:    if (dma_done) state <= A_RELEASE;
        A_RELEASE: state <= A_IDLE;
      endcase
    end
  end

  assign dma_start = (state == A_START);
  assign dma_gid   = req[grant].gid;
  assign dma_dst   = req[grant].dst;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      finish[i] = (state == A_BUSY) && dma_done && (grant == IW'(i));
      wr_out[i] = dma_wr;
      wr_out[i].en = dma_wr.en && (state == A_BUSY) && (grant == IW'(i));
    end
  end

  // Handshake rules: a copy starts only on an idle DMA, and the granted
  // monitor keeps its request up while its copy is running.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    dma_start |-> dma_done);
  a_request_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state == A_BUSY && !dma_done) |-> req[grant].req);

endmodule
