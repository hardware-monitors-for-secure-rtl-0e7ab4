// dma_controller: copies a monitoring graph from the centralized graph
// memory into a slot of a monitor graph memory.
//
// A one-cycle `dma_start` with a GID and a destination frame address starts
// a copy. The GID-to-address converter (a table of LUT_ENTRIES rows, each
// the start address and length in words of one graph, loaded through the
// lut_* port) locates the graph; the controller then reads the centralized
// memory one word per cycle and writes each word, one cycle later, to
// destination + index on `wr` (DMA_wren/DMA_address/DMA_data). `dma_done`
// is high while idle, falls in the cycle after `dma_start` and rises again
// after the last write. A graph of L words takes L + 3 cycles from
// dma_start to dma_done. Start requests while busy are ignored.
//
// The start/done handshake, the GID-to-address lookup and one word per
// cycle follow the prototype; the table format (start, length) and the
// three cycles of overhead are this design's.
module dma_controller
  import mthm_pkg::*;
#(
  parameter int unsigned LUT_ENTRIES = 16,
  parameter int unsigned CGM_AW      = 12,
  parameter int unsigned LEN_W       = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  // request
  input  logic               dma_start,
  input  logic [GID_W-1:0]   gid,
  input  logic [GADDR_W-1:0] dst,
  output logic               dma_done,
  // write into the monitor graph memory
  output gmem_wr_t           wr,
  // centralized graph memory read port
  output logic [CGM_AW-1:0]  cgm_raddr,
  input  logic [GDATA_W-1:0] cgm_rdata,
  // GID-to-address table load
  input  logic               lut_we,
  input  logic [GID_W-1:0]   lut_gid,
  input  logic [CGM_AW-1:0]  lut_start,
  input  logic [LEN_W-1:0]   lut_len
);

  typedef enum logic [1:0] {D_IDLE, D_LOCATE, D_COPY, D_DRAIN} dstate_e;

  dstate_e            state;
  logic [CGM_AW-1:0]  lut_src [LUT_ENTRIES];
  logic [LEN_W-1:0]   lut_n   [LUT_ENTRIES];
  logic [GID_W-1:0]   req_gid;
  logic [GADDR_W-1:0] req_dst;
  logic [CGM_AW-1:0]  src;
  logic [LEN_W-1:0]   len, idx;
  logic               pend;
  logic [GADDR_W-1:0] pend_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LUT_ENTRIES; i++) begin
        lut_src[i] <= '0;
        lut_n[i]   <= '0;
      end
    end else if (lut_we) begin
      lut_src[lut_gid] <= lut_start;
      lut_n[lut_gid]   <= lut_len;
    end
  end

  assign cgm_raddr = src + CGM_AW'(idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      dma_done  <= 1'b1;
      req_gid   <= '0;
      req_dst   <= '0;
      src       <= '0;
      len       <= '0;
      idx       <= '0;
      pend      <= 1'b0;
      pend_addr <= '0;
    end else begin
      pend <= 1'b0;
      unique case (state)
        D_IDLE: if (dma_start) begin
          req_gid  <= gid;
          req_dst  <= dst;
          dma_done <= 1'b0;
          state    <= D_LOCATE;
        end
        D_LOCATE: begin
          src   <= lut_src[req_gid];
          len   <= lut_n[req_gid];
          idx   <= '0;
          state <= (lut_n[req_gid] == '0) ? D_DRAIN : D_COPY;
        end
        D_COPY: begin
          pend      <= 1'b1;
          pend_addr <= req_dst + GADDR_W'(idx);
          idx       <= idx + LEN_W'(1);
          if (idx == len - LEN_W'(1)) state <= D_DRAIN;
        end
        D_DRAIN: begin
          dma_done <= 1'b1;
          state    <= D_IDLE;
        end
      endcase
    end
  end

  assign wr = '{en: pend, addr: pend_addr, data: cgm_rdata};

  // Graph words are written only while a copy is in progress.
  a_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    wr.en |-> !dma_done);

endmodule
