// async_fifo: asynchronous (dual-clock) FIFO that carries bytes from one
// clock domain to another without loss.
//
// Structure, following the FIFO block diagram: a dual-port RAM, a write-side
// pointer/full block and a read-side pointer/empty block, each pointer
// converted to gray code and passed through a two-flop synchroniser to the
// other side, where it is converted back to binary and compared. The pointers
// are one bit wider than the RAM address; that bit tells a full FIFO from an
// empty one. Four status flags: wfull and walmost_full on the write clock,
// rempty and ralmost_empty on the read clock.
//
// Interface: write wdata with winc on a WCLK edge while wfull is low (a winc
// while full is ignored). The read side is first-word-fall-through: while
// rempty is low, rdata holds the oldest word, and rinc on an RCLK edge removes
// it. Timing: a write becomes visible to the reader (rempty falls) about
// three RCLK edges later (two to four, depending on the clock phases); a read
// frees space for the writer as many WCLK edges later. Both sides share the
// active-low asynchronous reset rst_n. The structure, the extra wrap bit and
// the four flags follow the document; the depth (ADDR_W), the almost
// thresholds and the fall-through read are this design's choice.
module async_fifo #(
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned ADDR_W    = 4,   // depth 2**ADDR_W = 16
  parameter int unsigned AF_MARGIN = 2,   // almost full at DEPTH-2 words
  parameter int unsigned AE_LEVEL  = 2    // almost empty at 2 words or fewer
) (
  input  logic              rst_n,
  // write side
  input  logic              wclk,
  input  logic              winc,
  input  logic [DATA_W-1:0] wdata,
  output logic              wfull,
  output logic              walmost_full,
  // read side
  input  logic              rclk,
  input  logic              rinc,
  output logic [DATA_W-1:0] rdata,
  output logic              rempty,
  output logic              ralmost_empty
);
  logic [ADDR_W-1:0] waddr, raddr_next;
  logic [ADDR_W:0]   wgray, rgray, wq2_rgray, rq2_wgray;

  fifo_dpram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_ram (
    .wclk (wclk), .wen (winc && !wfull), .waddr (waddr), .wdata (wdata),
    .rclk (rclk), .raddr (raddr_next), .rdata (rdata)
  );

  fifo_wptr_full #(.ADDR_W(ADDR_W), .AF_MARGIN(AF_MARGIN)) u_wptr (
    .wclk (wclk), .rst_n (rst_n), .winc (winc), .wq2_rgray (wq2_rgray),
    .waddr (waddr), .wgray (wgray), .wfull (wfull), .walmost_full (walmost_full)
  );

  fifo_rptr_empty #(.ADDR_W(ADDR_W), .AE_LEVEL(AE_LEVEL)) u_rptr (
    .rclk (rclk), .rst_n (rst_n), .rinc (rinc), .rq2_wgray (rq2_wgray),
    .raddr_next (raddr_next), .rgray (rgray), .rempty (rempty),
    .ralmost_empty (ralmost_empty)
  );

  sync_2ff #(.W(ADDR_W+1)) u_sync_r2w (.clk (wclk), .rst_n (rst_n), .d (rgray), .q (wq2_rgray));
  sync_2ff #(.W(ADDR_W+1)) u_sync_w2r (.clk (rclk), .rst_n (rst_n), .d (wgray), .q (rq2_wgray));

endmodule
