// fifo_wptr_full: write-side pointer and flags of the asynchronous FIFO
// (the "FIFO FULL & WPTR" block). The binary write pointer has one bit more
// than the RAM address; that extra bit is the wrap flag. The read pointer
// arrives gray-coded through the synchroniser and is turned back into binary
// (G2B). The FIFO is full when the address bits of both pointers match and the
// wrap flags differ. Almost full is raised when the fill level, as seen from
// the write side, reaches DEPTH-AF_MARGIN. Flags are registered and computed
// from the next pointer, so they change on the same WCLK edge that writes.
// The write pointer is also sent out gray-coded (B2G) for the read side.
module fifo_wptr_full #(
  parameter int unsigned ADDR_W    = 4,
  parameter int unsigned AF_MARGIN = 2
) (
  input  logic              wclk,
  input  logic              rst_n,
  input  logic              winc,
  input  logic [ADDR_W:0]   wq2_rgray,   // synchronised read pointer, gray
  output logic [ADDR_W-1:0] waddr,
  output logic [ADDR_W:0]   wgray,       // write pointer, gray, to the read side
  output logic              wfull,
  output logic              walmost_full
);
  localparam int unsigned DEPTH = 2**ADDR_W;

  logic [ADDR_W:0] wbin, wbin_next, rd2wr_bin, level_next;

  // G2B: each binary bit is the xor of the gray bits at and above it.
  always_comb begin
    rd2wr_bin[ADDR_W] = wq2_rgray[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) rd2wr_bin[i] = rd2wr_bin[i+1] ^ wq2_rgray[i];
  end

  assign wbin_next  = wbin + (ADDR_W+1)'(winc && !wfull);
  assign level_next = wbin_next - rd2wr_bin;
  assign waddr      = wbin[ADDR_W-1:0];

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin         <= '0;
      wgray        <= '0;
      wfull        <= 1'b0;
      walmost_full <= 1'b0;
    end else begin
      wbin         <= wbin_next;
      wgray        <= wbin_next ^ (wbin_next >> 1);   // B2G
      wfull        <= (wbin_next[ADDR_W-1:0] == rd2wr_bin[ADDR_W-1:0]) &&
                      (wbin_next[ADDR_W] != rd2wr_bin[ADDR_W]);
      walmost_full <= level_next >= (ADDR_W+1)'(DEPTH - AF_MARGIN);
    end
  end
endmodule
