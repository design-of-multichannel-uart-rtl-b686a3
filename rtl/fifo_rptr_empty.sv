// fifo_rptr_empty: read-side pointer and flags of the asynchronous FIFO
// (the "FIFO EMPTY & RPTR" block). The write pointer arrives gray-coded
// through the synchroniser and is turned back into binary (G2B). The FIFO is
// empty when both pointers, wrap flag included, are equal. Almost empty is
// raised while the fill level seen from the read side is at most AE_LEVEL.
// The RAM read address given out is the next read pointer, so the RAM's
// registered output always holds the word at the head of the FIFO.
module fifo_rptr_empty #(
  parameter int unsigned ADDR_W   = 4,
  parameter int unsigned AE_LEVEL = 2
) (
  input  logic              rclk,
  input  logic              rst_n,
  input  logic              rinc,
  input  logic [ADDR_W:0]   rq2_wgray,   // synchronised write pointer, gray
  output logic [ADDR_W-1:0] raddr_next,
  output logic [ADDR_W:0]   rgray,       // read pointer, gray, to the write side
  output logic              rempty,
  output logic              ralmost_empty
);
  logic [ADDR_W:0] rbin, rbin_next, wr2rd_bin, level_next;

  always_comb begin
    wr2rd_bin[ADDR_W] = rq2_wgray[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) wr2rd_bin[i] = wr2rd_bin[i+1] ^ rq2_wgray[i];
  end

  assign rbin_next  = rbin + (ADDR_W+1)'(rinc && !rempty);
  assign level_next = wr2rd_bin - rbin_next;
  assign raddr_next = rbin_next[ADDR_W-1:0];

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin          <= '0;
      rgray         <= '0;
      rempty        <= 1'b1;
      ralmost_empty <= 1'b1;
    end else begin
      rbin          <= rbin_next;
      rgray         <= rbin_next ^ (rbin_next >> 1);  // B2G
      rempty        <= rbin_next == wr2rd_bin;
      ralmost_empty <= level_next <= (ADDR_W+1)'(AE_LEVEL);
    end
  end
endmodule
