// sync_2ff: two-flop synchroniser for a bus that changes one bit at a time
// (a gray-coded pointer). The bus is captured on the destination clock and
// passed through a second flop to let a metastable first stage settle, so it
// appears two destination clock edges after it changes. Both flops clear on
// the asynchronous active-low reset. This is the SYNC R2W / SYNC W2R block of
// the FIFO drawing.
module sync_2ff #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
