// fifo_dpram: the dual-port RAM of the asynchronous FIFO. One port writes on
// WCLK when wen is high; the other reads on RCLK, registering mem[raddr] on
// every edge, so rdata shows the word at raddr one read clock after raddr
// settles (the FIFO feeds it the next read address to make that a
// first-word-fall-through read). The memory has no reset; the FIFO never
// exposes a word before it has been written.
module fifo_dpram #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              wclk,
  input  logic              wen,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              rclk,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge wclk) begin
    if (wen) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end
endmodule
