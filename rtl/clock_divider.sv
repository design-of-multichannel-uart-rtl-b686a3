// clock_divider: multi baud rate generator. For each of N_CH channels it
// divides the system clock by a 16-bit divisor D = F / (16 * B), giving a
// clock at sixteen times the baud rate B of that channel.
//
// Each channel has a counter running 0 .. D-1 on the system clock. It gives
// two outputs: tick, a one-system-cycle enable while the counter is 0 (used
// by the receivers, which run on the system clock), and bclk, a registered
// divided clock that is high for the first floor(D/2) counts of each period
// and low for the rest (used as the clock of the transmitters and of the FIFO
// read sides). A divisor below 2 is treated as 2. A new divisor takes effect
// when the running period ends, or at once if the counter is already beyond
// it. The counter-per-channel structure and the 0..D-1 count follow the clock
// divider waveform; the duty cycle and the tick output are this design's
// choice.
module clock_divider #(
  parameter int unsigned N_CH  = 4,
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] divisor [N_CH],
  output logic [N_CH-1:0]  tick,
  output logic [N_CH-1:0]  bclk
);
  logic [DIV_W-1:0] cnt [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [DIV_W-1:0] div_eff, cnt_next;

    assign div_eff  = (divisor[c] < DIV_W'(2)) ? DIV_W'(2) : divisor[c];
    assign cnt_next = (cnt[c] >= div_eff - DIV_W'(1)) ? '0 : cnt[c] + DIV_W'(1);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[c]  <= '1;     // wraps to 0 on the first clock
        tick[c] <= 1'b0;
        bclk[c] <= 1'b0;
      end else begin
        cnt[c]  <= cnt_next;
        tick[c] <= cnt_next == '0;
        bclk[c] <= cnt_next < (div_eff >> 1);
      end
    end
  end
endmodule
