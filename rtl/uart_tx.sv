// uart_tx: UART transmitter, parallel to serial.
//
// Runs on a clock at sixteen times the baud rate (bclk from the clock
// divider) and holds every bit of the frame for 16 of those clocks. The frame
// is a start bit (0), 5 to 8 data bits LSB first, an optional parity bit and
// 1, 1.5 or 2 stop bits (1), all chosen by the line control register lcr
// (16550 layout). Bytes come from a first-word-fall-through FIFO read port:
// when enabled and the FIFO is not empty the transmitter takes the head word,
// pulses fifo_rinc for one clock and starts the frame on the next clock. A
// word waiting at the end of the stop bits is taken in the same clock, so
// back-to-back frames leave no idle time on the line. A frame lasts
// 16*(1+N+P) + 16/24/32 clocks. lcr.brk holds the line low while set.
// serial_out is driven from a flop. The state names follow the transmitter
// waveform (idle, start, data, parity, stop); the FIFO hand-off is this
// design's own.
module uart_tx
  import mcu_pkg::*;
(
  input  logic              clk,        // 16x baud clock
  input  logic              rst_n,
  input  logic              enable,
  input  lcr_t              lcr,
  input  logic              fifo_empty,
  input  logic [DATA_W-1:0] fifo_data,
  output logic              fifo_rinc,
  output logic              serial_out,
  output logic              busy
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  state_e            state, state_n;
  logic [5:0]        cnt, cnt_n;          // 16x clocks within the current bit
  logic [2:0]        bitn, bitn_n;        // data bit index
  logic [DATA_W-1:0] shreg, shreg_n;
  logic              par, par_n;
  logic              line, line_n;
  logic              bit_end, take;

  always_comb begin
    unique case (state)
      S_STOP:  bit_end = cnt == 6'(stop_ticks(lcr.stb, lcr.wls) - 1);
      default: bit_end = cnt == 6'd15;
    endcase
    take = enable && !fifo_empty && (state == S_IDLE || (state == S_STOP && bit_end));
  end

  assign fifo_rinc = take;
  assign busy      = state != S_IDLE;

  always_comb begin
    state_n = state;
    cnt_n   = bit_end ? '0 : cnt + 6'd1;
    bitn_n  = bitn;
    shreg_n = shreg;
    par_n   = par;
    unique case (state)
      S_IDLE:   cnt_n = '0;
      S_START:  if (bit_end) begin
                  state_n = S_DATA;
                  bitn_n  = '0;
                end
      S_DATA:   if (bit_end) begin
                  shreg_n = shreg >> 1;
                  bitn_n  = bitn + 3'd1;
                  if (int'(bitn) == data_bits(lcr.wls) - 1)
                    state_n = lcr.pen ? S_PARITY : S_STOP;
                end
      S_PARITY: if (bit_end) state_n = S_STOP;
      S_STOP:   if (bit_end) state_n = S_IDLE;
      default:  state_n = S_IDLE;
    endcase
    if (take) begin
      state_n = S_START;
      cnt_n   = '0;
      shreg_n = fifo_data;
      par_n   = parity_bit(lcr.wls, lcr.stick, lcr.eps, fifo_data);
    end
    unique case (state_n)
      S_START:  line_n = 1'b0;
      S_DATA:   line_n = shreg_n[0];
      S_PARITY: line_n = par_n;
      default:  line_n = 1'b1;
    endcase
    if (lcr.brk) line_n = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
      par   <= 1'b0;
      line  <= 1'b1;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
      bitn  <= bitn_n;
      shreg <= shreg_n;
      par   <= par_n;
      line  <= line_n;
    end
  end

  assign serial_out = line;

endmodule
