// uart_rx: UART receiver, serial to parallel, with 16x oversampling.
//
// Runs on the system clock; tick is a one-cycle enable at sixteen times the
// baud rate (from the clock divider). The serial input is first passed
// through two flops. In idle a low sample on a tick starts a frame; the start
// bit is checked again 8 ticks later, near its middle (a glitch returns the
// receiver to idle). From there every 16th tick samples the middle of a data
// bit (5 to 8, LSB first), the parity bit if enabled and the first stop bit,
// as set by the line control register (16550 layout). At the stop-bit sample
// the byte is presented on rx_data with rx_valid high for one clock, together
// with parity_err (parity bit wrong) and frame_err (stop bit low). Unused high
// bits of rx_data are 0. Oversampling and mid-bit sampling are this design's
// choice; the document gives the receiver's function only.
module uart_rx
  import mcu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,       // 16x baud enable
  input  logic              enable,
  input  lcr_t              lcr,
  input  logic              serial_in,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_valid,
  output logic              parity_err,
  output logic              frame_err,
  output logic              busy
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  state_e            state;
  logic [1:0]        sync;
  logic              rx;
  logic [3:0]        cnt;
  logic [2:0]        bitn;
  logic [DATA_W-1:0] shreg;
  logic              par_rx;

  assign rx   = sync[1];
  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= 2'b11;
      state      <= S_IDLE;
      cnt        <= '0;
      bitn       <= '0;
      shreg      <= '0;
      par_rx     <= 1'b0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      sync     <= {sync[0], serial_in};
      rx_valid <= 1'b0;
      if (!enable) begin
        state <= S_IDLE;
      end else if (tick) begin
        cnt <= cnt + 4'd1;
        unique case (state)
          S_IDLE: begin
            cnt <= '0;
            if (!rx) state <= S_START;
          end
          S_START: if (cnt == 4'd7) begin
            cnt   <= '0;
            bitn  <= '0;
            shreg <= '0;
            state <= rx ? S_IDLE : S_DATA;
          end
          S_DATA: if (cnt == 4'd15) begin
            shreg[bitn] <= rx;
            bitn        <= bitn + 3'd1;
            if (int'(bitn) == data_bits(lcr.wls) - 1) state <= lcr.pen ? S_PARITY : S_STOP;
          end
          S_PARITY: if (cnt == 4'd15) begin
            par_rx <= rx;
            state  <= S_STOP;
          end
          S_STOP: if (cnt == 4'd15) begin
            rx_data    <= shreg;
            rx_valid   <= 1'b1;
            parity_err <= lcr.pen && (par_rx != parity_bit(lcr.wls, lcr.stick, lcr.eps, shreg));
            frame_err  <= !rx;
            state      <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
