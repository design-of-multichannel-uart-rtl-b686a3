// register_block: control and status registers of the multichannel UART
// controller, reached over the 8-bit local bus that the AXI4-Lite bridge
// drives.
//
// Map (byte addresses):
//   0x00 DATA   W: byte to send (parallel to serial, used when no channel
//                  receives); R: last byte received by any channel, clears
//                  STATUS[7]
//   0x01 LCR    line control for all channels (16550 layout), reset 0x03 (8N1)
//   0x02 MODE   mode selection: 2-bit role of UART n in bits [2n+1:2n]
//               (00 idle, 01 transmit, 10 receive)
//   0x03 STATUS R: [2:0] FIFO k full, [5:3] FIFO k almost full,
//               [6] a byte was dropped at a full FIFO (cleared by this read),
//               [7] a received byte is waiting in DATA
//   0x04 ERR    R: [0] parity error, [1] framing error (both sticky, cleared
//               by this read), [6:4] the decoded mode of operation
//   0x05 LINE   R: [3:0] UART n has a byte queued or a frame going out,
//               [7:4] UART n is receiving a frame; all 0 means the lines are
//               quiet and the configuration may be changed
//   0x06 IER    interrupt enables, reset 0: [0] received byte waiting
//               (STATUS[7]), [1] line error (ERR[1:0]), [2] byte dropped
//               (STATUS[6]); irq is high while an enabled condition is set
//               and falls when the read that clears it is acknowledged
//   0x08+2n / 0x09+2n  low / high byte of the 16-bit baud divisor of UART n,
//               D = F / (16 * baud); reset DIV_RESET
// Unmapped addresses read as 0 and ignore writes.
//
// Local bus protocol: the master raises req with rw (1 = write), addr and
// wdata and holds them until it sees the acknowledge; the register block
// acts in the first cycle of req and answers with wr_ack or rd_ack (read data
// valid on rdata) in the next cycle. A request is served once even if req is
// still high in the cycle of the acknowledge. A DATA write waits, without
// acknowledge, while host_full says a FIFO that takes host bytes is full, so
// the host is held off instead of losing the byte; the full flag has settled
// by the next request because a bus write takes at least four cycles.
// Writing only into a FIFO that is not full follows the document's flow
// chart; holding the host off is this design's way of doing it. Only the
// 16-bit divisor width and the need for status and control registers come
// from the document; the map is this design's choice.
module register_block
  import mcu_pkg::*;
#(
  parameter logic [DIV_W-1:0] DIV_RESET = 16'd27   // 115200 baud at 50 MHz
) (
  input  logic                clk,
  input  logic                rst_n,
  // local bus
  input  logic                req,
  input  logic                rw,
  input  logic [7:0]          addr,
  input  logic [7:0]          wdata,
  output logic [7:0]          rdata,
  output logic                wr_ack,
  output logic                rd_ack,
  // configuration out
  output lcr_t                lcr,
  output logic [7:0]          mode_sel,
  output logic [DIV_W-1:0]    divisor [NUM_UART],
  output logic                host_wr,
  output logic [DATA_W-1:0]   host_data,
  output logic                irq,
  // status in
  input  logic [NUM_FIFO-1:0] fifo_wfull,
  input  logic [NUM_FIFO-1:0] fifo_walmost_full,
  input  logic                host_full,
  input  logic                drop,
  input  logic [NUM_UART-1:0] rx_valid,
  input  logic [DATA_W-1:0]   rx_data   [NUM_UART],
  input  logic [NUM_UART-1:0] parity_err,
  input  logic [NUM_UART-1:0] frame_err,
  input  logic [NUM_UART-1:0] tx_active,
  input  logic [NUM_UART-1:0] rx_busy,
  input  mode_e               mode
);
  logic              act;
  logic              ack_q;
  logic [DATA_W-1:0] rx_byte;
  logic              rx_ready, drop_seen, perr_seen, ferr_seen;
  logic [2:0]        ier;

  assign act = req && !ack_q && !(rw && addr == ADDR_DATA && host_full);
  assign irq = |(ier & {drop_seen, perr_seen || ferr_seen, rx_ready});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q     <= 1'b0;
      wr_ack    <= 1'b0;
      rd_ack    <= 1'b0;
      rdata     <= '0;
      lcr       <= lcr_t'(8'h03);
      mode_sel  <= '0;
      for (int n = 0; n < NUM_UART; n++) divisor[n] <= DIV_RESET;
      host_wr   <= 1'b0;
      host_data <= '0;
      rx_byte   <= '0;
      rx_ready  <= 1'b0;
      drop_seen <= 1'b0;
      perr_seen <= 1'b0;
      ferr_seen <= 1'b0;
      ier       <= '0;
    end else begin
      ack_q   <= act;
      wr_ack  <= act && rw;
      rd_ack  <= act && !rw;
      host_wr <= 1'b0;

      // status capture; a read in the same cycle clears only what it reported
      if (drop) drop_seen <= 1'b1;
      for (int n = NUM_UART - 1; n >= 0; n--) begin
        if (rx_valid[n]) begin
          rx_byte  <= rx_data[n];
          rx_ready <= 1'b1;
          if (parity_err[n]) perr_seen <= 1'b1;
          if (frame_err[n])  ferr_seen <= 1'b1;
        end
      end

      if (act && rw) begin
        if (addr == ADDR_DATA) begin
          host_wr   <= 1'b1;
          host_data <= wdata;
        end
        if (addr == ADDR_LCR)  lcr      <= lcr_t'(wdata);
        if (addr == ADDR_MODE) mode_sel <= wdata;
        if (addr == ADDR_IER)  ier      <= wdata[2:0];
        for (int n = 0; n < NUM_UART; n++) begin
          if (addr == ADDR_DIV0 + 8'(2*n))     divisor[n][7:0]  <= wdata;
          if (addr == ADDR_DIV0 + 8'(2*n + 1)) divisor[n][15:8] <= wdata;
        end
      end

      if (act && !rw) begin
        rdata <= '0;
        unique case (addr)
          ADDR_DATA: begin
            rdata <= rx_byte;
            if (!(|rx_valid)) rx_ready <= 1'b0;
          end
          ADDR_LINE:   rdata <= {rx_busy, tx_active};
          ADDR_IER:    rdata <= {5'd0, ier};
          ADDR_LCR:    rdata <= lcr;
          ADDR_MODE:   rdata <= mode_sel;
          ADDR_STATUS: begin
            rdata <= {rx_ready, drop_seen, fifo_walmost_full, fifo_wfull};
            if (!drop) drop_seen <= 1'b0;
          end
          ADDR_ERR: begin
            rdata <= {1'b0, mode, 2'b00, ferr_seen, perr_seen};
            if (!(|rx_valid)) begin
              perr_seen <= 1'b0;
              ferr_seen <= 1'b0;
            end
          end
          default: begin
            for (int n = 0; n < NUM_UART; n++) begin
              if (addr == ADDR_DIV0 + 8'(2*n))     rdata <= divisor[n][7:0];
              if (addr == ADDR_DIV0 + 8'(2*n + 1)) rdata <= divisor[n][15:8];
            end
          end
        endcase
      end
    end
  end
endmodule
