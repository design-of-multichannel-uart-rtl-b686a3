// mc_uart_top: multichannel UART controller with an AXI4-Lite interface.
//
// Four UART channels share one controller. The controller holds three
// asynchronous FIFOs, a clock divider that makes a 16x baud clock for every
// channel, and multiplexing logic that, according to the mode selection
// register, connects receivers (or the host) to FIFOs and FIFOs to
// transmitters. This gives the four modes of operation: normal (two channels
// receive and two transmit at the same baud rate), bridge (the same at
// different baud rates), hub (one channel receives and three transmit at one
// baud rate) and bridge hub (three transmitters at their own baud rates).
// When no channel receives, bytes the host writes over AXI4-Lite are sent by
// every transmitting channel (parallel to serial). The host also reads the
// last received byte and the status through the register block, and irq
// gives it one interrupt line for the conditions it enables in IER.
//
// Clocking: clk is the system clock and the AXI clock. Receivers, the FIFO
// write sides, the register block and the AXI slave run on it; the receivers
// oversample with a 16x enable from the clock divider. Each transmitter runs
// on its channel's divided 16x baud clock, and each FIFO's read side on the
// baud clock of the channel it feeds, so the FIFOs carry the bytes from the
// system clock into the baud clock domains. parallel_out[k] holds, in that
// read domain, the last byte taken out of FIFO k (0 after reset). One reset,
// rst_n, active low and asynchronous, serves all domains. Configuration (mode,
// LCR, divisors) is meant to be changed only while the channels are idle.
module mc_uart_top
  import mcu_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave
  input  logic [31:0]         s_axi_awaddr,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [31:0]         s_axi_wdata,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [31:0]         s_axi_araddr,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [31:0]         s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // serial lines
  input  logic [NUM_UART-1:0] serial_in,
  output logic [NUM_UART-1:0] serial_out,
  // interrupt to the host
  output logic                irq,
  // parallel data leaving the FIFOs
  output logic [DATA_W-1:0]   parallel_out [NUM_FIFO]
);
  // local bus
  logic                loc_req, loc_rw, loc_wr_ack, loc_rd_ack;
  logic [7:0]          loc_addr, loc_wdata, loc_rdata;
  // configuration
  lcr_t                lcr;
  logic [7:0]          mode_sel;
  logic [DIV_W-1:0]    divisor [NUM_UART];
  logic                host_wr;
  logic [DATA_W-1:0]   host_data;
  mode_e               mode;
  logic [NUM_FIFO-1:0] fifo_used;
  logic                src_host;
  // clocks
  logic [NUM_UART-1:0] tick, bclk;
  // receivers
  logic [NUM_UART-1:0] rx_en, rx_valid, rx_perr, rx_ferr, rx_busy;
  logic [DATA_W-1:0]   rx_data [NUM_UART];
  // FIFOs
  logic [NUM_FIFO-1:0] f_winc, f_wfull, f_waf, f_rclk, f_rinc, f_rempty, f_rae;
  logic [DATA_W-1:0]   f_wdata [NUM_FIFO];
  logic [DATA_W-1:0]   f_rdata [NUM_FIFO];
  logic                drop;
  // transmitters
  logic [NUM_UART-1:0] tx_en, tx_empty, tx_rinc, tx_busy;
  logic [NUM_UART-1:0] tx_active, tx_active_s;
  logic [DATA_W-1:0]   tx_data [NUM_UART];

  axi_lite_slave u_axi (
    .aclk (clk), .aresetn (rst_n),
    .awaddr (s_axi_awaddr), .awvalid (s_axi_awvalid), .awready (s_axi_awready),
    .wdata (s_axi_wdata), .wvalid (s_axi_wvalid), .wready (s_axi_wready),
    .bresp (s_axi_bresp), .bvalid (s_axi_bvalid), .bready (s_axi_bready),
    .araddr (s_axi_araddr), .arvalid (s_axi_arvalid), .arready (s_axi_arready),
    .rdata (s_axi_rdata), .rresp (s_axi_rresp), .rvalid (s_axi_rvalid),
    .rready (s_axi_rready),
    .loc_req (loc_req), .loc_rw (loc_rw), .loc_addr (loc_addr),
    .loc_wdata (loc_wdata), .loc_rdata (loc_rdata),
    .loc_wr_ack (loc_wr_ack), .loc_rd_ack (loc_rd_ack)
  );

  register_block u_regs (
    .clk (clk), .rst_n (rst_n),
    .req (loc_req), .rw (loc_rw), .addr (loc_addr), .wdata (loc_wdata),
    .rdata (loc_rdata), .wr_ack (loc_wr_ack), .rd_ack (loc_rd_ack),
    .lcr (lcr), .mode_sel (mode_sel), .divisor (divisor),
    .host_wr (host_wr), .host_data (host_data), .irq (irq),
    .fifo_wfull (f_wfull), .fifo_walmost_full (f_waf),
    .host_full (src_host && |(f_wfull & fifo_used)), .drop (drop),
    .rx_valid (rx_valid), .rx_data (rx_data), .parity_err (rx_perr),
    .frame_err (rx_ferr), .tx_active (tx_active_s), .rx_busy (rx_busy),
    .mode (mode)
  );

  clock_divider #(.N_CH(NUM_UART), .DIV_W(DIV_W)) u_div (
    .clk (clk), .rst_n (rst_n), .divisor (divisor), .tick (tick), .bclk (bclk)
  );

  mux_logic u_mux (
    .mode_sel (mode_sel), .divisor (divisor), .bclk (bclk),
    .host_wr (host_wr), .host_data (host_data),
    .rx_valid (rx_valid), .rx_data (rx_data), .rx_en (rx_en),
    .fifo_winc (f_winc), .fifo_wdata (f_wdata), .fifo_wfull (f_wfull), .drop (drop),
    .fifo_rclk (f_rclk), .fifo_rinc (f_rinc), .fifo_rdata (f_rdata),
    .fifo_rempty (f_rempty),
    .tx_en (tx_en), .tx_empty (tx_empty), .tx_data (tx_data), .tx_rinc (tx_rinc),
    .fifo_used (fifo_used), .src_host (src_host), .mode (mode)
  );

  for (genvar k = 0; k < NUM_FIFO; k++) begin : g_fifo
    async_fifo #(.DATA_W(DATA_W)) u_fifo (
      .rst_n (rst_n),
      .wclk (clk), .winc (f_winc[k]), .wdata (f_wdata[k]),
      .wfull (f_wfull[k]), .walmost_full (f_waf[k]),
      .rclk (f_rclk[k]), .rinc (f_rinc[k]), .rdata (f_rdata[k]),
      .rempty (f_rempty[k]), .ralmost_empty (f_rae[k])
    );

    logic [DATA_W-1:0] last_out;

    always_ff @(posedge f_rclk[k] or negedge rst_n) begin
      if (!rst_n)         last_out <= '0;
      else if (f_rinc[k]) last_out <= f_rdata[k];
    end

    assign parallel_out[k] = last_out;
  end

  for (genvar n = 0; n < NUM_UART; n++) begin : g_uart
    uart_rx u_rx (
      .clk (clk), .rst_n (rst_n), .tick (tick[n]), .enable (rx_en[n]), .lcr (lcr),
      .serial_in (serial_in[n]), .rx_data (rx_data[n]), .rx_valid (rx_valid[n]),
      .parity_err (rx_perr[n]), .frame_err (rx_ferr[n]), .busy (rx_busy[n])
    );

    uart_tx u_tx (
      .clk (bclk[n]), .rst_n (rst_n), .enable (tx_en[n]), .lcr (lcr),
      .fifo_empty (tx_empty[n]), .fifo_data (tx_data[n]), .fifo_rinc (tx_rinc[n]),
      .serial_out (serial_out[n]), .busy (tx_busy[n])
    );

    // activity flag, registered on the channel's own clock so that only a
    // flop output crosses into the system clock domain
    logic active_q;

    always_ff @(posedge bclk[n] or negedge rst_n) begin
      if (!rst_n) active_q <= 1'b0;
      else        active_q <= tx_busy[n] || !tx_empty[n];
    end

    assign tx_active[n] = active_q;
  end

  // each bit is an independent level from its own clock domain
  sync_2ff #(.W(NUM_UART)) u_line_sync (
    .clk (clk), .rst_n (rst_n), .d (tx_active), .q (tx_active_s)
  );

endmodule
