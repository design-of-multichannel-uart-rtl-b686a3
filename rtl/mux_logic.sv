// mux_logic: the multiplexing logic of the controller. It decodes the 8-bit
// mode selection register and steers data between the four UART channels,
// the host data path and the three asynchronous FIFOs.
//
// Each channel n has a 2-bit role in mode_sel[2n+1:2n]: idle, transmit or
// receive. The transmitting channels, taken in ascending order, are given
// FIFO 0, 1 and 2 (a fourth transmitter is left disabled). The receiving
// channels are listed in ascending order too; FIFO k is written by receiver
// min(k, nrx-1), so two receivers feed two transmitters one-to-one (normal and
// bridge modes) and a single receiver feeds all three (hub modes). With no
// receiver, every active FIFO takes the bytes the host writes (parallel to
// serial). The read clock of FIFO k is the 16x baud clock of the channel it
// feeds, chosen by a clock multiplexer; the roles must be changed only while
// the channels are idle. A byte offered to a full FIFO is dropped and flagged
// on drop. mode reports normal/bridge/hub/bridge hub. Hub is one receiver
// feeding three transmitters: bridge hub when the three transmitters'
// divisors differ (the receiver may run at its own rate in both). Otherwise
// the mode is normal, or bridge when the divisors of the channels in use
// differ. The mode names are the document's; the role encoding and the
// assignment order are this design's choice. Purely combinational.
module mux_logic
  import mcu_pkg::*;
(
  input  logic [7:0]        mode_sel,
  input  logic [DIV_W-1:0]  divisor     [NUM_UART],
  input  logic [NUM_UART-1:0] bclk,
  // host byte (system clock)
  input  logic              host_wr,
  input  logic [DATA_W-1:0] host_data,
  // receivers (system clock)
  input  logic [NUM_UART-1:0] rx_valid,
  input  logic [DATA_W-1:0] rx_data     [NUM_UART],
  output logic [NUM_UART-1:0] rx_en,
  // FIFO write sides (system clock)
  output logic [NUM_FIFO-1:0] fifo_winc,
  output logic [DATA_W-1:0] fifo_wdata  [NUM_FIFO],
  input  logic [NUM_FIFO-1:0] fifo_wfull,
  output logic              drop,
  // FIFO read sides (channel baud clocks)
  output logic [NUM_FIFO-1:0] fifo_rclk,
  output logic [NUM_FIFO-1:0] fifo_rinc,
  input  logic [DATA_W-1:0] fifo_rdata  [NUM_FIFO],
  input  logic [NUM_FIFO-1:0] fifo_rempty,
  // transmitters
  output logic [NUM_UART-1:0] tx_en,
  output logic [NUM_UART-1:0] tx_empty,
  output logic [DATA_W-1:0] tx_data     [NUM_UART],
  input  logic [NUM_UART-1:0] tx_rinc,
  // decoded configuration
  output logic [NUM_FIFO-1:0] fifo_used,
  output logic              src_host,
  output mode_e             mode
);
  logic [1:0] dest  [NUM_FIFO];   // channel fed by FIFO k
  logic [1:0] src   [NUM_FIFO];   // receiver feeding FIFO k
  logic [1:0] txf   [NUM_UART];   // FIFO feeding channel n
  logic [1:0] rxl   [NUM_UART];   // receivers in ascending order
  logic [2:0] ntx, nrx;
  logic [NUM_FIFO-1:0] offer;
  logic       differ, tx_differ;

  always_comb begin
    ntx   = '0;
    nrx   = '0;
    tx_en = '0;
    rx_en = '0;
    for (int k = 0; k < NUM_FIFO; k++) dest[k] = '0;
    for (int n = 0; n < NUM_UART; n++) begin
      txf[n] = '0;
      rxl[n] = '0;
    end
    for (int n = 0; n < NUM_UART; n++) begin
      unique case (role_e'(mode_sel[2*n +: 2]))
        ROLE_TX: if (ntx < 3'(NUM_FIFO)) begin
          dest[ntx[1:0]] = 2'(n);
          txf[n]         = ntx[1:0];
          tx_en[n]       = 1'b1;
          ntx            = ntx + 3'd1;
        end
        ROLE_RX: begin
          rx_en[n]       = 1'b1;
          rxl[nrx[1:0]]  = 2'(n);
          nrx            = nrx + 3'd1;
        end
        default: ;
      endcase
    end
    src_host = nrx == '0;
    for (int k = 0; k < NUM_FIFO; k++) begin
      fifo_used[k] = 3'(k) < ntx;
      src[k]       = (3'(k) < nrx) ? rxl[k] : rxl[nrx[1:0] - 2'd1];
    end
  end

  // write side: source multiplexers
  always_comb begin
    for (int k = 0; k < NUM_FIFO; k++) begin
      fifo_wdata[k] = src_host ? host_data : rx_data[src[k]];
      offer[k]      = fifo_used[k] && (src_host ? host_wr : rx_valid[src[k]]);
      fifo_winc[k]  = offer[k] && !fifo_wfull[k];
    end
    drop = |(offer & fifo_wfull);
  end

  // read side: clock multiplexers and de-multiplexers to the transmitters
  for (genvar k = 0; k < NUM_FIFO; k++) begin : g_rd
    assign fifo_rclk[k] = bclk[dest[k]];
    assign fifo_rinc[k] = fifo_used[k] && tx_rinc[dest[k]];
  end

  always_comb begin
    for (int n = 0; n < NUM_UART; n++) begin
      tx_data[n]  = fifo_rdata[txf[n]];
      tx_empty[n] = tx_en[n] ? fifo_rempty[txf[n]] : 1'b1;
    end
  end

  // mode report: do the divisors of the channels in use (of the transmitters
  // only) differ?
  always_comb begin
    logic              seen, tx_seen;
    logic [DIV_W-1:0]  ref_div, tx_ref_div;
    seen       = 1'b0;
    tx_seen    = 1'b0;
    ref_div    = '0;
    tx_ref_div = '0;
    differ     = 1'b0;
    tx_differ  = 1'b0;
    for (int n = 0; n < NUM_UART; n++) begin
      if (tx_en[n] || rx_en[n]) begin
        if (seen && divisor[n] != ref_div) differ = 1'b1;
        if (!seen) ref_div = divisor[n];
        seen = 1'b1;
      end
      if (tx_en[n]) begin
        if (tx_seen && divisor[n] != tx_ref_div) tx_differ = 1'b1;
        if (!tx_seen) tx_ref_div = divisor[n];
        tx_seen = 1'b1;
      end
    end
    if (ntx == '0)                       mode = MODE_IDLE;
    else if (nrx == 3'd1 && ntx == 3'd3) mode = tx_differ ? MODE_BRIDGE_HUB : MODE_HUB;
    else                                 mode = differ ? MODE_BRIDGE : MODE_NORMAL;
  end

endmodule
