// tb_mux_logic: self-checking test of the controller's multiplexing logic.
// For every one of the 256 mode selection values, and random data, valid,
// full, empty and clock patterns, the outputs are compared with a reference
// written from the routing rules: transmitters in ascending order take FIFO
// 0..2, FIFO k is written by receiver min(k, nrx-1) or by the host when no
// channel receives, each FIFO is read on the baud clock of its channel, and
// the mode is hub when one receiver feeds three transmitters (bridge hub when
// the transmitters' divisors differ) and otherwise bridge when the divisors
// in use differ. Named cases: 0x50 (two transmitters fed by the
// host, as on the normal-mode waveform), 0x5A (normal), 0x56 (hub).
module tb_mux_logic;
  import mcu_pkg::*;

  logic [7:0]        mode_sel;
  logic [15:0]       divisor [4];
  logic [3:0]        bclk;
  logic              host_wr;
  logic [7:0]        host_data;
  logic [3:0]        rx_valid, rx_en;
  logic [7:0]        rx_data [4];
  logic [2:0]        fifo_winc, fifo_wfull, fifo_rclk, fifo_rinc, fifo_rempty, fifo_used;
  logic [7:0]        fifo_wdata [3];
  logic [7:0]        fifo_rdata [3];
  logic              drop, src_host;
  logic [3:0]        tx_en, tx_empty, tx_rinc;
  logic [7:0]        tx_data [4];
  mode_e             mode;
  int checks = 0, failures = 0;
  int seen_mode [5];

  mux_logic dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (mode_sel %h)", what, mode_sel);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [7:0] ms, input logic same_div);
    int txq [$];
    int rxq [$];
    int dest, src, fifo_of [4];
    logic exp_drop, differ, any, txd;
    int rdiv, tdiv;
    mode_sel = ms;
    for (int n = 0; n < 4; n++) begin
      divisor[n] = same_div ? 16'd8 : 16'(8 + n);
      rx_data[n] = 8'($urandom);
    end
    for (int k = 0; k < 3; k++) fifo_rdata[k] = 8'($urandom);
    rx_valid    = 4'($urandom);
    host_wr     = 1'($urandom);
    host_data   = 8'($urandom);
    fifo_wfull  = 3'($urandom) & 3'($urandom);
    fifo_rempty = 3'($urandom);
    tx_rinc     = 4'($urandom);
    bclk        = 4'($urandom);
    #1;
    for (int n = 0; n < 4; n++) begin
      fifo_of[n] = -1;
      if (ms[2*n +: 2] == 2'b01 && txq.size() < 3) begin
        fifo_of[n] = txq.size();
        txq.push_back(n);
      end
      if (ms[2*n +: 2] == 2'b10) rxq.push_back(n);
    end
    check(src_host == (rxq.size() == 0), "host source");
    exp_drop = 1'b0;
    for (int k = 0; k < 3; k++) begin
      logic used, offer;
      used = k < txq.size();
      check(fifo_used[k] == used, $sformatf("fifo %0d used", k));
      if (!used) begin
        check(!fifo_winc[k] && !fifo_rinc[k], $sformatf("unused fifo %0d idle", k));
        continue;
      end
      dest = txq[k];
      check(fifo_rclk[k] == bclk[dest], $sformatf("fifo %0d read clock from uart %0d", k, dest));
      check(fifo_rinc[k] == tx_rinc[dest], $sformatf("fifo %0d rinc", k));
      if (rxq.size() == 0) begin
        offer = host_wr;
        check(fifo_wdata[k] == host_data, $sformatf("fifo %0d host data", k));
      end else begin
        src = (k < rxq.size()) ? rxq[k] : rxq[rxq.size() - 1];
        offer = rx_valid[src];
        check(fifo_wdata[k] == rx_data[src], $sformatf("fifo %0d data from rx %0d", k, src));
      end
      check(fifo_winc[k] == (offer && !fifo_wfull[k]), $sformatf("fifo %0d winc", k));
      if (offer && fifo_wfull[k]) exp_drop = 1'b1;
    end
    check(drop == exp_drop, "drop");
    for (int n = 0; n < 4; n++) begin
      check(rx_en[n] == (ms[2*n +: 2] == 2'b10), $sformatf("rx_en %0d", n));
      check(tx_en[n] == (fifo_of[n] >= 0), $sformatf("tx_en %0d", n));
      if (fifo_of[n] >= 0) begin
        check(tx_data[n] == fifo_rdata[fifo_of[n]], $sformatf("tx_data %0d", n));
        check(tx_empty[n] == fifo_rempty[fifo_of[n]], $sformatf("tx_empty %0d", n));
      end else begin
        check(tx_empty[n] == 1'b1, $sformatf("idle tx %0d sees empty", n));
      end
    end
    differ = 1'b0;
    any = 1'b0;
    rdiv = 0;
    for (int n = 0; n < 4; n++) begin
      if (fifo_of[n] >= 0 || ms[2*n +: 2] == 2'b10) begin
        if (any && int'(divisor[n]) != rdiv) differ = 1'b1;
        if (!any) rdiv = int'(divisor[n]);
        any = 1'b1;
      end
    end
    // transmitters' divisors only, for the hub modes
    txd = 1'b0;
    tdiv = int'(divisor[txq.size() > 0 ? txq[0] : 0]);
    foreach (txq[i]) if (int'(divisor[txq[i]]) != tdiv) txd = 1'b1;
    if (txq.size() == 0)                          check(mode == MODE_IDLE, "mode idle");
    else if (rxq.size() == 1 && txq.size() == 3)  check(mode == (txd ? MODE_BRIDGE_HUB : MODE_HUB), "mode hub");
    else                                          check(mode == (differ ? MODE_BRIDGE : MODE_NORMAL), "mode normal/bridge");
    seen_mode[int'(mode)]++;
  endtask

  initial begin
    one(8'h50, 1'b1);
    check(tx_en == 4'b1100 && src_host && mode == MODE_NORMAL, "0x50: UART 3 and 4 send host data");
    one(8'h5A, 1'b1);
    check(rx_en == 4'b0011 && tx_en == 4'b1100 && mode == MODE_NORMAL, "0x5A normal");
    one(8'h5A, 1'b0);
    check(mode == MODE_BRIDGE, "0x5A bridge");
    one(8'h56, 1'b1);
    check(rx_en == 4'b0001 && tx_en == 4'b1110 && mode == MODE_HUB, "0x56 hub");
    one(8'h56, 1'b0);
    check(mode == MODE_BRIDGE_HUB, "0x56 bridge hub");
    // hub: the receiver at another rate, the three transmitters at one rate
    one(8'h56, 1'b1);
    divisor[0] = 16'd20;
    #1;
    check(mode == MODE_HUB, "0x56 hub with the receiver at its own rate");
    for (int r = 0; r < 4; r++)
      for (int ms = 0; ms < 256; ms++) one(8'(ms), 1'(r[0]));
    for (int m = 0; m < 5; m++) check(seen_mode[m] > 0, $sformatf("mode %0d reached", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
