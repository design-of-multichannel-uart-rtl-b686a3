// tb_mc_uart_top: end-to-end test of the multichannel UART controller.
//
// The controller is configured over AXI4-Lite like a host processor would.
// Line drivers feed the four serial inputs and four line monitors decode the
// four serial outputs, each at its channel's bit time of 16*D system clocks.
// Scenarios, in order:
//   host     MODE 0x50: UART 3 and 4 transmit bytes written to DATA (8N1 as
//            on the normal-mode waveform: LCR 0x13, bytes 0x34 then 0xD3);
//            parallel_out 1 and 2 show the bytes, parallel_out 3 stays 0
//   host at two rates  the same with UART 3 and 4 at different divisors
//   host burst  40 host bytes, more than a FIFO holds: DATA writes must be
//            held off while the slower channel's FIFO is full, and every
//            byte must come out on both channels
//   normal   MODE 0x5A: UART 1 -> UART 3 and UART 2 -> UART 4, one baud rate
//   bridge   same roles, four different divisors, with parity on
//   hub      MODE 0x56: UART 1 -> UART 2, 3 and 4; the three transmitters at
//            one baud rate, the receiver at another
//   bridge hub  same roles, three different transmit baud rates
//   overflow fast receiver into a slow transmitter until the FIFO is full;
//            STATUS must show full and a dropped byte, and what comes out
//            must be the first bytes in order
//   errors   a wrong parity bit and a low stop bit, read back from ERR, and
//            the last received byte read from DATA, with the receive
//            interrupt enabled
// LINE is read while channels send and receive and after they finish.
// The ERR register's mode field is read in every scenario. Every mechanism
// is counted and one that never happened counts as a failure. The top is
// used with its default parameters.
module tb_mc_uart_top;
  import mcu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [31:0] s_axi_awaddr = '0, s_axi_wdata = '0, s_axi_araddr = '0, s_axi_rdata;
  logic s_axi_awvalid = 1'b0, s_axi_wvalid = 1'b0, s_axi_bready = 1'b0;
  logic s_axi_arvalid = 1'b0, s_axi_rready = 1'b0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [3:0] serial_in = 4'hF, serial_out;
  logic irq;
  logic [7:0] parallel_out [3];

  int checks = 0, failures = 0;
  int div [4] = '{4, 4, 4, 4};
  lcr_t lcr_v = lcr_t'(8'h13);
  logic [7:0] got [4][$];
  logic       got_perr [4][$];
  int n_mech [string];

  always #5 clk = ~clk;

  mc_uart_top dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_wr(input logic [31:0] a, input logic [7:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_axi_awaddr = a;
    s_axi_wdata = {24'h0, d};
    s_axi_awvalid = 1'b1;
    s_axi_wvalid = 1'b1;
    s_axi_bready = 1'b1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk);
    s_axi_awvalid = 1'b0;
    s_axi_wvalid = 1'b0;
    while (!s_axi_bvalid) @(negedge clk);
    resp = s_axi_bresp;
    @(negedge clk);
    s_axi_bready = 1'b0;
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    logic [1:0] resp;
    axi_wr({24'h0, a}, d, resp);
    check(resp == 2'b00, $sformatf("write %h OKAY", a));
  endtask

  task automatic axi_rd(input logic [31:0] a, output logic [7:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_axi_araddr = a;
    s_axi_arvalid = 1'b1;
    s_axi_rready = 1'b1;
    do @(posedge clk); while (!s_axi_arready);
    @(negedge clk);
    s_axi_arvalid = 1'b0;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata[7:0];
    resp = s_axi_rresp;
    @(negedge clk);
    s_axi_rready = 1'b0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    logic [1:0] resp;
    axi_rd({24'h0, a}, d, resp);
    check(resp == 2'b00, $sformatf("read %h OKAY", a));
  endtask

  // ---------------- serial line driver and monitors ----------------
  task automatic send(input int n, input logic [7:0] d, input logic bad_par, input logic bad_stop);
    int bt, nb;
    bt = 16 * div[n];
    nb = data_bits(lcr_v.wls);
    @(negedge clk);
    serial_in[n] = 1'b0;
    repeat (bt) @(negedge clk);
    for (int i = 0; i < nb; i++) begin
      serial_in[n] = d[i];
      repeat (bt) @(negedge clk);
    end
    if (lcr_v.pen) begin
      serial_in[n] = parity_bit(lcr_v.wls, lcr_v.stick, lcr_v.eps, d) ^ bad_par;
      repeat (bt) @(negedge clk);
    end
    serial_in[n] = !bad_stop;
    repeat (bt) @(negedge clk);
    serial_in[n] = 1'b1;
    if (lcr_v.stb) repeat (bt) @(negedge clk);
  endtask

  task automatic monitor(input int n);
    forever begin
      @(posedge clk);
      #1;
      if (rst_n && serial_out[n] == 1'b0) begin
        int bt, nb;
        logic [7:0] d;
        logic p;
        bt = 16 * div[n];
        nb = data_bits(lcr_v.wls);
        d = '0;
        repeat (bt / 2 - 1) @(posedge clk);
        #1;
        check(serial_out[n] == 1'b0, $sformatf("uart%0d start bit", n + 1));
        for (int i = 0; i < nb; i++) begin
          repeat (bt) @(posedge clk);
          #1;
          d[i] = serial_out[n];
        end
        p = 1'b0;
        if (lcr_v.pen) begin
          repeat (bt) @(posedge clk);
          #1;
          p = serial_out[n] != parity_bit(lcr_v.wls, lcr_v.stick, lcr_v.eps, d);
        end
        repeat (bt) @(posedge clk);
        #1;
        check(serial_out[n] == 1'b1, $sformatf("uart%0d stop bit", n + 1));
        got[n].push_back(d);
        got_perr[n].push_back(p);
      end
    end
  endtask

  // ---------------- helpers ----------------
  task automatic configure(input logic [7:0] lcr8, input int d0, input int d1,
                           input int d2, input int d3, input logic [7:0] mode8);
    wr(ADDR_MODE, 8'h00);
    lcr_v = lcr_t'(lcr8);
    wr(ADDR_LCR, lcr8);
    div = '{d0, d1, d2, d3};
    for (int n = 0; n < 4; n++) begin
      wr(ADDR_DIV0 + 8'(2 * n), 8'(div[n]));
      wr(ADDR_DIV0 + 8'(2 * n + 1), 8'(div[n] >> 8));
    end
    wr(ADDR_MODE, mode8);
    for (int n = 0; n < 4; n++) begin
      got[n].delete();
      got_perr[n].delete();
    end
  endtask

  task automatic expect_mode(input mode_e m, input string name);
    logic [7:0] q;
    rd(ADDR_ERR, q);
    check(mode_e'(q[6:4]) == m, $sformatf("ERR reports mode %s", name));
    if (mode_e'(q[6:4]) == m) n_mech[name]++;
  endtask

  task automatic settle(input int bits);
    int mx;
    mx = 0;
    for (int n = 0; n < 4; n++) if (div[n] > mx) mx = div[n];
    repeat (bits * 16 * mx) @(posedge clk);
  endtask

  task automatic compare(input int n, input logic [7:0] exp_q [$], input string what);
    check(got[n].size() == exp_q.size(),
          $sformatf("%s: uart%0d sent %0d bytes exp %0d", what, n + 1, got[n].size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got[n].size(); i++)
      check(got[n][i] == exp_q[i] && got_perr[n][i] == 1'b0,
            $sformatf("%s: uart%0d byte %0d got %h exp %h", what, n + 1, i, got[n][i], exp_q[i]));
  endtask

  // ---------------- scenarios ----------------
  initial begin
    logic [7:0] q;
    logic [7:0] e0 [$];
    logic [7:0] e1 [$];
    logic [1:0] resp;

    for (int n = 0; n < 4; n++) begin
      automatic int nn = n;
      fork monitor(nn); join_none
    end
    #1 rst_n = 1'b0;   // the reset is asynchronous: the baud clocks are stopped during it
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(serial_out == 4'hF && !irq, "lines idle high and no interrupt after reset");

    // ---- host data, as on the normal-mode waveform ----
    configure(8'h13, 4, 4, 4, 4, 8'h50);
    expect_mode(MODE_NORMAL, "host_parallel_to_serial");
    wr(ADDR_DATA, 8'h34);
    settle(2);
    check(parallel_out[0] == 8'h34 && parallel_out[1] == 8'h34 && parallel_out[2] == 8'h00,
          "parallel_out after first byte");
    wr(ADDR_DATA, 8'hD3);
    for (int i = 0; i < 6; i++) wr(ADDR_DATA, 8'(8'h40 + i));
    rd(ADDR_LINE, q);
    check(q == 8'h0C, $sformatf("LINE %h while UART 3 and 4 send", q));
    if (q == 8'h0C) n_mech["line_activity"]++;
    settle(100);
    rd(ADDR_LINE, q);
    check(q == 8'h00, $sformatf("LINE %h after sending", q));
    e0 = '{8'h34, 8'hD3, 8'h40, 8'h41, 8'h42, 8'h43, 8'h44, 8'h45};
    compare(2, e0, "host");
    compare(3, e0, "host");
    check(got[0].size() == 0 && got[1].size() == 0, "host: UART 1 and 2 silent");
    check(parallel_out[0] == 8'h45 && parallel_out[1] == 8'h45 && parallel_out[2] == 8'h00,
          "parallel_out after last byte");

    // ---- host data sent by two channels at two baud rates ----
    configure(8'h13, 4, 4, 5, 8, 8'h50);
    expect_mode(MODE_BRIDGE, "host_two_baud_rates");
    e0 = '{8'hC3, 8'h3C, 8'h81};
    foreach (e0[i]) wr(ADDR_DATA, e0[i]);
    settle(40);
    compare(2, e0, "host two rates");
    compare(3, e0, "host two rates");

    // ---- host burst longer than a FIFO: the writes are held off, none lost ----
    configure(8'h03, 4, 4, 4, 8, 8'h50);
    rd(ADDR_STATUS, q);   // clear sticky bits
    e0.delete();
    for (int i = 0; i < 40; i++) e0.push_back(8'($urandom));
    begin
      int held;
      longint t0;
      held = 0;
      foreach (e0[i]) begin
        t0 = $time;
        wr(ADDR_DATA, e0[i]);
        if ($time - t0 > 200) held++;
      end
      if (held > 0) n_mech["host_write_held"]++;
      check(held > 0, "host burst: some writes were held off");
    end
    rd(ADDR_STATUS, q);
    check(q[6] == 1'b0, "host burst: no byte dropped");
    settle(200);
    compare(2, e0, "host burst");
    compare(3, e0, "host burst");

    // ---- normal mode: 1 -> 3, 2 -> 4 ----
    configure(8'h03, 4, 4, 4, 4, 8'h5A);
    expect_mode(MODE_NORMAL, "normal");
    e0.delete();
    e1.delete();
    for (int i = 0; i < 8; i++) begin
      e0.push_back(8'($urandom));
      e1.push_back(8'($urandom));
    end
    fork
      for (int i = 0; i < 8; i++) send(0, e0[i], 1'b0, 1'b0);
      for (int i = 0; i < 8; i++) send(1, e1[i], 1'b0, 1'b0);
    join
    settle(30);
    compare(2, e0, "normal");
    compare(3, e1, "normal");

    // ---- bridge mode: different baud rates, parity on ----
    configure(8'h1B, 3, 5, 7, 4, 8'h5A);
    expect_mode(MODE_BRIDGE, "bridge");
    e0.delete();
    e1.delete();
    for (int i = 0; i < 10; i++) begin
      e0.push_back(8'($urandom));
      e1.push_back(8'($urandom));
    end
    fork
      for (int i = 0; i < 10; i++) send(0, e0[i], 1'b0, 1'b0);
      for (int i = 0; i < 10; i++) send(1, e1[i], 1'b0, 1'b0);
    join
    settle(80);
    compare(2, e0, "bridge");
    compare(3, e1, "bridge");

    // ---- hub mode: 1 -> 2, 3, 4 ----
    configure(8'h03, 5, 4, 4, 4, 8'h56);   // receiver at its own rate
    expect_mode(MODE_HUB, "hub");
    e0.delete();
    for (int i = 0; i < 10; i++) e0.push_back(8'($urandom));
    for (int i = 0; i < 10; i++) send(0, e0[i], 1'b0, 1'b0);
    settle(30);
    compare(1, e0, "hub");
    compare(2, e0, "hub");
    compare(3, e0, "hub");

    // ---- bridge hub: three transmit baud rates ----
    configure(8'h1F, 4, 3, 6, 9, 8'h56);
    expect_mode(MODE_BRIDGE_HUB, "bridge_hub");
    e0.delete();
    for (int i = 0; i < 8; i++) e0.push_back(8'($urandom));
    for (int i = 0; i < 8; i++) send(0, e0[i], 1'b0, 1'b0);
    settle(120);
    compare(1, e0, "bridge hub");
    compare(2, e0, "bridge hub");
    compare(3, e0, "bridge hub");

    // ---- overflow: fast receiver, slow transmitter ----
    configure(8'h03, 2, 2, 24, 24, 8'h5A);
    rd(ADDR_STATUS, q);   // clear sticky bits
    e0.delete();
    for (int i = 0; i < 40; i++) e0.push_back(8'(i + 1));
    begin
      logic seen_full, seen_af;
      seen_full = 1'b0;
      seen_af = 1'b0;
      fork
        for (int i = 0; i < 40; i++) send(0, e0[i], 1'b0, 1'b0);
        repeat (60) begin
          rd(ADDR_STATUS, q);
          if (q[0]) seen_full = 1'b1;
          if (q[3]) seen_af = 1'b1;
          if (q[6]) n_mech["fifo_overflow_drop"]++;
          repeat (200) @(posedge clk);
        end
      join
      if (seen_full) n_mech["fifo_full"]++;
      if (seen_af) n_mech["fifo_almost_full"]++;
      check(seen_full && seen_af, "STATUS showed FIFO 1 almost full and full");
    end
    settle(10 * 20);
    check(got[2].size() >= 16 && got[2].size() < 40,
          $sformatf("overflow: %0d of 40 bytes delivered", got[2].size()));
    begin
      int j;
      logic ordered;
      j = 0;
      ordered = 1'b1;
      for (int i = 0; i < got[2].size(); i++) begin
        while (j < 40 && e0[j] != got[2][i]) j++;
        if (j >= 40) ordered = 1'b0;
      end
      check(ordered, "overflow: delivered bytes are in order");
      for (int i = 0; i < 16 && i < got[2].size(); i++)
        check(got[2][i] == e0[i], "overflow: first 16 bytes intact");
    end

    // ---- line errors and the receive path to the host ----
    configure(8'h0B, 4, 4, 4, 4, 8'h02);   // UART 1 receives only, odd parity
    rd(ADDR_ERR, q);
    rd(ADDR_STATUS, q);
    rd(ADDR_DATA, q);
    wr(ADDR_IER, 8'h01);   // interrupt on a received byte
    check(!irq, "no interrupt before the byte arrives");
    fork
      send(0, 8'h5C, 1'b0, 1'b0);
      begin
        repeat (3 * 16 * 4) @(posedge clk);
        rd(ADDR_LINE, q);
        check(q == 8'h10, $sformatf("LINE %h while UART 1 receives", q));
        if (q == 8'h10) n_mech["line_activity"]++;
      end
    join
    settle(2);
    rd(ADDR_STATUS, q);
    check(q[7], "STATUS shows a received byte");
    check(irq, "interrupt for the received byte");
    rd(ADDR_DATA, q);
    check(q == 8'h5C, $sformatf("DATA returns received byte %h", q));
    check(!irq, "interrupt cleared by reading DATA");
    if (q == 8'h5C) n_mech["interrupt"]++;
    wr(ADDR_IER, 8'h00);
    if (q == 8'h5C) n_mech["host_reads_received_byte"]++;
    rd(ADDR_ERR, q);
    check(q[1:0] == 2'b00, "no error on a good frame");
    expect_mode(MODE_IDLE, "idle");
    send(0, 8'hA7, 1'b1, 1'b0);
    settle(2);
    rd(ADDR_ERR, q);
    check(q[0] == 1'b1, "parity error reported");
    if (q[0]) n_mech["parity_error"]++;
    send(0, 8'h3E, 1'b0, 1'b1);
    settle(2);
    rd(ADDR_ERR, q);
    check(q[1] == 1'b1, "framing error reported");
    if (q[1]) n_mech["framing_error"]++;
    axi_wr(32'h0000_0200, 8'h00, resp);
    check(resp == 2'b10, "AXI SLVERR outside the register space");
    if (resp == 2'b10) n_mech["axi_slverr"]++;

    begin
      string names [14] = '{"host_parallel_to_serial", "host_two_baud_rates", "host_write_held", "normal", "bridge", "hub", "bridge_hub",
                            "fifo_full", "fifo_almost_full", "fifo_overflow_drop",
                            "parity_error", "framing_error", "line_activity", "interrupt"};
      foreach (names[i]) begin
        int c;
        c = n_mech.exists(names[i]) ? n_mech[names[i]] : 0;
        $display("mechanism %-24s happened %0d time(s)", names[i], c);
        check(c > 0, $sformatf("mechanism %s happened", names[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
