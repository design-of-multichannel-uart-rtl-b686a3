// tb_register_block: self-checking test of the register block.
// A local-bus master task raises req and holds it until the acknowledge, as
// the AXI bridge does. The test checks reset values, write/read-back of LCR,
// MODE and the four divisors, that a DATA write gives exactly one host_wr
// pulse carrying the byte, that the acknowledge comes one cycle after the
// request (or later, for a DATA write while host_full is high), that STATUS
// shows the FIFO flags and the sticky drop and receive bits, that ERR collects parity and framing errors and clears on read, and
// that LINE shows the activity inputs, that irq follows the conditions
// enabled in IER and falls with the read that clears them, and that an
// unmapped address reads 0.
module tb_register_block;
  import mcu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, rw = 1'b0;
  logic [7:0] addr = '0, wdata = '0, rdata;
  logic wr_ack, rd_ack;
  lcr_t lcr;
  logic [7:0] mode_sel;
  logic [15:0] divisor [4];
  logic host_wr, irq;
  logic [7:0] host_data;
  logic [2:0] fifo_wfull = '0, fifo_walmost_full = '0;
  logic drop = 1'b0, host_full = 1'b0;
  logic [3:0] rx_valid = '0, parity_err = '0, frame_err = '0;
  logic [3:0] tx_active = 4'b1001, rx_busy = 4'b0010;
  logic [7:0] rx_data [4];
  mode_e mode = MODE_HUB;
  int checks = 0, failures = 0;
  int n_host_wr = 0;
  int exp_lat = 1;   // expected acknowledge latency in cycles
  logic [7:0] last_host;

  always #5 clk = ~clk;

  register_block dut (.*);

  always @(posedge clk) if (rst_n && host_wr) begin
    n_host_wr <= n_host_wr + 1;
    last_host <= host_data;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus(input logic w, input logic [7:0] a, input logic [7:0] d,
                     output logic [7:0] q);
    int n;
    @(negedge clk);
    req = 1'b1;
    rw = w;
    addr = a;
    wdata = d;
    n = 0;
    do begin
      @(posedge clk);
      #1;
      n++;
    end while (!(w ? wr_ack : rd_ack) && n < 20);
    check(n == exp_lat, $sformatf("acknowledge after %0d cycle(s), exp %0d", n, exp_lat));
    q = rdata;
    @(posedge clk);   // like the AXI bridge, req is still high at the edge after the acknowledge
    #1 req = 1'b0;
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] q;
    bus(1'b1, a, d, q);
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] q);
    bus(1'b0, a, 8'h00, q);
  endtask

  initial begin
    logic [7:0] q;
    for (int n = 0; n < 4; n++) rx_data[n] = 8'h10 * 8'(n + 1);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(lcr == lcr_t'(8'h03) && mode_sel == 8'h00, "reset LCR/MODE");
    check(divisor[0] == 16'd27 && divisor[3] == 16'd27, "reset divisors");
    wr(ADDR_LCR, 8'h0B);
    wr(ADDR_MODE, 8'h50);
    for (int n = 0; n < 4; n++) begin
      wr(ADDR_DIV0 + 8'(2 * n), 8'(n + 3));
      wr(ADDR_DIV0 + 8'(2 * n + 1), 8'(n));
    end
    check(lcr == lcr_t'(8'h0B) && mode_sel == 8'h50, "LCR/MODE outputs");
    for (int n = 0; n < 4; n++)
      check(divisor[n] == {8'(n), 8'(n + 3)}, $sformatf("divisor %0d", n));
    rd(ADDR_LCR, q);  check(q == 8'h0B, "read LCR");
    rd(ADDR_MODE, q); check(q == 8'h50, "read MODE");
    rd(ADDR_DIV0 + 8'd5, q); check(q == 8'd2, "read DIV2 high");
    rd(ADDR_DIV0 + 8'd6, q); check(q == 8'd6, "read DIV3 low");
    wr(ADDR_DATA, 8'h34);
    wr(ADDR_DATA, 8'hD3);
    repeat (2) @(posedge clk);
    check(n_host_wr == 2 && last_host == 8'hD3, "one host_wr per DATA write");
    // a DATA write waits while a host FIFO is full; other writes do not
    host_full = 1'b1;
    wr(ADDR_LCR, 8'h0B);
    exp_lat = 11;
    fork
      wr(ADDR_DATA, 8'h77);
      begin
        repeat (10) @(posedge clk);
        check(n_host_wr == 2, "no host_wr while the FIFO is full");
        #2 host_full = 1'b0;
      end
    join
    exp_lat = 1;
    repeat (2) @(posedge clk);
    check(n_host_wr == 3 && last_host == 8'h77, "held DATA write goes through once");
    rd(8'h3F, q); check(q == 8'h00, "unmapped reads 0");
    rd(ADDR_LINE, q); check(q == 8'h29, $sformatf("LINE %h", q));
    wr(ADDR_IER, 8'hF9);
    rd(ADDR_IER, q); check(q == 8'h01, $sformatf("IER %h", q));
    check(!irq, "no interrupt before any event");
    // status
    fifo_wfull = 3'b010;
    fifo_walmost_full = 3'b110;
    @(negedge clk) begin
      rx_valid = 4'b0100;
      drop = 1'b1;
      frame_err = 4'b0100;
    end
    @(negedge clk) begin
      rx_valid = '0;
      drop = 1'b0;
      frame_err = '0;
    end
    check(irq, "interrupt for a received byte");
    rd(ADDR_STATUS, q);
    check(q == {1'b1, 1'b1, 3'b110, 3'b010}, $sformatf("STATUS %b", q));
    rd(ADDR_STATUS, q);
    check(q[6] == 1'b0 && q[7] == 1'b1, "drop cleared by read, rx ready kept");
    rd(ADDR_DATA, q);
    check(q == 8'h30, "received byte");
    rd(ADDR_STATUS, q);
    check(q[7] == 1'b0, "rx ready cleared by DATA read");
    check(!irq, "interrupt falls with the DATA read");
    wr(ADDR_IER, 8'h06);
    check(irq, "interrupt for a framing error");
    rd(ADDR_ERR, q);
    check(q == {1'b0, MODE_HUB, 4'b0010}, $sformatf("ERR %b", q));
    check(!irq, "interrupt falls with the ERR read");
    @(negedge clk) begin
      rx_valid = 4'b0001;
      parity_err = 4'b0001;
    end
    @(negedge clk) begin
      rx_valid = '0;
      parity_err = '0;
    end
    rd(ADDR_ERR, q);
    check(q[1:0] == 2'b01, "frame error cleared, parity error set");
    rd(ADDR_ERR, q);
    check(q[1:0] == 2'b00, "errors cleared");
    @(negedge clk) drop = 1'b1;
    @(negedge clk) drop = 1'b0;
    check(irq, "interrupt for a dropped byte");
    rd(ADDR_STATUS, q);
    check(!irq, "interrupt falls with the STATUS read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
