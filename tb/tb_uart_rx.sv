// tb_uart_rx: self-checking test of the UART receiver.
// The 16x enable is made here, one pulse every DIV system clocks, so a bit
// lasts 16*DIV clocks. A line driver sends frames for several line settings,
// some with a wrong parity bit or a low stop bit, a short glitch that must
// not start a frame, and a burst sent 3% fast. Each received byte is compared
// with what was sent, the error flags with what was injected, and rx_valid
// must come near the middle of the first stop bit (within 2 ticks).
module tb_uart_rx;
  import mcu_pkg::*;
  localparam int DIV = 4;
  localparam int BT  = 16 * DIV;   // clocks per bit

  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0, enable = 1'b0, serial_in = 1'b1;
  lcr_t lcr;
  logic [7:0] rx_data;
  logic rx_valid, parity_err, frame_err, busy;
  int   checks = 0, failures = 0;
  int   cyc = 0, nvalid = 0, t_valid = 0;
  logic [7:0] got_d;
  logic got_p, got_f;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= ((cyc + 1) % DIV) == 0;
    if (rx_valid && rst_n) begin
      nvalid  <= nvalid + 1;
      t_valid <= cyc;
      got_d   <= rx_data;
      got_p   <= parity_err;
      got_f   <= frame_err;
    end
  end

  uart_rx dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hold(input logic v, input int clocks);
    serial_in = v;
    repeat (clocks) @(posedge clk);
  endtask

  // send one frame; bt = clocks per bit; bad_par / bad_stop inject errors
  task automatic send(input logic [7:0] d, input int bt, input logic bad_par,
                      input logic bad_stop);
    int nb, t0, n_before;
    logic [7:0] m;
    nb = data_bits(lcr.wls);
    m  = 8'((1 << nb) - 1);
    n_before = nvalid;
    @(negedge clk);
    t0 = cyc;
    hold(1'b0, bt);
    for (int i = 0; i < nb; i++) hold(d[i], bt);
    if (lcr.pen) hold(parity_bit(lcr.wls, lcr.stick, lcr.eps, d) ^ bad_par, bt);
    hold(!bad_stop, bt);
    serial_in = 1'b1;
    repeat (2 * bt) @(posedge clk);
    check(nvalid == n_before + 1, $sformatf("one byte for %h", d));
    check(got_d == (d & m), $sformatf("data got %h exp %h", got_d, d & m));
    check(got_p == (lcr.pen && bad_par), "parity error flag");
    check(got_f == bad_stop, "framing error flag");
    if (bt == BT) begin
      int expect_t;
      expect_t = t0 + (1 + nb + int'(lcr.pen)) * BT + BT / 2;
      check(t_valid >= expect_t - 2 * DIV && t_valid <= expect_t + 2 * DIV,
            $sformatf("rx_valid at %0d, mid stop bit at %0d", t_valid, expect_t));
    end
  endtask

  initial begin
    lcr = lcr_t'(8'h13);   // 8 bits, no parity (as on the top-level waveform)
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(posedge clk);
    // disabled receiver ignores the line
    hold(1'b0, BT);
    hold(1'b1, 12 * BT);
    check(nvalid == 0, "disabled receiver ignores frames");
    enable = 1'b1;
    repeat (2 * BT) @(posedge clk);
    for (int i = 0; i < 6; i++) send(8'($urandom), BT, 1'b0, 1'b0);
    send(8'h34, BT, 1'b0, 1'b0);
    send(8'hD3, BT, 1'b0, 1'b0);
    lcr = lcr_t'(8'h0B);   // 8 bits, odd parity
    for (int i = 0; i < 4; i++) send(8'($urandom), BT, 1'b0, 1'b0);
    send(8'hA5, BT, 1'b1, 1'b0);      // wrong parity
    send(8'h3C, BT, 1'b0, 1'b1);      // low stop bit
    lcr = lcr_t'(8'h1A);   // 7 bits, even parity
    for (int i = 0; i < 4; i++) send(8'($urandom), BT, 1'b0, 1'b0);
    lcr = lcr_t'(8'h00);   // 5N1
    for (int i = 0; i < 4; i++) send(8'($urandom), BT, 1'b0, 1'b0);
    // a glitch shorter than half a bit must not start a frame
    begin
      int n_before;
      n_before = nvalid;
      hold(1'b0, BT / 4);
      hold(1'b1, 14 * BT);
      check(nvalid == n_before && !busy, "glitch rejected");
    end
    lcr = lcr_t'(8'h03);   // 8N1, sender 3% fast
    for (int i = 0; i < 4; i++) send(8'($urandom), BT - BT * 3 / 100, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
