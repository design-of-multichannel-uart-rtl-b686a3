// tb_uart_tx: self-checking test of the UART transmitter.
// A queue stands in for the first-word-fall-through FIFO. For several line
// settings (8 data bits with odd parity, 8N1, 8 bits even parity 2 stop
// bits, 5N1, 5 bits 1.5 stop bits, 7 bits stick parity) a burst of random
// bytes is queued; a monitor decodes the line at the middle of each bit,
// counted in 16x clocks, and checks start bit, data, parity, stop bits, and
// that frames follow each other back to back with exactly the frame length
// 16*(1+N+P)+stop. It also checks that the line idles high and that break
// holds it low.
module tb_uart_tx;
  import mcu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0;
  lcr_t lcr;
  logic fifo_empty = 1'b1;
  logic [7:0] fifo_data = '0;
  logic fifo_rinc, serial_out, busy;
  int   checks = 0, failures = 0;
  logic [7:0] q [$];
  logic [7:0] sent [$];

  always #5 clk = ~clk;

  uart_tx dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic update();
    fifo_empty = q.size() == 0;
    fifo_data  = (q.size() != 0) ? q[0] : 8'h00;
  endtask

  always @(posedge clk) begin
    if (fifo_rinc) begin
      check(q.size() != 0, "pop only when not empty");
      if (q.size() != 0) void'(q.pop_front());
    end
    #1 update();
  end

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int n);
    repeat (n) @(posedge clk);
    #2;
  endtask

  // decode one frame whose start bit is already on the line
  task automatic decode(input lcr_t l, output logic [7:0] d);
    int nb;
    logic p;
    nb = data_bits(l.wls);
    d  = '0;
    step(8);
    check(serial_out == 1'b0, "start bit low at mid-bit");
    for (int i = 0; i < nb; i++) begin
      step(16);
      d[i] = serial_out;
    end
    if (l.pen) begin
      step(16);
      p = serial_out;
      check(p == parity_bit(l.wls, l.stick, l.eps, d), $sformatf("parity of %h", d));
    end
    step(16);
    check(serial_out == 1'b1, "first stop bit high");
    if (l.stb && l.wls == 2'b00) begin
      step(12);
      check(serial_out == 1'b1, "half stop bit high");
    end else if (l.stb) begin
      step(16);
      check(serial_out == 1'b1, "second stop bit high");
    end
  endtask

  task automatic run(input logic [7:0] lcr_val, input int nbytes, input logic [7:0] first);
    int flen, t_start, t_prev, cyc;
    logic [7:0] d, m;
    lcr = lcr_t'(lcr_val);
    flen = 16 * (1 + data_bits(lcr.wls) + int'(lcr.pen)) + stop_ticks(lcr.stb, lcr.wls);
    m = 8'((1 << data_bits(lcr.wls)) - 1);
    for (int i = 0; i < nbytes; i++) begin
      d = (i == 0) ? first : 8'($urandom);
      q.push_back(d);
      sent.push_back(d & m);
    end
    update();
    t_prev = -1;
    for (int i = 0; i < nbytes; i++) begin
      // find the falling edge of the start bit, counting clocks
      cyc = 0;
      while (serial_out == 1'b1 && cyc < 2000) begin
        @(posedge clk);
        #2;
        cyc++;
      end
      t_start = $time / 10;
      if (t_prev >= 0)
        check(t_start - t_prev == flen,
              $sformatf("lcr %h frame spacing %0d exp %0d", lcr_val, t_start - t_prev, flen));
      t_prev = t_start;
      decode(lcr, d);
      check(d == sent[0], $sformatf("lcr %h byte %0d got %h exp %h", lcr_val, i, d, sent[0]));
      void'(sent.pop_front());
    end
    step(flen);
    check(serial_out == 1'b1 && !busy, "idle high after burst");
  endtask

  initial begin
    lcr = lcr_t'(8'h03);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    step(4);
    check(serial_out == 1'b1, "line idles high");
    q.push_back(8'h5A);
    update();
    step(40);
    check(serial_out == 1'b1 && q.size() == 1, "disabled transmitter holds data");
    q.delete();
    update();
    enable = 1'b1;
    run(8'h0B, 6, 8'h5A);   // 8 bits, odd parity, 1 stop, byte 0x5A (transmitter waveform)
    run(8'h03, 6, 8'hFF);   // 8N1
    run(8'h1F, 5, 8'h00);   // 8 bits, even parity, 2 stop
    run(8'h00, 5, 8'h15);   // 5N1
    run(8'h04, 5, 8'h0A);   // 5 bits, 1.5 stop
    run(8'h3A, 5, 8'h7F);   // 7 bits, stick parity (eps=1 -> parity bit 0)
    lcr = lcr_t'(8'h43);   // break
    step(3);
    check(serial_out == 1'b0, "break holds line low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
