// tb_clock_divider: self-checking test of the multi baud rate generator.
// Four channels run with divisors 3, 7, 10 and 1 (treated as 2); then the
// divisors change to 27, 5, 2 and 16. For each channel the test measures, on
// the system clock, the distance between tick pulses (must be D), the period
// of bclk (must be D) and its high time (must be floor(D/2)), over several
// periods, and that each tick falls in the cycle where bclk rises.
module tb_clock_divider;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] divisor [N];
  logic [N-1:0] tick, bclk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_divider #(.N_CH(N), .DIV_W(16)) dut (.*);

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

  // measure channel c for `periods` periods, expecting divisor d
  task automatic measure(input int c, input int d, input int periods);
    int t_last, t_rise, hi, cyc, seen;
    int de;
    logic prev;
    #1;
    prev = bclk[c];
    de = (d < 2) ? 2 : d;
    t_last = -1;
    t_rise = -1;
    hi = 0;
    cyc = 0;
    seen = 0;
    while (seen < periods) begin
      @(posedge clk);
      #1;
      cyc++;
      if (tick[c]) begin
        if (t_last >= 0) begin
          check(cyc - t_last == de, $sformatf("ch%0d tick period %0d exp %0d", c, cyc - t_last, de));
          check(hi == de / 2, $sformatf("ch%0d bclk high %0d exp %0d", c, hi, de / 2));
          seen++;
        end
        t_last = cyc;
        hi = 0;
      end
      if (bclk[c]) hi++;
      if (bclk[c] && !prev) check(tick[c] == 1'b1, $sformatf("ch%0d tick on bclk rising edge", c));
      prev = bclk[c];
      if (bclk[c] && tick[c]) begin
        if (t_rise >= 0) check(cyc - t_rise == de, $sformatf("ch%0d bclk period", c));
        t_rise = cyc;
      end
    end
  endtask

  initial begin
    divisor = '{16'd3, 16'd7, 16'd10, 16'd1};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      measure(0, 3, 6);
      measure(1, 7, 6);
      measure(2, 10, 6);
      measure(3, 1, 6);
    join
    @(posedge clk);
    divisor = '{16'd27, 16'd5, 16'd2, 16'd16};
    repeat (40) @(posedge clk);   // let the old periods finish
    fork
      measure(0, 27, 4);
      measure(1, 5, 4);
      measure(2, 2, 4);
      measure(3, 16, 4);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
