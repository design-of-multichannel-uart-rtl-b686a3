// tb_async_fifo: self-checking test of the asynchronous FIFO.
// Phase 1 fills the FIFO with the reader stopped and checks almost full, full
// and that a write while full is ignored; phase 2 drains it and checks order,
// almost empty and empty. Phase 3 streams random bytes with random write and
// read enables, first with a fast writer, then with a fast reader, and
// compares every word read with a reference queue. The delay from the first
// write to rempty falling is checked against 2..4 read clocks.
module tb_async_fifo;
  localparam int DW = 8, AW = 4, DEPTH = 16;

  logic rst_n = 1'b0;
  logic wclk = 1'b0, rclk = 1'b0;
  logic winc = 1'b0, rinc = 1'b0;
  logic [DW-1:0] wdata = '0, rdata;
  logic wfull, walmost_full, rempty, ralmost_empty;
  int   wper = 5, rper = 8;   // half periods in ns
  int   checks = 0, failures = 0;
  logic [DW-1:0] model [$];

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  async_fifo #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(input logic [DW-1:0] d);
    @(posedge wclk);
    winc  <= 1'b1;
    wdata <= d;
    @(posedge wclk);
    winc  <= 1'b0;
    #1;
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_lat;
    int nw, nr;
    repeat (3) @(posedge wclk);
    rst_n = 1'b1;
    repeat (3) @(posedge rclk);
    check(rempty && ralmost_empty && !wfull && !walmost_full, "flags after reset");

    // ---- phase 1: fill ----
    @(posedge wclk);
    winc  <= 1'b1;
    wdata <= 8'hA0;
    @(posedge wclk);
    winc  <= 1'b0;
    model.push_back(8'hA0);
    n_lat = 0;
    while (rempty && n_lat < 10) begin
      @(posedge rclk);
      n_lat++;
    end
    check(n_lat >= 2 && n_lat <= 4, $sformatf("write-to-not-empty latency %0d read clocks", n_lat));
    check(rdata == 8'hA0, "first word falls through");
    for (int i = 1; i < DEPTH; i++) begin
      wr(8'hA0 + 8'(i));
      model.push_back(8'hA0 + 8'(i));
      if (i == DEPTH - 4) check(!walmost_full, "not almost full at DEPTH-3 words");
      if (i == DEPTH - 3) check(walmost_full && !wfull, "almost full at DEPTH-2 words");
    end
    check(wfull, "full after DEPTH writes");
    wr(8'h55);                 // must be ignored
    check(wfull, "still full");

    // ---- phase 2: drain ----
    repeat (4) @(posedge rclk);
    check(!ralmost_empty, "not almost empty when full");
    for (int i = 0; i < DEPTH; i++) begin
      @(posedge rclk);
      while (rempty) @(posedge rclk);
      check(rdata == model[0], $sformatf("drain word %0d: got %h exp %h", i, rdata, model[0]));
      void'(model.pop_front());
      rinc <= 1'b1;
      @(posedge rclk);
      rinc <= 1'b0;
    end
    repeat (2) @(posedge rclk);
    check(rempty && ralmost_empty, "empty after drain (write while full dropped)");
    repeat (6) @(posedge wclk);
    check(!wfull && !walmost_full, "write side sees space again");

    // ---- phase 3: random streams, both speed ratios ----
    for (int pass = 0; pass < 2; pass++) begin
      nw = 0;
      nr = 0;
      if (pass == 1) begin
        wper = 9;
        rper = 4;
      end
      fork
        begin
          while (nw < 300) begin
            @(posedge wclk);
            #1;
            if (!wfull && ($urandom_range(0, 3) != 0)) begin
              logic [DW-1:0] d;
              d = 8'($urandom);
              winc  <= 1'b1;
              wdata <= d;
              model.push_back(d);
              nw++;
            end else begin
              winc <= 1'b0;
            end
          end
          @(posedge wclk);
          winc <= 1'b0;
        end
        begin
          while (nr < 300) begin
            @(posedge rclk);
            rinc <= 1'b0;
            #1;
            if (!rempty && ($urandom_range(0, 2) != 0)) begin
              check(model.size() > 0 && rdata == model[0],
                    $sformatf("stream word %0d: got %h exp %h", nr, rdata, model[0]));
              void'(model.pop_front());
              rinc <= 1'b1;
              nr++;
            end
          end
          @(posedge rclk);
          rinc <= 1'b0;
        end
      join
      repeat (6) @(posedge rclk);
      check(rempty && model.size() == 0, $sformatf("stream %0d complete", pass));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
