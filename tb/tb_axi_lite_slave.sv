// tb_axi_lite_slave: self-checking test of the AXI4-Lite to local bus bridge.
// A 256-byte memory with a one-cycle acknowledge stands in for the register
// block. The test writes and reads back bytes, presents AW before W and W
// before AW, holds BREADY and RREADY low for a while (the response must
// stay), issues a read and a write together (the write goes first), checks
// SLVERR for an address above 0xFF with no local access, and checks that the
// response comes two edges after the address is accepted.
module tb_axi_lite_slave;
  logic aclk = 1'b0, aresetn = 1'b0;
  logic [31:0] awaddr = '0, wdata = '0, araddr = '0, rdata;
  logic awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic loc_req, loc_rw, loc_wr_ack = 1'b0, loc_rd_ack = 1'b0;
  logic [7:0] loc_addr, loc_wdata, loc_rdata = '0;
  logic [7:0] mem [256];
  logic ack_q = 1'b0;
  int n_local = 0;
  int checks = 0, failures = 0;

  always #5 aclk = ~aclk;

  axi_lite_slave dut (.*);

  // local responder
  always @(posedge aclk) begin
    loc_wr_ack <= 1'b0;
    loc_rd_ack <= 1'b0;
    ack_q      <= loc_req && !ack_q;
    if (loc_req && !ack_q) begin
      n_local <= n_local + 1;
      if (loc_rw) begin
        mem[loc_addr] <= loc_wdata;
        loc_wr_ack    <= 1'b1;
      end else begin
        loc_rdata  <= mem[loc_addr];
        loc_rd_ack <= 1'b1;
      end
    end
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

  task automatic tick1();
    @(posedge aclk);
    #1;
  endtask

  // write; w_lag = cycles W comes after AW (negative: before); b_wait = cycles BREADY low
  task automatic axi_write(input logic [31:0] a, input logic [31:0] d, input int w_lag,
                           input int b_wait, output logic [1:0] resp);
    int n;
    awaddr = a;
    wdata  = d;
    if (w_lag >= 0) awvalid = 1'b1; else wvalid = 1'b1;
    repeat ((w_lag < 0) ? -w_lag : w_lag) begin
      tick1();
      check(!awready && !wready, "no accept before both valid");
    end
    awvalid = 1'b1;
    wvalid  = 1'b1;
    #1;
    n = 0;
    while (!(awready && wready)) begin
      tick1();
      n++;
    end
    tick1();
    awvalid = 1'b0;
    wvalid  = 1'b0;
    n = 0;
    while (!bvalid && n < 20) begin
      tick1();
      n++;
    end
    if (a[31:8] == '0) check(n == 2, $sformatf("BVALID %0d edges after accept", n));
    repeat (b_wait) begin
      tick1();
      check(bvalid, "BVALID held while BREADY low");
    end
    resp = bresp;
    bready = 1'b1;
    tick1();
    bready = 1'b0;
    check(!bvalid, "BVALID drops after handshake");
  endtask

  task automatic axi_read(input logic [31:0] a, input int r_wait,
                          output logic [31:0] d, output logic [1:0] resp);
    int n;
    araddr  = a;
    arvalid = 1'b1;
    #1;
    while (!arready) tick1();
    tick1();
    arvalid = 1'b0;
    n = 0;
    while (!rvalid && n < 20) begin
      tick1();
      n++;
    end
    if (a[31:8] == '0) check(n == 2, $sformatf("RVALID %0d edges after accept", n));
    repeat (r_wait) begin
      tick1();
      check(rvalid, "RVALID held while RREADY low");
    end
    d = rdata;
    resp = rresp;
    rready = 1'b1;
    tick1();
    rready = 1'b0;
  endtask

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    logic [7:0] ref_mem [256];
    int nl;
    repeat (2) @(posedge aclk);
    #1 aresetn = 1'b1;
    tick1();
    for (int i = 0; i < 16; i++) begin
      logic [7:0] a, v;
      a = 8'($urandom);
      v = 8'($urandom);
      axi_write({24'd0, a}, {24'hABCDEF, v}, $urandom_range(0, 4) - 2, $urandom_range(0, 3), resp);
      ref_mem[a] = v;
      check(resp == 2'b00, "write OKAY");
      axi_read({24'd0, a}, $urandom_range(0, 3), d, resp);
      check(resp == 2'b00 && d == {24'd0, v}, $sformatf("read back %h exp %h", d, v));
    end
    // out of range
    nl = n_local;
    axi_write(32'h0000_0100, 32'h55, 0, 0, resp);
    check(resp == 2'b10, "write SLVERR above 0xFF");
    axi_read(32'h0001_0000, 0, d, resp);
    check(resp == 2'b10 && d == '0, "read SLVERR above 0xFF");
    check(n_local == nl, "no local access for SLVERR");
    // read and write offered together: write first
    awaddr = 32'h20; wdata = 32'h77; awvalid = 1'b1; wvalid = 1'b1;
    araddr = 32'h20; arvalid = 1'b1;
    #1;
    check(awready && wready && !arready, "write wins arbitration");
    tick1();
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) tick1();
    bready = 1'b1; tick1(); bready = 1'b0;
    while (!arready) tick1();
    tick1();
    arvalid = 1'b0;
    while (!rvalid) tick1();
    check(rdata == 32'h77, "read after write sees new value");
    rready = 1'b1; tick1(); rready = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
