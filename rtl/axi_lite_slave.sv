// axi_lite_slave: AXI4-Lite slave that bridges the 32-bit AXI4-Lite bus to
// the 8-bit local bus of the register block.
//
// Only the five basic channels are used (write address, write data, write
// response, read address, read data); protection and strobe signals are not
// part of this interface. One transaction is handled at a time. In idle the
// slave waits until both AWVALID and WVALID are high and accepts them
// together (AWREADY and WREADY pulse for one cycle); a read address is
// accepted when no write is waiting, writes first. It then raises the local
// request with R/W, the low 8 address bits and the low 8 data bits, waits for
// Wr_ACK or Rd_ACK, and returns the response: BVALID, or RVALID with the read
// byte zero-extended to 32 bits, held until the master takes it. Addresses
// above 0xFF get SLVERR without a local access; all others get OKAY.
// With the register block's one-cycle acknowledge, BVALID (or RVALID) rises
// two clock edges after the edge that accepted the address. The signal set
// follows the AXI-to-local-bus drawing; the one-at-a-time sequencing and the
// SLVERR rule are this design's choice.
module axi_lite_slave (
  input  logic        aclk,
  input  logic        aresetn,
  // write address / data / response
  input  logic [31:0] awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  // read address / data
  input  logic [31:0] araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready,
  // local interface
  output logic        loc_req,
  output logic        loc_rw,      // 1 = write, 0 = read
  output logic [7:0]  loc_addr,
  output logic [7:0]  loc_wdata,
  input  logic [7:0]  loc_rdata,
  input  logic        loc_wr_ack,
  input  logic        loc_rd_ack
);
  typedef enum logic [2:0] {S_IDLE, S_WR, S_B, S_RD, S_R} state_e;
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  state_e state;

  assign awready = (state == S_IDLE) && awvalid && wvalid;
  assign wready  = awready;
  assign arready = (state == S_IDLE) && !(awvalid && wvalid) && arvalid;
  assign loc_req = (state == S_WR) || (state == S_RD);
  assign bvalid  = state == S_B;
  assign rvalid  = state == S_R;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state     <= S_IDLE;
      loc_rw    <= 1'b0;
      loc_addr  <= '0;
      loc_wdata <= '0;
      bresp     <= RESP_OKAY;
      rresp     <= RESP_OKAY;
      rdata     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (awready) begin
            loc_rw    <= 1'b1;
            loc_addr  <= awaddr[7:0];
            loc_wdata <= wdata[7:0];
            if (awaddr[31:8] != '0) begin
              bresp <= RESP_SLVERR;
              state <= S_B;
            end else begin
              bresp <= RESP_OKAY;
              state <= S_WR;
            end
          end else if (arready) begin
            loc_rw   <= 1'b0;
            loc_addr <= araddr[7:0];
            if (araddr[31:8] != '0) begin
              rresp <= RESP_SLVERR;
              rdata <= '0;
              state <= S_R;
            end else begin
              rresp <= RESP_OKAY;
              state <= S_RD;
            end
          end
        end
        S_WR: if (loc_wr_ack) state <= S_B;
        S_B:  if (bready) state <= S_IDLE;
        S_RD: if (loc_rd_ack) begin
          rdata <= {24'd0, loc_rdata};
          state <= S_R;
        end
        S_R:  if (rready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A response, once offered, stays until the master accepts it.
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    bvalid && !bready |=> bvalid && $stable(bresp));
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    rvalid && !rready |=> rvalid && $stable(rdata) && $stable(rresp));

endmodule
