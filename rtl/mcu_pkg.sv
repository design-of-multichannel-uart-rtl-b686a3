// mcu_pkg: types and constants shared by the multichannel UART controller.
//
// The controller has four UART channels and three asynchronous FIFOs. Each
// UART is given a role by a 2-bit field of the 8-bit mode selection register
// (UART n uses bits [2n+1:2n]); the mode of operation (normal, bridge, hub,
// bridge hub) follows from how many channels receive, how many transmit, and
// whether their baud divisors differ. The line control register uses the
// classic 16550 bit layout. The register map is this design's own choice.
package mcu_pkg;

  localparam int unsigned NUM_UART = 4;
  localparam int unsigned NUM_FIFO = 3;
  localparam int unsigned DATA_W   = 8;
  localparam int unsigned DIV_W    = 16;

  // Role of one UART channel, one field of the mode selection register.
  typedef enum logic [1:0] {
    ROLE_OFF = 2'b00,   // channel idle
    ROLE_TX  = 2'b01,   // channel transmits what the controller routes to it
    ROLE_RX  = 2'b10,   // channel receives and feeds the controller
    ROLE_RSV = 2'b11    // reserved, treated as idle
  } role_e;

  // Mode of operation, derived from the roles and the baud divisors.
  typedef enum logic [2:0] {
    MODE_IDLE       = 3'd0,  // no channel transmits
    MODE_NORMAL     = 3'd1,  // receivers/host feed transmitters, all at one baud rate
    MODE_BRIDGE     = 3'd2,  // as normal, but the channels run at different baud rates
    MODE_HUB        = 3'd3,  // one receiver feeds three transmitters at one baud rate
    MODE_BRIDGE_HUB = 3'd4   // one receiver feeds three transmitters, baud rates differ
  } mode_e;

  // Line control register (16550 layout).
  typedef struct packed {
    logic       dlab;   // bit 7: unused here, kept for layout compatibility
    logic       brk;    // bit 6: force the line low while set
    logic       stick;  // bit 5: stick parity
    logic       eps;    // bit 4: even parity select
    logic       pen;    // bit 3: parity enable
    logic       stb;    // bit 2: 0 = 1 stop bit, 1 = 1.5 (5-bit words) or 2
    logic [1:0] wls;    // bits 1:0: word length, 00 = 5 .. 11 = 8 bits
  } lcr_t;

  // Local register map (byte addresses on the 8-bit local bus).
  localparam logic [7:0] ADDR_DATA   = 8'h00;  // W: host byte to send, R: last received byte
  localparam logic [7:0] ADDR_LCR    = 8'h01;
  localparam logic [7:0] ADDR_MODE   = 8'h02;
  localparam logic [7:0] ADDR_STATUS = 8'h03;  // R: FIFO and receive status
  localparam logic [7:0] ADDR_ERR    = 8'h04;  // R: sticky line errors, cleared by reading
  localparam logic [7:0] ADDR_LINE   = 8'h05;  // R: per-channel activity (receiving / sending)
  localparam logic [7:0] ADDR_IER    = 8'h06;  // RW: interrupt enables
  localparam logic [7:0] ADDR_DIV0   = 8'h08;  // 0x08+2n low byte, 0x09+2n high byte of UART n

  // Number of data bits in a frame for a word length select field.
  function automatic int unsigned data_bits(input logic [1:0] wls);
    return 5 + int'(wls);
  endfunction

  // Parity bit sent/expected for the low data_bits(wls) bits of d: even
  // parity makes the count of ones, parity bit included, even; stick parity
  // sends the inverse of eps.
  function automatic logic parity_bit(input logic [1:0] wls, input logic stick,
                                      input logic eps, input logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] m;
    m = d & ((DATA_W'(1) << data_bits(wls)) - DATA_W'(1));
    if (stick) return ~eps;
    return eps ? (^m) : ~(^m);
  endfunction

  // Stop length in 16x clock periods: 16, 24 (1.5 bits) or 32.
  function automatic int unsigned stop_ticks(input logic stb, input logic [1:0] wls);
    if (!stb) return 16;
    return (wls == 2'b00) ? 24 : 32;
  endfunction

endpackage
