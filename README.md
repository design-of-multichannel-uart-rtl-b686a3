# Multichannel UART controller with an AXI4-Lite interface

A single UART runs at one baud rate. Connecting several serial devices that
run at different speeds to one fast host usually means several UARTs, more
interrupts and software to move bytes between them. This controller
puts four UART channels behind one AXI4-Lite slave and lets them forward data
among themselves in hardware:

* **normal mode**: two channels receive and two transmit, all at one baud
  rate (channel A to channel C, channel B to channel D);
* **bridge mode**: the same routing, with the channels at different baud
  rates, so a device at one baud rate can talk to a device at another;
* **hub mode**: one channel receives and the other three send what it
  receives, the three at one baud rate;
* **bridge hub mode**: the same fan-out, with the three transmitters at three
  different baud rates;
* **parallel to serial**: bytes the host writes over AXI4-Lite are sent by
  every transmitting channel. Each channel can run at its own baud rate.

Asynchronous FIFOs move bytes between the different clock domains, so rate
differences between the channels are absorbed without losing data until a
FIFO fills. The design is written in synthesizable SystemVerilog (IEEE
1800-2017) and every block has a self-checking testbench.

## Block structure

```
            AXI4-Lite                     +----------------- controller -----------------+
  host ---- 32-bit ---> axi_lite_slave    |  clock_divider --- bclk[4], tick[4]          |
                           | 8-bit local  |        |                                     |
                           v bus          |        v                                     |
  irq <--------------- register_block ----+--> mux_logic <----------------------------+  |
                  LCR, MODE, DIV x4, DATA |    |  source mux     FIFO 1 (async_fifo) --+--+--> parallel_out[0]
                                          |    |  FIFO -> TX     FIFO 2 (async_fifo) --+--+--> parallel_out[1]
                                          |    |  clock mux      FIFO 3 (async_fifo) --+--+--> parallel_out[2]
                                          +----+-------------------------------------------+
                                               |                        |
   serial_in[n] --> uart_rx[n] (system clock) -+       uart_tx[n] (bclk[n]) --> serial_out[n]
```

| Module | Role |
|---|---|
| `mc_uart_top` | top level: wires everything together |
| `axi_lite_slave` | AXI4-Lite slave, turns each transaction into one 8-bit local bus access |
| `register_block` | control and status registers |
| `clock_divider` | one 16x baud clock and one 16x enable per channel |
| `mux_logic` | decodes the mode register and steers data and clocks |
| `async_fifo` | dual-clock FIFO (`fifo_dpram`, `fifo_wptr_full`, `fifo_rptr_empty`, `sync_2ff`) |
| `uart_tx`, `uart_rx` | one transmitter and one receiver per channel |
| `mcu_pkg` | shared types (roles, modes, line control register) and register addresses |

## Roles, routing and modes

There is no mode number to program. The 8-bit MODE register gives each
channel a role, and the mode follows from the roles and the baud divisors.
UART *n* (n = 1..4) uses bits `[2n-1:2n-2]`:

| Field | Role |
|---|---|
| `00` | idle |
| `01` | transmit |
| `10` | receive |
| `11` | reserved (idle) |

Routing rules, implemented in `mux_logic`:

1. The transmitting channels, in ascending channel order, are given FIFO 1,
   FIFO 2 and FIFO 3. A fourth transmitter stays disabled.
2. The receiving channels are listed in ascending order. FIFO *k* is written
   by receiver *min(k, number of receivers)*. Two receivers therefore feed
   two transmitters one to one, and a single receiver feeds all three
   transmitters.
3. With no receiving channel, every FIFO in use takes the bytes the host
   writes to the DATA register.
4. Each FIFO is read on the 16x baud clock of the channel it feeds.

| MODE value | Roles (UART 4..1) | What happens |
|---|---|---|
| `0x50` | TX TX idle idle | host bytes go out on UART 3 and UART 4 |
| `0x5A` | TX TX RX RX | UART 1 goes to UART 3, UART 2 goes to UART 4 (normal or bridge) |
| `0x56` | TX TX TX RX | UART 1 goes to UARTs 2, 3 and 4 (hub or bridge hub) |
| `0x02` | idle idle idle RX | UART 1 only receives; the host reads the bytes from DATA |

The ERR register reports the decoded mode:

| Mode | Condition |
|---|---|
| idle | nothing transmits |
| hub | one receiver and three transmitters, the three transmitters at one divisor (the receiver may use another) |
| bridge hub | one receiver and three transmitters, the transmitters' divisors not all equal |
| normal | any other routing, all channels in use at one divisor |
| bridge | any other routing, divisors of the channels in use not all equal |

Change MODE, LCR and the divisors only while no frame is in flight (LINE
reads 0). Write MODE = 0 first and the new MODE last. Changing the roles also switches the
read clock of a FIFO, and that clock multiplexer is not glitch-free.

## Clock domains and the FIFOs

This is the part of the design that most needs care.

* **System clock `clk`.** It runs the AXI slave, the register block, the
  clock divider, all four receivers and the write side of all three FIFOs.
  The receivers sample their line on every 16x enable `tick[n]`. That way
  the source multiplexer, which picks a receiver or the host for each FIFO,
  stays inside one clock domain.
* **Baud clocks `bclk[n]`.** The clock divider makes them from the system
  clock. Each transmitter runs on its own channel's clock. The read side of
  a FIFO, and the `parallel_out` register after it, run on the clock of the
  transmitter the FIFO feeds, chosen by a clock multiplexer in `mux_logic`.
  So the FIFO is where each byte crosses from the system clock into a baud
  clock domain. In hub mode one received byte is written into three FIFOs
  in the same system clock cycle, and each is emptied at its own baud rate.
* **Reset.** `rst_n` is active low and asynchronous, and it resets all
  domains. It has to be asynchronous: the baud clocks are stopped while the
  divider is in reset.

Bytes go into a FIFO only while it is not full. What happens to the rest
depends on where they come from:

* **From the host.** A write to DATA is held while a FIFO that takes host
  bytes is full. The local-bus acknowledge, and so BVALID, is delayed until
  there is room. A host can write a burst of any length without polling,
  and no byte is lost.
* **From a receiver.** A serial line cannot be paused, so a received byte
  that meets a full FIFO is dropped, and STATUS bit 6 records it. When the
  receiver is faster than the transmitter, whatever reaches the output is
  the first bytes, in order.

### Asynchronous FIFO

`async_fifo` is the classic gray-pointer dual-clock FIFO:

* **Pointers.** The write and read pointers are one bit wider than the RAM
  address. The extra bit is a wrap flag.
* **Crossing.** Each pointer is converted to gray code (`B2G`) and passed
  through two flops on the other clock (`sync_2ff`). On the other side it is
  converted back to binary (`G2B`) and compared.
* **Empty and full.** The FIFO is empty when both pointers are equal, wrap
  flag included. It is full when the address bits are equal and the wrap
  flags differ.
* **Flags.** `wfull` and `walmost_full` (at DEPTH-2 words) are on the write
  clock. `rempty` and `ralmost_empty` (at 2 words or fewer) are on the read
  clock. All flags are registered and change on the clock edge that moves the
  pointer.
* **Read side.** It is first-word-fall-through. The dual-port RAM reads on
  the read clock at the next read address, so `rdata` always holds the head
  word while `rempty` is low, and `rinc` removes it.
* **Latency.** A write shows up at the reader (`rempty` falls) 2 to 4 read
  clocks later.
* **Size.** Default depth 16 (`ADDR_W = 4`), 8-bit data. The depth needed
  for a burst of B words written at frequency β and read at α is
  D = B − (α/β)·B. Change `ADDR_W` if a burst needs more room.

## Baud rates

Each channel has a 16-bit divisor:

  D = F_clk / (16 · baud)

The divider counts 0 … D−1 on the system clock. `tick[n]` is high in the
cycle where the count is 0, and `bclk[n]` is high for the first ⌊D/2⌋ counts
of each period. So every UART bit lasts exactly 16·D system clocks. A divisor
below 2 acts as 2.

With a 50 MHz system clock:

| Baud | D |
|---|---|
| 115 200 | 27 (+0.5 %); this is the reset value |
| 9 600 | 326 |
| 110 | 28 409 |

The 16-bit divisor reaches 110 baud for any system clock up to 115 MHz. For
rates near 1 Mbaud, pick a system clock that is a multiple of 16 × baud.

## Frame format (LCR)

One line control register, in the 16550 layout, is shared by all channels.

| Bits | Meaning |
|---|---|
| `[1:0]` | word length: 5, 6, 7 or 8 data bits |
| `[2]` | stop bits: 1, or 2 (1.5 with 5-bit words) |
| `[3]` | parity enable |
| `[4]` | even parity |
| `[5]` | stick parity |
| `[6]` | break: the transmit lines are held low |
| `[7]` | unused |

Data go LSB first. LCR = `0x13` is 8N1, and `0x0B` is 8 data bits, odd
parity, 1 stop bit.

* **Transmitter.** It takes the head byte from its FIFO and pulses `rinc`.
  The start bit begins on the next baud-clock edge. A byte that is already
  waiting at the end of a stop bit is sent with no idle time in between, so
  a frame repeats every 16·(1 + N + P) + 16/24/32 baud clocks.
* **Receiver.** It double-flops its input and detects the start bit on a
  16x enable. It checks the start bit again 8 enables later, so shorter
  glitches are ignored. It then samples every bit at its middle. The byte
  is delivered at the middle of the first stop bit, with parity-error and
  framing-error flags.

## Register map

The registers are 8 bits wide, at byte addresses on the AXI bus. AXI data
bits [7:0] are used, and reads return the byte zero-extended to 32 bits.

| Addr | Name | Access | Contents |
|---|---|---|---|
| 0x00 | DATA | W | byte for the transmitters (used when no channel receives) |
| 0x00 | DATA | R | last byte received by any channel; clears STATUS[7] |
| 0x01 | LCR | RW | line control, reset 0x03 |
| 0x02 | MODE | RW | roles, reset 0x00 |
| 0x03 | STATUS | R | [2:0] FIFO k full, [5:3] FIFO k almost full, [6] byte dropped (cleared by this read), [7] received byte waiting |
| 0x04 | ERR | R | [0] parity error, [1] framing error (both sticky, cleared by this read), [6:4] decoded mode (0 idle, 1 normal, 2 bridge, 3 hub, 4 bridge hub) |
| 0x05 | LINE | R | [3:0] UART *n* has a byte queued in its FIFO or a frame going out, [7:4] UART *n* is receiving a frame; 0 means all lines are quiet |
| 0x06 | IER | RW | interrupt enables, reset 0: [0] received byte waiting, [1] parity or framing error, [2] byte dropped |
| 0x08 + 2(n−1) | DIVn_LO | RW | UART n divisor [7:0], reset 27 |
| 0x09 + 2(n−1) | DIVn_HI | RW | UART n divisor [15:8], reset 0 |

Unmapped addresses below 0x100 read 0 and ignore writes. If two channels
deliver a byte in the same cycle, DATA keeps the lower channel's byte.

The `irq` output is the single interrupt line to the host. It is high while
any condition enabled in IER is set: STATUS[7], ERR[1:0] or STATUS[6]. It
falls when the read that clears the condition (DATA, ERR or STATUS) is
served. It is a level, and it is combinational from the register flops.

## AXI4-Lite interface

The slave uses the five basic channels only, without WSTRB or PROT. It
serves one transaction at a time:

* **Writes.** It waits until AWVALID and WVALID are both high and accepts
  them together.
* **Reads.** It accepts a read address only when no write is waiting, so
  writes go first.
* **Local access.** It then makes one access on the local bus (`req`, R/W,
  8-bit address and data) and waits for the register block's Wr_ACK or
  Rd_ACK, which comes one cycle later (later for a DATA write while a host
  FIFO is full).
* **Responses.** BVALID or RVALID rises two edges after the address is
  accepted and stays high until the master takes it. Addresses of 0x100 and
  above get SLVERR without any local access.

Assertions in `axi_lite_slave` check that responses stay stable until
accepted.

## Simulation

All testbenches are self-checking. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog. To run one:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mc_uart_top \
    -y rtl -y tb +libext+.sv rtl/mcu_pkg.sv tb/tb_mc_uart_top.sv
./obj_dir/Vtb_mc_uart_top
```

| Testbench | What it checks |
|---|---|
| `tb_mc_uart_top` | Runs the whole controller over AXI4-Lite with its default parameters: host bytes 0x34 and 0xD3 on UART 3 and 4 with MODE 0x50 and LCR 0x13, then host bytes at two baud rates, a 40-byte host burst that must be held off and arrive whole, normal, bridge (with parity), hub, bridge hub, FIFO overflow (full, almost full and drop seen in STATUS; delivered bytes in order), parity and framing errors, reading a received byte with the receive interrupt, LINE while sending, receiving and after, and SLVERR. It counts each mechanism and fails if one never happened. |
| `tb_async_fifo` | fill to full (almost full at 14), a write while full ignored, drain in order, write-to-empty latency, random streams with a fast writer and then a fast reader |
| `tb_clock_divider` | tick and bclk period D, high time ⌊D/2⌋ and tick alignment, for divisors 3, 7, 10, 1, then 27, 5, 2, 16 |
| `tb_uart_tx` | frame contents and exact back-to-back spacing for 8O1, 8N1, 8E2, 5N1, 5 bits with 1.5 stop and 7-bit stick parity; idle and break |
| `tb_uart_rx` | bytes and flags for several formats, injected parity and stop-bit errors, rx_valid at mid stop bit, glitch rejection, a sender 3 % fast |
| `tb_mux_logic` | all 256 MODE values against a reference model of the routing rules |
| `tb_register_block` | reset values, read-back, one host write per access, STATUS/ERR/LINE capture, clear-on-read, and irq following IER |
| `tb_axi_lite_slave` | random writes and reads, AW/W order, back-pressure, write-before-read, SLVERR, latency |

`tb_mc_uart_top` takes well under a second.

## Where the design makes its own choices

The overall architecture is fixed:

* four UART channels;
* a controller with three asynchronous FIFOs, a clock divider and
  multiplexing logic;
* a register block and an AXI4-Lite slave bridged to an 8-bit local bus.

The following are also fixed:

* the four modes;
* the FIFO structure: gray pointers with a wrap flag, two-flop
  synchronisers, and four status flags;
* the divisor formula and its 16-bit width;
* the 5–8 data bits, parity and 1/1.5/2 stop bits;
* the example values used in the tests (LCR 0x13 and 0x0B, MODE 0x50,
  divisors 3/7/10).

These points are this design's own decisions:

* **Encoding.** The 2-bit-per-channel role encoding of the MODE register,
  and the rule for assigning FIFOs to channels.
* **Modes.** Modes are derived from the roles and the divisors, not
  selected directly.
* **Clocking.** Receivers run on the system clock with a 16x enable.
  Transmitters and FIFO read sides run on divided baud clocks selected by a
  clock multiplexer. The AXI clock is the system clock.
* **Registers.** The register map, reset values, clear-on-read status, and a
  single LCR shared by all channels. The LINE activity register and the
  interrupt sources in IER.
* **FIFO.** Depth 16, the almost-full/almost-empty thresholds and the
  first-word-fall-through read.
* **Host path.** Host bytes are used only when no channel receives. The
  host reads received bytes through one DATA register, which holds only the
  last byte.
* **AXI4-Lite.** One transaction at a time, and SLVERR above 0xFF.

Not included:

* per-channel FIFOs inside the transmitters;
* a receive FIFO towards the host;
* glitch-free clock switching.
