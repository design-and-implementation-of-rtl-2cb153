# 8N1 UART for an RS-232 link

This is a full-duplex UART (universal asynchronous receiver/transmitter). It turns
bytes into a serial bit stream and back again, using the framing of an RS-232 serial
port. The two ends of the link share no clock. Each end counts its own clock to find
where the bits are. The design is kept small: no parity, one stop bit, one fixed
baud rate per build, a transmit FIFO on the send side, and a receiver that rejects
line noise at the start bit.

The structure comes from a published description of a "high speed, low power UART
with RS-232": a transmit FIFO, a monitoring unit, a data sending unit, and a
receiver built around a baud counter (`baud_cnt`), a per-bit flag (`bit_flag`) and a
bit counter (`bit_cnt`), all clocked at 50 MHz. That description gives the frame
format and the bit-counter sequences. It does not give FIFO depth, baud rate,
sampling point, noise handling or handshakes. Those are choices made here, and
each is listed below.

## The frame on the wire

```
 idle | start |  b0 |  b1 | ... |  b7 | stop | idle
  1   |   0   |  d0 |  d1 | ... |  d7 |  1   |  1
```

* The line rests at logic 1.
* A frame is one start bit (0), eight data bits with bit 0 first, and one stop bit (1).
* There is no parity bit.
* Every bit lasts `CLKS_PER_BIT = CLK_FREQ_HZ / BAUD_RATE` clock cycles. At the
  defaults that is 50,000,000 / 9600 = 5208 cycles, or 9600.6 baud.
* A frame takes 52,080 cycles (1.04 ms).

`rs232_tx` and `rs232_rx` carry logic levels. An external RS-232 transceiver chip
(MAX232-style) converts them to line levels, and the converter inverts: logic 1 goes
to about −12 V and logic 0 to about +12 V. A DB-9 connector carries the signals:
TXD on pin 3, RXD on pin 2, ground on pin 5. The modem-control pins (DCD, DTR, DSR,
RTS, CTS, RI) are not used. The transceiver and the connector are outside this RTL.

## Module map

```
                    uart_rs232_top
  tx_wr_en/data --> uart_tx_fifo --> uart_tx_monitor --> uart_tx --> rs232_tx
                    (16 x 8)         (IDLE/LAUNCH/WAIT)   |
                                                           uart_baud_gen (flag at end of bit)
  rx_data/done  <-------------------------------------- uart_rx <--- rs232_rx
                                                           uart_baud_gen (flag mid-bit)
```

| file | what it is |
|---|---|
| `rtl/uart_pkg.sv` | clock and baud defaults, frame levels, the divider function, the monitor's state type |
| `rtl/uart_baud_gen.sv` | baud counter; pulses `bit_flag` once per bit period at a chosen cycle |
| `rtl/uart_tx_fifo.sv` | synchronous show-ahead FIFO, 16 × 8 by default |
| `rtl/uart_tx_monitor.sv` | moves bytes from the FIFO to the transmitter, one frame at a time |
| `rtl/uart_tx.sv` | data sending unit: latches a byte and shifts out one frame |
| `rtl/uart_rx.sv` | receiver: start-bit detection, mid-bit sampling, byte output |
| `rtl/uart_rs232_top.sv` | the whole UART |

The two directions share only the clock and the reset, so they run at the same time
(full duplex).

## Baud counter

`uart_baud_gen` counts from 0 to `CLKS_PER_BIT-1` while its `en` input is high, then
wraps. While `en` is low it holds the count at 0, so every bit period starts with the
frame. `bit_flag` is high for the one cycle in which the count equals `FLAG_AT`.

There are two instances, and they differ only in `FLAG_AT`:

* **Transmitter**: `FLAG_AT = CLKS_PER_BIT-1`. The flag falls at the end of a bit,
  which is when the line must move to the next bit.
* **Receiver**: `FLAG_AT = CLKS_PER_BIT/2-1`. The flag falls in the middle of a bit,
  which is when the line is sampled.

## Send path

**FIFO.** `uart_tx_fifo` is a register array with read and write pointers one bit
wider than the address. The oldest word is always on `rd_data`, and `rd_en` removes
it. A write while `full` is dropped, and a read while `empty` is ignored. Expect 17
bytes to be accepted from a burst: the monitor removes the first byte one cycle after
it arrives, which frees a slot.

**Monitoring unit.** `uart_tx_monitor` has three states:

* `MON_IDLE`: when the FIFO is not empty and the transmitter is idle, it pulses
  `fifo_rd_en` and keeps the byte.
* `MON_LAUNCH`: it pulses `tx_start`.
* `MON_WAIT`: it waits for the transmitter's `done`.

So the FIFO drains one frame at a time, for as long as it holds bytes. A queued byte
starts 3 cycles after the previous frame's `done`. That gap is negligible next to a
bit period. An assertion checks that every launch finds the transmitter idle.
`tx_idle` is high when the FIFO is empty and no byte is in flight.

**Sending unit.** `uart_tx` works as follows:

1. On `start` while idle, it copies `data` into `r_data` and raises `state` (output
   `busy`). `data` may change freely after that.
2. `bit_cnt` advances on each end-of-bit flag. A value of 0 sends the start bit,
   1..8 send `r_data[0]`..`r_data[7]`, and 9 sends the stop bit.
3. The flag that ends the stop bit clears `state` and gives a one-cycle `done`.

`rs232_tx` is registered, so the line follows `state` and `bit_cnt` one cycle later.
Each bit still lasts exactly `CLKS_PER_BIT` cycles. A `start` during a frame is
ignored.

## Receive path

The receiver is the most delicate part. It must find a frame that arrives at any
moment, using a clock unrelated to the sender's. It must also not be fooled by
noise on the line.

1. **Synchronise.** `rs232_rx` passes two flip-flops (`rx_s1`, `rx_s2`) before any
   logic uses it. This guards against metastability. A third flip-flop (`rx_s3`)
   keeps the previous level.
2. **Start edge.** In the idle state, `rx_s3 = 1` together with `rx_s2 = 0` is the
   front of a start bit. The receiver enters its working state, and its baud counter
   starts from 0.
3. **Check the start bit.** The first mid-bit flag comes half a bit later. If the
   line is high again by then, the edge was a glitch: the receiver returns to idle
   and produces nothing. Any low pulse shorter than about half a bit is therefore
   ignored.
4. **Data bits.** The next eight flags fall in the middle of the eight data bits.
   Each sample is shifted into a register, bit 0 first.
5. **Stop bit.** The last flag falls in the middle of the stop bit. The byte moves to
   `rx_data`, `done` pulses for one cycle, and `frame_error` records whether the
   stop bit read as 0. A byte with a bad stop bit is still delivered, so the user
   decides what to do with it.
6. **Early return to idle.** The receiver leaves the working state in the middle of
   the stop bit, not at its end. A start bit that follows straight after the stop
   bit is therefore never missed. This also leaves half a bit of margin for a sender
   whose clock runs a little fast.

**Latency.** `done` comes 3 + 9.5 × `CLKS_PER_BIT` cycles after the start edge
reaches `rs232_rx`. That is 49,479 cycles at the defaults. The 3 cycles are the
synchroniser and the edge detector. `rx_data` and `frame_error` then hold until the
next frame completes.

**Clock tolerance.** Each bit is sampled at its centre, counted from the start edge.
A rate mismatch between the two ends accumulates over 9.5 bit periods. Sampling
stays inside the stop bit if the two baud rates differ by less than about 5%.

**No receive buffer.** The receive side has no buffer and no handshake. A user who
does not take `rx_data` at `done` loses the byte when the next frame ends.

## Parameters

| parameter | default | from the source description? |
|---|---|---|
| `CLK_FREQ_HZ` | 50,000,000 | yes (50 MHz system clock) |
| `BAUD_RATE` | 9600 | no: the source fixes no rate; 9600 is a common RS-232 rate |
| `DATA_BITS` | 8 | yes (8 data bits; 5 to 8 are allowed by the general frame format) |
| `FIFO_DEPTH` | 16 | no: the source names the FIFO but gives no depth |

`DATA_BITS` values of 5 and 7 have been run through the end-to-end test. `FIFO_DEPTH`
must be a power of two. `CLKS_PER_BIT` must be at least 2, and much more in practice
so that the mid-bit sampling has room. The baud counter grows with `$clog2`, so low
rates such as 1492 baud (a divisor of 33,512) need no other change.

Reset is `rst_n`, active low and asynchronous. All control registers and the FIFO
pointers are reset. The FIFO storage is not.

## Where this design departs from its source

* **Start-bit edge.** One sentence of the source says a frame begins when the line
  changes "from 0 to 1". The same source's frame and timing diagram shows a low start
  bit after a high idle line. This design detects the start bit on the 1-to-0 change.
* **Parity.** The source says in one place that data "are checked for parity", and
  elsewhere that the frame has no parity bit. This design follows the frame format:
  no parity.
* **Baud rate.** The baud rate is a build-time parameter. The source's code excerpts
  show a 16-bit run-time prescale input. Its prose instead describes a division
  factor derived from the baud rate, and that is what is built here.
* **Receiver error flags.** The source's receiver interface lists `frame_error` and
  `overrun_error`. Only `frame_error` exists here. There is no consumer handshake,
  so "overrun" has no meaning in this design.
* **Own choices, not in the source:** mid-bit sampling, the start-bit re-check, the
  synchroniser, the FIFO depth and interface, the monitor's three states, and the
  registered transmit output.
* **Source waveform signals not built.** The source's simulation waveform includes
  `rt`, `tfinish`, `sclk`, `cnt` and `rdata_bak`. They are not described anywhere, so
  they are not built.
* **Resource figures.** The source reports 64 flip-flops for its FPGA implementation,
  with timing and power figures from a vendor flow. This RTL has 80 flip-flop bits
  plus 128 bits of FIFO storage at the defaults. None of those figures can be
  checked from RTL alone.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
against a model written independently in the testbench. Each prints
`TB_RESULT checks=N failures=M` and carries a watchdog.

| testbench | what it shows |
|---|---|
| `tb_uart_baud_gen` | flag position and period for random enable bursts, end-of-bit and mid-bit instances |
| `tb_uart_tx_fifo` | random traffic against a queue model; full and empty corners; dropped writes and reads |
| `tb_uart_tx_monitor` | FIFO order, one start per removal, no start while busy, next byte one cycle after done, `tx_idle` |
| `tb_uart_tx` | every cycle of 43 frames against the expected waveform; `busy`/`done` timing; latched data; ignored start |
| `tb_uart_rx` | 47 frames, back to back and spaced; exact latency; 4 bad stop bits; 6 glitches rejected |
| `tb_uart_rs232_top` | end to end at 16 clocks per bit. Runs single frames, a FIFO overflow burst sent back to back in loopback, and full-duplex traffic with a frame error and a glitch. Counts each of these events and fails if one never happens |
| `tb_uart_rs232_full` | the top at its defaults (50 MHz, 9600 baud), in loopback. Checks the bit period of 5208 cycles, the line levels of the frame for 8'h4A, frame spacing, and 49,479-cycle receive latency |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/uart_pkg.sv tb/tb_uart_rs232_top.sv --top-module tb_uart_rs232_top
./obj_dir/Vtb_uart_rs232_top
```

Every testbench finishes in well under a second, including the full-size one
(about 210,000 clock cycles).
