# Buffered UART core in SystemVerilog

A UART moves bytes over a single wire in each direction with no shared clock:
each byte is framed by a low start bit and a high stop bit, and the receiver
re-times itself on every start bit. This core gives a host system a simple
parallel interface to such a link. The host pushes bytes into a transmit FIFO
and pops received bytes from a receive FIFO; the serial side runs
independently at the baud rate. The FIFOs absorb the speed difference between
a fast host and the slow line, so the host does not have to service the UART
once per byte.

The design follows a published five-block UART architecture (baud generator,
receiver, transmitter, two FIFOs). The block structure, the interconnect, the
16x oversampling, the start-bit validation rule, the 8-entry FIFO depth and
the host port names come from that architecture. Clock frequency, baud rate,
parity type, reset style and several handshake details were not specified
and are this design's own choices. The section on departures lists them.

## Block structure

```
                 +-----------+   dout/rx_done   +---------+  rd_data, rx_empty
  rx ----------->|  uart_rx  |----------------->| rx fifo |----------------->  host
                 +-----------+   (+parity_err)  +---------+<-- rd_uart
                       ^ en                      (full: unused, overrun drops)
  sys_clk --> uart_baudgen --uarten--+
                       v en
                 +-----------+   din            +---------+<-- wr_uart, wr_data
  tx <-----------|  uart_tx  |<-----------------| tx fifo |
                 +-----------+   tx_start=!empty+---------+--> tx_full
                        tx_done ------> rd
```

| Module         | File                 | Role |
|----------------|----------------------|------|
| `uart`         | `rtl/uart.sv`        | top level, wires the five parts |
| `uart_baudgen` | `rtl/uart_baudgen.sv`| 16x oversampling tick from `sys_clk` |
| `uart_rx`      | `rtl/uart_rx.sv`     | serial-to-parallel receiver |
| `uart_tx`      | `rtl/uart_tx.sv`     | parallel-to-serial transmitter |
| `uart_fifo`    | `rtl/uart_fifo.sv`   | synchronous FIFO, used twice |
| `uart_pkg`     | `rtl/uart_pkg.sv`    | parity type, divisor and parity functions |

Everything runs in the single `sys_clk` domain. The baud generator does not
make a second clock. It makes a one-cycle enable pulse, `uarten`, and the
receiver and transmitter advance only on cycles where it is high. The one
asynchronous input, `rx`, goes through a two-flop synchronizer.

## Frame format

```
 idle  start  d0  d1  d2  d3  d4  d5  d6  d7  parity  stop  idle
 ~~~~\_____/ ... data, least significant bit first ... /‾‾‾‾‾‾‾‾‾‾
```

- The idle line is high. The start bit is low and the stop bit is high.
- `DATA_BITS` data bits follow the start bit, least significant first. The
  default is 8; 5 to 8 are accepted.
- A parity bit follows the data when `PARITY` is `PARITY_EVEN` (the default)
  or `PARITY_ODD`. With `PARITY_NONE` there is no parity bit.
- `STOP_BITS` stop bits end the frame (default 1).
- Every bit lasts `OVERSAMPLE` ticks of `uarten` (default 16). The default
  8E1 frame is therefore 11 x 16 = 176 ticks long.

## Baud generator (`uart_baudgen`)

The division ratio is computed during elaboration:

    DIVISOR = round(CLK_FREQ_HZ / (BAUD_RATE * OVERSAMPLE))

A free-running counter wraps every `DIVISOR` clocks and `uarten` is high for
one clock per wrap. Only `CLK_FREQ_HZ` has to change to move the core to
another board clock; the baud rate stays the same. At the defaults (50 MHz,
19200 baud) the divisor is 163. The real rate is then 19171 baud, 0.15 % slow.
Check this rounding error for other combinations: a UART link tolerates a few
percent of combined error between the two ends.

## Transmit path: FIFO to line

This is the handshake that needs the most care. The transmit FIFO is
*first-word fall-through*: its head word is always visible on `rdata`, without
a read having to be requested. The transmitter is wired to it as follows:

- `tx_start = !empty`. Whenever the transmitter is idle and the FIFO holds a
  word, the transmitter copies the head word into its shift register and
  starts the frame on the next clock.
- The word stays in the FIFO while it is being sent. `tx_full` therefore
  counts that word too: the host can queue 8 words, including the one
  currently on the line.
- `tx_done` pops the FIFO. It is decoded combinationally and is high during
  the one clock in which the last stop bit ends. At that same clock edge the
  transmitter returns to idle and the FIFO advances. On the next clock the
  idle transmitter already sees the *next* word, so it never sends a word
  twice.
- Back-to-back frames follow each other with no gap beyond one clock. The
  start bit of a frame begins on a `sys_clk` edge, not on a tick, so it can
  be up to one tick (one `DIVISOR`) shorter than the other bits. Receivers
  sample in the middle of the bit and are not affected.

`uart_tx` also has a `busy` output (high from start bit to end of stop bits)
for a host that drives it directly without a FIFO. The top level does not
bring it out; there `tx_full` is the host's flow control.

A write with `wr_uart` while `tx_full` is high is ignored.

## Receive path: line to FIFO

`uart_rx` is an oversampling receiver:

1. **Idle.** The synchronized line is examined on every clock. A low level
   starts a candidate start bit.
2. **Start-bit validation.** The receiver counts `OVERSAMPLE/2` ticks (8 by
   default, half a bit). If the line goes high again before that, the pulse
   is taken as noise and the receiver returns to idle without producing
   anything. If it stays low, the receiver is now in the middle of the start
   bit.
3. **Mid-bit sampling.** From there the line is sampled every `OVERSAMPLE`
   ticks, i.e. near the centre of each data bit. Bits are shifted in from the
   top, so after `DATA_BITS` samples the word is aligned, LSB first.
4. **Parity and stop.** The parity bit (if enabled) is sampled the same way.
   At the middle of the first stop bit `rx_done` pulses for one clock, with
   the word on `dout` and `parity_err` high if the parity bit was wrong. The
   receiver returns to idle there. The line is high for the rest of the stop
   bit, so a following start edge is caught even if frames come back to back.

Sampling in the middle of each bit gives about half a bit time of margin over
a frame. The testbench checks reception with the sender's bit time 3 % off in
either direction.

`rx_done` writes the receive FIFO directly. The FIFO's `full` output is left
unconnected: a word that arrives while 8 words are waiting is lost (overrun).
The host avoids this by reading often enough. At 19200 baud a word arrives at
most every 573 microseconds, so 8 words give 4.6 ms of slack. `rx_empty` low
is the "data available" flag. The oldest word is on `rd_data` and a pulse on
`rd_uart` removes it. A read while empty is ignored.

Each entry in the receive FIFO is `DATA_BITS + 1` wide. The parity-error flag
travels with its word and appears on `rd_parity_err` next to `rd_data`. A word
with a parity error is still delivered; the host decides what to do with it.
Framing errors (a low stop bit) are not detected.

## FIFO (`uart_fifo`)

A register array of `DEPTH` words (power of two, default 8) with read and
write pointers one bit wider than the address. Equal pointers mean empty;
pointers that differ only in the top bit mean full. `full` and `empty` are
combinational from the pointers. They change on the clock edge after a push
or pop.

- A push while full is dropped, unless a pop happens in the same cycle.
- A pop while empty is ignored.
- An assertion checks that the stored count never exceeds `DEPTH`.

## Top-level interface (`uart`)

| Port            | Dir | Width       | Meaning |
|-----------------|-----|-------------|---------|
| `sys_clk`       | in  | 1           | system clock, all logic on its rising edge |
| `reset`         | in  | 1           | asynchronous, active high; empties both FIFOs, line idles high |
| `wr_uart`       | in  | 1           | push `wr_data` into the transmit FIFO (one clock per word) |
| `wr_data`       | in  | `DATA_BITS` | word to send |
| `tx_full`       | out | 1           | transmit FIFO full, further writes ignored |
| `rd_uart`       | in  | 1           | pop the oldest received word (one clock per word) |
| `rd_data`       | out | `DATA_BITS` | oldest received word, valid while `rx_empty` is low |
| `rd_parity_err` | out | 1           | parity error of the word on `rd_data` |
| `rx_empty`      | out | 1           | no received word waiting |
| `rx`            | in  | 1           | serial input, asynchronous |
| `tx`            | out | 1           | serial output, registered |

| Parameter     | Default       | Meaning |
|---------------|---------------|---------|
| `CLK_FREQ_HZ` | 50_000_000    | frequency of `sys_clk` |
| `BAUD_RATE`   | 19_200        | line rate |
| `OVERSAMPLE`  | 16            | ticks per bit |
| `DATA_BITS`   | 8             | data bits per frame (5 to 8) |
| `PARITY`      | `PARITY_EVEN` | `PARITY_NONE`, `PARITY_EVEN` or `PARITY_ODD` |
| `STOP_BITS`   | 1             | stop bits sent (the receiver checks the first) |
| `FIFO_DEPTH`  | 8             | words per FIFO, power of two |

Both ends of a link must use the same `BAUD_RATE`, `DATA_BITS`, `PARITY` and
`STOP_BITS`.

Size at the defaults, after generic synthesis: about 82 flip-flops plus
136 bits of FIFO storage (8 x 9 receive, 8 x 8 transmit). The default
`CLK_FREQ_HZ` and `BAUD_RATE` give a 19200-baud link from a 50 MHz clock.

## Departures from the original description, and choices made here

- **Serial pins.** The original block diagram draws `rx` and `tx` as
  external lines, but its top-level symbol lists only the host-side ports.
  Here `rx` and `tx` are ports of the top. Connect them together for a
  loopback.
- **Parity.** The frame was described as start, data, parity and stop bits,
  with the parity bit "if used". Its type was not given. Even parity is the
  default here and the parameter can turn parity off. The receive-side
  parity-error flag and its path through the receive FIFO are additions.
- **Baud rate.** The baud generator was described as adapting to the clock
  frequency. Here that is done at elaboration from `CLK_FREQ_HZ`. There is no
  run-time baud detection and no programmable divisor register.
- **Clock and baud values** (50 MHz, 19200 baud) are assumptions. The
  original gives neither.
- **Interrupts.** A UART may raise an interrupt when data arrives or the
  transmitter frees up. No interrupt output is provided; `rx_empty` and
  `tx_full` are the status flags.
- **Overrun.** As in the original, the receive FIFO's full flag is unused
  and words that overflow it are lost. No overrun flag is kept.
- **Reset** is asynchronous and active high; the original does not specify
  it.
- **Synchronizer.** The two-flop synchronizer on `rx` is an addition.
- **Resource use** is larger than the original's reported 53 flip-flops,
  mainly because of parity, the synchronizer and the wider receive FIFO.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| Testbench          | What it checks |
|--------------------|----------------|
| `tb_uart_baudgen`  | tick spacing equals the divisor computed independently with real arithmetic, at 50 MHz/19200 and 2 MHz/9600; single-cycle ticks; baud error under 2 % |
| `tb_uart_tx`       | 8E1 and 7O2 frames decoded by an independent line monitor; exact frame length in ticks; `tx_done` once per frame; back-to-back streaming; idle line high |
| `tb_uart_rx`       | good frames, flipped parity bits, ±3 % bit-time error, glitch shorter than half a bit ignored, `rx_done` latency (middle of stop bit), 7N1 variant |
| `tb_uart_fifo`     | random push/pop against a queue model, for 8x8 and 2x9; push-while-full and pop-while-empty exercised |
| `tb_uart`          | whole core at its default parameters, see below |

`tb_uart_serial_mon` is a behavioural line monitor shared by the
testbenches. It decodes frames by counting ticks from the falling edge.

`tb_uart` runs the top level with no parameter overrides (50 MHz, 19200
baud). It covers about 35 frames, some 20 ms of line time. In it:

- The host writes `8'hAA` and further words until `tx_full`, plus one write
  while full, which must be dropped.
- The looped-back words fill the receive FIFO and two are lost to overrun.
- Consecutive frames must be one frame time apart, within one tick.
- Then 20 words are streamed with a concurrent reader.
- Finally the loopback is opened and the testbench drives `rx` itself while
  the core transmits (full duplex): a good frame, a frame with a bad parity
  bit, and a glitch.

Each of these events is counted and must occur at least once.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/uart_pkg.sv tb/tb_uart.sv --top-module tb_uart -o sim
    ./obj_dir/sim

Replace `tb_uart` with any other testbench name. The testbenches initialise
everything they read and run on a two-state simulator.

## Changing the design

- **Other clock or baud rate.** Override `CLK_FREQ_HZ` and `BAUD_RATE` on
  `uart`, then check the rounding error of `DIVISOR`.
- **Deeper FIFOs.** Set `FIFO_DEPTH` to a larger power of two. This gives
  more tolerance of a slow host on the receive side.
- **Overrun flag.** The receive FIFO's full flag is already available inside
  `uart` as `rx_fifo_full`. A sticky overrun flag would be set by
  `rx_done && rx_fifo_full`.
- **Framing error.** `uart_rx` samples the stop bit in its stop state. A
  framing-error output would be that sample inverted, registered alongside
  `parity_err`.
