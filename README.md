# Low-power UART deserializer

A UART receiver spends most of its life waiting: between frames the line sits
high and nothing has to happen except noticing the next start bit. This design
is the receiving half of an 8-N-1 serial link that exploits that. It stops the
clock of almost all its flip-flops while the line is idle (global clock
gating), and it builds every register from flip-flops that only take an
internal clock pulse when their input differs from their output (local,
data-dependent clock gating). Only the three receive-detection flip-flops and the
host-side status logic run on the free clock all the time.

Frame format: one low start bit, eight data bits least-significant bit first,
no parity, one high stop bit; the line idles high. The input clock runs at
eight times the baud rate, e.g. 2.4 kHz for 300 baud, 16 MHz for 2 Mbaud, or
333.3 MHz for 41.67 Mbaud.

## Pins

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | input clock, `CLK_DIV` x baud rate, free-running |
| `rst_n`   | in  | 1     | asynchronous reset, active low |
| `rx`      | in  | 1     | serial input (asynchronous) |
| `readn`   | in  | 1     | read strobe, active low (asynchronous) |
| `data`    | out | 8     | received byte (receive hold register) |
| `data_oe` | out | 1     | output enable for bidirectional DATA pads, `= !readn` |
| `rxrdy`   | out | 1     | a byte is waiting to be read |
| `overrun` | out | 1     | a byte was overwritten before it was read |

Top-level parameters: `DATA_BITS` = 8 and `CLK_DIV` = 8 (the input clocks per
bit). Both defaults are the design's intended values; `CLK_DIV` must be a
power of two and at least 4.

## Structure

```
          clk (free-running)
   rx --> rx_detect --rx_fall--+------------------+
              |  rx_s          |                  v
              |            clock_gen: latch clock gate --> gclk --+--> rsm (Idle/Shift/Load)
              |               divide-by-8 counter --> rx_clk     |       | run, load
              v                                     |            |       |
            rsr (shift register, clocked by rx_clk) <            +--> rhr (hold register) --> data, data_oe
                         \______ 8 bits ____________________________^
   readn --> status_gen (clk) <-- load            --> rxrdy, overrun
```

| module | role |
|--------|------|
| `rx_detect`  | two-flop RX synchroniser plus a third flop for falling-edge detection; always clocked |
| `clock_gen`  | latch-based gate on the input clock (`clock_gate`), and a divide-by-`CLK_DIV` counter whose top bit is the bit clock `rx_clk` |
| `rsm`        | receive state machine Idle -> Shift -> Load -> Idle, with a bit counter |
| `rsr`        | receive shift register, shifts on `rx_clk` |
| `rhr`        | receive hold register, loaded in Load; drives the data bus on `readn` |
| `status_gen` | `rxrdy` and `overrun` flags and the `readn` synchroniser; always clocked |
| `nc2mos_dff` | the data-dependent clock-gated flip-flop every register is built from |
| `uart_pkg`   | default sizes and the state type |

## How a frame is received (the clocking is the hard part)

There are three clocks, all derived from `clk`:

* `clk` itself, free-running, clocks `rx_detect` and `status_gen`.
* `gclk = clk AND en_latched`, where the enable is `run | rx_fall` and is
  latched while `clk` is low, so it can only change between edges and never
  glitches. `rsm`, the divide counter and `rhr` run on it.
* `rx_clk`, the top bit of the 3-bit counter on `gclk`; it clocks `rsr`.

Cycle by cycle, with edge E being the first `clk` edge that samples RX low:

1. E+1: the synchroniser output `rx_s` is low; `rx_fall` is high for one cycle.
   The clock gate opens because of `rx_fall`.
2. E+2: the first `gclk` edge. `rsm` leaves Idle for Shift (its `run` output
   now holds the gate open) and the counter is loaded with 1.
3. E+5: the counter passes 3 -> 4, so `rx_clk` rises. That is 4 to 5 input
   clocks after the line fell, the middle of the start bit. `rsr` shifts in
   `rx_s`. The same happens every 8 clocks after that; `tick` tells `rsm` that
   an `rx_clk` edge ends the current cycle, and it counts them.
4. E+69: the ninth `rx_clk` edge samples data bit 7. The start bit has now
   been shifted out of the 8-bit `rsr`, which holds the byte in order.
   `rsm` enters Load.
5. E+70: `rhr` takes the `rsr` word, `rxrdy` is set, and `overrun` is set too
   if `rxrdy` was still set. `rsm` returns to Idle, `run` drops, and the gate
   closes: no `gclk` or `rx_clk` edge occurs until the next start bit.

So a frame costs 69 gated clock edges and 9 bit-clock edges; from the start
edge to `rxrdy` is 70 to 71 input clocks (8.75 to 8.9 bit times). The stop bit
is not sampled: the byte is delivered in the middle of bit 7, and since the
detector reacts only to a falling edge, the next frame cannot start before the
stop bit has brought the line high and the next start bit takes it low again.
Frames may follow each other back to back.

`rx_clk` is only ever *loaded* to a value below 4 when the clock restarts, so
waking up never produces a spurious rising edge on it.

## Data-dependent clock-gated flip-flops

`nc2mos_dff` models a flip-flop cell with master and slave latches, a
comparator of D with Q and a pulse generator: the internal clock pulse fires
only when D differs from Q. The cell is positive-edge triggered and has an
asynchronous set and clear (clear wins). In RTL the comparator is the per-bit
signal `lclk_en = d ^ q`, used as the flip-flop enable, so the stored value is
exactly that of a plain D flip-flop. `lclk_en` is what a power estimate needs:
it says which bits would really be clocked at the next edge. In `rhr`, D equals
Q except in Load, so the register takes pulses only for the bits that change
when a byte arrives; in `rsr` a bit is pulsed only when its neighbour differs.

Every register of the design is built from this cell: the synchronisers,
the divide counter, the state machine, both data registers and the status
flags. That matters most for the flip-flops on the free clock
(`rx_detect`, `status_gen`): on an idle line their inputs equal their outputs,
so they draw no internal clock pulses even though their clock keeps running.
The only storage element that is not such a cell is the enable latch of the
clock gate.

## Host interface and status flags

* `rxrdy` rises at the end of Load. `overrun` rises at the end of a Load that
  finds `rxrdy` still set: the previous byte was lost and `data` now shows the
  new one.
* `readn` is synchronised by two flip-flops on `clk`. Its falling edge, three
  `clk` edges after the pin falls, clears both `rxrdy` and `overrun`. If a Load
  and a read start in the same cycle, `rxrdy` stays set and no overrun is
  flagged.
* `data_oe = !readn` is combinational; the three-state driving belongs to the
  pads, which are not part of this RTL. `data` always shows the held byte.

Because `status_gen` is on the free clock, a read is handled while the
internal clock is off.

## Where this RTL makes its own choices

The block split, the three states, the frame format, the divide-by-eight bit
clock and both clock-gating schemes are the design as specified. These details
were not specified and were chosen here:

* the latch-based gate cell and its enable `run | rx_fall`;
* the sampling phase (counter loaded with 1, bit sampled 4 to 5 clocks into
  each bit) and the two-flop synchronisers on `rx` and `readn`;
* a falling edge, not a low level, starts a frame; there is no start-bit
  validation, no stop-bit check and no framing-error flag;
* a one-cycle Load state;
* the clock-gated flip-flop cell used for every register, including the
  synchronisers, counter and state;
* flags cleared by the falling edge of `readn`;
* an active-low asynchronous reset pin (the package has 14 signal pins:
  8 DATA, RX, READN, CLK, RXRDY, OVERRUN and this reset);
* `data` plus `data_oe` instead of a three-state bus.

Not in the RTL: the I/O pad ring and the supply pads; supply-voltage scaling
(a circuit technique with no logic counterpart); the transistor-level
implementation of the flip-flop cell.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_nc2mos_dff` | Q follows D, `lclk_en == D ^ Q`, asynchronous set, clear and their priority |
| `tb_clock_gen`  | gate closed in Idle, opened by `wake`, `rx_clk` on the 4th gated edge then every 8, `tick` placement, gate closing |
| `tb_rx_detect`  | `rx_s` two clocks late, `rx_fall` against a model |
| `tb_rsm`        | 9 ticks in Shift, one cycle of Load, back to Idle, spurious wakes ignored |
| `tb_rsr`        | shift order against a model and whole frames |
| `tb_rhr`        | loads only on `load`, holds otherwise, `data_oe` |
| `tb_status_gen` | `rxrdy` and `overrun` against a cycle model with random loads and reads |
| `tb_uart_deser` | end to end at default parameters: 60 random frames, random start phase, random idle gaps including back-to-back frames, reads skipped to cause overruns; checks every byte, the flags, the 70 to 71 clock latency, 9 `rx_clk` edges per frame at an 8-clock period, and no internal clock edges while idle. It counts each mechanism (frames, back-to-back frames, gated idle cycles, suppressed flip-flop pulses, reads, overruns) and fails if one never occurs |
| `tb_two_frames` | at 333.3 MHz and 41.67 Mbaud, two frames with the first left unread: overrun, the second byte on DATA, internal clock off afterwards, a read clearing the flags |
| `tb_activity`   | the activity-rate sweep 0, 15, 30, 40, 60 and 75 %: 69 gated clock edges per frame, none while idle, and a table of the share of cycles the internal clock runs |

The sweep prints, for 12 frames per rate:

```
 alpha  clk_cycles  gclk_edges  clocked_share
  15%        6395         828       12.9%
  40%        2399         828       34.5%
  75%        1271         828       65.1%
```

Running a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/uart_pkg.sv tb/tb_uart_deser.sv \
          --top-module tb_uart_deser -o simv
./obj_dir/simv
```

All testbenches run at the default sizes and finish in well under a second.
