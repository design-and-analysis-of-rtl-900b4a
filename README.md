# Asynchronous FIFO with Gray-code pointers and delay correction

Data produced in one clock domain often has to be consumed in another whose
clock is unrelated: a sensor interface writing at its own rate, a processor
reading at its own. Sampling a multi-bit value across such a boundary can catch
bits mid-change, and any flip-flop that samples a changing input can go
metastable. This design moves 16-bit words from a write clock domain to a read
clock domain through a first-in first-out buffer that has no external address
lines. It keeps the two sides apart with three ideas:

1. each side owns its own pointer into a dual-port RAM, and only pointers (never
   data) cross the boundary;
2. pointers cross as **Gray code**, so a pointer sampled while it changes reads
   as either its old or its new value, never as a value in between;
3. each crossing goes through a **two-stage synchronizer**, which gives a
   metastable first stage a whole destination clock period to settle.

On top of the FIFO sits a **delay judgment** unit. It measures how far the read
side trails the write side, as a whole number of storage cells (the integer
delay) plus a fraction of a clock period (the decimal delay, a phase), and on
request sets the read pointer so that the read side trails the write side by a
chosen number of cells.

## Block diagram

```
              write clock domain          |          read clock domain
                                          |
 w_en ──► wptr_ctrl ──waddr──► fifo_mem ──┼──raddr── rptr_ctrl ◄── r_en
 data_in ───────────────────►  (dual-port)│ ──────────────────────► data_out
              │ wgray                     |            │ rgray   ▲ load / load_bin
              ├───────────────────────────┼─► sync_2ff ┤         │
              │              sync_2ff ◄───┼────────────┤         │
              ▼ wgray_next      │wq2_rgray|  rq2_wgray ▼         │
           wfull_flag ◄─────────┘         |        rempty_flag   │
              │                           |            │         │
            full                          |          empty       │
                                          |                      │
 samp_clk[3:0], w_clk ────────────────────┼─► delay_ctrl ────────┘
                                          |   (decimal_delay + integer_delay)
                                          |   ──► phase_adj, cal_done, cal_ok ...
```

## Pointers

Both pointers are binary counters one bit wider than the RAM address
(`ADDR_W+1` bits for `2^ADDR_W` words). The low `ADDR_W` bits address the RAM;
the extra top bit counts laps, which is what tells a full FIFO (write pointer
one lap ahead) from an empty one (pointers equal). The write pointer advances on
a write clock edge when `w_en` is high and `full` is low; the read pointer on a
read clock edge when `r_en` is high and `empty` is low. A write while full and a
read while empty are simply ignored.

Each controller keeps, next to its binary count, a registered Gray copy
(`gray = bin ^ (bin >> 1)`, module `gray_conv`) that is what the other domain
sees, and exposes the Gray value of the *next* pointer to its flag logic.

## Full and empty

Both flags are judged on Gray codes directly, without converting back to
binary:

* **empty** (read domain, `rempty_flag`): the next read pointer equals the write
  pointer seen through the synchronizer, in every bit.
* **full** (write domain, `wfull_flag`): the next write pointer and the
  synchronized read pointer differ in their **two top bits** and agree in all
  others. In `ADDR_W+1`-bit Gray code this is exactly "one lap apart": the top
  bit differs because of the lap, and the second bit differs because Gray code
  mirrors the lower half when the top bit flips.

Both flags are registered and computed from the next pointer, so `full` rises on
the same edge that stores the last free word and `empty` on the edge that reads
the last word. Because the other side's pointer arrives two of this side's
clocks late, each flag is *pessimistic*: `full` may stay up briefly after a read
frees a cell and `empty` may stay up briefly after a write. Neither can ever be
wrongly low, so no word is overwritten or read twice.

## Two-stage synchronizers

`sync_2ff` is two flip-flops in the destination clock. One instance takes the
write Gray pointer into the read domain, one takes the read Gray pointer into
the write domain. A third stage would lower the metastability risk further, but
at more latency and area than it is worth at typical clock rates; two stages are
the design's choice.

## Delay measurement and correction

This is the least conventional part of the design. Several chips running in
parallel see the same data at slightly different times because of clock skew.
The FIFO can absorb such a skew if the distance between its write and read
pointers is set on purpose. That distance is split in two:

* **Integer delay**: the number of cells between the write pointer and the read
  pointer, `wptr - rptr`.
* **Decimal delay**: the phase of the write clock against the read clock, a
  fraction of a period.

### Measuring the phase (`decimal_delay`)

Four sampling clocks `samp_clk[3:0]` run at the clock frequency, each shifted
by a quarter period from the one before; `samp_clk[0]` is the reference, taken
to be in phase with the read clock. Each sampling clock latches the level of
`w_clk`. With a 50 % duty cycle the four samples form a rotated run of ones, for
example `1001` (bit 3 down to bit 0). The position `i` where the pattern rises,
sample `i` high and sample `i-1` low (indices modulo 4), says that the write
clock's rising edge falls between sampling phases `i-1` and `i`. That position
is `phase_meas`, in quarter periods.

The samples are brought into the read clock domain through a two-stage
synchronizer. `phase_valid` is high only when the pattern has exactly one rising
position and has not changed since the previous read clock, so a stopped or
wandering write clock gives no measurement.

Given a wanted phase `target_phase`, the block outputs the step
`phase_adj = (target_phase - phase_meas) mod 4` that would move the write clock
edge there. When that step wraps past a whole period (`target_phase <
phase_meas`) it raises `carry`: the phase shift alone would move the read side a
full clock, so the integer delay has to make up one cell. The phase shift itself
is made by clock circuitry outside this design, which receives `phase_adj` with
a one-cycle `phase_adj_valid` strobe.

### Setting the pointer distance (`integer_delay`)

In the read domain, the synchronized write pointer is converted from Gray back
to binary (each binary bit is the XOR of the Gray bits at and above it), and
`int_delay_meas = wptr - rptr` is registered every read clock. On request it
computes a new read pointer

```
new rptr = wptr - target_int            (no carry)
new rptr = wptr - target_int + 1        (carry from the phase step)
```

and reloads the read controller with it. Afterwards it checks that the pointer
difference equals `target_int - carry` (`delay_ok`).

### Sequencing (`delay_ctrl`)

The decimal part is always corrected first, since its carry changes the integer
correction. A one-cycle pulse on `cal_start` runs:

| state  | read clocks | action |
|--------|-------------|--------|
| MEAS   | 1 or more   | wait for `phase_valid`; after `MEAS_TIMEOUT` (16) cycles give up: `cal_done` with `cal_ok` low, nothing changed |
| DEC    | 1           | latch `phase_adj` and carry, strobe `phase_adj_valid` |
| INT    | 1           | request the reload |
| LOAD   | 1           | read pointer takes the new value (no read in this cycle) |
| SETTLE | 1           | pointer difference re-measured |
| CHECK  | 1           | `cal_done` pulses, `cal_ok = delay_ok` |

With a stable phase, `cal_done` comes 6 read clocks after the edge that samples
`cal_start`. `cal_busy` is high in between.

A reload typically changes several bits of the read Gray pointer at once, which
breaks the one-bit rule the synchronizers rely on. Run a correction while the
write side is quiet (no writes from a few write clocks before `cal_start` until
`cal_done`), and expect the write side's `full` flag to settle a few write
clocks after the reload. After a correction the FIFO holds the last
`target_int - carry` words written; older words are dropped.

## Interface

| port | dir | width | domain | meaning |
|------|-----|-------|--------|---------|
| `rst_n` | in | 1 | both | asynchronous active-low reset; release it synchronously to both clocks |
| `w_clk`, `w_en`, `data_in` | in | 1, 1, 16 | write | a word is stored on a rising `w_clk` edge when `w_en` is high and `full` low |
| `full` | out | 1 | write | no free cell |
| `r_clk`, `r_en` | in | 1, 1 | read | a word is read on a rising `r_clk` edge when `r_en` is high and `empty` low |
| `data_out` | out | 16 | read | registered: holds the last word read; 0 after reset |
| `empty` | out | 1 | read | nothing to read; high after reset |
| `samp_clk` | in | 4 | — | sampling clocks for the phase measurement |
| `cal_start`, `target_phase`, `target_int` | in | 1, 2, 5 | read | start a correction to the given phase (quarter periods) and cell distance |
| `phase_meas`, `phase_valid` | out | 2, 1 | read | current phase measurement |
| `int_delay_meas` | out | 5 | read | current pointer difference in cells |
| `phase_adj`, `phase_adj_valid`, `phase_carry` | out | 2, 1, 1 | read | phase step for the external clock shifter |
| `cal_busy`, `cal_done`, `cal_ok` | out | 1 | read | correction status |

Latencies: a word written into an empty FIFO makes `empty` fall on the second
or third read clock edge after the write; a word read from a full FIFO makes
`full` fall on the second or third write clock edge after the read.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W` | 16 | word width |
| `ADDR_W` | 4 | log2 of the depth (16 words) |
| `N` | 4 | number of sampling clocks / phase steps per period |
| `PW` | 2 | width of phase values, `clog2(N)` |

The defaults live in `rtl/fifo_pkg.sv`. `ADDR_W` must be at least 2. The
delay-measurement logic is written for any `N`, but its sampling-clock scheme
assumes the sampling clocks are evenly spread over one period.

## What is given and what is chosen

The overall structure follows the design as described: dual-port RAM, write
and read controllers, Gray pointers, two-stage synchronizers in both
directions, the full rule on the two top Gray bits and the empty rule on full
equality, and a delay unit that measures a decimal phase with four sampling
clocks, then sets the read pointer to write pointer minus integer delay, plus
one when the phase step carries, and verifies the result.

This implementation chose, where the description is silent:

* the depth (16 words); the 16-bit width matches the design's own simulations;
* a registered read port that holds its value, reset to 0;
* one asynchronous active-low reset for both domains, `empty` set and `full`
  clear after reset;
* flags computed from the next pointer and registered;
* the quarter-period spacing of the sampling clocks, `samp_clk[0]` as the
  reference phase, the rising-position rule for the phase estimate, the
  stability test, and the wrap rule for the carry;
* a correction that runs on request (`cal_start`) rather than continuously,
  its state sequence, timeout and status handshake, and the form of the check.

Not included: the circuit that actually shifts or divides the clocks (its
control signals are ports), and any clock generator.

## Files

| file | content |
|------|---------|
| `rtl/fifo_pkg.sv` | default sizes, correction state type |
| `rtl/async_fifo.sv` | top: wiring, protocol assertions |
| `rtl/fifo_mem.sv` | dual-port RAM |
| `rtl/wptr_ctrl.sv`, `rtl/rptr_ctrl.sv` | write and read pointers |
| `rtl/gray_conv.sv` | binary to Gray |
| `rtl/sync_2ff.sv` | two-stage synchronizer |
| `rtl/wfull_flag.sv`, `rtl/rempty_flag.sv` | full and empty flags |
| `rtl/decimal_delay.sv`, `rtl/integer_delay.sv`, `rtl/delay_ctrl.sv` | delay judgment |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

The top carries four assertions: Gray pointers change in at most one bit per
clock (except right after a reload), no write is accepted while full, and no
read while empty.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb rtl/fifo_pkg.sv tb/async_fifo_tb.sv \
  --top-module async_fifo_tb -o sim
./obj_dir/sim
```

Replace `async_fifo_tb` by any other `<module>_tb` to test one block.
`async_fifo_tb` runs the top at its default parameters and exercises filling to
full with writes continuing (dropped), draining to empty with reads continuing
(ignored), 3000 cycles of random traffic on both sides with a scoreboard (the
pointers wrap many times), and two delay corrections on a FIFO holding 12 words,
one whose phase step carries and one that does not, checking that exactly the
expected words remain. The testbench contains an ideal model of the external
phase shifter, which delays its write clock by `phase_adj` quarter periods on
each strobe; after each correction the measured phase must equal the target. It counts each of these events and fails if one never
happened. The block testbenches check each module against a reference computed
in the testbench: exhaustive Gray codes, two-cycle synchronizer latency, every
pointer and flag over random stimulus, phase measurement over a sweep of write
clock offsets, and the correction latency of 6 read clocks.

## Limits

* The synchronizers and the phase sampler are only modeled logically here; their
  metastability behaviour depends on the target technology, and a real
  implementation should place each synchronizer's two flip-flops close together
  and constrain the crossing paths.
* The correction assumes a quiet write side, as described above.
* The phase resolution is a quarter period; the estimate places the write clock
  edge between two sampling phases, not at a point.
