# Pulsed-latch shift registers, ring counter and LFSR

This RTL builds three small sequential circuits (a bidirectional shift register, a ring counter and an LFSR) with no edge-triggered flip-flops in their datapath. Every stored bit sits in a single level-sensitive latch that opens for a short pulse. A pulsed latch needs about half the storage of a master-slave flip-flop. The cost is a race. While a latch is open it is transparent, so if a latch and the latch that feeds it are open together, one bit can run through both stages in a single step.

The designs avoid the race with one rule. **In each step the latches are opened one at a time, downstream end first.** Each latch therefore copies its neighbour before that neighbour changes. Where a chain closes on itself (the ring and the LFSR feedback), or takes in a serial input, an extra *temporary latch* is opened first. It holds the value that the last latch of the step will need.

The circuits follow the applications described by J. C. Nidagundi and V. Yandigeri in "Applications of Pulsed Latches and Bidirectional Pulsed Latches". The description sets the structure and sizes: a 4-bit register of bidirectional pulsed latches (BD-PLs) with temporary BD-PLs at both ends, an 8-latch ring counter and a 5-latch LFSR with feedback from latches 4 and 5. It also sets the idea of clocking with delayed, non-overlapping pulses. Everything the description leaves open is a choice made here. These choices are listed under "Departures and choices" below.

## The pulse train: how one step is timed

All three circuits run from one fast reference clock `clk`. A step is one *period* of `W+1` reference cycles, where `W` is the number of data latches. In each cycle of the period exactly one pulse is high:

| cycle of period | 0 | 1 | 2 | ... | W |
|---|---|---|---|---|---|
| pulse | T (temporary latch) | 1st data latch | 2nd | ... | W-th |

`delayed_pulse_gen` makes these pulses as a one-hot token shifted through `W+1` flip-flops. Each pulse is therefore a flip-flop output, one reference cycle wide, and cannot glitch. Two pulses are never high together (an assertion checks this). In the timing terms of the description, pulse width `TCP` and pulse spacing `TDELAY` are both one reference cycle. The period is `TCP + W*TDELAY`. For the 8-bit ring counter that is 9 cycles.

While `en` is high, periods follow each other back to back. When `en` falls, the current period finishes and everything holds. `done` is a one-cycle strobe in the cycle after the last pulse of a period. While `done` is high, and whenever the generator is idle, the outputs are settled. Inside a period they change one bit at a time, so sample them only with `done` or when idle.

Which data latch each pulse drives is what makes a circuit race-free:

| circuit | cycle 0 (T) | cycles 1..W |
|---|---|---|
| `bdsr`, right shift | left temporary BD-PL samples `din` | BD-PL W, W-1, ..., 1 (the last takes the temporary) |
| `bdsr`, left shift | right temporary BD-PL samples `din` | BD-PL 1, 2, ..., W (the last takes the temporary) |
| `ring_counter` | temporary latch takes latch W | latch W, W-1, ..., 1 (latch 1 takes the temporary) |
| `lfsr` | temporary latch takes `^(q & TAPS)` | latch W, W-1, ..., 1 (latch 1 takes the temporary) |

Latches are numbered from 1. In the RTL, latch `k` is bit `k-1` of `q`.

## Bidirectional pulsed latch and the storage register

A BD-PL (`bd_pl`) is one latch with two pulse-selected inputs:
- during a `clk_r` pulse it takes `dr`, the bit arriving from its left neighbour;
- during a `clk_l` pulse it takes `dl`, the bit arriving from its right neighbour.

The stored bit leaves on both `qr` (to the right neighbour) and `ql` (to the left neighbour). One BD-PL thus does the job of a 2:1 multiplexer plus a master-slave flip-flop.

`bdsr` chains `WIDTH` BD-PLs (default 4), with one temporary BD-PL at each end. The serial input `din` feeds both temporaries. `bd_pulse_gen` is the bidirectional delayed pulsed clock generator. It samples `right` once, on the edge that starts a period, and then drives only the `CLK_pulse_R<...>` lines or only the `CLK_pulse_L<...>` lines. The steered pulses are registered, so a change of direction cannot produce a stray pulse on the other set of lines.

Behaviour per completed step:
- `right = 1`: `q <= {q[W-2:0], din}`
- `right = 0`: `q <= {din, q[W-1:1]}`

Timing:
- `right` must be valid on the edge that starts the period.
- `din` must be stable during the first cycle of the period, while pulse T is high.
- With `en` held high, one shift completes every `WIDTH+1` cycles.

## Ring counter: why there is a ninth latch

A ring of latches cannot rotate its contents if each latch is opened only once per step and no extra storage is used. Whatever the order, the first latch to be overwritten loses a value that another latch still had to copy. In the one-hot counter, the token would vanish as it wraps from latch 8 to latch 1. `ring_counter` therefore adds one temporary latch. It copies latch 8 at pulse T, before latch 8 changes. Latch 1 takes its value at the end of the period. This is the same remedy the BD-PL register uses at its ends, and it fills the spare slot in the `TCP + 8*TDELAY` period. The counter rotates any pattern correctly, not only a single token. Reset loads `INIT` (default `8'b0000_0001`).

## LFSR: feedback and sequence length

`lfsr` is five pulsed latches in a chain. Latch 1 takes the XOR of latches 4 and 5 (`TAPS = 5'b11000`). A temporary latch captures the XOR from the old state at pulse T. Each step is then exactly that of a flip-flop Fibonacci LFSR: `q <= {q[3:0], q[3]^q[4]}`.

These taps give the recurrence `s(n+5) = s(n+1) + s(n)`. Its polynomial, `x^5 + x + 1`, factors as `(x^2+x+1)(x^3+x^2+1)`, so the sequence is **not** maximal length. From the default seed `00001` it repeats every 21 steps, not 31. The taps are kept as described. For a maximal-length 5-bit sequence, set `TAPS` to a primitive pair, for example `5'b10100` (latches 3 and 5).

## Top level

`pulsed_latch_apps_top` places the three circuits side by side. They share only `clk` and `rst_n`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | reference clock; asynchronous active-low reset |
| `bdsr_en`, `bdsr_right`, `bdsr_din` | in | 1 | register enable, direction, serial input |
| `bdsr_q`, `bdsr_done` | out | 4, 1 | register contents (`q[0]` leftmost); step done |
| `ring_en` | in | 1 | ring counter enable |
| `ring_q`, `ring_done` | out | 8, 1 | ring outputs (`q[k-1]` = latch k); step done |
| `lfsr_en` | in | 1 | LFSR enable |
| `lfsr_q`, `lfsr_dout`, `lfsr_done` | out | 5, 1, 1 | LFSR state, serial output (latch 5); step done |

The sizes are parameters (`BDSR_WIDTH`, `RING_WIDTH`, `RING_INIT`, `LFSR_WIDTH`, `LFSR_TAPS`, `LFSR_SEED`). Their defaults are the described 4, 8 and 5 bits.

## Departures and choices

Taken from the description: the BD-PL ports (DR, QR, DL, QL, CLK_R, CLK_L); the 4-bit register with temporary BD-PLs at both ends, a shared serial input IN and a generator with inputs CLK and Right; the pulse names `<T>`, `<1>..<4>`; the 8-latch ring with feedback from the last latch to the first and pulse k driving latch k; the 5-latch LFSR with the XOR of latches 4 and 5 fed back; the period formula `TCP + 8*TDELAY`.

Chosen here:
- **Synchronous pulse generation.** A real pulsed-latch design makes its short pulses with a delay-line pulser. Here each pulse is one cycle of a faster reference clock. This keeps the RTL synthesizable and simulatable, but the pulses are much wider than a real pulser's. Any timing or area benefit of pulsed latches is not reproduced.
- **Firing order.** The description does not give the order in which the pulses fire. The downstream-first order above is what makes the circuits work.
- **Temporary latch in the ring counter and the LFSR.** This adds one latch and one pulse to each, because the closed loop cannot work without it (see above). The description counts 8 and 5 pulses.
- **BD-PL inside.** One storage node with `qr = ql`.
- **Control signals.** The reset values, the `en` inputs, the `done` strobes, sampling `right` once per period, and the bit ordering of `q`.
- **Alternating step generator.** The description names the LFSR as a part of one but does not define it. Only the single LFSR is provided.

## How far it has been checked

Each module has a self-checking testbench in `tb/` that compares the module with an independent model:
- pulse order per cycle;
- single-step latency (`W+1` cycles from the start edge to `done`);
- throughput with `en` held high (one step per `W+1` cycles);
- holding while disabled;
- data against a bit-level model.

The ring counter test also rotates an arbitrary pattern. The LFSR test checks the period of 21.

`pulsed_latch_apps_top_tb` runs all three circuits at their default sizes for about 7,000 cycles, with random enables, inputs and direction changes. It counts right shifts, left shifts, direction changes, back-to-back periods, idle cycles, ring wrap-arounds and complete LFSR periods, and fails if any of them never happens.

Not checked: real-silicon timing (pulse width, hold margins between adjacent pulses), and the FPGA area and run-time numbers reported for the original designs. A simulation of latches in a zero-delay simulator shows the logic is correct, not that a physical pulser would meet hold times.

Lint tools that treat latches as combinational logic report loops through the ring, the LFSR feedback and neighbouring BD-PLs. These are expected: no two latches in a loop are ever open together.

## Simulating

Each file holds one module, named after the file. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb tb/pulsed_latch_apps_top_tb.sv \
          --top-module pulsed_latch_apps_top_tb -Mdir obj_top
./obj_top/Vpulsed_latch_apps_top_tb
```

Replace the testbench name to run any other test, for example `bdsr_tb`, `ring_counter_tb`, `lfsr_tb`, `bd_pulse_gen_tb`, `delayed_pulse_gen_tb`, `bd_pl_tb` or `pulsed_latch_tb`. Each ends by printing `TB_RESULT checks=N failures=M`. Each also has a watchdog that ends a hung run as a failure.

## Files

- `rtl/pulsed_latch.sv`: latch with a pulsed enable.
- `rtl/bd_pl.sv`: bidirectional pulsed latch.
- `rtl/delayed_pulse_gen.sv`: train of non-overlapping delayed pulses.
- `rtl/bd_pulse_gen.sv`: direction-steered pulse train for the BD-PL register.
- `rtl/bdsr.sv`: bidirectional storage register.
- `rtl/ring_counter.sv`, `rtl/lfsr.sv`: the counter and the LFSR.
- `rtl/pulsed_latch_apps_top.sv`: all three side by side.
- `tb/*_tb.sv`: one self-checking testbench per module.
