# Self-timed quasi-random number generator

A linear-feedback shift register (LFSR) is cheap and fast, but its output is fully predictable:
you know the seed and the step count, you know the value. This design keeps the LFSR and takes
away its clock. The 128-bit state moves around a small ring of latch stages that hand it on with
local request/acknowledge handshakes. The time one step takes is set by delay lines and latches,
so it moves with process, voltage and temperature (PVT). The user freezes the ring whenever they
want a number. Which LFSR state is on the bus at that moment depends on how many steps this
particular chip has made since reset, and that count drifts from chip to chip and from minute
to minute. The sequence of states is still an LFSR sequence. Where you land in it is
uncertain. That middle ground between a pseudo-random and a true random generator is what
"quasi-random" means here.

Two copies with the same seed, one taking 13.89 ns per step and the other 13.33 ns, drift apart
by one step about every 13.89 × 13.33 / 0.56 ≈ 330 ns. `tb/tb_board_divergence.sv` simulates
exactly this case.

## The LFSR

Fibonacci form, 128 bits, characteristic polynomial x^128 + x^126 + x^101 + x^99 + 1 (a
maximum-length tap set, period 2^128 − 1). One step shifts the state left by one. Bit 0 becomes
`s[127] ^ s[125] ^ s[100] ^ s[98]`. All-zero is the locked state, so the seed must be non-zero.

## The ring

```
            +-------------------------- ~done4 (request) -------------------------+
            |                                                                     |
   seed --> [stage 1] --> XOR(A,B) --> [stage 2] --> ^C --> [stage 3] --> ^D --> [stage 4]
   rnd  <--     ^                                                                 |
                +----------- {state[126:0], feedback} (shift, plain wiring) ------+
```

There are four Mousetrap stages (`rtl/mousetrap_stage.sv`). The LFSR's XOR is split over them:

| stage | latch holds                    | logic in front of the latch                     |
|-------|--------------------------------|-------------------------------------------------|
| 1     | state (128 bits)               | none: state is stage 4's word shifted, feedback into bit 0 |
| 2     | state + partial bit (129 bits) | `p = s[127] ^ s[125]`                            |
| 3     | state + partial bit            | `p = p ^ s[100]`                                 |
| 4     | state + partial bit            | `p = p ^ s[98]` (finished feedback bit)          |

Putting one 2-input XOR in each stage, rather than all three in one stage, lets every request
delay line do useful work: each stage needs a minimum delay anyway, and here that delay also
covers real logic.

One trip around the ring is one LFSR step. With zero-delay logic a trip takes exactly
4 × REQ_CELLS × CELL_DELAY. At the defaults that is 72 × 0.185 ns = 13.32 ns: one 128-bit value
per trip, about 75 MHz or 9.6 Gbit/s.

### How a Mousetrap stage works

Each stage has a data latch and a controller (`rtl/mousetrap_ctrl.sv`). The controller is a
one-bit *done* latch plus an XNOR gate. Signalling is two-phase: each token is one transition of
`done`, not a pulse.

* The XNOR compares the stage's `done` with the next stage's `done`, which acts as the
  acknowledge. While they are equal the stage is empty and both of its latches are transparent.
* A request is a transition of the previous stage's `done`. It first passes the *request delay
  line* (`REQ_CELLS` cells, the "big delta"), which is long enough for the data in front of
  the latch to settle. That is the bundled-data timing assumption. The transition then enters
  the done latch. The two done bits now differ, so the XNOR closes the latches on the data.
* The stage opens again only once the next stage has taken the token and its `done` has
  followed. That acknowledge first passes a short *acknowledge delay line* (`ACK_CELLS`, the
  "little delta"). This line guards against hold-time violations on the latch.

### One token, not two

In a ring of two-phase stages, the done bits differ across an even number of stage boundaries
unless one link inverts. An even number would mean two tokens, and so two interleaved LFSR
sequences. For that reason the wrap-around link is inverted in both directions: stage 1's
request is `~done4`, and stage 4's acknowledge is `~done1`. The ring then always holds exactly
one token, and at least one latch is always closed, so the data path never forms a transparent
loop. `qrng_top` asserts this invariant.

As the token moves on, the stages behind it become transparent. The next state is therefore
computed through them right away. Stage 1's latch drives the output bus `rnd`. That latch always
shows a complete LFSR state: the current state while it is closed, and the next one (already
computed through the open stages) while it is open. `rnd` changes once per trip and never shows
a partial value.

### Reset

`rst` is active high and asynchronous. It loads `seed` into stage 1 with `done1 = 1`, so that
stage is closed and the seed is the token. During reset the latches of stages 2–4 are held
transparent with `done = 0`, so the seed and its partial XORs already stand in them when reset
falls. (If those stages were cleared instead, stage 2 would have to capture and close in the
same instant at release. That is a race, and with varying delays the close can win.) Hold
`rst` longer than one request delay line (about 3.3 ns) so that the delay-line nets settle.
After release, stage 2 takes the seed at once. Stage 1 latches the first successor
3 × REQ_CELLS × CELL_DELAY later.

## Reading a value: hold

A level-sensitive latch (`rtl/ack_hold_latch.sv`) sits in every acknowledge path, after the
acknowledge delay line. It is transparent while `hold` is low. To read:

1. Raise `hold`. Every acknowledge freezes. A stage that has passed its token on can no longer
   reopen. The token travels at most once more around the ring and stops.
2. Wait at least one trip time (4 × REQ_CELLS × CELL_DELAY, 13.3 ns at the defaults).
3. Read `rnd`. It is stable for as long as `hold` stays high.
4. Lower `hold`. The ring resumes from where it stopped, and no LFSR state is skipped.

It works much like clock stretching, and the reading logic can be an ordinary synchronous
circuit. `ack_probe` brings out stage 2's `done` bit (the acknowledge to stage 1). It toggles once
per trip, so an oscilloscope can measure the cycle time and how it drifts.

## Delay lines

`rtl/delay_line.sv` is a chain of `CELLS` instances of `rtl/delay_cell.sv`. Each net carries a
`keep` attribute. `delay_cell` is a **behavioural model** of one buffer: `assign #(DELAY)`. It
exists so the self-timed ring can be simulated, and it follows a unit-delay style in which every
cell adds a fixed delay. In silicon it would be a library buffer, or an FPGA LUT used as a
buffer, kept by don't-touch constraints. Generic synthesis reduces the line to a wire.
`CELLS = 0` is allowed and gives a wire, for an FPGA build without acknowledge lines.

`JITTER` (default 0) turns on a simple model of dynamic delay variation, for example from
supply noise or temperature. Each transition through a cell then takes `DELAY` plus a value drawn
uniformly from ±`JITTER`. This is how the simulation shows the uncertainty range. With fixed
delays, reading a fixed time after reset always gives the same state, just like an ordinary
PRNG. With ±0.09 ns of jitter per cell, 30 reads taken 10 µs after reset land 749 to 753 steps
into the sequence (`tb/tb_qrng_uncertainty.sv`). Real variation is slower and more correlated
than this, and its size depends on the silicon, so treat the numbers as an illustration only.

The defaults are 18 request cells and 6 acknowledge cells per stage, which is 72 and 24 for the
whole ring. The cell delay of 0.185 ns is this design's choice. It makes one trip 13.32 ns,
close to the cycle time measured on the faster of the two FPGA prototypes.

## Parameters (`qrng_top`)

| parameter  | default  | meaning |
|------------|----------|---------|
| `W`        | 128      | LFSR length |
| `TA`..`TD` | 128, 126, 101, 99 | polynomial exponents (1-based bit positions of the taps) |
| `REQ_N`    | 18       | request delay cells per stage |
| `ACK_N`    | 6        | acknowledge delay cells per stage |
| `CELL_DLY` | 0.185 ns | delay of one delay cell |
| `CELL_JIT` | 0 ns     | per-transition delay variation of every cell (simulation only) |

Defaults live in `rtl/qrng_pkg.sv`. The package also has `lfsr_next()` and a default seed for
the testbenches.

## Resources

Latch storage: 128 + 3 × 129 data bits, 4 done bits and 4 hold latches, 523 bits in all. A
published Spartan-3 prototype of the same structure reports 552 slice registers. Logic: three
XOR2 gates, four XNOR2 gates, two inverters, and 96 delay buffers (72 request plus 24
acknowledge), which is the same buffer count as a published 180 nm implementation.

## Where this design makes its own choices

These points are not pinned down by the description the design follows, and are chosen here:

* **Two-phase handshake.** The stages are read as two-phase, since the XNOR of two done bits only
  works that way. A "4-phase" description of the same template was not followed.
* **Inverted wrap-around** in the ring, so that it holds one token (see above).
* **Reset values.** Stage 1 is closed on the seed, and stages 2–4 are held open. A ring with
  one token cannot have every latch open at once, and stages 2–4 are not cleared to zero.
* **Output bus from stage 1**, the seed as an **input port**, and the **cell delay** value.
* **Request delay placement.** The request delay sits on the receiving stage's input. The hold
  latch sits after the acknowledge delay line.
* **Per-stage delay-line lengths.** The 72 request and 24 acknowledge cells are spread evenly
  over the four stages.
* **Idealised latches.** The simulation models no latch propagation, setup or hold time. A trip
  is exactly four request delays. A real ring also adds each latch's delay, and the
  acknowledge lines exist only because of real hold times.
* **Variation model.** Static (process) variation is represented by giving an instance a
  different `CELL_DLY`. Dynamic variation is represented by the optional uniform jitter
  `CELL_JIT`. Neither is calibrated to real silicon.
* **Not built:** the alternative form with all the XOR logic in one stage, and the board-level
  wiring of the prototype (switch, seven-segment displays).

## Lint and synthesis notes

The design is latch-based and self-timed, with no clock. Lint tools report its latches and the
combinational loops through them (`done → XNOR → en → done`, and the ring itself) as circular
logic. These loops are the circuit. Each one is broken by a closed latch or a delay line, and
each settles in simulation within a delta cycle. For synthesis and timing, the delay lines
must be kept and constrained against the datapath they guard. A generic flow that sees
`delay_cell` as a wire does not preserve them.

## Simulating

Every testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`. The
testbenches use `--timing` for the delays. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/qrng_pkg.sv rtl/*.sv tb/tb_qrng_top.sv --top-module tb_qrng_top
./obj_dir/Vtb_qrng_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_qrng_top` | Full-size ring at the defaults. Every `rnd` change is checked against a reference LFSR. Also checks the trip time on `done1` and `ack_probe`, the first capture after reset, 60 hold/read/release cycles at random moments (bus constant, no handshake activity while held, no skipped state), and a re-seed. |
| `tb_board_divergence` | Two rings at 13.89 ns and 13.33 ns per trip. Checks the drift of one step every ~330.6 ns, that simultaneous reads give the same sequence offset by the drift, and the 9.6 Gbit/s rate of the faster one. |
| `tb_qrng_uncertainty` | A fixed-delay ring and a jittered ring, each reset and read 30 times, 10 µs after reset. The fixed ring always gives the same step count. The jittered one spreads over several counts, centred on the nominal one. |
| `tb_mousetrap_stage` | One stage: capture after the request delay, data held, a waiting token taken after the acknowledge delay, hold keeping the stage closed. |
| `tb_mousetrap_ctrl` | Controller against a reference model over random request/acknowledge sequences. |
| `tb_ack_hold_latch`, `tb_delay_line`, `tb_delay_cell` | Transparency and freezing; exact line delay and pulse shape; cell delay. |

All testbenches finish in under a second of run time, except `tb_qrng_uncertainty`, which
takes about 20 seconds.
