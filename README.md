# Pulsed-latch shift register and Johnson counter

A shift register is a chain of storage cells with nothing between them, so
the size and power of each cell is all that counts. A master-slave flip-flop
is two latches; a *pulsed latch* (one latch opened by a short clock pulse) is
about half of that. The catch is timing: if every latch in a chain opens on
the same pulse, a latch's input is the output of the latch before it, which
is changing during that same pulse, and the data races through several
stages at once.

This design removes the race without delay elements in the data path. The
latches are opened one after another by **non-overlapping, delayed pulses,
last latch first**. When a latch opens, the latch that feeds it is still
closed and holds last cycle's value. To avoid needing one pulse per bit, the
register is cut into **4-bit sub shift registers** that all share the same
five pulses, and a fifth, **temporary latch** in each sub register carries
the outgoing bit across to the next one.

The same parts make a **4-bit Johnson (twisted-ring) counter**.

The RTL is SystemVerilog. The latches are written as `always_latch`
processes. The pulse generator is an analog delay chain, so it is a
behavioural model with transport delays. Simulate with Verilator and
`--timing`.

## The pulse order inside a sub shift register

Each sub shift register holds data latches Q1..Q4 and a temporary latch T.
Every rising edge of the source clock starts a train of five pulses, each
100 ps wide with a 50 ps gap between them:

```
clk      __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____
pulse T  __/‾‾\_____________________________________________________   0 ps   T  <= Q4
pulse 4  _______/‾‾\________________________________________________ 150 ps   Q4 <= Q3
pulse 3  ____________/‾‾\___________________________________________ 300 ps   Q3 <= Q2
pulse 2  _________________/‾‾\______________________________________ 450 ps   Q2 <= Q1
pulse 1  ______________________/‾‾\_________________________________ 600 ps   Q1 <= input
                                  ^ train over at 700 ps
```

Because the pulses run against the data flow, each latch samples an input
that is standing still. T first saves Q4. Then Q4 can be overwritten. The
next sub register's Q1 (global Q5) takes its input from T with the last
pulse, by which time T has long been stable. All sub registers receive the
same five pulses, so a 16-bit register needs five pulses, not seventeen.

Two timing rules follow for anyone driving the design:

* **The source clock must stay high for the whole train.** With the default
  delays that is 700 ps. An assertion in the generator reports a clock that
  falls too early.
* **The serial input must be stable from the rising edge until the train
  ends.** The input is sampled by the last pulse, about 600–700 ps after the
  edge. Changing it on the falling clock edge is safe.

The outputs have settled once the train has ended. Read them after that, for
example at the falling edge.

## Latch cell (`pulsed_latch`)

The cell is the static differential sense-amplifier latch with a shared
pulse. In silicon it is seven transistors:

* One NMOS, gated by the pulse, is the tail transistor.
* Two NMOS, gated by D and Db, pull Qb or Q low.
* A cross-coupled inverter pair holds the value.

Its data inputs are differential. In a chain, each latch's D/Db come straight
from the previous latch's Q/Qb, so no inverter is needed per bit. The first
latch of the register gets Db from a single inverter on the serial input.

At the logic level it is a latch that is transparent while `pulse` is high.
The model adds two things:

* **Equal D and Db:** when D and Db are equal (not a valid differential
  input), the latch keeps its value.
* **Clear:** an asynchronous active-high `clr` forces Q to 0. The counter
  needs a cleared start state.

## Delayed pulsed clock generator (`clock_pulse_stage`, `delayed_pulse_clock_gen`)

The generator is a cascade of identical stages. Each stage holds:

* a short delay line and an inverter;
* an AND gate, which combines the stage's clock with the delayed, inverted
  copy to make a pulse at each rising edge;
* a longer delay line with a buffer, which passes the clock to the next
  stage.

Each sharp pulse comes from an AND of two delayed signals. So a pulse can be
narrower than the summed rise and fall times of the delay chain.

Both modules are **behavioural models**. They use transport delays (`<= #d`),
are meant for simulation, and do not synthesise. A synthesis flow would need
real delay cells here.

| parameter        | default | meaning                                 |
|------------------|---------|-----------------------------------------|
| `NUM_PULSES`     | 5       | stages, so pulses per clock edge        |
| `PULSE_WIDTH_PS` | 100     | pulse width (latch transparency window) |
| `STAGE_DELAY_PS` | 150     | delay from one pulse to the next        |

`pulse[0]` fires first. The shift register wires it to the temporary latches,
and `pulse[SUB_WIDTH-j]` to data latch `Q(j+1)`. The defaults live in
`pulsed_latch_pkg`.

## Shift register (`pulsed_latch_shift_register`)

The shift register is serial-in and parallel-out. It contains
`WIDTH/SUB_WIDTH` sub shift registers (`sub_shift_register`) and one
generator.

| port   | dir | width   | meaning                                       |
|--------|-----|---------|-----------------------------------------------|
| `clk`  | in  | 1       | source clock; one shift per rising edge       |
| `clr`  | in  | 1       | asynchronous clear                            |
| `sin`  | in  | 1       | serial input                                  |
| `q`    | out | `WIDTH` | parallel outputs; `q[0]` = Q1, the newest bit |
| `sout` | out | 1       | serial output, `q[WIDTH-1]`                   |

* Default `WIDTH` = 16; `SUB_WIDTH` = 4.
* `WIDTH` must be a multiple of `SUB_WIDTH`.
* A bit taken in at one rising edge appears on `sout` WIDTH−1 edges later;
  that edge is the WIDTH-th counting the first.
* The temporary latch of the last sub register is kept, so every sub register
  is identical, but nothing reads it.

## Johnson counter (`pulsed_latch_johnson_counter`)

A Johnson counter feeds the inverted last stage back to the first stage.
From the cleared state it walks through 2·BITS states. For 4 bits, writing
Q1 first:

```
0000 → 1000 → 1100 → 1110 → 1111 → 0111 → 0011 → 0001 → 0000 …
```

Here it is one sub shift register with its own generator. Q1 takes the
complement of the temporary latch T, which is free because the latches are
differential (T's Qb/Q drive Q1's D/Db). T still holds the old Q4 when Q1 is
written.

Ports: `clk`, `clr` (asynchronous, to 0000), and `q[BITS-1:0]`, with `q[0]`
= Q1.

A counter of four latches sharing one pulse would race like the naive shift
register, so this counter has a fifth (temporary) latch and five delayed
pulses. The Verilator linter reports the latch ring as circular logic
(UNOPTFLAT). The loop is the counter itself, and no two pulses are ever high
together.

## Top level (`pulsed_latch_top`)

The top places the shift register (`SR_WIDTH` = 16) and the counter
(`CNT_BITS` = 4) side by side:

* The shift register has its own clock, `sr_clk`, and ports `sr_in`, `sr_q`
  and `sr_out`.
* The counter has its own clock, `cnt_clk`, and output `cnt_q`.
* The two share only `clr`.

All ports are plain signals.

## Files

```
rtl/pulsed_latch_pkg.sv              shared timing constants, pulse-train length function
rtl/pulsed_latch.sv                  latch cell
rtl/clock_pulse_stage.sv             one generator stage (behavioural)
rtl/delayed_pulse_clock_gen.sv       cascaded generator (behavioural)
rtl/sub_shift_register.sv            4 data latches + temporary latch
rtl/pulsed_latch_shift_register.sv   N-bit register: sub registers + shared generator
rtl/pulsed_latch_johnson_counter.sv  Johnson counter from the same parts
rtl/pulsed_latch_top.sv              both designs side by side
tb/tb_<module>.sv                    one self-checking testbench per module
```

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Example, for the end-to-end test at default
sizes:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/pulsed_latch_pkg.sv tb/tb_pulsed_latch_top.sv \
    --top-module tb_pulsed_latch_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_*.sv` and its module name. The simulations take well
under a second.

What the testbenches check:

* **`tb_pulsed_latch`:** transparency, hold, equal-input hold, clear, and 200
  random steps against a reference.
* **`tb_clock_pulse_stage`, `tb_delayed_pulse_clock_gen`:**
  * pulse start times and widths, measured in picoseconds;
  * that pulses never overlap;
  * one pulse per clock edge per output.
* **`tb_sub_shift_register`:** the testbench drives the five pulses itself.
  It checks a single-one walk into T and a random stream against a 5-bit
  reference.
* **`tb_pulsed_latch_shift_register`:** the 16-bit default. It checks
  latency to `sout` (16 edges, counting the first), a random stream, an
  alternating stream and the clear.
* **`tb_pulsed_latch_johnson_counter`:** five full periods of the 8-state
  sequence, and a clear mid-count.
* **`tb_pulsed_latch_top`:** both designs on unrelated clocks (2 ns and
  3 ns), each against its own reference. It counts these mechanisms and
  requires each at least once: shifts, bits crossing a sub-register boundary
  through a temporary latch, ones reaching the serial output, the counter's
  inverting feedback, counter wrap-arounds and mid-run clears.

If the pulses reach the latches in chain order (Q1 first) instead of reverse
order, the race described at the top appears: a single one floods four
latches in one cycle. The shift-register testbench catches this.

## How far to trust it, and where it departs from the underlying design

* **Functional model of a circuit-level design.** The real design is a
  transistor circuit; its benefits are area and power (about 4.9 µW for one
  latch cell, 0.83 mW for a shift register, 0.27 mW for the 4-bit counter, in
  the source technology). None of that is captured here. The RTL captures
  the logic: the pulse order, the temporary latches and the shared
  generator.
* **Delay values are this design's own choice.** The pulse width (100 ps),
  the stage delay (150 ps) and the resulting 700 ps train are not from the
  source. They only need stage delay > pulse width, with the clock high
  longer than the train.
* **Shift register length.** The architecture allows any number of 4-bit sub
  registers; 16 bits is this design's default. Set `WIDTH` (or `SR_WIDTH` on
  the top) to any multiple of 4.
* **Counter structure.** The counter's description calls for four latches on
  one common clock. This implementation uses four latches plus a temporary
  latch and the delayed pulses, because four latches on one pulse race.
  Behaviour at the ports is the same Johnson sequence, one step per clock
  edge.
* **Added clear.** The asynchronous clear on every latch is an addition. The
  original cell has no reset. The counter description asks for a cleared
  start state, and a two-state simulator needs a known state.
* **Equal D/Db.** Holding when D and Db are equal is a modelling choice. In
  this design that input never occurs.
* **Synthesis.** Synthesis sees only the latches and the wiring. The
  generator must be replaced by real delay cells, and a static timing flow
  must be told about the pulsed clocks. With the behavioural generator
  removed, a synthesis tool sees constant pulses and optimises the latches
  away.
