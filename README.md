# Clock-gated Johnson counter

In an ordinary synchronous Johnson (twisted-ring) counter, every flip-flop in
the chain gets every clock edge. Only one of them changes state per count
step, so the rest of the clock power goes on stages that load the value they
already hold. This design gives each stage its own gated clock. A stage sees a
clock edge only in the step where its value changes, so the clock activity
per step is one stage at every resolution. The default configuration is a
5-bit counter: a ring of 16 stages that steps through 32 thermometer-coded
states at up to a 1 GHz count clock. It was built to be the counter of a
single-slope ADC.

The RTL is written at the level of the gates that form the clocks (OR, NAND,
multiplexer). It describes exactly how the local clocks are made. It is not a
standard "clock enable" counter.

## Files

| file | contents |
|---|---|
| `rtl/jc_dff.sv` | stage flip-flop: rising edge, active-low asynchronous reset, Q and QN |
| `rtl/jc_gated_cell.sv` | one stage: flip-flop plus its two clock-gating paths and the path multiplexer |
| `rtl/gated_johnson_counter.sv` | top: the ring of stages, the feedback and the path select |
| `tb/tb_jc_dff.sv` | flip-flop test |
| `tb/tb_jc_gated_cell.sv` | stage test: gating, glitch freedom, data capture |
| `tb/tb_gated_johnson_counter.sv` | end-to-end test at the default size (16 stages) |
| `tb/tb_counter_resolutions.sv`, `tb/tb_jc_res_check.sv` | sweep over 2, 4, 6, 8 and 10 bits |

## The count sequence

The stages form a chain: stage *i* loads the output of stage *i-1*, and
stage 0 loads the **inverted** output of the last stage. After clear, every
stage holds 0. Ones then march in from stage 0, one stage per clock. When the
last stage fills (the overflow), the inverted feedback turns to 0 and zeroes
march in the same way until the last stage is empty again. With `N` stages
the cycle has `2N` states. That is why `2**(N_BITS-1)` stages give `N_BITS`
bits: 16 stages make 5 bits.

For count `k` (0 to 31 at the default size) the output `j` is:

- `k <= 16`: the lowest `k` bits are 1 and the rest are 0;
- `k > 16`: the lowest `k-16` bits are 0 and the rest are 1.

For example, `j` is `0000000000000111` at `k = 3`, `1111111111111111` at
`k = 16` and `1111111111111000` at `k = 19`. The output stays in this code.
No binary conversion is included.

## How a stage makes its own clock

The stage always knows which way it is about to switch: the half of the
cycle fixes it. While ones are being fed, a stage can only go 0 -> 1, and
only when its input is 1 and it holds 0. While zeroes are being fed, it can
only go 1 -> 0, and only when its input is 0 and it holds 1. Each half gets
its own gating path:

```
 Y (ones half,   ddr_en = 0):  y = NAND(~clk, d, q_n)   -> equals clk only if d=1, q=0
 X (zeroes half, ddr_en = 1):  x = OR  ( clk, d, q_n)   -> equals clk only if d=0, q=1
 gclk = ddr_en ? x : y          (the stage flip-flop is clocked by gclk)
```

`ddr_en` is the output of the last stage. It is 0 during the ones half and 1
during the zeroes half, so it picks the right path for every stage at once.

Why this cannot glitch:

- The NAND path gets the inverted clock, so both paths pass the clock in the
  same polarity.
- While `clk` is high, both `x` and `y` are forced high, whatever the other
  inputs are.
- Every signal the gating looks at (`d`, `q_n`, `ddr_en`) changes just after
  a rising edge of `clk`, while `clk` is still high.

So enables and the path select change only while `gclk` is pinned high. A
gated stage holds `gclk` high for the whole period. An enabled stage sees
`gclk` fall with `clk` and rise with the next rising edge of `clk`. That
rising edge is the one that loads it.

The gating logic looks only at the main clock, the stage's input `d`, and
its own inverted output `q_n`. It needs no global control other than the
clock, the clear and the last stage's output.

## Interface of the top (`gated_johnson_counter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | count clock; one step per rising edge |
| `clear_n` | in | 1 | active-low asynchronous clear of all stages (count = 0) |
| `j` | out | `N_CELLS` | thermometer-coded count, `j[0]` is the first stage |
| `gclk` | out | `N_CELLS` | local clock of every stage, for observation and power estimation |

Parameters:

- `N_BITS` (default 5) sets the resolution.
- `N_CELLS = 2**(N_BITS-1)` is derived from `N_BITS` and cannot be set on
  its own.
- `N_BITS` must be at least 2.

Timing:

- `j` changes right after each rising edge of `clk` while `clear_n` is high.
- Counting starts at the first rising edge after `clear_n` goes high.
- Pulling `clear_n` low clears the stages at once, with no clock edge needed.

An assertion in the top checks at each edge that exactly one stage has an
input that differs from its content. That holds in every legal state, and it
is the single stage that gets a clock edge.

## Design choices that go beyond the source description

The circuit is specified by its gate structure (OR, NAND and MUX around a
master-slave flip-flop), by which path serves which half of the cycle, by
the three signals the gating uses, and by the last stage driving the path
select. The following points are this design's own reading:

- **Gate inputs.** The gates are three-input: `NAND(~clk, d, q_n)` and
  `OR(clk, d, q_n)`. This is the smallest form in which the gating uses
  exactly those three signals and clocks only the stage that changes. A
  circuit built with two-input gates would clock more stages per step and
  lose part of the saving.
- **Active edge.** The flip-flop captures on the rising edge. That is the
  edge at which the gating above is glitch free.
- **Clear.** The clear is asynchronous and active low. It forces `q = 0` and
  `q_n = 1`.
- **Flip-flop.** It is modelled by its function. The transistor-level
  master-slave structure (tri-state inverters, transmission gates, a NAND
  for the reset, a local CK -> CLK_B -> CLK buffer) has no RTL counterpart.
- **`gclk` port.** The `gclk` outputs are an addition for observation.

## Limits

- Only the RTL counter is here. The single-slope ADC, with its ramp,
  comparator and image-sensor readout, is not part of it.
- Energy, supply current and silicon area are properties of the transistor
  circuit and its layout. In RTL they appear only as clock activity: the
  number of `gclk` edges per step, which the testbenches count. The source
  reports a layout of about 40 µm x 55 µm for the 5-bit counter and
  18.5 µm x 4 µm per stage.
- This is a gated-clock design by intent. Synthesis maps it to ordinary
  gates driving flip-flop clock pins. Timing analysis has to treat each
  `gclk` as a generated clock, and the layout has to keep the skew between
  `clk` and the `gclk` nets small. Replacing the gating with a clock-enable
  multiplexer would keep the function but remove the point of the design.
- The saving per step is constant in resolution. The global clock and clear
  nets still fan out to every stage, and the cost of driving them grows with
  the chain. That is why this counter style makes sense only up to about
  8 bits. Area also grows as `2**(N_BITS-1)` stages, against `N_BITS` for a
  binary counter.

## Simulation

The testbenches need `--timing`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    tb/tb_gated_johnson_counter.sv --top-module tb_gated_johnson_counter -o sim
./obj_dir/sim
```

The same command with another testbench name runs the others. The run time
is well under a second for each.

- **`tb_gated_johnson_counter`** runs the default 16-stage counter with a
  1 ns clock: three full cycles, an asynchronous clear in the middle of the
  zeroes half, and one more cycle. At every step it compares `j` with an
  independent reference count, and checks that exactly one `gclk` rose,
  that it was the expected stage, and that it rose together with `clk`. It
  checks that the ones half lasts 16 clocks and a full cycle 32. It counts
  and requires each of these to occur: clear, asynchronous clear, NAND-path
  steps, OR-path steps, overflow and wrap-around.
- **`tb_jc_gated_cell`** drives a single stage with random and targeted
  inputs. It checks that `gclk` is high through every high phase of `clk`,
  follows `clk` in the low phase only when enabled, and rises exactly once
  in an enabled period. It also checks that `q` loads `d` only then.
- **`tb_jc_dff`** checks data capture and the asynchronous reset.
- **`tb_counter_resolutions`** runs 2-, 4-, 6-, 8- and 10-bit counters
  (2 to 512 stages) side by side for two full cycles each. It checks the
  code, one clocked stage per step, and the cycle length of `2**N_BITS`.

The testbenches start with `clear_n` high and pull it low shortly after
time 0. An asynchronous clear in RTL acts on the falling edge of the clear
signal. A clear that is already low at time 0 would leave the flip-flops at
whatever value the simulator gave them at start-up.
