# Finite state machines and an FSM with datapath, in SystemVerilog

This is RTL for two classic teaching examples of sequential design, written
the way they would be built in an FPGA:

* a **serial BCD to excess-3 converter**, a seven-state Mealy machine that
  adds 3 to a decimal digit one bit at a time, least significant bit
  first. It comes with a Moore version and with a small **board test
  system** (clock divider, two shift registers, a sequencer) that takes a
  digit from four slide switches and shows the result on four LEDs;
* a **bit difference calculator**, which counts how many more 1s than 0s a
  word has (3 more ones gives 3, 3 more zeros gives -3). It is built twice,
  as a behavioural FSM with datapath (FSMD) and as a structural FSMD with a
  separate controller and a datapath made of registers, muxes, adders and
  a comparator.

The examples do not form one system. The top level, `fsm_examples_top`,
places them side by side, each with its own clock and ports.

## Serial BCD to excess-3 conversion (Mealy)

Excess-3 (XS-3) code represents a decimal digit d as the 4-bit binary value
d + 3. Done serially, the converter only has to remember whether a carry is
pending and which bit position comes next. Time steps t0..t3 carry bits 0..3
of the digit. Bit 0 is always taken in S0. Bit 1 is taken in S1 (no carry)
or S2 (carry). Bit 2 is taken in S3 (no carry) or S4 (carry). Bit 3 is taken
in S5 (no carry) or S6 (carry). After bit 3 the machine is back in S0, so
digits can follow each other with no gap.

| present state | next state, x=0 | next state, x=1 | z, x=0 | z, x=1 |
|---|---|---|---|---|
| S0 | S1 | S2 | 1 | 0 |
| S1 | S3 | S4 | 1 | 0 |
| S2 | S4 | S4 | 0 | 1 |
| S3 | S5 | S5 | 0 | 1 |
| S4 | S5 | S6 | 1 | 0 |
| S5 | S0 | S0 | 0 | 1 |
| S6 | S0 | S0 (cannot occur) | 1 | 0 (cannot occur) |

`z` is a Mealy output: it is valid in the same clock as the input bit `x`
and changes with it. The table lives in one function, `xs3_pkg::xs3_step`,
which both converters use. `enable` is an active-low asynchronous reset:
while it is 0 the machine sits in S0.

Example: digit 0 (x = 0,0,0,0 from bit 0 up) walks S0→S1→S3→S5→S0. The
outputs are 1,1,0,0, which read from bit 0 up is 0011 = 3.

The S6/x=1 entry never occurs for a valid BCD digit. S6 is reached only when
the low three bits are 5, 6 or 7, and a 1 in bit 3 would then make the digit
13 or more. This design sends it to S0 with z = 0.

### Moore version (`code_converter_moore`)

A Moore machine may not let `x` reach `z` directly. Each Mealy state is split
by the output bit of the transition that entered it. The state register holds
the pair {Mealy state, z}, and `z` is simply its output half. Ten of these
pairs are reachable. The conversion is the same, but every output bit
appears one clock later: the bit for the input sampled at edge k is on `z`
after edge k. Reset gives S0 with z = 0.

## Board test system (`xs3_test_system`)

```
 100 MHz ──► clock_divider ──► clk (1 Hz) ──► everything below
 sw[3:0] ──► shift_register (load, shift right) ──sout──► x
                                                    code_converter
 led[3:0] ◄── shift_register (shift right, sin = z) ◄── z
 reset, enable ──► xs3_control ──► load_in, shift, conv_enable
```

* `clock_divider` toggles its output every `IN_HZ/(2*OUT_HZ)` input clocks
  (50 000 000 at the defaults), giving a 1 Hz, 50 % duty clock. Every step is
  slow enough to watch on the LEDs. The counter wraps on `>=`, so it recovers
  from any start value.
* `xs3_control` is a three-state sequencer:
  * **IDLE**: loads the switches into the input register on every slow
    clock and holds the converter in S0 (`conv_enable = 0`).
  * **SHIFT**: entered when `enable` is 1. Lasts exactly 4 slow clocks. Both
    registers shift and the converter runs.
  * **SHOW**: leaves the result on the LEDs until `enable` returns to 0,
    which goes back to IDLE.

  `conv_enable` drives the converter's asynchronous reset, so it comes
  straight from a flip-flop rather than from decode logic.
* Both `shift_register`s shift right. The input register sends bit 0 first.
  The output register takes `z` into its MSB, so after four shifts the LEDs
  hold the excess-3 digit in natural bit order. While the shifting runs, the
  LEDs show the partial result moving in.
* `reset` (active high) clears the divider, the sequencer and both registers.
  In the slow domain it is asynchronous, because the divided clock does not
  run while the divider is held in reset.

Timing, in slow clocks: load while idle. Then raise `enable`. The result is
complete 5 slow clock edges later: the one that enters SHIFT, then four
shifts. `busy` is high for exactly 4 slow periods.

The slow clock is a flip-flop output used as a clock. That matches the
original board design and is fine for a 1 Hz demo. A production design would
rather use a clock enable.

## Bit difference calculator

For a `WIDTH`-bit word the result is `ones - zeros = 2*popcount - WIDTH`. It
is returned as a `WIDTH`-bit two's complement value, so it ranges from
-WIDTH to +WIDTH. Both implementations share the interface
(`clk, rst, go, din, dout, done`) and the cycle behaviour:

* `go` is sampled in the idle state, and `din` is captured at that edge.
  Call it edge 0. Later changes of `din` do not matter.
* One bit is examined per clock, LSB first: `value[0]` adds +1 or -1 to
  `diff`, then `value` shifts right.
* `done` is high for one clock, between edges `WIDTH+1` and `WIDTH+2`.
  That is clocks 17 to 18 at the default width of 16. `dout` is valid from
  edge `WIDTH+1` and holds until the next result.
* After `done` the machine returns to idle on its own. If `go` is still
  high, the next run starts one clock later with a freshly captured word.
* `rst` is active high and asynchronous.

### Implementation A: behavioural FSMD (`bit_diff_a`)

One clocked process holds all registers: `state`, `value`, `diff`, `count`,
`output_s`. One combinational process computes their next values. The states
are:

| state | action | next |
|---|---|---|
| S_INIT | count=0, diff=0, value=din | S_CHECK_BIT when go=1 |
| S_CHECK_BIT | diff±1 by value[0], value>>=1, count++ | S_STORE_OUTPUT when count+1 = WIDTH |
| S_STORE_OUTPUT | output = diff | S_DONE |
| S_DONE | done = 1 | S_INIT |

### Implementation B: structural FSMD (`bit_diff_b`)

Here the controller and the datapath are separate modules. They talk only
through a bundle of control lines (`bit_diff_pkg::bd_ctrl_t`) and one status
line, `count_done`.

The datapath, `bit_diff_datapath`, is built from unit modules only:
`bd_reg`, `bd_mux2x1`, `bd_add`, `bd_sub` and `bd_comp`.

```
Value  <- value_sel ? din : Value >> 1                      (value_ld)
Diff   <- diff_sel  ? 0   : (Value[0] ? Diff + 1 : Diff - 1) (diff_ld)
Output <- Diff                                              (output_ld)
Count  <- count_sel ? 0   : Count + 1                       (count_ld)
count_done = (Count == WIDTH)
```

The controller, `bit_diff_fsm`, has three states:

| state | condition | control lines asserted |
|---|---|---|
| S_INIT | always (go=1 moves on) | value_sel, value_ld, diff_sel, diff_ld, count_sel, count_ld |
| S_CHECK_BIT | count_done = 0 | value_ld, diff_ld, count_ld (selects 0: shift, ±1, +1) |
| S_CHECK_BIT | count_done = 1 | output_ld; move to S_DONE |
| S_DONE | always | done; move to S_INIT |

Because `count_done` compares the *registered* count, S_CHECK_BIT lasts
WIDTH+1 clocks: WIDTH data steps and one store step. Implementation A spends
WIDTH clocks in S_CHECK_BIT and one in S_STORE_OUTPUT, so the two designs
have identical timing. The end-to-end test runs both in lockstep and compares
them on every clock.

A three-state graph would naturally put "output = diff" inside the done
state. Here the Output register is loaded on the edge that *enters* S_DONE
instead, so `dout` is already valid while `done` is high.

## Top level (`fsm_examples_top`)

| prefix | design | clock |
|---|---|---|
| `clk100`, `xs3_*` | board test system (`xs3_sw` in, `xs3_led` out) | `clk100` |
| `bda_*` | bit difference, implementation A | `bda_clk` |
| `bdb_*` | bit difference, implementation B | `bdb_clk` |
| `mo_*` | Moore converter | `mo_clk` |

Parameters: `CLK_HZ` (100 000 000), `SLOW_HZ` (1), `BD_WIDTH` (16).

## Where this design makes its own choices

These points are the design's own, because the original material does not
settle them:

* **Test system sequencer.** The `xs3_control` sequence is this design's own
  protocol: load while idle, four shifts after `enable` rises, hold until
  `enable` falls. So are the use of `reset` and `enable` and the asynchronous
  slow-domain reset.
* **Shift registers and divider.** The shift direction, the load-over-shift
  priority and the divider structure were chosen here. The original fixes only
  the 4-bit width, the 100 MHz input and the roughly 1 Hz output.
* **Datapath mux selects.** Which mux input each select value picks in the
  structural datapath was chosen here. The set of units and the signal names
  follow the original datapath.
* **Return from done.** The calculators go back from the done state to idle
  unconditionally. They do not wait for `go` to drop.
* **Moore converter.** The Moore state assignment was derived here from the
  Mealy table.
* **Unused table entry.** The S6/x=1 entry goes to S0 with z = 0.
* **Port names.** `din`/`dout` replace the names `input`/`output`, which are
  keywords in SystemVerilog.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The converters are checked against `digit + 3` for all ten digits, back to
  back and at random, plus a restart in mid-word.
* The calculators are checked against `2*popcount - WIDTH` for corner words
  and random words, at widths 16 and 5. The tests check the exact `done`
  latency and the one-clock pulse.
* The unit modules are checked against arithmetic models.
* The sequencer and the test system are checked for LED result, busy length
  and hold.

Two testbenches exercise the top level:

* `tb_fsm_examples_top` runs all four designs with a 16-clock slow period.
  It counts that each mechanism happened: the carry and no-carry branches,
  the LED hold, the slow clock, positive, negative and zero results, and
  back-to-back runs.
* `tb_fsm_full` runs the top with every parameter at its default: one digit
  through the real 1 Hz divider (about 650 million board clocks, roughly
  5 minutes of simulation), one 16-bit calculation on each calculator and one
  Moore digit.

Simulate any of them with Verilator 5, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/xs3_pkg.sv rtl/bit_diff_pkg.sv tb/tb_bit_diff_b.sv \
    --top-module tb_bit_diff_b -o sim
./obj_dir/sim
```

Testbenches for modules that do not use the packages need no package files
in the command. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/xs3_pkg.sv rtl/bit_diff_pkg.sv rtl/<module>.sv`.

## Files

* `rtl/xs3_pkg.sv`: converter state type and the shared state-table function.
* `rtl/code_converter.sv`, `rtl/code_converter_moore.sv`: the Mealy and Moore
  converters.
* `rtl/clock_divider.sv`, `rtl/shift_register.sv`, `rtl/xs3_control.sv`,
  `rtl/xs3_test_system.sv`: the board test system.
* `rtl/bit_diff_a.sv`: the behavioural calculator.
* `rtl/bit_diff_pkg.sv`, `rtl/bit_diff_fsm.sv`, `rtl/bit_diff_datapath.sv`,
  `rtl/bit_diff_b.sv`: the structural calculator.
* `rtl/bd_reg.sv`, `rtl/bd_mux2x1.sv`, `rtl/bd_add.sv`, `rtl/bd_sub.sv`,
  `rtl/bd_comp.sv`: the units of the structural datapath.
* `rtl/fsm_examples_top.sv`: the top level.
