# Built-in self-test for the programmable I/O buffers of an FPGA

The I/O buffers around the edge of an FPGA need testing too, and boundary
scan does not reach all of them. EXTEST reaches the pad drivers but not the
input and output flip-flops, the multiplexers, or the routing into the
core. Many devices have no INTEST. Unbonded pads cannot be reached from the
tester at all, although synthesis tools sometimes use their logic.

This BIST works from inside the chip. Every I/O buffer is configured as a
**bidirectional buffer**, and one **test pattern generator (TPG)** drives
the output portion of all of them. The pad loops each buffer's output back
into its own input portion. **Comparison-based output response analysers
(ORAs)** compare what comes back from neighbouring buffers that have the
same configuration. A fault-free array gives identical responses everywhere.
A faulty buffer disagrees with its neighbours. No expected-response storage
and no external access to the pads are needed. The buffers are then
reconfigured through each of their modes, and the comparison is repeated.

This repository holds synthesizable SystemVerilog for this scheme. It is
sized for one family of devices: its I/O buffers have a primary/secondary
split, two I/O flip-flops, transmission gates into the routing, bank
tri-state control and a global set/reset drive. It covers the buffers, the
TPG, the ORAs, the global set/reset test logic, the full configuration
sequence and a sequencer that runs the sequence and collects the results.

## Architecture

```
           +-----------+ 5 pattern bits + reset pattern
           | bist_tpg  |---------------------------------+
           | 6-bit cnt |                                 |
           +-----------+                                 v
   +------------------------------------------------------------------+
   |  io_buffer x 8*N_BANKS (pads 0..N-1; even = primary, odd = second.)|
   |  data mux -> [out FF] -> driver -> PAD -> receiver -> [in FF] ->  |
   |  in_out                                                          |
   +------------------------------------------------------------------+
        | in_out of the buffers of the current session
        v
   ORA ring: ORA i compares buffer i with buffer i+1 (the last with the first)
   + ORA comparing the global-reset flip-flop with its reference
        | shift chain (shift_mode)
        v
   bist_controller: step -> bist_cfg_set -> configuration of every buffer
                    fail_map[step] <- OR of the shifted-out ORA bits
```

* **TPG** (`bist_tpg`): a 6-bit up-counter. Bits 0..4 drive the five
  routing lines that feed the data and tri-state multiplexers of every
  buffer. Bit 5, the MSB, is the reset pattern for the buffers' flip-flops.
  One full count (64 clocks) applies every combination of routing patterns,
  with the reset both released and asserted.
* **ORA** (`bist_ora`): the XOR of two responses is ORed with the stored
  bit, so one mismatch sets the Pass/Fail flip-flop and it stays set. In
  shift mode the flip-flop loads the previous ORA's bit instead, and the
  ORAs form a shift register for read-out.
* **Circular comparison**: with N buffers under test there are N ORAs in a
  ring. Each buffer is therefore checked against both neighbours. If two
  adjacent buffers share the same fault, the next buffer along the ring
  still exposes it.
* **Sessions**: primary and secondary buffers connect differently to the
  core and have different multiplexer sizes, so they are tested in separate
  sessions. The ORA ring observes the primary buffers in one session and
  the secondary buffers in the other. Buffers outside the session are
  tri-stated with their pull-up on.

## The I/O buffer (`io_buffer`)

`PRIMARY=1` gives a primary buffer and `PRIMARY=0` a secondary one. The
secondary buffer is a subset of the primary one.

| part | primary | secondary |
|---|---|---|
| data multiplexer inputs | 7: `0`, `1`, routing lines 0..4 | 6: `0`, `1`, lines 0..3 |
| tri-state multiplexer inputs | 8: as above + bank control | 7 |
| transmission gates | 4 (on lines 0..3) | 2 (on lines 0..1) |

* Select codes are the same for both multiplexers: 0 selects constant 0,
  1 selects constant 1, 2+k selects routing line k, and 2+N_ROUTE selects
  the bank line (tri-state multiplexer only). Any other code selects 0. A
  tri-state multiplexer output of 1 enables the output driver.
* The output and input flip-flops each have a bypass multiplexer, set by
  `cfg.out_reg` and `cfg.in_reg`. Both flip-flops have a synchronous reset.
  The global set/reset always resets them. The TPG reset pattern resets
  them only when `cfg.ff_rst_en` is set.
* While transmission gate k is on, routing line k, as seen by both
  multiplexers, carries the buffer's own `in_out`. This is the path that
  lets input and output share routing.
* When `cfg.gsr_drive` is set, the receiver output drives the global
  set/reset net.
* The pad, output driver, pull-up and pull-down transistors and receiver
  are the behavioural model `iob_pad`, in two-state logic. Priority runs
  from an external driver, to the on-chip driver, to the pull-down, to the
  pull-up. A floating pad reads 0. The drive strength (3 settings), input
  delay (4 settings), Schmitt trigger and TTL/CMOS threshold are ports but
  do not change logic values, because they are analog properties. The
  configuration set still cycles through their values.

The configuration word is `iob_bist_pkg::iob_cfg_t`. It stands for the
configuration memory bits of one buffer.

## The test sequence (`bist_cfg_set`, `bist_controller`)

The number of configurations a session needs is set by the largest
multiplexer, the tri-state one. Each of its inputs has to be selected once.
The full sequence of steps:

| steps | what runs |
|---|---|
| 0..7 | primary session: step c selects tri-state input c (`0`, `1`, lines 0..4, bank). The data select, registered/non-registered choices, pull mode (up, down, none in turn) and analog bits rotate with c. The TPG reset of the flip-flops is on, except in the bank step: the bank line and the reset come from the same counter bit, and resetting in the tri-stated half would hide a bank line stuck enabled. |
| 8 | primary preload: both flip-flops registered, data from line 0, output always on, no TPG reset |
| 9..12 | primary transmission gate k = step-9: gate k on, data multiplexer on line k, both flip-flops in the loop |
| 13..19 | secondary session: the seven tri-state inputs |
| 20 | secondary preload |
| 21..22 | secondary transmission gates 0, 1 |
| 23..23+N-1 | global reset test of pad j = step-23 |

That is 9 + 4 + 8 + 2 = 23 steps regardless of array size, plus one step
per I/O buffer.

**Transmission gate test (the least obvious part).** A gate that is stuck
on shorts the input path onto a routing line. The ordinary session steps
catch this, because the line then stops carrying the TPG pattern. A gate
that is stuck off needs a test of its own, which works as follows:

1. The preload step runs both flip-flops registered on line 0. Line 0 is
   the TPG bit that toggles every clock.
2. At the end of the preload step, the output flip-flop and the input
   flip-flop hold opposite values.
3. The next step switches gate k on and points the data multiplexer at
   line k. This closes the loop: input flip-flop → gate k → data
   multiplexer → output flip-flop → pad → receiver → input flip-flop.
4. Two flip-flops holding opposite values swap them on every clock, so the
   pad toggles. The ORAs compare the toggling buffers with each other.
5. While gate k is configured on, line k is not driven by the TPG: the
   line belongs to the loop. A buffer whose gate does not pass the signal
   therefore sees a constant on line k, stops toggling and falls out of
   step with its neighbours. (Had the TPG kept driving line 0, whose bit
   toggles every clock, a dead gate 0 would look just like the loop.)

The TPG runs without stopping during the whole sequence, and nothing resets
the flip-flops between steps. This is what carries the preloaded state into
the gate steps, and from one gate step to the next.

**Global reset test.** Each step in this group works as follows:

1. All buffers are non-registered and take their data from routing line 0.
2. Line 0 is daisy-chained: pad 0 receives the TPG reset pattern, and pad
   j receives the input of pad j-1. The pattern passes through every
   buffer in turn.
3. In step 23+j, only pad j has its global set/reset switch on.
4. A flip-flop with a constant 1 at its input is reset by the global
   set/reset. A reference flip-flop is reset directly by the TPG pattern.
5. An ORA compares the two. A stuck-off switch leaves the monitored
   flip-flop set while the reference is reset.

That ORA compares in every step, not only in the global reset steps. A
switch stuck on therefore shows as an unexpected reset elsewhere in the
sequence.

**Sequencer.** Each step lasts `1 + 64 + (N_P + 1)` clocks:

1. One clear cycle: the new configuration is applied and the ORAs are
   cleared.
2. 64 run cycles, one full TPG count.
3. `N_P + 1` shift cycles. The ORA chain is shifted out and ORed into
   `fail_map[step]`.

After the last step `done` rises, and `pass = done & ~|fail_map`. The shift
order, from `scan_out` backwards, is: global reset ORA, then ring ORA
N_P-1, ..., then ORA 0. At the default size (N_BANKS=4: 16 primary and 16
secondary buffers, 55 steps), one sequence takes 55 × 82 + 1 = 4511 clocks.

**Locating a faulty buffer.** `fail_map` records only which steps
failed. During the shift cycles, `scan_out` shows the individual ORA bits,
in the order above. Each buffer is compared by two ORAs, the one before it
and the one after it in the ring. A single faulty buffer i therefore sets
ORAs i-1 and i. Capturing `scan_out` gives a buffer-level diagnosis.

Reconfiguration takes no time here: a step number change switches every
configuration word at once. In a real device each step is a full
configuration download or a partial reconfiguration. For the global reset
steps the reconfiguration is done by a program on an embedded processor.
The sequencer stands in for both.

## Buffers without I/O flip-flops (`HAS_IO_FF = 0`)

Some devices of the same family have no flip-flops in their I/O buffers.
The top, the buffer and the configuration set all take `HAS_IO_FF`. With 0:
* Nothing is registered. The registered/direct bits of the configuration
  word have no effect.
* The preload steps go away, leaving 21 fixed steps. Primary steps are
  0..7, with gate steps 8..11. Secondary steps are 12..18, with gate steps
  19..20. The global reset steps start at 21.
* The gate test changes, because the toggling loop needs the flip-flops.
  In gate step k, the data multiplexer drives the pad from a routing line
  that has no gate. The ORAs observe routing line k of every buffer instead
  of `in_out` (`mode.obs_route`, through the buffer's `route_obs` port).
  Line k carries the buffer's input signal only if gate k passes it. Each
  gate step therefore reverses the direction of one line.

`tb_iob_bist_top_noff` runs this variant with one bank.

## What the test does not cover

* It does not measure parametric behaviour: output levels, thresholds,
  drive current or delay. It catches a gross defect in these features
  only where that defect changes a logic value.
* Gate-level stuck-at coverage of a real buffer cell cannot be measured on
  this RTL, because the buffer model is behavioural at the pad. The next
  section measures coverage of the RTL's own nets instead.
* All pads drive during the test. Other devices on the board must
  therefore be tri-stated, and the test is meant for wafer, package and
  board level with that restriction.

## Fault coverage of the configuration set

`tb_iob_fault_cov` measures which faults the configuration set detects. It
runs two copies of `tb/fault_cov_bench.sv`: one with buffers that have I/O
flip-flops and one with buffers that do not. Each copy runs the real
sequencer, TPG and configuration set on a good and a faulty primary buffer
and on a good and a faulty secondary buffer. Each pair stands for two ORA
neighbours.

The fault list is every single stuck-at-0/1 on the buffer's logic nets:
* configuration bits;
* routing inputs;
* the bank tri-state line;
* both resets;
* the pad;
* the input-portion output.

Flip-flop and reset faults are left out of the variant without flip-flops.
Each fault gets a whole BIST run. The testbench prints how many faults
each step detects on its own, and how many are detected so far.

| detected after | with flip-flops, primary | secondary | without, primary | secondary |
|---|---|---|---|---|
| session steps | 47 / 56 | 43 / 50 | 38 / 46 | 34 / 40 |
| + preload and gate steps | 51 | 45 | 42 | 36 |
| + own global reset step | 52 | 46 | 43 | 37 |

No single step detects more than about half of the faults, and the gate
steps are needed to reach the final count. A global reset drive switch that
is stuck off shows up only in the buffer's own global reset step.

The faults that remain undetected cannot be detected by construction. The
testbench checks that each one stays undetected:
* bit 3 of the data select stuck at 0, and the same for the tri-state
  select. No multiplexer has more than eight inputs, so that bit is 0 in
  every legal configuration.
* the pull-down stuck off. An undriven pad reads 0 in a two-state model,
  so a missing pull-down is invisible.
* the global reset input stuck at 0 (only with flip-flops). The test checks
  that a buffer drives the net, not that the net resets the buffer.

Without flip-flops, a tri-state select bit stuck at 1 in a gate step can
make the output enable come from the gate's own line. The buffer then
becomes a ring oscillator whenever the data bit differs from the pull
level. A zero-delay simulation cannot run that oscillation. The bench
therefore counts such a fault as detected in that step, because the
oscillating buffer cannot keep matching its neighbour, and does not apply
the fault for that step.

Two choices in the configuration set came from this run:
* a step with no pull, because a stuck-on pull-up escaped otherwise;
* the bank-step reset rule described above.

## Design choices not fixed by the scheme

The following are choices made for this RTL. Change them freely.

* Array size `N_BANKS` = 4. A bank is eight adjacent pads, four primary and
  four secondary. Pads alternate primary/secondary.
* Multiplexer select codes, output-enable polarity, synchronous resets,
  and which routing lines the transmission gates sit on.
* The content of each configuration word, apart from the tri-state input
  that a step is built around.
* The bank tri-state lines carry the inverted TPG reset pattern.
* ORAs with a synchronous clear, and `shift_mode = 1` meaning shift.
* One clock for both I/O flip-flops.
* The periphery routing between core and buffers modelled as wires.
* A state machine instead of configuration downloads plus processor code.

Not built: the separate test of the two sets of diagonal connections of a
secondary buffer, which depends on the routing of the core logic blocks.

## Files

| file | contents |
|---|---|
| `rtl/iob_bist_pkg.sv` | configuration word, select codes, step counts |
| `rtl/bist_tpg.sv` | pattern generator |
| `rtl/bist_ora.sv` | comparison ORA with shift mode |
| `rtl/iob_pad.sv` | behavioural pad / driver / receiver / pulls |
| `rtl/io_buffer.sv` | primary or secondary programmable I/O buffer |
| `rtl/gsr_test.sv` | global set/reset net and its test flip-flops |
| `rtl/bist_cfg_set.sv` | the configuration of every buffer for each step |
| `rtl/bist_controller.sv` | sequencer and result collection |
| `rtl/iob_bist_top.sv` | the whole BIST (top) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_iob_bist_top_noff` for the flip-flop-less array and `tb_iob_fault_cov` (with its helper `fault_cov_bench`) for the fault-coverage run |

Verilator reports one combinational-loop warning (UNOPTFLAT) on
`io_buffer.in_out`. It comes from the transmission-gate path, which is a
loop in the hardware too. No configuration in the set makes that loop
combinational.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, the full-size end-to-end test:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/iob_bist_pkg.sv tb/tb_iob_bist_top.sv --top-module tb_iob_bist_top
./obj_dir/Vtb_iob_bist_top
```

`tb_iob_bist_top` runs the complete sequence at the default size, five
times:
* fault-free, which must pass;
* a primary pad held at 0 from outside, then a secondary pad held at 1;
* one buffer's global reset switch stuck off, which must fail exactly that
  buffer's step;
* one switch stuck on.

For each faulty run it checks which steps fail. For the primary pad held at
0 it also checks that the scanned-out ORA bits name exactly the two ORAs
next to that buffer. It also counts each
mechanism (tri-state with pull-up and pull-down, registered and direct
paths, bank control, TPG reset, the toggling gate loop, the daisy chain,
global reset pulses, both sessions, ORA shifting) and fails if any never
happened. The whole run takes well under a second.

The other testbenches check each block against an independent reference
model. `tb_io_buffer` runs random configurations of both buffer types plus
the gate toggle test. `tb_bist_cfg_set` checks the structure of the step
table. `tb_bist_controller` checks the step timing and result recording.
