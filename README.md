# Inter-clock at-speed test clock controller

Scan-based at-speed testing of a multi-clock chip has to cover two kinds of
combinational logic. *Intra-clock* logic sits between flip-flops clocked by
the same clock. *Inter-clock* logic sits between flip-flops clocked by two
different but synchronous clocks, for example a 660 MHz clock FCK and a
330 MHz clock SCK from the same PLL. Simple test controllers such as double
capture handle intra-clock logic and ignore inter-clock logic.

This RTL makes the test clocks for inter-clock logic. It keeps that job apart
from intra-clock test control and uses **launch-on-capture**:

* after shift, a single scan enable `SE` falls, and it does not have to meet
  any at-speed timing;
* the controller then lets through exactly **one launch pulse** on the
  source clock, which updates the flip-flops feeding the inter-clock logic;
* it then lets through exactly **one capture pulse** on the destination
  clock, at the edge where that clock would take the data in normal
  operation. For the default relation this is one FCK period after the launch.

Both pulses are cut out of the free-running PLL clocks with latch-based clock
gates. No fast clock has to come from the tester, and the scheme works the
same for ATE-based scan test and for logic BIST.

## How a capture window unfolds

The default configuration is FCK = 2 x SCK, an 8-stage delay, and a test of
logic from FCK to SCK. Every flip-flop of the enable generator is clocked by
FCK; SCK is only sampled as data.

| step | signal | what happens |
|---|---|---|
| 1 | `SE` 1 -> 0 | end of shift, at any time and with any routing delay |
| 2 | `S1` | falls N FCK edges later (delay generator; N = 8) |
| 3 | `S2` | 1 for one FCK period after each SCK rising edge has crossed the 2-flop synchronizer, i.e. in an FCK period where SCK is low |
| 4 | `start` | one FCK-period pulse at the first edge with `S1 = 0` and `S2 = 1`; it rises together with SCK |
| 5 | `state` | 1, 2, ..., 15, 0 in consecutive FCK periods, then stops |
| 6 | `S3`, `S4` | decoder: `S3` in state 3, `S4` in states 3 and 4 |
| 7 | `fck_en_master`, `sck_en_master` | `S3`/`S4` registered once more: high in state 4, resp. states 4-5 |
| 8 | final enables | each master enable passes a latch that is open while its own clock is low |
| 9 | `TFCK`, `TSCK` | FCK pulse at the start of state 5 (launch), SCK pulse at the start of state 6 (capture), one FCK period apart |

Because the state machine is started at a known SCK phase, each state number
names one FCK period together with the phase of SCK in it. For a 2:1 ratio,
odd states are periods with SCK low and even states periods with SCK high.
Placing a pulse is therefore just a matter of decoding a state.

The time from `SE` falling to the launch pulse (d1) is at least (N-1) FCK
periods. At 533 MHz with N = 8 that is over 13 ns, so `SE` can be routed like
any data signal.

## The enable generator, block by block (`inter_clock_enable_generator`)

* **Delay generator** (`delay_generator`): an N-stage shift register of `SE`.
  Its only job is to make d1 long.
* **SCK delay** (`sck_delay`): SCK edges coincide with FCK edges. SCK is
  therefore delayed slightly before any FCK flip-flop samples it, so every
  sample sees the value from before the shared edge. This is an analog cell
  and is written as a behavioural model (100 ps transport delay).
* **Start enable generator** (`start_enable_generator`): flops FFa and FFb
  form a synchronizer against metastability. FFc and FFd hold the last two
  synchronized samples, and `S2 = FFc & ~FFd`.
* **Start signal generator** (`start_signal_generator`): `start` is the
  registered value of `S2 AND NOT(S1 OR FFe OR FFf)`. FFe is `start` itself.
  FFf is a "done" flag that FFe sets and that only `S1 = 1` clears. `S2`
  repeats every SCK period, so without this flag the generator would restart
  during a long capture window. A concurrent assertion checks that `start` is
  never longer than one cycle.
* **State machine** (`state_machine`): a 4-bit counter. From state 0 it goes
  to 1 on `start`, counts to 15, wraps to 0 and waits there. A `start` that
  arrives while it is counting is ignored.
* **Clock enable decoder** (`clock_enable_decoder`): two inclusive state
  windows, one for each output, set by parameters.
* **FFg / FFh**: register the decoder outputs into the master enables. They
  are ANDed with `GE` (generator enable), so with `GE = 0` the master enables
  stay 0.

After synthesis one generator has 20 flip-flops: 8 delay, 4 start enable,
2 start, 4 state and 2 output flip-flops.

## Decode windows for other clock ratios and directions

The decoder is the only part that depends on which inter-clock relation is
tested. `inter_clock_enable_generator` takes `RATIO` (FCK frequency divided
by SCK frequency, an integer of 2 or more) and `DIR` (`FAST_TO_SLOW` or
`SLOW_TO_FAST`). From these, functions in `ictc_pkg` compute the windows.
The windows can also be overridden directly with `FCK_FIRST`, `FCK_LAST`,
`SCK_FIRST` and `SCK_LAST`, for example to test multi-cycle paths.

The rule behind the functions is as follows. Let E0 be the shared FCK/SCK
rising edge whose sampled SCK rise produces `start`, and Ek the k-th FCK edge
after it.

* State k occupies the FCK period from E(4+k) to E(5+k).
* A decoder output that is high in state k makes the master enable high in
  state k+1.
* The latch then releases the clock pulse at edge E(6+k). A pulse at edge Ee
  therefore needs decode state e-6.
* SCK pulses can only be placed at edges that are multiples of `RATIO`.

The target edge T is the first multiple of `RATIO` at or after E10:

| DIR | launch | capture | FCK window | SCK window |
|---|---|---|---|---|
| `FAST_TO_SLOW` | FCK at E(T-1) | SCK at E(T) | T-7 | T-7 .. T-6 |
| `SLOW_TO_FAST` | SCK at E(T) | FCK at E(T+1) | T-5 | T-7 .. T-6 |

For `RATIO = 2`, `FAST_TO_SLOW` this gives exactly the published decode
(state 3, and states 3-4). The SCK window is two states long, but only its
second state counts: in the first one SCK is high and its latch is closed.
The rule requires T <= 20, so `RATIO` can go up to 20.

## Clock gating and shift (`test_clock_gate`)

Each test clock has one latch, one AND gate and one multiplexer:

* the latch is transparent while its clock is low, so the final enable only
  changes while the clock is low;
* the AND gate therefore passes only whole high phases, with no glitches;
* when `SE = 1`, the multiplexer selects the common `shift_ck` instead.

The latch is intended: it is the usual glitch-free clock-gating structure.
Synthesis reports one latch bit per test clock. In the full top, Verilator
lint prints a NOLATCH note for it, which is harmless.

## Several generators and intra-clock integration (`at_speed_test_control_top`)

Each inter-clock logic block needs its own generator.
`inter_clock_generator_bank` holds three generators:

| generator | tests | selected by |
|---|---|---|
| 1 | FCK1 -> SCK1 | `d1 d2 = 10` |
| 2 | SCK1 -> FCK1 | `d1 d2 = 01` |
| 3 | FCK2 -> SCK2 | `d1 d2 = 11` |

A selector turns `d1 d2` into one-hot generator enables; `00` selects none.
Generators 1 and 2 drive the same two clocks, so their enables are merged
with OR gates. This is safe because an unselected generator holds its
outputs at 0.

The top adds an intra/inter selection for each clock. `s = 0` takes the
master enables from an intra-clock enable generator, for example a
double-capture controller. That controller is not part of this RTL; its
enables enter through `intra_en1_master` and `intra_en2_master`. `s = 1`
takes them from the bank. Each chosen enable then goes through a
`test_clock_gate`.

Ports of the top:

| port | dir | meaning |
|---|---|---|
| `fck1, sck1, fck2, sck2` | in | free-running PLL clocks, `fckX` = `RATIOX` x `sckX`, rising together |
| `rst_n` | in | asynchronous reset, active low |
| `se` | in | scan enable (1 = shift) |
| `shift_ck` | in | shift clock for all four test clocks |
| `s` | in | 0 = intra-clock enables, 1 = inter-clock enables |
| `d1, d2` | in | generator select |
| `intra_en1_master, intra_en2_master` | in | `en_pair_t {fck, sck}` from the intra-clock controller |
| `tfck1, tsck1, tfck2, tsck2` | out | test clocks |
| `en1_final, en2_final` | out | latched final enables (observation) |

Parameters: `N_DELAY` (delay stages, default 8), and `RATIO1` and `RATIO2`
(clock ratio of each pair, default 2).

## Files

* `rtl/ictc_pkg.sv`: state type, direction enum, decode functions, enable
  pair struct.
* `rtl/delay_generator.sv`, `rtl/sck_delay.sv`,
  `rtl/start_enable_generator.sv`, `rtl/start_signal_generator.sv`,
  `rtl/state_machine.sv`, `rtl/clock_enable_decoder.sv`: the parts of one
  generator.
* `rtl/inter_clock_enable_generator.sv`: one generator.
* `rtl/generator_selector.sv`, `rtl/inter_clock_generator_bank.sv`:
  selection among several generators.
* `rtl/test_clock_gate.sv`, `rtl/at_speed_test_control_top.sv`: clock gating
  and the top level.
* `tb/tb_<module>.sv`: a self-checking testbench per module.
  `tb/tb_table2_workloads.sv` (with the helper `tb/workload_channel.sv`) runs
  six generators at the clock pairs of a published industrial application:
  100->300, 133->533, 133->266, 533->133, 266->533 and 266->133 MHz.

## Simulating

All files carry `timeunit 1ns; timeprecision 1ps`. The package must come
first. For example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ictc_pkg.sv \
    tb/tb_at_speed_test_control_top.sv --top-module tb_at_speed_test_control_top
./obj_dir/Vtb_at_speed_test_control_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Each testbench computes its expected values on its own and does not reuse the
RTL. The checks cover:

* exact pulse counts in every capture window, even very long ones;
* a launch-to-capture distance of exactly one fast-clock period;
* d1 >= (N-1) fast periods;
* silence with `GE = 0` and with select code `00`;
* glitch-free gating, and shift-clock passthrough.

The generator testbench also replays the published example waveform with a
3-stage delay generator, edge by edge:

* `S1` falls at edge 3;
* `start` is high after edge 4;
* state 1 comes after edge 5;
* the launch pulse is at edge 9 and the capture pulse at edge 10.

The top-level testbench runs at the default parameters. It goes through
shift mode, all three generators, the no-generator code and intra mode, and
counts each. The workload testbench also runs ratios 3 and 4.

## How far this follows the published scheme, and what is this design's own

Taken from the published scheme:

* the overall architecture;
* the five generator blocks and their flip-flop counts;
* the delay generator length of 8;
* the 4-stage SCK shift register with a synchronizer and an edge-detecting
  AND;
* the 4-bit state counter and its sequence;
* the decode of state 3 / states 3-4 for FCK -> SCK;
* FFg/FFh, the low-transparent latches, the gating ANDs and the shift
  multiplexer;
* the three-generator selector with OR merging;
* the intra/inter multiplexer.

This design's own choices:

* **FFf as a sticky "done" flag.** The published description only says that
  feedback from the two start flops keeps `start` to one cycle. A plain
  delay flop would let `start` fire again every second SCK period.
* **The decode rule for other ratios and for slow-to-fast tests.** The
  published text only says that the decoder changes. This design's decode
  gives the generator 2 decode (state 5 for FCK, states 3-4 for SCK) and the
  windows used for ratios 3 and 4.
* **Where `GE` acts**: at the inputs of FFg/FFh.
* **The select code assignment** of `d1 d2`.
* **Resets**: an asynchronous active-low reset everywhere, with the delay
  generator reset to all ones so that no capture window starts out of reset.
* **Ratio handling**: `RATIO` is an integer of 2 or more, with SCK at 50 %
  duty and rising together with FCK.
* **The 100 ps SCK delay value.**
* **Joining the multi-generator bank and the intra/inter integration** into
  one top with two clock pairs.

Not included:

* the intra-clock (double-capture) enable generator, which comes from earlier
  work and is only an input here;
* the PLL;
* switching between test and functional mode.

The default build holds three generators at ratio 2. The published chip used
six generators, for ratios 2, 3 and 4. Those need more generator instances
and `RATIO` set per generator; the workload testbench shows each of them
working.
