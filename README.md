# Programmable coarse delay line with adjustable duty cycle

This circuit takes a periodic input pulse `P_IN`. It gives back, for every
leading edge of `P_IN`, one output pulse `P_OUT`. Two 10-bit codes program
that pulse:

- `t_dc` sets how long after the input edge the output pulse starts (T_dC).
- `t_w` sets how long the output pulse stays high (T_W).

Both codes count periods of the counter clock. At the nominal 500 MHz clock
one step is 2 ns. Each code reaches 1023 steps, 2046 ns, so delay and width
can each be set over about 2 µs.

The main idea is to time a long delay with a counter rather than with a
chain of clocked latches. A latch chain needs one flip-flop per step, which
would be 1000 flip-flops for 1 µs at 1 GHz. Here the delay and the width
each use a single 10-bit counter, and a decoder stops it at the programmed
value. The whole line is 26 flip-flops.

```
            +-------------------+  TRG_P'  +-----------------+  P_D (enable)   +-----------------------+
 P_IN ----->| trigger_generator |--------->| delay_generator |---------------->| duty_cycle_controller |---> P_OUT
            +-------------------+          |   t_dc[9:0]     |---------------->|   t_w[9:0]            |
                                           +-----------------+  STOP_P_D       +-----------------------+
                                                                (start)            STOP_P_W (end of pulse)
```

## Timing of one input cycle

```
P_IN      _/‾\_____________________________________________/‾\____
TRG_P'    ‾‾‾‾‾‾‾\_/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
P_D       ‾‾‾‾‾‾‾‾‾\________T_dC_______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
STOP_P_D  ____________________________/‾\_________________________
P_OUT     ______________________________/‾‾‾‾‾T_W‾‾‾‾‾\___________
STOP_P_W  ________________________________________/‾\_____________
```

Take E as the first clock edge that samples `P_IN` high. Then:

- `P_OUT` rises at edge `E + SYNC_STAGES + 1 + t_dc`.
- `P_OUT` falls exactly `t_w` edges later.
- `SYNC_STAGES + 1` is a constant intrinsic delay: 3 cycles, 6 ns, with the
  default two synchroniser stages. Subtract it to get the programmed delay.
- `P_D` is low for exactly `t_dc` cycles.
- `STOP_P_D` and `STOP_P_W` are one-cycle pulses in the last cycle of their
  intervals.

**Period rule.** The delay plus the width must fit inside the input period:
`T_dC + T_W (+ intrinsic delay) <= T_C`. For example, with `T_C` = 2000 ns
(1000 cycles), codes 497 and 499 use 999 of the 1000 cycles.

Nothing in hardware checks this rule. If it is broken, the pulse is still
high when the next delay interval starts. While `P_D` is low, the
controller holds its count, so the pulse is stretched by the length of that
interval. The start that the next cycle sends is ignored, so that cycle
produces no pulse of its own.

**Code 0** means a zero-length interval:

- `t_dc = 0`: `P_D` never goes low. The pulse starts one cycle after the
  trigger, which is the same formula with `t_dc = 0`.
- `t_w = 0`: there is no output pulse. `STOP_P_W` coincides with `STOP_P_D`.

Hold the codes stable while a pulse is in flight.

## How an interval is timed

The delay generator and the duty-cycle controller are built from the same
four parts:

| part | module | role |
|---|---|---|
| SR flip-flop | `sr_flipflop` | Set by the start pulse and cleared by the stop pulse. While it is set, the interval is running. Reset wins over set. |
| 10-bit synchronous counter | `sync_counter` | Counts clock cycles while the interval runs. Cleared by the stop pulse. Gives the count in both polarities, `b` and `b_n`. |
| switch network | `tg_switch_network` | For each bit, passes `b[i]` when the code bit is 1 and `b_n[i]` when it is 0. All outputs are then 1 exactly when the count equals the code. |
| stop-pulse decoder | `stop_pulse_decoder` | ANDs the switch-network outputs and asserts STOP on a match, but only while an interval is starting or running. |

This structure comes from a transmission-gate circuit. The code drives the
gates directly, and the decoder is a plain all-ones detector.

**Count alignment.** In the original asynchronous circuit the stop pulse
clears the latch as soon as it appears. A clocked version has to place the
match so that the interval still lasts exactly `code` cycles:

- The counter also advances in the start cycle itself.
- So the count is k during the k-th cycle of the interval.
- The match `count == code` therefore falls in the last cycle.
- The flip-flop clears at the next edge.
- An idle counter rests at zero, so code 0 already matches in the start
  cycle. That gives the zero-length interval.

**The two users differ only in their wiring:**

- `delay_generator`
  - Start: active-low `TRG_P'`.
  - Output: `P_D`, the inverted flip-flop output, low while counting.
  - Stop: `STOP_P_D`, which also serves as the controller's start.
  - A start that arrives during a running interval is ignored.
- `duty_cycle_controller`
  - Start: `STOP_P_D`.
  - Output: `P_OUT`, the flip-flop output.
  - Enable: `P_D`. The counter advances only while `P_D` is high, except in
    the start cycle, when `P_D` is still low by construction.

## Trigger generator

`P_IN` is external and has no fixed phase to the clock. It passes a
two-stage synchroniser (`SYNC_STAGES`). A further flip-flop then holds the
previous level, and a 0→1 step between the two is a leading edge. The
trigger `TRG_P'` is registered, active low and one cycle long.

`P_IN` must be low for at least one clock cycle between pulses. A `P_IN`
that is already high when reset is released counts as an edge.

## Where this RTL departs from the original circuit

The original is a full-custom 0.13 µm CMOS circuit. Its timing relies on a
gated clock and asynchronous latches. This RTL keeps the block structure
and the programming behaviour, but makes it fully synchronous:

- **Gated clocks.** The counter clocks `G.CLK_1` and `G.CLK_2` became count
  enables on the one system clock.
- **SR latches.** They became clocked SR flip-flops.
- **Transmission gates.** They became a per-bit selection.
- **Delay and width are exact.** Each is an exact number of clock periods,
  with a 3-cycle intrinsic offset on the delay only. The original circuit
  has an analog intrinsic delay of about 5 ns. Its published examples
  disagree about that offset: code 93 is quoted as 186 ns, but code 497 as
  999 ns.
- **Own design choices.** The trigger generator's insides, reset behaviour,
  code-0 behaviour, and what the `P_D` enable does when the period rule is
  broken are all choices of this design. The original gives only the
  function of these.
- **Not modelled.** Analog results have no counterpart here: the behaviour
  across process, voltage and temperature corners, the layout with its
  guard rings, area and power.

## Files

| file | content |
|---|---|
| `rtl/cdl_pkg.sv` | Constants: `CODE_W` = 10, `SYNC_STAGES` = 2, nominal clock and step. |
| `rtl/coarse_delay_line.sv` | Top. Parameters `W` (code width) and `SYNC_STAGES`. |
| `rtl/trigger_generator.sv` | Trigger generator. |
| `rtl/delay_generator.sv` | Delay generator. |
| `rtl/duty_cycle_controller.sv` | Duty-cycle controller. |
| `rtl/sync_counter.sv`, `rtl/stop_pulse_decoder.sv`, `rtl/tg_switch_network.sv`, `rtl/sr_flipflop.sv` | The shared parts. |
| `tb/tb_<module>.sv` | One self-checking testbench per module. |

All registers use one clock (`clk`) and an asynchronous active-low reset
(`rst_n`). `delay_generator` asserts that `STOP_P_D` lasts one cycle.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. For example:

```
verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv --top-module tb_coarse_delay_line \
  rtl/cdl_pkg.sv tb/tb_coarse_delay_line.sv -o sim
./obj_dir/sim
```

`tb_coarse_delay_line` runs the top at its default parameters with a 2 ns
clock. It predicts every `P_OUT` edge independently of the design and
covers:

- delay code 1 and 996 with width 1;
- delay/width pairs 93/207 and 497/499 at a 2000 ns input period;
- a delay sweep from 0 to 1000 in steps of 50, plus 1023, checking that the
  delay is exactly linear in the code;
- 25 random delay/width/period settings that obey the period rule, with
  input pulses 1 to 3 cycles wide;
- zero delay and zero width;
- a mis-programmed period, to show the stretch-and-absorb behaviour.

It counts each of these mechanisms and fails if one never occurs. It runs
in well under a second.

The unit testbenches check the following:

- `tb_sync_counter`: random enable/clear and wrap-around.
- `tb_tg_switch_network`: random per-bit selection.
- `tb_stop_pulse_decoder`: every count for a set of codes.
- `tb_sr_flipflop`: random set/reset, including reset winning.
- `tb_trigger_generator`: random input runs against a sampled-history model.
- `tb_delay_generator` and `tb_duty_cycle_controller`: interval lengths,
  stop placement, code 0, ignored restarts and the enable pause.

## Changing it

- Raise `W` on the top for a longer range. The range is `2^W` clock periods.
- Raise `SYNC_STAGES` for more metastability margin. It must be at least 1,
  and each extra stage adds one cycle of intrinsic delay.
- The step is the clock period, so the clock frequency sets the resolution.
