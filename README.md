# Glitch-free clock multiplexer for clocks that may stop

A classic glitch-free clock switch turns the old clock off before it turns the
new one on, and it does both through synchronizer flip-flops clocked by the
clocks themselves. That is what makes it safe, and it is also its weak spot:
if the currently selected clock has already stopped, its own synchronizer
never moves, the old enable never drops, and the switch never lets the new
clock through. A common case is a block clocked from an SPI clock during a
transfer and from a system clock otherwise: once the transfer has ended and
the SPI clock is idle, a plain switch cannot return to the system clock.

This RTL adds one small *activity timer* per input clock to the classic
switch. A timer is clocked by the other input clock and held in reset by the
clock it watches. As long as the watched clock toggles, the timer is cleared
over and over and has no effect. When the watched clock stops and a switch
away from it is requested, the timer is no longer cleared. A few edges of the
other clock later it raises a *disable* line. That line asynchronously clears
the stuck enable chain, and the switch then completes as usual. The multiplexer
still has only the select and the two clocks as inputs. It needs no reset, no
third monitor clock and no outside controller.

The repository also contains the use case that motivated the design: TMR
(triple-modular-redundant) configuration registers that must keep a running
clock, taken from a TX clock in normal operation and from the SPI clock during
SPI transfers.

## Structure

```
cfg_clocking_top                 configuration-register clocking (top)
├── stopclk_mux                  the multiplexer
│   ├── activity_timer  x2       Timer_clk0 watches clk0, Timer_clk1 watches clk1
│   ├── transition_detect x0..2  only with ACT_MODE = ACT_TRANSITION (behavioural)
│   └── conv_clkmux              classic cross-coupled switch with disable inputs
└── tmr_cfg_reg                  TMR register bank with refresh
clkmux_pkg                       act_mode_e, timer_min_stages()
```

## The classic switch inside (`conv_clkmux`)

Each clock owns a chain of two flip-flops:

| signal     | definition                                              |
|------------|---------------------------------------------------------|
| `sel_clk1` | `sel & ~en_clk0`                                        |
| `sel_clk0` | `~sel & ~en_clk1`                                       |
| first flop | samples `sel_clk<n>` on the rising edge of `clk<n>`     |
| `en_clk<n>`| second flop, copies the first on the falling edge of `clk<n>` |
| `clk_o`    | `(clk0 & en_clk0) \| (clk1 & en_clk1)`                  |

Each chain can only start once the other enable is low (cross-coupling), and
an enable only changes while its clock is low. So `clk_o` never carries a
pulse shorter than a half period of one of the inputs. Both flops of a chain
have an active-high asynchronous reset, `disable_clk<n>`. Held low, the
disable inputs leave the textbook switch. With both clocks running, a change
of `sel` takes this path: the old enable falls at the falling edge that
follows the next rising edge of the old clock. The new enable then rises the
same way on the new clock.

## Switching away from a stopped clock (`stopclk_mux`)

The two timers are wired crosswise:

| timer        | time base (clock) | armed by (`din`) | reset from | output         |
|--------------|-------------------|------------------|------------|----------------|
| `Timer_clk0` | `clk1`            | `sel`            | `clk0`     | `disable_clk0` |
| `Timer_clk1` | `clk0`            | `~sel`           | `clk1`     | `disable_clk1` |

A timer is armed only while its clock is *not* the selected one. Example:
`clk0` is selected, then stops low, and later `sel` goes to 1.

1. The `clk0` chain cannot move, so `en_clk0` stays high and the `clk1` chain
   is blocked, as in a classic switch.
2. `Timer_clk0` is no longer reset, because `clk0` rests low. The 1 on its
   input walks through its `STAGES0` flops on the rising edges of `clk1`.
3. On the `STAGES0`-th rising edge of `clk1` after `sel` changed,
   `disable_clk0` rises. It clears `en_clk0` at once. `clk0` is low, so
   `clk_o` does not change.
4. The `clk1` chain captures its request on the next rising edge and sets
   `en_clk1` on the falling edge after it. `clk_o` then carries `clk1`, and
   its first pulse is a full high phase.

With the default `STAGES0 = 2`, `en_clk1` rises on the falling edge after the
third rising edge of `clk1`. The testbenches check this edge count exactly.
`disable_clk0` stays high while `sel = 1` and `clk0` is idle. It drops
`STAGES0` edges after `sel` returns to 0, or as soon as `clk0` toggles again.
Switching *to* a stopped clock is harmless. The old clock is released
normally and `clk_o` stays low until the new clock starts.

### What drives a timer's reset

Only the watched clock's *rest level* matters. A running clock must assert
the active-high timer reset at least once per period. A stopped clock must
leave it inactive. `ACT_MODE0` and `ACT_MODE1` choose the case:

| `act_mode_e`     | timer reset               | use when a stopped clock rests ... |
|------------------|---------------------------|------------------------------------|
| `ACT_DIRECT`     | the clock itself          | low (default)                      |
| `ACT_INVERTED`   | the inverted clock        | high                               |
| `ACT_TRANSITION` | `transition_detect` pulse | at an unknown level                |

`transition_detect` XORs the clock with a delayed copy of itself, which gives
a pulse `DELAY` long on every edge. A delay line is a timing cell, not logic,
so this module is a behavioural model (`assign #DELAY`). In an
implementation it becomes a chain of library delay cells. `DELAY` must be
shorter than the watched clock's half period and long enough to reset the
timer flops.

## Sizing the timers

A timer must never time out while the clock it watches is still running.
Otherwise it would drop that clock's enable before the classic switch has
done so. Take `ACT_DIRECT` and a watched clock with a 50 % duty cycle. The
reset is released for half of the watched clock's period, and in that time
the timing clock has at most `floor(r/2) + 1` rising edges, where
`r = f_timing / f_watched`. The chain therefore needs

```
STAGES = max(2, floor(f_timing / (2 * f_watched)) + 2)
```

`clkmux_pkg::timer_min_stages(f_timing, f_watched)` computes this for integer
frequencies in any common unit. Two stages is the floor, for metastability.
The timer that is clocked by the slower clock always needs only two. The
timer that watches the slower clock grows with the ratio:

* ratio 1.4 gives 2 and 2;
* ratio 3.4 gives 2 and 3;
* ratio 10 gives 2 and 7.

For duty cycles far from 50 %, size for the longest rest phase instead. With
a transition detector the reset pulses come on both edges, so the same bound
applies.

When the ratio is large, `USE_COUNTER = 1` replaces both chains with a
synchronizer flop, a saturating binary counter and a registered output. The
output is registered so that the disable line, which is an asynchronous reset,
cannot glitch. Its timeout is still exactly `STAGES` edges. After disarming it
releases in 2 edges instead of `STAGES`.

`tb_stopclk_mux` runs clocks 3.4x apart with stages from `timer_min_stages`
and watches for any timeout while both clocks run. With the timer that
watches the slow clock cut from 3 to 2 stages, that monitor fires
repeatedly.

## Application: clocking TMR configuration registers (`cfg_clocking_top`)

`tmr_cfg_reg` stores each bit three times and presents the bitwise majority.
On every edge of its clock, each copy reloads either the write data or the
voted value. A single upset is thus outvoted at once and repaired at the next
edge. The refresh only works while the registers get a clock, so the
registers must have one in every mode. `cfg_clocking_top` connects:

* `clk0` to `tx_clk_i`, the normal-mode clock;
* `clk1` to `spi_clk_i`, which only toggles during a transfer;
* `sel` to `spi_mode_i`;
* the multiplexer output to the registers.

When a transfer ends the SPI clock is already idle. Returning to the TX clock
is therefore exactly the stopped-clock switch above. The SPI slave is not part
of this RTL. Its register write port (`wr_en_i`, `wr_addr_i`, `wr_data_i`,
synchronous to the SPI clock) is a top-level port.

Register count, width, write port and reset are choices of this RTL:
`NUM_REGS = 4` and `WIDTH = 8`, with an active-low asynchronous reset to
`RESET_VALUE`. The three copies carry `(* keep *)` attributes, because they
are logically identical and a synthesis tool would otherwise merge them. A
real radiation-hard flow would use dedicated TMR cells and placement rules.

## Parameters

| module            | parameter          | default      | meaning |
|-------------------|--------------------|--------------|---------|
| `stopclk_mux`     | `STAGES0/STAGES1`  | 2 / 2        | flops in the timer watching clk0 / clk1 |
|                   | `USE_COUNTER`      | 0            | counter instead of shift chain |
|                   | `ACT_MODE0/1`      | `ACT_DIRECT` | timer-reset conditioning per clock |
|                   | `TD_DELAY`         | 1            | transition-detector delay (time units) |
| `activity_timer`  | `STAGES`, `USE_COUNTER` | 2, 0    | as above |
| `tmr_cfg_reg`     | `NUM_REGS`, `WIDTH`, `RESET_VALUE` | 4, 8, 0 | register bank shape |
| `cfg_clocking_top`| `NUM_REGS`, `WIDTH`, `STAGES0/1` | 4, 8, 2/2 | passed down |

The defaults of two stages per timer are the published minimum. In
`cfg_clocking_top` they suit TX/SPI frequency ratios below 2. For other
clocks, set `STAGES0` and `STAGES1` from `timer_min_stages`.

## Departures and limits

* **No reset in the multiplexer.** The published design has only the select
  and clock inputs, and so does this one. From an arbitrary power-up state,
  the switch settles within about two cycles of each clock when both run. If
  an enable powers up set while its clock is idle and not selected, the
  matching timer clears it.
* **Two-state simulation at power-up.** A simulator without X values may
  start a disable line at 1. The asynchronous reset then sees no edge, so it
  does not clear the enable chain, although a real flop would be cleared by
  the level. The top-level testbench therefore runs both clocks for a few
  cycles after time 0 before idling the SPI clock.
* **Output gating.** A falling-edge second flop and AND/OR gating were chosen
  as the standard way to keep the gated clock free of short pulses. In a
  netlist, use the library's clock-gating and clock-mux cells with balanced
  paths.
* **Counter timers and reset conditioning** (`USE_COUNTER`, `ACT_MODE`) are
  this RTL's way of offering the options the architecture mentions. Their
  details are not taken from it.
* **One multiplexer in the top.** The host chip uses the multiplexer twice,
  but only the configuration-register use is described, so only that one is
  built. The serializer/deserializer and the SPI slave are not included.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/clkmux_pkg.sv tb/tb_cfg_clocking_top.sv \
          --top-module tb_cfg_clocking_top -o sim && ./obj_dir/sim
```

Use the same command for `tb_stopclk_mux`, `tb_stopclk_mux_stop_switch`, `tb_conv_clkmux`,
`tb_activity_timer`, `tb_transition_detect` and `tb_tmr_cfg_reg`. Adding
`+verilator+rand+reset+2 +verilator+seed+<n>` randomises the power-up state.
All testbenches pass with random power-up states.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_conv_clkmux` | No short pulses, never both enables, exact switch-over edges. A stopped clock leaves the classic switch stuck, and the disable input frees it. |
| `tb_activity_timer` | Chain (3 stages) and counter (5 stages): no timeout under a pulsing reset, and timeout on exactly the `STAGES`-th edge. Also checks release timing and asynchronous clear. |
| `tb_stopclk_mux` | Three instances: direct, inverted and transition-detect with counters. Clocks stop low, then high. Running switches, switches away from a stopped clk0 and a stopped clk1, and switching back to a stopped clock. Exact disable and enable edges, no glitch, no timeout while both clocks run. |
| `tb_stopclk_mux_stop_switch` | Default parameters, clocks 1.5x apart. The selected clock stops low and the select then moves to the running clock. Repeated with different stop and switch times, with the disable and enable edges checked exactly. |
| `tb_transition_detect` | One pulse of exactly `DELAY` per edge, none at either rest level. |
| `tb_tmr_cfg_reg` | Random writes against a reference. Single upsets are masked and repaired in one edge, and a double upset shows through. |
| `tb_cfg_clocking_top` | Default parameters. Normal TX operation, SPI transfers in both start orders with writes on the SPI clock, and the return to TX after the SPI clock stops. Also a TX clock failing while selected, and upsets repaired under either clock. Every mechanism is counted and must occur. |

Times in the testbenches are abstract units. Only the ratios between half
periods matter.
