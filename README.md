# Self-power-gated asynchronous digital watch

A 24-hour digital watch (00:00:00 to 23:59:59, then back to 00:00:00) built as a
ripple of three clockless timer blocks, in which **each block's own clock is also
its power switch**. The combinational logic of a timer (the incrementer and the
"last count" comparator) is powered only while that timer's clock input is high.
The count lives in always-on flip-flops that load on the falling edge, so the
logic can be switched off for the whole time between clock pulses without losing
the time. No power-management controller, handshake circuit or replica delay line
is needed to decide when a block may sleep. The clock pulse that makes the block
work is the same pulse that wakes it up.

Because the minute logic only has to work once a minute and the hour logic once
an hour, those domains spend almost all their time switched off. The minute and
hour clocks come out of clamp-to-0 isolation cells. These cells also stop the
floating outputs of a sleeping block from reaching the block after it.

## Structure

```
            +-------------------+                 +-------------------+                 +-------------------+
 CLK ------>| second timer      |  ENA_M   +----+  | minute timer      |  ENA_H   +----+  | hour timer        |
            |  mod 60, 6 bit    |--------->|AND |->|  mod 60, 6 bit    |--------->|AND |->|  mod 24, 5 bit    |
            |  [switch on CLK]  |     CLK->|ISOL|  |  [switch on       |CLK_M_PG->|ISOL|  |  [switch on       |
            +-------------------+          +----+  |   CLK_M_PG]       |          +----+  |   CLK_H_PG]       |
                 | second_o             CLK_M_PG   +-------------------+       CLK_H_PG   +-------------------+
                                                        | minute_o                              | hour_o
```

| module | role |
|---|---|
| `aspg_watch` | top: three timers and two isolation cells, wired as above |
| `aspg_timer` | one timer block: always-on falling-edge flip-flops, gated logic, footer switch |
| `timer_comb` | the gated logic: next count `(q+1) mod MOD` and terminal flag `q == MOD-1` |
| `isol_cell` | clamp-to-0 isolation, `out = in & en` |
| `nmos_footer_switch` | behavioural model of the NMOS footer switch (power-good with wake and sleep delays) |
| `aspg_pkg` | moduli (60, 60, 24), widths (6, 6, 5), seconds per day |

Top-level ports of `aspg_watch`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i` | in | 1 | CLK, one pulse per second |
| `rst_ni` | in | 1 | asynchronous active-low reset to 00:00:00 |
| `second_o`, `minute_o` | out | 6 | binary 0..59 |
| `hour_o` | out | 5 | binary 0..23 |
| `clk_m_pg_o`, `clk_h_pg_o` | out | 1 | the derived minute and hour clocks |
| `pwr_o` | out | 3 | powered state of the second [0], minute [1] and hour [2] logic |

## One second, step by step

This is the part that takes some getting used to. Take the CLK pulse that ends
second 59 of minute 59 (the time reads hh:59:59):

1. **CLK rises.** The second timer's footer switch turns on and its logic wakes.
   It computes next = 0 and raises its terminal flag ENA_M, because the count is 59.
   The minute isolation cell now has EN = CLK = 1, so CLK_M_PG = ENA_M = 1. This
   rising CLK_M_PG powers the minute logic. The minute logic sees 59, computes 0
   and raises ENA_H. The hour isolation cell has EN = CLK_M_PG = 1, so CLK_H_PG
   rises too, and the hour logic wakes and computes hh+1 mod 24. All three domains
   are now awake, for the length of this one CLK high phase.
2. **CLK falls.** CLK_M_PG = ENA_M & CLK falls with it, and CLK_H_PG = ENA_H &
   CLK_M_PG falls with that. So all three registers load on the *same* edge:
   seconds 59->0, minutes 59->0, hours +1. Each derived clock lags CLK only by its
   AND gate. It does not lag by a flip-flop and a ripple of logic per level.
3. **Just after the edge.** Each footer switch is still holding its virtual ground
   low for a short tail (`T_SLEEP_PS`, 20 ps). That tail is why the flip-flops can
   capture the gated logic's output on the very edge that switches the logic off.
   After the tail the logic floats, and its floating terminal flags are blocked by
   the isolation cells, whose enables are now low.
4. **CLK low.** All combinational logic is off and only the flip-flops hold the
   time. On an ordinary second, only step 1's second-timer part happens. The
   minute and hour logic do not wake at all, because CLK_M_PG stays clamped at 0.

A ripple watch without gating would raise its minute clock when the seconds
reach 59 and drop it one full second later. Here the minute clock is a single
pulse that sits inside the CLK pulse after second 59, and the hour clock sits
inside that one. This keeps the minute and hour domains asleep for all but one CLK
high phase per minute or per hour. It also removes the per-level ripple delay
from the minute and hour updates.

Measured with `tb_aspg_workloads` (CLK period 100 us), the fraction of time each
domain is powered is:

| CLK duty cycle | second logic | minute logic | hour logic |
|---|---|---|---|
| 0.01 % | 0.010 % | 0.00017 % | 0.0000027 % |
| 1 % | 1.000 % | 0.017 % | 0.00027 % |
| 50 % | 50.00 % | 0.84 % | 0.0135 % |

The second logic is on for T_on + 20 ps per pulse. The minute and hour logic are
on only during the pulses after second 59 and after 59:59.

## Modelling an unpowered domain in a two-state simulator

A switched-off block has outputs at no defined logic level. RTL simulators that
have no X (Verilator among them) cannot show that. So `timer_comb` drives its
outputs to a fixed "floating" value while its domain is unpowered. The value is
set by `FLOAT_D` and `FLOAT_EN`, and the default is all ones. That default is
physical: with a footer switch the virtual ground drifts up towards V_DD, so the
outputs drift high. It is also the value that turns a missing isolation cell into
a false clock edge, so the testbenches see that fault. Tying an isolation enable
high makes the top-level test fail hundreds of thousands of checks.

`nmos_footer_switch` turns the switch's analog behaviour into a power-good bit:

- `T_SLEEP_PS` (default 20 ps) is how long outputs stay valid after the enable
  falls. It must be shorter than the CLK low time and shorter than the narrowest
  CLK pulse.
- `T_WAKE_PS` (default 0 ps) is the wake-up latency after the enable rises. In
  silicon it ranges from about a hundred to several hundred picoseconds,
  depending on the switch width and the temperature. It is left at 0 on
  purpose. The isolation cell's enable is the same clock that wakes the
  domain. During a non-zero wake-up, a floating-high terminal flag would
  therefore pass the AND gate as a short false pulse. In this model that false
  pulse would clock the next timer. A real implementation has to
  make sure that such a runt is too weak to trigger the next flip-flop, or it
  must delay the isolation enable. Setting `T_WAKE_PS` above 0 shows this hazard
  in simulation.

These two delays are the only timing in the design. The switch model uses
`#` delays and `always @` processes, so it is a behavioural model. Everything
else is synthesizable, and in a real flow the switch is a physical cell.
`aspg_timer` also asserts that its flip-flops never load while its domain is
unpowered.

## Choices made here

- **Encoding:** plain binary counts, bit 0 is the LSB. The hour register is 5
  bits wide.
- **Reset:** an asynchronous active-low reset to 00:00:00 was added for power-up.
  Without it, the count starts wherever the flip-flops power up. Out-of-range
  values then count up until the binary register wraps.
- **Hour terminal flag:** the hour block's terminal-count output (`q == 23`) is
  left open. Nothing uses a day carry.
- **Not modelled:** transistor sizing, leakage and switching power, wake-up time
  over switch width and temperature, and the clock buffers on CLK, CLK_M_PG and
  CLK_H_PG. These decide how much power the scheme saves. None of them changes
  what the logic does.
- **Not included:** the ungated ripple watch that this scheme improves on. Only
  the gated design is provided.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog. To build and run the full-day test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/aspg_pkg.sv tb/tb_aspg_watch.sv --top-module tb_aspg_watch -o sim
./obj_dir/sim
```

Any other testbench runs the same way. Replace the file and the top module name.

| testbench | what it shows |
|---|---|
| `tb_aspg_watch` | the top at default parameters through one whole day plus two minutes (86,520 pulses), checked against an hh:mm:ss reference after every pulse. It also checks that the derived clocks pulse once per minute and once per hour, only inside a CLK high phase, and fall on the CLK falling edge. It checks that all domains sleep in CLK low while the isolation cells hold the floating flags at 0, and that the counts are retained through every sleep. It prints how often each of these happened and fails if any never did. |
| `tb_aspg_workloads` | the watch under a duty-cycle sweep (0.01 % to 50 %) and a CLK-low-time sweep (0.1 us to 90 us). It integrates each domain's powered time and compares it with the exact expected value. |
| `tb_second_timer`, `tb_minute_timer`, `tb_hour_timer` | one `aspg_timer` (mod 60, mod 60, mod 24) under regular or sparse irregular clock pulses. It checks the wake, the load on the falling edge, the floating flag and the retention. |
| `tb_timer_comb` | every count value, powered and unpowered, for mod 60 and mod 24 |
| `tb_isol_cell` | all input combinations and random ones |
| `tb_nmos_footer_switch` | wake and sleep timing of the default switch and of one with a 50 ps wake-up and an 80 ps tail |

The full-day run takes well under a second. To change the moduli or widths, edit
`aspg_pkg`. To change the switch timing, set the `T_WAKE_PS` and `T_SLEEP_PS`
parameters of `aspg_watch`.
