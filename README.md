# Multiphase high-resolution DPWM from a single delay line

A multiphase DC-DC converter needs one PWM signal per power stage. The
signals must share one switching period and be spaced evenly in phase, yet
each needs its own on-time so the controller can correct mismatch between
the stages. Building one high-resolution modulator per phase wastes area.
It also gives every phase its own delay-line errors.

This design makes all phases from **one** ring oscillator. The ring is
built from identical delay elements. It supplies the master clock
`clk_base`, and its taps supply every fine delay that the phases need. Each
phase has only a little comparison logic and combinational output logic.
Any drift of the ring, from temperature, supply or jitter, hits every phase
in the same way, so the phases stay matched.

The default configuration is four phases, 13-bit duty commands and a ring
of 256 delay elements of about 200 ps each. The RTL is parameterized in the
coarse width, the fine width and the number of phases.

## Time base and duty command

The ring has `N_DE = 2^L` delay elements of delay `t_de`, and it toggles
every `N_DE` elements:

    f_b = 1 / (2 * N_DE * t_de)          (9.77 MHz for 256 x 200 ps)

Tap `de[k]` is `clk_base` delayed by `k` elements, for `k = 0 .. N_DE-1`.

A duty command of `M + 1 + L` bits (4 + 1 + 8 = 13 by default) is read as
three fields:

| field    | bits (default) | unit                              |
|----------|----------------|-----------------------------------|
| `D_MSB`  | `D[12:9]`      | whole `clk_base` periods          |
| `D_HALF` | `D[8]`         | half a `clk_base` period          |
| `D_LSB`  | `D[7:0]`       | single delay elements             |

The three weights are `2*N_DE`, `N_DE` and `1` element delays, so the
on-time is simply `D * t_de`. The switching period is `N_sw` clock periods,
with `N_sw` chosen at run time up to `2^M` = 16:

    f_sw = f_b / N_sw                    (610 kHz at N_sw = 16, t_de = 200 ps)

A `D_MSB` of `N_sw` or more gives 100 % duty.

## How one pulse is built

Each phase has a position `r` in its own switching cycle. It is
`r = (counter + d_ph) mod N_sw`, which is 0 in the clock period that opens
that phase's cycle. The shared counter exists twice. `counter_p` changes on
the rising edge of `clk_base`. `counter_n` is the same count taken over on
the falling edge, half a period later. From these counts the comparison
block of a phase makes four windows:

| window | condition          | open during (T = clk_base period)     |
|--------|--------------------|---------------------------------------|
| `c1`   | `r_p <  D_MSB`     | `[0, D_MSB*T)`                        |
| `c2`   | `r_p <= D_MSB`     | `[0, (D_MSB+1)*T)`                    |
| `c3`   | `r_n <  D_MSB`     | `[T/2, D_MSB*T + T/2)`                |
| `c4`   | `r_n <= D_MSB`     | `[T/2, (D_MSB+1)*T + T/2)`            |

`Delay_x` is the phase's tap `de[D_LSB]`. It is `clk_base` delayed by
`y = D_LSB` elements, where `y` is less than half a period. It is low for
the first `y` elements of each clock period and high for the first `y`
elements of each low half. The output logic picks its fine tail from one of
these two intervals:

* `D_HALF = 0`: `pwm = c1 | (~Delay_x & c3)`.
  `c1` covers the whole periods. In the next half period only `c3` is
  open, and `~Delay_x` holds the output high for `y` more elements. The
  pulse ends at `D_MSB*T + y*t_de`.
* `D_HALF = 1`: `pwm = c1 | c3 | (Delay_x & c2)`.
  `c1 | c3` reach half a period past `D_MSB*T`. `Delay_x & c2` then adds
  `y` elements of the following low half. The pulse ends at
  `D_MSB*T + T/2 + y*t_de`.
* `D_MSB = 0`: `c1` and `c3` never open, so `c4` marks the first half
  period instead. The output is `c2 & ~c4 & ~Delay_x` for `D_HALF = 0` and
  `c2 & (~c4 | Delay_x)` for `D_HALF = 1`.

Every edge of the pulse therefore comes either from a clock-domain window
or from the shared delay line, and the fine edge of every phase comes from
the same line. In silicon, the skew between the window flip-flops and the
multiplexer outputs must be kept well below half a clock period. Placement
of the line, the multiplexers and this logic is what keeps that margin.

## Phases, shifts and command updates

`N_ph` phases are active, with 1 to 4 allowed. Phase `x` opens its cycle
at count `S_x = (x-1) * N_sw / N_ph`, so consecutive phases are
`360/N_ph` degrees apart: 180 degrees for two phases and 90 degrees for
four. Its comparison block adds the shift
`d_ph = (N_sw/N_ph) * (N_ph - (x-1))`, which is 0 for phase 1. `N_sw`
should be a multiple of `N_ph`. For example, `N_ph = 3` works with
`N_sw = 12`.

The governing block decides when commands are sampled:

* `D_x` is loaded on the clock edge that opens phase `x`'s cycle, which is
  the rising edge of its pulse. The controller can therefore deliver a new
  command for some phase `N_ph` times per switching period. Each pulse is
  formed from one command only.
* `N_sw` and `N_ph` are loaded on the edge that opens phase 1's cycle.
  When the number of phases is reduced (phase shedding), the dropped phases
  go low at once. Pulses that were in progress at the moment of a change of
  `N_sw` or `N_ph` may be cut short or stretched. The first cycle of every
  phase under the new setting is exact.
* `cntrl[k]` is high while the count equals `k`. It divides the switching
  period into `N_sw` sections that the controller can use to time its
  sampling of currents and voltage.
* `rst_freq` is high on count `N_sw - 1` and makes the counter wrap.

The `counter_n` comparisons use copies of `N_sw` and `d_ph` taken on the
falling edge. This keeps them consistent with `counter_n` across a change
of configuration.

## Modules

    hrdpwm_top
    ├── ring_oscillator      behavioural model of the N_DE-element ring
    ├── main_counter         counter_p (rising edge), counter_n (falling edge)
    ├── governing_block      rst_freq, cntrl, load strobes, d_ph, phase enables
    ├── command_registers    N_sw[n], N_ph[n], D_1[n] .. D_N[n]
    ├── mux_array            one 2^L:1 tap multiplexer per phase
    └── per phase: comparison_logic -> output_logic
    hrdpwm_pkg               default sizes, cmp_t (the four windows)

Each file begins with a description of its timing and interface.

### Top-level interface (`hrdpwm_top`)

| port        | dir | width        | meaning                                                         |
|-------------|-----|--------------|-----------------------------------------------------------------|
| `rst`       | in  | 1            | asynchronous reset, active high; also stops the ring            |
| `nsw_in`    | in  | `M`          | switching period in `clk_base` periods; 0 means `2^M`           |
| `nph_in`    | in  | `clog2(N+1)` | active phases, 1 .. N (0 is taken as 1, more than N as N)       |
| `duty_in`   | in  | `N x (M+1+L)`| duty command per phase                                          |
| `pwm`       | out | `N`          | PWM outputs                                                     |
| `clk_base`  | out | 1            | master time base                                                |
| `cntrl`     | out | `2^M`        | section strobes                                                 |
| `counter_p` | out | `M`          | shared count                                                    |

Parameters: `M_BITS` (4), `L_BITS` (8, so `N_DE = 256`), `N_PH` (4) and
`T_DE_PS` (200). `T_DE_PS` matters only to the ring model.

Hold `rst` for at least `N_DE * t_de` (51.2 ns by default) so the ring is
flushed. After reset `N_sw = 2^M`, `N_ph = 1` and all duty commands are 0.
New commands take effect at the next cycle start of the phase they belong
to. Change the inputs away from the rising edges of `clk_base`.

## Simulation

The ring model uses delays, so simulate with timing enabled. For the
full-size end-to-end test:

    verilator --binary --timing --assert -Irtl rtl/hrdpwm_pkg.sv \
              tb/tb_hrdpwm_top.sv --top-module tb_hrdpwm_top
    ./obj_dir/Vtb_hrdpwm_top

Every testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=N failures=F` line. The unit testbenches build the same
way with their own `--top-module`.

`tb_hrdpwm_top` runs the default configuration for about 150 switching
periods. It samples each output once per delay element and checks the
following:

* every pulse starts at its phase's slot;
* every pulse is one contiguous run of exactly `D` elements, or the whole
  period when `D_MSB >= N_sw`;
* phases that are shed stay low;
* the switching period is `N_sw * 2 * N_DE * t_de`.

The scenarios cover these settings:

* four phases at `N_sw = 16` with the commands
  1012/5300/4320/2182 and 2250/6538/5550/3428;
* two phases with commands 7236 and 7352;
* two phases at `N_sw = 8`;
* `D = 0`, `D_MSB = 0`, `D_MSB = 15` and saturation;
* a ramp of one LSB per period across the half-period and whole-period
  steps;
* 40 random configurations with commands that change every half period.

`tb_hrdpwm_workloads` runs the silicon's operating point, with
`T_DE_PS = 209`, four phases and `N_sw = 16`. It checks the following:

* `f_sw` is 584 kHz and the command update rate is `4 * f_sw` = 2.34 MHz;
* the rising edges of the four phases are exactly a quarter period apart;
* on a 200-step ramp of every phase, each one-LSB step lengthens the pulse
  by exactly one element, including across the half-period and
  whole-period boundaries;
* equal commands give equal on-times on all four phases.

It takes about half a minute.

`--assert` enables two checks in the governing block. One checks that the
count stays inside the switching cycle. The other checks that `N_sw` is a
multiple of `N_ph`.

The unit testbenches check each block against models written
independently of it. The output logic, for example, is replayed tick by
tick against the pulse length it should produce for every `D_MSB`,
`D_HALF` and `y`.

## Choices and limits

* **The ring is a model.** In silicon it is a chain of placed
  standard-cell buffers, and its timing comes from the cells.
  `ring_oscillator` reproduces that timing with delays and is not meant for
  synthesis. Everything else is synthesizable. The ring's combinational
  loop is deliberate.
* **`clk_base` is tap 0.** The element that closes the ring is counted as
  one of the `N_DE` delays. With this convention, `D_LSB = 0` adds nothing
  and the on-time is exactly `D * t_de`.
* **Frequency.** With `t_de = 200 ps` and `N_sw = 16`, `f_sw` is 610 kHz.
  The silicon this design follows ran at 583.5 kHz, which corresponds to
  `t_de` ≈ 209 ps. Set `T_DE_PS = 209` to model that speed.
* **Comparisons and output gates.** The comparisons are written directly
  as the window lengths above. The gate functions of the output logic are
  derived from the required pulse timing. The special branch for
  `D_MSB = 0` is this design's own. No special branch is needed for the
  largest `D_MSB`, because the windows saturate instead of wrapping.
* **Command timing.** The exact update points, the encoding of `N_sw`
  (0 for `2^M`), the order of the phases, the reset values and the clamping
  of `N_ph` are this design's own choices. `N_sw` and `N_ph` change once
  per switching period, at the start of phase 1's cycle. They do not change
  at every phase's command update.
* **Command registers.** They are clocked by `clk_base`, with the
  governing block's strobes as load enables. The whole module therefore has
  a single clock and no derived clocks.
* **Not built.**
  * A length-programmable delay chain, which would select the time base at
    run time. Here `N_DE` is a parameter.
  * Sampling each command more than once per switching cycle.
  * A triangular (up/down) counter variant.
  * Calibration or PVT compensation of `t_de`.
  * The controller, A/D converter and power stages that surround the
    modulator.
  * The drive buffers between the ring taps and the multiplexers, which
    have no logic function.
* **Command range.** Commands are 13 bits, so the longest on-time is
  `8191 * t_de`. Larger values cannot be represented.
