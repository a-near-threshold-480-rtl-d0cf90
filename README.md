# Near-threshold all-digital PLL with a bootstrapped DCO

This is a SystemVerilog model of an all-digital PLL that runs from a 0.25–0.5 V
supply. At 0.5 V it multiplies a 30 MHz reference by 16 to 480 MHz. At 0.25 V
it multiplies 3 MHz to 48 MHz. The architecture is the one published in "A
Near-Threshold 480 MHz 78 μW All-Digital PLL With a Bootstrapped DCO". That
design rests on two ideas:

* **A bootstrapped ring oscillator.** Each delay cell swings from −V_C to
  2·V_C, so the next stage's transistors are driven into strong inversion even
  though the supply is near threshold. As a result the frequency is close to
  linear in the ring supply V_C.
* **V_C is set digitally.** A weighted, thermometer-controlled PMOS resistor
  network sets V_C from a 9-bit code. A 4-bit sigma-delta modulator dithers
  the code's LSB, which makes the tuning 16 times finer.

Everything around the oscillator is ordinary digital loop hardware: a phase
frequency detector, a phase selector, a 4-bit Vernier time-to-digital
converter, a PI loop filter and a divide-by-16 counter.

The loop logic is synthesizable RTL: the TDC decoder, loop filter,
sigma-delta modulator, binary-to-thermometer converters and divider. The
timing cells and the analog parts are behavioural models with real delays:
the PFD, the arbiters, the delay lines, the resistor network and the ring.
Together they let the whole loop acquire and hold lock in an event-driven
simulation.

## Signal path

```
 f_ref ──►┌─────┐ up ┌────────────┐ lead ┌─────────────┐ sign,code ┌─────┐ code[8:0] ┌──────┐
          │ pfd │───►│ phase_     │─────►│ vernier_tdc │──────────►│ dlf │──────────►│ bdco │──► f_out
 f_fb ───►│     │ dn │ selector   │ lag  │ 16 stages   │  (4 bit)  │ PI  │ frac[3:0] │      │    phase[4:0]
    ▲     └─────┘───►│ (sign)     │─────►│ + tdc_t2b   │           └─────┘──┐        └──────┘
    │                └────────────┘      └─────────────┘    clk = f_ref     ▼           ▲  │
    │                                                                   ┌─────┐ dither  │  │
    │                                                                   │ sdm │─────────┘  │
    │                                                                   └─────┘◄── f_out ──┤
    │                         ┌──────────────────┐                                         │
    └─────────────────────────│ freq_divider /16 │◄────────────────────────────────────────┘
                              └──────────────────┘
```

| module | kind | what it does |
|---|---|---|
| `adpll_top` | structural | the loop above |
| `pfd` | model | tri-state PFD: UP on a reference edge, DN on a feedback edge, both cleared after `T_RST` |
| `phase_selector` | model | arbiter picks which of UP/DN rose first (`sign`); delayed pulses steered to LEAD/LAG |
| `phase_comp` | model | the arbiter cell: first rising edge wins, held while both inputs are low |
| `vernier_tdc` | model | two delay chains (T+ΔT, T), 16 arbiters, then `tdc_t2b` |
| `tdc_t2b` | RTL | 16-bit thermometer → 4-bit binary (ones count, saturated at 15) |
| `dlf` | RTL | PI filter, Kp = 2⁻¹, Ki = 2⁻⁴, clocked by the reference |
| `sdm` | RTL | 4-bit first-order sigma-delta; its carry is the dither bit |
| `bdco` | model | `b2t` ×3 → `wtrn` → `btro` |
| `b2t` | RTL | binary → thermometer (2→3, 3→7, 4→15 switches) |
| `wtrn` | model | switch pattern → V_C (real) |
| `btro` | model | 5-stage ring, f = K_BT·(2β·V_C − V_th) |
| `freq_divider` | RTL | 4-bit counter, MSB is F_OUT/16 |
| `tdelay` | model helper | transport delay (every edge reproduced, however narrow the pulse) |
| `adpll_pkg` | package | widths, gains and the `dco_ctrl_t` / `phase_err_t` types |

## Turning a phase error into a number

This is the part of the loop where timing, not logic, decides correctness.

**PFD.** A reference edge raises UP and a feedback edge raises DN. Once both are
high, a reset clears them after `T_RST`. The pulse that started first is
therefore longer by exactly the phase error. Both pulses end at the same time.
If the feedback is too slow, a second reference edge arrives while UP is
still high and is ignored. UP then keeps leading, and the loop sees a
frequency error as a persistent "speed up".

**Phase selector.** The Vernier TDC can only measure a positive delay from LEAD
to LAG. An arbiter (`phase_comp`, IN1 = UP, IN2 = DN) decides which edge came
first and outputs `sign`:

* `sign = 1`: UP was first. LEAD is delayed UP and LAG is delayed DN.
* `sign = 0`: DN was first. LEAD is delayed DN and LAG is delayed UP.

UP and DN pass through `T_DT` buffers before the two multiplexers. This lets
`sign` settle before the edges reach the multiplexers, so no glitch is routed.

**Vernier TDC.** LEAD runs through 16 buffers of delay `T_STAGE + DT`, and LAG
through 16 buffers of delay `T_STAGE`. After every stage, LEAD has lost `DT` of
its head start. Comparator k checks whether LEAD is still ahead after stage
k+1. The 16 comparator outputs therefore form a thermometer code with about
`head_start / DT` ones. `tdc_t2b` counts the ones and saturates at 15. With
`DT = 15 ps` the TDC spans 0–225 ps; larger errors read as 15.

**Timing rule the models make explicit.** An arbiter only decides correctly if
its two input pulses overlap. If LEAD has ended before LAG arrives, the late
LAG edge is taken as a new decision. Each comparator sees the two pulses with
up to 16·DT of relative skew. The shorter (LAG) pulse, whose width is the PFD
reset delay, must therefore be longer than 16·DT. The default `T_RST` is
300 ps for DT = 15 ps, and the 0.25 V test uses 3 ns for DT = 156 ps. If you
shorten `T_RST` below that, codes near lock become garbage: ones appear at the
top of the thermometer. An assertion in `adpll_top` (`a_therm_clean`) checks
this at every reference edge and fires if the code has a bubble. A second
assertion, in `phase_selector`, checks that `sign` never switches while a
delayed pulse is still in the multiplexers.

**Sampling.** The loop filter samples `sign` and the code on the next reference
edge. A measurement is complete about 16·(T_STAGE + DT) ≈ 1.2 ns after the
later edge, long before the next reference edge 33 ns later. The error made at
reference edge n therefore reaches the DCO after edge n+1.

## Loop filter and its scaling

`dlf` implements H(z) = Kp + Ki/(1 − z⁻¹). On each reference edge:

```
e    = sign ? +code : -code                  // -15..15
acc  = clamp(acc + Ki·e)
out  = clamp(acc + Kp·e)                     // registered
code[8:0] = integer part of out  -> DCO switches
frac[3:0] = next four bits       -> sigma-delta modulator
```

Everything is fixed point in DCO-code units with 8 fraction bits (17 bits in
total). Both the accumulator and the output clamp at 0 and 511 + 255/256
rather than wrap.

The scaling between the TDC and the DCO code is a design choice of this
implementation. **One TDC LSB is worth one SDM LSB, i.e. 1/16 of a DCO code.**
So Kp·e moves the code by e/32, and Ki·e moves it by e/256 per reference
cycle. Here is why, at the 0.5 V point:

* One DCO code (563 kHz) changes the 480 MHz period by 2.44 ps. Over 16
  output cycles that shifts the feedback edge by 39 ps per reference cycle.
* With the 1/16 weighting, one 15 ps TDC step corrects 1.22 ps through the
  proportional path, a loop gain of 0.08 per cycle. The integral gain is 0.005.
* That gives a crossover near 0.46 MHz and about 56° of phase margin after
  the 1.5-cycle sampling delay. The original design targets 60°.
* With a 1:1 weighting, the proportional gain alone would be 1.3 per cycle,
  which is unstable with the sampling delay.

In simulation the loop acquires from code 256 (≈ 458 MHz) in about 1000
reference cycles. While the TDC is saturated it slews the integrator by
15/256 code per cycle. It then settles with the phase error inside the
TDC's ±15 ps dead zone.

## The bootstrapped DCO

The 9-bit code is split three ways. Each field has its own `b2t` converter
driving a group of PMOS switches between VDD and V_C:

| field | bits | switches | weight per switch (fine steps) |
|---|---|---|---|
| coarse | D[8:7] | 3 | 128 |
| medium | D[6:4] | 7 | 16 |
| fine | D[3:0] | 15 | 1 |
| dither | SDM carry | 1 | 1 |

The switches are sized to their weight, so V_C rises linearly with the code.
`wtrn` models this ideally:

V_C = VDD − (512 − n)·VC_LSB, where n = 128·#coarse + 16·#medium + #fine + dither.

The `sdm` modulator is clocked by the DCO output. It adds the 4-bit fraction
to a 4-bit register, and its carry is the dither bit. Over 16 DCO cycles the
carry is high `frac` times, so the average code gains frac/16.

`btro` is the 5-stage ring. Its stage delay follows the first-order law for
the bootstrapped cell, f = K_BT·(2β·V_C − V_th), with β = 0.9 and
V_th = 0.24 V. K_BT = 912 MHz/V makes the ring run at 602 MHz at V_C = 0.5 V.
VC_LSB = 0.343 mV then gives the 563 kHz/code DCO gain of the 0.5 V point. The
resulting DCO law is

f = 602 MHz − (512 − code − dither) × 563 kHz   (314 MHz at code 0, 480 MHz at code ≈ 295).

The ring re-reads V_C at every transition. `phase[4:0]` are the five stage
outputs; with their complements they are the ten output phases. `rst_n` low
holds the ring in the state 0,1,0,1,0, so it always starts with a single
travelling edge.

## Operating points and what was verified

| testbench | setting | result |
|---|---|---|
| `tb_adpll_top` | defaults, 0.5 V: 30 MHz ref, DT 15 ps, 563 kHz/code | locks after ~1055 ref cycles at code ≈ 295.3; exactly 4096 DCO edges in 256 ref cycles; phase error < 60 ps throughout |
| `tb_adpll_lv` | 0.25 V: 3 MHz ref, DT 156 ps, 213 kHz/code, model re-scaled (60 MHz at code 512) | locks after ~733 ref cycles at code ≈ 455.6; 48 MHz |

Both end-to-end tests also count each loop mechanism and fail if one never
happens:

* reference-leads and feedback-leads decisions;
* saturated, in-range and zero TDC codes;
* PFD frequency detection (a reference edge arriving while UP is still high);
* dither pulses;
* loop-filter code changes.

Every block also has its own self-checking testbench, `tb/tb_<module>.sv`.
Each compares the block against values computed independently in the
testbench.

## Where this departs from the original design, and how far to trust it

* **Loop filter register placement.** The original filter drawing takes the
  integral term from the register output, which adds a cycle. This
  implementation follows the stated transfer function Kp + Ki/(1 − z⁻¹)
  instead, and registers the sampled error.
* **TDC-to-DLF scaling, sign convention and saturation** are this
  implementation's choices (see above).
* **Analog models are first-order.**
  * The resistor network is ideally linear, and the ring follows only the
    linear (2β·V_C − V_th) law fitted at 0.5 V.
  * The DCO range at 0.5 V is therefore 314–602 MHz. The fabricated loop
    locked from 176 to 480 MHz.
  * The model does not reproduce the ring's low-voltage behaviour (the real
    ring reaches 40 MHz at 0.2 V; the law gives 109 MHz).
  * Jitter, phase noise, power and process corners are not modelled.
* **Delays not given by the original design are assumed:**
  * PFD clock-to-output 10 ps and reset 300 ps;
  * phase-selector Δt 40 ps;
  * TDC stage 60 ps;
  * arbiter decision 5 ps.
* **Arbiters never go metastable.** A tie keeps the previous decision.
* **The T2B decoder** counts ones, so it is bubble tolerant, and maps 16 ones
  to 15.
* **Reset is this implementation's addition.** `rst_n` resets the filter to
  `INIT_CODE` = 256, clears the SDM and divider, and stops the ring.
* **Not modelled:** the test chip's bootstrapped output level shifters and pad
  drivers, and the reference input buffer.

## Simulating

Any testbench runs with plain Verilator 5 (`--timing` is required for the
delay models):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/adpll_pkg.sv tb/tb_adpll_top.sv --top-module tb_adpll_top
./obj_dir/Vtb_adpll_top
```

Replace `tb_adpll_top` with any other testbench. Each one prints
`TB_RESULT checks=N failures=M`. `tb_adpll_top` simulates about 45 µs in well
under a second. All files use `timescale 1ps/1fs`, and every model delay is in
picoseconds. Lint reports ZERODLY for the ring's run-time stage delay; that
delay is always positive.

## Changing it

* **Shared constants.** Widths, the Kp/Ki shifts and the divide ratio are in
  `adpll_pkg`. The DLF's internal fraction width follows as
  `DLF_FRAC = SDM_BITS + KI_SHIFT`.
* **Top-level parameters** select the operating point: `INIT_CODE`, `TDC_DT`,
  `TDC_T`, `PFD_T_RST`, `VDD`, `VC_LSB` and `K_BT`. `tb_adpll_lv` shows the
  0.25 V set. Keep `PFD_T_RST > 16·TDC_DT`.
* **Loop gain.** To change it, change `KP_SHIFT`/`KI_SHIFT`, or the TDC
  weighting constant `LSB_SH` in `dlf`.
* **Synthesis.** The synthesizable blocks are `dlf`, `sdm`, `tdc_t2b`, `b2t`
  and `freq_divider`. On silicon the others are full-custom timing and analog
  cells; their models here are for simulation only.
