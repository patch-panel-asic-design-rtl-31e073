# Patch-Panel ASIC — SystemVerilog model

The Patch-Panel ASIC sits between the front-end boards of a muon trigger
chamber and the trigger logic. Each of its 32 channels receives a
discriminator hit from an ASD (amplifier-shaper-discriminator) board over
LVDS. The chip delays the hit in steps of about 1 ns to even out time of
flight and cable length, and then decides in which 25 ns bunch crossing of the
40 MHz machine clock the hit happened. This is bunch-crossing identification,
BCID. A hit close to a crossing boundary can be reported in two adjacent
crossings, so that no hit is lost to clock jitter or to spread in arrival time.
The chip also sends a test pulse to each ASD board, with a programmable delay,
width, polarity and amplitude. All of it is set over SPI. The configuration
registers use majority voting so that a single radiation upset is corrected.

The chip's delays are made by chains of analog delay cells, not by logic. One
common control voltage holds every cell at 25 ns / N, and a PLL sets that
voltage by locking a ring of N cells to the clock. This model keeps the digital
parts as synthesizable RTL. The analog parts (receiver, delay line, PLL) are
behavioural models that use `#` delays.

## Channel path

```
 INx/INx_ ─► LVDS rx ─► XOR POL ─┬──────────────────────────────► OUT (BYPASS=1)
                                  └► variable delay (DL_DLY_CONT)
                                        └► BCID ─────────────────► OUT (BYPASS=0)
 CLK ─► variable delay (BCD_DLY_CONT)  = BCID_Delay ─┘ │
 CLK ─► variable delay (BCD_GATE_CONT) = BCID_Gate  ───┘
```

* **Polarity.** Wire boards send active-high hits and strip boards send
  active-low ones. POL = 1 inverts the receiver output.
* **Bypass.** BYPASS = 1 sends the corrected level straight to the output,
  with no delay and no BCID. The output is then asynchronous.
* **Delay.** The channel delay, BCID_Delay and BCID_Gate each have one 6-bit
  code per 16-channel port. A code of k gives k unit delays, where 0 ≤ k ≤ 47.
* **Mask.** DL_MASK = 0 silences a channel in BCID mode.

## Bunch-crossing identification (`pp_bcid`)

This is the part that takes the most care to understand. Two delayed copies of
the 40 MHz clock are used:

* **BCID_Delay** edges `D(k)` are the crossing boundaries. Moving them shifts
  the whole 25 ns grid against the arrival time of the hits.
* **BCID_Gate** edges `G(k)` follow each `D(k)` by a lag
  `δ = (t_gate − t_delay) mod 25 ns`, where `0 ≤ δ < 25 ns`.

Crossing `k` reports every hit that arrives in `(D(k−1), G(k)]`. This window is
`25 ns + δ` wide, so the effective gate is adjustable from 25 to 50 ns. Hits
in `(D(k), G(k)]` fall in the windows of both crossing `k` and crossing
`k+1`, and are reported twice. All other hits are reported once.

```
        D(k-1)                 D(k)     G(k)           D(k+1)
 ─────────┼──────────────────────┼────────┼──────────────┼─────
           <──── window of crossing k ───>
                                  <────── window of crossing k+1 ──...
                                  ^^^^^^^^^ reported in k and k+1
```

How it is built:

* A 2-bit Gray counter is clocked by the hit itself and advances on every
  unmasked rising edge. A hit of any width is captured, whatever its phase.
* The counter is sampled on every BCID_Gate edge and on every BCID_Delay edge.
  The BCID_Delay samples go into a 2-deep history.
* At `D(k+1)` the output flip-flop loads
  `(count(D(k)) ≠ count(D(k−1))) | (count(G(k)) ≠ count(D(k)))`. It stays high
  for one clock.

The latency is one crossing: the result for crossing `k` appears at `D(k+1)`.
Up to three hits per window can be told apart from no hit. At the 0.2 MHz
expected rate per channel, the average gap between hits is 5 µs.

## Delay units and the PLL (`pp_vdelay`, `pp_pll`, `pp_pfd`)

The PLL divides the 40 MHz clock by two. A ring of N cells closed by an
inverter is locked to that 20 MHz signal, which makes one trip around the ring
take 25 ns. Every cell of the chip shares the ring's control voltage V_CON, so
each one gives 25 ns / N:

| STEP pins | PLL_DLY_CONT | N  | unit delay | 47-step range |
|-----------|--------------|----|------------|---------------|
| 0         | 11111        | 32 | 0.78 ns    | 36.7 ns       |
| 1         | 11011        | 28 | 0.89 ns    | 42.0 ns       |
| 2         | 10111        | 24 | 1.04 ns    | 49.0 ns       |
| 3         | 10011        | 20 | 1.25 ns    | 58.8 ns       |

These are the ideal values. A fabricated chip has extra gates in its ring,
which makes its steps somewhat smaller (about 0.73 ns at N = 32).

In the model, V_CON is the port `vcon_ps`: the unit delay in picoseconds.
`pp_pfd` is the real phase-frequency detector, written as logic: two set
flip-flops that clear each other. The rest of `pp_pll` stands in for the
charge pump, the filter and the ring:

* it measures the lead of one clock over the other at each PFD event;
* it corrects the unit delay with a proportional-plus-integral update;
* it raises PLLLD after 16 comparisons in a row within 100 ps.

The model locks within about 80 cycles of the 40 MHz clock. CP_ON = 0 freezes V_CON,
as a floating control node would. `pp_vdelay` copies each input edge after
`code × vcon_ps`, as a transport delay.

## Test pulse generator (`pp_tpg`, `pp_tpg_out`)

* TPTRIG is sampled on the rising CLK edge, or on the falling edge when
  TPG_POL_IN = 1.
* A 7-flip-flop coarse delay follows, with taps 0–7 that give 0–175 ns.
* The pulse lasts TPG_PW_CONT clocks: from 25 ns up to 102.4 µs. The initial
  value of 400 gives 10 µs, and a code of 0 gives 4096 clocks.
* The pulse then passes a fine delay (TPG_DLY_CONT_F) and the output control.

If TPTRIG is first seen high at clock edge n, the pulse leaves the sequencer
at edge `n + 1 + coarse`. It reaches the pins after a further `fine × unit`.
Triggers that arrive during a pulse are ignored.

The output stage is an analog current-steering driver and is not modelled.
`pp_tpg_out` produces its controls:

* a thermometer enable for 1–15 current sources (TPG_DRV_CONT; 0 turns the
  driver off);
* the reference-branch enable;
* the 2-bit bias code;
* the logic level of TPULSE/TPULSE_ (swapped by TPG_POL_OUT).

## Configuration (`pp_spi_regs`, `pp_pkg`)

A frame is 224 bits, shifted MSB first in this order:

| part      | bits | main fields (MSB → LSB) |
|-----------|------|--------------------------|
| Channel B | 96   | BCD_GATE, BCD_DLY, TPG_PW(12), TPG_DLY_F, TPG_DLY_C(3), TPG_POL_OUT, TPG_POL_IN, TEST_DLY, TEST_POL, DL_DLY, DL_MASK(16), DL_BYPASS(16), DL_POL(16) |
| Channel A | 96   | same |
| PLL       | 8    | CP_ON, CP_CONT(2), DLY_CONT(5) |
| Common    | 24   | NC(6), CMOS_OUT_CONT, RX_BIAS, TPG_BIAS_ENB, TPG_BIAS, TPG_DRV_B(4), TPG_DRV_A(4), DL_BYPASS_SEL, DL_POL_SEL, PLL_DLY_SEL |

The exact positions and initial values are the packed structs of `pp_pkg`.

**Writing and reading.** The frame is written when SS_ rises, and only after
exactly 224 bits; other lengths are dropped. While a frame shifts in, MISO
returns the old contents in the same order, so every write is also a read.
MISO is valid while `miso_oe` is high.

**SPI mode.** CPOL and CPHA select the mode. Data are sampled on the rising
SCK edge when CPOL = CPHA, and on the falling edge otherwise.

**SCK rate.** SCK, SS_ and MOSI are oversampled by CLK, so SCK must stay high
and low for at least 3 CLK periods each. That allows up to about 5 MHz.

**Voting and SEU.** The configuration is held in three copies. Every clock,
each copy is rewritten with the bitwise majority of the three, so a single
upset is outvoted at once and repaired one clock later. SEU goes high when the
copies disagree, and stays high until a reset or the next written frame.

**Pins or registers.** After reset, the polarity and bypass of all channels
come from the POL and BYPASS pins, and the ring length from the STEP pins
(DL_POL_SEL = DL_BYPASS_SEL = PLL_DLY_SEL = 1). Clearing a select bit hands
control to the per-channel register bits. For the ring length, bits [3:2] of
PLL_DLY_CONT take over. RESET_ and RSPI_ (both active low) restore the
initial values.

## Choices made in this model

The register map, the pin list, the block structure and the timing rules above
come from the original chip's design report. The following were filled in or
settled here:

* **BCID window rule.** The combining logic and the Gray hit counter are this
  design's own. The report gives the flip-flop arrangement and a measured
  effective gate of 26–49 ns; this model gives 25–50 ns.
* **Test pulse width.** It is programmable, as in the register table. One pin
  description calls it a fixed 3 µs.
* **Trigger edge.** TPTRIG can be taken on either CLK edge, set by a
  register. The pin description mentions the rising edge only.
* **Test pulse polarity.** It is set by TPG_POL_OUT, not by the POL pin.
* **DELIN → DELOUT.** The test delay line uses Channel A's TEST_POL and
  TEST_DLY_CONT, and follows DL_POL_SEL. Channel B's copies are stored but
  drive nothing.
* **SPI framing.** The write on SS_ rising, the length check, MISO_OE, the
  sticky SEU flag and the oversampled SPI are not specified in the report.
* **Analog values.** The receiver delays (4.5–6.0 ns over the bias codes), the
  PLL loop gains and the lock rule are model values. So is the ideal 25 ns / N
  unit delay.
* **Not modelled.** The test-pulse current sources, the charge pump transistors,
  the bias generator, the pads and the CMOS drive strength are not modelled.
  Their register codes are brought out as ports of `pp_asic_top`.

## Files

| file | role |
|------|------|
| `rtl/pp_pkg.sv` | register-map structs, initial values, constants |
| `rtl/pp_asic_top.sv` | chip top: SPI, pin/register selection, PLL, two ports, test delay |
| `rtl/pp_port.sv` | one 16-channel port |
| `rtl/pp_bcid.sv` | BCID of one channel (RTL) |
| `rtl/pp_tpg.sv`, `rtl/pp_tpg_out.sv` | test pulse sequencer and output control (RTL) |
| `rtl/pp_spi_regs.sv` | SPI slave, voted registers, SEU (RTL) |
| `rtl/pp_pfd.sv` | phase-frequency detector (RTL) |
| `rtl/pp_pll.sv`, `rtl/pp_vdelay.sv`, `rtl/pp_lvds_rx.sv` | behavioural models |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_pp_rates.sv` | whole chip at the 10 MHz and 0.2 MHz hit rates |
| `tb/tb_pp_gate_width.sv` | effective BCID gate for every ring length and gate code |

`pp_asic_top`, `pp_port` and the three models use delays, so they simulate
only with timing support. The synthesizable subset is `pp_spi_regs`,
`pp_bcid`, `pp_tpg`, `pp_tpg_out` and `pp_pfd`. `pp_pfd` has an asynchronous
clear driven by its own flip-flops, as in the original.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/pp_pkg.sv tb/tb_pp_asic_top.sv --top-module tb_pp_asic_top -o sim
./obj_dir/sim
```

Replace the testbench to run another one. `tb_pp_asic_top` runs the whole chip
at its real sizes (32 channels, 224-bit frames) in well under a second. It
covers:

* PLL lock and relock after a ring-length change;
* SPI read-back;
* bypass with both polarities on all channels;
* about 600 random hits checked against the BCID window rule, including single
  and double crossings and masked channels;
* both test pulse generators: coarse and fine delay, width, falling-edge
  trigger and negative polarity;
* the DELIN/DELOUT delay;
* an injected register upset.

It counts each of these mechanisms and fails if any of them never happened.

`tb_pp_rates` checks the rates the chip is built for. It drives hits at
10 MHz on all 32 channels, in BCID mode and in bypass mode, and then random
hits at the expected 0.2 MHz per channel for 250 µs. Each hit must appear in
the right crossing or at the output pin.

`tb_pp_gate_width` measures the effective BCID gate the way a bench test
would. For each ring length and each BCD_GATE_CONT code it sends hits at 64
phases across one crossing. It counts how many are reported twice, and checks
the result against 25 ns plus the gate lag, to within 1 ns. Over all settings
the measured gate runs from 25.0 to 49.2 ns.
