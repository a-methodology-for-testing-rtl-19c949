# Delay testing at arbitrarily low test frequency with controlled-delay flip-flops

A delay fault makes a combinational path slower than its clock period without
changing its logic function. Finding such faults normally means running the
chip at its rated clock on a tester that can place edges to within a fraction
of that period, and for multi-GHz parts those testers are scarce and costly.

This design moves the timing-critical part of the test onto the chip. Every
register is built from **controlled-delay flip-flops (CDFFs)**. A CDFF has a
second clock, the test clock TCLK, that decides when captured data may move
from its master latch to its slave latch. An on-chip generator derives both
clocks from one slow, 50%-duty input clock, IPCLK, so that:

* the time a combinational path gets to settle, from the launching edge to the
  capturing edge, is set by two on-chip delays, Td1 and Td2;
* the rest of the input-clock period is absorbed as extra clock-to-Q delay,
  t_offset, in the flip-flops.

The input clock can therefore be slowed down as far as wanted (the tests run at
100 MHz and at 100 kHz) while the path under test still gets exactly the
same short window of 575 to 1325 ps. In normal mode the generator is bypassed
and the CDFFs are ordinary flip-flops.

The trick that allows an unbounded period is in the generator. It does not make
TCLK by delaying the clock. It makes the clock by delaying and inverting the
test clock. Both clocks are then formed from the same falling edge of IPCLK,
and nothing inside the generator depends on how far apart the IPCLK edges are.

## Timing relations

Take two CDFF registers with a combinational block between them:

```
d1 -> [CDFF reg 1] -> q1 -> (combinational block) -> d2 -> [CDFF reg 2] -> q2
```

In test mode, one IPCLK period (frequency f) looks like this:

```
IPCLK   ‾‾‾‾‾\________________________________/‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾\____
TCLK    _______/‾‾‾‾‾‾\___________________________________ ... _______/‾‾
               |<-Td1->|
CLK     ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾‾‾‾
               |<--Td2-->|<-Td1->|
               ^ launch          ^ capture                         ^ next launch
                                 |<----------- t_offset ---------->|
```

* **Launch.** TCLK rises. Each register's slave opens and q1 shows the value
  its master captured one period earlier.
* **Capture.** CLK rises Td1 + Td2 after the launch. Register 2's master closes
  on d2.
* **Offset.** The captured value waits in the master until the next TCLK rising
  edge, t_offset later.

The relations are:

```
Td1 + Td2 = t_prop + t_comb + t_setup      (window given to the path)
1 / f     = Td1 + Td2 + t_offset           (the period only changes t_offset)
```

Td1 is programmable in 16 steps of 50 ps, from 275 ps to 1025 ps. Td2 is fixed
at 300 ps. The window therefore runs from 575 ps to 1325 ps. Real flip-flops
take about 175 ps of that window (the design basis is a 122 ps worst-case
propagation delay and a 53 ps setup time), which leaves combinational paths of
400 ps to 1150 ps. That covers logic meant for 2.5 GHz. The RTL flip-flop
has zero propagation and setup time, so in simulation the path gets the whole
Td1 + Td2.

To find a delay fault, pick the setting whose window matches the path's
specified delay and run the test at any convenient IPCLK rate. A path that is
too slow makes register 2 capture the old value.

## Controlled-delay flip-flop (`cdff`)

The CDFF is a master-slave pair of latches:

| latch  | transparent while | holds while   |
|--------|-------------------|---------------|
| master | CLK = 0           | CLK = 1       |
| slave  | CLK = 1 and TCLK = 1 | otherwise  |

In normal mode TCLK is tied high, so the cell is an ordinary rising-edge
flip-flop on CLK. In test mode CLK is high most of the time, with a short low
pulse (CLK2). The master samples D during that pulse and captures it on the
rising edge. The slave stays shut until TCLK rises, one IPCLK period later.
Because the slave enable includes CLK, the slave shuts whenever CLK falls,
even if TCLK is still high. The two latches are never open at the same time,
even at the widest setting, where the TCLK pulse and the CLK low pulse overlap
by 725 ps.

The cell is written as two `always_latch` processes. Lint tools report them as
latches, which is intended. The original cell is a transistor-level circuit
with its own control logic. This RTL reproduces its behaviour rather than its
gates: the enable `CLK & TCLK` is inferred from how the cell is meant to
behave, not copied from a schematic.

## Test-clock generator (`test_clock_gen`)

```
            +--------------------------- buffer (B_IPCLK) ------------+
            |                                                         NOR -> CLK1 (TCLK)
IPCLK --+---+-> 26-element tapped line -> 16:1 MUX -> inv (D_IPCLK) --+
        |                 ^               (2 outputs)
        |          4x16 decoder <- S0-S3          -> inv (DD_IPCLK) --+
        |                                                             OR  -> CLK2 (CLK)
        +-> 6-element fixed line (300 ps) -> buffer (DB_IPCLK) -------+
```

When IPCLK falls, B_IPCLK falls almost at once. D_IPCLK, the inverted and
delayed IPCLK, is still low, so the NOR output CLK1 goes high. It goes low
again when the falling edge has run through the selected tap. The result is
one CLK1 pulse of width Td1 per IPCLK period. The lower half does the same
thing, delayed by the fixed 300 ps line and built with an OR, which gives a
CLK2 low pulse of the same width, Td2 after CLK1. When IPCLK rises, the
buffered copies rise before the inverted taps fall, so no pulse forms on that
edge.

### Delay element (`delay_element`)

A delay element is two inverters in series. A PMOS current source gated by Vp
starves the pull-up of the first inverter. An NMOS current source gated by Vn
starves the pull-down of the second. Only a falling input edge passes through
the starved transistors, and only that edge matters for timing. That edge is
set to 50 ps with Vp = Vss and Vn = Vdd. Moving Vp towards Vdd - Vth, or Vn
towards Vss + Vth, slows the element down. A rising edge passes through the
small, unstarved transistors and is faster: 30 ps in this model.

In the model, each half of the falling delay scales with 1 / (gate overdrive)
of its current source:

```
t_fall = 25 ps * (VDD - VTH) / (VDD - vp - VTH) + 25 ps * (VDD - VTH) / (vn - VTH)
```

The model uses VDD = 1.8 V and VTH = 0.45 V. The overdrive is clamped at
10 mV. This law is a stand-in for the transistor-level curve. Because rising
edges are faster, a low pulse loses 20 ps per element. That limits the fastest
usable test-mode IPCLK to roughly 1 GHz, which is far above the rate the
scheme is meant for. A low pulse shorter than 20 ps is swallowed.

### Programmable line, decoder and multiplexer

The 26-element line has 27 tap points, 0 to 26, spaced 50 ps apart. For setting
`s` (S0 is the least significant bit), the decoder drives one of 16 one-hot
lines. That line selects two taps at once:

| output  | tap         | falling-edge delay | becomes                  |
|---------|-------------|--------------------|--------------------------|
| d_tap   | 5 + s       | 250 + 50 s ps      | D_IPCLK  (Td1 edge)      |
| dd_tap  | 11 + s      | 550 + 50 s ps      | DD_IPCLK (Td1 + Td2 edge)|

The two taps are always six elements (300 ps) apart, so a single decoder
serves both outputs. The buffers B_IPCLK and DB_IPCLK are 25 ps faster than
the multiplexer-plus-inverter path, and that difference turns the 250 ps tap
into the 275 ps minimum Td1:

```
Td1 = 50 ps * (5 + s) + T_INV - T_BUF = 275 ps + 50 ps * s        (s = 0..15)
Td2 = 6 * 50 ps = 300 ps
```

The two lines use 26 + 6 = 32 delay elements. The gate delays in `cdff_pkg` are
T_INV = 60 ps, T_BUF = 35 ps and T_GATE = 40 ps. The NOR and OR share one
delay. Only the differences between these values affect Td1 and Td2.

## Mode multiplexer and pins (`mode_mux`, `sel_shift_reg`)

| mode   | N/T | CLK   | TCLK |
|--------|-----|-------|------|
| normal | 0   | IPCLK | 1    |
| test   | 1   | CLK2  | CLK1 |

The scheme needs seven extra pins: N/T, Vp, Vn and S0-S3. The four select pins
can be replaced by one serial pin and a small shift register. In the top this
is the static parameter `SERIAL_SELECT`:

* `0` (default): the select comes from `s_pins`.
* `1`: the select comes from `sel_shift_reg`. Its interface is `sr_clk`,
  `sr_en`, `sr_in` and `sr_rst_n`. The word is shifted in MSB first, and reset
  gives setting 0.

The shift register is present in both cases. Vn could be derived from Vp as
Vdd + Vss - Vp, or both voltages could come from an on-chip DLL. Neither is
part of this RTL: `vp` and `vn` are `real` input ports, in volts.

## Top level (`cdff_test_top`)

The top holds these parts:

* the generator;
* the mode multiplexer;
* the serial-select register;
* two CDFF registers, each WIDTH bits wide (default 1).

Its ports are:

* `ipclk`: the input clock.
* `n_t`: the mode select.
* `s_pins`: the four delay-select pins.
* `sr_*`: the serial-select interface.
* `vp`, `vn`: the control voltages.
* `d1`, `q1`, `d2`, `q2`: the register ports around the combinational block.
  The block itself is the user's logic and lives outside the top.
* `clk`, `tclk`: the selected clocks, for the chip's clock networks. The TCLK
  network should be a replica of the CLK network, so that the two clocks see
  the same skew.

## Files

| file | kind | content |
|------|------|---------|
| `rtl/cdff_pkg.sv` | package | mode enum, sizes, tap layout, model voltages and gate delays |
| `rtl/cdff.sv` | RTL (latches) | controlled-delay flip-flop, WIDTH bits |
| `rtl/mode_mux.sv` | RTL | normal/test clock selection |
| `rtl/decoder_4x16.sv` | RTL | S0-S3 to one-hot |
| `rtl/tap_mux.sv` | RTL | dual-output 16:1 tap multiplexer |
| `rtl/sel_shift_reg.sv` | RTL | serial loading of S0-S3 |
| `rtl/transport_delay.sv` | behavioural | exact transport delay used by the timing models |
| `rtl/delay_element.sv` | behavioural | current-starved delay element |
| `rtl/delay_line.sv` | behavioural | tapped chain of N elements |
| `rtl/prog_delay_line.sv` | behavioural | 26-element line with decoder and multiplexer |
| `rtl/clk_gate_network.sv` | behavioural | buffers, inverters, NOR and OR |
| `rtl/test_clock_gen.sv` | behavioural | complete CLK1/CLK2 generator |
| `rtl/cdff_test_top.sv` | top | everything above |

The behavioural files stand for analog circuits whose function rests on their
delays. They use `real` control voltages and timed event queues. They simulate,
but they do not synthesize. In silicon they would be full-custom cells. The
decoder, multiplexer, mode multiplexer, shift register and CDFF are ordinary
logic.

Every file states `timeunit 1ps; timeprecision 1fs;`. All delays are in
picoseconds.

## Simulating

Each testbench in `tb/` checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top tb_cdff_test_top rtl/cdff_pkg.sv tb/tb_cdff_test_top.sv
./obj_dir/Vtb_cdff_test_top
```

Name the package first. Verilator finds the other modules through `-y`. Every simulation runs in well under a second.

| testbench | what it shows |
|-----------|---------------|
| `tb_delay_element` | 50 ps falling and 30 ps rising delay; slowdown with Vp and Vn; pulse shrink and swallowing |
| `tb_delay_line` | tap i sees the falling edge at 50·i ps and the rising edge at 30·i ps |
| `tb_decoder_4x16`, `tb_tap_mux`, `tb_mode_mux`, `tb_sel_shift_reg` | function tables |
| `tb_prog_delay_line` | both taps for all 16 settings, always 300 ps apart |
| `tb_clk_gate_network` | pulse widths and spacing from ideal delayed inputs |
| `tb_test_clock_gen` | Td1 = 275 + 50·s ps, Td2 = 300 ps and one pulse per period, for all settings at 100 MHz and 100 kHz |
| `tb_cdff` | flip-flop in both modes, including the overlap of TCLK and the CLK low pulse |
| `tb_cdff_test_top` | end to end (see below) |
| `tb_cdff_test_top_full` | default top, setting 0, 100 MHz then 100 kHz, random data, 500 ps path |

In `tb_cdff_test_top`, the combinational block is an inverter with a
programmable delay. The testbench covers these cases:

* **Normal mode at 2.5 GHz.** A path shorter than the period passes and one
  longer than the period fails.
* **Test mode at 100 MHz, every setting.** A path 10 ps inside the window
  passes and one 10 ps outside fails.
* **Test mode at 100 kHz.** The same windows give the same results.
* **t_offset.** It equals 1/f - Td1 - Td2.
* **Serial select.** A second instance with `SERIAL_SELECT = 1` is loaded
  serially and produces the loaded Td1.

## Limits and departures

* The gate-level circuit of the CDFF is not reproduced, only its behaviour. The
  RTL cell has no propagation or setup time, so measured windows are Td1 + Td2
  rather than Td1 + Td2 - t_prop - t_setup. For the same reason, the limits of
  the flip-flop cannot be found in this RTL: the minimum Td2, which equals the
  worst-case propagation delay of 122 ps, and the setup margin of 53 ps.
* Several choices are this design's own:
  * the tap layout (taps 5..20 and 11..26 of a 26-element line);
  * the 25 ps buffer advantage that sets the 275 ps minimum;
  * the 30 ps rise delay;
  * the gate delays;
  * the voltage-to-delay law.

  They were chosen to meet the design targets: 50 ps steps, Td1 from 275 to
  1025 ps, Td2 = 300 ps and 32 elements in all.
* The model has no process, voltage or temperature spread and no mismatch. Its
  delays are exact. A transistor-level line of this kind shows errors of up to
  about ±16% per tap, and a Td2 near 298 ps instead of 300 ps.
* Vp and Vn are plain `real` ports. On-chip generation of them, for example by
  a DLL, is not included. Neither are the clock distribution networks.
* `transport_delay` outputs start at 0 and follow their inputs from the first
  change. Allow one IPCLK period after power-up before relying on the clocks.
* The mode and select inputs are meant to be static while IPCLK runs. Changing
  them mid-period can produce a runt pulse, as in the real circuit.
