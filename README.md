# NTC thermistor linearizer: a floating-point neuro-fuzzy core in SystemVerilog

An NTC thermistor in series with a 1 kΩ resistor across 5 V gives a voltage
that changes with temperature in a strongly non-linear way. The resistance
follows `R(T) = R0 · exp(β · (1/T − 1/T0))`, with R0 = 10 kΩ at T0 = 298 K
and β = 3950. This design turns each 12-bit ADC reading of that voltage into
an output that rises with temperature. The output goes to a 12-bit DAC and to
a PC.

The mapping is a small trained fuzzy model: a first-order Sugeno (TSK) system
of the kind an ANFIS (adaptive neuro-fuzzy inference system) produces. It has
one input `x`, the divider voltage, and two rules:

```
rule i:   if x is Tri_i  then  f_i = q_i·x + r_i          (i = 1, 2)

          f1(x)·Tri1(x) + f2(x)·Tri2(x)
    F  =  -----------------------------
               Tri1(x) + Tri2(x)
```

`Tri_i` is a triangular membership function. It is zero up to its left foot
`a`, rises linearly to 1 at its peak `b`, falls linearly to zero at its right
foot `c`, and stays zero after that. All arithmetic is IEEE-754 single
precision (binary32), computed in hardware by a float adder/subtractor, a float
multiplier and a bit-serial float divider.

## Signal chain and top level (`ntc_linearizer_top`)

```
 thermistor + 1k ──► MCP3202 ──SPI──► adc_mcp3202_if ──code──► anfis_core ──┬─► dac_mcp4921_if ──SPI──► MCP4921
                                                                             └─► uart_tx (7-byte frame) ──► PC
```

The top runs a free loop. It reads one conversion, runs the core, and then
writes the DAC and sends the UART frame in parallel. When both are finished it
starts the next sample. At the defaults (100 MHz clock, SPI at 1.56 MHz, UART
at 115200 baud) one sample takes about 61.9k clocks. That is roughly 1.6k
samples per second, and the UART frame takes most of that time.

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (100 MHz assumed by the defaults), asynchronous active-low reset |
| `adc_cs_n`, `adc_sclk`, `adc_mosi`, `adc_miso` | out/out/out/in | SPI to the MCP3202 |
| `dac_cs_n`, `dac_sclk`, `dac_sdi`, `dac_ldac_n` | out | SPI and LDAC to the MCP4921 |
| `uart_txd` | out | 8N1 serial line to the PC, idles high |
| `result`, `result_valid` | out | last output F as a float; a one-clock pulse for each new value |

| Parameter | Default | Meaning |
|---|---|---|
| `SPI_CLK_DIV` | 32 | SPI clock = clk / (2·SPI_CLK_DIV), for both converters |
| `CLKS_PER_BIT` | 868 | UART bit time in clocks (115200 baud at 100 MHz) |
| `DAC_FRAC` | 8 | DAC code = round(F · 2^DAC_FRAC), saturated to 0..4095 |

The PC frame is `A5h, {4'h0, code[11:8]}, code[7:0], F[31:24], F[23:16],
F[15:8], F[7:0]`. It carries the raw ADC code and the float output, most
significant byte first.

## The core (`anfis_core`)

This is the hard part to follow, because a few arithmetic units are shared
over several clocks. The core holds these units:

- the parameter ROM;
- two triangle blocks (`anfis_tri`). Each has two multipliers, an adder and a
  subtractor, so both branches of the triangle are computed at once, and float
  comparators pick the branch;
- two consequent blocks (`anfis_consequent`), each a multiplier and an adder;
- two shared multipliers (`mul_a`, `mul_b`) and two shared adders (`add_a`,
  `add_b`);
- the S⁻¹ unit. This is `fp_div` with its dividend tied to 1.0, so the one
  division becomes a reciprocal followed by a multiplication;
- the control unit (`anfis_ctrl`), a state machine whose state selects the
  operands of `mul_a` and which pipeline registers load.

The schedule, one row per clock:

| State | Work done in this clock (registered at its end) |
|---|---|
| `S_IDLE` + start | `xi = float(adc_code)` (exact: 12 bits fit in the 24-bit significand) |
| `S_SCALE` | `x = xi · 5/4096` on `mul_a` (volts) |
| `S_FUZZ` | `t1 = Tri1(x)`, `t2 = Tri2(x)`, `f1 = q1·x + r1`, `f2 = q2·x + r2` |
| `S_WEIGHT` | `m1 = t1·f1` on `mul_a`, `m2 = t2·f2` on `mul_b`, `S = t1 + t2` on `add_b` |
| `S_SUM` | `N = m1 + m2` on `add_a`; starts `1/S` on the divider |
| `S_DIV` | waits for the divider (27 clocks), then registers `1/S` |
| `S_OUT` | `F = N · (1/S)` on `mul_a`; DAC code from F |

`done` pulses 33 clocks after the clock edge that takes `start`. `f_out` and
`dac_code` stay valid until the next result. After reset the control unit
spends about 20 clocks copying the ROM into parameter registers. `ready` stays low
until that is done, so the datapath reads all parameters in parallel.

### ROM contents

The ROM stores the trained values and constants derived from them. The
derived constants mean the triangles need no divider:

```
rising branch   Tri(x) = ku·x + ou     ku = 1/(b−a)   ou = −a/(b−a)
falling branch  Tri(x) = od − kd·x     kd = 1/(c−b)   od =  c/(c−b)
```

| Word | Contents | Value |
|---|---|---|
| 0–6 | Tri1: a, b, c, ku, ou, kd, od | a = −3.13, b = −0.35, c = 5.169 |
| 7–13 | Tri2: a, b, c, ku, ou, kd, od | a = 0.21, b = 3, c = 6.305 |
| 14–17 | q1, r1, q2, r2 | 4.5, −0.03, 1.225, 0.5 |
| 18 | volts per ADC code | 5/4096 |

Each entry is the value above rounded once to single precision. The `p`
coefficients of the general Sugeno rule belong to a second input and are zero
here, so they are not stored. To use retrained parameters, replace the words
in `rtl/anfis_rom.sv` using the formulas above. The word order is the
`rom_word_e` enum in `fp_pkg`.

### What these parameters do

With the parameter values above, F rises steadily from about 0.03 at −40 °C to
about 8.3 at 140 °C. Some points from the end-to-end test:

| T (°C) | ADC code | x (V) | F |
|---|---|---|---|
| 15 | 244 | 0.298 | 1.295 |
| 35 | 548 | 0.669 | 2.701 |
| 55 | 1034 | 1.262 | 4.397 |
| 75 | 1650 | 2.014 | 5.814 |
| 95 | 2275 | 2.777 | 6.644 |
| 115 | 2804 | 3.423 | 7.536 |

The curve is monotonic but not a straight line. It departs from the best
linear fit by about 0.5 over −5..125 °C, and F is in the model's own output
units rather than degrees. The hardware computes the fuzzy model exactly as
specified, so better linearity depends only on the ROM values. Tri1's peak is
taken as b = −0.35, which lies between its feet. Over the ADC range (0..5 V)
only Tri1's falling branch is ever used. Tri2 is zero below 0.21 V, rising up
to 3 V, and falling above that.

## Floating-point units

All units use binary32 (1 sign, 8 exponent bits with bias 127, 23 fraction
bits). They share these conventions:

- results are rounded to nearest, ties to even;
- subnormal inputs and results are flushed to zero;
- infinities and NaN follow IEEE-754, and every NaN result is `7FC00000`.

- `fp_addsub`: combinational. It swaps the operands so the larger magnitude
  comes first and aligns the smaller one with guard, round and sticky bits. It
  then adds or subtracts, normalises with a leading-zero count and rounds.
- `fp_mul`: combinational. It forms the 24×24 significand product, normalises
  by at most one place, and rounds from a guard bit and a sticky bit.
- `fp_div`: one quotient bit per clock by restoring division. It produces 26
  quotient bits and uses the remainder as the sticky bit. Latency is a fixed 27
  clocks for any operand, with a `start`/`busy`/`done` handshake.
- `u12_to_fp` and `fp_to_ufix` convert the ADC code to a float and the output
  to a saturated DAC code. The DAC conversion rounds ties away from zero. It
  outputs 0 for negative values, zero and NaN, and 4095 for values too large.

## Converter and PC interfaces

- `adc_mcp3202_if`: sends 17 SPI clocks in mode 0. The command bits are
  start = 1, single-ended, channel `CHANNEL` and MSB-first. The ADC then
  returns a null bit and 12 data bits, MSB first. `done` pulses with `code`
  once `cs_n` is back high, 34·CLK_DIV clocks after `start` is taken.
- `dac_mcp4921_if`: sends a 16-bit word `0 0 1 1 code[11:0]`: channel A,
  unbuffered reference, gain 1, output on. After `cs_n` rises it pulses
  `ldac_n` low for half an SPI period.
- `uart_tx`: 8N1 with the data LSB first and `CLKS_PER_BIT` clocks per bit.

These frame formats come from the converters' data sheets.

## Where this RTL makes its own choices

- Everything numeric is single-precision float, as the model requires. The
  control unit's schedule, the sharing of one multiplier for three products
  and the 27-clock divider are this design's own choices.
- The ADC scaling (5 V / 4096) and the DAC scaling (F·256, saturated) are
  assumptions: the model does not define an output scale for the DAC.
- A membership value that rounding pushes just below zero next to a foot is
  clamped to zero. Because of that clamp, bit 31 of `anfis_tri.mu` is always 0.
- The PC link (UART, 115200 baud, 7-byte frame) and the sample loop in the top
  are this design's own. The original system only states that results reach a
  PC.
- Reset is asynchronous and active low everywhere, and every register has a
  reset value. The exception is the ROM read register, which holds data only.
- The multiplier is plain logic. A synthesis tool may map it to DSP blocks
  unless told otherwise.
- Not included: the thermistor and divider (analog), the ADC, DAC and PC
  themselves, and the training of the parameters, which happens offline.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_fp_addsub`, `tb_fp_mul` | 20k random operands plus rounding ties, cancellation, overflow, underflow and the special values, bit for bit |
| `tb_fp_div` | 3k quotients and reciprocals, special values, the 27-clock latency |
| `tb_anfis_rom` | every word against values derived in the testbench; one-clock read |
| `tb_anfis_tri`, `tb_anfis_consequent` | both trained functions over all regions, bit for bit and within 1e-6 of the exact triangle |
| `tb_anfis_ctrl` | ROM load order, the state sequence, one divider start, waiting for the divider, the `done` pulse |
| `tb_anfis_core` | ~900 ADC codes: F bit for bit, within 1e-4 of double-precision evaluation, DAC code, 33-clock latency |
| `tb_adc_mcp3202_if`, `tb_dac_mcp4921_if`, `tb_uart_tx` | frames against an ADC model or a decoder in the testbench |
| `tb_ntc_linearizer_top` | the whole loop at default parameters over a −5..125 °C sweep (thermistor equation in the testbench), checking F, the DAC words, the UART frames, monotonic output, and that each Tri2 branch and DAC saturation occur |

The bit-exact references compute in double precision and round once to single
precision (`tb/tb_fp_pkg.sv`). A double has more than 2·24+2 significand bits,
so this gives the correctly rounded single-precision result.
`tb/mcp3202_model.sv` is a behavioural model of the ADC for simulation only.

To run a testbench with Verilator 5 from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/fp_pkg.sv tb/tb_fp_pkg.sv tb/tb_anfis_ref_pkg.sv \
  tb/tb_ntc_linearizer_top.sv --top-module tb_ntc_linearizer_top
./obj_dir/Vtb_ntc_linearizer_top
```

Replace the testbench name to run any of the others. The end-to-end test runs
about 1.7M clocks and finishes in a few seconds.
