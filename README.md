# QAM-64 modulator on a quadrature DDS

This is a fully digital 64-point quadrature amplitude modulator for an FPGA
running at 50 MHz. Each group of six data bits picks an in-phase level I and a
quadrature level Q, each from {±1, ±3, ±5, ±7}. The output sample is

    U(t) = I·cos(2π·fc·t) + Q·sin(2π·fc·t)

which is a carrier of amplitude √(I²+Q²) and phase atan2(Q, I). A quadrature
direct digital frequency synthesiser (QDDFS) generates the two carriers from
lookup tables. Two multipliers and an adder build the sum. A final scale and
offset turn it into an 8-bit word for an external unipolar DAC.

In the default configuration the carrier is 1 MHz (50 samples per period), the
data arrive at 1 kbit/s, and one symbol lasts 6 ms, i.e. 6000 carrier periods.

## Data path

```
serial_in ─► qam64_s2p ─► symbol[5:0] ─► qam64_const ─► I (bits 5..3), Q (bits 2..0)
                                                            │          │
            qddfs: phase_accumulator ─► dds_rom (cos) ─► × I   dds_rom (sin) ─► × Q
                                                            │          │
                                                            └─► qam64_sum ─► qam_dac[7:0] ─► DAC ─► LPF
```

| module | role |
|---|---|
| `qam64_modulator` | top level: wires the blocks below |
| `qam64_s2p` | serial-to-parallel converter: 6 bits → one symbol |
| `qam64_const` | two 8-way level multiplexers: code → ±1..±7 |
| `qddfs` | quadrature DDS: accumulator, sine and cosine tables, offset removal |
| `phase_accumulator` | 32-bit phase register, adds the frequency code every clock |
| `dds_rom` | 8192 × 8 carrier table, sine or cosine, synchronous read |
| `signed_mult` | 8 × 8 → 16-bit signed multiplier (used twice) |
| `qam64_sum` | (Q·sin + I·cos) / 8 + 128 |
| `qam64_pkg` | shared widths, constants and types |

The DACs, the analog reconstruction filters and the 50 MHz oscillator are
off-chip. They have no RTL. `qam_dac` and `sin_dac` are the words that go to
the two DACs.

## Constellation mapping

This is the part most likely to be misread. Both 3-bit fields use the **same
Gray code**, so two neighbouring levels on an axis differ in exactly one bit:

| code (binary) | 000 | 001 | 011 | 010 | 110 | 111 | 101 | 100 |
|---|---|---|---|---|---|---|---|---|
| level | −7 | −5 | −3 | −1 | +1 | +3 | +5 | +7 |

Symbol bits 5..3 select I and bits 2..0 select Q. For example, `100100` is
(+7, +7), `011010` is (−3, −1) and `110001` is (+1, −5). Equivalently, you can
decode the code to its rank k with `k = g ^ g>>1 ^ g>>2`, and then the level is
`2k − 7`. The testbenches compute the expected levels this way, independently
of the multiplexer table.

A tabulation of the 64 points in natural binary order (−7, −5, −3, −1, …) is
a different mapping. It is not the one implemented here. The Gray mapping
matches both the constellation labels and the multiplexer wiring of the
original design.

## Carrier generation

The frequency code L is added to the 32-bit phase accumulator on every clock.
The output frequency is therefore

    f = L · 50 MHz / 2^32        (step 0.01164 Hz, up to 25 MHz at L = 2^31)

The default code `CODE_F = 85899346` gives 1.000000 MHz. The top 13 bits of
the accumulator (`phase[31:19]`) address two tables of 8192 words each:

    word_sin[i] = INT[127 · sin(2π i / 8192)] + 128
    word_cos[i] = INT[127 · cos(2π i / 8192)] + 128

INT truncates toward zero. The tables hold offset-binary values (1..255). Each
one is computed at elaboration from this formula with one `localparam real` per
word, so no memory-initialisation file is needed. `qddfs` subtracts 128 to get
the signed samples `sin_sig` and `cos_sig`. It also outputs `r = word_sin / 2`
(`sin_dac` at the top), an 8-bit carrier reference for a second DAC. Because
`r` is at most 127, its MSB is always 0.

## Sum stage and the DAC range

`qam64_sum` adds the two 16-bit products, divides by 8 (signed, truncating
toward zero), adds 128, and keeps 16 bits (`qam_add`). The DAC gets the low
byte (`qam_dac = qam_add[7:0]`).

The DAC word's excursion is 128 ± 127·√(I²+Q²)/8. It stays inside 0..255 only
for amplitudes up to about 8.05. The 12 outer symbols, with amplitudes 8.6
((7,5) and (5,7)) and 9.9 ((7,7)), go past the range at their peaks, and the
low byte wraps. The design keeps the fixed divisor 8 of the original schematic
and brings out the full `qam_add` so that the wrap can be seen. To keep every
point inside the DAC range, raise `qam64_sum.DIV` to 10 (or saturate
`qam_add` before taking the byte). Either change alters the output scale that
the testbench reference assumes: `ref_add` in `tb/qam64_ref_pkg.sv`.

## Symbol framing

`qam64_s2p` counts `CLK_PER_BIT` clocks per bit (default 50 MHz / 1 kHz =
50000). It samples `serial_in` on the last clock of each bit period, when
`bit_tick` is high, and shifts it in. The first bit received becomes symbol
bit 5. After the sixth bit, `symbol` is updated and `sym_valid` pulses for one
clock. The symbol is then held for the next six bit periods. A source should
change `serial_in` after each `bit_tick`.

This framing is a design choice. The original system only states that six
serial bits form one symbol, three MSBs for I and three LSBs for Q. In its
board build the six bits came from switches. To drive the constellation
directly, connect `qam64_const` to a 6-bit input instead of `qam64_s2p`.

## Timing

- The accumulator and the table read are registered. Everything after them
  (offset removal, multipliers, sum) is combinational. `qam_dac` in a given
  cycle therefore belongs to the accumulator value of one clock earlier.
- A new symbol is in effect in the cycle in which `sym_valid` is high.
- Reset `rst_n` is active low and asynchronous. It clears the accumulator and
  the converter. The tables have no reset.
- One symbol lasts `6 · CLK_PER_BIT` clocks: 300000 clocks (6 ms) by default.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `qam64_modulator` | `CODE_F` | 85899346 | frequency code L (1 MHz at 50 MHz) |
| `qam64_modulator`, `qam64_s2p` | `CLK_PER_BIT` | 50000 | clocks per data bit |
| `qddfs`, `phase_accumulator` | `PHASE_W` | 32 | accumulator width n |
| `qddfs`, `dds_rom` | `AW`, `DW` | 13, 8 | table address b and sample width m |
| `qam64_sum` | `DIV`, `OFFSET` | 8, 128 | output scale and DAC offset |

All defaults are the published configuration except `CLK_PER_BIT`. That value
is derived from the 50 MHz clock and the 1 kHz data rate, taking 1 kHz as the
bit rate.

## Departures and open points

- **Level mapping:** the Gray code above is used. A natural-binary tabulation
  of the same constellation would disagree with it for codes 010 and 011.
- **Table rounding:** INT is taken as truncation toward zero. The rounding rule
  is not stated.
- **Sum scaling:** the fixed /8 wraps the outer points (see above). A
  per-symbol "scale factor", roughly the amplitude rounded up, appears next to
  the constellation table but is not part of the drawn hardware. It is not
  implemented.
- **`r` divisor:** the divisor 2 for `r` is read from a schematic constant.
- **Serial framing:** bit order, sampling instant and strobes are this
  design's own choices.
- **Analog parts:** the DACs, the low-pass filters and the clock source are
  not modelled.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/qam64_pkg.sv tb/qam64_ref_pkg.sv tb/tb_qam64_full.sv \
    --top-module tb_qam64_full -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_phase_accumulator` | accumulation for several codes, async clear, 1000 carrier periods per 50000 clocks |
| `tb_dds_rom` | all 8192 sine and cosine words against the formula; one-clock read latency |
| `tb_qddfs` | every sample against the formula for three codes; 50-clock carrier period at 1 MHz |
| `tb_qam64_const` | all 64 symbols against the Gray-rank formula |
| `tb_signed_mult` | all 65536 operand pairs |
| `tb_qam64_sum` | all level pairs over a sweep of samples, plus random inputs |
| `tb_qam64_s2p` | 80 symbols, bit period and symbol period |
| `tb_qam64_modulator` | end to end at `CLK_PER_BIT = 20`: all 64 symbols plus 16 random ones |
| `tb_qam64_constellation` | measures amplitude and phase of the carrier for all 64 symbols (correlation over one carrier period) against √(I²+Q²) and atan2(Q, I); the 16 diagonal points also against their published values |
| `tb_qam64_full` | end to end at the default configuration: all 64 symbols, 19.2 M clocks, about 20 s |

The two end-to-end benches share `tb/qam64_tb_monitor.sv`. This monitor
re-implements the modulator from its formulas and compares every output on
every clock. It also checks the symbol period, and it checks each symbol's
peak |qam_add − 128| against 127·√(I²+Q²)/8. It counts how often the
mechanisms occur: symbols, distinct symbols, accumulator wraps and DAC-byte
wraps. A run fails if a mechanism never happens.
