# Quarter-wave direct digital frequency synthesizer

A direct digital frequency synthesizer (DDS, also called a numerically
controlled oscillator) makes a sine wave of programmable frequency from a fixed
clock. A phase register advances by a programmable step every clock, and the
top bits of the phase look up a sine table. This RTL builds the
"component based" form of that idea. Each stage is its own small module, and
the sine table holds only the first quarter of a period. Complement blocks and
multiplexers rebuild the other three quarters, which shrinks the table to a
quarter of a full-period table.

```
fin ─► input register ─► phase accumulator ─► quantizer ─► half, quarter, addr

addr ──┬──────────────────┐
       └─► one's compl. ──┴─► mux (sel = quarter) ─► quarter-sine table ─► mag

mag ───┬──────────────────┐
       └─► two's compl. ──┴─► mux (sel = half) ─► sinout
```

One signed sample leaves the design every clock. The output frequency is

    f_out = fin * f_clock / 2^PHASE_W

With the default 32-bit phase and a 100 MHz clock, the frequency step is
0.023 Hz. Any frequency up to the 50 MHz Nyquist limit (fin = 2^31) can be set.

## Ports of the top, `dds_component`

| port     | dir | width   | meaning |
|----------|-----|---------|---------|
| `clock`  | in  | 1       | sample clock |
| `reset`  | in  | 1       | synchronous, active high; clears both registers |
| `fin`    | in  | PHASE_W | frequency word (phase step per clock) |
| `sinout` | out | AMP_W   | signed two's-complement sine sample, range ±(2^(AMP_W-1)-1) |

| parameter | default | meaning |
|-----------|---------|---------|
| `PHASE_W` | 32 | width of the frequency word and the phase accumulator |
| `Q_W`     | 10 | phase bits kept by the quantizer: 2^Q_W samples per period |
| `AMP_W`   | 12 | output sample width |

The table has `2^(Q_W-2)` entries of `AMP_W-1` bits. The defaults are 256
entries of 11 bits.

## Timing

There are exactly two registers, the input register and the accumulator.
Everything after the accumulator is combinational.

* A frequency word applied before rising edge *k* is captured on edge *k*.
* The accumulator first adds it on edge *k+1*. The phase step therefore
  changes on the second rising edge after `fin` changes.
* `sinout` follows the accumulator within the same cycle. It is the sample
  of the phase the accumulator holds now.
* After reset both registers are 0, so `sinout` shows the sample at phase 0.
  That sample is +6 with the default widths, because of the half-step table
  offset described below. The output holds this value until a non-zero `fin`
  arrives. `fin = 0` freezes the phase at any time.

No handshake or stall exists. The design accepts a new `fin` every clock,
which allows frequency hopping at the clock rate.

## From phase to sample: the quarter-wave folding

This is the part that takes the most care. The quantizer keeps the top `Q_W`
bits of the phase and drops the rest. It does plain truncation, with no
rounding or dither. The kept bits split into three fields:

| field     | bits       | role |
|-----------|------------|------|
| `half`    | Q_W-1      | 1 in the second half of the period: the table value is negated |
| `quarter` | Q_W-2      | 1 in the second quarter of each half: the table is read backwards |
| `addr`    | Q_W-3 .. 0 | position inside the quarter |

The four quarters of a period are built like this:

| half | quarter | table address | sign | shape |
|------|---------|---------------|------|-------|
| 0 | 0 | `addr`  | + | rising from 0 to +peak |
| 0 | 1 | `~addr` | + | falling from +peak to 0 |
| 1 | 0 | `addr`  | − | falling from 0 to −peak |
| 1 | 1 | `~addr` | − | rising from −peak to 0 |

Reading the table backwards takes only a bitwise inversion (one's
complement), not a subtraction, because of where the table samples sit.
Entry *i* holds

    T[i] = round((2^(AMP_W-1) - 1) * sin((i + 0.5) * pi / 2^(Q_W-1)))

Each entry samples the centre of its phase step, half a step away from the
quarter boundaries. Entry `~i = 2^(Q_W-2) - 1 - i` is then the exact mirror of
entry *i* about pi/2. Every output sample equals the full-period sine at
the centre of its phase step, `round(2047 * sin(2*pi*(q + 0.5)/1024))` for the
defaults. The samples at 0 and pi are ±6 rather than 0, and the peak is 2047
minus a fraction of an LSB, because no sample falls exactly on 0, pi/2 or pi.

Negation uses the two's complement of the magnitude. Magnitudes are
`AMP_W-1` bits unsigned and the output is `AMP_W` bits signed, so −peak
always fits.

The table is computed from the formula above at elaboration, by a constant
function (`dds_pkg::quarter_sine`). Synthesis maps it to a ROM. To change the
resolution, change `Q_W` or `AMP_W`; no data file is involved.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/dds_pkg.sv`         | package | default widths and the table formula |
| `rtl/dds_freq_reg.sv`    | `dds_freq_reg`    | input register for the frequency word |
| `rtl/dds_phase_acc.sv`   | `dds_phase_acc`   | adder and phase register, modulo 2^PHASE_W; `wrap` flags a period start |
| `rtl/dds_ones_comp.sv`   | `dds_ones_comp`   | bitwise inversion of the table address |
| `rtl/dds_mux2.sv`        | `dds_mux2`        | 2:1 multiplexer, used for the address and for the sign |
| `rtl/dds_quarter_lut.sv` | `dds_quarter_lut` | quarter-sine ROM |
| `rtl/dds_twos_comp.sv`   | `dds_twos_comp`   | negation of the table magnitude |
| `rtl/dds_component.sv`   | `dds_component`   | the synthesizer; also holds the quantizer, which is only a bit selection |

The accumulator's `wrap` output is left unconnected in the top and is removed
by synthesis. It is there so that each period start can be seen in
simulation.

## Relation to the published design

The following come from the published component based DDS:

* the order of the stages;
* the quarter-wave table with a one's complement and a multiplexer in front
  of it, and a two's complement and a multiplexer behind it;
* quantization by slicing;
* the port names `fin`, `clock`, `reset`, `sinout`.

The following were not specified there and are this design's choices:

* **Widths.** The published design gives no bit widths. The 32-bit phase
  matches its reported count of 64 flip-flops, which is two 32-bit registers.
  Synthesis of this RTL gives those same 64 flip-flops and one ROM. The 10-bit
  quantizer and 12-bit output are assumptions. The published design also
  reports 59 I/O pins; this one has 46, so its output is likely narrower than
  the original's.
* **Which phase bit steers which multiplexer.** The original names the top two
  quantizer bits as the multiplexer selects, apparently in the order
  "MSB → address mux, next bit → sign mux". Wired that way the quarters come
  out as +rise, −rise, +fall, −fall, which is not a sine. Here the top bit
  drives the sign multiplexer and the next bit drives the address multiplexer.
* **Table contents.** The sampling grid, with its half-step offset, and the
  rounding are this design's own. The original built its table with the FPGA
  vendor's tools.
* **Reset.** Reset is synchronous and active high.
* **Output register.** There is none, matching the flip-flop count above. If
  you need one for timing, add it after the sign multiplexer. It adds one
  cycle of latency.

Not included:

* The two alternative table styles the original compares against: a full
  table written as a case statement, and a full table in a vendor ROM. They
  produce the same samples with more area.
* The digital-to-analog converter and reconstruction filter that an analog
  output would need.

The original reports simulation at 100 MHz and states that the design could
run at 1 GHz. The testbenches here use a 100 MHz clock. Whether the
unregistered path from the accumulator through the table to `sinout` meets
1 ns depends on the target technology. The RTL itself does not depend on the
clock rate.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Any of them builds and runs with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dds_component \
    -y rtl rtl/dds_pkg.sv tb/tb_dds_component.sv
./obj_dir/Vtb_dds_component
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. The package is
named explicitly so that it is read first.

| testbench | what it checks |
|-----------|----------------|
| `tb_dds_component`   | End to end at default sizes, with 100 MHz clock. A reference model with 64-bit integers predicts every sample from the full-period sine. The run includes a reset, a 64-sample tone (wrap count and zero-crossing spacing), a slow tone, random frequency hops, a frozen phase, the Nyquist word, and a reset mid-run. It counts hops, wraps, resets, mirrored reads, negated samples and visits to each quarter, and fails if any of them never happens. |
| `tb_dds_freq_sweep`  | 100 kHz to 50 MHz at a 100 MHz clock. Counts rising zero crossings against `fin*window/2^32`. Checks that the output swings as close to ±2047 as the sampling grid allows. |
| `tb_dds_freq_reg`    | One-cycle latency and reset of the input register. |
| `tb_dds_phase_acc`   | Phase and wrap against a 64-bit model, including increments 0, 1 and 2^32−1. |
| `tb_dds_quarter_lut` | All 256 entries against the sine at step centres, plus monotonicity. |
| `tb_dds_ones_comp`, `tb_dds_mux2`, `tb_dds_twos_comp` | Exhaustive or random checks of the small combinational blocks. |

All testbenches finish in well under a second.
