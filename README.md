# 64-QAM modulator with a sampled quadrature carrier

This is a small, fully digital 64-QAM modulator. A 6-bit symbol picks one of 64
points on an 8 x 8 grid. The modulator then produces the carrier waveform for that
point: an in-phase (cosine) wave and a quadrature (sine) wave, each scaled to one
of eight signed amplitudes, then added. One carrier period is 256 samples. Each
symbol is held for exactly one period.

It follows a published FPGA design of a 64-QAM transmitter built from textbook
blocks: a 3-to-8 level converter per branch, a carrier oscillator, a 90° shifter,
two multipliers and an adder. The bit mapping, the amplitude levels and the
256-sample resolution come from that design. Word widths, timing, reset and the
symbol source are choices made here (see "Where it departs" below).

## The symbol and its constellation point

The symbol `B5 B4 B3 B2 B1 B0` is split into two halves of three bits:

| half | bits | drives | amplitude bits | shift bit |
|------|------|--------|----------------|-----------|
| MSB  | B5 B4 B3 | cosine carrier (x) | B5 B4 | B3 |
| LSB  | B2 B1 B0 | sine carrier (y)   | B2 B1 | B0 |

In each half the two amplitude bits choose the level and the shift bit inverts
the wave:

| amplitude bits | level | shift bit = 0 | shift bit = 1 |
|----------------|-------|---------------|---------------|
| 00 | 1 V    | +256 | −256 |
| 01 | 0.75 V | +192 | −192 |
| 10 | 0.5 V  | +128 | −128 |
| 11 | 0.25 V | +64  | −64  |

Example: `101110` → cosine half `101` = 0.5 V shifted by 180° (x = −128). The
sine half is `110` = 0.25 V, not shifted (y = +64).

The result is a square 8 x 8 constellation with levels ±0.25, ±0.5, ±0.75 and
±1 V on each axis. A "180° shifted wave" is produced by negating the level
before the multiplier. This gives the same samples as selecting a
phase-inverted carrier.

## Number format

All analogue quantities are integers in which **256 stands for 1 V**:

* amplitude levels: ±64, ±128, ±192, ±256, signed 10 bits (`level_t`);
* carrier samples: `round(256·sin(2πk/256))`, −256…+256, signed 10 bits (`carrier_t`);
* branch products: level × carrier at full precision, signed 20 bits (`product_t`);
* output: `floor((x·cos + y·sin) / 256)`, −512…+512, signed 11 bits (`qam_t`).

The largest output, ±512, is the corner points (±1 V, ±1 V) at 45°. The output
differs from the ideal `x·cos θ + y·sin θ` by less than 2.5 LSB, from table
rounding and the final floor.

## Datapath

```
 symbol ──► constellation_mapper ──x──► mixer ◄── cos ── phase_shift_90 ◄──┐
   ▲          (2 × level_converter) ─y──► mixer ◄── sin ─────────────────┐  │
   │                                        │                             │  │
 symbol register / symbol_counter           └──► summer ──► qam_o   carrier_oscillator
   (loaded at each period end)                    (register)        (phase counter + table)
```

* `carrier_oscillator`: 8-bit phase counter, advanced by `en_i`. It addresses
  `SINE_TABLE`, a 256-entry table built at elaboration in `qam64_pkg` with
  `$sin`, so no data file is needed.
* `phase_shift_90`: adds 64 (a quarter period) to the phase and reads the same
  table. This gives `cos(2πk/256) = sin(2π(k+64)/256)`.
* `constellation_mapper`: two `level_converter`s, one per half of the symbol.
* `mixer` (×2): one signed multiplier each.
* `summer`: adds the two products, shifts right by 8 and registers the result.
  This is the only pipeline stage.

## Timing

* Each enabled cycle (`en_i` = 1) produces one output sample. With `en_i` held
  high, the sample rate equals the clock rate and one symbol takes 256 clocks.
  With `en_i` low the whole design holds: phase, symbol and `qam_o`.
* `qam_o` is registered. The value present after the edge at the end of cycle
  *t* belongs to `symbol_o` and `phase_o` of cycle *t*. `qam_valid_o` is high
  when that edge was enabled.
* Symbols change only when the phase wraps from 255 to 0. `symbol_i` and
  `sweep_i` are sampled in the last enabled cycle of a period, when the phase
  is 255. They take effect from phase 0 of the next period. Values on
  `symbol_i` at other times are ignored.
* `symbol_start_o` is high while `phase_o` = 0.
* Reset is synchronous and active low. It sets the phase to 0, the symbol to 0,
  the counter to 0 and the source to external.

## Symbol source: sweep or external

`sweep_i = 1` selects `symbol_counter`. It walks through 000000…111111 and then
wraps, advancing once per carrier period. This is how the board demonstration
of the original design cycled through the whole constellation. The counter
runs in both modes. After a switch to sweep mode, the sweep therefore resumes
wherever the counter is. From reset with `sweep_i = 1`, the sequence is 0, 1,
2, …, 63, 0, … (the first period carries the reset symbol 0, and the counter
holds 1 by the time sweep mode takes effect).

`sweep_i = 0` takes the symbol from `symbol_i`.

## Top-level ports (`qam64_modulator`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `en_i` | in | 1 | sample enable |
| `sweep_i` | in | 1 | 1 = internal counter, 0 = `symbol_i` |
| `symbol_i` | in | 6 | external symbol |
| `symbol_o` | out | 6 | symbol of the current sample |
| `phase_o` | out | 8 | carrier phase of the current sample |
| `point_o` | out | 2×10 | `{x, y}` constellation point (`point_t`) |
| `symbol_start_o` | out | 1 | phase is 0 |
| `qam_o` | out | 11 | modulated sample, signed, 256 = 1 V |
| `qam_valid_o` | out | 1 | `qam_o` was updated at the last edge |

## Files

`rtl/qam64_pkg.sv` holds the shared types, constants and the sine table. Then,
one module per file:
`symbol_counter`, `level_converter`, `constellation_mapper`,
`carrier_oscillator`, `phase_shift_90`, `mixer`, `summer` and the top
`qam64_modulator`. Each has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
    rtl/qam64_pkg.sv tb/tb_qam64_modulator.sv --top-module tb_qam64_modulator
./obj_dir/Vtb_qam64_modulator
```

Use the same command with another testbench name for any block.
`tb_qam64_modulator` runs the design at its full size in well under a second:

* it sweeps all 64 symbols and past the counter wrap;
* it switches to external symbols halfway through a period, with `symbol_i`
  changing every cycle;
* it switches back to the sweep, with random enable gaps throughout.

A cycle-level reference model checks every cycle's symbol, phase, point and
sample. Each sample is also checked against the ideal real-valued waveform,
and every symbol must last exactly 256 enabled samples. The testbench counts
stalls, counter wraps, both mode switches and negative levels on each branch,
and fails if any of them never happened. `tb_constellation_mapper` compares all
64 points with the published x/y coordinates of the original design.

## Where it departs from the original, and what to trust

* The bit mapping, the eight levels per branch, the quantisation (64/128/192/256)
  and the 256 samples per period follow the original design. The original's
  text contradicts itself on bit B3: once it says B3 shifts the sine wave. Its
  bit table, its level table and its worked example all make B3 the cosine
  shift bit, and that is what is built.
* The symbol period of one carrier cycle is not specified by the original. It
  is a choice made here, and so is the sample enable.
* So are the carrier implementation (phase counter plus sine table), the
  rounding of the table, the output scaling (floor of /256) and all word widths.
* The sweep/external source selection is this design's own. The original board
  build only swept a 6-bit counter.
* The original FPGA builds used only 6 flip-flops and no more than about 35
  LUTs. That is too little to hold a 256-sample carrier table and two
  multipliers. Its implementation must therefore have differed from the block
  diagram in ways not described. This design follows the block diagram. After
  synthesis it has 33 flip-flop bits, two 256 × 10 ROMs (one could be shared by
  time-multiplexing, not done here) and two 10 × 10 multipliers.
* There is no DAC, output filter or receiver; `qam_o` is a digital sample
  stream.
