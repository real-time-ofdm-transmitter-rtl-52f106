# LUT-based real-time OFDM transmitter, 101.5 Gbit/s

This is the digital part of a single-polarization coherent optical OFDM
transmitter that sends 58 subcarriers of 16QAM at 437.5 Msymbols/s, which is
101.5 Gbit/s on the line. Two FPGAs compute the signal in lock step. One
computes the real part (I) and the other the imaginary part (Q) of each
64-point OFDM symbol. Each FPGA feeds a 6-bit, 28 GSa/s DAC through 24 serial
lanes.

What makes this transmitter unusual is the transform. It uses no FFT and no
multipliers. Every modulated subcarrier waveform `X_k e^(j2πkn/N)` is computed
in advance and stored in a look-up table (LUT). A time sample is then just a
sum of table entries, formed in a binary adder tree. Two properties of these
waveforms remove about a third of the table reads and adders, and three
quarters of the table storage. Since the tables are plain memories, the
spectrum can be reshaped at run time, for example to pre-equalize the
channel, by loading new tables and switching to them within one clock.

The RTL follows the architecture published as *Real-time OFDM transmitter
beyond 100 Gbit/s*. Where that description leaves a detail open (bit orders,
widths, scaling, the reload mechanism), this code makes its own choice. Each
such choice is listed in [Departures and own choices](#departures-and-own-choices).

## Signal flow

```
           one FPGA (ofdm_fpga_channel, PART = 0 for I, 1 for Q), 218.75 MHz
 ┌──────────────────────────────────────────────────────────────────────────┐
 │ prbs_gen ─464 bit─► allocation ─► idft_core #0 ─64×14b─┐                 │
 │ (2^15-1)            58 SC × 4 b ─► idft_core #1 ─64×14b─┴► clip_rescale  │
 │                                   (idft_lut + idft_adder_tree)  128×6b   │
 │                                                              │           │
 │                                   dac_lane_mapper ◄───────────┘          │
 └──────────────────────────────────────│───────────────────────────────────┘
                                  24 lanes × 32 bit  ──► 24 serializers at 7 Gbit/s
                                                       ──► DAC, 4:1 mux, 28 GSa/s
```

`ofdm_tx` holds two of these channels. They share clock, reset and
`bank_sel`. Each channel has its own table write port.

Rates at the default parameters:

| quantity | value |
|---|---|
| FPGA clock | 28 GHz / 128 = 218.75 MHz |
| OFDM symbols per clock, per channel | 2 (two IDFT cores) → 437.5 MBd |
| samples per clock, per channel | 128 → 28 GSa/s |
| data bits per clock | 2 × 58 × 4 = 464 → 101.5 Gbit/s |
| lane payload | 24 lanes × 32 bit per clock → 7 Gbit/s per lane |

## Subcarrier plan and symbol bits

Of the 64 subcarriers, 58 carry data. Four carry constant pilot tones, at
k = 7, 21, 43 and 57 (positions 7, 21, −21 and −7). DC (k = 0) and Nyquist
(k = 32) carry nothing. Each clock, the PRBS supplies 464 bits. Symbol
p ∈ {0, 1} and the d-th data subcarrier (counted in ascending k) take the four
bits starting at `4·(p·58 + d)`. The first of the four bits is the most
significant.

A 4-bit symbol is `{quadrant[1:0], base[1:0]}`:

* `base` selects one of the four 16QAM points in the first quadrant, `a + jb`,
  with `a = base[0] ? 3 : 1` and `b = base[1] ? 3 : 1`.
* The transmitted point is `j^quadrant · (a + jb)`.

This mapping is not Gray-coded. It was chosen because the table address comes
straight out of it, as described next. A receiver has to use the same mapping.
The pilots send `3 + 3j`.

## How the IDFT works

The transform for one part (real shown; the imaginary part uses Im{} instead of Re{}) is

```
x_n = Σ_k  Re{ X_k · e^(j2π k n / N) },   n = 0 … N−1,  N = 64
```

There is no 1/N factor. Scaling happens in the clip stage.

### Tables instead of multiplications (`idft_lut`)

Every data subcarrier k has its own table: 4 base points × 64 phases × 8 bit.
Entry `[b][φ]` holds `round(29 · Re{(a_b + j b_b) · e^(j2πφ/64)})`, or Im{}
when `PART = 1`. The contribution of subcarrier k to sample n is then one read
at phase

```
φ = (k·n + quadrant·16) mod 64
```

Rotating a point by `j^q` is the same as advancing the phase by q·N/4. So the
quadrant is only a pointer offset into the table. Only M/4 = 4 waveforms need
storing instead of 16. Because each subcarrier has its own table, a table can
hold a scaled and rotated waveform, which pre-equalizes that subcarrier at no
run-time cost.

The amplitude 29 puts the largest point (3+3j, |X| = 4.24) at ±123, inside
8 bits. Reset loads the undistorted waveforms into every bank. They are
computed at elaboration time by a Q30 Taylor series in `ofdm_pkg`, so no data
file is needed.

### Reading only one period (`idft_lut`, `idft_adder_tree`)

Subcarrier k, sampled at n = 0…63, repeats with period `p_k = 64 / GCD(64, k)`:

| k | GCD | period | number of such k |
|---|---|---|---|
| odd | 1 | 64 | 32 |
| 2 · odd | 2 | 32 | 16 |
| 4 · odd | 4 | 16 | 8 |
| 8 · odd | 8 | 8 | 4 |
| 16, 48 | 16 | 4 | 2 |
| 32 | 32 | 2 | 1 |
| 0 | 64 | 1 | 1 |

So the table of subcarrier k is read only for n < p_k: `contrib[k][n]` is
defined there and is zero elsewhere. For all 64 subcarriers this is
`1 + Σ 64/GCD = 2731` reads instead of 4096. With the real subcarrier plan it
is 2472 data reads, plus the pilot ROM.

The adder tree must then add values that exist over different periods. It
orders its 64 leaves by GCD group. Group m holds the subcarriers
`k = 2^m · odd`, whose common period is `P_m = 64 / 2^m`. The groups are
summed as follows:

```
S_m(n)  = Σ over group m,  computed for n < P_m only        (plain binary tree)
U_6(n)  = c_0
U_m(n)  = S_m(n) + U_{m+1}(n mod P_m/2)                     (n < P_m)
x(n)    = U_0(n)
```

`S_m` is ready after `5 − m` adder levels and `U_m` after `6 − m`. Each
chaining adder therefore falls on exactly one level of a single 6-stage
(log2 N) pipelined binary tree. No delay-matching registers are needed. The
adders shrink by the same factor as the reads, about 2/3 of N² for large N. The
periodic extension `n mod P` is only wiring (`ucum` in the RTL).

### Pilots, DC and Nyquist

The four pilot tones never change, so their summed contribution is one
64-entry ROM. That ROM feeds the leaf of the first pilot (k = 7, period 64).
The other pilot leaves and the DC and Nyquist leaves are constant zero, and
synthesis removes them.

### Reloading tables (`idft_lut`)

Each table exists in `BANKS = 2` copies. The write port
`wr_en, wr_k, wr_bank, wr_base, wr_phase, wr_data` writes one 8-bit entry per
clock. An assertion checks that writes go only to the bank not being read, so
the running signal is never disturbed. `bank_sel` is registered. A change
applies to the symbol that enters one clock later, about 4.6 ns at
218.75 MHz. Both cores of a channel receive the same writes, and both channels
share `bank_sel`.

## Clipping and the DAC lanes

`clip_rescale` divides each 14-bit sum by 32, rounds to nearest, and
saturates the result to the signed 6-bit range −32…31 (two's complement). The
default tables give a signal σ of about 520 LSB. The clip level of 1024 LSB is
therefore about 1.96σ, and about 95% of samples pass unclipped. The end-to-end
test measures 4.7% clipped. The original design chose its scaling to
minimize EVM and quotes 93% of samples inside the DAC window. This design
follows that figure. The cost is clipping noise. Decoding the default
transmitter with an ideal receiver gives 12.2% EVM, with about 0.2% of
16QAM symbols in error before any forward error correction. Clipping, not
the 8-bit tables, causes nearly all of this: the rounding error of the tables
alone stays below 1 LSB per entry. To trade clipping for quantization noise,
change `SHIFT` (6 halves the signal and moves the clip level to about 3.9σ)
or `SCALE` (table amplitude, at most 29 for 8-bit entries).

`dac_lane_mapper` feeds the DAC's 4:1 multiplexers. Sample s of a clock goes
to multiplexer input `m = s mod 4` in time slot `t = s / 4`. Lane `b·4 + m`
therefore carries bit b of samples m, m+4, m+8, …, and bit t of its 32-bit
word is slot t, sent first for t = 0.

## Timing

| path | clocks |
|---|---|
| `prbs_gen`: reset release → first word | 1 |
| `idft_lut`: symbol → `contrib` | 1 |
| `idft_adder_tree`: `contrib` → `x` | 6 (log2 N) |
| `idft_core`: symbol → `x` | 7 |
| `clip_rescale`, `dac_lane_mapper` | 1 each |
| `ofdm_fpga_channel` / `ofdm_tx`: PRBS word → lanes | 9 |
| `ofdm_tx`: first clock with `rst_n` high → first valid lane word | 10 |
| `bank_sel` change → first symbol read from the new bank | next symbol entering the core |

Every stage accepts new data on every clock. There is no handshake: the
datapath runs freely from reset, like the DAC clock it is locked to. Reset is
synchronous and active low.

## Departures and own choices

These choices are made here and are not fixed by the published description:

* PRBS polynomial x^15 + x^14 + 1, all-ones seed, and the bit-to-symbol order
  above. The published description fixes only the sequence length 2^15 − 1,
  and says that log2 M consecutive bits form one symbol.
* The `{quadrant, base}` symbol mapping, the pilot value 3+3j, the table
  amplitude 29, and the clip scale 2^-5.
* Two table banks with a dedicated write port. The published transmitter
  reloads tables through an on-chip processor and switches in about 5 ns
  without losing data, but its mechanism is not described.
* Tables are registers loaded at reset. The published design also kept its
  tables out of block RAM.
* Tables are indexed by phase, not by time sample. The two are equivalent:
  the quadrant pointer is a phase offset. Each waveform keeps N entries.
* The lane/bit order to the DAC, and the two's-complement DAC codes.
* The I and Q channels use separate tables (`PART`), as in the original.

Not included, because they are not logic: the serial transceivers, the DAC
with its multiplexers and its clock divider, the processor that loads new
tables, the laser and IQ modulator, and the receiver. `ofdm_tx` stops at the
parallel lane words and brings the table write ports out as pins.

## Files

| file | contents |
|---|---|
| `rtl/ofdm_pkg.sv` | sizes, subcarrier plan, GCD/period and table functions |
| `rtl/prbs_gen.sv` | parallel PRBS 2^15−1 |
| `rtl/idft_lut.sv` | per-subcarrier tables, pilot ROM, banks, write port |
| `rtl/idft_adder_tree.sv` | GCD-grouped 6-stage adder tree |
| `rtl/idft_core.sv` | one IDFT = tables + tree |
| `rtl/clip_rescale.sv` | rescale, round, saturate to 6 bit |
| `rtl/dac_lane_mapper.sv` | 128 samples → 24 lane words |
| `rtl/ofdm_fpga_channel.sv` | one FPGA: PRBS, 2 cores, clip, lanes |
| `rtl/ofdm_tx.sv` | top: I and Q channels |
| `tb/tb_ofdm_model_pkg.sv` | bit-true reference model (real-valued trigonometry) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ofdm_tx_evm.sv` | decodes the transmitted signal and measures EVM |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
reference model is written independently of the RTL. It restates the
subcarrier plan and computes table entries with `$cos`/`$sin`, clipping with
real-valued rounding, and the PRBS bit by bit. To run a testbench, for
example the end-to-end one:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ofdm_pkg.sv tb/tb_ofdm_model_pkg.sv rtl/*.sv tb/tb_ofdm_tx.sv \
  --top-module tb_ofdm_tx
./obj_dir/Vtb_ofdm_tx
```

Building takes one to two minutes, because the register tables make a large
model. The run itself takes a few seconds.

What the tests cover:

* `tb_ofdm_tx`: the whole transmitter at its default size for about 1,700
  clocks, with every lane word of both channels compared. The run also covers:
  * more than 20 PRBS periods,
  * all four quadrant offsets,
  * clipping,
  * 1,536 run-time table writes per channel while bank 0 is transmitted,
  * a bank switch that changes the signal from the next symbol on.

  The 10-clock latency and the one-word-per-clock rate are checked exactly.
* `tb_idft_core`: both parts against the bit-true model. It also checks
  against the unquantized IDFT, within the rounding bound (±31 LSB for up to
  62 rounded entries), and checks the 7-clock latency and a bank reload.
* `tb_idft_lut` and `tb_idft_adder_tree`: every read position, and every
  sum. The adder-tree test feeds random garbage beyond each period, which the
  tree must ignore.
* `tb_ofdm_tx_evm`: a receiver-side check at default size. It rebuilds the
  I/Q samples from the lanes, transforms each symbol back with a real-valued
  DFT, and decides every data subcarrier. It requires fewer than 1% symbol
  errors, under 15% EVM and correct pilots, and it prints EVM and the
  fraction of unclipped samples.
* `tb_prbs_gen`, `tb_clip_rescale`, `tb_dac_lane_mapper`: against
  bit-serial and real-valued references.

## Changing the design

* `N` is a parameter throughout. The adder tree and the period logic work for
  any power of two. The pilot positions in `ofdm_pkg::sc_type` are those of
  the 64-point plan and need revisiting for other N.
* `BANKS` allows more than two table sets.
* `SCALE`, `SHIFT` and `LW` trade quantization noise against clipping noise.
  `W = LW + log2 N` keeps the adder tree free of overflow.
