# HiperLAN/2 OFDM receiver on three coarse-grain reconfigurable tiles

HiperLAN/2 (like IEEE 802.11a) sends data in OFDM symbols. Each symbol is 80 complex
samples at 20 MHz, so one arrives every 4 µs. The first 16 samples are a cyclic prefix.
The other 64 carry 52 subcarriers: 48 data and 4 pilots. Every MAC frame starts with a
known preamble. A receiver must undo, for every symbol:

- the frequency offset between the transmitter and receiver oscillators;
- the multipath channel;
- a slowly drifting common phase.

It must then turn each subcarrier value back into bits.

This RTL splits that work over three processing tiles of the Montium kind. A Montium tile
is a 16-bit DSP tile with:

- five combinational ALUs;
- ten small local memories of 512 × 16 bits;
- a 16-bit configuration port.

The irregular work that happens once per frame is left to a host processor:

- estimating the frequency offset;
- dividing to get the equalizer coefficients.

The tiles do the regular work that happens once per symbol:

```
 samples ─► prefix_removal ─► fo_tile ─────────► fft_tile ─────► eq_tile ─────────────────────────► de-mapped words
 (80/sym)   drop 16 of 80     tile 1:             tile 2:         tile 3: equalize, pilot phase
                              x[n]·e^{jθn}        64-point FFT    coefficient, phase correction,
                              67 cycles           204 cycles      table de-mapping, 110 cycles
                  ▲                   ▲                 │ fft_tap        ▲
                  └── host: step, sin/cos tables ───────┴──► host: equalizer coefficients, pilot list,
                                                                de-map table and parameters
```

The top module is `hl2_receiver`. It has no parameters; every size is the HiperLAN/2 one.

## Data flow, handshakes and number formats

Tiles exchange one complex value, `{re, im}` of two signed 16-bit words, per clock. The
type is `hl2_pkg::cplx_t`. Each link is a valid/ready stream. Each tile repeats three
phases:

1. **LOAD** takes in a whole symbol (`in_ready` is high only here).
2. **EXEC** processes it (`exec_busy` is high).
3. **SEND** streams the result out.

A tile whose output is not accepted stays in SEND, so a stall at the output propagates
upstream symbol by symbol. Nothing is ever dropped, except the preamble symbols that
tile 3 discards on purpose.

| Point in the chain            | Values per symbol        | Format              |
|-------------------------------|--------------------------|---------------------|
| input, after prefix removal   | 64 time samples          | Q1.15               |
| after tile 1                  | 64 time samples          | Q1.15               |
| after tile 2                  | 52 subcarriers, order −26…−1, +1…+26 | Q1.15, equal to DFT/64 |
| equalized (inside tile 3)     | 48 data + 4 pilots       | Q2.14 (1.0 = 16384) |
| output `m_data`               | 48 words                 | contents of the de-map table |

Cycle counts per symbol, with no stalls:

| Tile | In | Exec | Out | Total | Clock for one symbol per 4 µs |
|------|----|------|-----|-------|-------------------------------|
| 1 frequency offset | 64 | 67  | 64 | 195 | 48.75 MHz |
| 2 FFT              | 64 | 204 | 52 | 320 | 80 MHz    |
| 3 equalize/de-map  | 52 | 110 | 48 | 210 | 52.5 MHz  |

The execution times of 67, 204 and 110 cycles are those of the reference implementation
on Montium tiles. The RTL reproduces them exactly, and the testbenches check them for
every symbol.

## Tile 3: equalization, phase offset correction, de-mapping (`eq_tile`)

This tile holds most of the receiver's signal processing. Its 110 execution cycles are
scheduled as follows:

| Cycles  | Work |
|---------|------|
| 0       | Read the pilot value Pd(i) of symbol i (M03 at address i; i counts symbols since `frame_start`). |
| 1–50    | Equalize the 48 data subcarriers: `y·c >> 9` on the complex multiplier. Store the results in M08/M09. Pipeline: read, multiply, write. The four de-map parameters are read from M05 at cycles 1–4. |
| 51–58   | Pilot step, 8 cycles. Equalize the four pilots and accumulate `P1+P2+P3−P4`. Then `S = sum/4`, `|S|²`, `R ≈ 1/|S|²` from a reciprocal table, and finally `C = Pd(i)·conj(S)·R` (= Pd/S). |
| 59–109  | For each stored value: multiply by C, form the de-map index, read the de-map table, store the word in M10. Pipeline: read, multiply, index + table read, write. |

**Why a reciprocal table?** The phase coefficient is a quotient: the expected pilot value
over the mean received pilot. The inverted fourth pilot follows the pilot polarity of the
standard. The ALUs have no divider. The divisor `S` is already equalized, so `|S|²` is
close to 1. A 512-entry table `R[k] = min(32767, round(2²² / k))` therefore gives 1/|S|²
to about 0.4 %. It is indexed by `|S|²` in steps of 2⁻⁸ (`k = |S|² >> 20` in Q4.28). The
table is generated at elaboration. Because the coefficient includes the magnitude, it
corrects both the common phase and any residual gain. This matters for 16-QAM decisions.

**De-map index.** Both parts of the corrected value `v` (Q2.14) are turned into table
coordinates with four parameters:

```
part(v) = clamp((v >>> P0) + P1, 0, P2)
index   = part(re) << P3 | part(im)          (9 bits, one 512-word memory)
word    = M04[index]
```

One table lookup therefore gives the bits of both axes. A different modulation needs a
new table and parameters, written through the configuration port between symbols. The
logic does not change. Settings used in the testbenches:

| Modulation | P0 | P1 | P2 | P3 | Table entries | Word |
|------------|----|----|----|----|---------------|------|
| 16-QAM     | 11 | 8  | 15 | 4  | 256 | `{b0 b1 b2 b3}`. Per axis: 00→−3, 01→−1, 11→+1, 10→+3 (units of 1/√10). Bin edges fall at multiples of 0.125, next to the ±0.632 decision thresholds. |
| QPSK       | 14 | 1  | 1  | 1  | 4   | `{b0 b1}`: sign of I, sign of Q |
| 64-QAM     | 11 | 8  | 15 | 4  | 256 | `{b0 b1 b2 b3 b4 b5}`, 3 Gray-coded bits per axis (levels ±1…±7 in units of 1/√42). Bin edges fall near the ±0.309 / ±0.617 / ±0.926 thresholds. |
| BPSK       | 14 | 1  | 1  | 1  | 4   | `{b0}`: sign of I |

The 16-QAM and 64-QAM bins are 0.125 wide, so a bin that straddles a decision threshold
gives a slightly wrong decision for values close to it. The host can align thresholds
with bin edges by scaling the stored pilot values. Tile 3 divides by the received pilot
sum, so the output gain is exactly that of the stored `Pd`.

**Preamble.** While `eq_enable` is low, tile 3 takes in each symbol and drops it. It does
not execute and sends no output. The host keeps it low during the two preamble C
symbols. During that time it reads their FFT on `fft_tap_*` and loads the equalizer
coefficients.

## Tile 1: frequency offset correction (`fo_tile`)

Sample n of a symbol is multiplied by `e^{jθ}`. The angle comes from a 16-bit phase
accumulator `n·step` (units of 2π/65536), whose top 9 bits index a cosine table (M01)
and a sine table (M02). The host computes `step` once per frame from the preamble and
writes it to M03 address 0. It should be minus the measured phase advance per sample.
The 67 cycles are split as follows:

- 1 cycle to read the step;
- 64 issue cycles;
- 2 pipeline cycles: table read, then complex multiply and in-place write.

The phase restarts at 0 at every symbol. The offset still accumulated between symbols
appears as a common phase per symbol, which tile 3 removes from the pilots. So does the
small residual of an imperfect estimate.

## Tile 2: 64-point FFT (`fft_tile`)

A radix-2 decimation-in-frequency FFT runs in place on a 64-word array. Each stage issues
32 butterflies, one per cycle. A butterfly works in three steps:

1. It reads two words through a register, as an SRAM with registered output would.
2. Two ALUs in add/subtract mode form `(a+b)/2` and `(a−b)/2`.
3. The four-ALU complex multiplier multiplies the difference by the twiddle `W64^(pos·2^stage)`.

A stage ends when its last write has landed, which takes 32 + 2 cycles. Six stages take
204 cycles. The halving in every stage makes the output the DFT divided by 64, so it never
overflows. The twiddle table is computed at elaboration:
`round(32767·cos(2πk/64)) − j·round(32767·sin(2πk/64))`. Results are read in bit-reversed
order, and only the 52 used subcarriers are sent.

## Montium building blocks

| Module | What it is |
|--------|------------|
| `montium_alu` | Combinational. Inputs A, B, C, D (16 bits), outputs OUT1, OUT2, a 32-bit east input from the right neighbour and a west output to the left one. Operations: `A·B`, `A·B+E`, `A·B−E`, and `C±D`. Results go through a rounding right shift and 16-bit saturation. |
| `montium_regfile` | Four-entry input register file. A write becomes visible only after the clock edge; there is no bypass. |
| `montium_cmul` | One complex product per cycle on four ALUs. `xi·yi` goes west into `xr·yr − E`, and `xi·yr` goes west into `xr·yi + E`. Operands are loaded into the register files at one edge, and the product is valid in the next cycle. |
| `montium_mem` | 512 × 16 local memory with one write port and one synchronous read port. |
| `montium_agu` | Base + k·stride address counter. It produces tile 1's sample write addresses. |
| `montium_ccu` | 16-bit configuration port. A header word (`cfg_hdr` = 1) carries the memory number in bits [12:9] and the start address in bits [8:0]. Data words follow and are written with address auto-increment, one word per clock. |

## Using the top: what the host loads

The configuration port is `cfg_valid`, `cfg_tile`, `cfg_hdr`, `cfg_data`. `cfg_tile`
selects tile 1 or tile 3; tile 2 needs nothing.

| Tile | Memory (header bits [12:9]) | Contents |
|------|------------------------------|----------|
| 1 | 0 (M01) | `round(32767·cos(2πi/512))`, i = 0…511 |
| 1 | 1 (M02) | `round(32767·sin(2πi/512))` |
| 1 | 2 (M03), address 0 | phase step per sample, units of 2π/65536 |
| 3 | 0 / 1 (M01 / M02) | equalizer coefficient re / im per subcarrier position 0…51, Q8.8 |
| 3 | 2 (M03) | Pd(i) per data symbol i, Q2.14 (±16384 for ±1) |
| 3 | 3 (M04) | de-map table |
| 3 | 4 (M05), addresses 0–3 | de-map parameters P0–P3 |

A frame is processed in these steps:

1. Load the tables.
2. Estimate the frequency offset from the two 64-sample copies of preamble C. The angle
   of `Σ r[n+64]·conj(r[n])` over 16 samples is the phase advance over 64 samples.
3. Write the step.
4. Pulse `frame_start` and feed the 160 preamble samples.
5. From the second preamble symbol's 52 values on `fft_tap_data`, compute
   `c = C_known / Y · 256`.
6. Write the coefficients, raise `eq_enable`, and feed the data symbols.

Prefix removal counts from `frame_start`. It assumes that transmitter and receiver sample
clocks are locked, so the symbol boundaries never move.

## Where this design departs from the reference implementation

- **Fixed-function tiles instead of programmable ones.** A real Montium runs every tile
  from configurable instructions, selected by a sequencer and four decoders (memory,
  crossbar, register, ALU) over a reconfigurable crossbar. These parts are not described
  closely enough to build. Instead, each tile is a hard-wired controller that drives
  Montium-style ALUs, register files and memories. The cycle counts match the reference;
  the instruction-level mapping onto five ALUs does not. For example, the FFT uses two
  ALUs for add/subtract plus four for the multiply.
- **Configuration data only.** The configuration port writes memory contents (tables,
  coefficients, parameters), not ALU or interconnect instructions. The byte counts of the
  reference configurations (274 / 946 / 576 bytes) have no counterpart here.
- **FFT storage.** The 64-word FFT array is a register array with two reads and two
  writes per cycle, not a pair of 512-word memories.
- **Own choices.** The ALU operation set, the 32-bit east–west link, all number formats,
  the reciprocal-table division, the meaning of the four de-map parameters, the memory
  map, the header format and the valid/ready links.
- **Prefix removal** is a fixed-position drop. Finding the prefix by correlation, which
  is needed when the sample clocks drift, is not built. The reference implementation
  did not build prefix removal at all.
- **Not hardware here.** The frequency offset estimation and the equalizer coefficient
  division run on the host. The testbench models them.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against values computed
independently in the testbench (integer or floating-point models) and ends with a
`TB_RESULT checks=… failures=…` line.

| Testbench | What it shows |
|-----------|---------------|
| `tb_montium_alu`, `tb_montium_regfile`, `tb_montium_mem`, `tb_montium_agu`, `tb_montium_ccu`, `tb_montium_cmul` | Random operands against reference arithmetic. Also: no bypass, read latency, address sequences, header/data decoding. |
| `tb_prefix_removal` | Exactly samples 16…79 of every symbol pass, with input gaps and output stalls. |
| `tb_fo_tile` | Outputs within 2 LSB of `x·e^{jθ}` for four step values; 67-cycle execution. |
| `tb_fft_tile` | 52 outputs within 6 LSB of the floating-point DFT/64; 204-cycle execution. |
| `tb_eq_tile` | Random channel and common phase per symbol. All 16-QAM, QPSK, 64-QAM and BPSK decisions exact, with a table-and-parameter switch between each, plus the preamble drop; 110-cycle execution. |
| `tb_hl2_receiver` | End to end at full size. A transmitter model, a channel (two paths, about 38 kHz frequency offset, phase offset, noise) and a host model. Preamble, then 8 16-QAM and 4 QPSK symbols. All 576 de-mapped words must be exact. Each mechanism must occur: prefix drop, rotation, preamble drop, phase correction, modulation switch, stall. |
| `tb_hl2_mac_frame` | A whole downlink MAC frame, as in the reference evaluation: preamble C plus 498 16-QAM symbols (95,616 bits) through the same channel, with the bit-error count required to be 0. |
| `tb_hl2_awgn` | Bit-error-rate sweep against a double-precision model of the same receiver. Points: Eₛ/N₀ of 8, 12, 16 and 24 dB without multipath; 16 and 30 dB on an 18-tap Rayleigh channel with an exponential power profile of 1 and 5 samples RMS delay spread (50 and 250 ns, the spreads of channel types A and E). Each point has its own frequency offset (up to ±0.006 cycles per sample, ±120 kHz at 20 MHz) and phase offset, and is 40 16-QAM symbols (7,680 bits). Where no coefficient saturates, fixed-point errors must match the model's within 10 % plus a margin for decisions near a threshold. BER must fall with Eₛ/N₀, and be below 10⁻³ at 24 dB without multipath. |

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hl2_receiver \
    rtl/hl2_pkg.sv rtl/*.sv tb/tb_hl2_receiver.sv
./obj_dir/Vtb_hl2_receiver
```

List `rtl/hl2_pkg.sv` first. All modules lint clean with `verilator --lint-only -Wall`,
apart from unused-constant notes on package constants and one note on `eq_tile`'s
`|S|²` product. Only its upper bits index the reciprocal table.

On AWGN the fixed-point receiver tracks the double-precision model closely. One run
gives 1634 / 1650, 716 / 726, 177 / 180 and 0 / 0 bit errors at 8, 12, 16 and 24 dB.

The fading points only approximate channels A and E: they use the RMS delay spreads, not
the exact tap profiles. They show the main limit of the number formats. The equalizer
coefficient is `1 / (G·H)` in Q8.8, where G is the received signal level and H the
channel gain. It saturates on subcarriers faded below `|H| < 1 / (128·G)`. That is
about 0.24 at the testbench's level, where each of I and Q has an rms of 0.16 of full
scale. When a channel has such a fade, the two receivers part ways at 30 dB. Over ten
such channel draws the fixed-point receiver lost 0 to 83 bits of 7,680, against 1 to
51 for the model. It was usually worse, up to 2.7 times, and once better. A saturated
coefficient caps the noise on a faded pilot as well as the signal. A wider coefficient
format, or a per-frame coefficient exponent chosen by the host, would remove this. A
higher input level set by an AGC narrows it.
