# LTE uplink PUSCH transmitter (SC-FDMA) in SystemVerilog

This is the baseband transmit chain of an LTE user terminal for the
physical uplink shared channel (PUSCH), single antenna, normal cyclic
prefix. Modulated data symbols go in. A complete SC-FDMA baseband waveform
comes out, with the demodulation reference signal (DMRS) in place, at the
sampling rate of the chosen bandwidth (1.4 to 20 MHz, i.e. 6 to 100
resource blocks).

The structure follows the transmitter of the thesis *Development in VHDL of
a 4G Physical Layer Transmitter*. That design was built in Simulink and
turned into VHDL with HDL Coder. This is an independent RTL rewrite of the
same block diagram. Where the thesis gives the function of a block but not
its insides, the block is a plain implementation of that function. Those
places are listed under "Where this design departs from the original"
below.

## Signal flow

```
data_in ─► transform_precoding ─► pipe_delay(15) ─┐
              │ sf_start                            ├─► resource_grid ─► scfdma_modulator ─► tx_out
              └─────────► pusch_dmrs_gen ───────────┘
```

One subframe is 1 ms: 14 SC-FDMA symbols, numbered l = 0..13. Symbols 3 and
10 carry the DMRS. The other 12 carry PUSCH data. Each symbol occupies
M = 12·NRB subcarriers (72, 180, 300, 600, 900 or 1200).

| NRB | M | transform FFT | output rate | decimation | CP (l=0,7 / others) |
|----:|----:|----:|----:|----:|----|
| 6   | 72   | 1800 | 1.92 MHz  | 16 | 10 / 9 |
| 15  | 180  | 1800 | 3.84 MHz  | 8  | 20 / 18 |
| 25  | 300  | 1200 | 7.68 MHz  | 4  | 40 / 36 |
| 50  | 600  | 1200 | 15.36 MHz | 2  | 80 / 72 |
| 75  | 900  | 1800 | 15.36 MHz | 2  | 80 / 72 |
| 100 | 1200 | 1200 | 30.72 MHz | 1  | 160 / 144 |

The core always runs at 2048 samples per symbol, one sample per clock. With
a 30.72 MHz clock, one subframe of output takes exactly 30720 cycles at
every bandwidth. The output rate controller then keeps every D-th sample.

### Number format

All samples are complex. Each part is 16 bits, signed, in s2.13 format
(1.0 = 8192). The package `ultx_pkg` defines this as `cplx_t`, a packed
struct `{re, im}`. The package also holds every per-bandwidth table as a
function of NRB:
- M (`nrb_to_msc`)
- FFT size
- Zadoff-Chu length
- scaling factors
- decimation
- CP length

`nrb` must be one of the six legal values. Anything else selects the
100-RB entries.

## Transform precoding: a 12·NRB-point DFT built from a 1200/1800-point FFT

LTE spreads every data symbol with an M-point DFT. M can be 72, 180, 300,
600, 900 or 1200. Rather than build six FFTs, the design uses one
mixed-radix FFT that is either 1200 points (2⁴·3·5²) or 1800 points
(2³·3²·5²). The input must arrive **zero-stuffed**. Each of the 12 data
symbols of a subframe is sent as N = 1200 or 1800 samples. The M modulated
values sit at every (N/M)-th position, and zeros fill the rest.

Let a(m) sit at position m·N/M. Bin k of the N-point FFT is then
Σ a(m)·e^(−2πi·k·m/M). For k < M this is exactly the M-point DFT. The base
rate controller (`tp_rate_controller`) therefore keeps only the first M bins
of each block.

Before the FFT, `amplitude_scaling` does two things:
- It multiplies by 1/√M, a Q1.15 table value.
- It shifts right by `SHIFT` = 2 bits.

The FFT has no internal scaling, so this headroom keeps it from
saturating. A left shift by the same 2 bits after the rate controller
restores the level. Unit-power QAM input therefore gives unit-power output.
`pusch_index_gen` tags every output with its subcarrier k and grid symbol l.
It counts l = 0, 1, 2, 4, …, 9, 11, 12, 13, skipping the DMRS symbols.

### The FFT engine (`fft_1200_1800`, `fft_stage`, `fft_data_ordering`)

There are seven decimation-in-frequency Cooley–Tukey stages:
- A first stage of radix 2 (for 1200 points) or radix 3 (for 1800 points).
- A shared 600-point chain of radices 2, 2, 2, 3, 5, 5.

A multiplexer selects which first stage feeds the chain.

Each `fft_stage` treats its input as blocks of L samples. It works in three
steps:
1. It writes a block into one half of a two-bank buffer while it reads the
   previous block from the other half.
2. For every output it reads the RADIX taps x(p·L/R + n) at once and
   computes one row of the R-point DFT.
3. It multiplies by the twiddle W_L^(j·n), using the three-multiplier form
   k1 = c(a+b), k2 = a(d−c), k3 = b(c+d).

Twiddles are Q1.14 constants that the module computes from `$cos`/`$sin`
at elaboration. No table files are involved. A stage emits its L outputs
on consecutive cycles. The first comes 4 cycles after the last input of
the block.

After the seven stages the data is in mixed-radix digit-reversed order.
`fft_data_ordering` writes each frame into a two-bank RAM. It reads the
frame back with a counter whose digits have weights 600, 300, 150, 75, 25,
5, 1. This does in one buffer the matrix transposes of all the stages.

Measured accuracy against a double-precision DFT is an SNR of about 48 dB,
with a worst bin error of about 40 LSB for full-scale random input.

## DMRS generator (`pusch_dmrs_gen`, `gold_seq_gen`, `cordic_rotator`)

For slot ns the generator produces r(n) = e^(jαn)·x_q(n mod N_ZC), where:
- x_q(m) = e^(−jπqm(m+1)/N_ZC)
- N_ZC is the largest prime below M (71, 179, 293, 599, 887, 1193)
- α = 2π·n_cs/12

The rules are those of the LTE uplink reference signal:
- **Group number.** u = (f_gh + f_ss) mod 30 and f_ss = (cell ID + sequence-group offset) mod 30. With group hopping on, f_gh comes from eight bits of a Gold sequence seeded with ⌊cell ID/30⌋.
- **Sequence number.** v, used only with sequence hopping on and group hopping off, is one bit of a second Gold sequence.
- **Cyclic shift.** n_cs combines the two configured shift indices, via the tables {0,2,3,4,6,8,9,10} and {0,6,3,4,2,8,10,9}, with eight more bits of the second sequence.
- **Root.** q = ⌊q̄+½⌋ + v·(−1)^⌊2q̄⌋, where q̄ = N_ZC(u+1)/31.

Each slot runs a small state machine:
1. Load both Gold generators.
2. Run them through the 1600-bit warm-up and the needed indices, about 1600 + 56·ns cycles.
3. Derive u, v, n_cs and q.
4. Stream M samples on consecutive cycles.

The phase is never computed with a multiplier over n. Two residues are
updated by additions only:
- n_cs·n mod 12
- q·m(m+1)/2 mod N_ZC

Their sum is turned into a 24-bit fraction of a turn with a stored
reciprocal 2³²/N_ZC. A 16-iteration pipelined CORDIC then produces
cos + j·sin with amplitude 8192. The CORDIC latency is 18 cycles.

The first PUSCH sample of a subframe starts the generator. It writes symbol
3 (slot 0), then symbol 10 (slot 1). An internal subframe counter (mod 10,
from reset) gives ns = 2·subframe and 2·subframe+1 for the hopping
patterns. Configuration inputs must not change while `dmrs_busy` is high.

## Resource grid and the grid/modulator handshake (`resource_grid`)

The grid holds 14 banks of 2048 complex words, one bank per symbol. It has
two write ports:
- a PUSCH port, fed through a 15-cycle delay line
- a DMRS port

Both ports may write in the same cycle, because they always address
different banks. A bank is marked **full** when its last subcarrier (M−1)
is written.

The modulator reads symbols in order: 0, 1, …, 13, 0, … It waits until the
bank it needs is full, then reads M words. Every bank is read at the same
address, and a registered bank select picks the wanted one a cycle later.
Each word is cleared as it is read. Reading the last subcarrier frees the
bank. The grid is therefore empty again at the end of every subframe, and
the next subframe can be written behind the reader.

A write to a bank that is still full is dropped and counted in
`grid_overrun`. This can only happen when input arrives faster than one
subframe per 30720 cycles.

## SC-FDMA modulator (`scfdma_modulator` and its parts)

1. **`scfdma_symbol_formation`** places subcarrier k of symbol l at bin
   1024 − M/2 + k of a 2048-bin frame, with zeros elsewhere. No DC
   subcarrier is skipped. After each frame it idles for the CP length of
   that symbol, so that frames arrive at the pace the CP stage sends them
   out. `ready` is high while it waits for the next bank.
2. **`ifft_2048`**: eleven radix-2 `fft_stage`s with one bit of growth each
   (16 → 27 bits), then a bit-reversal buffer. The output is unnormalised.
3. **Output shift.** The IFFT output is shifted right by 3, 4, 5, 5, 5, 6
   bits for 6…100 RBs, then saturated to 16 bits. This keeps the waveform
   near unit power.
4. **`half_subcarrier_shift`** multiplies sample n by e^(jπn/2048). This
   moves every subcarrier up by 7.5 kHz, so that DC falls between two
   subcarriers.
5. **`fftshift_time`** multiplies by (−1)ⁿ. This moves bin 1024 to zero
   frequency.
6. **`cp_insertion`** buffers each 2048-sample symbol. It sends the last 160
   samples (symbols 0 and 7) or 144 samples (the other symbols), then the
   whole symbol.
7. **`windowing`** is optional and switched by `win_en`. It cross-fades the
   first W = 32 samples of each symbol with the cyclic continuation of the
   previous symbol, which is that symbol's first 32 samples after its
   prefix. The fade uses a raised cosine w(i) = (1 − cos(π(i+½)/W))/2:
   y(i) = w(i)·x(i) + w(W−1−i)·x_prev(Ncp_prev+i). This softens the jump
   between symbols, which lowers out-of-band emission. The overlap lies
   inside the cyclic prefix, so symbol timing and length do not change.
   With `win_en` low the stage is a plain register.
8. **`output_rate_controller`** keeps every D-th sample, counted from reset.
   All symbol and CP lengths are multiples of 16, so the kept samples line
   up with symbol starts.

Together, the output of symbol l is, before decimation,

  x_l(n) = 2^(−s) · Σ_k X(l,k) · e^(2πi·(k − M/2 + ½)·n/2048),  n = 0..2047,

sent as x_l(2048−Ncp … 2047) followed by x_l(0 … 2047).

## Timing

| quantity | value |
|---|---|
| input | up to one sample per cycle; 12 × N samples per subframe |
| output | 30720 cycles per subframe, of which 30720/D carry `tx_valid` |
| first input → first output | 13120 (6 RBs), 12148 (25 RBs), 13048 (100 RBs) cycles |
| DMRS slot | ≈1600 + 56·ns cycles of warm-up, then M samples |

The original design reports 12841 … 13669 samples for the same delay.

## Ports of the top (`uplink_tx`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `nulrb` | in | 7 | resource blocks: 6, 15, 25, 50, 75, 100 |
| `ncell_id` | in | 9 | cell identity 0..503 |
| `seqgroup` | in | 5 | sequence-group offset 0..29 |
| `cyclicshift`, `cyclicshift_dci` | in | 3 | DMRS cyclic-shift indices |
| `group_en`, `seq_en` | in | 1 | group / sequence hopping enables |
| `win_en` | in | 1 | symbol-edge windowing enable |
| `data_in_valid`, `data_in` | in | 1, 32 | zero-stuffed PUSCH samples (`cplx_t`) |
| `tx_valid`, `tx_out` | out | 1, 32 | SC-FDMA samples at the bandwidth's rate |
| `tx_sym_start`, `tx_sym` | out | 1, 4 | first sample (CP) of a symbol and its index |
| `mod_ready` | out | 1 | modulator waiting for the next grid symbol |
| `dmrs_busy`, `dmrs_subframe` | out | 1, 4 | DMRS generator state and subframe number |
| `grid_overrun` | out | 16 | grid writes dropped because input ran ahead |

Configuration inputs are static: change them only under reset or when the
transmitter is idle.

## Where this design departs from the original

- **Windowing parameters.** The original modulator has an optional windowing stage that smooths and overlaps symbol edges, but its window shape and length are not specified. The raised cosine, W = 32 and placing the overlap inside the cyclic prefix are this design's choices.
- **DMRS start.** The original starts DMRS generation after two PUSCH symbols have arrived. Here it starts at the first PUSCH sample. The grid's full flags make the exact start time irrelevant.
- **Handshake.** The grid/modulator handshake (full flags, drop-on-full, overrun counter) is this design's own. The original names only a read enable and a ready signal.
- **Data reordering.** The original reorders the FFT output after each stage and has a controller that clears those RAMs after 12 symbols. Here a single two-bank buffer reorders once at the end. Every location is rewritten before it is read, so there is nothing to clear.
- **Erase timing.** The grid is erased word by word as it is read, rather than in a separate pass after the subframe.
- **Internal scaling and radix order.** The scaling shift (2 bits), the IFFT output shifts, the CORDIC size and the radix order inside the 600-point chain are this design's choices.
- **Decimation.** The output rate controller decimates without a filter. At each bandwidth the occupied band lies well inside the new Nyquist band, so nothing aliases.
- **Cyclic prefix sign.** The CP is copied after the half-subcarrier and (−1)ⁿ multiplications, as in the original block order. The prefix therefore has the opposite sign to a phase-continuous waveform, because e^(jπn/2048)·(−1)ⁿ is −1 times its value at n − 2048. A receiver that discards the CP, which is what LTE receivers do, is unaffected. To get the continuous form, negate the prefix samples or move CP insertion ahead of the two multiplications.
- **Input source.** Scrambling, symbol modulation and the zero-stuffing of the input are outside this design. So are any RF or fronthaul stages after it.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module against values computed independently in the testbench (real
arithmetic, direct DFTs, bit-level Gold sequences). Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fft_stage` | radix-3/15-point stage against its defining sum; output timing |
| `tb_fft_1200_1800` | 1200- and 1800-point FFT against a direct DFT (≤80 LSB per bin, >40 dB) |
| `tb_fft_data_ordering` | permutation for both sizes |
| `tb_amplitude_scaling`, `tb_tp_rate_controller`, `tb_pusch_index_gen`, `tb_pipe_delay` | tables, bin selection, index sequence, delay |
| `tb_transform_precoding` | 6 and 25 RBs against X(k) = DFT_M(a)/√M, tags and framing |
| `tb_gold_seq_gen`, `tb_cordic_rotator` | sequence bits; angle sweep within a few LSB |
| `tb_pusch_dmrs_gen` | four configurations × two subframes against the reference-signal rules |
| `tb_resource_grid` | both write ports, erase-on-read, full flags, overrun |
| `tb_scfdma_symbol_formation`, `tb_ifft_2048`, `tb_half_subcarrier_shift`, `tb_fftshift_time`, `tb_cp_insertion`, `tb_windowing`, `tb_output_rate_controller` | modulator parts one by one |
| `tb_scfdma_modulator` | 6 and 25 RBs against the SC-FDMA formula above, with a late grid symbol; once more with windowing |
| `tb_uplink_tx` | end to end at 6 RBs (two subframes, group hopping), 25 RBs (two subframes, sequence hopping, windowing) and an unpaced 6-RB run that must overrun. It counts each mechanism and fails if one never occurred. |
| `tb_uplink_tx_full` | end to end at 100 RBs, a full 30720-sample subframe (≈30 s) |

End to end, the output matches the reference waveform with an SNR of 44 to
55 dB. Most of the error comes from the 16-bit transform-precoding FFT.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl --top-module tb_uplink_tx \
          rtl/ultx_pkg.sv tb/tb_uplink_tx.sv -Mdir obj_tb -o sim
./obj_tb/sim
```

The same command works for every testbench. Change the `--top-module` and
the testbench file name.

## Changing things

- **Bandwidth tables.** All per-bandwidth numbers live in `ultx_pkg`. The amplitude table is round(2¹⁵/√M). The reciprocal table is round(2³²/N_ZC).
- **Larger IFFT.** `NFFT_MAX` sets the IFFT size and the grid depth. Symbol formation and CP insertion assume 2048-sample symbols and the LTE CP lengths.
- **Another FFT size.** `fft_stage` is generic in `RADIX`, `L`, widths, scaling and direction. A different FFT is a matter of chaining stages and adapting the digit weights in `fft_data_ordering`.
