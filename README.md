# Eight-parallel SMSS mixed-radix FFT/IFFT processor

This is a streaming FFT/IFFT engine for high-rate OFDM. It takes **eight complex
samples per clock** and returns eight frequency bins per clock. It handles 256-,
128- and 64-point transforms and can change size from one symbol to the next.
The design is a mixed-radix multipath delay commutator (MRMDC) pipeline with three
stages: a radix-2/4 stage, then two radix-8 stages. It uses the *shared
multiplier scheduling scheme* (SMSS). Under SMSS, the twiddle multiplications
that would sit between the first and second stages are done inside the first
stage. The second stage then needs only adders. All general multipliers are
built from a Vedic (Urdhva Tiryakbhyam, "vertically and crosswise") multiplier.

## Index mapping: the key to reading the RTL

Every size is factored as N = R1 · 8 · 8, where R1 = 4, 2 or 1 for 256, 128 or 64
points:

    n = 64·n1 + 8·n2 + n3            (input index)
    k = k1 + R1·k2 + (N/8)·k3        (output index)

    X[k] = Σ_n3 W8^(n3·k3) · W_N^(n3·(k1+R1·k2)) · Σ_n2 W8^(n2·k2) · W_(N/8)^(n2·k1) · Σ_n1 W_R1^(n1·k1) · x[n]
           \___ stage 3 ___/  \__ twiddle_bank __/  \___ stage 2 ___/ \___ shared_mul ___/  \___ r24_bu ___/

The input arrives with data path p carrying x(8t+p) in input cycle t. So n3 = p,
and n2 is the cycle number modulo 8. Each piece of hardware follows from this:

| stage | module | what it does |
|---|---|---|
| input reorder | `input_buffer` | One tapped delay line per path. It lines up samples 64 apart, which arrive on the same path 8 cycles apart. |
| stage 1 | `r24_bu` ×8 | One radix-4 DFT (256 points), two radix-2 DFTs (128), or bypass (64). |
| SMSS twiddles | `shared_mul` ×8 | Multiplies by W_(N/8)^(n2·k1): three Vedic complex multipliers per path, shared by all modes. |
| commutator | `s2_commutator` | Gathers the eight n2 values of each (p, k1) and issues one group per clock. |
| stage 2 | `radix8_bu` ×8 | 8-point DFT over n2. Adders only; W8 is a fixed constant. |
| stage-3 twiddles | `twiddle_bank` | Multiplies by W_N^(p·(k1+R1·k2)), with 64 complex multipliers. |
| crossing | wiring in `smss_fft` | Third-stage BU q takes output k2 = q of every path, which is a transpose. |
| stage 3 | `radix8_bu` ×8 | 8-point DFT over n3, across the eight paths. |
| output reorder | `output_buffer` | Two banks. Sends bin 8t+p on path p, in natural order. |

### First-stage timing

For 256 points a symbol takes 32 input cycles. The radix-4 BU of path p needs
x(n), x(n+64), x(n+128) and x(n+192), which arrive in cycles m, m+8, m+16 and m+24.
Cycles 0–23 are therefore idle. In cycles 24–31 the BU gets taps D24, D16, D8
and the live sample (D0).

For 128 points (16 cycles) the delays are halved. In cycles 12–15 the BU does two
radix-2 operations per cycle: one on (D12, D4) = x(n), x(n+64) and one on
(D8, D0) = x(n+32), x(n+96).

For 64 points the first stage passes every sample through. Every BU output row
then carries the row index m, which `shared_mul` and `s2_commutator` use.

The bursty stage-1 output (a whole row in 8 or 4 cycles per symbol) is evened
out by the double-buffered commutator and output buffer. Symbols may follow
each other with no gap. The sustained rate is eight samples per clock.

## Interface (`smss_fft`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` | in | 1 | the eight input samples are valid; idle cycles inside a symbol are allowed |
| `in_re`, `in_im` | in | 8 × DW | sample 8t+p on path p |
| `fft_size` | in | 2 | `SZ_64`=0, `SZ_128`=1, `SZ_256`=2 (enum `fft_pkg::fft_size_e`) |
| `sel_ifft` | in | 1 | 1 selects the inverse transform |
| `out_valid`, `out_first` | out | 1 | bin beat valid; first beat of a symbol |
| `out_size` | out | 2 | size of the symbol being sent |
| `out_re`, `out_im` | out | 8 × (DW+9) | bin 8t+p on path p |
| `overflow` | out | 1 | sticky flag: a symbol was dropped because both output banks were full |

`fft_size` and `sel_ifft` are sampled with the first beat of each symbol.

A symbol needs N/8 valid beats in and produces N/8 consecutive beats out. The
first output beat follows the last input beat by R1 + 8 clocks: 12, 10 and 9
cycles for 256, 128 and 64 points. It comes later only if the previous symbol is
still being sent.

Switching to a *smaller* size right after a larger one can overrun the output
buffer. The small symbols finish sooner than the large one can be read out.
Leave about one large symbol's length (N/8 cycles) idle before the switch, or
`overflow` rises.

Parameters: `DW` (input width, default 16) and `TW` (twiddle width, default 16).

## Arithmetic

- **Word growth.** The design never saturates, so every stage widens the data:

  | point in the pipeline | width | growth |
  |---|---|---|
  | input | DW | |
  | after stage 1 | DW+3 | radix-4 +2, rotation +1 |
  | after stage 2 | DW+7 | |
  | inside stage 3 | DW+11 | |
  | output | DW+9 | |

  The output width holds the largest possible result, N·√2·2^(DW−1).
- **Twiddles.** These are signed TW-bit numbers with TW−2 fraction bits, so +1.0
  is exact and a factor of 1 passes data through unchanged. The table
  W256^e = cos(2πe/256) − j·sin(2πe/256) is computed at elaboration from
  `$cos`/`$sin` in `fft_pkg::make_twiddles`. No data file is needed. The 128-
  and 64-point modes use every 2nd or 4th entry.
- **Rounding.** Each complex product is rounded half-up by TW−2 bits. Inside the
  radix-8 BU, 1/√2 is round(2^16/√2) = 46341, with rounding.
- **IFFT.** The inverse is computed as conj(FFT(conj(x))), without 1/N scaling.
  The output is N times the normalised inverse. Conjugating the input value
  −2^(DW−1) saturates to 2^(DW−1)−1, which is a 1-LSB error on that one value.
- **Vedic multiplier.** `vedic_mult` forms product column k as the sum of all
  crosswise bit products a[i]·b[j] with i+j = k, plus the carry from column k−1.
  It works on magnitudes and applies the sign last.

Measured accuracy, with 16-bit full-scale random input against a double-precision
DFT: the largest error over all test symbols was 31 LSB. The output magnitudes
are about 10^5–10^6 LSB.

## Where this departs from the source architecture

- **Input reordering.** One radix-2/4 BU per data path, fed by D24/D16/D8 taps,
  as in the source's first-stage timing table. The text also describes splitting
  each path into eight four-cycle streams (A–H, delays D28, D24, …) feeding an
  upper and a lower BU; that split was not used. The 128-point delay choice
  (D12/D8/D4) is this design's.
- **Stage-3 multipliers.** The source folds the twiddles into the first phase of
  the third-stage radix-8 BU, which has 11 multipliers. Here they are a separate
  register rank (`twiddle_bank`, 64 multipliers) in front of a multiplier-free
  radix-8 BU.
- **Commutators and output buffer.** The delay commutators and output muxes are
  realised as double-buffered register banks, not as delay-element chains. The
  output order (natural) is this design's choice.
- **Sizes.** The 64-point mode is added. The source lists a reconfigurable
  processor for every size from 2 to 256 points and a 256/512-point variant.
  Sizes below 64 and 512 points are not implemented.
- **Throughput.** This pipeline delivers 8 samples per clock, which is 3.44 GS/s
  at 430 MHz. Timing, area and power are not characterised.
- **Not chosen by the source.** Widths, fixed-point formats, reset behaviour,
  flow control and the overflow flag are this design's own choices.

## Files

- `rtl/fft_pkg.sv`: size enum, helper functions, twiddle formula.
- `rtl/smss_fft.sv`: top level.
- The other files in `rtl/` each hold one module from the table above, plus
  `cmplx_mult.sv`, `vedic_mult.sv` and `twiddle_rom.sv`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_smss_fft.sv`: runs the full processor at its default parameters. It
  sends 256-, 128- and 64-point FFT and IFFT symbols, back to back, with idle
  input cycles and size changes. It compares every bin with a floating-point
  DFT and checks framing and latency. It requires each mechanism (radix-4, dual
  radix-2, bypass, IFFT, gaps, back-to-back, size switch, overflow) to occur.

## Simulating

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_smss_fft \
    rtl/fft_pkg.sv rtl/*.sv tb/tb_smss_fft.sv -o tb && ./obj_dir/tb
```

For a unit test, replace `tb_smss_fft` with another testbench name. The package
must come first on the command line. The full-processor build takes about a
minute; the simulation takes under a second.
