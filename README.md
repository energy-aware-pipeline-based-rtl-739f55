# RMR FFT: a reconfigurable mixed-radix FFT/IFFT pipeline, 16 to 4096 points

This is a streaming FFT/IFFT processor. One instance computes transforms of any power-of-two size from 16 to 4096 points. It switches size between frames. It takes eight complex samples per clock and sustains four samples per clock over back-to-back frames. Words stay 16 bits wide all the way through. Precision is held by block floating point (BFP): every block of intermediate data is shifted up to full scale before it is used, and the exponents are summed along the way.

The idea that makes one pipeline serve nine sizes is the radix plan. Every size is split into radix-8 stages plus one last stage of radix 2, 4 or 8:

| N | stages | radix plan | data-flow class |
|---|---|---|---|
| 16, 32, 64 | 2 | 8 × {2, 4, 8} | S |
| 128, 256, 512 | 3 | 8 × 8 × {2, 4, 8} | M |
| 1024, 2048, 4096 | 4 | 8 × 8 × 8 × {2, 4, 8} | L |

Because every stage but the last is radix 8, the same three hardware stages work for every size. Only three things change:
- how many stages the data visits;
- the capacity of the register banks between the stages;
- the mode of the final butterfly.

The four-stage sizes would need a fourth radix-8 unit. Instead, they send their data through the first butterfly twice.

## Pipeline

```
in_data ────────────┐
                     ├─ (ser_mode) ─ in
ser_data ─ in_buf ───┘
in ─ I/Q swap ─┬─► R8_BF a ─ reg ─ MULT/ROM ─► RB_4096 ──┐   (class L, first pass)
               │      ▲                                  │
               │      └──────── second pass ◄────────────┘
               │                   MULT/ROM ─► RB_512 a/b ─┐ (classes M, L)
               └──────────────────────────────────────────►├─► R8_BF b ─ reg ─ CMULT ─► RB_64 a/b
                                                (class S)  ┘
RB_64 a/b ─► RR_BF (radix 8 / 2×4 / 4×2) ─ reg ─ I/Q swap ─► out
```

- **R8_BF a, R8_BF b** (`bf_r8`): combinational 8-point decimation-in-frequency butterflies. Each has three radix-2 layers. The only internal twiddles are ±j and (±1±j)/√2. ±j costs a swap and a negation. 1/√2 is the shift-and-add constant 2⁻¹+2⁻³+2⁻⁴+2⁻⁶+2⁻⁸+2⁻¹⁴.
- **RR_BF** (`bf_rr`): the same three layers with two bypass multiplexers. ENA feeds the inputs straight into the second layer, which makes two radix-4 butterflies. ENB feeds them into the third layer, which makes four radix-2 butterflies. Neither set gives a radix-8 butterfly.
- **MULT/ROM** (`mult_rom`, `tw_rom`): seven complex multipliers with one twiddle ROM each. Lane 0's twiddle is always 1, so it has no multiplier. It serves the first stage of classes M and L and the second pass of class L.
- **CMULT** (`cmult`): the twiddle step in front of the last register bank. All its twiddles are 64th roots of unity, so it needs no ROM (see *Twiddles*).
- **Register banks** (`rb_a`, `rb_b`, wrapped in `rb_stage`): they hold one block between two computation stages and reorder it. Each bank stage has one BFP unit (`bfp_unit`). The stage in front of the last butterfly and the middle one each have two identical banks used in turn, so one can fill while the other empties.
- **CONTROL** (`rmr_ctrl`): decodes the size and holds off the input when the first bank is still emptying. It also produces the power-gating table.
- **I/Q swap** (`iq_swap`): an IFFT is an FFT with real and imaginary parts swapped at the input and again at the output.
- **Input buffer** (`in_buf`): an optional serial front end that turns one sample per clock into the 8-lane order the core expects. The top selects it with `ser_mode`.

Pipeline registers sit behind each butterfly. Each register bank starts emptying on the cycle after its last write. With these two rules the latency (first input beat to last output beat) is:

| N | 16 | 32 | 64 | 128 | 256 | 512 | 1024 | 2048 | 4096 |
|---|---|---|---|---|---|---|---|---|---|
| cycles | 6 | 10 | 18 | 37 | 71 | 139 | 278 | 552 | 1100 |

In closed form: N/8 + N/8 + 2 for class S, + N/64 + 1 more for class M, + N/512 + 1 more for class L.

## Data order: who carries which sample

This is the part that needs the most care.

**Input.** A frame is N/8 beats. On beat i, lane k carries x[i + (N/8)·k]. So lane k streams the k-th eighth of the frame. That is exactly the input of a radix-8 decimation-in-frequency stage: on every beat the eight lanes hold one butterfly's inputs, N/8 apart.

**Between stages.** After a radix-8 stage with twiddles, the data splits into eight independent sub-transforms of N/8 points each. Each sub-transform is a "block". The register bank that follows has to do two things:
- collect a block of M words, which arrived spread over M/8 beats and eight lanes;
- put it back out in the order the next butterfly wants.

That order is again "lane k = k-th eighth", but inside the block. In the bank-local index, a block is written with index i + (M/8)·k on lane k of beat i. The required output differs by bank type:

- RB_64 type, in front of the reconfigurable butterfly: lane k of beat j must carry index 8j + k. The last butterfly works on groups of eight consecutive words: one radix-8, two radix-4 or four radix-2 butterflies.
- RB_512 and RB_4096 types, in front of another radix-8 stage: lane k of beat j must carry index b·(M/8) + (j mod M/64) + (M/64)·k, where b = ⌊j / (M/64)⌋. In words, the block of M words is itself eight sub-blocks of M/8 words. The bank delivers them one after the other, each in "k-th eighth" order.

**Output.** Beat j, lane k carries X[bitrev_N(8j + k)], where bitrev_N reverses log2(N) bits. This is the natural order of a decimation-in-frequency pipeline. Reorder downstream if you need natural order.

### RB_64: the 8×8 grid (`rb_a`)

There are 64 two-input registers in 8 rows and 8 columns. One PHASE signal selects the input of every register:
- **Input phase.** With L = M/8 beats per block, lane k owns a segment of L registers in row 7 − ⌊kL/8⌋. Lane k's word enters at the segment's right end and the segment shifts left. After L beats, row 7 − j holds indices 8j … 8j+7, in order.
- **Output phase.** All rows shift down one row per beat, and row 7 is the output.

For M = 16, 32 or 64 only the bottom 2, 4 or 8 rows are clocked.

### RB_512 and RB_4096: chained basic blocks (`rb_b`)

There are eight basic blocks, one per input lane. Each has 8 rows by MAXW columns: MAXW = 8 for RB_512 and 64 for RB_4096. For capacity M only the rightmost M/64 columns are clocked. The clocks come in two zones:
- **Zone 2 (bottom row)** shifts right on every input beat. The lane's word enters at the leftmost used column.
- **Zone 1 (upper rows)** shifts up one row every M/64 input beats. After M/8 beats, basic block b holds its lane's M/8 words as eight rows of M/64.
- **Output phase.** Every row of every block shifts right on each beat. The leftmost used column of block b takes the rightmost column of block b+1. The rightmost column of block 0 is the output, lane k from row 7 − k.

Data therefore drains through the chain block after block. That drain produces the sub-block order above.

### Duplicate banks and the first bank

A bank cannot take new data while it is emptying. The middle and last bank stages therefore have two banks, a and b (`dup_en`). A write pointer and a read pointer each toggle after a full block, so blocks go a, b, a, b. The first bank stage of a size (RB_64 for class S, RB_512a for M, RB_4096 for L) is a single bank. While it empties, CONTROL holds `in_ready` low. This is what limits throughput to one frame every N/4 cycles: N/8 beats to fill, N/8 to empty.

## Sharing R8_BF a for 1024..4096 points

For class L the first radix-8 stage writes the whole frame into RB_4096, which has capacity N. When that bank empties, its output goes back through the input multiplexer of R8_BF a and through MULT/ROM again. Now the twiddle base is N/8 instead of N, and the result goes into RB_512a/b. While the second pass runs, the input is held off. The bypass selection costs one extra cycle when switching from one frame's second pass to the next frame's first pass. Back-to-back class-L frames are therefore N/4 + 1 cycles apart, not N/4.

## Twiddles

### MULT/ROM: seven ROMs of 512 words, six power banks

In a stage of base B, lane k (after the butterfly, in bit-reversed position) of butterfly m needs W_B^(m·bitrev3(k)). Every B used here divides 4096, so the exponent is rewritten as W_4096^(t·bitrev3(k)) with t = m·4096/B. Lane k's ROM stores W_4096^(t·bitrev3(k)) for t = 0…511, rounded to Q1.14. The address is just a counter shifted left by log2(4096/B).

Smaller bases touch only addresses with trailing zeros. So each ROM is split by the trailing zeros of t:
- bank A: odd t;
- B: t ≡ 2 mod 4;
- C: t ≡ 4 mod 8;
- D: t ≡ 8 mod 16;
- E: t ≡ 16 mod 32;
- F: multiples of 32.

A 128-point base needs only bank F, and each larger size switches on one more bank. An unpowered bank reads as zero. The tables are computed with `$cos`/`$sin` at elaboration, so no data file is needed.

### CMULT: 64th roots by shift-and-add

The stage in front of RB_64 only ever needs W_64^p. By the symmetry of the unit circle, any W_64^p is one of nine first-octant values (cos and sin of 2πq/64, q = 0…8) with real and imaginary parts swapped and/or negated. Each of the nine (cos, sin) pairs is a fixed shift-and-add network: for example, cos(2π/64) = 2⁰ − 2⁻⁸ − 2⁻¹⁰ + 2⁻¹⁴. Each lane computes the products it can need and selects by octant. The source design instead routes data through a shuffle network to one shared constant bank. The results are the same.

## Block floating point and the output exponent

Each radix-2 layer halves its result, rounding half up. This cannot overflow as long as every complex word has a modulus below 2^15. Halving throws away magnitude, and each bank stage gets it back:

1. **While a block is written**, `bfp_unit` tracks the smallest number of redundant sign bits over all 16 real and imaginary parts of the block. The block factor is that count minus one. The one guard bit keeps the next butterfly's 1/√2 products in range.
2. **When the block is read**, every word is shifted left by the factor.
3. The bank stores exponent_in + factor with the block. The stage output carries it as the block's exponent, so the exponent of a word is the sum of the factors of every block it passed through.

The last stage's exponent leaves the core as `out_sbit` (S). The value of an output word is:

- FFT: X = out · 2^(log2 N − S)
- IFFT: x = out · 2^(−S)

The 1/N of the inverse transform is already included. S can differ between beats of one frame because different blocks scale differently, so apply it per beat.

## Control, sizes and power gating

`rmr_ctrl` decodes log2 N into:
- the data-flow class;
- the capacities of the three bank stages (N for the first one; then N/8, N/64);
- ENA/ENB for the last butterfly;
- the twiddle bases;
- which ROM banks are on.

It also holds a power-gating table (`pwr`): which butterflies, multipliers, ROM banks, bank quarters and halves, and BFP units are on for the current size. The table is an output for an external power manager. Inside the core, unused register columns and rows get no clock enable, which models the clock gating.

A new `cfg_lg`/`cfg_ifft` is taken only when no frame is in flight. If the configuration changes while frames are in the pipeline, the input is held off until it drains.

## Input buffer (`in_buf`)

This optional front end takes one sample per clock and produces the N/8 beats of a frame. It has seven rows of N/8 used registers plus one input register, 7N/8 + 1 words in all. Blocks 0–6 of a frame (N/8 samples each) enter the bottom row. When the next block starts, the upper rows shift up. The last block is not stored: while it arrives, all rows shift right and the sample itself is lane 7. So output beat i leaves on the cycle after sample 7N/8 + i arrives, and the buffer is empty in time for the next frame.

In the top, `ser_mode = 1` feeds the core from this buffer instead of `in_data`. The buffer cannot wait, so every beat it produces must be accepted; an assertion checks this. Frames of one size arrive N cycles apart, and the core needs only N/4 + 1, so a continuous stream always fits. Before the first sample of a frame with a new size or direction, wait for `idle`. The buffer samples `cfg_lg` with a frame's first sample. Change `ser_mode` only while idle.

## Interface (`rmr_fft`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `cfg_lg[3:0]`, `cfg_ifft` | in | log2 N (4…12, clamped), inverse transform; taken when idle |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 8-lane input beat, taken when both are high |
| `ser_mode`, `ser_valid`, `ser_data` | in | serial input through the input buffer: one sample per clock, natural order |
| `out_valid`, `out_data`, `out_sbit`, `out_last` | out | output beat, its exponent S, last beat of a frame |
| `pwr` | out | power-gating table for the current size |
| `idle` | out | no frame in flight |

A lane is `{re, im}`, two 16-bit signed words. `out_valid` has no back-pressure: the consumer must take every beat. Once a frame's first beat is accepted, `in_ready` stays high until the frame's N/8 beats are in.

## Accuracy and where this RTL departs from the source design

- **Precision.** With full-scale random inputs the simulated SNR is about 60–74 dB depending on size. For inputs at 1/32 of full scale it is about 48 dB, because there is no BFP ahead of the first butterfly. The source design reports over 110 dB, which a 16-bit output word cannot carry (its limit is about 98 dB). The loss here comes mainly from halving in every radix-2 layer (the source design does not say where it scales) and from rounding at each stage.
- **Index formulas.** The published reordering formulas for the two bank types do not produce the orders that the following butterflies need. One is correct only for 64 words; the other has lost its sub-block term. The orders given under *Data order* are the ones the pipeline needs, and they are what the banks implement.
- **CMULT** uses per-lane constant selection instead of a shuffle network and shared constant bank.
- **ROM bank names.** The power table of the source design names its banks in the reverse order of the bank descriptions. Here A is always the odd-address bank and F the multiples of 32; the power table is mapped accordingly.
- **Throughput.** Frames of 1024–4096 points are one cycle further apart than N/4, because the shared butterfly switches passes.
- **Handshake, reset, exponent output and rounding** are this design's own choices.
- **Not built.** The external power management unit (only its table is generated) and the full-custom flip-flop used for the register banks (modelled as ordinary flip-flops with enables).

## Files

`rtl/`:
- `rmr_pkg.sv`: types (`cplx_t`, `vec_t`, `mode_t`, `pwr_t`) and butterfly arithmetic.
- Computation: `bf_r8.sv`, `bf_rr.sv`, `cmult.sv`, `mult_rom.sv`, `tw_rom.sv`, `iq_swap.sv`.
- Storage: `rb_a.sv`, `rb_b.sv`, `bfp_unit.sv`, `rb_stage.sv`, `in_buf.sv`.
- Control and top: `rmr_ctrl.sv`, `rmr_fft.sv` (top).

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each ends with a `TB_RESULT checks=… failures=…` line and has a watchdog. `tb_rmr_fft.sv` is the end-to-end test:
- It runs every size as FFT and IFFT, with single and back-to-back frames, size changes and input stalls. It also runs continuous serial streams through the input buffer.
- It checks every frame against a double-precision DFT, using the exponent above.
- It checks the latency table and the frame spacing.
- It counts how often each mechanism fired: each data flow, the second pass, the duplicate banks, BFP shifts, the radix-4 and radix-2 modes, IFFT swaps, size changes and serial frames.

## Simulating

With Verilator 5, put the package first:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rmr_fft \
    rtl/rmr_pkg.sv tb/tb_rmr_fft.sv -o sim
./obj_dir/sim                 # add +MAXLG=9 to stop at 512 points
```

Any other testbench builds the same way. The end-to-end test runs in a few seconds at the default (largest) size.
