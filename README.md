# Modified Turbo Code encoder

A Modified Turbo Code (MTC) is a turbo-like error-correcting code designed
so that the decoder stays cheap. A classic turbo code puts two
convolutional encoders in parallel. An MTC keeps only one recursive
systematic convolutional (RSC) encoder and replaces the second with a bank
of zig-zag codes. These are single-parity-check block codes chained
together, and they cost almost nothing to encode or decode. The zig-zag
codes are computed over the RSC's *terminated* systematic stream, tail bits
included. A zig-zag decoder can then help the RSC decoder correct errors in
the tail bits, which improves trellis termination.

This RTL encodes a 16-bit frame into a 60-bit code word:

```
C = { d (20 bits), r (20 bits), Z (20 bits) }      rate 16/60, or 1/3 on the terminated word
```

- `d`: the 16 information bits plus 4 tail bits, sent serially by the RSC encoder.
- `r`: the RSC parity, one bit per bit of `d`.
- `Z`: the zig-zag parity, 5 constituent codes of 4 bits each, over interleaved copies of `d`.

```
 frame[15:0] ──► rsc_encoder ──► sysbitout, paribitout           (serial, 1 pair / clock)
   start           │   systematic_data[19:0], parity_data[19:0] (parallel)
                   │   framehead
                   ▼
            zigzag_encoder:  d ─► π0 ─► 4x5 zig-zag ─► Z[3:0]
                                ─► π1 ─► 4x5 zig-zag ─► Z[7:4]
                                   ...                 ...
                                ─► π4 ─► 4x5 zig-zag ─► Z[19:16]
                   ▼
            zigparity[19:0] ──► codeword = {Z, r, d}
```

## Files

| file | contents |
|---|---|
| `rtl/mtc_pkg.sv` | sizes, RSC tap masks and interleaver tables (all defaults live here) |
| `rtl/rsc_encoder.sv` | terminated RSC encoder, serial and parallel outputs |
| `rtl/zz_encoder.sv` | one zig-zag constituent encoder (array + running parity), combinational |
| `rtl/zigzag_encoder.sv` | M interleavers + M `zz_encoder`s, registered parity word |
| `rtl/mtc_encoder.sv` | top level |
| `tb/mtc_ref_pkg.sv` | bit-level reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The RSC stage

The encoder has 4 delay elements (so 16 states) and rate 1/2:

- feedback polynomial `1 + D^3 + D^4`
- feed-forward polynomial `1 + D + D^3 + D^4`

Let `w[n]` be the input of the shift register. Then:

```
w[n]   = u[n] ^ w[n-3] ^ w[n-4]
sys[n] = u[n]
par[n] = w[n] ^ w[n-1] ^ w[n-3] ^ w[n-4]
```

The taps are masks in `mtc_pkg`. Bit `k` selects `w[n-k]`, and bit 0 of the
feed-forward mask selects `w[n]`. For example:

```
RSC_FB_TAPS = 5'b11000
RSC_FF_TAPS = 5'b11011
```

**Termination.** After the 16 frame bits the encoder runs 4 more cycles.
In each of them the input is forced to the feedback value, so `w[n] = 0`
and the register empties. Those 4 inputs are the tail bits. They go out on
the systematic output like any other bit, so both words are 20 bits long.
An assertion in `rsc_encoder` checks that the state is zero when the frame
completes.

**Bit order.** Frame bit 0 is sent first. The parallel words are shift
registers that fill from the top, so once the frame is complete, bit `i`
of `systematic_data` and `parity_data` is the bit sent in cycle `i`. The
frame therefore appears unchanged in `systematic_data[15:0]`, and the tail
is in `[19:16]`.

**Reference frame.** With these polynomials and this bit order, frame
`1111000011001011` gives:

| word | value |
|---|---|
| systematic | `10011111000011001011` |
| RSC parity | `10000011001100001101` |
| zig-zag parity | `10101100100110111011` |

The end-to-end testbench checks these values.

**Other codes.** The module also takes other codes through its parameters.
For example, the textbook rate-1/2, K=3 encoder (feedback `1+D+D^2`,
feed-forward `1+D^2`) is:

```
rsc_encoder #(.MEM(2), .FB_TAPS(3'b110), .FF_TAPS(3'b101))
```

It gives 18-bit words. `tb_rsc_encoder` runs this configuration next to
the default one.

## The zig-zag stage

This stage is the least familiar part of the design.

**One zig-zag code.** A zig-zag code with `I` rows and `J` columns takes
`I*J` bits and writes them row by row into an `I x J` array. Row `r` holds
input bits `r*J .. r*J+J-1`. It then gives `I` parity bits, each chained to
the one before:

```
p[0] = XOR of row 0
p[r] = p[r-1] ^ XOR of row r
```

Each parity bit therefore closes one "zig" of a path through the code
graph that links every row to the next. A small example with `I=3`,
`J=2`:

- input: `0 1 1 0 0 1`
- rows: `(0 1) (1 0) (0 1)`
- parity: `1, 0, 1`

`zz_encoder` computes this as a chain of XORs. It is purely
combinational.

**Why several codes.** A single zig-zag code has minimum distance 2, which
is weak. The strength comes from running `M` of them in parallel, each
over a different permutation of the same data. In `zigzag_encoder`, branch
`m` permutes the 20-bit terminated systematic word with interleaver `π_m`.
It then encodes the result with a 4 x 5 zig-zag code. The 5 parity
nibbles are concatenated, with branch 0 in the lowest bits.

**The interleavers.** The interleavers are fixed wiring of two kinds,
rotation and rotation with reversal. Output position `i` of branch `m`
reads this input bit:

```
REV[m] = 0:  (ROT[m] + i)          mod 20
REV[m] = 1:  (ROT[m] + 19 - i)     mod 20
```

The defaults are:

```
ROT = {0, 8, 0, 4, 2}
REV = {0, 0, 1, 0, 0}
```

These defaults were chosen because they turn the reference systematic
word into the reference zig-zag parity word shown above. Each branch only
has to match 4 bits, so many other tables would do the same. Treat these
as placeholders for a real interleaver design, not as a known-good set.
To change them, edit `ZZ_ROT` and `ZZ_REV` in `mtc_pkg`, or pass `ROT` and
`REV` to `zigzag_encoder`. Arbitrary permutation tables would need a
different parameter form.

**Sizing.** The split of the 20 zig-zag parity bits into `I = 4` rows and
`M = 5` branches is this design's choice. The only fixed constraints are:

- `I * J` must equal the terminated word length (20). The top checks this
  at elaboration.
- `I * M` sets the length of the zig-zag parity word. With `K` rows per
  code, the rate formula is `d / (2d + K*M)`.

**Register.** `zigparity` is a register. It loads on the clock edge at
which `framehead` is high, and holds at all other times.

## Interface and timing

All logic runs on `data_clk`. `reset_n` is an asynchronous, active-low
reset that clears every register.

| port | dir | width | meaning |
|---|---|---|---|
| `start` | in | 1 | taken on a clock edge while `busy` is low; ignored while busy |
| `frame` | in | 16 | captured on the edge that takes `start` |
| `sysbitout`, `paribitout` | out | 1 | serial code bits, one pair per cycle |
| `systematic_data`, `RSCparity` | out | 20 | parallel words, bit `i` = cycle `i` |
| `zigparity` | out | 20 | zig-zag parity word |
| `codeword` | out | 60 | `{zigparity, RSCparity, systematic_data}` |
| `codeword_valid` | out | 1 | one-cycle pulse: `codeword` is the complete frame |
| `busy` | out | 1 | frame in progress |

If `start` is taken at edge `t`:

| edge | event |
|---|---|
| t+1 … t+20 | serial bit 0 … 19 on `sysbitout` / `paribitout` |
| t+20 | parallel words complete, internal `framehead` high, `busy` falls |
| t+21 | `zigparity` loaded, `codeword_valid` high; a new `start` may be taken at this same edge |

Back to back, the encoder takes one frame every 21 cycles. The parallel
words are not cleared when a new frame starts. They are shifted from the
next edge onwards, so the previous code word is still intact in the cycle
in which `codeword_valid` is high.

## What is fixed by the reference and what is not

Taken from the reference design:

- the structure (RSC, then interleave, vector-to-matrix and zig-zag per
  branch, then concatenation)
- the port names
- the 16-bit frame and the three 20-bit words
- serial and parallel outputs side by side
- the zig-zag recursion
- the reference input/output values above

Inferred from those values:

- the 4-memory RSC
- its polynomials
- the LSB-first bit order

The search over all feedback and feed-forward tap sets of up to 4
memories found only one that reproduces both 20-bit RSC words exactly.

Chosen here:

- the zig-zag split (4 x 5, 5 branches)
- the interleaver family and tables
- the branch order
- the start/busy handshake
- the 21-cycle timing
- the `codeword`, `codeword_valid` and `busy` ports
- the asynchronous reset

The original implementation's size on an Artix-7 device (about 174 LUTs)
was not a target.

Not included:

- the plain non-recursive convolutional encoder. It is only the starting
  point from which the RSC is derived.
- any decoder

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a
watchdog that ends the run with a failure if it hangs.

- `tb_zz_encoder` checks:
  - the 3 x 2 example
  - all 64 inputs of the 3 x 2 code
  - random words on the 4 x 5 code
- `tb_rsc_encoder` checks the default encoder and the K=3 encoder on the
  reference frame and on random frames. For each frame it compares:
  - every serial bit
  - both parallel words
  - the `framehead` cycle
  - the return to the zero state

  It also checks that `start` pulses during a frame are ignored.
- `tb_zigzag_encoder` checks:
  - the reference parity word
  - random words against the model
  - that the output holds when `framehead` is low
  - reset
- `tb_mtc_encoder` runs the top at its default sizes. It checks:
  - the reference frame, including all three published words
  - the 16-bit example sequence `0,1,1,1,1,0,1,0,1,1,0,0,1,0,0,1` (first
    bit at bit 0)
  - 30+ random frames, mostly back to back
  - `start` held high during frames
  - a reset in the middle of a frame

  Every frame must deliver its code word exactly 21 cycles after its
  start. The testbench counts each of the mechanisms above (non-zero tail,
  ignored start, back-to-back start, mid-frame reset), and fails if any of
  them never happened.

The expected values come from `tb/mtc_ref_pkg.sv`. It writes the RSC as
the recurrence for `w[n]` and the zig-zag code as a loop over the array.
It is independent of the RTL's structure, but it uses the same interleaver
definition. For the interleavers, the published parity word is the only
external check.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert \
  rtl/mtc_pkg.sv tb/mtc_ref_pkg.sv \
  rtl/zz_encoder.sv rtl/rsc_encoder.sv rtl/zigzag_encoder.sv rtl/mtc_encoder.sv \
  tb/tb_mtc_encoder.sv --top-module tb_mtc_encoder
./obj_dir/Vtb_mtc_encoder
```

To run another testbench, swap in its `tb_*.sv` file and its top module.
Packages must come first on the command line. Each run finishes in well
under a second.

To change the code, edit `mtc_pkg`:

- frame length `DATA_BITS`
- RSC memory and taps
- `ZZ_I`, `ZZ_J`, `ZZ_M`, `ZZ_ROT`, `ZZ_REV`

Keep `ZZ_I * ZZ_J == DATA_BITS + RSC_MEM`. The testbenches hold the
default sizes and expected words as literals, so update them along with
the package.
