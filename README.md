# Unified 8-point DCT / DST / IDCT / IDST engine

One piece of hardware computes any of four 8-point transforms — the discrete
cosine transform (DCT-II), the discrete sine transform, and their inverses.
The transform is chosen block by block with a 2-bit mode. A transform coder
can then pick, for each block, the transform that suits the image statistics.
The DCT is best for highly correlated data. The DST is best for weakly
correlated data.

All four transforms reduce to one common kernel:

    T(k) = sum_{n=1..7} v(n) * cos(n*k*pi/8),      k = 1..7

A distributed-arithmetic (DA) array computes this kernel. A processing stage
around the array does the transform-specific work:

- before the array, it turns the input into the seven words v(n);
- after the array, it turns T(k) into the results.

The array holds ROMs and adders and has no multiplier. The processing stage
has one multiplier.

## How the four transforms become one kernel

The scale factor sqrt(2/N) is left out everywhere. N = 8, and c(a) means
cos(a*pi/16).

| mode | input words | v(n) sent to the array | result |
|------|-------------|------------------------|--------|
| 11 FDCT | y(0..7) | x(n), with x(7)=y(7) and x(n)=y(n)-x(n+1) | Y(0) = sum y(n); Y(k) = [2T(k) + x(0)] c(k), k=1..7 |
| 10 FDST | y(1..8) | x(n), with x(1)=y(1) and x(n)=y(n)+x(n-1) | Y(k) = -[2T(k) + (-1)^k x(8)] sin(k*pi/16), k=1..7; Y(8) = sum (-1)^(n+1) y(n) |
| 01 IDCT | Y(0..7) | Z(k) = Y(k) c(k) | t(n) = 2T(n) + sqrt2*Y(0); y(0) = t(0)/2, y(n) = t(n) - y(n-1) |
| 00 IDST | Y(1..8) | Z(k) = Y(k) sin(k*pi/16) | t(n) = 2T(n) + (-1)^n sqrt2*Y(8); y(1) = t(0)/2, y(n+1) = t(n) + y(n) |

- For the inverse transforms, T(0) = sum Z(k) is also needed. The processing
  stage forms it while the Z(k) stream into the array.
- The forward identities come from writing y(n) = x(n) + x(n+1) (DCT) or
  y(n) = x(n) - x(n-1) (DST). Then cos(a+b) + cos(a-b) = 2 cos a cos b turns
  each term into cos(n*k*pi/8) times a constant factor beta(k).
- The inverse identities use the same step backwards: y(n) + y(n-1) (IDCT) or
  y(n+1) - y(n) (IDST) is a cosine kernel of the Z(k).

Weights on the DC and Nyquist terms:

- The forward outputs Y(0) and Y(8) are plain sums, with no 1/sqrt2 weight.
- The inverse transforms weight Y(0) (IDCT) and Y(8) (IDST) by 1/sqrt2. This
  appears as the sqrt2*delta term of t(n).

So the forward and inverse pairs are not exact inverses of each other. Each one
matches its own formula above. `tb/tb_dct_dst_unified.sv` states the exact
definitions it checks against.

## The array stage (`array_stage`)

Block by block, the array stage has these parts:

- **X chain.** Seven 12-bit registers X(1)..X(7). Words are pushed in as
  x(1), x(2), …, x(7); the first word pushed ends in X(1).
- **Six P/S converters.** They serve X(1..3) and X(5..7). After `start`, each
  converter sends out its word as 2-bit digits, least significant digit first.
  After the sixth digit it sends copies of the sign bit (`ps_conv`).
- **Add/Sub stage.** Six digit-serial adders form x(i)+x(8-i) and x(i)-x(8-i)
  for i = 1..3. Each adder keeps its carry in a flip-flop (`digit_adder`,
  `addsub_stage`). This uses cos((8-n)k*pi/8) = (-1)^k cos(n*k*pi/8): even k
  need the three sums, odd k the three differences. The sums are 13 bits, so
  seven digit steps are made.
- **x(4).** It is not serialised. Its coefficient cos(k*pi/2) is 0 or ±1, so
  x(4) is latched at `start` and added after the DA sum. PE4 (T(4)) adds
  +x(4). The **Inv** negator feeds -x(4) to the PEs for T(2) and T(6). The PEs
  for odd k add 0.
- **PE1..PE7** (`da_pe`). PE i computes T(8-i). A PE takes one digit of each
  of its three operands per cycle. Together these six bits address a 64-word,
  14-bit ROM. The ROM holds sum_i d_i * round(1024*cos(i*k*pi/8)) for every
  digit combination (d1, d2, d3). An accumulator adds the ROM word and shifts
  right by one digit per step.
- **The sign digit.** The last digit of a two's-complement operand is worth
  -1 or 0, not 3 or 0. In that step the PE reads the ROM at the low bit of
  each digit and *subtracts* the word. The same 64-word ROM thus serves all
  steps.
- **PE output.** The PE output is the accumulator plus B, the x(4) term. It is
  formed combinationally from the adder, so it is valid in the last step.
- **T chain.** Seven 16-bit registers. They load all seven results at the end
  of the last step, then shift out T(1), T(2), …, T(7).

Timing: `start` copies the X chain into the converters, and the X chain can
take the next block from that cycle on. Seven digit steps follow. `t_ready`
marks the cycle after the T chain has loaded. A new block can start every 8
cycles.

The accumulator has 19 bits: 16 integer bits, 2 guard fraction bits and 1
bit of headroom. The right shifts truncate, so T(k) is within about one LSB
of the exact inner product with the quantised ROM coefficients. The main
error source is the quantisation of the coefficients to 10 fraction bits.

## The processing stage (`proc_stage`, `proc_ctrl`)

### Units

The processing stage is built from these units:

- **RAM1.** Holds the input block of a forward transform. The DCT recursion
  needs y(7) first, but the samples arrive from y(0).
- **C6 add/sub with D.** It runs the x(n) recursion (forward). In inverse
  mode it sums the Z(k) into T(0).
- **RAM2.** Holds x(1..7). It lets the recursion run in either direction while
  the array still gets x(1) first.
- **Multiplier.** One multiplier, with tables for cos(k*pi/16),
  sin(k*pi/16), their negation ("inv") and sqrt2:
  - forward: it computes beta(k) * (2T ± alpha), *after* the array;
  - inverse: it computes Z(k) and sqrt2*Y(0) or sqrt2*Y(8), *before* the
    array.
- **C1 add/sub.** It forms 2T(k) ± alpha. alpha is x(0) or x(8) in forward
  mode; in inverse mode it is sqrt2*Y(0) or ±sqrt2*Y(8).
- **C3 add/sub with D.**
  - forward: it sums Y(0) (FDCT), or the alternating sum Y(8) (FDST), straight
    from the input;
  - inverse: it runs the y(n) recursion on the t(n).

`acc_addsub` implements both add/sub units (C3 and C6). `coef_mul` is the
multiplier, and `reorder_ram` is used for both RAMs.

### The frame pipeline

Everything advances in frames of 8 cycles, one word per cycle. A block
occupies these frames:

    forward:  IN -> REC -> FEED -> ARR -> POST
    inverse:           FEED -> ARR -> POST

| frame | what happens |
|-------|--------------|
| IN | write RAM1; C3 sums Y(0)/Y(8) |
| REC | read RAM1 in recursion order; C6 forms x(n); write RAM2; keep x(0)/x(8) |
| FEED | push x(1..7) (from RAM2) or Z(1..7) (from the multiplier) into the X chain; inverse: C6 sums T(0), keep sqrt2*Y |
| ARR | the array's seven digit steps |
| POST | T(k) out of the T chain; C1; multiplier (forward) or C3 recursion (inverse) |

The extra result word (Y(0), Y(8) or the t(0) term) takes slot 0, or slot 7
for FDST. For this the stream of T(k) from the array is delayed by one cycle
in every mode except FDST.

### Control signals

These are the per-slot controls, slot 0 first:

| signal | meaning | FDCT | FDST | IDCT | IDST |
|--------|---------|------|------|------|------|
| c1 | C1 subtracts | 00000000 | 10101010 | 00000000 | 01010101 |
| c2 | output the Y(0)/Y(8) sum instead of the product | 10000000 | 00000001 | – | – |
| c3 | C3 subtracts | 00000000 | 01010101 | 11111111 | 00000000 |
| c4 | take T(0) from the Z sum instead of the array | – | – | 10000000 | 10000000 |
| c5 | clear the D path of C3/C6 | 10000000 | 10000000 | 10000000 | 10000000 |
| c6 | C6 subtracts (recursion) | 11111111 | 00000000 | – (adds) | – (adds) |

### Changing direction

The multiplier, C3 and C6 are used in different frames by forward and inverse
blocks. So blocks of one direction stream back to back, with any mix of cosine
and sine. A change between forward and inverse waits until the pipeline is
empty: 5 frames after a forward block, or 3 frames after an inverse block.
`stall` is high while a block is held back this way.

## Interface (`dct_dst_unified`)

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | 1 | block handshake (below) |
| `in_mode` | 2 | 11 FDCT, 10 FDST, 01 IDCT, 00 IDST, sampled with the first word |
| `in_data` | 16 | input word, two's complement |
| `out_valid`, `out_first` | 1 | result word valid; first word of a block |
| `out_mode` | 2 | transform of the result block |
| `out_data` | 16 | result word |
| `stall` | 1 | a block is held back by a direction change |

The handshake works like this:

- Blocks start only at a frame start (slot 0, every eighth cycle after
  reset). A block is taken in slot 0 when `in_valid` is high and `in_ready`
  is high. In slot 0, `in_ready` means that a block of the mode on `in_mode`
  may enter now. In slots 1..7, `in_ready` stays high while an accepted
  block's remaining words are being taken.
- `in_valid` must stay high for all eight words. An assertion checks this.
- Results come as eight consecutive words, in the index order of the table
  above.

Latency from the first input word to the first result is 33 cycles forward
and 17 cycles inverse. Throughput is one block per 8 cycles.

Input ranges: every x(n) and Z(k) must fit the 12-bit array words.

- Forward inputs must be 9-bit values (-256…255). x(n) is an alternating sum
  of up to eight samples.
- Inverse inputs must be 12-bit values (-2047…2047).
- Larger values wrap; they are not saturated.

## Accuracy

Against floating-point evaluation of the formulas, with 6000 random blocks:

- forward results: at most 2.5 LSB from the exact value;
- inverse results: at most 10.2 LSB.

The inverse is less accurate because its recursion adds up the errors of
several t(n).

## What follows the published architecture and what is this design's own

The published architecture gives the following, and the RTL follows it:

- the algorithm;
- the array organisation: X registers, P/S converters, the Add/Sub stage,
  Inv, PEs of ROM + accumulator + B adder, and the T registers;
- the widths 12 (X), 2 (digit), 6 (ROM address), 14 (ROM word) and 16 (T);
- the units of the processing stage;
- the mode encoding;
- the control patterns of c1, c2, c4, c5 and c6.

The following are this design's own:

- the digit order and the handling of the sign digit;
- the 19-bit accumulator with guard bits (the published PE is drawn with
  14-bit ROM words and 16-bit adders);
- latching x(4) at start;
- the chain directions;
- the 16-bit processing-stage datapath and its rounding;
- the 14-fraction-bit multiplier coefficients;
- the two-bank RAMs;
- the frame pipeline, the handshake and the stall on direction changes;
- the `rev` input of the add/sub units;
- the exact C3 pattern.

Three points in the published formulas are read a particular way:

- The kernel sums over n = 1..7 (x(0) enters only through alpha).
- The IDCT relation is t(n) = y(n) + y(n-1).
- The IDST uses t(0) = 2y(1), with an upward recursion.

Each of these was re-derived from the transform definitions and checked in
simulation.

## Files

The RTL is in `rtl/`:

| file | contents |
|------|----------|
| `dct_pkg.sv` | sizes, mode enum, ROM and coefficient functions |
| `dct_dst_unified.sv` | top: processing stage and array stage in a loop |
| `proc_stage.sv` | processing stage datapath |
| `proc_ctrl.sv` | frame sequencer, handshake, stall, C1..C6 |
| `reorder_ram.sv` | RAM1, RAM2 |
| `acc_addsub.sv` | C3, C6 |
| `coef_mul.sv` | multiplier and coefficient tables |
| `array_stage.sv` | X chain, P/S, Add/Sub, Inv, PEs, T chain |
| `ps_conv.sv` | parallel-to-serial converter |
| `addsub_stage.sv` | digit-serial sums and differences, x(4) latch |
| `digit_adder.sv` | one digit-serial adder/subtractor |
| `da_pe.sv` | DA processing element |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`.
`tb/array_model.sv` is a behavioural array with exact arithmetic; it lets
`tb_proc_stage` test the processing stage on its own.

`tb_dct_dst_unified` is the end-to-end test. It runs the top at its default
parameters with random and full-scale blocks in all four modes, and checks:

- the values;
- the latency;
- back-to-back streaming;
- mode switches without a stall;
- stalled direction changes.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/dct_pkg.sv \
        tb/tb_dct_dst_unified.sv --top-module tb_dct_dst_unified -Mdir obj -o sim
    ./obj/sim

Replace `tb_dct_dst_unified` with any other `tb_<name>` to run that test.
`-Irtl -Itb` lets Verilator find the submodules by file name.

## Changing it

- The array is written for N = 8: three operand pairs, x(4) in the middle,
  seven PEs, 8-slot control patterns. The X, T, digit and ROM widths and the
  fraction widths are constants in `dct_pkg`.
- Wider input data needs a wider `X_W`. That also lengthens the digit-serial
  computation, NDIG = ceil((X_W+1)/DIG_W) steps, which must stay within the
  8-cycle frame for full throughput.
- For more ROM precision, raise `ROM_FRAC` and `ROM_W` together. The ROM
  contents are computed from `da_cos`.
