# 32-point radix-2 DIT FFT with bit-reversal-free input addressing

This core computes the 32-point discrete Fourier transform

    X(k) = sum_{n=0..31} x(n) * W^(n*k),   W = exp(-j*2*pi/32)

of a stream of real 16-bit samples. It uses the radix-2 decimation-in-time (DIT)
algorithm: five stages of sixteen butterflies, 80 butterflies in all, each stage
built in parallel hardware and registered. A DIT FFT needs its input in
bit-reversed order (x(0), x(16), x(8), x(24), ...). The core does not reverse
any bits. Instead it stores the samples in two small memories and reads them
back at an address that follows a fixed increment pattern, so that each pair of
words read is exactly the operand pair of the next first-stage butterfly.

Samples enter one per clock on `datain`. Results leave one per clock, X(0)
first, on `data_outre` / `data_outim`. The core takes a new 32-sample frame
every 48 clocks.

## Data format

| where                    | width | format   | range                     |
|--------------------------|-------|----------|---------------------------|
| `datain`                 | 16    | Q8.8     | -128.0 .. +127.996        |
| twiddle factors          | 16    | Q8.8     | exactly 1.0 = 0x0100      |
| inside the five stages   | 32    | Q24.8    | never overflows           |
| `data_outre/data_outim`  | 16    | Q8.8     | saturated                 |

Q8.8 means two's complement with 8 fraction bits, so 0x0100 is 1.0. The input is
real; the imaginary part of every sample is zero.

The stages work at 32 bits. The largest possible |X(k)| is 32 * 128 = 4096,
which is far inside that width, so no stage ever wraps around. The cost is
precision only, because every complex product is shifted right by 8 (floor).
Saturation happens once, at the output. Any result whose magnitude reaches 128
comes out clamped to 0x7fff or 0x8000. This affects realistic inputs: a ramp
1.0, 2.0, ..., 32.0 has X(0) = 528.0, which leaves the core as 127.996. For
unclipped spectra, keep sum |x(n)| below 128.

**Twiddle factors.** W^k = cos(2*pi*k/32) - j*sin(2*pi*k/32) for k = 0..15.
Each part is `trunc(256 * value)`, truncated toward zero, which gives 0x00fb for
cos(pi/16) and 0x0061 for cos(3*pi/8). Because of the truncation, each
coefficient is low by up to 1/256. After five stages, the error of a transform stays
within a few tenths of a percent of sum |x(n)| (0.25% worst case over random
frames). The testbench checks
every result against a floating-point DFT with a tolerance of 2% of sum |x(n)|
plus 0.1. The table is in `twiddle_rom`.

## Getting the operands without bit reversal

This is the part of the design that is easiest to misread.

Butterfly j (j = 0..15) of stage 1 combines x(r) and x(r+16), where r is j with
its 4 bits reversed:

    j : 0  1  2  3   4  5  6  7   8  9 10 11  12 13 14 15
    r : 0  8  4 12   2 10  6 14   1  9  5 13   3 11  7 15

The two operands always differ only in the most significant bit of their 5-bit
position. So samples 0..15 go to **RAM-1** and samples 16..31 to **RAM-2**,
both at address n mod 16. A single read of both memories at address r then
returns the whole operand pair.

The address sequence r is produced by `pattern_gen`. It starts at 0 and adds a
fixed increment each step:

    step into j : 1   2   3    4   5   6   7    8   9  10  11   12  13  14  15
    increment   : +8  -4  +8  -10  +8  -4  +8  -13  +8  -4  +8  -10  +8  -4  +8

That is one 4-bit adder and a 16-entry table of small constants. The testbench
of `pattern_gen` checks the result against a real bit reversal.

The words read for butterfly j are written into a register frame. The RAM-1
word goes to position 2j and the RAM-2 word to position 2j+1. After 16 reads,
frame position p holds x(bitrev5(p)): the input frame of an in-place DIT FFT.
This step is `input_stage`.

## The five butterfly stages

Each stage (`fft_stage`, parameter `STAGE` = 1..5) applies sixteen
`butterfly` instances to the frame:

    C = A + B*W        D = A - B*W

The stage uses span h = 2^(STAGE-1). Butterfly b (0..15) works on positions
`p = (b / h) * 2h + (b % h)` and `q = p + h`. It writes C back to p and D to q,
using twiddle W^k with `k = (b % h) * 16 / h`:

| stage | span | twiddles used            |
|-------|------|--------------------------|
| 1     | 1    | W^0                      |
| 2     | 2    | W^0, W^8                 |
| 3     | 4    | W^0, W^4, W^8, W^12      |
| 4     | 8    | even exponents W^0..W^14 |
| 5     | 16   | all of W^0..W^15         |

All twiddle indices are constants, so each `twiddle_rom` instance reduces to
constants in synthesis. `comp_mult` forms B*W with four 32x16 multiplies. The
result of every butterfly goes into a `buff_32` register, one for the real part
and one for the imaginary part. Each stage therefore adds one clock of latency,
and the critical path is one complex multiply-add. After stage 5, the frame
holds X(0)..X(31) in natural order.

A `valid` bit travels along with the frame. It starts as `frame_valid` from
`input_stage`, and each stage registers new data only when its `in_valid` is
high.

## Control and timing

`fft_ctrl` is a two-state machine built around an 8-bit counter `cnt`:

- **LOAD, 32 clocks.** `in_ready` is high. The sample on `datain` is written to
  position `cnt`. Positions 0..15 go to RAM-1 and 16..31 to RAM-2.
- **READ, 16 clocks.** `pattern_gen` steps the common RAM address. Each clock,
  one operand pair is read (synchronous RAM, one clock).

After READ, the controller goes straight back to LOAD. The stages and the
output stage run on their own, driven by the valid bit. The timing for one
frame, counted in clock edges after the edge that samples x(31), is:

| edge  | event                                               |
|-------|-----------------------------------------------------|
| 0     | x(31) written; address sequence starts              |
| 1..16 | RAM reads for butterflies 0..15                     |
| 2..17 | operand pairs written into the frame                |
| 18    | stage 1 registers                                   |
| 22    | stage 5 registers                                   |
| 23    | output stage stores the frame, X(0) on the outputs  |
| 24..54| X(1)..X(31), one per clock                          |

Seen from the ports, `out_valid` first rises 24 clocks after the clock that
sampled x(31). The next frame's LOAD starts at edge 17, so the output of one
frame overlaps the loading of the next. Throughput is 32 samples every 48
clocks.

## Output stage

`out_buffer` stores the 32 results of stage 5, each part saturated to 16 bits.
It then drives one result per clock with `out_valid` high and the frequency
index on `out_idx`. X(0) is sent straight from the incoming frame in the clock
after the load, and the rest come from the store.

## Interface of `fft32_io`

| port         | dir | width | meaning                                          |
|--------------|-----|-------|--------------------------------------------------|
| `clk`        | in  | 1     | clock, rising edge                               |
| `rst`        | in  | 1     | synchronous, active-high reset; starts a LOAD    |
| `datain`     | in  | 16    | real sample, Q8.8, taken every clock `in_ready` is high |
| `in_ready`   | out | 1     | the sample on `datain` is taken this clock       |
| `data_outre` | out | 16    | Re X(out_idx), Q8.8, saturated                   |
| `data_outim` | out | 16    | Im X(out_idx), Q8.8, saturated                   |
| `out_valid`  | out | 1     | a result is on the outputs                       |
| `out_idx`    | out | 5     | k of the result shown                            |

There is no input-side flow control. While `in_ready` is high, the sample
present is taken. A source that cannot keep up must hold the core in reset or
supply zeros.

## Where this design follows its source and where it chooses

The source design gives the following:

- the serial 16-bit Q8.8 input;
- the eight-stage split: input, state machine, five butterfly stages, output
  store;
- the two memories holding positions 0..15 and 16..31;
- the increment pattern in place of bit reversal;
- the butterfly equations;
- the twiddle table and its 16-bit values;
- the 32-bit width of the stage ports;
- the names `comp_mult` and `buff_32`;
- the top-level ports `clk`, `rst`, `datain`, `data_outre`, `data_outim`;
- one registered butterfly stage per clock period.

The published increment table has two +4 entries. The address sequence
requires -4 at both places, and this design uses -4.

This design's own choices are the following:

- `in_ready`, `out_valid` and `out_idx`, since the source has no handshake;
- synchronous active-high reset;
- synchronous RAM reads;
- truncation (floor) after each product;
- saturation at the output instead of wrap-around;
- serial output in natural order;
- the two-state controller;
- overlapping output with the next load.

The source's FPGA results cannot be compared directly with this RTL. They
were roughly 21,900 LUTs and 8,000 registers on a Virtex-6, with a
2.33 ns clock period. This RTL holds about 10,500 flip-flop bits, mostly the
five 32 x 64-bit stage registers, plus 160 real multipliers.

## Files

| file                 | contents                                              |
|----------------------|-------------------------------------------------------|
| `rtl/fft_pkg.sv`     | widths, `cplx_t`, `twiddle_t`, `saturate()`           |
| `rtl/fft32_io.sv`    | top level                                             |
| `rtl/fft_ctrl.sv`    | LOAD/READ state machine                               |
| `rtl/pattern_gen.sv` | increment-pattern address generator                   |
| `rtl/input_stage.sv` | RAM-1, RAM-2 and the gathered input frame             |
| `rtl/sample_ram.sv`  | 16 x 16 memory, synchronous read                      |
| `rtl/fft_stage.sv`   | one stage: 16 butterflies + registers                 |
| `rtl/butterfly.sv`   | C = A + BW, D = A - BW                                |
| `rtl/comp_mult.sv`   | complex multiply with rescale                         |
| `rtl/twiddle_rom.sv` | W^0..W^15 in Q8.8                                     |
| `rtl/buff_32.sv`     | 32-bit register with enable                           |
| `rtl/out_buffer.sv`  | result store, saturation, serial output               |
| `tb/fft_ref_pkg.sv`  | reference models: fixed-point FFT, float DFT          |
| `tb/tb_*.sv`         | one self-checking testbench per module                |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if the design hangs. The reference models in `tb/fft_ref_pkg.sv` are
written independently of the RTL. They compute the twiddles with `$cos`/`$sin`,
run a textbook in-place FFT on an explicitly bit-reversed copy of the input,
and compute a plain O(N^2) floating-point DFT.

`tb_fft32_io` runs the top at its default size. It streams twelve frames back
to back:

- the ramp 1.0..32.0, which saturates X(0);
- all ones;
  (these first two are the input frames the source design was simulated with)
- an impulse;
- random frames of small and of full-scale amplitude.

For every frame it checks:

- each result bit for bit against the fixed-point model;
- each unsaturated result against the DFT;
- the output order;
- the 24-clock latency;
- the 48-clock frame period.

It also counts that LOAD phases, READ phases, saturation and output/load
overlap each occurred.

To simulate with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/fft_pkg.sv tb/fft_ref_pkg.sv \
        tb/tb_fft32_io.sv --top-module tb_fft32_io -o sim
    ./obj_dir/sim

Replace `tb_fft32_io` with any other `tb_<module>` to test a single block. All
simulations finish in well under a second.

## Changing it

The widths live in `fft_pkg`. `INT_W` can shrink as long as it holds
log2(32) + 16 bits, which is 21. The transform length is fixed at 32 by several
pieces:

- the increment table;
- the 4-bit RAM addresses;
- the twiddle table;
- the 48-clock controller.

Other lengths need those rewritten. The stage indexing in `fft_stage` is
already written in terms of `N` and `STAGE`.
