# 64-point radix-4 FFT processor with Vedic multipliers

This is a memory-based FFT processor. It computes a 64-point complex
discrete Fourier transform with a single radix-4 butterfly, which it uses 48
times: three stages of 16 butterflies each. The 64 samples stay in place in
eight small dual-port memory banks for the whole transform. Each butterfly
reads its four operands in one clock and writes its four results back over
them.

The multiplications use the *Urdhva-Tiryakbhyam* ("vertically and
crosswise") method of Vedic mathematics. Twiddle factors are not stored in a
ROM. A CORDIC rotator works them out as they are needed. The processor can
run either as decimation in frequency (DIF) or as decimation in time (DIT).
You pick the mode for each transform.

All of this is synthesizable SystemVerilog (IEEE 1800-2017), with a
self-checking testbench for every module.

## Top-level interface and timing

Module `fft64_top`. It has one clock and an asynchronous active-low reset.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `start` | in | 1 | one-clock pulse while idle; ignored at any other time |
| `dit` | in | 1 | sampled together with `start`: 0 = DIF, 1 = DIT |
| `din` | in | `cplx_t` (8 + 8) | input sample `x[n]`; sample `n` goes in the `n`-th clock after `start` |
| `busy` | out | 1 | high while the butterflies run and the results are read out |
| `dout` | out | `cplx_t` | result `X[k]` |
| `dout_valid` | out | 1 | `dout` holds a result |
| `dout_index` | out | 6 | `k` of the result now on `dout` |
| `done` | out | 1 | one-clock pulse together with `X[63]` |

`cplx_t` (from `fft_pkg`) is a packed struct of an 8-bit two's-complement
real part `re` and an 8-bit imaginary part `im`.

The result is

    X[k] = (1/64) * sum_{n=0..63} x[n] * exp(-j*2*pi*n*k/64)

rounded to 8 bits per part. The factor 1/64 comes from a fixed division by 4
in every stage, which means no intermediate value can overflow. Both modes
take their samples in natural order and give their results in natural order.

A transform runs through these phases. The clocks are counted from the clock
in which `start` is seen.

| phase | clocks | what happens |
|---|---|---|
| load | 1 - 64 | a 6-bit counter writes `din` into the banks, one sample per clock; there is no valid signal |
| compute | 65 - 118 | 3 stages, each of 16 butterflies (one per clock) followed by a 2-clock drain |
| unload | 119 - 182 | one bank read per clock; `X[k]` appears on `dout` one clock after its read, in clocks 120 - 183 |

`busy` is high in clocks 65 - 182. A new `start` is accepted in clock 183,
the same clock as `done`, so transforms can follow each other every 183
clocks. The timing is the same in both modes.

## Where the samples live: lanes, banks and commutators

This section explains the least obvious part of the design.

A radix-4 butterfly needs four samples at once, and it must write four
results in the same clock. The eight 8-bit banks are therefore used as four
**complex lanes**. Lane `l` (0..3) is bank `2l`, which holds real parts, and
bank `2l+1`, which holds imaginary parts. Each lane holds 16 samples.

Write the sample index `i` (0..63) as three base-4 digits `d2 d1 d0`. Point
`i` is stored at:

    lane(i) = (d2 + d1 + d0) mod 4        word(i) = i[5:2]

Every butterfly, in every stage, combines four points that differ in exactly
one base-4 digit, which takes the values 0, 1, 2 and 3. The four digit sums
are therefore four consecutive values mod 4. So the four legs always sit in
four *different* lanes, and the lanes are just rotated by the lane of leg 0.
Call that rotation `rot`. Leg `m` lives in lane `(rot + m) mod 4`.

The butterflies of each stage are laid out as follows (`k` = 0..15 is the
butterfly counter):

| address pattern | legs `m`=0..3 at index | twiddle exponent of leg 1 | used by |
|---|---|---|---|
| 0 (span 16) | `{m, k[3:2], k[1:0]}` | `p = k` | DIF stage 0, DIT stage 2 |
| 1 (span 4)  | `{k[3:2], m, k[1:0]}` | `p = 4*k[1:0]` | DIF stage 1, DIT stage 1 |
| 2 (span 1)  | `{k[3:2], k[1:0], m}` | `p = 0` | DIF stage 2, DIT stage 0 |

Leg `m` is multiplied by `W^(m*p)`, where `W = exp(-j*2*pi/64)`.

A DIF transform leaves `X[k]` at position `digit_rev(k)`, where `digit_rev`
reverses the three base-4 digits. The unload therefore reads the
digit-reversed positions. A DIT transform needs its input in digit-reversed
order, so the load writes `x[n]` to position `digit_rev(n)` and the unload
reads position `k` directly.

The **address generation unit** (`agu`) turns the control unit's phase,
counter and stage into:

- eight read and eight write addresses (the two banks of a lane always share
  an address);
- eight write enables;
- the rotation for each commutator;
- the twiddle exponent `p`.

Each of these is delayed to the clock in which it is used. For a butterfly
whose read addresses go out in clock `t`:

| clock | what happens |
|---|---|
| `t` | read addresses and `p` go out |
| `t+1` | bank data and twiddles arrive; `commutator1` turns the lanes into legs 0..3 (`rd_rot`); the processing unit computes and registers |
| `t+2` | `commutator1` turns the results back into their lanes (`wr_rot`); the write addresses are those of clock `t`; the banks write |

A stage's last result reaches the banks two clocks after its last read.
That is why the control unit waits `PIPE_DEPTH` = 2 clocks between stages:
no stage can read stale data, and no forwarding logic is needed.

The **commutators** are built from 8-to-1 multiplexers (`comm_xbar`).
`commutator1` serves the butterfly in both directions. `commutator2` serves
the outside world:

- during load it broadcasts `din` to all banks, and the AGU enables only the
  bank pair that owns the sample;
- during unload it picks the lane that holds `X[k]`.

## The radix-4 processing unit (`radix4_pu`)

On inputs `c0..c3` the 4-point butterfly is:

    b0 = c0 +   c1 + c2 +   c3        b2 = c0 -   c1 + c2 -   c3
    b1 = c0 - j*c1 - c2 + j*c3        b3 = c0 + j*c1 - c2 - j*c3

Multiplying by `j` is only a swap and a negation. Every `b` is then divided
by 4, rounded half up, and saturated to 8 bits. The three twiddle
multipliers (`vedic_cmul`) sit after the butterfly in DIF (`y_m = W_m*b_m`)
and before it in DIT (`c_m = W_m*a_m`). Leg 0 is never multiplied.

Both modes share the three complex multipliers. Each mode has its own set of
butterfly adders, so that the datapath contains no combinational loop
through the mode multiplexers. In DIT the products keep 9 bits until the
division by 4, so a rotated full-scale sample does not saturate. The
results are registered: the unit has a latency of one clock.

## Vedic multiplication

`vedic_mul4` multiplies two 4-bit numbers column by column. Column `c` adds
every bit product `a[i]&b[j]` with `i + j = c` (the vertical and crosswise
lines) to the carry left by column `c-1`. The low bit of that sum is product
bit `c`, and the rest carries on to the next column. Worked in decimal, the
same procedure gives 325 x 738 = 239850.

`vedic_mul #(N)` applies the same rule one level up. Both operands are cut
into 4-bit digits. Each digit pair is multiplied by a `vedic_mul4`. Column
`c` sums the 8-bit products whose digit indices add up to `c`, and the
columns are added at weight `16^c`. `N` must be a multiple of 4. The
default is 8; the testbench also tries 16 and 32.

`vedic_smul` makes the multiplier signed by working in sign and magnitude,
so every operand pair, including -128 x -128, gives the exact product.

`vedic_cmul` forms a complex product from four real products, one adder and
one subtractor. It then rounds to the data's scale and saturates.

## Twiddles without a ROM (`twiddle_gen`, `cordic`)

`cordic` is an unrolled CORDIC with 14 micro-rotations. It has two modes:

- **rotation** turns `(x, y)` by `z`;
- **vectoring** turns `(x, y)` onto the positive x axis, giving its length
  and angle.

Angles are binary, 2^16 per turn, so 16384 is 90 degrees. The CORDIC gain
of about 1.6468 is removed at the end by multiplying `x` and `y` by
`K = 0.6072529` on two signed Vedic multipliers. The arctangent constants are
`round(atan(2^-i) * 65536 / (2*pi))`. Rotation converges for angles up to
about ±99.8 degrees. Vectoring needs `x >= 0`.

`twiddle_gen` receives the exponent `p` of a butterfly and produces
`W^p`, `W^2p` and `W^3p` (exponents mod 64) on three CORDICs in rotation
mode. Each exponent `e` is split into a quadrant `e[5:4]` and a residue
`e[3:0]`:

- the residue rotates the unit vector by `-2*pi*e[3:0]/64`, at most -84.4
  degrees, which is inside the CORDIC's range;
- the quadrant is then applied exactly, as `W^e = (-j)^q * W^r`, by swapping
  and negating the parts.

The outputs are registered, so they arrive together with the bank data.
Twiddles are 8-bit with 6 fraction bits: 1.0 is 64. Every twiddle is within
one LSB of `round(64*cos)`, `round(-64*sin)`.

## Number formats and accuracy

| quantity | format |
|---|---|
| samples, bank words | 8-bit two's complement per part |
| twiddles | 8-bit two's complement, 6 fraction bits |
| butterfly sums | 12 bits before the division by 4 |
| CORDIC | 16-bit x/y (1.0 = 4096), 20-bit internal, 16-bit angle |

The division by 4 in each stage and the twiddle products are rounded. Over
random inputs in ±100 and a range of test signals, every output part stays
within 3 LSB of the exact DFT divided by 64, in both modes. Outputs only 8
bits wide limit the dynamic range. Small spectral lines next to large ones
are lost in the rounding.

## What is taken from the source design and what is chosen here

Taken from the source design:

- the 64-point radix-4 memory-based organisation;
- one reused radix-4 unit with Vedic (Urdhva-Tiryakbhyam) multipliers;
- building N x N multipliers from 4 x 4 blocks;
- CORDIC twiddle generation in place of a ROM, with rotation and vectoring
  modes;
- eight 8-bit dual-port banks used in place, with eight read and eight
  write address buses;
- two commutators made of 8-to-1 multiplexers;
- Start and Busy, a 6-bit input counter, and 16 butterflies per stage;
- support for both DIF and DIT.

Chosen here, because the source does not specify them:

- each complex sample is split over a pair of banks (real and imaginary),
  and the digit-sum storage map above replaces the even/odd split of the
  input samples that the source mentions;
- a fixed division by 4 per stage, with rounding and saturation;
- the twiddle format and the CORDIC widths, iteration count and angle
  format;
- the Vedic multipliers are used for the CORDIC gain correction;
- the quadrant folding of the twiddles;
- the pipeline alignment and the 2-clock drain between stages;
- the exact cycle timing, the unload phase, the `dit` pin and the reset
  behaviour.

Departures and open points:

- The source gives its complex multiplier as "4 multipliers, 2 adders and 1
  subtractor". The formula needs only one adder and one subtractor, and that
  is what is built.
- The source speaks of rotations "by -45 degrees and by -135 degrees" in
  rotation mode. This is not a hardware rule here. The CORDIC covers -45
  degrees directly, and -135 degrees is reached through the quadrant step.
- The source's "modified adder" is not described, so ordinary adders are
  used.
- The source quotes "32-bit inputs" for its multiplier and adder tests. The
  FFT datapath here is 8 bits wide, following the bank width, but
  `vedic_mul #(.N(32))` multiplies 32-bit operands.
- FPGA slice counts and clock rates are results of a vendor flow and cannot
  be compared with this RTL.
- The banks are written as plain arrays with synchronous read. A target
  technology may map them to its own dual-port RAM.

## Files

`rtl/`:

| file | contents |
|---|---|
| `fft_pkg.sv` | sizes, `cplx_t`, `phase_e`, storage-map functions `lane_of`, `addr_of`, `digit_rev` |
| `fft64_top.sv` | top level |
| `control_unit.sv` | phase state machine, counters, Busy, mode latch |
| `agu.sv` | address generation and pipeline alignment |
| `fft_ram.sv`, `mem_bank.sv` | eight 16 x 8 dual-port banks |
| `commutator1.sv`, `commutator2.sv`, `comm_xbar.sv` | routing |
| `radix4_pu.sv` | butterfly with twiddle multipliers |
| `vedic_cmul.sv`, `vedic_smul.sv`, `vedic_mul.sv`, `vedic_mul4.sv` | Vedic arithmetic |
| `twiddle_gen.sv`, `cordic.sv` | twiddle generator |

`tb/tb_<module>.sv` holds one self-checking testbench per module. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_fft64_top` runs the whole processor at its default sizes. It runs 16
transforms: impulse, DC, tones, random data and back-to-back runs, each in
DIF and in DIT. It compares them with a double-precision DFT and checks the
cycle timing. It also confirms that each mechanism happens: load, every
stage and drain, every twiddle quadrant in use, unload order, a start pulse
ignored while busy, and both modes.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -Irtl -y rtl --top-module tb_fft64_top rtl/fft_pkg.sv tb/tb_fft64_top.sv
    ./obj_dir/Vtb_fft64_top

To run another testbench, replace `tb_fft64_top` with its name. Each test
runs in well under a second.

## Changing the design

- The module parameters (`vedic_mul` `N`, `cordic` `XW`/`ITER`,
  `twiddle_gen` `TW`, `mem_bank` `W`/`DEPTH`, ...) default to the sizes
  above.
- The transform size, the number of banks and the data width are constants
  in `fft_pkg`. The AGU's address patterns and the digit functions are
  written for 64 points (three base-4 digits). A longer transform needs
  more digits in `lane_of`, `addr_of` and `digit_rev`, more rows in the AGU
  pattern table, and wider counters.
- A wider data path means changing `DATA_W`, and `TW_W` for the twiddles.
  The multiplier widths follow, rounded up to a multiple of 4.
