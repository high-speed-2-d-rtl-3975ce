# Multiplier-less 9/7 wavelet filter bank: distributed arithmetic on Brent-Kung adders

This RTL computes the 9/7 discrete wavelet transform of a stream of 4-bit
samples without a single multiplier. The 9-tap low-pass and 7-tap high-pass
filters are symmetric. Mirrored samples are added first. The remaining
constant-coefficient inner products are then built from the bits of the
coefficients: one partial sum per bit position, combined by shifting and
adding. Every adder in the datapath is a Brent-Kung parallel-prefix adder.

One filter stage (`dwt_1d`) splits the input into a low-pass stream `yl` and a
high-pass stream `yh`. The top level (`dwt_2d`) cascades three such stages.
One stage works on the input. Two more split `yl` into LL/LH and `yh` into
HL/HH. The cascade gives four sub-bands, as in a two-dimensional
decomposition. The whole design holds 224 flip-flops, all of them in the
sample delay lines. Everything else is combinational.

## Block structure

```
                 +------------------------- dwt_2d -------------------------+
                 |                                                          |
 x[3:0] -------->| dwt_1d (4-bit in)  --yl[11:0]--> dwt_1d (12-bit in) --> yll, ylh
                 |   siso_register               \                        |
                 |   sym_preadd x2                 --> yl (port)          |
                 |   mda_filter x2   --yh[11:0]--> dwt_1d (12-bit in) --> yhl, yhh
                 |                               \                        |
                 |                                 --> yh (port)          |
                 +----------------------------------------------------------+
```

| module          | role |
|-----------------|------|
| `dwt_pkg`       | shared constants: widths, tap counts, coefficient sets |
| `bk_adder`      | W-bit Brent-Kung adder, no carry-in, with carry-out |
| `siso_register` | serial-in serial-out delay line, taps X(n-1) .. X(n-8) |
| `sym_preadd`    | folds an odd-length window into mirrored pair sums |
| `mda_filter`    | constant-coefficient inner product by bit-plane shift-add |
| `dwt_1d`        | one low-pass/high-pass stage |
| `dwt_2d`        | top: first stage plus a second stage on each of its outputs |

## The filters

Let X(n) be the sample applied in the current cycle. The delay line holds
X(n-1) .. X(n-8). The low-pass filter is

```
m1 = X(n)+X(n-8)  m2 = X(n-1)+X(n-7)  m3 = X(n-2)+X(n-6)  m4 = X(n-3)+X(n-5)  m5 = X(n-4)
yl = 77*m1 + 34*m2 - 10*m3 - 2*m4 + 3*m5
```

The high-pass filter uses the seven samples centred on X(n-4):

```
r1 = X(n-1)+X(n-7)  r2 = X(n-2)+X(n-6)  r3 = X(n-3)+X(n-5)  r4 = X(n-4)
yh = 71*r1 - 38*r2 - 4*r3 + 6*r4
```

The numbers 77, 34, -10, -2, 3 are the CDF 9/7 analysis low-pass taps scaled
by 128 and rounded. The numbers 71, -38, -4, 6 are the 9/7 analysis high-pass
taps scaled by 64. The high-pass uses the smaller scale so that its centre tap
(1.115) still fits in an 8-bit signed word.

Two points need attention.

* **Coefficient order.** The largest coefficient multiplies the outermost
  pair, not the centre sample. This is the published pairing, and the
  published simulation results depend on it. A textbook 9/7 filter puts the
  largest tap on the centre. To get that, reverse the two arrays in
  `dwt_pkg`. The hardware adapts on its own, because it is generated from the
  coefficient bits.
* **The high-pass set is reconstructed.** Only the low-pass set was
  published. The high-pass set above is the standard 9/7 filter at scale 64,
  paired in the same order. For a constant input of 3 it gives
  6*(71-38-4) + 3*6 = 192, which is the published 12-bit high-pass result
  `000011000000`. The same input gives a low-pass value of 603
  (`001001011011`). The published low-pass result, `101001011011`, agrees
  with it in the low ten bits.

## How the multipliers are removed (`mda_filter`)

This is the core of the design. Write each 8-bit two's complement coefficient
c_j as bits c_j[7..0]. Then

```
sum_j c_j*u_j = sum_{b=0..6} 2^b * K_b  -  2^7 * K_7,   where  K_b = sum over j with c_j[b]=1 of u_j
```

Each K_b is the sum of the inputs selected by one row of the coefficient bit
matrix. For the low-pass set the rows (bit 0 first) are:

| bit | 77 | 34 | -10 | -2 | 3 | K_b            |
|-----|----|----|-----|----|---|----------------|
| 0   | 1  | 0  | 0   | 0  | 1 | u1+u5          |
| 1   | 0  | 1  | 1   | 1  | 1 | u2+u3+u4+u5    |
| 2   | 1  | 0  | 1   | 1  | 0 | u1+u3+u4       |
| 3   | 1  | 0  | 0   | 1  | 0 | u1+u4          |
| 4   | 0  | 0  | 1   | 1  | 0 | u3+u4          |
| 5   | 0  | 1  | 1   | 1  | 0 | u2+u3+u4       |
| 6   | 1  | 0  | 1   | 1  | 0 | u1+u3+u4       |
| 7   | 0  | 0  | 1   | 1  | 0 | u3+u4 (sign row, subtracted) |

The coefficients are parameters, so a row only gets adders for its set bits.
A generate loop builds them: each row is a chain of Brent-Kung adders over
the selected inputs. The rows are then combined by Horner's rule, starting
from the sign row:

```
acc = ~K_7 + 1                 (two's complement negation)
acc = 2*acc + K_b              for b = 6 down to 0
```

All of this runs at an internal width `ACC_W = U_W + COEF_W + clog2(NU) + 1`,
which holds the exact result. The inputs are sign- or zero-extended to that
width first. The output `y` keeps the low `OUT_W` bits and drops the carries
above them. Example: u = (4, 4, 4, 4, 2) gives 402 = `0000110010010`. The
`mda_filter` testbench checks this vector.

A different coefficient set (other filter, other scale, other `COEF_W`) only
needs a new `COEF` parameter. An elaboration-time check rejects a coefficient
that does not fit in `COEF_W` bits.

## Brent-Kung adder (`bk_adder`)

Each bit has a generate term g = a&b and a propagate term p = a^b. These feed
a prefix tree:

* An up-sweep forms group carries over spans of 2, 4, 8, ... bits.
* A down-sweep fills in the remaining bit positions.
* The sum is s[i] = p[i] ^ carry[i-1].

The tree has 2*log2(W)-1 levels and about 2W prefix cells. It works for any
W, including widths that are not powers of two. The datapath uses 5-, 13-, 16-,
17-, 24- and 25-bit instances. At W = 4 it reduces to the usual 4-bit Brent-Kung
network, with outputs S0..S3 and the carry S4.

## Timing and throughput

* The only registers are the delay lines, clocked on every rising edge:
  8x4 bits in the first stage and 8x12 bits in each second stage.
* All outputs are combinational. They depend on the delay line and on the
  sample currently on `x`. The outputs for the window ending at X(n) are
  valid in the same cycle X(n) is applied, before the edge that stores it.
* One output set is produced per clock. Down-sampling by two is not done in
  hardware. A consumer that wants the decimated sub-bands keeps every second
  output (`y(2n)`).
* After reset, a constant input settles at the first-stage outputs once eight
  copies are stored. It settles at the second-stage outputs after sixteen.
  For constant 3 the settled outputs are: yl = 603, yh = 192, yll = 121203,
  ylh = yhl = 38592, yhh = 12288.
* The critical path is long. It runs from a delay-line register through a
  pre-adder, a row-sum chain and eight accumulation adders in the first
  stage, then through the same again in the second stage.
* `rst` is synchronous and active high. It clears every delay line.

## Number formats and wrap-around

| signal                  | width | format |
|-------------------------|-------|--------|
| `x`                     | 4     | unsigned, 0..15 |
| `yl`, `yh`              | 12    | two's complement, modulo 2^12 |
| `yll`, `ylh`, `yhl`, `yhh` | 18 | two's complement, modulo 2^18 |

The output widths are the published ones, and they are narrower than the
exact results:

* For inputs 0..15 the exact first-stage low-pass range is -360..3375, and
  the high-pass range is -1260..2220. Values above 2047 wrap to negative
  numbers. The second stage treats them as negative.
* The second-stage results can wrap in the same way.

Small or slowly varying inputs (such as the constant 3 above) stay in range.
For full-scale input use wider outputs. Set `OUT1_W = 13` and a larger
`OUT2_W` on `dwt_2d`; nothing else needs to change.

## What follows the published design and what is this design's choice

Taken from the published design:

* 4-bit input, 12-bit first-stage outputs and 18-bit second-stage outputs.
* 8-stage delay line with the symmetric pre-addition.
* Low-pass coefficients and their pairing with m1..m5.
* Bit-matrix distributed arithmetic with a two's complement sign row, sign
  extension and carry rejection.
* Brent-Kung adders throughout.
* Stage cascade and sub-band naming.
* Flip-flop counts: 32 for one stage, 224 for the cascade.

Chosen here:

* The high-pass coefficient set, and the taps of its window.
* Synchronous reset.
* Computing the bit rows with adders, and the internal accumulator width.
* A Brent-Kung adder written as a generic prefix tree.
* Bringing the first-stage streams out as ports.

Known departures:

* Some published second-stage results are not reproduced: yh
  `1111101000000000000` and yl `000001100000000000` for constant input 3.
  It is also not stated which sub-bands those two outputs are. This design
  brings out all four.
* The published 12-bit low-pass result for constant 3 differs from this
  design's 603 in the top two bits.
* The "2-D" transform is a cascade on one sample stream. It has no line
  buffer, so it does not transform image rows and columns. For an image,
  feed rows through the first stage and reorder the results into columns
  outside this block.
* The FPGA slice, LUT and timing figures published for this design were not
  compared. Only the flip-flop counts were.

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dwt_pkg.sv tb/tb_dwt_2d.sv --top-module tb_dwt_2d -o sim
./obj_dir/sim
```

Replace `tb_dwt_2d` with any testbench below.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_bk_adder`      | 4-bit adder exhaustively; 13- and 24-bit adders with random operands and the full carry chain |
| `tb_siso_register` | every tap against a history of inputs; reset in mid-stream |
| `tb_sym_preadd`    | 9-tap unsigned and 7-tap signed configurations against integer pair sums |
| `tb_mda_filter`    | low-pass and high-pass sets, unsigned and signed inputs, against integer inner products modulo 2^OUT_W; the (4, 4, 4, 4, 2) example; extreme values |
| `tb_dwt_1d`        | both stage configurations against an integer FIR model every cycle; the constant-3 results (603 and 192); settling after exactly eight samples |
| `tb_dwt_2d`        | whole design at default sizes against an integer model of the cascade, all six outputs every cycle |

`tb_dwt_2d` also checks:

* the constant-3 values and their 8- and 16-cycle settling;
* that the stimulus produces each of these at least once: negative results,
  12-bit wrap-around, 18-bit wrap-around and a mid-stream reset.

All testbenches pass. Each was also run against a version of its module with
one deliberate bug, and every bug was caught.
