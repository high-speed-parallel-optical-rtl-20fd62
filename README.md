# Two-step carry-free adder for arrays of quaternary signed-digit numbers

This design adds two whole two-dimensional arrays of numbers at once, in a
fixed time of two steps. It does not matter how many numbers the arrays hold
or how many digits each number has. Two ideas make that possible:

* **Quaternary signed digits (QSD).** Numbers are written in radix 4 with
  digits from -3 to 3. Because a value can be written in more than one way,
  an addition can be split into two local steps. No carry ever has to travel
  further than one digit.
* **Digit-decomposition planes (DDP).** An array of digits is stored as seven
  one-bit images, one image per digit value. A pixel is 1 in exactly the
  image of its digit. Each step of the adder is then a fixed set of AND and
  OR operations on whole images, done for every pixel at the same time.

The scheme was designed for optical hardware. There, a pixel-wise AND is two
light modulators placed one behind the other, and an OR is a beam combiner.
This RTL keeps that structure. Every output plane is built from AND and OR
gates acting on whole planes, and registers hold the planes between the
steps.

## Number system

An ND-digit QSD number has the value `sum_d x_d * 4^d` with `x_d` in
-3..3. Four digits cover -255..255, and the (ND+1)-digit result of an
addition covers -1023..1023. The same value often has several spellings.
For example, 19 can be written as 1 0 3 (16 + 3) or as 1 1 -1 (16 + 4 - 1).
The adder accepts any spelling, and its result is one valid spelling of the
sum.

## Plane code and pixel layout

| array                  | planes | plane `k` holds value |
|------------------------|--------|-----------------------|
| operand / result digit | 7      | `k - 3` (-3..3)       |
| intermediate sum `s`   | 5      | `k - 2` (-2..2)       |
| intermediate carry `c` | 3      | `k - 1` (-1..1)       |

A plane is a packed vector with one bit per pixel. The arrays have M rows
and N columns of numbers. Digit `d` of the number in row `r`, column `c`
sits at these pixels:

* operands: `(r*N + c)*ND + d`;
* results: `(r*N + c)*(ND+1) + d`.

Digit `d = 0` is the least significant one. The package `qsd_ddp_pkg` holds
the plane masks and the term tables.

## Step 1: split every digit pair into a sum and a carry

For every digit position, the digit pair `(x, y)` is rewritten as
`x + y = 4c + s`, where `c` is in -1..1 and `s` is in -2..2:

| x + y     | 6 | 5 | 4 | 3  | 2 | 1 | 0 | -1 | -2 | -3 | -4 | -5 | -6 |
|-----------|---|---|---|----|---|---|---|----|----|----|----|----|----|
| carry `c` | 1 | 1 | 1 | 1  | 0 | 0 | 0 | 0  | 0  | -1 | -1 | -1 | -1 |
| sum `s`   | 2 | 1 | 0 | -1 | 2 | 1 | 0 | -1 | -2 | 1  | 0  | -1 | -2 |

These thirteen cases cover all 49 digit pairs. Each plane is a sum of
products of operand planes; `A3` means "plane of value 3 of operand A" and
`A-1` means the plane of value -1:

```
S2  = A3(B3+B-1) + A2 B0 + A0 B2 + A-1 B3 + A1 B1          (and, mirrored, S-2)
S1  = (A2+A-2)(B3+B-1) + (A3+A-1)(B2+B-2) + A0(B1+B-3) + (A1+A-3)B0
S0  = (A3+A-1)(B1+B-3) + (A1+A-3)(B3+B-1) + (A2+A-2)(B2+B-2) + A0 B0
S-1 = (A2+A-2)(B1+B-3) + (A1+A-3)(B2+B-2) + A0(B3+B-1) + (A3+A-1)B0
S-2 = A-3(B1+B-3) + A-2 B0 + A0 B-2 + A1 B-3 + A-1 B-1
C1  = (A3+A2)(B3+B2+B1) + A1(B3+B2) + A3 B0 + A0 B3
C0  = (A3+A2+A1)(B-1+B-2+B-3) + (A-1+A-2+A-3)(B3+B2+B1)
    + (A2+A1+A-1+A-2)B0 + A0(B2+B1+B-1+B-2) + A1 B1 + A0 B0 + A-1 B-1
C-1 = (A-3+A-2)(B-3+B-2+B-1) + A-1(B-3+B-2) + A-3 B0 + A0 B-3
```

`ddp_sum_gen` builds the five S planes and `ddp_carry_gen` builds the three
C planes. Each plane is one `ddp_sop_plane` instance. That module builds
every term from two masked beam combiners (`ddp_plane_or`) and one cascade
(`ddp_plane_and`), then merges the terms with a last combiner. The zero
carry plane C0 uses its own seven terms, not the complement of C1 and C-1.
As a result, an input pixel that is dark in every plane also gives a dark
carry.

## Step 2: widen, shift and add the carries

Every sum digit `s_i` receives the carry `c_(i-1)` from the digit below it.
Since `s` is in -2..2 and `c` is in -1..1, the result `z_i = s_i + c_(i-1)`
always fits in a single digit, so no new carry arises.

Before the addition, `ddp_expand_shift` widens every number to ND+1 digits:

* the sum planes get a zero digit on top;
* the carry planes (called C') move up by one digit and get a zero digit at
  the bottom.

A "zero digit" means a pixel that is 1 in the value-0 plane and 0 in the
other planes. The shift stays inside each number: no carry moves from one
array element into the next. `ddp_result_gen` then forms the seven result
planes from the fifteen possible `(s, c')` pairs:

```
Z3  = S2 C'1
Z2  = S2 C'0  + S1 C'1
Z1  = S2 C'-1 + S1 C'0  + S0 C'1
Z0  = S1 C'-1 + S0 C'0  + S-1 C'1
Z-1 = S0 C'-1 + S-1 C'0 + S-2 C'1
Z-2 = S-2 C'0 + S-1 C'-1
Z-3 = S-2 C'-1
```

## Top level: `qsd_ddp_array_adder`

```
a_digits, b_digits -> ddp_encoder x2 -> [input latch] -> ddp_sum_gen, ddp_carry_gen
   -> [intermediate latch] -> ddp_expand_shift -> ddp_result_gen -> [output latch] -> z_planes
```

| parameter | default | meaning                      |
|-----------|---------|------------------------------|
| `M`       | 10      | rows of numbers              |
| `N`       | 2       | columns of numbers           |
| `ND`      | 4       | digits per operand           |

The defaults match a 10 x 2 array of 4-digit numbers. For any size the
design has 2 x 7 x M x N x ND input-latch bits, 8 x M x N x ND
intermediate-latch bits and 7 x M x N x (ND+1) output-latch bits. At the
defaults that is 2463 flip-flops.

| port        | dir | width            | meaning                                        |
|-------------|-----|------------------|------------------------------------------------|
| `clk`       | in  | 1                |                                                |
| `rst_n`     | in  | 1                | synchronous, active low; clears all planes     |
| `in_valid`  | in  | 1                | operands present                               |
| `in_ready`  | out | 1                | operands taken on this edge if `in_valid`      |
| `a_digits`  | in  | M*N*ND x 3       | addend digits, 3-bit two's complement          |
| `b_digits`  | in  | M*N*ND x 3       | augend digits                                  |
| `out_valid` | out | 1                | one-cycle pulse: `z_planes` holds a new result |
| `busy`      | out | 1                | a step is running                              |
| `z_planes`  | out | 7 x M*N*(ND+1)   | result planes (plane k = digit k-3)            |

### Timing

`qsd_adder_ctrl` gives each step one clock cycle. The input latch holds the
operand planes for the whole first step. In the second step the input latch
is no longer read, so the next operands can be accepted then.

```
edge:        e0 (accept)     e1                  e2                  e3
input latch  <- A,B          hold                <- next A,B (if any)
step 1                       S,C -> mid latch
step 2                                           Z -> output latch
out_valid                                        1 (for one cycle)
in_ready     1         0 (during step 1)   1 (during step 2)
```

The result and `out_valid` appear on the second edge after the accept edge.
With `in_valid` held high, the adder takes one operation every two cycles.
This matches the rule that an operation costs two modulator response times
(throughput = pixels / (2 x response time)). Latency and throughput do not
depend on M, N or ND. The output has no back-pressure, and a result stays
in the output latch until the next one replaces it. Two assertions in the
controller check that the intermediate latch loads exactly one cycle after
an accept, and that no operands are accepted while step 1 still reads them.

## Where this RTL makes its own choices

The logic equations, the two-step split, the plane code, the C' shift and
the one-operation-per-two-response-times rate all belong to the scheme
itself. The following are this implementation's own choices:

* **Registers stand for the optics.** The input latch stands for the input
  modulators. The intermediate and output latches stand for the detector
  arrays that capture each step's planes. Each step takes one clock cycle.
  Light sources, beam splitters and mirrors have no logic function and are
  not modelled. Fan-out is plain wiring.
* **Digit input.** Operands arrive as 3-bit two's-complement digits, and
  `ddp_encoder` converts them to planes. The code -4 (`3'b100`) is not a
  digit, so it lights no plane. The result then has a dark pixel, and the
  pixels that receive its carry are dark as well. The output stays in plane
  form; a user who needs digits decodes it by finding the plane that is 1.
* **Padding.** The padding for the widened sum and the shifted carry is the
  digit 0, as described under Step 2.
* **Handshake.** The valid/ready input and the one-cycle `out_valid` pulse
  are added for use in a clocked system.
* **Beam combiners with many inputs.** `ddp_plane_or` ORs any masked subset
  of planes. Optically, that is a tree of two-input combiners.

## Files

| file                    | role                                                       |
|-------------------------|------------------------------------------------------------|
| `rtl/qsd_ddp_pkg.sv`    | digit type, plane masks, term tables of all equations      |
| `rtl/ddp_plane_or.sv`   | beam combiner: OR of masked planes                         |
| `rtl/ddp_plane_and.sv`  | cascade: AND of two planes                                 |
| `rtl/ddp_sop_plane.sv`  | one output plane as a sum of product terms                 |
| `rtl/ddp_encoder.sv`    | digits -> 7 planes                                         |
| `rtl/ddp_sum_gen.sv`    | step 1, S planes                                           |
| `rtl/ddp_carry_gen.sv`  | step 1, C planes                                           |
| `rtl/ddp_expand_shift.sv` | widen S, shift C into C'                                 |
| `rtl/ddp_result_gen.sv` | step 2, Z planes                                           |
| `rtl/ddp_plane_latch.sv`| plane register between steps                               |
| `rtl/qsd_adder_ctrl.sv` | two-step sequencer and input handshake                     |
| `rtl/qsd_ddp_array_adder.sv` | top level                                             |
| `tb/tb_*.sv`            | one self-checking testbench per module; `tb_qsd_ref_pkg` has the reference arithmetic |

## Verification

Every testbench computes its expected values from the arithmetic
(`x + y = 4c + s` with `c = ±1` exactly when `|x + y| >= 3`, then
`z = s + c'`), not from the plane equations. Each one ends by printing
`TB_RESULT checks=N failures=F`.

* `tb_ddp_sum_gen`, `tb_ddp_carry_gen`: all 49 digit pairs, then random
  pairs.
* `tb_ddp_result_gen`: all 15 `(s, c')` pairs, then random pairs.
* `tb_ddp_encoder`, `tb_ddp_expand_shift`, `tb_ddp_plane_*`: random planes
  and digits, with the mapping checked pixel by pixel.
* `tb_qsd_adder_ctrl`: random and saturated traffic. It checks the load
  timing of each stage, the two-cycle spacing between accepts, and exactly
  20 accepts in 40 cycles at full rate.
* `tb_qsd_ddp_array_adder`: end to end, at the default size. It first adds
  the 10 x 2 example below and checks the digit strings of 255 + 255
  (1 3 3 3 2) and -255 + -255 (-1 -3 -3 -3 -2). It then runs 100
  operations with random redundant digits, first with random gaps and then
  back to back, against a scoreboard. It checks the two-edge latency and
  the full-rate throughput. It also counts how often each of these
  occurred, and fails if any count is zero:
  * each of the 13 first-step cases;
  * each of the 7 result digits;
  * a carry into the padded top digit;
  * a back-to-back accept;
  * an idle gap.
* `tb_qsd_ddp_scaling`: adders of size 1x1x1, 4x3x2 and 8x8x8 run side
  by side. It checks that all three return correct results on the same
  edge.

The example operands (decimal, converted to QSD as the sign times the
base-4 digits of the magnitude):

```
A = [255 101; 132 0; 50 114; 31 215; 49 -15; 172 0; 247 -199; -76 47; -89 -220; -255 132]
B = [255 209; 92 0; -13 69; -200 -205; -110 30; 121 100; -100 250; 249 -47; -175 -113; -255 39]
A+B = [510 310; 224 0; 37 183; -169 10; -61 15; 293 100; 147 51; 173 0; -264 -333; -510 171]
```

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/qsd_ddp_pkg.sv tb/tb_qsd_ref_pkg.sv tb/tb_qsd_ddp_array_adder.sv \
    --top-module tb_qsd_ddp_array_adder -o sim
./obj_dir/sim
```

To run a different testbench, replace its file and top-module name. Every
testbench has a watchdog that counts a failure and stops the simulation if
it hangs. To change the array size, override `M`, `N` and `ND` on
`qsd_ddp_array_adder`. All other widths follow from those three. Reading
the package's term tables next to the equations above is the quickest way
to check or change the logic.
