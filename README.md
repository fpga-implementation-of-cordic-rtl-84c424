# CORDIC twiddle generation for a pipelined 4-point FFT

An FFT multiplies its data by twiddle factors W = e^(-jθ). These are usually
read from a ROM of sine and cosine values. Here they are computed instead, by
a CORDIC (COordinate Rotation DIgital Computer). A CORDIC rotates a vector by
any angle using only shifts, additions and a short table of angle constants.
This design pipelines that rotation, one micro-rotation per clock. It feeds
the results as twiddles into a pipelined radix-2 decimation-in-frequency (DIF)
FFT of four real 8-bit samples. The FFT produces 24-bit real and imaginary
outputs.

This RTL follows a published FPGA design with a 16-bit angle, 8-bit sine and
cosine, 9 CORDIC iterations, 8-bit samples and 24-bit FFT outputs. That design
targeted a Spartan-6 and reported 800 slice LUTs and 77.86 MHz. The source
gives the block structure, the word widths and the port names. It leaves out
the number formats, the latencies and several internal details. This
implementation supplies those, and each choice is listed under
"Departures and own choices" below.

```
gateway_in  --> cordic (W4^1) --cos,-sin--+
gateway_in1 --> cordic (W^0)  --cos,-sin--+--> fft4_dif --> gateway_out .. gateway_out7
x0..x3 ------> delay line (ITER+2) -------+
```

## Number formats

Everything depends on three fixed-point formats. They are defined in
`rtl/cordic_pkg.sv`.

| quantity | format | 1.0 is | notes |
|---|---|---|---|
| angle (`anglevalue`, `gateway_in*`) | signed Q3.13, 16 bit | 8192 = 1 rad | π/2 = 12868, π = 25736; accepts [-4, 4) rad |
| sine, cosine, twiddle | signed Q1.6, 8 bit | 64 | 1, -1, j and -j are exact |
| CORDIC internal x, y | signed Q2.14, 16 bit | 16384 | |
| FFT output | signed 24 bit | X[k] × 4096 | two Q1.6 stages, 12 fraction bits |

To run a true 4-point DFT, drive `gateway_in = 12868` (π/2, which gives
W4^1 = -j) and `gateway_in1 = 0` (W = 1). Each output then equals exactly
4096 × X[k]. Other angles give a "rotated" transform, with W4^1 = e^(-j·gateway_in)
and W4^0 = W2^0 = e^(-j·gateway_in1).

## The CORDIC (`cordic`, `cordic_stage`)

**Micro-rotation.** `cordic_stage` is one iteration i, and it is purely
combinational. The residual angle z chooses the direction d = +1 if z ≥ 0,
else -1. Then:

```
x' = x - d·(y >>> i)      y' = y + d·(x >>> i)      z' = z - d·atan(2^-i)
```

Each stage's shift amount is fixed, so the shifter is just wiring.

**Pipeline.** `cordic` has ITER + 2 register stages:

1. *Quadrant fold.* CORDIC only converges for |θ| up to about 99.7°. An angle
   above π/2 starts from the vector (-1/K, 0) and is rotated by θ - π. An
   angle below -π/2 is rotated by θ + π from the same vector. Any other angle
   starts from (+1/K, 0). This covers the required 0 to 180° and the rest of
   the input range.
2. *ITER iterations* (default 9), each followed by a register. The default
   follows the rule "n + 1 iterations for n output bits", with n = 8.
3. *Rounding.* x and y are rounded half-up from Q2.14 to Q1.6. The results
   appear on `cos` and `sin`.

The start vector is 1/K = 0.60725 (9949 in Q2.14). This cancels the CORDIC
gain K = 1.64676, so no multiplier is needed at the output.

**Smaller angle table.** The only table CORDIC needs holds the constants
atan(2^-i). For small angles, atan(2^-i) ≈ 2^-i. In Q3.13 the two values
differ by less than one LSB from i = 4 onwards. So only four constants are
stored, round(atan(2^-i)·2^13) = 6434, 3798, 2007, 1019. The remaining
iterations use the power of two 2^(13-i). The split point is
`ATAN_ROM_DEPTH` in the package.

**Accuracy.** The testbench sweeps the whole input range. `cos` and `sin` are
always within 1 LSB (1/64) of the correctly rounded value. They are exact at
0, ±π/2 and π.

**Control.** `ce` is a clock enable for every register. `rst` is a
synchronous, **active-low** reset: while it is 0 the pipeline is cleared and
both outputs read 0. The module has no valid flag. An output is valid
ITER + 2 enabled cycles after its angle was taken, counting the cycle that
takes it.

## The 4-point DIF FFT (`fft4_dif`, `butterfly`)

`butterfly` computes the DIF butterfly A = a + b and B = (a - b)·W. The
arithmetic is exact and full width. Multiplying by a Q1.6 twiddle adds six
fraction bits to B. A is shifted left by six bits so that both outputs share
one scale.

`fft4_dif` has two butterfly stages with a register after each one:

```
stage 1 (W4):  a0 = x0 + x2      b0 = (x0 - x2)·W4^0
               a1 = x1 + x3      b1 = (x1 - x3)·W4^1
stage 2 (W2):  X0 = a0 + a1      X2 = (a0 - a1)·W2^0
               X1 = b0 + b1      X3 = (b0 - b1)·W2^0
```

- **Output order.** A DIF flow graph produces its outputs in bit-reversed
  order: X0, X2, X1, X3. The outputs are wired back into natural order, so
  `x<k>_r` and `x<k>_i` carry X[k].
- **Bit growth.** Stage 1 is 18 bits wide and exact. Stage 2 keeps the low 24
  bits. No bits are lost as long as |W| ≤ 1, because the largest result is
  4·128·4096 = 2^21. Twiddles with a larger magnitude can wrap.
- **Inputs.** The four samples are real, so the imaginary inputs of stage 1
  are zero. As a result Im X[0] is always 0, and the sum paths end in fixed
  zero bits.
- **Timing.** Every input of one transform, `w2_0` included, is presented in
  the same cycle. `w2_0` is delayed inside the module to meet its stage-1
  data. The latency is 2 enabled cycles, and a new transform can enter on
  every enabled cycle. The FFT has no reset: after two enabled cycles the
  pipeline holds valid data.

## The top level (`cordic_software_cw`)

The top level contains two `cordic` instances and the FFT. It forms each
twiddle from a CORDIC output as W = cos - j·sin. The samples pass through a
delay line of ITER + 2 cycles, so each sample set meets the twiddles computed
from the angles applied in the same cycle. Both the angles and the samples
may therefore change on every cycle.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `ce` | in | 1 | clock, clock enable for all registers |
| `gateway_in` | in | 16 | angle for W4^1 (Q3.13) |
| `gateway_in1` | in | 16 | angle for W4^0 and W2^0 (Q3.13) |
| `x0` … `x3` | in | 8 | signed real samples |
| `gateway_out` … `gateway_out3` | out | 24 | Re X[0..3] × 4096 |
| `gateway_out4` … `gateway_out7` | out | 24 | Im X[0..3] × 4096 |

The latency from inputs to outputs is ITER + 4 = 13 enabled cycles, counting
the cycle that takes the inputs, at a throughput of one transform per enabled
cycle. There is no reset port: the CORDIC resets are held inactive. The
outputs carry valid data once 13 enabled cycles have passed after power-up.

## Departures and own choices

Taken from the source design:

- the CORDIC micro-rotation structure;
- the pipelined organisation;
- 9 iterations;
- the 16-bit angle and the 8-bit sine and cosine;
- the active-low reset and the clock enable;
- the reduced angle table as a goal;
- the 4-point radix-2 DIF FFT with 8-bit inputs, 8-bit twiddles and 24-bit
  outputs;
- the twiddle port set `w2_0`, `w4_0`, `w4_1`;
- the top-level port names and widths.

Chosen here:

- all number formats, including the angle unit and the output scale of 4096;
- the quadrant fold;
- how the angle table is reduced (small-angle approximation from i = 4);
- gain compensation through the start vector;
- rounding;
- every latency, and the register placement in the FFT;
- natural output order;
- which top-level angle drives which twiddle;
- the sample delay line and the order of the top-level outputs.

The source's published waveforms cannot be reproduced bit for bit, because
its number formats are unknown. Its resource and clock figures come from the
vendor's FPGA flow and have not been re-measured.

The source also draws 8-point DIF flow graphs to explain the algorithm. Only
the 4-point transform that it implements is built here. A larger transform
would need more twiddles and more butterfly stages, along the lines of
`fft4_dif`.

## Simulation

Every testbench checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cordic_stage` | micro-rotation equations at shifts 0, 3 and 7, against integer floor-division arithmetic |
| `tb_cordic` | reset, latency, `ce` stalls and accuracy (≤ 1 LSB, exact at 0, ±π/2 and π) over the whole angle range, including the fold |
| `tb_butterfly` | A and B against 64-bit integer arithmetic, extremes included |
| `tb_fft4_dif` | exact DFT with the true twiddles; the DIF graph with random unit twiddles; latency 2; stalls |
| `tb_cordic_software_cw` | end to end at default parameters: exact 4096·DFT for angles (π/2, 0), and a floating-point model with a derived error bound for random angles; latency 13; stalls; counts folds, stalls and both kinds of transform |
| `tb_workloads` | every angle code from 0 to 180° (0 … 25736) through `cordic`, ≤ 1 LSB (the largest error seen is 1 LSB); the top level with all samples = 2, `gateway_in1` = 0 and two values of `gateway_in`, expecting X = (8, 0, 0, 0) |

For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cordic_pkg.sv \
    tb/tb_cordic_software_cw.sv --top-module tb_cordic_software_cw -o sim
./obj_dir/sim
```

Use the same command for the other testbenches: change the file and the top
module names, and keep `rtl/cordic_pkg.sv` first. Each testbench runs in
well under a second.

## Changing the design

- `ITER` (in `cordic` and the top level) sets the number of iterations. The
  start constant 0.60725 ≈ 1/K assumes ITER ≥ 8, where 1/K stays within
  0.00002 of it.
- `DW` sets the CORDIC's internal width. Output rounding adjusts to it.
- `ATAN_ROM_DEPTH` in `cordic_pkg` sets how many angle constants are stored.
  Values of 4 or more keep the angle error under one LSB.
- `IW`, `TW`, `TF` and `OW` set the FFT's sample width, twiddle width,
  twiddle fraction bits and output width. The top level uses 8, 8, 6 and 24.
