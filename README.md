# Q7 neural-network accelerators for a RISC-V ECG patch controller

A disposable ECG patch that screens for atrial fibrillation has to run a
small neural network on a button cell for weeks. The network here is tiny —
13 ECG features in, one hidden layer of 32 nodes, one or two outputs — and
runs as software on a 32-bit RISC-V microcontroller. Quantizing it to 8-bit
fixed point (Q7) lets the chip drop its floating-point unit, but then the
inference time is dominated by two things: the multiply-accumulates and the
activation functions (tanh, sigmoid, and the exponential inside softmax).

This RTL adds small, cheap units for exactly those operations, attached to
the core as extra operations:

| unit | what it computes | latency |
|---|---|---|
| `simd_mul` | RV32M `MUL/MULH/MULHSU/MULHU`, plus four 8x8 (`SMUL8/UMUL8`) or two 16x16 (`SMUL16/UMUL16`) products at once | 1 cycle |
| `act_tanh_sigmoid` | tanh(x) or sigmoid(x) of one Q7 value | 1 cycle |
| `exp_cordic` | e^x of one Q7 value, x in [-1, 1] | 3 cycles, pipelined |

ReLU is left to software (a sign test). Softmax is software too; only its
exponential is accelerated, because a hardware divider would cost more than
it saves.

## The Q7 number format

Every accelerator works on 8-bit two's-complement numbers with **5 fraction
bits**: bit 7 is the sign (weight -4), bits 6..5 are the integer part
(2, 1), bits 4..0 are 1/2 .. 1/32. One LSB is 1/32 ≈ 0.031, the range is
[-4, 3.97]. "Q7" in this README and the code always means this format
(`nn_accel_pkg::q7_t`). The product of two Q7 numbers has 10 fraction bits;
software shifts sums right by 5 to return to Q7.

## tanh and sigmoid: linearization plus a range-addressed table

The tanh unit (`tanh_approx`) exploits three facts:

1. **Symmetry.** tanh(-x) = -tanh(x). The unit forms |x| with a multiplexer
   and an inverter, works on the magnitude, and negates the result again
   when the sign bit was set.
2. **Linear region.** For |x| < 0.4671, tanh(x) ≈ x is within one LSB. In
   Q7 that is |x| ≤ 14/32, and the output is simply the input.
3. **Saturation.** Above that, tanh rises from about 0.47 to 1 — only 18
   distinct Q7 output values (15/32 … 32/32).

A conventional LUT indexed by x would need one entry per input value, many
of them repeating the same output. The **range addressable LUT**
(`tanh_ralut`) is organised the other way round: it has one entry per
*output* value, and each entry owns a range of inputs. The unit compares
|x| against the 17 range starts in parallel and counts how many it has
passed; that count selects the output 15/32 + count/32. The range starts
are chosen so that each input gets the output nearest to the true tanh:

    start of entry k (k = 1..17) = ceil(32 * atanh((15 + k)/32 - 1/64))
                                 = 17 19 20 22 23 25 27 28 31 33 35 38 42 46 52 60 78

so |x| ≥ 78/32 already gives 1.0. One magnitude does not fit the table's
7-bit address: x = -4 (|x| = 128). For it the unit selects the **border
value** 1.0 directly (result -1).

The **sigmoid** reuses the same tanh core through
S(x) = (tanh(x/2) + 1) / 2. `act_tanh_sigmoid` halves the input with an
arithmetic shift in front of the core; `sigmoid_post` adds one and shifts
right by one behind it. A multiplexer picks tanh or sigmoid, and one output
register gives a one-cycle latency at one operand per cycle.

Accuracy, measured exhaustively by the testbenches: the tanh result is at
most 0.0316 from the true tanh over all Q7 inputs (about one LSB); on
[-1, 1] the sigmoid is at most 0.0378 off. Both stay below two LSBs.

## e^x: a three-stage hyperbolic CORDIC

`exp_cordic` computes cosh and sinh with the hyperbolic CORDIC and combines
them. Starting from x = P' = 1.2075 (the inverse CORDIC gain), y = 0,
z = |phi|, each stage i = 1, 2, 3 does

    sigma = +1 if z >= 0 else -1
    x' = x + sigma * (y >> i)
    y' = y + sigma * (x >> i)
    z' = z - sigma * atanh(2^-i)

after which x ≈ cosh|phi| and y ≈ sinh|phi|. Because cosh is even and sinh
odd, e^phi = x + y for phi > 0 and x − y for phi ≤ 0. The rotation angle
table atanh(2^-i) for i = 1..3 is three constants (18, 8, 4 in Q7); P' is
39/32. All arithmetic is on the Q7 grid; z is one bit wider so that
|−4| = 128 fits.

Each stage is one pipeline register (`exp_cordic_stage`), so the unit
accepts an operand every cycle and returns it three cycles later; the final
add/subtract follows the last register.

Three iterations are far fewer than the eight a full-precision Q7 result
would need: they trade accuracy for area and delay. The largest error on
[-1, 1] is 0.25 (for example e^0 comes out as 28/32 and e^1 as 79/32). The
rotations i = 1..3 can only reach angles up to 0.93, so the unit is meant
for |phi| ≤ 1; larger inputs are not clamped and give a bounded but wrong
value. Software handles larger arguments by multiplying with powers of e.

## The SIMD multiplier: one set of multipliers for three data widths

`simd_mul` replaces the core's multiplier. Rather than a separate
multiplier per data type, it has four 8-bit multipliers ("M8",
`simd_m8_array`), two 16-bit multipliers ("M16") and one extra 16-bit
multiplier, and reconnects them per mode:

- **8-bit SIMD** — the four M8 multiply the four byte pairs of the two
  32-bit operands; the 64-bit result holds four 16-bit products.
- **16-bit SIMD** — the two M16 multiply the halfword pairs; the result
  holds two 32-bit products.
- **32x32** — split a = aH·2^16 + aL and b = bH·2^16 + bL. The four M8,
  combined into one 16x16 multiplier, compute aL·bL; the two M16 compute
  aH·bL and aL·bH; the extra M16 computes aH·bH. A three-input adder sums
  {aH·bH, aL·bL} (they do not overlap) with the two cross products shifted
  by 16.

The M8 array combines into a 16x16 multiplier by the same decomposition one
level down: byte products pL·qL, pL·qH, pH·qL, pH·qH, and a three-input
adder for {pH·qH, pL·qL} + (pL·qH << 8) + (pH·qL << 8).

Every multiplier is signed with one extension bit (9x9 and 17x17). An
operand part that carries the operand's sign is sign-extended when the
operand is signed, every other part is zero-extended. That way one
structure serves signed, unsigned and mixed (MULHSU) products. The result
is registered: one cycle of latency, one operation per cycle.

## Integration: `nn_accel_top`

The top decodes an operation, starts the matching unit and writes the
result to the core's register file:

| `req_op` | operation | writes |
|---|---|---|
| 0 `OP_MUL` | low 32 bits of signed 32x32 | rd |
| 1 `OP_MULH` / 2 `OP_MULHSU` / 3 `OP_MULHU` | high 32 bits (s×s, s×u, u×u) | rd |
| 4 `OP_SMUL8` / 5 `OP_UMUL8` | four 8x8 products | rd (lanes 0,1), rd+1 (lanes 2,3) |
| 6 `OP_SMUL16` / 7 `OP_UMUL16` | two 16x16 products | rd (lane 0), rd+1 (lane 1) |
| 8 `OP_TANH` / 9 `OP_SIGM` / 10 `OP_EXP` | Q7 function of `rs1[7:0]` | rd, sign-extended |

Ports: `req_valid/req_ready/req_op/req_rs1/req_rs2/req_rd` from the core,
`wb_valid/wb_rd/wb_data` to the register file (one write per cycle, always
accepted). The 64-bit SIMD results do not fit one register, so `wb_seq`
writes them as two 32-bit writes on consecutive cycles, low word first.

Timing: a request is taken at the clock edge where `req_valid` and
`req_ready` are both high. `wb_valid` rises L edges later (L = 1 for the
multiplier and tanh/sigmoid, 3 for e^x) and, for a two-word result, stays
high one more cycle for the high word. The top handles one operation at a
time: `req_ready` is low from acceptance until the last write, so a
following request stalls. Back-to-back use of the CORDIC pipeline is
therefore only possible when `exp_cordic` is used on its own.

Reset (`rst_n`) is asynchronous and active low; it clears the valid and
busy state, not the data registers.

## How far to trust it, and where it is this design's own

Taken from the accelerator description: the Q7 format; the linear region
limit 0.4671; an 18-entry RALUT covering 0.4671 … 1; sign handling by
multiplexers and inverters; sigmoid through tanh(x/2) with the shifts and
the add-one stage; the CORDIC equations, P' = 1.2075, three stages in a
three-step pipeline and the cosh ± sinh combination; four 8-bit and two
16-bit multipliers plus one extra 16-bit multiplier, the byte/halfword
decomposition with three-input adders, and the 64-bit result written as
two 32-bit words.

Chosen here because no detail was available:

- the exact RALUT range boundaries (nearest output value) and using the
  border value only for x = −4;
- running the CORDIC on |phi| (this makes the "x − y for phi ≤ 0" rule
  exact), sigma = +1 at z = 0, and all-Q7 internal word widths;
- which partial product each multiplier computes in 32x32 mode, and 9x9 /
  17x17 signed multipliers for mixed signedness;
- the request/write-back interface, the operation encoding, the register
  pair rd/rd+1, one operation in flight at a time, and all latencies except
  the CORDIC's three stages.

Known difference in accuracy: the e^x unit's worst error on [-1, 1] is 0.25,
against 0.19 reported for the original three-stage unit; the original's
internal word widths are unknown. The tanh error (0.032) is smaller than the
0.061 reported for the original, the sigmoid error (0.038) slightly larger
than its 0.032.

Not included: the RISC-V core itself, its memories, the ECG analog
front-end, and the inference software (feature extraction, the network
loops, ReLU, the softmax division).

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs:

- `tanh_ralut_tb`, `tanh_approx_tb`, `sigmoid_post_tb` — exhaustive over
  all inputs against real-valued tanh computed in the testbench.
- `act_tanh_sigmoid_tb` — all 256 inputs in both modes, streamed one per
  cycle, latency checked.
- `exp_cordic_tb` — all inputs streamed back to back, bit-exact against an
  integer model whose angle constants are computed from `$atanh`, latency
  of exactly 3 and error against `$exp` checked.
- `simd_m8_array_tb`, `simd_mul_tb` — corners and random operands in every
  mode and signedness against 64-bit arithmetic.
- `wb_seq_tb` — one- and two-word results, register numbers, consecutive
  high-word writes and stalls.
- `nn_accel_top_tb` — the whole subsystem at its only configuration. It
  issues every operation back to back (so requests stall), checks every
  register write, and then runs four complete 13-32-N network inferences
  with random Q7 weights the way the core's software would (SMUL8 dot
  products, activation operations, softmax exponentials), comparing every
  hidden value, output and class with a direct reference computation. It
  counts stalls, two-word writes, each operation, the linear / RALUT /
  border paths of tanh and both signs of the e^x input, and fails if any of
  them never occurred.

## Simulating

All files are plain SystemVerilog; `rtl/nn_accel_pkg.sv` must be read
first. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/nn_accel_pkg.sv tb/nn_accel_top_tb.sv --top-module nn_accel_top_tb -o sim
    ./obj_dir/sim

Replace the testbench file and top module name to run any other testbench.
Each finishes in well under a second.

## Files

| file | contents |
|---|---|
| `rtl/nn_accel_pkg.sv` | Q7 type, tanh and CORDIC constants, operation and mode encodings |
| `rtl/tanh_ralut.sv` | range addressable LUT |
| `rtl/tanh_approx.sv` | tanh: sign handling, linearization, RALUT, border value |
| `rtl/sigmoid_post.sv` | add one and halve |
| `rtl/act_tanh_sigmoid.sv` | combined tanh / sigmoid unit |
| `rtl/exp_cordic_stage.sv` | one pipelined CORDIC micro-rotation |
| `rtl/exp_cordic.sv` | three-stage e^x unit |
| `rtl/simd_m8_array.sv` | four 8-bit multipliers, SIMD or combined |
| `rtl/simd_mul.sv` | 8/16-bit SIMD and 32x32 multiplier |
| `rtl/wb_seq.sv` | one- or two-word register write-back |
| `rtl/nn_accel_top.sv` | operation decode, issue control, units, write-back |
| `tb/*_tb.sv` | one testbench per module |
