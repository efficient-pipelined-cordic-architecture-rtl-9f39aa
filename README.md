# Pipelined CORDIC sine/cosine generator

This is a fully unrolled, pipelined CORDIC processor in rotation mode. It
rotates a 2-D vector by an arbitrary angle using only shifts, additions and
subtractions. If the start vector is `(1/K, 0)` scaled to full range, the
rotated vector is `(cos θ, sin θ)`. `K` is the CORDIC gain, 1.6467. A new
angle can be applied on every clock. Each result comes out eight clocks later.

```
            +--------+   +---------+   +---------+        +---------+
 angle ---->|quadrant|-->| stage 0 |-->| stage 1 |-- .. ->| stage 7 |--> Xout
 Xin   ---->|  fold  |   | shift 0 |   | shift 1 |        | shift 7 |--> Yout
 Yin   ---->|        |   |  reg    |   |  reg    |        |  reg    |
            +--------+   +---------+   +---------+        +---------+
```

## The idea

Rotating by `θ` is split into a fixed sequence of elementary rotations by
`±atan(2^-i)`, for i = 0, 1, 2, .... When `tan` of the step angle is a power
of two, the rotation `x' = x - σ·y·2^-i`, `y' = y + σ·x·2^-i` needs only a
shift. Every step skips the `cos` factor, so every step also stretches the
vector by `sqrt(1 + 2^-2i)`. Over all steps this gives the constant gain `K`.
A third datapath, `z`, starts at the requested angle. It subtracts each step
angle that is applied. The direction `σ` of the next step is chosen so that
`z` moves toward zero. After `n` steps, the vector has been turned by the
requested angle to within `atan(2^-(n-1))`.

In the unrolled form every step has its own hardware:

- The shift by `i` is fixed, so it is only wiring.
- The step angle `atan(2^-i)` is a hardwired constant, not a ROM entry.
- A register row after each step turns the chain into a pipeline.

## Number formats

| Signal | Width | Format |
|---|---|---|
| `angle` | 32 | Binary angle: 2^32 is one full turn. Read as signed, it covers -180° to +180°. 90° = `32'h4000_0000`. |
| `Xin`, `Yin` | 16 | Signed two's complement |
| `Xout`, `Yout` | 17 | Signed two's complement, one bit wider than the inputs to hold the gain |
| internal x, y | 17 | Same as the outputs |
| internal z | 32 | Signed binary angle |

**Range rule:** keep `sqrt(Xin² + Yin²) ≤ 2^15`. Then `K·2^15 ≈ 53 960`
fits the 17-bit outputs. Larger vectors wrap around silently.

## Quadrant fold (`cordic_prerotate`)

The step chain only converges for angles within about ±99.7°. That is the sum
of all the step angles. The fold is combinational logic in front of stage 0.
It looks at the two top angle bits:

- **90° to 180°:** the vector is rotated by +90°: `(x, y) → (-y, x)`, and
  90° is taken off the angle.
- **-180° to -90°:** the vector is rotated by -90°: `(x, y) → (y, -x)`, and
  90° is added to the angle.
- **Anywhere else:** the inputs pass through.

A ±90° rotation is exact and does not change the gain. The coordinates are
widened to 17 bits before they are negated, so `-(-32768)` does not overflow.

## Micro-rotation stage (`cordic_stage`)

Each stage has three add/subtract units:

- x with `y >>> i`
- y with `x >>> i`
- z with the constant `atan(2^-i)`

All three take their add/subtract control from one direction bit. A
selector picks where that bit comes from:

- In **rotation** mode it is the sign of `z`. `z ≥ 0` rotates
  counter-clockwise and subtracts the constant.
- In **vectoring** mode it is the sign of `y`. `y < 0` rotates
  counter-clockwise.

The top level uses rotation mode only, so `vectoring` is tied to 0 there. The
stage still implements vectoring mode, and its testbench checks it. The
shifts are arithmetic and truncate toward minus infinity. All three results
are registered.

The constants come from `cordic_pkg::atan_angle(i) = round(atan(2^-i)·2^32/(2π))`.
The table covers i = 0..31.

## Gain and pre-scaling

No gain-correction multiplier is built. For sine and cosine, pre-scale the
start vector instead:

```
Xin = round(A / K),  Yin = 0   →   Xout ≈ A·cos θ,  Yout ≈ A·sin θ
```

For `ITER = 8`, `K = 1.646744`. For full scale (`A = 32767`) use `Xin = 19899`.
For a general vector, the outputs are `K·R(θ)·(Xin, Yin)`.

## Timing

- **Throughput:** one input per clock. There is no handshake, no stall and
  no valid signal.
- **Latency:** `ITER` clocks. An input sampled at clock edge `n` appears on
  `Xout`/`Yout` after edge `n + ITER - 1`.
- **Reset:** none. The outputs hold meaningless values for the first `ITER`
  clocks after start-up.

## Accuracy of the default (8 stages)

Eight steps leave a residual angle of up to `atan(2^-7) ≈ 0.45°`. The error
relative to the ideal rotation is therefore up to about `K·|v|·0.0078`, plus a
few LSB of truncation. At full scale that is about 420 LSB of 32 767,
roughly 8 bits of accuracy. The testbench saw a worst case of 417 LSB. For
more accuracy, raise `ITER`. Each extra stage adds one clock of latency and
one row of adders and registers. It also halves the residual angle, up to the
limit set by the 17-bit datapath, i.e. around `ITER = 16`. `K` changes only
in the sixth digit beyond 8 stages.

## Parameters of `cordic`

| Parameter | Default | Meaning |
|---|---|---|
| `IN_W` | 16 | Width of `Xin`/`Yin`. Outputs and internal x/y are `IN_W+1`. |
| `ANGLE_W` | 32 | Width of `angle` and z. The constant table is scaled down for widths below 32. |
| `ITER` | 8 | Number of micro-rotation stages, which is also the latency in clocks |

## Design choices not fixed by the architecture

These were chosen for this implementation:

- The binary-angle encoding.
- The quadrant fold.
- Truncating arithmetic shifts.
- The 17-bit internal width. It has no guard bits, which costs a few LSB of
  accuracy.
- No reset and no valid signal.
- Rotation mode only at the top, with no mode port.

The port names and widths, the eight-clock latency, the hardwired constants
and the wired shifts follow the architecture as specified.

Not included: the folded (iterative) CORDIC and the unpipelined
combinational chain. Both are alternative implementations of the same
algorithm.

## Files

| File | Contents |
|---|---|
| `rtl/cordic_pkg.sv` | Arctangent constants and the direction type |
| `rtl/cordic_prerotate.sv` | Quadrant fold |
| `rtl/cordic_stage.sv` | One micro-rotation with its pipeline register |
| `rtl/cordic.sv` | Top level: fold plus `ITER` stages |
| `tb/cordic_stage_tb.sv` | Stages with shifts 0, 3 and 7, in both modes, against a reference |
| `tb/cordic_tb.sv` | End-to-end test at the default parameters |

## Verification

`cordic_tb` runs the top level at its default parameters. It applies a new
input on every clock, 22 048 samples in all:

- a 2048-point sine/cosine sweep over the full circle;
- 20 000 random angles with random vectors of length ≤ 2^15.

Each output is checked in two ways:

- bit for bit against a behavioural model of the recurrence, written
  independently in the testbench, at exactly 8 clocks of latency;
- against the ideal rotation, within the residual-angle bound.

The test also counts that every quadrant of the fold occurred, and that every
stage rotated in both directions.

`cordic_stage_tb` compares each stage with a reference. The reference takes
its constants from `$atan` and its shifts from floor division.

Both testbenches end with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/cordic_pkg.sv rtl/cordic_prerotate.sv \
    rtl/cordic_stage.sv rtl/cordic.sv tb/cordic_tb.sv --top-module cordic_tb
./obj_dir/Vcordic_tb
```

For the stage test, use `rtl/cordic_pkg.sv rtl/cordic_stage.sv tb/cordic_stage_tb.sv`
with `--top-module cordic_stage_tb`. If you change `ITER` in the top-level
test, change the `ITER` localparam in `tb/cordic_tb.sv` to match.
