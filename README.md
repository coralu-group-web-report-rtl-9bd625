# CorALU: a shift-and-add CORDIC rotation unit

CorALU rotates a 2-D vector by an arbitrary angle without a multiplier. It
uses the CORDIC method (COordinate Rotation DIgital Computer). Any angle is
approached by a sequence of ever smaller fixed rotations of ±atan(2^-i). The
tangent of each of those angles is a power of two, so each step costs one
shift and one addition per coordinate. Start from the vector (1/K, 0) and the
result is (cos z, sin z). This unit was meant as a custom arithmetic unit
beside a small embedded processor, to compute trigonometric functions. The
version here is the bit-parallel, iterative one: it does one elementary
rotation per clock, in rotation mode, in the circular coordinate system.

## The iteration

Three registers hold x, y and the remaining angle z. In iteration i
(i = 0, 1, …, 8) the unit computes, from the old register values:

```
d      = -1 if z < 0, else +1
x_next = x - d * (y >>> i)
y_next = y + d * (x >>> i)
z_next = z - d * atan(2^-i)
```

Each step rotates (x, y) by d·atan(2^-i) and subtracts that angle from z. The
sign of z therefore steers the vector toward the requested angle, and z goes
to zero. After the last iteration:

```
x_out ≈ K * (x_in cos z_in - y_in sin z_in)
y_out ≈ K * (y_in cos z_in + x_in sin z_in)
z_out ≈ 0   (the residual angle)
```

### The gain K

A true rotation by atan(2^-i) would also scale by cos(atan(2^-i)). The
hardware leaves that factor out, so every step stretches the vector by
sqrt(1 + 2^-2i). Over the nine iterations this gives a constant

K = ∏ sqrt(1 + 2^-2i) ≈ 1.6468.

K does not depend on the angle, because only the direction d changes between
operations, and cos(-a) = cos(a). The unit does not correct for K. A caller
who wants cos and sin loads x_in = 1/K ≈ 0.6073, which is 155 in the number
format below, and y_in = 0. A caller who rotates an arbitrary vector must
allow for the 1.65× growth when choosing the operand size (see *Overflow*).

### Convergence range

The elementary angles add up to Σ atan(2^-i) ≈ 1.739 rad (about 99.7°). Only
angles with |z_in| below that are reached. For larger angles, first rotate
by ±π/2 or ±π outside the unit, by swapping and negating x and y.

### Why nine iterations

Angles are stored with eight fraction bits. atan(2^-i) rounds to 1 LSB at
i = 8 and to zero from i = 9 on. A tenth iteration would still rotate x and y
but would not subtract anything from z, so it would only add error. With nine
iterations, cos and sin of any angle in range come out within a few LSB of
the exact values (the testbench allows 6 LSB, or 0.023).

## Number format

All three words are 16-bit two's complement, Q7.8: one sign bit, seven
integer bits and eight fraction bits. One unit is 256 and the range is
−128 … +127.996. Angles in z are radians in the same format. For example,
π/4 is 201 and 1.739 rad is 445. The seven integer bits are more than
cos/sin need. They make the same data path usable for larger vectors.

## Data path and control

```
  next value                                   register     output
  load ? x_in : addsub(x,  y>>>i,       -d)  ──► reg x ──► x_out
  load ? y_in : addsub(y,  x>>>i,       +d)  ──► reg y ──► y_out
  load ? z_in : addsub(z,  atan_rom[i], -d)  ──► reg z ──► z_out

  addsub(a, b, s) = a + s·b ;  d = +1 or −1 from the sign of reg z
  x>>>i, y>>>i come from the two shifters
  cordic_ctrl: load, run (register enable), done, counter i
               (i = shift amount of both shifters and table address)
```

| Module | Role |
|---|---|
| `cordic_pkg` | Word width, fraction bits, iteration count, word/counter types, state encoding |
| `cordic_addsub` | `a ± b`, one adder with an inverting second operand and a carry-in. Three instances: x, y, z |
| `cordic_shifter` | Arithmetic right shift by i. For every i the result is wired directly as the slice `din[15:i]` with i copies of the sign bit in front, and i selects among those candidates. There is no barrel-shifter stage chain |
| `cordic_atan_rom` | Combinational table of round(256·atan(2^-i)): 201, 119, 63, 32, 16, 8, 4, 2, 1, then zeros. It is a constant selection rather than a clocked memory, so the angle is ready in the same cycle as i |
| `cordic_reg` | 16-bit register with load enable and asynchronous active-low reset |
| `cordic_ctrl` | Three-state sequencer (idle, run, done) holding the iteration counter |
| `coralu` | Top level: two shifters, the angle table, three add/subtract units and three registers, all controlled by the sequencer |

The direction d is the sign bit of the z register. It drives the add/subtract
select of all three units: x subtracts and y adds when d = +1, and the other
way round when d = −1. z subtracts the angle when d = +1 and adds it when
d = −1.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low. Clears the registers and the sequencer |
| `start` | in | 1 | begin an operation. Taken only while idle |
| `x_in`, `y_in`, `z_in` | in | 16 | operands, Q7.8. z in radians |
| `busy` | out | 1 | high during the nine iteration cycles |
| `done` | out | 1 | one-cycle pulse. The result is valid |
| `x_out`, `y_out`, `z_out` | out | 16 | result. Held until the next start |

Cycle by cycle:

- On the clock edge where `start` is seen while idle, the operands are loaded.
- The next nine edges each perform one iteration.
- `done` is then high for one cycle. The result is valid 10 clocks
  (ITERATIONS + 1) after `start` was taken.
- A new `start` is accepted the cycle after `done`.
- `start` has no effect while busy. Holding it high starts back-to-back
  operations.

## Overflow

The adders wrap modulo 2^16 and there is no overflow flag. Rotation keeps the
length of the vector apart from the gain K. A safe operand therefore has a
length below 127/K ≈ 77, in Q7.8 units. Each iteration stretches the vector
by sqrt(1 + 2^-2i) ≥ 1, so the length grows steadily toward K·|v|. No
intermediate component can therefore exceed the final bound, apart from a
few LSB of truncation error. The end-to-end testbench uses components of
±11.7.

## Choices this design makes

These points are fixed by the design itself:

- the shift-and-add recurrence, in rotation mode and the circular system;
- the 16-bit Q7.8 word;
- the slice-and-sign-extend shifter;
- the angle table as a constant selection;
- registers built as plain flip-flops;
- a state machine with a counter that supplies both the shift amount and the
  table address.

These are choices of this implementation:

- **Iteration count.** Nine, for the reason given under *Why nine iterations*.
- **No gain correction.** The recurrence is used without the K_i factors, and
  the caller pre-scales the operands.
- **Handshake and timing.** The start/busy/done handshake, the result timing
  and result holding are this implementation's own.
- **Reset.** Asynchronous, active low, to zero.
- **Adder.** A plain adder, `a + (add ? b : ~b) + !add`, in place of a
  vendor add/subtract primitive.
- **Overflow.** No overflow detection.

Not included:

- vectoring mode, and the linear and hyperbolic coordinate systems. They
  would need a different decision function (the sign of y), repeated
  iterations and other angle tables;
- a processor custom-instruction interface;
- a bit-serial variant.

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cordic_pkg.sv \
          tb/tb_coralu.sv --top-module tb_coralu -o sim
./obj_dir/sim
```

Replace `tb_coralu` with `tb_cordic_addsub`, `tb_cordic_shifter`,
`tb_cordic_reg`, `tb_cordic_atan_rom` or `tb_cordic_ctrl` to test one unit.

- **`tb_coralu`** runs the top at its default size. It performs over 600
  operations:
  - pre-scaled unit vectors across the whole convergence range, checked
    against floating-point cos/sin to within 6 LSB;
  - random vectors at random angles.

  Every result is compared bit for bit with an integer model of the
  recurrence written in the testbench. The testbench also checks:
  - the 10-clock latency;
  - that the result holds after `done`.

  It also counts three things and fails if any never happens: iterations with
  d = +1, iterations with d = −1, and starts ignored while busy.
- **Unit testbenches:**
  - `tb_cordic_addsub` compares against integer add/subtract, on corner and
    random operands;
  - `tb_cordic_shifter` compares against repeated signed halving;
  - `tb_cordic_atan_rom` compares against `$atan`;
  - `tb_cordic_reg` checks load, hold and reset;
  - `tb_cordic_ctrl` checks the load/run/iter/done sequence cycle by cycle.

## Changing it

- **Iteration count.** Set `ITERATIONS` in `cordic_pkg`. Allowed values are
  1 to 16. With the Q7.8 table, more than nine gains nothing.
- **Word format.** The angle table is written for Q7.8, and an assertion in
  `cordic_atan_rom` stops elaboration for any other format. To change the
  format, regenerate its entries as round(2^FRAC · atan(2^-i)). Then change
  `WIDTH` and `FRAC` in `cordic_pkg`, and widen `ITER_W` if more than 16
  iterations are needed.
- **Cos/sin constant.** The 1/K pre-scale constant depends on the iteration
  count: 1/K = ∏ 1/sqrt(1 + 2^-2i).
