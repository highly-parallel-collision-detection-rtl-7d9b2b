# Parallel collision detection processor (CORDIC, voxel obstacle map)

A robot motion planner asks one question over and over: at these joint
angles, does the manipulator touch an obstacle? This design answers it in
hardware. It represents the manipulator by a set of discrete points on its
link surfaces and the workspace by a 64 × 64 × 64 image of cubic pixels, one
bit per pixel (1 = occupied). For each surface point it transforms the
point's link coordinates into workspace coordinates for the given joint
angles, then reads the obstacle bit of the pixel the point lands in. If any
point lands in an occupied pixel, the manipulator collides.

Each point can be checked independently of every other point. The processor
is therefore an array of identical processing elements (PEs) that never talk
to each other:

- Every PE holds its own share of the surface points.
- Every PE holds its own full copy of the obstacle image.
- The joint angles are broadcast to all PEs.
- One OR gate combines the PE results.

Detection time falls linearly with the number of PEs. The default
configuration has 100 PEs with 50 points each (5000 surface points). A
collision-free check takes 7208 clock cycles, which is 450.5 µs at a 62.5 ns
clock.

The coordinate transformation uses only 2-D vector rotations, computed with
CORDIC (shift-and-add) arithmetic. A PE is therefore little more than a small
CORDIC engine, a few memories and a sequencer.

## Structure

```
cd_processor                      N_PE = 100 PEs + OR gate
└── processing_element  (×N_PE)
    ├── manipulator_memory        surface points, x,y,z serially (150 × 16 b)
    ├── input_registers           point being transformed + point being fetched
    ├── control_unit              16-cycle counter, decoder, PAC, OPCRI/OPCRII
    │   └── program_memory        256 × 5 b microprogram
    ├── data_memory               32 × 16 b: angles, constants, intermediates
    ├── execution_unit            CORDIC X/Y/Z datapaths
    │   └── constant_generator    atan(2^-i) / 2^-i
    ├── output_registers          transformed X,Y,Z → pixel address
    └── obstacle_memory           64³ × 1 b obstacle image
```

`cd_pkg` holds the shared types, the instruction format, the operand address
map and the arctangent table.

## The CORDIC execution unit

The execution unit has three 16-bit paths: X, Y and Z. Each path has a 3-to-1
multiplexer feeding an accumulator, a barrel shifter and an adder-subtracter.
The X and Y shifters are cross-coupled: X is updated with Y >> i, and Y with
X >> i. The Z path adds or subtracts a radix constant from the constant
generator.

One instruction runs one of four functions and always takes 16 cycles:
cycle 0 loads the operands, and cycles 1–15 run iterations i = 0…14.

| OP | function | result |
|----|----------|--------|
| 0 ROT | circular rotation | x → K(x cos z − y sin z), y → K(x sin z + y cos z), z → 0 |
| 1 VEC | circular vectoring | x → K√(x²+y²), y → 0, z → z + atan(y/x) |
| 2 MUL | linear rotation | x → x, y → y + x·z, z → 0 |
| 3 DIV | linear vectoring | x → x, y → 0, z → z + y/x |

Each iteration picks a direction d = ±1 from a sign bit: the sign of z for
ROT and MUL, and the sign of −y (or of −x·y) for VEC and DIV. It then
computes:

```
x += −d·(y >> i)          (circular functions only)
y +=  d·(x >> i)
z −=  d·c_i               c_i = atan(2^-i) circular, 2^-i linear
```

Two things a user of the EU must handle:

- **Gain.** Circular functions scale x and y by K = 1.64676. A program
  removes the gain with MUL by 1/K, using x as the input and y = 0. The
  constant 1/K is 9949 in Q2.14.
- **Input range.** Rotation angles must lie within ±1.74 rad, because there
  is no pre-rotation. Vectoring and division assume x > 0. Overflow is not
  detected.

Each operand comes either from the operand address given in the instruction
(source bit = 1) or from the value already in that path's accumulator
(source bit = 0). The second option lets one function feed the next without
going through memory.

**Number formats.** Coordinates are Q9.7 in pixel units, so the range is
±256 pixels with a resolution of 1/128 pixel. Angles and z-path values are
Q2.14 in radians. Against floating point, one function is accurate to about
12 LSB in x and y, and 32 LSB in a vectoring or division angle. The full
three-joint transformation below lands within 0.15 pixel of the exact
result.

## Instructions and the control unit

An instruction is eight 5-bit words in program memory:

| word | bits 4..0 |
|------|-----------|
| 0 | operand address of x |
| 1 | operand address of y |
| 2 | operand address of z |
| 3 | OP[1:0], XS, ZS, 0 |
| 4 | YS, FML[1:0], 0, 0 |
| 5 | result address of x |
| 6 | result address of y |
| 7 | result address of z |

FML marks where an instruction sits in the program: 1 = FIRST (the first
instruction for a new point), 2 = LAST, 0 = middle, and 3 = FIRST and LAST at
once. After a LAST instruction the program restarts at instruction 0 for the
next point. Programs have no branches.

The control unit has five parts:

- a 4-bit counter over the 16 cycles of an instruction;
- a hardwired decoder for that counter;
- the 8-bit program memory address counter (PAC);
- the program memory;
- the op-code registers OPCRI (OP, XS, ZS) and OPCRII (YS, FML).

The program memory is only 5 bits wide, so the next instruction's eight words
are read one per cycle. This happens during cycles 0–7 of the current
instruction. At the end of cycle 15 the fetched instruction becomes the
current one. While idle, the control unit pre-fetches instruction 0 and
raises `ready`.

**Operand address map** (5-bit addresses):

| address | read | write |
|---------|------|-------|
| 0, 1, 2 | input registers x, y, z (current point) | data memory (unused) |
| 3 … 28 | data memory | data memory |
| 29, 30, 31 | data memory | data memory and output registers X, Y, Z |

Results are written in cycle 15, so the next instruction can read them from
memory in its cycle 0.

### Example: three-joint manipulator, nine functions

The testbench package `tb/tb_cd_model.sv` holds the program used for all
system tests. It rotates (x, z) by θ3, then (x2, z2) by θ2, then (x1, y) by
θ1. Each rotation is followed by two multiplications by 1/K. Data memory
holds 0 at address 3, 1/K at 4, and θ1, θ2, θ3 at 5, 6, 7. Three of the
multiplications take x from the accumulator. N = 9 instructions, so one
point takes 144 cycles.

## The PE pipeline and its timing

A PE overlaps three activities:

- the transfer of point i+1 from the manipulator memory (3 reads);
- the transformation of point i (N instructions × 16 cycles);
- the obstacle memory read for point i−1.

Both memories have an access time t_a of 2 cycles. The transfer of the next
point starts in cycle 0 of each FIRST instruction. The input registers switch
to the next point at the end of each LAST instruction. The obstacle read
starts in the following cycle, using the pixel address formed from the
output registers.

For M points and an N-instruction program, a collision-free check takes

```
T = M · 16N + 4 · t_a  cycles        (3 t_a to fetch the first point, t_a for the last read)
```

counted from the cycle in which `start` is high to the first cycle in which
`done` is high. At the defaults this is 50·144 + 8 = 7208 cycles.

A PE stops at its first point whose pixel is occupied. It then raises
`collision`, reports the point in `hit_point`, and raises `done` t_a cycles
after that point's obstacle read begins. The array's `done` is the AND of
the PE `done` signals, so a PE that hits stops early while the others run
on.

The pixel of a point is the floor of each Q9.7 coordinate. Pixel P(x, y, z)
is bit 4096x + 64y + z of the obstacle memory. A point with any coordinate
outside 0…63 lies outside the stored workspace and counts as free. The
transformation has no translation, so the robot base sits at pixel corner
(0, 0, 0).

## Using it

1. Broadcast the program through `pm_wr`, 8 words per instruction.
2. Broadcast the constants and joint angles through `dm_wr`.
3. Broadcast the obstacle image through `om_wr`. Each write is 16 pixels:
   bit b of word w is pixel address 16w + b.
4. Load each PE's points through `mm_we`/`mm_pe_sel`: x, y, z of point j go
   to words 3j, 3j+1, 3j+2.
5. Set `num_points[k]` for each PE. The maximum is 50, and 0 is allowed.
6. Wait for `ready`, pulse `start` for one cycle, and wait for `done`.
7. Read `collision`, and `pe_collision` for the per-PE results.

Do not write any memory while the array is running; assertions flag it. To
change only the joint angles, write the three angle words and start again.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_cd_model.sv` is a package that the
PE and system testbenches need. Examples:

```
verilator --binary --timing --assert -Wno-fatal rtl/*.sv \
    tb/tb_execution_unit.sv --top-module tb_execution_unit && ./obj_dir/Vtb_execution_unit

verilator --binary --timing --assert -Wno-fatal rtl/*.sv tb/tb_cd_model.sv \
    tb/tb_cd_processor_full.sv --top-module tb_cd_processor_full && ./obj_dir/Vtb_cd_processor_full
```

The system tests are:

- `tb_cd_processor`: 4 PEs with 8 points each, many angle sets and obstacle
  scenes.
- `tb_cd_processor_full`: the default size, 100 PEs with 50 points each. It
  runs in a few seconds.

Both compare every PE's result and the exact cycle count with an independent
model: floating-point transformation plus a copy of the obstacle image. They
also count the collision-free and collision runs, early stops, PEs that
disagree, points outside the workspace, overlapped transfers and obstacle
reads, and accumulator-sourced operands. Random test points are kept only if
their exact transformed position is at least 0.2 pixel from a pixel
boundary, so the expected pixel never depends on rounding.

## Where this RTL departs from, or goes beyond, its source

The source describes the blocks, their purpose, the instruction fields, the
timing equation and the sizes. The following are this design's own choices.

**Formats and encodings**

- Fixed-point formats: Q9.7 coordinates and Q2.14 angles.
- The EU runs 15 iterations after a load cycle, with no pre-rotation.
- The bit positions of OP/XS/ZS and YS/FML within words 3 and 4, and all
  code values.

**Sizes and ports**

- The manipulator memory has 150 words (50 points). The source states a
  1-kbit capacity and, elsewhere, about 50 points per PE. 1 kbit holds only
  21 three-word points, so the point count was followed.
- The data memory has 32 words with three read and three write ports, and
  the operand address map (input registers at 0–2, output registers at
  29–31).
- Registered instruction fetch during cycles 0–7 of the previous
  instruction. The source routes the data memory address straight from the
  program memory.

**Behaviour and interface**

- Points outside the 64³ workspace count as free.
- Host load ports for all memories; the obstacle image loads 16 pixels per
  write.
- The start/ready/done handshake. A PE stops at its first hit, and the array
  finishes when all PEs are done.

**Not modelled**

- The obstacle memory is a plain array, not a DRAM: there is no refresh and
  no row/column timing.
- There is no physical design: the source's 2-µm CMOS layout, circuit-level
  cells and SPICE delay figures are outside the scope of RTL.
