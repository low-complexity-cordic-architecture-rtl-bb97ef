# Programmable MIMO decoding accelerator with a shift-table CORDIC

A receiver for a MIMO-OFDM link (several transmit and receive antennas,
hundreds of narrow subchannels) has to separate the transmitted streams
independently in every subchannel. The arithmetic is small complex vectors
and matrices, but it is repeated for every subchannel, and the algorithm
differs from one standard or decoder to the next (zero forcing, MMSE, QR
based, sphere decoding, ...). This design is a small programmable vector
processor for that job. It does not hard-wire one decoding algorithm. It
provides the few primitive operations that such algorithms are built from and
runs a short program over every subchannel:

* complex vector addition and subtraction,
* element-wise complex multiplication and the complex dot product,
* the reciprocal of real numbers (power normalisation),
* rotation of a complex number by an angle, circular (sin/cos) or
  hyperbolic (sinh/cosh), computed by a CORDIC unit that uses only shifts,
  additions and a small table.

The CORDIC rotation unit is the part that is tuned for low complexity. It
takes its shift amounts from a table and needs 11 iterations to rotate by any
angle up to 45 degrees within 0.037 degree.

## Data flow

```
            +-------------------+  selection   +-------------+
  +-------->| core-input switch |<-------------|             |
  |         +---------+---------+              | instruction |
  |                   v                        |   memory    |
+-+------+  +---------------------+ +--------+ |             |
|  data  |  | processing core     | |control-| +------+------+
| memory |<-| add/sub  | multiply | |  ler   |        |
| (row = |  | 1/x      | CORDIC <-+-+-> phase memory  |
| subch.)|  +---------------------+ +--------+        |
+--------+            v                               |
    ^       +---------------------+     selection     |
    +-------| memory-input switch |<------------------+
            +---------------------+
```

The controller sends the subchannel address to the data memory and the phase
memory.

* **Data memory** (`data_memory`). One row per OFDM subchannel, holding all
  the data the program needs for that subchannel: `NSLOT` = 8 vectors
  ("slots") of `NRX` = 4 complex numbers. Operands come only from here, and
  results go only back here.
* **Instruction memory** (`instruction_memory`). 64 words of 32 bits. Each
  word controls both switches and selects the processing unit.
* **Controller** (`controller`). Fetches an instruction and applies it to
  subchannel 0, 1, ..., `NSC`-1 before it fetches the next one. For every
  subchannel it reads the row, starts the core, waits for the result and
  writes the row back.
* **Core-input switch** (`core_input_switch`). Picks operand vectors A and B
  out of the row and arranges B (conjugate, broadcast one element). For a
  rotation it picks the vector to rotate and the angle.
* **Processing core** (`processing_core`). Holds the four units. Only the unit
  that the opcode names is started.
* **Memory-input switch** (`memory_input_switch`). Merges the result into the
  destination slot of the row, under a lane mask or into a single lane.
* **Phase memory** (`phase_memory`). Holds one entry per subchannel: the last
  output of the rotation unit. A later rotation can take its input from here,
  so rotations can be chained without using a data slot.

`mimo_accel_top` wires these together and adds a host port for loading and
reading the memories.

## Number format

Every real quantity is 16-bit two's complement with 13 fraction bits (Q3.13,
range [-4, 4), resolution 2^-13 ≈ 1.22e-4). A complex number is the packed
struct `cplx_t {re, im}`: 32 bits, real part in the upper half. Angles are in
radians in the same Q3.13 format, so pi/4 is 6434. The types are in
`mimo_pkg`. Addition, subtraction and multiplication wrap on overflow. The
reciprocal and the rotation output saturate.

## Instruction word

| bits  | field       | meaning |
|-------|-------------|---------|
| 31:28 | `op`        | 0 NOP, 1 ADD, 2 SUB, 3 MUL, 4 DOT, 5 RECIP, 6 ROT, 15 HALT |
| 27:25 | `src_a`     | slot of operand A |
| 24:22 | `src_b`     | slot of operand B |
| 21:19 | `dst`       | destination slot |
| 18    | `conj_b`    | use the conjugate of B |
| 17    | `bcast_b`   | replace every element of B by element `lane_b` (applied before `conj_b`) |
| 16:15 | `lane_a`    | ROT: element of A to rotate |
| 14:13 | `lane_b`    | broadcast element, and ROT: the angle is `Re(B[lane_b])` |
| 12:11 | `dst_lane`  | DOT/ROT: lane that receives the scalar result |
| 10    | `rot_chain` | ROT: rotate the phase-memory entry instead of `A[lane_a]` |
| 9:6   | `wmask`     | ADD/SUB/MUL/RECIP: lanes of `dst` that are written |
| 5     | `hyp`       | ROT: hyperbolic instead of circular rotation |
| 4:0   | -           | write 0 |

The operations:

* ADD and SUB: `A ± B` for each element.
* MUL: `A .* B` for each element.
* DOT: `sum(A .* B)`. Set `conj_b` to get the Hermitian product `Aᵀ·B*`.
* RECIP: `1/Re(A)` for each lane. The imaginary parts of the result are 0.
* ROT: rotates `A[lane_a]`, or the phase-memory entry, by `Re(B[lane_b])`.
  The rotation is circular, or hyperbolic if `hyp` is set. The result goes to
  `dst[dst_lane]` and to the phase memory. Rotating (1, 0) gives (cos z,
  sin z), or (cosh z, sinh z) in hyperbolic mode.

With 2-bit lane fields and a 4-bit mask, `NRX` can be at most 4.

## Timing

The controller does not pipeline. Per instruction there are 2 cycles of fetch
and decode. Then each subchannel takes `3 + L` cycles: read, start, wait `L`,
write back. `L` depends on the unit:

| unit     | ops              | L (start cycle to result cycle) |
|----------|------------------|---------------------------------|
| add/sub  | ADD, SUB         | 2 |
| multiply | MUL, DOT         | 2 |
| 1/x      | RECIP            | 18 (16 quotient bits) |
| CORDIC   | ROT              | `N_ITER` + 2 = 13 |

`done` is high `1 + 2·(instructions including HALT) + NSC·Σ(3 + L)` cycles
after the cycle in which `start` was high. The test program below (nine
operations and a NOP over 64 subchannels) takes 5717 cycles.

## Programming example: maximum-ratio combining

One stream received on four antennas is equalised per subchannel as
`ŝ = hᴴy / |h|²`. Put `h` in slot 0 and `y` in slot 1, then run:

```
DOT   s2[0] = sum(s1 .* conj(s0))          hᴴy
DOT   s2[1] = sum(s0 .* conj(s0))          |h|²
RECIP s3    = 1/Re(s2)     wmask 0010      s3[1] = 1/|h|²
MUL   s4    = s2 .* s3[1]  (broadcast), wmask 0001
HALT
```

`s4[0]` then holds the equalised symbol. Over 64 subchannels the program takes
1 + 2·5 + 64·(3·5 + 21) = 2347 cycles. The reciprocal limits the usable
channel gain: `1/|h|²` must fit in Q3.13, so `|h|²` must exceed 0.25. For
weaker channels, scale the data first. `tb_mrc_workload` runs exactly this
program.

## The CORDIC rotation unit

`cordic_rotation_unit` rotates `(x0, y0)` by `z0` using only shifts and
additions. Iteration `i` does a micro-rotation by `±atan(2^-k(i))`, where the
sign `d = sign(z)` is the sign bit of the residual angle register:

```
X <- X - d·(Y >>> k(i))
Y <- Y + d·(X >>> k(i))
Z <- Z - d·atan(2^-k(i))
```

The hardware is one X/Y register pair with two barrel shifters and two
adder/subtractors. A ROM supplies `k(i)` and `atan(2^-k(i))`. Every
micro-rotation also stretches the vector by `sqrt(1 + 2^-2k)`. After the last
iteration the unit multiplies X and Y once by the constant
`K = Π (1 + 2^-2k(i))^-1/2`, rounds and saturates them. So the output is a
true rotation, and no pre-scaled start vector is needed.

**Choosing the shift table.** Classical CORDIC uses `k(i) = i` and about as
many iterations as there are bits. The aim here is to cover only what the
accelerator needs: angles up to ±45 degrees, with a deviation of at most
0.037 degree. With `d` in {-1, +1}, N iterations can reach only 2^N distinct
angles. Covering 90 degrees with a gap of at most 2 × 0.037 degree needs
2^N ≥ 1216, so N ≥ 11. The table is `k(i) = i + 1`, i = 0..10. The 45-degree
step `k = 0` is not needed for this angle range, and the remaining steps add
up to 54.9 degrees > 45 degrees, so the iteration converges. The worst-case
residual angle is `atan(2^-11)` = 0.028 degree, and K = 0.858785 (0.85879 in
Q1.15). In simulation the worst angular error of a rotated unit vector is
0.033 degree, including rounding of the Q3.13 output.

**Hyperbolic mode.** When `hyp` is set, the same datapath runs the hyperbolic
recurrence instead:

```
X <- X + d·(Y >>> k(i))
Y <- Y + d·(X >>> k(i))
Z <- Z - d·atanh(2^-k(i))
```

It uses a second table, 1, 2, 3, 4, 4, 5, ..., with k = 4 and k = 13
repeated, which hyperbolic CORDIC needs in order to converge. Its gain is
compensated by `Π (1 - 2^-2k(i))^-1/2` = 1.2075. With 11 iterations the mode
accepts `|z0| ≤ 1.11`, and the residual angle is at most atanh(2^-10) ≈ 0.001.
Both compensation constants are computed at elaboration from the tables, so
`N_ITER` can be changed freely.

**Internal precision.** X and Y are 22 bits wide: 2 extra integer bits for
the CORDIC gain, and `GUARD` = 4 extra fraction bits. Z has 4 extra fraction
bits. The atan and atanh tables are stored as `round(f(2^-k)·2^24)` and rounded
to the Z precision. They cover k = 0..16, so `N_ITER` up to 15 works.

**Limits.** There is no quadrant pre-rotation, so in circular mode `|z0|`
must not exceed pi/4, and in hyperbolic mode it must not exceed 1.11. Any input of magnitude below 4 gives an exact-range result. Result
components outside [-4, 4) saturate.

## The other units

* **`addsub_unit`.** `NRX` complex adder/subtractors controlled by one
  add/sub signal. Input and output are registered. It accepts one operation
  per cycle, with latency 2.
* **`mult_unit`.** `NRX` complex multipliers, each built from four real
  multipliers and an add/subtract stage. The unit outputs both the element
  products and their sum (the dot product). Each product is scaled back to
  Q3.13 by truncation. The dot product is formed at full precision and
  truncated once.
* **`recip_unit`.** One restoring divider per lane forms `floor(2^26 / |x|)`
  one bit per cycle, then the sign of x is applied. Inputs with
  `|x| ≤ 0.25`, including 0, saturate to ±(4 - 2^-13). A zero input gives the
  positive value.

## Host interface

While `busy` is low:

* Write program words with `host_imem_we/addr/wdata`.
* Write data elements with `host_dmem_we/sc/slot/lane/wdata`.
* Read any data element (`host_dmem_rdata`) or phase-memory entry
  (`host_pmem_rdata`). These reads are combinational.

A one-cycle `start` runs the program from address 0. `done` pulses for one
cycle at HALT. At the end of memory the program counter wraps to 0, so every
program must end with HALT.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_addsub_unit`, `tb_mult_unit` | random streams against integer references, latency 2 |
| `tb_recip_unit` | edge values, saturation, random inputs, latency 18 |
| `tb_cordic_rotation_unit` | cos/sin over -45..45 degrees; random vectors; angular error ≤ 0.037 degree in 0.05-degree steps; cosh/sinh and random hyperbolic rotations; latency 13 |
| `tb_processing_core` | every opcode routed, results and latencies |
| `tb_controller` | subchannel order, stalling on the core, phase-memory writes only for ROT, exact cycle count |
| `tb_data_memory`, `tb_instruction_memory`, `tb_phase_memory` | shadow-model read/write tests |
| `tb_core_input_switch`, `tb_memory_input_switch` | random instructions against a field-by-field model |
| `tb_mimo_accel_top` | end to end at the default size, described below |
| `tb_mrc_workload` | the combining program above, QPSK symbols in 64 subchannels, within 0.02 of the sent symbol |

`tb_mimo_accel_top` runs at the default size (4 lanes, 8 slots, 64
subchannels). It loads random data and runs this program:

```
ADD s4 = s0 + s1
SUB s5 = s0 - conj(s1)
MUL s6 = s0 .* s1[2]        (lane 2 masked)
NOP
DOT s7[1] = sum(s0 .* conj(s2))
RECIP s2 = 1/Re(s3)
ROT s7[0] = s0[1] rotated by Re(s3[0])
ROT s7[2] = previous result rotated again   (rotation input taken from the phase memory)
ROT s7[3] = s0[2] rotated hyperbolically by Re(s3[0])
HALT
```

It compares every element of every subchannel with its own model. The three
rotation results are compared within a tolerance; everything else must match
exactly. It also checks the cycle count and counts each mechanism (stalls,
reciprocal saturation, conjugation, broadcast, masked lanes, NOP, chained
rotation, hyperbolic rotation), and fails if any of them never happened.

To run one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/mimo_pkg.sv tb/tb_mimo_accel_top.sv \
          --top-module tb_mimo_accel_top -Mdir obj && ./obj/Vtb_mimo_accel_top
```

## Architecture and design choices

The architecture itself is as specified:

* the block structure and connections;
* the four processing units and their lane structure (`NRX` parallel cells,
  registered operands);
* the CORDIC recurrences with table-driven shift amounts `k(i)`;
* the scale factor `Π (1 + 2^-2k(i))^-1/2`;
* the 45-degree / 0.037-degree accuracy target.

The following are this design's own choices, because the architecture leaves
them open:

* **Widths.** Q3.13 for every quantity, 8 slots per row, 64 subchannels and a
  64-word program store.
* **Instruction encoding.** The encoding, the set of arrangements in the
  core-input switch, and the placement rules in the memory-input switch.
* **Sequencing.** A non-pipelined controller FSM that completes one
  instruction over all subchannels before fetching the next, plus the NOP and
  HALT opcodes.
* **Multiplier outputs.** The multiplication unit outputs the element
  products as well as the dot product.
* **Reciprocal.** A restoring divider implements 1/x, with saturation for
  small inputs.
* **CORDIC table and scaling.** The table is `k(i) = i + 1`, 11 iterations,
  derived from the accuracy target. K is applied as a single constant
  multiplication at the end.
* **Hyperbolic mode.** The architecture says only that the rotation unit
  computes hyperbolic functions. The recurrence, table and range used here
  are the standard hyperbolic CORDIC.
* **Phase memory.** Its contents: one complex rotation result per subchannel,
  readable as the input of a later rotation.
* **Host port.** Single-element access.

Not modelled:

* the surrounding system: the OFDM front end, and any host processor that
  would load programs and data;
* any FPGA-specific mapping.

The FPGA slice and LUT counts reported for this architecture cannot be
compared directly with this RTL. The word widths and memory sizes behind them
are not known.
