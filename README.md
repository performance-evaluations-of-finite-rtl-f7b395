# A reconfigurable data-path accelerator for finite-difference stencils

Finite-difference codes such as 2D heat diffusion or 2D FDTD electromagnetics
spend their time in one small loop body applied to every grid point. This
design runs such a loop body as a fixed data-flow graph (DFG) spread over a
two-dimensional array of floating-point processing elements (PEs). Data
enters at the top, flows strictly downwards one row per clock, and results
leave at the bottom. The array has no feedback paths, no branches and no
on-chip memory. The architecture was conceived for single-flux-quantum (SFQ)
superconducting logic, where every gate is clocked (so pipelining is free)
but loops, conditionals and RAM are hard to build. The RTL here describes the
architecture in ordinary synchronous logic.

A host processor does everything the array cannot:

* it runs the loop control;
* it writes a configuration that turns the array into the loop body's DFG;
* it streams one *input line* per loop iteration from memory.

With no stalls, C lines finish C + ROWS − 1 clocks after the first line
enters the array.

## Structure

```
             host                         memory
              |  cfg port, start          | 2 read streams     ^ 1 write stream
              v                           v                    |
          rdp_cfg ---- rdp_ctrl ------ smac_in             smac_out
              |           | adv/take      | input line (22 slots)  ^ result line
              v           v               v                        |
          +------------------------- rdp_array ---------------------------+
          |  ORN -> PE row 0 -> ORN -> PE row 1 -> ... -> PE row 14 -> ORN |
          +-----------------------------------------------------------------+
```

| module | role |
|---|---|
| `sfq_rdp_top` | the whole accelerator; its ports are the host and memory interfaces |
| `rdp_array` | 15 rows × 22 PEs, an ORN above each row, an output ORN below the last |
| `rdp_pe` | one PE: ADD/SUB, MUL, PASS or NOP on two routed operands, registered output |
| `fp32_add`, `fp32_mul` | combinational binary32 floating-point units |
| `rdp_orn` | operand routing network (ORN): a set of programmable multiplexers, with fan-out |
| `smac_in` | input streaming memory access controller (SMAC): two read ports, double-buffered lines |
| `smac_out` | output SMAC: double-buffered lines, one write port |
| `rdp_cfg` | configuration registers, written by the host through an address/data port |
| `rdp_ctrl` | invocation control, global stall, clock counters |
| `rdp_pkg` | shared types: `pe_cfg_t`, `pe_op_e`, `pe_kind_e` |

The sizes are 22 PEs per row, 15 rows, two memory read ports and one write
port, with double buffering on both sides. Everything else is this design's
own choice: widths, handshakes, the address map and the stall policy. Each
RTL file says in its opening comment which of its parts are which.

## How a loop body becomes a configuration

Every PE has a 43-bit configuration word (`pe_cfg_t`) with these fields:

* `op`: the operation, one of NOP, PASS, ADD, SUB or MUL;
* `sel_a`, `sel_b`: the two operand sources, each a column of the row above
  (for row 0, a slot of the input line);
* `b_const`: when set, operand b is the 32-bit constant `konst` instead.

Stencil coefficients (C0, C1, C2 for heat; C_HX, C_HY, C_EX, C_EY for FDTD)
live in `konst`. They are therefore not part of the input stream.

Mapping a DFG means assigning each operation a row below all of its
operands. Any value that is still needed further down, or that is a final
result, must be carried down row by row in PASS PEs: there is no storage
except the PE output registers. A row therefore has to hold both the new
operations and the values in transit. This fill is what limits how large a
loop body can be mapped, more than the total number of PEs. The output ORN
then routes the last row's columns to the output slots.

`tb/rdp_map_pkg.sv` contains a small greedy placer that does this. It builds
the two evaluated loop bodies:

| loop body | inputs | operations | outputs | rows used (of 15) |
|---|---|---|---|---|
| 2D heat, unrolled 3 × 3 | 21 | 63 | 9 | 7 |
| 2D FDTD, unrolled 2 × 2 | 20 | 48 | 12 | 9 |

The heat update per point is
`f' = C0·(f[i−1,j] + f[i+1,j]) + C1·(f[i,j−1] + f[i,j+1]) + C2·f[i,j]`.
One line carries the 5 × 5 window of a 3 × 3 output block, minus its four
corners.

The FDTD line for a 2 × 2 block holds 20 values:

* Hx, Hy and Ez of the block (4 each);
* the Ez values to the left and above the block (4);
* the old Hy of the row below the block and the old Hx of the column to its
  right (4).

The block's eight H updates (3 operations each) feed its four Ez updates
(6 operations each). Where an Ez update reaches past the block, it uses the
old H value from the line.

## Configuration port

`rdp_cfg` takes word writes (`cfg_we`, 16-bit `cfg_addr`, 32-bit
`cfg_wdata`). For the PE in row r and column c, k = r·COLS + c, and
OB = 2·ROWS·COLS:

| address | contents |
|---|---|
| 2k | `[2:0]` op, `[7:3]` sel_a, `[12:8]` sel_b, `[13]` b_const |
| 2k+1 | constant (binary32) |
| OB + j | `[4:0]` last-row column routed to output slot j |
| OB + NOUT | n_in, the number of words per input line |
| OB + NOUT + 1 | n_out, the number of words per output line |

Op encoding: NOP = 0, PASS = 1, ADD = 2, SUB = 3, MUL = 4. A full
configuration takes 684 writes. Writes that arrive while an invocation runs
are dropped and set the sticky `cfg_err` flag. After reset every PE is NOP.

## Streaming, stalls and timing

The host sets `num_lines` = C and pulses `start`. `rdp_ctrl` clears both
SMACs, injects exactly C lines and pulses `done` once the C-th result line
has been written to memory.

* **Input side.** Read port p delivers slots p, p+2, p+4, … of each line,
  one 32-bit word per beat (valid/ready). `smac_in` fills one line buffer
  while the array takes the complete line from the other. When no complete
  line is ready, the array still advances, but with an empty slot (a
  *bubble*): every line carries a valid bit down the pipeline. When both
  buffers are full, the read ports are held.
* **Output side.** `smac_out` copies a result line into a free buffer and
  writes its first n_out words, slot 0 first, through the single write port.
  If its last row holds a line while both output buffers are full, the
  whole array freezes for that clock (`adv` low).
* **Latency.** Each PE row is one pipeline stage. From `start` to `done`, an
  invocation takes C + ROWS − 1 + 3 clocks when memory is always ready:
  * 1 clock to fill the first line;
  * C + ROWS − 1 clocks through the array;
  * 2 clocks through the output buffer and the write port.
* **Counters.** Per invocation, `cyc_total`, `cyc_inject`, `cyc_in_st`
  (a line was due but none was ready) and `cyc_out_st` (the array was
  frozen) count clocks. They correspond to the calculation and stall terms
  of the usual execution-time model, T = Σ(C + H − 1)/f + stall time.

With two word-wide read ports, a 21-word heat line needs 11 read beats, and
an FDTD line needs 10 read beats and 12 write beats. Memory bandwidth, not
the array, therefore sets the throughput for these loop bodies: 16 heat
lines take 201 clocks and 16 FDTD lines take 218, against 30 clocks if the
array were fed every clock. This is the expected regime for the design.

## Floating point

`fp32_add` and `fp32_mul` are combinational IEEE 754 binary32 units that
round to nearest even. Their simplifications:

* subnormal inputs are read as zero;
* results below the normal range are flushed to zero;
* any NaN, inf − inf or inf × 0 gives 0x7FC00000;
* overflow gives a signed infinity.

Subtraction is a flag on the adder, because the FDTD update consists mostly
of differences.

## Departures and open points

* **PE kinds.** The architecture calls for PEs that each hold either an
  adder or a multiplier, in a layout fixed at design time. That layout is
  not available here. By default every PE holds both units and the
  configuration chooses one. `rdp_array`'s `ADD_ONLY` / `MUL_ONLY` bit masks
  (bit r·COLS + c) build a fixed layout. The placer in `tb/` assumes PEs
  with both units.
* **ORN reach.** An ORN lets one PE feed several PEs of the next row, but
  how far sideways is not specified. The default is a full crossbar over
  the 22 columns. `REACH` limits a route to ±REACH columns; a select
  outside that window reads +0.
* **Line width.** Input and output lines are 22 slots wide, one per column.
* **Where data enters and leaves.** Input lines enter only above the first
  row, and results leave only below the last row. A variant that lets the
  streaming controllers feed or drain intermediate rows is not built.
* **Not modelled:**
  * the 80 GHz clock and the 30 000-cycle reconfiguration latency, which
    belong to the superconducting implementation and the host link;
  * address generation for memory (DMA), which is left to the memory
    side: the SMACs consume and produce in-order word streams;
  * the host processor, main memory and bus, which are outside the design.
* **Synthesis size.** The default array has 330 adders and 330 multipliers,
  each 32 bits wide. Coarse yosys synthesis of the full top runs for more
  than 10 minutes; Verilator lint and slang elaboration take seconds.

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The testbench-only packages are:

* `fp_ref_pkg`: reference binary32 arithmetic. It is computed in double
  precision and rounded to single, which is exact for +, − and ×.
* `rdp_map_pkg`: the DFG builders and the placer.

To build and run one testbench (here the end-to-end test of the top):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rdp_pkg.sv tb/fp_ref_pkg.sv tb/rdp_map_pkg.sv rtl/*.sv \
  tb/tb_sfq_rdp_top.sv --top tb_sfq_rdp_top -o sim
./obj_dir/sim
```

Add `-Wno-fatal` if your Verilator build stops on width warnings in the
testbenches.

| testbench | what it shows |
|---|---|
| `tb_fp32_add`, `tb_fp32_mul` | 40 000 random and directed cases each, bit-exact against the reference |
| `tb_rdp_pe` | all operations on all three PE kinds, constant operand, hold when frozen |
| `tb_rdp_orn` | full crossbar and reach-2 window, fan-out |
| `tb_smac_in`, `tb_smac_out` | line assembly and draining at several line sizes, random throttling, both buffers full |
| `tb_rdp_cfg` | the address map against a model, reset state, writes refused while locked |
| `tb_rdp_ctrl` | line counting, global-stall rule, stall counters, C + H − 1 |
| `tb_rdp_array` | heat and FDTD DFGs on the full array, with and without bubbles and freezes; exact C + H − 1 |
| `tb_sfq_rdp_top` | at default size: one heat time step on a 12 × 12 grid, reconfiguration, one FDTD update on an 8 × 8 field, checked point by point, each with throttled and with always-ready memory (where the run time must equal lines × beats per line plus pipeline depth, within a few clocks); a full-rate pipe timed to the clock; every stall mechanism counted |

The top-level test compiles in about a minute and runs in well under a
second.
