# A structured-architecture data path (SAST style), running DIFFEQ

High-level synthesis tools usually optimise operator count, registers and
control steps, and leave the wiring to fall where it may: any register can
feed any functional unit, and the result is long, random point-to-point
interconnect. The structured architecture (SA) of the SAST synthesis flow
takes the opposite approach. It fixes the shape of the interconnect first and
schedules the algorithm onto that shape:

* the data path is split into **A-blocks** (architectural blocks). Each one
  has its own functional unit (FU) and a small register file, wired only
  inside the block;
* A-blocks never connect to each other directly. All traffic between them goes
  over a few **global buses**;
* each A-block reaches the buses through a fixed number of **access links**
  (the *access width*). One link carries one word into or out of the block per
  control step;
* a **global memory** and the **I/O ports** sit on the same buses;
* a **controller** sets every switch and FU in every control step, and takes
  status bits (compare results) back from the A-blocks.

This repository holds synthesizable SystemVerilog for that architecture,
configured as in the DIFFEQ example of the SAST work: 3 A-blocks, 2 global
buses, 1 access link per A-block, and multiplications that take 2 control
steps. It comes with a microprogram that runs the DIFFEQ loop:

```
do { x1 = x + dx;  u1 = u - 3*x*u*dx - 3*y*dx;  y1 = y + u*dx;
     x = x1; u = u1; y = y1; } while (x < a);
```

A testbench checks it against a software model.

## Block diagram

```
            control words (one per step)            status (compare results)
 controller ------------------------+--------------------------^
   |                                |                          |
   |     +----------+   +----------+   +----------+            |
   |     | A-block 0|   | A-block 1|   | A-block 2|  FU + regs, one access link each
   |     +----+-----+   +----+-----+   +----+-----+
   |          |link          |link          |link
 ==+==========+==============+==============+=========+==========+====  bus 0
 ==+==========+==============+==============+=========+==========+====  bus 1
   |imm                                                |          |
   +--(constant on a bus)                     global memory    ports (3 in, 2 out)
```

Every arrow between units in this picture is a bus transfer, and the control
word of the step sets it up. The link of an A-block is switched to one bus per
step. It either drives that bus or listens to it. One word on a bus can reach
several listeners in the same step (a broadcast).

## Inside an A-block (`ablock`)

An A-block is a register file, an FU and three sets of switches. Here the
switches are multiplexers selected by the control word:

| switch set | what it selects | control field |
|---|---|---|
| link-to-bus switch | which global bus the access link connects to, and whether the link drives it or listens | `link[k].drive`, `link[k].bus` |
| out switches | what a driving link puts on the bus: a register or the FU output | `link[k].from_fu`, `link[k].reg_idx` |
| in switches | what each register loads: the FU output or a link's word; up to `MAX_REG_WRITES` registers may load in one step | `wr[r].we`, `wr[r].from_link`, `wr[r].link` |
| FU operand select | each operand is a register or a link's word, so a bus word can be used without first being stored | `opa`, `opb` |

All of this is combinational within a step. Registers load at the clock edge
that ends the step, unless the step is stalled.

**Functional unit (`fu`).** The FU does `ADD`, `SUB`, signed `LT` (result 0/1,
which is also the block's status bit) and `MUL` (low W bits of the product).
Add, subtract and compare finish in the step that issues them. A
multiplication takes `MUL_LAT` = 2 steps. The operands are read in the first
step, and the product appears on the FU output in the second step. In that
step it can be stored or sent straight onto a bus. With `MUL_PIPELINED = 0`
(the default) the multiplier is a multi-cycle unit: the step after a `MUL`
must not issue another `MUL`, and it must not issue an add, subtract or
compare either, because the product owns the FU output then. Assertions
enforce both rules. With `MUL_PIPELINED = 1` a new multiplication may start
every step.

**Slow and fast adders (`adder`).** Add and subtract share one adder:
a − b is a + ~b + 1. It comes in two implementations, chosen per FU by
`FAST_ADDER`. The slow one is a ripple-carry chain, the smallest option,
with delay growing with W. The fast one is a Kogge-Stone parallel-prefix
adder: generate/propagate pairs are merged over log2(W) levels, so every
carry is ready after that many stages. A scheduler would give the slow adder
to A-blocks whose additions have slack, and the fast one elsewhere. Both are
single-step, so the choice changes area and clock period, not the schedule.
All A-blocks default to the fast adder.

**A known combinational path.** An FU operand can come from a bus, and a link
can drive the FU output onto a bus. So the netlist has a structural path
bus → FU → bus, and lint tools report it as a circular path. A program closes
it only if one A-block, in one step, feeds a bus word into a single-step FU
operation and also drives that operation's result back onto a bus. No correct
program does that, and the DIFFEQ program does not.

## Control (`controller`, control word `uinstr_t`)

The controller is microcoded. Each control word (`sast_pkg::uinstr_t`) holds:

* one `ablk_ctrl_t` per A-block (FU op, operand selects, in switches, link
  settings);
* a bus tap (`en`, `bus`) for each input port (drive) and output port (take);
* the global memory's read tap, write tap and address;
* an immediate word and the bus to put it on;
* sequencing: `SEQ_NEXT`, `SEQ_JUMP` to `target`, `SEQ_BR_STATUS` (go to
  `target` if A-block `status_sel` reports 1), or `SEQ_DONE`.

Handshake: pulse `start` while idle. The program then runs from step 0, one
step per clock, and `busy` is 1. In the `SEQ_DONE` step `done` pulses and the
controller goes back to idle. While idle the control word is all zeros, so no
operation is issued. A branch is decided in the compare's own step, from the
combinational status bit. The control store has 32 entries and is loaded with
the DIFFEQ program at reset. While idle, `prog_we`/`prog_addr`/`prog_data`
overwrite single entries, so the same data path can run other schedules.

**Stall.** An input port is read in a step that expects a word. If that word
is not offered yet (`in_valid` = 0), the ports raise `stall`. The whole step
then repeats: no register, memory or output port is written, the multipliers
hold, and the step counter waits.

## The DIFFEQ program

Inputs arrive through three input ports, outputs leave through two:

| port | words, in order |
|---|---|
| in 0 | dx, y |
| in 1 | x, u |
| in 2 | a |
| out 0 | x, u |
| out 1 | y |

Register binding:

| A-block | R0 | R1 | R2 | R3 | R4 | R5 |
|---|---|---|---|---|---|---|
| A0 (6 regs) | x | dx | a | 3 | 3x | u·dx |
| A1 (5 regs) | y | dx | 3 | 3y, then 3y·dx | u·dx |  |
| A2 (4 regs) | u | dx | 3x·u·dx, then u − 3x·u·dx | u·dx |  |  |

Schedule. "MUL" spans two steps: the product is used in the row below it.
`A→B` is a bus transfer.

| step | block | A0 | A1 | A2 | bus 0 | bus 1 |
|---|---|---|---|---|---|---|
| 0 | I | | | | in0 (dx) → A0, A1, A2 | |
| 1 | I | | | | in1 (x) → A0 | in0 (y) → A1 |
| 2 | I | | | | in1 (u) → A2 | in2 (a) → A0 |
| 3 | I | | | | immediate 3 → A0, A1 | |
| 4 | B1 | MUL 3·x | MUL 3·y | MUL u·dx | | |
| 5 | B1 | store 3x | store 3y | (product) | u·dx: A2 FU → A0 | |
| 6 | B1 | MUL 3x·u·dx | MUL 3y·dx | MUL u·dx | | |
| 7 | B1 | (product) | store 3y·dx | store u·dx | 3x·u·dx: A0 FU → A2 | |
| 8 | B1 | x ← x + dx | | R2 ← u − 3x·u·dx | u·dx: A2 → A1 | |
| 9 | B1 | | y ← y + u·dx | u ← R2 − (bus word) | 3y·dx: A1 → A2 FU | |
| 10 | C1 | x < a ? → step 4 | | | | |
| 11 | B2 | | | | x: A0 → out0 | y: A1 → out1 |
| 12 | B2 | | | | u: A2 → out0 (done) | |

A run takes 4 + 7·N + 2 cycles for N loop iterations, plus any stall
cycles. The loop is do-while: the body always runs at least once. In step 9
the word 3y·dx comes off bus 0 and goes straight into A2's subtractor without
being stored.

The arithmetic is 16-bit two's complement. The loop test is a signed compare.
Inputs whose values overflow still give well-defined results, and the
testbench's model reproduces them.

## Global memory and ports

There are `NUM_GMEM` global memories (one by default), each with its own
read tap, write tap and address in the control word. Each `global_memory`
holds 16 words. In one step it can put the word at `gm_addr`
on one bus (the read is combinational) and store the word of another bus at
the same address (written at the end of the step). A read and a write of the
same address in one step read the old word. The DIFFEQ program does not use
the memory. The top-level test loads a 3-step program that stores an input
word in it and reads it back.

`io_ports`: reading input port p drives `in_data[p]` onto the chosen bus and
pulses `in_ack[p]` when the step completes. Writing output port p loads
`out_data[p]` at the end of the step and pulses `out_valid[p]` for one cycle.

## Parameters

All shared sizes are in `rtl/sast_pkg.sv`:

| name | default | meaning |
|---|---|---|
| `W` | 16 | data width (own choice) |
| `NUM_ABLK` | 3 | A-blocks (DIFFEQ configuration) |
| `NUM_BUS` | 2 | global buses (DIFFEQ configuration) |
| `ACCESS_WIDTH` | 1 | access links per A-block (DIFFEQ configuration) |
| `ABLK_REGS` | {6, 5, 4} | registers per A-block, for this DIFFEQ schedule |
| `MUL_LATENCY` | 2 | steps per multiplication (DIFFEQ configuration) |
| `MAX_REG_WRITES` | 2 | register loads per A-block per step, checked by assertion (own value) |
| `NUM_IN_PORTS`, `NUM_OUT_PORTS` | 3, 2 | ports used by DIFFEQ |
| `NUM_GMEM` | 1 | global memories on the buses (own choice; one is drawn in the architecture) |
| `GMEM_DEPTH` | 16 | words per global memory (own choice) |
| `CS_DEPTH` | 32 | control-store entries (own choice) |

The program helpers (`issue`, `wr_fu`, `listen`, `drive`, `port_in`,
`port_out`, `R`, `L`) build control words. Each takes a word and returns it
with one field group set. `diffeq_program()` shows how they are used. A new
schedule means a new function of this kind, or a series of control-store
writes after reset.

## How this departs from the original SAST description

* **The schedule is this design's own.** The published DIFFEQ schedule uses
  the same architecture parameters and the same basic blocks (I, B1, C1, B2).
  It also uses the same port usage: dx and y on p1, x and u on p2, a on p3,
  with x and u written to p1 and y to p2. Its bus transfers cannot be tied
  unambiguously to the DIFFEQ data flow, so a new schedule was made. Its loop
  body is 6 steps plus 1 for the test, where the original has 7 plus 1. Its
  input block is 4 steps, where the original has 3, because the constant 3
  is loaded in an extra step. The register counts also differ: 6/5/4 here,
  3/5/3 in the original binding.
* **Every crossing is a switch.** A generated SAST data path has a switch
  only where its schedule needs one, and a hard wire or nothing elsewhere. Here
  every register can reach every link and FU input. That makes one A-block
  module reusable, at the cost of wider multiplexers.
* **Controller form.** SAST generates a fixed controller per design. Here it
  is a microcoded sequencer with a writable control store. The control-word
  format, the `start`/`done` handshake, the port valid/acknowledge handshake
  and the stall are this design's own.
* **Constants** reach the registers through a controller immediate put on a
  bus. The original does not say how its constant 3 is loaded.
* **Not included:** the elliptic-wave-filter designs the SAST work also
  reports. Their schedules and bindings are not published, and they would
  need 1 bus, or 2 access links and pipelined multipliers.
* **Write limit.** The limit on register loads per A-block per step is an
  assertion (`MAX_REG_WRITES` = 2, the most the DIFFEQ program uses). It
  does not remove write ports.

## Files

| file | contents |
|---|---|
| `rtl/sast_pkg.sv` | sizes, types, control-word format, program helpers, DIFFEQ program |
| `rtl/fu.sv` | functional unit |
| `rtl/adder.sv` | ripple-carry and parallel-prefix adder |
| `rtl/ablock.sv` | A-block: registers, switches, access links, FU |
| `rtl/global_bus.sv` | global buses (AND-OR multiplexers, conflict flag) |
| `rtl/global_memory.sv` | global memory on the buses |
| `rtl/io_ports.sv` | input/output ports, stall |
| `rtl/controller.sv` | microcoded controller |
| `rtl/sast_top.sv` | the complete DIFFEQ data path |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/sast_pkg.sv rtl/*.sv tb/tb_sast_top.sv --top-module tb_sast_top
./obj_dir/Vtb_sast_top
```

`tb_sast_top` runs the top at its default parameters. It does 43 DIFFEQ runs
on fixed and random inputs and compares x, y and u with a model of the loop,
plus the exact cycle count. Every fourth run offers its inputs late, to
exercise the stall. After that it loads and runs the global-memory program,
then resets and checks that DIFFEQ is back. It also counts the mechanisms
that occurred: stalls, loop branches and exits, multiplications, FU results
sent straight to a bus, bus words used directly as operands, immediates,
memory reads and writes, control-store loads, and traffic on each bus. Any
mechanism that never occurs counts as a failure. The unit testbenches drive
their module with random control words and check it against a model of the
module. Each run takes well under a second.

Assertions in the RTL stop simulation when a program breaks a rule of the
architecture: two drivers on one bus, an FU result collision, a multiply
started while the multiplier is busy, or an index out of range.
