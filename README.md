# Linked-list summer, from direct form to pipelined, and other register-transfer examples

The central circuit here adds up every number in a linked list held in a
small memory. It shows how a register-transfer (RT) program becomes hardware,
and how far that hardware can be sped up by rescheduling the same work over
the same two shared resources: one memory port and one adder. Four
micro-architectures compute the same result: a direct translation, two
versions that move work between cycles, and a pipelined version whose
schedule lets three list nodes be in flight at once. Two further variants
assume nodes aligned on even addresses: one in a byte-wide memory, one in a
16-bit memory. Three smaller examples stand beside the
summer: an accumulator sequenced by an RT program, a datapath derived from
an RT program, and a modulo-scheduled adder tree on a dual-port memory.

The designs follow the list-processor example of the UC Berkeley EECS151/251A
lecture on register transfer language (Spring 2023). The datapaths, control
signal names and controller states come from that example. Where it leaves
something open, such as how memories are loaded, reset, or the pipelined
controller's exact states, the choice made here is called out below.

## The problem and the list format

* The memory has an 8-bit address and 8-bit data, and reads are
  asynchronous: data follows the address within the cycle.
* The memory has one port, so only one access can happen per cycle.
* A node at address `p` occupies two bytes. `mem[p]` is the pointer to the
  next node and `mem[p+1]` is the node's number, an 8-bit two's-complement
  value.
* The list starts at address 0 and has at least one node. The last node's
  pointer is 0.
* Nodes may sit at odd addresses.
* The result `R` is the sum, modulo 256.

Each processor has the same interface:

| port        | dir | width   | meaning |
|-------------|-----|---------|---------|
| `start`     | in  | 1       | While high: go to the initial state and clear the registers. The run begins on the first edge with `start` low. |
| `mem_addr`  | out | 8       | Memory address |
| `mem_rdata` | in  | 8       | Memory read data (asynchronous) |
| `done`      | out | 1       | High from the end of the run until `start` rises again |
| `r`         | out | `SUM_W` | The SUM register. It holds the result while `done` is high. |

The registers have no reset, so `start` is the only way to initialise the
processor. Hold `start` high for at least one clock edge.

The behaviour, written as an RT program (`;` separates cycles and `,`
separates transfers in the same cycle):

```
if (START) NEXT<-0, SUM<-0;
repeat { SUM<-SUM+Memory[NEXT+1]; NEXT<-Memory[NEXT]; } until (NEXT==0);
R<-SUM, DONE<-1;
```

## Architectures 1 to 3: the two-state loop

All three run the loop in two states, COMPUTE_SUM and GET_NEXT, so they take
2 cycles per node. `done` rises **2N+1 edges** after the first edge with
`start` low.

* **`list_proc_a1`: direct form.**
  * Registers: SUM and NEXT, each behind a mux that can load 0.
  * Adders: one computes SUM+data, the other NEXT+1.
  * The address mux `A_SEL` picks NEXT (0) or NEXT+1 (1).
  * `NEXT_ZERO` tests the NEXT mux *output*. The loop therefore ends in the
    same cycle that fetches the zero pointer.
  * The COMPUTE_SUM cycle chains three steps: an 8-bit add to form the
    address, the memory read, then the SUM add. That chain is the critical
    path.
* **`list_proc_a2`: NUMA register.**
  * NUMA holds the address of the next number to add. It is loaded with
    `Memory[NEXT]+1` in GET_NEXT.
  * COMPUTE_SUM now only does a memory read and an add.
  * NUMA shares `NEXT_SEL` and `LD_NEXT` with NEXT. NUMA's mux loads the
    constant 1 at start.
* **`list_proc_a3`: one adder.**
  * Architecture 2 does only one add per cycle, so a single adder serves
    both. Its second operand is always the memory data.
  * Its first operand comes from the `ADD_SEL` mux: SUM in COMPUTE_SUM, the
    constant 1 in GET_NEXT.
  * Cost: one extra mux, one fewer adder. Speed: unchanged.

**`lp_ctrl`** is the controller shared by all three. It is one-hot, with one
flip-flop per state:

| state       | asserted                                   | next state |
|-------------|--------------------------------------------|------------|
| START       | LD_SUM, LD_NEXT (SUM_SEL=0, NEXT_SEL=0)     | COMPUTE_SUM once `start`=0 |
| COMPUTE_SUM | A_SEL, ADD_SEL, LD_SUM, SUM_SEL            | GET_NEXT |
| GET_NEXT    | LD_NEXT, NEXT_SEL (A_SEL=0)                | DONE if NEXT_ZERO, else COMPUTE_SUM |
| DONE        | DONE                                       | DONE |

From any state, `start`=1 leads to START. Two assertions in `lp_ctrl` check
the controller: a one-hot state stays one-hot, and `start` always lands in
START.

## Architecture 4: overlapping iterations (`list_proc_a4`)

This is the most interesting of the four. Each list iteration consists of
four operations, listed here with the resource each one uses:

```
next : NEXT <- Memory[NEXT]   (memory)
numa : NUMA <- NEXT+1         (adder)
x    : X    <- Memory[NUMA]   (memory)
sum  : SUM  <- SUM+X          (adder)
```

Each chains on the one before it. Within one iteration, the memory and the
adder are each used twice. The shortest repeating section (the
*characteristic section*) is therefore 2 cycles.

Start from one iteration spread out over time. Then fold it onto the
2-cycle section: each time an operation wraps around the section, it belongs
to the previous iteration. The result is a steady state in which every cycle
does one memory access and one add, and the two are independent:

```
cycle A (FETCH_X):  X <- Memory[NUMA],  NUMA <- NEXT+1
cycle B (NEXT_SUM): NEXT <- Memory[NEXT], SUM <- SUM+X
```

Three iterations are active at once:
* node k+1's pointer is being fetched;
* node k's number is being fetched into X;
* node k-1's number is being added into SUM.

X and NUMA act as pipeline registers. No cycle chains a memory read into an
add, so the clock period is bounded by the slower of the memory and the
adder, not their sum.

**Datapath:**
* One adder. Operand 1 comes from `ADD_SEL1` (SUM or the constant 1).
  Operand 2 comes from `ADD_SEL2` (X or NEXT).
* The adder output feeds both the SUM mux (`SUM_SEL`: 0 or the adder) and
  the NUMA mux (`NEXT_SEL`: the constant 1 or the adder).
* The X mux (`X_SEL`) loads 0 or the memory data.
* The NEXT mux (`NEXT_SEL`) loads 0 or the memory data.
* The address mux `A_SEL` picks NEXT or NUMA.
* `NEXT_ZERO` tests the NEXT register.

**Controller (`lp4_ctrl`):** the loop needs two states before it and two
after it:

| state    | transfers                                   | next |
|----------|---------------------------------------------|------|
| INIT     | NEXT<-0, SUM<-0, NUMA<-1, X<-0              | PRIME once `start`=0 |
| PRIME    | NEXT<-Memory[0], SUM<-SUM+X (X is 0)        | FETCH_X |
| FETCH_X  | X<-Memory[NUMA], NUMA<-NEXT+1               | LAST_SUM if NEXT==0, else NEXT_SUM |
| NEXT_SUM | NEXT<-Memory[NEXT], SUM<-SUM+X              | FETCH_X |
| LAST_SUM | SUM<-SUM+X                                  | DONE |
| DONE     | done=1                                      | DONE |

* NUMA starts at 1, so the first X fetch reads node 0's number. NEXT has
  already moved on to node 1 by then.
* When FETCH_X sees NEXT==0, it still fetches the last node's number, and
  LAST_SUM adds it.
* `done` rises **2N+2 edges** after the first edge with `start` low. That is
  2 cycles per node, like architectures 1–3, but the cycles are shorter.

The lecture states the loop body and the initial values. It names the two
starting states but not the two finishing states. The finishing states and
the enumerated state encoding are this design's reading.

## Aligned nodes, byte-wide memory (`list_proc_aligned`)

If every node starts at an even address, the number always sits at the
pointer with its low bit set. The NUMA adder is then no longer needed:

* The address is `{NEXT[7:1], low bit}`.
* The controller drives the low bit: 0 to fetch the pointer, 1 to fetch the
  number.
* The registers are NEXT, X and SUM, and the only adder computes SUM+X.

The loop is:

```
FETCH_X:  X <- Memory[{NEXT[7:1],1}]
NEXT_SUM: NEXT <- Memory[{NEXT[7:1],0}], SUM <- SUM + X
```

It exits in the NEXT_SUM that fetches a zero pointer. `done` rises
**2N+1 edges** after the first edge with `start` low. The lecture only
states the idea; the states are this design's choice.

## Aligned nodes, 16-bit memory (`list_proc_wide`)

Suppose every node starts at an even address and the memory is 16 bits
wide. Then one read returns a whole node, NUMA is no longer needed, and the
loop shrinks to one cycle:

```
{NEXT, X} <- Memory[NEXT], SUM <- SUM + X
```

Details:
* The memory is word addressed with `NEXT[7:1]`.
* Each word holds `{pointer, number}`: the pointer in bits 15:8 and the
  number in bits 7:0.
* The states are INIT, LOOP, LAST and DONE. The loop runs until the fetched
  pointer is zero.
* `done` rises **N+2 edges** after the first edge with `start` low.
* The word layout and the controller are this design's choices.

## The smaller examples

* **`acc_example`.** Registers R0, R1 and ACC, with muxes S0–S3. S0 and S1
  choose between holding a register and taking the S3 output. S2 chooses R0
  or R1 as the adder operand. S3 chooses the S2 output or ACC. A four-state
  FSM runs the program
  `ACC<-ACC+R0, R1<-R0; ACC<-ACC+R1, R0<-R1; R0<-ACC;`
  by steering only the muxes and ACC's load.
  * Added by this design (none of these is in the lecture's figure): ACC's
    load enable, the `init` port that loads the three registers, and the
    `go`/`busy` handshake.
* **`abc_example`.** Runs the program `regA<-IN; regB<-IN; regC<-regA+regB;
  regB<-regC;`. The datapath follows from the program:
  * IN fans out to regA and to regB's mux, whose other input is regC.
  * regA + regB feeds regC.

  The controller uses the three control points the lecture lists: regA's
  enable, regB's enable and regB's mux select. regC loads every cycle. The
  four states repeat; the reset is this design's addition.
* **`modsched_sum4` with `dual_port_mem`.** For each i, computes
  `E[i] = (A[i]+B[i]) + (C[i]+D[i])` with one adder and a dual-port memory.
  * Per iteration, the work is 4 loads plus 1 store over two ports, and
    3 adds. Both resources are therefore busy 3 cycles per iteration.
  * The repeating 3-cycle section:

    | phase | port 1 | port 2 | adder |
    |-------|--------|--------|-------|
    | 0 | load A[i] | load B[i] | E[i-1] = AB + CD |
    | 1 | load C[i] | load D[i] | AB = A[i]+B[i] |
    | 2 | – | store E[i-1] | CD = C[i]+D[i] |

  * The final add and the store wrap into the next section.
  * The first section skips the work of iteration −1, and an extra last
    section drains iteration N_ITER−1. A run therefore takes
    3·(N_ITER+1) cycles.
  * The arrays are laid out back to back: A at `A_BASE`, then B, C, D and E,
    each `N_ITER` words long.
  * Added by this design: the registers between steps, the memory layout and
    the start/busy/done handshake.

## Memories

`list_mem` is a single-port memory, `DEPTH`×`WIDTH` (256×8 by default), with
asynchronous read. `dual_port_mem` has two such ports. In both, writes are
synchronous through a `we`/`wdata` pair. The write side exists only so the
memories can be loaded; the processors never write to the list memory.

## Top level (`lecture21_top`)

Everything stands side by side:

* **The four list processors.**
  * Each has its own copy of `list_mem`.
  * All four copies are written through one load port (`lm_we`, `lm_addr`,
    `lm_wdata`), so they hold the same list. While `lm_we` is high, each
    memory's address comes from `lm_addr`.
  * `lp_start` starts all of them.
  * `lp_done[k-1]` and `lp_r[k-1]` belong to architecture k.
* **The two aligned-node processors.** Each has its own memory and also
  starts on `lp_start`:
  * `list_proc_wide` reads a 128×16 memory, loaded through `wm_*`.
  * `list_proc_aligned` reads a 256×8 memory, loaded through `am_*`.
* **`acc_*` and `abc_*`** are the ports of the two RT examples.
* **`ms_*`** controls the modulo-scheduled engine. While the engine is idle,
  memory port 1 can be read and written through `ms_addr`, `ms_we`,
  `ms_wdata` and `ms_rdata`.

Top parameters: `SUM_W` (default 8) and `N_ITER` (default 16).

## Where this departs from, or goes beyond, the lecture

* **SUM width.** The specification makes every number 8 bits and shows R as
  8 bits. One timing figure, however, labels the SUM adder as a 15-bit add.
  The processors use `SUM_W = 8` and wrap modulo 256. Setting `SUM_W` larger
  sign-extends each number into a wider SUM.
* **Loading.** The memory write ports and the top-level load muxes are not
  part of the lecture's design.
* **Cycle counts.** These are fixed and checked: 2N+1 edges
  (architectures 1–3 and the byte-wide aligned variant), 2N+2 edges
  (architecture 4), N+2 edges (16-bit aligned variant).
* **Clock period.** The lecture's clock-period estimates (31 ns, 23 ns and
  13 ns for architectures 1, 2/3 and 4) come from a component delay table.
  They are properties of a technology, not of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* **List processors (`tb_list_proc_a1` … `a4`, `tb_list_proc_wide`,
  `tb_list_proc_aligned`).**
  * Build random lists in a memory model. Nodes sit at random addresses:
    possibly odd, or even-only for the aligned variants.
  * Compare `r` with the sum worked out by walking the list.
  * Check the exact cycle at which `done` rises.
  * Check that `r` and `done` then hold.
  * Include an overflowing sum and a `start` pulse that interrupts a run.
* **`tb_lp_ctrl`.** Compares every state and control output against the
  state table under random inputs. It also checks that every state and both
  exits of GET_NEXT were exercised.
* **Memories.** Checked against a reference copy, including same-cycle
  (asynchronous) reads.
* **`tb_modsched_sum4`.** Checks every `E[i]`, that no other word is
  disturbed, the run length, and that exactly N_ITER stores happen.
* **`tb_lecture21_top`.** Runs the whole design at its default parameters.
  * All six list processors run on the same lists, and each result and
    finishing time is checked. The aligned variants get the same numbers
    re-laid out on even addresses.
  * Then the accumulator, regA/regB/regC and modulo-scheduled examples run.
  * It counts, and requires, each mechanism: multi-node and single-node
    lists, odd-address nodes, 8-bit overflow, a restart with `start`,
    architecture 4's steady state, and the modulo engine's wrapped stores and
    drain section.

To simulate one testbench with Verilator 5, run from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lp_pkg.sv tb/tb_lecture21_top.sv --top-module tb_lecture21_top
./obj_dir/Vtb_lecture21_top
```

Replace the testbench name to run any other. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/lp_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about intentionally unused signals: the
controller's observation port, the ADD_SEL bit that architectures 1 and 2
ignore, and the pointer's low bit in the aligned variants.

## Files

* `rtl/lp_pkg.sv`: widths, the control-word structs and the state types.
* `rtl/lp_ctrl.sv`, `rtl/lp4_ctrl.sv`: the controllers.
* `rtl/list_proc_a1.sv` … `rtl/list_proc_a4.sv`, `rtl/list_proc_aligned.sv`,
  `rtl/list_proc_wide.sv`: the list processors.
* `rtl/list_mem.sv`, `rtl/dual_port_mem.sv`: the memories.
* `rtl/acc_example.sv`, `rtl/abc_example.sv`, `rtl/modsched_sum4.sv`: the
  smaller examples.
* `rtl/lecture21_top.sv`: the top level.
* `tb/tb_<module>.sv`: one testbench per module.
