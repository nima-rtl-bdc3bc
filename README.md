# NIMA: a No-Instruction-Set processor sized for fog-computing kernels

This is a processor with no instruction set. Each cycle it reads one wide
**control word** from a control memory. That word sets every multiplexer,
functional unit (FU), register-file port and the next-address logic
directly, so there is no instruction decoder. A compiler that targets such a
machine schedules every operation statically, down to the cycle.

The number of each kind of unit is set by a design flow (NIMA) that profiles a
benchmark of fog-node kernels: ADPCM, AES, SHA, Blowfish, CRC-32, GSM, JPEG,
motion estimation, DCT, FFT, FIR, quicksort, sort, Bdist and Dijkstra. For
each unit type the flow measures how often the schedules use 1, 2, 3 ...
copies of it at once. It then keeps as many copies as still reach a
utilization threshold. For this benchmark the result is:

| unit | copies |
|---|---|
| adder | 4 |
| multiplier | 2 |
| subtractor | 2 |
| comparator | 1 |

The register-file port count, the pipeline registers and the forwarding
links follow from the design objective. The RTL here implements the resulting
base processor as a parameterised SystemVerilog design. Its defaults are the
**performance-objective processor (NIMA_PF)**. One parameter set turns it
into the **power-objective processor (NIMA_PW)**.

The profiling and sizing flow is a software procedure, not hardware, and is
not part of this RTL. Neither is the NISC compiler that would generate control
words from C. The testbenches write their control words with a small
assembler, `tb/nima_tb_asm.svh`.

## The data-path

```
            +-------+   +----+   +--------+
  PC ------>| CMem  |-->| CW |-->| fields to every unit below
            +-------+   +----+   +--------+
                                         RF read ports (RF_RP)
                                               |
   +----------- operand muxes: RF port | constant | OM0..OM(RF_WP-1) ---------+
   |          |          |          |          |          |         |        |
 [IREG]     [IREG]     [IREG]     [IREG]     [IREG]     [IREG]   mem addr/data
 adder x4   mul x2     sub x2     comp x1    ALU x1                dmem (2 ports)
 [OREG]     [OREG]     [OREG]     [OREG]     [OREG]                 |
   |          |          |          |          |                    |
   +--- producers dealt round robin into RF_WP groups ----------------+
          group g --> output mux OMg --> RF write port g
                                     \--> forwarding into every operand mux
   comparator 0 --> status register --> controller (branches)
   LR / OM buses --> Controller_addrM --> controller (returns, computed jumps)
```

Four ideas carry the design.

1. **Small operand multiplexers instead of wide register-file buses.** Each FU
   operand has its own multiplexer. It picks one of three sources: the one RF
   read port assigned to that operand, the control word's constant, or any
   output bus.
2. **Round-robin port assignment.** Operand `k` always uses RF read port
   `k mod RF_RP`. Operand `k` is `2i` or `2i+1` for FU `i`; memory port `m`
   uses `2·N_FU + 2m` for its address and `+1` for its write data. FUs are
   numbered adders first, then multipliers, subtractors, comparators and ALUs.
   Two operands that share a read port in one cycle must read the same
   register. This constraint belongs to the scheduler.
3. **Output groups.** The result producers are the FUs, then the memory read
   ports: producer `p` is FU `p` or memory port `p − N_FU`. Producer `p`
   belongs to group `p mod RF_WP` at position `p div RF_WP`. Each group has
   one output multiplexer (OM) driving one bus. That bus is both the data of
   RF write port `g` and a forwarding source. Only one member of a group can
   deliver a result in a given cycle.
4. **Forwarding.** An operand multiplexer can take a result straight off a bus
   in the cycle it appears. The result does not need to go through the
   register file. Long chains like a multiply–accumulate pass their partial
   sums from FU to FU this way. The `FWD` parameter removes the links.

At the defaults there are 12 producers and 4 groups, laid out as follows:

| group / bus | position 0 | position 1 | position 2 |
|---|---|---|---|
| OM0 → RF write 0 | adder 0 | multiplier 0 | comparator |
| OM1 → RF write 1 | adder 1 | multiplier 1 | ALU |
| OM2 → RF write 2 | adder 2 | subtractor 0 | memory port 0 |
| OM3 → RF write 3 | adder 3 | subtractor 1 | memory port 1 |

## Timing of one operation

Every field of a control word acts in the cycle that word is in the CW
register. A result is produced as follows:

* **Cycle t.** The word selects the operands (`opnd_sel`, `rd_addr`, `cnst`)
  and the FU operation (`fu_op`).
* **Cycle t+1.** The result is on its group's bus. The word of cycle t+1 picks
  it with `om_sel[g]`. That word may write it (`wr_en[g]`, `wr_addr[g]`),
  forward it into another operand, or both.

This one-cycle latency holds for both proposed configurations. The
performance configuration registers the operands: `IREG=1`, 2 × 10 = 20 input
registers. The power configuration registers the results: `OREG=1`. With
`IREG=1` the operation code is registered together with its operands, so the
same schedule runs on either configuration. A data-memory read issued in
cycle t is also on its bus in cycle t+1, and a write lands at the end of
cycle t.

With `IREG=OREG=0` the latency is zero: the result is written in the same
cycle. That configuration must run with `FWD=0`, otherwise the forwarding
links would close combinational loops. Elaboration stops with an error if
both are set.

Two register-file details matter when scheduling. A read in the same cycle as
a write to the same register returns the old value; forwarding supplies the
new one. Register 0 always reads zero.

## Control flow

The controller holds three registers:

* `pc`, the address being fetched;
* `cw_pc`, the address of the word now executing;
* the link register LR, and a one-bit status register.

| `ctl` | next fetch |
|---|---|
| `CTL_NEXT` | `pc + 1` |
| `CTL_JMP` | `cw_pc + offset` (offset signed) |
| `CTL_BRT` / `CTL_BRF` | `cw_pc + offset` if status is 1 / 0 |
| `CTL_CALL` | `cw_pc + offset`; LR ← `cw_pc + 2` |
| `CTL_JIND` | the address from Controller_addrM: `addrm_sel = 0` gives LR (return), `1 + g` gives bus OMg (computed jump) |
| `CTL_HALT` | stop; `halted` stays high |

The word after a transfer is already in flight, so it always executes. This
is **one delay slot**, and a call returns past it. The status register loads
comparator 0's result when `status_ld` is set. For a comparator issued in
cycle t, set `status_ld` in cycle t+1; a branch can then use it from cycle t+2.
An all-zero control word is a no-operation, which is also what the CW
register holds after reset.

## The control word

`rtl/nima_cw.svh` defines the control word as a packed struct, `cw_t`; its
width follows the parameters. `nima_pkg::cw_width()` gives the same number
for port declarations. At the defaults it is 223 bits:

| field | default width | purpose |
|---|---|---|
| `cnst` | 32 | constant operand (one per word) |
| `offset` | 8 | signed branch/call offset |
| `ctl` | 3 | next-address operation |
| `status_ld` | 1 | load status from comparator 0 |
| `addrm_sel` | 3 | Controller_addrM source |
| `opnd_sel` | 24 × 3 | operand multiplexer selects: 0 = RF port, 1 = constant, 2+g = OMg |
| `fu_op` | 10 × 3 | comparator / ALU operation (`nima_pkg`) |
| `rd_addr` | 8 × 5 | RF read addresses |
| `wr_en`, `wr_addr` | 4, 4 × 5 | RF writes, one per group bus |
| `om_sel` | 4 × 2 | group output multiplexer selects |
| `mem_we` | 2 | data-memory write enables |

## A worked schedule: the FIR kernel

`tb/tb_nima_top.sv` runs a 4-tap FIR, `y[n] = Σ h[t]·x[n−t]`, at five control
words per sample. The taps sit in registers, and `x[n−1..n−3]` are kept in a
sliding window of registers.

| word | what happens |
|---|---|
| A | load `x[n]` on port 0; store the previous `y` on port 1 (both memory ports); increment both pointers; `h1·x[n−1]`, where `x[n−1]` is forwarded from the window move that is being written back in the same cycle |
| B | four RF writes; `h0·x[n]` with `x[n]` forwarded from memory; `h2·x[n−2]`; compare for loop exit |
| C | load status; `h3·x[n−3]`; first partial sum, with one product forwarded |
| D | second partial sum; branch back to A |
| E | delay slot: final sum and the last window move |

64 samples take 329 cycles (5N + 9). `tb/tb_nima_top_pw.sv` re-schedules the
same kernel for the power configuration's two write ports and four read
ports. It takes seven words per sample, 456 cycles for 64 samples.

Two more kernels from the benchmark list run at the default configuration:

* **CRC-32** (`tb/tb_nima_top_crc.sv`) works bit by bit. A bit needs four
  logic operations in a row, and there is only one ALU, so the kernel is
  bound by the ALU: 36 cycles per byte plus 7. It gives the standard check
  value 0xCBF43926 for "123456789" and matches a model on random buffers.
* **Sort** (`tb/tb_nima_top_sort.sv`) is a bubble sort with a compare-and-swap
  that has no branches. The comparator gives `c = a[i] > a[i+1]` and a
  subtractor gives `d = a[i+1] − a[i]`. The multiplier forms `p = c·d`, then
  an adder and a subtractor apply it to both words. Both memory ports write
  the two words back in the same control word. Each step takes six words,
  so the sort needs 3N² + 3N − 3 cycles (1797 for 24 words).
* **Motion** (`tb/tb_nima_top_motion.sv`) does block matching. It slides a
  16-pixel block over 16 positions of a frame row and keeps the position
  with the smallest sum of absolute differences. For each pixel, both
  memory ports read and a subtractor forms `d`. The ALU then forms
  `m = d >>> 31` and `d ^ m`, and a second subtractor takes off `m` to give
  `|d|`. That is six words per pixel. After each candidate a
  branch-if-false skips the update of the best match.

## Configurations

| | NIMA_PF (default) | NIMA_PW |
|---|---|---|
| FUs | 4 add, 2 mul, 2 sub, 1 cmp, 1 ALU | same |
| register file (read × write) | 8 × 4 | 4 × 2 (`RF_RP=4, RF_WP=2`) |
| pipeline registers | input, 20 (`IREG=1, OREG=0`) | output (`IREG=0, OREG=1`) |
| forwarding | on | on |

Other parameters: `XLEN` (32), `RF_DEPTH` (32), `N_MEMP` (2),
`CMEM_DEPTH` (256 words) and `DMEM_DEPTH` (1024 words).

## What follows the NIMA article and what is this design's own

**Taken from the NIMA article:**

* the FU counts;
* register-file input ports of 4 (performance) and 2 (power);
* the `RFaxb` port notation, read here as a read × b write ports;
* input registers for performance and output registers for power;
* forwarding into every FU input;
* FUs dealt round robin into groups, one group per RF input port, each with
  an output multiplexer driving a bus;
* round-robin assignment of RF ports to FU inputs;
* a dual-port data memory;
* the block set of the base processor: PC, control memory, CW register,
  constant, LR, controller, status register, Controller_addrM.

**Chosen here:**

* the ALU and its operation set (AND, OR, XOR, NOR, shifts, pass), chosen to
  cover the benchmark's bitwise and shift operations;
* the comparator operation set;
* the control-word layout and all encodings;
* relative branches, one delay slot, the CALL/return mechanism;
* the sources of Controller_addrM;
* register 0 = zero;
* memory and register-file depths;
* asynchronous active-low reset;
* read-before-write memories;
* the control-memory load port and the host port that takes over data-memory
  port 0 while `host_en` is high.

**Departures and gaps:**

* **Power configuration register count.** For the power objective the article
  gives 7 output registers. Here an output register sits on every FU, which
  makes 10.
* **Area configuration.** The area-objective processor mixes 14 input and
  7 output registers in an unstated placement. `IREG`/`OREG` here apply to all
  FUs at once, so that processor cannot be configured.
* **Comparators.** The base-architecture drawing shows two comparators; the
  sizing table gives one, which is what is built.
* **Unit timing.** All FUs are single-cycle; the article says nothing of their
  internal timing.
* **Benchmark kernels.** Only the FIR kernel has been run. It is
  hand-scheduled. The other kernels need a NISC compiler, and whether their
  programs fit 256 control words is unknown.

## Files

| file | contents |
|---|---|
| `rtl/nima_pkg.sv` | shared enums (controller, ALU, comparator ops, FU kinds), operand-source codes, `cw_width()` |
| `rtl/nima_cw.svh` | control-word struct and derived sizes |
| `rtl/nima_top.sv` | the processor |
| `rtl/nima_cmem.sv` | control memory and CW register |
| `rtl/nima_controller.sv` | PC, LR, status, next-address logic |
| `rtl/nima_addrm.sv` | Controller_addrM |
| `rtl/nima_regfile.sv` | multi-port register file, with an assertion against two writes to one register |
| `rtl/nima_fu_slot.sv` | FU, its operand muxes and pipeline registers |
| `rtl/nima_operand_mux.sv`, `rtl/nima_output_mux.sv` | operand and group multiplexers |
| `rtl/nima_adder.sv`, `nima_sub.sv`, `nima_mul.sv`, `nima_comp.sv`, `nima_alu.sv` | functional units |
| `rtl/nima_dmem.sv` | dual-port data memory |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_nima_top.sv` | FIR plus call/return/computed-jump programs at the default parameters |
| `tb/tb_nima_top_pw.sv` | FIR on the power configuration |
| `tb/tb_nima_top_crc.sv` | CRC-32 kernel |
| `tb/tb_nima_top_sort.sv` | sort kernel |
| `tb/tb_nima_top_motion.sv` | motion-estimation (block matching) kernel |
| `tb/nima_tb_asm.svh` | control-word assembler, host tasks, mechanism counters |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nima_pkg.sv tb/tb_nima_top.sv --top-module tb_nima_top -o sim
./obj_dir/sim
```

Replace `tb_nima_top` with any other testbench name. Each prints
`TB_RESULT checks=N failures=M` and stops on its own; a watchdog ends a run
that hangs.

The top-level testbenches check four things: every FIR output against a
model, the exact cycle counts, the results of the call, return and computed
jump, and that each mechanism happened. The mechanisms are forwarding, loop
branch taken and not taken, delay slot, call, return, computed jump, halt,
both memory ports in one cycle, all RF write ports in one cycle, and status
load.

To write a new program, fill `prog[]` with the assembler tasks:

* `fu(word, fu_index, src_a, src_b, op)` issues an operation;
* `wb(word, producer, reg)` writes a result back;
* `bus(word, producer)` forwards a result without writing it;
* `mem_rd`, `mem_wr` and `ctl` drive the memory ports and the controller.

Sources are `RF(r)`, `K(value)` or `OM(g)`. Remember that results appear one
word after they are issued.
