# A statically scheduled floating-point engine for symbolic multibody equations

Symbolic multibody generators such as Robotran turn the dynamics of a
mechanism into long, straight-line lists of scalar equations: no loops and no
branches, just thousands of additions, subtractions and multiplications.
Many of these equations do not depend on one another, so the parallelism is
there. It is, however, very fine-grained: one operation at a time, with
dependencies that reach back only a few lines. The engine supports only
addition, subtraction and multiplication. Sines and cosines are computed
beforehand and supplied as inputs, or replaced by truncated series before
scheduling.

This engine exploits that parallelism with a fixed set of pipelined
single-precision floating-point units (processing elements, PEs). All
decisions are taken offline: a scheduler breaks every equation into binary
operations, assigns each one to a PE and a cycle, and decides how every
result travels to the PEs that need it. The hardware then replays that
schedule. It has no instruction decoding beyond field extraction, no hazard
detection and no arbitration: every memory, the crossbar and every PE reads
its own pre-computed control word for the current cycle.

The organisation, sizes and latencies follow a published FPGA architecture
for vectorising Robotran equations (a Cyclone V / DE10-Nano implementation
with 8 PEs). The SystemVerilog here is an independent implementation.
"Departures" below lists where it differs.

## The machine at a glance

```
                  +------------------------- vec_engine --------------------------+
                  |  cycle_ctrl: PE-cycle counter, read/write phase, fetch         |
                  |                                                                |
  compute_block p |  Instructions Mem --> PE Memory --opa,opb--> PE (add or mul) --+--> result p
  (x 8)           |                       ^   ^                        |           |
                  |  Buffer Instr. Mem --------------------------> Buffer Memory ---+--> buf_out p
                  |                       |   |                                    |
                  |         write port A  |   | write port B                       |
                  |                  crossbar out 2p   out 2p+1                    |
                  |                                                                |
                  |  crossbar 16x16: in 0..7 = result 0..7, in 8..15 = buf_out 0..7|
                  |  Interconnections Memory: 16 x 4-bit selects per PE cycle      |
                  +----------------------------------------------------------------+
```

* **compute_block** (8 of them by default): an *ADD* block (PEs 0-3) or a
  *MULTI* block (PEs 4-7). Each block contains:
  * a PE Memory (2048 x 32-bit data words);
  * an Instructions Memory (one 52-bit word per PE cycle);
  * the PE itself: a 10-stage adder/subtractor or a 5-stage multiplier;
  * a Buffer Memory (16 x 32 bits) that can park the PE's results;
  * a Buffer Instructions Memory (one 9-bit word per PE cycle).
* **crossbar**: 16 inputs and 16 outputs. Inputs are the 8 PE results and
  the 8 buffer outputs. Each output has its own 16:1 multiplexer, so one
  input can be broadcast to any number of outputs. Outputs 2p and 2p+1 are
  the two write ports of PE Memory p. The crossbar output is registered.
* **Interconnections Memory**: 64 bits per PE cycle, one 4-bit select for
  each crossbar output.
* **cycle_ctrl**: counts PE cycles and produces the read/write phase and the
  program fetch.

## Two memory accesses per port per PE cycle

This is the core trick of the architecture. In every PE cycle, each PE needs
two operands and may receive two new values, so four accesses hit its PE
Memory. Block RAM has only two ports. The PE Memory therefore runs at twice
the PE rate and splits every PE cycle into two halves:

| phase | port A                      | port B                      |
|-------|-----------------------------|-----------------------------|
| 0 (read half)  | read operand a at `rd_a` | read operand b at `rd_b` |
| 1 (write half) | write crossbar output 2p at `wr_a` if `we_a` | write crossbar output 2p+1 at `wr_b` if `we_b` |

The address on each port is `(phase && we) ? wr : rd`. When a port has
nothing to write, it keeps its read address for the whole PE cycle. The
operands are registered at the end of the read half and stay stable until
the next one.

The whole engine runs from **one clock**, the memory clock. A toggling
`phase` register makes the PE rate: `pe_en = running && phase` is the clock
enable of every PE-rate register (PE pipelines, crossbar register, buffer,
program fetch). A PE cycle is therefore two clocks, and one run of N PE
cycles takes 2 + 2N clocks from the `start` pulse to `done`: one clock to
prefetch word 0, then 2N clocks of execution, then `done`.

## Timing contract (what a schedule must obey)

The engine checks nothing at run time, so a correct program depends entirely
on this contract. Times are in PE cycles. Take an operation whose
Instructions Memory word sits at cycle *t* on PE *p*, where the PE has *S*
pipeline stages (10 for add/subtract, 5 for multiply):

1. **Operands.** They must have been written to PE Memory *p* in a PE cycle
   before *t*. A value written in cycle *w* is readable from cycle *w + 1*.
2. **Result.** It appears on crossbar input *p* during cycle *t + S* only.
   The next operation on that PE replaces it one cycle later. A PE starts at
   most one operation per cycle and is always fully pipelined.
3. **Direct transfer.** The Interconnections word of cycle *t + S* selects
   input *p* on output 2q (or 2q+1). The Instructions word of PE *q* at cycle
   *t + S + 1* sets `wr_a`/`we_a` (or `wr_b`/`we_b`). A consumer on PE *q* can
   therefore issue at *t + S + 2* at the earliest. This gives the latency
   weights of 12 (add) and 7 (multiply) cycles that the scheduler uses for
   the critical path. The same select in several outputs broadcasts one
   result to several PE Memories in one cycle.
4. **Indirect transfer.** When the write port of the consumer is busy, the
   result can be parked:
   * the Buffer Instructions word of PE *p* at cycle *t + S* stores it at
     entry *e* (`we`, `wr = e`);
   * at any later cycle *c*, a buffer word of PE *p* reads entry *e*;
   * the Interconnections word of cycle *c + 1* selects input 8 + *p*;
   * PE *q* writes the value in cycle *c + 2*.

   Buffer read and write happen in the same PE cycle. A read of the entry
   being written returns the old contents.
5. **Write ports.** Each PE Memory takes at most two values per cycle, one
   per port. Two writes to the same address in one cycle are illegal (an
   assertion reports them).

Program memories have registered reads. The controller keeps them one word
ahead: it fetches word 0 before the first PE cycle and word *cycle + 1* at
the end of every PE cycle. Every control word is therefore stable for the
whole PE cycle it belongs to.

## Control word formats

Instructions Memory word, 52 bits (`vec_pkg::pe_instr_t`). Each address is a
12-bit field (three hex digits), of which the low 11 bits address the 2048
words:

| bits  | field  | meaning |
|-------|--------|---------|
| 11:0  | rd_a   | operand a address (read half, port A) |
| 23:12 | rd_b   | operand b address (read half, port B) |
| 35:24 | wr_a   | write address for crossbar output 2p (write half, port A) |
| 47:36 | wr_b   | write address for crossbar output 2p+1 (write half, port B) |
| 48    | we_a   | write enable, port A |
| 49    | we_b   | write enable, port B |
| 50    | op_sub | ADD blocks: 1 = a - b, 0 = a + b; ignored by MULTI blocks |
| 51    | -      | unused |

Buffer Instructions word, 9 bits (`vec_pkg::buf_instr_t`): `rd[3:0]`,
`wr[7:4]`, `we[8]`.

Interconnections word, 64 bits: the select of crossbar output *o* is in
bits `[4o+3:4o]`. Selects 0-7 pick PE results and 8-15 pick buffer outputs.

## Arithmetic

`pe_add` and `pe_mul` are IEEE-754 single-precision units written for this
design. Each is a combinational function followed by a chain of *STAGES*
registers (10 and 5 by default), enabled by `pe_en`. A synthesis tool with
retiming can spread the logic over the chain. The units behave as follows:

* results are rounded to nearest, ties to even;
* subnormal inputs are read as zero, and subnormal results are flushed to
  zero with the sign kept;
* infinities follow IEEE rules;
* invalid operations (inf - inf, 0 x inf, NaN input) return the quiet NaN
  `0x7FC00000`.

## Running a program

A program has two parts:

* the contents of the 8 Instructions Memories, the 8 Buffer Instructions
  Memories and the Interconnections Memory (one word each per PE cycle);
* the initial values in the PE Memories.

A constant operand (for example the 0.0 used to write `-x` as `0 - x`) is
just an initial value.

The top module `vec_engine` has a simple host port, usable while the engine
is idle:

* `host_we` writes `host_wdata` at `host_addr` in the memory selected by
  `host_target` (`HT_PE_MEM`, `HT_INSTR`, `HT_BUF_INSTR`, `HT_XBAR`) of
  block `host_pe`. `host_pe` is ignored for the Interconnections Memory.
* `start` (a one-clock pulse) with `num_cycles` runs that many PE cycles.
  `busy` is high during the run, and `done` stays high afterwards until the
  next `start`.
* `host_re` reads word `host_rd_addr` of PE Memory `host_rd_pe`. The data
  appears on `host_rdata` one clock later.

Memories are not cleared by reset. The active-low asynchronous reset clears
only the controller, the pipelines and the crossbar register.

## Sizes and what fits

| item | default | where it comes from |
|------|---------|---------------------|
| PEs | 4 ADD + 4 MULTI | reference configuration |
| PE latency | 10 (add), 5 (multiply) | reference configuration |
| PE Memory | 2048 x 32 | reference configuration |
| program depth (all program memories) | 1024 PE cycles | chosen to hold the reference 987-cycle test case; consistent with the 65536-bit Interconnections Memory |
| Buffer Memory | 16 x 32 | reference configuration |
| crossbar | 16 x 16, 4-bit selects | reference configuration |

These are parameters of `vec_engine`: `N_ADD`, `N_MUL`, `ADD_STAGES`,
`MUL_STAGES`, `MEM_DEPTH`, `PROG_DEPTH`, `BUF_DEPTH`. The defaults are in
`rtl/vec_pkg.sv`.

The reference test case is the forward dynamics of a 23-dof railway bogie:
5469 operations, scheduled into 987 PE cycles on 8 PEs. It fits into 1024
program words. For the other published benchmarks (serial, semi-serial and
parallel 23- to 130-dof systems), the lower bound on 8 PEs is the larger of
operations / 8 and the critical path. Two rewritten 23-dof variants have
lower bounds of 684 and 802 PE cycles, so they may fit, but no scheduled
length is known for them. All the others need between 1144 and about 78,000
PE cycles even with perfect packing. They do not fit at the default
`PROG_DEPTH` and would need deeper program memories or more PEs.

## Departures from the reference architecture

* **One clock instead of two.** The reference derives the PE clock from the
  memory clock with a toggling register and uses both as clocks, which is
  what limited its speed. Here the toggling register is a clock enable, so
  the whole engine is one synchronous domain.
* **9-bit buffer instructions.** The reference describes the Buffer
  Instructions word as 8 bits wide. Two 4-bit addresses for 16 entries plus
  a write enable need 9 bits, and 9 bits are used.
* **Own floating-point units.** The reference uses vendor IP. The units here
  match its stage counts. Flush-to-zero for subnormals and the canonical NaN
  are this design's choices.
* **Program depth** of 1024 words is a choice (see Sizes).
* **Host port, prefetch clock, start/done handshake, field order** of the
  control words and the **numbering of crossbar ports** are this design's
  own choices. The reference gives the fields but not their order.
* The reference's embedded-processor connection, on-chip logic analyser and
  the offline placement program are not part of the RTL. The testbenches
  contain a compact list scheduler (`tb/sched_pkg.sv`) that produces legal
  programs for the timing contract above.

## Source files

* `rtl/vec_pkg.sv`: sizes, control-word structs, host target enum.
* `rtl/vec_engine.sv`: the top level.
* `rtl/cycle_ctrl.sv`: PE-cycle counter, phase and fetch.
* `rtl/compute_block.sv`: one ADD or MULTI block.
* `rtl/pe_memory.sv`, `rtl/pe_instr_mem.sv`, `rtl/buffer_memory.sv`,
  `rtl/buffer_instr_mem.sv`, `rtl/xbar_instr_mem.sv`: the memories.
* `rtl/crossbar.sv`: registered 16 x 16 crossbar.
* `rtl/pe_add.sv`, `rtl/pe_mul.sv`: the floating-point PEs.

Every file opens with a comment on its interface and timing.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Support code:

* `tb/fp_ref_pkg.sv`: a reference model of the arithmetic. It computes in
  double precision and rounds to single precision by hand.
* `tb/sched_pkg.sv`: a list scheduler with ALAP priority. It prefers direct
  transfers, falls back to the buffers and checks the whole timing contract
  while it places operations.

The end-to-end tests:

* **`tb_vec_engine`** runs the full-size default engine. It builds a random
  dataflow graph (160 inputs, 1800 operations), schedules it into about 420
  PE cycles, loads it, runs it twice and compares every computed value
  bit-exactly with the reference. It also checks the clock count
  (2 + 2N), and that direct transfers, indirect (buffered) transfers,
  subtractions, two-port writes and broadcasts all occurred.
* **`tb_robotran_example`** runs real atomised Robotran equations:
  * a block of kinematic equations;
  * the force equation `CF323` in three forms: a left-to-right cascade with
    a leading `0 +`, the same with the zero removed, and a balanced tree.
    Removing the zero saves exactly one addition latency (12 cycles).

  Each must finish in exactly its critical path (38, 67, 55 and 43 PE
  cycles) and give the reference result.

* **`tb_pipeline_couples`** builds fifteen full-size engines. Each uses
  one of the ADD/MULTI latency couples that the reference study compared,
  from 1/2 up to 14/9 stages. All fifteen run the same random 400-operation
  graph, each scheduled for its own latencies. The test prints the length
  and run time of each couple and checks every result.

To simulate with Verilator 5, for example the full engine test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vec_pkg.sv tb/fp_ref_pkg.sv tb/sched_pkg.sv rtl/*.sv tb/tb_vec_engine.sv \
  --top-module tb_vec_engine
./obj_dir/Vtb_vec_engine
```

Replace the last file and the top module name to run another testbench.
Packages must come before the files that import them.

Two simulator details shaped the testbenches:

* The reference model does not use `$shortrealtobits`. It rounds from
  double precision with its own code.
* Host accesses are driven on the falling clock edge with blocking
  assignments.
