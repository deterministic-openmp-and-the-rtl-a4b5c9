# LBP: a manycore that forks threads in hardware

LBP (Little Big Processor) is a 64-core, 256-thread RISC-V manycore built for one job: to
run a single parallel program with timing that repeats exactly from run to run. The
threads of such a program are created, fed and joined by hardware, through a dozen extra
instructions (the X_PAR extension), not by an operating system. There are no caches, no
branch predictor and no coherence protocol. Latency is hidden by interleaving four
hardware threads (harts) per core, and each hart works mostly in memory next to its own
core. A program compiled with a fork/join runtime (the "Deterministic OpenMP" style)
spreads a parallel loop along the line of cores. Each iteration becomes a hart. The harts
end in program order, so the sequential code after the loop sees a finished team.

This repository is a synthesizable SystemVerilog model of that processor. It covers the
cores, the inter-core links, the three memory banks per core and the router tree of the
shared memory. Testbenches run real fork/join programs on it: a team test at 4 and 64 cores, and a
matrix multiplication at 4 and 16 cores.

## The machine at a glance

```
      forward link (fork, continuation values, ending-hart signal)
   core0 ──► core1 ──► core2 ──► ... ──► core63        (the last core is not linked to core0)
   core0 ◄── core1 ◄── core2 ◄── ... ◄── core63        backward line (results, join addresses)

   every core c:  code bank | local (stack) bank | shared bank (2 ports)
                                                    │ distant port
   r1 routers (one per 4 cores) ── r2 (one per 4 r1) ── r3 (one, joins the four r2)
```

- **Forward link.** Each core talks directly to its successor only. It can allocate a hart
  there (p_fn), write words into that hart's stack (p_swcv), start it (p_jal / p_jalr),
  and pass on the "ending hart" signal.
- **Backward line.** A one-way chain of registered stages runs from the last core to the
  first. It carries p_swre results and join addresses to any earlier core.
- **Memory.** Each core has three banks: code, a local stack (one quarter per hart), and
  one bank of the global shared memory. The shared bank has two ports. The core uses one
  directly. The other is reached by every core through the router tree.

A 16-core machine has no r3, a 4-core machine has a single r1, and a 1-core machine has
no router (`NCORES` = 1, 4, 16 or 64).

## Teams of harts: how fork, join and results work

This is the part that makes LBP unusual, so it gets the most room here.

**Hart identity.** A hart is named `4*core + hart`, a 16-bit number. `p_set rd, rs1` puts
the caller's own identity in bits 30:16 of `rd`, sets bit 31, and keeps `rs1[15:0]`.
`p_merge rd, rs1, rs2` builds `(rs1 & 0x7fff0000) | (rs2 & 0xffff)`. A register can
therefore carry two hart numbers at once:
- the join hart, in the high half (register `t0` by convention);
- a target hart, in the low half.

**Forking one member.** A hart that wants to run `f(i)` on a new hart does this:

1. `p_fc t6` or `p_fn t6` allocates a free hart on this core or on the next one. `t6`
   receives its identity. If no hart is free, the instruction waits.
2. `p_swcv t6, reg, off` copies `ra`, `t0` and the arguments into the continuation-value
   area of the new hart's stack. On the same core this is a write to the local bank.
   On the next core it travels over the forward link.
3. `p_syncm` stops this hart's fetch until its memory writes have landed.
4. `p_jalr ra, target, t6` sends `pc+4` to the new hart, which starts fetching there.
   The forking hart itself jumps to `target`, so it runs the loop body while the new
   hart runs the rest of the loop: it forks again, further down the line.
5. The new hart restores its registers with `p_lwcv reg, off`.

So a team grows hart after hart, core after core. Each member knows its successor: the
hart it forked.

**Ending in order.** A member ends with `p_ret`, which is `p_jalr zero, ra, t0`. What it
does depends on `ra` and `t0`:

| ra | t0 | effect |
|---|---|---|
| 0 | -1 | the program exits |
| 0 | this hart | the hart stays, waiting to be joined |
| 0 | another hart | the hart ends |
| non-zero | join hart J | the hart ends and sends `ra` to J over the backward line; J resumes at `ra` |

A hart that was started by a fork commits its `p_ret` only after it has received the
ending-hart signal from its predecessor in the team. At commit it passes the signal to
its own successor. The last member's join address therefore reaches the join hart only
after every earlier member has finished. That is the hardware barrier between a parallel
section and the sequential code after it, and it costs no shared memory traffic.

**Results.** `p_swre hart, value, slot` sends a value into result slot `slot` (0..3) of an
earlier hart. It goes directly on the same core, or over the backward line. `p_lwre rd,
slot` on the receiving hart waits in the instruction table until that slot is full, then
reads it and empties it. Reductions and input/output travel this way.

## Inside a core

The four harts share one five-stage pipeline. Every stage picks one hart per cycle. Each
stage has its own round-robin selector (`lbp_hart_select`), and the stages choose
independently. With enough active harts the core finishes close to one instruction per
cycle.

| stage | a hart is eligible when | notes |
|---|---|---|
| fetch | it runs, its next pc is known, its instruction buffer is empty, no p_syncm hold | the code bank answers in the next cycle |
| decode / rename | its instruction buffer is full and its reorder buffer has a free entry | decode resolves pc+4, `jal` and `p_jal` |
| issue | its result buffer is free and one of its renamed instructions has its sources | branches, `jalr`, `p_jalr` and `p_ret` resolve here |
| write back | its result buffer is full | the result goes into the reorder-buffer entry |
| commit | its oldest entry is done (and, for an ending `p_ret`, the ending-hart signal has arrived) | X_PAR side effects happen here |

A hart is suspended after each fetch until its next pc is known. There is no prediction.
One hart alone therefore fetches at best every other cycle, and the other harts fill the
gaps.

Renaming is based on the reorder buffer:
- Each hart has `ROB_DEPTH` entries, and the result field of an entry is the renamed
  register.
- A per-hart table maps each architectural register to its last in-flight writer.
- An instruction waits in its entry until its sources are ready. Within the hart, the
  oldest ready instruction issues, so issue is out of order.
- Operands are read at issue, either from the entries or from the architectural file.

Each hart has a single result buffer. A load, a multiply/divide (`lbp_muldiv`, fixed
latency) or a `p_fn` keeps it reserved until the result comes back. This stalls issue for
that hart only.

Loads and stores go to one of three places:
- the local stack bank (addresses `0x1xxxxxxx`);
- the core's own shared bank, through the direct port;
- another core's shared bank, through the router tree. One distant access per core is in
  flight at a time.

## Links and routers

The **forward link** carries one message per cycle: a continuation-value write or a hart
start. Beside it run the ending-hart signal and the p_fn request/grant pair. The request is
a register, and the next core's allocator (`lbp_hart_alloc`) grants it in the same cycle.
A p_fn request from the previous core wins over a local p_fc.

The **backward line** (`lbp_bwd_stage`, one per core) holds one message register per
stage. A message is either a result for a slot or a join address. A message for this core
is delivered. Any other message moves one core down per cycle. The core may inject its own
message only when no passing message needs the stage. A join sent at commit goes ahead of
a p_swre sent at issue.

Each **router** (`lbp_router`) has four child links and one parent link. Both requests and
responses can use every link once per cycle. Inside are two 5×5 crossbars (`lbp_xbar`),
one for requests and one for responses. Each has round-robin arbitration and a two-entry
buffer per output. "Ready" depends only on the fill of those buffers, so there is no
combinational path through a router. A request is routed by its bank number and a
response by the requesting core: down into the child whose range holds that core,
otherwise up. An r1 child link serves one core and its shared bank.

## Encoding and address map

X_PAR uses the RISC-V custom opcodes:

| instruction | opcode | funct3 | operands |
|---|---|---|---|
| p_lwcv rd, off | 0001011 | 0 | I-type |
| p_swcv rs1=hart, rs2, off | 0001011 | 1 | S-type |
| p_lwre rd, slot | 0001011 | 2 | I-type |
| p_swre rs1=hart, rs2, slot | 0001011 | 3 | S-type |
| p_jalr rd, rs1=target, rs2=hart | 0001011 | 4 | R-type; `rd=0, rs1=ra, rs2=t0` is p_ret |
| p_merge rd, rs1, rs2 | 0001011 | 5 | R-type |
| p_set rd, rs1 | 0001011 | 6 | R-type |
| p_fc / p_fn / p_syncm | 0001011 | 7 | funct7 = 0 / 1 / 2 |
| p_jal rd, rs1=hart, off | 0101011 | – | I-type layout, target pc + off |

Memory:
- The code bank is indexed by pc. The same program is loaded into every core.
- Stack: `0x1000_0000 + byte offset` in the local bank. Each hart owns a quarter, and it
  starts with `sp` at the top of its quarter minus a 16-word continuation-value area.
  Offsets of `p_swcv` and `p_lwcv` address that area.
- All other addresses are shared memory. Bank (= core) number = `address / (4*SHARED_WORDS)`.
  The shared banks of all cores form one flat global memory.

## What follows the architecture and what is this model's own choice

The following follow the original design:
- the four-hart core and its five independently selecting stages;
- suspension after fetch and no prediction;
- the per-hart instruction table, reorder buffer and result buffer;
- all twelve X_PAR instructions and the four p_ret endings;
- in-order commit of p_ret through the ending-hart signal;
- the forward link and the backward line;
- three banks per core, with a dual-ported shared bank;
- the r1/r2/r3 tree, with one access per link per cycle.

The following are choices made here, where the architecture leaves details open:
- the opcode and field assignment above, and the 16-bit hart numbers;
- `ROB_DEPTH = 8`, 4 result slots per hart, a 16-word continuation-value area;
- bank sizes: code 16 KB, stack 4 KB, shared 16 KB per core;
- `MUL_LAT = 3`, `DIV_LAT = 8`;
- round-robin selection, lowest-free-hart allocation, one distant access per core;
- the router buffering and arbitration;
- the address map and the program loading port.

The operand order of `p_jalr` differs between the instruction table and one code example
of the original description. This model uses the table's order: target in `rs1`, hart in
`rs2`.

Not modelled:
- links to a second chip and an external extension of the shared memory;
- I/O controllers, which are ordinary harts running a polling program;
- the fork/join runtime, except for the hand-assembled programs in the testbenches.

## Files

| rtl/ | role |
|---|---|
| `lbp_pkg.sv` | constants, instruction classes, link and memory message structs |
| `lbp_top.sv` | line of cores, shared banks, backward line wiring, router tree |
| `lbp_core.sv` | one core: pipeline, renaming, X_PAR, local and code banks, backward-line stage |
| `lbp_hart_select.sv`, `lbp_decoder.sv`, `lbp_alu.sv`, `lbp_muldiv.sv`, `lbp_hart_alloc.sv` | core parts |
| `lbp_code_bank.sv`, `lbp_local_bank.sv`, `lbp_shared_bank.sv` | memories |
| `lbp_router.sv`, `lbp_xbar.sv`, `lbp_bwd_stage.sv` | interconnect |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). It also holds two
packages:
- `lbp_asm_pkg.sv`: a small assembler for RV32IM and X_PAR;
- `lbp_team_prog_pkg.sv`: the team fork/join program.

That program forks one team member per hart of the machine, passing continuation values,
with forks both inside cores and to the next core. Each member stores a value in a
different shared bank, mostly through the routers, and some members use multiply/divide.
Two members send results with p_swre to the first member, which reads them with p_lwre.
The team joins back to the main hart, which sums all the values and exits. The
testbenches check the memory contents and the end state. They also count how often each
mechanism happened and fail if one never did:
- local and next-core forks;
- continuation values and hart starts;
- local and backward-line results;
- the join, waiting for a join, and p_syncm holds;
- distant accesses and multiply/divide;
- p_ret waiting for the ending-hart signal, and p_lwre waiting.

`lbp_matmul_prog_pkg.sv` and `lbp_matmul_run.sv` serve the matrix multiplication
test below. `tb_lbp_top` runs the team program on 4 cores (about 1 300 cycles).
`tb_lbp_top_full` runs it on the full 64-core, 256-hart machine with all parameters at their defaults: 22 014 cycles and
11 982 instructions.

## Matrix multiplication

`tb_lbp_matmul` runs an integer matrix product Z = X·Y. X has h lines and h/2 columns, Y
has h/2 lines and h columns, and h is the number of harts. Each team member computes one
line of Z. The program (`lbp_matmul_prog_pkg.sv`) comes in three versions:
- "base": the matrices are stored one after another from bank 0 upwards;
- "copy": each member first copies its line of X into its own stack;
- "distributed": line i of X and of Z sit in bank i mod (number of cores) and line k of Y
  in bank k mod (number of cores), so the traffic spreads over all banks. The inner loop
  computes each Y address, which costs 7 extra instructions per iteration.

The testbench checks every element of Z.

| machine | version | cycles | instructions | IPC |
|---|---|---|---|---|
| 4 cores, h = 16 | base | 8 746 | 20 518 | 2.34 |
| 16 cores, h = 64 | base | 292 546 | 1 108 090 | 3.78 |
| 16 cores, h = 64 | copy | 172 211 | 1 120 762 | 6.50 |
| 16 cores, h = 64 | distributed | 284 330 | 2 056 572 | 7.23 |

Copying the line into local memory pays off, because every X read then stays inside the
core. Spreading the matrices almost doubles the IPC over the base layout, but the extra
address arithmetic eats most of the gain. The IPC is still well below one per core. In this model a core has only one access
to another core's bank in flight at a time, and a hart waits for its load's result before
issuing again. The 64-core size (h = 256, about 59 million instructions) fits in memory
(512 KB of matrices in 1 MB of shared banks), but it is too long to simulate here.

## Simulating

With Verilator 5, for example the 4-core end-to-end test:

```
verilator --binary --timing -Irtl -Itb rtl/lbp_pkg.sv tb/lbp_asm_pkg.sv \
    tb/lbp_team_prog_pkg.sv tb/tb_lbp_top.sv --top-module tb_lbp_top -Mdir obj
./obj/Vtb_lbp_top
```

The unit testbenches need only `rtl/lbp_pkg.sv` and `tb/lbp_asm_pkg.sv` before the
testbench file. Each prints `TB_RESULT checks=N failures=M`. The 64-core build takes a few
minutes to compile and about ten seconds to run. For the matrix multiplication, give
`tb/lbp_matmul_prog_pkg.sv tb/tb_lbp_matmul.sv` in place of the last two files. It runs
for about a minute.

To run your own program, build it with the functions of `lbp_asm_pkg`. Load it through
the `prog_*` port of `lbp_top` while reset is held. Hart 0 of core 0 starts at address 0,
and `exit_o` rises when the program exits.
