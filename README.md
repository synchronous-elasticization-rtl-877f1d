# Elastic MiniMIPS: a synchronous elastic 8-bit MIPS and its SELF building blocks

In an ordinary clocked circuit, every register takes a new value on every edge. Every
wire between two registers must therefore settle within one cycle. A *synchronous
elastic* circuit drops that rule. Each register becomes an **elastic buffer (EB)**,
and every register-to-register connection carries a small handshake beside its data.
A value (a *token*) moves only when the producer has one and the consumer can take it.
The circuit keeps its clock and its static timing. It also becomes latency
insensitive: an extra pipeline stage with no token in it (a **bubble**) can be put on
any long wire. The results stay the same and only the cycle count changes.

This repository holds that technique applied to a complete processor:

* the SELF (Synchronous Elastic Flow) primitives: an elastic buffer, three fork
  implementations (LFork, LKFork, EFork) and two join implementations (LJoin, LKJoin);
* the 8-bit multicycle **MiniMIPS**: its ALU, ALU control, register file, controller and memory;
* `elastic_minimips`, the top. It is the MiniMIPS with each of its registers replaced by
  an EB, tied together by a control network of eager forks and lazy joins. Bubbles can be
  inserted in front of the ALU operand registers.

With no bubbles, the elastic machine takes exactly as many cycles as the clocked machine
it came from. With one or three bubbles it computes the same results, and its cycle
count grows by a factor of 1.50 or 2.50.

## 1. The SELF handshake

Every channel has a `valid` wire going forward and a `stall` wire going backward:

| V | S | channel state |
|---|---|---------------|
| 1 | 0 | Transfer: the token moves at this clock edge |
| 0 | x | Idle: no token offered (a stall with no valid is allowed) |
| 1 | 1 | Retry: the token is offered but refused. The producer must keep it, unchanged, in the next cycle |

Retry may only be followed by Retry or Transfer, never by Idle. The elastic buffer
checks this rule on its output with an assertion.

## 2. Elastic buffer (`elastic_buffer`)

An EB holds zero, one or two tokens. The EB's own control outputs show which:

| state | `vr` | `sl` | meaning |
|-------|------|------|---------|
| Empty | 0 | 0 | a bubble |
| Half  | 1 | 0 | one token (the normal state of a register) |
| Full  | 1 | 1 | two tokens. It refuses input |

Both `vr` and `sl` come straight from flip-flops. An EB therefore breaks every
combinational path of the control network, in both directions. A Half EB whose consumer
never stalls passes one token per cycle with one cycle of latency, just like a
flip-flop. The second slot absorbs the one extra token that arrives in the cycle after
the consumer starts to stall, since `sl` is registered.

The classic EB is a pair of latches (master and slave) with a latch controller. This
one uses two flip-flop slots, `head` and `tail`, under a three-state Moore controller.
The behaviour at the channels is the same. `INIT` selects the reset state: an EB can
come out of reset Empty, Half or Full. The reset tokens carry `INIT_DATA`.

`d_last` is the most recently accepted word, kept after the token has left. Section 6
explains why the processor needs it.

## 3. Forks and joins

A **join** merges channels whose data meet at one destination. A **fork** copies one
channel to several destinations. All five are combinational except EFork, which has one
flip-flop per branch.

| block | equations |
|-------|-----------|
| `lfork`  (LFork, 1-to-N)  | `sl = OR(sr)`; every `vr[i] = vl & !sl` |
| `lkfork` (LKFork, 1-to-N) | `vr[i] = vl & AND(j != i, !sr[j])`; `sl = OR(sr)` |
| `efork`  (EFork, 1-to-N)  | `vr[i] = vl & r[i]`; `sl = OR(r[i] & sr[i])`; `r' = (vl & sl) ? r & sr : 1` |
| `ljoin`  (LJoin, N-to-1)  | `vr = AND(vl)`; `sl[i] = vl[i] & (sr | !vr)` |
| `lkjoin` (LKJoin, N-to-1) | `vr = AND(vl)`; `sl[i] = sr | !vr` |

The two lazy forks move a token on all branches in the same cycle or not at all. The
eager fork gives each ready branch the token at once. `r[i]` then remembers which
branches still owe it, and the stem stalls until the last of them has taken it.

**Which fork/join combination to use is the central design decision**, because the
control network of a real circuit has reconvergent paths: a fork whose branches meet
again at a join.

* **LFork into LJoin** forms a loop with an odd number of inversions through the
  fork's shared valid and the join's per-input stall. It can oscillate.
* **LFork into LKJoin**, and **LKFork into LKJoin**, form loops that can lock into a
  state where the stall is stuck at 1 and the valid at 0. The network then deadlocks.
* **LKFork into LJoin** gives loops that are logically stable. They still have no
  state element, so glitches can circulate. Zero-delay simulation shows this too:
  built this way, the processor's control network does not settle.
* **EFork into either join** is safe (`tb_fork_join_combinations` shows the two
  lock-ups above and their eager counterparts running). Each branch has a flip-flop, so every loop
  passes through state. LKJoin saves one gate per join input compared with LJoin.

The top therefore uses EFork with LJoin. The fork and join flavour can still be chosen
with the top's `FORK` and `JOIN` parameters (see section 9 for what that implies).

**Reconvergent fanout and bubbles.** A single channel may stand for several parallel
datapaths between the same two registers. This is the minimum-gate choice. A bubble can
then only be placed on all of those paths together. If a bubble may be needed on just
one datapath, that datapath needs its own channel. Example: a bubble on the memory-data
path into I3 alone needs I3's input to join its own copy of the memory channel with its
own copy of the controller channel. The network below is built for bubbles in front of
A and B only. `tb_reconvergent_fanout` shows both sides: a bubble placed on one
of three parallel paths with its control simply in series makes every received word mix
two different tokens, while forking the channel around the bubble keeps them
consistent. The price is throughput. The short branch holds the source's token until
the bubble's copy catches up, so one word passes every two clocks.

## 4. MiniMIPS data plane

The MiniMIPS is an 8-bit subset of MIPS. It has an 8-bit datapath, an 8-bit program
counter and 8 registers. Its 32-bit instructions are fetched one byte at a time into
four instruction registers.

| register | contents |
|----------|----------|
| P | program counter |
| C | controller state |
| I1..I4 | instruction bits 31:24, 23:16, 15:8, 7:0. Loaded by IRWrite[3]..IRWrite[0] |
| A, B | register-file read data |
| L | ALU result |
| M | memory data register |
| Mem | the memory (its read byte is registered) |

The register file `R` (8 x 8 bit, register 0 reads zero) takes its operand fields from:

* read register 1: instruction bits 23:21;
* read register 2: bits 18:16;
* write register: bits 18:16 (`RegDst=0`) or 13:11 (`RegDst=1`).

Write data is L or M (`MemtoReg`).

The multiplexers:

* ALU input A: P or A (`ALUSrcA`).
* ALU input B: B, the constant 1, `imm = instr[7:0]`, or `instr[5:0] << 2` (`ALUSrcB`).
* Next PC: ALU result, L, `instr[5:0] << 2`, or 0 (`PCSource`). The PC is written when
  `PCWrite | (PCWriteCond & Z)`.
* Memory address: P or L (`IorD`).

**Instruction set** (MIPS encodings): `lb`, `sb`, `add`, `sub`, `and`, `or`, `slt`,
`addi`, `beq`, `j`. Immediates are 8 bits. The branch offset and the jump target are
`instr[5:0] << 2`; the branch offset is added to PC+4. Bytes of an instruction are
stored most significant first.

**Controller** (`controller`). Mem is a register here, so a byte read at PC arrives one
state after its address. Fetching four bytes therefore takes five states:

| state | action |
|-------|--------|
| FETCH1 | read byte at P; P <- P+1 |
| FETCH2..4 | read byte at P; I1/I2/I3 <- Mem; P <- P+1 |
| FETCH5 | I4 <- Mem |
| DECODE | A, B <- R; L <- P + (instr[5:0]<<2) |
| MEMADR | L <- A + imm |
| LBRD, LBWAIT, LBWR | Mem <- mem[L]; M <- Mem; R[rt] <- M |
| SBWR | mem[L] <- B |
| RTYPEX, RTYPWR | L <- A op B; R[rd] <- L |
| ADDIEX, ADDIWR | L <- A + imm; R[rt] <- L |
| BEQEX | if A == B: P <- L |
| JEX | P <- instr[5:0]<<2 |

Cycles per instruction: lb 10, sb 8, R-type 8, addi 8, beq 7, j 7. An unknown opcode
returns to FETCH1 after DECODE.

The memory (`memory`) has 256 bytes. The array is written with a store. The byte at the
address is read combinationally and captured by Mem's EB on the same edge, so Mem acts
as one register. A separate load port fills the memory with a program while the
processor is held in reset.

## 5. The elastic control network (`elastic_minimips`)

Each register-to-register data dependency gets a control channel. Registers that feed
the same destination are joined; a register that feeds several destinations is forked.
The network uses the fewest forks and joins that still allow bubbles before A and B.

| join | inputs | feeds |
|------|--------|-------|
| JCI1 | Cint (C), I1 | C |
| JCX | C3, X1 (Mem) | fork FCX -> I1, I2, I3, I4 |
| JCI2I3LM | C2, I2, I3, L2, M | channel RFWrite (writes R) -> fork FCI2I3LM -> A, B |
| JABCI4P | A, B1, C1, I4, P1 | fork FABCI4P -> L, and JABCI4LP |
| JABCI4LP | ABCI4P1, L1 | P |
| JBCLP | B2, C4, L3, P2 | Mem |

The remaining forks:

* C -> Cint, then C -> C1..C4;
* L -> L1, L2, L3;
* B -> B1, B2;
* P -> P1, P2;
* Mem -> X1, X2 (X2 feeds M).

The register file has no EB of its own. It is combinational logic on the RFWrite
channel. It writes when `RegWrite` is set and RFWrite *transfers*. Writing on the
transfer, rather than on every valid cycle, writes each token exactly once. A branch of
FCI2I3LM that takes the token early therefore still reads the old contents.

`NUM_BUBBLES` puts that many Empty EBs in series before A and before B (the bubbles
b1 and b2).

## 6. Why the elastic machine computes what the clocked one does

Number the values a clocked register takes: token 0 is its reset value, token k+1 is
computed from token k of its sources. Every EB resets to Half, holding token 0. The data
entering an EB is computed from the head tokens of the EBs that feed it. A join fires
only when all those heads are present, and a head stays put until every fork branch has
taken it. So each EB receives exactly the sequence of values the clocked register
would, whatever the delays.

One complication: registers with a load enable (I1..I4 under IRWrite, P under PCEn).
"Hold" means token k+1 = token k of the *same* register. The network has no channel
from these registers back to themselves. By the time token k+1 is formed, token k may
already have left the EB. `d_last` solves this: it is the last word the EB accepted,
which is always token k at the moment token k+1 arrives, because tokens enter in order.
The hold input of each enabled register is wired to its own `d_last`.

## 7. Bubbles and performance

Inserting bubbles in front of A and B, on a test program of 250 clocked cycles:

| bubbles | cycles, elastic, EFork + LJoin | ratio | ratio reported for the original chip's test program (eager) |
|---------|-------------------------------|-------|--------------------------------------------------------------|
| 0 | 250 | 1.00 | 98/98 = 1.00 |
| 1 | 374 | 1.50 | 147/98 = 1.50 |
| 3 | 624 | 2.50 | 245/98 = 2.50 |

With LKJoin joins instead of LJoin, one bubble also costs 374 cycles: the two join
flavours differ only in stalls sent back to inputs that hold no token.

The same program runs on a model of the clocked machine, with the same stores. The
cycles per instruction differ from the original MiniMIPS because of the registered
memory read, so absolute counts are not comparable; the ratios match. Why eager forks
help: take the cycle in which the ALU join lacks A and B while C's token waits. An
eager fork at C still passes C's token to the register-file branch in the first cycle,
so new values enter the bubbles immediately. A lazy fork would hold every branch of C
until the stalled branch clears. The lazy protocol was reported at 195 and 389 cycles
for 1 and 3 bubbles (section 9 explains why the whole machine is not run lazily here).

The effect can be isolated on the part of the network just described: C, its fork FC,
the join with I2 and I3, the fork to the two bubble chains, A, B and the ALU join, whose
output is C's next token (`tb_eager_lazy_bubbles`). C, the bubbles and A form a ring
with two tokens in k + 2 EBs for k bubbles. Eager forks reach that ring's bound of
2/(k+2) tokens per clock. With LKFork forks the ring loses one clock each time round:

| bubbles | tokens per clock, eager | tokens per clock, lazy | lazy/eager clocks | whole-machine lazy/eager reported |
|---------|------------------------|------------------------|-------------------|-----------------------------------|
| 1 | 2/3 | 1/2 | 1.33 | 195/147 = 1.33 |
| 3 | 2/5 | 1/4 | 1.60 | 389/245 = 1.59 |

## 8. Files, simulation and verification

`rtl/`:

| file | content |
|------|---------|
| `elastic_pkg.sv` | EB state, fork kind and join kind enums |
| `elastic_buffer.sv`, `efork.sv`, `lfork.sv`, `lkfork.sv`, `ljoin.sv`, `lkjoin.sv` | SELF primitives |
| `elastic_fork.sv`, `elastic_join.sv` | pick a fork or join flavour by parameter; add event flags |
| `minimips_pkg.sv` | opcodes, function codes, ALU operations, controller states, the `ctl_t` control struct |
| `alu.sv`, `alu_control.sv`, `regfile.sv`, `memory.sv`, `controller.sv` | MiniMIPS units |
| `elastic_minimips.sv` | the top |

Top parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_BUBBLES` | 0 | Empty EBs before A and before B |
| `FORK` | `FORK_EAGER` | `FORK_EAGER`, `FORK_LK` or `FORK_L` |
| `JOIN` | `JOIN_L` | `JOIN_L` or `JOIN_LK` |

Top ports:

* program loading while `rst_n` is low: `ld_en`, `ld_adr`, `ld_data`;
* memory traffic: `mem_access`, `mem_store`, `mem_adr`, `mem_wd`;
* state: `pc` and `state`, the heads of P and C;
* `c_xfer`: one clocked-machine cycle completed;
* event flags: `ev_eb_full`, `ev_fork_early`, `ev_join_wait`, `ev_rf_write`.

All resets are synchronous and active low.

`tb/`. Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_elastic_buffer` drives random SELF traffic into Empty-, Half- and Full-reset
  EBs. It checks them against a queue model, the state encoding, `d_last`, and one
  token per cycle.
* `tb_efork` uses a token-level model: each branch gets each token once, early start
  happens, and the stall is right.
* `tb_lfork`, `tb_lkfork`, `tb_ljoin`, `tb_lkjoin` check their truth tables exhaustively.
* `tb_alu`, `tb_alu_control`, `tb_regfile`, `tb_memory`, `tb_controller` check each unit
  against an independent model. The controller test also checks the cycles per
  instruction and the IRWrite order.
* `tb_elastic_minimips` runs the test program on four machines with eager forks:
  LJoin with 0, 1 and 3 bubbles, and LKJoin with 1 bubble.
  * It checks the stores against an instruction-level model (`minimips_test_pkg`).
  * It checks that every token entering Mem (state, address, store data) equals the
    bubble-free machine's token.
  * It checks that the bubble-free machine needs exactly the clocked cycle count.
  * It checks that bubbles make EBs fill, forks start early and joins wait.
* `tb_elastic_minimips_full` runs the top at its default parameters through the whole
  program.
* `tb_eager_lazy_bubbles` runs the ring of section 7 with eager and with lazy forks,
  for 1 and 3 bubbles. It checks the eager rate exactly, that the lazy rate is lower,
  and that only the eager fork serves C2 while C1 is stalled.
* `tb_reconvergent_fanout` compares the three ways of section 3 to elasticize three
  parallel paths between two registers. It checks word consistency, order and rate.
* `tb_fork_join_combinations` builds the small reconvergent networks of section 3 from
  EBs and the fork and join primitives, with producers and consumers around them. It
  starves the first EB for a few cycles. Two networks then lock up and deliver nothing:
  * LFork into LKJoin (A forks to B and to a join with C);
  * LKFork and LKJoin throughout, in a six-EB network with two reconvergent paths.

  The same networks built with EFork keep delivering tokens, in order and in equal
  numbers on every output. The fork stems' valid is held low during reset, as if the
  first EB were empty; the lazy networks lock up then and never move.

To run one, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/elastic_pkg.sv rtl/minimips_pkg.sv tb/minimips_test_pkg.sv \
      tb/tb_elastic_minimips.sv --top-module tb_elastic_minimips
    ./obj_dir/Vtb_elastic_minimips

Every testbench finishes in well under a second.

## 9. Departures and limits

Taken from the original MiniMIPS elasticization:

* the SELF protocol and EB states;
* the fork and join equations;
* the list of registers and their data dependencies;
* the join and fork structure and channel names;
* the register file without an EB, written by RegWrite together with its channel;
* the field positions, control signal names and multiplexer inputs of the datapath;
* IRWrite[3] loading I1;
* eager forks with lazy joins as the configuration built;
* bubbles placed at the register-file outputs.

This design's own choices:

* flip-flop EBs instead of latch pairs, and `d_last` for hold;
* the instruction set and encodings, the ALU operations and ALU control;
* the whole controller state sequence, including the fifth fetch state that comes from
  treating Mem as a register;
* big-endian instruction bytes, register 0 hard-wired to zero;
* a 256-byte memory with a load port;
* register-file writes on transfer rather than on valid;
* reset values;
* the event outputs.

Limits:

* **Lazy-fork configurations** (`FORK_LK`, `FORK_L`) contain combinational loops. They
  lint and elaborate, but a zero-delay simulation of the processor built with `FORK_LK`
  does not settle; `FORK_L` was not simulated. `FORK_EAGER` with `JOIN_LK` has no such
  loops and is simulated with one bubble. Reproducing the lazy cycle counts
  would need gate delays or timing constraints in the simulation.
* The latch-based elastic half buffer is not provided. The EB is built directly from
  flip-flops.
* The original test program is not available. The performance table uses this
  design's own program.
