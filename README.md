# Stack-operation folding decoder for a Java bytecode processor

A stack machine pays for its compact code with data movement: to compute
`c = 2 + a` a Java processor pushes the constant, pushes the local variable,
pops both into the ALU, pushes the sum and finally pops it into the local
variable `c`. Every instruction depends on the one before it, so they run one
after another.

*Folding* removes that traffic. The decoder looks at a few consecutive
instructions and, when they form a chain of true data dependences, issues
them as a single compound instruction:

```
iconst_2        ; producer  ─┐
iload   1       ; producer   │  one issued instruction:
iadd            ; operator   │    iadd  src0 = #2, src1 = LV[1], dst = LV[2]
istore  2       ; consumer  ─┘
```

The operator reads its operands directly from the constant / local-variable
sources of the producers and writes its result directly to the consumer's
local variable. Four instructions take one issue slot instead of four.

This repository holds synthesizable SystemVerilog for the folding part of the
instruction decoder, in the configuration the source article recommends: an
**8-byte decode window** with the **4-foldable strategy** (groups of up to
four instructions). The design follows the POC (producer / operator /
consumer) folding model and the cascaded folding-unit circuit of the
article *Stack operations folding in Java processors*. The
execution side of the processor (operand stack, local-variable file, ALU,
branch unit, microcoded complex-instruction unit, instruction cache) is not
part of this design.

## Instruction classes and their 4-bit codes

Each bytecode instruction is reduced to a 4-bit *POC type*:

| class | meaning | examples | code `[3:0]` |
|---|---|---|---|
| P   | producer: push a constant or load a local variable | `iconst_2`, `bipush`, `iload 1`, `aload_0` | `1000` |
| O_E | ALU operator, result back to the stack | `iadd`, `ishl`, `i2l`, `lcmp` | `0100` |
| O_B | conditional branch | `ifeq`, `if_icmplt`, `ifnull` | `0010` |
| O_C | complex (microcoded) operator | array access, `ldc`, `getfield`, `invokevirtual`, returns | `0110` |
| O_T | stops folding | `nop`, `iinc`, `goto`, `athrow`, `dup`, switches, `wide` | `0000` |
| C   | consumer: store into a local variable | `istore 2`, `astore_1` | `0001` |

Bit 3 marks a producer, bit 0 a consumer, bits 2 and 1 the operators, and
the all-zero code is the terminator. The class names and meanings come from
the folding model; the assignment of every one of the 256 opcodes
(`rtl/poc_classifier.sv`) is this design's reading of the JVM instruction
set. Loads from arrays or the constant pool (`iaload`, `ldc`) are *not*
producers: only the constant register and the local variables can be read
directly by a folded operator. Stack shuffles (`dup`, `swap`, `pop`) are
treated as terminators.

## The folding unit

The heart of the design is a small combinational unit
(`rtl/folding_unit.sv`) that compares instruction N — or the result of
folding everything before it — with instruction N+1:

```
foldable = ( N[3]·(N1[1] + N1[2])  +  N1[0]·(N[3] + N[2]) ) · cont_in
cont_out = ( N[3]·(N1[3] + N1[2] + N1[1])  +  N1[0]·N[2] ) · cont_in
poc_comb = (N is P  and  N1 is not O_T) ? N1 : N
```

Read in terms of classes:

* **foldable** — a producer followed by any operator or a consumer
  (`P·O_E`, `P·O_B`, `P·O_C`, `P·C`), or an ALU/complex operator followed by
  a consumer (`O_E·C`, `O_C·C`). A branch produces no value, so `O_B·C` does
  not fold.
* **continue** — the combined instruction may still absorb the next one:
  after `P·P` (more producers can feed the same operator), after `P·O_x`
  (the operator's result may go to a consumer), and after `O_E·C` / `O_C·C`
  (`bit 2` of the operator code). `P·C` and everything involving `O_T` end
  the group.
* **combined type** — a producer takes the type of what follows it, so a
  run `P P O_E` presents itself to the next unit as `O_E`; an operator keeps
  its type when a consumer is folded into it.

`P·P` is *not* foldable but *does* continue: two producers alone form no
group (there is no dependence between them), yet they may feed a following
operator. This is why the group size is decided by the last asserted
foldable line, not the first.

## Cascading: the N-foldable logic

`rtl/folding_logic.sv` chains `N_FOLD-1` units. Unit 0 sees instructions 0
and 1 with its continue input tied high; unit k sees the combined type and
continue line of unit k-1 and the type of instruction k+1. Its foldable
output is the *(k+2)-foldable* line. Because every unit is gated by the
continue chain, the folding group is instructions `0 .. m-1`, where m is
the largest k+2 whose line is high (m = 1, i.e. issue alone, if none is).

This reproduces, exhaustively, the pattern tables of the 4-foldable
strategy — for example `P P P O_E`, `P P O_C C`, `P O_E C C`, `O_C C C C`
— and the state-machine form of the model (start → State_P → State_O_E /
O_B / O_C / C → end). One consequence of the equations is worth knowing:
`P P C` and `P P P C` fold (the last producer moves straight into the local
variable; the earlier ones stay on the stack). The source article's pattern
tables do not list those two sequences, but its state diagram and equations
both fold them, and this RTL follows the equations.

The delay grows linearly with the number of units, which is the price of
the cascade's simplicity; the source article reports 3.62 ns for a
4-foldable cascade in a 0.6 µm high-performance standard-cell library. No
timing is claimed for this RTL.

## From bytes to slots: the decode window

Java instructions are 1 to 6 bytes long (ignoring the two switch
instructions), so the decoder first has to find where the instructions in
its window start. `rtl/window_decoder.sv` is a ripple of `N_FOLD`
classifiers: slot 0 starts at byte 0, slot k at the end of slot k-1.

A slot is *valid* when its instruction lies wholly inside the valid bytes
of the window and all earlier slots are valid. An invalid slot is presented
to the folding logic as `O_T`, so a group is simply cut at the edge of the
window or at an instruction that has not been fetched completely. `wide` is
length-decoded from its second byte (6 bytes before `iinc`, otherwise 4).

`DECODE_BYTES` is the decoder width in the sense of the source article: the
instructions folded together must end within that many bytes. For widths
below 6 the physical window is still 6 bytes, so that a long instruction
can issue on its own; only its folding partners are limited by the width.

`tableswitch` and `lookupswitch` have a length that depends on their
address and table contents. The decoder does not compute it: when one of
them reaches slot 0 it raises `escape`, does not issue, and waits for the
execution side to take the instruction over and `flush` the decoder with
the following bytes. A switch in a later slot simply ends the group.

## Operand redirection

`rtl/fold_composer.sv` turns the group into the compound instruction. In a
folding group the producers always come first, then at most one operator,
then the consumers, so:

* every producer becomes a **source** (`src[]`, in program order): either an
  immediate (`iconst_*`, `lconst_*`, `fconst_*`, `dconst_*`, `aconst_null`,
  `bipush`, `sipush`, sign-extended to 16 bits) or a local-variable index
  (`xload n`, `xload_<n>`);
* the operator is the **primary** instruction (`primary_opcode`,
  `primary_slot`);
* every consumer becomes a **destination** (`dst[]`, local-variable index).

A group without an operator (`P C`, `P P C`) has a null primary
(`primary_valid = 0`): it is a move from source to local variable. A group
of one instruction is issued unchanged as its own primary. Each operand
carries the opcode it came from, which tells its data type; this design
does not check that the types of folded instructions match.

## Buffer, interface and timing

`rtl/instr_buffer.sv` is a 16-byte shift queue between instruction fetch
and the decode window. It accepts an 8-byte fetch block whenever a whole
block fits, and drops the bytes of each issued group (0 to 8 per cycle).

`rtl/fold_decoder_top.sv` connects buffer → window decoder → folding logic
→ composer. Ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `flush` | in | drop all buffered bytes; a fetch block accepted in the same cycle starts the new stream |
| `fetch_valid`, `fetch_data[FETCH_BYTES]`, `fetch_ready` | in/in/out | fetch handshake, byte 0 first |
| `issue_valid`, `issue_ready` | out/in | one folding group offered / taken per cycle |
| `escape` | out | a switch instruction is at the head of the window |
| `fold_count` | out | instructions in the group, 1..N_FOLD |
| `k_foldable[N_FOLD-2:0]` | out | the 2-, 3-, 4-foldable lines of the cascade |
| `group_poc` | out | POC type of the folded instruction |
| `group_len` | out | bytes retired with the group |
| `role[N_FOLD]` | out | per slot: none / source / primary / destination |
| `primary_valid`, `primary_slot`, `primary_opcode` | out | the instruction that executes |
| `n_src`, `src[N_FOLD-1]`, `n_dst`, `dst[N_FOLD-1]` | out | redirected operands (`operand_t`: valid, is_lv, opcode, 16-bit value) |

Timing: the window is held in registers; everything from it to the issue
outputs is combinational. A group shown in cycle t is retired at the clock
edge ending cycle t if `issue_ready` is high, and the next group is shown in
cycle t+1. A fetch block accepted at an edge is visible in the window from
the next cycle. The issue handshake, buffer size and fetch width are this
design's own choices; the source article describes only the folding
circuit and the decoder width.

Parameters of `fold_decoder_top` (defaults in brackets): `DECODE_BYTES`
[8], `N_FOLD` [4], `BUF_BYTES` [16], `FETCH_BYTES` [8]. `N_FOLD` may be any
value from 2 up; `BUF_BYTES` must be at least `FETCH_BYTES` and at least
the window size. Shared types and the POC codes
live in `rtl/fold_pkg.sv`.

## Verification

Each module has a self-checking testbench in `tb/`; every one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model in
`tb/fold_ref_pkg.sv` restates the rules independently: opcode classes and
lengths as opcode lists, and the folding rule as the start / State_P /
State_O_x / State_C state machine walked one instruction at a time.

| testbench | what it checks |
|---|---|
| `tb_folding_unit` | all 36 class pairs × continue in, against the pairwise folding table |
| `tb_folding_logic` | all 1296 four-instruction class sequences, each row of the 2/3/4-foldable pattern tables, and a 6-foldable cascade on random sequences |
| `tb_poc_classifier` | all 256 opcodes |
| `tb_window_decoder` | random windows with random valid-byte counts; cut instructions, `wide`, switches; a 4-byte-wide decoder for the width rule |
| `tb_fold_composer` | the worked `iconst_2; iload 1; iadd; istore 2` example, a null-primary move, random groups |
| `tb_instr_buffer` | queue against a model under random fetch, consume and flush |
| `tb_fold_decoder_top` | end to end at default sizes: 20 000 random instructions with fetch and issue stalls, switch escapes and taken-branch flushes; every group compared with the reference; counts groups of each size 1–4, stalls, window cuts, backpressure, escapes and flushes and fails if any never happens |
| `tb_fold_sweep` | 2-, 3-, 4- and 6-foldable decoders and widths 2–9 bytes on one synthetic stream |

Run one with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/fold_pkg.sv tb/fold_ref_pkg.sv tb/fold_prog_pkg.sv \
  tb/tb_fold_decoder_top.sv --top-module tb_fold_decoder_top -o sim
./obj_dir/sim
```

`tb_fold_sweep` draws instruction classes with the dynamic frequencies
reported for Java programs (P 47.14 %, O_E 10.87 %, O_B 11.54 %, O_C
22.19 %, O_T 3.97 %, C 4.29 %) but without any program structure. The share
of instructions removed by folding ((instructions − groups) /
instructions) it reports for 20 000 instructions:

| strategy (window) | removed |
|---|---|
| 2-foldable (8 B) | 23.6 % |
| 3-foldable (8 B) | 34.6 % |
| 4-foldable (8 B) | 39.6 % |
| 6-foldable (9 B) | 42.4 % |

| 4-foldable, width | 2 B | 3 B | 4 B | 5 B | 6 B | 7 B | 8 B | 9 B |
|---|---|---|---|---|---|---|---|---|
| removed | 6.7 % | 15.6 % | 26.6 % | 34.3 % | 37.6 % | 39.2 % | 39.6 % | 39.6 % |

The trend matches the article's trace measurements on real Java programs
(31 %, 41 %, 43 % and 44 % for 2-, 3-, 4- and unlimited folding, with
little gain beyond 8 bytes); the absolute numbers do not, and are not
expected to, because the stream is random.

## Where this design departs from, or goes beyond, the folding model

* Data type and data width of folded instructions are not compared; each
  instruction is represented only by its four POC bits, as in the folding
  circuit.
* The opcode-to-class table, instruction lengths, operand decoding, window
  extraction, byte queue, issue handshake and switch escape are this
  design's own, built around the folding circuit to make it usable.
* `P P C` / `P P P C` fold, following the equations rather than the
  pattern tables.
* The folding unit is written as sum-of-products; the article's
  implementation uses inverting gates for speed, a choice left to synthesis
  here.
* The processor around the decoder (operand stack, local variables,
  constant register, execution, branch and microcoded units, instruction
  cache) is not included.
