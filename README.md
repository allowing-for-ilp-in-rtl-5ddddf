# A fill-unit Java bytecode core with a decoded bytecode cache

Stack machines such as the JVM encode programs compactly, but every operand passes
through the top of the stack: `a + b -> c` is four bytecodes (`iload a; iload b; iadd;
istore c`). picoJava-class processors recover speed by *folding* such runs into one
register-style operation (`add c <- a, b`) in the decode stage, where that logic lengthens
the critical path. This design takes folding out of the decoder and moves it into a
**fill unit** that works off the critical path: the fill unit watches the instructions
the core executes, groups the decoded bytecodes of a basic block into a line, folds
patterns inside that line, and stores the result in a small **decoded bytecode cache
(DB-Cache)**. The next time the program reaches that address the core takes the
pre-decoded, pre-folded line straight from the DB-Cache and skips fetch and decode.

The extra decode bandwidth is used by an **in-order dual-issue** stage. In a stack machine
almost every instruction depends on the one before it through the stack, so pairing
rarely works if "the stack" is treated as one resource. **Stack disambiguation** treats the
operand stack (addressed from OPTOP) and the local-variable area (addressed from VARS)
as separate resources, so that, for example, a push can pair with a following load of
a local variable. The area of every operand is recorded when a line is built, so
disambiguation is applied only to pairs issued from the DB-Cache; the decode path pairs
with the plain rule and needs no extra logic.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, in `rtl/`, with a
self-checking testbench per block in `tb/`.

## Block overview

```
            +-----------+ 8 B  +-----------+ 7 B  +-------------+ 1-4 uops
 icache --->|  fetch    |----->|  ibuffer  |----->|  bytecode   |------------+
 (16 KB)    | (PC, 8 B) |      |  16 bytes |      |  decoder    |            |
            +-----------+      +-----------+      | (no folding)|            v
                 ^  next address                  +-------------+      +-----------+
                 |                                  uops issued  ----->| fill unit |
                 |                                  from decoder       | + folding |
                 |       +----------------------+                      +-----------+
                 +-------|  DB-Cache (64 lines) |<---------- line write ----+
                         +----------------------+
                                  | hit: line of up to 5 uops
                                  v
                         +----------------------+     +----------------------+
                         |  issue_unit          |---->| stack_cache 64 x 32  |
                         |  pair? ports, addrs  |     | 3 read / 2 write     |
                         +----------------------+     +----------------------+
                                  |                           |
                                  v                           v
                         int_alu slot 0, int_alu slot 1 --> write back
```

| module | role |
|---|---|
| `jp_pkg` | micro-op and line types, event counters, bytecode length and decode functions |
| `icache` | 16 KB instruction store, aligned 8-byte reads one cycle after the address |
| `ibuffer` | 16-byte queue with a predecoded 4-bit length and a valid bit per byte |
| `length_decoder` | index adders and mux chain giving the end offsets of the first four instructions |
| `bytecode_decoder` | decodes up to four bytecodes from the top 7 bytes into micro-ops |
| `fold_logic` | longest-first pattern check, builds one folded micro-op |
| `fill_unit` | collects issued micro-ops into lines, folds them, writes the DB-Cache |
| `db_cache` | 64 direct-mapped lines, looked up by the address of the next bytecode |
| `issue_unit` | decides single or paired issue, computes every stack-cache address |
| `stack_cache` | 64-entry register file for locals and operand stack |
| `int_alu` | integer function and branch condition of one issue slot |
| `jcore_top` | the core: sequencing of both paths, commit, fetch redirection, counters |

## Micro-ops: one format for bytecodes and folded operations

Everything the core executes is a `jp_pkg::uop_t`. It has two sources and one
destination, and each says which area it touches:

| field | values |
|---|---|
| source `ka`, `kb` | `K_STACK` (pop), `K_LOCAL` (read local `ia`/`ib`), `K_IMM` (the 16-bit `imm`), `K_NONE` |
| destination `kd` | `D_STACK` (push), `D_LOCAL` (write local `id`), `D_NONE` |
| `alu` | pass, add, sub, mul, and, or, xor, shl, shr, ushr, neg |
| `br` | none, goto, eq, ne, lt, ge, gt, le; compares `a` with `b`, or with 0 when `kb` is none |
| `pc`, `len`, `nbc` | address, bytes and number of bytecodes represented |

The decoder emits one micro-op per bytecode: `iload 4` is `push(local 4)`, `iadd` is
`push(pop + pop)`, `istore 7` is `local 7 <- pop`, `iinc 3,-1` is
`local 3 <- local 3 + imm`. When a micro-op has two stack sources, `a` is the second
entry from the top and `b` the top; with one stack source, that source is the top.

Folding only rewires operand fields. The classes are LD (push of a local or constant),
OP (binary ALU operation), ST (pop into a local), B1/B2 (conditional branch on one/two
stack values). Patterns are tried longest first:

| pattern | folded micro-op |
|---|---|
| LD LD OP ST | `local d <- x op y` |
| LD LD OP | `push(x op y)` |
| LD OP ST | `local d <- pop op x` |
| LD LD B2 | `branch if x ? y` |
| LD OP | `push(pop op x)` |
| OP ST | `local d <- pop op pop` |
| LD ST | `local d <- x` |
| LD B1 | `branch if x ? 0` |

A pattern with two constants does not fold, because a micro-op holds one immediate.
Since every operand field names its area, a stored micro-op carries the information
that stack disambiguation needs, and no separate marker bit is stored.

## How the fill unit builds a line

The fill unit sees the micro-ops the core issues from the normal decode path (up to two
per cycle, in program order) and has three phases:

1. **Collect.** Appends each micro-op whose address continues the line. The line closes
   when it holds five bytecodes, when a branch is appended (the branch is always the last
   entry), when a bytecode longer than three bytes (`goto_w`), a `return` or an
   unimplemented bytecode arrives (left out of the line), when the address stream jumps,
   or when the core starts issuing from the DB-Cache. A line of a single bytecode is
   dropped: one instruction is cheaper to take from the normal path.
2. **Fold.** One output entry per cycle. `fold_logic` looks at the next four collected
   micro-ops and emits either a folded micro-op or the first one unchanged. Patterns are
   only found inside one line. A four-bytecode pattern that starts late in a line and
   runs into the next line is lost, but a shorter pattern inside the line is still
   found.
3. **Write.** The line (tag = address of its first bytecode, up to five entries, next
   address) is written into the DB-Cache.

The next address is the address after the last stored bytecode. For a line that ends in
a conditional branch it is the fall-through address, and the branch target is in the
branch micro-op. For a line that ends in `goto` it is the goto target. Micro-ops that
arrive while the unit is folding or writing are not collected. The core does not wait
for the fill unit.

## Issue, dual issue and stack disambiguation

Each cycle the issue stage looks at the next two micro-ops. If the address of the next
bytecode hits in the DB-Cache, they come from that line, which then stays in a line
register while its remaining entries issue. Otherwise they come from the decoder. A hit
always takes priority over the decode path.

`issue_unit` issues the second micro-op together with the first when all of these hold:

* the first is not a branch, `return` or illegal micro-op, and the second is not a
  `return` or illegal micro-op;
* together they need at most three stack-cache reads (the register file has three read
  and two write ports);
* the second does not depend on the first:
  * without disambiguation (`sd_en = 0`): the first writes the stack (either area) and
    the second reads the stack (either area);
  * with disambiguation: the first writes the operand stack and the second reads it, or
    the first writes the local-variable area and the second reads it.

The core applies disambiguation when `sd_en` is set and the pair comes from a DB-Cache
line. The area marks of stored micro-ops cost no time at issue, whereas telling the two
areas apart on the decode path would add logic to a critical path. Decode-path pairs
always use the rule without disambiguation.

Dependencies are judged by area only; addresses are never compared. Reads happen before
writes in the same cycle, so anti-dependences never block a pair. Two writes to one
entry are resolved in program order (write port 1, the second micro-op, wins).

Addressing: local `i` lives at `VARS + i`; OPTOP is the first free entry and the stack
grows upward; addresses wrap modulo 64. The second micro-op is addressed from the OPTOP
the first leaves behind, so two pushes in one cycle land in consecutive entries.

Register read, execution and write-back happen in the issue cycle. A bundle containing
`imul` is held for `MUL_LAT` cycles before it commits, so a pair always waits for its
slower member.

## Fetch, instruction buffer and decode

The fetch stage reads aligned 8-byte blocks and writes the bytes from the fetch address
to the end of the block into the 16-byte buffer. It requests a block only when the
buffer is sure to have room for it, with at most one block in flight. Each byte gets the
length of the bytecode that would start at it as it enters the buffer. The decoder sees
the top 7 bytes. `length_decoder` turns the per-byte lengths into the end offsets
L0..L3 of the first four instructions: an adder per byte gives `a_i = i + l_i`, and
each `L_k` selects `a` at `L_(k-1)`. This serial mux chain is why the decode stage is
timing-critical, and why folding logic does not belong in it. An instruction is
decoded only when all its bytes are present. The lengths stored for bytes that have not
arrived yet are stale, so the decoder also requires the first byte of each instruction
to be valid; without that rule a stale zero length makes an empty "instruction" out of
bytes still to come. The buffer shifts by the end offset of the
last instruction issued.

Branches resolve at issue. Fetch always continues at the fall-through address: after a
DB-Cache hit it restarts at the line's next address, which is the target for a `goto`
line. A taken conditional branch, or a line exit to an address other than the
prefetched one, flushes the buffer and refetches. A `return` halts the core, and an
unimplemented bytecode halts it with `illegal` set.

## Interface and timing of the core (`jcore_top`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock, asynchronous active-low reset |
| `prog_we/addr/data` | byte write into the instruction store (load the program during reset) |
| `boot_pc`, `frame_vars`, `frame_optop` | loaded in the first cycle after reset: first bytecode, VARS, OPTOP |
| `sd_en` | stack disambiguation on (used for pairs issued from the DB-Cache) |
| `halted`, `illegal` | core stopped on `return` / on an unimplemented bytecode |
| `optop` | current OPTOP |
| `perf` | event counters (`jp_pkg::perf_t`): cycles, bytecodes, bundles, dual bundles, bundles from the DB-Cache, line hits, lines written, folds of 2/3/4, multi-cycle stall cycles, dependency-blocked pairs, pairs enabled only by disambiguation, redirects, idle cycles |

The stack cache is not reset; a program must write a local before reading it.
Local variables can be read in simulation as `dut.u_sc.mem[VARS + i]`.

Parameters (defaults): `IC_BYTES = 16384`, `DBC_LINES = 64`, `SC_ENTRIES = 64`,
`MUL_LAT = 3`. The line length (5), the 3-byte limit and the buffer sizes (16/8/7)
are fixed in the package and in the module parameters of `ibuffer` and
`bytecode_decoder`.

## What follows the architecture and what is this design's own

Taken from the architecture it implements: the fill unit and DB-Cache arrangement; a
64-line DB-Cache of lines of up to five bytecodes, each at most three bytes, with a
next-address field; lines closed at branches and filled only with more than one
bytecode; folding in the fill unit, longest pattern first, up to four bytecodes; a decode
stage without folding that handles 1-4 instructions from a 7-byte window of a 16-byte
buffer fed 8 bytes at a time; the index-adder length decoder; the 64-entry stack cache
with three read and two write ports; pairing of two independent instructions, with a pair
stalling for its slower member; the naive and disambiguated dependency rules; a 16 KB
instruction cache that always hits.

This design's own choices: the micro-op format and the implemented bytecode subset; the
folding pattern set beyond `iload; iload; iadd; istore`; a direct-mapped DB-Cache with a
full-address tag; storing micro-ops instead of 23-byte packed lines; the three-phase fill
unit; `goto` lines predicting their target; the three-read-port limit on pairs; collapsing
register read, execute, cache and write-back into the issue cycle (the reference pipeline
has six stages); branch resolution at issue with refetch; `MUL_LAT = 3`; halting on
`return`.

Not built: the data cache and its controller, the floating-point unit, the memory and
I/O interface, microcode and trap handling for complex bytecodes, spilling the stack
cache to memory, method invocation, and object, array and long/float bytecodes. The
instruction cache has no tags or miss path.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_icache` | byte writes, aligned block reads, read latency, address wrap |
| `tb_ibuffer` | random shift/append/flush against a queue model, lengths, valid bits, `wr_ready` |
| `tb_length_decoder` | random lengths against a sequential walk |
| `tb_bytecode_decoder` | field decoding of every bytecode group, partial instructions, window limit |
| `tb_fold_logic` | each pattern, longest-first priority, cases that must not fold |
| `tb_fill_unit` | line contents, folding, next address, 5-bytecode limit, closing rules |
| `tb_db_cache` | hit and miss, conflicts, write timing, reset |
| `tb_issue_unit` | pairing with and without disambiguation, port limit, addresses |
| `tb_stack_cache` | random three-read/two-write traffic, write-collision order |
| `tb_int_alu` | every function and condition on random operands |
| `tb_jcore_top` | whole core, default parameters, see below |
| `tb_dbc_sweep` | three cores with 64, 256 and 1024 DB-Cache lines on a generated workload |

`tb_jcore_top` loads a 125-byte program: initialisation, a ten-iteration loop with
foldable runs, an `imul`, `iinc` and an `if_icmplt` back edge, then `goto_w`, shifts,
logic operations, `pop`, `nop`, a not-taken and a taken branch, and a short second loop
before `return`. A
plain bytecode interpreter (`tb/jvm_ref_pkg.sv`) runs the same program. The test runs the core
with disambiguation on and then off. In both runs the eight locals, the final OPTOP and
the number of completed bytecodes must match the interpreter. It also requires that line
writes, line hits, 2-, 3- and 4-bytecode folds, multi-cycle stalls, dual issue,
dependency-blocked pairs, disambiguation-only pairs (and none with it off) and redirects
all occur, and that disambiguation is not slower. On this program the core needs 293
cycles for 358 bytecodes with disambiguation and 301 cycles without.

`tb_dbc_sweep` generates a loop of 120 short basic blocks, each three
load/load/op/store runs closed by a conditional branch to the next bytecode, and runs it
four times on three copies of the core that differ only in `DBC_LINES`. Its decoded form
needs several hundred lines, more than the smallest cache holds. All three copies must
match the interpreter. A larger cache must not write more lines, issue fewer bundles from
the DB-Cache or take more cycles, and the 64-line cache must be slower than the
1024-line one. Measured throughput:

| DB-Cache lines | cycles | bytecodes per cycle | bundles from the DB-Cache | lines written |
|---|---|---|---|---|
| 64 | 7187 | 0.94 | 30 | 952 |
| 256 | 6425 | 1.05 | 791 | 739 |
| 1024 | 5454 | 1.24 | 1587 | 551 |

The lines are direct-mapped by the low bits of the start address, so the small cache
loses most of its lines to conflicts before they are reused. This is the same trend as the
size sweep that motivates the DB-Cache, but on a synthetic loop; the real benchmark
programs cannot run on this core.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/jp_pkg.sv tb/jvm_ref_pkg.sv \
          tb/tb_jcore_top.sv --top-module tb_jcore_top -o sim
./obj_dir/sim
```

Any other testbench builds the same way: list `rtl/jp_pkg.sv` (and
`tb/jvm_ref_pkg.sv` for the two whole-core tests) and the testbench, and the tool
finds the modules in `rtl/` through `-Irtl`. To add a bytecode, extend
`bc_len` and `decode_bc` in `jp_pkg`. A new folding pattern is one more branch in
`fold_logic`. The DB-Cache size is `DBC_LINES`.
