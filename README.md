# Zicfiss shadow-stack unit for a 64-bit RISC-V core

A return-address overwrite is one of the oldest ways to hijack a program: corrupt
the saved return address on the stack, and the function's `ret` jumps wherever
the attacker wants. A shadow stack blocks this. Every call also pushes the return
address onto a second stack that ordinary stores cannot reach. Every return checks
its link register against the copy it pops from that stack. If the two differ, the
return address was tampered with, and the core raises a *software-check* exception
instead of returning.

The RISC-V Zicfiss extension defines the instructions for this:

- `SSPUSH x1|x5` is placed by the compiler at the start of each call.
- `SSPOPCHK x1|x5` is placed before each return.

It also defines the state behind them: the shadow stack pointer `ssp`, and
per-privilege enables. This repository implements that state and behaviour as a
self-contained unit for the commit stage of an application-class, 64-bit, speculatively executing core
(written with CVA6 in mind). The unit does not include the core. It connects to the
core's decode stage, commit stage and CSR path through plain ports.

## What happens to one call and one return

1. **Decode.** `ss_decoder` recognises the two instruction words and says which
   link register (`x1` or `x5`) they name. The host pipeline reads that register
   and carries its value with the instruction to commit, like any other operand.
2. **Commit.** When the instruction reaches the head of the commit stage, the host
   presents it on `commit_valid_i`/`commit_op_i`/`commit_operand_i`. In that same
   cycle `ss_ctrl` works out what the instruction would do:
   - `SSPUSH`: the new top is at `ssp - 8`, and the link register value goes into it.
   - `SSPOPCHK`: the entry at `ssp` is read, compared with the link register, and
     `ssp` moves to `ssp + 8`.

   Any exception is reported on `ex_o` in that cycle.
3. **Retire.** The host raises `commit_ack_i` if it retires the instruction. The
   memory write and the new `ssp` take effect on that clock edge, and only then.
   The unit also requires `flush_i` low and no exception on `ex_o`.

Everything is single-cycle. There are no internal pipeline registers, so the unit
adds no commit latency, and it handles one instruction per cycle.

## Why updates wait for retirement

The host core predicts branches and executes past them. A call on a
mispredicted path would push a return address that the program never produces. A
return squashed by an earlier exception would pop an entry that is still live.
Either leaves the shadow stack out of step with the real stack. Every return after
that would then raise a false alarm, or fail to catch a real one.

The unit therefore has no speculative state at all. The shadow stack memory and
`ssp` change only on the clock edge where the instruction retires. An instruction
killed by a misprediction, an exception or a pipeline flush therefore leaves nothing
behind, and nothing needs rolling back. The cost is that the check happens at commit
and not earlier. The unit asserts (SVA) that the host never acknowledges an
instruction for which it reported an exception.

## Privilege gating

Shadow-stack instructions are active only where software has switched them on:

| mode       | active when                          |
|------------|--------------------------------------|
| machine    | never                                |
| supervisor | `menvcfg.SSE` = 1                    |
| user       | `menvcfg.SSE` = 1 and `senvcfg.SSE` = 1 |

Where they are inactive, `SSPUSH` and `SSPOPCHK` retire as no-ops. They raise no
exception and change no state. This lets instrumented binaries run on a system that
has not enabled the feature.

The usual bring-up is:

1. Machine mode writes `ssp` and sets `menvcfg.SSE`.
2. The supervisor sets `senvcfg.SSE` for the user context.

`senvcfg.SSE` reads as zero, and has no effect, while `menvcfg.SSE` is clear.
Clearing `menvcfg.SSE` also clears `senvcfg.SSE`.

The `ssp` CSR follows the same rules. Machine mode may always read and write it.
Supervisor mode needs `menvcfg.SSE`. User mode needs both bits. `senvcfg` is
accessible from supervisor and machine mode, and `menvcfg` from machine mode only.
A forbidden access raises illegal-instruction (cause 2, tval 0) and changes
nothing.

| CSR       | address | held here                    |
|-----------|---------|------------------------------|
| `ssp`     | 0x011   | all 64 bits                  |
| `senvcfg` | 0x10A   | bit 3 (SSE) only             |
| `menvcfg` | 0x30A   | bit 3 (SSE) only             |

The other `envcfg` bits belong to the host CSR file. They read as zero from this
unit, so the host ORs its own bits into the read value. `csr_hit_o` tells the host
that an address is one of these three.

## Exceptions

| cause | tval | when |
|-------|------|------|
| 18 software check | 3 (shadow-stack fault) | `SSPOPCHK` finds a different value at `ssp` |
| 7 store/AMO access fault | `ssp - 8` | `SSPUSH` with `ssp` not 8-byte aligned |
| 5 load access fault | `ssp` | `SSPOPCHK` with `ssp` not 8-byte aligned |
| 2 illegal instruction | 0 | forbidden CSR access |

The unit only reports these exceptions. The host takes the trap, and system software
decides what to do. A software-check exception is normally fatal to the process.

## The stack storage

The shadow stack is not kept in main memory. It lives in an internal memory of
`SS_DEPTH` 64-bit words (default 256, i.e. 16 Kibit), built from flip-flops
(`ss_mem`). It has one combinational read port for the check and one write port for
the push. The entry for address `a` is word `a[3 +: log2(SS_DEPTH)]`.

`ssp` is still a full 64-bit address, and software can place the stack anywhere.
The memory, however, holds only the most recent `SS_DEPTH` entries:

- **Deeper nesting wraps around.** A call nested `SS_DEPTH + 1` deep overwrites the
  oldest entry. When the program eventually returns through that frame, the check
  fails with a software-check exception. Entries are never silently lost and then
  accepted, but a legitimately deep program faults. Size `SS_DEPTH` for the deepest
  call chain you expect. It must be a power of two.
- **The entries are not saved or restored.** A context switch that changes `ssp`
  therefore does not preserve another context's entries unless software saves and
  restores them. Nothing in this unit does that.

Shadow-stack pages in the MMU (`pte.xwr = 010`) and PMP/PMA rules for shadow-stack
accesses are not implemented. They would only matter if the stack were moved into
main memory.

## Module overview

```
zicfiss_unit              top: wiring, exception merge
├── ss_decoder            SSPUSH / SSPOPCHK recognition (combinational)
├── ss_priv_enable        per-mode enable (combinational)
├── ss_csr                ssp, menvcfg.SSE, senvcfg.SSE, access rules
└── ss_ctrl               commit-stage push / pop-check / exceptions
    └── ss_mem            SS_DEPTH x 64 storage
zicfiss_pkg               types (privilege, ops, exception record), CSR
                          addresses, cause codes, instruction encodings
```

The encodings it decodes are `SSPUSH` = `0xCE104073` (x1) / `0xCE504073` (x5), and
`SSPOPCHK` = `0xCDC0C073` (x1) / `0xCDC2C073` (x5). These are the may-be-operation
encodings of the SYSTEM opcode. Only these 32-bit forms are decoded. The compressed
forms must be expanded by the host first. `SSRDP` and `SSAMOSWAP` are not
implemented.

### `zicfiss_unit` ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_i`, `rst_ni` | in | 1 | clock; asynchronous active-low reset (extension off, `ssp` = 0) |
| `priv_lvl_i` | in | 2 | current mode (U=0, S=1, M=3) |
| `dec_instr_i` / `dec_o` | in / out | 32 / 8 | decode-side recognition: `is_ss`, `op`, `rs_idx` |
| `commit_valid_i`, `commit_op_i`, `commit_operand_i` | in | 1, 2, 64 | shadow-stack instruction at the head of commit, with its link-register value |
| `csr_valid_i`, `csr_addr_i`, `csr_op_i`, `csr_wdata_i` | in | 1, 12, 2, 64 | CSR instruction at the head of commit (read/write/set/clear) |
| `csr_hit_o`, `csr_rdata_o` | out | 1, 64 | address belongs here; old value |
| `commit_ack_i`, `flush_i` | in | 1 | head instruction retires / is killed |
| `ex_o` | out | 129 | `{valid, cause[63:0], tval[63:0]}` for the head instruction |
| `sse_active_o`, `ssp_o` | out | 1, 64 | status |

Only one of `commit_valid_i` and `csr_valid_i` may be high in a cycle (asserted).

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/zicfiss_pkg.sv tb/tb_zicfiss_unit.sv \
  --top-module tb_zicfiss_unit
./obj_dir/Vtb_zicfiss_unit
```

`tb_zicfiss_unit` runs the whole unit at its default size. It acts as the host core
and follows a bare-metal test program:

- no-ops before enablement and in machine mode;
- machine-mode `ssp` setup, then supervisor, then user enablement;
- nesting 256 calls deep and unwinding (x1 and x5 mixed);
- a corrupted return address;
- forbidden CSR accesses;
- a misaligned `ssp`;
- flushed pushes and pops;
- the wrap-around at 257 levels;
- 3000 random mixed steps across the three modes.

A reference model inside the testbench predicts every exception, CSR value and
`ssp`. The testbench counts each of these mechanisms and fails if one never
occurred. The block testbenches add the following:

- `tb_ss_decoder`: near-miss encodings and random words.
- `tb_ss_priv_enable`: exhaustive truth table.
- `tb_ss_mem`: full fill, plus random traffic with idle clock edges.
- `tb_ss_csr`: the access-rule walk.
- `tb_ss_ctrl`: random call/return traffic with flushes, missing acknowledges,
  inactive mode and misaligned `ssp`.

`tb_cfi_program` is an application-level workload. It runs 40 user programs,
each a random walk of instrumented calls and returns up to 200 frames deep. The
return addresses are saved on an ordinary software stack. In every other program,
an "attack" overwrites one saved return address at a random moment. The test checks
three things:

- the software-check exception fires exactly at that frame's return, and never
  elsewhere;
- clean programs end with `ssp` back where it started;
- every call/return pair costs exactly two shadow-stack instructions.

All testbenches pass. Each one also fails when its module is replaced by an empty
shell, or when a single deliberate bug is put into it.

## What is specified and what is chosen here

**Following the original integration study:**

- a commit-stage controller backed by an internal memory of 256 × 64 bits;
- pushes and pop/checks applied only on retirement, with killed instructions leaving
  no effect;
- a mismatch reported as a software-check exception;
- user-mode enablement through `senvcfg.SSE`, written from supervisor mode;
- privilege-aware `ssp` access rules and `ssp` alignment checks;
- machine, supervisor and user modes only. Virtualised modes (VS/VU, `henvcfg`) are
  not supported.

**Taken from the RISC-V Zicfiss and privileged specifications:**

- instruction encodings;
- CSR addresses and the SSE bit position;
- the exact enable and access rules;
- cause 18 and tval 3.

**Chosen in this implementation:**

- flip-flop storage with a combinational read;
- the modulo indexing and wrap-around;
- which access fault a misaligned `ssp` raises, and its tval;
- tval 0 for illegal CSR accesses;
- reset values;
- storing only the SSE bits of the `envcfg` CSRs;
- the port list and the single-cycle commit handshake.

For area, the default configuration synthesises to 16,384 memory bits for the stack
plus 66 flip-flops (`ssp` and the two enables). The unit has no timing-critical
path beyond one 64-bit compare and one 64-bit add/subtract at commit. It has not
been checked against a particular core's clock.
