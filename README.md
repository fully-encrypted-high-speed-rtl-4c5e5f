# An encrypted-computing OpenRISC processor

This processor runs user programs whose data never appears in the clear
outside the processor. Every data word in memory, and every constant written
into the program, is a 64-bit RC2 ciphertext that hides a 32-bit value.
Memory addresses built from that data are hashed and renumbered before they
reach the memory bus. The operator and the operating system run unencrypted
in supervisor mode. They can see and change everything in memory, but they
only ever see ciphertext, hashed addresses and program code.

The core idea is to stretch the arithmetic unit over time. Decrypting,
computing and re-encrypting on every operation would put a codec in front of
and behind every ALU use. Instead, user-mode arithmetic runs on plaintext
kept in *shadow registers*, which supervisor code cannot name. The codec is
used only where data crosses the boundary:

- decryption when a word is loaded or an encrypted constant is first used;
- encryption, with fresh random padding, when a word is stored.

Between those points, a run of user arithmetic costs no cryptography at all.
The codec is a ten-stage pipeline laid into the processor pipeline itself,
so one encryption or decryption can finish every cycle.

## Two modes, two register banks

| | supervisor mode | user mode |
|---|---|---|
| semantics | OpenRISC 64-bit, unencrypted | OpenRISC 32-bit, encrypted |
| registers | 32 real 64-bit GPRs and flag | 32 shadow 32-bit GPRs and flag |
| constants | in the clear | 64-bit ciphertext, split across two prefix words and the 16-bit immediate |
| data addresses | byte address of a 64-bit word | hashed, then renumbered by the TLB |
| stores | value as is | value encrypted with 32 bits of padding |

Each instruction carries its mode through the pipeline. Every
register-file port is steered to the real or shadow bank by the mode of the
instruction using it. Instructions of both modes can therefore be in flight
at once, for example just after `l.sys` or `l.rfe`. Forwarding only
matches producers and consumers of the same mode.

Loading a new key (`key_we`) marks a change of user. It zeroes the shadow
registers and flag, and empties the decrypted-immediate cache and the TLB. A
new user thus never inherits the previous user's plaintext.

Mode changes:

- `l.sys` in user mode traps to 0xC00 in supervisor mode, with EPCR (SPR 32)
  holding the next PC.
- `l.rfe` in supervisor mode jumps to EPCR in user mode.
- A full TLB traps to 0x900, with EPCR pointing at the
  faulting instruction. That instruction is retried after `l.rfe`.
- Reset starts at 0x100 in supervisor mode.
- `l.nop 1` stops the processor (the OpenRISC simulator convention). The stop
  takes effect when the instruction reaches the last pipeline slot, so every
  older instruction has completed.

## Instruction format changes

Instructions stay 32 bits. Four formats differ from OpenRISC:

| format | [31:26] | [25:21] | [20:16] | [15:0] |
|---|---|---|---|---|
| prefix (opcode 0x1C) | opcode | 2-bit fill in [25:24], then ciphertext fragment [23:0] | | |
| shift immediate (0x2E) | opcode | destination | source | 16-bit ciphertext fragment (user); in the clear: kind in [7:6], amount in [5:0] |
| load / store (0x22, 0x21, 0x35) | opcode | load: destination; store: data register | address register | fill (no displacement) |
| move to SPR (0x30) | opcode | SPR number bits [15:11] | zero fill | source register in [15:11], SPR number bits [10:0] in [10:0] |

A user-mode constant is a 64-bit ciphertext C:

- the first prefix holds C[63:40];
- the second prefix holds C[39:16];
- the 16-bit immediate field of the instruction that uses it holds C[15:0].

A constant that decrypts to a shift holds the shift kind in bits [7:6] and
the amount in [5:0]. The kind of shift is therefore hidden too. Loads and
stores have no displacement, so `lws r1,4(r3)` is written as two prefixes,
an `addi r31,r3,E(4)` and `lws r1,0(r31)`. The prefix opcode 0x1C is this
design's choice.

Supervisor mode treats a prefix as a no-op, and its immediates are in the
clear. User mode treats `l.rfe` as a no-op and drops writes to SPRs.

Integer instructions built:

- `l.j`, `l.jal`, `l.bf`, `l.bnf`, `l.nop`, `l.sys`, `l.rfe`, `l.mtspr`;
- `l.lwz`, `l.lws`, `l.sw`;
- `l.addi`, `l.andi`, `l.ori`, `l.xori`, `l.muli`;
- the shift and rotate immediates;
- `l.sfXXi` and `l.sfXX` compares;
- `l.add`, `l.sub`, `l.and`, `l.or`, `l.xor`, `l.mul`, and register shifts and rotate.

Jumps and branches have no delay slot.

## The pipeline: one codec, two configurations

The core has STAGES+5 pipeline slots: 15 with the default ten-stage codec.
Every instruction passes through all of them, one slot per clock. The codec
occupies a run of STAGES slots. An instruction uses it either after its
execute step (type A) or before its register read (type B):

```
slot:    0      1       2     3        4 ... 13        14
type A:  Fetch  Decode  Read  Execute  codec 0..9      Write
type B:  Fetch  Decode  codec 0..9 (slots 2..11)  Read(12) Execute(13) Write(14)
```

Type B is a user instruction whose encrypted constant is not yet in the
decrypted-immediate cache. Its constant is decrypted first, and it then
reads registers and executes at the back of the pipeline. Everything else is
type A:

- user loads decrypt the memory word in the codec;
- user stores encrypt their value in the codec;
- register-to-register work skips the codec, and its result exists as soon
  as Execute (slot 3) ends.

There is one set of codec stage circuits, not two. Codec stage k serves
either the type-B instruction in slot 2+k or the type-A instruction in slot
4+k. Both can only want the same stage if a type-B instruction enters the
codec while a codec-using type-A instruction is exactly two slots ahead. In
that one case Decode holds the type-B instruction back for a cycle. An
assertion checks that the case never reaches the codec.

Hazards:

- **Forwarding.** In its Read slot (2 for A, 12 for B), an instruction takes
  each operand from the nearest older in-flight instruction of the same mode
  that writes that register. A result is available once that instruction
  has executed. For a load, it is available once the memory word has been
  read (supervisor) or decrypted (user). A value produced in the same cycle
  by the slot-3 or slot-13 ALU is passed on directly.
- **Dependency stall.** If the producer has not yet produced the value, the
  consumer waits in Read. It and all younger slots freeze, and a bubble
  moves ahead.
- **Memory order.** Stores write memory in the last slot. A load therefore
  waits in Read while any older store is still in flight.
- **In-order write.** All results are written to the register file in slot
  14, in program order, so there are no write-after-write hazards.
- **Branch prediction.** Fetch looks up each address in the branch
  prediction buffer. On a taken prediction it goes straight on at the stored
  target, so a correctly predicted taken branch costs no cycles.
- **Redirect.** Jumps and branches resolve in slot 3, where they also train
  the buffer. A wrong prediction, `l.sys`, `l.rfe` and TLB faults redirect
  from there and flush slots 0 to 3.

When several stalls apply, the oldest frozen slot wins. In order of
precedence: a halt freezes everything, then a type-B dependency at slot 12,
then a type-A dependency or memory-order stall at slot 2, then the codec
hold at slot 1.

## The codec

RC2 with a 64-bit block follows RFC 2268: 16 mixing rounds, with a mashing
round after the 5th and 11th. These 18 round operations are spread evenly
over STAGES combinational stage circuits (`rc2_stage`). Stage s performs
operations floor(18·s/STAGES) up to floor(18·(s+1)/STAGES)−1. Decryption
performs the inverse operations in reverse order on the same stages.

- **Block layout.** R[i] = block[16i+15:16i]. The 32-bit plaintext is in
  [31:0] and the padding in [63:32].
- **Padding.** It comes from a 32-bit Galois LFSR (polynomial 0x80200003)
  that steps on every user store. The same value stored twice therefore
  looks different in memory.
- **Key.** The key port takes the 64 × 16-bit expanded key. Key expansion
  and key delivery are outside the processor.

`rc2_codec` chains the stages into a stand-alone pipelined codec with a tag
that travels alongside. `enc_alu` is the literal one-operation form of the
encrypted ALU: two decrypting codecs, an ALU, a padding generator and an
encrypting codec. Its latency is 2·STAGES and it returns the compare flag in
the clear. The processor does not use `enc_alu`. It shows, and tests,
the function that the pipeline spreads out over time. `ecpu_top` carries
one beside the core, unconnected to it, with its own `xalu_*` ports and key
input.

## User addresses: hash, then first-come-first-served placement

A user load or store computes its address from a shadow register, so the
address is a plaintext 32-bit value. Before it leaves the execute slot, the
address goes through two steps:

1. `addr_hash` applies a keyed bijection of the 32-bit space: XOR with key
   bits, multiplication by two odd constants, two xor-shifts, and XOR with
   more key bits. Each step is invertible, so two addresses never collide.
2. `user_tlb` gives each new hashed address the next free slot in a linear
   region, on a first-come-first-served basis. A repeated address hits the
   slot it was given before. User word n lives at data-memory word
   USER_BASE+n (defaults: 64 slots at word 2048).

When all slots are used, a new address raises a TLB fault. This traps to
0x900 in supervisor mode before the instruction has any effect. The TLB holds
all its mappings itself. There is no backing table in memory for a handler
to page mappings in and out, so a handler can only stop the program or
reset the TLB with a key load.

## Decrypted-immediate cache

`imm_cache` is direct-mapped on the instruction's PC, 64 entries by default.
It is filled as a type-B instruction leaves the codec. On a later encounter
(a loop, say), Decode finds the constant already decrypted. The instruction
then runs as type A and uses its constant in Execute. The cache is
user-mode only and is emptied on a key load. It holds the 32-bit plaintext
constant rather than a rewritten instruction, so the prefixes are still
fetched but need no rewriting.

## Branch prediction buffer

The published machine reports hits and misses of a branch prediction buffer
without describing it. This one is a simple, conventional design:

- direct-mapped, 64 entries, indexed by address bits [7:2];
- each entry holds a tag (the rest of the address plus the mode), the target
  and a 2-bit saturating counter;
- a miss predicts "not taken";
- a resolved branch or jump that misses takes the entry, with its counter
  set to weakly taken or weakly not taken;
- a key change empties the table, so nothing learned from one user's code
  carries over to the next.

Because the mode is part of the tag, user and supervisor code never share an
entry. A stale hit on an address that is no longer a branch is undone at
Execute like any other wrong prediction.

## Modules

| module | role |
|---|---|
| `ecpu_pkg` | types, opcodes, vectors, event-counter struct, RC2 round functions |
| `ecpu_top` | core plus program memory and data memory; host ports for loading; a stand-alone `enc_alu` beside them |
| `ecpu_core` | the pipeline above |
| `rc2_stage` | one codec stage (combinational) |
| `rc2_codec` | stand-alone pipelined codec, latency STAGES |
| `enc_alu` | one-operation encrypted ALU (decrypt, ALU, encrypt) |
| `pad_gen` | 32-bit padding LFSR |
| `alu` | 64-bit (supervisor) / 32-bit (user) ALU with compare flag |
| `shadow_regfile` | real and shadow banks, 4 read ports, 1 write port |
| `instr_decoder` | decoder for the formats above, per mode |
| `addr_hash` | keyed bijective address hash |
| `user_tlb` | first-come-first-served address placement |
| `imm_cache` | decrypted-immediate cache |
| `branch_predictor` | branch prediction buffer |
| `instr_memory`, `data_memory` | single-cycle RAM arrays |

### `ecpu_top` interface

- `key_we`, `key_in`: load the expanded key. This also clears the shadows,
  the immediate cache, the TLB and the branch prediction buffer.
- `prog_we`, `prog_addr`, `prog_data`: write program memory. The address is a
  byte address.
- `host_addr`, `host_we`, `host_wdata`, `host_rdata`: word-addressed access to
  data memory, combinational read. A host write wins over a processor write
  to the same word.
- `halted`: set once `l.nop 1` completes.
- `user_mode`: the mode of the fetch side.
- `xalu_key`, `xalu_valid`, `xalu_op`, `xalu_x`, `xalu_y`: inputs of the
  stand-alone encrypted ALU.
- `xalu_out_valid`, `xalu_z`, `xalu_flag`: its outputs, 2·STAGES cycles
  later.
- `perf`: event counters:
  - cycles and user cycles;
  - committed user, supervisor, prefix and no-op instructions;
  - dependency, memory-order and codec stall cycles;
  - flushes;
  - encryptions, load decryptions, immediate decryptions and cache hits;
  - forwards;
  - TLB assignments and faults;
  - mode switches;
  - jumps and branches fetched on a taken prediction, and wrong predictions.

Reset is asynchronous and active low. Memories are combinational-read and
synchronous-write, standing in for caches that always hit.

Parameters of `ecpu_top` (defaults):

| parameter | default | notes |
|---|---|---|
| STAGES | 10 | codec stages |
| IMEM_WORDS | 4096 | 16 KB of program |
| DMEM_WORDS | 4096 | 64-bit words |
| TLB_ENTRIES | 64 | |
| IMC_ENTRIES | 64 | |
| USER_BASE | 2048 | |
| BP_ENTRIES | 64 | branch prediction buffer entries |

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference RC2 in
`tb/rc2_ref_pkg.sv` is a plain sequential coding of the RFC rounds, written
independently of the staged version.

| testbench | what it checks |
|---|---|
| `tb_rc2_codec` | random blocks and keys against the reference, both directions, back-to-back; latency exactly STAGES |
| `tb_enc_alu` | E(D(x) op D(y)) for all operations, padding varies, latency 2·STAGES |
| `tb_alu` | every operation in both widths against an independent model |
| `tb_shadow_regfile` | bank separation, 32-bit truncation, r0, shadow clear |
| `tb_instr_decoder` | fields and mode rules of every format |
| `tb_addr_hash` | reference computation; no collisions over 4096 addresses |
| `tb_user_tlb` | slot order, hits, no assignment without commit, fault when full, clear |
| `tb_imm_cache` | hits, misses on tag conflict, clear |
| `tb_branch_predictor` | random branch outcomes in both modes against a model of the table: hit, taken, target, counter saturation, eviction, clear |
| `tb_instr_memory`, `tb_data_memory` | write/read back; host priority |
| `tb_ecpu_core` | four random user programs of encrypted arithmetic, shifts, compares, branches, loads and stores (each body run twice, so the second pass hits the immediate cache), checked register by register and word by word against an instruction-level model; fetch-to-write latency STAGES+4 |
| `tb_ecpu_top` | end-to-end program at default parameters (below) |

`tb_ecpu_top` runs at the default parameters:

1. Supervisor code stores a value and enters user mode.
2. User code performs encrypted arithmetic, a store/load pair, a loop that
   reuses cached constants, and all four encrypted shift kinds.
3. The user program makes a system call. The supervisor handler stores its
   own r3, which must not be the user's r3, and returns.
4. The user program stores to fresh addresses until the TLB is full. The
   fault handler stores a marker and halts.

The testbench then reads memory through the host port and decrypts the user
region with the reference model. It also requires each mechanism to have
happened at least once: type-B decryption, cache hit, forwarding, each kind
of stall, flush, encryption, load decryption, TLB assignment and fault, mode
switches, a taken prediction and a wrong prediction. Last, it sends one
subtraction through the stand-alone encrypted ALU. It checks the decrypted
result, that the result is padded, and the 20-cycle latency.

A typical run takes 912 cycles, with:

- 379 forwards;
- 90 dependency-stall cycles;
- 12 memory-order stall cycles;
- 1 codec-hold cycle;
- 62 jumps and branches fetched on a taken prediction, 3 of them wrong;
- 7 flushes;
- 186 immediate-cache hits against 19 decryptions;
- 65 encryptions;
- 64 TLB assignments and 1 fault.

`tb_ecpu_core` has also been run with other codec depths by changing its
STAGES localparam, and it passes at every depth tried. The same four
programs take these cycle counts:

| codec stages | cycles, program 0 | cycles, program 3 |
|---|---|---|
| 1 | 777 | 738 |
| 5 | 897 | 916 |
| 10 | 1070 | 1155 |
| 20 | 1464 | 1657 |

Cycle counts grow with codec depth because a consumer of a type-B result
waits for the whole codec. Above 18 stages, some stages hold no round.

To simulate, for example the end-to-end test:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv \
  rtl/ecpu_pkg.sv tb/rc2_ref_pkg.sv tb/tb_ecpu_top.sv --top-module tb_ecpu_top
./obj_dir/Vtb_ecpu_top
```

Unit testbenches are built the same way. Replace the top module and file;
`rc2_ref_pkg.sv` is only needed by the codec, encrypted-ALU, core and top
benches.

## Where this design departs from the published architecture

- **Supervisor pipeline length.** Supervisor instructions run through all 15
  slots. The published machine skips the codec stages in supervisor mode and
  gets a 5-stage pipeline. Here, supervisor results are still forwarded from
  Execute, so the cost is in refill after a redirect, not in dependencies. The
  benefit is a single in-order write port.
- **No caches.** There is no instruction cache, no data cache (the published
  machine's are write-back and 8 MB) and no user-mode data cache. Memory is
  single-cycle, which matches the published measurements, where every
  access hit the cache.
- **Not built:**
  - the 64-bit fetch window that delivers an instruction with its two
    prefixes as one unit;
  - dynamic instruction reordering;
  - the secondary pipeline that executes both sides of a branch;
  - interrupts and shadow SPRs.
- **Placement table.** The TLB keeps its whole placement table on chip. The
  published machine keeps it in memory, caches it, and calls a handler on a
  miss.
- **Own choices where the architecture leaves details open:**
  - the hash function;
  - the RC2 round-to-stage split and block layout;
  - the padding generator;
  - the prefix opcode;
  - exception vectors;
  - the codec-conflict rule;
  - cache and memory sizes.
- **Alternative cipher configurations** (Paillier-72 homomorphic, AES-128)
  are not built. This is the RC2-64 configuration only.
- **Instruction coverage.** Only the integer subset listed above is built:
  - no byte or half-word access;
  - no division;
  - no carry or overflow flags, and no range exceptions.

  The OpenRISC compliance programs and Dhrystone therefore cannot run
  unchanged.
