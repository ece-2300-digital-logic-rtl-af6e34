# A five-stage pipelined 16-bit processor and a direct-mapped cache

This RTL covers two textbook pieces of computer organisation.

1. **A five-stage pipelined processor** (IF, ID, EX, MEM, WB). It executes one 16-bit instruction
   per cycle and inserts a bubble only when forwarding cannot supply a value in time. Branches are
   compared and resolved in the decode stage, and the ISA has a branch delay slot, so a taken
   branch costs no cycles. Two small combinational units keep the pipeline correct. The
   *forwarding unit* steers four bypass multiplexers. The *hazard detection unit* holds the front
   of the pipe and injects a NOP when a value is not ready yet.
2. **A direct-mapped cache** with a valid bit, a tag and a data block per entry. Its default size
   is 1024 blocks of 4 bytes for 32-bit addresses: a 20-bit tag, a 10-bit index and a 2-bit byte
   offset. It returns a hit in the request cycle and refills a block from main memory on a miss.
3. **The processor with caches.** An instruction cache sits in IF and a data cache in MEM, both in
   front of main memory. While every access hits, the processor runs exactly as it does on ideal
   memories. On a miss the whole pipeline freezes until the block has been refilled.

Both designs are parameterised SystemVerilog-2017. Every block has a self-checking testbench that
runs under Verilator.

## Instruction set

All instructions are 16 bits wide and come in two formats:

```
register-register   | OP 15:12 | RS 11:9 | RT 8:6 | RD 5:3 | FUNCT 2:0 |
immediate           | OP 15:12 | RS 11:9 | RT 8:6 |     IMM 5:0      |
```

There are eight 16-bit registers R0–R7, all ordinary (there is no hard-wired zero register). The
register file reads RS on port SA and RT on port SB. The destination DR is RD in the
register-register format and RT in the immediate format. IMM is sign-extended (SE).

The field layout is fixed by the formats above. **The opcode numbers are this design's own
choice**, defined in `rtl/cpu_pkg.sv`:

| OP   | instruction          | effect                                      |
|------|----------------------|---------------------------------------------|
| 0000 | ADD/SUB/AND/OR rd,rs,rt | FUNCT 000/001/010/011; RD ← RS op RT     |
| 0001 | ADDI rt,rs,imm       | RT ← RS + SE(imm)                           |
| 0010 | LW rt,imm(rs)        | RT ← M[RS + SE(imm)]                        |
| 0011 | SW rt,imm(rs)        | M[RS + SE(imm)] ← RT                        |
| 0100 | BEQ rs,rt,imm        | if RS == RT: PC ← PC+2 + SE(imm)            |
| 0101 | BNE rs,rt,imm        | if RS != RT                                 |
| 0110 | BGEZ rs,imm          | if RS ≥ 0 (sign bit clear)                  |
| 0111 | BLTZ rs,imm          | if RS < 0                                   |
| 1111 | NOP                  | nothing; unused opcodes and FUNCT values act the same |

Addresses are byte addresses. The PC steps by 2. Memory accesses are whole 16-bit words: bit 0 of
the address is dropped, and addresses wrap modulo the memory size. The branch offset is a byte
offset added to PC+2 without a shift, so useful offsets are even.

**The delay slot.** The instruction after a branch always executes. If the branch is taken,
execution continues at the target after that instruction. Never place a branch in a delay slot:
the hardware does not forbid it, but what it does is not defined. **There is no load delay slot:**
the hardware stalls instead.

## Pipeline organisation (`rtl/pipe_core.sv`)

The pipeline is `pipe_core`, which reaches both memories through request/ready ports. It is used
in two ways:

* `pipe_cpu` attaches single-cycle instruction and data RAMs, which are always ready;
* `cached_cpu` attaches the two caches.


| stage | hardware                                                                           |
|-------|------------------------------------------------------------------------------------|
| IF    | PC, +2 incrementer, PC multiplexer (PCJ picks the branch target), instruction RAM  |
| ID    | decoder + SE, register file, two forwarding muxes, branch Adder and `=?` comparator, control unit, hazard detection unit |
| EX    | two forwarding muxes, MB mux (register or immediate), ALU                          |
| MEM   | data RAM (written when MW is set), MD mux (memory or ALU result)                   |
| WB    | register file write port (LD, DR)                                                  |

The pipeline registers IF/ID, ID/EX, EX/MEM and MEM/WB are packed structs (`if_id_t`, `id_ex_t`,
…). They are declared in `cpu_pkg` next to the control word `ctrl_t`. The control unit builds that
control word in ID. It carries F and MB for EX, MW and MD for MEM, and LD for WB, together with
class flags (load, store, which sources are read) for the hazard and forwarding units.

In `pipe_cpu` both memories are read combinationally within their stage, as single-cycle RAMs.
The instruction RAM has a write port (`prog_*`) for loading a program while reset is held. Observation ports
(`dbg_reg_*`, `dbg_mem_*`, `stall`, `stall_cause`, `branch_taken`, `fwd_*`) are only for test and
debug.

**Timing.** After reset (synchronous, active high), instruction *k* is fetched in cycle *k*+1 and
writes back in cycle *k*+5, plus one cycle for every bubble inserted before it.

### Forwarding (`rtl/forwarding_unit.sv`)

This is the part that takes the most care. The register file is written at the clock edge that
ends WB, and it is read in ID. Values therefore have to be bypassed from three places: the ALU
result waiting in EX/MEM ("MEM"), the write-back value in MEM/WB ("WB"), and, for a branch, the
register file read itself.

| path    | condition                                        | used for |
|---------|--------------------------------------------------|----------|
| MEM→EX  | instruction in MEM writes the register the EX instruction reads, and is not a load | back-to-back ALU dependences |
| WB→EX   | instruction in WB writes a register the EX instruction reads | distance-2 dependences, and load results after a load-use bubble |
| MEM→ID  | as MEM→EX, for the ID instruction                | an ALU result needed by a branch one instruction later (after its bubble), or two later |
| WB→ID   | instruction in WB writes a register the ID instruction reads | the register file write happens one edge too late for an instruction reading it in the same cycle |

The ID muxes feed both ID/EX and the branch comparator. Their output is therefore a correct
operand for a branch, and a head start for everything else. When MEM and WB both write the same
register, MEM wins because it holds the newer value. A load in MEM has no data yet, so a match on
it forwards nothing. Either the hazard unit has already stalled the consumer, or the value reaches
the consumer through WB→EX one cycle later.

**Store data.** A store's data operand (RT) is taken from the output of the EX forwarding mux, not
straight from ID/EX. A store therefore gets its data forwarded exactly like an ALU operand.

### Bubbles (`rtl/hazard_unit.sv`)

A bubble deasserts PCL and IF/IDL, so IF and ID hold their instructions, and asserts Clear, which
loads a NOP into ID/EX. It is inserted in these cases:

| producer → consumer                                  | bubbles | after the bubble the value comes from |
|------------------------------------------------------|---------|---------------------------------------|
| load → next instruction reading it (R-type, ADDI, load address, store address, store data) | 1 | WB→EX |
| ALU instruction → next instruction, a branch reading it | 1    | MEM→ID                                |
| load → next instruction, a branch reading it         | 2       | WB→ID                                 |
| load → branch two instructions later                 | 1       | WB→ID                                 |

Every other dependence costs nothing. `stall_cause` reports which case fired: `HZ_LOAD_USE`,
`HZ_ALU_BRANCH` or `HZ_LOAD_BRANCH`; the second bubble of a load followed by a branch is an
`HZ_LOAD_BRANCH`.

### Smaller blocks

* `alu.sv`: ADD, SUB, AND and OR on 16 bits, selected by a 2-bit F.
* `regfile.sv`: 8 × 16 bits, two combinational read ports, one write port, reset to zero.
* `decoder.sv`: extracts the fields, chooses DR and sign-extends IMM.
* `control_unit.sv`: the control table, plus PCJ from `=?` and the sign bit.
* `branch_unit.sv`: target adder, equality comparator and sign bit.
* `inst_ram.sv`, `data_ram.sv`: 256 words each by default (`IMEM_WORDS`, `DMEM_WORDS`).

## Direct-mapped cache (`rtl/dm_cache.sv`)

```
 ADDR_W-1                OFFSET_BITS+INDEX_BITS  OFFSET_BITS      0
 |         tag          |         index         |  byte offset   |
```

With 2^`INDEX_BITS` blocks of 2^`OFFSET_BITS` bytes, the cache holds 2^(INDEX_BITS+OFFSET_BITS)
bytes. The index selects one entry. The access hits when that entry's valid bit is set and its
stored tag equals the address tag.

* **Read hit:** `cpu_ready` rises in the request cycle with the selected word on `cpu_rdata`.
* **Read miss:** the whole block is read from memory, stored with the address tag, and the valid
  bit is set. The access is then looked up again and hits.
* **Write hit:** the word is written into the block and also sent to memory (write-through).
  `cpu_ready` rises when memory acknowledges.
* **Write miss:** the block is first brought in and tagged (write-allocate), then the access is
  written as on a hit.

Latency, with memory answering in its *L*-th request cycle: read hit 0 wait cycles, read miss
*L*+1, write hit *L*, write miss 2*L*+1.

**Handshakes.**

* On the CPU side, `cpu_req` and its address and data must stay stable until `cpu_ready`.
* On the memory side, `mem_req` stays high until a one-cycle `mem_ready`.
* A memory read returns one block on `mem_rdata`, with word 0 in the low bits.

Assertions in the RTL check both rules. Blocks larger than one word are supported
(`OFFSET_BITS` > 2 with 32-bit words), and the word inside a block is chosen from the offset bits.
Accesses are aligned whole words; sub-word accesses are not supported. Reset clears the valid bits
only.

## Caches in the pipeline (`rtl/cached_cpu.sv`)

`cached_cpu` connects `pipe_core` to two `dm_cache` instances. Both use the same geometry: 1024
blocks of 4 bytes on the processor's 16-bit byte addresses. A block is therefore two 16-bit words
and the tag is 4 bits. Each cache has its own main-memory port (`i_mem_*`, `d_mem_*`).

**The freeze.** It is the one new mechanism:

* The core freezes when the fetch is not ready, or when the instruction in MEM is a load or store
  that is not ready.
* While frozen, the PC and all four pipeline registers hold, and the register file is not written.
  A frozen cycle therefore changes nothing visible. Hazard bubbles, forwarding and results are
  exactly those of the ideal-memory pipeline; only time passes.
* A hazard bubble that would be inserted during a freeze waits until the freeze ends.
* The two caches work independently. An instruction miss and a data miss can refill at the same
  time, and the pipeline restarts when both are done.
* Every store waits for its write to reach memory (write-through). Once a store has been
  acknowledged, the core stops requesting it, even if the freeze continues for a fetch. This keeps
  the store from being written twice.
* A load whose data arrived keeps its request up while the fetch finishes. This is harmless,
  because it keeps hitting.

**Cost of a miss.** With memory answering in *L* cycles, an instruction miss or a load miss
freezes the pipeline for *L*+1 cycles. A store costs *L* on a hit and 2*L*+1 on a miss.

**Limits.**

* The instruction cache is never written, so code that modifies itself is not seen by the fetch.
* Sharing one DRAM between the two memory ports would need an arbiter outside this module.

## Top level (`rtl/lec20_top.sv`)

`lec20_top` places three units side by side on one clock and reset, and brings out all of their
ports:

* `pipe_cpu`: the processor on ideal memories;
* `cached_cpu`: the processor with caches, with ports prefixed `cc_`;
* the stand-alone `dm_cache`, at its 32-bit defaults.

Main memory is outside the design, so every cache's memory port leaves the top. The units share no
other signals.

## Where this RTL departs from, or goes beyond, the reference design

These are this design's own choices:

* opcode and FUNCT values;
* the 16-bit data width, with no zero register;
* BNE and BLTZ, the complements of BEQ and BGEZ on the same comparator and sign bit;
* memory sizes of 256 words;
* synchronous reset;
* the load and observation ports;
* write-through for the cache, and both handshakes;
* the freeze on a cache miss;
* the cache geometry narrowed to 16-bit addresses inside `cached_cpu`.

The hazard unit also goes further than the partial unit usually drawn, which has only a load in
EX against an R-type in ID. It covers every instruction class, and the MEM-stage load against a
branch. The forwarding conditions are likewise generalised from "R-type" to "writes a register".

Not built:

* Main memory (DRAM) itself. It is a technology rather than logic, so it stays outside the RTL.
  The testbenches use a behavioural model with a fixed latency, `tb/main_mem_model.sv`.
* An arbiter that would let one main memory serve both caches. Each cache has its own port.
* The earlier datapath in which store data is read from ID/EX before the EX bypass muxes. Only
  the improved path is built: store data is taken after the forwarding mux, so a value computed
  by the instruction just before a store reaches the store without a bubble.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_alu`, `tb_regfile`, `tb_inst_ram`, `tb_data_ram`, `tb_decoder`, `tb_control_unit`, `tb_branch_unit` | the block against values computed in the testbench, directed and random |
| `tb_hazard_unit`, `tb_forwarding_unit` | each case in the tables above, then random inputs against a reference function |
| `tb_pipe_cpu` | see below |
| `tb_dm_cache` | see below |
| `tb_cached_cpu` | see below |
| `tb_lec20_top` | see below |

* **`tb_pipe_cpu`** runs the classic hazard examples: a load followed by R-types, R-type to R-type
  forwarding, R-type to branch, load/ALU followed by branch, loads followed by stores and loads,
  and a counted loop. It checks the bubbles of each kind and the write-back cycle. It then runs 40
  random programs and compares registers, the whole data memory and the bubble count with the
  instruction-level model in `tb/tb_isa_pkg.sv`. That model derives the required bubbles from the
  dynamic instruction stream, independently of the RTL.
* **`tb_dm_cache`** uses 8 blocks of 8 bytes, with `tb/main_mem_model.sv` as memory. It checks the
  block-address-modulo-8 mapping (blocks 00001, 01001, 10001 and 11001 share entry 001), hit and
  miss, the data of every read, and each latency.
* **`tb_cached_cpu`** runs the processor with caches at the default geometry, with memory
  latency 4. It runs directed fetch, load/store, conflict and loop programs, then 40 random
  programs. Results and bubble counts are compared with the instruction-level model. The timing is
  checked against a reference direct-mapped cache, which replays the model's fetch and data
  sequences and predicts:
  * the misses of each cache;
  * the exact number of cycles each cache makes the core wait;
  * the number of refills and of write-through writes.
* **`tb_lec20_top`** runs the top at its default sizes. Both processors run the examples and random
  programs together, and the 32-bit cache serves 4000 random accesses. Each mechanism must occur at least once:
  three bubble kinds, four forwarding paths, taken branches, instruction and data misses of the
  cached processor, frozen cycles, read and write hits and misses, and evictions.

To run one with Verilator (here the top; the others are alike):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cpu_pkg.sv tb/tb_isa_pkg.sv rtl/*.sv tb/main_mem_model.sv tb/tb_lec20_top.sv \
  --top-module tb_lec20_top -o sim && ./obj_dir/sim
```

Every testbench finishes in well under a second. Verilator's lint (`-Wall`) reports only unused
address bits and unused package constants.
