# Hardware malloc/free and pointer resolution

C code that uses pointers and `malloc`/`free` assumes one flat memory. A
hardware implementation usually has several memories, register files and
registers instead. This design shows what such code turns into once its
pointers are resolved in hardware:

- **The heap is split into memory segments.** Each segment is a small RAM
  served by an allocator of its own, so allocations in different segments
  run independently.
- **A pointer is a tagged code, not a flat address.** Its *tag* names the
  location set it points into: a segment, or a register whose address was
  taken. Its *index* is the byte offset inside that set.
- **A main module executes the pointer operations** (malloc, free, load,
  store). It looks at the tag and routes each operation to the right RAM,
  register or allocator.
- **There are three allocator kinds.** The *general-purpose* allocator
  handles blocks of any size. The *optimized general-purpose* allocator
  frees faster, because the pointer tells it where the block's record is.
  The *specific-purpose* allocator handles one constant block size and is
  much smaller.

The method is from the paper "Synthesis of Hardware Models in C With
Pointers and Complex Data Structures". The paper's own allocators were
generated from C by behavioural synthesis. This RTL is a fresh, hand-written
implementation of the architecture and algorithms it describes.

## Structure

```
                 cmd / res
                     |
              +--------------+
              | ptr_resolver |----- 32-bit register (tag 3)
              +--------------+
      tag 0 /        | tag 1        \ tag 2
  seg_ram + gp_allocator    seg_ram + ogp_allocator    seg_ram + sp_allocator
  (any size, free by        (any size, free by          (blocks of 4 bytes,
   searching the list)       allocation tag)             bit vector)
```

`spc_system` is the top level. It has three 32-byte segments, one for each
allocator kind, plus one 32-bit register that pointers can reference. The
paper's figure of this architecture draws two segments. The third is here so
that all three allocator kinds of its library appear in one design.

## The pointer code

| bits  | field       | meaning |
|-------|-------------|---------|
| 31:24 | `alloc_tag` | slot of the block in the allocated list of an optimized general-purpose allocator; 0 for other targets |
| 23:16 | `tag`       | location set: 0–2 are the segments, 3 is the register; any other value is invalid |
| 15:0  | `index`     | byte offset inside the location set |

The index is in the low bits, so pointer arithmetic is plain addition.
`p + 4` is the 32-bit sum, and it keeps both the tag and the allocation tag
as long as the offset stays in range.

Data is stored most significant byte first. An `int` at offset *a* is the
four bytes *a*..*a*+3 with byte *a* on top, so a `short` read at offset *a*
gives the upper half of that `int`. Type-cast accesses (`*(short *)&i`)
therefore need no special hardware. The register follows the same rule: its
index 0 is bits 31:24.

The package `spc_pkg` holds this layout (`ptr_t`) and all the bundles that
are passed between blocks.

## The main module (`ptr_resolver`)

The main module runs one command at a time. A command is offered on
`cmd`/`cmd_valid` and taken while `cmd_ready` is high. The answer comes back
on `res` with a one-cycle `res_valid`.

| command | what happens |
|---------|--------------|
| `CMD_MALLOC` (seg, size) | The request goes to allocator `seg`. The result pointer is `{slot, seg, address}`, with slot 0 unless the allocator is the optimized one. |
| `CMD_FREE` (ptr) | The request goes to allocator `ptr.tag`, with `ptr.index` as the block address and `ptr.alloc_tag` as the slot. |
| `CMD_LOAD` / `CMD_STORE` (ptr, width) | The access goes to RAM `ptr.tag` or to the register. Width is 1, 2 or 4 bytes. Data is right-aligned, and loads are zero-extended. |

A command is refused with `res.err` when:

- the tag names no location set;
- it frees the register;
- an access runs past the end of a segment or the register;
- an allocator refuses the request.

The paper assumes correct programs and says nothing about refusals; the
`err` bit is this design's addition.

Latency, counted from the cycle in which the command is taken:

- a register access answers in cycle 2;
- a RAM access answers in cycle 4;
- malloc and free answer in cycle 3 + L, where L is the allocator's own
  latency (listed below).

## The allocators

All three allocators have the same port: `req` (an `alloc_req_t`),
`req_ready` and `rsp` (an `alloc_rsp_t`). A request is taken when
`req.valid` and `req_ready` are both high. Exactly one response follows:
`rsp.valid` high for one cycle, carrying `err`, `address` and `index`.

### General-purpose (`gp_allocator`) and optimized (`ogp_allocator`)

Each keeps two register tables for its segment:

- **Allocated list.** 16 slots of {valid, address, size}, one slot per live
  block.
- **Free list.** 17 slots of {valid, address, size}, one slot per free
  region. Neighbouring free regions are always merged. That keeps the number
  of free regions at most one more than the number of live blocks, so 17
  slots are always enough.

**malloc(size)** works in three steps:

1. Find the first empty slot of the allocated list.
2. Walk the whole free list and pick the lowest-addressed region that is
   large enough. This is first fit in address order.
3. Cut the block from the start of that region and record it in the slot.

The response carries the block's address. In the optimized version it also
carries the slot number, which the main module puts into the pointer's
`alloc_tag`.

**free** has two versions:

- In `gp_allocator`, the allocated list is searched one slot per cycle for
  the block that starts at the given address.
- In `ogp_allocator`, the pointer's allocation tag names the slot directly,
  so there is no search. The address is still compared with the slot's
  record, and a mismatch is refused.

Both versions then walk the free list once. Any region that ends where the
block starts, or starts where it ends, is absorbed into the block, and the
merged region is written into a free slot. Only one region can lie directly
below the block and one directly above, so a single pass completes the
merge.

The tables are walked one entry per clock. Latency is counted from the
cycle the request is taken to the cycle `rsp.valid` is high:

| operation | latency (cycles) | with 16 blocks |
|-----------|------------------|----------------|
| malloc (both kinds) | 3 + s + (MAX_BLOCKS+1), where s is the first empty slot | 20 to 35 |
| free, general-purpose | 3 + k + (MAX_BLOCKS+1), where k is the block's slot | 20 to 35 |
| free, optimized | 3 + (MAX_BLOCKS+1) | 20 |
| refused free, general-purpose (block not found) | 1 + MAX_BLOCKS | 17 |
| malloc with a full allocated list | 1 + MAX_BLOCKS | 17 |

The removed search (k cycles) is exactly the saving the optimized allocator
exists for.

malloc is refused in three cases: size 0, a full allocated list, or no
region large enough. Fragmentation can cause the last one even when enough
bytes are free in total.

### Specific-purpose (`sp_allocator`)

Every block has the same size K (`BLOCK_BYTES`, 4 by default). The segment
is therefore an array of `NUM_BLOCKS` elements, tracked by one bit each.

- **malloc** picks the lowest free element with a priority search and
  returns element × K. A size of 0 or above K is refused.
- **free** derives the element as address / K. An address that does not
  start a used element is refused.

The answer always comes one cycle after the request. There is no
fragmentation. In `spc_system` this allocator manages 8 elements of
4 bytes, filling a 32-byte segment.

### Segment RAM (`seg_ram`)

`seg_ram` is a byte array with one port. It serves loads and stores of 1, 2
or 4 bytes at any offset, using the byte order above. The answer comes one
cycle after the request. An access that would run past the end changes
nothing and answers `err`. The contents are not reset.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `spc_system`, `seg_ram`, `gp_allocator`, `ogp_allocator` | `SEG_BYTES` | 32 | segment size in the paper's examples |
| `spc_system`, `gp_allocator`, `ogp_allocator` | `MAX_BLOCKS` | 16 | block count of the paper's allocator results |
| `sp_allocator` | `NUM_BLOCKS` | 16 | same (the top sets it to SEG_BYTES / K = 8) |
| `sp_allocator`, `spc_system` (`SP_BLOCK_BYTES`) | `BLOCK_BYTES` | 4 | the constant 4-byte malloc in the paper's two-segment example |
| `ptr_resolver` | `NSEG` | 3 | this design (the paper's figure shows 2) |

The field widths of the pointer code (8/8/16) are fixed in `spc_pkg`.

## Where this design departs from or adds to the source

- **Interfaces.** The command set, the valid/ready handshakes, the
  one-cycle RAM and the `err` answers are this design's own. The paper only
  says that the main module and the allocators talk through handshakes.
- **Main module.** `ptr_resolver` is a generic executor of pointer
  commands. In the paper, a main module is generated from one particular C
  program, and the programs it evaluates are not given in full.
- **First fit.** The paper says "first fit" without saying in which order
  the free list is kept. Here first fit means the lowest address.
- **Controllers.** The table walks (one entry per cycle) and the table
  layout are this design's own. The paper reports 52-state and 46-state
  controllers for its synthesized general-purpose allocators, but does not
  describe their datapaths.
- **Compile-time parts are not hardware.** The paper's compiler steps
  (pointer analysis, memory partitioning, removing bounded malloc/free
  sequences) have no RTL counterpart.
- **Application examples.** The JPEG colour filter and the ATM
  segmentation engine are application examples whose sources are not given.
  They appear only as allocation patterns in `tb_workloads`.

## Simulation

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_gp_allocator`, `tb_ogp_allocator` | A byte-occupancy model predicts every address, slot, refusal and latency. The tests cover about 3000 random requests, and merges below, above and on both sides. |
| `tb_sp_allocator` | A bit-vector model checks first element, refusals and one-cycle latency. |
| `tb_seg_ram` | Random char/short/int accesses are checked against a byte model, including out-of-range accesses. |
| `tb_ptr_resolver` | Allocator and RAM models record what they receive, to check steering by tag, pointer construction, typed register access, refusals and latency. |
| `tb_spc_system` | The whole design at its default sizes: the paper's small example programs, then 4000 random commands. A model of all three segments predicts every pointer and every loaded value, and every mechanism must occur at least once. |
| `tb_workloads` | The allocation patterns of the evaluated programs (test1/test2, JPEG transform with n = 2, ATM frames) on the whole design. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/spc_pkg.sv \
          tb/tb_spc_system.sv --top-module tb_spc_system -o sim
./obj_dir/sim
```

Each testbench runs in well under a second. Because the simulator has only
two states, every register is reset or written before it is read. The one
exception is the RAM contents, which the testbenches write before reading.

The allocators contain assertions. `ogp_allocator` and `gp_allocator` check
that a free slot for the merged region always exists. `ptr_resolver` checks
that at most one allocator is requested at a time.
