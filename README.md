# MuCCRA: a multicontext reconfigurable processor array with operand isolation and selective context fetch

This is a coarse-grained, dynamically reconfigurable processor array of the
MuCCRA-P kind. It is a 4×4 grid of 32-bit processing elements (PEs) in an
FPGA-like routing fabric. Every PE, every switch and every controller holds
**32 hardware contexts**. A small controller steps the whole array from one
context to the next every clock cycle, so a task is a sequence of datapaths.
Each datapath lasts one cycle, and loops and jumps between them are steered
by values that the array computes.

Reconfiguring every cycle costs power: each unit reads its context memory in
every cycle. This implementation adds the two power-reduction mechanisms that
were proposed for this kind of array:

* **Operand isolation at the functional-unit level.** The ALU and the Shift &
  Mask Unit (SMU) of a PE are banks of 16 small functional units each. A
  decoder and AND gates give operands only to the unit that is in use. The
  other 31 units see constant zeros and do not toggle.
* **Selective context fetch.** Each PE and each switching element has a
  32-bit use flag, one bit per context. In a context where the unit does
  nothing, its context memory is not read: the chip enable stays low. The unit
  then runs a built-in idle configuration.

Both mechanisms are parameters (`ISOLATE`, `SELECTIVE`, default 1). With both
set to 0 you get the reference array without them, which is handy for
comparing switching activity.

The published studies of this architecture found two things. Operand
isolation pays for itself: it cut the processing power by 30–40% for about 3%
more area. Selective fetch saves less than its flag registers cost unless
roughly three quarters of the units are idle in a context. Both mechanisms
are included here because both were proposed. Set `SELECTIVE=0` if you only
want the one that pays.

## Array organisation

```
      c=0     c=1     c=2     c=3     c=4
r=0   SE ──H── SE ──H── SE ──H── SE ──H── SE      H(r,c): horizontal segment, 3 links each way
      │        │        │        │        │       V(r,c): vertical segment, 3 links each way
      V PE(0,0)V PE(0,1)V  ...   V        V
      │        │        │        │        │
r=1   SE ──H── SE ──H── SE ──H── SE ──H── SE
      ...                                          PE(i,j) drives H(i,j) (the segment above it)
r=4   SE ──H── SE ──H── SE ──H── SE ──H── SE      and reads V(i,j) and V(i,j+1)
         MEM0     MEM1     MEM2     MEM3           MEM j sits on H(4,j)
```

* **Words** are 34 bits: 32 data bits plus a 2-bit carry field (`word_t`).
  `carry[0]` is the adder carry. `carry[1]` is the compare flag.
* **Channels** carry three links, d0–d2, in each direction.
* **Switching elements (SEs)** sit at the 5×5 channel crossings.
* **PEs** read operands from the vertical channels on both sides (PICKIN).
  They put results on the horizontal segment above them (PICKOUT), in either
  direction and on any link.
* **Distributed memories**: four memories of 32 bits × 256 words sit on the
  bottom horizontal channel.
* **North input register.** A word entering an SE from the north is
  registered, so every downward hop costs one cycle. Any closed path in the
  grid must go down somewhere, so the network has no combinational loops. ALU
  and SMU outputs are registered too, so a PE-to-PE transfer never forms a
  combinational path through a PE.

In practice this gives the following timing:

* Sideways and upward routing through SEs is combinational within one cycle.
* Each downward step adds one cycle.
* A PE result is visible to the network one cycle after the context that
  computed it.

## The processing element

`pe` = `ctx_fetch` (the context memory with selective fetch) + `pickin` +
`pe_core` + `pickout`. The core holds:

* **ALU**, 16 units: add, add-with-carry, sub, sub-with-borrow, and, or, xor,
  nand, nor, xnor, not, signed max and min, equal, signed less-than, and a
  16×16 multiply. Subtract sets `carry[0]` when there is no borrow. EQ and LT
  set `carry[1]` and return 0/1. The carry input of ADDC/SUBC is `carry[0]`
  of operand in1.
* **SMU**, 16 units: sll, srl, sra, rol, ror, keep-low-bits and
  clear-low-bits masks, byte and half-word extract, sign extension from 8 and
  16 bits, byte swap, bit reverse, move (carries kept), popcount, and
  load-immediate. The amount comes from the context word.
* **Register file**, 8 × 34 bits: one write port and one asynchronous read
  port.
* **Output registers** `alu_q` and `smu_q`. They load only in contexts that
  enable their unit, so a result stays available to later contexts.
* **Branch outputs**: the unregistered ALU compare flag (the condition) and
  the low 5 bits of the unregistered SMU result (the jump distance). Only
  PE(0,0) is connected to the controller.

The 64-bit PE context word (`pe_cfg_t`, LSB first):

| bits  | field | meaning |
|-------|-------|---------|
| 3:0   | `in0_sel` | PICKIN source of in0. 0–2: west channel southbound d0–d2. 3–5: west northbound. 6–8: east southbound. 9–11: east northbound. 12–15: zero. |
| 7:4   | `in1_sel` | the same for in1 |
| 9:8   | `alu_a` | in0, in1, RF read, `smu_q` |
| 11:10 | `alu_b` | in0, in1, RF read, immediate |
| 15:12 | `alu_op` | `alu_op_e` |
| 16    | `alu_en` | ALU bank enabled (0: all ALU units isolated) |
| 18:17 | `smu_src` | in0, in1, RF read, `alu_q` |
| 22:19 | `smu_op` | `smu_op_e` |
| 23    | `smu_en` | SMU bank enabled |
| 28:24 | `smu_amt` | shift/mask amount |
| 29    | `rf_we` | register-file write |
| 31:30 | `rf_wsrc` | in0, ALU result, SMU result, in1 (unregistered results of this cycle) |
| 34:32 | `rf_waddr` | |
| 37:35 | `rf_raddr` | |
| 49:38 | `pout` | 2 bits for each of 6 links, `pout[dir][link]`, dir 0 = eastbound, 1 = westbound. 0 passes the arriving word on; 1, 2 and 3 drive `alu_q`, `smu_q` and the RF read. |
| 63:50 | `imm` | 14-bit immediate, sign-extended |

The all-zero word is the **idle configuration**: both banks are disabled,
nothing is written and every link passes through. It is also what selective
fetch substitutes in a context whose use flag is clear.

## Operand isolation

`op_isolate` decodes `{en, op}` into a one-hot select. It gives each
functional unit its own copy of the operands ANDed with that unit's select
line. Every unit in `alu` and `smu` computes only from its own gated copy,
and the output multiplexer picks the selected unit. Two things follow:

* An idle PE has both banks disabled. All 32 units see zeros, so the PE's
  outputs are frozen without any extra hold logic.
* With `ISOLATE=0` every unit sees the raw operands and toggles on every
  change. The results are bit-identical either way; `tb_alu` and `tb_smu`
  check this.

## Routing: the switching element

An SE has four output multiplexers (the switches), one per direction. Its
15-bit context word (`se_cfg_t`) has 5 bits per link:

* a 2-bit **source** direction (N = 0, E = 1, S = 2, W = 3);
* a 3-bit **mask** of the directions that the source's word leaves by. Mask
  bit *i* means direction (src + 1 + i) mod 4.

So on each link an SE can forward one entering word, and can split it to up
to three exits. Outputs that nothing routes carry zero. This encoding fills
exactly the 15 bits that the architecture allots to an SE context. The price
is that an SE can move only one stream per link index in a given context;
routes that need more must use different links.

Examples used in the testbenches:

| route | src | mask |
|-------|-----|------|
| W→S | W | `100` |
| E→S | E | `001` |
| N→E and N→W (split) | N | `101` |
| W→N | W | `001` |

## Context switching (CSC)

`csc` holds the context counter `cp`. Every cycle it works out the next
pointer and broadcasts it (`ptr`, `ptr_valid`) to every context memory. Each
memory reads that context at the clock edge, so the configuration in force
during a cycle is always that of `cp`.

* The next pointer is `cp + 1`, or `cp + br_off` (modulo 32) when the CSC's
  own context word has `branch_en` set and PE(0,0)'s compare flag is true.
  The branch is resolved in the same cycle.
* A context with `halt` set is the last one: it runs, and then `done` pulses.
* The CSC's own 2-bit context word (`csc_cfg_t`) is loaded like any other.

```
cycle      start  0      1      2      ...   halt ctx   (idle)
ptr        0      1      2      3            -          -
cfg        idle   ctx0   ctx1   ctx2         ctxH       idle
running    0      1      1      1            1          0, done=1
```

A task of *k* executed contexts therefore runs for exactly *k* cycles.

## Loading tasks (TCC)

`tcc` owns a 1024-entry configuration memory that can hold several tasks. An
entry (`cfg_entry_t`, 114 bits) holds:

* `bitmap[42:0]`, one bit per destination: PEs 0–15 (row-major), SEs 16–40
  (row-major over the 5×5 grid), the shared memory context 41, the CSC 42;
* `kind`: a context word (`ENT_CTX`), a use-flag word (`ENT_FLAGS`, bit *c* =
  context *c*) or the end marker (`ENT_END`);
* `ctx`: the context number;
* `data[63:0]`.

An entry is written to every destination in its bitmap at once. A typical
task therefore starts with 32 entries that clear every context of every unit
to the idle word. The flag words of all the units that are never used can
also be a single entry.

* **Loading.** `task_start` with `task_addr` makes the TCC read entries from
  that address, one per cycle, and multicast each one. On the end marker it
  starts the CSC. For *n* entries, `csc_start` comes *n*+2 cycles after
  `task_start` is sampled.
* **Completion.** `task_done` pulses when the CSC finishes.
* **Memory content.** The configuration memory can only be written while the
  TCC is idle.
* **Default flags.** Use flags reset to all ones, so a task without flag
  entries fetches every context.

## Selective context fetch

`ctx_fetch` wraps a `ctx_mem` (32 words, synchronous read with chip enable;
the output holds while the chip enable is low) and the flag register:

```
ce    = ptr_valid && (!SELECTIVE || flags[ptr])   // memory reads only if used
use_q = ce (registered)
cfg   = use_q ? memory word : idle word
```

The flag lookup is combinational in front of the memory's enable, so it adds
delay to the fetch path but no cycle. The fetch path is short next to the
datapath. PEs and SEs have selective fetch. The memory context (one 56-bit
word shared by the four memories) and the CSC always read.

## Distributed memories and the host port

Each `mem_unit` has a 14-bit field (`mem_cfg_t`) in the shared memory
context. The field:

* picks the address (low 8 bits) and the write data from the six words on
  its segment (0–2 eastbound, 3–5 westbound);
* enables a read and/or a write;
* selects on which links the read data (available the next cycle) replaces
  the word passing by.

While no task is running, the host reaches the memory chosen by `mem_sel`
through `mem_we`, `mem_addr`, `mem_wdata` and `mem_rdata`. Read data comes
one cycle after the address.

## A worked example

`tb/tb_muccra_top.sv` programs this loop: `out[i] = in[i][15:0] * K` for
`i < N`, from MEM0 to MEM1.

| ctx | what happens |
|-----|--------------|
| 0 | load immediates: loop counter, address counter (−1) and N |
| 1 | PE(3,0): `i = r0+1`. PE(0,0): `r0 = r0+1`. Both are one multicast entry. |
| 2 | `i` leaves PE(3,0) eastbound on d0. SE(3,1) turns it south. The north register of SE(4,1) captures it. |
| 3 | SE(4,1) splits `i` west (MEM0 address) and east (MEM1 address). MEM0 reads. |
| 4 | MEM0 drives its data eastbound on d1. SE(4,1) turns it north. PE(3,1) multiplies it by K. |
| 5 | The product (westbound d2) and the address go down to SE(4,1). |
| 6 | MEM1 writes. PE(0,1) sends N to PE(0,0) over SE(0,1). PE(0,0) tests `r0 < N` and loads −5 as the offset. The CSC branches back to context 1. |
| 7 | halt |

Each iteration takes 6 cycles. The use flags keep every other unit's context
memory idle.

## Simulating

All files are plain SystemVerilog-2017. `rtl/muccra_pkg.sv` must come first.
With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_muccra_top \
    -y rtl -y tb +libext+.sv rtl/muccra_pkg.sv tb/tb_muccra_top.sv
./obj_dir/Vtb_muccra_top
```

Every testbench checks itself. Each ends with
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

| testbench | covers |
|-----------|--------|
| `tb_muccra_top` | The full array at default size: two tasks from different configuration addresses, memory results, load and run cycle counts. It also counts that every mechanism occurred: context switches, taken and untaken branches, skipped fetches, isolated units, the north register, SE splitting, multicast, memory read/write/injection and host access. |
| `tb_switch_cases` | The three context-switching test patterns, with a sum of constants on 8 PEs. 1: one context, no switching. 2: two identical contexts switched every cycle. 3: the same computation mapped differently in two contexts. It checks the sums and that only case 3 changes the datapath, and prints the context-memory reads per case. |
| `tb_alpha_blend` | The alpha blender workload on the full array: `(a·α + b·(256−α)) >> 8` for pixel pairs from memory 0 into memory 1. The blend runs over six contexts inside one PE, with results passed through its register file and output registers. It checks every pixel for two α values, the run length of 10 cycles per pixel, and that the blend PE fetches only in its six contexts. |
| `tb_pe`, `tb_pe_core`, `tb_alu`, `tb_smu`, `tb_op_isolate`, `tb_rfile`, `tb_pickin`, `tb_pickout` | the PE and its parts, against reference models |
| `tb_se` | random routing against a model, including the north register |
| `tb_ctx_mem`, `tb_ctx_fetch` | read latency, chip-enable hold, flag gating and the idle default |
| `tb_mem_unit`, `tb_csc`, `tb_tcc` | memory paths, counter and branch timing, and multicast loading order and timing |

## How far to trust it, and where it departs from the original

What follows the published architecture:

* the 4×4 PE array, 5×5 SEs, three links per channel and four 32×256
  memories at the bottom;
* 34-bit words, and the 8-entry register file of 34 bits;
* 64-bit × 32 PE contexts and 15-bit × 32 SE contexts;
* the north input register of the SE;
* a context counter with relative branches computed in a PE;
* a 1K-entry configuration memory multicast by bitmap;
* operand isolation with a decoder and AND gates;
* per-context use flags that gate the context memory's chip enable and
  substitute a default configuration.

What is this design's own, because the architecture description does not fix
it:

* the bit layout of every context word;
* the ALU and SMU operation lists;
* the registered ALU/SMU outputs;
* which side of a PE each connection block uses;
* the SE's source-plus-mask encoding;
* how memories attach to the network, and the shared memory context;
* the branch signals and the choice of PE(0,0) as the branching PE;
* the halt bit, the configuration entry format and all host handshakes;
* reset behaviour: asynchronous, active low. Memories are not reset.

Known differences and limits:

* **Memory macros.** Context memories and data memories are arrays. A chip
  would use SRAM macros with the same read timing.
* **Clock gating.** It is left to synthesis; the registers have plain enables.
* **Shared logic.** In the original some functional units share logic. Here
  all 32 are separate circuits, which makes isolation complete but costs
  area.
* **No compiler.** The original task library (DCT, SHA-1, wavelet
  transform, alpha blending) came from a compiler whose output is not
  available. DCT, SHA-1 and the wavelet transform are not reproduced here.
  Their context counts (8–29) fit the 32 hardware contexts. A 29-context task
  that used every unit in every context would need more than the 1024
  configuration entries. The alpha blender has a hand-mapped version in
  `tb_alpha_blend`. It uses 10 contexts per loop; the compiled original uses
  6 contexts in all.
* **Power.** No power figures can be obtained from RTL simulation.
  The context-memory enables `ce_pe` and `ce_se` are top-level outputs, so
  fetch activity can be counted with the mechanisms on and off.

## Files

* `rtl/muccra_pkg.sv`: word, configuration and entry types, and constants.
* `rtl/muccra_top.sv`: the array.
* `rtl/pe.sv`, `pe_core.sv`, `alu.sv`, `smu.sv`, `op_isolate.sv`,
  `rfile.sv`, `pickin.sv`, `pickout.sv`: the PE and its parts.
* `rtl/se.sv`, `ctx_mem.sv`, `ctx_fetch.sv`, `mem_unit.sv`, `csc.sv`,
  `tcc.sv`: routing, context memories, data memories and the controllers.
* `tb/`: one testbench per module, plus the two array-level tests.
