# Vitruvius+ vector coprocessor (integer RTL)

Vitruvius+ is a decoupled RISC-V vector unit built for long vectors. Its
architectural registers hold 256 elements of 64 bits (16 kbit each). A scalar
core sends vector instructions over the Open Vector Interface (OVI). The vector
unit has no path to memory of its own: the scalar core moves whole 512-bit cache
lines in and out of it. Eight lanes each hold one eighth of every register and
run the element work in parallel. A bufferless ring joins the lanes for
operations that move data between them (slides and reductions).

Around that baseline, the design has four mechanisms for keeping the lanes busy:

* **Overlapping.** The next arithmetic instruction starts in a lane while the
  previous one is still finishing.
* **Out-of-order memory-to-arithmetic chaining.** Load data arrives in any
  order. Per-group ready bits let an arithmetic instruction consume each group
  of words as soon as it is written.
* **Fast vector move.** `vmv.v.v` is done in the renaming unit by aliasing one
  physical register to two logical ones. No data moves.
* **Two-phase reductions.** Each lane first reduces its own elements with N
  round-robin accumulators. The ring then combines the eight partial results.

This RTL implements the integer part of that design in SystemVerilog-2017.

## Structure

```
OVI ISSUE ─► pre_issue_queue ─► unpacker ─► renaming_unit ─► issue_stage ─┬─► (arith queue) ─► vector_control_unit ─► 8 × vector_lane
                │credit                          │ RAT/FRL/alias/elements  └─► (mem queue) ──► lmu / smu / imu
                                                 ▼                                                 │
                                          reorder_buffer ─► OVI COMPLETED                          lane ring (8 × ring_node)
```

| Module | What it is |
|---|---|
| `vitruvius_top` | The whole unit, with OVI as plain ports |
| `pre_issue_queue` | FIFO behind OVI ISSUE. It returns one issue credit per instruction taken out. |
| `unpacker` | Decodes an RVV instruction and the `v_csr` into a `dec_inst_t`. Flags unsupported encodings as illegal. |
| `renaming_unit` | 32→40 register renaming: RAT, free list, per-register alias counters, element table, three-cycle fast move |
| `issue_stage` | Splits instructions into an arithmetic queue and a memory queue. Issue logic allows overlap. |
| `vector_control_unit` | Turns an arithmetic instruction into a broadcast lane command. Counts lane completions. Picks the ring direction. Starts the memory units. |
| `vector_lane` | One lane: `vrf_slice`, `lane_fsm`, `ready_bits`, operand buffers, `lane_alu`, `reduction_handler`, ring port, load write queues |
| `vrf_slice` | Five 256 × 64-bit single-port banks (2 kB each) |
| `lane_fsm` | The lane sequencer: IDLE → READ_OP_A → READ_OP_B → READ_OP_C → WB → MEM → READ_OP_A … |
| `ready_bits` | One bit per (physical register, group of five lane words) |
| `lane_alu` | Pipelined integer unit with 3 cycles of latency. SIMD over 8/16/32/64-bit sub-words. |
| `reduction_handler` | N accumulators used round-robin, then folded into one value |
| `ring_node`, `lane_ring` | Bufferless single-cycle ring. Each instruction uses clockwise or counter-clockwise. |
| `lmu` | Load management: splits OVI LOAD lines into per-lane element writes |
| `smu` | Store management: gathers lane elements into 512-bit OVI STORE lines under credits |
| `imu` | Item management: sends indices of indexed loads on OVI MASK_IDX under credits |
| `reorder_buffer` | Commits in program order, one per cycle. Returns the old physical register to the free list. |
| `sync_fifo` | Generic FIFO used by several of the above |
| `vpu_pkg` | Sizes, structs, enums, and the element-mapping and ALU functions |

## Register file organisation and element mapping

Most of the rest depends on this part. The register file has 40 physical
registers × 256 × 64 bits = 80 kB. That is 10 kB per lane, held as five
2 kB banks of 256 rows.

* 64-bit word `w` of a register lives in lane `w % 8`, as lane word `k = w / 8`.
  So each register has 32 words per lane.
* Lane word `k` of physical register `p` has flat index `i = p*32 + k`. It is
  stored in bank `i % 5`, row `i / 5`.
* Five consecutive lane words therefore sit in five different banks, and one
  FSM round can read or write all five in parallel. That set of five is a
  **group**. A register spans 7 groups per lane; the last group is partial.

`% 5` and `/ 5` are computed without dividers, as `x*0xCCCD >> 18` written as
shifts and adds (`div5`/`mod5` in `vpu_pkg`). The formula is exact for
`x < 2^16`.

## The lane round

`lane_fsm` cycles through five active states. Each bank gets one access per
state:

| State | Bank use |
|---|---|
| READ_OP_A | Read the current group of operand A (vs1) |
| READ_OP_B | Read the current group of operand B (vs2) |
| READ_OP_C | Read the current group of operand C (old vd: accumulator of `vmacc`, tail of `vslideup`) |
| WB | Write one group of results from the write-back buffer |
| MEM | Write load data waiting in the per-bank load queues |

So a lane handles five words per five-cycle round. This is 8 words per cycle
over the whole unit, one per lane. The ALU takes operands from the buffers at
one word per cycle. Its results go to a write-back buffer that WB drains one
group at a time.

**Overlap.** The lane accepts a new command when its read states for the old
one are finished. The previous instruction's ALU and WB work then finishes
under the new instruction's reads. `OVERLAP=0` turns this off and makes a lane
wait until it is idle. The top testbench measures a dependent `vadd`+`vmax`
pair and checks that it stays under a cycle bound.

**Chaining.** `ready_bits` holds one bit per (register, group). Renaming a
destination clears its bits. A WB or MEM write of the last word of a group sets
that group's bit. A whole-register load fill sets every bit when the load
completes. Before a read state uses a group, the lane checks the bit and waits
if it is clear. Load lines can arrive in any order, so an arithmetic instruction
can run as soon as the groups it needs have landed. It does not wait for the
whole load.

## Renaming and the fast move

`renaming_unit` keeps:

* the RAT (32 → 40);
* a free list (FRL);
* an alias counter per physical register;
* an element table recording the `vl` each logical register was written with.

An ordinary instruction gets a fresh physical destination. The ROB remembers
the old mapping and frees it at commit.

`vmv.v.v vd, vs1` with a compatible `vl` takes three cycles in a small FSM and
no lane time:

1. Read the mapping.
2. Point `vd` at `vs1`'s physical register and increment its alias counter.
3. Update the element table and allocate the ROB entry.

When an alias is released, the counter is decremented instead of freeing the
register. A register returns to the free list only when its counter is zero.

## Ring, slides and reductions

`ring_node` has no buffers. A packet arriving on the active direction is either
ejected, if it has reached its destination lane, or forwarded to the next node
in the next cycle. Forwarding takes priority over injection, so a packet's
latency is exactly its hop count.

The direction is chosen per instruction in `vector_control_unit` from the slide
offset `m = offset mod 8`:

* `m` = 1–3: clockwise for a slide-up, counter-clockwise for a slide-down.
* `m` = 5–7: the opposite direction.
* `m` = 4 (and 0): the operation's default direction.

This keeps every transfer to at most four hops.

`vslideup`/`vslidedown` (SEW 64):

* Every lane reads its source words and computes each element's destination
  lane and word.
* Elements that stay in the lane are written directly.
* The others are injected into the ring.
* Destination words not covered by the slide keep the old `vd` value (operand
  C) for slide-up.
* Slide-down beyond `vl` gives zero.

Reductions (`vredsum`/`vredmax`/`vredmin`, 64-bit):

* **Intra-lane phase.** The first N source words of a lane go straight into N
  accumulators. Lane 0 folds in `vs1[0]`. Each later word is combined with the
  next accumulator in round-robin order. With N ≥ ALU latency, no accumulator
  is read before its previous update has come back. The N accumulators are then
  folded into one value.
* **Inter-lane phase.** A binary tree over the ring. Lane `L` waits for
  `ctz(L)` partial results from the lanes above it (three for lane 0). It
  combines them and sends the result to lane `L - 2^ctz(L)`. The steps are
  1→0, 3→2, 5→4 and 7→6; then 2→0 and 6→4; then 4→0. Lane 0 writes the result to
  `vd[0]`.

## Memory units and OVI

The unit follows the OVI transaction groups: ISSUE, DISPATCH, COMPLETED, MEMOP,
LOAD, STORE and MASK_IDX. Ports use OVI widths:

* 32-bit instruction;
* 64-bit scalar;
* 40-bit `v_csr`;
* 512-bit lines;
* 34-bit `seq_id`;
* 65-bit `mask_idx_item`.

The bit layouts of `v_csr` and `seq_id` are this design's own; see `vpu_pkg.sv`:

* `v_csr`: [0] vill, [3:1] sew, [5:4] lmul, [25:11] vl.
* `seq_id`: {sb_id, el_count, el_off in bytes, el_id, v_reg}.

* **lmu.** Accepts a line with its `seq_id`. It delivers at most one element per
  lane per cycle into the lanes' per-bank load queues. The element is written
  in the next MEM slot, which sets the ready bits. A load completes when all
  `vl` elements are written and `sync_end` has been seen. It then reports to
  the ROB and marks the register filled. OVI LOAD has no back-pressure, so the
  input queue (QD = 8 lines) must absorb the core's burst. An assertion fires on
  overflow.
* **smu.** Reads the source register through the lanes' read port, in element
  order. It packs eight elements per line and sends a line only while it holds
  a store credit.
* **imu.** For indexed loads, reads the index register and sends one
  `{1, index}` item per element under MASK_IDX credits. The last item is flagged.

DISPATCH `next_senior` is recorded in the ROB. `kill` is not supported, and an
assertion checks that it never occurs.

## Timing summary

| Path | Cycles |
|---|---|
| ISSUE accepted → decode → rename | 1 per stage, registered FIFOs in between |
| Fast move in the renaming unit | 3 |
| Lane round (five states, five words) | 5 |
| `lane_alu` latency | 3 (parameter `LAT`) |
| Ring hop | 1 per hop, no waiting |
| ROB commit | ≤ 1 instruction per cycle |

## What is implemented, and where it departs

Built and tested:

* the front end, renaming with fast move, issue with overlap, and the control unit;
* eight lanes with the five-bank register file, FSM, ready-bit chaining, SIMD
  integer ALU and accumulator reductions;
* the ring with direction selection;
* load, store and index units for unit-stride, strided and indexed loads, and
  unit-stride stores;
* the ROB.

Not built, or different from the full design:

* **No floating point.** The FPU is a separate third-party unit. Integer
  operations stand in for it (add, sub, and/or/xor, signed min/max, mul,
  multiply-add). The evaluated FP kernels (axpy, MMUL, FFT, Jacobi2D,
  Blackscholes, LavaMD, Streamcluster) cannot run; Pathfinder-style integer
  kernels can.
* **No mask register file and no masked execution.** The MASK_IDX channel
  carries indices only.
* Only LMUL = 1. Memory operations, slides and reductions are 64-bit only;
  other SEW values are decoded as illegal. Arithmetic supports SEW 8/16/32/64.
* No `kill`, no fault-only-first loads, no `vstart` resume. COMPLETED `fflags`,
  `vxsat`, `dest_reg` and `vstart` are zero.
* Tail words beyond `vl` in a new destination register are undefined.
* The SMU and IMU run one operation at a time, so a store or indexed load waits
  for the previous one to finish.
* The SRAM banks are plain arrays with a one-cycle registered read.
* Queue depths, credit counts, ALU latency, number of accumulators and buffer
  depths are not fixed by the original design. They are parameters with values
  chosen here.

## Simulating

Each module has a self-checking testbench in `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`. For example:

```
cd tb
verilator --binary --timing --assert -Wno-fatal -I../rtl ../rtl/vpu_pkg.sv \
          $(ls ../rtl/*.sv | grep -v vpu_pkg) tb_vector_lane.sv \
          --top-module tb_vector_lane -Mdir obj_lane
./obj_lane/Vtb_vector_lane +verilator+rand+reset+2
```

`tb_vitruvius_top` runs the whole unit at its default parameters. A core and
memory model sends a program over OVI:

* loads, arithmetic at several SEWs, a fast move, slides in both directions,
  reductions, strided and indexed loads, an illegal instruction, and a timed
  overlap pair;
* stores of every result back, each compared with a reference.

The testbench also counts each mechanism and fails if any of them never fires:

* out-of-order chaining waits;
* overlaps;
* fast moves;
* clockwise and counter-clockwise ring use;
* reduction-tree packets;
* store credit stalls;
* slide packets;
* load deliveries.

It runs in about a minute.
