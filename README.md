# MediaBreeze: hardware loops, address streams and data reorganization for a SIMD unit

Media kernels such as the DCT, motion estimation, filtering and scaling run
deep loop nests over small sub-blocks of large images. On a processor with
SIMD extensions, most of the instructions in such a loop do no arithmetic.
They compute addresses, count loop indices, branch, load and store, and pack,
unpack or permute data, and the SIMD unit mostly waits for them. The
MediaBreeze unit moves that supporting work into dedicated hardware. One
*Breeze instruction* describes a complete loop nest:

- up to five loop levels;
- three input streams and one output stream, each with a start address and one stride per loop level;
- the element types, the multicast patterns and the SIMD operation;
- the reduction, shift and saturation applied to the result.

Once started, the unit runs one loop iteration per clock. In each iteration it
does the work of five loop branches, four address computations, three loads,
their reorganization, one SIMD operation with accumulation and, when due, one
store.

This repository holds synthesizable SystemVerilog for the unit: the loops,
the address generators, the instruction memory and decoder, the load/store
sequencing, the reorganization and multicast logic, the data station queue,
the SIMD unit, a stream prefetcher and a controller. It also holds a
self-checking testbench for every module. The superscalar host processor and
its L1 cache are not part of it: their connections are ports of the top
module, `mediabreeze_top`.

## Organisation

```
 host ──► breeze_imem ──► breeze_decoder ──► cfg (control registers)
   start/intr/resume ──► mb_controller (DECODE, INIT, RUN, PAUSE, DRAIN)

 access side   hw_loop ─► addr_gen x4 ─► load_store_unit (3 loads) ─► data_reorg x3
                                                                       │ push
 data station                                      data_station (queue of bundles)
                                                                       │ pop
 execute side                     simd_unit (op, acc, reduce, shift, saturate, pack)
                                                                       │
                                               load_store_unit (1 store) ─► L1
 prefetch      prefetch_engine: own hw_loop + 3 addr_gen, runs ahead ─► L1 prefetch port
```

| file | contents |
|---|---|
| `rtl/breeze_pkg.sv` | types, enums, instruction layout, `breeze_cfg_t` |
| `rtl/hw_loop.sv` | five loop counters, 32-bit comparators, priority encoder |
| `rtl/addr_gen.sv` | stride selection and 32-bit address adder (one per stream) |
| `rtl/breeze_imem.sv` | Breeze instruction memory (4 instructions of 32 words) |
| `rtl/breeze_decoder.sv` | reads one instruction into the control registers |
| `rtl/mb_controller.sv` | start / interrupt / resume sequencing |
| `rtl/load_store_unit.sv` | gating of the three load ports and the store port, stall generation |
| `rtl/data_reorg.sv` | unpacking to the compute width and multicast |
| `rtl/data_station.sv` | the operand queue |
| `rtl/simd_unit.sv` | SIMD operation, accumulator, reduction, shift, saturation, packing |
| `rtl/prefetch_engine.sv` | run-ahead stream prefetcher |
| `rtl/mediabreeze_top.sv` | the complete unit |

## The Breeze instruction

An instruction is 32 words of 32 bits. Loop level 1 is the outermost loop and
level 5 the innermost. The streams are IS1, IS2, IS3 (inputs) and OS (output).

| word | field |
|---|---|
| 0–4 | loop1 … loop5 count (0 or 1 = a loop that is not used) |
| 5–8 | start byte address of IS1, IS2, IS3, OS |
| 9 | `[3:0]` OPR, `[5:4]` RedOp, `[10:6]` shift, `[13:11]` LL, `[14]` signed, `[15]` saturate |
| 10–14 | IS1 strides for levels 1–5 (signed, in bytes) |
| 15–19 | IS2 strides |
| 20–24 | IS3 strides |
| 25–29 | OS strides |
| 30 | masks: byte *s* holds stream *s*'s 5-bit mask; bit *k−1* enables the level-*k* stride |
| 31 | byte *s* = `stream_cfg_t` of stream *s*: `[1:0]` type (0 = 8, 1 = 16, 2 = 32 bit), `[2]` enable, `[3]` multicast on, `[5:4]` mc_rep, `[7:6]` mc_dist |

OPR: 0 ADD, 1 SUB, 2 MUL, 3 MADD (a·b+c), 4 MAC (acc += a·b), 5 SAD
(acc += |a−b|), 6 MIN, 7 MAX, 8 ACC (acc += a). RedOp: 0 none, 1 sum,
2 max, 3 min, all of them into element 0.

Each of the 30 fields in words 0–29 takes a full word. This makes an
instruction 128 bytes rather than the 120 bytes usually quoted for the
format: the masks and the type/multicast byte need two more words. The
packing of words 9, 30 and 31 is this implementation's.

## Loops and strides: how the addresses move

This is the part that needs the most care when you write an instruction.

**Loops.** Each index counts from 1 up to its count. Every clock in which the
access side issues an iteration, the innermost loop that is not yet at its
count is incremented, and every loop inside it is reset to 1. The iteration
in which all five indices sit at their counts is the last one, so an
instruction runs for the product of its counts.

**Strides.** All four address generators update in that same clock. Each adds
one stride, chosen by the loop level that is being incremented:

- If the innermost loop (level 5) merely steps, the level-5 stride is used.
- If loops *k*+1 … 5 are all at their counts, loop *k* steps and the inner
  loops wrap. Stride *k* is then used.

So stride *k* must carry the address from the last iteration of the inner
loops back to where the next pass of loop *k* starts. A stream whose mask
bit for that level is 0 keeps its address. The last-value comparators sit in
`hw_loop` and are shared; each `addr_gen` only selects a stride and adds it.

**Example: one 1-D DCT pass.** Take 8×8 blocks of a W-pixel-wide, 16-bit
image. Each block row *k* of the output is computed as
`out[k][:] = Σ_l c[k][l] · block[l][:]`: a matrix multiply that needs no
transpose, with the coefficient broadcast to all 8 lanes. The loops and
streams are set as follows, with RS = 2·W bytes per row:

| | level 1 | level 2 (block row) | level 3 (block column) | level 4 (k) | level 5 (l) |
|---|---|---|---|---|---|
| count | 1 | H/8 | W/8 | 8 | 8 |
| IS1 image rows | – | RS − 16·(W/8−1) | −7·RS + 16 | −7·RS | +RS |
| IS2 coefficient | – | −126 | −126 | +2 | +2 |
| OS output rows | – | RS − 16·(W/8−1) | −7·RS + 16 | +RS | masked |

The other settings are:

- OPR = MAC, LL = 4, shift = 4, signed with saturation.
- All streams are 16-bit, and IS2 broadcasts element 0.

The end-to-end testbench runs exactly this instruction.

## When a result is written

The accumulating operations (MAC, SAD, ACC) add into a 32-bit accumulator
per lane. A result is written, and the accumulator cleared, in every
iteration in which all loops inside level LL are at their counts. LL = 5
writes every iteration, and LL = 4 writes once per pass of loop 5. The
output address used is the OS address of the iteration that writes.
Non-accumulating operations simply produce their value, which is stored at
those same iterations.

At the write, the steps are:

1. The optional reduction folds all lanes into element 0.
2. The value is shifted right arithmetically by `shift`.
3. It is clamped to the signed or unsigned range of the OS type when
   `saturate` is set, and truncated otherwise.
4. It is packed at the OS element width.

The byte enables of the store cover exactly the elements produced: one
element after a reduction. If the output type is wider than the compute
type, only the elements that fit in 128 bits are stored.

## Data types, unpacking and multicast

The compute width is the widest type among the enabled input streams. The
parallelism is then 128 / width: 16, 8 or 4 lanes. A narrower stream is
unpacked, with each element sign- or zero-extended, so an 8-bit stream
combined with a 16-bit stream uses only its first 8 bytes.

With multicast on, lane *i* reads element `(i >> mc_rep) mod 2^mc_dist`:

| mc_rep | mc_dist | lanes |
|---|---|---|
| any | 0 | A A A A … (broadcast) |
| 1 | 1 | A A B B A A B B … |
| 0 | 1 | A B A B … |
| 1 | 3 | A A B B C C … (2× horizontal upsampling) |

This replaces splat, pack and unpack instructions and most transposes.

## Pipeline, stalls and timing

- **Access side.** In one clock it takes the current loop indices and
  addresses, presents the loads, reorganizes the returned data and pushes the
  operand bundle into the data station. It then advances the loops and
  addresses. It issues only when every enabled load port is ready in the
  same clock and the data station is not full. Otherwise it holds: a load
  miss or a full queue is a *load stall*.
- **Data station.** An 8-entry queue. A bundle is {a, b, c, output address,
  write flag}.
- **Execute side.** It pops one bundle per clock into the SIMD unit. A bundle
  that writes waits until the store port is ready: a *store stall*. The queue
  lets the two sides slip: a load miss does not stop the SIMD unit while
  bundles remain, and a slow store does not stop the loads until the queue
  is full.
- **Throughput.** With no stalls, one iteration per clock, checked by the
  testbench.
- **Latency.** Decoding takes 34 clocks after start. It is followed by one
  INIT clock, then the iterations, then the drain. A bundle pushed in one
  clock can be consumed in the next.

Loops and address generation are single register stages here. For clocks
above 1 GHz, the looping would need two pipeline stages and the address
generation three.

## Prefetching

Because every stream's address sequence is known from the instruction,
`prefetch_engine` runs a second copy of the loops and the three input
address generators. It stays up to `PF_DIST` (16) iterations ahead of the
access side. For each of its iterations it requests, on a separate L1 port,
the line (32 bytes) holding the start of each enabled input access, and the
next line when the access crosses into it. A line equal to the one last
requested for that stream is skipped. Every requested line is one the
instruction will read; the testbench checks this. In a cold-cache scaling
test nearly all load stalls go away with prefetching. The exact counts
depend on the random seed of the cache model.

## Host interface

| port | use |
|---|---|
| `imem_we/waddr/wdata` | write Breeze instruction words (slot *n* starts at word 32·*n*) |
| `brz_start`, `brz_base`, `brz_len` | start instruction: first word and length (words beyond the length read as 0) |
| `busy` | high from start until the last result is stored; the host holds its pipeline meanwhile |
| `done` | one-clock pulse at the end |
| `brz_intr` (level), `paused`, `brz_resume` (pulse) | interrupt instruction or exception: issuing stops at the next result boundary, queued work drains, `paused` rises; `loop_idx` and `stream_addr` are the state to save; resume continues where it stopped |
| `brz_restore`, `ctx_idx`, `ctx_addr` | a `brz_start` while paused gives up the paused instruction and starts another one. A start with `brz_restore` high loads `ctx_idx` and `ctx_addr` (a saved state) instead of the start values, so the instruction continues where it was interrupted |
| `rd_req/rd_addr/rd_ready/rd_data` ×3 | load ports: the data is taken in the clock `rd_ready` is high, 128 bits from any byte address |
| `wr_req/wr_addr/wr_data/wr_be/wr_ready` | store port with byte enables |
| `pf_req/pf_addr/pf_ready` | prefetch port (line addresses) |
| `ds_level` | number of iterations waiting in the data station |
| `evt_*` | one-clock strobes: iteration, load stall, data station full, store stall, write, saturation, multicast, prefetch |

Parameters of `mediabreeze_top`: `SIMD_BITS` = 128, `DS_DEPTH` = 8,
`NUM_INSTR` = 4, `LINE_BYTES` = 32, `PF_DIST` = 16.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/breeze_pkg.sv \
    $(ls rtl/*.sv | grep -v breeze_pkg) tb/tb_mediabreeze_top.sv \
    --top-module tb_mediabreeze_top -Mdir build/top
build/top/Vtb_mediabreeze_top
```

For a unit test, list the package, the module (plus `hw_loop.sv` and
`addr_gen.sv` for `prefetch_engine`) and `tb/tb_<module>.sv`.

`tb_mediabreeze_top` runs the unit at its default parameters against a
behavioural L1 with random misses on every port. It runs seven kernels:

- the DCT pass above, on a 32×16 image, with an interrupt and resume in the
  middle. It is run a second time with the interrupted DCT given up, its
  state saved, the upsampling kernel run in between, and the DCT restarted
  from the saved state;
- 8-bit scaling `(p·f + o) >> 6` with unsigned saturation, using three
  streams. It is run with no misses (to check one iteration per clock), with
  a slow store port (the queue fills), and cold with and without prefetch;
- a 16×16 SAD at four candidate offsets, with a sum reduction;
- 2× upsampling by multicast;
- an 8×8 matrix multiply in multicast order: one element of A is broadcast
  to all lanes and multiplied by a row of B, so a whole row of C builds up
  at once without transposing B;
- an 8-tap FIR filter: eight neighbouring samples are read from an
  unaligned address in each iteration, and the coefficient is broadcast;
- a 5×5 2-D filter, the arithmetic of a 5×5 colour-filter-array
  interpolation. It uses four loop levels, and the image stream needs a
  different stride at each of them.

Every output byte is compared with a reference computed in the testbench.
The test fails if a stall, full queue, saturation, multicast, reduction,
pause, restore or prefetch never occurs. The unit testbenches compare each module
with a model written from its definition: a software loop nest, a
closed-form address formula, a queue model and per-lane arithmetic.

## Departures and limits

- The superscalar host, its L1 cache and the multiplexers that would share
  the host's existing SIMD and load/store units are not included. The unit
  owns its SIMD unit, and the memory side is a set of ports.
- The published design evaluates the unit with 64-bit SIMD units. The
  instruction examples, and this RTL, use a 128-bit datapath.
- The instruction is 128 bytes, not 120 (see above). The operation set, the
  reduction set, the multicast encoding and the handshakes are this design's.
- An interrupt takes effect only at a result boundary: after an iteration
  that writes a result, so that no partial sum is left in the accumulators.
  Only the loop indices and stream addresses therefore make up the state.
  With a large LL span the interrupt can wait many iterations.
- Arithmetic uses a 32-bit working value per lane, so 32-bit × 32-bit
  products wrap.
- Permutations other than unpacking and multicast are not provided. Nor is
  reorganization of the result beyond packing.
- Loops and address generation are not pipelined (see Pipeline, stalls and
  timing).
