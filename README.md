# MediaBreeze front end: one instruction per loop nest

SIMD media kernels spend most of their instructions not on arithmetic but on
feeding the SIMD unit: computing addresses, counting loops and branching,
loading and storing. MediaBreeze moves that overhead into a small block of
hardware next to an existing SIMD unit. A single *Breeze instruction* describes
a whole kernel: a loop nest up to five levels deep, three input streams and one
output stream with a stride per loop level, and the SIMD operation to apply.
Once the instruction is loaded, the hardware issues one iteration of the
innermost loop body every clock: three load addresses, one store address, the
loop indices and the SIMD control word. No instructions are fetched or decoded
while it runs.

This repository holds the synthesizable SystemVerilog for that added hardware:

| module | what it is |
|---|---|
| `mediabreeze_top` | the front end, all blocks below wired together |
| `mb_control` | sequencer: fetch, decode, run, stall, pause/resume |
| `mb_imem` | Breeze instruction memory (33 x 32 bits) |
| `mb_decoder` | reads the instruction once into field registers |
| `mb_hw_loop` | five nested loop counters |
| `mb_lastval_cmp` | bank of loop-bound comparators |
| `mb_agu` | address generation unit of one stream (four of them) |
| `mb_ctrl_mux` | hands the SIMD units' control to the Breeze decoder |
| `mb_pkg` | constants, instruction layout, `simd_ctrl_t`, `breeze_cfg_t` |

The units that MediaBreeze reuses from the host processor are not part of it:
the load/store units, the SIMD computation unit, the data reorganization
(pack/unpack/permute, reduction, shift, saturate) hardware, the data station
(the SIMD register file or queues between them) and the caches. The top
drives them through its ports.

## Running one Breeze instruction

1. The processor's own decoder meets a 32-bit *start* instruction carrying the
   address and length of a Breeze instruction. When older instructions have
   finished it pulses `bi_start` with `bi_addr` (byte address) and `bi_len`
   (words). From here `halt_pipeline` holds the superscalar pipeline, because
   the SIMD and load/store hardware now belong to MediaBreeze.
2. **FETCH.** `mb_control` requests the words one at a time on the fetch
   port (`fetch_req`/`fetch_addr`, answered by `fetch_rvalid`/`fetch_rdata`
   after any latency) and writes them into `mb_imem`.
3. **DEC.** `mb_decoder` reads the 33 words once, one per clock, into its
   registers. Words at or beyond the length read as zero.
4. **RUN.** Loop indices start at 1, each stream address at its base. Every
   clock with `iter_valid` high is one iteration. `stall` from the memory side
   holds everything for that clock.
5. After the iteration in which all five loops are at their bounds, the
   controller returns to idle, pulses `done` and releases the pipeline.

Latency: the first iteration comes 38 clocks (`INSTR_WORDS + 5`) after the
cycle in which the last instruction word is returned. After that the rate is
one iteration per clock that is neither stalled nor paused, so a nest with
bounds N1..N5 takes N1·N2·N3·N4·N5 clocks plus stalls.

**Interrupts and exceptions.** `bi_interrupt` (the second added instruction,
or an exception) moves a running nest to PAUSE. The iteration offered in that
cycle is not issued. Loop indices and stream addresses stay in their registers,
`halt_pipeline` drops so the handler can run, and the SIMD units get their
conventional control back. `bi_resume` continues from the same iteration.

A handler that needs MediaBreeze itself saves the paused instruction's
state. While paused, `loop_index`, `is_addr` and `os_addr` hold the loop
indices and the next address of each stream. That is all the state there is:
bounds, strides and masks come from the instruction, which is simply fetched
again. The handler can then start another Breeze instruction directly from
PAUSE, which abandons the paused one. To continue the interrupted instruction
later, start it again with `bi_restore` high and the saved values on
`ctx_index` and `ctx_addr` (IS-1, IS-2, IS-3, OS order). The instruction is
fetched and decoded as usual, but the saved indices and addresses are loaded
instead of 1 and the base addresses, and the nest resumes at the iteration
where it stopped.

## The Breeze instruction

33 words of 32 bits (132 bytes), word 0 first. `mb_pkg` holds the layout.

| words | field |
|---|---|
| 0..4 | Loop1-count .. Loop5-count (loop 1 outermost) |
| 5..8 | starting address of IS-1, IS-2, IS-3, OS |
| 9 | SIMD control word (below) |
| 10..29 | strides, word `10 + 5*s + (k-1)` = stride-k of stream s (s = 0..3 for IS-1, IS-2, IS-3, OS), two's complement |
| 30 | masks of IS-1 (bits 15:0) and IS-2 (bits 31:16) |
| 31 | masks of IS-3 (bits 15:0) and OS (bits 31:16) |
| 32 | element type, 2 bits per stream (bits 7:0: 0 = 8-bit, 1 = 16-bit, 2 = 32-bit); multicast, 1 bit per stream (bits 11:8) |

Control word (`simd_ctrl_t`): bits 7:0 operation code, 11:8 reduction
operation, 16:12 result shift, 19:17 LL (the loop level that writes results),
bit 20 signed, bit 21 saturate.

The order of the fields follows the published instruction format. The bit
positions inside words 9, 30, 31 and 32 are this design's own. Published
instructions are typically 120 bytes (30 words). Such an instruction loads
with `bi_len = 30`: the mask and type words are then zero, so every stream
steps by its stride-5 each iteration and all elements count as 8-bit.

## Hardware loops (`mb_hw_loop`)

Each index runs from 1 to its bound. Five comparators flag the levels that
are at their bound; `mb_lastval_cmp` uses `index >= bound`, so a bound of 0
acts as 1. A priority encoder picks the level that steps next. That is the
innermost level that is not at its bound while every level inside it is. The
chosen level increments by one and every level inside it returns to 1. When
all five are at their bound, `end_of_loops` marks the final iteration. Unused
levels take bound 1.

## Stream addresses, strides and masks (`mb_agu`)

Each stream's address register adds one of its five strides per iteration.
Stride-k is used on the iteration after which loop k increments, and stride-5
is used when only the innermost loop steps. The hardware sees which loop
increments through one shared bank of comparators for loops 2..5 (`lastval`)
and through the stream's masks:

* A stream has four 4-bit masks, mask-1..mask-4. Bit `j-2` of mask-k says
  that stride-k needs loop j (j = 2..5) at its last value.
* flag-k is set when mask-k is non-zero and every loop it names is at its
  last value.
* The lowest k with flag-k set picks stride-k. No flag picks stride-5.

For an ordinary nest, mask-k names loops k+1..5. Each stream's 16-bit field
is then `16'h8CEF`: mask-4 = `1000`, mask-3 = `1100`, mask-2 = `1110`,
mask-1 = `1111`. With these masks, stream address = base + Σ (index_k − 1)·P_k,
where P_k is the step the stream takes per iteration of loop k. Since the
stride is added *instead of* restarting the inner loops, it is

    stride-k = P_k − Σ_{j>k} (N_j − 1) · P_j        (N_j = bound of loop j)

Example: an 8×8 block of bytes in an image 64 bytes wide, rows on loop 4 and
columns on loop 5. P_5 = 1 and P_4 = 64, so stride-5 = 1 and
stride-4 = 64 − 7 = 57. The same block read transposed has P_5 = 64 and
P_4 = 1, so stride-4 = 1 − 7·64 = −447. A stream that must not move with some
loop gets P = 0 for that loop (e.g. a coefficient reused by every row).
Other masks let a stream ignore loop levels in ways that strides alone cannot
express.

## Results, SIMD control and parallelism

* `os_write` marks the iterations that complete an iteration of loop LL,
  i.e. every loop inside LL is at its last value. With LL = 5 every iteration
  writes. With LL = 4 one result per pass of loop 5 is written, as for a row
  sum or a dot product that accumulates across the innermost loop. LL values
  0, 6 and 7 act as 5. The output stream's own strides must advance only at
  those iterations (P = 0 for the loops inside LL).
* `simd_ctrl` carries the decoded control word while a nest runs, and the
  processor's `conv_ctrl` otherwise (`mb_ctrl_mux`).
* `simd_lanes` is the SIMD parallelism of the run: 128 bits divided by the
  widest element of the four streams (16, 8 or 4). Mixing 8- and 16-bit
  streams gives 8 lanes.
* `stream_dtype` and `stream_multicast` are passed on to the data
  reorganization hardware. What multicast does there is not defined here.

## Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `bi_start`, `bi_addr`, `bi_len` | in | 1, 32, 7 | start instruction |
| `bi_restore` | in | 1 | with `bi_start`: continue from saved state |
| `ctx_index[4:0]`, `ctx_addr[3:0]` | in | 5×32, 4×32 | saved loop indices and stream addresses |
| `bi_interrupt`, `bi_resume` | in | 1, 1 | pause / continue |
| `fetch_req`, `fetch_addr` | out | 1, 32 | instruction word request |
| `fetch_rvalid`, `fetch_rdata` | in | 1, 32 | instruction word returned |
| `stall` | in | 1 | hold this iteration |
| `iter_valid` | out | 1 | an iteration is issued |
| `is_addr[2:0]` | out | 3×32 | load addresses of IS-1..IS-3 |
| `os_addr`, `os_write` | out | 32, 1 | store address, store this iteration |
| `loop_index[4:0]` | out | 5×32 | loop indices, `[0]` = loop 1 |
| `conv_ctrl` / `simd_ctrl` | in / out | 22 | control word of the SIMD units |
| `simd_lanes` | out | 5 | 4, 8 or 16 |
| `stream_dtype`, `stream_multicast` | out | 4×2, 4 | per-stream type and multicast |
| `halt_pipeline`, `busy`, `done` | out | 1 | status |

All outputs of an iteration are valid in the cycle `iter_valid` is high. The
addresses and indices come from registers. `iter_valid` and `os_write` depend
combinationally on `stall` and `bi_interrupt`.

## Where this follows the published design and where it does not

Taken from the MediaBreeze description:

* five loop levels, three input and one output stream, 32-bit counters,
  comparators and adders;
* loop indices from 1 to the bound, the comparator and priority encoder
  structure, and resetting the inner loops when an outer one steps;
* last-value comparators shared by the four address units;
* per-level strides selected by flags built from masks and loop last values,
  with stride-5 as the default;
* the instruction's field order, decoding once into registers, the
  start/interrupt instructions carrying the length, and halting the pipeline
  for the duration;
* holding state on a stall or exception, and saving and restoring only the
  loop indices and stream addresses;
* the control multiplexer in front of the existing units, and parallelism
  limited by the widest element.

Choices of this design, where the description is silent:

* the exact mask encoding, the flag logic inside inc-cond/inc-combine, and
  giving the outer flag priority;
* all bit positions inside the control, mask and type words;
* the end condition, read as the iteration in which loop 1 and all inner
  loops are at their bounds;
* `>=` comparison, so that a bound of 0 acts as 1;
* the fetch port protocol, the one-word-per-clock decoder, and the state
  machine;
* the save/restore mechanism: pause in place, the handler reads the state
  out, then a restart with `bi_restore`;
* the meaning of LL as described above;
* a 33-word instruction memory, sized for the full format rather than the
  typical 120-byte instruction.

Not built:

* **Pipelining.** At over 1 GHz the looping logic is meant to be split into
  two pipeline stages and address generation into three. This RTL is the
  single-cycle form: loop index → comparators → priority encoder → increment,
  and comparators → flags → stride mux → 32-bit adder, each within one clock.
  Reported synthesis timing for that form in a 0.18 µm high-performance
  library is about 1.0 ns for the loops and 1.7 ns per address unit.
* The existing processor units listed above, and any use of multicast.

## Simulating

Each block has a self-checking bench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_mediabreeze_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/mb_pkg.sv tb/tb_mediabreeze_top.sv
    ./obj_dir/Vtb_mediabreeze_top

Use the same command with `tb_mb_hw_loop`, `tb_mb_agu`, `tb_mb_lastval_cmp`,
`tb_mb_imem`, `tb_mb_decoder`, `tb_mb_control` or `tb_mb_ctrl_mux` for the
blocks. Every bench resets all state it reads; `+verilator+rand+reset+2`
randomizes the rest.

`tb_mediabreeze_top` runs the top at its default parameters. It has an
instruction memory model with random latency, random stalls and random
interrupts, and it encodes instructions from a nest description using the
stride formula above. A software loop odometer is the reference: every
iteration's indices, four addresses, `os_write` and control word are checked.
Programs:

* an 8×8 sub-block walk with a transposed stream, a reversed 16-bit stream
  and one result per row;
* 25 random five-level nests with negative steps and every LL value;
* a 30-word instruction;
* four save/restore rounds: a nest is interrupted at a random iteration and
  its read-out state is checked, another instruction is started from PAUSE
  and run, and the first is restarted from the saved state and completed.

The bench also checks the 38-clock start-up latency, the iteration count of
every nest, the SIMD parallelism, the pipeline release while paused, and one
`done` per instruction. It counts each mechanism (stall, pause/resume,
reduced result writes, control hand-over, short instruction, decrementing
address, 4/8/16 lanes, restore) and fails if one never occurred. It finishes in well
under a second.

`tb_mb_workloads` runs six media kernels on the top at its default
parameters, with random stalls. Each kernel is written as array-index
expressions of its loop variables, the way its C code would index its arrays.
The bench derives the per-level steps from those expressions, encodes the
instruction, and checks every address and result write against the
expressions themselves. Sizes are chosen for simulation time:

| kernel | nest | iterations | results |
|---|---|---|---|
| colour-filter-array interpolation | 3 input rows, 16 rows × 4 groups | 64 | 64 |
| 8×8 block transform Y = C·X | 4×4 blocks × 8 rows × 8 terms | 1024 | 128 |
| full-search motion estimation | 16×16 block, ±8 search | 4624 | 289 |
| 2:1 horizontal scaling | 32 rows × 4 groups | 128 | 128 |
| 16-tap FIR | 64 groups × 16 taps | 1024 | 64 |
| per-sample companding | 1-D, 1024 groups | 1024 | 1024 |

`tb_mb_hw_loop` checks the loops against an odometer for 60 random bound
sets with stalls, and for a 140 000-iteration nest whose loop-1 index passes
16 bits. `tb_mb_agu` checks random masks against a reference stride choice,
and a 2-D walk against `base + row·pitch + col·elem`.

## Changing it

* The nest depth and the stream count are `NUM_LOOPS` and `NUM_STREAMS` in
  `mb_pkg`. `mb_hw_loop`, `mb_lastval_cmp` and `mb_agu` are parameterized by
  level count. The instruction layout, however, is written for 5 loops and
  4 streams, so changing them means changing the word map in `mb_pkg` and
  `mb_decoder`, and the mask width (`(LEVELS-1)²` bits per stream).
* Counter and address width is `WORD_W`. The blocks take `WIDTH`.
* To pipeline the address path, register `lastval` and the selected stride
  ahead of the adder. The stride choice depends only on loop indices, not on
  the address, so only the adder stays in the feedback loop. Delay
  `iter_valid`, `os_write` and `loop_index` to match.
