# iVisual: a visual sensor that answers instead of streaming pixels

iVisual puts an image sensor and a vision processor on one die, so that what
leaves the chip is a decision ("which posture", "where is the object")
rather than a video stream. The sensor is 128 x 128 pixels and is read out
fast (up to 2790 frames/s at 50 MHz). Behind it sit three processors, each
suited to one shape of computation:

| processor | data in → data out | built as |
|---|---|---|
| global processor (GP) | 128 values → 128 values | SIMD array of 128 processing elements (PEs) with a register file and a switching network |
| feature processor (FP) | 128 values → 1 value | 128-to-1 tree of small ALUs that reduces a vector in one cycle |
| decision processor (DP) | scalars → scalars, plus control | 32-bit five-stage MIPS-like CPU |

Frames go straight from the sensor into a 1 Mb **bitplane memory** (BM). This
memory is also the GP's data memory. The processors work in a pipeline. The
GP turns a frame into 128-lane vectors. The FP reduces each vector to a
feature. The DP decides what to do next, and it also starts and steers the
other two.

This repository holds synthesizable SystemVerilog for the whole SoC, plus a
behavioural model of the analog pixel array and self-checking testbenches.

## Data flow and frame pipelining

```
 pixel array (model) ─► 32 ADCs ─► read-out ctrl ─► bitplane memory ◄─► GP ─► FP ─► DP
                                   (ping-pong buffers)   (shared port)   │           ▲ │
                                                                         └── 256 B ──┘ │
                                        GP/FP start, signal, break ◄───────────────────┘
                 AHB master 1 ◄── GP                     DP ──► AHB master 0
```

The sensor writes frame *n* into one BM buffer while the processors work on
frame *n−1* in the other. The two buffers are plane slots given by
`cfg_slot[0]` and `cfg_slot[1]`. After each frame the read-out controller
pulses `frame_done`, increments `frame_cnt` and sets `frame_buf` to the buffer
it just finished. The DP reads both through its `STAT` instruction, as
`{frame_cnt[14:0], frame_buf, 13'b0, fp_at_break, fp_busy, gp_busy}`, and
starts the GP program written for that buffer.

## Sensor read-out: 35 cycles per column

The read-out has 32 sets. Each set serves four neighbouring columns through
a 4:1 multiplexer, so one row takes 4 × 35 = 140 cycles. A frame takes
128 × 140 = 17 920 cycles, which is 2790 frames/s at 50 MHz. The 35 cycles of
one column phase are split as follows (`cis_readout_ctrl`):

* cycles 0–12: column settling (13 cycles);
* cycles 13–32: conversion by the ADC controller (20 cycles);
* last 2 cycles: the result is stored into the row buffer.

After the fourth phase, the completed 128-pixel row moves to a one-row write
buffer. From there it is written into the BM as 8 bitplanes. If the next row
completes before the BM has taken the previous one, `overflow` pulses and
that row is lost. In this SoC it cannot happen, because the sensor always has
priority at the BM.

**Hybrid ADC (`cis_adc_ctrl`).** An 8-bit conversion combines two methods:

1. **SAR part, bits [7:3].** Five successive-approximation steps, each taking
   one DAC-settle cycle and one compare cycle.
2. **Ramp part, bits [2:0].** The DAC steps through all eight LSB codes. The
   result is the last code at which the comparator still reported "held level
   ≥ DAC level".

With two sample cycles this adds up to 2 + 5·2 + 8 = 20 cycles. A plain 8-bit
SAR built the same way would take 18, and a 4 + 4 split would take 26. `done`
rises 20 clock edges after the `start` edge. The analog parts are in
`cis_pixel_array`, which is a behavioural model and not synthesizable logic:

* pixels;
* 4:1 multiplexers;
* a gain stage with gains ×1, ×2, ×4 and ×8;
* sample-and-hold;
* comparator.

It produces a deterministic test scene, so testbenches can predict every pixel:

    L(r, c, f) = (2r + c + 16f) mod 256, xor 0x5a for r ≥ 64
    code       = min(4095, 2·L·gain) / 16

## Bitplane memory

The 1 Mb is made of 8 single-port banks (`bm_bank`). Each bank is 1024 words
of 128 bits, and one word holds one bit of one pixel of each of the 128
columns. A **plane slot** is one bitplane of 128 rows. There are 64 slots,
which hold eight 8-bit frames. The GP and the sensor address the memory by
start slot, row and bit count (1–8).

`bm_addr_gen` maps bit *b* of an access to plane *p* = slot + *b*. That plane
lives in bank *p* mod 8, at word (*p* div 8)·128 + row. Any eight consecutive
slots therefore fall into eight different banks, so an 8-bit access of a
whole row takes a single cycle. `bm_reorder` turns per-pixel bytes into bank
words and back.

**Collision handling.** The sensor and the GP share the bank ports. In a
cycle where both want a bank, the sensor wins. The GP's `gp_gnt` stays low and
`collision` pulses. The GP then repeats the request in the next cycle, which
costs it one stall cycle. A GP read returns data one cycle after it is
granted. The published design states only that collisions are resolved in
hardware; the priority rule and latency above are this design's choice.

## Global processor

`global_processor` is made of these parts:

* `gp_ctrl`: program control;
* `gp_perf`: the PE register file (PERF), 16 entries of 128 × 16 bits, with two
  read ports and one masked write port;
* `gp_switch`: the switching network;
* `gp_pe_array`: 128 `gp_pe`.

One instruction issues per cycle. Operand A is read from PERF[ra] and passes
through the switching network. Operand B comes from PERF[rb]. The PE result is
written to PERF[rd] in every lane whose condition holds.

Instruction word (34 bits; the field layout is this design's own):

| bits | 33 | 32 | 31:26 | 25:22 | 21:18 | 17:14 | 13:11 | 10:4 | 3:2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| field | bcast | pedge | op | rd | ra | rb | sw | amt | cond | w8 | sgn |

The fields mean the following:

* **Immediates** are bits [17:2].
* **cond** picks the condition: always, if flag, or if not flag. Each PE has its
  own flag, set by the compare instructions.
* **w8/sgn** read the operands as 8 or 16 bits, signed or unsigned, and
  saturate 8-bit results.
* **sw/amt** set the switching mode:
  * pass;
  * downsample (even/odd lanes);
  * upsample;
  * rotate left/right by amt;
  * shift left/right by amt, padding with zero or with the edge sample;
  * interleave of the two halves.

  With bcast set, every lane gets lane amt.

Operations:

| group | instructions |
|---|---|
| arithmetic and logic | MOV ADD SUB MUL MIN MAX ABSD AND OR XOR NOT SHL SHR ADDI LDI IDX (own lane index) |
| compare and flags | CLT CEQ CGT SETF CLRF |
| bitplane memory | BMLD, BMST: slot = [17:12], bits = [11:9]+1, row = AR + [8:2], [1] = AR post-increment |
| program control | SETAR SETLC LOOP JMP WAIT END NOP |
| other processors | TOFP (vector and flag mask to the FP), TODP (vector to the DP), FRDP (vector from the DP) |
| off-chip | EXLD, EXST: 64 AHB words at byte address imm·256 |

Some instructions need something outside the GP:

* a BM grant;
* a free mailbox (TOFP, TODP);
* a full mailbox (FRDP);
* a DP signal (WAIT);
* the AHB bus (EXLD, EXST).

Such an instruction waits in place and raises `stall`; nothing else in the GP
moves meanwhile. The PERF clock comes through a latch-based clock gate
(`clock_gate`). The gate is enabled only in cycles where an instruction
writes PERF.

## Feature processor

`feature_processor` holds a 128-sample input buffer with one enable bit per
lane (`fp_input_buffer`, also clock-gated). It also holds the reduction tree
(`fp_tree_alu`): seven levels of `fp_ualu`, combinational, finished within
the cycle. The tree computes these reductions over the enabled lanes, in 8-
or 16-bit, signed or unsigned mode:

* SUM;
* AND, OR, XOR;
* CNT (count of enabled lanes);
* MIN, MAX;
* ARGMIN, ARGMAX (index of the extreme; ties go to the lower index);
* CRANGE (count of lanes within [lo, hi]).

The result lands in register R. Other instructions:

* **Data manipulation:** LDIN (take a vector from the GP, waiting for one), SETS,
  SHL, SHR, PAD, CLREN, SETEN, MODE, SETLO, SETHI.
* **Control:** JMP, JNZ, JEXT, BRK, BRKEXT, WAIT, SEND (R to the DP, waiting for a
  free mailbox), NOP, END.

The instruction fields are op [31:26], sgn [25], idx [22:16] and imm [15:0].
A BRK stops the FP with `at_break` set. The DP's next FPGO resumes it after
the break point.

## Decision processor

`decision_processor` is a classic IF/ID/EX/MEM/WB pipeline.

* **Instructions:** add, sub, and, or, xor, slt, sll, srl, addi, slti, andi, ori,
  lui, lw, sw, beq, bne and j, with MIPS encodings.
* **Program counter:** counts words, and branches go to pc + 1 + offset. There is
  no delay slot: a taken branch or jump is resolved in EX and flushes two
  instructions.
* **Forwarding:** results are forwarded from MEM and WB, and the register file
  writes through.
* **Load-use:** a load followed by its use costs one bubble.
* **External memory:** an address with bit 31 set goes through AHB master 0, and
  the pipeline waits for the bus.

Opcode 0x1c is the inter-processor group:

* **FPRD rd:** read the next FP result.
* **GPGO rs, FPGO rs:** start the GP or FP at address rs (FPGO also resumes a
  break).
* **GPSIG, FPSIG:** decision feedback to a WAIT or JEXT.
* **VRECV, VSEND:** the whole 128 × 16-bit wide register from or to the GP in one
  cycle, i.e. 256 bytes.
* **VRD, VWR:** access one lane of the wide register.
* **STAT:** read the status word.
* **HALT**.

An IPC instruction whose resource is missing holds IF, ID and EX. Older
instructions still drain. The held instruction keeps the operand values that
were forwarded to it.

## Inter-processor synchronization

Every processor-to-processor path is an `ipss_mailbox`: a one-entry register
with `put`/`can_put` on one side and `full`/`take` on the other. A put and a
take may happen in the same cycle. There are four of them:

* GP → FP: 128 × 16 bits plus 128 enable bits;
* FP → DP: 32 bits;
* GP → DP: 2048 bits;
* DP → GP: 2048 bits.

Each processor checks, instruction by instruction, whether the resource it
needs is there, and waits only then. The three programs therefore run
independently and meet only where data actually passes.

## Off-chip memory

Two `ahb_master` instances speak AHB 2.0: bus request/grant, single NONSEQ
32-bit word transfers, and wait states through HREADY. HRESP ERROR is reported
on `err`. Bursts, SPLIT and RETRY are not used.

## Where this RTL departs from the published chip

* **GP instructions:** the published GP has 51. The list above (35) is a
  reconstruction from the described features (compound arithmetic,
  conditional execution, bit-width control, padding, unique index), not the
  original set.
* **FP instructions:** the published FP has 33 (17 feature, 16 data and
  control). 29 are built; names and encodings are this design's own.
* **DP and IPC instructions:** the published DP handles IPC instructions with
  out-of-order control. Here they stall the front of the pipeline in order.
* **Cycle counts:** the published minimum-intensity example takes 255 GP cycles
  for the per-column minimum of a 128-row frame. In this GP, load and compare
  are separate instructions and a BM read takes two cycles, so the same job
  takes about 4–5 cycles per row.
* **Analog parts:** pixel array, multiplexers, gain stage and comparators are a
  behavioural model. The gains, the scene and the 12-bit analog scale are
  modelling choices.
* **Design choices not taken from the published chip:**
  * memory sizes of the three instruction memories (GP 256 × 34, FP 64 × 32,
    DP 256 × 32) and DP data memory (256 words);
  * PERF depth (16);
  * BM priority;
  * the 13/20/2 split of the 35-cycle column phase;
  * all instruction encodings.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. With plain Verilator
5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
        rtl/ivisual_pkg.sv tb/tb_asm_pkg.sv tb/tb_ivisual_top.sv --top-module tb_ivisual_top
    ./obj_dir/Vtb_ivisual_top

Replace `tb_ivisual_top` with any other bench in `tb/`. Each block has its
own bench, `tb_<module>`. Two exceptions:

* `gp_ctrl` is exercised by `tb_global_processor`;
* `fp_ualu` is exercised by `tb_fp_tree_alu`.

`tb/tb_asm_pkg.sv` holds small assembler functions for the three instruction
formats. `tb/ahb_mem_model.sv` is an AHB slave with random grants and wait
states.

The two end-to-end benches share their body, `tb/ivisual_e2e.sv`:

* `tb_ivisual_top` uses 4-row frames.
* `tb_ivisual_full` uses every default: 128 × 128 frames and two frames
  reduced. It runs about 37 000 cycles, in well under a minute.

Each run goes as follows:

1. The DP polls STAT and starts the GP entry of the buffer that just completed.
2. The GP forms per-column minima and sends them to the FP and the DP. It also
   copies them off chip and then keeps reading the BM, which provokes
   collisions with the sensor.
3. The FP reduces the vector to its minimum and that minimum's column.
4. The DP logs the results.

The bench recomputes every frame from the scene formula. It checks the
frame period (exactly 140 cycles per row) and counts GP, FP and DP stalls, BM
collisions, use of both buffers, gated-clock idle cycles and AHB traffic.
It fails if any of these never happened.

## Lint notes

These Verilator warnings remain:

* **UNOPTFLAT on the node array of `fp_tree_alu`:** the levels of the tree live
  in one array. Each level reads only the level below, so there is no real
  loop.
* **PROCASSINIT in the behavioural pixel model:** its frame counter is
  initialised at declaration, because the model has no reset.
* **Unused-signal warnings** for status outputs that the top does not consume.
