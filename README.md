# Gradient-descent motion estimation processor for 1080p MPEG-2 video

This is synthesizable SystemVerilog for a motion estimation (ME) engine. It targets 1920x1080 video at 30 frames/s, with a search range of -128..+127 horizontally and -64..+63 vertically. It does not compare a macroblock (MB, 16x16 pixels) with every candidate position. Instead it runs a **gradient descent search** (GDS):

1. Take the best of four candidate vectors.
2. Compute the slope of the error surface at that point.
3. Step along the steepest direction while the error keeps falling.
4. Repeat until the direction stops changing.

About two dozen block matchings per MB replace the 32768 of a full search. That brings the work down to a few GOPS, so the hardware can run slowly (81 MHz) and at a low supply voltage.

The hardware is a 32-lane SIMD datapath fed by 16 three-port search-window SRAM banks and two template buffers. A sequencer (SEQ) runs the inner loops of the search by itself. An embedded RISC controller sits above it and chooses directions and step widths. A 64-bit MemoryBus loader refills the caches while the search runs.

The controller itself and the external frame memory are not part of this RTL. The controller's local bus and its instruction RAM fetch port are brought out as ports of `me_top`. The testbench plays both of these parts.

## The search and who does what

The error criterion for a vector (Vx, Vy) is the sum of squared differences between the template `T` (the current MB) and the search window `S` (the previous frame):

    E     = sum_ij (T[i,j] - S[i+Vx, j+Vy])^2
    dE/dx = sum_ij (T[i,j] - S[i+Vx, j+Vy]) * (S[i+1+Vx, j+Vy] - S[i-1+Vx, j+Vy])
    dE/dy = sum_ij (T[i,j] - S[i+Vx, j+Vy]) * (S[i+Vx, j+1+Vy] - S[i+Vx, j-1+Vy])

Note the sign. With these definitions the error falls when you move along (+dE/dx, +dE/dy). The two "derivatives" are minus one half of the true gradient.

The work is split like this:

| step | done by |
|---|---|
| MSE of the 4 start candidates (zero, left MB, upper MB, same MB in previous frame); keep the best | SEQ command `CMD_INIT` |
| dE/dx and dE/dy at the current vector | SEQ command `CMD_DIFF` |
| turn the gradient into a direction and step width | controller (software) |
| step along the direction until the MSE stops falling | SEQ command `CMD_LINE`, without the controller |
| compare the new direction with the old one, repeat or stop | controller |
| MSE of one vector | SEQ command `CMD_VEC` |

Directions are quantised to 8 compass codes, 0..7 = +x, +x+y, +y, -x+y, -x, -x-y, -y, +x-y. A step moves each moving coordinate by `R_STEP`.

A line search stops in three cases:
- an evaluation does not lower the MSE (ties stop it too);
- the next vector would leave the usable range;
- `R_NCYC` steps have been taken.

The usable range is H -127..+126, V -63..+62. It is one pixel inside the nominal range, so the neighbours that the derivatives need are always inside the buffered window. All vectors that SEQ gives the datapath are clamped to this range.

## Hierarchical search over three image layers

A plain gradient descent can get stuck in a local minimum. So the search is run on a pyramid of three pictures:
- layer 1 is the full picture;
- layer 2 keeps every second pixel of every second row of layer 1;
- layer 3 does the same to layer 2.

The search starts in layer 3. Its result, doubled, is a start candidate in layer 2, and the layer-2 result, doubled, is a start candidate in layer 1. The frame memory is expected to hold the three layers; the `mb_req_layer` output tells it which one is read.

`R_LAYER` (1, 2 or 3; reset value 1) switches the whole datapath. With `l = layer - 1`:

| | layer 1 | layer 2 | layer 3 |
|---|---|---|---|
| block (N x N), N = 16 >> l | 16x16 | 8x8 | 4x4 |
| usable range H | -127..+126 | -63..+62 | -31..+30 |
| usable range V | -63..+62 | -31..+30 | -15..+14 |
| window (columns x rows) | 272x144 | 136x72 | 68x36 |
| MSE / DX / DY clocks | 8 / 16 / 9 | 4 / 8 / 5 | 2 / 4 / 3 |
| PE columns used per half | 16 | 8 | 4 |

In layers 2 and 3, MB positions, `R_MBX` and all loader coordinates are in that layer's own pixel grid. The buffer column is then `column + (128 >> l)`, and the window row is `row - Y + (64 >> l)`. The storage scheme below is the same in every layer. Only the block and window get smaller. The controller has to reload the window and template when it changes layer.

## Search window storage and the crosspath

This is the part to understand before changing anything.

**Window and buffer columns.** For an MB at frame position (X, Y), the window is 272 columns x 144 rows. It starts at frame column X-128 and frame row Y-64. The columns are named by a *buffer column* `bc = frame column + 128`. A vector (Vx, Vy) then reads:
- buffer columns `X + 128 + Vx + i`;
- window rows `r = 64 + Vy + j`.

**Halves.** Window rows of even parity live in the 8 banks of half 0 (SW00..SW07). Odd rows live in half 1 (SW10..SW17). Each half also has its own copy of the template buffer (TB0, TB1). So in one clock the two halves handle two different MB rows, 32 pixels in all.

**Banks.** Inside a half, column `x` lives in bank `x mod 8`. Each bank has two read ports. To read the 16 pixels of columns c..c+15 of a row:
- port 0 of bank b reads the column of that bank in c..c+7;
- port 1 reads the one in c+8..c+15.

Every bank is read exactly twice, whatever c is.

**Word address.** The word in the bank is

    address = ((bc / 8) mod 36) * 72 + r / 2

That is 36 groups of 8 columns, with 72 rows of one parity each, which uses 2592 of the 4096 words. The column groups form a ring of 288 columns: 272 for the current window plus 16 for the next MB's stripe. The loader can therefore write the next stripe while the current window is searched. Moving to the next MB changes nothing but X.

**Crosspath.** This sorts the bank outputs back into template order. PE column k takes port `k/8` of bank `(c + k) mod 8`. It is one 16:1 multiplexer per PE, selected by `c mod 8`. The same function can be built as one 1:16 demultiplexer per bank port.

## Evaluation schedules and the PE

Each PE forms two differences, registers them, multiplies them and registers the 18-bit product. The products are:
- MSE: `(T-S)^2`;
- derivatives: `(T-S)*(S+1 - S-1)`.

An adder tree sums the 32 products of a clock. An accumulator adds the clocks of one evaluation together.

| evaluation | reads per half | how the neighbours are formed |
|---|---|---|
| MSE (`M_MSE`) | 8 | none: each half reads its 8 MB rows |
| x-derivative (`M_DX`) | 16 | each row is read twice, first at start column -1, then at +1. The first read, kept in a register, gives the left neighbour. The second read gives the right neighbour. The centre is the second read shifted by one PE, except in PE 0, which takes it from the first read. |
| y-derivative (`M_DY`) | 9 | both halves read window rows r0-1+2t and r0+2t together, for t = 0..8. The upper and lower neighbours of a row are in the *opposite* half, as its current and previous read. The centre is this half's current or previous read. |

Timing:
- The address generators accept the next evaluation in the last clock of the current one. MSEs therefore follow every 8 clocks.
- A result reaches SEQ 5 clocks after the last read: SRAM 1, PE 2, adder tree 1, accumulator 1.
- A line-search step waits for its own result before it decides on the next one, so it costs 13 clocks.
- `CMD_INIT` takes 4 x 8 clocks plus the pipeline latency.

## Sequencer registers (local bus)

The local bus carries 32-bit words. A write is `lb_sel & lb_we` in one clock. Reads are combinational. Vectors are packed as x in bits 9:0 and y in bits 25:16, both two's complement.

| addr | name | use |
|---|---|---|
| 00 | CMD | write 1 INIT, 2 VEC, 3 DIFF, 4 LINE; ignored while busy |
| 01 | STATUS | bit 0 SEQ busy, bit 1 loader busy, bit 2 loader queue full |
| 02 | MBX | frame column X of the MB |
| 03 | SLOT | template buffer slot (word address = slot*16 + row) |
| 04-07 | IV0-IV3 | start candidates |
| 08 | SVEC | vector for VEC and DIFF |
| 09, 0A, 0B | DIR, STEP, NCYC | line search direction code, step width, step limit |
| 0C | LAYER | image layer 1..3 of the search (see above) |
| 0D, 0E | TBSIZE, SWSIZE | stored for the controller only; the sizes follow from LAYER |
| 10, 11 | BVEC, BMSE | best vector and its MSE (also the start of LINE; writable while idle) |
| 12, 13 | DEX, DEY | derivatives |
| 14 | NEVAL | evaluations run by the last command |
| 18 | LDCMD | write: hand a command to the loader, bit 0 = 0 stripe / 1 template |
| 19, 1A, 1B | LDFX, LDFY, LDBC | loader frame column, frame row, buffer column |
| 1C | LDSLOT | template slot the loader writes (separate from SLOT, which the search reads) |

`seq_done` pulses for one clock when a command ends.

## MemoryBus loading

The loader issues one read request per 64-bit word (8 pixels), row by row, with a valid/ready handshake:
- `mb_req_frame` = 0 for the reference frame, 1 for the current frame;
- `mb_req_layer` = image layer - 1;
- `mb_req_x` = word column;
- `mb_req_y` = frame row.

The memory answers with `mb_rsp_valid`, in request order, after any latency.

There are two kinds of load:
- A window stripe is 16 columns x 144 rows, 288 words. Row r goes to half r mod 2.
- A template is 32 words, written to both TBs.

In layers 2 and 3 a stripe has 144 >> l rows. A template then takes one word per row, and the loader shifts the word right by `column mod 8` pixels, so the block starts at pixel 0. A layer-3 block can start in the middle of a word. Stripe columns must be multiples of 8; template columns must be multiples of N.

The loader holds two commands. The second one starts requesting right after the last request of the first, so the memory latency is paid once per pair, not once per command. The usual pattern per MB is: queue the stripe, then the template, then leave the loader alone until the next MB. A write to LDCMD is ignored while STATUS bit 2 is set, or in the clock right after another LDCMD write.

In layer 1, one MB needs 320 bus words. At one word per clock, plus the latency, that fits into the 330-clock MB period of 1080p30 at 81 MHz (81e6 / (8160 MBs x 30)). The search window of the first MB of a row needs 17 stripes.

## Module map

```
me_top
├─ sequencer        SEQ: registers, command FSM, line search
├─ addr_gen x2      per-half address and control generation
├─ simd_datapath
│  ├─ sw_sram x16   2R1W 4K x 8 SW banks, 8 blocks of 512 words
│  ├─ template_buffer x2   96 x 128 bit, 64-bit write port
│  ├─ simd_half x2  crosspath + neighbour registers + 16 x pe
│  └─ adder_tree    32-input tree and accumulator
├─ mbus_loader      MemoryBus requests and cache writes
└─ iram             1K x 32 instruction RAM of the controller
me_pkg              shared types, register map, bank address function
```

## How far this follows the original design, and where it departs

These parts follow the original design:
- the GDS steps;
- 32 PEs in two groups of 16, each with 8 SW banks and one TB;
- 4K x 8 three-port SW banks, 16 in all;
- a 128-bit TB read path and 12 Kbit TBs;
- a 64-bit MemoryBus;
- an MSE in 8 clocks;
- PE structure: two subtractors, a multiplier and two register stages;
- the SEQ command set and the SEQ running the line search alone;
- a three-layer search, starting in layer 3.

The sizes per layer are derived here. The source does not give the block size or search range of the upper layers. Here each layer halves both picture directions, so the block and the range halve too.

These are choices made here, because the source is silent on them:
- how pixels are spread over banks and halves, and the address formula;
- the derivative read schedules (16 and 9 clocks);
- every bus protocol and the register map;
- direction coding, and what ends a line search at the range edge or on equal MSE;
- accumulator width and read latencies.

The source's PE drawing shows the neighbour difference as S-1 minus S+1. Its equations use S+1 minus S-1, and the equations are followed here.

Not built:
- **The embedded RISC controller.**
- **The frame memory**, including the making of the subsampled layers.
- **Several processors on one MemoryBus.** The source mentions this as an option for better pictures. The loader has no bus arbitration.
- **The SRAM's circuit-level features.** The symmetric cell and the divided wordline matter for power, not for function. The memory is a plain register array with the same ports, and its block/row split is in the address.

Half-pel refinement is left to the downstream codec, as in the original system.

## Verification

Each module has a self-checking testbench in `tb/`. It prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

The golden values come from `tb/tb_ref_pkg.sv`, which evaluates the three equations directly on a synthetic image. The reference frame is a sum of triangle waves plus a hashed texture. The current frame is that image moved by (5, -3), plus noise.

`me_top_tb` runs the whole design at its default sizes:
- it loads a full window over the MemoryBus, with random stalls;
- it searches four MBs of a row while the next stripe and template load concurrently;
- it checks every result register against the golden values;
- it checks the 8-clock MSE rate;
- it searches one MB hierarchically, in layer 3, 2 and then 1, and requires the same vector as the direct layer-1 search;
- it requires each mechanism to occur: back-to-back evaluations, concurrent cache writes, bus stalls, layer switches, and line searches ending on an MSE increase, at the range edge, and on an unchanged direction.

On the test image a full search per MB took 10-14 evaluations and 129-190 SEQ-busy clocks, without controller overhead. The layer-3 and layer-2 searches took 10 evaluations each, in 57 and 81 clocks.

To simulate with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert --top-module me_top_tb \
  -y rtl -y tb +libext+.sv -Irtl rtl/me_pkg.sv tb/tb_ref_pkg.sv tb/me_top_tb.sv
./obj_dir/Vme_top_tb
```

`me_period_tb` checks the MB period. The frame memory never stalls and has 4 clocks of latency. Per MB it times the stripe and template loads, and the search with the controller's register traffic (one local bus access per 2 clocks). Both must end within 330 clocks. Measured:
- loads: 325 clocks;
- search: 187-292 clocks.

For a block test, replace `me_top_tb` by `<module>_tb`. Verilator lint (`--lint-only -Wall`) reports no latches, combinational loops or multiply-driven nets. The remaining warnings are unused package constants, unused low bits of function arguments, and the reset net being used both by the asynchronous resets and by the assertions' `disable iff`.
