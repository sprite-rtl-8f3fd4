# SPRITE: a sparse CNN core whose index matching does not degrade with sparsity

Sparse CNN accelerators skip zero activations and zero weights, and so must
pair each non-zero input activation (IA) with the non-zero weights (W) of the
same input channel before anything is multiplied. In an inner-product design
the matcher compares a window of IA indices from one pixel with a window of W
indices from one output channel. At density *d* only about *d* of the compared
pairs match, so the multipliers starve on sparse layers and are swamped on
dense ones.

SPRITE fixes the *expected number of matches per cycle* instead. Every row of
its index-matching unit (IMU) holds **one** non-zero activation of one output
pixel. The 32 weight slots facing it are filled with the non-zero weights of
one 32-channel chunk, output channel after output channel. At density *d* a
weight row therefore covers about 1/*d* output channels, and each of them has
a weight at the activation's channel with probability *d*. That gives about
one match per IMU row per cycle at any density, which is exactly what one MAC
per IMU row can consume.

This repository is a synthesizable SystemVerilog model of that core in its
published main configuration:

| | |
|---|---|
| PEs | 32, each with 7 MACs (224 MACs) |
| IMU | 7 rows (output pixels) x 32 weight slots, chunk = 32 input channels |
| priority encoders | 3-way, one per IMU row |
| index FIFOs | depth 6, one per IMU row |
| data | 16-bit IA and W, 24-bit psums |
| psum buffers | 2 banks x 64 x 24 bit per MAC (0.375 KB) |
| global buffers | 1691 KB: 7 x 40448 activation entries + 32 x 256 weight rows |

## Data formats

Everything on chip is stored already compressed. An index is the channel's
position (0..31) inside its 32-channel chunk.

* **Activation entry** (`ia_entry_t`, 23 bits): `valid`, `last`, 5-bit
  index, 16-bit value. The activation buffer has 7 banks, one per IMU row.
  Bank *r* stores, tile after tile and chunk after chunk, the list of
  non-zeros of the tile's *r*-th pixel. `last` marks a list's final entry.
  A pixel with no non-zero in a chunk still gets one entry, with `valid = 0`
  and `last = 1`.
* **Weight row** (32 x `w_entry_t` of 28 bits + a `last` flag): each slot has
  `valid`, a 6-bit *local* output channel, a 5-bit index and a 16-bit value.
  For each chunk, PE *p*'s weight buffer lists the non-zeros of its first
  output channel in index order, then those of its second, and so on. Rows
  are packed without gaps, so a row may end in the middle of a channel. The
  chunk's final row has `last` set; an all-zero chunk is one empty row with
  `last` set.
* **Output channel mapping**: local channel *k* of PE *p* is layer output
  channel *k*·32 + *p*. Draining psum *k* of one pixel from all 32 PEs
  therefore yields one complete 32-channel chunk of the next layer's input.
* **Fixed point**: IA and W are Q8.8. Each product is shifted right by 8
  into a Q16.8 psum, and every addition saturates at 24 bits. The output is
  `ReLU(psum) >>> cfg_out_shift`, saturated to 16 bits.

A convolution with a kernel larger than 1x1 is handled by the loader. It
writes each output pixel's activations in im2col order, so the reduction
chunks run over (kernel position, input channel). The core itself computes
a sparse 1x1 convolution.

## Inside a processing element (`pe`)

One cycle of the front end:

1. `imu` compares the 7 held activations with the 32 held weight slots:
   `match[r][c]` is set when both are valid and their indices are equal.
2. Matches already served in an earlier cycle are masked out (`consumed`).
3. For each row, `mw_prio_enc` picks the first 3 remaining matches (three
   find-first-set stages in series).
4. The row pushes as many of those picks as its `index_fifo` has room for.
   Each pushed entry holds the operands and the output channel, because the
   weight row is gone one cycle later. The pushed matches are added to
   `consumed`.
5. If any row still has unserved matches (more than 3 matches, or a full
   FIFO), the weight row **stays** for another cycle (`ev_hold`).
   Otherwise the next row, prefetched from the weight buffer in the previous
   cycle, replaces it and `consumed` is cleared.

The back end is independent per row. Each cycle `mac_unit` takes the FIFO
head, multiplies in stage 1, and in stage 2 does a read-modify-write of
`psum_buffer[acc_bank][oc]`. The read is combinational, so consecutive pairs
for the same channel need no forwarding.

The FIFOs are what let the front end run at one weight row per cycle while
each row's match count fluctuates around one. A burst of 2-3 matches is
queued instead of stalling. Only a FIFO that is actually full holds the
weight row back.

**Commands.** The PE works one *IA step* at a time. A step starts with a
command that loads the 7 activations (`cmd_ia`) and picks where the weight
stream begins:

* `CMD_NEW_TILE`: at row 0.
* `CMD_NEXT_CHUNK`: at the row after the current chunk's `last` row.
* `CMD_SAME_CHUNK`: at the current chunk's first row again.

The PE then streams rows up to and including the `last` row, and reports
`done`. `quiet` additionally means its FIFOs and MACs are empty.

**Timing.** From the command to `done` a step takes
1 + (rows in the chunk) + (held cycles). The extra cycle reads the first row
of the stream. Together with the cycle in which the controller sees `done`,
a step costs rows + 2 cycles. The PE testbench checks this count for every
step.

## Sequencing a layer (`global_controller`)

The loop nest is, from outer to inner:

* **tile**: 7 output pixels, one per IMU row, shared by all PEs;
* **chunk**: 32 input channels;
* **step**: the next non-zero activation of every pixel of the tile.

Within a step, every PE streams its own weights of the chunk past the
broadcast activations. Activations are thus reused across all of a PE's
weights, and weights across the 7 pixels.

How one layer pass runs:

* **Steps.** Each step is a barrier: the next one starts when all 32 PEs
  report `done`. The controller reads the next activation set from the banks
  while the current step is still streaming, so the new command goes out in
  the same cycle as the last `done`. Pixels whose list has ended get an
  invalid entry. When every list of the chunk has ended, the next step moves
  to the next chunk.
* **Tile end.** After the last chunk, the controller waits for all PEs to be
  `quiet` and for the previous tile's drain to finish (`stat_drain_wait`).
  It then swaps `acc_bank` and starts the next tile.
* **Drain.** The finished bank is read while the next tile computes. Each
  cycle, local channel *k* of all 7 rows is read from all 32 PEs and
  cleared, so a tile drains in `cfg_num_oc` cycles. Seven
  `compression_unit` lanes, one per pixel, turn the 7 x 32 psums into
  output chunks (ReLU, rescale, pack the non-zeros with their indices). The
  lanes move in lockstep on the `out_*` stream, which has valid/ready
  handshaking.
* **Pass size.** `cfg_num_tiles`, `cfg_num_chunks` and `cfg_num_oc` (local
  channels per PE, at most 64) set the size of one pass. A layer with more
  than 2048 output channels, or more weights than the buffers hold, runs as
  several passes.

## Top level (`sprite_top`) and how to use it

1. **Load.** Write the activation lists with `ia_wr_*` (bank, address,
   entry). Write each PE's weight rows with `w_wr_*` (PE, row, slot, entry;
   the row's `last` flag goes with slot 0).
2. **Run.** Set `cfg_*` and pulse `start`. `busy` stays high during the pass.
3. **Collect.** Take the output beats from `out_*`. There are
   `cfg_num_tiles` x `cfg_num_oc` of them. A beat carries output-channel
   group `out_chunk` (*k*) of 7 pixels: lane *r* (`out_count[r]`,
   `out_val[r]`, `out_idx[r]`) belongs to pixel `out_pixel` + *r*, and
   `out_pixel` is tile·7. `done` pulses when the last beat has entered the
   compression stage; its output register may still hold that beat.
4. **Count.** `stat_*` counts, from `start`: cycles, MAC operations, IA
   steps, cycles with a held weight row, cycles with a full FIFO, and cycles
   spent waiting for a drain.

Files: `rtl/sprite_pkg.sv` holds the sizes and record types; every other
module is in `rtl/<module>.sv`, and `rtl/sprite_top.sv` is the top.

## Where this model departs from or adds to the published design

Taken from the published design:

* the IMU organisation and the weight fill order;
* the per-row 3-way encoders, FIFOs of depth 6, MACs and psum buffers;
* the rule that a row with too many matches is compared again next cycle;
* the weights-stream / activations-advance dataflow;
* a shared activation buffer with a weight buffer per PE;
* all sizes in the table above.

This model's own choices (the published description leaves them open):

* **Buffers.** The 1691 KB is split as 896 KB for weights and 795 KB for
  activations. The record formats and the banked list layout of the
  activation buffer are also this model's.
* **Loader ports.** Simple write ports replace the off-chip interface.
  Double buffering of the global buffers is left to the loader, through the
  independent write ports. The psum buffers are double-buffered in hardware.
* **PE array.** PEs split the output channels (interleaved) and share the
  activations. All PEs meet at a barrier after every IA step.
* **Arithmetic.** The fixed-point format, saturation, ReLU and the output
  rescaling are this model's.
* **Pipeline and control.** The FIFO entries carry values, not buffer
  indices. The pipeline depths, command protocol, drain order and counters
  are also this model's.
* **Memories.** They are plain arrays. No SRAM macros or their timing are
  modelled.

Known limits:

* The 7 pixels of a tile step through their activation lists in lockstep.
  A pixel whose list is shorter leaves its MAC idle until the longest list
  of the tile ends. Together with the step overhead below, this is why MAC
  utilisation still falls at low density, although the matching rate does
  not (see the density sweep below).
* Each IA step costs 2 cycles beyond the weight rows. Layers with few
  weight rows per PE per chunk (few output channels, or very sparse
  weights) lose a noticeable share of MAC cycles to it.
* The barrier makes all PEs wait for the PE with the most weight rows in the
  chunk.
* Compressed outputs are not written back into the activation buffer. A new
  pass must be loaded through the loader port.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_imu` | 7x32 match matrix and buffer loading against a reference compare |
| `tb_mw_prio_enc` | first three set bits, mask and count for 3000 random vectors |
| `tb_index_fifo` | order and free count with 0-3 pushes and random pops |
| `tb_mac_unit` | psums incl. saturation; write exactly one cycle after a pair |
| `tb_psum_buffer` | accumulate and drain-and-clear on opposite banks across swaps |
| `tb_weight_buffer`, `tb_act_buffer` | read latency, hold, per-bank addressing |
| `tb_compression_unit` | ReLU, rescale, saturation and packing under back-pressure |
| `tb_global_controller` | step commands, broadcast activations, barrier, drain order, bank swaps, drain waits |
| `tb_pe` | psums of 3 tiles against a reference; MAC count; rows + 1 + holds cycles per step; held rows and full FIFOs occur |
| `tb_sprite_top` | whole core with 8 PEs: every output chunk against a dense reference convolution; every mechanism occurs |
| `tb_sprite_full` | the same at full size (32 PEs, default buffers, 256 output channels, 21 pixels, 96 input channels) |
| `tb_density_sweep` | a layer of 28 pixels, 64 input and 512 output channels on 8 PEs at densities 0.1 to 0.5; outputs against the reference, matching rate and utilisation |

The density sweep shows the property the design is built on. It counts
*row-cycles*: cycles in which a PE streams weights, times the IMU rows that
hold a valid activation. MAC operations per row-cycle should be close to 1
at every density, and the test requires 0.7 to 1.3.

| density (IA and W) | matches per row-cycle | MAC utilisation |
|---|---|---|
| 0.1 | 0.90 | 33.6 % |
| 0.2 | 0.87 | 43.6 % |
| 0.3 | 0.87 | 50.4 % |
| 0.4 | 0.90 | 59.3 % |
| 0.5 | 0.90 | 64.7 % |

The rate stays just below 1 because the last weight row of a chunk is only
partly filled. Utilisation is taken over the compute phase, up to the last
tile's final psum. It rises with density for the reasons under *Known
limits*.

Every mechanism counted by the two top-level tests occurs at least once:
held weight rows, full FIFOs, drain waits, output back-pressure, bank swaps,
all three step commands, and empty output chunks.

Simulation with Verilator 5 (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/sprite_pkg.sv \
          tb/tb_sprite_top.sv --top-module tb_sprite_top -Mdir obj_top
./obj_top/Vtb_sprite_top
```

Replace the testbench name for any other test (`-y rtl` lets Verilator find
each module in `rtl/<module>.sv`; the testbenches only raise width warnings). The full-size build
(`tb_sprite_full`) takes several minutes to compile (the 7 x 32 x 24-bit
drain and the full buffers make a large model) and about a second to run.
