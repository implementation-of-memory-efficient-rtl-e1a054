# Semi-parallel min-sum LDPC decoder for DVB-S2 style codes

DVB-S2 frames are 64,800 bits long (16,200 for short frames), and their Tanner
graphs have a few hundred thousand edges. A fully parallel decoder would be far
larger than needed. This decoder processes 360 edges at a time instead. DVB-S2
defines its codes in groups of 360 bits: bit m of a group always meets the same
checks as bit 0 of that group, shifted by m·q, where q = (n−k)/360. One
description of an edge (a check address and a rotation) therefore covers 360
edges. The decoder has 360 variable-node (VN) lanes and 360 check-node (CN)
lanes. A rotating shuffle network connects them. A ROM lists the edge groups of
each code rate.

Decoding uses the min-sum form of belief propagation, with an iteration count
fixed at start. The memories are single-ported, so each group of 360 messages
takes two cycles: a read cycle and a write cycle. The VNs keep no per-edge
message memory. Each VN stores only its channel LLR and the sum of its incoming
messages. The check node removes its own earlier contribution, as described
under "Message arithmetic" below.

## Code structure and memory organisation

For frame mode `mode` (0..20, see the table below), n/360 VN groups form a
frame. k/360 of them hold information bits; q = (n−k)/360 is also the number
of CN addresses.

* **Check nodes.** Check c = i + q·j sits in CN lane j at RAM address i. An
  information-bit edge with base location x = i0 + q·j0 connects bit m of its
  group to check (x + m·q) mod (n−k) = i0 + q·((j0 + m) mod 360). This is CN
  lane (m + j0) mod 360 at address i0. An edge word is therefore
  {VN address, CN address i0, rotation j0}.
* **Variable nodes.** Lane m, word a < k/360 holds information bit a·360 + m.
  Lane m, word k/360 + i holds parity bit i + q·m. Parity bit c is in checks c
  and c+1 (the DVB-S2 accumulator, a dual-diagonal block of H). With this
  layout both of its edges are rotation 0, with one exception: the second edge
  at i = q−1 crosses into the next CN lane (rotation 1, address 0). For lane 359
  that edge does not exist, because the last parity bit has only one check. The
  ROM word carries a `wrap` flag, and lane 359 then sends an invalid message and
  ignores the reply.
* **Edge ROM** (`edge_rom`). For each mode there are 3 words per information
  group and 2 words per parity group, ordered by VN group. Each word also holds
  the edge's position (0, 1, 2, …) among the edges of its check, plus
  first/last flags for its VN group. In the order the words are read, the
  positions at each CN address count 0, 1, 2, … upward, and position 0 restarts
  the check's state.

**The base locations x are not the DVB-S2 tables.** The standard lists them
per code rate. This design computes them instead with `ldpc_pkg::info_base`:
three edges per information bit, spread round-robin over the CN addresses, with
a fixed scramble for the rotation. The frame sizes, q, the dual-diagonal parity
part and all the hardware are those of a DVB-S2 decoder. The codes are not the
standard's, and real DVB-S2 frames will not decode. To use the real codes,
replace `gen_edge` with the standard's tables: the degrees of the information
bits vary, and positions within a check must stay below `MAX_DEG` = 32.

| mode | frame | n | k | q | ROM words |
|---|---|---|---|---|---|
| 0–10 | normal, rates 1/4 1/3 2/5 1/2 3/5 2/3 3/4 4/5 5/6 8/9 9/10 | 64800 | 16200 … 58320 | 135 … 18 | 405 … 522 |
| 11–20 | short, rates 1/5 1/3 2/5 4/9 3/5 2/3 11/15 7/9 37/45 8/9 | 16200 | 3240 … 14400 | 36 … 5 | 99 … 130 |

## One iteration

An iteration has two halves, each of which walks the mode's ROM words once.

1. **VN → CN (`first_half`).** VN lane m reads its LLR and sum RAMs and sends
   `total = sat(LLR + sum)`. In the first iteration it sends only the LLR. The
   shuffler takes `vn_concat` and rotates by the ROM shift, so CN lane
   (m + shift) mod 360 receives the message. The CN reads its word, updates it,
   and writes it back.
2. **CN → VN.** The CN reads its word and sends the min-sum reply for that
   edge. The shuffler takes `cn_concat` and rotates by 360 − shift, so the reply
   travels back along the same edge. VN lane m adds it to its sum RAM
   (read-modify-write). The first edge of a VN group restarts the sum. In the
   last iteration, the last edge of a group also writes the posterior
   `sat(LLR + sum)` over the LLR.

### Pipeline timing

The controller issues one ROM word every two cycles. It moves a control slot
(`ctl_t`: addresses, rotation, flags, phase bit) down a delay line
`ctl[0..4]`, next to the data it controls:

| cycle | producer lanes | shuffler | consumer lanes |
|---|---|---|---|
| T (ctl[0], phase 0) | RAM read | | |
| T+1 (ctl[1], phase 0) | output register loaded | | |
| T+2..T+4 (ctl[2..4]) | | stage 1, 2, 3 (rotation digits ×64, ×8, ×1, each mod 360) | RAM read at T+4 |
| T+5 (ctl[4], phase 1) | | output valid | compute, RAM write |

The next word starts at T+2. Its consumer read falls at T+6, after the write at
T+5, so one port per RAM is enough. Before switching direction, the controller
waits until the pipeline is empty: this costs 7 cycles. One decode of W ROM
words with I iterations takes exactly I·2·(2W + 7) cycles from the cycle after
`start` to `done`.

## Message arithmetic

The VN sends LLR + Σ(all incoming) on every edge. The extrinsic message should
leave out the message that arrived on the same edge. The CN can rebuild the
message it sent on that edge in the previous iteration and subtract it:
`v2c = sat(total − c2v_prev)`. The VN then never needs per-edge storage.

Each CN RAM word (one check) holds:

* two banks of {min1, min2, index of min1, parity}. Bank `iter mod 2` is built
  during the VN → CN half while the other bank, from the previous iteration, is
  read to rebuild the old messages;
* one sign bit per edge position (32), holding the sign of that edge's last
  v2c. It is read before being overwritten in the same access.

The reply on edge e is ±min2 if e holds the minimum, otherwise ±min1, with sign
parity ⊕ sign[e]. This is plain min-sum, with no offset or scaling.

Widths, all parameters:

| item | width | note |
|---|---|---|
| channel / posterior LLR (`LLR_W`) | 6 | two's complement, saturated to ±31 |
| VN → CN total (`DW`) | 6 | ±31 |
| CN → VN reply (`UW`) | 5 | ±15: one bit fewer than the downstream message, so a saturated reply is not removed as a saturated total |
| stored minima | 4 | magnitude of the reply |
| VN sum (`SUM_W`) | 8 | ±127 |

When the total saturates, the subtraction is no longer exact. This is the
known cost of storing no per-edge messages in the VN.

## Frame interface

* `llr_access` high: decoding is off (start is ignored). The 360 lanes' chain
  registers form a shift chain. Each cycle with `llr_shift` high moves
  `llr_din` into lane 0 and every register one lane on. `llr_dout` is lane
  359's register. Shift the 360 values of a word in lane 359 first.
* `llr_din_we` with `llr_addr` = a swaps the chain with LLR word a. The chain is
  written into the RAM, and one cycle later the RAM's old word is in the chain.
  Leave one cycle without `llr_shift` or `llr_din_we` after each `llr_din_we`. The
  decoded frame (posterior LLRs; a negative value means bit 1) is therefore
  shifted out while the next frame is shifted in.
* `start` (with `llr_access` low) latches `mode` and `num_iter`. A `num_iter`
  of 0 runs one iteration. `busy` stays high until the one-cycle `done` pulse.

Loading is serial and is not overlapped with decoding. It takes about 362
cycles per VN word: 65k cycles for a normal frame.

## Throughput

At 200 MHz, with 30 iterations and about 233k edges per iteration (the size
of the largest DVB-S2 normal-frame graphs, 648 ROM words), decoding takes
30·2·(2·648 + 7) = 78,180 cycles. That is 166 Mbit/s of code bits and meets a
135 Mbit/s target. With the serial load added, it falls to about 90 Mbit/s. The
built-in ROM has fewer edges (405 words for mode 0), so it decodes faster:
49,020 cycles.

## Files

| file | contents |
|---|---|
| `rtl/ldpc_pkg.sv` | mode table, ROM word and control-slot types, edge generator, saturation |
| `rtl/ldpc_decoder.sv` | top level |
| `rtl/iocontrol.sv` | controller: state machine IDLE → FWD → FDRAIN → REV → RDRAIN, delay line |
| `rtl/edge_rom.sv` | edge ROM, contents computed at elaboration |
| `rtl/shuffler.sv` | input mux and 3-stage rotator |
| `rtl/vn_unit.sv` | VN lane: LLR RAM, sum RAM, adders, chain register |
| `rtl/cn_unit.sv` | CN lane: wide state RAM, subtraction, min-sum update and reply |
| `rtl/spram.sv` | single-port RAM (inferred array, read-before-write) |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/ldpc_tb_core.sv` | encoder, channel, bit-exact reference decoder and port driver shared by the top-level testbenches |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`.

* `ldpc_decoder_tb` uses 8 lanes instead of 360, which gives the same code
  structure with frames of 1440 or 360 bits. It decodes four frames in modes 11,
  0, 20 and 10, loading and unloading them through the chain. Every posterior
  LLR must equal a reference min-sum decoder. That reference works on the
  natural-order graph built from the code definition, with the same saturation.
  The cycle count of each decode is checked, and the testbench counts chain
  swaps, direction switches, masked wrap words, mode switches and corrected
  frames.
* `ldpc_modes_tb` decodes one frame of each of the 21 modes, back to back,
  with the 8-lane decoder. All posteriors and cycle counts are checked.
* `ldpc_decoder_full_tb` runs the default 360-lane decoder on two frames with
  30 iterations each. The first is a rate-1/4 normal frame (64,800 bits, about
  1,300 channel errors) and the second a rate-1/5 short frame (16,200 bits).
  Both decode without errors and match the reference bit for bit. The run
  takes about 10 s of simulation after a 20 s build.
* In the 8-lane runs, some high-rate frames end with more bit errors than they
  started with. This comes from the generated codes: they are short and have
  only three edges per information bit. The decoder still matches the
  reference exactly on these frames.
* The unit testbenches check the RAM read-before-write behaviour, all
  rotations of the 360-lane shuffler, the VN and CN lanes against models, every
  mode of the ROM against the code definition, and the controller's slot
  sequence and timing.

To simulate with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/ldpc_pkg.sv tb/ldpc_decoder_tb.sv --top-module ldpc_decoder_tb
./obj_dir/Vldpc_decoder_tb
```

Use the same command for any other testbench, with its name in place of
`ldpc_decoder_tb`.

## Departures and open points

* The codes are generated, not the DVB-S2 tables (see above).
* The register widths, the controller's state machine, the exact layout of
  loaded data, and the way results are unloaded (posterior written over the LLR
  in the last iteration) are this design's own choices.
* There is no early termination and no parity-check output. The decoder always
  runs `num_iter` iterations.
* The RAMs are inferred arrays, not memory macros. The edge ROM is an
  initialised array, which synthesis tools may or may not map to ROM.
* Narrower variants with 180, 90 or 45 lanes (a faster clock or dual-port
  RAMs making up the throughput) are not built. Setting `P` lower keeps the
  code structure and shortens the frames; it does not fold a 360-group code
  onto fewer lanes.
* The LLR quantisation and clipping in front of the decoder, and the outer BCH
  decoder after it, are not part of this design.
