# JPEG2000 tile encoder built around a register-based bit plane coder

JPEG2000 entropy coding spends most of its effort in EBCOT's bit plane coder. For every bit of every wavelet coefficient, and for every bit plane, it looks at the significance and sign state of the eight neighbours. It then picks a context and hands a (context, decision) pair to an MQ arithmetic coder. Done naively, each coded bit needs several memory reads and writes of neighbour state.

This design keeps the neighbourhood in small shift registers instead. Each state memory is read once and written once per column of four bits. The context lookups are plain combinational logic. Three such coder lanes run in parallel, one each for the HL, LH and HH bands of a wavelet level, behind a (5,3) lifting wavelet transform. The result is a complete tile encoder: samples go in, and three streams of MQ code bytes come out. Beside it sits a decoding lane that turns one code block's bytes back into coefficients.

```
tile port -> dwt53 (in-place, multi-level)
          -> global_ctrl copy (sign-magnitude, plane count)
          -> subband_mem x3 -> bpc x3 -> cxd_fifo x3 -> mq_encoder x3 -> bytes x3

bytes of one block -> mq_decoder <-> bpc_dec -> coefficients   (decoding lane)
```

Everything is SystemVerilog in `rtl/`, with one module or package per file. Types and constants shared by the modules are in `bpc_pkg`.

## Coding order

A code block is coded in stripes four rows high. The memories of the bit plane coder are N x 4, one word per column of the stripe, so each stripe is coded through all of its bit planes before the next one starts:

- the most significant plane gets the clean up pass (CP) only;
- every lower plane gets the significance propagation pass (SP), then magnitude refinement (MRP), then clean up.

Neighbours in the stripes above and below are treated like positions outside the block: they count as insignificant. Every stripe is therefore an independent unit. This is vertically causal coding applied to both stripe edges. A decoder must use the same convention, and the code stream differs from a JPEG2000 coder that lets stripes see each other. Inside a pass, the columns are visited left to right and each column top to bottom.

Each coefficient carries four state bits:

| bit | meaning | memory / register |
|---|---|---|
| σ | significant | `state_mem` + `sigma_reg` (15 bits) |
| η | visited in this plane's SP | `state_mem` + `eta_reg` (8 bits) |
| σ' | has been refined before | `state_mem` + `eta_reg` (8 bits) |
| χ | sign (1 = negative) | `state_mem` + `chi_reg` (12 bits) |
| v | magnitude bit of the current plane | `state_mem` + `v_reg` (4 bits) |

## The shift registers

The registers are what make the architecture work.

### σ register (`sigma_reg`, 15 bits)

It holds three columns (left, current, right), each separated from the next by a zero bit:

```
bit: 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
      0 [ left col ]  0 [ cur col ]  0 [right col]
```

Counting positions from the left, the coded bit X is at position 6 (bit 8).

- The eight neighbours are fixed taps around X. The separators make the row above the top bit and the row below the bottom bit read as zero.
- Shifting left by one moves the next row under X. On that shift the new significance of X is written into the position it moves to (bit 9). No separate read-modify-write is needed.
- After the four rows plus one extra shift, bits 13..10 hold the updated left column, ready to be written back. The next column is loaded into bits 3..0.
- At the start of a stripe the register is cleared, loaded with column 0 and shifted five places. Then column 1 is loaded.

The module also gives two zero detectors:

- `hood0`: all eight neighbours are insignificant.
- `rlc_c`: the whole window is zero, which is the run-length condition.

It also gives a next-cycle view of X and both detectors, so the controller can decide in the same cycle as the shift.

### η/σ' register (`eta_reg`, 8 bits)

These registers need no neighbours. They hold the current column and the column being written back:

- X is bit 3;
- the update goes into bit 4;
- write-back data come from bits 7..4.

### χ register (`chi_reg`, 12 bits)

It holds three columns without separators. The taps are SH0 = bit 11, SV0 = 8, X = 7, SV1 = 6 and SH1 = 3, and the start-of-stripe shift is four places.

### v register (`v_reg`, 4 bits)

It holds the magnitude bits of the current column, with X = bit 3. Two more outputs come from it:

- `All0s`, which says the column has no 1;
- the two-bit zero index of the first 1 from the top (00 = top row, 11 = bottom row), used by run-length coding.

The σ and χ memories are read one column ahead of v, η and σ', because the registers need the right-hand neighbour column while the current column is coded. Past the last column, zeros are loaded.

## The controller (`bpc_ctrl`)

The controller has 24 states in five phases. The state numbers are kept in `bpc_pkg::bpc_state_t`.

| phase | states | what happens |
|---|---|---|
| initialisation | 0, 1, 2, 3 | 0: fill v from bit plane `bp` of the subband memory, one column per cycle. On the first plane it also fills χ and clears σ, η and σ'. 1: clear registers. 2: read the first σ/χ column. 3: initial shift. |
| ZC / SC | 4, 5, 6, 7, 8, 9 | 4: read a column. 6: emit the zero-coding pair. 7: emit the sign pair. 8: set σ (and η in SP). 9: set η. 5: skip a bit. |
| MR | 12, 14, 15 | 12: read. 14: emit the refinement pair. 15: set σ'. |
| run length | 16–23 | 16: read. 17: emit (17, 0) and skip the column. 18: emit (17, 1). 19/20: emit the two zero-index bits with context 18. 21–23: shift down to the first 1, then sign coding (7). |
| termination | 10, 11, 13 | 10: extra σ shift. 11: write back and pick the next column, pass, plane or stripe. 13: idle/stop. |

What each pass codes:

- **SP** codes a bit that is insignificant and has at least one significant neighbour.
- **MRP** codes a bit that was significant before this plane, that is σ = 1 and η = 0.
- **CP** codes what is left. At the top of a column it tries run-length coding, when the whole window is insignificant and the column has no η bit set. After a run-length "1", the remaining bits of that column are coded without the CP test (`rlc_cb`).

Because the SP writes back η from a cleared register, η is effectively reset at every plane without a separate clear pass.

**Timing.**

| event | cycles |
|---|---|
| skipped bit | 1 |
| bit coded and still insignificant, or refined | 2 |
| bit becoming significant (ZC, SC, set) | 3 |
| all-zero column in the CP (RLC) | 3 (read, emit, write back) |
| overhead per column | a read cycle and two termination cycles |
| overhead per pass | 3 cycles |
| overhead per plane and stripe | N fill cycles |

A state that emits a pair raises `valid` and holds `cx`/`d` until `ack`. Nothing else happens in that cycle, so back-pressure from the CXD buffer simply stretches the schedule. An assertion in `bpc_ctrl` checks that a pair is held while `ack` is low.

## Context logic

- **`zc_ctx`** gives contexts 0–8. For LL and LH blocks it is a sum of products over one-hot counts of horizontal, vertical and diagonal neighbours (none, one, or two or more). HL swaps the horizontal and vertical counts. HH uses the diagonal-first table of the standard.
- **`sc_ctx`** gives contexts 9–13. It clips the horizontal and vertical sign contributions to −1..+1 and maps the pair to a context and a predicted sign. The data bit is the sign XOR the predicted sign.
- **`mrc_ctx`** gives contexts 14–16: 16 after the first refinement; otherwise 14 if the neighbourhood is empty and 15 if it is not.
- **`cxd_mux`** selects among ZC, SC, MR, run-length 0/1 and the two zero-index bits with a 3-bit code, `bpc_pkg::cntrl_cx_t`. Code 000 means no output.

## MQ coder (`mq_encoder`)

This is the JPEG2000 MQ coder, with 19 context states, the 47-entry probability table (`qe_rom`), a 16-bit interval register A and a 28-bit code register C. Byte output uses bit stuffing after 0xFF. A carry into a 0xFF byte is absorbed by the stuffing rule.

- Encoding a pair takes one cycle, plus one cycle per renormalisation shift, plus one cycle per byte out.
- `flush` runs the standard termination (set the low bits, two byte outputs). It pulses `flush_done` when finished.
- The dummy byte that precedes the first real byte is not emitted.
- `init` resets all context states: context 0 starts at index 4, context 17 at index 3, context 18 at index 46, and all others at 0.
- Input is a valid/ready pair. Output is `out_valid`/`out_byte` with no back-pressure.

## Decoding lane (`mq_decoder`, `bpc_dec`)

Decoding cannot run ahead the way encoding does. The decoder has to know each decision before it can pick the next context. So the buffer between the two halves shrinks to a single context register: `bpc_dec` offers a context, and `mq_decoder` answers with one decision.

**`mq_decoder`** is the standard MQ decoder. It uses the same probability table as the encoder (`bpc_pkg::qe_rom`), a 16-bit A register and a 32-bit C register.

- After a 0xFF byte it reads the next byte as seven stuffed bits. A byte above 0x8F is a marker or the end of the data: the decoder feeds ones and does not consume that byte.
- The byte source must present 0xFF after a block's last byte.
- A decision without renormalisation takes one cycle.

**`bpc_dec`** walks the same coding order as `bpc` and reuses its three context blocks. It differs from the encoder in what it does after each decision:

- after a zero-coding decision, it asks for a sign only if the decoded bit is 1;
- after context 17, a 0 skips the column, while a 1 is followed by the two zero-index bits, one request each;
- the decoded sign is the decision XOR the predicted sign.

The per-stripe state is held in plain register arrays indexed by the column and row counters, not in the encoder's shift registers. At the end of each stripe, the rebuilt {sign, magnitude} words are written out in the format of `subband_mem`'s write port.

## Wavelet transform (`dwt53`)

This is the reversible (5,3) lifting transform with symmetric extension, computed in place in a T x T tile memory. Each level transforms the current LL square, first row by row and then column by column. One lifting unit does everything:

- load a line, run predict, then update, then store it de-interleaved;
- this takes about 3·S cycles for a line of S samples.

Results end up in the usual layout, with LL top left, HL top right, LH bottom left and HH bottom right.

## Global sequencing (`global_ctrl`, `jpeg2000_top`)

For each level, the global controller does the following:

1. It runs the transform.
2. It copies the three h x h bands (h = T >> (level+1)) into the three subband memories, one coefficient per cycle. While copying it converts to sign-magnitude and ORs the magnitudes of each band. The OR gives the number of bit planes of the block, which is reported on `blk_planes`.
3. It starts the three coders together.
4. It flushes each MQ coder once its bit plane coder is done and its buffer is empty.

After the last level, the remaining LL band is coded alone on lane 0, the HL lane, with the LL table. These steps do not overlap.

With the defaults (128 x 128 tile, 5 levels, 64 x 64 maximum block, 16-entry buffers), the largest band exactly fills a subband memory. The test tile takes 380,790 cycles. The top checks at elaboration that the level-0 band fits the block size.

Top-level ports:

- `pix_we` / `pix_addr` / `pix_data`: load the tile while idle (address = row · T + column).
- `start`, `busy`, `done`: start the encoding and follow its progress.
- Per lane k: `code_valid[k]` / `code_byte[k]` carry the bytes, and `blk_end[k]` marks the end of a block. `blk_planes[k]`, `level` and `ll_phase` identify the block.
- `dec_*`: the decoding lane. Pulse `dec_start` with the block's subband, plane count and size. Offer its bytes on `dec_bin_valid` / `dec_bin_byte`; they are consumed on `dec_bin_ready`. The coefficients arrive on `dec_wr_*`, and `dec_done` pulses at the end.

## Where this departs from the original architecture

- **Stripe-independent coding.** Stripes do not see each other (see "Coding order").
- **State 13.** The original state diagrams do not use state 13. Here it is the idle/stop state.
- **Column step.** The column step is done in state 11 for every pass, including after a run-length skip.
- **Context tables.** The sign-coding table, the HL/HH zero-coding tables and the MQ tables are the standard's. For one printed LL/LH term, "exactly one diagonal neighbour" (`dc11 & ~dc22`) is used, which is what the context table requires.
- **Coefficient width.** Coefficients are 16 bits (sign + 15 magnitude bits), not 14.
- **MQ coder states.** The MQ encoder uses 7 controller states, not the original 32, and the decoder uses 5, not 25. Their behaviour is the standard's.
- **Bit plane decoder structure.** The bit plane decoder decodes the same streams, but its state is held in register arrays. The original reuses the encoder's shift-register datapath with a modified sign register.
- **Wavelet unit.** The transform is a single time-shared lifting unit, not the two-module filter architecture referred to originally. (5,3) was picked among the supported filters because it is the lossless one.
- **Sizes.** The tile size, level count, block size and buffer depth are this design's choices.

## Verification

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=… failures=…`. Reference values are computed in the testbench (`tb/j2k_ref_pkg.sv`):

- a behavioural bit plane coder that follows the same coding order;
- an MQ coder model;
- a (5,3) transform model.

What each test covers:

- **`tb_bpc`** runs small blocks of varied sizes with random back-pressure. It compares every pair and every cycle count against the model.
- **`tb_mq_encoder`** checks against the model. It also checks the first 28 bytes of the well-known MQ test sequence.
- **`tb_mq_decoder`** decodes reference-coded streams with random byte gaps.
- **`tb_bpc_dec`** decodes random blocks, checking every requested context and every rebuilt coefficient.
- **`tb_jpeg2000_top`** runs a 32 x 32 tile with 3 levels. It checks every code byte and plane count of every block.
- **`tb_jpeg2000_full`** runs the same test at the default sizes.

Both top-level tests count the mechanisms they exercise and fail if any count is zero:

- each pass type and run-length case;
- zero-index shifts and sign coding;
- buffer-full stalls;
- MQ carries and 0xFF stuffing;
- all four subband tables;
- every transform level.

Both then decode every block the hardware produced through the decoding lane and compare the rebuilt coefficients with the transform output.

## Simulating

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_jpeg2000_top \
    rtl/bpc_pkg.sv tb/j2k_ref_pkg.sv tb/tb_jpeg2000_top.sv
./obj_dir/Vtb_jpeg2000_top
```

Leaf testbenches need only `rtl/bpc_pkg.sv` and their own file. Verilator finds the modules through `-Irtl`. The full-size test runs in well under a minute.

## Not included

There is no bypass (lazy) mode. The bit plane decoder does not use the shift-register datapath. There is no rate allocation or layer formation; these are left to software.
