# Parallel CAVLC residual decoder without lookup tables

This is synthesizable SystemVerilog for an H.264/AVC CAVLC residual decoder,
baseline profile. It follows the method of Yeo and Shin, "High Throughput
Parallel Decoding Method for H.264/AVC CAVLC". The design rests on two ideas:

1. **No lookup memory.** Every variable-length code is recognised by plain
   logic: comparators, leading-zero detection and a few adders. There is no
   ROM and no chain of table accesses.
2. **Several codewords per cycle.** The Level and Run_before steps can repeat
   many times within a block. For these two steps the decoder looks at the
   next **M = 8** stream bits at once. In one clock cycle it decodes every
   codeword that fits completely inside those bits, even though each codeword's
   meaning depends on the codewords before it. If the first codeword is longer
   than M bits, a serial decoder handles that one codeword instead. So at least
   one codeword is decoded in every cycle.

The top module is `cavlc_decoder`. It takes a bitstream and, for each residual
block, a "mode" that gives the block type and the nonzero counts of the
neighbouring blocks. It returns the block's 16 (or 15, or 4) coefficients in
zigzag scan order.

## How a block is decoded

A CAVLC block is coded as five syntax steps in a fixed order. A 4-bit code
called `State_select` names the active step and its code table:

| Step | What it yields | State_select | Per cycle |
|---|---|---|---|
| 1 Coeff_token | TotalCoeff (0..16), TrailingOnes (0..3) | `0000` Num_VLC0 (N<2), `0001` Num_VLC1 (N<4), `0010` Num_VLC2 (N<8), `0011` Num_VLC_DC | one codeword |
| 2 Trailing_ones | signs of up to three ±1 coefficients | `0100` | all signs at once |
| 3 Level | remaining nonzero coefficients | `1000`..`1110` = Level_VLC0..6 | all codewords in 8 bits, at least one |
| 4 Total_zeros | zeros before the last nonzero coefficient | `0110`, `0111` (chroma DC) | one codeword |
| 5 Run_before | zeros before each coefficient | `1111` | all codewords in 8 bits, at least one |

An MSB of 1 in `State_select` marks the two steps that run in parallel.

`N` selects the Coeff_token table. It is computed from the upper and left
neighbours' nonzero counts as `(N_u + N_l + 1) >> 1` when both neighbours
exist. If only one exists, N is that neighbour's count; if neither does, N is 0.

Code `0011` covers two tables of the standard:
- the chroma-DC table, when the mode says the block is chroma DC;
- the 6-bit fixed-length code, used for N ≥ 8.

The step state machine skips a step that has nothing to decode:
- Trailing_ones, when TrailingOnes = 0.
- Level, when every coefficient is a trailing one.
- Total_zeros, when TotalCoeff equals the block size.
- Run_before, when no zeros are left or TotalCoeff = 1.

The decoded values go into a 16-entry buffer. At the end, the buffer controller
places them in scan order. The first decoded level sits at position
`TotalCoeff + TotalZeros − 1`. Each later level sits `1 + run` positions below
the one before it. Runs that were never coded, because no zeros were left,
count as 0.

## The parallel Level decoder (the hard part)

A Level codeword is a prefix of `p` zeros closed by a one, followed by a suffix
of `suffixLength` bits. `suffixLength` is the number of the current table,
Level_VLC0..6. The value follows the standard:

```
levelCode = (min(p,15) << suffixLength) + suffix
          + 15   if p >= 15 and suffixLength == 0   (escape)
          + 2    for the first level after fewer than 3 trailing ones
level     = even levelCode ? (levelCode+2)/2 : -(levelCode+1)/2
```

Escape codes:
- With Level_VLC0, prefix 14 has a 4-bit suffix.
- Prefix 15 has a 12-bit suffix.

The longest codeword is therefore 15 + 1 + 12 = **28 bits**, so the barrel
shifter always presents a 28-bit window.

The table can change after every codeword, which is why parallel decoding is
hard. The first level moves the decoder out of Level_VLC0. After that, the
table goes up by one whenever |level| exceeds the threshold of the table just
entered:

| Table | Level_VLC0 | Level_VLC1 | Level_VLC2 | Level_VLC3 | Level_VLC4 | Level_VLC5 | Level_VLC6 |
|---|---|---|---|---|---|---|---|
| Threshold | 0 | 3 | 6 | 12 | 24 | 48 | none |

Note one case: a level above 3 decoded with Level_VLC0 leads straight to
Level_VLC2.

`level_dec` holds two decoders fed from the same window:

- **`level_par_op`** is the *extensive parallel logic operator*. It sees only
  the window's top 8 bits and the current table. It is written as an unrolled
  chain of 8 small decoders. Decoder *i* starts where decoder *i−1* ended and
  uses the table that decoder *i−1*'s value selects. Decoding stops at the
  first codeword that does not fit in 8 bits, or when the block has no more
  levels to decode (`max_codes`). Stopping there keeps the Total_zeros bits
  safe. Synthesis flattens the chain into one logic function of 8 data bits
  plus the table number. That function is the 256-case truth table per table
  that the method describes, and the many unused bit patterns simplify it.
  The outputs are:
  - `Temp_0..Temp_7`, the levels, with 0 for an empty slot;
  - `Count_code_number`, the number of codewords;
  - `Length_feedback`, the number of bits used;
  - the next table.
- **`level_ser_op`** is the *serial logic operator*. It decodes one codeword of
  any length up to 28 bits. First, *prefix precomputation* (`prefix_precomp`)
  turns a prefix of 4 to 15 zeros into a 4-bit symbol, from A = `0000` to
  L = `1011`. The logic that follows then sees 4 bits instead of up to 16.

The parallel result is used whenever it holds at least one codeword. Otherwise
the serial result is used.

Worked examples for the 8 bits `00100111`, each checked in `tb_level_par_op`:
- Level_VLC0 gives 2 then −3, because after a 2 the table is Level_VLC1.
- Level_VLC1 gives 3 then −2.
- Level_VLC2 gives 5 then −2.
- With Level_VLC3 only `001001` fits. Level_VLC3 has a 3-bit suffix, so this is
  levelCode 17, which is **−9**. This agrees with the level table (`001xxx` is
  ±9..±12).

`Temp_0..Temp_7` form the register bank `Reg_temp`. They are written at the
clock edge that ends the decoding cycle. The buffer therefore receives the
levels one cycle later, at a base index that the buffer controller holds.

## The parallel Run_before decoder

Run_before codes depend on `Zero_left`, the zeros still to place:
- For Zero_left of 1..6, codes are 1 to 3 bits long.
- For Zero_left of 7 or more, runs 0..6 have 3-bit codes, and runs 7..14 have
  codes `0001`, `00001`, and so on, up to 11 bits.

`run_before_dec` chains 8 decoders in the same way as the Level decoder, and
subtracts each run from Zero_left before decoding the next code. It stops when:
- Zero_left reaches 0;
- TotalCoeff − 1 runs have been decoded;
- a code does not fit in 8 bits.

When no code fits (runs of 12..14 with 9..11-bit codes), it decodes the single
code from the first 11 bits. Examples:
- `10010000` with Zero_left = 7 gives runs 3, 1, 3 in one cycle, using 7 bits.
- `101101` with Zero_left = 3 gives 1, 0, 0, 1 in one cycle.

## Timing and throughput

- Each step takes one cycle in which the window holds at least 28 valid bits.
  The active decoder's code length goes back through a multiplexer to the
  barrel shifter in the same cycle.
- Each block ends with one `ST_DONE` cycle, in which the coefficients are
  assembled. The next block's `start` may already be given in that cycle.
  `out_valid` follows one cycle later.
- Example: the block with stream `000010001110010111101101` takes five decoding
  cycles (Coeff_token, Trailing_ones, 2 Level codewords, Total_zeros,
  4 Run_before codewords) plus the ST_DONE cycle.
- The original work reports 1.57 codewords per cycle on the Foreman sequence at
  QP 24, and 1.64 on Mobile, with M = 8. Those streams are not part of this
  package. The end-to-end testbench uses a synthetic mix of blocks (small
  levels, some escapes, dense and sparse blocks), and on it this RTL decodes
  about **1.65 codewords per busy cycle**, stream stalls and `ST_DONE` cycles
  included. Each trailing-one sign bit counts as one codeword.
- The critical path runs from the window register through the 8-deep Level or
  Run_before chain and the length multiplexer into the shifter. No timing
  closure has been done. The original design targeted 50 MHz in a 0.25 µm
  library.

## Interface of `cavlc_decoder`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `s_data[31:0]`, `s_valid`, `s_ready` | in/in/out | stream words, first bit in bit 31; a word transfers when both valid and ready are high |
| `start`, `mode` (`mode_t`) | in | begin a block when `ready_for_start` is high; `mode` = {chroma_dc, ac, upper_avail, left_avail, n_upper[4:0], n_left[4:0]} |
| `ready_for_start` | out | step machine idle or in `ST_DONE` |
| `busy`, `step` | out | a block is in progress / current step |
| `out_valid`, `out_coeff[16]`, `out_total_coeff` | out | one-cycle pulse with the block in scan order (positions past the block size are 0) |
| `codes_decoded[3:0]` | out | codewords consumed this cycle, for throughput monitoring |
| `error` | out | pulse: no valid code found (a prefix of 16 or more zeros, or an unmatched Coeff_token or Total_zeros code) |

Requirements on the user:
- `start` must come exactly when the stream is at the start of a residual
  block.
- The stream must continue at least 28 bits past the last codeword (the rest
  of the slice, or padding), because a step acts only on a full window.
- There is no output backpressure.

The parameter `M` (default 8) sets the number of bits analysed in parallel.
The buffer and the chains are sized from it. Only M = 8 has been verified.

## Files

| File | Block |
|---|---|
| `rtl/cavlc_pkg.sv` | State_select encoding, step and mode types, Coeff_token and Total_zeros code tables (length/value pairs), level helper functions |
| `rtl/cavlc_decoder.sv` | top: wiring and the Length_feedback multiplexer |
| `rtl/barrel_shifter.sv` | 64-bit bit buffer with a 28-bit window |
| `rtl/step_fsm.sv` | step state machine, State_select, per-block counters |
| `rtl/coeff_token_dec.sv`, `rtl/trailing_ones_dec.sv`, `rtl/total_zeros_dec.sv` | single-element step decoders |
| `rtl/level_dec.sv`, `rtl/level_par_op.sv`, `rtl/level_ser_op.sv`, `rtl/prefix_precomp.sv` | Level block |
| `rtl/run_before_dec.sv` | Run_before step |
| `rtl/coef_buffer.sv`, `rtl/buffer_ctrl.sv` | value buffer and scan-order reconstruction |
| `tb/cavlc_ref_pkg.sv` | reference CAVLC encoder used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## What this design adds to, or reads differently from, the published method

The published method describes the step decoders, the parallel Level and
Run_before operators, prefix precomputation and the block diagram. The
following are this design's own choices:

- **Code tables.** The Coeff_token and Total_zeros tables, the escape rules,
  the trailing-ones adjustment and the sign convention are those of the
  H.264/AVC standard. The method names these tables but does not list them.
- **Fixed-length code.** The method's table choice puts "8 or above" under
  Num_VLC_DC. Here that State_select value covers both the chroma-DC table and
  the standard's 6-bit fixed-length code. The block type in `mode` picks
  between them.
- **Rounding of N.** N is rounded up, `(N_u + N_l + 1) >> 1`, as in the
  standard. Neighbour availability is taken from `mode`.
- **Level_VLC0 to Level_VLC2.** The table can jump from Level_VLC0 straight to
  Level_VLC2, as the standard requires. The method's description only allows
  staying in table N or moving to N+1.
- **Stop limits.** The parallel operators stop at the number of levels or runs
  left in the block, so they never consume the next step's bits.
- **Run_before table.** Its last column is applied to Zero_left ≥ 7.
- **Own infrastructure.** The stream interface, buffer sizes, `ST_DONE` cycle,
  output format, reset and the registered `Reg_temp` timing are this design's
  own. The original block diagram shows them only as blocks.
- **Routing in the block diagram.** The original diagram sends the run values
  to the buffer through the buffer controller, and also sends the mode signal
  to the barrel shifter. Here the runs are written straight into the buffer,
  and the controller places every value when the block ends. The shifter needs
  no mode.
- **Where the serial operator sits.** Trailing_ones and Total_zeros have their
  own small decoders. In the original they share the Level block's serial
  operator.
- **Code style.** The parallel operators are written as chains of small
  decoders, not as enumerated truth tables. The function is the same, but the
  area after synthesis will differ from the gate counts reported in the
  original work (about 7,500 gates with prefix precomputation).

## Verification and how to run it

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/cavlc_pkg.sv tb/cavlc_ref_pkg.sv tb/tb_cavlc_decoder.sv \
    --top-module tb_cavlc_decoder
./obj_dir/Vtb_cavlc_decoder
```

To run another testbench, replace `tb_cavlc_decoder`.

- **`tb_cavlc_decoder`** runs the top at its default parameters.
  - It encodes 3000 random blocks with the reference encoder: luma 4x4, AC and
    chroma DC, all Coeff_token tables, escapes, blocks that reach Level_VLC6,
    and runs of 12 or more.
  - It streams them in with random stalls and compares every coefficient.
  - It checks the example block's exact bitstream and its five-cycle decode,
    and that the decoder counts exactly the codewords that were written.
  - It reports how often each mechanism occurred; any mechanism that never
    occurs counts as a failure.
- **The unit testbenches** check the following:
  - every code of every Coeff_token and Total_zeros table;
  - all trailing-one patterns;
  - the Table 6 symbols;
  - the three worked `00100111` examples;
  - 20,000 random Level and Run_before sequences, compared with the reference
    encoder;
  - the shifter window against a reference bit queue;
  - step sequencing and the table choice;
  - buffer writes and coefficient placement.

Limits of this verification:
- The reference encoder uses the same Coeff_token and Total_zeros tables as
  the RTL, in the encoding direction. Those tables were checked separately for
  being prefix-free and complete, and by hand-checked codes, but an error
  shared by both sides would not show.
- No real H.264 bitstream has been decoded.
- High-profile level prefixes of 16 or more zeros are not supported; they
  raise `error`.
