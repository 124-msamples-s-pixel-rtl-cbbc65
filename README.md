# Pixel-pipelined JPEG 2000 encoder without tile memory

A JPEG 2000 encoder normally runs the wavelet transform (DWT) over a whole
tile, stores the coefficients, and only then starts the bit-plane coder (EBC)
on 64 x 64 code-blocks. That needs a tile memory (two 256 x 256 tiles of
10-bit coefficients is 175 kB) or heavy DRAM traffic. This design removes the
tile memory. The coders work on the coefficients almost as soon as the DWT
produces them, one coefficient per cycle.

Three ideas make this possible:

* **Stripe-sized computation states.** Work is cut into 256-cycle *states*.
  In one state each coder codes one 64 x 4 stripe of a code-block, or two
  32 x 4 stripes of a level-3 code-block. A main controller interleaves the
  states of the three decomposition levels (the *level-switched schedule*):
  88 states per tile.
* **Code-block switching.** One coder hops between unfinished code-blocks
  stripe by stripe. The complete coding state of a code-block is swapped in
  and out of a small state memory in zero cycles.
* **Word-level coding.** All nine magnitude bit-planes of one coefficient
  are coded in the same cycle, each by its own arithmetic coder. This works
  because the coder runs in JPEG 2000's "parallel" mode: stripe-causal
  contexts, and every coding pass restarts and resets. Each (bit-plane, pass)
  is then an independent codeword with its own contexts, 27 per code-block.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable apart from the
testbenches. It covers the **encoder**. Decoding is not built (see
*Departures*).

## Top level: `jp2k_codec`

```
pixels --> ls_dwt --> cb_stripe_buffer x10 --> cs_ebc x3 --> rdo_controller x3 --> bsc --> header words
              ^                |                   ^                                    
              +-- stall -------+     ls_scheduler -+-- which stripe, hold               
```

* Pixels (8 bit) arrive one per cycle, tile after tile, each 256 x 256 tile
  row by row. `pix_ready` is the stall.
* `ls_dwt` has three levels. Each level has its own lifting filters. The LL
  band of a level streams straight into the next level.
* Each subband's coefficients go into a two-stripe reorder buffer
  (`cb_stripe_buffer`): eight rows, two halves. The DWT writes rows and the
  coder reads 4-row stripe columns.
* `ls_scheduler` issues the states. For each state the top computes which
  buffer half and which columns to read.
  * If that half is not full yet, the controller is held.
  * If any buffer has no free half, the DWT and the pixel input stall.
* Three coders each own one kind of subband:
  * EBC0: HL1, HL2, HL3.
  * EBC1: HH1, HH2, HH3, and the LL3 band in the last four states of a tile.
  * EBC2: LH1, LH2, LH3.
* Each coder emits the bytes of its nine bit-plane coders every cycle
  (`cod_data`, `cod_count`), for an external bit-stream memory.
* When a code-block ends, all 27 of its codewords are terminated at once.
  Its rate controller then truncates it to a byte budget. The bit-stream
  controller sends a two-word header per code-block:
  * word 0: tile, code-block, band, passes kept;
  * word 1: kept bytes, total bytes.

Code-block numbering per subband (`jp2k_pkg`):

| cb | what | size | state slot |
|----|------|------|-----------|
| 0 | level-3 subband | 32 x 32 | 0 |
| 1 | level-2 subband | 64 x 64 | 1 |
| 2, 3 | level-1 top left / top right | 64 x 64 | 2, 3 |
| 4, 5 | level-1 bottom left / bottom right | 64 x 64 | 2, 3 (re-used) |
| 6 | LL3 (EBC1 only) | 32 x 32 | 4 |

## The level-switched schedule (`ls_scheduler`)

A tile takes 88 states:

* 64 at level 1: 32 stripe rows, each split into the left and right
  code-block.
* 16 at level 2.
* 4 at level 3 (two 32 x 4 stripes each).
* 4 for LL3.

A deeper level runs as soon as its input exists, and deeper levels have
priority:

* level-2 state *k* (counted across tiles) may start once 2k+3 level-1
  stripe rows are done;
* level-3 pair *j* may start once 4j+5 level-2 states are done.

These rules are the (9,7) filter's data dependencies plus one stripe of
slack. The last level-2 and level-3 states of a tile therefore run during
the first level-1 states of the next tile. After the last tile the remaining
states run without waiting. Every state has one issue cycle, so it lasts 257
cycles.

A decoding order (shallow levels and LL3 first) is also produced, but
nothing uses it yet.

## Coding one coefficient per cycle (`cs_ebc`)

`cs_ebc` = `crb` + `pcf` + nine `fac` + `psrb_state_memory`.

**Window (`crb`).** Coefficients arrive in stripe order: four rows of a
column, then the next column. When row 3 arrives, the column is pushed into
a window of four columns:

* A (newest), B, C (being coded) and D.
* A column entering A picks up its row above from `inter_cb_line_buffer`.
  That buffer is one entry per column of each of the five slots, written
  with B's last row as B moves on.
* Columns of another stripe or code-block are masked using the column tags
  (first/last column, first/last stripe).

**Context formation (`pcf`)** runs for all nine planes in parallel. The hard
part is that plane *p*'s passes depend on what happened earlier in the same
plane. "Became significant in the propagation pass" (spp) and "was in the
propagation pass" (insp) are exactly that history. Significance before plane
*p* is simply `mag >= 2^(p+1)`, so only the spp/insp flags must be stored.

* While C is coded, the PCF already computes B's flags from C (left, with
  its final flags) and A (right, magnitudes only).
* The flags are stored into B as it moves to C, and are bypassed into C's
  coding, where they are needed for the right-hand neighbour.
* Per plane the PCF decides:
  * the pass (propagation, refinement, clean-up, or none);
  * 1, 2 or 4 symbols: decision, decision + sign, or the run-mode pattern
    "run interrupted, two uniform position bits, sign";
  * their contexts.

  The neighbour rules per pass are in the comment at the top of
  `rtl/pcf.sv`. The run-mode test treats the column's own rows as not yet
  coded.

**Arithmetic coders (`fac`).** Each is a combinational chain of up to four
MQ-coder steps: AC0, the two uniform coders UC0/UC1 (fixed state 46, no
adaptation) and AC1. It emits up to 8 bytes per cycle.

**State switching (`psrb_state_memory`).** A code-block's state is 27
codewords, each holding the MQ registers A, C, CT, B and 19 contexts. When
the code-block in C differs from the loaded one:

* the register bank is written to the state memory;
* the new code-block's state is read;
* both happen in the same cycle, at the first coding phase of the column.

Two column pushes after a code-block's last column, its 27 codewords are
flushed together (`fl_bytes`) and its slot is re-initialised. That is how
CB4/CB5 re-use the slots of CB2/CB3.

## The DWT (`ls_dwt`, `dwt_level`, `dwt_filter_core`)

**`dwt_filter_core`** is one lifting filter for (5,3) and (9,7), forward and
inverse.

* It is four identical add-multiply elements plus a scaling element. Only
  the coefficients and the rounding differ between the modes.
* It is combinational and stateless: the state of a line goes in and out
  through ports.
* The state is four lifting stages, each a valid flag and two 14-bit words.
* A line of N samples takes N/2 `OP_PAIR` operations, then one (5,3) or two
  (9,7) `OP_FLUSH` operations.
* Symmetric extension is applied at both ends.
* (9,7) constants are 12-bit fractions.

**`dwt_level`** transforms one level.

* Two row filters take alternate rows. A row's flush operations use the
  cycles the other row leaves free.
* Each row output goes to two column filters, one for the low half and one
  for the high half.
  * Even rows wait in a one-line buffer.
  * On odd rows the column filter reads the column's lifting state from
    `inter_level_line_buffer` and writes it back.
* After the last row of an image, all columns are flushed in row order while
  the next image's first row is buffered.
* Per cycle it outputs LL, HL, LH and HH of one position.

**`ls_dwt`** chains three levels (256, 128, 64 wide).

* Pixels are level-shifted by -128.
* Outputs are saturated to sign plus 9-bit magnitude.
* The (9,7) outputs are rounded to integers (unit quantisation step).

## Rate control and output (`rdo_controller`, `bsc`)

**`rdo_controller`** keeps, per slot, the byte count of each of the 27
codewords. At termination it adds the flush bytes. It then keeps passes in
embedded order (plane 8 down to 0; propagation, refinement, clean-up) while
the total fits the budget.

**`bsc`** queues the three coders' results in a 16-entry FIFO and sends them
as two 32-bit words with valid/ready. `overflow` is a sticky error flag.

## Departures and limits

* **Throughput.** Each DWT level has its own filters and takes one sample
  per cycle, so a tile needs 65536 cycles. The schedule is built for about
  2.9 samples per cycle (22,616 cycles per tile), which at 42 MHz is the
  124 MS/s needed for 1920 x 1080 4:2:2 at 30 fps. Here the controller
  simply waits (`hold`) for the DWT, so the rate is 42 MS/s at 42 MHz.
  Sharing one set of filters across levels, switched per state, is not
  built.
* **Stripe buffers.** The two-stripe reorder buffers between DWT and coders
  are this design's own: 10 subbands x 8 rows. The DWT does not deliver
  code-block stripes directly.
* **Encoder only.** The filter core has the inverse mode and the scheduler
  produces a decode order. There is no decoding path for context formation
  or the arithmetic coders, and no 2-D inverse DWT.
* **All nine bit-planes** are coded for every code-block, including planes
  above a code-block's most significant bit. Those produce tiny codewords.
  A standard codestream would skip them and signal their number.
* **Rate control** uses rates only, with a fixed per-code-block byte budget.
  There is no distortion estimate and no optimisation across a tile.
* **Not built:** the codestream byte storage, packet headers, and the SDRAM
  interfaces. The coded bytes leave on `cod_data`/`cod_count`, tagged with
  their code-block on `cod_tag`.
* **Memories** are plain arrays, some read asynchronously. The two-stripe
  buffers and the line buffers are register files.
* **Synthesis with yosys.** The MQ-coder package uses functions with
  `inout` arguments, which the yosys synthesis front end does not accept.
  Verilator and slang accept them.

## Files

| file | contents |
|------|---------|
| `rtl/jp2k_pkg.sv`, `rtl/mq_pkg.sv`, `rtl/ebc_pkg.sv` | sizes, types, MQ coder functions, coder state types |
| `rtl/jp2k_codec.sv` | top level |
| `rtl/ls_scheduler.sv` | main controller |
| `rtl/ls_dwt.sv`, `rtl/dwt_level.sv`, `rtl/dwt_filter_core.sv`, `rtl/inter_level_line_buffer.sv` | DWT |
| `rtl/cb_stripe_buffer.sv` | DWT-to-coder reorder buffer |
| `rtl/cs_ebc.sv`, `rtl/crb.sv`, `rtl/pcf.sv`, `rtl/fac.sv`, `rtl/psrb_state_memory.sv`, `rtl/inter_cb_line_buffer.sv` | coder |
| `rtl/rdo_controller.sv`, `rtl/bsc.sv` | rate control, output |
| `tb/ebc_ref_pkg.sv` | reference EBCOT coder and MQ coder (testbench only) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing -Irtl -Itb rtl/jp2k_pkg.sv rtl/mq_pkg.sv rtl/ebc_pkg.sv \
    tb/ebc_ref_pkg.sv tb/tb_cs_ebc.sv -y rtl --top-module tb_cs_ebc
./obj_dir/Vtb_cs_ebc
```

The other testbenches build the same way: list the packages first and give
`-y rtl` for the modules.

* `tb_jp2k_codec` — the whole encoder at default sizes, one tile.
  * Checks one header per code-block (19 per tile), the fields, kept length
    within the budget and not above the total, and the total against the bytes actually emitted.
  * Checks that each mechanism happened: pixel stall, controller hold,
    code-block switch, level switch, run mode, termination, header
    back-pressure.
* `tb_ls_dwt` — three levels on two 256 x 256 tiles, with and without input
  gaps, against an array reference.
  * (5,3) must match exactly.
  * (9,7) may differ by ±8 from a real-valued reference (12-bit constants,
    integer rounding at every step).
  * Every position must come out exactly once.
* `tb_cs_ebc` — three code-blocks: two interleaved stripe by stripe, the
  third re-using a terminated slot. Every one of the 27 codewords must equal,
  byte for byte, a textbook sequential stripe-causal EBCOT run through a
  reference MQ coder.
* `tb_pcf` — context formation against the sequential reference's symbol
  lists: all bands, several densities and sizes.
* `tb_fac` — the four-symbol coder against an integer MQ reference, all
  modes.
* `tb_dwt_filter_core` — 1-D filter: exact for (5,3), ±3 for (9,7),
  inverse reconstruction, latency.
* `tb_ls_scheduler`:
  * the printed state order of a tile;
  * 88 states per tile, each issued once;
  * exact cycle count, and hold adding exactly its cycles;
  * decode order.
