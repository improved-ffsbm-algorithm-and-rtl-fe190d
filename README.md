# Adaptive-window FFSBM motion estimator

This is the SystemVerilog for an integer-pel motion estimator for the AVS video standard. It handles all of
AVS's variable block sizes. For one 16×16 macroblock it finds the best motion vector of each of the nine
partitions: four 8×8, two 16×8, two 8×16 and one 16×16. "Best" means the vector with the smallest

    J = SAD + lambda · bits(MV − PMV)

where PMV is the predicted motion vector of the 16×16 block.

The search is a full search with SAD merging (FFSBM, fast full search block matching). Only the 8×8 SADs
are computed from pixels. Each larger partition's SAD is the sum of two smaller ones. All nine partitions
share one window, centred on PMV, and the window is scanned in a fixed, regular order. This suits a
pipelined array.

The window size adapts to the motion. Each macroblock gets its own half-ranges W and H: the window is
(2W+1) × (2H+1) candidates, with W and H from 0 to 32. A controlling processor picks them from the
motion-vector-difference (MVD) statistics of the previous frame. In still regions the window shrinks to a
few candidates. The hardware spends one clock per candidate, so a small window gives a proportional
saving in time.

## Choosing the window (processor side, not in this RTL)

The window sizes come from software on the host. The RTL takes W and H as given. The rule the estimator
is designed for:

* For each macroblock of the previous frame, take the largest |MVD_x| and the largest |MVD_y| over its nine
  partitions.
* Average these maxima over the 5 × 5 macroblocks centred on the co-located macroblock.
* Multiply each mean by 4. This approximates 3σ of a zero-mean Laplacian MVD distribution and covers
  about 99 % of MVDs.
* Use the results as W and H for the current macroblock.
* The first P frame uses the fixed ±32 window.

The MVD of each partition is exactly the offset the estimator reports (`result[b].off`), because every
partition's cost uses the 16×16 block's PMV, which is also the window centre. So the processor gets its
statistics directly from the results.

## How a window is scanned

This part takes the most care to follow.

### The PE array

`pe_array` is 48 rows × 16 columns of processing elements (PEs). Every PE holds one search-area pixel.
The top 16 × 16 PEs are *active*. Each also holds one pixel of the current macroblock and outputs
|cur − ref|. The 256 absolute differences (ADs) of one candidate position therefore appear together, in
the cycle that the array holds that candidate.

All search pixels move together in one of three ways:

| move | effect |
|---|---|
| left | each column takes its right neighbour; a new search-area column enters at the right edge |
| up | each row takes the row below; row 47 takes row 0 (circular) |
| down | each row takes the row above; row 0 takes row 47 (circular) |

### The search area and its columns

The search area is (2W+16) columns × (2H+16) rows. Its row 0, column 0 is the reference pixel at
PMV − (W, H) relative to the macroblock.

### One pass (H ≤ 16, so 2H+16 ≤ 48)

1. **Load.** For 16 cycles, move left and bring in search-area columns 0…15 in *mode (a)*: natural order,
   row 0 at the top. The array now holds candidate column x = 0 at vertical position 0.
2. **Scan one candidate column.** For column x, make 2H vertical moves: upward if x is even, downward if
   x is odd. The top 16 rows then show vertical positions 0, 1, …, 2H for even x, or 2H, …, 0 for odd x.
   That is 2H+1 candidates, one per cycle.
3. **Step to the next column.** Move left and bring in search-area column x+16. After an even x the array
   content is rotated upward by 2H rows. So the new column must arrive rotated the same way, in *mode (b)*:
   PE row r gets search-area row (r + 2H) mod 48. Rows 2H…2H+15 land at the top, don't-care padding in the
   middle, and rows 0…2H−1 at the bottom. After an odd x the content is back in natural order, so the new
   column comes in mode (a). The cycle that makes this move already shows a new candidate, the top or
   bottom position of column x+1.

The scan is thus a serpentine down and up the candidate columns. It costs **16 + (2W+1)(2H+1)** cycles.

`col_formatter` produces both input modes from a column delivered in natural order.

### Two passes (H > 16)

A column of the search area no longer fits in 48 rows. The window is then split:

* a first pass over candidate rows 0…32, with 32 vertical moves per column;
* a second pass over rows 33…2H, with 2H−33 moves per column. This pass starts with its own 16-cycle load
  of search-area rows 33 onwards.

The split costs 16 extra cycles. The full ±32 window takes 16 + 65·33 + 16 + 65·32 = **4257 cycles**.
Large vertical motion is rare, which is why the array is only 48 rows tall.

## Cost of a candidate and the adder tree

`mvd_cost_lut` gives the MVD cost of the candidate the array holds:

    lambda · (len(4·dx) + len(4·dy))

* (dx, dy) is the offset from the window centre.
* len is the length of a signed Exp-Golomb code.
* The factor 4 expresses integer-pel offsets in quarter-pel MVD units.
* The code lengths are a 33-entry ROM indexed by |dx| and |dy|, filled at elaboration from the
  code-length formula.

Because every partition uses the same PMV, one cost serves all nine partitions of a candidate.

`adder_tree` is a three-level pipeline:

| cycle | level | work |
|---|---|---|
| T | – | the array holds candidate c; its 256 ADs are summed into four 8×8 SADs, which are registered |
| T+1 | 8×8 | the four 8×8 nodes judge c; pairs of 8×8 SADs are added into the 16×8 (top, bottom) and 8×16 (left, right) SADs, registered |
| T+2 | 16×8 / 8×16 | these four nodes judge c; the two 8×16 SADs are added into the 16×16 SAD, registered |
| T+3 | 16×16 | the 16×16 node judges c |

`cost_delay_chain` holds one register per level. It carries the cost, offset and valid bit of c to each
level in step with its SADs, and broadcasts them to all nodes of that level.

Each `best_mv_node` adds SAD and cost, and keeps the smallest J and its offset. A later candidate wins
only if its J is strictly smaller, so on a tie the candidate met first in the scan order is kept.

## Interfaces and timing (`ffsbm_me_top`)

| port | meaning |
|---|---|
| `cmd_valid`, `cmd_ready`, `cmd` | command of type `ffsbm_pkg::cmd_t`: W, H, PMV (x, y), lambda. `cmd_ready` is high only when idle. |
| `cur_we`, `cur_row`, `cur_data[16]` | writes one row of the current macroblock. Write all 16 rows before the command. |
| `col_req`, `col_x`, `col_y0`, `col_data[48]` | search-area column read. While `col_req` is high, `col_data[k]` must carry search-area column `col_x`, row `col_y0 + k`, **in the same cycle**. Rows beyond 2H+15 are don't-care. |
| `busy`, `done` | `done` pulses for one cycle when all nine results are final. |
| `result[9]` | per partition (index order in `ffsbm_pkg::blk_e`): offset (the MVD), MV = PMV + offset, and J. The results hold until the next command is accepted. |

A command accepted at clock edge 0 is followed by:

* 16·passes + (2W+1)(2H+1) array cycles;
* 3 drain cycles;
* the `done` cycle.

Reset (`rst_n`, synchronous, active low) clears the control state and the result registers. Pixel
registers are not reset.

Default sizes are in `ffsbm_pkg` and in the `ROWS` parameter of the top:

* 8-bit pixels;
* a 48-row array;
* W and H up to 32;
* a 12-bit signed integer MV;
* an 8-bit lambda.

## Throughput

At W = H = 32 a macroblock takes 4257 array cycles. A 1280×720 frame (3600 macroblocks) then needs about
15.3 M cycles.

Reported average window reductions for 720p sequences range from about 6× to 44×, depending on content
and quantiser. These correspond to roughly 110 to 700 array cycles per macroblock.

With the 5×5-mean rule applied to a measured CIF "Foreman" horizontal MVD field (bundled in
`tb/fig2_mvdx.hex`) and H fixed at 2, the next frame needs 21 334 array cycles. A fixed ±32 window would
need 1 762 398.

## Files

| file | contents |
|---|---|
| `rtl/ffsbm_pkg.sv` | widths, `shift_e`, `off_t`, `cmd_t`, `result_t`, `blk_e`, Exp-Golomb length function |
| `rtl/pe.sv` | one PE (active or inactive) |
| `rtl/pe_array.sv` | 48 × 16 array |
| `rtl/col_formatter.sv` | input modes (a) and (b) |
| `rtl/me_controller.sv` | load / scan / two-pass sequencing, candidate tagging, command handshake |
| `rtl/mvd_cost_lut.sv` | MVD cost |
| `rtl/cost_delay_chain.sv` | per-level cost registers |
| `rtl/best_mv_node.sv` | J and best-MV register of one partition |
| `rtl/adder_tree.sv` | SAD merge and nine nodes |
| `rtl/ffsbm_me_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking bench per module, plus `tb_workload_fig2` |

## Simulating

From the repository root, with Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/ffsbm_pkg.sv tb/tb_ffsbm_me_top.sv --top-module tb_ffsbm_me_top
    ./obj_dir/Vtb_ffsbm_me_top

Replace the bench name to run another one. `tb_workload_fig2` reads `tb/fig2_mvdx.hex` by a path relative
to the repository root. Every bench prints `TB_RESULT checks=N failures=M` and finishes.

What the benches check:

* `tb_ffsbm_me_top` runs the top at its default size. Its windows range from 1×1 up to ±32×±32, using
  one and two passes. It compares all nine results with an exhaustive reference, checks the 4257-cycle
  count, and requires every move, both input modes and both pass counts to occur.
* `tb_me_controller` drives a model array of pixel *coordinates*. It proves that every candidate is
  visited once, with the right 256 pixels in the active region.

## Where this design makes its own choices

The scan order, the input modes, the two-pass split, the array shape, the SAD merge, the shared MVD cost
and its delay chain all follow the FFSBM architecture. The following are choices of this implementation:

* **MVD cost values.** The cost is described only as the bit cost of the MVD, taken from a table. The
  Exp-Golomb length of the quarter-pel MVD times lambda is an assumption. Change `mvd_cost_lut` if your
  encoder uses a different rate model.
* **Interfaces.** The command handshake and `cmd_t` fields, the row-wise current-block write port and the
  same-cycle column read port are this design's own. The search-area buffer behind the column port is not
  part of the design. A buffer with read latency needs the column request moved one cycle earlier.
* **Mode (b) rotation.** The rotation is done inside the estimator (`col_formatter`), so the buffer always
  delivers natural order. In the second pass of a tall window the rotation is that pass's move count
  (2H−33).
* **16×16 merge.** The 16×16 SAD is summed from the two 8×16 SADs. The 16×8 pair gives the same value.
* **Ties.** On equal J the earliest candidate in scan order wins.
* **Control timing.** The 3-cycle drain and the `done` pulse are this design's own.
* **Widths.** The SAD, J, cost, MV and lambda widths were chosen here.
* **Not included.** The window-size computation stays in software on the host processor.
* **Not characterised.** The clock rate, area and technology of any implementation were not
  characterised for this RTL.
