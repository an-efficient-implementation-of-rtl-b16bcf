# Integer matrix multipliers for signal and image processing

This is RTL for two independent fixed-point matrix multipliers, written for FPGAs:

* **matvec**: a dense matrix-vector multiplier, `G = A·C`. A has 1024 rows and 28 columns, C has 28 elements and G has 1024. The shape comes from an image-reconstruction problem. There, G (the image) is found from a measured vector C through a fixed matrix A, the transpose of a Jacobian. A whole frame of G comes out of one pass over A.
* **trimatrix**: a tri-matrix multiplier, `M = X·Y·Z`, on 3×3 matrices, where Y is diagonal. It is built as two arrays of processing elements in a chain. The first array forms `W = X·Y` and the second forms `M = W·Z`.

Both designs use exact signed integer arithmetic, not floating point. Every accumulator is wide enough that no result can overflow. `mm_top` puts both side by side. They share only the clock and the reset, and each keeps its own ports (`mv_*` and `tm_*`).

## The matrix-vector multiplier

### Dataflow

The multiplier works row by row. Each row of A in turn is combined with all of C. C is loaded once per frame into a small buffer and is then reused for all 1024 rows.

```
 c_data ──► C buffer (28 words) ──────────────┐
                                               ▼
 a_data ──► A row buffer (2 rows) ──► [ × ]──►[ + ]──► accumulator ──► G RAM (1024 words)
                                                 ▲            │          │
                                                 └────────────┘          └──► g_rd_data
                                                                 g_valid/g_addr/g_data
```

* **`mv_vector_buffer`** holds C. It takes elements one per cycle until it has all 28, then raises `full`. On each cycle it hands the MAC the C elements that match the current position in the row.
* **`mv_row_buffer`** holds rows of A. It has two row banks that are used in turn. While the MAC works through one complete row, the next row is written into the other bank. A row is released to the MAC only once all of it is in. When both banks are full, `a_ready` goes low and the source has to wait.
* **`mv_mac`** is the multiply-accumulate unit. It has a multiplier and an adder, and the adder's registered output is fed back to its second input. The products go through a register stage before the adder. A `first` flag loads the accumulator instead of adding to it, so each row starts from zero. After the `last` step of a row, the finished element of G is ready two cycles later.
* **`mv_result_ram`** stores each element of G at the index of its row. Its read port has one cycle of latency, like an FPGA block RAM. Each element is also shown on `g_valid/g_addr/g_data` as it is written.
* **`mv_controller`** runs a frame. `start` clears the C buffer. The controller then accepts C, admits exactly 1024 rows of A, feeds the MAC each beat with the right `first`/`last` flags, and counts the results into the RAM. `done` pulses once, in the cycle after G[1023] is written. Up to two rows of A can be buffered while C is still loading.

### Parallel lanes and frame time

`LANES` sets how many multipliers work side by side. A row of 28 elements then arrives as `28/LANES` beats, each of `LANES` elements. The products of one beat are added together by an adder tree before the accumulator. `COLS` must be a multiple of `LANES`.

When A and C are offered every cycle, `done` rises `COLS + ROWS·COLS/LANES + 5` cycles after the cycle that takes `start`:

| LANES | cycles per frame | at 17.376 MHz | frames/s |
|-------|------------------|---------------|----------|
| 1 (default) | 28,705 | 1.652 ms | 605 |
| 28 | 1,057 | 60.8 µs | 16,440 |

The default, `LANES = 1`, is the plain unit described above: one multiplier, one adder and a feedback register. The reference FPGA build of this multiplier is reported to run at 17.376 MHz and to take 58.93 µs per frame (16,970 frames/s). That frame time is 1024 clock cycles, one element of G per clock. A single MAC cannot do that, because it needs 28 cycles per element. `LANES = 28` comes within 33 cycles of that figure. The remaining cycles are spent loading C and draining the pipeline. Choose `LANES` for the rate you need.

### Frame protocol

1. Pulse `start` while `busy` is low.
2. Offer C on `c_valid/c_data`, element 0 first. Each element is taken on a cycle with `c_ready` high.
3. Offer A in row-major order on `a_valid/a_data`, `LANES` elements per beat. Each beat is taken on a cycle with `a_ready` high. The multiplier takes exactly `ROWS·COLS/LANES` beats per frame and refuses any more.
4. Collect G from the `g_valid` stream, or read it from the RAM after `done`. `g_rd_addr` gives `g_rd_data` one cycle later.

## The tri-matrix multiplier

### First array: scaling by a diagonal matrix

Multiplying X on the right by a diagonal Y needs no sums. It scales column j of X by `Y[j][j]`, so `W[i][j] = X[i][j]·Y[j][j]`. The first array (**`tm_block1`**) has 3×3 **`tm_pe1`** elements, and each one is just a registered multiplier. The diagonal of Y sits in the array's input buffer. `Y[j][j]` is shared by the PEs of column j, so the PEs of column j produce column j of W. A whole X matrix is taken in one clock and its W is ready two clocks later. With no back-pressure, the array takes one X per clock.

### Second array: a systolic array of MAC units

The second array (**`tm_block2`**) has 3×3 **`tm_pe2`** MAC units. PE(i,j) builds `M[i][j] = Σₖ W[i][k]·Z[k][j]`. W comes from the first array's output buffer into this array's input buffer, and Z sits in a coefficient register.

By default (`SYSTOLIC = 1`) the operands travel through the array. W values enter at the left edge of each row and move one PE to the right per clock. Z values enter at the top of each column and move one PE down per clock. The inputs are skewed: at clock t, row i is fed `W[i][t−i]` and column j is fed `Z[t−j][j]`. As a result, PE(i,j) receives the matching pair `W[i][k]`, `Z[k][j]` at clock `t = k + i + j`. A valid flag and a "first" flag travel with each W value. They tell each PE when to multiply and when to restart its sum. The farthest PE, (N−1, N−1), finishes at clock 3N−3, so one product occupies the array for 3N−2 clocks. The next product enters only after that. At that point the skew of the previous product has fully drained, so the two never mix.

```
 t:      0        1        2        3        4
 row 0:  W00      W01      W02      .        .      → moves right
 row 1:  .        W10      W11      W12      .
 row 2:  .        .        W20      W21      W22
 col j gets Z[t-j][j] from the top, moving down
```

With `SYSTOLIC = 0`, the operands are broadcast instead. In step k, `W[i][k]` goes to every PE of row i and `Z[k][j]` goes to every PE of column j, all in the same clock. A product then takes N clocks. It costs long fan-out wires in place of the short neighbour-to-neighbour links.

When the last MAC step is done, the input buffer is freed for the next W and the nine sums go to the output buffer.

### Pipeline and rates

The two arrays work on different matrices at the same time. Each one-matrix buffer (**`tm_buffer`**) passes a valid/ready handshake upstream, so a stall at the output reaches `x_ready`.

| second array | M offered after X is taken (idle pipe) | one M every |
|---|---|---|
| systolic (default) | 3N + 2 cycles (11 for N = 3) | 3N − 2 clocks (7) |
| broadcast | N + 4 cycles (7 for N = 3) | N clocks (3) |

* The first array can take one X per clock, so it waits on the second.
* X, Y and Z have `DATA_W` = 16 bits. W has 32 bits and M has `3·DATA_W + ⌈log₂N⌉` = 50 bits, all exact.
* Y and Z are coefficients: load them with `y_load`/`z_load` and they stay until they are loaded again. Change them only while no product is in flight. X is the operand that streams through.

The same RTL works for any order N. At N = 7 each array has 49 PEs and M has 51 bits. The systolic array then finishes one product every 19 clocks.

## What follows the original design and what is this design's choice

These points follow the original description:

* The matrix sizes: 1024×28 and 3×3, plus a 7×7 build.
* The MAC structure: a multiplier whose output feeds an adder, with the adder output registered and fed back.
* C and the rows of A are buffered on chip, and G is written to a 1024-word on-chip RAM.
* Reset is active high and clears the A and C registers.
* The tri-matrix design has two arrays of N×N PEs: multipliers for X·Y with Y diagonal, then MAC units for ·Z, each array with an input buffer and an output buffer. Column j of the first array produces column j of W.

These are this design's own choices:

* **Word widths.** The original design uses integer arithmetic but fixes no width. 16-bit signed operands with exact results are an assumption.
* **Handshakes.** All the valid/ready handshakes, the `start`/`busy`/`done` protocol and the whole-matrix ports of the tri-matrix side are assumptions.
* **`LANES` parameter.** The generalisation to `LANES` parallel multipliers is this design's, and so is the frame-time table above.
* **Buffer structure.** The two-bank A row buffer and the one-entry tri-matrix buffers are the simplest buffers that do the job. The original only names its buffers.
* **Second-array schedules.** The original calls both arrays systolic but gives no schedule. Both schedules of the second array are assumptions: the skewed systolic one and the broadcast one. So is running one product at a time. Overlapping successive products in the systolic array would raise its rate toward one product every N clocks, but it is not done here. The first array needs no operand movement between PEs, because each of its PEs computes one independent product.
* **Coefficients.** Treating Y and Z as loaded coefficients, with X streaming, is an assumption.
* **RAM reset.** Reset clears the RAM's read register but not the RAM contents. Every word is rewritten in each frame.

Not reproduced: resource counts and clock rates of the reference FPGA builds. For example, 55 DSP48 blocks were reported for the matrix-vector multiplier, and the reason for that count is not given. Also not built are a linear systolic array, word-width decomposition of the multipliers and an energy model. These ideas are mentioned in passing in the original material, but neither design uses them.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|------|----------|
| `mm_pkg.sv` | default sizes and the width function `sum_width(wa, wb, terms) = wa + wb + ⌈log₂ terms⌉` |
| `mv_mac.sv`, `mv_vector_buffer.sv`, `mv_row_buffer.sv`, `mv_result_ram.sv`, `mv_controller.sv`, `matvec.sv` | matrix-vector multiplier |
| `tm_pe1.sv`, `tm_pe2.sv`, `tm_buffer.sv`, `tm_block1.sv`, `tm_block2.sv`, `trimatrix.sv` | tri-matrix multiplier |
| `mm_top.sv` | both designs side by side |

`tb/` holds one self-checking testbench per module, named `tb_<module>.sv`. Each one computes the expected results itself, counts its checks and has a watchdog. It ends by printing `TB_RESULT checks=N failures=F`. The system-level tests are:

* `tb_mm_top` runs both designs at their full default sizes. It runs three 1024×28 frames (one at full rate with the frame time checked, one with random input gaps, one with extreme values). At the same time it streams about 370 3×3 products under random back-pressure with coefficient reloads. It also counts how often each mechanism occurs (row-buffer stall, back-pressure stall, reload, read-back) and fails if one never happens.
* `tb_matvec_lanes28` runs the 1024×28 product with 28 lanes and checks the 1,057-cycle frame.
* `tb_trimatrix_7x7` runs the tri-matrix multiplier at order 7.
* `tb_tm_block2_broadcast` and `tb_trimatrix_broadcast` run the broadcast schedule (`SYSTOLIC = 0`).

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mm_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/mm_pkg.sv tb/tb_mm_top.sv -o sim
./obj_dir/sim
```

Replace `tb_mm_top` with any other testbench name. Each test runs in seconds. The testbenches use `$urandom` only, and nothing depends on X or Z states, so a two-state simulator works. Sizes are parameters with the defaults above (`ROWS`, `COLS`, `LANES`, `DATA_W` on `matvec`; `N`, `DATA_W`, `SYSTOLIC` on `trimatrix`; prefixed copies on `mm_top`).
