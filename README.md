# Reconfigurable SEFDM baseband transmitter

Spectrally Efficient FDM (SEFDM) places sub-carriers closer together than OFDM
does. The spacing is `alpha = b/c` times the OFDM spacing. The carriers then
stop being orthogonal, but the same data needs less bandwidth. One symbol of
`N` sub-carriers is

    X[k] = (1/N) * sum_{n=0}^{N-1} s_n * exp(j*2*pi*n*k*b / (c*N)),   k = 0..N-1

A single N-point IFFT cannot produce this, because the exponent is not a
multiple of `2*pi/N`. The transmitter here computes it with `c` ordinary
N-point IFFTs. It supports three ratios and can switch between them from one
symbol to the next:

| ratio        | b/c | IFFTs used | rotation tables used |
|--------------|-----|-----------:|---------------------:|
| `ALPHA_1`    | 1/1 | 1 (plain OFDM) | none |
| `ALPHA_2_3`  | 2/3 | 3 | 2 |
| `ALPHA_1_2`  | 1/2 | 2 ("Fast OFDM") | 1 |

The default size is `N = 64` sub-carriers with 12-bit complex words.

## How c IFFTs make one SEFDM symbol

Build a vector `s'` of length `c*N` that holds `s_n` at position `n*b` and zero
everywhere else. `X[k]` is then the first `N` outputs of a `c*N`-point inverse
DFT of `s'`. Split the index as `i = r + l*c`, where `r = 0..c-1` is the row
and `l = 0..N-1` is the column:

    X[k] = sum_{r=0}^{c-1} exp(j*2*pi*r*k/(c*N)) * IFFT_N( s'[r], s'[r+c], s'[r+2c], ... )[k]

In words, `s'` is written column by column into a `c x N` matrix. Each row goes
through its own N-point IFFT. Output `k` of row `r` is rotated by
`W_r[k] = exp(j*2*pi*r*k/(c*N))`, and the rows are summed. Row 0 needs no
rotation, so `c-1` complex multiply-accumulates per sample are enough.

A worked example, `alpha = 2/3` (`b = 2`, `c = 3`): symbol `n` sits at matrix
position `i = 2n`, that is in row `2n mod 3` and column `floor(2n/3)`. Column 0
therefore holds `s_0, 0, s_1`, and column 1 holds `0, s_2, 0`. Only `N` of the
`3N` matrix entries are non-zero. Past position `2(N-1)` the matrix is all
zeros.

## Data path

```
 in_sym ──► sefdm_input_buffer ──► zero/symbol mux ──► sefdm_ifft64 (row 0) ──┐
 (serial)   N words, 3 read ports    per row, driven   sefdm_ifft64 (row 1) ──┼─► sefdm_postproc ──► out_sample
                                    by the address      sefdm_ifft64 (row 2) ──┘   ROMs + 2 CMACs      (serial, k order)
                                    generator
```

* **`sefdm_input_buffer`** holds one frame of `N` symbols. The zero-padded
  `c*N` matrix is never stored. Zeros are inserted at the IFFT inputs instead.
* **Address generator.** For IFFT input `l` and row `r` it says whether the
  matrix element `i = r + l*c` is a symbol. If it is, it gives the buffer
  address `i/b`. Two versions exist:
  * `sefdm_agu_lut` (the default) is a table indexed by `{ratio, l}`. The table
    is filled at elaboration from the rule above.
  * `sefdm_agu_mod` takes `b` and `c` as run-time inputs. It keeps a counter
    equal to `l*c`, which it advances by `c`, and computes `mod b` and `div b`
    for each row. Select it with `AGU_MODULO = 1` on `sefdm_tx`. It handles
    any `b/c` with `c <= 3`. The top only feeds it the three preset ratios,
    because rotation tables exist only for those.
* **`sefdm_ifft64`** ×3 is a 64-point IFFT built around a 64-word register
  file. It runs two radix-8 passes (`sefdm_radix8`) in place, with twiddle
  multiplication between the passes. Each IFFT has an enable input. When the
  enable is low, the IFFT holds its state and its output register reads
  `0 + j0`. At the start of each frame, row `r` is enabled only if `r < c`.
  The rows that are not used therefore contribute zero, and the summation
  never has to be reconfigured.
* **`sefdm_postproc`** computes `X[k] = Y0 + W1*Y1 + W2*Y2` using two chained
  `sefdm_cmac` units. The coefficients come from `sefdm_rot_rom`, which holds
  three tables of `N` complex words:
  * `exp(j*pi*k/N)`, used for 1/2
  * `exp(j*2*pi*k/(3N))`, used for 2/3
  * `exp(j*4*pi*k/(3N))`, used for 2/3

  If the current ratio does not use a table, that table's address is held at 0
  so it does not toggle.
  With `ROM_QUARTER = 1`, each table keeps only the angles from 0 to `pi/2`
  of its own step: 33, 49 and 25 words for `N = 64`. Index `k` is folded into
  quadrant `q` and offset `m`. The table address counts up (`m`) in quadrants
  0 and 2 and down (`Q - m`) in quadrants 1 and 3. The real part is negated
  in quadrants 1 and 2, and the imaginary part in quadrants 2 and 3. The
  testbench checks both forms against the exact values to within 1 LSB.
* **`sefdm_cmac`** computes `acc + data * coef`. Its `STAGES` parameter sets
  how many register stages it has (1 by default). The multipliers have no
  feedback, so extra stages only add latency. `CMAC_STAGES` on `sefdm_tx`
  passes the depth down through `sefdm_postproc`, which delays the other
  operands to match.

## Interface and timing of `sefdm_tx`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_sym` | in/out/in | symbol stream, one complex `cplx_t` word per handshake |
| `in_cfg` | in | `alpha_t` ratio of the frame, sampled together with the frame's first symbol |
| `out_valid`, `out_idx`, `out_cfg`, `out_sample` | out | one sample `X[k]` per cycle, `k = 0..N-1`, plus the ratio of its frame |

* A frame is `N` accepted symbols. There is no output back-pressure: `X[0..N-1]`
  leave on `N` consecutive cycles.
* The three IFFTs always start together, so the latency does not depend on the
  ratio. If the transmitter is idle, `X[0]` appears `N + 19 + 2*CMAC_STAGES`
  cycles (`N + 21` by default) after the last symbol is accepted:
  * 1 cycle to start the frame
  * `N` cycles to feed the IFFTs
  * 16 cycles for the two radix-8 passes
  * 1 cycle for the IFFT output register
  * `1 + 2*CMAC_STAGES` cycles of post-processing
* The buffer is released once the IFFTs have been fed, so the next frame loads
  while the current one is transformed. In steady state a frame takes
  `2N + 18` cycles, which is about 0.44 output samples per clock. The IFFT does
  not stream: it loads, computes and unloads in turn, and that limits the rate.
* Assertions in `sefdm_tx` check that the enabled IFFTs accept input and
  produce output in lock-step.

## Number formats

| quantity | format |
|----------|--------|
| symbols, IFFT words | 12-bit signed per component (`SAMPLE_W`) |
| twiddles, rotations | 14-bit signed, 12 fractional bits (`COEF_W`, `COEF_FRAC`) |
| output samples | 14-bit signed per component (`OUT_W`), no further scaling |

* Each radix-8 pass divides by 8, rounding half up and saturating. The IFFT
  therefore computes `(1/64) * IDFT`, which gives the `1/N` scaling in the
  formula above.
* Inside `sefdm_radix8`, `cos(pi/4)` is a 16-bit fraction.
* Saturation cannot occur for symbols up to about 1447 per component. QPSK at
  ±1024 stays clear of it.
* Against a floating-point model, the full transmitter stays within 2.2 LSB.
  The testbench allows 4 LSB.

All widths are set in `rtl/sefdm_pkg.sv`. The word width of 12 bits comes from
the reference design. The coefficient and output widths are choices made for
this design.

## What follows the reference design and what does not

These parts follow the reference design:

* the three ratios, switchable per symbol
* a single `N`-word input buffer with zeros inserted at the IFFT inputs
* the table-based address generator, with a counter-based alternative for
  arbitrary `b/c`
* full rotation tables, with the quarter-wave folding as an option
* three parallel 64-point, 12-bit, radix-8, RAM-based IFFTs with an enable that
  clears their outputs
* `c-1` CMACs with three `N`-word rotation ROMs and masked addresses
* the option to pipeline the CMACs

These are this design's own choices, because the reference does not describe
them:

* the frame controller and the handshakes
* the internal structure of the IFFT
* the fixed-point rounding, and the coefficient and output widths
* the pipeline depths, and with them the latency and frame rate above

Known departures and limits:

* The IFFT is a simple non-streaming design, not a high-throughput core. The
  single input buffer already limits the rate to about one frame per `2N`
  cycles, because it must be filled and then read out. A streaming IFFT
  would therefore gain only the 18 cycles of computation and pipeline.
* Clock gating is written as a clock enable. A gating cell is left to
  implementation.
* The IFFT size is fixed at 64, so `sefdm_tx` only works with `N = 64`.
* Only the transmitter is provided. Receiver and detector are not part of this
  RTL.
* Area, power and the 2 ns clock target of a 65 nm implementation were not
  evaluated.

## Files

`rtl/`, one module or package per file:

| file | content |
|------|---------|
| `sefdm_pkg.sv` | types (`cplx_t`, `ccoef_t`, `cplx_out_t`, `alpha_t`), widths, coefficient functions |
| `sefdm_tx.sv` | top level and frame controller |
| `sefdm_input_buffer.sv` | symbol buffer |
| `sefdm_agu_lut.sv` | table-based address generator |
| `sefdm_agu_mod.sv` | counter-based address generator |
| `sefdm_ifft64.sv` | 64-point IFFT |
| `sefdm_radix8.sv` | 8-point inverse butterfly |
| `sefdm_rot_rom.sv` | rotation ROMs |
| `sefdm_cmac.sv` | complex multiply-accumulate |
| `sefdm_postproc.sv` | post-processing |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
compares against floating-point or independently built reference values and
prints `TB_RESULT checks=N failures=M`.

`tb_sefdm_tx` runs 24 frames through the full-size transmitter:

* every ratio, and changes of ratio between frames
* QPSK and 16-QAM symbols
* input gaps and back-pressure
* a latency check

`tb_sefdm_tx_mod` runs the same test with the counter-based address generator,
quarter-wave rotation tables and three register stages per CMAC. The two share their body,
`sefdm_tx_tb_body.svh`.

`tb_sefdm_spectrum` sends 16 back-to-back QPSK symbols per ratio. It takes the
DFT of every output symbol and checks where the energy lies. A sub-carrier `n`
lands at bin `n*alpha`, so the occupied band shrinks with the ratio:

| ratio | energy above bin `0.5N` | energy above bin `0.7N` |
|-------|------------------------:|------------------------:|
| 1     | 42 % | 23 % |
| 2/3   | 19 % | 0.5 % |
| 1/2   | 0.6 % | 0.3 % |

These shares leave out the two top bins, where leakage from the lowest
sub-carriers wraps around. For every ratio, less than 10 % of the energy falls
outside bins `0 .. alpha*N + 2`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sefdm_tx rtl/sefdm_pkg.sv tb/tb_sefdm_tx.sv
./obj_dir/Vtb_sefdm_tx
```

Use the same command with another `tb_*` module for a single block. The full
transmitter test takes well under a second.
