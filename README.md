# In-memory multi-head attention accelerator (crossbars + LSH CAM)

Transformer attention over long sequences is limited by memory traffic: every
query has to touch every cached key and value. This design keeps all of that
data inside the compute arrays. Every weight matrix **and** the attention
caches themselves live in 64x64 SRAM crossbars (XBars) that multiply in place.
Three ideas make it fast:

* **Key/value caching in crossbars.** Each time step's projected key `k_t`
  becomes a *row* of a K crossbar and its value `v_t` a *column* of a V
  crossbar. A query then costs one K-crossbar pass (all scores at once), a
  softmax, and one V-crossbar pass (the weighted sum), whatever the sequence
  length.
* **Duplication for parallel attention.** Each head holds `P` copies (lanes)
  of its query path and caches, so `P` queries of a bidirectional (encoder)
  layer are answered at once.
* **LSH filtering.** Keys are also hashed into 1024-bit locality-sensitive
  signatures stored in a ternary CAM. A query's signature is compared with all
  of them by Hamming distance, and full dot-product attention is computed only
  for the 16 nearest keys.

The RTL follows the iMCAT architecture (A. F. Laguna et al., "In-Memory
Computing based Accelerator for Transformer Networks for Long Sequences").
The source describes the mapping and gives its main sizes. Number formats,
control sequencing, interfaces and the softmax table are this design's own
and are listed in [Departures and own choices](#departures-and-own-choices).

## Hierarchy

```
imcat_top                       N_HEADS=8 heads, W^MHA, feedforward
├── attention_head  x8          W^K, W^V, W^K·R shared; P=6 lanes
│   ├── xbar_mvm  W^K, W^V      64 x 512
│   ├── lsh_hasher W^K·R        1024 x 512 crossbar + sign
│   └── attention_lane  x6
│       ├── xbar_mvm  W^Q       64 x 512
│       ├── lsh_hasher W^Q·R    1024 x 512
│       ├── lsh_cam             4096 entries x 1024 bits, Hamming search
│       ├── topk_select         16 nearest candidates
│       ├── xbar_mvm  K cache   4096 x 64  (one row per time step)
│       ├── softmax_lut         >>3 scaling, exp table, normalise
│       └── xbar_mvm  V cache   64 x 4096  (one column per time step)
├── xbar_mvm  W^MHA             512 x 512
└── ffn_xbar                    512 -> 2048 -> 512, ReLU
    └── xbar_mvm x2
xbar_mvm = grid of xbar_tile (64 x 64, 8-bit weights, 8 ADCs)
imcat_pkg: sizes, types (data_t, acc_t, wwrite_t, wtarget_e), requant()
```

Layer normalisation and residual additions are not part of the hardware. The
host does them between the attention output (`y`) and the feedforward input
(`ffn_x`).

## Numbers

| Quantity | Format |
|---|---|
| weights, activations, keys, values, head outputs | signed 8-bit |
| crossbar sums | signed 32-bit, exact |
| attention weights (softmax output) | unsigned Q0.7 in 0..127, driven into the V crossbar as 8-bit inputs |
| LSH signature | 1024 bits, bit = 1 when the projection is >= 0 |

`requant(v, s)` (in `imcat_pkg`) turns a 32-bit sum back into 8 bits. It
shifts right by `s`, rounds half up and saturates to [-128, 127]. It is
applied:

* after W^Q, W^K, W^V: `PROJ_SHIFT` = 7;
* after the V cache: 7, which removes the Q0.7 weight scale;
* after W^MHA: `MHA_SHIFT` = 7;
* after each feedforward matrix: `FF_SHIFT` = 7.

Pick the shifts to suit the quantisation scales of the model you load.

## The crossbar tile and tiled matrices

`xbar_tile` stores a 64x64 matrix `M` and computes `y = M·x`. "Row" always
means an output (the matrix view). Each row has an enable bit, and a disabled
row reads as 0. This is how causal masking and LSH selection switch off K
rows. One ADC serves 8 rows. An MVM is therefore converted in 8 steps, with
ADC `j` converting row `8j+k` in step `k`. The ADC is modelled as exact.

`xbar_mvm` builds any `OUT_DIM x IN_DIM` matrix (multiples of 64) from a grid
of tiles. All tiles multiply at once. The `IN_DIM/64` partial sums of each
output are then added one input tile per cycle. A wide input, such as a V
cache with 4096 time-step columns, costs one cycle per 64 inputs (64 cycles
at n = 4096). Weights are written 64 at a time:

* a row segment (`wr_row_*`: row index + input-tile index). Static weights
  and K-cache rows use this port.
* a column segment (`wr_col_*`: column index + output-tile index). V-cache
  columns use this port.

| Operation | Latency (cycles from the start cycle to `done`) |
|---|---|
| `xbar_tile` MVM | `ADC_SHARE + 1` = 9 |
| `xbar_mvm` / `lsh_hasher` MVM | `ADC_SHARE + IN_DIM/64 + 1` (17 for a 512-wide input, 73 for the 4096-wide V cache) |
| `lsh_cam` search | 1 |
| `topk_select` | `M + 1` = 17. With c < M candidates: c + 2 |
| `softmax_lut` on c scores | first weight c + 2 after the last score, last weight 2c + 1 after it |
| head load (`ld_start` to `ld_done`) | `ADC_SHARE + D_MODEL/64 + 3` = 19 |
| `ffn_xbar` | `2·ADC_SHARE + D_MODEL/64 + D_FF/64 + 4` = 60 |

## How a head works

**Load (one time step).** `ld_x` goes through W^K, W^V and W^K·R in parallel.
The requantised key, the value and the signature are written, in one cycle,
into the K cache row, the V cache column and the CAM entry `ld_idx` of
**every** lane. Writes therefore grow with `P`. That is the price of
duplication.

**Query (one round, up to P lanes).** Each enabled lane works on its own
input `q_x[l]`:

1. **Project.** `q = requant(W^Q·x)`. With `q_lsh`, the lane also computes
   the query signature through W^Q·R, in parallel.
2. **Candidates.** Index `< q_n`. With `q_masked`, also index `<= q_limit[l]`.
3. **LSH (optional).** The CAM returns the Hamming distance of every
   candidate's signature. `topk_select` picks the `TOP_M` = 16 nearest, one
   per cycle, the lower index winning ties. Fewer are kept if fewer exist.
4. **Score.** One K-cache MVM runs with only the selected rows enabled.
5. **Softmax** (`softmax_lut`). The selected scores are streamed in.
   * Each score is divided by √d_k = 8 as a 3-bit arithmetic right shift.
   * `e_i = EXP_LUT[min((s_max − s_i) >> LOGIT_SHIFT, 255)]`, where
     `EXP_LUT[k] = round(255·exp(−k/16))`.
   * The weights are `w_i = round(127·e_i / Σe)`.
6. **Weigh.** The weights form the V-cache input vector (zero for keys not
   attended), and one V-cache MVM gives the 64-wide head output.

`q_done` comes when every enabled lane has finished. `q_keys` reports how many
keys each lane attended to.

**Top.** After all heads finish a round, each enabled lane's head outputs are
concatenated in head order. The result goes through the single W^MHA
crossbar, lowest lane first. Each result leaves on `y_valid / y_lane / y`, and
`q_done` follows the last one.

## Attention types

The same hardware serves all three attention types of a transformer. The
sequencer outside the top chooses which one runs.

| Type | How to run it |
|---|---|
| Bidirectional (encoder) self-attention | Load t = 0..n−1. Then ⌈n/P⌉ rounds, each with P queries, `q_masked = 0`. |
| Masked (decoder) self-attention | Per step t: load `x_t` at index t, then one round on one lane with `q_masked = 1`, `q_limit = t`, `q_n = t+1`. |
| Encoder-decoder attention | Load the encoder outputs once, then query with the decoder vectors, unmasked. |

Any of these can set `q_lsh` to restrict attention to the 16 LSH-nearest
keys. LSH pays off only for long sequences: it adds a search (1 + 17 cycles)
but shortens the softmax.

## Programming weights

A weight write is a `wwrite_t` struct: `en`, `tgt`, `row`, `tile`, and `data`
(64 weights). It writes weights `tile*64 .. tile*64+63` of row `row` of the
crossbar named by `tgt`:

| `tgt` | Crossbar | Rows x inputs | Addressed by |
|---|---|---|---|
| `TGT_WQ` | W^Q | 64 x 512 | `w_head`, and `w_lane` or `w_bcast` |
| `TGT_WK`, `TGT_WV` | W^K, W^V | 64 x 512 | `w_head` |
| `TGT_WLQ` | W^Q·R | 1024 x 512 | `w_head`, and `w_lane` or `w_bcast` |
| `TGT_WLK` | W^K·R | 1024 x 512 | `w_head` |
| `TGT_WMHA` | W^MHA | 512 x 512 | — |
| `TGT_FF1` / `TGT_FF2` | feedforward | 2048 x 512 / 512 x 2048 | — |

`R` is a matrix of Gaussian random hyperplanes. The host multiplies it into
W^K and W^Q before writing, so hashing needs no extra crossbar pass. Lanes
normally hold identical copies, and `w_bcast` writes all of them at once.

## Sizes and storage

The defaults are the main configuration. The model is the vanilla transformer
(d = 512, 8 heads of 64). Other defaults: sequences up to 4096, 1024-bit
signatures, 16 LSH keys, 6 lanes, and 64x64 8-bit crossbars with one ADC per
8 rows.

One lane stores about 2 MB:

* W^Q: 32 KB
* W^Q·R: 512 KB
* K cache: 256 KB
* V cache: 256 KB
* CAM, data and care bits: 1 MB

A head stores about 12.8 MB, which stays within a 15 MB per-head memory
budget. All parameters are module parameters:

* `D_MODEL`, `N_HEADS`, `D_FF`, `SIG_BITS` and `N_MAX` must be multiples
  of 64.
* `D_MODEL/N_HEADS` must be 64.
* `N_MAX` must be a power of two.

## Departures and own choices

These points are this design's own, because the source does not specify
them:

* **ADC.** Modelled as an exact converter. Only its sharing, which gives 8
  conversion steps per MVM, is modelled. The source gives no range or
  transfer function for its 8-bit ADCs, so results here are more precise
  than an analog array would give.
* **Numbers.** Operands are signed. The requantisation shifts, the Q0.7
  weights and the softmax table are choices. So is the table scale
  `LOGIT_SHIFT` = 6, which sets how many score units make one table step of
  1/16.
* **Duplication.** Duplication covers W^Q, W^Q·R, the caches and the CAM of
  each lane. W^K, W^V and W^K·R are single per head, and their results are
  broadcast to the lanes. W^MHA is a single crossbar that the lanes share, one
  after another.
* **Query hashing.** Done by a W^Q·R crossbar, by symmetry with the W^K·R
  crossbar for keys.
* **LSH with masking.** The causal mask is applied before the CAM search.
* **Feedforward.** Two crossbars with ReLU between them, no bias, and
  `D_FF` = 2048. The source only says that the feedforward layers also run on
  crossbars.
* **Control.** Every step runs strictly one after another: no pipelining
  between queries, and loads, queries and feedforward runs must not overlap.
  Softmax is serial, one score per cycle, in three passes, so a query over n
  keys without LSH costs about 3n cycles of softmax.
* **Not modelled.** Energy, the SRAM bit-cell circuit and the 14 nm
  implementation are outside the RTL.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The
reference arithmetic (requantisation, exponent table, softmax, nearest-M
search) is in `tb/imcat_ref_pkg.sv`, written independently of the RTL.
Example with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/imcat_pkg.sv tb/imcat_ref_pkg.sv rtl/xbar_tile.sv rtl/xbar_mvm.sv \
  rtl/lsh_hasher.sv rtl/lsh_cam.sv rtl/topk_select.sv rtl/softmax_lut.sv \
  rtl/attention_lane.sv rtl/attention_head.sv rtl/ffn_xbar.sv rtl/imcat_top.sv \
  tb/tb_imcat_top.sv --top-module tb_imcat_top
./obj_dir/Vtb_imcat_top
```

| Testbench | Size | What it checks |
|---|---|---|
| `tb_xbar_tile` | 64x64 | row and column writes, row enables, exact sums, latency |
| `tb_xbar_mvm` | 128x192 | tiling, partial sums, column writes into a given output tile, latency |
| `tb_lsh_hasher` | 192 bits, 128 inputs | sign bits against reference dot products, latency |
| `tb_lsh_cam` | 64 x 100 bits | Hamming distances with don't-care bits, invalid entries |
| `tb_topk_select` | 128 entries, M = 16 | order, ties, masks, short candidate lists, latency |
| `tb_softmax_lut` | up to 64 scores | weights, order, `out_last`, latency |
| `tb_attention_lane` | 128-wide, 128 entries | unmasked, masked, LSH, and LSH with fewer than M keys |
| `tb_attention_head` | 2 lanes | shared projections, broadcast cache writes, per-lane weights, load latency, parallel rounds |
| `tb_ffn_xbar` | 128→192→128 | ReLU and requantisation, latency |
| `tb_imcat_top` | 2 heads, 2 lanes, 64 entries | end to end: every attention type, LSH, the W^MHA stream and the feedforward path, each counted |

Reduced tests override parameters on the module under test. The design keeps
every size as a parameter, so any of them can be changed the same way.

**Largest simulated size.** The whole accelerator has been simulated with a
128-wide model, 2 heads of 64, 2 lanes, 64-entry caches and 64-bit
signatures (`tb_imcat_top`). At the default size the design holds about
14,000 crossbar tiles, 48 CAMs of 4096 x 1024 bits and roughly 105 MB of
state. It elaborates and lints with Verilator and slang, but a
cycle-accurate Verilator model of it is too large to compile in practical
time. The default configuration is therefore checked statically, not by
simulation.
