# iMTransformer: an in-memory transformer accelerator in SystemVerilog

A transformer spends most of its inference time moving weights and cached
keys/values between memory and compute. This accelerator avoids that traffic.
Every trained weight matrix sits in crossbar arrays that compute the
matrix-vector product where the data is stored. The keys and values of the
attention layers are cached in crossbars as well, so the attention scores
`q·Kᵀ` and the weighted sum `p·V` are read out of the caches directly. Two
sparsity mechanisms then cut the work:

- a circular shift register, the *attention selector*, switches off cache
  columns outside a locality pattern (strided, sliding window, dilated,
  global + sliding);
- locality-sensitive hashing (LSH) plus a content-addressable search keeps
  only the keys whose signatures are close to the query's.

The RTL models the whole encoder-decoder network, one layer per *bank*. Data
moves one sequence element (one 512-wide, 8-bit vector) at a time. The
crossbars are modelled digitally, one 64×64 tile per clock.

## Structure

```
imtransformer                      6 encoder banks -> broadcast -> 6 decoder banks (feedback)
├── enc_bank  ×N_ENC               MHA tile, NU, FF tile (+ input buffer)
│   ├── mha_tile                   N_HEADS attention-head mats + aggregator
│   │   ├── ah_mat ×N_HEADS        one attention head
│   │   │   ├── xbar_array ×3      PU-Q, PU-K, PU-V   (D_MODEL × D_K projections)
│   │   │   ├── hash_unit          HU: D_K × SIG_W random hyperplanes
│   │   │   ├── sparsity_unit      SU: signature store, Hamming search
│   │   │   ├── attn_selector      AS: 2·64-bit circular pattern register
│   │   │   ├── cu_k               key cache, keys stored column-wise, computes q·Kᵀ
│   │   │   ├── softmax_lut        exponential table + normalization
│   │   │   └── cu_v               value cache, values stored row-wise, computes p·V
│   │   └── aggregator_unit        concat(heads) · W^O
│   ├── norm_unit                  residual add + shift-based layer norm (shared)
│   └── ff_tile                    W1, ReLU, W2
└── dec_bank  ×N_DEC               MHA tile A (masked self-attention),
                                   MHA tile C (encoder-decoder attention), NU, FF tile
```

`imt_pkg` holds the shared types:

- `act_t`: signed 8-bit activations.
- `attn_cfg_t`: the run-time attention configuration.
- `wprog_t`: the weight-programming bus.
- `sat8()`: requantization by an arithmetic shift right with saturation.

## The attention-head mat

The mat is where most of the design lives. It accepts four operations:

| op | name  | work done | used by |
|----|-------|-----------|---------|
| 0  | KV    | project k and v, write them to the caches (and the signature to the SU) | encoder fill; encoder-decoder pairs |
| 1  | Q     | project q, attend over the cached pairs | encoder queries; encoder-decoder queries |
| 2  | TOKEN | KV, then Q with the same element | decoder self-attention |
| 3  | KVW   | write a pair that was computed elsewhere (`k_ext`, `v_ext`) | pair broadcast between mats |

An operation runs as a chain of steps. Each step starts in the cycle after the
previous step reports `done`:

1. **PROJ**: PU-Q/K/V multiply the input by their weights. The result is
   `sat8(W·x >>> 7)`.
2. **WRITE**: k goes into CU-K column `kv_count`, and v into CU-V row
   `kv_count`.
3. **HASHK / HASHQ / SEARCH** (only when `cfg.lsh_en` is set):
   - The HU projects k (or q) onto SIG_W hyperplanes. A bit is 1 when the
     projection is strictly positive.
   - The key's signature is stored in the SU.
   - The query's signature is searched there. Position j matches when its
     Hamming distance is at most `cfg.hd_thresh`.
4. **QK**: CU-K computes the scores `sat8(q·k_j >>> 3)`. Dropping three bits
   is the `1/√d_k` scale for `d_k = 64`. Only the *enabled* columns are
   read. Column j is enabled when:
   - `j < kv_count`, and
   - the AS bit j is set, and
   - the mask is off or `j ≤ tq`, where tq is the query's own position, and
   - LSH is off or the SU flagged j.
5. **SOFT**: the softmax table turns the enabled scores into probabilities.
6. **SDPA**: CU-V computes `sat8(Σ p_j·v_j >>> 7)` over the enabled rows.
   Then the attention selector rotates by one position for the next query.

`steps` reports how many steps the last operation took:

| Operation | Steps |
|---|---|
| TOKEN without LSH | 5 |
| TOKEN with LSH | 8 |
| KV | 2 |
| Q | 4 |

All heads of a tile receive the same operation and run in lock step; an
assertion checks this. For query operations the aggregator starts when the
heads finish. It multiplies the concatenated head outputs by W^O.

### Attention selector

The register is twice as wide as the 64 columns it controls. Bit b stands for
the offset `d = b` (for `b < 64`) or `d = b − 128` from the current query.
The patterns are:

| Pattern | Bit b is set when |
|---|---|
| full | always |
| strided | `b mod c = 0` |
| sliding window | `\|d\| < w` |
| dilated | `\|d\| < w` and d is even |
| global + sliding | sliding, or `b mod c = 0` |

`c` is `cfg.stride` and `w` is `cfg.window`. The first 64 bits drive the column
enables. After every query the register rotates by one bit (bit b moves to
b+1), so the window follows the query along the sequence. It is loaded on
`seq_start`.

The causal mask is applied beside the register, as the comparison `j ≤ tq`
above. This is the rule that matters when all pairs are already cached.

### Softmax table

Scores carry three fraction bits, so one table step is e^(−1/8). The table is
computed at elaboration:

- `LUT[0] = 65535`
- `LUT[d] = round(LUT[d−1]·57835/2¹⁶)`

For each query the unit computes:

- `m` = the maximum enabled score;
- `e_j = LUT[m − s_j]`;
- one reciprocal `r = round(127·2²⁰ / Σe)`;
- `p_j = round(e_j·r / 2²⁰)`, in units of 1/127.

This takes one cycle.

## Normalization without multipliers

The NU adds the residual and normalizes with adders and shifts only. It holds
no weights, so one NU serves every sublayer of a bank:

- `mean = Σs >> log2 D`
- `var = Σ(s−mean)² >> log2 D`
- `k = ⌊log2 var⌋ / 2`
- `y = sat8(((s − mean) << 4) >>> k)`

The standard deviation is rounded down to a power of two, so the output has
unit scale within a factor of √2, with 4 fraction bits. There is no learned
gain or bias. It takes one cycle.

## Data flow through the banks

**Encoder bank.** Encoder attention is bidirectional, so every element must be
cached before the first query. The bank therefore works in two phases:

- *fill*: each element is stored in the input buffer and a KV operation
  caches its key/value pair;
- *query*: after the element marked `in_last`, each buffered element x runs
  through `a = MHA(Q x)`, `h = NU(a + x)`, `y = NU(FF(h) + h)`, and y is sent
  downstream.

The banks form a chain of valid/ready streams. Bank b+1 fills while bank b is
still producing outputs.

**Broadcast.** Each output element of the last encoder bank goes to *all*
decoder banks at once, and only when every decoder bank is ready. Each
decoder bank caches it as an encoder-decoder pair in its tile C. These pairs
are computed once and never again.

**Decoder bank.** Each element x runs through these steps:

1. `a = A(TOKEN x)`: causal self-attention that also caches x's pair.
2. `h1 = NU(a + x)`
3. `c = C(Q h1)`
4. `h2 = NU(c + h1)`
5. `y = NU(FF(h2) + h2)`

An encoder element on the kv stream takes priority over a new decoder element.

**Autoregression.**
1. Once the encoder sequence has been broadcast (`enc_done`), the top accepts
   one start element on `dec_start_*`.
2. Each output of the last decoder bank appears on `dec_out_*`. It is also fed
   back as the next input of the first decoder bank, until `dec_len` outputs
   exist.
3. `seq_start` clears every cache and counter.

## Crossbar model and timing

`xbar_array` is a behavioural model of an analog crossbar with ideal
converters:

- It stores an R×C array of 8-bit weights as 64×64 tiles.
- On `start` it evaluates one tile per clock, and adds the partial sums of the
  row tiles.
- A column tile whose columns are all disabled costs one cycle instead of
  R/64.

Latency is `Σ over column tiles of (active ? R/64 : 1)` cycles, plus the
surrounding handshakes. At the default size:

| Unit | Latency (cycles) |
|---|---|
| projections | 8 |
| CU-K read | at most 8 |
| CU-V read | 8 |
| hash | 16 |
| SU search | 8 |
| aggregator | 64 |
| FF | 2 × 256 |

An analog array would do each of these in one read. The serial evaluation
keeps simulation and synthesis tractable, and the handshakes make the rest of
the design independent of it. `tiles_read` and `k_tiles` expose how many tiles
a read touched, which shows the sparsity savings.

## Programming the weights

All static weights are loaded through the `prog` port (`wprog_t`). Each write
stores one row segment of 64 weights, at bits `[8k +: 8]` of `data`, for
columns `ctile·64 … ctile·64+63`. Fields not listed in this table are ignored
for that unit.

| Unit | Array | Addressed by |
|------|-------|--------------|
| U_PUQ/U_PUK/U_PUV | D_MODEL × D_K | dec, bank, tile, mat, row, ctile=0 |
| U_HU | D_K × SIG_W | dec, bank, tile, mat, row, ctile |
| U_AU | (N_HEADS·D_K) × D_MODEL | dec, bank, tile, row, ctile |
| U_FF1 | D_MODEL × D_FF | dec, bank, row, ctile |
| U_FF2 | D_FF × D_MODEL | dec, bank, row, ctile |

In a decoder bank, `tile` selects tile A (0, masked self-attention) or C
(1, encoder-decoder attention). Loading a full-size network takes about 830k
writes.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| N_ENC, N_DEC | 6, 6 | encoder / decoder banks |
| N_HEADS | 8 | heads per MHA tile |
| D_MODEL | 512 | model width |
| D_K | 64 | head width (must be 64·k) |
| D_FF | 2048 | feed-forward inner width |
| SEQ_MAX | 512 | cached pairs per head (key/value caches, signature store) |
| SIG_W | 1024 | LSH signature bits |

Array sizes must be multiples of 64. The run-time settings in `attn_cfg_t`
are:

- pattern, stride and window;
- `mask_en`;
- `lsh_en` and `hd_thresh`.

The encoder, the decoder self-attention and the encoder-decoder attention
each have their own configuration.

## Where this RTL departs from the original architecture

- **No duplicated mats.** The architecture can give each head P mats that share
  the sequence through a key/value broadcast, to run elements in parallel.
  Here each head has one mat. The mat does support the broadcast write (op
  KVW), but the tile does not duplicate or schedule mats.
- **Threshold instead of top-m.** The original keeps the m keys with the
  most similar signatures. Here the SU keeps every key within a programmable
  Hamming distance, which needs no sort.
- **Signature store sized to the caches.** The signature store holds SEQ_MAX
  (512) entries, the same as the key/value caches, although the original CAM
  targets up to 4096.
- **Ideal crossbars.** Crossbars and their converters are ideal integer
  arithmetic, with no device or ADC effects. The CMOS/FeFET cell technology is
  not modelled.
- **No binary-code weights.** The original also has a hybrid variant. It keeps
  static weights in FeFET crossbars as binary codes with scaling factors
  (XNOR arrays). Here all static weights are plain 8-bit integers.
- **Mask beside the register.** The original describes masking as a pattern
  held in the selector register. Here the causal mask is a separate
  comparison. Its effect on the enabled rows and columns is the same.
- **Own numeric choices.** The requantization shifts, the softmax table
  format, the normalization formula and D_FF = 2048 are this design's choices.
- **No embedding or token choice.** Embedding, output projection and token
  selection are outside the accelerator. The decoder feeds back its raw
  output vector.

## Verification

Each testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=… failures=…` line. `tb/imt_ref_pkg.sv` is an
integer reference model of every unit:

- projections, hashing and attention with the same table and rounding;
- normalization and feed-forward;
- whole encoder and decoder layers.

It generates weights from a hash of (array, row, column), so a testbench
programs the design and recomputes the expected result without storing any
weight table.

| Testbench | Checks |
|---|---|
| tb_xbar_array | tiled products, column enables and tile skipping, cycle count |
| tb_attn_selector | every pattern bit for several strides/windows, rotation |
| tb_softmax_lut | against a floating-point softmax (±1/127), latency, disabled positions |
| tb_hash_unit | signature bits, similarity preserved, zero projections |
| tb_sparsity_unit | Hamming distances, threshold, valid entries, search time |
| tb_cu_k, tb_cu_v | cache writes and reads with enables |
| tb_ah_mat | masked token ops, sliding window, LSH, broadcast write, step counts |
| tb_mha_tile | two heads + aggregator; mask, sliding, LSH + strided, causal over a cached sequence |
| tb_enc_bank, tb_dec_bank | layer outputs with random input gaps and output back-pressure; kv priority |
| tb_imtransformer | 2+2 banks end to end (details below) |

`tb_imtransformer` compares every decoder output with the reference model.
It also counts each mechanism, and fails if any count is zero:

- input stall;
- masked queries;
- pattern exclusions;
- LSH exclusions;
- broadcast of each encoder output;
- output feedback;
- overlapping encoder banks.

The largest configuration simulated end to end is the one in
`tb_imtransformer`:

- 2 encoder and 2 decoder banks;
- 2 heads of 64, a 128-wide model, a 256-wide feed-forward;
- 64-entry caches and 64-bit signatures.

The full-size top (6+6 banks, 8 heads, 512/2048 widths, 512-entry caches,
1024-bit signatures) passes lint and elaboration, but it was not simulated.
Verilator turns it into some 500 C++ files, which take around an hour to
compile, before the roughly 830k programming writes even start. The
default-size units are only exercised through their smaller instances:

- the crossbar tiling code is the same at every size;
- `tb_attn_selector` also checks a default 128-bit/64-column instance.

To run a testbench with verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/imt_pkg.sv tb/imt_ref_pkg.sv tb/tb_enc_bank.sv --top-module tb_enc_bank
./obj_dir/Vtb_enc_bank
```

## Fitting networks

At the defaults the accelerator holds:

- the standard 6+6-layer transformer with 512-wide embeddings and 8 heads,
  for sequences up to 512 elements;
- about 53.5 M 8-bit weights in total (3.67 M per encoder bank, 5.24 M per
  decoder bank, hashing planes included).

What does not fit:

| Network | Needs | Fits after re-parameterizing? |
|---|---|---|
| BERT-base | 12 encoder layers, 12 heads, width 768 | yes, 384-element inputs included |
| BERT-large | 24 layers, 16 heads, width 1024 | yes, 384-element inputs included |
| any network | sequences longer than 512 | no: needs larger caches |
