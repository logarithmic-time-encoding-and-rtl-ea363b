# Parallel encoder and decoder for integer error control codes

Integer error control codes (IECCs) protect a block of `k` data bytes of
`b` bits each with one extra check byte. The check byte is computed with plain
integer arithmetic, with no finite-field operations:

    B[k+1] = C[1]*B[1] + C[2]*B[2] + ... + C[k]*B[k]   (mod 2^b - 1)

The coefficients `C[i]` are found offline, by a computer search. They are
chosen so that every error pattern the code is meant to correct gives a
distinct nonzero *syndrome*:

    S = C[1]*B'[1] + ... + C[k]*B'[k] - B'[k+1]        (mod 2^b - 1)

Here `B'` is the received word. A lookup table maps each correctable syndrome
to the bytes in error and the value to add to each of them.

Every step is a sum of independent products, so the work can be done in
parallel. All `k` products are formed at once. They are then added by a binary
tree of `ceil(log2 k)` levels. The table is sorted, so it can be searched by
bisection. Encoding and decoding time therefore grow with the logarithm of
the codeword length. This RTL builds that scheme as dedicated hardware. It
keeps the cycle counts of the processor-based cost model it comes from:

- 3 clocks per multiplication;
- 1 clock per addition;
- `N_ST` clocks per table access.

The default configuration is the (2048, 1984) code. It has `b = 64` and
`k = 31`, and corrects a single bit error in any one byte (`t = 1`). Its
syndrome table holds `2*b*(k+1) = 4096` entries.

## Arithmetic modulo 2^b - 1

Everything is computed modulo `2^b - 1`, which is ones'-complement arithmetic.
A carry out of the top bit is worth 1, because `2^b ≡ 1`.

- **`mod_adder`** computes `a+b` and `a+b+1` side by side. If `a+b+1`
  carries out, then `a+b >= 2^b-1`, and the result is the low `b` bits of
  `a+b+1`. Otherwise the result is `a+b`. The output is always the
  *canonical* residue `0 .. 2^b-2`. The all-ones pattern is congruent to zero,
  and it never leaves an adder. The adder tolerates one all-ones operand, which
  is enough for every use in the design.
- **`mod_mul`** forms the full `2b`-bit product. Since `2^b ≡ 1`, the
  product `hi*2^b + lo` is folded to `hi + lo` with one `mod_adder`. The
  result then passes through `N_IM` (3) pipeline registers, which synthesis
  may retime into the multiplier. An all-ones input is treated as zero before
  multiplying.
- **Negation** modulo `2^b-1` is bitwise inversion. The syndrome unit uses it
  for the check byte, so its adder tree only ever adds.

The canonical form matters at the decoder output. A received byte can be all
ones, for example when a bit error turns `0x7F..F` into `0xFF..F`. After
correction, such a byte comes back as its canonical value. Data bytes are
therefore expected to lie in `0 .. 2^b-2`. An all-ones data byte is the same
ring element as zero, and a corrected word returns it as zero.

## Encoder (`iecc_encoder`)

```
B[1..k] ──► k × mod_mul (N_IM clk) ──► adder_tree, ceil(log2 k) stages ──► B[k+1]
   └──────────── delay line, N_IM + ceil(log2 k) clk ───────────────────► B[1..k]
```

`adder_tree` pairs its operands level by level and registers every level.
When the operand count is not a power of two, the missing leaves are zero.
The encoder is fully pipelined: it takes a dataword every clock and emits the
codeword `N_IM + ceil(log2 k)` clocks later (8 at the defaults). There is no
back-pressure.

## Decoder (`iecc_decoder`)

The decoder handles one codeword at a time, in three steps:

1. **Syndrome** (`syndrome_calc`). There are `k` multipliers, plus the
   negated check byte, which is delayed `N_IM` clocks to line up with the
   products. These `k+1` terms go into a tree of `ceil(log2(k+1))` stages.
   `S = 0` means the word is clean, and it is passed on at once.
2. **Table search** (`st_search` on `st_memory`). The table is sorted by
   ascending syndrome. The controller keeps an interval `[lo, hi)` of
   candidate entries and reads the middle one. If the entry's syndrome matches,
   the search stops. Otherwise it keeps the half that can still hold `S`. The
   next address is issued in the same clock that the previous word is
   compared, so each probe costs exactly `N_ST` clocks. A table of `n` entries
   needs at most `floor(log2 n) + 1` probes. An interval that becomes empty
   means the syndrome is not in the table: the error is uncorrectable.
3. **Correction** (`error_corrector`). Each of the entry's `t` pairs
   (location, value) adds its value to the byte at that location, modulo
   `2^b-1`. All pairs are applied in parallel.

Decoder latency is measured from the clock where `in_valid && in_ready` to the
clock where `out_valid` is high.

| case | clocks | defaults |
|---|---|---|
| clean word (`S = 0`) | `N_IM + ceil(log2(k+1)) + 1` | 9 |
| table search with `P` probes | `N_IM + ceil(log2(k+1)) + P*N_ST + 2` | 10 + 4P, at most 62 |
| bound from the cycle model | `ceil(log2(k+1)) + (ceil(log2|ξ|)+2)*N_ST + 5` | 66 |

While a word is in flight, `in_ready` is low. `out_valid` is a one-clock pulse
carrying the result:

- the `k` data bytes and the check byte;
- `out_err`: the syndrome was nonzero;
- `out_corrected`: the syndrome was found in the table and the correction was
  applied;
- `out_uncorrectable`: the syndrome was not found, and the word is passed on
  exactly as received;
- `out_probes`: the number of table reads the search used.

### Syndrome-table entry format

Each entry is packed MSB first. It holds the syndrome, then `t` pairs of
error location and error value:

```
| S (b bits) | i1 (ceil(log2(k+1))) | E1 (b bits) | ... | it | Et |
```

Locations are 0-based. Byte `B[i]` is stored as `i-1`, and the check byte as
`k`, so `ceil(log2(k+1))` bits are enough. `E` is the value to *add* modulo
`2^b-1`, stored as a canonical residue. At the defaults an entry is
64 + 5 + 64 = 133 bits.

For the single-bit-error code class (`t = 1`, error `±2^r` in one byte), there
are `2*b*(k+1)` entries:

- a data byte `i` with error `e` has syndrome `C[i]*e` and correction `-e`;
- the check byte with error `e` has syndrome `-e` and correction `-e`.

The entries must be sorted by `S` before loading.

Tables with `t = 2` hold both two-byte patterns and single-byte patterns. For
example, one class corrects a single-bit error in each of up to two bytes.
Its table has `2*b*(b*k+1)*(k+1)` entries. A single-byte pattern sets its
second value to zero. The pairs of one entry must name *different* bytes,
so the zero pair points at any other byte. If two pairs named the same byte,
the corrector would apply only the later one.

## Top level and configuration (`iecc_top`)

`iecc_top` places the encoder and decoder side by side. Both read the
coefficients from `coef_file`, a register file of `k` words. The decoder holds
the syndrome table. Load both before processing any data:

- `coef_we/coef_waddr/coef_wdata`: one coefficient per clock. `C[i]` goes to
  address `i-1`.
- `st_we/st_waddr/st_wdata`: one table entry per clock, in sorted order.
- `st_size`: the number of valid entries. It may be smaller than `DEPTH`.

The coefficients and the table come from the offline code search, which is
not part of the hardware. The reference package `tb/iecc_ref_pkg.sv` contains
a simple version of that search. For small `b` it tries candidates greedily;
for large `b` it draws them at random. It then builds and sorts the table.

A shorter code runs on the same hardware: hold the unused data bytes at zero
and generate the table only for the bytes in use. For example, the
(1920, 1856) code with `k = 29` fits the default `K = 31`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `B` | 64 | byte width `b` |
| `K` | 31 | data bytes per codeword `k` |
| `T` | 1 | (location, value) pairs per table entry `t` |
| `DEPTH` | 4096 | table capacity, `2*b*(k+1)` for `t = 1` |
| `N_IM` | 3 | clocks per modular multiplication |
| `N_ST` | 4 | clocks per table read (4: L1-class memory; 12 and 25 model L2/L3) |

The defaults live in `rtl/iecc_pkg.sv`. The table is a plain array
(`st_memory`): one registered read plus `N_ST-1` pipeline registers. A memory
macro with the same read latency can replace it.

## Files

| file | contents |
|---|---|
| `rtl/iecc_pkg.sv` | defaults, field-width functions |
| `rtl/mod_adder.sv`, `rtl/mod_mul.sv` | modular add and multiply |
| `rtl/adder_tree.sv` | registered binary adder tree |
| `rtl/iecc_encoder.sv` | check-byte encoder |
| `rtl/syndrome_calc.sv` | syndrome unit |
| `rtl/st_memory.sv`, `rtl/st_search.sv` | syndrome table and its binary search |
| `rtl/error_corrector.sv` | parallel correction |
| `rtl/iecc_decoder.sv` | decoder control |
| `rtl/coef_file.sv` | coefficient registers |
| `rtl/iecc_top.sv` | top level |
| `tb/iecc_ref_pkg.sv` | reference model and code construction |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/iecc_top_tb.sv` | end to end, small code (`b = 8`, `k = 8`, 144 entries) |
| `tb/iecc_top_full_tb.sv` | end to end, default (2048, 1984) code |
| `tb/iecc_decoder_dbl_tb.sv` | decoder on the double-bit-in-one-byte class: `b = 16`, `k = 4`, 2240 entries |
| `tb/iecc_decoder_t2_tb.sv` | decoder with two-pair entries: `b = 24`, `k = 2`, 7056 entries |
| `tb/iecc_table4_tb.sv`, `tb/iecc_table4_run.sv` | the three 64-bit codes, `k` = 29, 30, 31, on the default hardware, with `N_ST` = 4, 12, 25 |

## Throughput against the processor cost model

The cost model runs the algorithm on an eight-core processor with four
integer units per core. That is 32 units: one per product for `k = 31`,
plus one for the check byte. Its decode time for a word is
`ceil(log2(k+1)) + (ceil(log2|ξ|)+2)*N_ST + 5` clocks.
`tb/iecc_table4_tb.sv` measures the worst decode time of the hardware for
each code and each table latency. With `|ξ| = 2^12`, `k = 31` and a 3.0 GHz
clock, it prints:

| `N_ST` | cost model (clocks) | measured worst case (clocks) | model / measured Gbps |
|---|---|---|---|
| 4 | 66 | 58 | 93.1 / 105.9 |
| 12 | 178 | 154 | 34.5 / 39.9 |
| 25 | 360 | 310 | 17.1 / 19.8 |

The measured worst case is a miss after 12 probes: `3 + 5 + 12*N_ST + 2`
clocks. The hardware can take up to 13 probes, but only along the leftmost
path of the table, and no test word reached it. Search depth, not
arithmetic, dominates decoding, which is why the table should sit in the
fastest memory available. The encoder needs 8 clocks per word regardless of
the table.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
fails the run if it hangs. For example:

```
verilator --binary --timing --assert -y rtl -y tb --top-module iecc_top_full_tb \
  rtl/iecc_pkg.sv tb/iecc_ref_pkg.sv tb/iecc_top_full_tb.sv
./obj_dir/Viecc_top_full_tb
```

The two packages are named explicitly, and Verilator finds the modules
through `-y`. Substitute any other testbench name. The full-size run and the
throughput study take a few seconds each.

The reference model computes every residue with `%` on 128-bit integers,
independently of the RTL's carry tricks. The testbenches check:

- every output, against the reference model;
- the exact cycle counts in the table above, including the bound from the
  cycle model.

The two end-to-end testbenches count each mechanism and fail if any of them
never happens:

- back-to-back encoding;
- clean words;
- data-byte and check-byte corrections;
- all-ones received bytes;
- uncorrectable words;
- decoder stalls (`in_ready` low);
- searches reaching the last table level.

A word with errors in two or more bytes is outside the `t = 1` code's
guarantee. It is either flagged uncorrectable or, when its syndrome happens to
equal a single-error syndrome, miscorrected. The testbenches take the expected
outcome from the reference table.

## Limits and departures

- The cost model behind the cycle counts runs the algorithm on the integer
  units of a multicore processor, with the table in its cache. Here the same
  steps are dedicated logic, and the cache becomes an array with the same
  access latency.
- The encoder is pipelined to one dataword per clock. That is faster than
  the one dataword per `N_IM + ceil(log2 k)` clocks the cost model assumes;
  the latency is the same.
- The decoder is not pipelined across codewords. A second search engine, or a
  second table port, would be needed to overlap searches.
- The coefficient search and table generation are offline steps. No hardware
  is given for them.
- Three code classes are simulated, all on the same RTL; only the
  coefficients and the table change:
  - the single-bit class (`t = 1`, errors `±2^r`), through the whole top;
  - the double-bit-in-one-byte class (`t = 1`, errors `±2^r ± 2^s`),
    through the decoder. Its table has `(2*(b-1)^2 - 2)*(k+1)` entries once
    equal error values are merged;
  - the two-byte class (`t = 2`), through the decoder.

  Mixed classes are not simulated.
- Tables with 2^13 or 2^14 entries need `DEPTH` raised from its default of
  4096.
