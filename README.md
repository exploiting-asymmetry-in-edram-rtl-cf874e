# Redundancy-free error tolerance for eDRAM

An eDRAM stores a bit as charge on a capacitor. If it is not refreshed often enough, cells
lose data. These *retention errors* are strongly one-sided: with true cells, where a 1 is a
charged capacitor, a leaking cell turns a 1 into a 0 and almost never a 0 into a 1. Some
applications also care about only one direction of error. A Bloom filter may report a few
false positives but must never report a false negative. A read-only cache may miss
spuriously but must never return the wrong data.

This RTL puts the two asymmetries together. It gets error tolerance from a few gates and
**no extra memory cells**: no ECC, no parity bit. It holds three independent designs, after
the schemes described by S. Liu, P. Reviriego, J. Guo, J. Han and F. Lombardi in
"Exploiting Asymmetry in eDRAM Errors for Redundancy-Free Error-Tolerant Design":

| design | where the asymmetry goes | what an error can do | cost |
|---|---|---|---|
| Bloom filter stored inverted (`bloom_filter`) | a filter 0 is a charged cell | only add a false positive | K inverters in, K out |
| cache with an overloaded valid bit (`et_cache`) | V' = 1 xor parity(tag); invalid entries are all zeros | only turn a hit into a miss | one (t+1)-input xor per way |
| DMR / QMR memory (`mr_memory`) | disagreeing copies resolve towards 1 | only the rare cases listed below stay wrong | OR gate / threshold-2 majority gate per bit |

All three are built on one model of the storage, `edram_array`. It can inject retention
errors in either direction, so the testbenches can show each property directly.

## The eDRAM array model (`edram_array`)

The array has `DEPTH` words of `WIDTH` bits, one synchronous write port and one synchronous
read port. A read returns its word one cycle after `re`, and `rdata` holds while `re` is low.
A read of the address being written in the same cycle returns the old word. There is no
reset, as with a memory macro.

Retention errors are applied through `inj_en / inj_dir / inj_addr / inj_mask`:

* `RET_DISCHARGE`: every masked cell that holds 1 becomes 0. This is the common case.
* `RET_CHARGE`: every masked cell that holds 0 becomes 1. This is the rare case.

A normal write to the same word in the same cycle takes precedence. Refresh, the cells,
sense amplifiers and decoders are analog parts of the macro and are not modelled. How often
errors happen as a function of the refresh period is left to whoever drives the injection
port.

## Bloom filter with inversion coding (`bloom_filter`)

A Bloom filter is an array of m bits, initially 0. Inserting an element sets the bits at
positions h_1(x) … h_q(x). A query reports "member" only if all q bits are 1. A filter bit
that wrongly turns from 1 to 0 causes a false negative, which is not allowed. A bit that
wrongly turns from 0 to 1 only raises the false-positive rate a little.

The filter therefore goes through `bf_inv_encoder` (K inverters) on its way into the eDRAM
and through `bf_inv_decoder` on its way out. A filter 0 is then a *charged* cell, so the
dominant retention error can only produce extra 1s in the filter. Any number of discharged
cells in any word is tolerated without check bits. The filter's answers stay correct for
members and at worst become more permissive for non-members.

Organisation: the filter has `M_WORDS × K` bits. Bit position p lives in bit `p mod K` of
word `p / K`. `bf_hash` provides the Q hash functions. They are multiplicative hashes, an
implementation choice:

    h_i(x) = top IDX_W bits of ( x * A_i  mod 2^KEY_W ),  A_i = (0x9E3779B1 + i*0x7F4A7C15) | 1

Operations use a valid/ready request and a one-cycle `resp_valid` pulse. The request is
accepted at a clock edge, and cycle 1 is the first cycle after that edge.

| op | what it does | `resp_valid` in cycle |
|---|---|---|
| `BF_CLEAR` | writes the encoded all-zero word (all cells charged) to every address | `M_WORDS + 1` |
| `BF_INSERT` | read-modify-write of each of the Q words in turn | `2Q + 1` |
| `BF_QUERY` | Q reads back to back; `resp_member` = at least `MIN_ONES` of the Q bits are 1 | `Q + 2` |

The eDRAM has no reset, so a `BF_CLEAR` must come first. `MIN_ONES` defaults to Q, which is
the ordinary filter. Setting it to Q−1 gives an optional relaxed match. It accepts an
element that lost one of its bits, for memories where 0→1 errors (filter 1→0) are not
negligible, at the price of more false positives.

## Cache tags protected by an overloaded valid bit (`et_cache`)

This is the least obvious of the three schemes. Each way of the cache stores, per set, a tag
entry of **t+1 bits** `{V', T_1..T_t}` (V' is the top bit) and a data line. The usual
protection would add a parity bit and store t+2 bits. Here the valid bit itself carries the
parity:

* **Writing a valid entry** (`vb_overload_encoder`): `V' = 1 xor T_1 xor … xor T_t`.
* **Invalidating** writes the entry as **all zeros**, tag included. A word with no charged
  cell cannot be hit by a discharging error, so an invalid entry can never become
  valid-looking.
* **Reading** (`vb_recover_decoder`): `V_rec = V' xor T_1 xor … xor T_t`. For an undisturbed
  valid entry this is 1, and for an invalid (all-zero) entry it is 0. Any odd number of flipped
  bits, in particular a single retention error in the tag *or* in V', makes it 0.
* **Comparing** (`tag_match`): a way matches when `V_rec = 1` and the stored tag equals the
  incoming tag. `way_data_mux` ORs the match lines into hit/miss and selects the matching
  way's word.

A corrupted entry therefore looks invalid. The lookup misses and the line is fetched again
from the next level. That is harmless for read-only or write-through caches (instruction
caches, TLBs), where the next level always holds a correct copy. A wrong hit, which would
return wrong data, cannot come from a single error. After a lookup there are only three
cases:

| stored entry | V_rec | result |
|---|---|---|
| valid, no error | 1 | normal compare: hit or miss |
| invalid (all zeros; cannot be disturbed) | 0 | miss |
| valid, odd number of errors | 0 | miss |

**Limit.** Two errors in one entry leave `V_rec = 1` with a changed tag. A lookup of that
changed tag then hits wrongly. The scheme detects single errors, and the refresh period must
be chosen so that two errors in one entry between rewrites are negligible. `tb_et_cache`
shows this case explicitly, and `ODD_PAR` below closes it for adjacent bits. The scheme also
relies on errors being one-directional. A rare 0→1 error in an all-zero invalid entry can
make it look valid, for example as a valid entry with tag 0.

Interface and timing of `et_cache` (the address is `{tag, index, offset}`; the offset picks
a `WORD_W` word of the line):

* After reset the cache writes the all-zero entry into every set of every way, one set per
  cycle. `ready` goes high after `SETS` cycles, and requests are ignored until then.
* **Lookup:** `lk_valid` + `lk_addr`. The next cycle gives `lk_resp_valid`, `lk_hit`,
  `lk_match` (one bit per way) and `lk_data`. One lookup can start every cycle.
* **Fill:** `fill_valid`, `fill_way`, `fill_index`, `fill_tag`, `fill_line` write a valid
  entry and its line. **Invalidate:** `inv_valid`, `inv_way`, `inv_index`. Both take effect
  at the clock edge. Fills and invalidates of different ways may share a cycle; for the same
  way an assertion fires and the fill wins. A lookup of an entry written in the same cycle
  sees the old entry.
* The caller chooses the replacement way and handles misses. The cache has no policy of its
  own.
* `inj_en / inj_dir / inj_way / inj_index` select one entry. `inj_mask` applies a retention
  error to its tag-array word and `inj_dmask` to its data line. In the main scheme the data is
  not protected, so a data error can return a wrong word. `COVER_DATA` below fixes that.

### Two optional extensions

Both are parameters of `et_cache` (and `C_COVER_DATA`, `C_ODD_PAR` on the top). Both are off
by default, which gives the redundancy-free main scheme described above.

* **`COVER_DATA = 1`: the valid bit also covers the line.** The stored valid bit becomes
  `V' = 1 xor parity(tag) xor parity(line)`, and `V_rec` also folds in the parity of the line
  that is read. A single retention error in the data then becomes a miss as well, still with
  no extra cell. The cost is a wider xor per way. For the all-zero invalid entry to stay
  all-zero, invalidation and the reset sweep also write the line as zeros.
* **`ODD_PAR = 1`: one extra parity cell per entry.** Each tag-array word gets a top bit P.
  P is the parity of the entry bits at odd positions (bits 1, 3, 5, … of `{V', tag}`, tag LSB
  = bit 0). A lookup also requires P to agree. Two errors in adjacent bits always include
  one odd position, so they flip P's check and give a miss instead of the alias described
  above. Non-adjacent double errors on two even positions can still alias. This option is
  no longer redundancy-free. It costs one cell per entry, against two for a conventional
  interleaved parity pair that detects the same adjacent double errors.

## DMR and QMR memories with asymmetric voting (`mr_memory`)

`mr_memory` writes every word into `N_MOD` copies of an `edram_array` and combines the
copies on every read (one-cycle latency).

* **N_MOD = 2 (`dmr_or_voter`):** the output is the bitwise OR of the two copies. Where the
  copies disagree, one of them has most likely lost a 1, so 1 is returned. This corrects any
  set of 1→0 errors that never hit the same bit in both copies. Plain DMR could only detect
  them. Still wrong: the same bit lost in both copies, or a 0→1 error in either copy.
* **N_MOD = 4 (`qmr_maj_voter`):** each bit comes from a majority gate with threshold two,
  so it is 1 when at least two copies hold 1. A two-against-two split, which plain QMR can
  only flag, is resolved to 1. Still wrong: a 1 lost in three or four copies, or 0→1 errors
  in two or more copies.

Both voters also give `signal_error`, the plain DMR/QMR decision output. Here it means "the
copies are not all equal in some bit". The exact rule of that decision logic is this
design's reading.

## Top level (`edram_asym_top`)

The three designs share nothing but `clk` and `rst_n`. The top holds one Bloom filter
(`bf_*` ports), one cache (`c_*`), one DMR memory (`dmr_*`) and one QMR memory (`qmr_*`). It
brings out every port, including the error-injection ports. Each port group behaves as
described above for its block.

## Parameters

| parameter (top / block) | default | origin |
|---|---|---|
| `BF_K` / `K`, word width | 8 | one of the evaluated sizes 8/16/32/64 |
| `BF_Q` / `Q`, hash functions | 3 | the worked example uses three; the range studied is 2–6 |
| `BF_M_WORDS` / `M_WORDS` | 256 (2048-bit filter) | chosen |
| `BF_KEY_W` / `KEY_W` | 32 | chosen |
| `BF_MIN_ONES` / `MIN_ONES` | Q | Q−1 is the optional relaxed match |
| `C_N_WAYS` / `N_WAYS` | 4 | first evaluated cache (4 ways, 24-bit tags) |
| `C_TAG_W` / `TAG_W` | 24 | as above |
| `C_SETS` / `SETS` | 64 | chosen (entries per way are not specified) |
| `C_WORD_W`, `C_OFFSET_W` | 32, 2 (16-byte lines) | chosen |
| `C_COVER_DATA` / `COVER_DATA`, `C_ODD_PAR` / `ODD_PAR` | 0, 0 | optional extensions, off in the main scheme |
| `MR_DEPTH`, `MR_WIDTH` | 256, 8 | chosen |

The other evaluated cache shapes are 5×32, 8×36, 16×40 and 16×44 (ways × tag bits). Non
power-of-two way counts such as 5 are supported. `K`, `M_WORDS` and `SETS` must be powers of
two.

## What is and is not here

Follows the source scheme:
* inversion coding of the filter
* the insert and query rules
* equations V' = 1 xor parity(T) and V_rec = xor of the entry
* all-zero invalid entries
* the per-way decoder, "valid" gate, comparator and data multiplexer
* the two optional cache extensions: data coverage by V' and the odd-position parity cell
* the OR output for DMR and the threshold-2 majority output for QMR

Choices of this RTL:
* the hash functions
* every size marked "chosen" above
* all handshakes and latencies
* the read-modify-write sequencing of inserts
* the clear operation
* the cache's reset sweep and fill/invalidate ports
* the signal_error rule
* the error-injection ports
* for the extensions: which bits count as "odd", and clearing the line on invalidation when
  the data is covered

Described in the source but not built:
* **Counting Bloom filters and count-min sketches**, named as other structures the inversion
  coding applies to.
* **The refresh circuitry** and the analog parts of the eDRAM. The refresh period these
  schemes allow to be relaxed is a property of the macro, not of this logic.
* The baselines the scheme is compared with: SEC-DED and BCH-coded memories, a cache tag
  with a separate parity bit, and plain DMR/QMR voting.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

| testbench | what it establishes |
|---|---|
| `tb_edram_array` | latency, read-during-write, both injection directions, write-over-injection |
| `tb_bf_inv_encoder`, `tb_bf_inv_decoder` | exhaustive 8-bit, random 64-bit |
| `tb_bf_hash` | hash outputs against a 64-bit arithmetic reference, Q = 3 and 6 |
| `tb_bloom_filter` | exact agreement with a reference filter; latencies; no false negative after discharges; extra false positives appear; the Q−1 relaxed match recovers keys that lost a bit |
| `tb_vb_overload_encoder`, `tb_vb_recover_decoder` | the 8-bit worked example (tag 00010010, V' = 1; an error on T_4 gives V_rec = 0) and random 24-bit entries |
| `tb_tag_match`, `tb_way_data_mux` | match and selection rules |
| `tb_et_cache` | bit-exact lookup prediction; init sweep length; back-to-back lookups; every single error turns a hit into a miss; invalid entries survive full discharge; the two-error alias |
| `tb_dmr_or_voter`, `tb_qmr_maj_voter`, `tb_mr_memory` | voting rules, exhaustive for QMR; correctable and uncorrectable cases both occur |
| `tb_edram_asym_top` | the whole top at default sizes, below |
| `tb_et_cache_ext` | the four combinations of `COVER_DATA` and `ODD_PAR` against a bit-level model; a data error is a miss only with `COVER_DATA`; an adjacent double tag error is a miss only with `ODD_PAR`; discharged invalid entries never hit |
| `tb_cache_configs` | the five evaluated cache shapes (4×24 … 16×44) |
| `tb_bf_fpr` | the default filter filled to p₁ ≈ 0.3, then random discharges and charges in every cell; the fraction of ones moves to p₁(1−p_d) + (1−p₁)p_c, the false-positive rate follows that fraction to the power q, and members are lost only through 0→1 errors |
| `tb_mr_error_rate` | Monte Carlo retention errors in every bit of every copy; the measured rate of wrong DMR/QMR output bits matches the closed forms (DMR: p_c² for a stored 1; QMR: 4p_c³(1−p_c)+p_c⁴; and the 0→1 terms) |
| `tb_bf_configs` | word sizes 8–64 with 2–6 hash functions |

`tb_edram_asym_top` runs the whole top at its default sizes. The cache runs against a
next-level memory model with refills while single errors are injected, and no hit ever
returns a wrong word. The filter never loses an inserted key. The DMR and QMR outputs are
wrong only in the cases the scheme predicts. The test counts each mechanism (hits, misses
caused by errors, refills, filter false positives added by discharges, DMR corrections, QMR
two-two splits) and fails if one never occurs.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/edram_asym_pkg.sv \
        tb/tb_et_cache.sv --top-module tb_et_cache
    ./obj_dir/Vtb_et_cache

Every testbench finishes in well under a second. The RTL lints cleanly with
`verilator --lint-only -Wall`.

## Files

* `rtl/edram_asym_pkg.sv`: shared types: `ret_dir_e` (error direction), `bf_op_e` (filter
  commands).
* `rtl/edram_array.sv`: eDRAM array model with error injection.
* `rtl/bf_inv_encoder.sv`, `rtl/bf_inv_decoder.sv`, `rtl/bf_hash.sv`, `rtl/bloom_filter.sv`:
  the Bloom filter.
* `rtl/vb_overload_encoder.sv`, `rtl/vb_recover_decoder.sv`, `rtl/tag_match.sv`,
  `rtl/way_data_mux.sv`, `rtl/et_cache.sv`: the cache.
* `rtl/dmr_or_voter.sv`, `rtl/qmr_maj_voter.sv`, `rtl/mr_memory.sv`: modular redundancy.
* `rtl/edram_asym_top.sv`: the top level.
* `tb/`: the testbenches, plus two helpers: `cache_cfg_check.sv` runs one cache
  configuration and `bf_cfg_check.sv` runs one filter configuration.
