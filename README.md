# High-speed network security engine: pipelined IDEA cipher and Bloom-filter payload matcher

This design has two engines that both process a network stream at one unit of
data per clock:

* **IDEA cipher.** It encrypts or decrypts 64-bit blocks with a 128-bit key.
  All eight rounds are unrolled, and each round is pipelined 24 deep. A new
  block can enter every clock, and its result leaves 199 clocks later. The
  costly part of IDEA is multiplication modulo 2^16+1. Here it is done by a
  seven-stage multiplier that works in diminished-one arithmetic with radix-8
  Booth recoding and an inverted end-around-carry carry-save tree.
* **Payload string matcher.** It is the pattern-search part of a network
  intrusion detection system. A sliding window runs over the packet payload.
  Four parallel Bloom-filter engines test four 80-bit (10-byte) strings per
  clock against a set of 10 signatures. An exact-compare analyzer then removes
  the Bloom filter's false positives.

The top module, `netsec_top`, places the two engines side by side. They share
the clock and reset, and each keeps its own ports.

## Diminished-one modulo 2^16+1 multiplier

IDEA multiplies 16-bit words modulo the prime 2^16+1, with the all-zero word
standing for 2^16. A plain 16x16 multiplier followed by a modulo reduction is
slow. This design stays in a residue-friendly number system throughout.

**Number form.** Every value A in 1..2^16 is held as d[A] = A-1, which fits in
16 bits. Three properties make this work:

* Negation is bitwise inversion: d[-A] = ~d[A].
* Multiplying by 2 is a one-bit left rotation in which the bit rotated into
  position 0 is inverted (`icls` in `idea_pkg`).
* Addition is d[A+B] = d[A] + d[B] + ~cout, where cout is the carry out of
  bit 15 fed back inverted ("inverted end-around carry", `idea_dim1_add`).

**Partial products (`idea_ppdg`).** The multiplicand B is recoded in radix 8.
Its bits are grouped in overlapping quadruplets, which gives six digits:

    k_i = b[3i-1] + b[3i] + 2*b[3i+1] - 4*b[3i+2]    (i = 0..5, b[-1] read as 1)

Each digit lies in -4..+4. Reading b[-1] as 1 folds in the extra "+A" term of
the diminished-one product, (a+1)(b+1) - 1 = ab + a + b.

Partial product PPD_i is the diminished-one form of k_i * A * 2^(3i), built as
follows:

* Magnitudes 1, 2 and 4 are rotations of d[A].
* Magnitude 3 uses d[3A], which one diminished-one adder forms once.
* A negative digit inverts the result.
* A zero digit gives the constant 2^(3i)-1.

Each partial product carries a correction term, and those terms are summed into
one word C. The generator outputs its complement ~C.

**Reduction tree (`idea_mulmod`).** A carry-save adder takes three words. In the
modulo 2^16+1 version (`idea_ieac_csa`), the carry word is shifted left by one
and its bit 16 comes back into bit 0 inverted. Then x+y+z = S+C-1 in
diminished-one form.

Six such adders form a linear chain. One operand enters at each level:

| Level | Operands added |
|---|---|
| 1 | PPD0, PPD1, PPD2 |
| 2 | PPD3 |
| 3 | PPD4 |
| 4 | PPD5 |
| 5 | d[1] = 0 |
| 6 | ~C |

A final diminished-one adder merges the sum and carry words. The constants
dropped by each carry-save stage add up to a known offset, which the tree's
constant operands absorb. The result is d[AB], and one increment at the output
returns normal form.

**Pipelining.** There is one register after the partial-product generator and
one after each CSA level, seven in all. A product appears 7 clocks after its
operands, and a new operand pair is taken every clock. The ports use normal
IDEA form, so a caller never sees diminished-one values. Example: 50843 x 46028
gives 6408.

## Round pipeline and the three IDEA architectures

**One round (`idea_round`).** A round takes four 16-bit words X1..X4 and six
subkeys Z1..Z6. It is laid out as 24 register stages, 3x7 + 3, with L = 7
(the multiplier latency):

| Stages | Work |
|---|---|
| 1..7 | X1*Z1 and X4*Z4 in two multipliers. X2+Z2 and X3+Z3 are added at once and delayed to match. |
| 8 | The two XORs that feed the multiply-add structure. |
| 9..15 | The first product of the multiply-add structure (multiplied by Z5). |
| 16 | The addition in the multiply-add structure. |
| 17..23 | The second product (multiplied by Z6). |
| 24 | The last addition and the four output XORs. |

The round outputs its two middle words exchanged, as IDEA defines.

**Output transformation (`idea_out_tf`).** It computes Y1*Z1, Y3+Z2, Y2+Z3 and
Y4*Z4. The middle words are exchanged back here. It takes 7 stages, so the
whole cipher is 8 x 24 + 7 = 199 stages deep.

**Folding (`idea_cipher`, parameter `UNROLL`).**

| `UNROLL` | Architecture | Passes per block | Throughput |
|---|---|---|---|
| 8 (default) | Full pipeline | 1 | One block per clock |
| 4 | Partial | 2 | One block per 2 clocks |
| 1 | Iterative | 8 | One block per 8 clocks |

In the folded forms, the output of the last built round is multiplexed back to
the first. Each pipeline slot carries a valid bit and a pass number.

* **Returning blocks first.** A block coming back for another pass takes
  priority at the multiplexer.
* **When new blocks enter.** `in_ready` is high when the slot reaching the
  multiplexer is empty, or is leaving for the output transformation.
* **Subkey selection.** Each multiplier stage picks its subkeys from the pass
  number of the block it holds: round = pass x UNROLL + round position. Blocks
  from different passes can therefore share the pipeline.

Latency is 199 clocks in every configuration.

**Keys.**

* **Encryption subkeys (`idea_keysched`).** These are the standard 52 subkeys:
  eight 16-bit slices of the key, then a 25-bit left rotation, repeated. This
  block also holds the key register, which `key_load` writes. The subkeys are
  wiring from that register.
* **Decryption subkeys (`idea_dec_keys`).** Loading with `decrypt` high starts
  this block. Decryption keys are the additive inverses mod 2^16 and the
  multiplicative inverses mod 2^16+1 of the encryption keys, in reversed
  order. Each multiplicative inverse is computed as x^(2^16-1) by Fermat's
  theorem, using one shared `idea_mulmod` (15 square/multiply steps, 8 clocks
  each). `key_busy` is high for about 4,300 clocks, and `in_ready` stays low
  during that time.

Decryption then runs through the same datapath.

## Bloom-filter payload matcher

**Hash generator (`bloom_hash_gen`).** It computes ten 12-bit H3-class hashes of
an 80-bit string. Hash i is the XOR of the coefficients d[i][j] for every string
bit j that is 1. That is a 10 x 10 x 8 table: hashes x bytes x bits.

The coefficients are fixed pseudo-random 12-bit constants. `nids_pkg::coef(i,j)`
computes each one from (i,j) with an integer mixing function (multiply by
0x9E3779B1, xor-shift by 15, multiply by 0x85EBCA77, xor-shift by 13, keep bits
11:0). Any other random table works equally well. The hashes are registered,
which adds 1 clock.

**Partial Bloom filter (`bloom_pbf`).**

* It holds a 4096-bit vector, one bit per 12-bit address.
* **Lookup:** it checks two addresses, H1 and H2, and `partial_bloom_match` is
  the AND of the two bits.
* **Programming:** `set_bit` writes `bit_data` to `bit_addr`.
* **Reset:** a synchronous reset clears the vector. `bloom_ready` is high from
  reset until the first write.

**Large Bloom filter (`bloom_lbf`).** Five PBFs work in parallel, and PBF k gets
hashes 2k and 2k+1. The string is a (probable) member when all five match.

To program one bit, raise `valid_request` with `bram_number`, `bit_data` and
`bit_addr`. `bloom_bram_decoder` decodes `bram_number` into a one-hot select.
To add a pattern, set bit h[2k] and bit h[2k+1] in PBF k for each k.

**Sliding window and engines (`nids_matcher`).**

* **Input.** Each clock brings G = 4 payload bytes, and `in_sop` marks a
  packet's first beat.
* **Window.** The matcher keeps the previous 9 bytes. With the new bytes, that
  gives four overlapping 10-byte strings, one ending at each new byte.
* **Engines.** Each string goes to its own large Bloom filter. Every byte
  position of the packet ends exactly one checked string, so no alignment of a
  pattern is missed.
* **Packet boundaries.** Strings that would reach back into the previous
  packet are suppressed.

**False-positive analyzer (`fp_analyzer`).** A Bloom hit only means "possibly a
pattern". Each flagged string is compared exactly with the 10 stored patterns,
which are written through `pat_we/pat_idx/pat_data`.

* `bloom_hit[e]` reports the filter's verdict for engine e.
* `match[e]` and `match_id[e]` report confirmed matches.

Results come out two clocks after the beat. A `bloom_hit` without `match` is a
removed false positive. The analyzer must hold the same patterns that were
programmed into the Bloom filters.

## Interfaces and timing summary

| Path | Handshake | Latency | Rate |
|---|---|---|---|
| IDEA (`idea_in_*` → `idea_out_*`) | valid/ready in, valid out (no back-pressure) | 199 | 1 block/clock (`UNROLL=8`) |
| Key load (`key_load`, `key`, `idea_decrypt`) | one-clock pulse; hold the key stable while blocks are in flight | decrypt: ~4,300 clocks `idea_key_busy` | — |
| Matcher (`pl_valid/pl_sop/pl_data` → `res_*`) | valid only | 2 | 4 bytes/clock |
| Bloom programming | `valid_request` with `bram_number/bit_data/bit_addr` | next clock | 1 bit/clock |

`rst_n` is active low. The IDEA side uses it as an asynchronous reset. The
matcher takes a synchronous active-high reset from a flop. `rst_n` sets that
flop at once, and the first clock edge after `rst_n` rises releases it. Hold
`rst_n` low for at least one clock edge so that the Bloom vectors are cleared.

Parameters of `netsec_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `UNROLL` | 8 | IDEA rounds built: 8, 4, 2 or 1 (the testbenches cover 8, 4 and 1) |
| `G` | 4 | Matcher bytes per clock, which is also the number of Bloom engines |
| `NPAT` | 10 | Analyzer pattern entries |

Pattern length (80 bits), hash count (10), hash width (12) and vector size
(4096) are constants in `nids_pkg`. The IDEA word size and the stage counts are
in `idea_pkg`.

## Where this RTL departs from, or adds to, the source design

* **Round depth.** The source describes the round as 24 stages but also counts
  the multipliers as 6 stages. Here every multiplier has 7 stages, and the
  round is 3x7 + 3 = 24.
* **Total depth.** The full pipeline is 199 stages: 192 for the rounds and 7
  for the output transformation.
* **Interleaving in the folded designs.** Blocks are interleaved in pipeline
  slots, so the iterative design moves 8 bits per clock instead of waiting for
  each block to finish.
* **Stage count with `UNROLL=4`.** It has 4x24 + 7 = 103 physical stages, where
  the source counts 99.
* **All eight rounds unrolled.** The full design unrolls all eight rounds. The
  source's FPGA build fitted only six.
* **Own choices.** These parts are not specified in the source: decryption-key
  computation by Fermat inversion, the key register and the valid/ready
  handshake.
* **Hash coefficients.** They are computed by a formula instead of drawn at
  random, so hash values differ from any other H3 table.
* **Matcher input width.** The matcher takes 4 bytes per clock (four engines).
  Throughput figures quoted for such designs count one 80-bit lookup per
  engine per clock, and each engine here does that. Raise `G` for more bytes
  per clock.
* **Analyzer design.** The analyzer is a parallel exact comparator, the
  simplest design that removes all false positives.

**Not built:**

* Packet header decoding and header-rule analysis.
* The decision logic that would combine header and payload results. This
  design assumes headers were already checked, and its matcher result ports
  stand where that logic would connect.
* A bank of Bloom filters for variable-length patterns. Only the fixed
  80-bit-pattern matcher exists.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
reference models in `tb/idea_ref_pkg.sv` and `tb/nids_ref_pkg.sv`, which are
written independently of the RTL:

* An exact modular multiplier.
* A behavioural IDEA, with brute-force inverses for the decryption keys.
* A software Bloom filter and hash.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`, ends with `$finish`,
and has a watchdog.

**Cipher checks:**

* The standard IDEA test vector: key 0001 0002 ... 0008, plaintext 0000 0001
  0002 0003 → 11FB ED2B 0198 6DE5.
* Random blocks in the three `UNROLL` configurations 8, 4 and 1, with their
  rates: one block per clock, per 2 clocks and per 8 clocks.
* Latency and throughput.
* Decryption round trips.

**System testbench.** `tb_netsec_top` runs the top at its default parameters.
It does the following:

* Encrypts 1000 back-to-back blocks.
* Switches to decryption and waits out the key computation.
* Decrypts blocks back to plaintext.
* Scans packets that contain patterns. These include patterns split across
  packets (which must not be reported) and strings that the Bloom filter
  flags but the analyzer rejects.

It counts each of these events and fails if one never happens.

To simulate with Verilator 5, packages go first:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/idea_pkg.sv rtl/nids_pkg.sv tb/idea_ref_pkg.sv tb/nids_ref_pkg.sv \
        $(ls rtl/*.sv | grep -v _pkg) tb/tb_netsec_top.sv --top-module tb_netsec_top
    ./obj_dir/Vtb_netsec_top

Swap in any other `tb/tb_*.sv` and its name for a single block. The full
system test runs in well under a minute.
