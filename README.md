# Low-cost authentication tags for encrypted off-chip memory

An embedded processor that keeps its data encrypted in external DRAM still
has to notice when somebody changes that data: on the memory bus, inside the
memory chip, or by putting back an old copy. The usual answer is a tag (a
message authentication code) stored next to every cache line. Standard MAC
modes such as GCM or PMAC cost a lot of area and many cycles per line, and
the tags they produce are a fixed size however much security is really bought.

This RTL implements a cheaper tag. It relies on the fact that an encrypted
line is already uniformly random. The tag is a keyed *reshuffle and fold* of
the ciphertext: bits are moved between blocks, every block is rotated, and the
blocks are XORed into one tag-sized word. Every choice in that reshuffle is
taken from a **nonce**. The nonce is the AES encryption of the line's address,
a random value and a per-line write counter. So the same data gets a
different tag at a different address, and again after every rewrite. Only
shifts, swaps and XORs are used, and each of them maps a uniform input to a
uniform output. The tag therefore stays uniformly distributed, and guessing
it is as hard as its width allows.

The default configuration protects a 1 MB memory of 256-bit lines with 64-bit
tags. That costs 25% extra off-chip storage.

## The two transactions

`tag_auth_unit` sits between the cache, after the line cipher, and the
external memory. It does not encrypt or decrypt data. It sees only
ciphertext lines.

* **Write** (`req_write=1`). The line's counter is stepped. A fresh random
  value is drawn. Both are saved in an on-chip seed table. A nonce is made
  from them, and the tag of `req_line` is returned on `resp_tag`. The
  memory controller stores that tag with the line.
* **Read** (`req_write=0`). The line's saved seed is read back and the same
  nonce is rebuilt. The tag of the fetched line is recomputed and compared
  with the fetched tag `req_tag`. `resp_auth_ok` means the line may be
  decrypted and used. `resp_auth_fail` means it must be thrown away.

The following all fail authentication:

| attack | why it fails |
|---|---|
| altered ciphertext or tag (guessed replacement) | tag is a function of every line bit; a 64-bit guess succeeds with probability 2^-64 |
| valid line+tag pair copied from another address | address is part of the nonce, so the tag is recomputed with a different shuffle |
| old line+tag pair of the same address replayed after a rewrite | the on-chip counter has moved on, so the nonce differs |

### Timing and handshake

```
cycle  0   req_valid & req_ready      request taken, seed table read
cycle  1                              seed formed (write: counter+1, new random, table updated); AES starts
cycle 11                              nonce ready
cycle 12                              tag registered
cycle 13   resp_valid (1 cycle)       resp_tag, resp_auth_ok / resp_auth_fail
cycle 14   req_ready again
```

One request is in flight at a time. After reset, `req_ready` stays low for
`LINES` cycles (32768 by default) while the seed table is cleared one entry
per cycle. Reset is asynchronous and active low.

## How a tag is made (`tag_gen`)

With line width n = 256 and tag width m = 64, the line is cut into
q = n/m = 4 blocks. B(1) is the most significant block:
`line = B(1) || B(2) || B(3) || B(4)`. Three steps follow.

### 1. Line shuffle: segment swaps between blocks (`line_shuffle`, `seg_shuffle`)

A full bit-level shuffle of the line would be the strongest choice. Its cost
rises steeply as the swap unit gets smaller, so a cheaper **segment
shuffle** is used instead. Each of the β rounds (β = 2 by default) does the
following:

* pick two different blocks B(i) and B(j);
* pick a segment size s from 1 to α (α = 32 by default);
* pick a start position in each block, `pos_a` in B(i) and `pos_b` in B(j),
  each from 0 to m-1;
* exchange the s bits of B(i) starting at `pos_a` with the s bits of B(j)
  starting at `pos_b`, keeping their order: `B(i)[pos_a+t] <-> B(j)[pos_b+t]`.

All indices wrap modulo m. Each block behaves as a ring, so a segment can run
off the top of a block and continue at bit 0. Positions count from the least
significant bit.

Worked example with 8-bit blocks, written most significant bit first:

```
before:  B(i) = 1001 0111    B(j) = 0101 0110
size 5, pos_a = 4 (bits 4,5,6,7 then 0 — wraps), pos_b = 3 (bits 3..7)
after:   B(i) = 1010 0110    B(j) = 1100 1110
```

B(i)'s wrapped segment (1,1,0,0,1 at bits 0,7,6,5,4, read from the bit that
wrapped round to the left end) and
B(j)'s segment 0,1,0,1,0 (bits 7..3) have traded places. No other bit moves.

In hardware a swap is two barrel rotators and two ring masks. B(j) is rotated
by `pos_a-pos_b`, which lines its segment up with the one in B(i). A mask of
s ones, rotated to `pos_a`, then selects which bits of B(i) are replaced. The
same is done the other way round for B(j). The β rounds are chained
combinational stages.

### 2. Permutation: rotate every block (`block_permute`)

Each block is rotated left (towards its MSB) by its own amount, 0 to m-1.

### 3. Fold (`block_xor`)

`tag = B(1) ^ B(2) ^ ... ^ B(q)`.

The whole transform is one combinational path into a register. A tag is
ready one cycle after its line and nonce, and `tag_gen` accepts one line per
cycle.

### Where the controls come from (`nonce_ctrl`)

The nonce is uniformly random, so each control is simply a bit field of it.
With QB = log2(q), SB = log2(α) and PB = log2(m), round k (0-based) uses the
RB = 2·QB + SB + 2·PB bits at `nonce[k*RB +: RB]`:

| bits, from the field's LSB | meaning |
|---|---|
| QB | first block i |
| QB | r; second block j = (i + 1 + r mod (q-1)) mod q, so j ≠ i |
| SB | segment size − 1 |
| PB | `pos_a` |
| PB | `pos_b` |

After the β round fields, block b takes its rotate amount from the PB bits at
`nonce[β*RB + b*PB +: PB]`. The defaults use 66 of the 128 nonce bits. The
128-bit-tag configuration uses 56.

## The nonce (`nonce_gen`, `aes128_enc`)

The nonce is `AES-128(key, {addr[31:0], random[63:0], counter[31:0]})`:

* `addr` is the line index, zero-extended;
* `random` comes from a 64-bit maximal-length LFSR (x^64+x^63+x^61+x^60+1)
  that steps on every write;
* `counter` is the line's write count.

The last `{random, counter}` of every line is kept in an on-chip seed table
of `LINES` × 96 bits, which is 384 KB by default. Keeping the seed on chip is
deliberate:

* the off-chip overhead stays at the tag alone (64/256 = 25%);
* a replayed old line cannot bring its old counter back with it.

It is also the most expensive part of the design. A smaller seed state is the
first thing to revisit for a real chip. `aes128_enc` is a plain iterative AES
core, one round per cycle with on-the-fly key expansion. Its S-box is
computed (GF(2^8) inverse by x^254, then the affine map), not stored as a
table.

## Choosing the tag size

Security is the smaller of two search spaces:

* **Guessing the tag:** 2^m.
* **Guessing the transform:** (C(q,2)·m²·α)^β · m^q.

For every combination of swap parameters, C(q,2)·m²·α counts the distinct
swaps. The `j ≠ i` encoding above covers ordered pairs, but a swap of (i,j)
is the same as a swap of (j,i) with the positions exchanged, so each distinct
swap is counted once. The m^q term counts the rotations.

A larger tag does not always help. Past the point where the two spaces cross,
a wider tag costs memory and adds nothing, because the transform becomes the
easier target. With α = 32 and β = 2, the crossover puts the best tag size at
64 bits, which is the default. With α = 16 and β = 1 it would be 48 bits.

Supported sizes: `TAG_W` and `LINE_W/TAG_W` must be powers of two, `ALPHA` a
power of two no larger than `TAG_W`, and the controls must fit in 128 nonce
bits. Elaboration-time assertions in `nonce_ctrl` check all of this.
Non-power-of-two tags such as 48 bits are not supported.

## Parameters

| parameter | default | where |
|---|---|---|
| `LINE_W` | 256 | line width n; the cache line of the target processor |
| `TAG_W` | 64 | tag width m; 128 is the other supported published size |
| `ALPHA` | 32 | number of segment sizes (1..α) |
| `BETA` | 2 | shuffle rounds |
| `LINES` | 32768 | lines covered by the seed table (1 MB / 32 B) |
| `LFSR_SEED` | 64'h0123456789ABCDEF | `nonce_gen` only |

The package `tag_pkg` holds the defaults and the seed struct. `aes_pkg`
holds the AES round functions.

## Module map

```
tag_auth_unit            top: handshake FSM
├── nonce_gen            seed table, LFSR, seed formation
│   └── aes128_enc       AES-128, 10 cycles
├── tag_gen              one-cycle tag generator
│   ├── nonce_ctrl       nonce -> swap controls and rotate amounts
│   ├── line_shuffle     cut into blocks, β chained rounds
│   │   └── seg_shuffle  one wrapped segment exchange
│   ├── block_permute    per-block left rotate
│   └── block_xor        fold to tag
└── tag_check            registered compare, ok / fail
```

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/tag_pkg.sv rtl/aes_pkg.sv tb/tag_ref_pkg.sv tb/tb_tag_auth_unit.sv \
    --top-module tb_tag_auth_unit
./obj_dir/Vtb_tag_auth_unit
```

Swap in any other `tb/tb_*.sv` and its name. `tb/tag_ref_pkg.sv` holds
independent reference models: a byte-array AES whose S-box is found by
searching for inverses, and a tag generator that swaps and rotates one bit at
a time.

| testbench | what it shows |
|---|---|
| `tb_aes128_enc` | FIPS-197 vectors, 40 random blocks, 10-cycle latency |
| `tb_nonce_ctrl` | every control field, 64- and 128-bit tags |
| `tb_seg_shuffle` | the two 8-bit worked examples (2-bit segment, 5-bit wrapped) and 500 random swaps |
| `tb_line_shuffle`, `tb_block_permute`, `tb_block_xor` | random data against the bit-level model |
| `tb_tag_gen` | 64- and 128-bit tag generators, back-to-back, 1-cycle latency |
| `tb_tag_check` | equal, one-bit-off and random tags |
| `tb_nonce_gen` | table clear time, counter and random handling, nonce = AES(seed), 11-cycle latency |
| `tb_tag_auth_unit` | full default size: writes, honest reads, altered data, altered tag, relocated pair, replayed pair; every case must occur; 13-cycle latency |
| `tb_tag_size_sweep` | tag generator at 16/32/64/128-bit tags with α=16, β=1 and a 32-bit tag with α=32, β=2 |
| `tb_workload_footprint` | tags and re-reads the complete footprints of eight embedded benchmark programs (295–759 KB) on a 64-bit and a 128-bit unit; checks tag storage against the published overheads (e.g. jpeg 759 KB → 190 KB / 380 KB) |

`tb_workload_footprint` takes about a minute. The others take seconds, apart
from compiling the AES logic.

## Design choices beyond the published scheme

The scheme as published fixes the three-step transform, the kinds of random
control, the wrapped segments, the left rotation, the XOR fold and the three
seed fields. It also fixes the sizes n = 256, m = 64 or 128, α = 32 and β = 2,
and names AES as the cipher. The following are this implementation's own
choices:

* **Nonce bit layout and segment sizes.** The layout is the table above.
  Segment sizes are 1..α, that is α values; an empty swap is not allowed.
* **Seed handling.** There is a per-line on-chip seed table, cleared after
  reset. The LFSR stands in for a true random source. The seed field widths
  are 32/64/32 bits.
* **Timing.** AES-128 runs one round per cycle. The tag path is
  single-cycle. The request/response handshake and the 13-cycle latency
  follow from that.
* **Bit conventions.** Positions count from the LSB, segments grow towards
  the MSB, and B(1) is the most significant block.

Limits worth knowing:

* For a fixed nonce the tag is a linear (XOR) function of the line bits.
  Its strength rests on the nonce being secret and never reused for two
  different contents at one address. The counter guarantees that up to 2^32
  writes per line. Counter wrap-around is not handled.
* The seed table makes replay detection exact, but it is 384 KB of on-chip
  storage at the default size.
* Data encryption and decryption, and the memory controller that stores the
  tag beside its line, are not part of this RTL.
