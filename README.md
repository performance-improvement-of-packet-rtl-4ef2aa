# A flow-ID cache for IPv6 packet classification

Packet classification decides which rule a packet falls under from its
5-tuple: source address, destination address, source port, destination port
and protocol. Under IPv6 this "flow ID" is 296 bits long (2 x 128 + 2 x 16 + 8),
and a full classifier has to spend several memory accesses on every packet.
Packets of one flow, however, arrive in bursts. This design puts a small cache
in front of the classifier. The cache remembers the rule number of recently
seen flows, and only packets that miss in it go to the full classifier.

The cache never stores the 296-bit flow ID. It compresses the flow ID twice:

* **Index.** Random bit-selection picks a few bits of the flow ID at fixed,
  pseudo-randomly chosen positions. This costs nothing but wires, and the bits
  choose the cache set.
* **Tag.** A 32-bit hash, three XOR levels deep, is stored in the entry. It
  tells apart flows that share a set.

Two flows with the same index and the same tag are treated as one flow. That
is a deliberate trade of accuracy for size. It is covered under
[Aliasing](#aliasing-misclassification) below.

Default configuration:

| | |
|---|---|
| Entries | 1024 |
| Organisation | 4-way set associative, 256 sets, 8-bit index |
| Replacement | LRU |
| Tag hash | hash function I |
| Index range | type 1 |

Storage at the defaults is 1024 x (32 tag + 32 timestamp + 16 rule) =
81,920 bits.

## Structure

```
flowcache_top
 ├─ flow_hash      32-bit tag from the flow ID (combinational)
 ├─ rbs_index      set index by random bit-selection (wiring only)
 └─ flow_cache     tag/age/result arrays, lookup, fill, clearing sweep
     ├─ repl_policy   LRU / LFU / random rules for one set (combinational)
     └─ lfsr_rng      random way number for random replacement
flowcache_pkg      flow_id_t, enums, protocol numbers, bit-selection positions
```

Two parts sit outside the RTL:

* The full packet classifier that answers misses, for example a TCAM or an
  algorithmic classifier. It connects through the `cls_*` ports.
  `tb/classifier_model.sv` is a behavioural stand-in for it.
* Extraction of the 5-tuple from the packet, including walking the IPv6
  extension-header chain. The flow ID arrives already extracted on `req_flow`.

## The flow ID and its bit order

`flow_id_t` is a packed struct `{sa[127:0], da[127:0], sp[15:0], dp[15:0], proto[7:0]}`.
Each field is MSB first, so "bit 1" of a field in network order is its MSB.
Each address has two halves:

* the upper 64 bits are the *routing prefix*;
* the lower 64 bits are the *node identification part*, the interface ID.

## Tag: hash functions I, II, III (`flow_hash`)

```
 SA node ID (64) ──────────────────┐
 DA node ID (64) ── reverse64 ─────┴─ op ─ x (64)
 x bits 1..32 ─────────────────────┐
 x bits 33..64 ─── reverse32 ──────┴─ op ─ y (32)
 {SP, DP} (32, SP in the upper half) ─┐
 y ───────────────────────────────────┴─ op ─ tag (32)
```

* **op.** XOR for hash functions I and II, XNOR for III.
* **Ports.** The port fields only mean something for TCP (6) and UDP (17).
  For any other protocol they are replaced before the last level: by 0 in
  hash I, and by 65535 in hashes II and III.
* **Not in the tag.** The protocol and the address prefixes do not enter the
  tag. The index covers them instead.
* **Timing.** The block is three gate levels deep plus wiring, and has no
  clock.

The drawn structure has two consequences that a user should know:

* **The first reverse cancels out.** The split level folds bit j onto bit
  65-j, so reversing the destination half first does not change the result.
  As a side effect the tag is symmetric in SA and DA.
* **Hash III equals hash II.** XNOR(a, b) equals XOR(~a, ~b), so the three
  inversions cancel and hash III gives exactly the tag of hash II. Results
  published for this scheme list different collision counts for II and III.
  This RTL follows the gate-level description, and `tb_flow_hash` checks the
  equality.

Hash I is the default. Published results recommend it: it had the lowest
collision rate on both traces it was tried on.

## Index: random bit-selection (`rbs_index`)

The index is `IDX_W = log2(ENTRIES/WAYS)` bits. Bit k is taken from a fixed
position of a *range vector* built from the flow ID:

| `RANGE` | range vector (MSB first) | bits |
|---|---|---|
| `RANGE_T1` (default) | SA prefix, DA prefix, SP, DP, protocol | 168 |
| `RANGE_T2` | SA, DA, SP, DP, protocol | 296 |
| `RANGE_T3` | SA, DA, SP, DP | 288 |
| `RANGE_T4` | SA prefix, DA prefix, SP, DP | 160 |
| `RANGE_T5` | SA node ID, DA node ID, SP, DP, short protocol | 162 |

The short protocol is 2 bits: ICMPv6 = 0, TCP = 1, UDP = 2, and any other
protocol = 3.

Type 1 is the default because it covers exactly the fields that hash I leaves
out, so together the index and the tag look at the whole flow ID.

The positions are drawn when the design is elaborated:

1. `flowcache_pkg::rbs_position` runs xorshift32 (`x ^= x<<13; x ^= x>>17; x ^= x<<5`)
   from the seed `32'h1badb002`.
2. Each draw proposes the position `x mod width`.
3. A position that was already drawn is skipped.

The selection is therefore fixed, reproducible and free of duplicates. To try
another selection, change `RBS_SEED`. The position formula matters for real
traffic. If the chosen bits land on prefix bits that hardly vary, most sets
go unused. This shows up clearly in the synthetic trace of `tb_miss_ratio`.

## Cache memory (`flow_cache`)

`SETS = ENTRIES/WAYS` sets of `WAYS` entries each. Every entry has three
fields:

| field | width | meaning |
|---|---|---|
| Tag | 32 | hash of the flow |
| TS/Counter | 32 (LRU), 3 (LFU), 1 (random) | replacement state |
| Result | `RESULT_W` = 16 | rule number |

Special cases of the organisation:

* **Empty entries.** There is no valid bit. An entry whose fields are all
  zero is empty, and after reset a sweep clears the whole memory. One corner
  case follows: with random replacement, a flow whose tag is 0 and whose rule
  is 0 can never be cached.
* **Direct-mapped.** `WAYS = 1`. With one candidate per set there is nothing
  to choose, so the TS/Counter field is left out whatever `POLICY` says.
* **Fully associative.** `WAYS = ENTRIES`. There is one set and the index is
  ignored. Such a cache compares every entry in parallel, so its logic is
  large.

The storage is a register file read in the same cycle. Three operations are
possible, at most one per cycle:

* **Lookup.** Reads the set, compares every way's tag, and returns
  `lk_hit/lk_way/lk_result` combinationally. At the clock edge it advances
  the packet serial number and applies `repl_policy`'s age update to the set.
* **Fill.** Writes `{tag, age, rule}` into the victim way. It reports
  `fill_way` and whether a live entry was evicted (`fill_evict`).
* **Clear.** A sweep of one set per cycle, `SETS` cycles in all. It empties
  every entry whose rule number equals `clr_rule`. After reset the same sweep
  empties every entry. `busy` is high throughout.

## Replacement (`repl_policy`, `lfsr_rng`)

| policy | on a hit | on a miss | victim | new entry's field |
|---|---|---|---|---|
| LRU | field := packet serial number | unchanged | oldest serial number | serial number of the missing packet |
| LFU | counter + 1, saturating at `LFU_LIMIT` = 4 | every nonzero counter of the set − 1 | smallest counter | 1 |
| random | — | — | `lfsr_rng` value (0..WAYS−1) | 0 |

* **Ties.** Go to the lowest way.
* **Empty entries.** They hold 0, so LRU and LFU fill them first.
* **Serial number.** 32 bits, counting from 1 after reset. Wrap-around after
  2^32 packets is not handled.
* **Random number generator.** A 16-bit Galois LFSR (mask `0xB400`) that
  advances every clock. The value used is the state mod `WAYS`.

## Operation of `flowcache_top`

Requests and responses:

| cycle | what happens |
|---|---|
| t | `req_valid && req_ready`: the flow is hashed (tag and index) and registered |
| t+1 | lookup. **Hit:** `resp_valid` and `resp_hit` are registered, and a new request may be taken in the same cycle (one packet per clock while hits continue). **Miss:** `req_ready` drops and `cls_req_valid` rises with `cls_req_flow` |
| … | `cls_req_valid` stays high, with the flow stable, until the classifier pulses `cls_resp_valid` with `cls_resp_rule` |
| that cycle | the entry is filled and `resp_valid` is registered with `resp_hit = 0` and the classifier's rule |

Responses come back in request order, with at most one packet in flight.
`resp_valid` is a one-cycle pulse. There is no back-pressure on the response.

**Rule updates.** When a rule's *prefixes or ports* change, assert
`upd_valid` with its number. Once the lookup stage is empty the update is
taken (`upd_ready`). New requests are held off while it waits. Every cached
entry of that rule is then cleared in a `SETS`-cycle sweep, so those flows
are classified again on their next packet. A change of a rule's *action*
needs no update, because entries hold rule numbers, not actions. Caveat: if a
change makes a rule match flows that are cached under *another* rule number,
those entries are not cleared. Update that other rule too.

**Reset.** Reset is synchronous and active low. After it the cache is busy
for `SETS` cycles (256 at the defaults) while it clears itself, and
`req_ready` stays low.

## Aliasing (misclassification)

Two different flows are confused only when they agree on every index bit
*and* on the 32-bit tag. With type-1 index and hash I, the following pairs
always alias:

* flows that differ only in prefix bits the index does not sample;
* flows that are each other's reverse direction with the same ports.

The effect is bounded but real. Published trace-driven results put it at a
few percent of packets (1.7% direct-mapped, up to 5% at 4-way with 65536
entries). It grows with associativity, because the index gets shorter.
In normal operation nothing detects it. `tb_flowcache_top` constructs such
pairs on purpose and checks that the cache returns the first flow's rule for
the second, as designed.

To measure aliasing, set `MISCLASS_CHECK = 1`. Every entry then also stores
the full 296-bit flow ID, and `resp_misclass` flags any hit whose entry was
filled by a different flow. This is an evaluation aid, not part of a
production cache: it more than quadruples the storage. It is off by default,
and `resp_misclass` is then always 0.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `flowcache_top` | `ENTRIES` | 1024 | power-of-two multiple of `WAYS` |
| | `WAYS` | 4 | 1 = direct-mapped, `ENTRIES` = fully associative |
| | `POLICY` | `POL_LRU` | `POL_LFU`, `POL_RANDOM` |
| | `LFU_LIMIT` | 4 | LFU saturation value |
| | `HASH` | `HASH_I` | `HASH_II`, `HASH_III` |
| | `RANGE` | `RANGE_T1` | `RANGE_T2` … `RANGE_T5` |
| | `RESULT_W` | 16 | rule number width |
| | `MISCLASS_CHECK` | 0 | store full flow IDs and flag aliasing hits |
| `flow_cache` | `TS_W` | 32 | serial number / LRU timestamp width |
| | `RNG_SEED` | `16'hACE1` | random replacement seed |
| | `FID_W` | 0 | width of the optional flow-ID field |

Published miss ratios for this scheme, measured on a real IPv6 backbone
trace of about 1.5 million packets and 17,000 flows:

| configuration | miss ratio |
|---|---|
| 256 entries, direct-mapped | 20% |
| 1024 entries, 4-way | 9.4% |
| fully associative, 1024 entries and up | 1–2.3% |

## What is this design's own choice

The structure follows the published scheme: the entry fields, the empty
all-zero entry, the three hashes, the five ranges, the three policies, the
32-bit tag and serial number, and clearing by rule number. The following
were not specified and were chosen here:

* the cycle timing and all handshakes;
* the register-file memory and the one-set-per-cycle sweep;
* the 16-bit rule number;
* field order in the range vectors, and the bit-selection generator and seed;
* the short-protocol code 3 for other protocols;
* the LFU details: a miss decrements the whole set, a new entry starts at 1,
  ties go to the lowest way;
* the LFSR and its reduction mod `WAYS`;
* which half of the split is reversed, and SP in the upper half of the
  combined ports. These were read from the gate-level drawings;
* keeping the TS/Counter field in a fully associative cache. The published
  scheme calls it optional there, but LRU cannot work without it.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_flow_hash` | all three hashes against a bit-numbered model (`flowref_pkg::ref_tag`); port substitution; placement of single bits; SA/DA symmetry; III = II |
| `tb_rbs_index` | all five ranges and 8/16/24/32-bit indices against an independent position generator; each index bit follows exactly one flow-ID bit; bits outside the range never matter |
| `tb_lfsr_rng` | the LFSR sequence over its full 65535-cycle period; output = state mod N; every value occurs |
| `tb_repl_policy` | victims and age updates of LRU, LFU and random against expected values |
| `tb_flow_cache` | 4-way LRU, LFU and random, direct-mapped and fully associative caches against a software cache model (hits, ways, rules, evictions, serial numbers, sweep lengths) |
| `tb_flowcache_top` | the top at its default size, end to end (below) |
| `tb_miss_ratio` | nine configurations on one synthetic trace (below) |
| `tb_collision` | how many of 17,016 distinct flows collide under each hash and each bit-selection (below) |

**`tb_flowcache_top`** runs 40,000 packets from 4,000 flows through a
behavioural classifier. It checks every response against a model that
recomputes the tag and index. It also checks timing:

* the reset sweep takes 256 cycles;
* a hit answers 1 cycle after the packet is taken;
* an update sweep takes 256 cycles.

It counts hits, misses, evictions, input stalls, clears that removed entries,
reclassification after an update, aliasing pairs and port-less flows, and
fails if any of them never occurs.

**`tb_miss_ratio`** replays one synthetic trace (17,016 flows) through nine
configurations:

* 256 and 1024 entries, each direct-mapped, 2-way and 4-way;
* 256 entries fully associative;
* 1024 entries 4-way with LFU and with random replacement.

It prints each miss ratio, and each misclassification ratio from the
monitor. One packet in 32 comes from a "near twin" of its flow, which differs
in one prefix bit that the index does not sample, so aliasing really occurs.
The trace has a compulsory-miss floor of about 24%, so the absolute values
are not comparable with the published ones. The trends are what count: more
entries and more ways give fewer misses.

**`tb_collision`** builds 17,016 distinct flows between 2,518 addresses,
with a backbone protocol mix: 1,166 ICMPv6, 6,000 TCP, 9,841 UDP and 9 other.
It applies them to the three hashes and to bit-selection over all five
ranges at 8, 16, 24 and 32 bits. A flow counts as colliding when another
flow gets the same value. The testbench prints the counts and ratios. It
checks every value against the model. It also checks that hash III collides
exactly like hash II, and that a wider index of one range never collides
more than a narrower one. The narrower index's positions are a prefix of the
wider one's, so this must hold. The node IDs here are random, so tag
collisions are rare. The bit-selection counts show how much the choice of
range matters on this trace.

To run one testbench with Verilator (5.x), from the folder holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/flowcache_pkg.sv tb/flowref_pkg.sv tb/tb_flowcache_top.sv \
  --top-module tb_flowcache_top -o sim
./obj_dir/sim
```

Replace `tb_flowcache_top` with any testbench name. The other modules are
found through `-I`. `tb/flowref_pkg.sv` holds the reference models: hash,
bit-selection, the classifier's rule table and a set-associative cache model.
