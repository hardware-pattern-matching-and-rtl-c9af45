# Bit-vector signature detection for network intrusion detection

This core scans a byte stream, such as packet payloads, for a set of known
byte signatures. It takes one byte per clock and never stalls. It does not
build a state machine per signature. Instead, every signature is
described by small tables:

* **Sub-pattern bit vectors.** Each signature is cut into short sub-patterns
  of up to N characters. The core cuts it twice: with N = 3 and with N = 4.
  For every sub-pattern a table records at which sub-pattern positions it
  occurs in any signature (the bit vector **BV**). It also records where it
  ends a signature (the end vector **EV**). An AND-SHIFT-OR update over
  these vectors tells, for each input byte, which signature *lengths* may
  end at that byte.
* **Summation tuples.** Each byte value has a small weight tuple. A running,
  position-weighted sum over the last 1..24 bytes identifies a byte string
  of a given length almost uniquely. A candidate length from the
  bit-vector stage selects one sum, which is looked up in a hashed table of
  the sums of the real signatures (the **TBRAMs**). A hit confirms the
  signature and gives its table address, which is the signature's
  identifier.

Signatures longer than 24 bytes (`MAXF`, the maximum fragment length) are
split into fragments. A small join unit recognises the complete
signature when its fragments appear back to back.

All tables are RAMs written over a 64-bit host bus. The host software
computes the vectors, weights, sums and hash placements. The tables can be
written while traffic is being scanned.

## Data flow

```
 in_char ─┬─► BDN3: window(3) ─► GRP(1..3) tables ─► AND-SHIFT-OR ─► PVN3 ┐
          ├─► BDN4: window(4) ─► GRP(1..4) tables ─► AND-SHIFT-OR ─► PVN4 ┤
          └─► delay(2) ─► char weight table ─► summation block ─► ACC1..24┤
                                                                        ▼
                      pattern match unit: PVN3 & PVN4 → (len, ACClen) FIFO
                                                                        ▼
                 TBRAM block: 4 length-grouped TBRAMs + collision TBRAM list
                                                                        ▼
                 O_Pattern match unit: FRAM1/FRAM2 fragment joining → match
```

| Module | Role |
|---|---|
| `pm_pkg` | Sizes, types, host-bus targets, hash functions. |
| `char_table` | 256 × 9-bit weight tuples (m = 3 elements of 3 bits), read latency 1. |
| `summation_block` | 24 accumulators: `ACCk(t) = ACC(k-1)(t-1) + 2^((k-1) mod 3)·W(t)`. |
| `grp1_table` | GRP(1) table: BV/EV per single character, addressed by the character. |
| `grp_hashed_table` | GRP(i) table, i ≥ 2: 4 hashed ways of {sub-pattern, pointer}, plus a BV-EV RAM. |
| `and_shift_or_unit` | N phase registers of DV/PV; produces PVN. |
| `bit_detection_unit` | BDN3 or BDN4: window, GRP tables, AND-SHIFT-OR. |
| `pattern_match_unit` | PVN3 AND PVN4. Keeps up to 2 lengths per byte; 8-entry FIFO. |
| `tbram_block` | Sum lookup: hashed TBRAM record, then a linear collision list. |
| `o_pattern_match_unit` | Joins fragments into long signatures. |
| `vl_pattern_detector` | All of the above, plus host-bus decode. |
| `nids_top` | Packet framing: alert records {packet, offset, id} and counters. |

Latency from the last byte of a signature to `match_valid` is about 10 to
20 cycles, depending on collision-list reads and the join unit. Throughput
is one byte per cycle, unconditionally.

## How the bit vectors find candidate lengths

This is the least obvious part of the design. Take one cut width N.

* A signature is cut from its first byte into sub-patterns of N bytes. The
  last one may be shorter.
* Sub-pattern *q* (1-based) sets bit `L-q` of its BV. A sub-pattern that
  ends the signature sets bit `L-q+1` of its EV instead. `L = 8` bits of BV
  and 9 bits of EV cover 24-byte fragments even for N = 3.
* GRP(j) holds the sub-patterns of length j.

At each byte the unit looks up the last j bytes in GRP(j), for j = 1..N.
A match that started k bytes ago has its next sub-pattern ending now only
if that sub-pattern is X = (i − k) mod N bytes long. So the unit keeps N
copies of the detection vector DV, one per byte phase. The phase-i update
combines each earlier phase k with the lookup of length X:

```
DV_i  = 100…0  OR  ( OR_k  DV_k AND {BV_X, 0} ) >> 1
EDV_i =            OR_k  DV_k AND EV_X
```

* The constant top bit means a new signature may start at every byte.
* A set bit in EDV means that some signature's last sub-pattern ended
  exactly here.

To know which *length* ended, each DV copy carries a position vector PV
with one bit per possible length (1..24). The bits of a v-sub-pattern
partial match move up by X at each step. The result for the tail hit is
PVN, where bit n set means "a signature n bytes long may end here".

* **Own simplification.** A partial match of v sub-patterns is taken to
  be v..N·v bytes long (`len_range`).
* **Cost of the simplification.** PVN can name extra lengths, but it never
  misses a true one. The extra lengths are filtered twice:
  * BDN3 and BDN4 must agree (PVN3 AND PVN4);
  * the summation tuple must be found in the TBRAMs.

## Confirmation in the TBRAMs

The TBRAMs are grouped by signature length: 4–9, 10–14, 15–18 and 19–24
bytes. Each TBRAM has 2048 records. A record is
`{valid, length, collision count, collision pointer, start_frag, no_frag, Sum1..Sum3}`.

* It sits at `sum_hash(Sum) mod 2048`.
* When several signatures hash to one place, the first stays in the TBRAM.
  The others form a contiguous list in a shared 512-record collision TBRAM.
* Lists hold at most five records in all, or three for the shortest group.
  Software must re-fragment a signature that would need more.
* A lookup reads the TBRAM and then at most four list records, one per
  cycle. It is busy at most 5 cycles.
* The pattern address reported is `{0, group, address}` for a TBRAM record,
  or `{1, 00, list address}` for a collision record.

The record also stores the length, and the compare checks it. The
original method compares the sum only. The length compare was added
because a signature and its own prefix can have equal sums when a byte
has small weights.

## Long signatures (O_Patterns)

A signature of more than 24 bytes is split into 24-byte fragments. The last
48 or fewer bytes are split into two halves, so no fragment is shorter
than 12 bytes. The first fragment's TBRAM record has `start_frag = 1`.

* **FRAM1** (4 ways × 512, addressed by `fram_hash` of the pattern address)
  maps a first fragment to up to four signatures that begin with it.
* **FRAM2** (2048) holds the remaining fragments of each signature, in
  order. Each entry is {pattern address, length, last}.

When a first fragment is confirmed, a tracker is started per FRAM1 hit.
The tracker waits for the next fragment's address exactly *length* bytes
later.

* If that fragment arrives at that position, the tracker advances to the
  next fragment.
* When the last fragment arrives, the signature is reported with its
  first fragment's address.
* Trackers whose position has passed are dropped.

A record with both `start_frag` and `no_frag` set is reported at once with
`match_sw_join = 1`: joining is then left to software, for prefixes shared
by more than four signatures.

## Host bus

`host_wr = {we, target[7:0], addr[15:0], data[63:0]}`, one word per cycle.

| target | table | data word (LSB first) |
|---|---|---|
| `01` | weight table | weight tuple (9 bits) |
| `10`/`20` | BDN3/BDN4 GRP(1), addr = character | EV (9), BV (8) |
| `10+2(j-1)` | BDN3 GRP(j) record, addr = {way, index} | pointer, sub-pattern (8j bits), valid |
| `11+2(j-1)` | BDN3 GRP(j) BV-EV RAM | EV, BV |
| `20+…` | same for BDN4 | |
| `30`..`33` | TBRAM 0..3 | Sum (27), no_frag, start_frag, col. pointer (9), col. count (3), length (5), valid |
| `34` | collision TBRAM | same |
| `40`..`43` | FRAM1 way 0..3 | FRAM2 pointer (11), first pattern address (14), valid |
| `44` | FRAM2 | pattern address (14), length (5), last, valid |

The placement rules, which are part of the software, are:

* a sub-pattern goes into the first of the 4 ways whose hashed slot is free;
* character weights must give distinct sums per TBRAM group, with no zero
  weight elements.

`tb/vl_model_pkg.sv` implements the complete table build in SystemVerilog.
It is the reference for writing the tables from other software.

## Sizes

| Table | Size |
|---|---|
| BDN3 GRP(3) | 4 × 3072 records, 10-bit BV-EV pointer |
| BDN3 GRP(2) | 4 × 256 records, 8-bit pointer |
| BDN4 GRP(4) | 4 × 3584 records, 8-bit pointer |
| BDN4 GRP(3), GRP(2) | 4 × 384 records each, 6-bit pointers |
| TBRAMs | 4 × 2048 |
| Collision TBRAM | 512 |
| FRAM1 | 4 × 512 |
| FRAM2 | 2048 |

* **Origin of the sizes.** The GRP and FRAM sizes are those of the
  published 24-byte configuration. The TBRAM depth, collision depth, FIFO
  and tracker counts are this design's choices.
* **Capacity.** These sizes hold a full set of about 6,500 SNORT content
  signatures:
  * about 10,400 GRP(4) records against 14,336 slots;
  * at most about 1,700 patterns per TBRAM group against 2,048.

## Top level (`nids_top`)

`nids_top` adds packet framing to the detector.

* `in_sop` marks a packet's first byte.
* Each match becomes an alert `{alert_pkt, alert_offset, alert_id}`.
  `alert_offset` is the byte offset of the signature's last byte in its
  packet.
* `match_count`, `pkt_alerts` and `frag_count` count events, beside the
  detector's counters:
  * candidates, dropped lengths and FIFO overflows;
  * lookups and collision reads;
  * joins and queue overflows.
* Packets must be at least 8 bytes long, so that the 4-entry packet table
  covers the match latency.
* Matches that span a packet boundary are reported in the packet in which
  they end.

## What is not included, and departures

* **Short signatures.** Signatures of 1–3 bytes are not reported. The
  pattern match unit ignores lengths below 4. The original method flags
  them in the GRP tables instead.
* **Latency.** The pipeline is shorter than the published one: the BDN
  latency is 4 cycles. Results are identical.
* **Own choices.**
  * the hash functions (XOR, rotate and ADD only, as required);
  * the weight width (3 bits);
  * the 9-bit sums;
  * the tracker-based joining.
* **Fixed-length detector.** It is built as a separate design, described
  below, and is not part of `nids_top`. Signatures longer than 123 bytes
  must be split by the host; their consecutive-match rule is not built.
* **Not built.** The bit-vector packet classifier of the same family is not
  built.

## Fixed-length detector (`fl_pattern_detector`)

This is a second, standalone detector. It cuts every signature into
3-byte sub-patterns; the tail may be 1 or 2 bytes. Its vectors are 41 bits
long, so it handles signatures of up to 123 bytes.

| Module | Role |
|---|---|
| `fl_pkg` | Sizes (N = 3, L = 41, 6-bit weights, 12-bit sums), record types, hashes. |
| `fl_grp_table` | GRP(i): 3 hashed ways (GRP(1): 256 entries, addressed by the byte). A record is {BV, EV, weights, baseaddress, hash field}. BVs and EVs sit in pointer RAMs. |
| `fl_sub_window_switch` | Gives detection unit k the record of GRP(((phase − k − 1) mod 3) + 1). |
| `fl_detection_unit` | DV/EDV update, plus 4 offset trackers {offset, ACC}. Issues tail events {Temp = ACC + W, baseaddress, offset}. |
| `fl_address_generation` | 16-entry event FIFO. Address = baseaddress + offset (mod 8192), or a hash of Temp into the collision RAM. |
| `fl_controller` | 8192-entry pattern RAM and 512-entry collision RAM. Compares the stored sum with Temp. |

How a byte is processed:

* Each byte, the last 1, 2 and 3 bytes are looked up.
* Each of the three detection units follows one byte alignment. A GRP(3)
  record updates `DV = 1 & ((DV AND BV) >> 1)`. Every record is checked
  against `EDV = DV AND EV`.
* A match is reported as `{collision, address}` with the position of its
  last byte, about 7 cycles after that byte (when the FIFO is empty).

Host targets:

* `50 + 4(i−1) + {0, 1, 2, 3}` write GRP(i): key RAM, data RAM, EV RAM,
  BV RAM.
* `5c` writes the pattern RAM; `5d` writes the collision RAM.

The software rules are:

* a tail is placed so that baseaddress + offset hits a free pattern RAM
  entry;
* signatures that share a tail at one offset go to the collision RAM,
  through the hash field.

`tb/fl_model_pkg.sv` builds these tables.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal rtl/pm_pkg.sv rtl/fl_pkg.sv tb/vl_model_pkg.sv rtl/*.sv \
          tb/nids_top_tb.sv --top-module nids_top_tb && ./obj_dir/Vnids_top_tb
```

(The packages are given first. The duplicates from the glob are ignored,
with a warning. For `fl_*` testbenches, add `tb/fl_model_pkg.sv` after the
packages.)

| Testbench | What it checks |
|---|---|
| `nids_top_tb` | Full design, default sizes. About 300 signatures, including two long ones, in about 9000 bytes of packets. Every alert (id, packet, offset) is compared against a plain substring search. It also requires a two-length byte, collision-list reads, fragment joins, multi-alert packets and the 1 byte/cycle rate. |
| `vl_pattern_detector_tb` | Same idea without packets, 370 signatures. |
| `bit_detection_unit_tb`, `and_shift_or_unit_tb` | PVN contains every true signature length. It is zero on bytes that occur in no signature. Latency is 4 cycles and 1 cycle respectively. |
| `tbram_block_tb` | Small TBRAMs force collision lists. Checks ids, flags, misses for wrong lengths, and the ≤ 5-cycle lookup. |
| `o_pattern_match_unit_tb` | Shared first fragments, wrong positions, expiring trackers, queue overflow. |
| `fl_pattern_detector_tb` | Fixed-length detector, default sizes. About 310 signatures, including signatures that share a tail (collision RAM) and the overlapping-signature example. Every match is checked against a substring search. |
| `fl_detection_unit_tb` | Event sets and DV are checked against a model of the partial-match list. |
| others | Each RAM/table or datapath is checked against a model. |

`tb/vl_model_pkg.sv` holds the table builder, fragmentation and hashing
software used by the testbenches.
