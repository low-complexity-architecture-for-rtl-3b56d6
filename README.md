# SimTag with BWA: repairing cache tags from identical tags in neighbouring sets

Cache tag bits are as exposed to particle strikes as data bits. A corrupted tag can produce
a false hit, or a false miss on a dirty line (stale data is then read), or a write-back to the
wrong address. Parity detects a single flipped bit but cannot repair it. SEC-DED codes can
repair it, but they cost area and add latency to every lookup.

This design repairs tags using their own redundancy. Because of spatial locality, a tag stored
in set *i* is often stored again in set *i − 1* or *i + 1*. Each tag entry keeps a small
pointer to such a twin, called the **STI** (same tag information). When parity flags a
corrupted tag, the tag is copied back from its twin. Pointers are only built on cache misses,
while the pipeline is stalled anyway, so hits pay nothing extra.

Tag comparison uses a **butterfly-formed weight accumulator (BWA)**: a network of half adders
that counts the bits in which two code words differ.

The RTL is SystemVerilog-2017. Its default configuration is a 4-way set-associative tag
array with 8 sets and 8-bit tags. Each tag carries one even-parity bit and a 4-bit STI. The
address is `{tag[7:0], index[2:0]}`.

## The STI pointer

Each of the 32 entries (8 sets × 4 ways) holds `valid`, `tag`, `parity` and a 4-bit STI:

| bit | field   | meaning                                                    |
|-----|---------|------------------------------------------------------------|
| 3   | valid   | a twin is known                                            |
| 2   | set_loc | 1 = upper set (index − 1), 0 = lower set (index + 1)       |
| 1:0 | way     | way of the twin in that set                                |

So `1001` means "same tag in the lower set, way 1", `1110` means "upper set, way 2", and
`0000` means "unprotected". Sets do not wrap: set 0 has no upper neighbour and set 7 no lower.

Pointers come in pairs. In the example used by the testbench, tag `10101` is in set 2 way 2.
A miss on the same tag in set 3 then fills way 1 of set 3, and two pointers are written:

* set 3 way 1 gets `1110`: upper set, way 2;
* set 2 way 2 gets `1001`: lower set, way 1.

Both copies are now protected by each other.

## What happens on each kind of access

All sequencing is done by `simtag_controller`. Each step takes one clock cycle. The tag array
is read combinationally from the row selected by the decoder and the set shifter.

**Hit.** The request is accepted in `IDLE`. In `LOOKUP`, all four ways are parity-checked
and compared. If there is no error and a valid way matches, the response comes in that
cycle: a latency of 1.

**Miss (4 cycles).**
1. `LOOKUP` picks a victim way: the first invalid way, or else the next way in round-robin
   order.
2. `MISS_UP`: the shifter selects the upper set.
   * The *replacement handler* finds lines there whose STI points at the victim
     (`valid=1, set_loc=lower, way=victim`). Their STI is cleared, because the victim is
     about to disappear.
   * The *STI encoder* compares the missed tag with the four tags of the upper set.
   * If one matches and its STI is free (or was just cleared), that line is pointed back at
     the new line.
   * The encoder's STI is kept as a candidate for the new line.
3. `MISS_DOWN`: the same for the lower set, with the directions mirrored.
4. `FILL`: the new tag and its parity are written to the victim way. Its STI is the upper
   candidate if there is one, else the lower one, else `0000`. The response reports the
   miss, the way, and any evicted tag (for write-back by the surrounding cache).
5. Re-link (2 cycles per side, only when needed). In step 2 a line L in set *i − 1* may have
   lost its twin, without the new line having L's tag. L's tag can then only be found again
   in set *i − 2*:
   * its own set holds that tag once;
   * set *i* no longer holds it.

   So the tag of L is captured in `MISS_UP`. After the response:
   * `RL_UP_SEARCH` shifts the select two sets up and compares L's tag with that set. A
     matching line with a free STI is pointed back at L.
   * `RL_UP_WRITE` writes the found pointer, or `0000`, into L.

   `RL_DOWN_*` do the same for *i + 1* / *i + 2*. `req_ready` stays low during these cycles.

A slot's pointers are cleared on every fill, even if the slot was empty. A line invalidated
after an uncorrectable error may still be named by old pointers, and they must not survive
the slot being refilled with a different tag.

**Tag error (2 extra cycles per repaired tag).** If `LOOKUP` sees a valid way that fails its
parity check:
* **STI valid:** in `REC_READ` the shifter selects the twin's set. The *error corrector*
  multiplexes out the twin's tag and parity and latches them. In `REC_WRITE` they are
  written over the corrupted entry. `LOOKUP` then repeats, and the response carries
  `resp_corrected`.
* **No STI, or the twin is invalid or fails parity itself:** the error is detected but
  uncorrectable. The line is invalidated and its STI cleared, `resp_due` is raised for this
  request, and the lookup proceeds, usually as a miss.

A line is only re-pointed when its STI is free, so an existing protection is never dropped
in favour of a new one.

## The BWA comparator

`bwa` counts ones without carry-propagate adders. It has log2(N) stages of N/2 half adders.
A stage joins two smaller accumulators: half adder *j* adds output *j* of the left one to
output *j* of the right one. Both of those bits have the same weight *w*, so the carry has
weight 2*w* and the sum has weight *w*. For N = 8, the weights of `out[0..7]` are
8, 4, 4, 2, 4, 2, 2, 1. The weight of bit *j* is 2 to the power of the number of zero bits in
*j* (`simtag_pkg::bwa_weight`).

The output is not a binary number, but it is zero exactly when the count is zero.

`tag_comparator` XORs the incoming `{parity, tag}` with a stored one, pads it to 16 bits, and
feeds it through a BWA. `match` is the NOR of the BWA outputs. `distance` is the binary
weighted sum, given only for observation.

`bwa_secded_matcher` is the comparator for tags protected by an (8,4) SEC-DED code. It can
tell apart "same tag with a bit error" from "different tag" without decoding:

* **First level:** two 4-input BWAs, one on the data bits and one on the check bits. Each
  gives bits of weight 4, 2, 2 and 1.
* **Second level:**
  * Q is the OR of the two weight-4 bits.
  * The *BWA for 2's* adds the four weight-2 bits. R is the OR of its two carries; S and T
    are the carry and sum of its last half adder.
  * The *BWA for 1's* adds the two weight-1 bits into U (carry) and V (sum).

The decision:

| Q∨R∨S | T | U | V | decision | Hamming distance |
|-------|---|---|---|----------|------------------|
| 0     | 0 | 0 | x | match    | 0 or 1           |
| 0     | 0 | 1 | x | fault    | 2                |
| 0     | 1 | 0 | 0 | fault    | 2                |
| 0     | 1 | 0 | 1 | mismatch | 3                |
| 0     | 1 | 1 | x | mismatch | 4                |
| 1     | x | x | x | mismatch | ≥ 4              |

U and V are the carry and sum of one half adder, so they are never both set. This matcher
stands beside the parity-protected unit in the top level, with its own `ecc_*` ports. The
SimTag datapath itself uses one parity bit per tag, and with parity only distance 0 counts as
a hit.

## Modules

| module | role |
|---|---|
| `simtag_pkg` | `sti_t`, `bwa_decision_e`, `WAYS=4`, `bwa_weight()` |
| `half_adder`, `bwa` | the accumulator |
| `tag_comparator` | BWA match of two code words |
| `bwa_secded_matcher` | (8,4)-code matcher and decision unit |
| `set_decoder`, `set_shifter` | one-hot set select; `en`/`s` move it one set up or down, `by2` two sets |
| `tag_array` | valid / tag / parity / STI storage, one row per cycle, fault-injection port |
| `error_detection_unit` | parity check of all four ways |
| `sti_encoder` | twin search in an adjacent set, STI generation |
| `sti_replacement_handler` | finds pointers to the evicted line |
| `error_corrector` | way-location multiplexer for the twin tag |
| `simtag_controller` | the state machine described above |
| `bwa_simtag` | top level: datapath wiring, address and repair registers |

### Top-level interface (`bwa_simtag`)

* **Request:** `req_valid` / `req_ready` handshake. The request is taken in the cycle where
  both are high, with `req_addr = {tag, index}`.
* **Response:** `resp_valid` is high for exactly one cycle per request, together with:
  * `resp_hit` and `resp_way`;
  * `resp_tag`, the tag after any repair;
  * `resp_distance`;
  * `resp_corrected` and `resp_due`;
  * on a miss, `evict_valid` and `evict_tag`.
* **Fault injection:** `inj_en` XORs `inj_mask` into the `{parity, tag}` bits of entry
  (`inj_index`, `inj_way`). It models a particle strike and is a test hook.
* **(8,4) matcher:** inputs `ecc_incoming` and `ecc_retrieved` (code words laid out as
  `{check[3:0], data[3:0]}`); outputs `ecc_decision` and `ecc_qrstuv`.
* **Reset:** `rst_n` is asynchronous and active low. It clears every entry.

Parameters are `TAG_W` (default 8) and `INDEX_W` (default 3). The way count is fixed at four
by the 2-bit way field of the STI.

## How far it follows the published scheme

Taken from the source description:
* the four added units (shifter, STI encoder, STI replacement handler, error corrector) and
  where they sit;
* the STI code table;
* upper and lower sets visited in turn on a miss;
* twins linked both ways;
* STIs pointing at a replaced line are invalidated;
* repair by multiplexing the twin out with the way location;
* the BWA structure and the (8,4) decision table;
* the 8-bit-tag, 3-bit-index, one-parity-bit sizes of its simulation.

This design's own choices:
* all timing: one step per cycle, combinational array read, and the latencies above;
* the state order, and the upper twin preferred over the lower one;
* round-robin replacement;
* no wrap-around at the first and last sets;
* only lines with a free STI are re-pointed;
* the re-link search two sets away, with the shifter's two-set mode, as the way a line that
  lost its twin finds a new one;
* clearing pointers to an empty slot on refill;
* handling of uncorrectable errors by invalidation;
* the check that the twin itself passes parity;
* the fault-injection port;
* the exact pairing of weight-2 bits in the (8,4) matcher.

Known departures and limits:
* The data array and the memory refill are not part of this RTL. A miss allocates the tag at
  once and reports the victim.
* One parity bit catches only odd numbers of flipped bits. A double-bit upset in a tag goes
  undetected, as with any parity scheme.
* The STI bits themselves are not protected.

## Simulating

Everything is plain SystemVerilog. Each testbench prints `TB_RESULT checks=N failures=M`.
The package has to be compiled first.
For example:

```
verilator --binary --timing --assert \
          rtl/simtag_pkg.sv $(ls rtl/*.sv | grep -v simtag_pkg) tb/tb_bwa_simtag.sv \
          --top-module tb_bwa_simtag -o sim && ./obj_dir/sim
```

* **`tb_bwa_simtag`** runs the top level at its default size.
  * It replays the linking example, then corrupts the new tag and checks that it is repaired.
  * It then issues 3000 requests over a pool of seven tags, with random single-bit upsets
    between requests.
  * A reference model in the testbench predicts every response and latency, and the whole
    array contents, including every STI, after each request.
  * Independently of the model, it checks two things: every repair restores the tag the
    line was filled with, and every STI between two intact lines joins equal tags.
  * It requires hits, misses, evictions, upper and lower STIs, back-links, invalidations,
    re-links, repairs, both kinds of uncorrectable error, misses in the first and last set, and all
    three matcher decisions to occur.
* **`tb_paper_workloads`** replays the two published runs:
  * a normal access to address `10111011000`;
  * a repair of that tag from its twin in set 1 (STI `1000`).
* Each module has its own `tb_<module>` testbench. These are exhaustive where the input space
  allows (BWA, (8,4) matcher, decoder, shifter) and random otherwise.
