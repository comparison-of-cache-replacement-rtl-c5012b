# Replacement policies for a RISC-V L2 cache: PLRUm, EBR and Mockingjay

When a set-associative cache misses in a full set, something must decide which
line to throw out. The classic answer, LRU, is simple but is easily beaten by
policies that also look at how often a line is used (frequency) or that try to
predict when it will be used again. This RTL implements three such replacement
units for the L2 cache of a dual-core 64-bit RISC-V (CVA6) subsystem:

| Policy | Idea | State for the 1024-set, 8-way L2 |
|---|---|---|
| **PLRUm** | one "recently used" bit per line; evict the first line whose bit is clear | 8 192 bits |
| **EBR** | per-line reference and age counters; evict the line of lowest "effectiveness" r·R/(f·E) | 67 584 bits + 16-bit LFSR |
| **Mockingjay** | learn, per load/store PC, how long lines take to be reused; evict the line whose predicted next use is furthest away | 96 768 bits |

All three plug into the same L2 tag controller, and a top level runs three
copies of the L2, one per policy, on one request stream so that their hit
ratios can be compared cycle by cycle.

## The L2 the policies live in

The L2 is 256 KiB, 8-way set-associative, 1024 sets, hence 32-byte lines. It is
write-back and (here) write-allocate. The L1 data cache above it is
write-through, so the L2 sees every store but only the loads that miss in L1.

`l2_tag_ctrl` models the part of the L2 that matters for replacement: tags,
valid bits and dirty bits. A request carries a 40-bit byte address, a write
flag, the 64-bit PC of the instruction and a core ID. It is looked up in the
cycle it is accepted:

* **hit**: the matching way is used; a write sets its dirty bit;
* **miss with a free way**: the lowest-numbered invalid way is filled;
* **miss in a full set**: the replacement unit names the victim; the response
  reports the evicted line's address and whether it was dirty (a write-back).

Each policy has two halves, as in the original L2: *update logic*, which
watches every accepted lookup (hit or miss, set, way) and updates its
bookkeeping, and *eviction logic*, which answers "which way of set *s*?"
combinationally. The response (`l2_resp_t`) appears one cycle after acceptance.
Counters (`l2_stats_t`) count hits, misses, evictions, write-backs and cycles
spent waiting.

PLRUm and EBR update in one cycle, so the controller accepts a request every
cycle. Mockingjay's update takes several cycles; while its `busy` is high the
controller holds `req_ready` low and the next request waits. On typical
single-core traffic this costs little because requests arrive far apart, but
it is a real throughput limit under back-to-back requests.

Not modelled: the data array, the CPU-side packet protocol, the AXI memory
side, atomics, coherence and the disabled-L2 bypass path.

## PLRUm (`plrum_repl`)

Each line has one MRU bit, all clear after reset. An access (hit or fill) sets
the line's bit. If that would leave every bit of the set set, all the others
are cleared instead, so the set always has at least one candidate. The victim
is the lowest-numbered way whose bit is clear. In practice this tracks
"recently used" closely while costing one bit per line instead of a full LRU
order.

## EBR (`ebr_repl`)

Each line has a 5-bit saturating **R** counter (how often it was referenced)
and a 3-bit saturating **E** counter (how long since its last reference, in
coarse units); each set has a 2-bit wrapping **miss counter**.

* hit: R += 1, E = 0;
* miss: the set's miss counter advances; when it wraps (every 4th miss in the
  set) every E of the set is incremented. The filled line then starts with
  R = 1 (its old count is discarded, the fill counts once) and E = 0.

The victim is the way with the lowest effectiveness r·R/(f·E). The weights are
static: f = 1 and r = 8 by default (`R_WEIGHT`); r = 2 is the other setting
worth trying, and powers of two keep the multiply a shift.

Two implementation points are worth knowing:

* **No divider.** Two effectivenesses are compared exactly by cross
  multiplication, r·R(a)·f·E(b) < r·R(b)·f·E(a). A line with E = 0 was just
  used and counts as infinitely effective. Every way is compared with every
  other (56 small comparisons for 8 ways), giving a mask of all ways that tie
  for the minimum.
* **Random tie-break.** Ties are common (every recently touched line has
  E = 0). A free-running 16-bit LFSR picks a starting way and the first
  minimum at or after it, wrapping around, is the victim.

## Mockingjay (`mockingjay_repl`)

Mockingjay tries to imitate Belady's optimal policy ("evict what will be needed
furthest in the future") by learning reuse distances. The reuse distance of an
access is measured in accesses to its set between two touches of the same
line. It is learned per *PC signature* (the instruction that touched the line)
rather than per address, so one load instruction's behaviour generalises to
all the lines it touches.

### State

| Structure | Size | Content |
|---|---|---|
| sampled cache | 256 sets × 5 ways | valid, 10-bit partial tag, 11-bit PC signature, 8-bit timestamp |
| reuse distance predictor (RDP) | 2048 entries | valid, 6-bit predicted reuse distance, indexed by signature |
| ETR counters | 8192 (one per L2 line) | signed 4-bit estimated time remaining |
| set timestamps | 1024 × 8 bits | advanced on each access to a sampled set |
| ETR clocks | 1024 × 3 bits | advanced on each access to the set |

Only every 32nd L2 set (set[4:0] = 0) is *sampled*, i.e. logged in the sampled
cache; the 32 sampled sets each own 8 sampled-cache sets, selected by the low
3 tag bits. The PC signature is an 11-bit hash of the PC, the hit/miss bit and
the core ID (`repl_pkg::mj_pc_signature`, an XOR fold).

Key constants: INF_RD = 63 (largest 6-bit distance, meaning "not reused"),
MAX_RD = 53 (any prediction above it counts as infinite), INF_ETR = 7.

### What an update does

For every L2 access (hit or fill) the FSM walks these states, one per cycle:

1. **IDLE** – take the access, compute its signature, and go to step 2 for a
   sampled set or straight to step 7 otherwise.
2. **SC_SEARCH** – look the address up in the sampled cache. If it is there,
   the time since it was logged is `timestamp(set) − stored timestamp`
   (8-bit modular).
3. **RDP_TRAIN** – if that time is at most INF_RD: an invalid RDP entry of the
   *stored* signature is set to it; a valid one is moved one step towards it
   when the two differ by 16 or more (a temporal-difference update with rate
   1/16).
4. **SC_LRU** – look for sampled lines older than MAX_RD. Such a line was not
   reused in time, so its signature is a "scan" signature.
5. **DETRAIN** – for one such line, set its signature's RDP entry to INF_RD and
   invalidate the line; back to step 4 until none is left. Then choose where
   the new entry goes: the way the address was found in, else an invalid way,
   else the oldest line.
6. **SC_WRITE** – write {tag, signature, current timestamp}; advance the set's
   timestamp.
7. **ETR_RD** – read the RDP prediction for the access's signature.
8. **ETR_WR** – set the accessed line's ETR to prediction / 8, or to INF_ETR if
   there is no valid prediction or it exceeds MAX_RD. Advance the set's ETR
   clock; when it wraps (every 8 accesses) every other ETR of the set counts
   down by one. ETRs at +INF_ETR stay there, and negative ETRs stop at −7.

An ETR counts down as the set is used. A negative value means the line is
overdue: it was predicted to be reused by now and was not.

**Victim:** the way with the largest |ETR|: either far in the future or long
overdue. On a tie the lowest way wins.

**Timing:** after the accepting edge, `busy` stays high for 2 cycles for a
non-sampled set and for 5 cycles for a sampled set (6 if the RDP was trained),
plus 2 per expired sampled line.

## Comparing the policies (`l2_repl_top`)

The top instantiates `l2_tag_ctrl` three times (index 0 PLRUm, 1 EBR,
2 Mockingjay) on one request port. A request is accepted by all three in the
same cycle, so the shared `req_ready` is the AND of the three (in practice
Mockingjay's). Responses and counters come out per copy, plus
`stall_cycles` for the shared input. Running the three in lock-step is a
measurement arrangement; a product would pick one policy (`l2_tag_ctrl`'s
`POLICY` parameter).

## Choices made where the algorithms leave freedom

These are this implementation's decisions and are the first things to revisit
when matching another model:

* PC hash function, sampled-set rule (set[4:0] = 0) and the sampled-cache
  index/tag split ({set[9:5], tag[2:0]} / tag[12:3]).
* Temporal-difference rule (±1 step when the error is ≥ 16), training only when
  the measured distance fits in 6 bits, detraining to INF_RD when a line
  passes MAX_RD.
* No bypass: Mockingjay always inserts the missing line.
* EBR compares exactly instead of dividing, treats E = 0 as infinite, starts a
  filled line at R = 1, and uses a rotating LFSR start for tie-breaks.
* The controller fills invalid ways first, is write-allocate, and uses a
  40-bit address and a valid/ready handshake.
* Reset clears all replacement state at once (a loop in the reset branch),
  which is simple to simulate but large in flip-flops. A silicon version
  would keep these arrays in SRAM and clear them with a sweep.

## Storage cost

| | bits |
|---|---|
| PLRUm MRU bits | 8 192 |
| EBR R / E / miss counters | 40 960 / 24 576 / 2 048 |
| Mockingjay sampled cache / ETR / ETR clocks / timestamps / RDP | 38 400 / 32 768 / 3 072 / 8 192 / 14 336 |
| L2 tags + valid + dirty (per copy) | 1024 × 8 × (25 + 2) = 221 184 |

## Files

| File | Content |
|---|---|
| `rtl/repl_pkg.sv` | geometry constants, `policy_e`, `l2_resp_t`, `l2_stats_t`, PC hash |
| `rtl/plrum_repl.sv` | PLRUm unit |
| `rtl/ebr_repl.sv` | EBR unit |
| `rtl/mockingjay_repl.sv` | Mockingjay unit |
| `rtl/l2_tag_ctrl.sv` | L2 tag controller with one selectable unit |
| `rtl/l2_repl_top.sv` | three controllers side by side |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench has its own reference model and prints
`TB_RESULT checks=N failures=M`:

* `plrum_repl_tb`, `ebr_repl_tb`: bit/counter models; every victim is checked
  (EBR: against effectiveness computed in floating point), and the tests
  require MRU clears, miss-counter wraps, counter saturation and randomised
  ties to have occurred. `ebr_repl_r2_tb` repeats the EBR test with r = 2.
* `mockingjay_repl_tb`: a full behavioural model of the sampled cache, RDP,
  ETRs, timestamps and clocks with its own hash. It checks the victims and the
  exact number of busy cycles of every update, and requires RDP training,
  detraining, sampled-cache LRU replacement, ETR clock wraps and negative ETRs
  to have occurred.
* `l2_tag_ctrl_tb`: every response field and the counters, with PLRUm and
  back-to-back requests.
* `l2_repl_top_tb`: the full-size design (no parameter overridden) on two
  benchmark-like streams generated in the testbench: a 25 000-element vector
  add and 50 000 LFSR-indexed stores to a 50 000-element array. Every response
  of every copy is checked against a policy-independent model of what the
  cache holds. The run takes about a second.

* `l2_repl_bench_tb`: the full-size design on the address streams of seven
  small bare-metal kernels: median filter, 100×100 matrix multiply, vector
  add, element-wise multiply, quicksort, radix sort and sequential LFSR
  stores. Their data set sizes are 10 000 to 50 000 8-byte elements. The
  loads are filtered by a behavioural model of the 32 KiB write-through L1
  data cache. The same content check is applied, and about seven seconds of
  simulation cover 3.4 million cycles.

On these streams the three policies come out close. Vector add: PLRUm and
Mockingjay 62.5 %, EBR 60.9 %. Matrix multiply: EBR and Mockingjay 98.44 %,
PLRUm 98.27 %. Quicksort of 25 000 8-byte elements fits in the 256 KiB L2 and
evicts nothing. These synthetic streams are not a ranking of the policies.
Real programs add instruction fetches and stack traffic that these kernels
leave out.

What is not verified: behaviour against a reference software model of
Mockingjay or EBR from elsewhere (the models here encode the same choices as
the RTL), real CPU traffic, and synthesis timing of EBR's all-pairs comparison
and the large reset fan-out.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/repl_pkg.sv tb/l2_repl_top_tb.sv \
          --top-module l2_repl_top_tb -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

Replace `l2_repl_top_tb` with any other testbench name. The unit testbenches
override `SETS` to small values (16 or 64) to get many evictions quickly. The
package must come first on the command line.
