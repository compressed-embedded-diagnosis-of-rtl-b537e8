# Compressed embedded diagnosis of scan-based logic cores

Diagnosing a failing logic core normally needs a wide tester interface. The
tester has to supply full scan patterns and compare every unloaded scan cell
against the expected value it has stored. Embedded memories have long avoided
this: a cheap tester starts a BIST engine that generates the expected data
and compares it on chip, and only failures travel back. This RTL applies the
same idea to a logic core with test data compression:

* A diagnosis pattern (one pattern per suspected fault) and its fault-free
  response are mostly don't-cares (X). Only a few input cells must be set,
  and only a few output cells carry the fault effect.
* One linear decompressor produces two things in the same clock: the next
  pattern for the scan chains, and the **expected response** of the pattern
  now being unloaded. This is why the phase shifter has 2n outputs for n
  chains.
* A **mask** that changes from shift to shift removes every scan cell that
  does not capture the targeted fault. It is applied to the scan outputs and
  to the expected values alike. The comparator therefore sees care bits only.
* A combined **comparator/MISR** flags mismatches in diagnosis mode and works
  as an ordinary signature register in BIST mode.

The tester needs only four pins: Data, Mask and Stall in, Result out.

## Block diagram

```
 data_in ─► input_shift_register (R bits, shifts every clock)
                     │
                     ▼
              phase_shifter (2n XOR outputs)
               │ scan_in[n]          │ expected[n]
               ▼                     │
        scan_chains (n × L) ◄── core_resp (capture)
               │ scan_out[n]         │
               ▼                     ▼
             x_filter:  t = scan_out & mask,  d = expected & mask
                     │ t, d
                     ▼
             comp_misr ──► result (q[0]), failure_detect, cmp_q

 mask_in ─► mask_code_register (K bits) ─► mask_memory (2^K × n) ─► mask
            (MASK_CODED = 1, default)
 mask_in ─► mask_register (n bits) ─────────────────────────────► mask
            (MASK_CODED = 0)
 stall   ─► clock enable of scan_chains and comp_misr
```

`ced_top` wires these blocks together. The core logic stays outside: `cells`
drives it and `core_resp` brings its response back for capture.

## Clocking, stalls and the scan slot

This part needs the most care when you prepare test data.

There are two groups of registers:

* **Free-running** on every clock: the input shift register and the mask (or
  mask code) register. Each clock shifts in one new Data bit and one new Mask
  bit.
* **Stall-gated**: the scan chains and the comparator/MISR. They move only
  in a cycle with `stall = 0`. The architecture draws a gated clock
  (`Clock AND NOT Stall`); here it is a clock enable.

A *slot* is a cycle with `stall = 0`. In a shift slot (`scan_en = 1`) all
chains shift once. At the same edge the bits leaving the chains are ANDed
with the mask held in that cycle and compared, or compacted into the MISR.
In a capture slot (`scan_en = 0`) the chains load `core_resp`. The mask
applied in a capture slot must be all 0, so nothing is compared. The
stall cycles between two slots feed in extra Data bits and Mask bits while
the scan chains wait. They serve two purposes:

1. **Decompression lockout.** Every care bit, whether a pattern bit being
   loaded or an expected bit being unloaded, is a GF(2) linear equation on
   the recent Data bits, through the phase-shifter taps. If the equations of
   a slot cannot be satisfied, each stall cycle adds one fresh variable.
2. **Mask loading.** The mask register shifts right on every clock: a new
   bit enters at bit n-1 and moves towards bit 0 (chain 0, the "top"
   chain). A slot needs c clocks after the previous slot when the new mask
   equals the old one shifted by c positions with c new bits on top. So c-1
   stall cycles are needed, between 0 and n-1. Example with 4 chains
   (masks written chain 3 … chain 0): going from `0000` to `0010` passes
   through `1000` and `0100`, i.e. two stalls. A lone 1 in bit 0 after an
   all-0 mask costs n-1 stalls.

Mask-loading stalls grow with the number of chains, and they cancel much of
the scan time that extra chains should save. That is the motivation for the
coded mask path.

## Coded masks and memory sessions

A whole diagnosis test set uses relatively few distinct masks: hundreds to a
few thousand, even for 64 chains. So the n-bit mask register can be replaced
by a K-bit **mask code register**, K = ceil(log2 m) for m masks, which
addresses a **mask memory** holding the masks. Code bits are shifted in
exactly like mask bits, so a new code costs 0 to K-1 stalls. K does not
depend on the chain count.

The hardware is the same for all three ways of using it. Only the code
assignment and memory contents differ. That assignment is done off line and
is not part of this RTL.

* **One code per mask.** m words are used.
* **Several codes per mask.** Spare words hold copies of frequent masks, so
  the encoder can pick whichever code overlaps best with its neighbours.
* **Memory too small for all masks** (2^K < m). The test set is split into
  sessions whose masks fit. The memory is rewritten through `mem_we`,
  `mem_waddr` and `mem_wdata` between sessions, and a code may mean
  different masks in different sessions. Code 0 should hold the all-0 mask:
  the code register resets to 0, and every capture slot needs that mask.

The encoder in the bench gives a spare word to a mask that already has a
code whenever that avoids stalls and enough free words remain for the masks
still to come.

`mask_memory` has a registered read. To make the mask available in the same
cycle as the code, the memory is addressed with the code register's *next*
value (`code_next`), so `mask` always equals `mem[code_q]`.

## Comparator / MISR

Stage i has a 2:1 multiplexer, an XOR with the filtered scan output `T[i]`,
and a flip-flop.

* `bist_mode = 0` (diagnosis): `q[i] <= D[i] ^ T[i]`, where D is the
  filtered expected value. The register holds the mismatch vector of the
  last compared shift. `failure_detect` is the OR of that vector.
* `bist_mode = 1` (BIST): `q[i] <= q[i+1] ^ T[i]`, and the top stage takes a
  feedback XOR. This is an n-bit MISR. `failure_detect` is held low.

`result` is `q[0]`, as drawn in the original architecture. `cmp_q` brings out
the whole register for a fail-data streaming engine, which records the
failing shift and chains. That engine is not part of this RTL. Because the
register is stall-gated, `cmp_q` and `failure_detect` keep their value
through the stall cycles that follow a slot. A consumer should sample them
once, in the cycle after each slot. `bist_mode` is meant to be static; an
assertion in `ced_top` reports a change outside reset.

## Preparing test data

The tester streams are computed off line. For every slot, in order, the
encoder:

1. finds the smallest number of clocks c after the previous slot at which
   the mask register (or code register) can hold the required mask (or one
   of its codes), given the bits already committed;
2. adds that slot's equations to an incremental GF(2) elimination. These are
   the loaded care bits on `scan_in[i]`, which reach cell L-1-s at shift s,
   and the unloaded expected care bits on `expected[i]`. Channel j at cycle t
   is the XOR of `data_in` from cycles t-1-tap for its three taps. If the
   equations contradict, it tries c+1;
3. fills the free Data and Mask bits at random, and back-substitutes.

`tb/ced_bench.sv` contains exactly this encoder. It is a usable reference
for the stream format.

## Parameters

| Parameter | Default | Meaning | Origin of the default |
|---|---|---|---|
| `N` | 64 | scan chains | largest chain count in the evaluation (16–64) |
| `L` | 27 | cells per chain | 1728 flip-flops of the largest benchmark core (s35932) over 64 chains |
| `R` | 32 | input shift register bits | own choice |
| `K` | 12 | mask code bits, memory of 2^K words | own choice; covers the ~3300 masks reported for s38584 at 64 chains |
| `MASK_LINES` | 1 | Mask tester lines | single Mask channel of the architecture |
| `MASK_CODED` | 1 | 1: code register + memory, 0: n-bit mask register | coded path is the proposed one |

The phase-shifter taps and the MISR feedback taps are fixed rules in
`rtl/ced_pkg.sv`. Output j of the phase shifter, with q = j / R and
t0 = j mod R, XORs register bits t0, (t0+1+q) mod R and (t0+4+3q) mod R. MISR
taps come from a table of maximal-length LFSR tap sets for 4, 8, 12, 16, 24,
32, 40, 48, 56 and 64 stages; other widths fall back to (n, n-1). In the
table's orientation, tap t reads `q[n-t]`.

Evaluated configurations at the default size:

* s38417 (1636 flip-flops, ~650 masks at 64 chains) fits.
* s38584 (1426 flip-flops, ~3300 masks) fits.
* s35932 (1728 flip-flops, ~200 masks) fits.

Memories of 32–512 words correspond to K = 5…9. With only 32 words, s38584
cannot be encoded, because single patterns need more than 32 masks.

## Where this RTL follows the architecture and where it chooses

Follows the architecture:

* the data path of the diagnosis architecture;
* double-width phase shifter;
* AND-gate X filter on both the response and the expected side;
* mask register loaded one bit per clock, with the stall behaviour above;
* mask code register feeding a memory;
* comparator/MISR stage structure, and `result` as bit 0;
* the three input channels and one output channel.

Own choices, documented in each file's header:

* the exact XOR taps of the phase shifter;
* the MISR feedback taps;
* the input register length;
* a plain shift register as the decompressor, not a ring generator;
* a clock enable instead of clock gating;
* synchronous active-low reset;
* the memory's synchronous read and write port;
* channels 0…n-1 of the phase shifter feed the scan inputs and n…2n-1 are
  the expected values;
* `failure_detect` held low in BIST mode;
* chain length and code width.

Not included:

* the core logic, which is a port boundary;
* the SoC test controller, which drives `bist_mode`, `scan_en` and memory
  writes;
* the fail-data streaming engine behind `result` and `failure_detect`;
* the off-line heuristics that assign codes and partition sessions.

## Verification

Every block in `rtl/` has a self-checking testbench `tb/tb_<block>.sv`. Each
ends by printing `TB_RESULT checks=… failures=…`. They run against reference
models written independently: shift-register queues, the tap rule re-derived
in the bench, a hand-written 4-bit MISR, and the worked 4-chain mask
example.

End to end, `tb/ced_bench.sv` draws random diagnosis patterns, encodes them
as described above, and applies them. Its core model gives response cell
(i,j) = cell(i,j) XOR cell(i+1, j+1). It injects faults, some on care bits
and some on X positions. In every slot it checks:

* the applied mask;
* the loaded care bits at each capture;
* the comparator register and `failure_detect`. They must flag exactly the
  faults on care bits, at the right shift and chain, and never the faults on
  X positions.

A final BIST-mode run is checked against a MISR model. The bench also counts
each mechanism and fails if one never happened: mask-load stalls, lockout
stalls, captures, detections, filtered X faults, memory sessions and BIST
compaction.

* `tb/tb_ced_top.sv` runs 8 chains × 6 cells twice on the same 8 patterns.
  The coded run uses an 8-word memory, which forces two sessions. The
  uncoded run uses the mask register. The coded run must be faster: 120
  clocks, reloads included, against 182.
* `tb/tb_ced_top_full.sv` runs the default 64 × 27 configuration with ten
  patterns in one session, then BIST. Spare memory words must be used as
  extra codes for masks that already have one (141 in this run).
* `tb/tb_scan_time.sv` is the scan-time workload. The same synthetic test
  set runs uncoded, coded, and coded with a 64-word memory. Both chain
  counts have about 1650 scan cells, the size of the benchmark cores. Coded
  must beat uncoded at both chain counts.

  Ratio of single-chain scan time to measured scan time:

  | Configuration | Uncoded | Coded | 64-word memory |
  |---|---|---|---|
  | 16 × 103 | 8.0 | 13.9 | — |
  | 64 × 27 | 4.8 | 49.2 | 34.3 |

  This matches the trend reported for the architecture. Without coding,
  mask loading wipes out the gain from more chains. With coding the gain
  grows with the chain count. A small memory costs a little more because of
  the reloads. The test sets here are sparser than real ATPG diagnosis
  patterns, so the absolute ratios are higher than those reported.

* `tb/tb_mask_lines.sv` applies the 64 × 27 test set uncoded, with the mask
  register driven by 1, 2 and 4 Mask lines (`MASK_LINES`), and once coded on
  2 lines. More lines must mean fewer clocks: 3257, 1801 and 1054 clocks
  (ratios 4.8, 8.6 and 14.8), against 330 clocks coded. Extra mask lines
  buy back scan time only by adding tester channels. The coded path gets
  further with a single line.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/ced_pkg.sv tb/tb_ced_top.sv --top-module tb_ced_top -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` for any other bench.
`ced_pkg.sv` must come first, because every module takes its defaults from
it.
