# Configuration layers with quick-drop LRU (qdLRU) for the Grid ALU Processor

The Grid ALU Processor (GAP) runs an ordinary sequential instruction stream on
a two-dimensional array of functional units (FUs). A configuration unit in the
front-end maps instructions onto the array at run time: each array column
stands for one architectural register, and each row one step of data
dependence. When a branch is mispredicted, or execution reaches the last
configured row, the array is flushed and mapping starts again. The mapping
built up to that point is a *configuration*.

Every FU has a small memory holding its part of several configurations. These
*configuration layers* work like a trace cache. Before mapping anything new,
the processor checks whether the next instruction is the first instruction of
a stored layer. If it is, that layer is switched in and runs at once. The
front-end is bypassed, so no instruction-cache miss can occur.

With LRU replacement the layers suffer badly from one common pattern: a loop
whose body spans more configurations than there are layers. Each
configuration is evicted just before it is needed again, so after the first
iteration every access misses.

qdLRU ("quick drop LRU") fixes this with a hint from software. A profiling
pass over a trace of configuration start addresses finds such loops. In each
loop it picks enough configurations that the remainder fits into the layers,
and flags the first instruction of each picked configuration. In hardware the
only change to LRU is this: a configuration whose first instruction carries
the flag goes into the queue at the *least* recently used position, not the
most recently used one. It is therefore the next one evicted. The unflagged
part of the loop stays resident and hits on every iteration.

Take a loop of 48 configurations on 32 layers. 17 configurations are flagged.
The other 31 keep their layers, and the 32nd layer cycles through the flagged
ones. The layer hit rate becomes 31/48 ≈ 0.65, the best any policy can do for
this pattern. Plain LRU gets 0.

A program without flags runs exactly as it would under LRU.

This repository contains the configuration layer subsystem: lookup, qdLRU
replacement, the per-FU layer storage and hit statistics. It does not contain
the rest of the processor (front-end, configuration unit, ALU datapath,
branch and load/store units), which connects through the top-level ports.

## Access classes

Every time the array is about to be (re)configured, the front-end presents the
address of the next instruction (`acc_addr`) and that instruction's
drop-quickly flag (`acc_drop`). `layer_ctrl` sorts the access into one of
three classes (`gap_cfg_pkg::acc_kind_e`):

| class | condition | effect |
|---|---|---|
| loop hit (`ACC_LOOP_HIT`) | same address as the previous access | nothing changes, not even the replacement order |
| layer hit (`ACC_LAYER_HIT`) | address equals the start address of a valid layer | that layer becomes active; it moves to the MRU position unless it is flagged (see below) |
| miss (`ACC_MISS`) | neither | a layer is chosen, cleared, tagged with the new start address and made active; the configuration unit then fills it |

The start-address comparison is fully associative: `layer_tag_cam` has one
comparator per layer, and it also stores each layer's valid bit and flag.
Loop hits are counted separately. They do not depend on the number of layers
or on the policy, because a loop that stays inside one configuration never
touches the replacement logic.

### Timing

```
cycle      0            1                         2            3 ...
acc_*      addr, drop   (next access allowed)
resp_*                  kind, layer, evict, quick
active_layer            new layer
clr_en                  1 (miss only)           layer cleared
cu_wr_*                 FU words may be written into active_layer, one per cycle
fu_cfg                                          active layer's words (registered)
```

One access can be issued every cycle, and there is no back-pressure. On a
miss, a write issued in the same cycle as the clear survives the clear.

## The replacement queue and the quick drop

This is the part that needs the closest reading.

`qdlru_order` keeps the LRU queue as one rank per layer. Rank 0 is MRU and
rank `LAYERS-1` is LRU, and the ranks always form a permutation. An update
moves one layer:

* **to MRU:** every layer with a smaller rank moves down by one, and the
  layer takes rank 0. This is ordinary LRU.
* **to LRU:** every layer with a larger rank moves up by one, and the layer
  takes rank `LAYERS-1`. This is the quick drop.

`lru_idx` always names the layer at rank `LAYERS-1`.

`layer_ctrl` chooses a victim on a miss in this order:

1. the lowest-numbered empty layer, if there is one (this only matters after
   reset);
2. with `QD_MODE = 1` only: the flagged layer nearest the LRU end;
3. the LRU layer.

It then moves the victim to MRU, or to LRU if `acc_drop` is set and
`QD_MODE = 0`.

Two points follow from the quick drop but need a decision:

* **A hit on a flagged layer does not promote it** (`QD_MODE = 0`). If it did,
  a flagged member of a large loop could climb back to MRU and push an
  unflagged one out, and the loop would thrash again. Because every new
  flagged configuration replaces the one at the LRU position, at most one
  flagged configuration sits in the layers once they are full. It is always
  the next victim.
* **Cold start.** Empty layers are used first, so flagged configurations seen
  before the layers fill up are kept until then. For the 48-on-32 loop this
  gives one extra hit in the second pass. From then on each pass has exactly
  31 layer hits and 17 misses.

`QD_MODE = 1` is the second hardware form of the same idea: insert every
configuration at MRU, and evict a flagged layer first when a victim is
needed. Both forms fall back to plain LRU when nothing is flagged. The
default is `QD_MODE = 0`.

## Where the flags come from

The flags are computed offline, and no hardware is involved. The procedure,
which is also what the testbench model `qdlru_model_pkg::qdlru_marker` does:

1. **Split the trace into *configuration lines*.** Walk the trace of
   configuration start addresses. Skip immediate repeats. Append each new
   address to the current line. When an address comes up that is already in
   the current line, treat it as a branch back: close the line, count it, and
   start the next line with that address.
2. **Sort the lines.** Lines shorter than the number of layers are *short*;
   the others are *long*.
3. **Flag configurations.** Take the first long line. In it, flag the
   unflagged configuration that appears least often in short lines, weighted
   by how often each line occurred. Every long line whose unflagged part is
   now shorter than the number of layers becomes short. Repeat until no long
   line is left.

A post-link tool then sets the flag bit in the first instruction of each
flagged configuration. The hardware only sees that bit, as `acc_drop`.

## Layer storage

`cfg_layer_array` is the `COLS x ROWS x LAYERS` store: one `fu_cfg_cell` per
FU. Each cell holds `LAYERS` words of `CFG_W` bits, with a valid bit per word.

* A clear (`clr_en`) empties one layer in every FU in a single cycle.
* The configuration unit writes one FU word per cycle into the active layer.
* All FUs read the active layer in parallel, so switching layers
  reconfigures the whole array at once.
* Outputs are registered: they follow a change of active layer, or a write,
  one cycle later.

After a miss, words left over from the evicted configuration read as invalid.

## Statistics

`layer_hit_stats` counts `a_total`, `a_hit`, `a_loop` and `a_layer`, with
`a_hit = a_loop + a_layer`. Software derives three rates from them:

* `h_total = a_hit / a_total`
* `h_loop = a_loop / a_total`, the part no policy can change
* `h_layer = a_layer / a_total`, the part the replacement policy controls

The counters saturate, and `stats_clear` zeroes them.

## Modules and parameters

| file | role |
|---|---|
| `rtl/gap_cfg_pkg.sv` | default sizes, `acc_kind_e` |
| `rtl/gap_config_layers.sv` | top: controller + storage + statistics |
| `rtl/layer_ctrl.sv` | access classification, victim choice, qdLRU insertion |
| `rtl/layer_tag_cam.sv` | start-address tags, valid and flag bits, parallel compare |
| `rtl/qdlru_order.sv` | LRU queue as per-layer ranks, MRU/LRU moves |
| `rtl/cfg_layer_array.sv` | `COLS x ROWS` grid of FU layer memories |
| `rtl/fu_cfg_cell.sv` | one FU's layer memory |
| `rtl/layer_hit_stats.sv` | access counters |

| parameter | default | origin |
|---|---|---|
| `COLS`, `ROWS` | 12, 12 | the GAP evaluation array size |
| `LAYERS` | 32 | GAP uses 2–64; 32 is the size of the worked thrashing example |
| `ADDR_W` | 32 | own choice (32-bit instruction addresses) |
| `CFG_W` | 32 | own choice: the format of an FU configuration word is not defined here |
| `CNT_W` | 32 | own choice |
| `QD_MODE` | 0 | 0 = flagged configurations inserted at LRU, 1 = flagged layers evicted first |

Synthesis at the defaults gives roughly 145 Kbit of layer memory (144 FUs ×
32 layers × 32 bits) and about 5 K flip-flops. Most of those flip-flops are
the per-word valid bits (144 × 32).

## Simulating

All testbenches are self-checking, print `TB_RESULT checks=N failures=M`,
and stop on a watchdog. They run with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gap_cfg_pkg.sv tb/qdlru_model_pkg.sv tb/tb_gap_config_layers.sv \
    --top-module tb_gap_config_layers
./obj_dir/Vtb_gap_config_layers
```

Replace the testbench name to run any of the others:

| testbench | what it checks |
|---|---|
| `tb_gap_config_layers` | whole subsystem at default size; see below |
| `tb_qdlru_workloads` | the thrashing workloads at 1, 2, 16, 32 and 64 layers; see below |
| `tb_layer_ctrl` | both `QD_MODE`s against the model, directed and random accesses |
| `tb_qdlru_order` | ranks and LRU layer against a list model |
| `tb_layer_tag_cam` | search, valid/flag bits, lowest empty layer |
| `tb_fu_cfg_cell`, `tb_cfg_layer_array` | words, clears and reads against array models |
| `tb_layer_hit_stats` | counts, clear, saturation |

`tb/qdlru_model_pkg.sv` is not a testbench. It holds the reference model
used by the controller and top-level testbenches: the controller behaviour
kept as an ordered list (`qdlru_model`), and the offline flag selection
(`qdlru_marker`).

**`tb_gap_config_layers`** runs the whole subsystem at its default size. It
plays the role of the front-end and configuration unit, driving:

* sequential start-up code;
* a small loop with repeated entries;
* a 40-configuration loop with flagged members;
* a random phase.

It maps FU words on every miss and checks all 144 FU words after every
access. It also counts that each mechanism occurred: loop hit, layer hit, fill
of an empty layer, eviction, quick-drop insertion, hit on a flagged layer,
clearing of stale words, and statistics.

**`tb_qdlru_workloads`** runs the thrashing workloads at 1, 2, 16, 32 and 64
layers. Its results:

* **48-configuration loop, 20 passes.** LRU gets 0 layer hits after the first
  pass. qdLRU gets 286/960 layer hits with 16 layers and 590/960 with 32
  (31 per pass). With 64 layers the loop fits, nothing is flagged, and both
  policies reach 912/960. With 2 layers qdLRU keeps one configuration (20/960);
  with a single layer no policy can do anything and both get 0.
* **Program phases** (a small loop alternating with the large one), total hit
  rate:
  * 16 layers: LRU 252/576, qdLRU 328/576.
  * 32 layers: LRU 252/576, qdLRU 408/576.
  * 2 layers: LRU 144/576, qdLRU 168/576.
  * With 16 and 32 layers none of the small loop's configurations is flagged,
    so none of its hits are lost. With 1 layer every hit is a loop hit.

## Limits and departures

* **No processor around it.** Only the configuration layer subsystem is here.
  The front-end, the configuration unit's mapping rules and the FU datapath
  are not. Consequences:
  * The FU word is an opaque `CFG_W`-bit value.
  * Copying column results into the column-top registers when layers switch
    belongs to the array and is not modelled.
  * Processor-level results (IPC) cannot be reproduced. Only hit counts can.
* **Choices the GAP description leaves open:**
  * the one-cycle lookup latency;
  * one write port of one FU word per cycle;
  * clearing by valid bits;
  * filling empty layers first;
  * the rank encoding of the LRU queue;
  * not promoting flagged layers on a hit.

  Change any of these freely.
* **Flag selection is a testbench model.** The offline selection starts each
  new configuration line with the configuration that closed the previous
  one; this reading of the procedure is this design's own. It lives only in
  `tb/qdlru_model_pkg.sv`, because it is software and not part of the
  hardware.
* **The tag compare is an array of comparators.** It is sized for the small
  layer counts the GAP uses (up to 64). A much larger layer count would call
  for a different structure.
