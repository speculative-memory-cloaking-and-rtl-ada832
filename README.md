# Speculative memory cloaking and bypassing

A large share of loads read a value that a store wrote only a short while
earlier. In an ordinary out-of-order core that value reaches the load by the
slow route. The load must first compute its address. It must then pass
disambiguation against older stores. Finally it reads the store buffer or the
data cache, even though the value may have been available for a long time.

This RTL shortens that route by predicting memory dependences.

* **Cloaking.** When a store and a load are predicted to be dependent, they
  share a *synonym*: a short name for their dependence. The store leaves its
  value under that name and the load picks it up as soon as both are
  decoded. No address is needed.
* **Bypassing.** If the store is still in the instruction window, the load
  does not even wait for the store. It learns which register the store takes
  its data from, i.e. the output of the store's producer (DEF). The load's
  consumer (USE) then links straight to DEF, so DEF-store-load-USE becomes
  DEF-USE.

Both are speculation. Every load still reads memory, and its value is
compared with the value it received early. Consumers are told to re-execute
only if they used a wrong value.

The unit sits beside a host out-of-order core. The core does fetch, rename,
scheduling, execution, commit and the re-execution of mispeculated consumers.
This unit makes the predictions and keeps the state behind them.

## Structures

| Structure | Module | Default size | Entry |
|---|---|---|---|
| Dependence prediction and naming table (DPNT) | `dpnt` | 4096 entries, 2-way | PC tag, 2-bit predictor, synonym, valid |
| Synonym file (SF) | `sf` | 1024 entries, 2-way | name, 32-bit value, full/empty, valid |
| Synonym rename table (SRT) | `srt` | 128 entries, fully associative | synonym, reservation station, source-register name, valid |
| Dependence detection table (DDT) | `ddt` | 128 words, fully associative | word address, store PC, valid |
| Verification | `verify_unit` | 4 lanes | - |
| Speculative register names | `spec_name_map` | 32 registers | valid, name |

Every structure accepts 4 accesses per cycle, one per lane. Lanes are in
program order, lane 0 oldest. A lane always sees the effects of older lanes
in the same cycle, so a group of four behaves exactly as four instructions
taken one at a time. The block testbenches check this rule against reference
models that apply the lanes one by one.

Synonyms are 12 bits wide. Addresses, PCs and values are 32 bits
(a MIPS-like machine). Reservation-station and register names are 7 bits, to
name a 128-instruction window.

## The life of a dependence

1. **Detection, at commit.** Every committing store records
   (word address → store PC) in the DDT. Every committing load looks up its
   own word. A hit means that store produced the load's value, and the pair
   (store PC, load PC) is a detected dependence. When the DDT is full, the
   oldest recorded word is forgotten first.
2. **Naming, at commit.** The pair goes to the DPNT, which gives both
   instructions a common synonym (next section).
3. **Prediction, at fetch/decode** (`d_*` in cycle t). Loads and stores read
   the DPNT by PC. A hit returns the synonym, plus a bit that says whether
   cloaking should be used.
4. **Store at rename** (cycle t+1). A predicted store does two things. It
   creates a new, empty version of its synonym in the SF. It also maps the
   synonym in the SRT to its reservation station (`d_rs`) and to the current
   name of its data source register (`d_src_ptag`, called TAG1 below).
5. **Load at rename** (cycle t+1, `r_*`). A load with a synonym looks it up:
   * If the SRT has the synonym, the store is in flight. The result is
     `r_src = SRC_BYPASS`, with `r_spec_tag = TAG1` and the store's station
     in `r_rs`. The load's destination register gets TAG1 as a second,
     speculative name. Any younger instruction reading that register sees it
     on `r_src_spec_valid` / `r_src_spec_tag`. An instruction in the same
     group sees it as well.
   * Otherwise, if the SF entry is full, the result is `r_src = SRC_SF` and
     the value is on `r_value`.
   * Otherwise the result is `SRC_NONE`: the value does not exist yet.
   `r_predict` says whether the core may hand the value to consumers. When the
   predictor has backed off, the value is still reported. The core can then
   check it in the *shadow*: compare it, but not use it.
6. **Verification** (`v_*` → `o_*` one cycle later). When the load has read
   memory, the core presents four things: the speculative value, the memory
   value, whether the value was used or shadowed, and whether a consumer read
   it. `o_outcome` is correct or wrong. `o_mispec` asks for consumer
   re-execution, and only for a used, consumed, wrong value.
7. **Commit** (`c_*`). A store that created a synonym version (`c_cloaked`)
   writes its value into the SF, marks it full, and releases its SRT mapping.
   The release only happens if the mapping still names that store's station,
   because a younger instance may have replaced it. In the same cycle each
   committing load probes the DDT and trains the DPNT with any detected
   dependence and its own outcome.

The SF version is created empty at decode and filled at commit. While the
store is in flight, the SRT points past the SF to the store itself. One
consequence follows: with bypassing, the value reaches USE when DEF computes
it, not when the store commits.

## How synonyms are assigned

A load can have several producing stores, for example two stores on the two
sides of an if/else. A store can also have several consumers. Predicting
exact pairs would mean choosing among many. Instead, each instruction carries
one synonym that stands for *all* its dependences. The store instance that is
actually in flight when the load is renamed decides which value the load
gets, much as register renaming does.

For each detected (store, load) pair, the DPNT does this:

* neither has a synonym: take a fresh one from a 12-bit counter (`ev_new_syn`);
* only one has a synonym: give it to the other;
* both have different synonyms: give **the smaller** to both (`ev_merge`).

Under this rule, groups of related loads and stores converge on one name
without broadcasting a rename to the whole table. The counter wraps. A
synonym reused while still live only causes wrong predictions, and
verification catches those.

Only one version of a synonym can be named at a time. If a second instance of
the same store is renamed before the load of the first instance, the load sees
the newer one. Dependences of that kind (e.g. `a[i] = a[i-2] + c`) are not
handled and show up as wrong values.

## The predictor

Each load entry carries a 2-bit state. Cloaking is used in states 2 and 3.

| Event | New state |
|---|---|
| entry created by a detected dependence | 2 (use the next time) |
| verified correct | state + 1, saturating at 3 |
| verified wrong | 0 |

A load in state 0 or 1 keeps its synonym and is checked in the shadow. Two
correct shadow checks bring it back to state 2. Store entries are created in
state 3 and do not change.

The DPNT has four update ports, one per commit lane. They are applied in
program order within the cycle. An update can therefore use a synonym that an
older lane created or merged in the same cycle, and a group of four commits
trains the table exactly as four single commits would. The load and the store
of one update never evict each other's entry. A later lane may still evict an
entry that an older lane wrote in the same cycle.

## Interface of `cloak_unit`

All ports are per lane (`LANES` = 4) unless noted otherwise.

| Group | Direction | Content |
|---|---|---|
| `d_valid, d_op, d_pc` | in | decoded instruction: kind (`OP_OTHER/LOAD/STORE`), PC |
| `d_rs, d_src_ptag` | in | store: its reservation station; name of its data source register |
| `d_has_dst, d_dst_reg, d_src_reg[2]` | in | architectural registers (every instruction, for the speculative name map) |
| `r_valid, r_op, r_has_syn, r_syn, r_predict` | out | cycle t+1: synonym and prediction (stores: `r_predict` = version created) |
| `r_src, r_value, r_rs, r_spec_tag` | out | loads: source of the speculative value |
| `r_srt_ok` | out | store got an SRT mapping |
| `r_src_spec_valid, r_src_spec_tag` | out | speculative names of each source register |
| `v_valid, v_kind, v_spec, v_mem, v_consumed` | in | verification request |
| `o_valid, o_outcome, o_mispec` | out | one cycle later |
| `c_valid, c_op, c_pc, c_addr, c_value` | in | committing instruction |
| `c_cloaked, c_syn, c_rs, c_outcome` | in | carried from `r_predict`/`r_syn` (stores) and `o_outcome` (loads) |
| `flush` (1 bit) | in | squash: drops the rename stage, all SRT mappings and all speculative names |
| `ev_dep_detect`, `ev_new_syn`, `ev_merge` (all per lane) | out | event strobes |

The core has four duties. It carries `r_syn`, `r_predict` and the outcome of
each instruction to its commit. It fetches the bypassed value from the
producer named by `r_spec_tag`. It presents `v_*` once the load has read
memory. It re-executes consumers on `o_mispec`. After a flush, the squashed
instructions must be presented again.

## Choices made in this implementation

The method fixes the structures, their fields and sizes, the order of events,
the smallest-synonym merge and the adaptive predictor's behaviour ("used the
next time; after a mispeculation two correct predictions are needed"). The
following points are this design's own choices:

* the exact predictor states above, including shadow checks of loads that
  were not cloaked;
* bypassing every load whose store is found in the SRT; the SF is used only
  when the store has committed;
* a one-cycle rename stage after the DPNT read;
* a one-cycle verification latency;
* probing the DDT when loads commit; probing when they access memory would
  also work, but commit keeps wrong-path loads out of the tables;
* only a store that created a synonym version writes the SF and releases an
  SRT mapping at commit; all stores still record their address in the DDT;
* replacement policies: FIFO for the DDT; invalid way first, then per-set
  round robin, for the DPNT and SF;
* an SRT that is fully associative and, when full, leaves the store unrenamed;
* flush behaviour;
* all widths.

Left out on purpose:

* stores passing on a speculative source name (bypassing across several
  memory dependences);
* merging the DPNT with the SF, or the SF with the register file;
* a bypass-only variant without an SF;
* loads whose data comes from several stores of different sizes.

## Not included

The host core (an 8-wide, 128-instruction window in the evaluated system),
its caches and memory, and the mechanism that re-executes consumers. The
re-execution can be a full squash or selective invalidation. The unit's ports
are the interface to all of these.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ddt` | random commit groups against an ordered-list model, including FIFO eviction and same-cycle forwarding |
| `tb_dpnt` | random groups of four updates against a per-PC model applied lane by lane: synonym allocation, merge to the smaller, predictor states, strobes; set replacement |
| `tb_sf` | random writes/allocations/reads against a per-synonym model, same-cycle ordering; replacement |
| `tb_srt` | allocation, overwrite, release (only for the matching station), full table, flush, same-cycle visibility |
| `tb_verify_unit` | outcome and consumer notification for every combination of kind, consumed flag and equality |
| `tb_spec_name_map` | speculative names through random rename groups and flushes |
| `tb_ddt_sizes` | detection table at 32, 128, 512 and 2048 words on one stream of store-to-load distances: each load is found exactly when its store is within the table's reach; prints the fraction detected per size |
| `tb_cloak_unit` | end to end at the default sizes (see below) |

`tb_cloak_unit` plays the host core. It decodes 4 instructions per cycle,
verifies 4 cycles after decode and commits 6 cycles after decode. Its loop
body has one kernel per mechanism:

* a store read immediately (bypassing, including USE seeing DEF's name);
* a store read 60 instructions later (SF);
* two alternating producers of one load;
* a merge of two synonyms;
* a producer that sometimes writes elsewhere (mispeculation, back-off,
  shadow checks, recovery);
* one store read by 28 loads (four DPNT updates in one cycle);
* a flush in the middle of the run.

It checks the one-cycle response latency, every load's outcome and
notification, and the bypass names. It also requires three things of the
kernels that should be stable: after warm-up, no wrong value is used, and at
least half of their loads are covered. Finally, it requires each mechanism
to occur at least once.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cloak_pkg.sv tb/tb_cloak_unit.sv --top-module tb_cloak_unit -o sim
./obj_dir/sim
```

For the block testbenches, use the block's file and its testbench in the same
way, for example `rtl/ddt.sv tb/tb_ddt.sv --top-module tb_ddt`.
`verify_unit` and `dpnt` also need `rtl/cloak_pkg.sv`. The block testbenches
shrink the tables (8 to 16 entries) so that replacement and full conditions
occur. `tb_cloak_unit` uses every default.

## Size

Coarse synthesis of `cloak_unit` at the defaults gives the following:

* about 17k word-level cells;
* 511 flip-flop bits outside the tables;
* about 191k bits of table storage, most of it the DPNT (4096 × 34 bits)
  and the SF (1024 × 36 bits).

The fully associative DDT and SRT are the most expensive parts in logic.
Each is a 128-entry CAM searched by 4 lanes.
