# Statistically partitioned, low-power TCAM for IPv4 lookup

A ternary CAM (TCAM) finds the longest matching prefix of an IP address in one
cycle by comparing the address with every stored entry at once. That parallel
search is also the power problem: every match line is precharged and every
cell is compared on every lookup.

This design saves most of that power by using the prefix-length
distribution of real routing tables. Most prefixes are 24 bits long, and longer
prefixes are rare. So the table is split into **partitions by prefix length**,
and the partitions are **searched one after another**:

* partition 1 holds the long prefixes (by default lengths 24..32) and is
  searched for every lookup;
* partition 2 holds the shorter prefixes and is searched only when partition 1
  found nothing.

A lookup that hits in partition 1 is complete, and partition 2 stays idle for
it: its match lines are not precharged. Because entries are stored longest
prefix first, a hit in partition 1 is always the longest match. For that
reason, stopping early never changes the answer.

A buffer between the partitions keeps the throughput at **one lookup per clock**.
The partitions form a pipeline. A word that misses partition 1 moves into the
buffer, and partition 2 searches it in the next cycle, while partition 1 already
takes the next word. Latency is 1 cycle on a partition-1 hit and 2 cycles
otherwise. Its mean is `2 - P(hit in partition 1)`. For core-router tables this
is about 1.4 cycles.

Two engines are provided, selected by `tcam_top`'s `ARCH` parameter:

| ARCH | engine | partitions |
|---|---|---|
| 0 (default) | `partitioned_tcam` | two fixed TCAMs, TCAM1 → buffer → TCAM2 |
| 1 | `reconfig_tcam` | two or three, chosen at run time by software |

## Module map

```
tcam_top
├── partitioned_tcam            (ARCH=0)
│   ├── tcam_array  TCAM1 ── priority_encoder
│   ├── search_buffer
│   ├── tcam_array  TCAM2 ── priority_encoder
│   └── match_decision
└── reconfig_tcam               (ARCH=1)
    ├── partition_controller
    ├── tcam_array × (K+2) ── priority_encoder   (TCAM1_ini, sp_0..sp_K-1, TCAML_fin)
    ├── search_buffer × 2       (Buffer-1, Buffer-2)
    └── match_decision
tcam_array = DEPTH × WIDTH tcam_cell + word valid bits
tcam_pkg   = widths, write/search/result structs, mux-select enum
```

## The TCAM array

`tcam_cell` stores a value bit and a care bit, which encode 0, 1 and
don't care. During a search the cell raises `mismatch` if it holds a cared-for
bit that differs from its search line. `tcam_array` ANDs the inverted mismatches
of a word into its match line; this is the logical form of a precharged,
wired-AND match line that any mismatching cell pulls down. Each word also has a
valid bit, so unused or deleted words never match.

`search_en` stands for precharging the match lines and driving the search lines.
When it is low, nothing is compared and all match lines read 0. The engines
drive it from "a word has reached this partition". That gating is the part of
the design that saves power. In RTL it is only visible as an enable; the actual
saving depends on the circuit.

`priority_encoder` is a binary tree that selects the lowest matching address.
The table must be written in priority order: longest prefixes at the lowest
addresses.

## Fixed two-partition engine (`partitioned_tcam`)

```
cycle t    TCAM1 searches the input word.          miss → buffer loads word+tag
cycle t+1  TCAM1 result registered → res[0] if hit. TCAM2 searches buffer (if loaded)
cycle t+2  TCAM2 result registered → res[1] (hit, or the final miss)
```

* Global addresses `0 .. DEPTH1-1` are TCAM1 and `DEPTH1 .. DEPTH1+DEPTH2-1` are
  TCAM2. Result addresses are global.
* Software chooses the split point by where it writes the prefix sets. The
  intended split is prefix 24: TCAM1 gets lengths 24..32. Both TCAMs are 32 bits
  wide, so any split point works.
* TCAM2 only ever holds short prefixes. `WIDTH2` can therefore narrow it, for
  example to 23 bits for a split at prefix 24. It then stores and compares only
  the upper `WIDTH2` bits. The price is that the split can no longer move below
  prefix `WIDTH2+1`. The default keeps the full 32 bits.
* The buffer is loaded only on a TCAM1 miss, and TCAM2 is enabled only in the
  cycle after a load. In this engine, TCAM2 therefore searches exactly the
  lookups that missed TCAM1.

## Result ports and the stall stage (`match_decision`)

A lookup ends at the first partition that hits, or with a miss in the last
partition. Because hits in partition 1 take less time than lookups that go on
to later partitions, two lookups can finish in the same cycle. A word entered
at `t` that goes to partition 2 finishes together with a partition-1 hit for the
word entered at `t+1`. `match_decision` offers two ways to handle this:

* `in_order = 0`: one result port per partition. `res[p]` carries the
  lookups that ended in partition p+1, in the cycle they ended. The consumer must
  accept up to two results per cycle (three with three partitions). It can use
  the tag to match results to requests. This mode gives the low average latency.
* `in_order = 1`: every result leaves on `res[0]`, delayed to the latency of the
  last partition (2 or 3 cycles), in request order. This adds a stall stage: the
  latency is fixed, and the power saving stays.

A result is `{valid, hit, addr[15:0], tag[7:0]}`. `addr` is 0 on a miss. Change
`in_order` only while no lookups are in flight.

## Software-partitioned engine (`reconfig_tcam`)

The best split point depends on the routing table. For the tables studied it
always lies between prefix lengths 20 and 25. This engine makes only that
region configurable:

```
segment 0        TCAM1_ini   fixed, always partition 1     (intended: prefixes 26..32)
segments 1..K    sp_0..sp_K-1 configurable sub-partitions  (intended: sp_i = prefix 25-i)
segment K+1      TCAML_fin   fixed, always last partition  (prefixes 1..19, FIN_W=19 bits)
```

* **Input multiplexers.** Each sub-partition and TCAML_fin has an input
  multiplexer. It selects the word of the segment above, Buffer-1 or Buffer-2.
  Setting sub-partition `sp_i` to Buffer-1 starts partition 2 there. Setting
  `sp_j` to Buffer-2 starts partition 3 there.
* **Hit chain.** Each segment passes on a hit: its own hit, or the hit of the
  segment above when both are in the same partition. The upper segment wins
  because it has lower addresses.
* **Buffer-input multiplexer.** It takes the hit chain at the last segment of
  a partition. If the partition starts at `sp_i`, the multiplexer uses the output
  of `sp_{i-1}`. On a miss there, Buffer-1 (or Buffer-2) captures the word.
* **`partition_controller`.** It holds the configuration and drives all the
  multiplexers:
  * `cfg_three`: two or three partitions;
  * `cfg_split1`: index `i` of the sub-partition that takes Buffer-1;
  * `cfg_split2`: index `j` of the sub-partition that takes Buffer-2.

  Index `K` stands for TCAML_fin. Valid settings are `split1 <= K` for two
  partitions and `split1 < split2 <= K` for three. A write with any other
  setting is ignored and raises `cfg_err` for one cycle.
* **Reset configuration.** Two partitions with `split1 = 2`. With the intended
  placement this is the split at prefix 24.
* **Narrow TCAML_fin.** TCAML_fin compares only the upper `FIN_W` bits. Entries
  written there must have their lower bits set to don't care.

The answer does not depend on the configuration: it is always the lowest
matching address. The configuration only decides which partition's port
delivers the answer and how many cycles it takes. A lookup that ends in
partition p takes p cycles.

Examples of the configurations studied:

| split | cfg_three, split1, split2 |
|---|---|
| two partitions, at prefix 24 | 0, 2, – |
| three partitions, at 25 / 24 | 1, 1, 2 |
| three partitions, at 24 / 21 | 1, 2, 5 |

## Interface (`tcam_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (clears valid bits, buffers, pipeline) |
| `search_valid`, `search_key[31:0]`, `search_tag[7:0]` | in | one lookup per cycle; the tag comes back with the result |
| `wr` (`tcam_wr_t`) | in | `{we, addr[15:0], value[31:0], care[31:0], valid}`. Writes one entry per cycle, effective at the next edge. `valid=0` deletes the entry |
| `in_order` | in | output mode, see above |
| `cfg_we`, `cfg_three`, `cfg_split1`, `cfg_split2` | in | partitioning control (ARCH=1 only) |
| `cfg_err` | out | refused configuration (ARCH=1 only) |
| `res[3]` (`result_t`) | out | result ports, see above |

Writes and configuration changes are meant for idle periods. The engines do not
order a write against lookups in flight, and moving a split point while words
are in the pipeline is not supported.

## Sizes

| parameter | default | note |
|---|---|---|
| key width | 32 | IPv4 |
| `DEPTH1`, `DEPTH2`, `WIDTH2` (ARCH=0) | 512, 512, 32 | freely choosable |
| `K`, `INI_DEPTH`, `SP_DEPTH`, `FIN_DEPTH`, `FIN_W` (ARCH=1) | 6, 128, 64, 256, 19 | one sub-partition per prefix length 25..20 |
| tag / address width | 8 / 16 | in `tcam_pkg` |

Cells are flip-flops, so the defaults are a model of the architecture rather
than a routing-table-sized macro. A 2003 core-router BGP table has roughly
120 000 prefixes. Holding one takes both larger depths and `ADDR_W` ≥ 17. A real
implementation would replace `tcam_array` by a full-custom array with the same
ports.

## How far it follows the source design, and where it departs

Taken from the source:
* the partitioning by prefix length and the TCAM1 → buffer → TCAM2 pipeline;
* "search the next partition only on a miss";
* lowest address = longest prefix;
* the latency model (1 or 2 cycles, or a fixed 2 with a stall stage);
* the sub-partition architecture: fixed first and last parts, per-sub-partition
  input multiplexers, Buffer-1/Buffer-2, a buffer-input multiplexer fed from the
  sub-partition above the split, a partitioning controller, and a narrower fixed
  last part.

This design's own choices:
* all depths, `K`, `FIN_W`;
* the tag, the write port and the word valid bits;
* the registered result stage and the two output modes;
* the hit chain as the meaning of a sub-partition's "output";
* Buffer-2 being loaded from Buffer-1's word;
* the controller's register interface, its error flag and its reset value;
* the rule that the configuration changes only while idle.

Not modelled: the analog side (search-line drivers, match-line precharge and
sense amplifiers) and power itself. The power saving appears only as the
`search_en` gating of the later partitions.

## Simulation

Each module has a self-checking testbench in `tb/`, and `tb/tcam_ref_pkg.sv`
holds the shared longest-prefix-match model and scoreboard. Each testbench
prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/tcam_pkg.sv tb/tcam_ref_pkg.sv \
          tb/tb_tcam_top.sv --top-module tb_tcam_top -Mdir obj -o sim
./obj/sim
```

* `tb_tcam_top` runs both architectures at reduced sizes on the same lookup
  stream, with TCAM2 narrowed to 23 bits. It fails if a mechanism never occurred:
  * first- and second-partition hits;
  * a final miss;
  * two results in one cycle;
  * a third-partition result;
  * in-order mode;
  * repartitioning;
  * a refused configuration;
  * a deletion.
* `tb_tcam_top_full` runs the default configuration (2 × 512 entries): the full
  table is written, then 2000 lookups run. Building it with Verilator takes a
  few minutes; the run takes under a second.
* `tb_workload_partitioning` runs the software-partitioned engine at its
  default sizes with a synthetic table, in the partitionings used for core
  routers: two partitions at prefix 24, and three at 25/24 and at 24/21. For
  each it reports two figures:
  * the mean latency, checked against the model;
  * the TCAM cells compared per lookup, relative to searching the whole table.

  On this synthetic table the partitionings compare about 74-83 % of the cells
  of an unpartitioned search. The figure depends entirely on how the table and
  the traffic are spread over the prefix lengths.
* `tb_partitioned_tcam` and `tb_reconfig_tcam` also check the power gating. The
  second partition must search exactly the words that missed the first (and
  likewise for the third).

The testbenches reset all state they read. Unwritten TCAM cells may hold any
value, because the valid bits hide them.
