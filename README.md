# In-network B⁺tree index for programmable switches (Fat-B⁺Tree data plane)

In a data center where memory servers hold a large B⁺tree, a client normally walks the
tree from the root: one RDMA read per level, each one a full network round trip. The
switches between client and server sit on every one of those paths, and together they
hold a lot of fast SRAM and TCAM. This design puts the top of the B⁺tree into that
memory. The client sends a single "special" RDMA read that carries its search key. Each
switch on the path looks the key up in the part of the tree it holds and rewrites the
read's target address to a node further down. The read reaches the memory server already
pointing at a node deep in the tree, so most of the levels cost no round trip at all.

This repository is synthesizable SystemVerilog for the switch side of that scheme, in
the published Fat-B⁺Tree design's main configuration:

* a **fat-root** in the core switch: the top levels of the tree merged into one node of
  up to 1024 key ranges, matched in TCAM-style range tables;
* **regular node sets** of up to 4096 cached 16-way nodes each, two per aggregation and
  edge switch, searched with SRAM tables and comparators;
* the **header handling** that carries the key through the network and removes it
  before the server;
* the **13-switch k = 4 FatTree** that ties them together.

All of it runs at one packet per clock and has no back-pressure, like a match-action
switch pipeline. The central controller, the memory servers and the clients are
software and are not part of the RTL. The testbenches contain models of what they do.

## How a query travels

A packet is handled as a parsed header vector, `fatb_pkg::pkt_t`. It holds:

| field | meaning |
|---|---|
| `is_read`, `va`, `rkey`, `len` | the RDMA-read request. `va` is the 64-bit remote address. |
| `tmp_valid`, `tmp_key`, `tmp_sid` | the temporary header: query key and memory server ID |
| `dst` | destination server for ordinary routing |

A lookup goes through these steps:

1. **Client.** The client sets `va` to the key, sets `rkey` to 0, and sets `len` to the
   node size.
2. **First hop (`query_encap`).** A read with `rkey == 0` and no temporary header gets
   one. The key is copied out of `va` into `tmp_key`, so `va` is free to carry addresses.
3. **Core (`fat_root`).** The fat-root finds the key's range. It writes that range's
   child node address into `va` and the owning memory server into `tmp_sid`.
4. **Below the core (`regular_node_set`).** Each node set holds one cached layer of the
   tree. If `va` names a cached node, the set compares the key with that node's pivots
   and replaces `va` with the chosen child's address. If `va` names no cached node, the
   packet passes unchanged. Because of that, the address always stops at the first node
   that is not cached.
5. **Routing (`sid_forward`).** Every switch picks its egress port from `tmp_sid`: the
   core picks the pod, the aggregation switch picks the rack, and the edge switch picks
   the server.
6. **Last hop (`query_decap`).** The edge switch removes the temporary header and sets
   `dst` to the server. It also replaces the client's `rkey` of 0 with the rkey that was
   registered for that server when the RDMA connection was set up.

The server then receives an ordinary RDMA read of a node deep in its tree. From there
the client continues with normal reads.

Latencies in clock cycles, fixed for every packet:

| unit | cycles |
|---|---|
| `query_encap`, `query_decap`, `sid_forward` | 1 each |
| `fat_root`, `regular_node_set` | 6 each |
| core switch (encap, fat-root, forward) | 8 |
| aggregation switch (encap, 2 node sets, forward) | 14 |
| edge switch (encap, 2 node sets, decap, forward) | 15 |
| `fatb_fabric`, core input to server output | 37 |

## Comparing 64-bit keys with 32-bit units (`cmp64`)

Switch ALUs are 32 bits wide, so `key > pivot` is split into two phases. Phase 1
computes `sub = pivot − key` and `xor = pivot ^ key` on each 32-bit half separately,
with no carry between the halves. Phase 2 is a four-row table:

| `sub[63:32]` | `xor[31]` | `xor[63]` | result |
|---|---|---|---|
| = 0 | 0 | – | `sub[31]` |
| = 0 | 1 | – | `key[31]` |
| ≠ 0 | – | 0 | `sub[63]` |
| ≠ 0 | – | 1 | `key[63]` |

The table works like this. If the high halves differ, they decide the result; otherwise
the low halves do. If the top bits of the deciding half agree, the sign of the 32-bit
difference says which operand is larger. If the top bits differ, the key is larger
exactly when its own top bit is 1. Equal keys give 0. A register separates the two
phases, so the result comes one cycle after the operands.

## Regular node sets (`regular_node_set`)

A slot holds one cached node:

* a node address;
* 16 pivot keys;
* 16 child entries, each a valid bit and an address.

The set has six pipeline stages:

| stage | work |
|---|---|
| 1 | Exact match of `va` against all slot addresses (a CAM of `N_NODES` entries) |
| 2 | Read the 16 pivot tables at the matched slot |
| 3 | 16 comparator phase-1 units (`cmp64`) |
| 4 | 16 comparator phase-2 tables, giving `result[15-i] = key > pivot[i]` |
| 5 | Check that `result` is a run of *m* ones from bit 15, then read child *m* |
| 6 | Write the child address into `va` |

Pivot 0 is the node's lower bound, and pivots beyond the node's real fan-out hold
all-ones. So for a key inside the node, `result` always looks like `1…10…0`, and the
number of ones is the child number. Four cases leave the packet unchanged:

* an all-zero result (the key is not above the lower bound);
* a result that is not of that form (pivots loaded out of order);
* a child entry marked absent;
* a `va` that matches no slot.

Note the orientation of the comparison. Child *m* receives keys in
(pivot *m−1*, pivot *m*]. This means the node's lower bound itself belongs to the
left neighbour, so the controller must place pivots with that in mind.

The published design gives each of the 16 pivot tables its own 64-bit address match.
Here one match result feeds all 16 tables. The result is the same, with one CAM instead
of sixteen.

## The fat-root: a 64-bit range match from 16-bit tables (`fat_root`, `range_table_stage`)

The fat-root replaces the top few tree levels with one node of *n* ranges (n ≤ 1024).
Finding which range holds a key needs a 64-bit range match, but switch range tables are
only about 16 bits wide. The key is therefore matched 16 bits at a time, in four stages
(`key[63:48]`, then `[47:32]`, `[31:16]`, `[15:0]`), and each stage can hand the lookup
on to a smaller table in the next stage.

* **Stage 1** has one table, table 0. It divides the key space into 2¹⁶ blocks of
  2⁴⁸ keys each.
  * A run of blocks that lies wholly inside one range becomes one entry,
    `[lo, hi] → final range r`.
  * A block that a range boundary cuts through becomes an entry `[c, c] → table t`.
    Table `t` lives in the next stage and divides only that block.
* **Later stages** repeat this within their block. Stage 4 works on single keys, so it
  only produces final entries.
* **Sharing.** All the small tables of one stage share a single physical table. Each
  entry is tagged with its table id. A `range_table_stage` matches
  `tab == id && lo ≤ chunk ≤ hi`, and the lowest matching index wins.
* **Lookup state.** Between stages the lookup carries `{miss, final, id}`. Once `final`
  is set, the later stages pass it through unchanged.
* **Result.** Stage 5 reads the action table, range id → (child address, server ID).
  Stage 6 writes both into the packet.
* **Ids.** Range ids are 1…n. Table ids are numbered from n+1 upward, and stage 1's
  table is 0. The entry stores an explicit final bit, so the hardware never needs
  to know n.

Here is an example with six-bit keys and two-bit tables. The ranges are [0,10], [11,14],
[15,37], [38,56] and [57,63]:

* Stage 1 needs 4 entries: blocks 0, 2 and 3 are cut, and block 1 lies wholly in
  [15,37].
* Stage 2 needs 3 tables.
* Stage 3 needs 4 tables.

**Entry budget.** Each stage has `N_ENT = 2·N_RANGES` entries, following the published
bound of at most 2n entries per stage. In practice, a boundary that is alone in its block
costs about three entries per stage: the part below it, the cut chunk, and the part above
it. With ranges spread evenly or at random, the encoder used in the testbenches measured:

| ranges | highest stage count | stage capacity |
|---|---|---|
| 600 | 1790 | 2048 |
| 1000 random | more than 2048 | 2048 |

So the 600-range fat-root of the evaluated setups fits, but 1000 arbitrary ranges do not.
A controller has to check the count, or `N_ENT` has to be raised to `3·N_RANGES`.

## Deployment over the FatTree (`fatb_switch`, `fatb_fabric`)

`fatb_switch` is one switch pipeline:
`query_encap → first unit → [second unit] → [query_decap] → sid_forward`. Its parameters:

| parameter | effect |
|---|---|
| `FIRST_IS_FAT_ROOT` | the first unit is the fat-root instead of a regular set |
| `HAS_SECOND` | adds a second regular node set |
| `LAST_HOP` | adds `query_decap` |
| `SW_ID` | the switch number used to select control writes |

Any switch attaches the temporary header to a special read that does not have one yet, so
the first Fat-B⁺Tree switch on a path automatically acts as the first hop.

`fatb_fabric` (the top module) is the k = 4 tree below one chosen core switch:

| switch | numbers | units |
|---|---|---|
| core | 0 | fat-root only |
| 4 aggregation (one per pod) | 1 to 4 | two regular sets: cached layers 1 and 2 of the servers in the pod |
| 8 edge (two per pod) | 5 to 12 | two regular sets: cached layers 3 and 4 of the servers in the rack, plus the last hop |

The fabric has 16 memory-server ports. Server *s* = (pod·2 + rack)·2 + port, and edge
switch (pod *i*, rack *j*) has the number 5 + 2*i* + *j*. A query passes the fat-root
and up to four cached layers. Client packets enter at the core. The switches on the
client's own side of the network only forward, so they are not modelled. The data
plane does not choose which nodes sit where: the controller chooses it by loading the
tables. The layer-by-layer rule used in the tests works like this: a node is cached only
if its parent is, and each layer takes the most-accessed children of the layer above.

## Loading tables: the control write bus

All tables are loaded through one broadcast struct, `fatb_pkg::ctrl_wr_t`. A write is
applied one cycle later by the switch whose `SW_ID` equals `sw`. In a switch with two
node sets, `unit` selects the set (0 or 1).

| `kind` | target | `index` | `sub` | data |
|---|---|---|---|---|
| `W_NODE` | node slot | slot | – | `data0` = node address, `en` = slot valid |
| `W_PIVOT` | pivot | slot | pivot 0–15 | `data0` = pivot key |
| `W_CHILD` | child entry | slot | child 0–15 | `data0` = child address, `en` = child present |
| `W_RANGE` | fat-root entry | entry | stage 0–3 | `data0` = {result id, hi, lo, table id} (16 bits each), `data1[0]` = final |
| `W_ACTION` | fat-root range | range id | – | `data0` = child address, `data1[7:0]` = server ID |
| `W_FWD` | forwarding | server ID | – | `data0[3:0]` = port, `en` = route valid |
| `W_RKEY` | registered rkey | server ID | – | `data0[31:0]` = rkey, `en` = valid |

Reset clears only the valid bits: node slots, range entries, actions, routes and rkeys.
Table contents are SRAM and are not reset. A child entry's valid bit is stored with the
entry. So write all 16 child entries of a node, with `en = 0` for absent ones, before
you validate the node with `W_NODE`.

## Sizes

| parameter | default | where |
|---|---|---|
| `KEY_W`, `ADDR_W` | 64 | `fatb_pkg` |
| `FANOUT` | 16 branches | `fatb_pkg` |
| `CHUNK_W` | 16-bit range tables (4 stages) | `fatb_pkg` |
| `N_NODES` | 4096 nodes per regular set | `regular_node_set`, `fatb_switch`, `fatb_fabric` |
| `N_RANGES` | 1024 fat-root ranges | `fat_root`, `fatb_switch`, `fatb_fabric` |
| `N_ENT` | 2048 entries per range stage | `fat_root` |
| `K` | 4 (13 switches, 16 servers) | `fatb_fabric` |
| `SID_W` | 8-bit server ID | `fatb_pkg` |
| `PORT_W` | 4-bit port number | `fatb_pkg` |

Each regular set stores 4096 × (16 × 64 + 16 × 65 + 64) bits, about 1.1 MB.
`fatb_fabric` contains 24 such sets.

The published evaluation uses the following sizes, all within these defaults:

* at most 600 fat-root ranges;
* at most 3600 nodes per cached layer, up to 3900 in one sweep;
* three cached layers on two switches for the RDMA setup;
* four cached layers on the FatTree for the Ethernet setup.

## What is this design's own

The published description fixes the following:

* the comparator table;
* the 6-stage node set with 16 pivot tables, 16 compare tables and a 16·n child table,
  and the "run of ones" result;
* the fat-root built from four 16-bit range stages, and its table-building scheme;
* the capacities (1024 ranges, 4096 nodes, 6 stages per unit, two units per switch);
* detecting special reads by `rkey == 0`, and the temporary header that carries the key
  and the server ID;
* forwarding by server ID at every level;
* the core / aggregation / edge placement.

This implementation chose the following:

* the parsed-header representation, and the absence of a packet parser. No header byte
  layout was available, so the blocks start from parsed fields.
* the control write format and every table's memory layout;
* the split of each unit's 6 stages into the steps listed above;
* one shared address CAM per node set;
* the miss behaviour: an unmatched packet passes unchanged;
* reset of valid bits only;
* restoring `rkey` from a per-server table at the last hop. The published description
  only says that the RDMA connection metadata is sent to the edge switch.
* replacing `dst` with the server ID at the last hop;
* dropping packets for an unknown server ID;
* switch and server numbering;
* modelling only the downward half of the FatTree.

Not in the RTL:

* the controller's algorithms: greedy fat-root selection, range-table encoding and
  layer-by-layer caching;
* the memory servers, including their lazy handling of inserts and deletes;
* the clients, including parallel range queries;
* the TCP/IP variant of the query path.

## Simulation

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and has a
watchdog. Each one builds with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fatb_pkg.sv tb/fatb_tb_pkg.sv rtl/cmp64.sv rtl/regular_node_set.sv \
  rtl/range_table_stage.sv rtl/fat_root.sv rtl/query_encap.sv rtl/query_decap.sv \
  rtl/sid_forward.sv rtl/fatb_switch.sv rtl/fatb_fabric.sv \
  tb/tb_fatb_fabric.sv --top-module tb_fatb_fabric
./obj_dir/Vtb_fatb_fabric
```

| testbench | what it checks |
|---|---|
| `tb_cmp64` | the worked example, corner cases and 2000 random pairs against `key > pivot`; one-cycle latency |
| `tb_regular_node_set` | 4096-slot set with full, partial, unsorted and partly absent nodes; every packet against a reference search; exactly 6 cycles |
| `tb_fat_root` | 600 ranges, with boundaries clustered to use all four stages, encoded and loaded; every key against a binary search; exactly 6 cycles; entry counts within capacity |
| `tb_query_encap`, `tb_query_decap`, `tb_sid_forward` | the header and forwarding rules on random traffic; 1 cycle each |
| `tb_fatb_switch` | one switch as fat-root + node set + last hop; writes for another switch ignored; 15 cycles; every mechanism counted |
| `tb_fatb_fabric` | the whole 13-switch fabric at default sizes; hits in all four cached layers, misses, ordinary reads and drops; each packet checked at its server after 37 cycles, and event counts against the model |
| `tb_workload_rdma` | the two-switch RDMA setup at evaluated sizes: 600 ranges, 3 × 3600 cached nodes chosen from Zipf(0.99) access counts over 2·10⁶ keys; 5000 queries checked |

| `tb_workload_ethernet` | the whole fabric at evaluated sizes: 600 ranges, four memory servers in one pod, four cached layers (600 / 3600 / 3600 / 3600 nodes) chosen from Zipf(0.99) access counts over 10⁸ keys; 5000 queries checked at their servers |

In the RDMA workload run, the queries that got past 0, 1, 2 and 3 cached layers
numbered 0 / 1721 / 862 / 2417 of 5000. In the FatTree run, the queries that got past
0 to 4 layers numbered 0 / 2094 / 1057 / 69 / 1780. The FatTree run takes under a
minute in Verilator. The large-network setting serves its queries over TCP/IP, whose
query format is not part of this design, so that testbench carries them as special
RDMA-reads. The table sizes are the same either way.

`tb/fatb_tb_pkg.sv` holds the controller-side models:

* a range-table encoder, following the scheme above;
* an implicit 16-way B⁺tree. A node covering (lo, hi] has pivots lo + i·(hi−lo)/16.
  The model predicts the address a query should carry after the cached layers.
