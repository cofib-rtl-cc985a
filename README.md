# CoFIB: a compressed NDN forwarding table for a switch pipeline

In Named-Data Networking (NDN) a request (an *Interest*) names the content it
wants, for example `/com/example/video/seg7`, rather than naming a host. A
router forwards it by finding the longest prefix of that name in its
forwarding table (FIB). This is the longest name-prefix match (LNPM). Name
FIBs run to millions of variable-length entries, far beyond what the
fixed-width TCAM of a switch chip can hold.

CoFIB makes such a FIB fit in a match-action pipeline. Three ideas do it:

* **Store components, not prefixes.** Every name component is stored once, in
  a table chosen by the component's length. T1..T31 hold components of 1..31
  characters. Components of up to 4 characters are stored as they are. Longer
  ones are stored as their crc32. Shared sub-prefixes are never repeated.
* **Chain components with a small record.** Each stored component carries a
  24-bit record, the *CAD*. From the CAD alone the pipeline can tell whether
  the component belongs after the components already matched.
* **Split the work across the pipeline.** Some component tables sit in the
  ingress match-action block and the rest in the egress block. A packet can
  therefore match two components per trip through the pipeline. A packet that
  needs more matches is recirculated with its progress carried in metadata.

The answer is not an output port. CoFIB runs on edge switches only. A match
returns an 8-bit *swId*, one bit per edge switch that can serve the content.
The Interest is then sent into the core towards those switches.

This repository is synthesizable SystemVerilog for the CoFIB data plane: the
packet parser, the ingress and egress match-action blocks with all their
tables, the recirculation path, and a small PIT (pending Interest table) for
returning Data packets. The control plane is software and is not included.
It turns the routing table into table entries and writes them through a
plain write port.

## The name encoding (P4NF)

A pipeline cannot scan a string, so the name is re-encoded at the network
edge so that its structure sits at fixed places:

```
Interest:  [1111 nnnn] [C1] .. [Cn] [name bytes, sum(Ci) of them] [TLV blocks ...]
Data:      [0000 0000] [hash length = 32] [4-byte name hash] [TLV blocks ...]
```

`n` is the number of components, from 1 to 8. Each `Ci` is one byte holding
the length of component i, from 1 to 31. The name bytes are the components
back to back, without separators. The Data packet carries a hash of its name
in place of the name.

`p4nf_parser` takes the packet one byte per cycle. While the name streams
past it computes, for each component:

* its length;
* its first four characters (the whole key for T1..T4);
* its crc32 (the key for T5..T31);
* the running name hash F().

After the last byte it hands a fixed-size descriptor to the pipeline. The
name bytes are never carried further. Malformed headers are discarded and
flagged. These are:

* a bad type nibble;
* n outside 1..8;
* a component length of 0 or above 31;
* a Data hash length other than 32;
* a packet that ends inside the header.

## How one component is matched

For component i of length L, the block that holds table TL looks up the
component key. It gets back the CAD:

| bits  | field | meaning |
|-------|-------|---------|
| 23    | c     | some stored prefix continues after this component |
| 22    | e     | some stored prefix ends with this component |
| 21    | cf    | the component is *conflicting*: check it in the HCT |
| 20:18 | p     | the only position this component occupies (8 stored as 0) |
| 17:10 | swId  | edge switches of the prefix that ends here |
| 9:0   | hs    | top 10 bits of F() of the sub-prefix before this component |

The position field is enough because the control plane loads only
*canonical* prefixes. In a canonical set every component string appears at
one position only. Prefixes that break this rule are served by a slow-path
FIB on the controller, outside this design.

The running prefix hash is

```
F(1) = h(c1)
F(i) = m * F(i-1) + h(ci)      (mod 2^32, m odd)
```

Here h is crc32 and m = 0x01000193.

A lookup hit counts as a match only if both of these hold:

* `p == i`;
* either `cf == 0` and `hs` equals the top 10 bits of F(i-1) (0 for the
  first component), or `cf == 1` and the Hash Conflicting Table (HCT) holds
  the full 32-bit F(i).

The 10-bit `hs` tells apart the different prefixes that lead to a component.
A component reached from prefixes that 10 bits cannot separate is marked
conflicting. It is then checked through the HCT, an exact-match table keyed
by the full F(i). The HCT entry also supplies the swId.

After a match:

* the swId is remembered as the best so far if one ends here (`e` set, or a
  non-zero HCT swId);
* F is advanced;
* the LNPM goes on to component i+1 while `c` is set and components remain
  below the limit.

After a miss, or when the LNPM stops, the packet is finished:

* it goes to the core with the best swId if one was found;
* otherwise it goes to the controller if its shape is known to the slow path;
* otherwise it is dropped.

## Shape tables: refusing hopeless names early

A name's *shape* is its sequence of component lengths: `/com/example` has
shape `/3/7`. It is packed into a 40-bit key of eight 5-bit lengths, zero
padded. On a packet's first pass the ingress block looks its shape up in two
ternary tables:

* the **DPST** holds the shapes of prefixes in the data-plane tables;
* the **CPST** holds the shapes of prefixes that only the slow-path FIB
  knows.

Each stored shape of k components is written with a care mask over its first
5k bits, so it matches every name that begins with that shape. The lowest
matching row wins, so longer shapes go in lower rows. The DPST returns k, and
k becomes the most components the LNPM will try. The outcomes are:

* DPST miss and CPST hit: the packet goes to the controller.
* DPST miss and CPST miss: the packet is dropped.
* DPST hit: the LNPM runs.

## Pipeline, placement and recirculation

```
bytes -> p4nf_parser --Interest--> [ingress lnpm_stage] -> [egress lnpm_stage] --> result
             |                        ^                               |
             |                        +---- recirculation queue <-----+ (LNPM not finished)
             +--Data--> pit_table --> Data result
```

Each `lnpm_stage` handles at most one component per packet.

* Parameter `PLACEMENT` has one bit per table, set for the tables that sit in
  ingress. The default places T1..T14 at ingress and T15..T31 at egress.
* An offline optimiser may choose another split that puts frequent
  consecutive components on opposite sides. That is only a different value of
  the same parameter.
* A component whose table is in the other block passes through untouched.
* The HCT is duplicated in both blocks. The shape tables exist in ingress
  only.

When a packet leaves egress still unfinished, it enters the recirculation
queue. It re-enters ingress with its metadata:

* the next component index;
* F() so far;
* the best swId;
* the limit;
* the pass count, plus one.

The queue has priority over new packets. The parser is held while the queue
holds anything. This bounds the packets in flight, so the 8-deep queue
cannot overflow.

**Timing.** Each `lnpm_stage` is three register stages:

1. table read;
2. CAD check and HCT read;
3. decision.

Throughput is one packet per cycle. An isolated Interest's result appears
`7 * passes + 1` cycles after its last byte. Each pass costs 6 cycles in the
two blocks plus one cycle for the queue or the parser output. A Data packet's
PIT answer comes one cycle after its descriptor.

## PIT

`pit_table` is deliberately minimal. It is a direct-mapped table of 256
slots, each holding a 32-bit name hash and a 16-bit port mask.

* An Interest sent to the core records its name hash and sets its arrival
  port in the mask.
* A Data packet whose hash is found is answered with the port mask, and the
  entry is freed.
* A Data packet whose hash is not found is reported as a miss, to be dropped.

The name hash of an Interest is the F() value above. The edge function that
builds Data packets must use the same hash.

## Interfaces of `cofib_top`

* **Packet input.** `in_valid / in_ready / in_data[7:0] / in_last / in_port[3:0]`
  carry one byte per cycle. `in_port` is sampled with the first byte.
* **Control-plane writes.** `cp_wr_en` with a `cp_write_t` (see
  `cofib_pkg`) writes one entry per cycle. The fields are:
  * `target`: FFIB, HCT, DPST or CPST.
  * `table_len`: the i of Ti.
  * `index`: the TCAM row.
  * `way`: the way of the exact-match set.
  * `entry_valid`: 0 deletes the entry.
  * `key`: the ASCII or crc32 component, F() for the HCT, or the shape.
  * `mask`: the TCAM care bits.
  * `data`: the CAD, swId or component count.

  The exact-match tables are 4-way set-associative. The set index is the XOR
  fold of the key into 10 bits. The control plane chooses the way, so
  placement and overflow policy stay in software.
* **Interest result.** `ires_valid` comes with:
  * `ires_action`: core, controller or drop;
  * `ires_swid`;
  * `ires_passes`;
  * `ires_match_len`;
  * `ires_in_port`;
  * `ires_name_hash`.

  The Ethernet encapsulation is left to a deparser outside this block. That
  step puts the swId into the destination MAC and picks the core port.
* **Data result.** `dres_valid / dres_hit / dres_ports[15:0]`.
* **`parse_err`.** A one-cycle pulse for every malformed packet.

## Capacity

At the default parameters:

* every component table holds 4,096 entries: 1,024 sets x 4 ways, 126,976 in
  all;
* the HCT holds 4,096 entries in each of its two copies;
* each shape table holds 512 rows;
* the PIT holds 256 names.

That is enough for the small name sets CoFIB is usually shown with. Both
are simulated in `tb_cofib_workloads`:

* about 150 prefixes from real NDN testbed traffic;
* about 510 synthetic prefixes built so that every ingress/egress match order
  occurs.

Datasets of 180 thousand to 10 million prefixes need hundreds of thousands to
tens of millions of component entries. Those need switch-scale SRAM, about
25 MB for 4.4 million prefixes, which these defaults do not model. The table
sizes are parameters.

## Where this RTL departs from, or fills in, the published design

* **Limit.** The published text derives the limit from the DPST's component
  count k, and also writes it as `8 - k`. Here k itself is the limit. With
  `8 - k`, a one-component prefix would allow seven matches and a
  seven-component prefix only one.
* **Filled-in details.** The following are not specified there and were
  chosen here:
  * the crc32 variant: reflected IEEE 802.3, with initial value and final XOR
    of all ones;
  * h() is crc32 for every component, including short ones;
  * the multiplier m;
  * the CAD bit order;
  * position 8 stored as 0;
  * the exact match rule combining `p`, `hs` and the HCT.
* **No match in a later pass.** A recirculated packet that finishes with no
  swId at all goes to the controller or is dropped. It is not sent to the
  core with an empty switch set.
* **Name processing.** The parser reduces the name to per-component keys in
  one pass. A P4 program would instead extract one component per match-action
  step. The lookups are the same.
* **Table organisation.** The memory optimisation that shares identical CAD
  values through indirect action tables is not modelled. Each entry stores
  its CAD directly.
* **Choices of this implementation.** The following are all this
  implementation's choices:
  * the PIT organisation;
  * the recirculation priority;
  * the queue depth;
  * all table sizes;
  * the cycle timing.
* **Not included.** None of the following is part of the RTL:
  * canonical-prefix extraction;
  * the table-placement optimiser;
  * the slow-path FIB;
  * the SDN controller;
  * the routing table;
  * the edge name converter that produces P4NF;
  * the core switches;
  * the result deparser.

## Files

| file | contents |
|------|----------|
| `rtl/cofib_pkg.sv` | constants, CAD / descriptor / metadata / write-port types, crc32, F(), shape key |
| `rtl/p4nf_parser.sv` | P4NF byte-stream parser |
| `rtl/exact_match_table.sv` | set-associative exact-match SRAM table (component tables, HCT) |
| `rtl/shape_tcam.sv` | ternary shape table (DPST, CPST) |
| `rtl/lnpm_stage.sv` | one match-action block, ingress or egress |
| `rtl/sync_fifo.sv` | recirculation queue |
| `rtl/pit_table.sv` | pending Interest table |
| `rtl/cofib_top.sv` | the whole data plane |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench checks its module against values computed independently.

* **`tb_cofib_top`** runs the full design at its default parameters.
  1. It acts as the control plane. It builds a random canonical FIB of about
     70 prefixes with some conflicting components. It derives every table
     entry from that FIB and writes them through the control port.
  2. It sends 12 isolated Interests. For each it checks the latency formula.
  3. It sends 400 back-to-back Interests. Each result is checked against a
     reference that searches the prefix list directly. The check covers the
     action, the swId, the match length and the pass count.
  4. It sends Data packets against a model of the PIT.
  5. It sends malformed packets.

  It also counts every mechanism and fails if any never occurs:
  * shape miss to controller and to drop;
  * LNPM miss;
  * a conflicting component resolved through the HCT;
  * a stop on the continuity bit;
  * a stop at the shape limit;
  * a component whose table is not in ingress;
  * recirculation;
  * two matches in one pass;
  * input back-pressure;
  * PIT hit and miss;
  * parse error.
* **`tb_cofib_workloads`** runs the full design at its default parameters
  on two generated prefix sets. Each has the statistics of one of the small
  evaluation sets:
  * about 150 prefixes of 2 to 5 components, around 6.5 characters each,
    with many shared leading components;
  * about 510 prefixes of 6 to 8 components, around 16 characters each.

  For each set the design is reset and all tables are loaded. Every prefix
  is sent as an Interest, and so are 100 mutated names. Each result is
  checked as above. The second set drives Interests through up to 8 pipeline
  passes.
* **`tb_lnpm_stage`** drives one ingress block with hand-built packets whose
  results were worked out by hand. It also checks the 3-cycle latency.
* **The other testbenches** cover the parser (random names, all error
  cases), the exact-match table, the TCAM priority, the FIFO (random traffic
  against a queue model) and the PIT.

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cofib_top \
    rtl/cofib_pkg.sv rtl/exact_match_table.sv rtl/shape_tcam.sv rtl/sync_fifo.sv \
    rtl/pit_table.sv rtl/p4nf_parser.sv rtl/lnpm_stage.sv rtl/cofib_top.sv \
    tb/tb_cofib_top.sv -o sim
./obj_dir/sim
```

For another testbench, replace the top module and the testbench file. The
package must come first.

**Lint.** `verilator --lint-only -Wall` reports only these warnings, none of
which is a circuit problem:

* unused bits of wide shared records (each block uses only some fields of the
  CAD and of the write port);
* deliberately unconnected result-valid pins of tables with fixed latency;
* the assertion's `disable iff` sampling the asynchronous reset.

**Synthesis.** Full synthesis of the top is slow. Every component table and
the TCAMs are written as plain arrays, and at default sizes they add up to
about 7 Mbit. A real target would map them to SRAM and TCAM macros.
