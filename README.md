# Henna: a two-stage tree classifier for a switch pipeline

This is synthesizable SystemVerilog for Henna, a packet classifier built as the match-action
pipeline of a programmable switch. Henna labels every packet with the device that sent it, choosing among
21 classes. One large decision-tree model would have to separate all 21 classes at once.
Henna splits the job in two:

1. **Ingress stage.** A random forest of 3 trees assigns the packet to one of 5 *class
   groups*: switches and plugs, sensors, video devices, appliances, computers.
2. **Egress stage.** A single decision tree, chosen by that group, picks the device among the
   group's 2 to 6 classes.

Each stage is small enough for match-action tables, and the two stages use different halves
of the pipeline (ingress and egress). Neither stage does any arithmetic. Every tree is
turned into two table lookups:

- a **range lookup** per feature, which turns the feature value into a code word;
- a **ternary lookup** per tree, which turns the combined code words into a leaf.

Loading new table entries changes the model without touching the hardware.

The classifier uses nine packet-level features:

- the TCP flags ACK, SYN, PSH, ECE, RST and FIN;
- the TCP or UDP source and destination ports;
- the packet length.

## Path of a packet

```
in_hdr ─► ingress_parser ─► ingress_control ──────────────────► ingress_deparser ─► traffic_manager
          (features)        M/A0 feature tables (per feature)     (append group       (FIFO,
                            M/A1 code tables (per tree)            label byte)         tail drop)
                            M/A2 voting table                                            │
  ┌──────────────────────────────────────────────────────────────────────────────────────┘
  └─► egress_parser ─► egress_control ────────────────────────► egress_deparser ─► out_pkt
      (features again,  M/A0 feature tables of every group       (label byte := class,
       read group)      M/A1 code tables of every group,          valid/ready port)
                        keep the one of the packet's group
```

- **Packet format.** A packet is the first 64 bytes of its headers: `win_t`, where byte `i`
  is wire offset `i`. The pipeline carries these bytes plus a one-byte *classification
  header*. Payload is not modelled.
- **Ingress.** Ingress takes one packet per clock and never stalls. The parser, the three
  match-action (M/A) stages and the deparser each register once, so a packet reaches the queue
  5 cycles after it enters.
- **Queue.** `traffic_manager` is a 16-entry FIFO. When it is full, an arriving packet is
  dropped and counted in `tm_drop_count`.
- **Egress.** Egress has four register stages: the parser, two M/A stages and the deparser.
  All four advance together. When the output port lowers `out_ready`, the deparser holds its
  packet, the whole egress pipeline freezes and the queue stops giving packets. A full queue
  then drops packets, as a switch's buffer would.
- **Latency.** With an empty queue and a ready port, `out_valid` follows `in_valid` by
  **10 cycles**.

### Feature extraction

`henna_pkg::extract_features` decodes an Ethernet/IPv4/TCP-or-UDP header.

- The IPv4 header length comes from IHL, so IPv4 options are handled.
- The packet length is the IPv4 total-length field.
- If the frame is not IPv4 (EtherType ≠ 0x0800), the packet is not classified. It passes
  through with an empty label and raises the `ev_bypass` event.
- An IPv4 packet with no usable TCP or UDP header is still classified, with ports and flags
  read as 0. This covers other protocols, non-first fragments, and L4 headers that lie
  beyond the 64-byte window.

The egress parser runs the same function again, as the switch's egress parser would. It also
reads the label byte.

### The classification header

The label is one byte, appended behind the header window: `{valid, final, reserved, id[4:0]}`.

| after    | valid | final | id                    |
|----------|-------|-------|-----------------------|
| ingress  | 1     | 0     | class group 0–4       |
| egress   | 1     | 1     | device class 0–20     |
| no label | 0     | 0     | 0                     |

A packet leaves with an empty label in any of these cases:

- it was bypassed;
- no tree of the forest matched (a stage-1 miss);
- its group's tree had no matching leaf (a stage-2 miss).

## How a tree becomes two tables

This is the part that needs the most care when you generate table entries.

**Feature tables (`feature_table`, range match).**

- Take every decision node, in every tree of the stage, that tests feature *f*. Their
  thresholds split the range of *f* into intervals. Within one interval, every such node
  makes the same decision.
- Each interval is one entry `{lo, hi, code}`.
- Inside each tree, the nodes that test *f* are numbered 0, 1, 2, … in any order.
  `code[t*CODE_W + k]` is 1 when values in the interval lie *above* the threshold of node *k*
  of tree *t*, that is, when that node takes its right branch.
- One table therefore serves all trees of the forest. Its code is `RF_TREES*CODE_W` bits
  wide at ingress, and `CODE_W` bits wide at egress, where each group has one tree.
- On a miss the code is 0. Intervals that cover 0…65535 never miss.

**Code tables (`code_table`, ternary match).**

- There is one table per tree. Its key is that tree's codes of all nine features laid side by
  side: `key[f*CODE_W +: CODE_W]`.
- Each leaf is one entry. For every node on the path from the root to the leaf, set the
  node's bit in `mask`. Set the bit in `value` to 1 if the path takes that node's right
  branch, and leave it 0 otherwise. All other bits are wildcards.
- The paths of a tree never overlap, so exactly one entry matches. Where entries do overlap,
  the lowest address wins.
- The entry returns the leaf's class and an 8-bit certainty. 255 means fully certain, and the
  scaling is up to the model's author.

**Example.** The root tests `len > 500`. Its left child tests `sport > 1024`. Its right
child is leaf C.

| table         | entry                                                    |
|---------------|----------------------------------------------------------|
| feature `len` | [0,500] → bit0=0; [501,65535] → bit0=1                   |
| feature `sport` | [0,1024] → bit0=0; [1025,65535] → bit0=1              |
| code, leaf A  | len.bit0 = 0, sport.bit0 = 0 (both bits in the mask)     |
| code, leaf B  | len.bit0 = 0, sport.bit0 = 1                             |
| code, leaf C  | len.bit0 = 1; sport bits are wildcards                   |

**Limits.** A tree may test one feature at up to `CODE_W` = 16 nodes. It may have up to
`CT_DEPTH` = 128 leaves. Each feature may use up to `FT_DEPTH` = 64 intervals, counted over
all trees of the stage. Tree depth itself is not limited: a depth-10 tree fits if it meets
these counts. Prune the trees (cap their leaf count) to fit.

## Voting

`voting_table` combines the three trees of the forest.

- Each tree that hit votes for its class, and the class with the most votes wins.
- If several classes share the largest vote count, the class with the highest certainty
  wins. A class's certainty is the largest among the trees that voted for it.
- If the certainties are also equal, the class of the lowest-numbered tree wins.
- When certainty decided the vote, `ev_vote_tie` pulses.

With 3 trees and 5 groups, all three trees often disagree. In random tests this happens for
roughly 40% of packets.

## Loading a model

All tables are written through one port, `cfg` (`henna_pkg::cfg_wr_t`). Each cycle with
`cfg.we = 1` writes one entry.

| field      | meaning                                                         |
|------------|-----------------------------------------------------------------|
| `stage`    | `STG_INGRESS` (forest) or `STG_EGRESS` (group trees)            |
| `kind`     | `TBL_FEATURE` or `TBL_CODE`                                     |
| `idx`      | feature number (feature tables) or tree number (ingress code tables) |
| `group`    | which group's tree (egress only)                                |
| `addr`     | entry address                                                   |
| `valid`    | 0 deletes the entry                                             |
| `lo`, `hi`, `code` | feature-table entry                                     |
| `value`, `mask`, `cls`, `cert` | code-table entry                            |

- Features are numbered as in `feat_idx_e`: ACK, SYN, PSH, ECE, RST and FIN are 0 to 5,
  then source port 6, destination port 7 and length 8.
- Reset clears every `valid` bit. An empty classifier forwards every packet with an empty
  label.
- Writes take effect on the next lookup. There is no atomic model swap, so packets in flight
  during reprogramming may see a mix of old and new entries.

The group of each class is the model's business and not fixed in the hardware. The tests use
groups of 4, 3, 6, 6 and 2 consecutive class ids.

## Parameters

| parameter               | default | where           | note                                        |
|-------------------------|---------|-----------------|---------------------------------------------|
| `RF_TREES`              | 3       | top, ingress    | trees in the forest (as published)          |
| `GROUPS`                | 5       | top, egress     | class groups = egress trees (as published)  |
| `N_CLASSES`             | 21      | package         | device classes (as published); ids are 5 bits |
| `FT_DEPTH`              | 64      | top, both stages| intervals per feature table                 |
| `CT_DEPTH`              | 128     | top, both stages| leaves per tree                             |
| `CODE_W`                | 16      | package         | code bits per feature per tree              |
| `TM_DEPTH`              | 16      | top             | queue depth in packets                      |
| `WIN_BYTES`             | 64      | package         | header bytes seen per packet                |
| `FEAT_W`, `CERT_W`      | 16, 8   | package         | feature and certainty widths                |

The published design fixes only the tree and group counts. The other values are choices
made here: they fit trees pruned to 128 leaves.

Synthesis at these defaults gives about 52k word-level cells, 10k flip-flop bits and 0.5
Mbit of table storage, most of it in the five egress trees. The M/A stages are
written as parallel comparators and masked compares over register arrays, which is what a
TCAM does but not how a TCAM is built. For an ASIC you would map `code_table` onto a TCAM
macro and `feature_table` onto range-match logic or a TCAM with range expansion.

## How this relates to the published Henna design

Follows the published design:

- the split into a 3-tree forest at ingress and 5 per-group trees at egress;
- the nine features;
- the pipeline order of parser, control, deparser and traffic manager;
- one feature table per feature shared by all trees of a forest;
- one ternary code table per tree;
- majority voting with a certainty tie-break;
- the class group and final class carried in a packet header field;
- the placement of feature tables, code tables and voting in three successive match-action
  stages.

Choices made here, where the published description is silent:

- all table sizes and field widths, and the label byte's layout;
- the range-entry format, lowest-address priority and miss behaviour;
- how ties are broken when certainties are equal;
- the packet-length source (IPv4 total length);
- the treatment of non-IPv4 packets and of IPv4 packets without a TCP or UDP header;
- the queue, which is a plain tail-drop FIFO;
- the egress valid/ready handshake with a whole-pipeline stall;
- the table write port.

Departures and omissions:

- The published overview draws separate "features tree 1 / tree 2" boxes. This RTL uses one
  shared feature table per feature across the forest, as the text of the mapping describes.
- Second-stage models are single trees, as in the published evaluation. Forests at egress,
  mentioned there as a possible extension, are not built.
- Egress evaluates every group's tables in parallel and keeps the selected one. A switch
  would apply only the selected group's tables.
- Not modelled:
  - choosing the egress port (forwarding);
  - packet payload;
  - everything outside the classifier: MACs, the control-plane software, offline training.
- The published evaluation uses one trained model for 21 UNSW-IoT devices. Its pruned leaf
  counts are not published, so it is unknown whether those exact trees fit in 128 leaves per
  tree. The tests use random trees of the published shapes instead: forest depth ≤ 10, group
  trees of depth 4 to 10, ≤ 128 leaves each.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Expected values never come from the RTL:

- `henna_tb_pkg` builds random trees and evaluates them by walking them.
- It generates the table entries with the rules in "How a tree becomes two tables" above,
  so the tests also check that mapping.
- It builds packets from chosen feature values, so the expected features are known without
  parsing.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_feature_table`, `tb_code_table` | lookups against a scan of a copy of the entries, with overlaps and deletions |
| `tb_voting_table`      | random votes against a per-class vote count; directed majority and tie cases |
| `tb_ingress_parser`, `tb_egress_parser` | every packet kind (TCP, UDP, ICMP, ARP, IPv4 options, fragments); group decode; holds |
| `tb_ingress_deparser`, `tb_egress_deparser` | label encoding; output hold under backpressure |
| `tb_traffic_manager`   | order, tail drops, drop count and fill level against a reference queue |
| `tb_ingress_control`   | random 3-tree forest; group = walked-tree vote; 3-cycle latency |
| `tb_egress_control`    | five random group trees of depths 10/6/8/10/4; class of the selected tree; 2-cycle latency; stalls |
| `tb_henna_top`         | whole design at default parameters, end to end (below) |
| `tb_workload_iot21`    | the 21-device / 5-group model shape (forest trees filled to 128 leaves) at line rate: 20 000 back-to-back packets, all labels checked, no drops, the last packet out exactly 10 cycles after it entered (one packet per cycle sustained) |

`tb_henna_top` runs the whole design at its default parameters in four phases:

1. No tables loaded: every IPv4 packet is a stage-1 miss.
2. Only the forest loaded: grouped packets are stage-2 misses.
3. Everything loaded: full label check, plus the 10-cycle latency of a lone packet.
4. A port that is ready a third of the time: the egress pipeline stalls and the queue drops
   packets.

Output packets must form an in-order subsequence of the input. The number of packets missing
from it must equal the queue's drop count. The test fails if any of these mechanisms never
happens: bypass, vote tie, stage-1 miss, stage-2 miss, stall, drop.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/henna_pkg.sv tb/henna_tb_pkg.sv tb/tb_henna_top.sv --top-module tb_henna_top
./obj_dir/Vtb_henna_top
```

Replace `tb_henna_top` with any other testbench name. The end-to-end test compiles in about
25 s and runs in well under a second. `rtl/` passes
`verilator --lint-only -Wall` with warnings only: unused bits, and the reset used both by
the flip-flops and by the assertions' disable conditions.

## Files

- `rtl/henna_pkg.sv`: widths, packet, PHV and label types, the table-write record, feature
  extraction.
- `rtl/feature_table.sv`, `rtl/code_table.sv`, `rtl/voting_table.sv`: the three table kinds.
- `rtl/ingress_parser.sv`, `rtl/ingress_control.sv`, `rtl/ingress_deparser.sv`: the first
  stage.
- `rtl/traffic_manager.sv`: the queue between the stages.
- `rtl/egress_parser.sv`, `rtl/egress_control.sv`, `rtl/egress_deparser.sv`: the second
  stage.
- `rtl/henna_top.sv`: the whole classifier.
- `tb/henna_tb_pkg.sv`: tree model, table generation and packet builder for the tests.
- `tb/tb_*.sv`: one testbench per module.
