# HSN forwarding element: separate tables for VNF offload and for steering

In an SDN/NFV network, the SDN switches (forwarding elements, FEs) have far
more match-action power than steering traffic between virtual network
functions (VNFs) needs. Stateless VNF work, such as NAT rewriting or a
firewall's accept/deny decision, could run in those switches. Putting VNF
rules and forwarding rules into the same flow table makes them conflict,
though. It also forces one controller to manage both the network and the
VNFs.

This RTL implements a forwarding element that splits its match tables into
two halves, each with its own owner:

* **HA half (hardware acceleration).** Three tables in series. Each has a
  programmable *match selector* and a *bit-granular action processor*. Only
  the hardware-acceleration manager (**HAM**) configures them, over its own
  control interface. An HA table never sends a packet to any controller, not
  even on a miss.
* **FW half (forwarding).** One fixed-format table. It matches `in_port` plus
  the 5-tuple (IPv4 source and destination, L4 source and destination port).
  It only forwards, drops or sends the packet to the network controller. The
  network controller alone configures it and receives its packet-ins.

After the parser, a **classifier** reads each packet's service tag. The tag
decides whether this FE must accelerate a VNF for the packet. If so, the
packet goes through the HA tables and then the FW table (the *HA path*).
If not, only the FW table acts on it (the *forwarding-only path*).

```
 packet words ─► parser ─► classifier ─► HA table 0 ─► HA table 1 ─► HA table 2 ─► FW table ─► fwd / drop
                 (hv)        │ tag                ▲ ▲ ▲                               │
                             │                    │ │ │ selectors, rules             │ packet-in
                             │             hsn_ha_ctrl ◄──► HAM                        ▼
                             └─ tag entries ◄── hsn_fe_ctrl ◄──► network controller ◄──┘
                                FW rules    ◄──┘
```

The sizes follow a NetFPGA-10G prototype of the architecture:

* a 512-bit header vector;
* three HA tables with a 64-bit match width;
* a 104-bit 5-tuple FW table, giving 296 match bits in all;
* eight ports: four Ethernet ports and four host DMA ports.

## Files

| file | module | role |
|---|---|---|
| `rtl/hsn_pkg.sv` | package | sizes, header-vector layout and field offsets, message and action types |
| `rtl/hsn_fe.sv` | `hsn_fe` | top: the whole forwarding element |
| `rtl/hsn_parser.sv` | `hsn_parser` | packet words to header vector |
| `rtl/hsn_classifier.sv` | `hsn_classifier` | service tag to HA path / forwarding-only path |
| `rtl/hsn_ha_table.sv` | `hsn_ha_table` | one HA table (selector + TCAM + action memory + action processor) |
| `rtl/hsn_match_selector.sv` | `hsn_match_selector` | builds a 64-bit key from the header vector |
| `rtl/hsn_tcam.sv` | `hsn_tcam` | ternary match table, lowest index wins |
| `rtl/hsn_action_proc.sv` | `hsn_action_proc` | bit-granular rewrite, drop, go-to |
| `rtl/hsn_fw_table.sv` | `hsn_fw_table` | 5-tuple forwarding table |
| `rtl/hsn_ha_ctrl.sv` | `hsn_ha_ctrl` | HAM interface: status enquiry and HA configuration |
| `rtl/hsn_fe_ctrl.sv` | `hsn_fe_ctrl` | controller interface: FW and classifier rules, packet-in buffer |
| `rtl/hsn_fifo.sv` | `hsn_fifo` | FIFO used for the packet-in buffer |
| `tb/tb_<module>.sv` | | self-checking testbench of each module |
| `tb/tb_hsn_fe_nat.sv` | | 96-rule NAT over three HA tables, 256-byte packets |
| `tb/tb_hsn_fe_fields.sv` | | two VNFs with random 12-tuple fields mapped onto the HA tables |

## The header vector

Every stage after the parser works on one 512-bit header vector per packet
(`hv_t` in `hsn_pkg`). The HA tables address fields by **bit offset** in
this vector. The offsets are the `OFF_*` constants of the package. Bit 0 is
the LSB of the packed struct.

| field | width | offset | note |
|---|---|---|---|
| `in_port` | 8 | 504 | ports 0–3 Ethernet, 4–7 DMA |
| `eth_dst`, `eth_src` | 48, 48 | 456, 408 | |
| `eth_type` | 16 | 392 | inner type when tagged |
| `vlan_valid`, `vlan_pcp`, `vlan_id` | 1, 3, 12 | 391, 388, 376 | `vlan_id` is the service tag |
| `ipv4_valid`, `ip_tos` (DSCP), `ip_proto` | 1, 6, 8 | 375, 369, 361 | |
| `ip_src`, `ip_dst` | 32, 32 | 329, 297 | |
| `l4_valid`, `tp_src`, `tp_dst` | 1, 16, 16 | 296, 280, 264 | TCP or UDP only |
| `meta` | 32 | 232 | zero from the parser; HA tables pass results through it |
| `pkt_len` | 16 | 216 | bytes |
| `spare` | 216 | 0 | zero |

These fields form the OpenFlow 12-tuple, plus validity flags, metadata and
the packet length. The order of the fields and the metadata word are this
design's choices.

## HA tables: how a VNF is mapped onto them

This part is the heart of the design and the least obvious to use.

### One table

An HA table (`hsn_ha_table`, `TABLE_ID` 0, 1 or 2) has four parts:

1. **Match selector.** Four 16-bit windows, each at a configurable bit
   offset in the header vector, are concatenated into the 64-bit key.
   Window 0 forms the top 16 bits of the key. A 32-bit field takes two
   windows (`off = OFF_X + 16` and `OFF_X`). A shorter field takes one
   window, and the TCAM mask hides the bits that do not belong to it.
2. **TCAM.** Up to 32 rules (`HA_DEPTH`). Each rule has a key, a care mask
   (1 = compare the bit) and a valid bit. The lowest matching index wins.
3. **Action memory.** One `ha_action_t` per rule.
4. **Action processor.** It applies two *set operations*. Each writes
   `val` into the bits selected by the 64-bit `mask`, inside the 64-bit
   window that starts at bit `off`. The second operation wins where the two
   overlap. The action can also drop the packet, and it names the table
   that acts next (`next_tbl`, the go-to).

A table acts on a packet only if the packet's `next_tbl` equals its
`TABLE_ID` and no earlier table dropped the packet. Any other packet passes
with the same two-clock latency. This keeps packets in order and makes the
go-to simple: skipping a table just means not naming it.

| outcome | header vector | `next_tbl` | `drop` |
|---|---|---|---|
| not addressed / dropped | unchanged | unchanged | unchanged |
| miss | unchanged | `TABLE_ID + 1` (3 = FW table) | 0 |
| hit | set operations applied | action's `next_tbl` | action's `drop` |

### Composing tables

* **One VNF, one table.** A NAT on the IPv4 source needs one table. The
  selector takes `ip_src`. Each rule matches one address, rewrites `ip_src`
  (`off = OFF_IP_SRC`, `mask = 0xffffffff`) and names 3 (the FW table) as
  next.
* **Wider than 64 bits.** A 5-tuple firewall is about 104 bits wide, so it
  needs two tables. Table *k* matches part of the tuple and, on a hit,
  writes a rule tag into `meta` (second set operation) with go-to *k*+1.
  Table *k*+1 selects `meta` as one of its windows and matches it together
  with the rest of the tuple.
* **Deeper than one table.** Rules that do not fit in one table continue
  in the next table, with the same selector. A miss falls through to the
  next table. A hit uses go-to to jump past the overflow table. The
  prototype describes this case as set up through the metadata. Here the
  fall-through needs no metadata. A rule can still write `meta` to tell
  later tables which part matched.
* **Several VNFs in a row.** The go-to of the first VNF's last table names
  the first table of the next VNF. Which chain a packet starts on is decided
  by the classifier's `first_tbl`.

The end-to-end testbench uses exactly this: a NAT in table 0, and a
firewall that spans tables 1 and 2 and is linked through `meta`. It uses
three classifier tags: NAT only, firewall only, and NAT followed by the
firewall by go-to.

## Classifier and the two paths

`hsn_classifier` holds 16 entries of {tag, first HA table}. The tag is the
802.1Q VLAN ID. A tagged packet whose tag is in the table gets
`next_tbl = first_tbl` and `ha_path = 1`. Every other packet gets
`next_tbl = 3` and passes the HA tables untouched. The network controller
writes the entries, because the HAM's message set only covers the HA tables.

## FW table and packet-in

`hsn_fw_table` matches `{in_port, ip_src, ip_dst, tp_src, tp_dst}` (104
bits) in a 32-rule TCAM. Its actions are `FW_OUTPUT` (to a port),
`FW_TO_CTRL` and `FW_DROP`. A miss becomes a packet-in, so that the
controller can install a path. A packet that an HA table dropped is
reported on `drop_valid` without a lookup. Each packet leaves on exactly
one of `fwd_valid`, `drop_valid` or the packet-in path.

Packet-ins wait in an 8-entry buffer in `hsn_fe_ctrl`. While the buffer is
full, new packet-ins are discarded and counted in `pin_overflow`. The
buffer refuses a write while full, even when it is read in the same clock.

## Control interfaces

Both interfaces use valid/ready handshakes and take whole messages in one
beat. Each accepts a message only while no response is waiting. The write
strobe and the response follow one clock after acceptance. Every message
gets exactly one response, on its own interface. The two controllers never
see each other's replies.

**HAM ↔ `hsn_ha_ctrl`** (`ha_msg_t` / `ha_rsp_t`):

| `op` | effect | response |
|---|---|---|
| `HA_STATUS` | none | `total` = table depth, `idle` = unused rules of table `tbl` |
| `HA_SEL_CFG` | loads `sel` into the selector of table `tbl` | `ok` |
| `HA_RULE_WR` | writes `key`, `mask`, `act` at rule `idx` of table `tbl` | `ok` |
| `HA_RULE_DEL` | invalidates rule `idx` of table `tbl` | `ok` |

`ok = 0` means the table or rule index does not exist, and nothing was
written.

**Network controller ↔ `hsn_fe_ctrl`** (`fe_msg_t`): `FE_FW_WR` and
`FE_FW_DEL` write or delete FW rules. `FE_CLS_WR` and `FE_CLS_DEL` write or
delete classifier tags. The response carries `op` and `ok`. Packet-ins come
out on `pin_valid` / `pin_ready` / `pin_hv`.

## Timing

* **Parser.** One 64-bit word per clock; `s_ready` is always 1. The first
  byte of the packet is in bits 63:56. Bytes are enabled MSB first by
  `s_keep`, and `s_port` is sampled with the first word. The header vector
  appears one clock after `s_last`.
* **Tables.** One packet per clock. The classifier takes 1 clock, each HA
  table 2 and the FW table 2.
* **Latency.** From the clock of `s_last` to `fwd_valid` or `drop_valid`
  is **10 clocks** on both paths. A packet-in shows on `pin_valid` one clock
  later.
* **Configuration.** A rule written while traffic flows applies to packets
  that do their lookup after the write clock.
* **Reset.** `rst_n` is asynchronous and active low. It empties every table
  and the classifier, and clears the selectors and the packet-in buffer.

## Parameters

| parameter | default | where from |
|---|---|---|
| `NUM_HA` | 3 | prototype |
| `HA_W` | 64 | prototype (chosen as the best compromise of cost and table use) |
| `HV_W` | 512 | prototype |
| `FW_KEY_W` | 104 | prototype: 296 total − 3 × 64 |
| `HA_DEPTH`, `FW_DEPTH` (`hsn_fe`: `HA_DEPTH_P`, `FW_DEPTH_P`) | 32 | own choice; a TCAM table on the prototype held "dozens" of rules |
| `CLS_DEPTH` (`CLS_DEPTH_P`) | 16 | own choice |
| `PIN_DEPTH` | 8 | own choice |
| `SEG_W` × `SEGS`, `NUM_SETS`, `META_W` | 16 × 4, 2, 32 | own choice |

The package constants are shared by all modules. Change `NUM_HA`, `HA_W` or
`HV_W` only in `hsn_pkg`. `TBL_W` must stay wide enough to encode
`NUM_HA` + 1 table ids, and `SEG_W × SEGS` must equal `HA_W`.

## What the design covers and what it does not

Only header vectors travel through this FE. The following are left out:

* the payload buffer;
* a deparser that writes modified fields back into the packet;
* the Ethernet MACs and DMA engines of the platform.

`fwd` gives the output port and the rewritten header vector, to drive such
a back end.

Other limits:

* **Hash table.** The prototype kept rules in a TCAM and a hash table. Here
  every table is a TCAM.
* **Rule depth.** A NAT with 200 rules does not fit in three 32-rule tables
  (7 tables would be needed). Raise `HA_DEPTH_P`.
* **Throughput.** The tables take a packet per clock, but the single 64-bit
  parser input does not. For 256-byte packets at 10 Gbit/s it needs
  145 MHz per port, so four ports at line rate need a wider input or one
  parser per port.
* **Stateless only.** All FE processing is stateless. Stateful functions
  (TCP connection tracking) stay in software VNFs.

## Simulating

Each testbench checks its module against a reference model in the
testbench. It prints `TB_RESULT checks=N failures=M` and has a watchdog.
With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  --top-module tb_hsn_fe rtl/hsn_pkg.sv tb/tb_hsn_fe.sv
./obj_dir/Vtb_hsn_fe
```

Replace `tb_hsn_fe` with any other `tb_hsn_*` to test a single module.

`tb_hsn_fe` runs the top at its default sizes. It loads NAT, firewall,
classifier and FW rules through the two control interfaces, then sends
about 1500 packets built byte by byte. It compares every result, in order
and with the 10-clock latency, against a model of the whole FE. It also
counts each mechanism and fails if one never occurs:

* both classifier paths;
* HA hit, miss and go-to;
* HA drop;
* FW forward, FW to-controller, FW miss and FW drop;
* packet-in overflow;
* status enquiry, rejected configuration and rule deletion.

It peeks at the FW table's packet-in strobe (`dut.dp_pin_valid`) to line up
packet-ins before they enter the buffer.

Two more testbenches run the top at its default sizes with larger
workloads:

* `tb_hsn_fe_nat` spreads 96 source-NAT rules over the three HA tables.
  A packet that misses one table falls through to the next. It sends 1000
  packets of 256 bytes and checks every rewrite. Each table serves hits,
  and sources with no rule pass through unchanged.
* `tb_hsn_fe_fields` maps two VNFs onto the HA tables in 24 random draws.
  Each VNF matches three fields drawn from the OpenFlow 12-tuple. Each field
  is cut into 16-bit selector windows. A VNF that needs more than four
  windows continues in the next table, linked by a number in `meta[31:16]`.
  Draws that need more than three tables are counted and skipped. With the
  fixed seed, 20 of 24 draws fit, and every packet of those matches the
  model. The fields use 62.8 % of the key bits of the tables they need.
  This is lower than the 83 % the prototype reported for 64-bit tables.
  Two things here cost bits: a short field still takes a whole 16-bit
  window, and a chained table gives one window to the link number.

All testbenches pass. Each was also run against a copy of its module with
one deliberate bug, and each one caught it.
