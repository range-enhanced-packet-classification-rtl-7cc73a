# REPC: a range-enhanced packet classifier

A packet classifier compares the header of every packet with a set of rules.
Firewall and QoS rules often ask for *ranges*: source ports 1024–65535,
addresses 10.1.0.0–10.1.3.255, and so on. A TCAM can only store prefixes, so each range
must first be split into many prefixes. This design stores each range as
two bounds, `[lb, ub]`, and tests `lb <= b <= ub` directly in hardware.
It cuts the field into a few narrow slices and compares slice by slice. This is
the *range bit-vector encoding* (RBVE). An address prefix is just a special range,
so rules may also be given as prefixes.

For each packet the classifier reports, for every rule, the 6-bit
*classified output*:

    classified[r] = {Mvlan, Mudp, Mdp, Msp, Mda, Msa}

These are the per-field matches of IP source address, IP destination address,
source port, destination port, protocol and VLAN ID. It also reports the vector
of rules that match on all six fields, and the lowest-numbered matching rule.
The result appears three clock cycles after the packet's last input word.

## Data path

```
 in_valid/sop/eop/data
        |
   +----v----+  hdr[64 B]  +-----+  SA,DA,SP,DP  +----------------------+  4 x match[16]
   |   PGU   |------------>| HEU |-------------->| field unit x 4       |---------------+
   | framing,|  pkt_valid  +-----+               | 16 ranges + 16 RBVE  |               |
   | errors  |                |  VLAN, proto     +----------^-----------+               |
   +---------+                |                  range write port                      |
                              v                                                         v
                      +------------------------------------------------------------------+
   rule write port -->| rule_table -> rule_match x NUM_RULES: pick one bit per field     |
                      |               by index, VLAN/protocol matcher -> classified[r]    |
                      +-----------------------------------+------------------------------+
                                                          | hit[r]
                                                   +------v-------+
                                                   |  match_unit  |--> match_vec, best_rule
                                                   +--------------+
```

A rule set has far fewer *distinct* ranges per field than it has rules:
many rules share "any port" or "192.168.0.0/16". So each range field keeps
its distinct ranges once, in a table of `NUM_RANGES` (16) entries. Every
entry has its own RBVE matcher, and each packet's field value is tested
against every entry in parallel. A rule does not hold ranges. It holds one
4-bit index per range field, and its matcher only picks the indexed bit out
of each field's 16-bit match vector. It adds the VLAN and protocol checks,
which are exact values with wildcards.

| Module | Role |
|---|---|
| `repc_pkg` | widths, strides, table sizes, `hdr_fields_t`, `rule_t`, `field_e`, error codes, prefix mask |
| `repc_pgu` | packet generation unit: SoP/EoP framing, error checks, 64-byte header buffer |
| `repc_heu` | header extractor: Ethernet (+802.1Q) / IPv4 / TCP-UDP fields |
| `repc_rbve` | one range matcher (`W` bits, stride `D`) |
| `repc_field_unit` | one field's range table (range or prefix writes) and its RBVE matchers |
| `repc_ctrl_match` | VLAN and protocol matcher (exact value or wildcard) |
| `repc_rule_match` | one rule: select field bits by index + control matcher -> 6-bit classified output |
| `repc_rule_table` | rule registers |
| `repc_match_unit` | rule match bit-vector and first-match priority encoder |
| `repc_top` | the classifier |

The cost of the range matching grows with the number of distinct ranges,
`4 x NUM_RANGES` RBVE matchers. Each rule adds only a few multiplexers, two
small registers and the control matcher. With 16 rules and 16 ranges per
field, generic synthesis gives about 7,700 word-level cells and 5,700
flip-flops. Of those flip-flops, 4,100 hold the range tables and 620 the rules.

## The RBVE range matcher

This is the part of the design that needs the most explanation.

A `W`-bit key `b` and the bounds `lb`, `ub` are cut into `J = W/D` slices of
`D` bits. Slice 1 is the most significant. The address fields use `W = 32, D = 8`
and the port fields use `W = 16, D = 4`, so both have `J = 4` stages.

Comparing two numbers slice by slice from the top works as follows. Once a
slice of `b` is strictly between the bounds' slices, the lower slices no longer
matter. Once it equals one bound's slice, the remaining slices have to be
compared against that bound only. Each stage therefore produces a small code.

**Stage 1** gives `x = {x2,x1,x0}`:

| x | condition | meaning |
|---|---|---|
| 111 | `lb1 < b1 < ub1` | match; the rest does not matter |
| 001 | `b1 == ub1`, `lb1 < ub1` | so far a match; the rest must be `<=` ub |
| 100 | `b1 == lb1`, `lb1 < ub1` | so far a match; the rest must be `>=` lb |
| 010 | `b1 == lb1 == ub1` | so far a match; the rest depends on both bounds |
| 000 | otherwise | mismatch |

**Intermediate stages** `2..J-1` give four flags
`y = {b==ub, b<ub, b==lb, b>lb}`. The **last stage** gives
`z = {b<=ub, b>=lb}`.

**Combining the codes.** For `J = 4`, with `y1`, `y2` the two intermediate stages:

```
m1 = x2 & x1 & x0
m2 = x2 & y1[b>lb]                    | x0 & y1[b<ub]
m3 = x2 & y1[b==lb] & y2[b>lb]        | x0 & y1[b==ub] & y2[b<ub]
m4 = x2 & y1[b==lb] & y2[b==lb] & z0  | x0 & y1[b==ub] & y2[b==ub] & z1
m5 = "both" chain (x1), see below
match = m1 | m2 | m3 | m4 | m5
```

The "both" case arises when the bounds share leading slices, as in a prefix
such as 10.0.0.0/8. The code stays "both" for as long as `lb`, `ub` and `b`
all agree. At the first slice where `lb < ub` it resolves the same way as stage 1:

- strictly inside: a match;
- equal to `lb`: the LB chain;
- equal to `ub`: the UB chain;
- anything else: a mismatch.

`repc_rbve` computes this with a loop over the stages, so it works for any `W`
and `D` with `J >= 2`. That includes the strides 1, 2 and 4 for a 32-bit field.
The result is exactly `lb <= b <= ub`. A range with `lb > ub` matches
nothing.

A commonly quoted closed form of `m5` needs the key to be strictly inside the
bounds in both intermediate stages. That closed form misses keys such as
`10.5.0.0` in `10.0.0.0–10.255.255.255`. The loop form here does not have this gap.

**Timing.** All stage codes are computed in parallel and registered (cycle 1).
The combination is then registered (cycle 2). The matcher takes a new key
every cycle and has no stall.

## Packet front end

**PGU (`repc_pgu`).** The packet arrives as `DATA_W`-bit words (default 64) in
network byte order, with the first byte in the top bits. `in_sop` marks the first
word of a packet and `in_eop` the last. There is no back-pressure. The first
`HDR_BYTES` (64) bytes are kept; the rest of the packet is only counted. At the end
of the packet, one cycle after the EoP word, the PGU pulses one of two outputs:

- `pkt_valid`, for a good packet;
- `pkt_err`, with `err_code` saying what went wrong:
  - `PGU_NO_SOP`: a word arrived outside a packet.
  - `PGU_DUP_SOP`: a new SoP arrived before the EoP. The old packet is dropped
    and the new one is received.
  - `PGU_RUNT`: EoP came before the 64-byte header buffer was full, which is
    shorter than a minimum Ethernet frame.
  - `PGU_OVERSIZE`: the packet was longer than `MAX_WORDS` (191 words, a
    1522-byte tagged frame).

Only whole words are handled; there is no byte-enable on the last word.

**HEU (`repc_heu`).** This block is combinational. It handles these frame formats:

- Ethernet II, with at most one 802.1Q tag (TPID 0x8100);
- IPv4 with IHL from 5 up to what fits in the buffer (IP options are skipped);
- TCP or UDP ports. For any other protocol the ports read as 0.

If no IPv4 header is found, `fields.ok` is 0 and the packet matches no rule.
The top reports such packets with `cls_ok = 0`.

## Ranges and rules

**Range tables.** These are written through the `range_wr_*` port:

- `range_wr_field` selects SA, DA, SP or DP (`field_e`).
- `range_wr_addr` selects the entry.
- `range_wr_lb` and `range_wr_ub` give the bounds. The port tables use the
  low 16 bits.

With `range_wr_prefix = 1`, `range_wr_lb` holds a prefix value and
`range_wr_len` its length, 0 to 32 for addresses and 0 to 16 for ports. The
entry then stores `lb = v & mask(len)` and `ub = v | ~mask(len)`. A prefix
and a range are therefore matched by the same hardware. Reset empties every
entry (`lb` all ones, `ub = 0`), so an empty entry matches nothing.

**Rules.** `rule_t` is 39 bits:

- a valid bit;
- `sa_idx`, `da_idx`, `sp_idx`, `dp_idx`: an index into each range table;
- a 12-bit VLAN ID with a wildcard bit;
- an 8-bit protocol number with a wildcard bit.

A packet without a VLAN tag matches only a VLAN wildcard. `Mudp` compares the
whole protocol number, so 17 selects UDP and 6 selects TCP. Rules are
written whole through `rule_wr_*`, and reset clears them all.

A write to either table takes effect at the next edge. Each rule's indices
and valid bit travel two registers alongside the range matchers. A packet is
therefore judged by the rules and ranges in place at the edge where its
fields enter the matchers.

Storage is 39 bits per rule, plus 384 bytes of range tables shared by all
rules. At the default size that is about 29 bytes per rule, and less as rules
are added.

## Timing of one packet

| edge | event |
|---|---|
| 0 | EoP word accepted by the PGU |
| 1 | `pkt_valid`; HEU fields sampled by the RBVE stage registers |
| 2 | field matches registered |
| after 2 | `cls_valid`, `classified`, `match_vec`, `any_match`, `best_rule` valid for one cycle |

The latency is three clock cycles. The classifier core could accept one packet
per cycle. With 64-bit input words and 64-byte minimum frames, the input port
limits the rate to one packet every 8 cycles.

## How far to trust it, and where it departs from the REPC description

- **Follows the REPC architecture:**
  - the block structure: PGU, HEU, RBVE range matching for each range
    field, and a matching unit;
  - storing only the distinct values of each field, fewer than the rules;
  - the field widths and strides (32/8 and 16/4, four stages each);
  - the stage codes and the `m1..m4` terms;
  - the order of the classified output bits;
  - the three-cycle latency.
- **Corrected:** the `m5` term is generalised, as described above, so that
  prefix-like ranges match correctly. The x-code encoding follows the stage
  tables, with 001 meaning "depends on UB". Printed forms of the combining
  equations pair `x0` with the LB flags instead. Both assignments give the same
  match result.
- **Follows the REPC description, details chosen here:** distinct ranges
  are kept once per field and shared by the rules. How a rule refers to them,
  by a per-field index, is this design's choice.
- **This design's own choices:**
  - the word width, the header-buffer size and the set of framing errors;
  - the frame formats the HEU accepts;
  - the rule layout and the wildcards;
  - the number of rules and ranges (16 each);
  - the register-file tables with their write ports and prefix conversion;
  - the first-match priority order;
  - the reset style, an asynchronous active-low `rst_n`.
- **Not reproduced:**
  - The REPC figures of 16 bytes per rule, a 492.8 MHz clock and 99.87 Gbps
    are FPGA implementation results. This RTL stores about 29 bytes per rule
    at 16 rules, and about 8 bytes per rule at 128 rules with the same range
    tables.
  - The 99.87 Gbps figure equals 608 bits every 3 cycles at 492.8 MHz. The
    64-bit input port here carries 31.5 Gbps at that clock.
  - The pipeline depth is fixed at three stages. Extra pipeline stages for
    large rule sets are not provided; at high `NUM_RULES` the combinational
    match unit is the first place to add one.

Every block has a self-checking testbench. In each one the expected values are
computed independently, by plain comparisons or by a byte-level model of the
frame. The end-to-end test, `tb_repc_top`, runs the top at its default
parameters and covers:

- about 450 classified packets and the framing errors;
- tagged, untagged and non-IPv4 frames;
- prefix and plain range writes, and range and rule rewrites between bursts;
- no, single and multiple matches;
- back-to-back frames and every first-stage RBVE code.

It also checks the three-cycle latency on every packet. A final burst of 32
minimum-length frames, sent with no idle cycle, must give one result every
8 cycles.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends itself. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl \
    rtl/repc_pkg.sv tb/tb_repc_top.sv --top-module tb_repc_top -o sim
./obj_dir/sim
```

Replace `tb_repc_top` with `tb_repc_rbve`, `tb_repc_field_unit`, `tb_repc_pgu`, `tb_repc_heu`,
`tb_repc_ctrl_match`, `tb_repc_rule_match`, `tb_repc_rule_table`,
`tb_repc_match_unit` or `tb_repc_pkg` to test one block. Each runs in well
under a second.

To change the design:

- **Table sizes:** set `NUM_RULES` and `NUM_RANGES` on `repc_top`.
  `NUM_RANGES` can be at most `2**RIDX_W`; `RIDX_W` is set in `repc_pkg`.
- **Input width:** set `DATA_W`. It must divide the header buffer.
- **Strides:** change `ADDR_STRIDE` or `PORT_STRIDE` in `repc_pkg`, for example
  4 for 8 address stages.
