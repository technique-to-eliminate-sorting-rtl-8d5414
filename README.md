# Longest-prefix match without a sorted table

An IP router forwards each packet along the longest stored prefix that matches
the packet's destination address. The usual hardware for this is a ternary CAM
(TCAM): every row holds a prefix with don't-care bits, all rows are compared at
once, and a priority encoder picks the first matching row. That works only if
the rows are **sorted by prefix length**, longest first. A new route may then
have to shift many rows to make room, so insertion costs O(N) moves, and no
lookup can run while it does. A second cost is the priority encoder over
hundreds of thousands of match lines, which sits on the critical path.

This design drops the sort. The table is split **by output port** into one
TCAM partition per port. A partition holds only the routes that leave through
its port, so the order of its rows does not matter: all of them give the same
answer. A new route goes into any free row of its port's partition, in one
clock cycle. What is lost is the ordering that told the encoder which match is
longest. So each row stores its own prefix length next to the prefix. Two small
selection circuits then replace the encoder:

1. **Length selection** finds the longest length that matched in any
   partition.
2. **Port selection** finds which partition matched at that length. That
   partition's index is the output port, so no separate port SRAM is needed.

## Structure

```
               req_addr (search key)
                    |
   +----------------+----------------+----- ... -----+
   v                v                v               v
 partition 0     partition 1     partition 2  ...  partition P-1    partition_tcam
 (port 0 routes) (port 1 routes)                                  (unsorted rows)
   | L lines        | L lines        |                  |
   +-------+--------+-------+--------+------ ... -------+
           |                |
           v                |
     length_select          |        level 1: OR each length over the P partitions
     (longest length,       |        level 2: keep the highest length that matched
      one-hot of L)         |
           |                v
           +---------> port_select   AND each partition's lines with the longest
                           |         length, OR per partition -> P port lines
                           v
                   registered response: hit, one-hot port, one-hot length

 update_ctrl: (prefix, length, port) -> care mask, masked value, one-hot
              length row, insert/delete strobe of that port's partition only
```

| Module | Role |
| --- | --- |
| `lpm_pkg` | default sizes and the request operation type `lpm_op_e` |
| `partition_tcam` | one port's partition: ternary rows, length rows, free-row choice, delete |
| `length_select` | Length Selection Logic |
| `port_select` | Port Selection Logic |
| `update_ctrl` | turns a route update into a write to one partition |
| `lpm_coprocessor` | top level: request port, P partitions, both selection circuits, response register |

## Length lines: the central idea

Each partition row has two parts:

* **Ternary prefix.** A value and a care mask of `ADDR_W` bits. A prefix of
  length *n* compares the top *n* address bits and ignores the rest.
* **Length row.** `ADDR_W` bits with exactly one bit set: bit *n*-1 for
  length *n*. In silicon this is a plain SRAM row wired to the TCAM row's match
  line. No address decoder or encoder is needed, because the row's match line
  selects it directly.

During a search every matching row drives its length row onto the partition's
`ADDR_W` **length lines**, and these lines OR together. Several rows may match
at once, since a /8, a /16 and a /24 can all cover the same address. Within a
partition they cannot collide on one line. Two matching rows of the same
length would be the same prefix, and so a duplicate route. A partition's
output therefore says exactly which lengths matched in it. For example, with
10.0.0.0/8 and 10.1.0.0/16 on port 1, the address 10.1.2.3 raises lines 7 and
15 of partition 1.

The price is storage. Each row keeps an `ADDR_W`-bit length row where a sorted
table keeps a log2(P)-bit port number: 32 bits instead of 4 with 16 ports.
The number of rows does not change.

## Selection logic

**Length selection (`length_select`).** The first level ORs line *n* of all
P partitions: L·(P−1) two-input ORs, log2 P deep. This gives the set of
lengths that matched anywhere. The second level clears every length for which
a longer length also matched, which leaves a one-hot word. Done as
"AND with the inverse of each longer line", that is (L²−L)/2 gates. The tree
depth is about log2 P + log2 L. `any_match` is the OR of the first level and
serves as the hit flag. An all-zero result means a miss.

**Port selection (`port_select`).** For each partition it ANDs the partition's
length lines with the one-hot longest length and ORs the result. That is
P·(2L−1) gates, log2 L + 1 deep. After a hit, exactly one port line is high if
the table holds no duplicate routes. If the same prefix and length were stored
for two ports, both lines would rise. The design does not check for that (see
below).

At the default sizes (L = 32, P = 16) both circuits together are about two
thousand two-input gates. The 262144-row table is what dominates the area.

## Updates

`update_ctrl` checks the request: the length must be 1..`ADDR_W` and the port
must exist. It then builds the care mask (the top *n* bits), clears the
don't-care bits of the prefix, and builds the one-hot length row. Finally it
strobes only the partition of the route's port.

* **Insert.** The partition writes the entry into its lowest free row at the
  next clock edge. Any free row would do. The lowest is chosen by a scan of
  the valid bits. That scan is on the update path only, never on the lookup
  path. The cost is one cycle whatever the table holds. If the partition is
  full, the insertion is refused (`rsp_ok = 0`) and nothing changes. The
  table as a whole may still have room, because rows are not shared between
  ports.
* **Delete.** This is an addition that makes withdrawals and port changes
  possible. The request names the prefix, its length and its port. Every
  valid row of that partition with the same value and mask is cleared in one
  cycle. `rsp_ok` says whether one was found.
* **Moving a route to another port.** Delete it from the old port, then
  insert it on the new one. Inserting first would leave a duplicate that
  raises two port lines.

## Interface and timing (`lpm_coprocessor`)

One request per clock cycle. A lookup and an update cannot share a cycle.

| Signal | Dir | Width | Meaning |
| --- | --- | --- | --- |
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset that empties the table |
| `req_op` | in | `lpm_op_e` | `OP_NOP`, `OP_LOOKUP`, `OP_INSERT`, `OP_DELETE` |
| `req_addr` | in | `ADDR_W` | address to look up, or route prefix |
| `req_len` | in | clog2(`ADDR_W`+1) | prefix length of an update, binary, 1..`ADDR_W` |
| `req_port` | in | clog2(`NUM_PORTS`) | output port of an update, binary |
| `rsp_valid`, `rsp_op` | out | 1, `lpm_op_e` | response to the previous cycle's request |
| `rsp_hit` | out | 1 | the lookup matched |
| `rsp_port` | out | `NUM_PORTS` | one-hot output port (the port selection lines) |
| `rsp_len` | out | `ADDR_W` | one-hot matched length, bit *n*-1 = /*n* |
| `rsp_ok` | out | 1 | lookup hit, insertion accepted, or deletion found its route |

Latency is one cycle. The whole search path (partition compare, length
selection, port selection) is combinational within the request cycle, and the
result is registered. An update is visible to a lookup issued in the very next
cycle. The four stages (compare, length lines, length selection, port
selection) are independent and could each be given a register to pipeline the
path. This version does not do that.

## Parameters

| Parameter | Default | Meaning |
| --- | --- | --- |
| `ADDR_W` | 32 | address length L; also the number of length lines (IPv4) |
| `NUM_PORTS` | 16 | output ports P, one partition each |
| `PART_ROWS` | 16384 | rows per partition |

The defaults describe a 262144-route IPv4 table spread evenly over 16 ports.
Other sizes are plain parameter changes. For IPv6, set `ADDR_W = 128`, and the
length rows grow to 128 bits. A router with 4 ports uses `NUM_PORTS = 4`.

The storage is written as register arrays: value, mask and length row of
`ADDR_W` bits each, plus a valid bit per row. At the defaults that is
16 × 16384 × 97 ≈ 25.4 Mbit. This makes the RTL a complete, simulatable
model. In a chip the partitions would be TCAM and SRAM macros (16-transistor
TCAM cells, 6-transistor SRAM cells) with the same ports. Generic logic
synthesis handles these arrays poorly. Every row is read in parallel, so each
array gets one read port per row, and tool run time grows much faster than
the row count. About 256 rows per partition synthesise in seconds, while 1024
already take minutes. The full size is for simulation, or for mapping onto
macros.

## Departures and choices to know about

* **No default route.** The L length lines stand for lengths 1..L, so a /0
  route cannot be stored. An unmatched lookup returns `rsp_hit = 0`, and the
  caller applies its own default.
* **Deletion and reset are additions.** The approach itself describes only
  insertion. The exact-match delete and the table-clearing reset are this
  design's own.
* **Partitions are fixed in size.** A port whose routes outnumber
  `PART_ROWS` runs out of rows while others still have space. The approach
  fits tables whose routes are spread fairly evenly over the ports, and
  routers with few ports.
* **Duplicates are not checked.** Software that issues updates must not store
  one prefix and length on two ports.
* **Full 32-bit length rows.** Prefixes shorter than /8 hardly occur in
  practice, so lengths 8..32 alone would do. That would shorten both the
  length rows and the selection logic. This design keeps all `ADDR_W` lines.
* **Lowest free row, one-hot outputs, binary request fields, output register.**
  These are interface and implementation choices, not part of the method.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module's outputs with a reference worked out in the testbench, prints
`TB_RESULT checks=N failures=M`, and stops itself with a watchdog.

| Testbench | What it covers |
| --- | --- |
| `tb_length_select` | directed and random length-line patterns at 16×32 against a longest-first scan |
| `tb_port_select` | one-hot length against random partition lines, and the no-length case |
| `tb_update_ctrl` | masks, length rows, strobes and outcome for every length 0..33 and random updates |
| `tb_partition_tcam` | 8-row partition: nested prefixes, fill to full, refusal, delete and row reuse, random churn against a reference table |
| `tb_lpm_coprocessor` | 4 ports × 8 rows, 3000 random operations against a reference LPM search, with the one-cycle response checked; fails unless each of these happened: insert, refusal when full, malformed length, delete hit and miss, lookup hit and miss, a longer prefix on one port beating a shorter one on another, and an insert seen by the next lookup |
| `tb_lpm_full` | full default size: nested routes on several ports, lookups, delete and fallback to the shorter prefix |
| `tb_lpm_capacity` | full default size: fills one partition to its 16384 rows at one insertion per cycle, checks the refusal of the next one and lookups across the loaded routes (about half a minute of simulation) |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl \
    rtl/lpm_pkg.sv rtl/length_select.sv rtl/port_select.sv rtl/update_ctrl.sv \
    rtl/partition_tcam.sv rtl/lpm_coprocessor.sv tb/tb_lpm_coprocessor.sv \
    --top-module tb_lpm_coprocessor -Mdir obj -o sim && obj/sim
```

For a unit testbench, list `rtl/lpm_pkg.sv`, the module's own file and its
testbench.

Not verified: gate-level timing and area. The gate counts above come from the
structure of the logic, not from synthesis results.
