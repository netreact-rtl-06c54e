# NETREACT sensor event detection pipeline in SystemVerilog

Industrial sensors report their values in small UDP packets, often every
millisecond or two. Most of those packets say nothing new. This pipeline sits
in a switch and decides, for every sensor packet, whether it is interesting. It
evaluates a logical rule over the latest values of several sensors, forwards
the packet towards the controller when the rule holds, and drops it otherwise.
Packets that are not sensor data are L2-forwarded as usual.

The design follows NETREACT, an event detection scheme for
match-action switch pipelines (Györgyi, Kecskeméti, Mallouhi, Vörös, Laki, ELTE Budapest).
NETREACT was written for a programmable switch ASIC. Its central constraint is
that a stateful register may be touched only once per packet, in a fixed
order. This RTL keeps that constraint. Every state array is read, modified and
written once per packet, in a single cycle. The pipeline takes one packet per
clock and never stalls.

## Rules: CNF over lanes, clauses as bitmaps

A rule is a conjunction of clauses, and each clause is a disjunction of atomic
predicates:

    (a > 12  or  c < 20)  and  (c != 10  or  a == 1)

The operators are `>`, `<`, `==`, `!=` and in-range (`lo <= x <= hi`). A rule
belongs to the sensors it *matches*. In the example these are `a` and `c`.
When a packet of a matched sensor arrives, the rule decides whether that
packet is kept.

The hardware has `N_CONJ = 9` **conjunction lanes**, so one switch can hold
rules of up to 9 clauses. Each lane holds at most one clause of a sensor's
rule. A lane has three parts:

* **Conjunction table** (`nr_conj_table`). This is an exact match on the
  sensor ID. It returns `{valid, clause_id, op, opnd_a, opnd_b}`: which clause
  this lane holds for the sensor, and the predicate that sensor's value feeds
  into it.
* **Clause registers** (`nr_clause_reg`). There is one 32-bit bitmap per
  `clause_id`. Each bit is the latest truth value of one predicate of that
  OR-clause, so the clause is true when any bit is set.
* **Bit-position table** (`nr_bitpos_table`). It maps `{sensor_id, clause_id}`
  to the bit of the bitmap that this sensor's predicate owns.

When a sensor packet arrives, each lane does the following:

1. It looks up its entry for the sensor.
2. It computes `opnd - value`. For in-range it also computes `hi - value`.
   The widths are one bit larger, so the subtraction cannot overflow.
3. It reads the predicate from the sign and zero flags alone:

   | op | true when |
   |----|-----------|
   | GT  `value > a`  | `a - value < 0` |
   | LT  `value < a`  | `a - value > 0` |
   | EQ / NE         | `a - value == 0` / `!= 0` |
   | RANGE `a <= value <= b` | `a - value <= 0` and `b - value >= 0` |

4. It merges the result into the clause bitmap. A true result ORs the bit in,
   and a false result ANDs it out. The new bitmap is written back.
5. It reports the clause as true if any bit of the new bitmap is set.

`nr_cnf_eval` then ANDs the clause values of all lanes that hold a clause for
this sensor.

**Shared clauses and NOP entries.** A clause can appear in several rules. In
that case it must live in the same lane under the same `clause_id`, so that all
those rules see one state. A rule can use a clause without feeding it. The
lane's entry for that sensor then has `op = OP_NOP`: the bitmap is only read.
The example below shows this for sensor `b`.

**What the bitmap scheme implies.** Only the latest truth value of each
predicate is kept, not the sensor values themselves. Two consequences follow:

* A sensor can appear at most once in a clause, because it owns one bit.
* A predicate is re-evaluated only when a packet of a sensor matched by a rule
  containing it passes through. If `g` is named in a clause but no rule matches
  `g`, then `g`'s packets are forwarded untouched and its bit never changes. To
  get `g` evaluated, give `g` a rule that contains the clause.

### Worked example

The rule set below is the one the end-to-end testbench installs. Sensor IDs:
a=1, b=2, c=3, d=4, e=5, f=6, g=7.

    a, c : (a > 12 or c < 20) and (c != 10 or a == 1)
    b    : (b in [20,60])     and (a > 12 or c < 20)
    d, e : (d == 10 or g > 60) and (e != 10 or f < 60)

| lane | sensor | clause_id | op | operands | bit |
|------|--------|-----------|----|----------|-----|
| 0 | a | 1 | GT | 12 | 0 |
| 0 | c | 1 | LT | 20 | 1 |
| 0 | b | 1 | NOP | – | – |
| 1 | c | 2 | NE | 10 | 0 |
| 1 | a | 2 | EQ | 1 | 1 |
| 1 | b | 3 | RANGE | 20, 60 | 0 |
| 0 | d | 4 | EQ | 10 | 0 |
| 0 | e | 4 | NOP | – | – |
| 1 | e | 5 | NE | 10 | 0 |
| 1 | d | 5 | NOP | – | – |

A "bit" entry is a bit-position table entry `{sensor, clause_id} -> bit`. NOP
rows need no bit-position entry. A lane that has a table entry but no
bit-position entry also only reads the clause.

## Packet path and timing

    cycle  0   packet in (in_valid, in_hdr)
           1   nr_parser: sensor packet = IPv4, UDP, dst port SENSOR_UDP_PORT
           1-5 9 x nr_conj_lane, in parallel:
                 L0 table lookup  L1 subtract  L2 sign check + bit position
                 L3 clause register read-modify-write
           5-6 nr_cnf_eval: AND of used lanes -> pass / drop
           1-3 nr_history -> nr_moving_avg      (aligned by delay lines)
           1-2 nr_l2_fwd for other traffic      (aligned by delay lines)
           6   packet out: out_drop, out_port, out_avg, out_history, ...

The latency is always 6 cycles and the throughput is one packet per cycle.
Stateful updates happen in order, so a packet sees every update made by the
packets before it, including one in the previous cycle. On the switch ASIC the
nine lanes sit in consecutive match-action stages. Here they run side by side,
because no lane reads another lane's state, and the result is the same.

The egress decision works as follows:

* **Sensor packet whose rule is true.** It is forwarded to `CTRL_PORT`: the
  controller, or the next switch towards it.
* **Sensor packet whose rule is false.** `out_drop` is set.
* **Sensor with no clause in any lane.** The packet is forwarded. On a switch
  that holds only part of the rules, such packets must reach the switch that
  holds theirs.
* **Other traffic.** It goes to the port that the MAC table gives, or to
  `MISS_PORT` if the destination MAC is not in the table.

## History and moving average

Every sensor packet, dropped or not, also enters a per-sensor queue of the
last `HIST_DEPTH` values. The queue is built from `HIST_DEPTH` register arrays,
and each packet shifts its sensor's row by one. The moving average keeps a
running sum per sensor: it adds the new value and subtracts the value that
left the queue. The average is `floor(sum / HIST_DEPTH)`, computed as an
arithmetic shift, so `HIST_DEPTH` must be a power of two. Slots that have not
been filled yet count as zero. Both values leave with the packet on
`out_history` (newest first) and `out_avg`.

## Splitting rules over several switches

One switch holds at most 9 clauses per rule. In a tree of switches, rules can
be split so that leaves filter early and the root holds the rest. Each added
switch adds 9 clauses of capacity. A split is correct only if it never drops a
packet too early. A packet that a switch drops must not be one that a clause
further up still needs. Suppose `(a > 12 or c < 20)` sat only at the root and
the leaf dropped an `a` packet because `(c != 10 or a == 1)` was false. Then
the root's copy of `a > 12` would go stale, and `b`'s rule would read it.

Formally: for every clause, each sensor the clause's rule matches must be
evaluated before, or on the same switch as, every sensor the clause contains.
Treat clauses as vertices of a graph with edges for this ordering. The
strongly connected components of that graph are then the groups of clauses
that must be placed together.

Working out a placement is control-plane software and is not part of this RTL.
`tb_netreact_tree` checks one correct split. The `a`, `b`, `c` rules sit on the
leaf and the `d`, `e` rules on the root. An 18-clause rule on `h` is split 9/9
across the two switches. For every packet the testbench checks that the root
delivers it exactly when a single switch holding all rules forwards it.

## Programming the tables

There are no host registers. The tables are written through struct ports,
defined in `nr_pkg`, one write per cycle:

* `conj_wr = {en, lane, sensor_id, entry}` writes a conjunction table entry.
  Writing it with `entry.valid = 0` removes the sensor's clause from that lane.
* `bitpos_wr = {en, lane, index, valid, sensor_id, clause_id, bitpos}` writes
  slot `index` of a lane's bit-position table. The table is fully associative,
  so any free slot will do.
* `l2_wr = {en, index, valid, mac, port}` writes one MAC table slot.
* `clr_en, clr_lane, clr_clause_id` reset one clause bitmap to zero.

After reset, every table is empty, every bitmap is zero and every history is
empty.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CONJ` | 9 | lanes, i.e. maximum clauses per rule on one switch |
| `BITMAP_W` (nr_pkg) | 32 | predicates per clause |
| `SENSOR_ID_W` (nr_pkg) | 8 | sensor ID width; tables hold 2^8 sensors |
| `CLAUSE_ID_W` (nr_pkg) | 8 | clause registers per lane |
| `VALUE_W` (nr_pkg) | 32 | signed sensor value |
| `BITPOS_DEPTH` | 256 | bit-position entries per lane |
| `HIST_DEPTH` | 4 | history length and averaging window (power of two) |
| `L2_DEPTH` | 64 | MAC table entries |
| `SENSOR_UDP_PORT` | 50000 | UDP port that marks sensor packets |
| `CTRL_PORT`, `MISS_PORT` | 64, 511 | egress for kept sensor packets and for L2 misses |

## What comes from NETREACT and what is this design's choice

The following follow NETREACT:

* the CNF rules with one clause per lane;
* the 9 lanes, each with its own exact-match table and register array;
* the operator set and the subtract-then-check-sign evaluation;
* in-range as two subtractions;
* the 32-bit clause bitmaps;
* the bit-position lookup and the AND/OR merge;
* the NOP entries;
* the history queue and the moving average;
* the L2 path for other traffic;
* the "do not drop too early" rule for splitting.

The following are this design's choices:

* **Field widths.** Sensor ID, value, Clause ID and port widths.
* **Table sizes and structures.** The conjunction table is addressed directly
  by the sensor ID. The bit-position and MAC tables are small associative
  arrays.
* **Key of the bit-position table.** The predicate's Boolean result is not part
  of the key. It selects set or clear in the merge, which halves the entries
  without changing behaviour.
* **Range bounds.** In-range includes both bounds.
* **Sensors with no rule.** Their packets are forwarded.
* **Packet classification.** A sensor packet is recognised by EtherType, IP
  protocol and UDP port.
* **Timing.** Lanes run in parallel, with a fixed latency of 6 cycles.
* **Reset and the clear port.** Both are this design's own.
* **Moving average.** It is an average over the history window, with unfilled
  slots counting as zero.
* **Control plane.** Tables are written through plain ports.

## Verification

Each module has a self-checking testbench in `tb/`. It compares the module
with an independent model and prints `TB_RESULT checks=N failures=M`.

* `tb_netreact_top` runs the whole switch at default parameters. It installs
  the worked example plus a 9-clause rule that uses every lane. It then sends
  5000 cycles of mixed sensor and other traffic, mostly back to back, and clears one
  clause register in the middle of the run. It checks every output against a
  rule-level model and checks the latency of exactly 6 cycles. It also counts
  how often each mechanism happened and fails if any never did: forward, drop,
  no-rule, NOP read of a shared clause, range true and range false, all nine
  lanes, L2 hit and miss, history eviction, back-to-back packets of one sensor,
  and clause clear.
* `tb_netreact_tree` chains two switches as leaf and root and compares them
  with a single central switch (see above).
* `tb_netreact_shared` runs a rule set whose clauses are shared between the
  rules of different sensors, including a 3-clause rule. Each clause is fed by
  one sensor and read by others through NOP entries.

Concurrent assertions in the RTL check these rules during every simulation:

* the fixed 6-cycle latency;
* a drop only ever applies to a sensor packet;
* lane and CNF flags are consistent;
* table writes stay in range.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/nr_pkg.sv tb/tb_netreact_top.sv --top-module tb_netreact_top
    ./obj_dir/Vtb_netreact_top

Every testbench finishes in well under a second of simulation time.

## Not included

* **Placement algorithm.** The algorithm that splits rules over switches
  (strongly connected components of the clause graph) is offline software.
* **Switch ASIC.** The ASIC around the pipeline is not included: MACs, traffic
  manager, and the ingress/egress split.
* **Control software.** The software that fills the tables is not included.

## Files

| file | content |
|------|---------|
| `rtl/nr_pkg.sv` | widths, operator enum, entry and write-request structs |
| `rtl/netreact_top.sv` | one complete switch pipeline |
| `rtl/nr_parser.sv` | sensor / other traffic split |
| `rtl/nr_conj_lane.sv` | one conjunction lane (table, subtract, evaluate, bit position, register) |
| `rtl/nr_conj_table.sv`, `rtl/nr_prep.sv`, `rtl/nr_pred_eval.sv`, `rtl/nr_bitpos_table.sv`, `rtl/nr_clause_reg.sv` | parts of a lane |
| `rtl/nr_cnf_eval.sv` | AND of clauses, pass/drop |
| `rtl/nr_history.sv`, `rtl/nr_moving_avg.sv` | per-sensor history queue and moving average |
| `rtl/nr_l2_fwd.sv` | MAC table for other traffic |
| `rtl/nr_delay.sv` | alignment shift register |
| `tb/tb_*.sv` | one testbench per module, plus `tb_netreact_tree` and `tb_netreact_shared` |
