# Mesh-of-trees interconnect with shared TSV buses for a 3-D stacked L2 scratchpad

A cluster of up to 32 simple cores shares a large L2 scratchpad memory (SPM)
made of 64 SRAM banks of 64 KB, stacked on top of the core die. Cores reach
the banks through a fully combinational, circuit-switched mesh-of-trees (MoT)
interconnect: a request is routed, arbitrated and granted in the cycle it is
issued, and the data come back in the next cycle.

In a 3-D stack every wire bundle that crosses between dies needs
through-silicon vias (TSVs), which are large and lower the yield. Giving each
bank its own TSV bus (the bundle of address, data and control TSVs) costs too
many TSVs. Sharing one bus between several banks saves TSVs but makes cores
that target different banks of the same group collide on the bus.

This design shares TSVs differently. Banks are grouped by four, and each group
gets **two** buses that come from **two separate, identical MoTs**. That is
half as many buses as banks, the same count as pairing banks on one bus. But
two banks of a group can be used in the same cycle, and which bank uses which
bus is set at run time by four control signals. The control signals serve
two purposes:

* **Traffic balancing.** Put a busy bank and a quiet bank on each bus.
* **Fault tolerance.** Move all four banks onto one bus when the other one has
  failed.

Only one die mask is needed for all memory tiers, because every bank has the
same two-bus multiplexer in front of it.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with parameters
whose defaults are the full size: 32 cores, 64 banks, 4 banks per group.

## Structure

```
core c ──► mod_routing_switch ──┬─► MoT_0 (mot_interconnect 32x16) ──► TSV bus (g,0) ─┐
  (x32)     (MoT_0 or MoT_1?)   └─► MoT_1 (mot_interconnect 32x16) ──► TSV bus (g,1) ─┤
                                                                                       ▼
                                          bank_group g (x16): 4 x [bank_tsv_mux ─► spm_bank]
                                          bank_access_monitor: per-bank access counters
```

| module | role |
|---|---|
| `mot3d_spm_cluster` | top: 32 modified routing switches, two MoTs, 16 bank groups, monitor |
| `mod_routing_switch` | first switch behind each core; picks MoT_0 or MoT_1 |
| `tsv_ctrl_logic` | the bank-to-MoT mapping from c1..c4 (used by cores and banks alike) |
| `mot_interconnect` | one N_IN x N_OUT mesh of trees |
| `mot_routing_switch` | 1-to-2 switch of a routing tree |
| `mot_arbitration_switch` | 2-to-1 round-robin switch of an arbitration tree |
| `bank_group` | four banks behind their bus multiplexers, grant and response per bus |
| `bank_tsv_mux` | per-bank choice of one of the group's two buses |
| `spm_bank` | 16384 x 32-bit single-port SRAM (64 KB) |
| `bank_access_monitor` | saturating access counter per bank |
| `mot3d_pkg` | request packet `mot_req_t`, control signals `tsv_ctrl_t` |

## Address map

Banks are contiguous 64 KB blocks. A 32-bit byte address reads as
`{tag, group[3:0], bank-in-group[1:0], offset[15:0]}`. So bank `k` holds
addresses `k*0x10000 .. k*0x10000+0xFFFF` above the SPM base, and the 6-bit
bank index sits at bits 21:16 (`BANK_LSB = 16`):

* **Bits 17:16** select the bank inside its group. They are the two bits that
  the control logic looks at.
* **Bits 21:18** select the group. This is the MoT output, and so the pair of
  TSV buses.
* **Bits above 21** are not decoded. Cores must send only SPM addresses to this
  port; cacheable traffic goes elsewhere.

## The MoT

Each `mot_interconnect` holds two kinds of binary trees, wired leaf to leaf:

* **Routing trees.** Every core owns a routing tree of log2(N_OUT) levels of
  1-to-2 switches. Each level steers the request by one group-index bit, most
  significant bit first.
* **Arbitration trees.** Every output owns an arbitration tree of log2(N_IN)
  levels of 2-input round-robin switches.

For 32 cores and 16 outputs that is 480 routing and 496 arbitration switches
per MoT. At the small size of 4 cores and 8 banks the whole cluster has two
4x2 MoTs with 8 routing and 12 arbitration switches, 4 modified routing
switches and 8 bank multiplexers. A single 4x4 MoT with one bus per two banks
would need 12 routing and 12 arbitration switches for the same number of
buses. The request path is purely combinational:

1. The core's valid and packet go down its routing tree.
2. The arbitration tree picks one winner.
3. The bank side grants the winner.
4. The grant comes back along the same path, all in the same cycle.

Each arbitration switch holds two flip-flops:

* **Priority.** It moves to the other input after each granted request. So an
  input that loses a tie at that switch wins there in the next cycle.
* **Last winner.** It routes the next cycle's response back to that input.

Routing switches hold no state. They steer the response by which branch
returns a valid response, not by the current request's address. The current
address may already belong to the core's next request.

## Choosing the MoT: c1..c4

The modified routing switch is an ordinary routing switch whose steering bit
comes from `tsv_ctrl_logic` instead of an address bit. That logic is three
2:1 multiplexers and an inverter:

```
sel     = c2 ? idx[1] : idx[0]     // idx = bank index inside the group
t       = c1 ? ~sel   : sel
ctr_out = c4 ? c3     : t          // 0: MoT_0, 1: MoT_1
```

| c4 | c3 | c2 | c1 | banks on MoT_0 | banks on MoT_1 |
|---|---|---|---|---|---|
| 0 | x | 0 | 0 | 00, 10 | 01, 11 |
| 0 | x | 0 | 1 | 01, 11 | 00, 10 |
| 0 | x | 1 | 0 | 00, 01 | 10, 11 |
| 0 | x | 1 | 1 | 10, 11 | 00, 01 |
| 1 | 0 | x | x | all | none |
| 1 | 1 | x | x | none | all |

The same logic, evaluated for each bank's own index, drives that bank's
`bank_tsv_mux`. This guarantees that a bank listens to exactly the bus its
requests arrive on, and that the two buses of a group never address the same
bank. `bank_group` asserts this.

This design gives every bank group its own set of c1..c4 (`tsv_ctrl_i[g]`).
The modified routing switch selects the set by the group bits of the address.
So one failed bus, or one hot group, is handled without touching the other
groups. Change the control signals only while no request is in flight.

The split {00,11} / {01,10} cannot be expressed by this logic.

### Traffic balancing

The control signals are meant to be set by software from a profile of bank
access frequencies, which `bank_access_monitor` provides. The rule:

1. Sort the four banks of a group by access count.
2. Put the most and the least used bank on one bus, and the other two on the
   other bus.
3. Pick the table row that realises this split.

Example: frequencies of 70, 25, 30 and 80 % for banks 00, 01, 10 and 11 give
the split {01, 11} / {00, 10}, which is row 1 or 2.

### Fault tolerance

With c4 high, all four banks of a group use the bus from the MoT named by c3.
The other bus carries nothing, so a failed bus can be switched off. Detecting
a failed TSV is not part of this RTL.

## Interfaces and timing

Core port of `mot3d_spm_cluster`, one per core:

* **Request.** `core_req_valid_i[c]` and `core_req_i[c]` (`we`, `be[3:0]`,
  `addr[31:0]`, `wdata[31:0]`) are held until `core_gnt_o[c]` is high in the
  same cycle.
* **Losing arbitration.** A request that is not granted lost arbitration and
  stays on the port.
* **Latency.** A request to an idle bank is granted in the cycle it appears.
* **Response.** Every granted access is answered exactly one cycle later with
  `core_rvalid_o[c]`. For a read, `core_rdata_o[c]` carries the data.
* **Assertions.** The top asserts both rules: an ungranted request stays
  unchanged, and every grant is answered in the next cycle.

Other ports:

* `tsv_ctrl_i[g]`: c1..c4 for bank group `g`.
* `bank_cnt_o[b]` and `mon_clear_i`: the access profile, with a clear.
* `tsv_bus_active_o[2g+k]`: bus `k` of group `g` carries a request this cycle.

Reset is synchronous and active low. It clears the arbitration state, the
response valids and the counters. SRAM contents are not reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_CORE` | 32 | cores (power of two) |
| `N_BANK` | 64 | SPM banks (power of two) |
| `N_SHARE` | 4 | banks per group; only 4 is supported |
| `BANK_BYTES` | 65536 | bytes per bank |
| `BANK_LSB` | 16 | lowest bank-index bit of the address |
| `CNT_W` | 32 | access counter width |

The number of TSV buses is 2 x N_BANK / N_SHARE, half the bank count: 32 buses for 64 banks.

## Where this RTL departs from, or adds to, the described design

* **Configuration.** Only the 4-banks-on-2-buses configuration is built.
  Groups of eight banks on two buses, and mixing a 2-output with a 1-output MoT
  to get three buses per eight banks, are not built. Their control logic is not
  specified.
* **Design choices.** These details were not specified and are chosen here:
  * the data width (32 bits) and byte enables;
  * the packet format;
  * the one-cycle synchronous SRAM read;
  * the response on writes;
  * reset behaviour;
  * counter width and saturation;
  * per-group control signals.
* **Address layout.** The bank index follows the contiguous-bank memory map.
  The earlier MoT this interconnect builds on interleaved words across banks
  instead. Word interleaving is not supported: `BANK_LSB` must lie above the
  bank offset, which the top checks at elaboration.
* **Physical parts.** TSVs, microbumps and ESD protection are modelled as plain
  wires. Tier count only changes placement. The cores, their L1 caches, the
  global NoC, the off-cluster DRAM and the optional DMA engine are outside this
  RTL.
* **Timing numbers.** The latency, yield and cost figures that motivate the
  scheme come from wire-delay and cost models. The RTL does not reproduce
  them.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. Build and run one with Verilator
5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mot3d_pkg.sv \
    tb/tb_mot3d_spm_cluster.sv --top-module tb_mot3d_spm_cluster -Mdir obj
./obj/Vtb_mot3d_spm_cluster
```

Two testbenches cover the whole cluster:

* **`tb_mot3d_spm_cluster`** uses 4 cores and 8 banks of 1 KB. It runs random
  traffic against a reference memory. It checks same-cycle grants at zero
  load and answers exactly one cycle after each grant. It walks through all six
  control-table rows and checks that a switched-off bus stays idle. It
  profiles skewed traffic with the monitor and rebalances it, then checks that
  each group's two buses carry similar loads. It counts lost arbitrations,
  cycles with both buses of a group busy, and use of both MoTs.
* **`tb_mot3d_spm_cluster_full`** runs the same checks with every parameter
  at its default (32 cores, 64 banks of 64 KB). It takes about a minute to
  build and a few seconds to run.

`tb_traffic_balancing` replays a four-thread example in which each core
works on its own bank of one group, with request rates of 70, 25, 30 and 80 %
per cycle. It first profiles the traffic with the monitor and finds the pairing
{00,10} / {01,11}. Then it runs 2000 cycles with all four banks on one bus, and
2000 cycles with the balanced split. One bus serves about 2000 requests and
loses about 3450 arbitrations. The balanced split serves about 3470 requests
and loses about 1060, with the two buses about equally loaded.

The leaf testbenches compare each block with an independent model:

* `tsv_ctrl_logic` is checked exhaustively against the mapping table.
* The switches are checked against a reference round-robin model.
* The 4x8 MoT is checked for single-cycle grants and response routing. It is
  also checked for the fairness bound: no input waits more than N_IN-1 cycles
  when the outputs always accept.
* The bank group is checked against a memory model under all six table rows.

Each of these testbenches fails when a single deliberate error is put into its
block.
