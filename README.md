# Swizzle-Switch Network: a flat crossbar interconnect for 64 cores

A 64-core chip normally uses a mesh or another multi-hop network, because a
64-port crossbar with a separate arbiter is thought to be too large and too
slow. The Swizzle-Switch gets around this by putting the arbitration into the
crossbar. Every crosspoint holds its own grant flip-flop and a column of
priority bits. The same bus wires that later carry data are used first for
requests and then for arbitration. The Swizzle-Switch Network (SSN) builds on
this. It joins 64 cores, each with private L1 caches, to 32 shared L2 banks in
a single hop. Three such switches are used, one for each direction that
directory coherence needs. Every message reaches the crossbar in one cycle,
wins arbitration in one cycle, crosses the switch in one cycle and reaches its
destination in one cycle, wherever the sender and receiver are.

This repository is synthesizable SystemVerilog for that network: the
self-arbitrating switch, its least-recently-granted (LRG) arbitration, the
end-point controllers and the three-switch network, plus self-checking
testbenches. The switch's circuit techniques appear here as their logic
function. These are the precharged low-swing bit-lines, the thyristor sense
amplifiers and the pass-gate crosspoints.

## The Swizzle-Switch

### Crosspoints and the two modes

An N x M switch has N horizontal input buses and M vertical output buses, all
W bits wide. The crosspoint (i, k) has a *Granted* flip-flop. Each output
column is in one of two modes, and each column changes mode independently of
the others:

* **Arbitration.** The column has no owner. Any input that wants the column
  raises its request, and the column grants exactly one of them.
* **Data transmission.** The granted input drives its bus and the data flows
  through the crosspoint into the column's read buffer. This goes on beat
  after beat until the input releases the column.

A column can be granted to only one input, but an input can own many columns
at once. That is how one send reaches several outputs (multicast).

### Requests ride on the input bus

While an input is arbitrating, bit k of its bus is its request for output k.
A multi-hot bus value therefore asks for a set of outputs in a single cycle.
In this RTL the input marks such a cycle with `in_req`, which tells a request
vector from a data beat. Because of this reuse the bus must be at least as
wide as the number of outputs (`W >= M`).

### Inhibit arbitration

Each column keeps an N x N priority matrix M. M(i,j) = 1 means input i has
priority over input j. The RTL stores it by inhibit line: `inh[j]` is column
j of M, the set of inputs that can pull down line X_j. For arbitration the column's output
bit-lines become inhibit lines, one per input, so the bus must also be at
least as wide as the number of inputs (`W >= N`). All inhibit lines start
high. Every requesting input i pulls down the line X_j of every input j it
has priority over. An input wins if it requests and its own line X_i stays
high. The matrix is always a strict total order, so exactly one requester
wins:

```
win[j] = en & ~busy & req[j] & ~|(req & inh[j])
```

Example with five inputs. The priorities are 1, 0, 2, 4 and 3, each being the
number of other inputs that input can inhibit:

```
        X0 X1 X2 X3 X4    priority
  In0    -  1  0  0  0       1
  In1    0  -  0  0  0       0
  In2    1  1  -  0  0       2
  In3    1  1  1  -  1       4
  In4    1  1  1  0  -       3
```

* If In0 and In1 request, In0 wins.
* If In0 and In2 request, In2 wins.
* If In0, In2 and In4 request, In4 wins.

### Least-recently-granted update

When input w wins, the column clears row w, so w no longer inhibits anyone.
It also sets column w, so everyone inhibits w. The winner drops to the lowest
priority, and every input that was below it moves up by one. After the grant
to In4 above, the priorities become 2, 1, 3, 4 and 0. The update is a plain
row clear and column set, with no counter or comparator. It keeps the matrix
a total order and guarantees that no input starves.
`tb_ss_arb_column` checks this exact example and then checks thousands of
random cycles against a rank-list model.

The matrix resets to "input 0 highest" (`inh[j]` holds every input below j). Any column's
matrix can be loaded through the `cfg_*` ports to set up another priority
scheme. The LRG rule then takes over from the loaded order.

### Data path and timing

During data transmission the output bit-lines are precharged to 1. A granted
crosspoint whose input bit is 0 discharges its bit-line. The output is
therefore the AND over the granted inputs, and with exactly one granted input
it equals that input's data. `swizzle_switch` models it this way and
registers the result in the read buffer.

```
cycle        t           t+1               t+2 .. t+L            t+L+1
input row    req+mask    beat 0 (valid)    beats 1..L-1,         -
                                           rel on the last
Granted FF   -           set               held                  cleared
read buffer  -           -                 beat 0 .. L-2         beat L-1 (out_last)
column       arbitrates  transmitting      transmitting          arbitrates again
```

* Grant: a request in cycle t is latched at the end of t, and the input sees
  `gnt` in t+1.
* Data: a beat driven in cycle t appears in the read buffer (`out_*`) in t+1.
* Release: `rel` goes with the last beat, and the column can arbitrate again
  from the next cycle.

A single-flit packet therefore holds a column for one request cycle and one
data cycle. Each input and each output can carry one single-flit packet every
two cycles. An L-flit packet uses L+1 cycles.

## The network

### Three switches for three message classes

Directory coherence sends messages on three paths: L1 to L2 (requests and
writebacks), L2 to L1 (responses and invalidations) and L1 to L1 (forwarded
shared data). An L2 never talks to another L2. So instead of one 96 x 96
crossbar, `ssn_top` uses three switches:

| instance | size (inputs x outputs x bits) | carries |
|---|---|---|
| `u_l1l2` | 64 x 32 x 128 | L1 requests and writebacks to L2 banks |
| `u_l2l1` | 32 x 64 x 128 | L2 responses and invalidations to L1s |
| `u_l1l1` | 64 x 64 x 128 | L1-to-L1 data forwarding |

Each L1 has one send bus that feeds both `u_l1l2` and `u_l1l1`. A packet
therefore goes either to L2 banks (`l1_inj_to_l2 = 1`) or to L1s, never to
both. Only the request and data strobes of the selected switch are raised.
The destination is always a multi-hot mask. An invalidation to many L1s is
sent once and delivered to all of them.

### The L1 mux

Each L1 is an output of two switches: `u_l1l1` and `u_l2l1`. `l1_mux` merges
them onto the L1's single receive port. It never lets one L1 column be
connected in both switches at once:

* While the column is in data-transmission mode in one switch, the same
  column in the other switch may not arbitrate (its `col_en` is low).
* When both switches request a free column in the same cycle, the switch
  that did not win it last time wins (a two-way LRG choice per column).

Since at most one of the two read buffers can hold a beat for a given L1, the
mux simply passes on whichever is valid. It also reports which switch the
beat came from (`l1_ej_from_l2`).

### End-point controller and multicast

Every send port has an `ss_input_port`. It holds a DEPTH-entry flit buffer
with a valid/ready input and runs the switch protocol for its row:

1. Request the packet's remaining destination mask.
2. In the next cycle, read the grant lines. If some outputs were granted,
   send the whole packet to them and release with the last flit.
3. If outputs of a multicast were not granted, request them again and replay
   the packet from the buffer.

The port never holds some outputs while waiting for others. Two multicasts
that want overlapping sets therefore cannot deadlock, and each destination
receives each packet exactly once. Buffer entries are freed once every
destination has the packet, so a packet may be at most DEPTH flits long. A
64-byte cache line is 4 flits of 128 bits, and the default DEPTH is 8.

### End-to-end latency

```
t     flit accepted into the send buffer   (the wire to the crossbar)
t+1   request, arbitration                  (one cycle to arbitrate)
t+2   flit crosses the switch               (one cycle through the crossbar)
t+3   flit in the read buffer, then l1_mux
t+4   flit on the receive port (*_ej_valid) (one cycle to the destination)
```

With no contention, a flit accepted at the clock edge that ends cycle t is on
the destination's receive port in cycle t+4. Later flits of the same packet
follow one per cycle. `tb_ssn_top` and `tb_ssn_full` check this count on all
three paths.

## Interfaces of `ssn_top`

| port group | per port | meaning |
|---|---|---|
| `l1_inj_*` (64) | `valid`, `ready`, `to_l2`, `dest[64]`, `last`, `data[128]` | L1 send port. `dest` is a mask of L2 banks (low 32 bits) when `to_l2`, otherwise a mask of L1s. Only the first flit's `dest` and `to_l2` count. |
| `l2_inj_*` (32) | `valid`, `ready`, `dest[64]`, `last`, `data[128]` | L2 send port to L1s |
| `l1_ej_*` (64) | `valid`, `last`, `from_l2`, `src[6]`, `data[128]` | L1 receive port. It has no backpressure. |
| `l2_ej_*` (32) | `valid`, `last`, `src[6]`, `data[128]` | L2 receive port. It has no backpressure. |
| `cfg_*` | `we`, `sel[2]`, `col[6]`, `inh[64][64]` | Loads one column's priority matrix, given by inhibit line: `inh[j][i] = 1` when input i has priority over input j. `sel` 0 picks L1->L2, 1 picks L2->L1, 2 picks L1->L1. |

All logic is clocked by `clk` with an active-low asynchronous reset `rst_n`.

A packet's flits reach each destination back to back, never interleaved with
another packet. Receivers must accept every beat, because the network has no
buffering on its output side.

## Parameters

| parameter | default | note |
|---|---|---|
| `N_L1` | 64 | cores and L1 ports, published value |
| `N_L2` | 32 | L2 banks, published value |
| `W` | 128 | bus width of all three switches, published value. Must be at least `N_L1`. |
| `DEPTH` | 8 | flits per send buffer, this design's choice |

The defaults live in `ssn_pkg`. Every module can be built at other sizes, and
the testbenches use 4 to 16 ports. Storage at the defaults:

* Priority bits: 64 x 64 x 64 + 32 x 64 x 64 + 64 x 32 x 32 = 458,752 bits,
  one N x N matrix per column including the unused diagonal.
* Send buffers: 96 x 8 x 194 bits.
* Read buffers plus output registers: about 2 x 96 x 136 bits.

## Files

| file | contents |
|---|---|
| `rtl/ssn_pkg.sv` | default sizes, controller state type |
| `rtl/ss_arb_column.sv` | one output column: inhibit arbitration, LRG matrix, Granted flip-flops |
| `rtl/swizzle_switch.sv` | N x M x W switch: M columns, request decoding, wired-AND data path, read buffers |
| `rtl/ss_input_port.sv` | send buffer and row controller, with multicast replay |
| `rtl/l1_mux.sv` | merge and interlock of the two switches that feed the L1s |
| `rtl/ssn_pipe.sv` | one register stage of global wire |
| `rtl/ssn_top.sv` | the network |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ssn_full` and `tb_ssn_traffic` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Example with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/ssn_pkg.sv tb/tb_ssn_top.sv \
          --top-module tb_ssn_top -Mdir obj_top -o sim
./obj_top/sim
```

The same command works for every testbench; replace the name.

| testbench | what it shows |
|---|---|
| `tb_ss_arb_column` | The five-input example: both arbitration outcomes and the matrix after the LRG update. Also checks that a granted column ignores other requests, that only the owner's release frees it, that `en = 0` blocks arbitration, and compares 3000 random cycles with a rank-list model. |
| `tb_swizzle_switch` | 5 x 4 switch with five random multicast senders. Grants, read-buffer data, source and last flag are checked every cycle against a model of all columns. Contention, multicast, partial grants and blocked columns all occur. |
| `tb_ss_input_port` | The switch is played by the testbench and grants random subsets of what is requested. Every destination must receive every packet exactly once and in order. Also checks request-to-beat timing, backpressure and stalls inside a packet. |
| `tb_l1_mux` | Enables against a model of the interlock, ties going both ways, and the merged port. |
| `tb_ssn_pipe` | One-cycle delay, and that the payload holds while not valid. |
| `tb_ssn_top` | 8 L1s, 4 L2s, 16-bit buses. Checks four-cycle latency on all three paths, then 3000 cycles of mixed random traffic checked flit by flit per source. Contention, multicast, partial grants with replay, backpressure, L1-mux blocks and ties, and multi-flit packets are counted, and each must occur. |
| `tb_ssn_full` | Full size (64/32/128). A read request to an L2 bank, a four-flit line response and a competing four-flit L1 forward that meet at the same L1 mux, and a three-way invalidation multicast, with exact latencies. |
| `tb_ssn_traffic` | 16-port network. Hotspot traffic: all L1s offer 0.05 flit/cycle to one L1. The column runs at its full rate (one single-flit packet per two cycles) and the accepted share per source must be even within 5 %. Uniform random traffic: every L1 offers 1 flit/cycle, and the shares must be within 20 %. |

At full size Verilator needs about 9 CPU-minutes to build the model (about
6.5 minutes with `-j 4`), while the simulation itself runs in well under a
second. The single-hop structure makes most of the design one wide
combinational function per column.

## How far this follows the published design

These parts follow the published design:

* Crosspoint organisation and the reuse of input bits as requests and of
  output bit-lines as inhibit lines.
* The inhibit arbitration rule and the LRG row-clear/column-set update.
* Multicast by multi-hot requests.
* Independent per-column modes and release by the input.
* The wired-AND data path into read buffers.
* The three-switch partition by message class, with the published sizes.
* The L1 mux's place between the two L1-side switches.
* The shared L1 send bus.
* The four-cycle path.

These are this design's own choices:

* **Request/data strobes.** `in_req` and `in_valid` mark which cycles carry
  requests and which carry data, since the bus alone cannot say.
* **Release.** A `rel` line per input, asserted with the last beat.
* **Framing.** Read-buffer `out_valid`, `out_last` and `out_src` signals, so
  that receivers can frame packets.
* **Reset priority order.** Input 0 is highest after reset.
* **Send buffer.** The buffer depth and its valid/ready input.
* **Partial multicast.** Send to the granted outputs, then request the rest
  again and replay the packet.
* **L1 mux.** The column interlock and the two-way LRG tie-break. Only the
  mux's name and position are published.
* **Wire delay.** One register stage per direction. Physically this is
  repeated wire.
* **Bus width in diagrams.** Some drawings of the switch show 64-bit input
  buses. This design uses the 128-bit width quoted for both the test chip and
  the network.

## Not included

* The ARM Cortex-A5 cores, the L1 and L2 caches and the MOESI directory
  controller. The network only carries their messages; the `data` field is
  opaque.
* The memory controllers and DRAM.
* The analog circuit techniques: precharge, low-swing bit-lines, thyristor
  sense amplifiers and repeaters. They set the switch's speed and power but
  not its logic, which is modelled.
* The 3-D version, which folds the switch over two or four stacked dies. Even
  and odd output columns are arbitrated on different layers, and requests
  cross layers through TSVs. Logically it is the same crossbar, so it needs
  no different RTL.
* The mesh and the flattened butterfly. The published design uses them only
  as comparison points.
