# LUCC: a one-cycle, lookup-table-based controller for photonic switches

In a silicon photonic interconnect the data travel as light. A photonic switch
is a network of 2x2 switching elements, here Mach-Zehnder interferometers
(MZIs). Each element is set to *bar* (upper in to upper out, lower to lower) or
*cross* (upper in to lower out and back). Before a message can travel, an
electronic controller must set every element on its path. It must also decide
who goes first when several senders want the same receiver. If that controller
is slow, it wastes the speed of the optical path.

LUCC (lookup-table-based centralized controller) moves all the expensive work
off-line. The routes through the switch are computed beforehand and stored in
a small table. At run time the controller does three things in one clock
cycle:

1. It detects which outputs are asked for by more than one input.
2. It picks one winner per output with round robin.
3. It reads the winners' routes from the table and sets the elements.

This repository holds synthesizable SystemVerilog for that controller,
parameterized by switch size. It computes route tables for two switches:

- an **8x8 Benes network** (20 elements in 5 stages), the controller's default;
- the **4x4 switch of five MZIs** of the LUCC lab prototype, used by the
  top-level system `lucc_top`.

## Block structure

```
            link_req/link_dst, tail          ack, tail_ack
 sources ──────────────┐                        ▲
                       ▼                        │
              ┌────────────────┐  pending, dst  │
              │ lucc_dest_array│───────┬────────┤
              └────────────────┘       │        │ accept
                       │               ▼        │
                       │        ┌────────────┐  │
                       │        │  lucc_crb  │  │
                       │        └────────────┘  │
                       │ dst       │ grant      │
                       ▼           ▼            │
              ┌──────────────────────────┐ addr ┌──────────┐
              │         lucc_dsb         │─────▶│ lucc_lut │
              │ (addressing, attribution,│◀─────│ (routes) │
              │  element state registers)│ data └──────────┘
              └──────────────────────────┘
                           │ se_cross (one bit per element)
                           ▼
                     photonic switch
```

| File | Block | Role |
|---|---|---|
| `rtl/lucc_pkg.sv` | package | Element states, destination-array states, route-entry format, switch wiring and off-line routing functions |
| `rtl/lucc_dest_array.sv` | destination array | Per source: idle / pending / active, and the destination; produces Ack and TailAck |
| `rtl/lucc_crb.sv` | conflict resolution block | Request matrix, conflict per output, one round-robin arbiter per output |
| `rtl/lucc_lut.sv` | route table | ROM of compressed routes, one read port per source |
| `rtl/lucc_dsb.sv` | dynamic setup block | Table addressing, route expansion, path attribution, element state registers |
| `rtl/lucc.sv` | controller | Wires the four blocks together |
| `rtl/lucc_tx.sv` | traffic source | Request, wait for Ack, send PRBS payload, Tail, wait for TailAck |
| `rtl/lucc_vcm.sv` | voltage control module | Bar/cross code per MZI, sigma-delta drive for an external RC filter |
| `rtl/lucc_top.sv` | prototype system | Four sources, the controller with the 4x4 table, and the voltage control module |

## A connection, cycle by cycle

Each source talks to the controller with four one-cycle pulses: LinkReq (with
the destination), Ack, Tail and TailAck.

```
edge         k-1        k            k+1             k+1+L      k+2+L   k+3+L
source       LinkReq ─▶ (captured)
controller              pending      Ack, elements set
source                               (sees Ack)  payload 1..L   Tail
controller                                                      (path freed) TailAck
```

- **Edge k.** The destination array captures the request.
- **During cycle k.** Everything is combinational:
  - the request matrix is formed;
  - the round-robin arbiters grant;
  - the table is read for every source in parallel;
  - paths are attributed.
- **Edge k+1.** The element state registers and the Ack register load
  together. So the switch is configured when Ack arrives. This is the one
  cycle of controller latency.
- **Release.** An output and its elements stay reserved until the source's
  Tail. The edge that takes the Tail frees the path. The same edge can
  already give the output to a waiting source, so there is no gap cycle.

The transmitter `lucc_tx` registers its LinkReq. Seen from a source's command,
the first payload bit therefore comes three cycles after the command is
accepted: LinkReq, capture, Ack.

## Conflict resolution

The pending requests form an N x N matrix R, where R[i][j] = 1 when input i
asks for output j. Output j has a conflict when two or more rows of column j
are set. Each column has its own round-robin arbiter. Its pointer moves to the
input just after the winner, but only when the winner really got its path. An
output that an established path still holds is not granted. The matrix is
built directly from the destination array's registers. Detection and
arbitration are a few gate levels and cost no cycle.

## Route table and its compression

Routes are fixed per (source, destination) pair. The routing is still done
"off-line", but by constant functions in `lucc_pkg`, so the table is computed
when the design is elaborated and synthesizes to a ROM with no data file.

- `next_hop` describes the wiring: where each output port of each element
  leads. For a Benes network of any power-of-two size, it builds the
  recursive structure from a formula. For the 4x4 prototype switch, it lists
  the links.
- `route_entry` enumerates the paths from input s in depth-first order,
  trying bar before cross at each element, and keeps the first of the
  shortest paths that reach output d.

On a Benes network this rule keeps the first log2(N)-1 stages in bar and
routes the remaining stages by destination. With that choice, the complement
pattern (d = N-1-s) and every cyclic shift (d = s+k mod N) need no element in
two states. So each of these patterns is set up completely in one cycle. This
was checked for 8x8 and 16x16.

The 4x4 prototype switch cannot do this for any choice of routes (see below).

The compression works at two levels. A table that held a complete switch
setting for every possible combination of requests would need up to
(N+1)^N entries. The same per-pair routes would repeat in it again and again.
Instead, the table keeps one route per pair (N^2 entries), and `lucc_dsb`
merges the routes of all granted pairs each cycle.

Within an entry, an uncompressed route would give every element of the
switch a code: unused, bar or cross. That is 40 bits for 20 elements, nearly
all of them "unused". The table instead stores one field per stage, holding only the element that
the path crosses there:

```
field k (bits k*(EB+2) ...):  { state (1 = cross), element index (EB bits), valid }
element slot = k * SPS + element index
```

- **8x8 Benes network:** `EB = 2` and `SPS = 4`, so an entry is 5 x 4 = 20
  bits. For example, entry 0 (0 to 0) is `11111`: valid, element 0, bar, in
  every stage.
- **4x4 prototype switch:** `EB = 1` and `SPS = 2`, so an entry is 3 x 3 = 9
  bits. Short paths leave the middle stage's field invalid.

The table is a packed constant `ROUTES[s*N + d]` inside `lucc_lut`.

## Path attribution and blocking inside the switch

A Benes network with one fixed route per pair, and the 4x4 prototype switch
in any case, can need the same element in two states even when all
destinations differ. `lucc_dsb` therefore checks every granted source in index
order. A path is accepted when none of its elements is already held in the
other state, by an established path or by a path accepted earlier in the same
cycle. Otherwise the source is reported `blocked` and stays pending. It tries
again every cycle until the element is free.

This one check is enough. Two paths that agree on the state of every element
they share enter a shared element by different inputs. So they leave it by
different outputs and never share a waveguide, and never an output port.
Because of this, the CRB's busy-output rule is not needed for correctness. It
only keeps grants from being wasted on outputs that are certainly taken.

The in-order attribution favours low-numbered sources when their paths
collide inside the network. The round robin only orders sources that want the
same output. In random traffic on the 8x8 network, no request waited more than
200 cycles. Fair attribution inside the network is not part of this design.

## The prototype system (`lucc_top`)

The lab prototype couples the controller to a fabricated 4x4 switch of five
MZIs. The wiring used here (inputs and outputs numbered from 0, MZI ports
0 = upper, 1 = lower):

```
I1,I2 ─▶ MZI1 ─ out0 ───────────────▶ MZI2 in0 ─▶ O1,O2
              └ out1 ─▶ MZI5 in0
I3,I4 ─▶ MZI3 ─ out0 ─▶ MZI5 in1
              └ out1 ───────────────▶ MZI4 in1 ─▶ O3,O4
         MZI5 out0 ─▶ MZI2 in1,   MZI5 out1 ─▶ MZI4 in0
```

The controller treats this switch as 3 stages of 2 positions:
{MZI1, MZI3}, {MZI5, none}, {MZI2, MZI4}. The top module reorders the states
into `mzi_cross[4:0]` = MZI5..MZI1.

This switch is blocking. I1 to O3 and I2 to O4 both need MZI1's lower output,
so one of them waits. The controller handles this like any other element
conflict.

Other parts of the top:

- **Sources.** Each input has a `lucc_tx` that sends a PRBS-7 payload, one bit
  per clock, with its own seed. This lets a receiver tell which input it sees.
- **Voltage control module.** `lucc_vcm` picks a bar or cross calibration code
  per MZI. Defaults are 0 and 192 out of 255. It emits the code as a
  first-order sigma-delta bit stream: over any 256 cycles the stream has
  exactly `code` ones. An external low-pass filter and buffer turn it into the
  electrode voltage. The code is also output for a parallel DAC. The codes are
  placeholders: a real chip needs its measured bar and cross voltages.

Not in RTL: the filter and buffer, the photonic switch, the lasers,
modulators and photodetectors, the receiver, and the processors. Their signals
are ports of `lucc_top`. The testbench contains a behavioural model of the
switch, `tb/photonic_switch_model.sv`.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `lucc`, `lucc_lut`, `lucc_dsb` | `N` | 8 | ports |
| | `NSTAGE` | 5 | stages of the switch |
| | `SPS` | 4 | element positions per stage |
| | `TOPO` | `TOPO_BENES` | wiring the route table is computed for (`TOPO_BENES` or `TOPO_SB4`) |
| `lucc_top` | `N`, `NMZI` | 4, 5 (fixed) | prototype switch |
| | `LEN_W` | 16 | message length counter bits |
| | `CW` | 8 | MZI drive code bits |
| `lucc_vcm` | `BAR_CODE`, `CROSS_CODE` | 0, 192 per MZI | calibration |
| `lucc_tx` | `SEED` | `7'h7f` | PRBS seed |

Another Benes size only needs `N`, `NSTAGE = 2*log2(N)-1` and
`SPS = N/2`. To support another topology:

1. Add its wiring to `lucc_pkg::next_hop` under a new `topo_e` value.
2. Set `NSTAGE` and `SPS` to its number of stages and element positions per
   stage.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The models they check
against are written independently of the RTL. `tb/tb_topo_pkg.sv` follows
light through the wiring of either switch, and the testbenches use it to check
that every established path really reaches its destination.

| Testbench | What it shows |
|---|---|
| `tb_lucc_lut` | All 64 + 16 computed routes reach their destination through exactly the listed elements; complement and shifts are conflict-free on the Benes table |
| `tb_lucc_crb` | Request matrix, conflict flags and grants against a reference round robin, 2000 random cycles plus a directed all-to-one case |
| `tb_lucc_dest_array` | State, Ack and TailAck timing against a model, 3000 random cycles |
| `tb_lucc_dsb` | Accept/blocked, held elements and states against a model; every path traced through the Benes wiring |
| `tb_lucc_vcm` | Code selection per MZI and exact sigma-delta density |
| `tb_lucc_tx` | Handshake order, payload length and PRBS content |
| `tb_lucc` | Controller on the 8x8 Benes network: 1-cycle latency; complement and all eight cyclic shifts each granted in one cycle; 8-way contention served in round-robin order with no gap; 20000 cycles of random traffic with both destination conflicts and blocking inside the network |
| `tb_lucc_top` | Whole prototype at default parameters with the switch model: I1 to O2 with the timing above; I1 and I2 taking turns on O2; I1 to O3 against I2 to O4 (blocked, then served); random traffic; payload at every output checked bit by bit against the right source's PRBS; MZI drive density |

Run one testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lucc_pkg.sv tb/tb_topo_pkg.sv tb/tb_lucc_top.sv --top-module tb_lucc_top
./obj_dir/Vtb_lucc_top
```

Every testbench finishes in well under a second.

### Latency against message size

The controller's cost per message is one cycle. With the time for one bit to
cross the optical network taken as 0.2 ns and a 3.7 ns clock (the 270 MHz
reported for an FPGA implementation), a message costs 1 x 3.7 + bits x 0.2 ns.
That is 29.3, 54.9 and 106.1 ns for 128, 256 and 512 bits. `tb_lucc` prints
these figures from the latency it measures.

The clock frequencies reported for LUCC in FPGA and 65 nm implementations
(about 270 to 295 MHz and 1.1 ns) have not been checked for this RTL. Its
critical path runs from the destination array through the table read and the
serial attribution over the N sources. That attribution chain grows linearly
with N.

## Where this design fills in gaps

The published controller fixes the block structure, the request matrix with
its conflict rule, round robin, off-line shortest-path routes in a reduced
table, and one-cycle operation. This design chose the following:

- the pulse handshake and its timing;
- reserving an output until Tail;
- the round-robin pointer rule;
- the table reduction: one route per pair, merged on-line, in the path-list
  format;
- the route rule: the first shortest path in bar-before-cross order;
- in-order attribution with waiting on blocked elements;
- reset values: all sources idle, all elements bar, asynchronous active-low
  reset;
- the command interface and PRBS payload of the sources;
- the sigma-delta voltage control and its codes;
- the wiring of the prototype switch, read from its layout.

The prototype sends payload at 8 Gb/s. Here a source sends one bit per
controller clock: the serializer is not modelled.
