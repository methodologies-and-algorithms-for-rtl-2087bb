# A network-on-chip that tests its own switches

Inside a network-on-chip (NoC), the switches are buried deep in the die and
spread all over it. Only a few pins can reach them. This design makes the
network carry its own test data. It is a 4x4 mesh of wormhole switches, and
its test runs in two stages:

1. **FIFO buffers first, all at once.** One shared BIST controller (BIST:
   built-in self-test) broadcasts a FIFO test sequence to all 128 FIFOs of
   the mesh. Each FIFO has a small local response analyzer (LRA) that checks
   it, and a MISR (multiple-input signature register) compacts all their
   results into one signature.
2. **Then the routing logic, recursively.** Test patterns for the routing
   logic block (RLB) of each switch enter through a single *test plug* at
   one corner. Switches that are already tested carry the patterns to the
   ones that are not yet tested. The switch under test scans the patterns
   into its own RLB and compares the responses on the spot, so no response
   travels back. The patterns can be sent to one switch at a time
   (**unicast**). They can also be sent to a whole wave of switches at once
   (**multicast**), using a bit-string header that tested switches fork
   along a tree.

A single tester attached to the plug can therefore test the whole
interconnect. With multicast, the routing-logic test takes 2m−1 steps for an
m×m mesh instead of m².

## The mesh and its switches

```
   y=3  12 -- 13 -- 14 -- 15
         |     |     |     |
   y=2   8 --  9 -- 10 -- 11          switch id = y*4 + x
         |     |     |     |          ports: N=0, E=1, S=2, W=3
   y=1   4 --  5 --  6 --  7
         |     |     |     |
   y=0   0 --  1 --  2 --  3
         |
     test plug (south port of switch 0)
```

Each switch (`noc_switch`) has four ports. Every port has an input FIFO,
written from the incoming link, and an output FIFO, read by the outgoing
link. The RLB sits between the two sets of FIFOs. There is no local port for
an IP core. Edge ports other than the plug are tied off.

**Flits.** A flit is 18 bits: a 2-bit type (`HEAD`, `BODY`, `TAIL`) and a
16-bit payload. A packet is one header, any number of body flits, and a tail.

**Links.** Links use valid/ready. A flit crosses a link when the sender's
output FIFO is not empty and the receiver's input FIFO is not full.

**Destinations as bit-strings.** A header's payload is a destination set
over the 16 switches: bit *i* set means switch *i* is a destination. A
unicast header has exactly one bit set. Each output port of a switch has a
*reachability string*: the set of switches that the port leads to. The RLB
forwards a header through every port whose reachability string meets the
header's destination set.

**Routing.** Routing is dimension-ordered, with Y first and then X. At
switch (x, y):

- N reaches every switch in the rows above.
- S reaches every switch in the rows below.
- E reaches the switches to the east in the same row.
- W reaches the switches to the west in the same row.

`noc_pkg::mesh_reach` computes these strings from the switch's coordinates.
Seen from the plug, the test paths run up column 0 and then east along each
row.

**Pruning forked headers.** When a header leaves a port, it keeps only the
destination bits that port reaches. Each branch of a forked worm therefore
carries only its own destinations. Without this pruning, switch 1 would also
forward a header for {2, 5, 8} north toward 5 and 8. Switch 5 would then get
the worm twice, and the network would deadlock.

**Wormhole flow.** An idle input that shows a header takes one cycle to be
granted its outputs. After that, one flit moves per cycle, in any cycle in
which every output on its route can accept. The tail frees the outputs.

- A multicast worm is granted only when *all* of its outputs are free. It
  never holds part of its tree while it waits for the rest.
- Inputs are served in round-robin order.
- A header that reaches no port, such as one addressed only to this switch,
  gets an empty route. Its packet is consumed and dropped.

**Latency.** A header written into a switch's input FIFO on one clock edge is
written into the next switch's input FIFO on the third edge after that. The
three cycles are the FIFO, the allocation and the transfer. So the per-hop
latency is N_p + 1 = 3 cycles. Body flits then stream at one per cycle.

## Switch modes

Each switch has a 2-bit `mode` input, set by the tester:

| mode      | what the switch does |
|-----------|----------------------|
| Normal    | Unicast forwarding. Only the first matching port, in N, E, S, W order, is used. |
| Multicast | Forwards to every matching port, so the worm forks. |
| Test      | Cuts the RLB off from the data path. The local test unit drains the input FIFOs and scan-tests the RLB. Nothing is forwarded. |

Separately, `bist_en` hands all eight FIFOs of the switch to the broadcast
BIST bundle. While it is high, the switch's links are stalled.

## The local scan test of the RLB (the part that needs care)

**Scan chain.** The RLB has 34 state flip-flops, all on one scan chain:

- a path-active bit per input (4)
- a 4-bit route per input (16)
- a lock bit per output (4)
- a 2-bit owner per output (8)
- a 2-bit round-robin pointer (2)

The chain shifts toward its MSB, which is `scan_out`. `scan_in` enters at
the LSB. A clock enable `ce` freezes the state between scan operations and
is held high in normal use.

**Reachability as an input.** The reachability strings are primary inputs
of the RLB, not constants. All 16 RLBs are therefore the same circuit, so
one set of patterns with one set of expected responses fits every switch.
This is what makes multicast test delivery possible.

**Input and output vectors.** `noc_switch` defines the layout, and element 0
of each group is the most significant:

```
PI (145 bits) = { multicast, reach[0..3] (4x16), in_valid[0..3], in_flit[0..3] (4x18), out_ready[0..3] }
PO ( 80 bits) = { in_pop[0..3], out_push[0..3], out_flit[0..3] (4x18) }
```

**One pattern.** One pattern is `{scan-in (34), PI (145), expected PO (80),
expected scan-out (34)}`. That is 293 bits, packed MSB first into
`PAT_WORDS` = 19 body flits; the last flit is padded with zeros at the
bottom.

**A session.** A session is one packet: a header, N patterns × 19 body
flits, and a tail. `rlb_test_unit` handles each pattern in four steps:

1. Collects the 19 flits (19 cycles).
2. Shifts the scan-in vector in (34 cycles).
3. Applies the PI vector for one capture cycle and compares the POs with
   the expected PO.
4. Shifts the captured state out (34 cycles), shifting zeros in, then
   compares it with the expected scan-out (1 cycle).

That is **89 cycles per pattern**. The zeros shifted in leave the RLB in its
reset state, so the switch routes correctly as soon as it is switched back
to Normal.

While the unit is shifting, it stops reading its input FIFO. The network
back-pressures the stream all the way to the plug. When the tail arrives,
`test_done` rises. `test_pass` is high if at least one pattern ran and no
comparison failed. `test_fail_count` and `test_pat_count` give the detail.

**Timing.** With flits arriving back to back, a session of N patterns at a
switch h = x + y hops from switch 0 takes `N·89 + 3 + 3h` cycles, from the
cycle the whole packet is offered at the plug to `test_done`. With the 146 patterns used
in the end-to-end test, the session at switch 0 takes T_r = 12 997 cycles.

## FIFO BIST

**The FIFO.** `noc_fifo` is a two-port FIFO with one write-only port and one
read-only port. It has:

- a write control with one-hot word lines WD_0..WD_{n-1}
- a read control with one-hot word lines RD_0..RD_{n-1}
- a memory array
- full (FF) and empty (EF) flags
- reset (RS), write (WO) and read (RO) operations

Reads are first-word-fall-through. One clock serves both ports.

**The controller.** `fifo_bist_ctrl` issues one operation word per cycle,
and each word carries what the LRAs must see. It runs two phases:

*Single-port phase (this design's own sequence), 4n + 6 + 2·Del cycles.*
1. RS.
2. Check EF = 1 and FF = 0.
3. Then twice, first with a checkerboard word pattern and then with its
   complement:
   - n writes, during which FF must stay 0
   - check FF = 1
   - wait Del cycles for data retention
   - n reads with data compare
   - check EF = 1

This targets stuck-at, transition and retention faults in the cells, faults
on the word lines, and flags that are not set after reset, after n writes or
after n reads.

*Dual-port phase, 4(n + 1) cycles.* For each background 0101…, 1010…,
0000… and 1111…, it runs `w (wr)^(n-1) r`:

1. One write.
2. n − 1 cycles that write and read at once. Every pair of neighbouring
   cells is exercised with one cell read while the next is written.
3. A final read that empties the FIFO.

Every word read is checked. One last cycle checks EF = 1.

**Run length.** A run takes **8n + 11 + 2·Del** cycles: 75 at the defaults,
n = 4 and Del = 16.

**LRA.** Each `lra` compares its FIFO's read data, EF and FF with the
broadcast expectations. It has a per-cycle `err` output and a sticky `fail`
output.

**MISR.** In the top level, the errors of the eight FIFOs of each switch are
ORed into one lane of a 16-bit MISR, with polynomial x^16+x^12+x^3+x+1. A
signature of zero means no error was seen. A nonzero signature, together
with `bist_fail[switch][fifo]`, locates the faulty FIFO. FIFO index i < 4
is input port i; index 4 + p is output port p.

## Test flows and their cycle counts

The tester, not the chip, sequences the modes. `tb/tb_noc_mesh_top.sv`
contains a tester model that runs both algorithms with 146 patterns per RLB.

- **Unicast.** Switches are tested in index order (row by row, west to
  east). The target is in Test mode and all the others are in Normal mode.
  Measured: every session takes exactly T_r + 3(x + y). The total is
  m²·T_r + (N_p+1)·m²(m−1) = 16·12 997 + 3·48 = **208 096 cycles**.
- **Multicast.** Step s (0 ≤ s ≤ 2m−2) tests the anti-diagonal x + y = s.
  The switches with x + y < s are in Multicast mode, and the rest are in
  Normal mode. One packet, with the whole anti-diagonal in its header, is
  forked along the tree. Measured: step s takes exactly T_r + 3s. The total
  is (2m−1)·T_r + (N_p+1)·(2m−1)(m−1) = **91 042 cycles**, 2.3× faster.

The time per pattern dominates. For large meshes, unicast grows with m² and
multicast with 2m−1.

## How far to trust it, and where it departs from the method it implements

Checked in simulation:

- Every block has a self-checking testbench, and each testbench was shown to
  fail on a deliberately broken copy of its block.
- The RLB is checked cycle by cycle against an independent reference model,
  `tb/rlb_ref_pkg.sv`, and with directed cases.
- The end-to-end test runs the whole mesh at its default size. It checks:
  - every switch passes both algorithms
  - the exact cycle counts above
  - a forced FIFO fault is located by its LRA and shows up in the MISR
  - a corrupted expected response is flagged
  - back-pressure reaches the tester

Choices this design makes where the method leaves the details open:

- **Single-port FIFO test.** The method gives only its length, 2n + 3·Del +
  4, not the sequence. The sequence above is this design's own, so a BIST
  run is 8n + 11 + 2·Del cycles rather than 6n + 8 + 3·Del. The dual-port
  part follows the method exactly.
- **Per-hop latency.** The switch's per-hop latency is 3 cycles, a property
  of this design. The method leaves the pipeline depth N_p open.
- **Cycles per pattern.** A scan pattern costs 89 cycles here. That comes
  from the 34-bit chain, no overlap of shift-in and shift-out, and 19 flits
  of transported data per pattern. Absolute test times therefore come out
  much longer than estimates that assume about one cycle per pattern. The
  structure of the test time, T_r + hops·(N_p+1) per step, is reproduced
  exactly.
- **FIFO clocking.** The FIFO uses one clock for both ports. A FIFO with
  separate write and read clocks is not built.
- **FIFO width.** The FIFO is 18 bits wide: the 16-bit payload width plus
  the flit type.
- **Fixed choices.** These are not given by the method and are fixed here:
  - the link handshake
  - the flit format
  - the arbitration
  - Normal mode's "first matching port" rule
  - header pruning on forks
  - the MISR width and polynomial
  - Del = 16 cycles
- **Size limit.** The destination bit-string must fit one 16-bit header flit,
  so the mesh is limited to 16 switches. The 8×8 and 16×16 meshes would need
  multi-flit headers, which are not built.
- **Butterfly fat tree.** The same test methods also apply to a butterfly
  fat tree (BFT) network of six-port switches. That topology is not built.
- **FIFO size.** FIFO depths of 16 and 64 are a parameter change
  (`FIFO_DEPTH`). `tb_mesh_fifo_sizes` runs the whole mesh with 16-word
  FIFOs (BIST and multicast RLB test), and the BIST on 64-word FIFOs.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | flit, mode and BIST-bundle types, RLB vector widths, `mesh_reach` |
| `rtl/noc_fifo.sv` | two-port FIFO with one-hot word lines and FF/EF |
| `rtl/rlb.sv` | routing logic block with full scan |
| `rtl/rlb_test_unit.sv` | local scan-test unit of a switch |
| `rtl/noc_switch.sv` | four-port switch: FIFOs, RLB, test unit, LRAs, mode muxing |
| `rtl/fifo_bist_ctrl.sv` | shared FIFO BIST control and data generator |
| `rtl/lra.sv` | local response analyzer |
| `rtl/misr.sv` | signature register |
| `rtl/noc_mesh_top.sv` | the 4x4 mesh with plug, BIST controller and MISR (top) |
| `tb/rlb_ref_pkg.sv` | RLB reference model and pattern generator for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per block; `tb_noc_mesh_top` is the end-to-end test |
| `tb/tb_mesh_fifo_sizes.sv` | the mesh with 16-word FIFOs, and the BIST with 64-word FIFOs |

Parameters of the top: `MESH_X`, `MESH_Y` (4, 4; their product must be at
most 16), `FIFO_DEPTH` (4) and `BIST_DEL` (16).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5, run from the directory that holds `rtl/` and
`tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_noc_mesh_top \
  -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/rlb_ref_pkg.sv tb/tb_noc_mesh_top.sv \
  -o sim --Mdir obj && obj/sim
```

Replace `tb_noc_mesh_top` with any other `tb_*` name to run that block's
testbench. The end-to-end test simulates about 310 000 cycles of the full
mesh, which takes a few seconds after about a minute of compilation. To
change the pattern count, edit `NPAT` in the testbench. Verilator is
two-state: everything that is read is reset or initialised.
