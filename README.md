# FTISEN — a 16×16 fault-tolerant irregular shuffle-exchange network

FTISEN (Fault Tolerant Irregular Shuffle Exchange Network) is a multistage
interconnection network that connects 16 sources (processors) to 16
destinations (memory modules). A regular shuffle-exchange network has only
one path per source/destination pair. FTISEN instead gives every pair many
paths of different lengths, and a request can be rerouted around a faulty or
busy switch at the stage where it meets it, without starting over. It has only
three switching stages. A direct link from each first-stage switch to the
last-stage switch of the same number lets many requests skip the middle stage
altogether.

This RTL is a circuit-switched implementation of the 16×16 network:
a **fabric** of multiplexers, switching elements (SEs) and demultiplexers
wired with the FTISEN link pattern, and a **router** that sets up one circuit
per request following the FTISEN routing rules, around the nodes flagged as
faulty and the nodes already taken by other requests.

## Topology

```
16 sources ─► 16 MUX 4x1 ─► 8 SE 2x5 ─┬─► 4 SE 8x2 ─► 8 SE 2x2 ─► 16 DEMUX 1x4 ─► 16 destinations
                            (stage 0) │   (stage 1)     (stage 2 = last)
                                      └── direct link j ──►┘
```

With N = 16 and Q = N/4 = 4:

| from | link | to |
|---|---|---|
| source i | link k = 0..3 | MUX (i + k·Q) mod N |
| MUX 2j, 2j+1 | | stage-0 SE j, inputs 0, 1 |
| stage-0 SE j | output 0 (direct link) | last-stage SE j, input 1 |
| stage-0 SE j | output 1+t, t = 0..3 | stage-1 SE t, input j |
| stage-1 SE 2r | outputs 0, 1 | last-stage SEs 4r+2, 4r+3 (input 0) |
| stage-1 SE 2r+1 | outputs 0, 1 | last-stage SEs 4r, 4r+1 (input 0) |
| last-stage SE j | outputs 0, 1 | DEMUX 2j, 2j+1 |
| DEMUX m | output l | destination (m mod Q) + l·Q |

These rules decide which last-stage SEs can deliver to a destination d.
Only DEMUXes with m ≡ d (mod 4) reach d. So d can be served only by
last-stage SEs whose number has bit 0 equal to bit 1 of d. Every stage-1
SE has exactly one such output, so all four stage-1 SEs can reach every
destination. A source i enters through stage-0 SEs whose number has bit 0
equal to bit 1 of i. Its direct links therefore reach d only when bit 1 of
the source equals bit 1 of the destination. Such a pair has
4 × (1 + 4) = 20 paths, and any other pair has 4 × 4 = 16. For example,
source 0 reaches destination 5 over 20 paths.

The MUXes 0–7 (stage-0 SEs 0–3) form subnetwork G0, MUXes 8–15 (SEs 4–7)
subnetwork G1. Every source has two links into each subnetwork.

## Routing a request

The router (`ftisen_router`) handles one request at a time, source 0 first,
and spends one clock per decision:

1. **Stage 0.** Destination bit 3 (the MSB) picks the preferred subnetwork.
   The four candidate entries, in order, are the source's two links into that
   subnetwork (primary, first alternate), then its two links into the other one
   (second, third alternate); within a subnetwork the link order k decides.
   For source 0 going to destination 5 this gives SE 0 (MUX 0), SE 2 (MUX 4),
   SE 4 (MUX 8), SE 6 (MUX 12). An entry is rejected when its MUX is faulty or
   already carries another source, or when its SE is faulty. If all four are
   rejected, the request is dropped (`R_DROP0`).
2. **Direct link.** The direct link is tried when bit 1 of the source equals
   bit 1 of the destination. It is used unless the direct output of the chosen
   stage-0 SE is taken, or the last-stage SE, its output or the DEMUX behind it
   is faulty or taken, or the destination already has a request. If the direct
   link fails, routing continues at stage 1; the request is not dropped.
3. **Stage 1.** The primary stage-1 SE is the one that leads to DEMUX d, the
   destination's own first link. The alternates are that SE's number XOR 1,
   2 and 3. A candidate is rejected when any node or output on the rest of its
   path is faulty or busy: the stage-0 output into it, the SE, its output, the
   last-stage SE and output behind it, and the DEMUX. Stage-1 SEs are taken to
   know the state of the switches they connect to, so a faulty last-stage SE or
   DEMUX makes the router pick another stage-1 SE instead of dropping the
   request. All four rejected: `R_DROP1`.
4. **Last stage.** If the destination already takes a request in this
   transfer cycle, the request is dropped (`R_DROPL`); otherwise the circuit
   is committed.

**Timing.** Each rejected candidate costs one extra clock, which is the
"rerouting time". A fault-free request takes 2 clocks over the direct link and
3 clocks through stage 1. A source without a request costs one clock. A whole
transfer cycle takes `2 + 16 + Σ request clocks` clocks from `start` until the
router's transfer pulse, plus one register stage to `done` at the top level.

Because the router checks faults before it commits a path, a single faulty SE
never costs a request that is alone in its transfer cycle. Any single faulty
MUX or DEMUX does not either. The top-level testbench checks this for every node.

## Transfer cycles (`ftisen_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | begin a transfer cycle (taken when `busy` is low) |
| `src_req[16]`, `src_dst[16]`, `src_data[16]` | in | request, 4-bit destination and 8-bit payload per source; hold from `start` to `done` |
| `fault` (`fault_t`) | in | fault flag per MUX (16), stage-0 SE (8), stage-1 SE (4), last-stage SE (8), DEMUX (16); keep constant during a transfer cycle |
| `busy` | out | router is setting up circuits |
| `done` | out | one-clock pulse: results valid until the next `start` |
| `route_res[16]` | out | per source: `R_NONE`, `R_DIRECT`, `R_STAGE1`, `R_DROP0`, `R_DROP1`, `R_DROPL` |
| `route_cand0[16]`, `route_cand1[16]` | out | stage-0 / stage-1 choice used (0 primary, 1–3 alternates) |
| `route_cycles[16]` | out | clocks spent routing each request |
| `dst_valid[16]`, `dst_src[16]`, `dst_data[16]` | out | the request that reached each destination |

The router writes a `route_cfg_t`, which holds the enable and select of every
MUX, SE output and DEMUX. An enable bit also marks that resource as busy for
the rest of the transfer cycle. After the last source, all circuits carry
their payloads through the combinational fabric in one clock, and
`ftisen_top` registers what each destination receives. A faulty node passes
nothing, even when it is enabled. So a routing error would show up as a lost
request rather than be hidden.

## Behaviour under load

`tb_ftisen_load` runs the network with each source requesting with probability
p per transfer cycle, to uniformly random destinations. It runs 150 transfer
cycles per point, once fault-free and once with one random faulty SE. One run
gives:

| p | delivered / cycle | accepted fraction | clocks / request | with one faulty SE: delivered | accepted | clocks |
|---|---|---|---|---|---|---|
| 0.1 | 1.59 | 0.96 | 2.65 | 1.59 | 0.96 | 2.79 |
| 0.3 | 4.27 | 0.87 | 3.07 | 4.24 | 0.86 | 3.30 |
| 0.5 | 6.35 | 0.80 | 3.38 | 6.19 | 0.78 | 3.65 |
| 0.7 | 7.95 | 0.72 | 3.71 | 7.64 | 0.70 | 4.00 |
| 1.0 | 9.87 | 0.62 | 4.21 | 9.21 | 0.58 | 4.44 |

At high load most losses come from two sources that pick the same
destination. Only one request per destination can be accepted in a
transfer cycle, which caps the rate near 16·(1 − (15/16)^16) ≈ 10.3 at p = 1.
These figures are simulated traffic. They are not the closed-form
probability model (p0 = 1 − (1 − p/5)², p1 = 1 − (1 − p0/2)⁸,
p2 = 1 − ((1 − p1)(1 − p0/2))²) with which FTISEN was originally
evaluated. That model's bandwidth and acceptance figures cannot be reproduced
cycle by cycle, and the RTL does not try.

## How far this follows the FTISEN definition

Taken from the network definition: the node counts and sizes (MUX 4×1, SE 2×5 / 8×2 / 2×2,
DEMUX 1×4), every link rule in the table above, the stage-0 candidate order
(subnetwork by destination MSB, primary before secondary), the direct
stage-0 → last-stage route when the address bits agree, trying the four
stage-1 SEs in turn, and dropping a request that has no free choice. A fault
may hit any MUX, SE or DEMUX.

Choices made here:

* **Switch insides.** MUX, DEMUX and SE are plain enabled selectors /
  crossbars; the port numbering inside each node is this design's.
* **Which stage-1 SE is primary** and the XOR order of the alternates.
* **Look-ahead at stage 1**: a stage-1 candidate counts as busy/faulty if the
  last-stage SE or DEMUX behind it is. Without this, a request would be
  dropped at the last stage even though another stage-1 SE could have
  carried it.
* **The direct-link test** compares address bit 1 (counting from the LSB) of
  source and destination. This is the bit that decides whether the direct
  link can reach the destination.
* **Serial path setup** in source order, one clock per decision, and **one
  request per destination** per transfer cycle.
* **Payload**: 8 data bits plus the 4-bit source number (`DATA_W` in
  `ftisen_pkg`).

Not built: network sizes above 16×16. Those add (n − 3) middle stages of
2×2 SEs. Their link rules pair middle-stage SEs 2r and 2r+1, and at the last
middle stage the two members of a pair lead to disjoint groups of
destinations. So the "first alternate" of those stages cannot deliver to the
same destination, and the rules need more than is defined before those sizes
can be routed. `N` is therefore a package constant fixed at 16, and the
routing functions in `ftisen_pkg` use the bit positions of that size. Link
faults (as opposed to node faults) are not modelled.

## Files

| file | content |
|---|---|
| `rtl/ftisen_pkg.sv` | sizes, `flit_t`, `fault_t`, `route_cfg_t`, `route_res_t`, link-pattern functions |
| `rtl/ftisen_mux4.sv` | 4×1 MUX |
| `rtl/ftisen_se.sv` | IN×OUT crossbar SE (used as 2×5, 8×2, 2×2) |
| `rtl/ftisen_demux4.sv` | 1×4 DEMUX |
| `rtl/ftisen_fabric.sv` | the wired datapath |
| `rtl/ftisen_router.sv` | path-setup state machine |
| `rtl/ftisen_top.sv` | router + fabric + destination registers |
| `tb/tb_ftisen_mux4.sv`, `tb/tb_ftisen_demux4.sv`, `tb/tb_ftisen_se.sv` | exhaustive / random tests of the nodes |
| `tb/tb_ftisen_fabric.sv` | every path skeleton of all 256 pairs, path counts (20 / 16), single node faults |
| `tb/tb_ftisen_router.sv` | 600 random transfer cycles with faults against a reference model, outcome, choices and clocks |
| `tb/tb_ftisen_top.sv` | end to end at full size: deliveries, outcomes, clock counts, every single-node fault, and a count of every routing mechanism (direct, stage 1, reroute at stage 0 and 1, subnetwork switch, direct-link fallback, the three kinds of drop) |
| `tb/tb_ftisen_load.sv` | load sweep p = 0.1 … 1.0, fault-free and single SE fault |
| `tb/ftisen_ref_model.svh` | reference model of the routing rules, included by the router and top tests |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ftisen_pkg.sv tb/tb_ftisen_top.sv --top-module tb_ftisen_top -o sim
./obj_dir/sim
```

Every testbench runs in seconds. `tb_ftisen_top` uses the design exactly
as it is, with no parameter changed.
