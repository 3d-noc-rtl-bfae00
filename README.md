# R-3D-NoC: a reconfigurable, layered nanophotonic crossbar for 256 cores

A single 64x64 optical crossbar for a 256-core chip needs long waveguides,
many crossings and one token shared by 64 tiles. This design splits it up
instead. The 64 tiles are sorted into four groups of 16. Every ordered pair of
groups gets its own small 16x16 crossbar, which makes 16 crossbars, stacked four
to a layer on four optical layers. A tile therefore sees four independent
crossbars, one towards each group (its own included), and competes for a token
with only the 15 other tiles of its group.

Splitting the crossbar leaves capacity stranded: a channel between two groups
that do not talk sits idle while another pair of groups is congested. The
reconfigurable version (R-3D-NoC) recovers that capacity at run time. Counters
at every optical receiver measure how busy each channel is. At the end of each
reconfiguration window, a controller per group classifies the channels. An idle
channel into a tile can then be *lent* to another group that is congested
towards the same tile. Micro-rings placed between two stacked layers
(layers 0/1 or 2/3) switch the borrowing group's light into the lent channel.
When the lending group needs its channel again, it takes it back.

The RTL is SystemVerilog-2017. It is synthesizable, apart from two clearly
marked behavioural models of optical parts.

## Organisation

| Quantity | Value |
|---|---|
| Cores / tiles | 256 cores, 64 tiles of 4 cores (one electrical router per tile) |
| Groups | 4 groups of 16 tiles; tile number = {group[1:0], index[3:0]} |
| Crossbars | 16 (one per source group x destination group), 16x16 each |
| Home channels | 256: one per (source group, destination tile), Multiple-Write-Single-Read |
| Channel width | 64 wavelengths x 10 Gb/s = 640 Gb/s = one 128-bit flit per 5 GHz cycle |
| Packet | 4 flits (a 64-byte cache line) |
| Buffers | 16 flits: four transmit lanes per tile (one per destination group), one receive buffer per home channel |

Every destination tile owns four *home channels*, one in each crossbar that
ends in its group. Only that tile reads a home channel. Any of the 16 tiles of
the crossbar's source group may write to it, after capturing the channel's
token.

### Layer placement

Layer `L` carries the four crossbars `s -> s xor K[L]`, where `K = {0, 2, 3, 1}`
(`noc_pkg::layer_key`):

| Layer | Crossbars (source group -> destination group) |
|---|---|
| 0 | 0->0, 1->1, 2->2, 3->3 (intra-group) |
| 1 | 0->2, 1->3, 2->0, 3->1 |
| 2 | 0->3, 1->2, 2->1, 3->0 |
| 3 | 0->1, 1->0, 2->3, 3->2 |

Each layer is a permutation, so each layer carries exactly one crossbar out of
every group and one into every group, and waveguides within a layer never need
to cross. Reconfiguration rings join only layer 0 with layer 1, and layer 2
with layer 3. The placement puts the static 0->3 channels on layer 2, 1->3 on
layer 1 and the intra-group channels on layer 0, so that the reconfiguration
example below works. Another published placement of layer 0 (0<->3 on
layer 0, with 1 and 2 intra-group) conflicts with that example; only this
placement is implemented.

## Path of a packet

1. A core hands its packet to the tile router (`tile_router`) one flit per
   cycle. The four cores are served round robin, a whole packet at a time.
   The first flit carries the header in bits 15:0:
   `{src_tile, src_core, dst_tile, dst_core}` (`noc_pkg::hdr_t`).
   The packet goes into one of four 16-flit transmit lanes, the one for its
   destination group.
2. Once a lane holds a complete packet, it asks for the destination tile's
   home channel in its own group's crossbar (`tx_req[g]`, `tx_xbar[g]`,
   `tx_dst[g]`). The four lanes request, wait and send independently, so a
   tile can have a request outstanding in all four crossbars at once.
3. The channel's token arbiter grants the channel for one packet. The router
   then sends the 4 flits on 4 consecutive cycles.
4. The flits reach the receiver after 1 cycle of E/O conversion, 1 to 5 cycles
   of flight and 1 cycle of O/E conversion. Flight time is 1 cycle within a
   group, and 3, 4 or 5 cycles when the groups are 1, 2 or 3 positions apart
   (`noc_pkg::flight_cycles`).
5. Each home channel fills its own 16-flit receive buffer at the destination.
   The router drains the four buffers round robin, one packet at a time and
   one flit per cycle, to the core named in the header. Each flit drained
   returns a credit to its channel.

With no contention, a packet moves in this order: its last flit enters the
transmit lane, it requests two cycles later, it captures the token in 1 to 3
cycles, it streams for 4 cycles, it flies for 3 to 7 cycles and it is ejected.

### Token-slot arbitration and credits (`token_arbiter`)

Each channel has one token. The token passes `HOPS` = 6 writers per cycle, so a
writer waiting on an idle channel captures it within 1 to 3 cycles. The first
requester the token meets within its stretch takes it. That requester owns the
channel for one packet, and the token then continues from the next writer.
Under full load, the grants therefore rotate through the writers in order.

The arbiter also holds one credit per slot of the receiver's buffer. Capturing
the token costs 4 credits, and every flit the receiver drains returns one. A
receive buffer therefore can never overflow. When the receiving cores are slow,
the channel simply stops granting.

## Reconfiguration

### Statistics (`util_counter`)

Every receive buffer has a counter. It counts two sums over a window of
`R_W = 2^RW_LOG2` cycles (1024 by default):

* `Link_util = (cycles in which a flit arrived) / R_W`
* `Buffer_util = (sum over cycles of occupied slots) / (16 * R_W)`
* Smoothed buffer value: `B_w(t) = (3 * Buffer_util(t) + B_w(t-1)) / 4`

All three are unsigned fixed point with 8 fractional bits (256 = 1.0),
truncated. The smoothing stops a single burst from swinging the allocation.
Link utilisation is not smoothed, so the "not used at all" test stays exact.

### Classification (`util_classifier`)

The rules are tested in this order:

| Condition | Class | Share that could be offered |
|---|---|---|
| `Link_util == 0` | Not-utilised (beta4) | 90 % |
| `Link_util <= L_MIN` (0.10) | Under-utilised (beta3) | 50 % |
| `Buffer_util > B_CON` (0.5) | Over-utilised (beta1) | 0 % |
| otherwise | Normal (beta2) | 25 % |

A ring moves a whole waveguide, so only Not-utilised channels are actually
lent, and only as a whole. The Under and Normal classes are computed but do not
trigger any action.

A saturated link whose receiving cores keep up is classed Normal, not
Over-utilised, because its buffer stays nearly empty. Borrowing is therefore
triggered by receive-buffer pressure, not by link load alone.

### The controllers (`recfg_controller`, one per group)

Controller `i` owns the 64 home channels that end in group `i`: 16 tiles x 4
source groups, indexed `{tile index, source group}`. It also acts for the tiles
of group `i` when they borrow.

1. **Window end.** The shared window timer pulses `win_end`, and every counter
   stores the window's results.
2. **Gather and classify.** The controller reads its 64 counters, one per
   cycle, over a dedicated port, classifies each one and then publishes two
   64-bit vectors: `avail` (Not-utilised, not lent, not blocked) and `over`
   (Over-utilised). All four controllers see all eight vectors.
3. **Choose.** As a borrower, controller `j` scans the 64 destination tiles
   `d`, one per cycle, for one where all of these hold:
   * its own channel `j -> d` is Over-utilised;
   * some other group `l` has a Not-utilised channel `l -> d`;
   * the *source waveguide* is Not-utilised and not already in use. This is
     group `j`'s own waveguide that runs directly above or below the channel
     `l -> d` on the paired layer, at the same channel position.
     `noc_pkg::src_wg_tile` gives it.
   * the source waveguide is not `j`'s own static channel to `d`.
4. **Handshake.** The controllers exchange messages over a shared bus, which
   carries one message per cycle with round-robin access:
   * the borrower sends `ACCEPT(l, d)` to the owner of `d`;
   * if the channel is still free and offered, the owner raises `hold`
     (no new grants), waits until the channel is empty, switches the rings and
     answers `CONFIRM`. Otherwise it answers `NACK`;
   * on `CONFIRM` the borrower sets `dyn_valid[d]`. Its routers then send
     every second packet for `d` through crossbar `l -> group(d)`.
5. **Blocking.** While the loan stands, the source waveguide is `blocked`: it
   carries the borrower's light into the lent channel, so its own channel
   grants nothing.
6. **Reclaim.** A loan ends when a tile of group `l` requests its lent
   channel, or when a tile of group `j` requests the blocked source waveguide.
   The owner then sends `REVOKE`, holds the channel until it drains, and
   switches the rings back. The borrower clears `dyn_valid[d]` as soon as it
   sees `REVOKE`. Because rings are only switched on an empty, held channel,
   no packet is ever cut in two.

**Example.** Group 0 streams to group 3 while group 1 is silent. Tile 0 sends
to tile 63 on its static channel 0->3 (layer 2), and that channel's buffer
fills. Group 1's channel to tile 63 (1->3, layer 1) is idle. Group 0's own
layer-0 waveguide at the same position (0->0, the home channel of tile 15) is
idle too. Controller 0 sends `ACCEPT(lender 1, tile 63)` to controller 3,
which answers `CONFIRM`. From then on tile 0 alternates between layer 2 and
the borrowed layer-1 channel, which doubles its bandwidth to tile 63. While
the loan stands, group 1 cannot reach tile 63 and group 0 cannot reach tile 15
on those two channels. If either group tries, the loan is revoked.

## Design choices beyond the architecture description

The description gives the network's organisation, channel rates, latencies,
buffer sizes, the statistics equations, the thresholds and the reconfiguration
algorithm. The following are this design's own choices:

* **Layer placement.** The placement above was chosen to agree with the
  reconfiguration example (see "Layer placement").
* **Source waveguide position.** The source waveguide sits at the same channel
  position on the paired layer. The description's own example picks a
  different free waveguide of group 0 (the one to tile 12). Any free one would
  work optically; fixing the position keeps the ring count to one per channel
  pair.
* **Timing and thresholds.** The window is 1024 cycles. The thresholds use a
  single pair, L_MIN = 0.10 and B_CON = 0.5. A second pair that the
  description mentions (0.25 / 0.25) is not used.
* **Token model.** The token covers 6 writers per cycle, derived from the
  1-3 cycle capture time.
* **Flow control.** Credit-based, one credit per slot of the receive buffer.
* **Controller links.** Statistics are gathered serially over a dedicated
  port. Availability is broadcast on dedicated wires. The handshake runs on
  a shared message bus, and it includes a `NACK` reply. Rings switch only on
  a drained channel.
* **Tile router.** Round robin a packet at a time. One transmit lane of 16
  flits per destination group: the description lets the four cores have
  several optical requests outstanding, and this is how they get them.
  Alternation, per lane, between the static and the borrowed path. One
  ejected flit per cycle per tile.
* **Head-of-line blocking.** Within a lane, a packet waiting for its token
  holds up the packets behind it, even those for other tiles. Injection
  stalls for the whole tile while the lane of the packet being injected is
  full.
* **Packet order.** Packets that take the borrowed path can overtake packets
  on the static path. Order between two cores is kept only while no loan is
  active.

## Not modelled

Several parts of the chip are outside the RTL:

* cores, L1/L2 caches and memory controllers (the top exposes each core's
  injection and ejection port instead);
* the off-chip laser;
* the through-silicon vias (plain wires here);
* the vertical couplers and the heaters that tune the rings;
* energy and power.

The optical path itself is represented by two behavioural models:

* `optical_link` is a delay pipeline;
* `mrr_switch` is a multiplexer choosing which group's light drives a channel.

## Files

All files are in `rtl/`:

| File | Contents |
|---|---|
| `noc_pkg.sv` | constants, header and message types, layer-placement, source-waveguide and flight-time functions |
| `r3d_noc.sv` | top: 64 routers, 16 crossbars, 4 controllers, window timer, source-waveguide blocking and reclaim wiring, controller message bus |
| `tile_router.sv` | electrical router of a tile, with 8 `flit_fifo` (4 transmit lanes, 4 receive buffers) and 4 `util_counter` |
| `photonic_xbar.sv` | one 16x16 crossbar: 16 x (`mrr_switch` + `mwsr_channel`) |
| `mwsr_channel.sv` | `token_arbiter` + writer mux + `optical_link` |
| `recfg_controller.sv` | the reconfiguration controller, with a `util_classifier` |
| `token_arbiter.sv`, `flit_fifo.sv`, `util_counter.sv`, `util_classifier.sv` | leaf logic |
| `optical_link.sv`, `mrr_switch.sv` | behavioural models of the optical parts |

`r3d_noc` has two parameters:

* `RW_LOG2`: the window length;
* `HOPS`: how many writers the token passes per cycle.

The network size, flit width, packet length and buffer depth are constants in
`noc_pkg`.

## Simulation

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and finishes, and a watchdog ends a run that
hangs. Build and run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_r3d_noc.sv \
          --top-module tb_r3d_noc
./obj_dir/Vtb_r3d_noc
```

Building the full network and running the end-to-end test (roughly 10 000
cycles) takes about a minute.

| Testbench | What it checks |
|---|---|
| `tb_r3d_noc` | The full network at default parameters. It runs three phases: uniform and hot-spot traffic; group 0 streaming into slow-draining group 3, which must trigger loans and borrowed-path traffic; then reclaim through the owners' and the source waveguides' demand. Every packet is scoreboarded (right core, exactly once, payload intact). The test counts token contention, full receive buffers, all four classes, ACCEPT, CONFIRM, borrowed-path requests, blocked source waveguides, reclaims, REVOKE and tiles sending on two lanes at once, and fails if any of them never happened. |
| `tb_r3d_noc_synth` | Uniform, bit-reversal, transpose, complement and perfect-shuffle traffic, 8 packets per core, on the full network. It checks delivery and prints throughput. It measured 35 to 54 flits/cycle for the whole network under these back-to-back bursts. |
| `tb_recfg_controller` | Classification against the rules; the borrowing example above (tile 63, lender group 1, source waveguide tile 15), through ACCEPT, CONFIRM, REVOKE and NACK; lending with hold, drain, CONFIRM, NACK to a second borrower, reclaim and REVOKE. |
| `tb_tile_router` | Per-core packet order and integrity in both directions, alternation onto the borrowed crossbar, credit return, and Link_util per window. |
| `tb_photonic_xbar` | Routing to home channels; no writes from a non-owning group; a lent channel carrying the borrower's packet; starved and blocked behaviour. |
| `tb_mwsr_channel` | 16 writers into one receiver: packet integrity, E/O + flight + O/E latency, no overflow with a slow receiver. |
| `tb_token_arbiter` | Capture within 1-3 cycles, 4-cycle slots, round-robin order, the credit limit, and `hold`. |
| `tb_util_counter`, `tb_util_classifier`, `tb_flit_fifo`, `tb_optical_link`, `tb_mrr_switch` | Leaf blocks against models computed in the testbench; the classifier is checked exhaustively. |

## Trust and limits

* Every block has a testbench, and each testbench has been shown to fail on a
  deliberately broken copy of its block.
* The network's behaviour matches the rules above. The performance and energy
  results reported for the architecture come from a separate network
  simulator and were not reproduced here.
* Workloads driven by application traces cannot be replayed, because the
  traces are not part of this design.
* Synthesis of the whole top with generic tools is slow (over a million
  flip-flops, mostly the 16-flit buffers of 256 receivers and 256 transmit
  lanes plus the flit pipelines of 256 optical links). The leaf and mid-level blocks
  synthesise quickly.
