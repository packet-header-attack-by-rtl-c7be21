# Header-tampering Trojan in a mesh NoC tiled multicore: interconnect RTL

In a tiled chip multiprocessor every L1 miss to a remote L2 slice crosses the
on-chip network as a one-flit request packet. The home slice of an address is
fixed by the address bits. A Trojan in one router can rewrite the
destination field (DID) of those request heads. The network still delivers
the packet, but to the wrong tile. That tile sees that the address does not
belong to it and drops the packet. The miss then never completes: the L1
miss entry stays allocated, the core's reorder buffer fills behind the
blocked load, and the core stalls. The defence studied with the attack is a
timeout at the L1 miss status holding registers (MSHR). A miss that gets no
reply within T cycles re-sends its request, which is a simple ARQ scheme.

This RTL models the network side of such a system:

- a 4 x 4 mesh of virtual-channel wormhole routers;
- the Trojan, mounted in router 5;
- per tile, a network adapter that packetises messages and drops misdelivered requests;
- per tile, a tile controller with a 256-entry MSHR that can re-transmit.

The cores, the L1 and L2 arrays with their controllers, and main memory are
not included. Their interfaces are top-level ports: an L1 miss/fill port and
an L2 request/response port per tile.

## Tile and port map

Tiles are numbered `id = 4*y + x`. Tile 0 is the south-west corner and tile
15 the north-east corner. "North" means increasing `y`. Each router has five
ports, defined in `noc_pkg::port_e`:

| Port | Meaning |
|------|---------|
| EAST | +x |
| WEST | -x |
| NORTH | +y |
| SOUTH | -y |
| LOCAL | the tile |

Routing is dimension-ordered XY: a packet first corrects x, then y. Under XY
routing, a packet that has started moving along y never turns back to x.

The Trojan sits in router 5, at x=1, y=1.

## Flits and packet header

A link is 69 bits wide (`flit_t`):

| Field | Width | Contents |
|-------|-------|----------|
| valid | 1 | flit present |
| FT | 2 | flit type: head, body or tail |
| VCID | 2 | VC the flit occupies in the receiving router |
| data | 64 | payload |

In a head flit the 64 data bits are the header (`head_t`). The fields below
run from the MSB down:

| Field | Bits | Use |
|-------|------|-----|
| PID | 8 | packet id; the index of the sender's MSHR entry |
| SID | 4 | source tile |
| DID | 4 | destination tile; the field the Trojan rewrites |
| PL | 3 | number of flits following the head |
| TYPE | 3 | L1 miss request, L1 miss reply, write-back, other |
| PR | 2 | priority; ranks packets in switch allocation (0 lowest) |
| CMD | 4 | command (carried, zero here) |
| ADDRESS | 36 | physical address |

Packet sizes:

- A request is a single head flit with PL=0.
- A reply is a head plus four data flits (PL=4). Together they carry one 256-bit line fill.

**Home tile.** The L2 home tile of an address is `addr[17:14]`: the top four
bits of the L2 set index. This assumes a 2 MB, 8-way L2 with 64-byte lines,
which gives 4096 sets and index bits [17:6]. Both constants are in `noc_pkg`.
The network adapter checks requests against this function.

## Router (`noc_router`)

Each input port (`input_port`) has three VCs, each a 3-flit FIFO. Beside each
VC sits a control record:

- **S**: the VC is busy with a packet.
- **PL**: flits of the packet still to arrive.
- **OP**: output port from route computation.
- **VCID**: the downstream VC granted by the VC allocator.

How the record is updated:

- A head flit loads PL and sets S if PL is non-zero.
- Every later flit decrements PL, and S clears when PL reaches zero.
- OP and VCID clear when the last flit leaves.

Pipeline of a head flit in an idle router:

| Cycle | What happens |
|-------|--------------|
| t | written into its VC; XY route computed (`xy_route`) |
| t+1 | VC allocation (`vc_allocator`): round robin per output port, lowest free downstream VC |
| t+2 | switch allocation (`switch_allocator`, separable, input-first; highest PR first, round robin among equals); crossbar traversal (`crossbar`); output register |

The flit is in the next router's buffer at t+3. Each hop therefore costs
3 cycles. Body and tail flits only need switch allocation, so one flit per
cycle streams behind the head. A head from tile 4 to tile 15 passes six
routers and appears on router 15's local output 17 cycles after router 4
writes it.

**Flow control.** Flow control is credit based:

- For every output port and downstream VC, the router keeps a credit counter (reset to 3) and a busy bit.
- A downstream VC can be allocated only when it is not busy and all three of its credits are back. This makes VC reuse atomic: one packet per VC.
- An input port returns a credit to its upstream neighbour the cycle after a flit leaves the VC.
- The crossbar overwrites the flit's VCID with the allocated downstream VC.

## The Trojan (`ht_trojan`)

The Trojan has two parts: a trigger and a payload.

**Trigger.**
- Attack probability is p = 0.1, implemented as a duty cycle: in every 100-cycle window the Trojan is armed for 10 consecutive cycles.
- The position of the 10-cycle burst in each window is drawn from a 16-bit Galois LFSR (taps 0xB400).
- `HT_WINDOW` and `HT_ACTIVE` set the window and burst lengths. ACTIVE = 5 and 15 give p = 0.05 and 0.15.
- The trigger only runs while the `ht_enable` input is high. This allows a warm-up phase before the attack starts.

**Payload.** While armed, the Trojan watches the VC allocator's grants on the
four mesh input ports. It rewrites a head flit when all of these hold:

- the flit is in the cycle it wins a downstream VC;
- its TYPE is L1 miss request;
- its OP is a mesh port, not the local tile.

The DID is then overwritten in place in the input buffer. OP and VCID were
already computed from the old DID, so the packet leaves on the correct port.
The next router routes it by the new DID.

**Choosing the new DID.** The new DID must still be reachable from the next
router without an illegal XY turn. Otherwise the packet would deadlock or be
misrouted instead of silently misdelivered. The choice depends on OP:

- **EAST**: a random tile in any column strictly east of router 5 (x = 2 or 3), in any row. For example, a request from tile 4 to tile 15 may be rewritten to tile 3. It still leaves router 5 eastward, and turns south at router 7.
- **WEST**: a random tile in a column strictly west.
- **NORTH**: a random tile further north in the same column.
- **SOUTH**: a random tile further south in the same column.

If the random pick equals the old DID, the next reachable tile is taken
instead, so an attack always changes the destination. The one exception is a
route with only one reachable tile: South from router 5 can only reach tile 1.

Because every armed VC grant is attacked, the fraction of miss requests
crossing router 5 that get rewritten equals p. `ht_rate_tb` measures this:

| p | Fraction rewritten |
|---|--------------------|
| 0.05 | 0.0497 |
| 0.10 | 0.0995 |
| 0.15 | 0.1499 |

Packets that the Trojan tile injects itself, and packets ejected at that
tile, are never touched. `tamper_count` counts the rewrites.

Rewritten packets reach a real tile whose slice is not the address's home.
That tile's adapter drops them.

## Network adapter (`network_adapter`)

**Injection.**
- Takes one message (`msg_t`: header plus up to four data words) at a time from the tile controller.
- Claims an idle VC of the router's local input, meaning one that is free with all credits.
- Sends the head and then the body/tail flits, one per available credit.

**Ejection.**
- Buffers incoming flits in one FIFO per VC.
- Picks a packet head by round robin and assembles one packet at a time.
- Returns a credit for every flit taken.

**Drop rule.** A completed packet of type L1 miss request whose home tile,
`addr[17:14]`, differs from its DID is dropped and counted in `drop_count`.
Every other packet is held on `rx_*` until the tile controller accepts it.

## Tile controller and MSHR with ARQ (`tile_controller`, `mshr_arq`)

**L1 misses.** The tile controller takes L1 misses and allocates an MSHR
entry, the lowest free one. That entry's index becomes the packet's PID.

- If the home tile is this tile, the miss goes straight to the local L2 controller port.
- Otherwise the tile controller builds a one-flit request and hands it to the adapter.

**Network input.**
- Requests from the network go to the local L2 controller.
- The L2 controller's responses for remote tiles go back as 5-flit replies.

**Completion.** A reply, or a local L2 response, completes the entry whose
PID and address match. `l1_fill_*` pulses one cycle later.

Priorities:

- **Adapter:** remote reply first, then re-transmission, then new request.
- **L2 port:** network request before local miss.

**ARQ.** Each MSHR entry whose request went over the network runs a 16-bit
timer from allocation.

- When `arq_en` is high and the timer reaches `arq_timeout`, the request is re-sent with the same PID and the timer restarts.
- Timer values of 1000 and 200 cycles correspond to the two defence settings evaluated with the attack.
- A reply that arrives for an entry already completed, for example the original after a re-send, does not match and is counted in `dup_count`. It is then discarded.
- Local misses never time out.

## Top level (`tcmp_top`, `mesh_noc`)

`mesh_noc` connects 16 routers. Unused edge ports are tied off. Only router
`HT_NODE` (default 5) gets a Trojan, and only when `HT_EN` is set. `tcmp_top`
adds an adapter and a tile controller per tile.

Parameters and their defaults:

| Parameter | Default |
|-----------|---------|
| K | 4 |
| NUM_VC | 3 |
| DEPTH | 3 |
| HT_EN | 1 |
| HT_NODE | 5 |
| HT_WINDOW | 100 |
| HT_ACTIVE | 10 |
| MSHR_ENTRIES | 256 |

Run-time inputs: `ht_enable`, `arq_en`, `arq_timeout`.

Statistics outputs:

- `ht_tamper_count`
- per-tile `drop_count`, `retx_count`, `dup_count`, `outstanding`

Configurations studied with this design, and how to select them:

| Configuration | Setting |
|---------------|---------|
| no Trojan | `ht_enable=0` (or `HT_EN=0`) |
| Trojan | `ht_enable=1`, `arq_en=0` |
| Trojan + ARQ, 1000-cycle timer | `arq_en=1`, `arq_timeout=1000` |
| Trojan + ARQ, 200-cycle timer | `arq_en=1`, `arq_timeout=200` |

## Choices made here, and limits

These points are this design's own; a different implementation could choose otherwise:

- Field widths, the 64-byte line and the home-tile bit positions are chosen here.
- Stage timing, allocator policies and the atomic VC-reuse rule are chosen here.
- The LFSR trigger position is chosen here.
- The Trojan does not rewrite into its own column. Under XY routing that needs a turn back at the next router.
- PR ranking applies only in switch allocation, as strict priority with round robin among equal PR. The VC allocator ignores PR. The tile controller sends every packet with PR 0, so end-to-end traffic never exercises ranking. The switch allocator testbench checks it, and the router testbench runs random PR values.
- There is no processor, cache array, coherence protocol or memory, so effects on instructions per cycle or the reorder buffer cannot be measured with this RTL. What can be measured is tampering, drops, stuck and re-sent misses, and latency.
- Only one message is being injected and one assembled per adapter at a time.
- Synthesis of the full top with yosys is slow. The RTL is ordinary synthesizable SystemVerilog.

## Simulation

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Modules are found
through the include path. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/noc_pkg.sv tb/tcmp_top_tb.sv --top-module tcmp_top_tb -Mdir obj_top
./obj_top/Vtcmp_top_tb
```

| Testbench | What it checks |
|-----------|----------------|
| `xy_route_tb` | all 256 source/destination pairs |
| `crossbar_tb`, `vc_allocator_tb`, `switch_allocator_tb` | random stimulus against reference models, grant rules, PR ranking and fairness |
| `input_port_tb` | control record S, PL, OP and VCID; credits; random push/pop against a model |
| `ht_trojan_tb` | duty cycle per window, the rewrite conditions and that every new DID is reachable |
| `ht_rate_tb` | three routers at p = 0.05, 0.10 and 0.15: the rewrite fraction, tamper counters and delivery |
| `noc_router_tb` | 2-cycle router latency, ordering, data integrity and credit bounds; dormant versus armed Trojan |
| `mesh_noc_tb` | the 17-cycle 4-to-15 latency, exact delivery with the Trojan dormant, and tamper effects when armed |
| `network_adapter_tb`, `tile_controller_tb`, `mshr_arq_tb` | packetising, the drop rule, local/remote split and ARQ timing |
| `tcmp_top_tb` | the whole system at default parameters |

`tcmp_top_tb` runs in four phases:

- Clean traffic.
- Tile 4 to tile 15 traffic through the Trojan. Every rewritten request must be dropped and its miss left stuck.
- ARQ with a 200-cycle timer, which must clear the stuck misses.
- Mixed attack plus ARQ.

It counts rewrites, drops, re-sends, duplicate replies, local and remote
misses, and stall cycles, and fails if any of them never happens.

The mesh and top testbenches take a few minutes to compile.
