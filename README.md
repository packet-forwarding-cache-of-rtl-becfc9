# Packet forwarding cache switch

A switch in a large parallel computer normally finds a packet's output port in
a routing table. For arbitrary topologies that table is a CAM (content-addressable
memory) chip. A CAM lookup takes several nanoseconds, which caps the line rate
of an input port well below what modern links carry. This design puts a small
on-chip cache in front of the CAM at every input port. Most packets find their
output port in the cache within a few cycles, and only misses go to the CAM.

The trick that makes a small cache work is **what** gets cached. Caching
destination addresses would need one entry per destination. Instead, when the
network is a known regular topology, the destination is first hashed into the
*output link it will take*. Under dimension-order routing in a torus, for
example, every destination whose lowest differing coordinate lies ahead in
dimension 0 leaves on the same link. So all those destinations share one cache
key. The whole routing state of a switch then fits in a few dozen entries, and
the cache hardly ever misses after warm-up. For irregular networks the hash is
switched to a CRC of the address. The cache then behaves like an ordinary
address cache of 2,048 entries.

The RTL is a complete 64-port input-queued virtual-channel switch built around
this routing unit. It is written in synthesizable SystemVerilog, with the CAM
left outside the chip as a port interface.

## Block map

```
            in_flit[p] ──► input_unit[p] ──► crossbar ──► output_unit[o] ──► out_flit[o]
                              │   ▲             ▲              │
                 head flit's  │   │ port        │ select       │ credits, VC state
                 destination  ▼   │             │              ▼
            routing_computation_unit[p]    switch_allocator   vc_allocator
              switchable_hash ─► routing_table_cache
                         rc_controller ◄──► cam_req/cam_resp[p] (external CAM)
```

| File | Role |
|---|---|
| `rtl/pfc_pkg.sv` | Sizes, configuration and key structs, flit format, CRC functions, set-index function |
| `rtl/kary_ncube_hash.sv` | Output-link tag for k-ary n-cube meshes and tori |
| `rtl/fattree_hash.sv` | up/down link for fat trees; Dragonflies use it too |
| `rtl/arbitrary_hash.sv` | CRC-16 set index for arbitrary topologies |
| `rtl/lag_hash.sv` | CRC-4 choice of a link inside an aggregated bundle (LAG) |
| `rtl/switchable_hash.sv` | The four hash datapaths and the mode select; forms the cache key |
| `rtl/routing_table_cache.sv` | 2,048-entry, 4-way set-associative key→port cache |
| `rtl/rc_controller.sv` | Hit/miss control, CAM request, fill, updates |
| `rtl/routing_computation_unit.sv` | 3-stage pipelined lookup: hash, read, compare |
| `rtl/input_unit.sv` | Per-port VC buffers and VC state machines |
| `rtl/vc_allocator.sv`, `rtl/switch_allocator.sv`, `rtl/rr_arbiter.sv` | Allocation |
| `rtl/crossbar.sv`, `rtl/output_unit.sv` | Switch traversal, credits |
| `rtl/cache_switch.sv` | Top level |

## The cache key

Every lookup turns the 24-bit destination address into a 30-bit key:

```
 key[29:28]  mode      0 arbitrary (CRC), 1 k-ary n-cube, 2 fat tree / Dragonfly
 key[27:24]  lag       member of the link bundle (0 if links are not bundled)
 key[23:0]   payload   k-ary: 6-bit tag {dim[3:0], dir[1:0]}
                       fat tree: {up, j[7:0]}
                       arbitrary: the address itself
```

The mode bits keep keys from different hash settings apart. The same key is
also what the switch sends to the CAM on a miss, so the CAM must hold
topology keys rather than raw addresses when a topology hash is on. The update
port writes keys in the same format.

### k-ary n-cube hash

The address is split into n equal digits, with digit 0 in the low bits. Five
splits of the 24 bits are supported: 256³, 64⁴, 16⁶, 8⁸ and 4¹². A runtime
radix `k` (at most the split's radix) lets a smaller torus sit inside a split.
An 8×8×4 torus, however, needs one radix per dimension, which this design does
not have.

Dimensions are scanned from 0 upwards. The first dimension *i* whose offset
δ = d_i − c_i is not zero decides the tag:

| offset | tag | meaning on a torus | meaning on a mesh |
|---|---|---|---|
| δ > ⌈k/2⌉ | X_{i,a} | shorter to go − (wrap) | + |
| 0 < δ ≤ ⌈k/2⌉ | X_{i,+} | + | + |
| −⌈k/2⌉ ≤ δ < 0 | X_{i,−} | − | − |
| δ < −⌈k/2⌉ | X_{i,b} | shorter to go + (wrap) | − |
| all zero | local | compute node | compute node |

The hash does not know whether the network wraps. On a mesh the a and b tags
are simply given the same output ports as + and −. The output port stored with
each tag gives the real direction. Tags are
`{dim, dir}` with a=0, +=1, b=2, −=3; the local node is `6'h3C`.

Example: switch (1,1) of a 3×3 mesh, with dimension 0 as the second
coordinate. Destinations (0,2), (1,2) and (2,2) all have δ₀ = +1. They share
the single entry X_{0,+}.

### Fat-tree / Dragonfly hash

Switch coordinates are (c_{n−1} … c_0) at layer `dim`. Node addresses are
(d_n … d_0), with log₂k bits per digit (1 to 8, set by `ft_bits`). The unit
scans i = n−1 down to `dim`. The first i with d_{i+1} ≠ c_i means the packet
must climb: the tag is up_{d_i}. If none differs, the packet descends on
down_{d_dim}. Spreading the upward traffic by the destination digit d_i keeps
it deterministic. A Dragonfly is configured as a fat tree of three levels;
there is no separate datapath for it.

### Arbitrary topology and link bundles

- **Arbitrary mode:** the set index is the low 9 bits of CRC-16-CCITT of the
  address, XOR the LAG member. The key keeps the full address, so this mode is
  a plain address cache.
- **Link aggregation:** when 2^`lag_bits` parallel links form one logical
  link, the member is CRC-4 of the address masked to `lag_bits` bits. The
  member is part of the key. Each physical link in the bundle therefore has
  its own cache entry and output port.

### Set index

The set index is a function of the key alone (`pfc_pkg::key_index`), so an
update can find the entry without hashing an address:

- **k-ary:** `{lag[2:0], tag}`. A switch's tags (at most 49) never share a
  set. With a 16-link bundle, two members share a set.
- **Fat tree:** `{lag, up, j[3:0]} ^ {j[7:4], 5'b0}`.
- **Arbitrary:** the CRC as above.

With the topology hashes, conflict misses therefore cannot happen.

## The routing computation unit

This is the hardest part to follow, because it is pipelined and must stall
cleanly on a miss.

```
 cycle t    H  switchable hash of req_dst -> {key, set index}, registered
 cycle t+1  R  registered read of the four ways of that set
 cycle t+2  C  compare the four tags; hit -> port, miss -> stall and ask CAM
 cycle t+3     res_valid / res_port / res_id / res_hit
```

- **Throughput:** one lookup is accepted per cycle as long as lookups hit.
- **Hit latency:** three cycles. With `HASH_REG = 0` the hash register is
  removed and the latency is two cycles.
- **Miss:** the controller (`rc_controller`) raises `cam_req_valid` with the
  key and holds it until `cam_resp_valid`. While it waits, the H and R stages
  are frozen, and R re-reads the same set every cycle so that its data stay
  current. On the response, the port goes out as a result with
  `res_hit = 0`, and the same cycle writes it into the victim way. The
  victim is the first invalid way, else the set's round-robin pointer.
  Results stay in request order. There is one outstanding miss at a time.
- **Write forwarding:** a fill or update lands at the clock edge at which the
  next request's set is being read. That read sees the old contents. The cache
  therefore keeps its last write for one cycle and forwards it into the
  compare. Without this, a request for the same key right behind a miss would
  miss again.
- **Updates** (`upd_valid/upd_key/upd_port`) go down the same pipeline and
  take priority over lookups. An update overwrites the key's port if present,
  and otherwise allocates an entry. It is idempotent, so the switch broadcasts
  it to all input ports and waits until all have taken it.
- **Flush** clears every valid bit in one cycle. It is used after a change of
  hash mode or a link failure: drain lookups, flush, change `cfg`, resume.

## The switch around it

Each input port has `NUM_VC = 2` virtual channels of `BUF_DEPTH = 4` flits.
A flit is `{kind[1:0], vc, data[63:0]}`, where kind is head, body, tail or
head+tail. A head flit carries the destination in `data[23:0]`. Each input VC
runs IDLE → RC → VA → ACTIVE:

| Stage | What happens |
|---|---|
| RC | One VC per port per cycle sends its head flit's destination to the routing computation unit, tagged with the VC number. |
| VA | Each output port's round-robin arbiter picks one requesting input VC and gives it the lowest free output VC. An output VC stays busy until its tail flit has left. |
| SA | Separable, input-first round-robin allocation. Each input picks one ready VC. A VC is ready when it is ACTIVE, has a flit, and its output VC has a credit. Then each output picks one input. |
| ST | The crossbar multiplexes the flit to its output unit. The output unit registers it onto the link, rewrites the VC field and spends one credit. The freed buffer slot goes back upstream as a credit. |

**Timing:** with a cache hit, a head flit entering at cycle t appears on
`out_valid` at t+7:

- 1 cycle in the input buffer;
- 3 cycles RC;
- 1 cycle VA;
- 1 cycle SA and crossbar;
- 1 cycle for the output register.

Body flits follow one per cycle when nothing blocks them. A miss adds the CAM
round trip.

`rc_done[p]` and `rc_hit[p]` pulse once per routed packet, for hit-rate
counters.

## Interface summary (`cache_switch`)

| Port | Dir | Meaning |
|---|---|---|
| `cfg` (`hash_cfg_t`) | in | Hash mode; k-ary split, radix and own coordinates; fat-tree digit width, n, layer and own coordinates; LAG size. Keep steady while lookups run. |
| `flush` | in | Empty all caches (one cycle). |
| `upd_valid/ready/key/port` | in/out | Write a key's port into every cache. |
| `in_valid/in_flit`, `in_cr_valid/in_cr_vc` | in/out | Input links and their credit return. |
| `out_valid/out_flit`, `out_cr_valid/out_cr_vc` | out/in | Output links and incoming credits. |
| `cam_req_valid/key`, `cam_resp_valid/port` | out/in | One CAM interface per input port. The request level is held until a one-cycle response. |
| `rc_done/rc_hit` | out | Per-port statistics pulses. |

Parameters: `NUM_PORTS = 64` and `HASH_REG = 1`. Cache size, address width,
LAG width, VC count, buffer depth and data width are set in `pfc_pkg`.
The port number is 6 bits, so NUM_PORTS cannot exceed 64 without widening
`PORT_W`.

## What follows the original design and what does not

**Taken from the original:**

- a cache per input port in front of a CAM;
- 2,048 entries, 4-way;
- a 24-bit destination;
- the switchable hash with k-ary n-cube, fat-tree/Dragonfly, CRC and LAG
  datapaths;
- the five k-ary splits and the ⌈k/2⌉ wrap rule;
- the fat-tree up/down rule;
- bundles of up to 16 links;
- a three-stage pipelined routing computation;
- wholesale flush;
- cache update to route around a failed link;
- a 64-port switch.

**Choices of this design:**

- the CRC polynomials (CRC-16-CCITT, CRC-4-ITU);
- the key format and set-index layout;
- round-robin replacement;
- the blocking miss handling and the CAM handshake;
- the stage split (hash / read / compare);
- every router detail (VC count, buffer depth, flit format, credit flow
  control, allocator types);
- asynchronous active-low reset;
- one radix for all dimensions of a k-ary network;
- LAG bundles restricted to powers of two.

**Not modelled:**

- the CAM itself (a behavioural model is in `tb/routing_table_cam_model.sv`);
- the population of the CAM by the system manager;
- clock-frequency targets; whether a stage meets them depends on the library.

## Simulation

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cache_switch \
    rtl/pfc_pkg.sv rtl/*.sv tb/*.sv
./obj_dir/Vtb_cache_switch
```

Replace the top module to run another bench:

| Bench | What it checks |
|---|---|
| `tb_kary_ncube_hash`, `tb_fattree_hash` | Compare against independent reference models over thousands of random coordinates, plus the 3×3 mesh and 2-ary fat-tree examples above. |
| `tb_arbitrary_hash`, `tb_lag_hash` | Compare against bit-serial CRC references. |
| `tb_routing_table_cache`, `tb_rc_controller` | Directed tests of hit, miss, fill, forwarding, victim choice, update and flush. |
| `tb_routing_computation_unit` | Streams lookups against a reference cache model; checks the 3-cycle hit latency, back-to-back hits, in-order results and CAM traffic. |
| `tb_input_unit`, `tb_vc_allocator`, `tb_switch_allocator`, `tb_crossbar`, `tb_output_unit` | Router parts against reference models. |
| `tb_cache_switch` | 5-port switch, end to end. See below. |
| `tb_hit_rate_workloads` | One full-size routing unit under random traffic with a 6-cycle CAM. See below. |
| `tb_cache_switch_full` | The 64-port default build. A few packets through hits and misses. Building it takes about a minute. |

`tb_cache_switch` runs four phases:

1. A 3×3 mesh with the k-ary hash.
2. A link failure repaired by an update.
3. Flush, then a 2-ary fat tree.
4. Flush, then CRC mode with a 2-link bundle.

It checks every packet's port, order and integrity. It counts hits, misses,
updates, flushes, mode switches, VC-allocation waits, switch-allocation
conflicts, credit stalls and LAG use, and fails if any of them never happened.
It also measures the 7-cycle hit latency and checks that a 4-flit packet leaves
in 4 consecutive cycles.

`tb_hit_rate_workloads` streams 20,000 random lookups per topology setting
and checks the claims behind the design. Typical results:

| Setting | Misses | Hit rate |
|---|---|---|
| 64-ary 4-torus (16.7 M nodes) | at most 17, each key fetched once | 99.96 % |
| Same torus with 4-link bundles | at most 68, each key fetched once | 99.86 % |
| 16-ary three-level fat tree (Dragonfly setting) | at most 32, each key fetched once | 99.89 % |
| CRC mode, 256 destinations | exactly 256 first-time misses, no conflicts | 87.5 % over 8 passes |

In CRC mode with 2,048 uniformly spread destinations, about 14 % of lookups
re-fetch a key that was evicted. With a CRC index, 2,048 keys cannot be
spread evenly over 512 sets of four. The cache is therefore a good fit for
jobs well below 2,048 destinations per port. Beyond that, the topology hashes
are what keep it hitting.

