# ECHELON: a tiled spiking-neuron processor that learns on chip

This RTL implements a neuromorphic processor made of tiles connected by a
mesh network. It runs spiking neural networks (SNNs) and adapts their
weights while they run. Neurons are leaky integrate-and-fire (LIF) units.
Spikes travel as small address packets ("neuron n of component c in tile
(x, y) fired"). Learning uses spike-timing-dependent plasticity (STDP):

- a synapse whose input spike came just before its neuron fired is
  strengthened;
- a synapse whose input spike came just after the neuron fired is weakened.

A separate learning unit in every tile computes these updates, beside the
neuron cores, without stalling them.

The default configuration is:

- a 3 × 2 mesh of tiles;
- in each tile, three neural processing units (NPU0–2) and one special
  function unit (SFU), each a three-layer core of 256-64-16 neurons;
- in each tile, one on-chip learning unit (OLU) and one network interface
  (NI), all on a parallel segmented bus;
- 8-bit weights.

## Hierarchy

```
echelon_top                 MESH_X x MESH_Y tiles + routers
├─ noc_router               5-port XY router, input FIFOs
└─ echelon_tile
   ├─ ubrain_core  x4       NPU0, SFU, NPU1, NPU2
   │  └─ ubrain_layer x3    layer 2 (input, one-to-one), layer 1, layer 0
   │     ├─ aer_decoder     event FIFO + row address decode
   │     ├─ weight_memory   one row of weights per presynaptic neuron
   │     ├─ lif_array       N neurons updated in parallel
   │     └─ spike_scheduler fire vector -> address events
   ├─ olu                   stdp_unit + weight_wb for each plastic matrix
   ├─ network_interface     bus <-> NoC FIFOs
   └─ seg_bus               NL lanes of seg_switch + seg_bus_ctrl
```

`echelon_pkg` holds the shared widths, packet and configuration structs,
component indices and switch modes. `sync_fifo` is the common show-ahead
FIFO.

## The neuron core and its timing

A core (`ubrain_core`) is a chain of three layers that pass spikes to each
other as address events over valid/ready handshakes:

- **Layer 2** is the input layer. Input i drives only neuron i through its
  own weight (`DIAG=1`).
- **Layer 1** is fully connected to layer 2 (256 × 64 weights).
- **Layer 0** is fully connected to layer 1 (64 × 16 weights).

This gives 336 neurons and 17,408 plastic synapses per core, plus the 256
input weights.

Each layer handles one incoming event in three stages:

| stage     | cycles | what happens                                                                     |
|-----------|--------|----------------------------------------------------------------------------------|
| decoder   | 3      | event enters the FIFO, is popped, its weight row is read                         |
| LIF       | 5      | add the row to all potentials, compare with the threshold, reset fired neurons, OR of fires, register the fire vector |
| scheduler | 3      | queue the fire vector, send its set bits one per cycle (lowest index first)      |

Timing facts:

- **Latency:** an idle layer emits its first output event 11 cycles after it
  accepted the input. An input that makes a neuron fire in all three layers
  leaves the core 33 cycles after it entered.
- **Throughput:** the layer controller starts at most one event every 11
  cycles. Events that arrive faster wait in the decoder FIFO.
- **Stall:** the controller does not start an event while the scheduler
  queue is full. This is the `stall` output, and it is how back-pressure from
  the bus or the network reaches the neurons.

Leak happens on a `tick` input that marks a time step. The tick is
remembered. Once the neuron array is idle, every potential moves `leak`
closer to zero. The layer controller applies a waiting leak before it
starts the next event.

Thresholds and leaks are per layer. Potentials are 16-bit and saturate.

The SFU is the same core. It does pooling or concatenation through the
weights you load into it.

## On-chip learning

The OLU holds one `stdp_unit` and one `weight_wb` per plastic matrix:

- one for N2 × N1, with 256 presynaptic timing registers;
- one for N1 × N0, with 64 presynaptic timing registers.

That is 320 learning units in total. The OLU trains one NPU at a time. A bus
packet addressed to the OLU chooses which:

- `addr[1:0]` selects the core (0 = NPU0, 1 = NPU1, 2 = NPU2);
- `addr[7]` enables learning.

For every event in a trained layer:

1. When the weight row has been read (cycle 3 of the event), the layer hands
   the OLU the presynaptic index and the row. The STDP unit records the
   current time for that presynaptic neuron.
2. Two cycles later the layer hands over its fire vector. The unit records
   the time for every neuron that fired.
3. For every postsynaptic neuron j that fired within the last `WINDOW` (64)
   cycles, it computes Δt = t_post[j] − t_pre[p]:
   - Δt > 0 (LTP): ΔW = +A_PLUS >> (Δt >> TAU_P_LOG2)
   - Δt ≤ 0 (LTD): ΔW = −A_MINUS >> (−Δt >> TAU_M_LOG2)

   The shifts approximate an exponential decay with a power-of-two time
   constant.
4. Five cycles after the row was read, the change is ready. The write-back
   forms W_new = sat(W_old + BETA + (ALPHA·ΔW) >>> ALPHA_SHIFT) for the
   changed columns. It writes the row two cycles later.

The write-back lands before the layer's next 11-cycle slot reads the
memory. Learning therefore never stalls inference.

Time is counted in clock cycles. A neuron fired by the event itself has
Δt = +2 and is potentiated. Neurons that fired before the input arrived are
depressed.

Defaults: A_PLUS = 8, A_MINUS = 4, TAU = 8 cycles, ALPHA = 1, BETA = 0.

## The segmented bus inside a tile

The six tile components sit at fixed positions along the bus:

| position  | 0    | 1   | 2    | 3   | 4    | 5  |
|-----------|------|-----|------|-----|------|----|
| component | NPU0 | SFU | NPU1 | OLU | NPU2 | NI |

Each position has one `seg_switch` per lane. A switch has three sides: the
segment to its left (A), the segment to its right (B) and the local
component (C). Its modes are:

- `SW_OFF`: isolate;
- `SW_PASS`: join A and B;
- `SW_C2A` / `SW_C2B`: the component drives one side;
- `SW_A2C` / `SW_B2C`: the component receives from one side.

Every cycle `seg_bus_ctrl` serves the requesting components in round-robin
order. For each request it finds a lane on which every switch from source to
destination is still free. It then claims that span and sets the switches.
Transfers whose spans do not overlap run in the same cycle, even on one lane.
With `NL` = 2 lanes, overlapping spans can also run in parallel.

A request is refused (`blocked`) when every lane is already taken somewhere
along its span. A request also waits, without being flagged as blocked, when
its destination is not ready or is already receiving this cycle. A transfer completes in the cycle it is granted. `tx_ready` is the
grant.

## Packets, routing and the mesh

A spike packet (`spike_pkt_t`, 17 bits) is `{x[2:0], y[2:0], comp[2:0],
addr[7:0]}`: destination tile, component, and neuron index.

Each core has a routing register. Every output spike of the core becomes a
packet to that destination:

- if the destination is the same tile, the packet goes straight over the bus;
- otherwise it goes over the bus to the NI, which puts it on the mesh.

Each `noc_router` has:

- a FIFO of `DEPTH` entries on each of its five inputs;
- XY routing: first along x, then along y, with y growing southwards;
- a round-robin arbiter on each output.

The host sends packets into the west port of router (0,0). A packet with
`x = MESH_X` leaves through the east edge of its row, on `host_out_*[y]`.
That is the chip's spike output.

## Configuration

`cfg_t` is `{x, y, comp, kind, layer, row, col, data}`. It is applied when
`cfg_valid && cfg_ready`. The target tile and core decode it. `cfg_ready`
drops for the cycle in which a write-back owns a layer's memory port.

| kind         | effect                                                                                   |
|--------------|------------------------------------------------------------------------------------------|
| `CFG_WEIGHT` | weight[row][col] of `layer` := data[7:0] (for layer 2, the weight of input `row`)       |
| `CFG_THRESH` | threshold of `layer` := data                                                             |
| `CFG_LEAK`   | leak of `layer` := data                                                                  |
| `CFG_ROUTE`  | routing register of the core := data[8:0] = {x, y, comp}                                 |

Weights start at zero. Memory writes are blocked while reset is held.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- ends with `TB_RESULT checks=N failures=M`;
- has a watchdog.

To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_echelon_top \
  -y rtl -y tb +libext+.sv rtl/echelon_pkg.sv tb/tb_echelon_top.sv
obj_dir/Vtb_echelon_top
```

The two system-level testbenches are:

- **`tb_echelon_top`** runs a 3 × 2 mesh with 8-4-2 cores. It sends spikes
  over two routed paths:
  - through a local bus hop, two NoC hops with a turn, and out to the host;
  - directly out of the tile.

  It checks every output packet's header, neuron and order. It also holds the
  host outputs off so that back-pressure stalls the layers. It then turns
  learning on and counts:
  - layer stalls;
  - concurrent and refused bus transfers;
  - multi-hop routes;
  - leak steps;
  - LTP and LTD updates;
  - write-backs;
  - every configuration kind.

  It fails if any of these never happens.
- **`tb_echelon_top_full`** runs the same kind of operation on the default
  design: a 3 × 2 mesh with 256-64-16 cores. It passes a spike through two
  cores in different tiles and out to the host, then trains a core. It takes
  about half a minute to build and run.

## Capacity

At the defaults the chip holds 24 cores of 17,664 weights each: about 424k
8-bit weights and 8,064 neurons.

- **A 256-64-16 network** fits one core exactly.
- **A small digit classifier** of 74 neurons and about 17k synapses fits one
  core.
- **A two-layer 128 × 128 network** needs a 128-neuron layer. Build it with
  `N2=128, N1=128`.
- **CNN-sized models** (0.7M–23.5M parameters) are far larger than this mesh.
  They need a bigger `MESH_X × MESH_Y`.

## Where this RTL makes its own choices

The overall organisation and the numbers in it are those of the architecture:

- tiles of three NPUs, an SFU, an OLU and an NI on a segmented bus;
- a mesh NoC;
- 256-64-16 cores;
- the 3/5/3 stage delays with an 11-cycle period and 33-cycle latency;
- 5 + 2 cycles for learning and write-back;
- 8-bit weights;
- 320 learning units;
- the three-way switch;
- the STDP rule and the weight update formula.

The following are this design's own choices:

- All widths other than the weight width.
- All FIFO depths.
- The valid/ready handshakes.
- The packet and configuration formats.
- The OLU selection packet.
- The shift approximation of the exponential, the spike window and the
  time base in clock cycles.
- Subtractive leak, reset to zero and saturation.
- XY routing and round-robin arbitration.
- The bus allocation algorithm and the order of components on the bus.
- The mesh edge used for host I/O.

Departures and omissions:

- **No recurrent synapses.** Recurrent connections within a layer are not
  built. The synapse count of 17,408 per core implies none.
- **Learning reach.** Only the two fully connected matrices learn. The
  one-to-one input weights are fixed.
- **One trained core per tile.** The OLU trains one NPU of its tile at a
  time and never the SFU.
- **Not hardware.** The system software that partitions an SNN onto tiles
  and orders the work (TDMA, self-timed static-order execution), and the
  design-space exploration flow, are software and are not part of this RTL.
- **Bus switches.** They are multiplexers with separate in and out paths,
  not tri-state buffers.
