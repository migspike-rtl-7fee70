# MigSpike: a 3D-mesh spiking neural network whose neurons can be moved

A large spiking neural network (SNN) chip is built from many nodes. Each node
holds a few hundred neurons and their synaptic weights. The nodes exchange
spikes over a network-on-chip. When a neuron circuit breaks, for example
because its threshold register is stuck at zero and it fires every step, the
network's output is wrong. The usual cure is to remap the whole network onto
the healthy hardware, which means rewriting most of the weight memory.

MigSpike repairs the network more cheaply. Every node keeps some spare
neurons. A faulty neuron is silenced, and its weights and parameters are
copied into a spare slot:

* **Node-level recovery** uses a spare slot in the same node.
* **System-level recovery** is used when a node has too few spares. The
  faulty neuron, or a healthy neuron pushed out to make room, migrates to a
  spare slot of a neighbouring node. Chains of such moves spread the repair
  over the mesh.

Deciding which neuron goes where is a graph problem that the host solves in
software. The hardware only has to make a neuron in a foreign slot behave as
if it had never moved:

* It must receive the same input spikes as before.
* Its output spikes must carry the address its receivers expect.
* Its output spikes must reach the right node.

This repository is the synthesizable SystemVerilog for that hardware:
* a mesh of nodes, each with 256 leaky integrate-and-fire (LIF) neurons;
* a 64 KB weight memory per node;
* a 7-port 3D router per node;
* a network interface per node that holds the lookup tables for migration.

## Top level

`migspike_top` is a `MESH_X x MESH_Y x MESH_Z` mesh of `snn_tile`s. The
default is 4x4x4, which gives 64 nodes and 16,384 neurons. The z links stand
for the through-silicon vias between stacked dies. Tile (x,y,z) has index
`x + MESH_X*(y + MESH_Y*z)`.

The host processor is attached to the -x port of tile (0,0,0):
* `host_in_*` carries spike flits (network inputs) and memory-access flits
  into the mesh.
* `host_out_*` returns read replies.

Spikes between neurons never leave the mesh. `busy[t]` and `step_count[t]`
show the state of each tile's time-step controller.

Each tile (`snn_tile`) contains three parts:
* `router3d`, the router;
* `network_interface`, the NI, which contains `flit_fifo`, `pe_id_lut`,
  `aer_encoder` and `output_remap_lut`;
* `neuron_cluster`, which contains `weight_sram` and 256 `lif_neuron`.

## Flits

Every packet is a single flit of 53 bits (`migspike_pkg::flit_t`):

| bits   | field   | meaning                                         |
|--------|---------|-------------------------------------------------|
| 52:51  | type    | 0 spike, 1 memory access, 2 read reply          |
| 50:39  | dst     | destination node {z[3:0], y[3:0], x[3:0]}       |
| 38:0   | payload | depends on the type                             |

The payload depends on the type:
* **Spike:** `{reserved, pe_id[2:0], aer[7:0]}`.
* **Memory access:** `{cmd[2:0], addr[19:0], data[15:0]}`. The commands are:
  * 0: single write
  * 1: single read
  * 2: burst write; `data` is the length, and the write data follows in that
    many flits of command 4
  * 3: burst read; `data` is the length, and one reply comes back per word
* **Read reply:** uses the memory-access layout, with the address and the
  data read.

Replies ignore `dst`. They are routed to (0,0,0) and then out of its -x port
to the host.

## Node address map

Address bits 19:16 select the region. The host reaches every register and
memory of a node through it:

| address    | content                                                        |
|------------|----------------------------------------------------------------|
| `0x0_RRNN` | weight of input AER `RR` for neuron `NN` (8-bit, sign-extended on read) |
| `0x1_00NN` | threshold of neuron `NN` (16-bit signed)                       |
| `0x1_01NN` | leak of neuron `NN` (16-bit signed)                            |
| `0x1_02NN` | refractory period of neuron `NN` (time steps, 4 bits)          |
| `0x1_03NN` | membrane potential of neuron `NN`                              |
| `0x1_04PW` | PE-ID table entry `P` (0..7), neuron-mask word `W` (16 neurons per word) |
| `0x1_05NN` | AER table entry `NN`: `{pe_id[2:0], aer[7:0]}`                 |
| `0x1_06NN` | address table entry for neuron `NN`: `{valid, z, y, x}`        |
| `0x1_070W` | output spike vector of the last step, word `W` (read only)     |
| `0x1_0800` | migration base (0..256; 256 means that no slot is migrated)    |
| `0x1_0801` | control: bit 0 = end the time step, bit 1 = clear potentials and refractory counters |
| `0x1_0802` | status: bit 0 = busy, bits 15:8 = number of steps done          |

## The time step

The network runs in time steps, and the host keeps the nodes in step over
the network. A time step works as follows:

1. **Inputs arrive.** Spike flits queue in the NI's 8-entry FIFO. The NI
   handles one spike per cycle:
   * The spike's AER selects one row of the weight memory.
   * Its PE-ID selects a 256-bit neuron mask from the PE-ID table.
   * Every masked neuron that is not refractory adds its weight from that
     row to its membrane potential. The sum saturates at the 16-bit range.

   A spike reaches the potentials three cycles after the NI accepts it.
2. **The host ends the step** by writing bit 0 of the control register.
3. **The controller waits** until the spike FIFO is empty. It then pulses
   `step` to all neurons.
4. **Each neuron updates.** A neuron whose refractory counter is non-zero
   only counts the counter down. Every other neuron:
   * subtracts its leak;
   * fires if the result is at least its threshold;
   * on a spike, resets its potential to 0 and loads the refractory period.
5. **The spikes are sent.** Two cycles after `step`, the 256-bit spike
   vector is stored. The AER encoder sends the firing neurons one per
   cycle, lowest index first, through the output remap stage into the
   network.
6. **The step ends.** When the last flit has left, `busy` drops and the step
   counter increments.

A spike sent during step *n* is added to the receiver's potential in
whatever step the receiver is then in. To make every spike count in the
receiver's next step, the host ends the steps of receiving layers before
those of sending layers. The end-to-end testbench does this.

## How a migrated neuron is rewired

This is the core of the design. Two independent mechanisms handle it: one
on the input side and one on the output side.

**Input side: PE-ID masks (`pe_id_lut`).**

Weights are addressed by AER: every spike arriving at a node reads one row,
shared by all 256 neurons. A neuron that moved in from another layer or
another node needs different inputs from its neighbours. Every spike flit
therefore carries a 3-bit PE-ID, which selects one of eight programmable
256-bit neuron masks:

* All entries reset to all ones. Entry 0 is normally kept that way, so
  ordinary traffic (PE-ID 0) reaches every neuron.
* Other entries select groups of neurons. For example, only the migrated
  slots listen to the spikes of their old input layer.

Two spikes with the same AER but different PE-IDs therefore reach different
neurons, using different weights from the same row.

**Output side: base, AER table and address table (`output_remap_lut`).**

A neuron in slot `s` of a node emits local AER `s`. Slots at or above the
node's migration base `B` hold immigrants:
* For these slots, the AER table entry `s - B` gives the `{pe_id, aer}`
  that the neuron had before it moved.
* Slots below `B` keep their own AER with PE-ID 0.
* A multiplexer picks one of the two.

Separately, the address table gives every slot its destination node. An
entry without the valid bit silences the slot, which is how a faulty neuron
is taken out of the network. Both tables have 256 entries, so a spare node
can be filled entirely with migrated neurons.

**Repair recipe.** The host does the repair with ordinary memory writes,
usually burst writes. Suppose neuron `f` of node P is faulty:

* **Node-level recovery:**
  1. Pick a spare slot `s` ≥ `B` in P.
  2. Copy `f`'s weight column, threshold, leak and refractory period to
     `s`.
  3. Set AER table[`s - B`] = `{pe, f}`, where `pe` is the PE-ID the
     receivers use for P's spikes.
  4. Set address table[`s`] to `f`'s destination.
  5. Clear address table[`f`]. From then on, the receivers see spikes of
     "`f`" as before.
* **System-level recovery to node Q:**
  1. Pick a spare slot `s` of Q and copy `f`'s weights into Q's rows.
  2. The rows are indexed by the AERs of `f`'s inputs. Where such a row is
     already used by Q's own neurons, program a PE-ID mask that selects only
     `s`. Then set the source neurons' AER table entries, and their address
     table destinations, so that their spikes reach Q with that PE-ID.
  3. Set `s`'s AER table entry to `f`'s old `{pe, aer}` and its address
     table entry to `f`'s old destination.
  4. Silence `f` in P.

  Because each neuron has one destination, a source neuron can feed either
  its old targets or the migrated one, not both, unless the two are on the
  same node.

The end-to-end testbench shows both repairs on a three-layer network:
* Node B's neuron 2 has a threshold stuck at zero. It is replaced by B's
  spare slot 250.
* Node A's faulty neuron 5 moves to B's slot 249. Slot 249 is fed by host
  inputs through PE-ID 1, and its spikes are looped back into B as AER 5.

After the repair, the last layer's potentials match a fault-free model on
every step.

## Router

`router3d` has seven ports:

| port | direction |
|------|-----------|
| 0    | local     |
| 1    | +x        |
| 2    | -x        |
| 3    | +y        |
| 4    | -y        |
| 5    | +z        |
| 6    | -z        |

Its structure:
* Each input has a 4-flit first-word-fall-through FIFO (`flit_fifo`).
* The head flit is routed in dimension order: x, then y, then z.
* Each output port has a round-robin arbiter.
* The crossbar is combinational.

Links use a valid/ready handshake. `in_ready` depends only on the FIFO
count, so chains of routers have no combinational loops. A flit can pass an
idle router in one cycle. An assertion checks that no input is granted to
two outputs.

Dimension-order routing is deadlock-free on a mesh. Replies and spikes share
the network.

## Module reference

| module | what it is | notes |
|--------|------------|-------|
| `migspike_pkg` | flit, payload and port types, address map, `route_xyz`, flit constructors | |
| `lif_neuron` | one LIF neuron with its threshold, leak, refractory and potential registers | saturating signed arithmetic, output `spike` registered |
| `weight_sram` | 256 x 256 x 8-bit weights | port A reads a full row for the spike path; port B reads or writes one weight for the host; both reads registered |
| `neuron_cluster` | weight memory + 256 neurons + spike vector | two cycles from spike to potential, spike vector two cycles after `step` |
| `pe_id_lut` | 8 x 256-bit neuron masks | entries reset to all ones |
| `aer_encoder` | spike vector → stream of AERs | lowest index first, one per cycle |
| `output_remap_lut` | base, AER table, address table, output flit | one register stage |
| `flit_fifo` | generic FWFT FIFO (type parameter) | |
| `network_interface` | flit extractor, memory-access unit, input path, time-step controller, output path | replies have priority over spikes at the output |
| `router3d` | 7-port router | |
| `snn_tile` | router + NI + cluster | |
| `migspike_top` | the mesh | |

Every file opens with a comment on its interface and timing.

## Where this design departs from the architecture it follows

The architecture fixes these sizes:
* 256 LIF neurons per node;
* 256 input AERs with 8-bit weights (64 KB per node);
* a 3-bit PE-ID with a programmable mask table;
* a 256-entry AER table behind a base subtraction, and a destination table;
* single-flit spike and memory-access packets, with single and burst
  accesses;
* a 3D mesh.

These are this design's own choices:
* the field widths and the flit layout;
* the address map;
* the burst framing;
* the 16-bit potential and 4-bit refractory counter;
* reset of the potential to 0 after a spike;
* how the host ends a time step, by a control-register write;
* buffer depths;
* XYZ routing and round-robin arbitration;
* attaching the host at the -x port of (0,0,0).

The weight memory is a plain array with a registered row read, written so
that a synthesis flow can map it to an SRAM macro.

The following are not built:

* **Fault tolerance inside the router.** This covers protected buffers, the
  crossbar, routing logic and fault-tolerant routing. It also covers
  unicast-based multicast. This router is a plain one. Without multicast,
  every neuron has exactly one destination node, so a neuron can drive
  neurons on one node only. A fully connected network that spans several
  nodes per layer therefore cannot run as it stands.
* **The migration algorithms** (max-flow/min-cut, genetic algorithm, greedy
  search). They run on the host. The hardware only provides the tables they
  program.
* **Error correction in the memories, and the physical TSVs.** The vertical
  links are ordinary wires.
* **Learning.** There is no STDP; weights are written by the host.

Some evaluated configurations do not fit the hardware. The multilayer
perceptrons for MNIST (784 : 0.5(W−10) : 0.5(W−10) : 10, with 20% spare
neurons) need up to 784 inputs per neuron, but a node distinguishes only 256
input AERs. Together with the missing multicast, that means these networks
cannot be mapped onto this hardware. Networks whose neurons each have at
most 256 inputs and one target node can. Meshes up to 16x16x16 are
addressable with the 4-bit coordinates.

## Verification

Every module has a self-checking testbench in `tb/`. Each one checks the
results against a model written independently in the testbench, prints
`TB_RESULT checks=N failures=M` and has a watchdog.

The main testbenches cover:
* **`tb_lif_neuron`:** random stimulus against an integer model, including
  saturation, leak and the refractory period.
* **`tb_network_interface`:** single and burst writes and reads, PE-ID
  masking, remapping, dropped spikes, output backpressure and the FIFO
  drain before a step.
* **`tb_router3d`:** random traffic from all ports, contention and stalls;
  checks that every flit arrives once at the right port.
* **`tb_migspike_top`:** the three-layer repair scenario described above,
  on a 2x2x2 mesh with 256 neurons per node. It counts each mechanism and
  fails if any never happened: single and burst accesses, PE-ID-masked
  spikes, migrated-slot spikes, silenced spikes, loop-back spikes,
  vertical-link traffic, refractory steps, leak and network stalls.

* **`tb_node_repair_workload`:** one full-size node with 80% of its
  neurons mapped and 20% spare. The fault rate rises through 5%, 10%, 15% and
  20% of the neurons (13, 26, 38 and 51 faulty neurons). The faults show up at
  the output, and each one is repaired into a spare slot. The testbench then
  checks that the node's output spikes match a fault-free model on every
  step.

The three-layer scenario of `tb_migspike_top` also passed on the default
4x4x4 mesh. To run it there,
set `MX/MY/MZ` in the testbench to 4, move node C to (3,3,3) and drop the
parameter override. Its C++ model is large: 64 tiles of 256 neurons take a
long time to compile with `-Os`.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/migspike_pkg.sv tb/tb_migspike_top.sv \
          --top-module tb_migspike_top -Mdir obj -o sim -j 8
./obj/sim +verilator+rand+reset+2
```

Replace the testbench name for any other block. The package must come
first.
