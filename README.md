# Address-event link between two neuron arrays

Two chips each hold a two-dimensional array of neurons. Every neuron on the
sending chip should drive the neuron at the same place on the receiving chip.
There are far too many neurons to give each one its own wire. So the link
shares one parallel bus instead. When a neuron spikes, the sender puts that
neuron's address (column X, row Y) on the bus. The receiver decodes the
address and pulses the matching neuron. Spikes are rare and arrive at random
times. Because of that, the bus carries only events, not samples, and the time
of an event on the bus *is* the time of the spike. This scheme is called
address-event representation (AER).

This repository holds synthesizable SystemVerilog for the complete link:

- the sending side: neuron interfaces, row and column controllers, two greedy
  arbiter trees, address encoders, and an optional row latch for parallel
  readout;
- the receiving side: an input pipeline stage, address decoders, and neuron
  interfaces with a wired-OR acknowledge tree;
- a top module, `aer_link_top`, that joins the two across the bus.

It follows the 64 × 64-neuron, second-generation design of K. A. Boahen,
"Point-to-Point Connectivity Between Neuromorphic Chips using
Address-Events". The neurons are analog and are not part of the RTL. Their
digital lines are the top's ports, and the testbenches hold behavioural
models of them.

## The handshake, and what "clocked" means here

Every channel in the design is a four-phase handshake. The active side raises
its request `r`. The passive side does its work and raises the acknowledge
`a`. Then `r` falls, and then `a` falls. Data travels bundled with the request.
It must be stable from `r+` until `a+`. The `aer_link_top` assertions
`a_bus_data` and `a_bus_ack` check exactly this on the bus.

The original circuits are asynchronous, built from C-elements, wired-NORs and
mutual-exclusion elements. This RTL emulates them on one clock. Every node
that holds state becomes a flip-flop, and it changes one clock after its
guard becomes true. There are two consequences:

- Cycle counts in this README are clock counts of the model. They are not
  nanoseconds on silicon. A clock stands for one gate delay of the original.
- Both chips share `clk`. A real link between two independent chips would
  need synchronisers on `bus_req` and `bus_ack`, which are not modelled.

The production rules themselves are the original ones. Each module's opening
comment lists them. Where the clocked model adds a wait, the comment says so.
An example is `rc_ctrl` waiting for `~ri & ~s` before a new `ro+`. The
asynchronous circuit gets that wait from the order of its events.

## Sending side (`aer_tx`)

### Row first, column second

Neurons are read out a row at a time:

1. A spiking neuron pulls its row's request line (`tx_neuron_if`).
2. The row controller (`rc_ctrl`) passes the request into the row arbiter
   tree.
3. When granted, the controller selects the row.
4. The selected row's spiking neurons pull their column lines.
5. The column controllers compete in the column arbiter tree.
6. The winning column is selected. This resets its neuron (`lox_n`) and
   drives the column encoder. The row encoder already holds Y.

While its row is selected, a neuron is disabled (`nrn_disable`). It cannot
fire again until the row is released.

The row controller keeps its row selected until every neuron that was
spiking in it has been sent. It only then lets go, and the row tree picks
another row. This is **local readout**. A burst of spikes from one row costs
one row arbitration, not one per spike.

Each controller runs one handshake on each side:

| step | guard | action |
|---|---|---|
| request | `[~p_n]` | `ro+` |
| grant | `[ri & ~ai]` | `s+` (select, and drive the encoder) |
| line empty and event acknowledged | `[p_n & ai]` | `ro-` |
| tree released | `[~ri]` | `s-` |

`p_n` is the active-low wired-NOR request line of the row or column. `ai` is
the bus acknowledge, relayed unchanged by the encoders.

### Greedy arbiter tree (`arb_tree`, `arb2`)

The tree is built recursively: a tree of N inputs is a tree of N/2 inputs,
plus a tree of N − N/2 inputs, plus one two-input cell (`arb2`) on top. Sizes
that are not powers of two, such as 104 or 96, give an unbalanced tree.
A cell does three things:

- It passes a request upward at once, before its own mutual exclusion has
  decided.
- It lowers its upward request only when *both* daughters are idle.
- While it still holds the parent's acknowledge, it hands that acknowledge to
  its other daughter if she is waiting.

That makes the tree **greedy**. After serving one leaf, it serves the nearest
waiting leaf, without climbing back to the root. A row change therefore
usually costs only a few levels, and the Y addresses of a busy array come out
roughly in order as the tree sweeps across its leaves.

At the root, the acknowledge is simply the request fed back. This is done in
`aer_tx`.

When two requests arrive on the same clock, the silicon cell would settle
them by metastability resolution. This model grants the daughter that was not
granted last. That choice is one of this design's own, and it is made in
`arb2`.

### How the bus request is formed

The source text does not say how the two encoders' requests become the one
bus request `req`. This design chooses:

- `req` rises when the column encoder holds a valid X, the row side holds a
  valid Y, and `ack` is low.
- `req` falls when the column encoder releases, which happens after `ack`
  deselects the column.

Assertions in `aer_tx` check that at most one row and at most one column are
selected, and that the address is stable during an event.

### Parallel readout (`row_latch`, `PARALLEL_READOUT = 1`)

The third-generation variant copies the whole selected row into a row-wide
latch at the edge of the array. It then resets those neurons together and
releases the row. The latch bits act as "slave neurons" to the column
controllers, and are sent as a fast burst on the latched Y address. Meanwhile
the array arbitrates and selects the next row.

The source describes only what the latch does. It does not give the circuit.
These details are this design's own:

- The latch loads only when it is empty, no column is selected and no bus
  event is open.
- The row controllers take the latch's load acknowledge `ld_ack` in place of
  the bus acknowledge.

## Receiving side (`aer_rx`)

1. The bus enters a pipeline stage (`lrbuf`). This is one C-element plus a
   latch. The stage latches `{Y, X}` and acknowledges the sender at once.
2. The latched address drives the two one-hot decoders (`aer_decoder`).
3. The addressed neuron sees its row and column lines both active, through an
   active-low NAND (`rx_neuron_if`). It answers with an active-low
   acknowledge.
4. Each row NANDs its neurons' acknowledges into an active-high row
   acknowledge. The row acknowledges are ORed into the one acknowledge that
   returns to the pipeline stage.

Because the stage acknowledges early, the sender can already clear its selects
and arbitrate the next event while the receiver is still delivering the
current one. If the receiving neuron is slow, the stage holds the next address
and stalls the bus. The testbenches count such stalls.

## Measured behaviour

The following cycle counts come from the end-to-end testbenches:

| | local readout, 64 × 64 (`tb_aer_link_top`) | parallel readout, 104 × 96 (`tb_aer_link_parallel`) |
|---|---|---|
| one spike on an idle link, spike to receiving neuron | 31 clocks | 36 clocks |
| mean event spacing inside a row burst | 11 clocks | 12 clocks |
| mean event spacing when the row changes | 24 clocks | 24 clocks |
| mean arbiter levels climbed on a contested row change | 1.9 | 2.7 |

How the latency numbers break down:

- On a balanced 64 × 64 array, the 31 clocks are: row controller 1, row tree
  2·6, select 1, column controller 1, column tree 2·6, select 1, bus request
  1, pipeline stage 1, and receiving neuron 1.
- Parallel readout adds one clock to load the latch.
- At 104 × 96 the trees are deeper for the neuron used.

The 1.9 levels show the greedy scan: most row changes stay within the nearest
subtrees.

In this clocked model, reading a row from the array costs one clock. As a
result, parallel readout saves little time here. On silicon, the array read is
the slow analog step, and the latch hides it.

## Departures and limits

- The design is clocked, not self-timed (see above). No delay matching,
  staticizers or charge sharing is modelled.
- The neurons are not in the RTL. That covers the sending neuron that
  generates spikes and the receiving neuron's integrator. Behavioural models
  in `tb/` (`spiking_neurons.sv`, `receiving_neurons.sv`) give only their
  digital behaviour. The sending neuron holds a spike until reset and cannot
  spike while its row is selected. The receiving neuron acknowledges after a
  random delay.
- The host-computer interface used to test the chips is not part of this
  RTL.
- How the two encoder requests form the bus request, the arbiter's tie-break,
  and the whole row-latch circuit are this design's own choices (see above).
- Address format: X and Y are sent side by side, in parallel, with
  ⌈log2 N⌉ bits each (`aer_pkg::addr_bits`).
- The default size is 64 × 64 with local readout. The 104 × 96
  parallel-readout chip is reached with
  `#(.NX(104), .NY(96), .PARALLEL_READOUT(1))`.

## Files

| file | what it is |
|---|---|
| `rtl/aer_pkg.sv` | default sizes, address-width function |
| `rtl/c_element.sv` | C-element |
| `rtl/lrbuf.sv` | pipeline stage: C-element and latch |
| `rtl/arb2.sv`, `rtl/arb_tree.sv` | greedy arbiter cell and recursive tree |
| `rtl/rc_ctrl.sv` | row/column controller |
| `rtl/tx_neuron_if.sv` | sending neuron's interface to its row and column lines |
| `rtl/aer_encoder.sv`, `rtl/aer_decoder.sv` | one-hot to binary encoder, binary to one-hot decoder |
| `rtl/row_latch.sv` | row latch for parallel readout |
| `rtl/aer_tx.sv`, `rtl/aer_rx.sv` | transmitter and receiver |
| `rtl/aer_link_top.sv` | transmitter and receiver joined by the bus |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_aer_link_parallel.sv` | end-to-end test with parallel readout at 104 × 96 |
| `tb/hs_client.sv`, `tb/spiking_neurons.sv`, `tb/receiving_neurons.sv` | testbench models |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. It has a
watchdog that counts a failure if the test hangs. The end-to-end tests count
every mechanism, and count a failure for any mechanism that never happened:

- row bursts and row changes;
- greedy re-use of an acknowledge;
- column contention;
- controllers waiting for the bus acknowledge;
- receiver stalls;
- spikes refused by a selected row;
- for parallel readout, a new row read while the latch still sends.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/aer_pkg.sv $(ls rtl/*.sv | grep -v aer_pkg) \
  tb/hs_client.sv tb/spiking_neurons.sv tb/receiving_neurons.sv \
  tb/tb_aer_link_top.sv --top-module tb_aer_link_top
./obj_dir/Vtb_aer_link_top
```

Replace `tb_aer_link_top` with any other testbench name. The full-size
64 × 64 link test runs in under a minute. The 104 × 96 parallel test takes
about two minutes.
