# Clockless AER interface for a four-core spiking neural network chip

A spiking neural network chip with several cores needs a shared way to get
spikes in and out. Spikes leave the chip from any of the cores' neural
units and have to be merged onto one channel (a *join*). Spikes arriving on
another channel have to be sent to the right spike buffer of the right core
(a *fork*). This RTL does both without a clock. Every transfer is a
four-phase request/acknowledge handshake carrying an address-event (AER)
word, the address of the neuron that fired or of the buffer that should
receive the spike.

The chip it belongs to has four analog SNN cores, each with 100 input
spike buffers, 20 leaky integrate-and-fire output units and a 100 x 20
synapse crossbar. The cores are analog and are not part of this RTL. The
interface around them is:

```
            Interface Rx                                     Interface Tx
AER IN  -> dist_block -> spike_shaper x4 -> [ SNN cores ] -> arb_tree -> tx_encoder -> AER OUT
 (9 bit)   latch +       pulse to one of     (analog,        80 latches  encode +
           core decode   100 buffers/core     external)      + arbiter   latch +
                                                             tree        token return
```

The main idea is the **intermediate latching stage**. In a conventional
self-timed pipeline (a weak-conditioned or precharged half buffer), a stage
can release its sender only after the next stage has taken the token. A
slow stage, such as the off-chip pads, then holds up every stage before
it. In this design every stage that meets a join or a fork latches the
token into its own storage and acknowledges its sender straight away. A
neural unit that has fired is released as soon as its spike is latched,
not when the spike has left the chip. AER IN is acknowledged as soon as
the address is latched, not when the spike pulse has been delivered.

## The intermediate latching stage (`il_ctrl`, `il_stage`)

Each stage has a left channel (from the sender) and a right channel (to
the receiver), both four-phase:

```
left : l_req+  l_ack+  l_req-  l_ack-
right: r_req+  r_ack+  r_req-  r_ack-
```

It has two state bits, `full` (the storage holds a token, driven out as
`r_req`) and `l_ack`, plus the data word in `il_stage`:

| event | condition | effect |
|---|---|---|
| latch | `l_req & ~l_ack & ~full & ~r_ack` | `full=1`, `l_ack=1`, data stored, all in one step |
| left returns to zero | `~l_req & l_ack` | `l_ack=0` |
| right reads | `full & r_ack` | `full=0` |

So:

* The left handshake finishes without waiting for the right side. That is
  the decoupling.
* The stage holds one token. If the left side asks again while the
  storage is still full, or before the right side has dropped `r_ack`, the
  request simply waits. That is the back-pressure.
* The data word (`r_data`) stays stable from `r_req+` until `r_ack+`. The
  sender must have `l_data` valid when `l_req` rises and hold it until
  `l_ack` rises (bundled data).

The published circuit builds this from a storage loop of inverters, a
completion detector and Muller C gates. Here the storage and the
controller are one latch process that keeps the same order of events. The
gate netlist is not reproduced.

## Transmit side: join

**`arb_tree`** gives each of the 80 neural units (4 cores x 20) its own
`il_ctrl`. The latched requests compete in a complete binary tree of
two-input unit arbiters, in heap order: node `k` has children `2k` and
`2k+1`, and leaf `j` sits at `80+j`. Any leaf count of 2 or more works.

**`unit_arbiter`** is one node of that tree:

* a mutual exclusion element (`mutex2`) picks whichever child asked first;
* `r_out = g1 | g2` forwards the request to the parent;
* `a1 = C(g1, a_in)` and `a2 = C(g2, a_in)` route the parent's acknowledge
  back to the winner through Muller C-elements (`c_element`);
* each child's request is masked by the other's acknowledge
  (`m1 = r1 & ~a2`).

With the masking, the loser is granted only after the winner's whole
four-phase cycle, including the parent's return to zero, is complete.
The parent therefore always sees a clean new request.

**Which leaf won** is read from the mutex grants. Every node brings out
`g1`/`g2`. The tree ANDs them along each root-to-leaf path into the
one-hot `grant` vector. `grant` is stable from `root_req+` until `root_ack+`.

**`tx_encoder`** turns `grant` into the AER OUT word. Leaf `j` becomes
`{core = j / 20, unit = j % 20}`. The encoder latches the word in an
`il_stage` and acknowledges the root. This is the token return that walks
back down the tree and empties the winner's leaf latch. The tree and the
neural units are then free while the slow AER OUT handshake runs.

## Receive side: fork

**`dist_block`** latches the AER IN word in an `il_stage` and acknowledges
AER IN at once. Its core decoder raises `core_req[c]` for the core named
in the top bits. It passes the buffer field to all cores on `local_addr`.
The cores' acknowledges are OR-ed to empty the latch. A word for a core
that does not exist is acknowledged and dropped. This can only happen
when `N_CORES` is not a power of two.

**`spike_shaper`** (one per core) decodes the buffer field and drives a
pulse on exactly one of the 100 `spike` lines. The pulse rises with the
request. It ends when the spike buffer raises `buf_ack`, so the **pulse
width is set by the analog side**, by the buffer itself or by a delay line
matched to the synapse. The pulse no longer depends on when the digital
request arrived. The acknowledge to the distribution block is
`C(req, buf_ack)`, and the pulse is `req & ~ack & (local_addr == i)`.
Buffer numbers 100 to 127 give no pulse and are acknowledged at once.

## AER word formats

| channel | width | fields (MSB first) |
|---|---|---|
| AER OUT | 7 | core (2), neural unit (5, 0..19) |
| AER IN  | 9 | core (2), spike buffer (7, 0..99) |

The field layout is this design's choice; no published word format
exists. Between two chips, an external router has to map an outgoing
`{core, unit}` onto an incoming `{core, buffer}`.

## Modelling style and what to expect from tools

* **Self-timed logic in latches.** C-elements, the mutex and the stage
  controllers are `always_latch` processes. Synthesis gives latches (about
  500 latch bits for the full interface) and combinational feedback loops
  through the handshake wires. Verilator reports these loops as UNOPTFLAT
  and yosys as logic loops. They are intended: a clockless handshake
  circuit holds its state this way. A silicon implementation would need
  the usual self-timed care: hazard-free mapping of the C-elements, a
  real mutex cell with a metastability filter, and bundling delays that
  match the address paths.
* **Zero delay, two states.** There are no gate delays in the RTL.
  Forward latency, cycle time and throughput, which in silicon come from
  the gate and wire delays, are not modelled. The testbenches check the
  order of events instead, for example "acknowledged before the next stage
  answered". When both mutex requests rise in the same instant, the grant
  goes to `r1`, one of the outcomes a real mutex can produce.
* **Reset.** An active-low `rst_n` clears every handshake to zero. It is
  an addition of this design.
* **Stimulus.** A testbench should change inputs with a delay of at least
  one time unit. A request and acknowledge pulse of zero width, which
  cannot happen in real circuits, can be missed by the simulator's
  scheduling of the latch loops.

## Where this design departs from the published one, and what is left out

* The unit arbiter's gate types (AND gates in front of the mutex,
  C-elements on the acknowledges, OR gate to the parent) follow the
  published circuit. Which signal feeds which gate input is this design's
  choice.
* The published tree draws the token return as an inverter at the root.
  Here the root acknowledge comes from the transmitter after it has latched
  the address, so that the encoder can read the winner first.
* One tree serves all 80 neural units. The published figures show one
  input per core. How the 20 units inside a core are arbitrated is not
  published.
* Spike shaping uses a handshake with the spike buffers in place of an
  analog pulse-width circuit.
* Not in the RTL: the analog SNN cores (spike buffers, synapses with 8-bit
  weights, integrate-and-fire units), the 3.3 V I/O pads, the external
  router, any on-chip path from the transmitter back to the receiver, and
  all timing and energy behaviour.

## Files

| file | contents |
|---|---|
| `rtl/snn_aer_pkg.sv` | core, unit and buffer counts; derived widths |
| `rtl/c_element.sv` | Muller C-element |
| `rtl/mutex2.sv` | two-way mutual exclusion element |
| `rtl/il_ctrl.sv` | intermediate latching stage, token only |
| `rtl/il_stage.sv` | intermediate latching stage with data word |
| `rtl/unit_arbiter.sv` | two-input unit arbiter |
| `rtl/arb_tree.sv` | arbitration block (join) |
| `rtl/tx_encoder.sv` | Tx address encoding, latch and token return |
| `rtl/dist_block.sv` | distribution block (fork): latch and core decoder |
| `rtl/spike_shaper.sv` | per-core buffer decoder and pulse former |
| `rtl/snn_interface_top.sv` | the whole interface |

Parameters (`N_CORES`, `N_NEURONS`, `N_BUFFERS` on the top) default to 4,
20 and 100. The widths follow from them.

## Simulating

Each `tb/tb_<module>.sv` tests one module and prints
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/snn_aer_pkg.sv \
  --top-module tb_snn_interface_top tb/tb_snn_interface_top.sv
./obj_dir/Vtb_snn_interface_top
```

* `tb_snn_interface_top` runs the full-size interface in both directions
  at once: 600 AER IN words, and 80 units x 5 spikes against a slow AER
  OUT receiver (units fire every 6 to 14 time units; the receiver takes
  35 to 45 per word). It checks every pulse and every outgoing word. It
  also counts, and requires at least once, each mechanism: arbitration
  contention, a unit released while AER OUT was busy (a unit whose own
  latch is empty must be released within one time unit), a unit held back by
  its own full latch, AER IN acknowledged while a pulse was still on, AER
  IN held back by the full address latch, a dropped out-of-range buffer
  word, and both directions active together.
* `tb_two_chip` chains two full-size interfaces as two network layers
  through a router model. Every spike must arrive exactly once at the
  mapped buffer of the second chip.
* The module testbenches also force the corner cases: mutex ties, a
  stalled right side, back-pressure, a missing core, out-of-range buffers
  and exact pulse widths.

Each run takes well under a second of simulation time.
