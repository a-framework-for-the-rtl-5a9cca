# Three switched networks for a 32-processor system, built from one component set

This is a cycle-accurate, synthesizable model of the interconnect of a small
multiprocessor. It holds three alternative networks that connect N processing
elements (PEs) through a single central crossbar, and all three are assembled
from the same handful of parts:

* **Wormhole switching.** Each message is cut into worms (a header word, ten
  payload words, a tail word). The switch buffers words at its inputs, sorted
  by destination, and a round-robin scheduler hands out the outputs every cycle.
* **Circuit switching.** The NIC buffers words per destination and asks a
  central controller for a circuit. Once the circuit is granted, the NIC
  streams words through the crossbar with no headers. The circuit is released
  when that buffer runs empty.
* **Predictive circuit switching.** The controller does not wait for requests.
  It cycles through a preloaded table of crossbar settings, one per
  "communication cycle" of programmable length. A mode input switches it to
  the request-driven scheduler instead.

The point of the arrangement is comparison. The same PE traffic can be fed to
each network, and the delivered bandwidth and latency can be compared
cycle by cycle. The components are parameterised in port count, buffer depth
and cable latency, so the same comparison can be repeated at other sizes.

All sizes default to the main configuration: 32 PEs, 64-bit words,
16-word (128-byte) buffers per destination, one-cycle cables (10 ns at
100 MHz) and 32 predictive table entries.

## Components

| Module | Role |
|---|---|
| `mpnet_pkg` | Word width (64), the word kind (head/body/tail) and the `flit_t` link word: valid bit, 2-bit kind, 64-bit data |
| `single_queue` | FIFO with push/pull/full/empty. A word pushed in cycle t can be pulled in t+1, and the pulled word is registered |
| `n_queue` | N FIFOs sharing one RAM of N·W words, each sub-queue in its own address range. One write port is addressed by destination and one read port by source. Head and tail pointers have a wrap bit. It outputs full and empty vectors |
| `wire_delay` | Cable or bus: LATENCY registers, one word per cycle |
| `par_to_ser`, `ser_to_par`, `serial_link` | A 64-bit word sent over one wire (start bit, LSB first) and a cable of CABLE_LAT cycles, then rebuilt |
| `rr_scheduler` | N-level request/available/grant arbiter with a rotating priority. Latency 2 |
| `switch_fabric` | N×N crossbar. The registered output adds a latency of 1. Unconnected outputs drive zeros |
| `wh_nic`, `wh_switch`, `wh_network` | Wormhole network |
| `cs_nic`, `cs_controller`, `cs_network` | Circuit network; `cs_nic` is used by the predictive network as well |
| `ps_controller`, `ps_network` | Predictive network |
| `mpnet_top` | The three networks and the serial link side by side, each with its own ports (`wh_*`, `cs_*`, `ps_*`, `sl_*`) |

The processing elements are not part of the RTL. They are traffic sources and
sinks, and their signals are the top-level ports. The testbenches play their part.

## The scheduler

`rr_scheduler` takes an N×N request matrix: row j holds the destinations that
PE j has data for. It also takes an available vector of the outputs that may
be granted.

The logic is a chain of N levels, each serving one PE. Level k serves PE
(ptr + k) mod N. It grants that PE the first requested, still-available
destination at or after the pointer, and removes that destination from the
available vector passed to the next level.

Inputs and outputs are registered, so a schedule appears two cycles after its
request. The outputs are:

* a one-hot grant per PE;
* the crossbar configuration, as a valid bit and a source index for each output;
* the outputs left over.

The pointer advances by one each time a schedule is computed (`in_valid`), not
on every clock. A caller that schedules only every other cycle still rotates
priority fairly. An earlier version advanced the pointer every clock, and with
the circuit controller it always favoured the same half of the PEs.

## Wormhole network

Each NIC has a 16-word outbound FIFO and a 16-word inbound FIFO. The switch
has one `n_queue` per input, and the header word's destination field picks the
sub-queue. A sub-queue's empty flag is its request to the scheduler.

Two rules keep worms whole. Both are this design's own choices.

1. **Ownership.** When input i pulls a header for output o, o belongs to i until
   i pulls the tail. Requests for owned outputs from other inputs are masked
   before they reach the scheduler.
2. **Stale grants.** The scheduler answers two cycles late. By then the
   sub-queue may be empty, or another worm may hold the output. The switch
   checks each grant against the queue state at the time of the pull, and
   against the effective owner. The effective owner includes the kind of the
   word just pulled, so a tail pulled this cycle frees the output. A grant
   that fails either check is dropped (`ev_grant_dropped`).

**Backpressure** uses credits. A NIC starts with W credits for each
destination sub-queue of its switch input. It sends its head word only while
it holds a credit for that word's destination, and otherwise raises
`stalled`. The switch returns a credit on a separate cable for every word it
pulls. The NIC reads the destination from the head word without dequeuing it,
through the `peek` port of `single_queue`.

An assertion checks that no credit counter ever exceeds W.

## Circuit and predictive networks: the round trip

The controller sits at the far end of a request cable and a grant cable, and
data from the NIC goes through the N-Queue read and a data cable before it
reaches the crossbar. Each cable takes L cycles.

If the crossbar were configured at the moment of the grant, words from an old
circuit would still be in flight when its output is handed to a new one. Both
networks therefore configure the fabric with the controller's decision delayed
by RT = 2·L + 1 cycles. That is the time from leaving the controller to the
pulled word's arrival at the fabric. Every word then crosses the crossbar under
exactly the configuration that released it, and circuits can be swapped with no
guard cycles.

An assertion (`a_routed`) checks that every word reaching the fabric finds its
input connected.

**Circuit controller.** It runs one scheduling round every two cycles. The
scheduler is offered only idle inputs and idle outputs. An input granted in
the current round is masked out of the next request snapshot, so it cannot be
granted a second circuit while its first is still travelling. A circuit is
released when the request bit for its destination falls, which means the NIC's
sub-queue has run empty.

**Predictive controller.** The table holds K rows (settings) and N columns
(inputs). Each cell is {valid, destination}. `num_cfg` rows are in rotation,
and each is held for `slot_len` cycles. `ev_slot` marks the last cycle of a
slot, and `cur_entry` gives the row in force.

The table is loaded one cell per cycle through `tbl_*` and is not reset. With
`dyn_mode` high, the grants come from the round-robin scheduler instead,
recomputed each cycle from the live requests. An assertion checks that each
setting is a partial permutation: no two inputs on one output.

## Latencies

These figures are measured in the testbenches and checked there. L is the
cable latency in cycles.

| Path | Cycles |
|---|---|
| `single_queue` push to pull | 1 |
| `rr_scheduler` request to grant | 2 |
| `switch_fabric` | 1 |
| `serial_link`, one word | WIDTH + 2 + CABLE_LAT; one word per WIDTH + 1 cycles |
| `wh_nic` PE write to the cable | 2 |
| `wh_switch` input to output | 5 |
| Wormhole network, idle, PE to PE | 9 + 2L |
| `cs_controller` request to grant | 3 or 4, depending on the round phase |
| Circuit network, first word with circuit set-up | 8 + 4L or 9 + 4L |
| Predictive network, word whose setting is already in force | 5 + 2L |

Once a path is established, all three networks move one word per port per cycle.

## Departures and choices

* **One clock.** The intended system runs the PEs at 500 MHz and the cables,
  scheduler and switch at 100 MHz. Here everything runs on one clock. A cycle is
  a 100 MHz network cycle, and a NIC accepts one word per cycle.
* **Backpressure** in the wormhole network uses the credit scheme above. Only
  the need for some backpressure logic is given.
* **Side-band.** Every link carries a valid bit and a head/body/tail kind beside
  the 64 data bits (`flit_t`, 67 bits). The header's low 16 bits are the
  destination and bits 31:16 the source.
* **Buffer depth.** W = 16 words, the size used for the network simulations.
  The synthesis figures for the N-Queue correspond to 64 words per sub-queue.
  Set `W = 64` to build that version.
* **Wire inside the switch.** The wormhole switch has a parameter
  `L_SW_WIRE` for the bus between its queues and the crossbar. Its latency is
  not given, and the default is 0.
* **Serial framing.** The serial link uses a start bit, and both ends share a
  serial clock. The networks themselves use `wire_delay` cables, which model
  the same latency and bandwidth at word level.
* **Fabric.** The LVDS and optical crossbar variants are analog parts. The
  digital `switch_fabric` stands in for all of them.
* **Unspecified corner cases.** A push to a full queue and a pull from an empty
  queue are ignored and flagged by assertions.
* **Reset.** All state is reset synchronously with `rst_n` (active low). Data
  RAMs and the predictive table are not reset.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/mpnet_pkg.sv rtl/*.sv \
          tb/tb_wh_network.sv --top-module tb_wh_network
./obj_dir/Vtb_wh_network
```

Most block testbenches override parameters to stay fast. For example, the
wormhole and circuit network benches use N = 8 and L = 2, and the predictive
bench uses K = 8.

`tb_mpnet_top` instantiates the top at its defaults: N = 32, W = 16, L = 1,
K = 32. It drives all three networks and the serial link in these phases:

* random worms and messages with full checking of every delivered word;
* an all-to-one hot spot that makes wormhole NICs stall and grants be dropped;
* circuit set-ups and teardowns;
* predictive rotation with a preloaded shift table and hits at the 5 + 2L latency;
* a switch to dynamic mode;
* serial words.

It counts each of these mechanisms and fails if one never happens. It builds
in about three minutes and runs in a few seconds.

Long cables (100 ft, about 10 cycles) are a matter of `L_CABLE = 10`. Larger
systems are set with `N`. At N = 128 the parameters still elaborate, but that
size has not been simulated. The largest size simulated is the default of 32
ports.
