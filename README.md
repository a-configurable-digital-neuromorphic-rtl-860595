# Event-driven spiking neural network processors for hand-gesture recognition

This RTL builds two small digital spiking neural network (SNN) processors. They classify hand
gestures from two sensors and sit side by side in one top level:

* a **vision processor** for a dynamic vision sensor (DVS). It has four 640-neuron cores, one for
  each 20x20 quadrant of the image. Their output spikes merge into one output channel.
* an **EMG processor** for a 16-channel electromyography sensor. It is a single 128-neuron core.

Every core is built from one parameterised module, `snn_core`. The two processors are just two
parameter sets of it. The core uses one idea throughout. Synapses and neurons live in on-chip
memories, and a single physical leaky integrate-and-fire (LIF) neuron is time-multiplexed over
all of them. An input spike therefore costs one sweep over the neuron memory. Nothing is computed
while no events arrive. Cores talk to the outside world and to each other with address-event
representation (AER): every spike is sent as the address of the neuron that fired, over a
four-phase request/acknowledge handshake. They are configured over SPI.

## The core: a time-multiplexed crossbar

A core with `N` neurons is a full `N x N` crossbar. Pre-synaptic address `i` has a row of `N`
signed weights `w(i,j)`, one for each neuron `j` of the core. Input events address rows. Rows
`0..N-1` are also the core's own neurons, so a neuron that fires can feed back into the same
crossbar. This is how a two-layer network is mapped onto one core (see *Mapping the networks*).

```
 AER in ──> aer_input ──> scheduler (FIFO) ──> controller ──> aer_output ──> AER out
                               ^                 |   ^  \
                               └── local spikes ─┘   |   lif_update (one physical neuron)
                                                     |
                          neuron_memory  <───────────┤
                          synapse_memory <───────────┘
 SPI ──> spi_slave ──> configuration registers, byte access to both memories
```

### Memories and word formats

| quantity | formula | vision core | EMG core |
|---|---|---|---|
| neuron word `BWN` | `ceil((2*BN + BL + 3)/8) * 8` | 16 bits | 32 bits |
| neuron memory | `N` words | 640 x 16 b = 1.25 KB | 128 x 32 b = 512 B |
| weights per synapse word `MWS` | `floor(32/BS)` | 16 | 8 |
| words per row `NWS` | `ceil(N/MWS)` | 40 | 16 |
| synapse memory | `NWS * N` words of 32 bits | 25,600 words = 100 KB | 2,048 words = 8 KB |
| input packet `AAER` | `max(A(N)+2, BS+4)` | 12 bits | 9 bits |
| output address | `A(N_OUT)` | 10 bits | 7 bits |

`A(x)` is `ceil(log2(x))`.

A neuron word holds, from the most significant bit down:

| field | width | meaning |
|---|---|---|
| `neur_disable` | 1 | the neuron keeps its potential and never fires |
| `neur_output` | 1 | a spike of this neuron is sent on the AER output |
| `neur_reschedule` | 1 | a spike of this neuron is queued as a new input event of the same core |
| unused | rest | |
| `leak_str` | `BL` | unsigned leak per time-reference event |
| `threshold` | `BN` | signed firing threshold |
| `core_state` | `BN` | signed membrane potential |

Weight `j` of row `i` is in word `i*NWS + j/MWS`, at bits `[(j % MWS)*BS +: BS]`.

### Events and their cost

The two top bits of an input packet are an opcode:

| opcode | event | payload | work | cycles |
|---|---|---|---|---|
| `00` | neuron spike | pre-synaptic address `i` | add `w(i,j)` to every neuron `j = 0..MAX` | `2*(MAX+1)` |
| `01` | time reference | neuron address, or all ones | leak one neuron, or neurons `0..MAX` | 2, or `2*(MAX+1)` |
| `10` | virtual spike | `{weight[BS-1:0], neuron}` | add the weight in the packet to one neuron | 2 |
| `11` | — | — | dropped | 1 |

The cycle in which an input event is written into the scheduler adds one cycle, so an event that
arrives at an idle core is done `2*(MAX+1) + 1` or 3 cycles after its push. `MAX` is the
configuration register `SPI_MAX_NEUR`. The default is `N-1`. Lowering it shortens
every sweep, so a network that uses fewer neurons runs faster.

Each neuron update takes a read cycle and a write-back cycle. The first read is issued in the same
cycle as the pop. A synapse word is read together with the neuron word each time a new group of
`MWS` weights starts. The word stays in the synapse memory's output register for the next
`MWS - 1` neurons. In a virtual event the neuron field is only `AAER - BS - 2` bits wide (8 bits on
the vision core, 3 bits on the EMG core), so only the low neurons can be reached that way.

### The neuron

`lif_update` is purely combinational. For a spike or virtual event it adds the weight to the
potential and saturates at the `BN`-bit signed limits. If the sum reaches the threshold
(`sum >= threshold`), the neuron fires. It then resets to zero, or with `RESET_MODE = 1` subtracts
the threshold. A time-reference event moves the potential toward zero by `leak_str` and stops at
zero. It never causes a spike. `LEAK_MODE = 1` turns leakage off, giving plain integrate-and-fire
(IF).

### Where a spike goes

When neuron `j` fires during an event, two things can happen:

* If `neur_output` is set and `j < N_OUT`, address `j` is sent on the AER output. The output holds
  one event. If it is still busy with the previous event, the controller **stalls** in the
  write-back cycle until it is free, so no output spike is lost.
* If `neur_reschedule` is set and `SPI_OPEN_LOOP` is 0, the packet `{00, j}` is written into the
  core's own scheduler as a new neuron-spike event. Local spikes win over the AER input when both
  arrive in one cycle. If the FIFO is full, the local spike is **dropped** and `sched_overflow`
  pulses for one cycle. The controller never stalls on its own FIFO, so a burst larger than the
  free space loses its tail.

With `SPI_AER_SRC_CTRL_nNEUR = 1`, neurons no longer drive the output. Instead, every
neuron-spike event the controller pops is forwarded to the output with its own address. The event
starts only when the output is free. In this mode a core acts as a relay.

### Configuration over SPI

Every transfer is 64 bits, most significant bit first: a 32-bit address field
`{R, W, cmd[1:0], addr[27:0]}`, then a 32-bit data field. MOSI is sampled on the rising SCK edge
and MISO changes on the falling edge. SCK, SS_n and MOSI are sampled by the core clock through
synchronisers, so SCK must be at least several core-clock cycles per phase. A core drives MISO
low when it is not selected, so the MISO lines of several cores can be ORed.

| `cmd` | access | `addr` | data field |
|---|---|---|---|
| `00` | write configuration register | register number | value in the low bits |
| `01` | neuron memory byte | `{byte, word}` | write: `{mask[7:0], byte[7:0]}`; read: byte returned in `d[7:0]` |
| `10` | synapse memory byte | `{byte[1:0], word}` | as above |

A mask bit of 1 keeps the stored bit. Reads return the byte during the data field of the same
transfer. The `byte` field sits directly above the word address: bit `A(N)` upwards for the
neuron memory, bit `A(NWS*N)` upwards for the synapse memory.

| register | number | reset | meaning |
|---|---|---|---|
| `SPI_GATE_ACTIVITY` | 0 | 1 | 1: no event starts; SPI owns the memories. 0: run |
| `SPI_OPEN_LOOP` | 1 | 0 | 1: no spike is rescheduled into the core |
| `SPI_AER_SRC_CTRL_nNEUR` | 2 | 0 | 1: forward popped spike events instead of neuron spikes |
| `SPI_MAX_NEUR` | 3 | `N-1` | last neuron swept by spike and leak-all events |

Memory bytes can only be accessed while `SPI_GATE_ACTIVITY` is 1. Set it only while the core is
idle, because an SPI access takes the memory port in the cycle it occurs. Events that arrive while
the core is gated wait in the scheduler.

## The vision processor: a tree of cores

`dvs_multicore` holds four `snn_core` instances with the vision parameters. They share SCK and
MOSI and each has its own chip select. Their AER outputs feed `aer_arbiter`:

* An input FSM (IDLE, WAIT_FIFO, WAIT_REQDN) takes one request at a time. It picks the first
  request at or after a one-hot priority pointer. The pointer then moves to the input after the
  one served (round robin).
* The packet `{input index, neuron address}` (2 + 10 bits) goes into a 2-entry FIFO.
* The child is acknowledged as soon as its packet is stored, so a busy parent does not hold up
  the cores. If the FIFO is full, the input FSM waits in WAIT_FIFO.
* An output FSM (IDLE, POP, WAIT_ACK, WAIT_ACKDN) pops the FIFO and runs the output handshake.
* For a general tree, `EXT_AER = 1` turns the last input into an external one. Its packets pass
  through without the index, so they keep their own opcode.

The root of the tree is `virtual_core`, a core with only an AER input and an AER output. It keeps
the low 10 bits of each packet, which is the neuron address inside one core, and drops the core
index. The same class neuron in any of the four cores therefore produces the same output address.
The classifier takes that merged output as the sum of the four sub-networks' votes.

The four cores' inputs reach the processor through one 14-bit AER port. `aer_input_demux` uses
the two top bits to pick the core and passes the handshake straight through.

## The system top

`snn_system_top` places the vision processor and the EMG processor side by side:

| port group | width | use |
|---|---|---|
| `spi_wreq`, `spi_rreq`, `spi_wack`, `spi_rack`, `spi_a`, `spi_d_w`, `spi_d_r` | 32-bit fields | parallel SPI requests, as from processor GPIO |
| `spi_sel` | 3 | 0-3: vision cores, 4: EMG core |
| `dvs_in_*` / `dvs_out_*` | 14 in / 10 out | vision AER ports |
| `emg_in_*` / `emg_out_*` | 9 in / 7 out | EMG AER ports |
| `sched_overflow`, `spike_fired`, `busy` | 5 | per-core status; bit 4 is the EMG core |

`gpio_spi_master` turns one parallel request into one 64-bit SPI transfer. SCK is `clk / SCK_DIV`
(25 MHz / 5 = 5 MHz at the defaults). A request is acknowledged when the transfer has finished.
The acknowledge stays high until the request is withdrawn. For a read, `spi_d_r` then holds the
32 bits that came back on MISO.

## Parameters

`snn_core` (and `controller`, `dvs_multicore`):

| parameter | default | meaning |
|---|---|---|
| `N` | 640 | neurons and crossbar rows |
| `N_OUT` | 640 | neurons `0..N_OUT-1` may drive the AER output |
| `BN`, `BS`, `BL` | 5, 2, 3 | potential/threshold, weight and leak widths |
| `FIFO_D` | 128 | scheduler depth |
| `LEAK_MODE` | 0 | 0 LIF, 1 IF (no leak) |
| `RESET_MODE` | 0 | 0 reset to zero, 1 subtract threshold |
| `B_SPI` | 32 | SPI field width |

The top sets the EMG core to `N = 128`, `BN = 7`, `BS = 4`, `BL = 8`. Some choices fill gaps in
the description this design follows:

* The leak width of the vision core (3 bits) is chosen so that the 16-bit neuron word is filled.
* The EMG core's 8-bit leak is chosen so that its 32-bit neuron word is filled. This makes the leak
  wider than the potential, which breaks the generator's usual rule that the leak is narrower than
  the potential. The memory size of the deployed EMG core was followed instead.
* The synapse memory stores row `i` compactly at `i*NWS`, so its size is exactly `NWS*N` words.
* The configuration register numbers, the reset values and the SPI edge conventions are this
  design's own choices.
* So are dropping local spikes on a full scheduler and stalling on a busy AER output.
* An event from the AER input is never dropped. While the scheduler is full, its acknowledge is
  held back.
* The output address is `A(N_OUT)` bits wide, with no opcode. One parameter table of the generator
  gives it two more bits, but the deployed processors use the plain width (10 and 7 bits).
* The SPI word address of the neuron memory is `A(N)` bits wide, with the byte index directly
  above it.

## Mapping the networks

| network | needs | built | fits |
|---|---|---|---|
| vision: four 400-210-5 sub-networks, one per core | 610 rows, 215 neurons, 85,050 2-bit weights per core | 640 rows, 640 neurons, 409,600 weights per core | yes |
| EMG: 16-110-5 | 126 rows, 115 neurons, 2,310 4-bit weights | 128 / 128 / 16,384 | yes |
| sensor fusion output layer 950-5 | 950 input rows joining both processors | no core with 950 rows, no path between the processors | no, not built |

On a core, the hidden neurons are neurons `0..H-1` with `neur_reschedule` set, and the output
neurons are the next five neurons with `neur_output` set. The network inputs are the crossbar rows
above the neurons, for example rows 210-609 on a vision core. A hidden neuron that fires is
rescheduled and sweeps its own row, which holds its weights to the output neurons. Time-reference
events, when a deployment needs them, apply the leak between input frames.

## Verification

Each block has a self-checking testbench in `tb/tb_<block>.sv`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Examples with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Wno-lint -Wno-style \
  -Irtl -y rtl -y tb rtl/snn_pkg.sv tb/tb_snn_system_top.sv --top-module tb_snn_system_top
./obj_dir/Vtb_snn_system_top
```

* `tb_controller` runs a 640-neuron controller with real memories. It compares every neuron after
  each event with a reference model. It checks the cycle costs in the table above.
* `tb_snn_core` programs a 32-neuron core only through its SPI and AER pins, with a 4-entry
  scheduler. It checks gating, random open-loop traffic against a model, read-back over SPI, a
  closed-loop burst that overflows the scheduler, and controller-sourced output. It also checks
  each event's latency from its push into the scheduler (the cycle cost plus one).
* `tb_dvs_multicore` drives four cores at once into a slow receiver and checks the merged output.
  It also checks that the arbiter's FIFO filled up.
* `tb_snn_system_top` runs the whole system at its default sizes. It uses the parallel SPI port
  and both AER ports. Bulk memory contents are loaded into the memory arrays at time zero, because
  loading 400 KB through a 5 MHz SPI link would take too long in simulation. It counts SPI writes
  and reads, gate and mode switches, each event kind, stall cycles, overflow drops, rescheduled
  spikes, arbiter FIFO-full waits and outputs. It fails if any count stays at zero. A fixed first
  burst (two spikes per vision core while the receiver holds its ack) fills the arbiter FIFO for
  every random seed. It also checks
  the all-neuron leak time (`2*640` cycles) and the effect of `SPI_MAX_NEUR`. It finishes in
  seconds.
* `tb_snn_workloads` also runs the default-size system. It maps the two classifiers with random
  weights as described in *Mapping the networks*: four 400-210-5 networks on the vision cores and
  16-110-5 on the EMG core. The cores run closed loop with `SPI_MAX_NEUR` trimmed to the used
  neurons. A reference model replays the event queue of each core. The test compares every
  output spike, every final membrane potential and the count of scheduler drops against that
  model.

## Limits

* The two processors are independent. The sensor-fusion output layer that would join their hidden
  layers is not built.
* Only the two-level tree of the vision processor is instantiated. `aer_arbiter` and
  `virtual_core` are written for general trees, but arbitrary tree generation is not provided.
* Memories are register arrays with one port, a registered read and a per-bit write mask. An FPGA
  block-RAM wrapper is not included.
* The AER inputs are synchronised with two flip-flops. Every core is assumed to run on one clock
  shared with the bridge.
