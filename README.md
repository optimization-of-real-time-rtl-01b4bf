# Schedule-driven processor/FPGA link with parallel SAD operators for H.264 intra 16x16 mode decision

When an application is split between a processor and an FPGA by a static
scheduler, every transfer between the two is known before the system runs:
which data item crosses the link, in which direction, in how many packets and
in what order. The processor side turns that list into a sequence of transfer
calls. This RTL is the FPGA side. A small **communication IP** stores the same
list in a ROM and replays it forever. It moves the packets with a
request/acknowledge handshake and keeps every received packet in a register of
its own. It starts the FPGA's operators once their inputs are complete and
releases them once their results have been sent back.

Behind the IP sit **degenerate operators**. Each is a circuit that can only
run one operation of the application. The application here is the H.264 intra
16x16 prediction decision. The processor acquires a 16x16 source block and its
neighbours (the row of 16 pixels above, the column of 16 to the left) and
computes the DC value. The FPGA computes three sums of absolute differences
(SAD) at the same time: the vertical, the horizontal and the DC prediction.
The processor then keeps the mode with the smallest SAD. Running the three
SADs in parallel on the FPGA is the point of the mapping. With one loop
iteration per pixel unrolled into hardware, the FPGA part takes two clock
cycles once its inputs are in place. Nearly all of the time goes into moving
data over the link.

## Who does what

| Operation | Runs on | In this RTL |
|---|---|---|
| SRC (256 pixels), TOP (16), LEFT (16) acquisition | processor | testbench model |
| DC value = (sum of TOP and LEFT + 16) / 32 | processor | testbench model |
| SAD, vertical prediction | FPGA | `sad_oprd`, `MODE_V` |
| SAD, horizontal prediction | FPGA | `sad_oprd`, `MODE_H` |
| SAD, DC prediction | FPGA | `sad_oprd`, `MODE_DC` |
| comparator: min SAD and best mode (0 V, 1 H, 2 DC) | processor | testbench model |
| transfers | both | `com_ip` (FPGA side) |

The top, `fpga_intra16_top`, holds one `com_ip` and three `sad_oprd`. Inside
the FPGA, data move with no delay: the operators read the IP's packet
registers directly, and the IP's send multiplexer reads their result
registers directly.

## The transfer schedule (`intra16_pkg`, `com_rom`)

A ROM word describes one data item. Its low n bits give the item's packet
count. Bit n gives the direction (0 = processor to FPGA, 1 = FPGA to
processor). Bit n+1 is the *synchro* flag: when the item is complete, the
operators are synchronised. Here n = 7.

Packets are 32 bits wide and carry four pixels. Pixel 4k+i sits in bits
8i+7..8i of packet k. Pixels of SRC are in raster order, index y*16+x. The
schedule is:

| ROM address | item | direction | packets | synchro | packet registers |
|---|---|---|---|---|---|
| 0 | SRC | receive | 64 | 0 | 0..63 |
| 1 | TOP | receive | 4 | 0 | 64..67 |
| 2 | LEFT | receive | 4 | 0 | 68..71 |
| 3 | DC value (bits 7..0) | receive | 1 | 1: start the operators | 72 |
| 4 | SAD_V (bits 15..0) | send | 1 | 0 | – |
| 5 | SAD_H | send | 1 | 0 | – |
| 6 | SAD_DC | send | 1 | 1: release the operators | – |

The schedule is a parameter (`SCHEDULE` on `com_ip`, `CONTENTS` on
`com_rom`). Another application needs a new schedule and new sizes for
`RX_PKTS` (total received packets) and `TX_PKTS` (total sent packets).

## Inside the communication IP (`com_ip`)

Four counters (`com_counter`) and a comparator drive everything:

* **Data counter**: the ROM address, meaning the current item. It wraps after
  the last item, so the schedule repeats once per macroblock.
* **Packet counter**: packets moved in the current item. The comparator
  raises `end_xfer` when this counter equals the item's packet count.
* **Received-packet counter**: steers the FSM's `wr` strobe to the next packet
  register (the write demultiplexer).
* **Sent-packet counter**: selects the result packet that goes on the bus
  (the send multiplexer).

The two packet counters also restart when the schedule wraps.

### Control FSM (`com_fsm`)

The output values of its states are fixed:

| state | wr | start | reset | req_t_cpu | ack_t_cpu |
|---|---|---|---|---|---|
| S_IDLE | 0 | 0 | 0 | 0 | 0 |
| S_RECEIVE1 | 1 | 1 | 0 | 0 | 1 |
| S_RECEIVE2 | 0 | 0 | 0 | 0 | 0 |
| S_RESET | 0 | 0 | 1 | 0 | 0 |
| S_SEND1 | 0 | 0 | 0 | 1 | 0 |
| S_SEND2 | 0 | 1 | 0 | 0 | 0 |

`start` advances the packet counter. `reset` (port `cnt_reset`) clears it,
advances the data counter and marks the end of the item for the
synchronisation unit.

The transitions were chosen to fit that table:

* **S_IDLE** goes to S_RESET if the item is complete. This test comes first.
  Otherwise it goes to S_RECEIVE1 if the item is a receive and the processor
  requests, or to S_SEND1 if the item is a send, the operators' results are
  ready (`req_f_opr_d`) and the processor's acknowledgement is low.
* **S_RECEIVE1** lasts one cycle. The packet is written, counted and
  acknowledged.
* **S_RECEIVE2** waits for the processor to drop its request, then returns to
  S_IDLE.
* **S_SEND1** drives the packet and holds `req_t_cpu` until `ack_f_cpu`.
* **S_SEND2** lasts one cycle and counts the sent packet.
* **S_RESET** lasts one cycle.

### Handshake with the processor

This is the part an integrator most needs to get right.

* **Receive (processor to FPGA).** The processor puts a packet on `bus_din`
  and raises `req_f_cpu`. The IP stores it and answers with a **one-cycle**
  `ack_t_cpu` pulse. The processor must then drop `req_f_cpu` and keep it low
  for at least two clock cycles before it offers the next packet. The FSM
  needs to see the request low once in S_RECEIVE2. Because the acknowledgement
  is a pulse, the processor has no signal that tells it this has happened.
  A shorter gap deadlocks the link.
* **Send (FPGA to processor).** The IP drives `bus_dout`, with `bus_oe` high
  for the whole send item, and holds `req_t_cpu` until `ack_f_cpu`. The
  processor keeps `ack_f_cpu` high until `req_t_cpu` falls, then lowers it.
  An assertion checks that `req_t_cpu` is never withdrawn early.

All signals are synchronous to `clk`. A processor on another clock needs
synchronisers on `req_f_cpu` and `ack_f_cpu`, and for the receive direction
an acknowledgement stretched to its clock. Neither is included here.

### Synchronisation with the operators (`opr_d_synch`)

When an item with the synchro flag completes, the unit acts on the rising edge
of `en` (the FSM's S_RESET):

* After a receive, it raises `req_t_oprd` and holds it until the operators
  acknowledge (`ack_f_oprd`).
* After a send, it raises `ack_t_oprd` and holds it until the operators drop
  their result request (`req_f_oprd`).

The published description ends the first case on `req_f_oprd`. That sentence
also calls the signal "the acknowledgement from the operator", so `ack_f_oprd`
is used here, which makes both handshakes proper four-phase handshakes.

The IP has one pair of handshake lines towards the operators. The top
broadcasts the IP's request and acknowledgement to all three operators and
ANDs their acknowledgements and requests. The IP therefore moves on only when
all three are ready. The first send waits in S_IDLE until all three results
are in.

## SAD operators (`sad_oprd`)

SAD = Σ |SRC(x,y) − P(x,y)| over the 256 pixels. P is TOP(x) for the
vertical mode, LEFT(y) for the horizontal mode and the DC value for the DC
mode. These are the H.264 16x16 predictions.

The sum is a loop of 256 independent iterations, and `PAR` sets how many are
unrolled into hardware. PAR = 256 is the fully parallel operator: 256
subtract/absolute-value units and an adder tree, one accumulation cycle. PAR
= 1 is fully sequential. Any divisor of 256 in between trades area for time.
A counter selects which PAR pixels each cycle uses; this is the multiplexer
that a loop split over several iterations needs. A register accumulates the
partial sums; this is the register that carries a value from one iteration to
the next.

Control is a request/acknowledge pair on each side:

* Start when `req_in` is high and both handshakes are idle.
* After 1 + 256/PAR cycles, raise `ack_out` (inputs consumed; held until
  `req_in` falls) and `req_out` (result valid in `sad`; held until `ack_in`).
* The inputs must stay steady from `req_in` until `ack_out`. The IP's packet
  registers guarantee this because no new packet arrives before the results
  have been sent.

The top's defaults give all three operators PAR = 256, the fully unrolled form
that minimises latency. An area-saving variant reduces the parallelism of
operators that are off the critical path without lengthening the whole
decision. Such a variant is a parameter change (`PAR_H`, `PAR_DC`, `PAR_V`) and
is exercised by `tb_fpga_intra16_space`. The original method does not give
those reduced degrees; the values in that testbench are examples.

## Timing

* With a processor that answers at once, one received packet costs 3 clock
  cycles (S_RECEIVE1, S_RECEIVE2, S_IDLE). The two-cycle request gap overlaps
  the last two of them. One sent packet costs 3 cycles or more. Each item adds
  one S_RESET cycle.
* Under the same conditions, one macroblock (73 packets in, 3 out, 7 items)
  takes about 240 cycles. Of those, the SAD operators take 1 + 256/PAR
  cycles, which is 2 at the defaults.
* The cost of the fully unrolled default is three times 256 8-bit
  absolute-difference units and their adder trees: about 9.6 k word-level
  cells and 2.4 k flip-flops after coarse synthesis. Most of the flip-flops
  are the 73 × 32-bit packet registers.

## What this RTL does not contain

* The processor and its software (acquisition, DC value, comparator). It
  appears only as a model inside the testbenches.
* The physical bus. The FPGA side is brought out as separate 32-bit in/out
  buses with an output enable, plus the four handshake lines.
* An FPGA operator for the DC value. The mapping keeps that computation on
  the processor.
* The scheduling and code-generation flow that would produce the ROM contents
  and the operators' unrolling degrees. Here they are written by hand in
  `intra16_pkg` and as parameters.

Choices made here, not taken from the original description: the FSM
transitions, the 32-bit packet and its pixel layout, the order of the items
in the schedule, n = 7, synchronous active-high `init`, the separate
in/out buses, the AND-combining of the three operators' handshakes, the
operators' cycle timing, the 16-bit SAD, and the comparator's tie rule (lower
mode number wins).

## Files

| file | contents |
|---|---|
| `rtl/com_ip_pkg.sv` | ROM word type, direction codes, FSM state type |
| `rtl/intra16_pkg.sv` | sizes, packet map, mode codes, the schedule |
| `rtl/com_counter.sv` | modulo counter used four times |
| `rtl/com_rom.sv` | schedule ROM |
| `rtl/com_fsm.sv` | control FSM |
| `rtl/opr_d_synch.sv` | operator synchronisation |
| `rtl/com_datapath.sv` | packet registers, write demultiplexer, send multiplexer |
| `rtl/com_ip.sv` | communication IP |
| `rtl/sad_oprd.sv` | SAD operator |
| `rtl/fpga_intra16_top.sv` | FPGA top |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fpga_intra16_space` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog that counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/com_ip_pkg.sv rtl/intra16_pkg.sv tb/tb_fpga_intra16_top.sv \
    --top-module tb_fpga_intra16_top
./obj_dir/Vtb_fpga_intra16_top
```

Replace the testbench name to run another one.

`tb_fpga_intra16_top` runs the top at its default parameters. It processes
12 macroblocks (vertical-textured, horizontal-textured, flat and noise
blocks), with random processor delays. It checks every SAD against its own
computation, the chosen mode and the operator latency. It also counts each
mechanism: packets in and out, operator starts and releases, processor
stalls on a send, schedule wrap-arounds, and each mode winning. A mechanism
that never occurs is a failure.

The block testbenches check:

* `tb_com_fsm`: every transition and the output table in every cycle.
* `tb_com_ip`: three repetitions of the schedule against an operator model.
* `tb_sad_oprd`: all three modes at PAR = 256 and PAR = 16, including the
  largest possible SAD and the latency.
