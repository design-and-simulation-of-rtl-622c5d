# OQMB Clos packet switch: 16x16, C(4, 4, 4)

A three-stage Clos network is built from small crossbars: a stage of
input modules, a stage of central modules and a stage of output modules.
Most Clos packet switches need a central scheduler to decide which cell may
cross the fabric in each slot. The OQMB arrangement (Output Queuing with the
Middle stage Buffered) avoids the scheduler:

* the **input stage is bufferless**. Each input module connects its inputs
  to the central modules in a fixed rotating pattern (desynchronized static
  round robin, DSRR). In every slot the inputs of a module map one-to-one
  onto central modules, so two cells of one input module never compete for
  a link.
* the **central stage is buffered**. Each central module keeps one FIFO
  output queue per output module and absorbs the contention that the input
  stage never resolves.
* the **output stage is buffered**. Successive packets of one flow cross
  different central modules and can arrive out of order. A resequencing
  buffer at each output port puts them back in order, and a FIFO output
  queue drives the port.

On top of that, the switch checks each sender's ID (ID matching) and
answers every packet: ACK (code `01`) when the packet is accepted for
delivery, NACK (code `11`) when it had to be refused. A source that gets a
NACK sends the same packet again.

This RTL implements the whole fabric at the C(4, 4, 4) size: 16 ports,
4-bit addresses and 4-bit payloads.

## Addresses and words

A port address is 4 bits. The upper two bits are the module ID (`00`, `01`,
`10`, `11`) and the lower two bits select the port within that module.
Source port `s` enters input module `s/4`, and destination port `d` leaves
output module `d/4`.

A packet (`clos_pkg::cell_t`, 16 bits) is:

| field | bits | meaning |
|-------|------|---------|
| `seq`  | 4 | packet number, counted per (source, destination) flow |
| `src`  | 4 | sender address; must equal the port it enters on |
| `dst`  | 4 | destination port |
| `data` | 4 | payload |

`{dst, data}` is the 8-bit packet word. The example "port 0 sends 1111 to
port 3" is the word `0011_1111`. The packet number and the sender address
are extra header fields. The packet number is what lets the output side
restore order and lets a source resend a refused packet under the same
number.

An answer (`clos_pkg::ack_t`, 18 bits) is `{src, code, hdr, seq, from}`.
The first 8 bits are the acknowledgement word: the source address, the code
and a 2-bit header. In this design the header holds the two low bits of
the packet number. The first ACK that source 0 receives is therefore
`0000_01_00`. `seq` gives the full packet number and `from` gives the port
or flow that answers.

## Data path, cycle by cycle

For one packet with no contention:

| cycle | where the packet is |
|-------|--------------------|
| t   | presented on `in_*`; ID-matched and switched by the input module to the central module that DSRR selects for that input in slot t; written into that central module's queue for the destination's output module at the clock edge |
| t+1 | at the head of the central queue, on the link to the output module; written into the resequencing buffer of the destination port |
| t+2 | next in order for its source, so it moves into the output queue; its ACK is written into the port's ACK queue |
| t+3 | on `out_*` at the destination, and its ACK on `ack_*` at the source |

The end-to-end testbench checks this 3-cycle latency.

### Input module and DSRR (`input_module`, `dsrr_ctrl`, `id_match`)

Input `i` of input module `k` is connected in slot `t` to central module
`(i + k + t) mod 4`. A slot is one clock cycle, and the slot counter starts
at 0 on reset. Because the pattern is a permutation in every slot, the
input stage never needs a buffer or an arbiter. The `k` term gives each
module its own starting offset, which is what makes the pattern
desynchronized across modules. The pattern needs at least as many central
modules as inputs per module (m >= n), and an assertion checks this.

Before a packet is switched, its `src` field is compared with the port's
own address. A packet that does not match is dropped and `reject_o` for
that port pulses. Such a packet gets no answer.

### Central module (`central_module`, `mw_fifo`)

A central module compares the module field of each arriving destination
(`dst[3:2]`) with the IDs of the output modules. Up to four cells can arrive
for the same output module in one slot, so each output queue takes up to
four writes per cycle. They are stored in link order, and room is judged on
the occupancy at the start of the cycle. Each non-empty queue sends its
oldest cell every cycle, and the output module always accepts it.

If a queue is full, the cell is dropped, `cm_drop_o[j][k]` pulses and a NACK
is recorded for it.

### Output module and resequencing (`output_module`, `reseq_buffer`)

Each output port matches the port field of the destination (`dst[1:0]`).
The resequencing buffer keeps, for every one of the 16 sources, the packet
number it expects next and a window of 8 slots (`WIN`) indexed by the low
bits of the packet number:

* an arriving packet whose number lies in `[expected, expected+7]` is stored
  in its slot;
* any other packet is refused and NACKed. This happens when it is too far
  ahead of the expected one, typically because the destination has stopped
  reading.

A source is ready when the packet it expects is present. A round-robin
arbiter picks one ready source per cycle, and that packet moves into the
port's output queue (4 entries, valid/ready to the destination). The
packet moves only if the output queue and the ACK queue both have room.
The ACK is written when the packet enters the output queue, so ACKs of one
flow come back in order.

### Answers (`nack_table`, `ack_return`)

Refusals cannot be back-pressured, because they come from cells that have
already been sent. A queue of NACK messages could therefore overflow and
lose a NACK. A lost NACK would stall its flow forever: the resequencer
would wait for a packet that its source never resends. For this reason
NACKs are kept in a `nack_table` holding one bit per possible key:

* `{src, seq}` (256 bits) at each output port;
* `{src, dst, seq}` (4096 bits) at each central module.

A key cannot be pending twice, because a source resends only after the NACK
has reached it. The table therefore cannot overflow. Two round-robin levels
(16-key groups, then the bits inside a group) pick the key to send, so a
packet that is refused over and over cannot starve the others.

Each output port offers one answer per cycle, alternating between its ACK
queue and its NACK table when both have one waiting. `ack_return` is a
return crossbar from these 16 producers, plus the four central-module NACK
tables, to the 16 sources. Each source has its own round-robin arbiter and
takes one answer per cycle. Answers that lose arbitration wait at their
producer.

## Top level (`oqmb_clos`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `in_valid_i[16]`, `in_cell_i[16]` | in | one packet per source per cycle; no backpressure |
| `reject_o[16]` | out | packet refused by ID matching |
| `out_valid_o[16]`, `out_cell_o[16]`, `out_ready_i[16]` | out/out/in | delivery to destinations |
| `ack_valid_o[16]`, `ack_o[16]` | out | answers to sources; always accepted |
| `cm_drop_o[4][4]` | out | central module j dropped a cell for output module k (it is NACKed) |

| parameter | default | meaning |
|-----------|---------|---------|
| `CM_QDEPTH` | 8 | cells per central output queue |
| `WIN` | 8 | resequencing window per source and output port (power of two, at most 8 with 4-bit packet numbers) |
| `OQ_DEPTH` | 4 | output-port queue |
| `AQ_DEPTH` | 4 | ACK queue per output port |

The Clos geometry (n = m = p = 4) and the field widths are constants in
`clos_pkg`. They are not top-level parameters.

**What the user must do.** The switch does not retransmit by itself. To
get lossless in-order delivery, each source has to:

* number its packets per destination;
* keep each packet until it is answered;
* resend it with the same number on a NACK;
* keep no more than 15 packets of one flow unanswered, so that packet
  numbers do not wrap.

A source that keeps at most `WIN` (8) packets of a flow unanswered never
has a packet refused by the resequencing window while its destination
keeps reading: every packet it has in flight lies inside the window. Going
beyond `WIN` is legal but only buys NACKs and resends.

`tb/tb_oqmb_clos.sv` contains such a source model.

## What comes from the design and what was chosen here

Taken from the design description:

* the C(4, 4, 4) topology and the 16 ports;
* the module IDs `00`..`11`;
* the bufferless / buffered / buffered stage arrangement;
* DSRR dispatch in the input stage;
* FIFO queuing in the central and output stages;
* ID matching of users against ports;
* resequencing at the output;
* ACK `01` and NACK `11` answers, with the source resending on NACK;
* the 8-bit `{dst, data}` packet word and the 8-bit answer word layout.

Chosen here, because the description does not fix them:

* the exact DSRR formula, and one slot per clock cycle;
* the central module is picked by the DSRR pattern alone; the destination
  address is first used in the central stage;
* the widths and meaning of the packet number and the answer header;
* all buffer depths (the description only says the central buffers can be
  small);
* the resequencer's window structure, and the rule that packets outside
  the window are NACKed;
* where the ACK is generated (on entry to the output queue);
* dropping and NACKing cells at a full central queue;
* the lossless NACK tables;
* the separate answer-return crossbar;
* valid/ready at the destinations;
* the reset style.

Other limitations:

* A packet refused by ID matching is dropped without an answer.
* With one answer per port per cycle and immediate resending, a
  destination that stops reading makes its sources loop through NACKs and
  resends until it reads again. Nothing is lost, but the answer bandwidth
  of that port is used up in the meantime.
* The 100 % throughput under admissible traffic is claimed for the
  architecture, not proven for this RTL. Measured at the default
  parameters, with sources keeping at most 8 packets of a flow unanswered
  and all destinations ready:
  * a permutation that changes every 64 cycles, every source sending in
    every cycle, gives 98.4 % of line rate;
  * uniform random destinations at 80 % offered load: 98.8 % of the
    packets offered in a 3000-cycle interval are delivered in it, with
    about 200 central-queue drops resent; nothing is lost.

  The shortfall in the permutation case depends on the window: with
  `WIN = 4` and at most 4 packets unanswered, the same traffic gives 91 %.

## Simulating

Each file in `rtl/` holds one module or package, with the package in
`rtl/clos_pkg.sv`. Each testbench is in `tb/` and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/clos_pkg.sv tb/tb_oqmb_clos.sv \
          --top-module tb_oqmb_clos -Mdir obj_top
./obj_top/Vtb_oqmb_clos
```

| testbench | what it checks |
|-----------|----------------|
| `tb_oqmb_clos` | whole switch at default parameters. Runs the single packet 0 -> 3 (`1111`, 3-cycle latency, ACK word `00000100`), three simultaneous packets (0 -> 8, 5 -> 0, 11 -> 7), an unauthorised sender, uniform random traffic, hot-spot traffic with slow destinations and a blocked destination. Checks every flow for completeness, order and data, and checks every answer. Requires each mechanism to occur: rejection, DSRR spreading, out-of-order arrival, central drop, both NACK kinds, resend, backpressure, answer contention |
| `tb_oqmb_throughput` | whole switch under rotating permutation traffic at full load (at least 95 % of line rate) and uniform random traffic at 80 % load (at least 95 % of the offered packets delivered); every flow complete and in order |
| `tb_output_module` | out-of-order arrivals, NACK and resend, per-flow order, ACK order |
| `tb_central_module` | exact queue model, drop flags, every drop NACKed once |
| `tb_reseq_buffer` | exact model of window, NACKs and round-robin release |
| `tb_input_module`, `tb_dsrr_ctrl`, `tb_id_match` | DSRR pattern, link contents, rejection |
| `tb_mw_fifo`, `tb_nack_table`, `tb_rr_arbiter`, `tb_ack_return` | the shared building blocks |
