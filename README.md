# A 16x16 input-buffered ATM switch with a time-slot output scheduler

An input-buffered switch keeps waiting cells at the inputs. That avoids the
N-fold speed-up an output-buffered switch needs. The cost is that something
must stop two inputs from sending to the same output at once. This design
does it by **booking time ahead**. For each port, the scheduler keeps a
16-bit status array with one bit for each of the next 16 time slots: 1 means
the slot is already taken. When a cell arrives, the scheduler compares the
status array of its input with the status array of each output it wants. It
books the first slot in which both are free. The cell is then parked in the
input port controller in a memory unit tied to that slot. In that slot it
goes through a crossbar that has been set for it. Two cells therefore never
meet in the fabric. A cell that finds no free slot is dropped.

The RTL follows the architecture of a published thesis design: a 0.25 µm
full-custom scheduler chip running at 400 MHz, for a fabric with 10 Gb/s per
channel. It covers:

* the **output scheduler**, in full: a 16x16 array of elementary schedulers,
  the input and output status registers, the priority decoders and the clock
  generator;
* the **input port controllers**: header processor, temporary buffers, the
  16-cell main buffer with its read and write controllers;
* the **crosspoint switch matrix**: 16 broadcast-and-select selector slices;
* the top level `atm_switch`, which wires all of this together.

The output port controllers are not included. The switch outputs are ports
of the top.

## Time slots and the three-slot pipeline

A time slot is the time one 53-octet cell (424 bits) takes on a 10 Gb/s
channel. The slot is set to 40 ns, which is **16 clocks at 400 MHz**. All
control words between the chips are 16 bits long and travel serially, one
bit per clock. Each word therefore takes exactly one slot, with the most
significant bit first. All per-slot registers in the design update at the
same clock edge, the one that ends a slot. The clock generator marks it with
`slot_end` (high during the 16th clock).

This table follows one cell that is taken from the line at the end of slot
`q`:

| slot | input port controller (IPC) | output scheduler | switch matrix |
|---|---|---|---|
| q+1 | cell in temporary buffer #1; its output address and priority are shifted out | shifts the request in | |
| q+2 | cell in buffer #2 | **compares** the status arrays and books slots | |
| q+3 | cell in buffer #3; the schedule word is shifted in; at the end of the slot the cell is written to the memory unit of every booked slot, or dropped if none was booked | shifts the schedule word out | |
| q+4+k | the unit of booked slot k+1 is read into temporary buffer #4 | input address for that slot is shifted out | address shifted into the selector slice |
| q+5+k | buffer #4 drives the cell into the fabric | | configuration latched; cell switched |

Status bit `k` in the comparison slot `m` therefore stands for switch slot
`m+3+k`. The fastest path through the switch is four slots from taking the
cell to switching it; the slowest is nineteen. The three scheduler steps
(import, compare, export) overlap, so a new request can enter from every
input in every slot.

## The output scheduler

### The elementary scheduler array

Row `r` of the 16x16 array belongs to input `r`. Column `c` belongs to output
`c`. Each elementary scheduler holds 16 **comparison units**, one per future
slot, chained through an active-low blocking signal (`up`/`down`).

```
e_tmp = ~(i | x) & ~up           book this slot
x_tmp = (~i & ~up) | x           output status after this unit
down  = ~(i | x) | p | up        disable all later slots
```

Here `i` and `x` are the input and output status bits of the slot, and `p`
is the slot's bit of the decoded priority threshold. The first unit is
enabled by this output's bit of the input's **output address**, a 16-bit
multicast mask. The chain therefore books at most one slot per pair: the
first slot that is free for both ports and does not lie beyond the
threshold.

**Rows share input status; columns pass output status along.** Every
scheduler in a row sees the same input status array. The bookings of the
whole row are ORed (`e_bus`) into one schedule word. Several outputs may
therefore book the same slot for one input. That is how a multicast cell
goes to several outputs in a single slot: the fabric broadcasts every input
to all outputs anyway. An output, however, can take only one cell per slot.
So each column's output status array ripples from row to row, and each row
sees the bookings of the rows before it. All of this is combinational and
settles within one slot (the original circuit did it in about 21 ns of the
40 ns).

**Priority** is a discard priority. The 4-bit code `v` is decoded to a
one-hot array with bit `v` set. The cell may use slots 1 to `v+1`: code 15
allows all 16 slots, code 11 the first twelve. A low-priority cell that finds
no free slot within its threshold is dropped, even if later slots are free.

### Fairness: the rotating entry row

If the status array always entered a column at row 1, input 1 would always
have first choice. Instead, the clock generator keeps a second one-hot
register that advances one row per slot (`fair_ptr`). In the pointed row,
the comparison unit's fairness switch does two things:

* it sends the column's *fresh* status array, coming straight from the
  output status register, to the row below, which becomes the **entry row**;
* it returns its *own* updated array (`t`) to the output status register.

The array thus goes once round the ring of rows, starting just below the
pointer and ending at it. Over 16 slots, every input has first choice equally
often.

Structurally, the ring is a closed combinational path: 16 columns x 16 bits.
Verilator (`UNOPTFLAT`) and yosys ("logic loop") both report it. It is opened
in exactly one row per slot, by the one-hot pointer, so no signal ever depends
on itself. It is kept because it is the structure of the original design. A
loop-free version would need a second copy of the column chain or a rotating
multiplexer in front of every row.

### Status registers and the input address

* `input_status_register`, one per row, holds:
  * the serial output-address register and the serial priority register;
  * the 4:16 priority decoder;
  * the input status array. At `slot_end` it becomes `(status | e_bus) >> 1`,
    so slot 2 becomes slot 1 and slot 16 is new and free;
  * a parallel-in serial-out register that returns the schedule word to the
    IPC.
* `output_status_register`, one per column, stores the returned array,
  shifted in the same way.
* Each elementary scheduler also keeps a 16-bit **schedule register**: the
  slots this input-output pair has booked. It is shifted once per slot. The
  bit that falls out is the pair's booking for a slot that is now due. The
  16 bits of a column, one per row, form the one-hot **input address** of
  that output. They are shifted out to the switch matrix, row 16 first.

## The input port controller

The **header processor** drops idle cells. It recognises them by the header
octets `00 00 00 01`. For a user cell, the low 6 bits of the VCI index a
64-entry routing table. The entry gives the output mask, the priority code
and the outgoing VPI/VCI. The header is rewritten with the new labels and a
recomputed HEC (CRC-8, x^8+x^2+x+1, XOR 0x55). The table is written through
the `cfg_*` ports.

The **main buffer** holds 16 memory units, one per future slot. A unit does
not stand for a fixed slot. The **read controller** is a one-hot pointer that
advances one unit per slot. The unit under the pointer is the one being
emptied, so it now stands for slot 16. The unit to its left stands for
slot 1, the next one for slot 2, and so on.

The **write controller** turns the serial schedule word into write enables
that match this rotating numbering. It is a circular shift register, and
every bit of it can act as the entry point. The entry bit is the one to the
left of the read pointer: pointer on #N gives entry #N+1. The schedule
arrives slot 16 first and the register shifts left each clock. After 16
clocks, slot 1 sits at the entry bit, slot 2 to its left, and slot 16 on the
pointed unit. At the end of the slot the cell in buffer #3 is written into
every unit whose bit is set: one unit for a unicast cell, several for a
multicast cell booked into different slots. From then on, the pointer
reaches each copy exactly one slot before its booked slot. The copy is moved
into buffer #4 and drives the fabric during the booked slot.

## The switch matrix

`crosspoint_switch` broadcasts all 16 input cells to 16 `selector_slice`s.
Each slice shifts in its 16-bit one-hot input address during one slot. At
`slot_end` it copies the address into its configuration latch, and during
the next slot its 16:1 multiplexer connects that input to the output. All
outputs are reconfigured at the same edge, once per slot. Several slices
that select the same input multicast its cell.

## Interfaces of the top (`atm_switch`)

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (400 MHz in the original), asynchronous active-low reset |
| `cfg_we`, `cfg_port`, `cfg_addr`, `cfg_data` | in | routing-table write: port, entry, `route_t` {out_mask, prio, new_vpi, new_vci} |
| `cells_in[16]`, `cells_in_valid` | in | one 424-bit cell per port, header in the top 40 bits, taken at `slot_end` |
| `cells_out[16]`, `cells_out_valid` | out | switched cells, stable for a whole slot |
| `slot_end`, `fair_ptr` | out | slot timing and fairness pointer |
| `idle_drop`, `unsched_drop`, `stored` | out | per-port events, pulsed at `slot_end` |

Parameters: `N = 16` (ports, scheduled slots and clocks per slot, which must
be equal because every serial word is one slot long), `CW = 424` (cell
bits), `RB = 6` (routing-table index bits).

## Where this RTL departs from the original

* **One extra slot for the input address.** The original text does not pin
  down where a booking dropped from the schedule register meets the cell.
  The IPC's buffer scheme (three buffers before the write, entry bit left of
  the pointer, buffer #4) delivers a booked cell one slot later than the
  address would arrive if it were sent straight on. Each elementary scheduler
  therefore holds the dropped bit for one slot (`ia_hold`) before it enters
  the input-address shift chain.
* Wired-OR buses and tri-state returns are replaced by OR gates and drivers
  that output 0. Pass-transistor multiplexers become ordinary multiplexers.
* A cell is a 424-bit word moved once per slot, not a 10 Gb/s serial stream.
  Clock buffering, pads and power distribution are physical and not modelled.
* The header processor's idle pattern, routing table, label translation and
  HEC are this design's choices; the original only states that idle cells are
  dropped and routing information is updated.
* Per-unit valid bits in the main buffer, the observation outputs and the
  bit order of the serial output address and priority code are this design's
  choices. The priority code is sent most significant bit first, in the last
  four clocks of the slot.
* Reset is asynchronous and active low. It clears all status arrays and
  requests and puts both clock-generator pointers on bit 1.
* The speed-up-of-two variant and the look-ahead blocking chain, which the
  original discusses only as possible improvements, are not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_comparison_unit`: all 64 input cases against the unit's four truth
  tables.
* `tb_elementary_scheduler`: a first-fit reference, including the worked
  example. Input `0000_0000_0111_1101` against output `1111_0000_0000_1111`
  books slot 8; with threshold 12 it still books slot 8; with threshold 7 it
  books nothing. A 7-slot example, input `0010011` against output
  `0000101`, books slot 4.
* `tb_output_scheduler`: the whole array against a status-array model of the
  algorithm (rotating entry row, thresholds, multicast). Every serial
  schedule and input-address bit is compared for 120 slots of random traffic.
* `tb_input_port_controller`: the testbench plays the scheduler and checks
  requests, drops and delivery slots.
* `tb_atm_switch`: the whole switch at its default size for 160 slots. Every
  output in every slot is compared with the model's prediction. The test
  counts unicast, multicast in one slot and over several slots, output
  contention, priority drops, unscheduled drops, idle drops and fairness. It
  fails if any of them never occurs. It takes about 1.5 minutes.
* `tb_broadcast_burst`: the worst case for the scheduler's combinational
  path, at full size. In one slot every input sends a cell to all 16 outputs,
  so all 256 elementary schedulers are enabled together. Each row must get
  its own slot at every output, and every column's status array must fill
  all 16 slots in that one comparison. In the next slot a second burst finds
  the outputs booked for 15 slots: one cell gets slot 16 and 15 are dropped.
  It checks every row's schedule, every returned status array, the flags and
  every output cell. It takes about 1.5 minutes.
* The remaining testbenches cover the decoder, status registers, clock
  generator, read/write controllers, main buffer, header processor
  (including the HEC of the standard idle cell, 0x52), selector slice and
  fabric.

Concurrent assertions check the main invariants:

* one booking per request;
* bookings only in free slots;
* no double booking of an input;
* a one-hot fairness pointer;
* no overwrite of an occupied memory unit;
* a cell present whenever a selector is configured.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/atm_pkg.sv tb/tb_atm_switch.sv \
          --top-module tb_atm_switch -o sim
./obj_dir/sim
```

Replace `atm_switch` with any module name to run its testbench. The
testbenches need no other files.

## Files

`rtl/atm_pkg.sv` holds the shared sizes, the header and routing types, and
the HEC function. Every other file in `rtl/` holds one module, named after
the file. The top is `atm_switch`, which contains `output_scheduler`
(`clock_generator`, `input_status_register` with `priority_decoder`,
`elementary_scheduler` with `comparison_unit`, `output_status_register`),
`input_port_controller` (`header_processor`, `main_buffer` with
`read_controller` and `write_controller`) and `crosspoint_switch`
(`selector_slice`). `tb/tb_<module>.sv` is the testbench of each module, and
`tb/tb_broadcast_burst.sv` is the worst-case load test.
