# ABR traffic server FPGA for an ATM switch

An ATM switch that carries ABR (available bit rate) traffic must pace the cells
of each output link at the rate that link can actually take, react quickly
when a link's buffer behind the switch fabric fills up, and resend cells the
fabric refused. This RTL is the FPGA of such an "ABR server" card. Three
parts share the work:

- A **scheduler** that decides *which output link (flow group) may send next*.
  It does not keep a sorted list of deadlines. Instead it sweeps all flow
  groups, one per clock cycle, and picks the ones whose turn has come.
- A **sender** that turns each decision into a cell. It asks the queue manager
  for the cell, hands the cell to the bus, and reads the bus's verdict. A
  refused cell is read again from memory and resent.
- The **cell paths**: four utopia interfaces and the forwarder and demux that
  move cells between the bus, the cell processor and the memory FIFOs.

The queue manager (per-connection queues in SDRAM), its SDRAM controller and
the CPU interface belong to the same FPGA but are not part of this RTL. Their
connections are ports of the top module `abr_server_fpga`.

## Scheduling by sweeping

`N_FG` flow groups (default 128) are visited in turn by a counter, one group
per cycle. A full sweep is one **virtual-time unit**, which is `N_FG` cycles.
The virtual time counts sweeps.

Each group has a **service interval** and a **service time**. Both are fixed
point with 16 integer and 8 fraction bits, in virtual-time units.

- A group is due when the integer part of its service time equals the
  virtual time.
- When it is due, its service time becomes `old + interval`, wrapping at 2^16
  units.
- The fraction is kept, so the average rate can lie between whole sweeps. With
  interval 2.3 the group is served at virtual times 0, 2, 4, 6, 9, 11, 13, 16, ...
- Interval 1.0 is the fastest rate: one cell per sweep. With 128 groups at
  50 MHz that is 424 bits / 2.56 us = 165.6 Mbit/s per group. Fewer groups
  give a faster maximum rate per group, for example 1325 Mbit/s with 16 groups.
- The CPU sets a group's rate by writing its interval (`si_wr`).

Every visited group goes through a four-stage pipeline. Five memories sit
under it: service interval, service time, back off, empty flag, and
congestion/nack flags.

- Stage 1 addresses the memories.
- Stage 2 reads them.
- Stage 3 decides.
- Stage 4 writes back and pushes the group's id into the **eligible FIFO**.

A due group is eligible when all of these hold:

- its back-off counter is zero;
- it either has cells (empty flag clear) or has a refused cell to resend
  (nack flag set).

### Back off

The sender passes the bus's congestion indication to the scheduler. The
scheduler then backs the group off exponentially:

- Each congested service raises the group's back-off exponent `e`.
- Each uncongested service lowers it.
- The back-off counter is loaded with `2^e - 1`. While it is not zero, each
  due time only decrements it and the group is skipped.
- So every step halves or doubles the group's rate. Groups that share a
  congested buffer slow down at once and recover step by step.

### Stall

The eligible FIFO holds 10 ids.

- When it holds 9 (the stall threshold), the scheduler **stalls**. The check in
  the last pipeline stage still completes, so the FIFO can reach 10.
- The checks behind it are flushed. The group counter and the virtual time are
  wound back to the oldest flushed group.
- Scheduling resumes when the FIFO is down to 5 (the initiate threshold), as if
  the sweep had simply paused.
- Stalling slows every group in proportion, rather than dropping the services
  of whichever groups come next.

### Initialisation

After `aclr` the scheduler and the sender fill their memories with defaults
(interval 1.0, service time 0, no back off, empty, invalid pointers). They
start after `N_FG + 3` cycles; `init_done` rises then.

## The sender: new cell or retransmission

For each flow group the sender keeps one **cell pointer** (22 bits) and a
**pointer status**:

| status  | meaning | next service of the group |
|---------|---------|---------------------------|
| invalid | last cell delivered | *dequeue* request: the queue manager picks the group's next cell |
| valid   | last cell refused by the bus | *cell read* request for the kept pointer: the same cell again |
| unknown | last cell handed to the bus, verdict not back yet | wait |

The status memory is 16 bits wide, so each entry uses two words.

- The even word holds the status and the six low pointer bits.
- The odd word holds the 16 high pointer bits.
- Changing a status is therefore a read-modify-write.

The sender is one FSM with two hubs. The FWD hub serves, in priority order:

1. A **control/RM cell** from the cell processor, when the forwarder is free.
2. The **queue manager's answer**, when the forwarder is free. This writes the
   pointer with status unknown and starts the forwarder.
3. A **bus verdict**. An ack marks the pointer invalid and puts it in the free
   cell pointer FIFO, for the queue manager to recycle. A nack marks it valid.
   Either way the scheduler learns the congestion and nack bits.
4. Otherwise the SERVE hub takes the next eligible id. A group left waiting on
   an unknown status is re-checked first.

The **cell history FIFO** pairs verdicts with cells.

- It holds, in bus order, the group of each cell sent, or a flag for a control
  cell. Control-cell verdicts are discarded.
- It has seven entries, so at most seven cells are on the bus at once. The free
  cell pointer FIFO also has seven entries.

Only one queue-manager request is outstanding at a time. Issuing a request
takes 6 cycles; handling a verdict takes about 6, and starting the forwarder 3.

## Cell paths and the utopia links

A cell is 52 bytes on every link: four header bytes and 48 payload bytes, with
no HEC. Its size on each path:

| path | width | units per cell |
|------|-------|----------------|
| links to the bus device | 16 bits | 26 words |
| links to the cell processor | 8 bits | 52 bytes |
| cell enqueue and dequeue FIFOs | 64 bits | 7 words |

In the 64-bit FIFOs each word holds four 16-bit words, the first in bits 63:48.
The lower half of the seventh word is zero.

| interface | role | direction | policy |
|-----------|------|-----------|--------|
| `utopia_phy_tx` | 16-bit, physical-layer side | FPGA to bus device (`ci*` pins) | cut-through |
| `utopia_phy_rx` | 16-bit, physical-layer side | bus device to FPGA (`co*` pins) | store-and-forward |
| `utopia_atm_tx` | 8-bit, ATM-layer side | FPGA to cell processor (`tx*` pins) | cut-through |
| `utopia_atm_rx` | 8-bit, ATM-layer side | cell processor to FPGA (`rx*` pins) | store-and-forward |

Each interface has a dual-clock FIFO of 256 entries. The link runs on its own
clock, and the internal side on `clk`. Two counters run in the link clock
domain:

- A **word counter** counts the words of the current cell.
- A **cell counter** counts the cells held.

Flow control to the internal side uses a few signals:

- Transmitters raise `cellspc` while at least one more cell fits. The writer
  pulses `cellinc` when it begins a cell.
- Receivers raise `cellav` while a whole cell is held. The reader pulses
  `celldec` after taking one.
- `synchro` (two flip-flops) carries a level across the clock domains.
  `synchro_pulse` turns each rising edge into one pulse in the other domain.
  It goes via a toggle, so fast single-cycle pulses are not lost.
- A start-of-cell inside a cell raises `socerr`.

Cut-through means a transmitter announces a cell as soon as the writer has
begun it. The writer must therefore stay ahead of the link. The forwarder
writes a data cell at one word per cycle and a control cell at one word per
two cycles, so the 16-bit link clock should be at most half of `clk`.

The **forwarder** takes start commands from the sender (`fw_start`,
`fw_cltype`, `fw_ready`). For each it waits for `cellspc` and then writes one
cell into the 16-bit transmitter. The cell comes either from the 64-bit
dequeue FIFO or from the byte FIFO of `utopia_atm_rx`.

The **demux** reads each received cell and looks at the payload type in the
fourth header byte. PTI `110` marks an RM cell.

- If `rm_to_cp` is set, RM cells go byte by byte to the cell processor.
- All other cells are packed into the 64-bit enqueue FIFO for the queue
  manager.

The **cong/ack handler** queues the bus device's per-cell verdicts
(`res_valid`, `res_ack`, `res_cong`) for the sender.

## Top-level ports (`abr_server_fpga`)

| group | ports |
|-------|-------|
| clock and reset | `clk` (50 MHz in the original system), `aclr`, `init_done` |
| CPU interface | `si_wr/si_wraddr/si_wrdata` (service interval, 16.8 fixed point), `rm_to_cp` |
| queue manager | `em_wr/em_wraddr/em_wrdata` (empty flags) |
| | request handshake: `qm_opavail`, `qm_op` (dequeue or read), `qm_operand`, `qm_take`, `qm_done`, `qm_opvalid`, `qm_deqptr` |
| | `free_rdreq/free_ptr/free_empty` |
| | enqueue FIFO read: `enq_rdreq/enq_data/enq_empty` |
| | dequeue FIFO write: `dq_wrreq/dq_data/dq_count` |
| bus device | `res_valid/res_ack/res_cong` |
| | `ciclk, ciclav, cienb_n, cisoc, cidata[15:0]` |
| | `coclk, coclav, coenb_n, cosoc, codata[15:0]` |
| cell processor | `txclk, txclav, txenb_n, txsoc, txdata[7:0]` |
| | `rxclk, rxclav, rxenb_n, rxsoc, rxdata[7:0]` |
| monitoring | `vtime`, `elig_count`, `stalled` |
| | event pulses: `ev_stall`, `ev_backoff`, `ev_elig`, `ev_retx`, `ev_wait_unknown`, `ev_deq_fail`, `ev_ctrl_cell`, `ev_rm_cell`, `ev_data_cell` |
| | `socerr_bus`, `socerr_cp`, sticky `overflow` |

### Queue-manager request handshake

1. The sender raises `qm_opavail` with `qm_op` and `qm_operand`. The operand is
   a group id for a dequeue, or a pointer for a read.
2. The queue manager pulses `qm_take` when it has taken the request.
3. It writes the cell's seven words into the dequeue FIFO.
4. It pulses `qm_done`, with `qm_opvalid` and the dequeued pointer. A dequeue
   that finds no cell answers with `qm_opvalid` low.

The queue manager should set a group's empty flag when its queue empties, and
clear it when a cell arrives.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `N_FG` | 128 | scheduler, sender, top |
| `ELIG_DEPTH` | 10 (stall at 9, resume at 5) | scheduler, top |
| `FREE_DEPTH`, `HIST_DEPTH` | 7 | sender, top |
| `RES_DEPTH` | 8 | cong/ack handler |
| `CELLQ_DEPTH` | 256 words of 64 bits | enqueue and dequeue FIFOs |
| `UTOPIA_WORDS` | 256 | each utopia FIFO |
| `HOLDOFF` | 16 cycles | forwarder, demux: wait after `celldec` for the receiver's synchronised counter to follow |

Shared widths and types are in `rtl/abr_pkg.sv`.

## How closely this follows the original design

Taken from the original design description:

- the block partition;
- the scheduler's sweep, pipeline, memories, update formula, eligibility rule,
  thresholds and initialisation time;
- the sender's status scheme, FIFOs, priorities and handshake names;
- the utopia counters, synchronisers and policies;
- the 16/8-bit widths and the 64-bit cell FIFOs.

Choices made here, where that description is silent or ambiguous:

- **Number formats.** The fixed-point format, the back-off exponent encoding
  and the status encoding.
- **Status memory layout.** The description gives two layouts that disagree.
  This RTL follows the drawn one: status with the low pointer bits.
- **Eligible FIFO size.** Drawn with 10 entries. Elsewhere the text says a
  register FIFO should not exceed 7 entries. The drawing was followed.
- **Unknown status.** The sender waits for the verdict, as the FSM drawing
  shows. The text prefers skipping the group. Verdicts and control cells keep
  flowing while it waits.
- **Stall rewind.** How the counter is wound back on a stall.
- **Bus verdict interface.** The verdict strobe, the cong/ack handler's FIFO,
  `qm_take`, and the 52-byte cell packing.
- **Demux details.** The PTI test and the `rm_to_cp` switch. RM cells that are
  not passed to the cell processor are enqueued like data.
- **Utopia details.** The 8-bit pin names (utopia-standard), FIFO sizes, and
  the one-cell margin on `cellspc`/`coclav`.

Not built:

- the queue manager with its SDRAM controller, and the CPU interface;
- the proposed extensions, which are MCR-aggregated flow groups and a pool of
  unacknowledged cells per bus device.
- passing the congestion bit of a control cell's verdict to the scheduler. The
  original drops the whole verdict of a control or RM cell and names this as a
  later correction; this RTL drops it too.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Directed cases come
first, then random traffic compared against a small model. Two examples:

- The scheduler test gives all groups random fractional intervals. Each
  group's gaps must be the two integers around its interval, and the total
  span must match the sum of the intervals.
- The sender test makes 300 random services with random verdicts, control
  cells and empty dequeues. It follows each group's pointer status: dequeue,
  read of the kept pointer, or release.

`tb_abr_server_fpga` runs the whole FPGA with all parameters at their
defaults. Behavioural stand-ins play the other parts of the card:

- The bus device injects 384 data cells (3 per group) and 12 RM cells. It
  takes outgoing cells and returns verdicts, with random nacks and congestion.
- The queue manager keeps per-group queues, the empty flags and a pointer pool.
- The cell processor sends 12 control cells and receives the RM cells.
- The CPU writes random intervals from 1.0 to 4.0.

The testbench checks these properties:

- every data cell arrives intact, in order per group, and is acknowledged
  exactly once;
- a refused cell is resent before the group's next cell;
- no group ever has two cells on the bus;
- pointers are freed exactly once;
- control and RM cells arrive intact;
- nothing overflows.

It also counts each mechanism and fails if one never happens:

- stall;
- back-off skip;
- retransmission;
- wait on an unknown status;
- failed dequeue;
- control cell;
- RM cell to the cell processor;
- enqueue;
- start-of-cell error, once on each of the two receivers.

A typical run sees about 90 stalls, 36 retransmissions and 15 failed
dequeues, in about 650 us of simulated time.

To run a testbench with Verilator (example for the top):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_abr_server_fpga \
    rtl/abr_pkg.sv rtl/*.sv tb/tb_abr_server_fpga.sv
./obj_dir/Vtb_abr_server_fpga
```

`rtl/abr_pkg.sv` must come first. Listing it twice through `rtl/*.sv` is
harmless, or list the files explicitly. Replace the top and testbench names
for another block.

`tb_sender_rate` measures the sender's cost per cell at full load, with
128 groups, a queue manager that answers at once, and immediate
acknowledges:

- 16.04 cycles per cell in all, 15.04 of them in the sender and 1 waiting for
  the queue manager;
- about 1.32 Gbit/s of outgoing cells at 50 MHz;
- the budget is 6 cycles to issue a request, 6 to handle a verdict and 3 to
  start the forwarder.

Verilator lint notes that remain, all understood:

- `SYNCASYNCNET`: the reset is an asynchronous clear in the flip-flops, and
  the assertions also sample it as `disable iff`. Only the assertions use it
  synchronously.
- `UNUSEDSIGNAL` and `PINCONNECTEMPTY`: FIFO status outputs with no user in
  this design, such as `full`, `count` and history overflow. The sender also
  keeps only the pointer bits it needs from some status words.
- `UNUSEDPARAM`: package constants that are kept as documentation of the cell
  and pointer formats.

Limits of the evidence:

- Timing closure on a real device has not been tried.
- The real queue manager needs about 40 cycles per cell. It, not the sender,
  would limit the card to about 0.5 Gbit/s.
