# Shared multibuffer ATM switch with separate multicast queues

This is synthesizable SystemVerilog for a 4 x 4 ATM cell switch. The switch
buffers cells in several shared memories and is tuned for traffic that mixes
unicast and multicast cells.

In a shared multibuffer switch the cells wait in a few ordinary memory banks
(SBMs, *shared buffer memories*). Each output port sees its cells only as a
queue of addresses. The weakness is head-of-line (HOL) blocking between banks.
If the next cells of several output ports all sit in the same bank, only one of
them can be read in a read cycle, and the other ports go idle. Multicast cells
make this worse when they share the unicast queues.

This design treats multicast in three ways:

* **Separate queues.** Unicast addresses wait in one FIFO per output port.
  Multicast addresses wait in one queue per multicast connection identifier
  (MCI). A multicast cell is stored once. Each destination port reads it
  through its own read pointer.
* **Three read cycles per cell slot.** Unicast head cells are read in all
  three cycles. Multicast head cells are read only in the third cycle, and
  only from banks that no unicast read uses in that cycle. So multicast
  traffic never adds to the HOL blocking of unicast cells.
* **Two candidates per output port.** Each output port can end a slot with
  one unicast cell and one multicast cell. An output mask sends the one whose
  queue is longer.

## Cell slot, links and rates

All blocks work off one slot counter `t`, which runs 0..53. Each link carries
one byte per clock:

| slot cycle | input link           | output link           |
|------------|----------------------|-----------------------|
| 0          | routing tag byte     | cell byte 0, `out_soc` |
| 1..53      | cell bytes 0..52     | bytes 1..52, then idle |

The routing tag (`switch_pkg::tag_t`) is `{valid, mcast, dest[5:0]}`. `dest` is
the output port for a unicast cell and the MCI for a multicast cell. An input
sends its tag in the cycle in which `slot_start` is high.

At the intended 20 MHz clock a 54-cycle slot lasts 2.70 us. An STM-1 link
(155.52 Mbit/s) delivers one 424-bit cell every 2.73 us, so each port keeps up
with an STM-1 source.

Inside a slot the work happens at fixed cycles (`switch_pkg`):

| cycle | what happens |
|-------|--------------|
| 53 (previous slot) | input cell complete: it moves to the input holding buffer; the output links load their next cells |
| 1  (`T_WRITE`)  | every held input cell is written into its own SBM, and its (SBM, address) is queued |
| 2, 3, 4 (`T_READ1`..) | read cycles 1, 2, 3 |
| 3, 4, 5 | read data comes back through the output MUX into the port's unicast or multicast place |
| 6  (`T_DECIDE`) | output mask: one cell per port is chosen and its queue is popped |
| 7..10 (`T_UFREE+p`) | address of the unicast cell sent by port p returns to the idle queues |
| 11..18 (`T_MFREE+m`) | oldest cell of MCI m is released if all its destinations have read it |

A cell that meets no contention leaves 108 clocks (two slots) after its tag
byte arrived.

## Read scheduling (`sbm_rw_ctrl`, `output_ctrl`)

This is the core of the design. Each bank gives at most one read per read
cycle.

*Unicast, read cycles 1–3.* Every output port whose unicast queue is not
empty, and whose head cell has not yet been read in this slot, asks for the
bank that holds its head cell. If several ports ask for one bank, the port
with the longer unicast queue wins; a tie goes to the lower port number. A
port gets at most one unicast cell per slot. Three cycles therefore resolve
up to three ports blocked on the same bank.

*Multicast, read cycle 3.* For each port, `multicast_aq_ctrl` offers the head
cell of the MCI whose queue holds the most cells not yet read by that port
(ties go to the lower MCI). The cell is read only if no unicast read uses its
bank in cycle 3. Among multicast requests for one bank the longer queue wins.
One read serves one port, even if two ports want the same multicast cell.

*Output mask.* At `T_DECIDE` a port that holds both kinds of cell sends the
one whose queue was longer at read time; a tie sends the unicast cell. Only
the chosen cell is popped. The other stays at its queue head and is read
again in a later slot.

Worked example (checked by `tb_sbm_rw_ctrl`; ports and banks numbered from 1):

* Unicast heads: ports 1, 2 and 4 in bank 2, port 3 in bank 4. Priority by
  queue length is 3 > 1 > 2 > 4.
* Multicast heads: port 2 in bank 2, port 1 in bank 3, ports 3 and 4 in
  bank 4. Priority is 2 > 1 > 3 > 4.

Result:

* Read cycle 1 serves port 3 from bank 4 and port 1 from bank 2.
* Cycle 2 serves port 2 from bank 2.
* Cycle 3 serves port 4's unicast cell from bank 2. That blocks port 2's
  multicast cell. Cycle 3 also reads the multicast cells of ports 1 (bank 3)
  and 3 (bank 4). Port 4's multicast cell loses bank 4 to port 3.

## Multicast queues (`multicast_aq_ctrl`)

`cfg_we`/`cfg_mci`/`cfg_dests` set the destination ports of each MCI when the
connection is set up.

Each MCI queue entry holds the cell's (SBM, address) and a pending mask of the
destinations that have not read it yet. There is one read pointer per
(MCI, port). A port that is not a destination keeps its pointer at the queue
end. When the oldest entry has no pending destination left, its address goes
back to the idle queues, checked once per slot per MCI.

A multicast cell is refused (and dropped) in two cases: its MCI has no
destinations, or its queue is full.

## Buffer management (`sbm_rw_ctrl`, `idle_aq_ctrl`, `unicast_aq_ctrl`)

`idle_aq_ctrl` keeps one FIFO of free addresses per bank. Its fill level is
the bank's vacancy. In the write cycle the banks are ranked by vacancy (most
free first, ties to the lower bank). The k-th cell accepted in that slot,
counting inputs in port order, goes into the bank of rank k. So the cells of
one slot land in different banks, the emptier ones first, and the eight banks
behave like one memory.

After reset the never-used addresses come from a counter, so no FIFO has to be
preloaded.

A cell is dropped and reported on `cell_drop[i]` in two cases: its address
queue is full, or no bank of its rank has room. Several cells for the same
unicast port can arrive in one slot; they join that port's FIFO in one clock,
in input order.

## Parameters (top `atm_switch`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N_PORTS` | 4 | input and output ports |
| `N_SBM` | 8 | shared buffer memories |
| `CELLS_PER_PORT` | 128 | buffer size per port |
| `SBM_DEPTH` | 64 | cells per bank = 4 x 128 / 8 |
| `UQ_DEPTH` | 128 | unicast address FIFO per output port |
| `N_MCI` | 8 | multicast connections (own choice) |
| `MQ_DEPTH` | 32 | entries per multicast queue (own choice) |

The cell size (53 bytes) and the slot plan are fixed in `switch_pkg`. The tag
byte limits `N_PORTS` and `N_MCI` to 64. The release schedule limits
`N_PORTS` to 8 and `N_MCI` to 42. Elaboration-time assertions check these
limits.

## Files

| file | block |
|------|-------|
| `rtl/switch_pkg.sv` | cell and tag types, slot plan |
| `rtl/atm_switch.sv` | top: wires everything below |
| `rtl/input_rotation_buffer.sv` | per-port byte-to-cell assembly and holding buffer |
| `rtl/input_demux.sv` | input cell to chosen bank |
| `rtl/sbm.sv` | one bank: single-port RAM of whole cells, 1-clock read |
| `rtl/sbm_rw_ctrl.sv` | slot counter, write bank choice, three read cycles |
| `rtl/unicast_aq_ctrl.sv` | per-port address FIFOs |
| `rtl/multicast_aq_ctrl.sv` | per-MCI queues, per-port read pointers, release |
| `rtl/idle_aq_ctrl.sv` | per-bank free-address FIFOs, vacancy |
| `rtl/output_mux.sv` | bank data to each port's unicast/multicast place |
| `rtl/output_ctrl.sv` | the two places per port, output mask, pops, unicast release |
| `rtl/output_rotation_buffer.sv` | chosen cell to byte-serial output link |

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`.

* `tb_atm_switch` runs the whole switch at its default sizes. It checks
  latency, slot length, cell integrity and order, and that every cell is
  either delivered to each destination or reported dropped. It also requires
  that every mechanism above occurs at least once: reads in each read cycle,
  multicast reads and blocked multicast reads, both output-mask outcomes, and
  both kinds of overflow.
* `tb_workloads` measures throughput under random and bursty traffic, mixed and unicast-only.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -y rtl rtl/switch_pkg.sv tb/tb_atm_switch.sv \
          --top-module tb_atm_switch -Mdir obj_top
./obj_top/Vtb_atm_switch
```

Replace `tb_atm_switch` with any other testbench name. The package must be
named first; `-y rtl` finds the modules. Each test runs in a few seconds at
most.

## Measured throughput

`tb_workloads` runs the defaults for 1500 measured slots per point. Throughput
is the delivered cell copies divided by the offered copies in the window. The
multicast arrival rate is 0.01 per input and slot in the mixed runs and 0 in
the unicast-only runs. Bursts have a mean length of 10 cells, all to one
destination.

| traffic | fanout | offered load | throughput |
|---------|--------|--------------|------------|
| random mixed | 2 | 0.97 / 1.00 | 0.993 / 0.975 |
| random mixed | 3 | 0.97 / 1.00 | 0.979 / 0.971 |
| random mixed | 4 | 0.97 / 1.00 | 0.968 / 0.952 |
| random unicast only | – | 0.97 / 1.00 | 0.996 / 0.984 |
| bursty unicast only | – | 0.97 / 1.00 | 0.946 / 0.950 |
| bursty mixed | 3 | 0.95 / 0.99 / 1.00 | 0.941 / 0.936 / 0.876 |

Under bursty traffic the losses come from full unicast queues and banks
(128 cells per port), which the runs report as drops.

The figures depend on the random seed and on the short window. Treat them as
plausibility checks, not as a reproduction of published curves. The test
demands only 0.80.

## Where this design makes its own choices

* **Rotation buffers.** The input and output "rotation buffers" here are
  plain per-port serial/parallel double buffers. They do not stagger ports
  in time.
* **Routing.** There is no header translation (VPI/VCI lookup). The routing
  tag byte in front of each cell stands in for it.
* **Overflow.** Drops on full queues or full banks, and the `cell_drop`
  report, are this design's policy.
* **Tie-breaks.** All tie rules (lower port, lower bank, lower MCI, unicast
  over multicast) are own choices.
* **The cell the output mask does not send** is read again in a later slot.
  It is not kept in an output buffer.
* **Multicast read condition.** The architecture can be read two ways: (a) a
  multicast cell is read whenever its bank is free of unicast reads in cycle
  3, or (b) only when no unicast head cell at all is left unread. This RTL
  implements (a), which matches the worked example.
* **Connection set-up.** The configuration port is own. Changing an MCI's
  destinations while it has queued cells cancels the removed ports' pending
  reads.
* **Reset.** An active-low asynchronous reset clears pointers and control
  state. Memory contents are not cleared.
* **Physical implementation.** The SBMs are written as arrays, not as
  technology RAM macros. Nothing here models process, power or timing
  closure.
