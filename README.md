# Queue scheduler for a two-interface egress path

This is a fair scheduler for up to 600 egress queues that share one or two
destination interfaces. The queued data lives in an external queue manager;
the scheduler never touches it. The scheduler only learns which queues hold
data, decides which queue sends next, and asks the queue manager for one
64-byte segment at a time. Each decision combines four things:

- back-pressure from the destination FIFOs;
- per-port readiness reported by polling;
- a per-port bandwidth cap;
- a programmable fairness policy: port priority, class calendar or strict
  class priority, and a port calendar.

Packets are sent segment by segment. Contiguity rules decide whether a port,
or the whole scheduler, may switch queues in the middle of a packet.

The RTL is SystemVerilog. It lints cleanly with Verilator and elaborates in
Yosys/slang. Every block has a self-checking testbench, and the whole design
runs end to end at full size (267 ports, 600 queues, 512-entry port calendar).

## Queues, ports and classes

A queue is a (port, class) pair. The two `PORT_CFG` pins pick one of three
configurations:

| PORT_CFG | ports | classes per port | queues |
|---|---|---|---|
| 0 | 75 | 8 | 600 |
| 1 | 147 | 4 | 588 |
| 2 | 267 | 2 | 534 |

The status memory uses the flat queue index `port * classes_per_port + class`.
Class numbers rank priority: the highest class number is the highest priority.

There are two destination interfaces, identified by 3-bit ids on the pins
`IFID1` and `IFID2`. Each activation carries the interface of its queue.
`IFID2 = 3'b111` means traffic for interface 2 goes to *both* interfaces. The
status memory stores one bit per queue for "feeds interface 2".

## Interfaces (all on `sysclk` unless noted)

| group | signals | meaning |
|---|---|---|
| queue status | `queue_act`, `port_id`, `class_id`, `if_id` | one-cycle activation: the queue now holds data. It is ignored (and counted) if the port, class or interface is invalid. |
| queue request | `qs_req`, `qs_req_port_id`, `qs_req_class_id` | request one segment; held until `qs_ack` |
| | `qs_ack`, `queue_deact`, `qs_ack_err` | one-cycle answer. `queue_deact` means the queue is now empty. `qs_ack_err` means the queue had nothing: no segment will follow. |
| | `egress_dstart`, `egress_data[4:0]` | control data of a segment: `{OAM, EOP, IFID[2:0]}` |
| FIFO status | `afull_1`, `afull_2` | destination FIFO almost full, per interface |
| port selection status (`mpbclk`) | `sel_addr_valid`, `sel_addr` | a segment for port `sel_addr` has been taken by the destination |
| port polling (`mpbclk`) | `poll_resp`, `poll_resp_addr` | port `poll_resp_addr` can accept a segment |
| configuration | `port_cfg`, `ifid1`, `ifid2` | static pins |
| register bus | `cbi_addr[11:0]`, `cbi_wr`, `cbi_rd`, `cbi_wdata[15:0]`, `cbi_rdata[15:0]` | synchronous word bus; reads return data one cycle after `cbi_rd` |

## One request at a time

`qs_req_ctrl` allows only one request in flight. A request starts with a
decision and ends when one of two things happens:

- the control data of its segment arrives; or
- `qs_ack_err` arrives, and then a new decision starts in the next cycle.

The controller cycles through four states:

1. **DECIDE.** Class selection offers a port priority and a class. The
   controller latches them and starts the port calendar search.
2. **SCAN.** The port calendar is walked 8 entries per cycle, so a full
   512-entry lap takes at most 64 cycles. If the port found is still qualified
   when the walk ends, the request is issued. If not, the controller decides
   again.
3. **REQ.** `qs_req` is held until `qs_ack`. If `queue_deact` comes with the
   acknowledgement, the queue's status bit is cleared.
4. **WAIT.** The controller waits for `egress_dstart` with an
   `egress_data[2:0]` that equals `IFID1` or `IFID2`. Control data for other
   interfaces is ignored. The EOP bit updates the port's packet state.

Calendar pointers move only when a request is actually issued. An abandoned
search therefore does not consume a calendar slot.

## Qualification

`qs_qualify` turns the raw status bits into *qualified* bits. A queue is
qualified only if all of the following hold:

- **It holds data**, inside the current configuration.
- **Its FIFO is not almost full.**
  - A queue for interface 1 needs `afull_1` low.
  - A queue for interface 2 needs `afull_2` low.
  - When `IFID2` is `3'b111`, a queue for interface 2 needs both flags low.
  - When `IFID1 = IFID2`, only `afull_1` matters.
- **Its port may be polled** (only when polling is enabled). See the next
  section.
- **Its port is under its bandwidth limit** (only when the limiter is
  enabled).
- **Contiguity allows it.**
  - *Queue contiguous mode* (global): after a segment that is not an end of
    packet, only that queue is qualified anywhere until its EOP.
  - *Port contiguous* ports (per-port bit): while a packet is in progress,
    the port offers only its in-progress class. A *port interleave* port may
    switch class after any segment.
- **Class promotion** (strict class priority only). A port contiguous port
  in mid-packet shows its in-progress queue at the position of the highest
  class that holds data in that port. It then competes at that priority,
  which stops a low-class packet on a busy port from blocking better traffic
  behind it. The request still names the in-progress class. Promotion is off
  while the class calendar is on or in queue contiguous mode.

One choice here is this design's own: a contiguous port whose in-progress
queue runs dry in mid-packet waits (offers nothing) until more data for that
queue arrives.

## Choosing a queue

Selection has three strict steps.

1. **Port priority.** Each port is configured high or low priority. If any
   high-priority port has a qualified queue, only high-priority ports take
   part.
2. **Class** (`qs_class_select`). Only qualified queues of ports with the
   chosen priority count.
   - **Class calendar off:** strict priority; the highest class with a
     qualified queue wins.
   - **Class calendar on:** the 32-entry calendar is walked from where it
     stopped last time *for this port priority*. There is one pointer per
     priority. The first entry naming a class with qualified traffic wins.
     Entries whose value is not a valid class are null and skipped.
   - **Super class:** when `CLASS_PRI_EN` is also set, the class in
     `PRI_CLASS` is taken first whenever it has traffic. It should not also
     appear in the calendar.

   The calendar sets minimum shares. A class with *n* of the 32 entries is
   guaranteed at least *n*/32 of the service opportunities when every class
   is busy. Unused opportunities fall to the next calendar entries.
3. **Port** (`qs_port_select`). The 512-entry port calendar is walked from the
   entry after the last one used for this priority. There is again one pointer
   per priority. The first entry naming a port with the chosen priority and a
   qualified queue in the chosen class wins. Entries that are not a valid port
   for the configuration are null.

   Bandwidth is shared by giving a port more entries. For example, fifteen
   ports with 5 entries each and five ports with 1 entry each (80 entries in
   use) on an 800 Mbit/s interface give 50 Mbit/s and 10 Mbit/s per port.

The port calendar resets to round robin (entry *i* holds port *i*). Every
class calendar entry resets to null, so the class calendar must be programmed
before it is enabled.

## Port polling and conditioning

Polling is enabled by `CTRL[4]`. The destination reports the ports that can
take a segment (`poll_resp`), and only those ports are selectable.

- **Request.** A request to a port clears its poll status and *conditions*
  the port. Poll responses that arrive while a port is conditioned are
  ignored.
- **Segment taken.** `sel_addr_valid` for the port removes the conditioning,
  and the next positive poll makes the port selectable again. A port
  therefore never has two segments outstanding at the destination.
- **QS_ACK_ERR.** The conditioning is removed and the poll status is
  restored, because no segment will ever produce a `sel_addr_valid`. This
  rule is this design's own.

Poll responses and selection status come from the 104 MHz `mpbclk` domain.
Both events are packed into one 20-bit word and crossed to `sysclk` by
`qs_poll_fifo`. This is an asynchronous FIFO with Gray-coded pointers and
two-flop synchronisers, 16 entries deep. The reader drains one entry per
`sysclk` cycle (200 MHz against at most one write per 104 MHz cycle), so it
cannot fall behind. If the FIFO were ever full, events would be dropped and a
sticky overflow bit set, visible in `STATUS[0]`.

## Bandwidth limiter

`qs_bw_limiter` caps each port at 17 segments (`MAX_LVL`) per *measurement
period*. The period is `MP_SETTING` unit periods, programmed per port;
setting 0 behaves as 1.

- One unit period is 2136 `sysclk` cycles (10.68 µs at 200 MHz). The design
  builds it as a sweep that visits one port every 8 cycles: 267 × 8 = 2136.
  Port *p* is visited at cycle `2136·k + 8·p + 7` of unit period *k*.
- On each visit the port's unit-period counter advances. When it reaches
  `MP_SETTING`, the port's level `TX_LVL` is cleared.
- Every segment granted without error increments `TX_LVL`. If a grant falls
  on the clearing visit itself, the new level is 1.
- While `TX_LVL` is 17 or more the port is not qualified.

The resulting maximum rate is `17 × 512 bit / (MP_SETTING × 10.68 µs)`. That
is 815 Mbit/s at 1, 204 Mbit/s at 4, 51 Mbit/s at 16, and 0.0125 Mbit/s at
0xFFFF.

## Registers

All registers are 16 bits wide and addressed by word.

| address | register | reset |
|---|---|---|
| 0x000 | CTRL: [0] queue contiguous mode, [1] CLASS_CAL_EN, [2] CLASS_PRI_EN, [3] class promotion, [4] polling, [5] BW_LIMIT_EN, [10:8] PRI_CLASS | 0 |
| 0x001 | REQ_CNT (requests issued) | 0 |
| 0x002 | ACKERR_CNT (`qs_ack_err` answers) | 0 |
| 0x003 | EOP_CNT (EOP segments in accepted control data) | 0 |
| 0x004 | OAM_CNT (OAM segments in accepted control data) | 0 |
| 0x005 | STATUS: [0] poll FIFO overflow (sticky) | 0 |
| 0x006 | REJECT_CNT (activations ignored as invalid) | 0 |
| 0x020 + i | class calendar entry i, 4 bits (0xF = null) | 0xF |
| 0x200 + i | port calendar entry i, 9 bits | i |
| 0x400 + p | port p: [0] high priority, [1] port contiguous | 0 |
| 0x600 + p | MP_SETTING of port p | 0 |

The counters are read-only and wrap. Unmapped addresses read 0. The bus
protocol and this map are this design's own; only the set of configurable
items and the field widths come from the scheduler's specification.

## Blocks

| file | role |
|---|---|
| `rtl/qs_pkg.sv` | sizes, types, control-register struct, configuration helper functions |
| `rtl/queue_scheduler.sv` | top level; parameters `NPORTS=267`, `NQUEUES=600`, `PCAL_DEPTH=512`, `CCAL_DEPTH=32`, `SCAN_W=8`, `FIFO_AW=4` |
| `rtl/qs_queue_status.sv` | 600-bit queue status memory plus interface-2 flags |
| `rtl/qs_poll_fifo.sv` | asynchronous FIFO from `mpbclk` to `sysclk` |
| `rtl/qs_poll_status.sv` | per-port poll status and conditioning |
| `rtl/qs_bw_limiter.sv` | per-port measurement period and level counters |
| `rtl/qs_qualify.sv` | combinational qualification and promotion |
| `rtl/qs_class_select.sv` | port priority, class calendar, super class, strict priority |
| `rtl/qs_port_select.sv` | port calendar walk, `SCAN_W` entries per cycle |
| `rtl/qs_req_ctrl.sv` | request handshake, packet state, queue contiguous lock |
| `rtl/qs_ecbi_regs.sv` | register file and counters |

All state resets asynchronously on `rst_n` (active low) in both clock domains.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qs_pkg.sv tb/tb_queue_scheduler.sv \
          --top tb_queue_scheduler -Mdir obj_top -o sim && obj_top/sim
```

| testbench | what it shows |
|---|---|
| `tb_qs_queue_status` | activation and deactivation against a reference model, all three configurations, invalid activations |
| `tb_qs_poll_fifo` | random streams with unrelated clocks arrive intact and in order; overflow when the reader stalls |
| `tb_qs_poll_status` | poll, conditioning, release and restore rules against a model |
| `tb_qs_bw_limiter` | full size: exact period boundaries (`2136·k + 8·p + 7`), 17 segments per period, several `MP_SETTING` values |
| `tb_qs_qualify` | FIFO rules for every IFID combination, polling, limiter, both contiguity modes, promotion |
| `tb_qs_class_select` | class calendar shares of 10·(c+1) grants per 280 for class c, super class, per-priority pointers |
| `tb_qs_port_select` | the 80-entry calendar example (5:1 grant ratio); one full lap in at most 65 cycles |
| `tb_qs_req_ctrl` | handshake, `QS_ACK_ERR`, foreign control data, lost qualification, promoted requests |
| `tb_qs_ecbi_regs` | reset values, no address aliasing, exported fields, counters |
| `tb_queue_scheduler` | the full design at default size, with a behavioural queue manager and destination. Directed phases check exact grant orders for each policy; random phases run with two interfaces, dynamic AFULL, deactivations withheld (forcing `QS_ACK_ERR`) and foreign control data. Every mechanism is counted and must occur. |
| `tb_qs_75_pc_pi_random` | 75×8 with mixed contiguous and interleave ports and promotion. About 1000 random packets (some 4000 segments) are loaded while AFULL is high, then drained. During the drain, a packet in a higher class is occasionally activated while another packet is in progress, so that interleave ports switch class and contiguous ports must not. Every request is compared with an independent model of the selection algorithm. |

## Where this design makes its own choices

- The internal structure, the pipeline and all cycle timing are this
  design's own. This covers the decide/scan split, `SCAN_W = 8`, the
  16-entry poll FIFO, and the bandwidth sweep of 8 cycles per port.
- The register bus and register map are this design's own.
- `QS_ACK_ERR` restores the port's poll status.
- The OAM bit is counted but has no effect on scheduling.
- A class calendar with no entry for any class that has traffic selects
  nothing. The scheduler waits instead of falling back to strict priority.
- A port contiguous port in mid-packet offers only its in-progress class,
  even under strict priority. A looser reading would only hide higher
  classes.
- The 80-entry port calendar example is taken as 5 entries per 50 Mbit/s port,
  the value that makes the 80-entry total and the 50 Mbit/s figure agree.

## Limits

- The queue manager, the destination interface and any interrupt logic are
  not part of this RTL. The testbenches model the first two behaviourally.
- Clock rates (200 MHz `sysclk`, 104 MHz `mpbclk`) are targets only. No
  timing analysis has been done.
- The per-port state is held in flip-flops, not RAM. At full size the
  design is large, and synthesis runtime is long.
