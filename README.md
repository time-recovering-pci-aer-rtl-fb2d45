# Time-recovering PCI–AER interface

Address-Event Representation (AER) links neuromorphic chips with an
asynchronous bus. Each spike is sent as the address of the neuron that fired,
with a REQ/ACK handshake. The information is in the *timing* of the events,
so a tool that injects events into an AER system, or records them from one,
must keep the inter-spike intervals (ISIs) intact.

This RTL is the FPGA logic of a PCI plug-in board that does both, at the same
time:

* **PCI → AER (sequencer).** The host writes a list of events, each with the
  delay to wait before it is sent. The board replays them on an AER output
  port. If the receiver is slow to acknowledge, the board **recovers the lost
  time**: it shortens the following waits so that later events are again
  sent on the host's schedule.
* **AER → PCI (monitor).** Events arriving on an AER input port are
  timestamped with the time elapsed since the previous event and queued for
  the host.

The PCI protocol itself is handled by a separate PCI target core, which is not
part of this RTL. The design starts at the core's local side: a simple
register bus plus an interrupt line.

## Event word

Both directions use one 32-bit word per event (`pci_aer_pkg::aer_word_t`):

| bits  | output path (host → AER)                       | input path (AER → host)                       |
|-------|------------------------------------------------|-----------------------------------------------|
| 31:16 | `dt`: ticks to wait, counted from the previous event | `dt`: ticks since the previous stored event (saturates at 65535) |
| 15:0  | `addr`: AER address to send                    | `addr`: AER address received                  |

A *tick* comes from a programmable time base, `tick_divider`: one tick every
`DIV+1` clocks. Each path has its own divider (`REG_OUT_DIV`, `REG_IN_DIV`),
so the delay and timestamp units can be set per path.

## Time recovery in the sequencer (`out_aer_fsm`)

A simple sequencer starts the wait for event *i* when event *i−1* has
finished. Then every slow acknowledge pushes all later events back, and the
error grows along the sequence. This sequencer instead treats `dt` as the
distance between the **due times** of consecutive events:

    due(0) = pop(0) + dt(0)
    due(i) = due(i-1) + dt(i)
    sent(i) = max(due(i), earliest moment the channel allows)

It is built from one signed timer (`TIMER_W` = 24 bits):

1. Popping a word adds `dt` to the timer.
2. The timer counts down one per tick while an event is waiting **and while
   its handshake runs**.
3. REQ is raised at the first clock edge at which the timer is ≤ 0.

If the handshake of event *i−1* takes longer than `dt(i)`, the timer is
already negative when event *i* is popped. Event *i* then goes out at once,
and the remaining deficit is carried into event *i+1*, and so on. The timer
is 0 exactly when the schedule has caught up. `late` pulses for every event
sent after its due time, and the host can read the count in `REG_LATE`.

Worked example, one tick per clock, loopback period 13 clocks, `dt` = 40 for
every event. The IFIFO fills up and the input holds off ACK for 3000 clocks.
When it resumes, the pending event goes out about 3000 clocks late. The next
events follow 13 clocks apart, and each gains 27 clocks on the schedule
(40 − 13). After about 110 events the stream is back on the original
schedule, and from then on the events are again 40 clocks apart. The sum of
all intervals equals the sum of all `dt`. `tb_pci_aer_top` (phase 3) checks
exactly this.

Behaviour in corner cases (design choices):

* **OFIFO empty or ENOF low.** The sequencer goes idle and the timer
  **freezes**: a gap in the host's supply is not treated as lateness. A
  deficit that is left over is kept and applied to the next event. To start a
  new, independent sequence on schedule, give its first word a `dt` larger
  than any possible left-over deficit, or reset the board.
* **Very long stalls.** The timer saturates at −2²³ ticks instead of
  wrapping.
* **Handshake time always counts.** The timer keeps running through every
  handshake, not only through the part beyond some nominal ACK time. So `dt`
  is the exact REQ-to-REQ interval whenever the channel can keep up
  (`dt` ≥ handshake time).

## Timestamps in the monitor (`in_aer_fsm`)

The monitor waits for the synchronized REQ and writes `{ts, addr}` into the
IFIFO. It then raises ACK, and drops it after REQ has fallen. `ts` counts
input ticks and is reset by each stored event. With one tick per clock, `ts`
is exactly the number of clocks between two storing edges. In loopback the
input stores each event a fixed 3 clocks after the output's REQ, so the
timestamps read back are the output's REQ-to-REQ intervals. Both system
testbenches rely on this.

If the IFIFO is full, the event is **not acknowledged** until there is room
(`stall`, sticky flag `FLAG_IN_STALL`). The sender is held back and nothing
is lost. The interrupt is meant to let the host drain the IFIFO before this
happens.

## Block structure

```
            local bus (from PCI core)                 AER out
  lb_* ──► host_if ──► OFIFO (aer_fifo) ──► out_aer_fsm ──► addr/req, ◄── ack
   irq ◄──    │                 tick ▲
              │      tick_divider ───┘ (REG_OUT_DIV)
              │                                             AER in
              └──◄── IFIFO (aer_fifo) ◄── in_aer_fsm ◄── addr/req, ──► ack
                                 tick ▲
                     tick_divider ────┘ (REG_IN_DIV)
```

| file | role |
|------|------|
| `rtl/pci_aer_pkg.sv` | word type, register map, flag bits |
| `rtl/pci_aer_top.sv` | top level: wires the blocks as above |
| `rtl/host_if.sv` | registers, FIFO access ports, interrupt |
| `rtl/aer_fifo.sv` | show-ahead synchronous FIFO, used as both OFIFO and IFIFO |
| `rtl/out_aer_fsm.sv` | sequencer with time recovery |
| `rtl/in_aer_fsm.sv` | timestamping monitor |
| `rtl/tick_divider.sv` | programmable time base |
| `rtl/aer_sync.sv` | synchronizer for the asynchronous REQ/ACK inputs |

Top-level parameters and their defaults: `OFIFO_DEPTH` = `IFIFO_DEPTH` = 512
words, `TIMER_W` = 24, `SYNC_STAGES` = 2, `DIV_W` = 16. Everything runs on
one clock `clk`, with an asynchronous active-low reset `rst_n`.

## Host interface

Local-bus timing:

* A write is a one-clock `lb_wr` strobe with `lb_addr` and `lb_wdata`.
* A read is a one-clock `lb_rd` strobe. The data appears on `lb_rdata`, with
  `lb_rvalid`, one clock later.
* A burst is a run of strobes on consecutive clocks, normally to `REG_OFIFO`
  or `REG_IFIFO`.

Register map (word addresses):

| addr | name | access | contents |
|------|------|--------|----------|
| 0 | `REG_CTRL` | RW | bit 0 ENOF (run the sequencer), bit 1 input enable, bit 2 interrupt enable |
| 1 | `REG_OUT_DIV` | RW | output tick every `OUT_DIV+1` clocks |
| 2 | `REG_IN_DIV` | RW | input tick every `IN_DIV+1` clocks |
| 3 | `REG_IRQ_THR` | RW | `irq` is high while interrupts are enabled and the IFIFO holds ≥ this many words |
| 4 | `REG_LEVELS` | R | [31:16] IFIFO level, [15:0] OFIFO level |
| 5 | `REG_FLAGS` | R / W1C | 0 OFIFO empty, 1 OFIFO full, 2 IFIFO empty, 3 IFIFO full, 4 irq; sticky: 5 OFIFO overflow (write dropped), 6 IFIFO underflow (read returned 0), 7 input stalled, 8 timestamp saturated |
| 6 | `REG_OFIFO` | W | push one event word |
| 7 | `REG_IFIFO` | R | pop one event word |
| 8 | `REG_LATE` | R | number of events the sequencer sent after their due time |

Typical use: set the dividers, write up to 512 words to `REG_OFIFO`, then set
ENOF. Keep the OFIFO topped up by polling `REG_LEVELS`. On `irq`, or
periodically, read `REG_LEVELS[31:16]` words from `REG_IFIFO`.

## Handshake and throughput

Both AER ports use a four-phase, active-high REQ/ACK handshake with bundled
data: the address is valid while REQ is high. The asynchronous input line of
each state machine (ACK for the sequencer, REQ for the monitor) passes a
`SYNC_STAGES`-flip-flop synchronizer. Each crossing therefore costs
`SYNC_STAGES+1` clocks. With the defaults:

* **Monitor:** stores an event and raises ACK 3 clocks after REQ reaches its
  pin.
* **Sequencer:** needs 9 clocks per event against a receiver that answers
  each REQ edge within one clock.
* **Loopback** (output wired to input): 13 clocks per event,
  `4*(SYNC_STAGES+1)+1`.

In time, the loopback rate depends on the clock. The published board reached
one event every 60 ns in burst mode, and measured 120 ns as the shortest
loopback interval. Matching 120 ns with this RTL takes a clock of about
108 MHz; matching 60 ns takes about 217 MHz. The host port takes one word
per clock, which is the full rate of 32-bit/33 MHz PCI.

## Where this RTL follows the published design, and where it chooses

These parts follow the published design:

* the two parallel paths and their FIFOs;
* the 32-bit word with the address in the low half and the time in the high
  half;
* ENOF gating the sequencer;
* waiting the configured number of (divided) clock cycles before each event;
* deducting late-acknowledge time from the following waits, carrying a
  deficit past events that then go out without waiting;
* timestamps counting clock cycles since the previous event, with the counter
  cleared on each event;
* separately divisible time bases for the two paths;
* an interrupt meant to avoid IFIFO overflow;
* burst access from the host.

These are this design's own choices:

* FIFO depth (512 × 32 bits, four 4-kbit block RAMs each on a Spartan-II
  class device);
* a single clock domain;
* handshake polarity and the two-stage synchronizers;
* the local bus and register map;
* the threshold rule of the interrupt;
* freezing the timer while idle;
* timer width and saturation;
* timestamp saturation;
* holding back the sender, rather than dropping the event, when the IFIFO is
  full;
* the late-event counter and the sticky status flags.

Not included:

* **The PCI target core.** It is an external component; connect its
  local-side decoded accesses to the `lb_*` ports.
* **Bus-mastering DMA.**
* **Hardware frame-to-AER conversion.** Its generation methods (scan,
  uniform, random, exhaustive) are defined elsewhere.

## Verification

Every testbench is self-checking. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_aer_fifo` | random push/pop against a queue model; full/empty/level; wrap-around |
| `tb_tick_divider` | tick period `div+1` and first-tick position for several divisors; no ticks while disabled |
| `tb_out_aer_fsm` | rebuilds the due-time schedule on its own and checks the send edge, address and `late` flag of every event. Phases: on-time traffic, random late ACKs, one very late ACK spanning several events, peak rate (9 clocks/event), divided time base, ENOF held low |
| `tb_in_aer_fsm` | stored address and timestamp against an independent tick count; store latency; full-IFIFO stall with no loss; divided time base; saturation |
| `tb_host_if` | register read-back, OFIFO burst writes and overflow, IFIFO burst reads and underflow, interrupt threshold, sticky flags, late counter |
| `tb_pci_aer_top` | whole design at default sizes, output looped back to input. Phases: on-time sequence, peak rate, IFIFO full → stall → late events → interrupt → drain → full recovery of the schedule, divided time bases, ENOF pause, OFIFO overflow, timestamp saturation. Each mechanism is counted and must occur |
| `tb_tis_workload` | nine synthetic 8×8 Gaussian-histogram images (153 to 1527 events per 20000-clock frame), events spread evenly in time per pixel. Every received event must arrive at `max(due, previous + 13)`. It prints the mean lag behind schedule with time recovery (0.8 to 74 clocks) and without it (48 to 3676 clocks) |

To simulate one of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pci_aer_pkg.sv rtl/aer_sync.sv rtl/aer_fifo.sv rtl/tick_divider.sv \
    rtl/out_aer_fsm.sv rtl/in_aer_fsm.sv rtl/host_if.sv rtl/pci_aer_top.sv \
    tb/tb_pci_aer_top.sv --top-module tb_pci_aer_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench file and `--top-module` to run another. Each takes well
under a second. The RTL lints cleanly with `verilator --lint-only -Wall`,
apart from unused package constants, two intentionally open status outputs in
the top, and the reset also being used by assertion `disable iff` clauses.

The design has only been simulated, never run on hardware. The timing claims
above are in clock cycles; how they translate into nanoseconds depends on the
clock chosen when it is implemented.
