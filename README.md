# Traffic-driven clock gating for a multi-threaded network processor

Router traffic swings widely over a day, yet a network processor keeps all of its
processing elements (PEs) clocked even when most of their threads are just waiting
for packets. This design stops the clock of whole PEs while the remaining ones can
carry the load, and restarts one the moment the receive buffer runs full. It follows
the technique of the paper *Low Power Network Processor Design Using Clock Gating*
(an IXP1200-class processor: six PEs of four threads, 16 ports, 64-byte "mpackets",
232 MHz), and fills in the control details the paper leaves open.

Three ideas make it work:

1. **Idle threads measure spare capacity.** A thread that has finished a packet
   waits in a thread queue for the next one. If at least one PE's worth of threads
   (four) sits in that queue, the processor could have done without one PE in that
   cycle. Counting such cycles over a long window tells whether a PE can go.
2. **Any thread can serve any port.** With a fixed port-to-thread binding, gating
   a PE would leave its ports unserved. Here a scheduler hands the next ready port
   to the thread that has waited longest, whatever PE it belongs to.
3. **A full buffer wakes a PE, and one spare entry hides the wake-up.** The
   regular buffer entries being full is the signal to restart a PE. A restarted PE
   needs some tens of cycles before it takes packets; at 1 Gb/s and 232 MHz that
   is under 30 bytes, so one spare 64-byte entry catches what arrives meanwhile.

## Structure

```
             packets (port, 64-byte mpacket)
                        |
   +--------------------v--------------------------------------------+
   | interface_controller                                            |
   |   rx_buffer (16 + 1 spare) --port_rdy_status--> port_scheduler  |
   |        ^ read oldest of port <--------------------|  |          |
   |   thread_queue (24) <-- enqueue arbiter <--+      |  | grant    |
   +-------------------------------------------|------|--|----------+
        | idle threads       | buffer full     |      |  |
   +----v---------------+ +--v--------------+  |      |  v
   | idle_window_monitor|-> pe_gating_fsm   |--+ re-queue / park
   | window, idle count,| | ON/DRAIN/OFF/   |
   | threshold th       | | WAKE per PE     |--clock enables--> clock_gate x6
   +--------------------+ +-----------------+                     | pe_gclk_o
                                                                  v
                                          PEs (outside): receive requests in,
                                          grants out, each on its own gated clock
```

All of it is in `np_clock_gating_top`. The PEs themselves are not part of the RTL:
they connect through `pe_gclk_o`, the receive-request ports and the grant bus.

## The shutdown policy (idle_window_monitor)

A window counter runs over `WINDOW_P` = 1,000,000 cycles (the paper's "shutdown
period" P). A 20-bit counter counts
the cycles in which the thread queue holds at least `THREADS_PER_PE` threads. In
the last cycle of the window that count is compared with the threshold register
`th`; if it is larger, `shutdown_req_o` asks for one PE fewer. Then `th` is
adjusted by `ALPHA` (2 % of the window, 20,000):

- after a window in which a PE had to be woken (gating was too eager), `th` rises
  by `ALPHA`, at most to `WINDOW_P`;
- after a window without a wake-up, `th` falls by `ALPHA`, at least to `ALPHA`.

`th` starts at 500,000, half the window. So a window in which more than half the
cycles had a spare PE's worth of idle threads removes one PE. At most one PE goes
per window. The window is long enough to hide the slowest drain, which takes tens
of thousands of cycles for a compute-heavy program.

The idle criterion (at least four queued threads) and the direction of the
threshold steps are this design's reading of the policy. The window length, the
initial threshold, the step and the 20-bit width follow the paper.

## Draining, gating and waking a PE (pe_gating_fsm)

Each PE is in one of four states (`np_pkg::pe_state_e`):

| state | clock | takes new packets | leaves when |
|-------|-------|-------------------|-------------|
| ON    | on    | yes | a shutdown request picks it (highest-numbered ON PE) |
| DRAIN | on    | no  | all four threads parked → OFF; buffer full → back to ON |
| OFF   | gated | no  | buffer full → WAKE (lowest-numbered OFF PE) |
| WAKE  | on    | yes | after `WAKE_CYCLES` (4) cycles → ON |

A PE cannot simply be stopped: its threads may be half-way through packets. A
draining PE keeps its clock. Each of its threads finishes its packet, asks for a
new one and reaches the head of the thread queue as usual. The scheduler then
**parks** the thread instead of giving it a port, and the FSM records it in a
parked-thread bitmap. When all of a PE's threads are parked, nothing of it is in
flight or queued, and its clock enable drops. A thread is parked only when a port
has a packet ready, because the scheduler dequeues only then. Under light traffic a
drain therefore takes as long as a few packet arrivals.

When the 16 regular buffer entries are full (`buf_full_o`):

- if a PE is draining, it simply returns to ON (the drain is cancelled);
- otherwise the lowest-numbered OFF PE gets its clock back, settles for four
  cycles and turns ON.

Either way the parked threads of every ON PE are pushed back into the thread
queue, one per cycle and ahead of new requests. The PE's own threads never notice:
from their side, the receive request was pending all along. After a wake-up the
next one is held off for `WAKE_HOLDOFF` = 50 cycles, the time a restarted PE needs
before it drains the buffer. Without this hold-off one burst would wake every PE in
consecutive cycles. No drain starts while the buffer is full, so under saturation
every PE runs. At least `MIN_ACTIVE` = 1 PE always runs.

The four states, parking, the choice of which PE goes or returns, the settle time
and the hold-off rule are this design's choices. The paper gives the triggers
(idle threads to shut down, a full buffer to wake up, no gating under saturation)
and the ~50-cycle ready time.

## Dynamic thread-to-port mapping (port_scheduler, thread_queue)

`port_rdy_status` has one bit per port, set while the buffer holds an mpacket of
that port. The scheduler tests **one bit per cycle**, round-robin, starting after
the last port served. When the bit under the pointer is set and a thread is
queued, it pops the head thread in the next cycle and reads that port's oldest
mpacket from the buffer. In the cycle after that, the grant (`grant_o`, thread,
port, 512-bit data) is on the bus for one cycle. A grant after testing m bits
therefore costs m + 1 cycles from the first bit tested, plus the one-cycle enqueue
of the request. This is the cost the paper charges the mapping: m cycles for m
bits, one for the enqueue and one for the dequeue. With 16 ports the worst case is
about 18 cycles per mpacket, far below the ~250 cycles between mpackets at
480 Mb/s. While no thread waits, the scan holds still.

The thread queue is a 24-entry FIFO of global thread numbers (`pe * 4 + thread`).
Every thread has a slot, so it cannot overflow. Receive requests are level-held
until acknowledged. PEs are served round-robin, one enqueue per cycle, and
re-queued parked threads go first.

## Receive buffer (rx_buffer)

The buffer holds `RFIFO_DEPTH` + `EXTRA` = 16 + 1 entries of {port, 64-byte
mpacket}, kept in arrival order. A read names a port and removes the oldest entry
of that port; the younger entries move up one place in the same cycle. The data
comes out one cycle after the request. `main_full_o` covers the 16 regular
entries, and `extra_used_o` shows that the spare one is occupied. An arrival is
dropped (`in_drop_o`) only when all 17 are taken. The depth of 16 is an assumption
based on the IXP1200 receive FIFO; the single spare entry follows the paper.

## Clock gates (clock_gate)

Each PE's clock passes through a standard latch-based gate. The latch is
transparent while the clock is low, and its output ANDs the clock. An enable change
therefore takes effect at the next rising edge and never shortens a pulse. This is
the one intended latch in the design.

## Top-level interface (np_clock_gating_top)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | core clock; asynchronous active-low reset of all state |
| `in_valid_i`, `in_port_i[3:0]`, `in_data_i[511:0]` | in | one mpacket arrival per cycle at most |
| `in_drop_o` | out | that arrival was lost (buffer completely full) |
| `pe_gclk_o[5:0]` | out | gated clock of each PE |
| `rcv_req_i[5:0]`, `rcv_tid_i[6][1:0]` | in | receive request of a PE and the thread (0–3) asking; hold until acknowledged |
| `rcv_ack_o[5:0]` | out | request taken into the thread queue this cycle |
| `grant_o`, `grant_tid_o[4:0]`, `grant_port_o[3:0]`, `grant_data_o[511:0]` | out | one-cycle grant of an mpacket to global thread `grant_tid_o` |
| `pe_state_o[6]`, `active_pes_o` | out | power state per PE, number of clocked PEs |
| `idle_threads_o`, `buf_full_o`, `extra_used_o` | out | queue occupancy and buffer pressure |
| `threshold_o`, `last_idle_o` | out | current `th`, idle-cycle count of the last window |
| `window_end_o`, `shutdown_req_o`, `th_up_o`, `th_down_o`, `wake_event_o`, `drain_start_o`, `gated_off_o`, `drain_cancel_o`, `park_o` | out | one-cycle event pulses |

A PE clocked by `pe_gclk_o[p]` samples `rcv_ack_o` and the grant bus on its own
clock. Those signals are driven from `clk` and change only after rising edges, so
sampling them on the gated clock is safe. A gated PE has no request pending and no
thread queued, so it cannot miss a grant.

## Parameters

Defaults live in `np_pkg` and are the parameters of `np_clock_gating_top`.

| parameter | default | origin |
|-----------|---------|--------|
| `NUM_PE` | 6 | paper (IXP1200) |
| `THREADS_PER_PE` | 4 | assumed (24-entry queue over six PEs; IXP1200) |
| `NUM_PORTS` | 16 | paper |
| `DATA_W` | 512 (64-byte mpacket) | paper |
| `RFIFO_DEPTH` | 16 | assumed |
| `EXTRA` | 1 | paper |
| `CNT_W` | 20 | paper |
| `WINDOW_P` | 1,000,000 | paper |
| `TH_INIT` | 500,000 | paper |
| `ALPHA` | 20,000 (2 % of P) | paper |
| `WAKE_CYCLES` | 4 | assumed ("several cycles") |
| `WAKE_HOLDOFF` | 50 | paper's thread-ready delay, used as the hold-off |
| `MIN_ACTIVE` | 1 | assumed |

## How far to trust it, and where it departs from the paper

- The paper evaluates the technique in a cycle-level simulator. It shows the
  interface controller with its buffer, port status register and thread queue,
  and names the control logic (counters, threshold register, comparator, adder, a
  small FSM). It does not give the exact on/off rules, so the policy details above
  (idle criterion, threshold step direction, drain by parking, PE order, hold-off)
  are this design's own. Treat them as one consistent reading, not as the
  original.
- The receive buffer reads per port, out of arrival order across ports. The paper
  does not say how its receive FIFO is organised.
- The clock power model and the power results (up to 30 % saving) are not
  reproduced. The RTL only provides the mechanism; nothing here measures power.
- The PEs, the management processor, memories, bus unit, PLL and clock tree are
  not included.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog:

| testbench | what it checks |
|-----------|----------------|
| `tb_thread_queue` | FIFO order, occupancy and flags against a reference queue, full/empty corners |
| `tb_rx_buffer` | oldest-of-port read-out, misses, port ready bits, full/spare flags, drops only at 17 entries |
| `tb_port_scheduler` | chosen port and exact cycle cost (m bits → grant m + 1 cycles later), parking, pointer update, wrap-around |
| `tb_idle_window_monitor` | window length, shutdown decision at, below and above `th`, threshold steps and clamps (window scaled to 200 cycles) |
| `tb_pe_gating_fsm` | shutdown order, clock stops only after the last park, wake order and settle time, re-queue order, hold-off, drain cancel, no drain under pressure |
| `tb_clock_gate` | no pulses while disabled, no shortened pulses on enable changes |
| `tb_interface_controller` | 24 modelled threads plus random traffic: every grant gives the oldest waiting thread the oldest mpacket of its port; parking and re-queue |
| `tb_np_clock_gating_top` | the whole design at full default size with six behavioural PEs (`tb/pe_model.sv`) |

The end-to-end test runs 11 million cycles in five phases. First, light load gates
PEs off one per window down to one. Next, ~1 Gb/s-equivalent load fills the buffer
and wakes PEs without losing an mpacket. Then a burst during a drain cancels it.
Saturation brings all six PEs back, uses the spare entry and drops the excess.
Finally, a quiet phase checks that every stored mpacket was delivered. The test
also checks that each gated clock pulsed in exactly the cycles its enable allowed.
It takes about 10 s of simulation.

`tb_np_traffic_rates` runs the four evaluation rates (~90, ~180, ~360 and
~480 Mb/s at 232 MHz, random gaps over 16 ports) against four packet programs that
differ only in processing time per mpacket. The cycle counts are illustrative: 1500,
2000, 3000 and 4000 cycles, standing for nat, ipfwdr, md4 and url, shortest first.
Each case starts from reset and runs ten windows; the window is scaled to 100K
cycles so the run stays short. It checks that no mpacket is lost. It reports the
share of PE clock cycles that were gated over the last six windows:

| program (cycles/mpacket) | 90 Mb/s | 180 Mb/s | 360 Mb/s | 480 Mb/s |
|--------------------------|---------|----------|----------|----------|
| 1500 (nat-like)    | 80 % | 80 % | 70 % | 67 % |
| 2000 (ipfwdr-like) | 80 % | 80 % | 67 % | 58 % |
| 3000 (md4-like)    | 80 % | 73 % | 52 % | 43 % |
| 4000 (url-like)    | 80 % | 67 % | 43 % | 21 % |

80 % is the ceiling: one PE of six always runs. These figures count clock cycles,
not watts. How much power they save depends on the share of PE power that is
clock-related; the paper estimates that share at roughly 40 %.

To run a testbench with Verilator (here the full system):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/np_pkg.sv \
          tb/tb_np_clock_gating_top.sv --top-module tb_np_clock_gating_top
./obj_dir/Vtb_np_clock_gating_top
```

Replace the testbench name for the others; `-y rtl -y tb` lets Verilator find the
modules it needs.
