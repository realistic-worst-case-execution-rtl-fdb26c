# Time-triggered bus interface with drift-tolerant serial link

This is RTL for a small distributed real-time system in the style of automotive
FlexRay networks. Several electronic control units (ECUs) share one serial bus.
Each ECU runs on its own oscillator, and these may differ by up to 0.15 %. There
is no common clock. Time is split into **rounds**, and each round into an even
number **NS** of **slots** of **T** cycles. A fixed schedule assigns every slot to
one sender. In its slot the sender broadcasts one message of **L** bytes. Every
ECU, the sender included, receives it.

The core of the design is the **f-interface**, the bus interface of one ECU. It
has three parts:

* a serial sender and receiver that move bits between clock domains without a
  shared clock;
* a slot timer that the owner of slot 0 resynchronises once per round;
* double-buffered send and receive buffers, so the processor and the bus never
  use the same copy of a message at the same time.

The processor sees a clean model. Whatever it stores into the send buffer during
slot s-1 is transmitted in slot s. Every ECU can read that message from its
receive buffer in slot s+1. A timer interrupt marks each slot boundary.

Default configuration: 4 ECUs, L = 8 bytes, NS = 4 slots, T = 800 cycles per
slot. The description this RTL follows gives no numbers for these sizes. They
are this design's choices, sized to satisfy the timing conditions below.

## Rounds, slots and the schedule

Each ECU has a schedule register with one bit per slot. The ECU whose bit
s is set transmits in slot s. Exactly one ECU should own each slot. The owner of
slot 0 is the **synchronisation master**.

Transmission starts when the sender's local cycle counter reaches **OFF** in its
own slot. It lasts at most tc = 45 + 80·L cycles. OFF is a safety margin. It
covers the worst-case clock drift over a round plus the 15 cycles a receiver
needs to adjust its timer:

    Delta = 2·delta / (1 - delta)            relative drift of two ECUs, delta = 0.15 %
    OFF   = 15 + ceil(NS · T · Delta)        (25 for NS = 4, T = 800)
    tc    = 45 + 80 · L                      (685 for L = 8)
    slot fits:  OFF + (OFF + tc)·(1 + Delta) <= T    (needs T >= 737)

If these inequalities hold, every ECU is in slot s for the whole transmission
window, so two senders never overlap. `fr_pkg` computes OFF from NS and T. It
also has `slot_fits()`, which `f_interface` checks at elaboration and reports as
a warning when it fails.

## The frame on the wire

A message m[0..L-1] is framed as

    f(m) = 0 1  (1 0 m[i])  ...  0 1
           TSS FSS BS1 BS0 byte  FES TES

The parts are:

* TSS: transmission start sequence.
* FSS: frame start sequence.
* BS1, BS0: the byte start sequence, which puts a falling edge before every byte.
* FES, TES: frame end and transmission end.

Bytes are sent most significant bit first. That order is this design's choice.

Each frame bit is held on the bus for **eight cycles**. The clock enable of the
1-bit sender register S is on for one cycle and off for seven. A frame takes
8·(10·L + 4) cycles, which is 672 cycles for L = 8.

The bus is open collector, so its value is the AND of all S registers. An
interface that is not sending outputs the idle value 1.

## Receiving without a common clock

This is the subtle part of the design. It lives in `rx_voter`, `rx_strobe` and
`rx_fsm`.

1. **Two sampling registers.** R samples the bus every cycle. Because the bus
   changes on another ECU's clock, R may go metastable. R_hat re-samples R, so
   the rest of the logic only sees clean 0/1 values.
2. **Majority vote.** R_hat and a 4-bit shift register of its older values give
   the last five samples. The voted bit v is their majority. This removes
   glitches of one or two cycles. It delays a clean edge by two more cycles.
3. **Bit-phase counter.** A modulo-8 counter tracks which of the eight copies of
   a frame bit is on the bus. `strobe` fires at count 4, near the middle of the
   copies. The receiver samples v only on strobe, and the frame automaton
   advances only on strobe.
4. **Resynchronisation.** The counter is restarted by

       sync = (idle | state == BS1) & v_fall        v_fall = !v & v_previous

   This happens at the first falling edge of a frame (TSS) and at the expected
   falling edge between BS1 and BS0 before every byte. So the phase is
   corrected at least every 80 sender cycles. With 0.15 % clocks, the sampling
   point moves less than one cycle in that time. At least six of the eight
   copies of each bit arrive correctly, so the strobe stays on a good copy.

The frame automaton's state is the frame bit it sampled last. It expects these
values in order:

* TSS = 0, FSS = 1, BS1 = 1, BS0 = 0;
* eight message bits;
* then BS1 for the next byte, or FES = 0 after the last byte;
* finally TES = 1.

After the eighth bit of a byte it writes the byte into the bus-side receive
buffer. When it sees TES it returns to idle and pulses `frame_ok`.

A protocol bit with the wrong value sends the automaton to idle and pulses
`frame_err`. This error handling is this design's choice. The system has no
fault tolerance, so later falling edges of a broken frame may start more failed
attempts.

Latency: a bus edge reaches v about 4 receiver cycles later. In the end-to-end
simulation, the time from the sender's start signal to the last receiver's
return to idle was at most 677 sender cycles. The bound is 685.

## Slot timer and clock synchronisation

The timer (`fi_timer`) is a two-level counter:

* `cy` counts the cycles of a slot, modulo T;
* `slot` counts slots, modulo NS;
* `par = slot[0]` is the slot parity.

After reset the timer holds (NS-1, T-1).

* The **master** timer always counts. In slot 0, at cycle OFF, the master
  starts its frame.
* Every **other** timer stops at (NS-1, T-1) at the end of each round and
  waits (`waiting`). The TSS of the master's slot-0 frame reaches a waiting
  receiver as `tss_det`. Its timer then jumps to (0, OFF), which is the value
  the master had when it started. Between synchronisations every timer runs
  free.

Consequence: during the master's slot-0 transmission the other ECUs are still
in slot NS-1, waiting. That is intended. The slot-0 message is the
synchronisation frame.

The **timer interrupt** is the rising edge of the overflow `cy == T-1`, so it
comes once per slot and only once while a timer is stalled. A pending flag
holds it until software clears it. The flag drives interrupt cause 4 of the
processor.

The schedule register resets to 0. So after reset no ECU sends and none acts as
master until software has written the schedule.

## Double buffers and what the processor sees

`fi_buffers` keeps two send buffers sb[0], sb[1] and two receive buffers rb[0],
rb[1]. The slot parity decides who uses which copy:

| user       | send buffer            | receive buffer        |
|------------|------------------------|-----------------------|
| bus side   | reads sb[par]          | writes rb[par]        |
| processor  | writes/reads sb[!par]  | reads rb[!par]        |

In slot s the bus sends what the processor stored during slot s-1. What arrives
in slot s can be read in slot s+1. The parity must alternate across the round
boundary too, so NS must be even. `fi_timer` checks this.

Each processor-side copy is a separate buffer. After the parity flips, the
processor sees the other copy of sb, not what it wrote in the previous slot. So
software writes the whole message for every slot it sends in.

## Processor interface

The processor itself is not part of this RTL. This includes the out-of-order
DLX pipeline, its caches and main memory. `ecu` and `flexray_system` bring its
load/store and interrupt signals out as ports.

**Address decode (`io_decode`).** Loads and stores compute
ea = gpr(RS1) + sign-extended imm. Addresses below D (default 0x8000_0000) go to
memory. The K = 2·L + 8 bytes from BA (default 0x8000_0000) are the
interface's I/O ports. Accesses must be word aligned.

**Register map** (byte offsets from BA, word accesses, little endian):

| offset        | contents                                                          |
|---------------|-------------------------------------------------------------------|
| 0 .. L-1      | send buffer (processor copy), read/write                          |
| L .. 2L-1     | receive buffer (processor copy), read only                        |
| 2L            | schedule, bit s = this ECU sends in slot s                        |
| 2L+4          | write: bit 0 = 1 clears the timer interrupt; read: `{cy[15:0], slot[7:0], 4'b0, rx_idle, tx_busy, par, ti_pending}` |

**Interrupts (`interrupt_unit`).** These are the interrupt equations of the DLX
instruction set:

* cause vector: `ca[j] = E[j] ? eev[j] : iev[j]`;
* masked causes: `mca[j] = M[j] ? ca[j] & sr[j] : ca[j]`;
* `jisr = |mca`, sampled for the instruction in write-back (`wb_valid`);
* on an interrupt, sr is cleared and mca is saved in eca.

The cause numbering is this design's choice:

| cause | event                  | kind     | maskable |
|-------|------------------------|----------|----------|
| 0     | reset                  | external | no       |
| 1     | illegal instruction    | internal | no       |
| 2     | misalignment           | internal | no       |
| 3     | overflow               | internal | yes      |
| 4     | timer                  | external | yes      |

Redirecting the PCs to the service routine (dpc = 0, pc = 4) is left to the
processor.

A typical slot program:

1. Take the timer interrupt.
2. Clear it through offset 2L+4.
3. Read the received message.
4. Write the next message if the ECU sends in the next slot.
5. Unmask the timer and idle until the next interrupt.

The whole program must finish within T - OFF cycles.

## Module hierarchy

    flexray_system        P ECUs, one clock and reset each, wired-AND bus
      ecu                 interface side of one ECU
        io_decode         effective address, memory / I/O select
        interrupt_unit    cause, mask, JISR, sr/eca
        f_interface       schedule and control registers, transmission start
          fi_buffers      double send/receive buffers
          fi_timer        slot timer, synchronisation, timer interrupt
          tx_fsm          sender automaton and register S
          rx_voter        R, R_hat, shift register, majority vote
          rx_strobe       modulo-8 phase counter, strobe
          rx_fsm          frame automaton, sync, byte assembly
    fr_pkg                constants, frame-bit enum, timing formulas

All logic is synchronous to the ECU's own clock. Resets are asynchronous and
active low. The only signal that crosses clock domains is the bus, into
`rx_voter`.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/fr_pkg.sv tb/tb_flexray_system.sv --top-module tb_flexray_system
    ./obj_dir/Vtb_flexray_system

`tb_flexray_system` runs the top at its default size for five rounds. Four ECUs
have clock periods of 10.000, 10.014, 9.986 and 10.010 ns and staggered resets,
and each has a behavioural processor. The test checks:

* every received message against what its sender stored;
* that all ECUs are in the sender's slot at each transmission start (in slot 0,
  that the others are waiting);
* that there is no bus contention;
* that frames finish inside the slot and within tc.

It also counts timer stalls, synchronisations, byte-start resynchronisations,
timer interrupts and parity switches, and requires each to occur.

`tb_drift_worst_case` runs the same test at the edge of the budget:

* clock periods exactly 0.15 % above and below nominal;
* a 16-byte message;
* T = 1400, six cycles above the smallest slot that satisfies the slot
  condition for that size.

In both tests the receivers set their timers to (0, OFF) about 6 cycles after
the master. The allowed bound is 15.

The unit testbenches cover the rest:

* a sender compared bit by bit against the expected waveform;
* a receiver fed by a sender whose clock is 0.15 % off or jittered, including
  a corrupted frame;
* the voter against a majority model with random glitches;
* the timer against a cycle-level model of master and non-master behaviour;
* the buffers, interrupt unit and address decode against their equations.

Simulate with `--assert` to enable the concurrent assertions in the RTL:

* `tx_fsm`: a frame starts only while the sender is idle, and S is 1 whenever
  the sender is idle.
* `rx_fsm`: received bytes stay inside the buffer.
* `fi_timer`: counter ranges, and a stalled timer leaves (NS-1, T-1) only
  through synchronisation.

## How far to trust it, and where it departs

* The parts that follow the source description are: the frame format, the
  eight-fold bit repetition, R/R_hat with a five-sample majority vote, the
  modulo-8 counter with strobe at 4, the sync equation, the timer layout with
  stall-and-jump synchronisation to (0, OFF), `ti = ovf & !ovf_prev`, the
  parity-indexed double buffers, the memory-mapped buffer layout (send buffer,
  receive buffer, configuration words) and the interrupt equations.
* These are this design's own choices:
  * all numeric sizes (P, L, NS, T, D, BA);
  * MSB-first bit order;
  * the configuration and control register map, and the pending-flag clear;
  * the cause numbering;
  * error exits of the receiver;
  * reset values.
* Not included: the processor pipeline, caches and main memory, and any fault
  tolerance or start-up protocol beyond "the master starts, the others wait".
* The timing bounds come from a continuous-time argument about clocks, set-up
  and hold times. Simulation checks them only for the drift and jitter patterns
  the testbenches use, not exhaustively. A two-state simulator cannot model
  metastability.
