# AMT: a 24-channel time-to-digital converter with trigger matching

This is synthesizable SystemVerilog for the AMT chip. The chip reads out drift tubes in a
large muon spectrometer. Each of its 24 channels timestamps both edges of the
discriminator pulse. The bin is 0.78 ns, and the clock is the 40 MHz bunch-crossing
clock of the collider.

Every hit is stored. After the first-level trigger latency, about 2.5 µs, a trigger
selects the hits that belong to one bunch crossing. Those hits are then sent off the
chip as 32-bit words, either serially or on a parallel port.

The hard part of the chip is not the time measurement. It is keeping all 24 channels
flowing through several buffers without losing data silently. Whenever data is lost,
the event must be marked.

## Measuring time

A phase-locked ring oscillator runs at twice the bunch clock, 80 MHz. Its 16 outputs
are equally spaced over one 12.5 ns period (`pll_ring_osc`). This part is analog in the
chip. Here it is a behavioural model that starts already locked and has a time unit
of 1 ps. For synthesis it reduces to wires, and the 40 MHz system clock is the
reference clock itself.

A 13-bit coarse counter counts ring periods (`coarse_counter`). It exists twice:
- Copy A changes on the rising ring edge.
- Copy B changes half a period later, on the falling edge, and holds the value A will
  take next.

A hit edge is captured with an edge-triggered register. That register takes the 16
taps, both counter copies and their parity bits at once (`channel_buffer`).

Later, in the 40 MHz domain:
1. `vernier_encoder` finds the position of the ring's rising edge among the taps. It
   uses a four-tap window, so a single wrong tap does not fake an edge. The result is a
   4-bit vernier value m.
2. `hit_encoder` picks the counter copy that was certainly stable at that moment:
   - A for m = 4..11;
   - B for m = 0..3;
   - B − 1 for m = 12..15.
3. `hit_encoder` then joins the count and m into a 17-bit time:
   - the upper 12 bits are the bunch number (coarse time);
   - the lower 5 bits are the fine time, in 0.78125 ns bins.

In pair mode, one 32-bit word holds a leading edge and the pulse width. The width is
trailing time minus leading time, scaled by `width_select` and saturated at 8 bits.
Only the low 11 bits of the leading time fit into that word.

The counter is loaded with `coarse_time_offset` at reset and at every bunch count
reset. It wraps at the programmed `count_roll_over`. The default of 4095 keeps the full
12 bits.

## From 24 channels to one buffer

Each channel has its own small FIFO of four edges (`channel_buffer`):
- Edges are handed from the hit-clocked capture register to the 40 MHz domain with a
  toggle bit and a two-flip-flop synchroniser.
- In pair mode, a leading edge and the trailing edge that follows it leave together.
  An unpaired edge is dropped.
- An edge that finds the FIFO full is counted as rejected. The next stored entry, or a
  special inserted entry, carries an error flag.

`channel_arbiter` grants one channel per clock:
- It takes a snapshot of the requesting channels.
- It serves them in fixed priority order.
- It takes the next snapshot only when the current one is used up.

So each waiting channel is served once before any channel is served twice. With 24
simultaneous requests the last one waits 2 + 24 cycles, about 650 ns. That is shorter
than the 800 ns dead time of the front-end discriminator, so in normal running a
channel FIFO never holds more than one pair.

## Level 1 buffer and how overflow is marked

`l1_buffer` is a 256-word circular buffer with a parity bit per word:
- It is written at the write pointer.
- The matching logic reads it at any address.
- Everything older than the start pointer counts as free.

When the buffer fills up, new hits are discarded. The buffer then:
1. Stays full until four words have been freed.
2. Writes the next hit with a *full mark*.

The last hit written before the overflow and the first one with the mark bracket the
time in which hits were lost. Trigger matching flags every event whose window touches
such a marked hit (`enable_l1ovr_detect`).

## Triggers

`control_decoder` reads commands from a single line, one bit per 40 MHz clock. Each
command is a start bit and two more bits:

| bits after start | command |
|---|---|
| 00 | trigger |
| 10 | bunch count reset |
| 01 | global reset |
| 11 | event count reset |

With `disable_encode` set, four direct input pins are used instead.

`trigger_interface` keeps three counters:
- **Bunch counter.** Its offset (default 3996 = −100) makes the stored trigger tag
  equal to the bunch number of the collision, 2.5 µs before the trigger.
- **Reject counter.** Its offset defaults to 3956 = −140.
- **Event counter.**

On each trigger, the event number and the tag go into the 8-word `trigger_fifo`. If
that FIFO is full, the trigger is lost, but the loss is remembered. When room appears,
a marker word is written with the first lost event number. For every event number from
the last processed event up to that marker, trigger matching then emits an empty event:
a header, an error word with the trigger-lost bit, and a trailer. Because of this, the
event numbers seen by the read-out never skip.

## Trigger matching

`trigger_matching` takes one trigger at a time. It scans the L1 buffer from the start
pointer, one word per clock. For each hit it computes d = hit bunch − trigger tag,
modulo the roll-over, as a signed value:

| condition | result |
|---|---|
| 0 ≤ d ≤ `match_window` (default 32 bunches = 800 ns) | the hit belongs to the event and is copied to the read-out FIFO |
| −`mask_window` ≤ d < 0 (default 32) | the hit only sets its channel's bit in the mask word |
| d > `search_window` (default 40) | the scan stops: this hit and all later ones are too young |

Auto-rejection works when no trigger is pending. Hits older than the reject counter
are removed from the buffer by advancing the start pointer. This keeps the buffer from
filling with hits that no trigger will ever want.

An event is written out as:
1. a header with the event number and bunch tag;
2. the matched hits;
3. optionally a mask word;
4. an error word if any error flag is set;
5. a trailer with the word count.

When the 64-word `readout_fifo` is full, matching normally waits. Three options change
that:
- `enable_rofull_reject` drops matched hits and flags the event.
- `enable_l1full_reject` applies that dropping only while the L1 buffer is more than
  three-quarters full.
- `enable_trfull_reject` drops matched hits while the trigger FIFO is full.

With matching disabled, every hit goes straight to the read-out.

## Read-out

`readout_interface` adds the 4-bit TDC identifier to each word. It then sends the word
in one of two ways.

**Serial frame.** The line idles low. Each frame is:
1. a start bit (1);
2. the 32 bits, MSB first;
3. an even parity bit;
4. two stop bits (0).

The speed is 80, 40, 20 or 10 Mbit/s. The strobe is either a DS strobe, which toggles
when the data bit does not, or a leading strobe. The leading strobe can run
continuously or be gated to frames. The serializer runs on the 80 MHz ring clock. A
one-word holding register with a toggle handshake passes words across from the 40 MHz
side.

**Parallel port.** 32 bits with a valid/get handshake on the 40 MHz clock.

At the default 40 Mbit/s, a frame takes 0.9 µs. A 400 kHz hit rate per channel with a
100 kHz trigger rate needs about 32 Mbit/s, which fits.

## Registers, JTAG and errors

**Registers (`csr_regs`).** There are 16 control registers and 6 status registers,
each 12 bits wide. They are written over a small parallel bus (`csr_addr`, `csr_wdata`,
`csr_we`) or loaded as a whole through JTAG. A parity bit follows every write, and a
mismatch reports an upset in the control registers.

Reset values give the standard setup:
- pair mode, matching, mask word, header and trailer on, serial read-out, auto-reject;
- windows 32/40/32;
- offsets 3956/3996;
- 40 Mbit/s with a leading strobe.

The field order inside each register is listed in `amt_pkg::ctrl_t`.

**Errors (`error_monitor`).** Nine hardware error sources are collected:
- coarse-count parity;
- channel select;
- parity in the L1 buffer, trigger FIFO and read-out FIFO;
- trigger matching state;
- read-out state;
- control register parity;
- JTAG instruction parity.

Each source is masked by `enable_error` and held until `error_reset`. The held flags
drive the `error` pin and go into error words.

**JTAG (`jtag_tap`).** A 1149.1 TAP with a 4-bit instruction and a parity bit. It
provides:
- IDCODE;
- BYPASS;
- SAMPLE;
- CONTROL (read and load all control registers);
- STATUS;
- a pass-through chain to the front-end chips' setup registers;
- a general-purpose output register.

The identification code 0x0A3D2001 is this design's own value.

## Where this RTL departs from the chip

- **Boundary scan and test.** There are no EXTEST, INTEST, CORETEST or BIST
  instructions and no boundary-scan chain over the pins. Only SAMPLE exists. It captures
  the chip inputs, including the hit inputs, into a scan register.
- **Analog and pads.** The ring oscillator and PLL are behavioural: always locked, no
  jitter, tap spacing rounded to whole picoseconds. LVDS pads are plain logic signals.
  The front-end chips are not modelled.
- **Own encodings.** These are not fixed by the chip description:
  - the internal word layouts;
  - the error word type code (0110);
  - the codes for serial speed and strobe;
  - bit order and parity sense of the serial frame;
  - the address map of the parallel register bus.
- **Overflow window.** The L1 overflow check is a simplified form. An event is marked
  when its scan meets a full-marked hit that is not older than its mask window.
- **Unused control bits.** Some control bits are named in the register map without a
  description of their effect. They are stored and read back but do nothing here:
  `test_mode`, `test_invert`, `enable_direct`, `clkout_mode`, `error_test`,
  `enable_l1occup_readout`, `inclk_boost`, `errmark_rejected`, `mreset_code`,
  `resetcb_sepa`, `mreset_evrst` and `setcount_bcrst`.
- **Rejected-hit entry.** The entry inserted after a channel FIFO rejection carries the
  time of the rejected edge, not the time room appeared.

## Files and simulation

`rtl/amt_pkg.sv` holds the shared types and constants. Every other file in `rtl/` is
one module, and `rtl/amt_top.sv` connects them. Each module `x` has a self-checking
testbench `tb/tb_x.sv`, which prints `TB_RESULT checks=N failures=M`.

`tb/tb_amt_top.sv` runs the whole chip at its real size. It drives hits on random
channels and the encoded command line. It parses every event and checks each reported
time against the hit edge it generated. It then forces, in turn:
- read-out stalls;
- trigger FIFO overflow;
- read-out-full rejection;
- L1 overflow and recovery;
- auto-rejection;
- leading-edge mode;
- serial read-out;
- event and global resets;
- JTAG IDCODE;
- an L1 parity upset.

It fails if any of these mechanisms never occurred.

`tb/tb_amt_workload.sv` runs the chip under its intended load. All 24 channels take
random hits with an 800 ns dead time, and triggers arrive at 100 kHz. Read-out is serial
at 40 Mbit/s.
- At 100 kHz hits per channel, the mean L1 occupancy comes out at about 7.5 words,
  against an estimate of 24 × 3.3 µs / 10 µs = 7.9.
- At 400 kHz, events average about 7 words, and every trigger still produces its event.

To run a testbench with plain Verilator, for example the top:

    verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -yrtl \
        rtl/amt_pkg.sv tb/tb_amt_top.sv --top-module tb_amt_top -Mdir obj
    obj/Vtb_amt_top +verilator+rand+reset+2

`+verilator+rand+reset+2` starts the simulation from random register contents, as a
real chip does. The top-level run simulates about 0.65 ms in a few seconds.
