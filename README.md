# ROD-Busy module: busy summing and busy-time monitoring in SystemVerilog

In the ATLAS read-out, each Read-Out Driver (ROD) raises a *busy* signal when
its data buffers are close to full. The Central Trigger Processor (CTP) must
then stop sending level-1 accepts until the buffers drain, or data is lost.
With several hundred RODs, the busy signals are collected in a tree of
ROD-Busy modules: each module ORs up to 16 busy inputs into one busy output,
which feeds either a module further up the tree or, at the root, the CTP veto.

A plain OR would hide *which* ROD keeps the experiment dead. So each module
also:

* lets software mask off a misbehaving input, so that one faulty ROD cannot
  veto the whole experiment;
* shows the live state of every input, and can force any input busy through
  a test register to check the path;
* measures how long each input has been busy (a 16-bit counter per input at
  10 MHz) and keeps a history of these measurements in a 512-word FIFO per
  input;
* watches the summed busy and raises a VME interrupt when it has been busy
  for too long within a programmed interval.

This repository holds synthesizable RTL for the module's logic, which on the
original board lives in a handful of FPGAs, and self-checking testbenches.

```
              test reg ──► test driver (OR)
                               │
 busy_in[15:0] ────────────────┼──► sync ──► monitor latch ──────────► VME (INPUT)
                               │       │
                               │       └──► 4 x quad_count_struct ──► 16 x history_fifo ──► VME
                               │               ▲   (16 x 16-bit)        (512 x 16 each)
                               │               │                          ▲
                               │        fifo_sequencer (16-bit down counter, shadow reg)
                               │
   mask reg ──► OR of unmasked lines, OR force_busy ──► busy_out[3:0]
                               │
                               └──► sync ──► sreq_timer_struct ──► vme_interrupter ──► IRQ*
```

## Files

| file | what it is |
|---|---|
| `rtl/rod_busy_pkg.sv` | sizes, register map, control/command/status register structs, VME address modifiers |
| `rtl/rod_busy_module.sv` | top level: wires the blocks below together |
| `rtl/ip_reg_structure.sv` | test OR, synchronisers, monitor latch, masking, busy sum, output fan-out |
| `rtl/quad_count_struct.sv` | four 16-bit busy-duration counters (four instances for 16 inputs) |
| `rtl/history_fifo.sv` | one 512 x 16 FIFO with empty and full flags |
| `rtl/fifo_sequencer.sv` | software/sequencer mode selection and the timed transfer counter |
| `rtl/sreq_timer_struct.sv` | busy time-out service requester |
| `rtl/vme_if.sv` | VME slave (D16, A24/A16) and the register file |
| `rtl/vme_interrupter.sv` | VME interrupter with IACK daisy chain |
| `tb/tb_*.sv` | one self-checking testbench per block, one for the top, one for a three-module tree |
| `tb/vme_master_bfm.sv` | VME master model used by the testbenches |

## The busy path

The busy path is the part that matters most for the experiment and it is
deliberately the simplest: `busy_out = OR((busy_in | test) & ~mask) | force_busy`,
purely combinational, copied to all four outputs. No clock lies between a
ROD raising busy and the veto, however deep the tree. All signals here are
active high; on the board the cables carry busy as 0 V, and the analog
receivers and open-collector output drivers (not part of this RTL) do the
inversion. Of the four outputs, two are meant to drive the next module or the
CTP and two are for monitoring; logically they are identical.

Masking only removes an input from the sum. The same input is still
synchronised, shown in the input register and counted, so a masked ROD can be
watched while it is kept from vetoing triggers.

## Measuring busy time: counters, FIFOs and the sequencer

This is the part that needs the most care in use.

Each input has a 16-bit counter that advances on every 10 MHz clock on which
its synchronised input is busy (masked or not) and counting is enabled. A
counter value is therefore a busy time in units of 100 ns. Counters saturate
at 65535 instead of wrapping.

Counter values reach the history FIFOs by a global *transfer*: all 16 counters
are written into their FIFOs on the same clock. There are two ways to drive
this, chosen by control bit `seq_en`.

**Software mode** (`seq_en = 0`). Everything is done by register accesses:
`CTRL.cnt_en` enables the counters, command bits clear the counters, write all
counters into the FIFOs, or empty the FIFOs, and reading a FIFO's address pops
its oldest word.

**Sequencer mode** (`seq_en = 1`). A 16-bit down counter, reloaded from the
`SEQ_SHADOW` register, makes a transfer every `SEQ_SHADOW` clocks (0 counts as
65536). The longest programmable period, 65535 clocks, is 6.5535 ms. Entering
the mode clears the counters, and the counters run continuously. On a transfer
clock, three things happen at once:

1. every FIFO stores its counter's current value;
2. every counter restarts, already including the current clock's busy tick,
   so no clock is lost or counted twice between two periods: a permanently
   busy input records exactly `SEQ_SHADOW` in every word;
3. every FIFO that is full and whose bit is set in `CIRC` is read once, which
   drops its oldest word.

The result is the FIFO's behaviour at its capacity:

* `CIRC` bit clear: once 512 words are stored, further transfers are dropped,
  so the FIFO keeps the *first* 512 measurements after it was emptied;
* `CIRC` bit set: the FIFO keeps the *newest* 512 measurements, a sliding
  history of the last 512 periods.

Timing seen by a user:

```
seq_en written ─┐
clock:          E0      E1 ...  E(N-1)   EN          E(N+1) ...  E2N
                counters cleared (start)  transfer 0             transfer 1
                down counter = N          word = busy ticks E0..E(N-1)
```

Busy inputs pass a two-flop synchroniser before the counters, so an edge on
`busy_in` shows in the counters two clocks later. The duration of a busy
pulse is preserved exactly.

VME commands still work in sequencer mode. A software FIFO write adds an extra
word, and reading a FIFO pops a word, so software can read out the history
while the sequencer runs.

## Busy time-out service requester

Two 16-bit counters, each with a register and a comparator, run at 10 MHz:

* the *interval* counter counts every clock; after `SREQ_INTVL` clocks it
  restarts itself and clears the limit counter, so busy time is judged over
  windows of `SREQ_INTVL` x 100 ns;
* the *limit* counter counts the clocks on which the summed busy is true. If
  it reaches `SREQ_LIMIT` within one window and `CTRL.sreq_en` is set, the
  service request is set.

The request stays set until software clears it. Software can also set it by
command. The enable bit gates only the timer's own setting. A rising service
request triggers the VME interrupter.

Example: interval 10000 (1 ms) and limit 2000 interrupt as soon as the
module's output has been busy for 20 % of a 1 ms window. The windows follow
each other back to back; they do not slide.

## VME interface

The slave takes only 16-bit word cycles (D16), with A24 (AM 0x39, 0x3D) or A16
(AM 0x29, 0x2D) addressing. The four hex base switches `base_sw` are compared
with A[23:8] in A24 cycles and with A[15:8] against the lower two switches in
A16 cycles. The module occupies 256 bytes. Address-only cycles (AS* without
DS*) are accepted and do nothing. Byte and long-word cycles are not answered,
so the master's bus timer ends them. The address phase (A, AM, IACK*,
LWORD*) is latched by the falling edge of AS* itself. A master may therefore
put its next address on the bus right after AS* falls (address pipelining).

The bus strobes are asynchronous and are synchronised to the 10 MHz clock.
Each strobe level must therefore last more than 100 ns. DTACK* follows DS* by
about three clocks (300 ns) and is released about two clocks after DS* rises.

Register map (byte offsets from the base address):

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | rw | [0] seq_en, [1] cnt_en (software mode), [2] force_busy, [3] sreq_en |
| 0x02 | STATUS | r | [0] busy out, [1] service request, [2] interrupt pending, [3] sequencer running |
| 0x04 | MASK | rw | 1 = input removed from the busy sum |
| 0x06 | TEST | rw | 1 = input driven busy |
| 0x08 | INPUT | r | live state of the 16 input lines |
| 0x0A | SEQ_SHADOW | rw | transfer period in 100 ns clocks (0 = 65536) |
| 0x0C | CIRC | rw | 1 = FIFO kept as circular buffer in sequencer mode |
| 0x0E | FIFO_EMPTY | r | empty flags |
| 0x10 | FIFO_FULL | r | full flags |
| 0x12 | SREQ_INTVL | rw | time-out interval in clocks |
| 0x14 | SREQ_LIMIT | rw | time-out limit in busy clocks |
| 0x16 | IRQ_CTRL | rw | [2:0] interrupt level, [3] interrupter enable |
| 0x18 | STATUS_ID | rw | [7:0] Status/ID returned in the IACK cycle |
| 0x1A | CMD | w | pulses: [0] clear counters, [1] write FIFOs, [2] empty FIFOs, [3] set request, [4] clear request, [5] test interrupt, [6] module reset |
| 0x20 + 2i | CNT[i] | r | live counter of input i |
| 0x40 + 2i | FIFO[i] | r | oldest word of FIFO i; the read removes it (0 if empty) |

The module reset command clears every register, counter and FIFO. It leaves
the bus state machines alone, so the write that issued it still completes.

The interrupter drives IRQ*[level] while a request is pending. It answers an
acknowledge cycle for its level, arriving through IACKIN*, with the Status/ID
byte on D[7:0], and then withdraws the request (release on acknowledge). An
acknowledge for another level, or one arriving while nothing is pending, is
passed on through IACKOUT*. Clearing the enable bit withdraws a pending
request.

## Top-level interface

`rod_busy_module` has the parameters `N_IN = 16` (a multiple of 4),
`N_OUT = 4` and `FIFO_DEPTH = 512`. Its ports: `clk` (10 MHz), `rst`
(synchronous, active high), `busy_in[N_IN]`, `busy_out[N_OUT]`,
`base_sw[16]`, and the VME signals. The VME data bus is split into
`vme_d_in`, `vme_d_out` and `vme_d_oe` for an external transceiver.
`vme_dtack_n`, `vme_irq_n[7:1]` and `vme_iackout_n` are active-low controls
for open-collector or tristate drivers.

## What follows the original module and what does not

The following match the original ATLAS ROD-Busy module as it was published:
16 inputs, the OR with masking, the test register and the forced global busy,
4 outputs, the input status register, 16-bit counters at 10 MHz grouped in
fours, 512-word FIFOs with empty/full flags, first-512 and circular modes, the
16-bit sequencer with shadow register (up to 6.55 ms), the interval/limit
time-out requester with software enable/disable/set/clear, D16 A24/A16 VME
with hex base switches, address pipelining and address-only cycles, the
interrupter with programmable level, enable, 8-bit Status/ID and software
test, and the software module reset.

The following are this design's own choices, because no published source
gives them:

* the register map, bit assignments and accepted address modifiers, and how
  the base switches map onto A24 and A16 addresses;
* one clock domain: the VME strobes are synchronised to the 10 MHz clock
  instead of being handled asynchronously;
* mask bit = 1 means masked off; one circular bit per FIFO;
* counters saturate; a counter restart keeps the current clock's tick;
* a transfer is one clock (write, restart and circular read together), and
  only the sequencer makes circular reads;
* the window and limit semantics of the time-out requester at its edges, and
  a latched request;
* release-on-acknowledge interrupts triggered by the request's rising edge;
* the time-out requester watches the summed busy, as the detailed
  description of the original module has it. One summary of the original
  instead speaks of an interrupt when *any* input is busy too long. Per-input
  time limits are not built;
* the sequencer writes and reads the FIFOs but never resets them. The FIFOs
  are emptied only by command, because no rule for a sequencer-driven reset
  is known;
* the FIFOs are built as memory arrays with first-word fall-through. The
  original board probably uses FIFO chips.

Not included, since they have no logic function or are bought-in parts: the
input receivers (50 Ω Thévenin termination, 0.4 V comparators with
hysteresis), the open-collector test and output drivers with their pull-ups,
the 10 MHz oscillator and clock fan-out, the configuration EEPROM holding the
module identity and serial number, and the FPGA in-system programming chain.

## Simulating

Any testbench runs with plain Verilator 5 (`--timing` is needed for the
testbench delays). For example, the full module at default size:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rod_busy_pkg.sv tb/tb_rod_busy_module.sv --top-module tb_rod_busy_module
./obj_dir/Vtb_rod_busy_module
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each also has
a watchdog that counts a failure if the simulation hangs.

| testbench | what it shows |
|---|---|
| `tb_ip_reg_structure` | random inputs/test/mask/force against the OR formula; synchroniser and monitor latencies |
| `tb_quad_count_struct` | counters against a reference model, including enable, restart and saturation |
| `tb_history_fifo` | first-512 retention, newest-512 retention with read-on-write, random traffic against a queue |
| `tb_fifo_sequencer` | software pass-through; transfer periods of 5, 37, 65535 (6.5535 ms) and 65536 clocks; circular reads |
| `tb_sreq_timer_struct` | request on the 30th busy clock of a 100-clock window, window edges, enable/set/clear, random against a model |
| `tb_vme_if` | A24/A16 reads and writes of every register; foreign base, foreign AM, byte, IACK and address-only cycles ignored; FIFO pop; command pulses; DTACK latency |
| `tb_vme_interrupter` | two interrupters in a daisy chain: level match, pass-through, priority, test, disable |
| `tb_rod_busy_module` | the whole module at default parameters, driven over VME: sum, mask, test, force, software transfers, 601 sequencer transfers filling a circular and a non-circular FIFO, time-out interrupt with acknowledge, chain pass-through, address-only cycle, module reset; each mechanism is counted and must occur |
| `tb_busy_tree` | three modules as a tree (two leaves with 15 RODs plus a sub-system busy each, one root): the veto is the OR of every unmasked busy, and the root measures a leaf's busy time |

## Changing it

* **More or fewer inputs:** set `N_IN` (a multiple of 4). The register map
  keeps 16-bit registers, so more than 16 inputs would need wider or extra
  registers in `vme_if`.
* **Deeper history:** set `FIFO_DEPTH`. The full and empty flags and the
  circular logic follow it.
* **Another register map:** edit the constants and structs in
  `rod_busy_pkg.sv`. `vme_if` decodes by name only.
