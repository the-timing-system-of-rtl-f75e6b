# Event-based timing system for a heavy-ion synchrotron

A synchrotron operating cycle (inject, accumulate and cool, ramp and
accelerate, extract) only works if dozens of devices act at the right moment:
beam chopper, injection bumpers, RF, quadrupole supplies, kickers. This
design keeps those devices in step with an **event system**. One
**event generator (EVG)** plays the machine's cycle as a sequence of 32-bit
**event codes** on a single pulse line. The line is fanned out (optically in
the real machine) to every station. There an **event receiver (EVR)** compares
each code with a small table of cases loaded by its device controller. On a
match it fires a trigger pulse after a programmed delay, with a programmed
width. Every receiver sees the same code at the same time. So a delay set in
one receiver's table is a timing relation with every other device on the
machine.

The RTL covers the digital part of that chain:

```
 host software ──► EVG ──link──► [E/O converter, 150 m cable, O/E, optical fan-out] ──► EVR ──► trigger, event code
                   ▲                     (not logic: outside the RTL)                    ▲        to device controller
      external triggers                                                      case table from the device controller
```

`timing_system_top` holds one EVG and `N_EVR` receivers (default 2, one per
station). The EVG's `evg_link_out` and each receiver's `evr_link_in[i]` are
separate ports, because the optical path between them is not logic. In
simulation, `tb/optical_fanout_model.sv` stands in for that path.

## The event code

Every event is one 32-bit word:

| bits  | 31 | 30 | 29..25   | 24   | 23..16       | 15..8         | 7..0                        |
|-------|----|----|----------|------|--------------|---------------|-----------------------------|
| field | 1  | 1  | reserved | mode | event number | function code | virtual accelerator number  |

- **Head bits.** The two head bits are always `11`. The link uses them to find
  the start of a frame and to check it.
- **Virtual accelerator number.** One physical machine can run several
  "virtual accelerators", i.e. different cycle settings, told apart by this
  field.
- **What the hardware uses.** It uses only the head bits. The generator sends
  codes as stored. The receiver compares the whole 32-bit word with its table.
- **Helpers.** `timing_pkg` has the layout as `event_code_t`, plus
  `make_code()` and `code_head_ok()`.

An operating cycle of the storage ring uses events such as EVT Start Cycle,
EVT Prep Inj, EVT Inj Start, EVT Ramp Start, EVT Mid Start, EVT Prep Ext,
EVT Ext Start, EVT End and EVT MeasureN. A cycle lasts about 17 s, mostly
about 10 s of accumulation and about 3 s of ramping. The numeric codes are
set in the host software. The hardware fixes none of them.

## Clock and units

Everything runs on one 50 MHz clock, so one cycle is 20 ns:

| quantity                    | unit                   | where                      |
|-----------------------------|------------------------|----------------------------|
| link bit time               | 20 ns (1 cycle)        | `event_link_tx/rx`         |
| EVG delay, timeout          | 1 µs (50 cycles)       | `evg_sequencer`, `us_timer`|
| EVG cycle period            | 1 ms                   | `evg_sequencer`            |
| EVR delay                   | 20 ns (1 cycle)        | `evr_trigger_gen`          |
| EVR trigger pulse width     | 40 ns (2 cycles)       | `evr_trigger_gen`          |

## The link

`event_link_tx` sends one frame per event code:

- **Bit order.** The 32 bits go most significant bit first, one bit per
  cycle. A 1 means light.
- **Frame start.** The code head is `11`, so every frame starts with a pulse.
  No separate start bit is needed.
- **Gap.** At least `GAP` = 4 dark bit times separate two frames. Back-to-back
  frames therefore start every 36 cycles (0.72 µs).
- **Handshake.** Codes are taken with a valid/ready handshake. If a code is
  taken in cycle 0, bit 31 is on the line in cycle 1.

`event_link_rx` recovers the codes:

- **Sampling.** The line passes a two-flop synchroniser. The receiver waits
  for the first pulse, then samples one bit per cycle.
- **Output.** A frame whose bit 30 is 1 is delivered three cycles after its
  last bit.
- **Errors.** Any other frame raises `frame_err`.
- **Stuck line.** After each frame the line must go dark before the next
  frame counts. A line stuck at 1 therefore yields one frame and then
  silence, not a stream of events.

The receiver assumes its clock has the generator's frequency and a fixed
phase. In a station, that clock would be recovered from the fibre or
distributed with it. This RTL does not do clock recovery.

## Event generator (`evg`)

### The event cycle table

`evg_event_table` is a 64-line RAM (`DEPTH`). The host writes it and can
read it back. One line describes one event of the cycle:

| word | field                                                   |
|------|---------------------------------------------------------|
| 0    | event code                                              |
| 1    | delay in µs until the next sending                      |
| 2    | `[15:0]` repeat count, `[17:16]` start condition, `[19:18]` external trigger select |
| 3    | timeout (maximum wait for the trigger) in µs            |
| 4    | replacement code sent on timeout                        |

### How a cycle is played (`evg_sequencer`)

This is the heart of the generator. After `start`, the sequencer walks lines
0 to `NUM_EVENTS`-1. Each line goes through three steps.

1. **Start condition.** The line's start condition decides when its first
   sending may go out (`timing_pkg::start_cond_e`):

   | condition         | waits for          | on trigger        | on timeout                                  |
   |-------------------|--------------------|-------------------|---------------------------------------------|
   | `SC_SEQUENCE`     | nothing            | –                 | – (sent as soon as the previous delay ends) |
   | `SC_EXT_TIMEOUT`  | selected trigger   | event code sent   | **replacement code** sent instead           |
   | `SC_EXT_SKIP`     | selected trigger   | event code sent   | event **dropped**, next line starts at once  |
   | `SC_EXT_LONGWAIT` | selected trigger   | event code sent   | event code sent anyway (maximum wait)       |

   - **Timeout clock.** It starts when the line begins to wait, that is, when
     the previous line's last delay has run out.
   - **Trigger inputs.** They are synchronised, and their rising edges count.
   - **Early edges.** An edge only counts while its line is waiting. An edge
     that comes earlier is not stored.
   - **Event lines.** A line with an external condition raises `ev_timeout`
     when it sends its replacement code and `ev_skipped` when it drops its
     event.
2. **Repeats.** The code is sent `repeat` times; a repeat count of 0 counts
   as 1. Each sending is followed by the line's delay. Only the first sending
   waits for the start condition.
3. **Delay timing.** The delay runs from the cycle the link takes a code to
   the cycle it takes the next one, and is exact. The shared `us_timer`
   (`LEAD` = 1) ends one cycle early so that the sequencer's one-cycle
   reaction falls on the microsecond grid. Delays shorter than a frame
   (36 cycles) are stretched by the link.

When the last line is done, the cycle ends.

- **`PERIOD_MS` = 0.** The generator stops.
- **`PERIOD_MS` ≠ 0.** The next cycle starts exactly `PERIOD_MS` ms after
  the start of the previous one, or at once if the table took longer than
  that.
- **Stop.** `stop` aborts at any moment.

`cycle_start` pulses in the cycle in which the first line becomes active.

### Host registers

The host port is a plain synchronous word port. It stands in for the
card's PXI bus interface. Reads return data one cycle after `h_re`.
`h_addr[MSB]` = 1 addresses a table word `{line, word}`. Otherwise:

| addr | register      | access                                 |
|------|---------------|----------------------------------------|
| 0    | `CTRL`        | write bit0 = start, bit1 = stop; read bit0 = running |
| 1    | `NUM_EVENTS`  | lines in the cycle (limited to `DEPTH`)|
| 2    | `PERIOD_MS`   | cycle period in ms, 0 = once           |
| 3    | `CYCLE_COUNT` | cycles started (read only)             |
| 4    | `SENT_COUNT`  | codes sent (read only)                 |

## Event receiver (`evr`)

The receiver has three parts: `event_link_rx`, then `evr_case_table`, then
`evr_trigger_gen`.

- **Case table.** It holds up to 16 (`DEPTH`) pairs of an event ID and a
  delay in 20 ns units. It also holds one trigger pulse width, in 40 ns units.
  Its host map is:
  - 0 = number of IDs
  - 1 = width
  - 2+2i = ID i
  - 3+2i = delay i
- **Lookup.** A received code is compared with all valid IDs at once. The
  lowest matching line wins.
- **Trigger.** On a match the trigger generator waits `delay` cycles, then
  drives `trig_out` high for 2·`width` cycles. A width of 0 gives no pulse.
- **Overrun.** If a new match arrives while a delay or pulse is still
  running, the newest one wins. It restarts the generator and raises
  `overrun` for one cycle.
- **Controller outputs.** Every well-framed code goes to the device
  controller on `evt_valid`/`evt_code`, matched or not. `evt_hit` and
  `evt_hit_idx` follow one cycle later. The controller can then act on events
  that need no hardware pulse, such as starting a waveform or storing data.

## End-to-end timing

Here t is the cycle in which the last bit of a frame is on a receiver's
`link_in`:

| what                                        | cycle            |
|---------------------------------------------|------------------|
| EVG takes a code (`ev_sent`)                | a                |
| bit 31 on `evg_link_out`                    | a + 1            |
| bit 0 on `evg_link_out`                     | a + 32           |
| `evt_valid` at the receiver                 | t + 3            |
| `evt_hit`                                   | t + 4            |
| `trig_out` rises                            | t + 5 + delay    |
| `trig_out` falls (last high cycle)          | t + 4 + delay + 2·width |
| external trigger edge to bit 31 on the line | 3 cycles         |

If the optical path has a fixed delay d, then t = a + 32 + d. The skew
between stations is the difference in their path delays.

## Sizes and what they hold

All sizes are parameters whose defaults are given above. The example cycle
of the operator's sequence editor fits easily:

- It has 4 events, delays of 1000, 250, 2000 and 1000 ms, one event repeated
  72 times, and a 23000 ms period.
- Delays are 32-bit µs counts (up to 71 minutes).
- Repeat counts are 16-bit.
- The period is a 32-bit ms count.

A 17 s storage-ring cycle of nine events uses 9 of the 64 lines. An EVR delay
can reach 85.9 s. A pulse can reach 2.6 ms.

## How this relates to the original system

Taken from the system as described:
- the three-layer structure of generator, fan-out and FPGA receivers;
- the 32-bit code layout;
- 20 ns as the smallest pulse unit on the link;
- the generator's table of code, delay in µs and repeat count;
- a cycle period;
- the four start-condition categories;
- the receiver's table of IDs with delays in 20 ns units and one pulse width
  in 40 ns units;
- the comparison of each received event with pre-stored cases.

Choices of this design, where the description is silent:
- **Link framing:** MSB first, the code head as frame marker, a 4-bit gap, no
  line code or parity, a synchronous receiver clock.
- **Start conditions:** how the four categories are encoded and stored per
  line; the trigger select; the replacement code; that early trigger edges
  are not stored.
- **Delay meaning:** a delay counts from one sending to the next.
- **Repeat 0:** means 1.
- **Cycle period:** how the period is kept, including when the table runs
  longer than its period.
- **Host side:** all register maps and table depths (64 and 16), and the
  simple host port instead of PXI.
- **Receiver:** comparing the full 32-bit code, one trigger output per
  receiver, the "newest event wins" rule and width 0 meaning "no pulse".

Described but not built:
- **Optical and analog parts:** the converters, the twisted-pair run and the
  optical fan-out. These are not logic.
- **Software and computers:** the host software with its sequence editor,
  the database, the synchronisation and front-end servers, and the ARM and
  DSP controllers.
- **Mode bit:** its meaning is not defined, so it is only carried along.
- **Cycle-changing events:** events that change or interrupt the course of a
  cycle are named in the description but not specified. Here only `stop` can
  interrupt.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/timing_pkg.sv \
          tb/tb_timing_system_top.sv --top-module tb_timing_system_top
./obj_dir/Vtb_timing_system_top
```

Replace the testbench name to run another one.

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_timing_system_top`    | Whole system at default size. It runs one operating cycle from Start Cycle to MeasureN with a 1 ms period, through the fan-out model to two receivers. The first cycle has all triggers; the second has none (timeout, maximum wait, skip). It also injects a corrupted frame and ends with a stop. A reference model predicts every trigger pulse to the cycle. It counts each mechanism and fails if one never happens. |
| `tb_gui_cycle`            | The editor's example cycle (75 frames, 23 s period), with all times divided by 20. It checks the frame order at both receivers, the exact spacing and period, and 72 trigger pulses. It takes about a minute. |
| `tb_evg`                  | Generator through its host port only. It checks read-back, frame spacing = delay·50 cycles, the three-cycle trigger-to-line latency and the status registers. |
| `tb_evg_sequencer`        | Delays and repeats, all four start conditions with and without triggers, an ignored trigger on the wrong input, the 1 ms period, a table longer than its period, and stop. |
| `tb_evg_event_table`, `tb_us_timer`, `tb_event_link_tx`, `tb_event_link_rx`, `tb_evr`, `tb_evr_case_table`, `tb_evr_trigger_gen` | Each block alone, against expected values worked out in the testbench. |

## Files

- `rtl/timing_pkg.sv`: code layout, start conditions, table line type,
  constants.
- `rtl/timing_system_top.sv`: the system.
- Generator: `rtl/evg.sv`, `rtl/evg_event_table.sv`, `rtl/evg_sequencer.sv`,
  `rtl/us_timer.sv`, `rtl/event_link_tx.sv`.
- Receiver: `rtl/evr.sv`, `rtl/event_link_rx.sv`, `rtl/evr_case_table.sv`,
  `rtl/evr_trigger_gen.sv`.
- `tb/optical_fanout_model.sv`: behavioural model of the optical path, used
  only in simulation.
- `tb/tb_*.sv`: the testbenches.
