# Trigger and clock distribution for a pipelined DAQ (GlueX style)

A detector read out by many front-end crates needs one trigger decision made centrally to reach every
front-end module in the same 4 ns clock cycle. This holds even though each crate sits at the end of
a fibre of a different length. The crates must also stop taking triggers when any of them is
full.

This RTL builds the full chain for up to 128 crates, all running on one 250 MHz clock:

- The **trigger supervisor (TS)** turns trigger inputs into a stream of 16-bit trigger words, one
  every 16 ns, plus a separate serial SYNC command line.
- A **signal distribution (SD)** board and up to 16 **trigger distribution (TD)** boards fan both
  out over fibre bundles.
- A **trigger interface (TI)** in each front-end crate delays everything by exactly the right
  amount, then fires its crate's modules at a system-wide fixed latency. It also builds event
  records for the crate's read-out controller (ROC).
- BUSY and block acknowledges flow the other way, in a status word per 16 ns, and throttle the
  supervisor.

```
 gtp_in[31:0] ─► LUT ─► prescale ─┐
 ext_in[31:0] ─► LUT ─► prescale ─┼► source encoder ─► type mux ─► word assembler ─┐ 16-bit word / 16 ns
 vme_trig ────────────────────────┘   ▲ throttle (BUSY, inhibit, SYNC-event wait) │
 SYNC command ─► serialiser + Manchester ──────────────────────────────────────────┤ SYNC chips
                                                                                  ▼
            SD (16 slots) ──► TD ×16 ──(8 fibre bundles each)──► TI ×128 ──► crate SD ──► 16 front-end slots
            BUSY OR ◄──────── BUSY OR ◄──────── status words ◄──────── BUSY OR ◄──────── fe_busy
```

## Time base: the 16 ns slot

Everything runs on one clock, `clk` at 250 MHz (4 ns). Four cycles make a *slot* of 16 ns. That
is the period of the 62.5 MHz word clock, and exactly one 16-bit word crosses each fibre per slot.
`slow_clock_phase` counts the position in the slot (0–3). Its 125 MHz and 62.5 MHz outputs are
clock enables, not clocks. In every TI the phase counter is forced to 0 by the clock-resync SYNC
command. The command arrives in every crate in the same cycle (see below), so afterwards all slot
counters in the system agree.

## Words on the trigger link (`gt_pkg`)

| bits  | 15         | 14:13 | 12:11                  | 10:0                |
|-------|------------|-------|------------------------|---------------------|
| trigger | odd parity | `10` | 4 ns position in slot | type bits 10:0       |
| content | odd parity | `11` | source (00 collision, 01 GTP, 10 front panel, 11 VME) | type bits 13:11 in 2:0 |
| command | odd parity | `01` | 00 VME command, 01 SYNC event | 11-bit data |
| timer   | odd parity | `00` | timer bits 12:11       | timer bits 10:0      |

How the supervisor picks each slot's word:

- A trigger in slot *w* leaves as a trigger word in slot *w+1*.
- Its content word goes out in slot *w+2*.
- When there is no trigger or content word to send, the slot carries a queued command word.
- When nothing else is due, the slot carries the slot timer.

Each TI checks that every timer word equals the previous timer plus the number of words since.
This detects a lost or extra word on any link.

Because each trigger takes two words, triggers are at least 32 ns apart. A trigger that arrives
during that dead time is counted as lost.

## Trigger supervisor (`ts_top`)

- **`ts_trigger_lut`**: a two-level table. Each 16-bit half of the 32-bit input pattern addresses
  a 64K × 8 first-level table. The two bytes form the address of a 64K × (1 + type) second-level
  table, which holds the trigger bit and the trigger type. The GTP instance has a 14-bit type; the
  front-panel instance (four groups of eight inputs) has an 8-bit type. The tables are block RAMs
  with 2 cycles of latency, 3.5 Mibit in total.
- **`ts_prescaler`**: one per table. It passes the first trigger, then one in *N*.
- **`ts_trigger_source_encoder`**: merges the GTP, front-panel and VME triggers into one pulse with
  a 2-bit source. If two or more sources fire in the same 4 ns cycle, the result is a *collision*
  trigger with source `00`, and its type is the mask of the sources that fired.
- **`ts_trigger_mux`**: selects the trigger type that matches the source.
- **`ts_throttle`**: allows triggers only when all of these hold:
  - `run_enable` is set;
  - VME inhibit is off;
  - merged BUSY is off;
  - the supervisor is not waiting after a SYNC event.
- **`ts_trigger_word_assembler`**: the slot scheduler described above.
- **`ts_sync_encoder`**: sends a 4-bit SYNC command at 250 Mb/s.
  - The line idles at 1. A command is a start bit 0, then four bits MSB first.
  - There are at least four idle 1s between commands.
  - The start bit always leaves at the same slot phase (`sync_phase_offset`, default 3). This is
    what lets a TI realign its slot counter from a SYNC command.
  - Bits are Manchester coded (`1` → chips `01`, `0` → `10`) so the fibre stays DC balanced.

SYNC codes:

| code | action                                       |
|------|----------------------------------------------|
| 0010 | clock resync (slot phase to 0)               |
| 0111 | trigger stop: link disable, FIFO write reset |
| 0101 | trigger start: link enable, FIFO read reset  |
| 1101 | front-end crate reset                        |
| 0001 | VME clock DCM reset pulse                    |
| 0100 | clear TI error flags                         |

Codes 0000 and 1111 are invalid.

## Fixed latency over unequal fibres (the key mechanism)

Each TI first measures its fibre (`ti_latency_meter`). It sends a one-cycle pulse on the spare
fibre pair, the TD loops it straight back, and the TI counts cycles until the pulse returns. Half
of that count is the one-way latency *L*.

`ti_top` then sets `sync_delay = latency_target − L`. Every decoded SYNC command passes through
this delay (`ti_sync_delay`), so a command reaches every TI's logic `latency_target` cycles (plus
a fixed decode time) after the supervisor sent it. The result is the same in every crate.

Trigger words cannot be delayed like that, because they are data. They go through a FIFO,
`ti_trigger_fifo`, with two counters that are reset at different times:

- The **write counter** is reset by the *raw* trigger-stop command as it arrives, before the
  delay. The next word the supervisor sends is therefore written at address 0 in every crate,
  whatever the fibre length.
- The **read counter** is reset by the *delayed* trigger-start command, which happens in the same
  cycle everywhere. From then on the FIFO is read once per slot, at slot phase 0.

So word *k* after trigger stop is read in every crate in the same cycle. The total latency from
the supervisor to the front end is:

- the time between the trigger-stop and trigger-start commands,
- plus `latency_target`,
- plus a fixed pipeline.

The fibre length drops out of that sum.

`ti_trigger_decoder` then delays each trigger by its 2-bit position inside the slot, so the 4 ns
timing made by the supervisor is kept. In simulation, 128 crates with fibres of 4 to 90 cycles all
fire in the same cycle, 178 cycles after the supervisor accepted the trigger. In that run
`latency_target` is 120 and the stop and start commands are sent 40 cycles apart.

Constraints that follow:

- `latency_target` must exceed the longest one-way latency plus decoding.
- The stop-to-start gap plus the target must stay within the FIFO depth: 128 words, or 2 µs.
- The system reset must last longer than the longest fibre round trip. Otherwise words and test
  pulses sent before reset are still on a fibre afterwards, and are counted as real.

## BUSY, blocks and the read-out controller

**Status words.** Each TI sends one status word per slot to its TD (`ti_status_word`):

| bit | meaning                              |
|-----|--------------------------------------|
| 0   | BUSY                                 |
| 1   | readout acknowledge                  |
| 2   | trigger received                     |
| 3   | SYNC-event BUSY                      |
| 4   | sync error                           |
| 15  | odd parity                           |

Three sources set the crate BUSY bit:

- the OR of the crate's 16 front-end BUSY lines (through the crate SD);
- the TI's own event FIFO being almost full;
- the SYNC-event state.

**Event records.** `ti_event_builder` stores one record per trigger: a 32-bit event number, a 48-bit
time stamp in 4 ns ticks, the 14-bit type, the source and a SYNC-event flag. It groups events
into blocks of `block_size`. The poll flag `irq` is high while a finished block is waiting. The ROC
pulses `roc_ack` once per block it has read, and the acknowledge goes back to the TD in the next
status word.

**Event limit.** For each link, `td_link_monitor` counts the blocks sent and the blocks
acknowledged. The link asserts BUSY when the difference reaches `limit`:

- `limit` 1 with a block size of 1 is event-locking mode: one trigger, then wait for its readout.
- `limit` 0 switches the check off (pipeline mode). Only front-end BUSY then throttles the
  triggers.

The TD ORs its eight link BUSYs, and the global SD ORs the TDs into the supervisor's BUSY input.

**SYNC event.** This is a special trigger that resynchronises the DAQ:

1. The supervisor sends it as a command word, then stops triggering until BUSY comes back.
2. Every TI fires it like a trigger, with a flagged event record, and holds BUSY.
3. Each ROC raises `roc_sync_ack` once its crate's buffers are empty, which releases that crate's
   BUSY.
4. Triggers resume when the last crate has released BUSY.

## Slow-control bridges of the supervisor

The supervisor carries two `jtag_engine`s, one on its FPGA's JTAG port and one on its
configuration PROM's. Each one shifts up to 32 bits per command:

- The host gives a TMS word, a TDI word and a bit count.
- Bits go out LSB first at TCK = clk/8 (31.25 MHz).
- TDO is sampled at each rising TCK edge and returned as a 32-bit word.

This loads a PROM 32 bits per bus transfer instead of one.

It also carries two `i2c_engine`s, one per switch slot, because those slots have no VME access.
Each command runs one single-byte I²C transfer on an open-drain bus at 100 kHz, in this order:

1. START;
2. address and R/W;
3. one data byte, written, or read and answered with NACK;
4. STOP.

A missing acknowledge is reported in `ack_error`. Clock stretching is not supported.

## Top level (`gluex_trigger_system`)

The top level has one TS, one SD, `N_TD` (16) TDs with `N_TI_PER_TD` (8) links each, and one TI
plus a crate SD of `N_FE_SLOTS` (16) slots per front-end crate.

The fibres are not inside the top level:

- `td_fib_*` (TD side) and `ti_fib_*` (TI side) are ports.
- Entry *i* of the flattened arrays is link `i % 8` of TD `i / 8`.
- The environment connects the two sides with whatever delay each crate's fibre has; the
  testbenches use `tb/fiber_model.sv`.

Front-end modules (`fe_trig`, `fe_reset`, `fe_busy`), ROCs (`roc_*`) and the JTAG and I²C
pins (`jtag_*`, `i2c_*`) are ports too. Slow control
is a plain register-style interface in place of VME:

- table loads (`lut_wr_*`);
- prescale factors;
- `sync_cmd_valid`/`sync_cmd` with an accept handshake;
- `cmd_valid`/`cmd_code`/`cmd_data` for command words.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. To build one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb --top-module ti_top_tb \
    rtl/gt_pkg.sv $(ls rtl/*.sv | grep -v gt_pkg) tb/ti_top_tb.sv -o sim && obj_dir/sim
```

The package `rtl/gt_pkg.sv` must come first. Helper modules in `tb/` (`fiber_model`) are found
through `-Itb`.
The end-to-end tests share their body in `tb/gluex_trigger_system_tb_body.svh`:

- `gluex_trigger_system_tb` runs 2 TDs × 2 crates, in seconds.
- `gluex_trigger_system_full_tb` runs the top with its default parameters: 16 × 8 = 128 crates
  with 16 slots each. It builds and runs in a few minutes.

The end-to-end sequence is:

1. one JTAG shift and one I²C transfer on each engine, then latency measurement;
2. SYNC resync, stop, start and front-end reset;
3. triggers from every source at every 4 ns position;
4. a collision and prescaling;
5. a VME command word;
6. front-end BUSY throttling;
7. event-limit BUSY with the ROCs stopped;
8. a SYNC event with a ROC that takes 300 cycles to answer.

Throughout the run the testbench checks:

- every slot of every crate fires, and resets, in the same cycle;
- the latency is the same for every trigger;
- every crate's event records match the triggers sent;
- time stamps are equal across crates;
- no TI raises a timer, FIFO or parity error.

Each mechanism is counted, and one that never happened is a failure.

## What is not here, and where this design chose

- **Not built: analog and vendor parts.** These are the clock fan-out chips, jitter-cleaning PLLs,
  the clock re-sampler, optics, the multi-gigabit serialisers (words travel in parallel with a
  valid bit) and VME64x.
- **Not built: sub-cycle SYNC alignment.** This uses IODELAY and a carry-chain delay measurement,
  so latency is measured and compensated in whole 4 ns cycles only.
- **Not built: partitioning and commissioning set-ups.** Every TI here decodes every trigger type.
  There is no per-TI type filter, no sub-system supervisor and no stand-alone master board. The
  shared board could be loaded with these in other configurations.
- **Event-limit rule.** BUSY is set when blocks outstanding ≥ `limit`, which makes `limit` 1 mean
  event locking. A rule of "> limit" would allow two.
- **Type widths.** The GTP type is 14 bits and the front-panel and VME types are 8 bits. The 3
  type bits that do not fit in a trigger word travel in the content word that follows it.
- **This design's own choices:**
  - word-type encodings and the content-word layout;
  - the status-word bit positions;
  - the timer check rule;
  - the command-word field codes;
  - FIFO depths (trigger 128, SYNC delay 256, events 64);
  - the prescaler counting rule;
  - treating simultaneous sources as a collision in one 4 ns cycle.
