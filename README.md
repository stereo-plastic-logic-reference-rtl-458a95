# PLASTIC digital electronics in SystemVerilog

PLASTIC is a solar-wind and suprathermal ion spectrometer. An electrostatic analyser (ESA) sweeps through 128 energy steps per minute. Within each energy step, 32 deflection steps scan the entrance angle. Each ion that gets through starts a time-of-flight (TOF) measurement and may hit a position anode and a solid-state detector (SSD).

The digital electronics turn these raw signals into science data in three ways:

- They keep the sweep running.
- They decide, per event, whether the signals form a valid ion. A valid event becomes a 48-bit PHA word (pulse-height analysis: step, quadrant, SSD, energy, TOF, position, section).
- A classifier board looks each PHA word up in mass and mass-per-charge tables and adds it to histogram counters in RAM. The IDPU (the spacecraft data processor) reads out one RAM bank while the other fills.

This repository is a synthesizable model of that logic with a 25.6 MHz single-clock design. It covers:

- the instrument controller's command receiver and counters;
- the logic board's register file and mode-3 sweep sequencer;
- the rate counters and the serial links between boards;
- the two event-selection engines;
- the PHA serial link;
- the classifier.

Everything that is analog, a memory chip, or another processor is a port of the top module `plastic_top`.

## Block structure

```
IDPU cmd line ─► ic_cmd_rx ─► ic_cmd_ctrl ──► telemetry words (tlm_*)
                                   │ logic-board commands
                                   ▼
                       ser_tx(24) ─UTIL cmd─► ser_rx(24) ─► lb_regs ─► cfg (all registers)
                                                                    │
 time message ─► sweep_ctrl ─► esa_step, defl_step, strobes, trigs, blanking, rate control
                     │                  │
                     │ dac_load         └─► rate_counters ◄── 32 rate pulses
                     ▼                             │
              ser_tx(16) ─► swp_* (HV word)        ▼
                                           lb_util_seq ─► ser_tx(16) ─util_dat─► ser_rx(16) ─► ic_util_*
 TAC0/SSD/RA signals ─► sw_event  ─┐
 TAC2/position       ─► wap_event ─┴► pha_tx ─6 serial lines─► classifier ─► EEPROM / RAM ports
 SSD optical link ◄─► ssd_link ◄─► sw_event energy reads; cfg 50h–52h commands
```

`plastic_pkg` holds the types shared by these blocks:

- `pha_word_t`: the PHA word.
- `bins_dat_t`: the classifier's table word.
- `ic_cmd_t`: a command word.
- `lb_cfg_t`: every register field.
- The module and message-ID codes.

## Commands and telemetry

A command is 24 bits: a 4-bit module address, a 4-bit command and 16 data bits. It travels on a two-wire serial line as a start bit (1), the 24 bits MSB first, an odd parity bit and a stop bit (1). The line idles at 0.

`ic_cmd_rx` synchronises the line and samples on the rising clock edge. It reports each word with parity-error and frame-error flags.

`ic_cmd_ctrl` executes the command:

| Module | Action |
|---|---|
| 0001 | Instrument-controller commands. Write/read the control register, read status, the received and executed counters and the 4-bit error counters. Each read answers with a MESSAGE_ID header word and one data word. |
| 0010 | Instrument-controller memory commands: received and counted, otherwise ignored (not built). |
| 0011, 0100 | Forwarded to the logic board as a 24-bit UTIL command. |
| 1111 | IDPU messages: command F resets the IDPU; any other command is the time message that starts a sweep. |

Unknown commands, and words with frame or parity errors, are counted and not executed. Bit 7 of a control-register write clears all counters. Counter reads and the time message are not counted themselves, so a read returns a stable value.

## Logic board registers

`lb_regs` holds the control registers 00h–09h and the event-logic registers 41h–76h, with the reset defaults of the reference. It decodes the immediate command `0011 0001`, with the register address in data[15:8] and the value in data[7:0].

- An unknown address raises `lb_bad_addr`.
- Every accepted write, except MODE_CTL, EVENT_CTL and 3Fh, is reported on `lb_log_*`.

In the instrument the event registers live in a second FPGA that the first one loads. Here they are one register file, and its fields reach every block through the `cfg` struct, which is also a port.

## The mode-3 sweep

`sweep_ctrl` is the centre of normal operation. Once MODE_CTL is 3, a time message starts the sweep.

1. **Start.**
   - TAC0 and TAC2 get a 1 µs reset, and the rate counters are cleared.
   - Event blanking is lifted.
   - `e_stp_stb` and `d_stp_stb` are sent together for 400 µs, followed by a 400 µs gap.
2. **Each energy step** (128 of them) runs 32 deflection steps of 12.8 ms each.
   - Each deflection step has 16 `d_stp_stb` strobes of 400 µs, one every 800 µs, which advance the DAC board's deflection ramp.
   - At the end of each deflection step:
     - `deflection_trig` (400 µs) goes to the instrument controller;
     - the rate counters run the enable-low / latch / clear / enable sequence;
     - `defl_step` advances;
     - `defl_done` starts the rate readout.
   - `e_stp_stb` follows the 16th and the 32nd deflection step.
   - After the last deflection step:
     - `e_step_trig` is sent;
     - event selection is blanked;
     - `dac_load` sends the next HV word (`swp_next`, 8-bit address + 8-bit value) on the `swp_*` serial lines;
     - the sequencer waits 26 ms for the HV to settle;
     - `esa_done` reports the finished step, and `esa_step` advances one clock later.
3. **After 128 steps**, `retrace_trig` is sent and the sequencer waits for the next time message.

At the default sizes a sweep takes 128 × (32 × 12.8 ms + 26 ms) = 55.8 s of the 60 s minute.

Leaving mode 3 stops the sweep at once.

**Rate-limit switch.** When RATE_CHK is set, the latched rate of channel RLIM_CH is compared with RLIM after every deflection step:

- If RLIM is larger, the S channel is switched on (`s_ch_auto`); otherwise it is switched off.
- The switch is cleared at the end of every energy step.
- The effective flag, EVENT_CTL's `s_ch_en` OR `s_ch_auto`, is bit 7 of the step number sent to the event logic and to the instrument controller.

**Rate and step readout.** `lb_util_seq` sends words on the 16-bit `util_dat` link:

- after each deflection step, a step word `{s_ch, esa_step, 000, defl_step-1}` followed by the 32 latched rates;
- after each energy step, the finished step `{00h, s_ch, esa_step}`.

`ser_rx` receives the words at the instrument-controller end, and they appear on `ic_util_*`. On each `e_step_trig` the instrument controller also swaps the classifier RAM bank (`ram_sel`).

All serial links (`ser_tx`/`ser_rx`) run at clk/8 = 3.2 MHz, MSB first, framed by a gate signal. Data changes while the bit clock is low and is sampled on its rising edge.

`stim_gen` makes the test-pulser square wave:

- Frequency: 25.6 MHz / (2·(16·STIM_FREQ + 16)), 800 kHz down to 12.2 Hz.
- It is gated onto five outputs by STIM_ENABLE.

## Event selection

There are two independent engines, one per TAC. Each outputs a `pha_valid` strobe with a `pha_word_t`, plus one-clock rate pulses.

**Quadrants 0 and 1** (`sw_event`, solar-wind sector, with SSDs). The trigger mode TMODE0 decides what starts an event and what it needs:

- **Modes 0–7:** the TAC0 start (SF) opens a window of SEL0_WINDOW+1 clocks. During it the engine collects the stop (SFR), the position anodes (pos1_0, pos1_1, the resistive-anode trigger) and the SSD trigger.
- **Modes 8 and 9:** a position signal starts the event.
- **Mode 10:** the SSD energy signal starts the event. `ssd_pos_map` derives the position from which SSD fired.

After the window the engine:

1. reads the TOF from the TAC0 ADC, the SSD energy word and, for resistive-anode events, the position from the RA table;
2. checks TOF and energy against the under/over thresholds;
3. applies the mode's requirement mask (`sw_validate`: SF, SFR, exactly one position, energy, no multiple SSD hits, no housekeeping, no ADC overflow).

The ADC and RA reads are request/done handshakes, because those parts sit on other boards. The SSD read uses the same handshake to `ssd_link`, which does the serial transfer. Each event ends with a 1 µs `tac0_reset` and an `s_sync` to the SSD board. The 18 rate pulses rt31..rt14 count starts, stops, validity classes, saturations and rejections.

**Quadrants 2 and 3** (`wap_event`, wide-angle partition, no SSD). The TAC2 start opens a window of SEL2_WINDOW+1 clocks, during which eight position latches collect hits. A valid event needs:

- exactly one position;
- a stop;
- an in-range TOF without ADC overflow.

With TMODE2 set, the position checks are skipped and the event is filed as quadrant 2, position 8. The 14 rate pulses rt13..rt0 include one per position channel.

`pha_tx` serialises the words to the classifier:

- Each word goes out as six bytes in parallel on six lines (`ser_dat(5)` carries the most significant byte), 8 bits at 12.8 MHz, framed by `ser_gat`.
- It holds one pending word per engine and alternates between them when both wait.
- It does not start a word while the classifier is busy.
- A word that finds its engine's slot still full is dropped and counted (`pha_dropped`).

## The SSD link

The SSD board is reached over optical lines: a command clock `ssd_cmd_clk`, command data `ssd_cmd_in`, a strobe, a master reset and two return lines `ssd_dat1`/`ssd_dat0`. `ssd_link` uses the one clock line for two kinds of transfer, one at a time:

- **Command.** A 0-to-1 write of the "send cmd" bit of SSD_CTRL (50h) sends the 16-bit word of 51h/52h, MSB first. Data changes on the falling clock edge; the board samples on the rising edge. The strobe rises with the start of bit 0 and stays high for 1.5 clock periods. All lines are low when idle. A command takes 16.5 periods.
- **Read.** Ten clock pulses with `ssd_cmd_in` low and no strobe. Each return line answers with a start bit, eight data bits and a stop bit. The lines may be skewed from the clock and from each other, so each has its own receiver: two synchronising flops, then a sample in the middle of each bit, timed from that line's start edge. `dat1` gives bits 15..8 and `dat0` bits 7..0. The event logic's energy reads use this path. A 0-to-1 write of "send hkc" reads a housekeeping/status word to `ssd_hk_word`. `ssd_rd_err` flags a line that did not deliver eight bits. A read takes 11 periods, the last one a margin for skew.

"Force reset" and "force sync" give 1 µs pulses on `ssd_m_reset` and `s_sync`. The clock is clk/8 (3.2 MHz), the same as the board's other serial links; the reference gives no rate for this link. When several transfers are waiting, a read goes first.

## The classifier

The classifier has a fixed time budget. A word's 48 bits arrive in 8 link clocks (0.63 µs). The board must then finish within 139 system clocks (5.43 µs), for a sustained 165 kHz event rate. `busy` covers that processing time.

The sequence after `ser_gat` falls is:

| Clocks | Work |
|---|---|
| 1 | Latch the word (`cls_pha_rx` shifts it in on the falling link clock). Compress the 10-bit SSD energy to 8 bits: the bottom 96 codes unchanged, then four octaves at halved resolution, each offset by 48. |
| 4 × 4 | Read the EEPROM tables in turn. The mass table (EEPROM 0 or 1, picked by the TOF MSB) is addressed by TOF and compressed energy. The M/Q table is addressed by mass and energy. The two bytes of the bins table (`bins_dat_t`) are addressed by mass and M/Q. |
| 1 | Form six counter addresses (`cls_bins_addr`, using the 5-bit position bin from `cls_pos_bin`): SW H/α, SW all, SW Z>2, suprathermal wide, suprathermal no-energy, PHA priority rate. |
| 6 × 16 | Read-modify-write each 16-bit counter, low byte then high byte, in the RAM bank chosen by `ram_sel`. |
| 6 × 4 | Store the PHA word, with its two spare bits replaced by the priority. |
| 1 | Finish. |

**Counter addresses.** A table code that means "do not bin", or a bin that does not apply to the event's section, points at the scratch word 0x30FE. Every event therefore costs the same time.

**PHA storage.** `cls_pha_addr` keeps six per-bank slot counters, one each for SW priorities 0–3 and WAP priorities 0–1, with 64, 64, 160, 160, 32 and 32 slots. Together these hold 512 stored events per bank. A full region keeps writing its last slot, which is the region's scratch area.

**Bank swap.** Changing `ram_sel` between events empties the slot counters, so the new bank fills from the start.

**After reset**, `busy` stays high for 205 clocks (about 8 µs), the time during which the RAMs would be cleared.

The EEPROMs and RAMs are outside the design. Their buses are split into separate read and write data ports, with active-low selects and strobes.

## What is outside, and what is not built

**Ports of `plastic_top`, not logic here:**

- the IDPU;
- the DAC/HV board (its own FPGA);
- the TAC, SSD and resistive-anode boards and their ADCs;
- the logic-board RAM and EEPROM (sweep tables, register sequences, RA table), represented by `swp_next` and `ra_tab`;
- the classifier memories;
- the oscillator;
- the disable plug.

**Logic the reference describes but this design lacks:**

- **Modes 1, 2, 4 and 5.** These are: set DAC registers, run register sequences, the retrace interval with housekeeping collection and register reload, and the alternate normal mode. Mode 4 is reduced to the `retrace_trig` pulse.
- **Logic-board memory block commands.** The UTIL command reaches the logic board, but only immediate register writes act on it.
- **Instrument-controller memory commands** (module 0010) and the classifier-memory readout they serve.
- **Housekeeping a/d collection** over `hk_cmd`/`hk_data`.
- **SSD ASIC configuration load.** The link can send single commands, but no configuration sequence is built.
- **RA-position update during `deflection_trig`,** and the automatic writing of the POS_RA register.

## Choices where the reference is open or inconsistent

- **UTIL command framing.** The reference gives the UTIL and swp framing only in figures. Here the 24-bit UTIL command is the IDPU command word unchanged, and the timing is the one described under the sweep above.
- **RA saturation.** It is encoded in three different ways in the reference. This design follows the rates section: RA table bit 7 = saturation A, bit 6 = saturation B.
- **TMODE2 position.** One passage gives position 8 and another position 0. Position 8 is used, which is also the "no position" code of WAP words.
- **WAP priority.** The WAP priority counter address uses only bit 1 of the priority, while the PHA base address uses both bits. Both are implemented as written.
- **Strobe and trig timing.** The sweep starts on one time message and runs all 128 steps. Within a deflection step, each strobe starts its 800 µs sub-interval, and the trigs start at step boundaries.
- **Rate counters** saturate at full scale.
- **Sticky status flags.** The status register's error flags stay set until the register is read.
- **Stimulus frequency.** A new STIM_FREQ takes effect immediately.
- **Classifier access timing.** The 4-clock EEPROM and RAM accesses were chosen so that the processing time comes out at exactly the reference's 139 clocks.

## Verification

Each block has a self-checking testbench in `tb/`. It prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it does |
|---|---|
| `tb_classifier` | Runs the reference's two sample events through behavioural EEPROM/RAM models. Checks the compressed energy, table addresses, counter increments, stored words, slot overflow, the bank swap and the exact busy time. |
| `tb_sw_validate`, `tb_ssd_pos_map` | Exhaustive. |
| `tb_sw_event`, `tb_wap_event` | Drive trigger sequences for each mode and check words, aborts, rate pulses and reset widths. |
| `tb_sweep_ctrl` | Counts every strobe and trig of a reduced sweep and checks widths, blanking, the latch order and the rate-limit switch. |
| `tb_ssd_link` | Sends random commands and reads through `tb/ssd_model.sv`, a model of the board end with skewed return lines. Checks words, clock counts and period, strobe position and width, read latency, ordering, the dead-line error flag and the reset/sync widths. |
| `tb_plastic_top` | Runs the whole design at a reduced sweep (2 energy steps × 4 deflection steps). Configures it through the serial command line, starts the sweep, fires random SW and WAP events, and checks the counts of strobes, trigs, util words, HV words, bank swaps, PHA words and classifier RAM writes. It also sends an SSD command, a housekeeping read and a master reset. It fails any mechanism that never occurred. |
| `tb_plastic_full` | Does the same with `plastic_top` at its default sizes for the first two complete energy steps, 0.87 s of instrument time: 1025 `d_stp_stb`, 64 `deflection_trig`, 2114 util words, about 75 000 classified events. |

To run one with Verilator 5:

```
verilator --binary --timing rtl/plastic_pkg.sv $(ls rtl/*.sv | grep -v plastic_pkg) \
    tb/ssd_model.sv tb/tb_plastic_top.sv --top-module tb_plastic_top
./obj_dir/Vtb_plastic_top
```

(List `plastic_pkg.sv` first, and add `-Wno-fatal` if lint warnings about the testbench stop the build.) The testbenches also pass with random initial values (`--x-assign unique`, and `+verilator+rand+reset+2` at run time). Nothing in the design relies on power-up state beyond the asynchronous reset.

The RTL lints clean with `verilator --lint-only -Wall` and synthesises with Yosys through the slang front end. It has no latches, and its memories are inferred as arrays.
