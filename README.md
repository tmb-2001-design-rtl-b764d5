# TMB 2001 trigger motherboard core

This is a SystemVerilog model of the core logic of the UCLA TMB 2001 trigger motherboard for the CMS cathode strip chambers. It is written to synthesise. It runs on one 40 MHz clock and takes three kinds of input:

- comparator triads from five cathode front-end boards (CFEBs);
- anode LCTs from the ALCT board;
- TTC commands and L1A from the clock and control board (CCB).

From these it builds up to two cathode LCTs (CLCTs) per event. It matches them with the anode LCTs and sends two muon candidates to the muon port card (MPC). For events that receive a Level-1 Accept (L1A), it stores the raw strip hits and reads them out to the DAQ motherboard (DMB). A VME register file sets every programmable value, and each one powers up at the board's documented default.

`rtl/tmb_top.sv` is the top. The other files in `rtl/` are its blocks, plus `tmb_pkg.sv` for shared types and constants. `tb/` has one self-checking testbench per block and an end-to-end testbench for the top, `tb/tb_tmb_top.sv`, which runs at full size and default settings.

## Data flow

```
CFEB triads -> triad_decoder x5 -> 1/2-strip hits (160) -> pattern_finder (hs) --\
                                -> di-strip hits   (40) -> pattern_finder (ds) ---> clct_resolver
                                                                 |  pre-trigger          | 2 CLCTs
                                                                 v                       v
          external triggers --------------------------> clct_sequencer ---------> tmb_match <- ALCT LCTs
                                                        |   buffer_manager           |   MPC frames -> MPC
          raw triads (delayed) -> raw_hits_ram <--------+                            v
                                                                         l1a_window <- CCB L1A
                                                                              v
                                                                         l1a_stack -> dmb_readout -> DMB
```

Three test aids sit beside this path:

- `cfeb_injector` can replace the CFEB cables with VME-loaded patterns.
- `mpc_injector` can send VME-loaded frames to the MPC.
- `scope` records 96 internal signals around a pre-trigger.

Each buffer carries one event from pre-trigger to readout. The event takes the buffer at pre-trigger and gives it back in one of these cases:

- after the DMB readout;
- when its L1A window expires;
- when the TMB rejects it;
- when a newer event has to be dropped.

## Triad decoding (`triad_decoder`)

Each di-strip (a pair of strips, so four 1/2-strips) has one serial line per layer. A hit arrives as three bits on that line:

- a start bit;
- a bit that picks one strip of the pair;
- a bit that picks one half of that strip.

The decoder sets the chosen 1/2-strip and holds it for `triad_persist+1` clocks. This one-shot sets how long the six layers can take to line up; the default of 5 gives 150 ns. The line is ignored while its one-shot runs. A di-strip hit is the OR of its four 1/2-strips. A di-strip whose hot-channel-mask bit is clear never fires. The masks live at VME addresses 4A–66 and power up with every di-strip enabled.

## Pattern finding (`pattern_finder`)

The hardest timing path is here. It is built as one generate block per key, and every key looks at an 11-cell window in each of the six layers:

- 160 1/2-strip keys;
- 40 di-strip keys.

Seven bend patterns are defined, each with its own envelope. An envelope gives, for each layer, the cells that count as on the pattern. Pattern 1 is straight. Patterns 2–7 bend further and further, alternating left and right, with roads three cells wide.

For each pattern, a key counts how many layers have a hit inside the envelope. It then keeps the pattern with the most layers. When two patterns tie, the higher pattern number wins, because the straighter pattern is the lower one. The document makes the envelopes programmable, so they enter as a constant structure (`default_env()` in the package).

A CLCT pre-trigger happens when either of these reaches its threshold (4 by default):

- any 1/2-strip key, against `hs_thresh`;
- any di-strip key, against `ds_thresh`.

## Choosing two CLCTs (`clct_resolver`)

The resolver ranks every key by three things, in order:

1. layers hit;
2. 1/2-strip over di-strip;
3. pattern number.

The best key becomes CLCT 0. CLCT 1 is the best remaining key that is more than five keys away from CLCT 0. A CLCT is valid only if it has at least `nph_pattern` layers.

Equal ranks go to the lowest key. With three-cell roads, a straight track centred on 1/2-strip k is therefore reported at key k−1, because the envelope at k−1 already covers k.

## Trigger sequencer and buffers

`clct_sequencer` is held stopped until the TTC start_trigger arrives; the FMM machine in `ttc_decoder` then lets it run. It pre-triggers on any source enabled in register 68:

- a CLCT pattern;
- an ALCT;
- an ALCT*CLCT match;
- the ADB, DMB, CLCT and ALCT external triggers, each with its own delay;
- a rising edge of the VME trigger bit.

At a pre-trigger, three things happen:

- `buffer_manager` offers the lowest-numbered free buffer out of eight.
- If none is free and `wr_buf_required` is set, the pre-trigger is counted as a discard.
- Otherwise `raw_hits_ram` starts storing the triads into that buffer. It stores `fifo_pretrig` time bins from before the pre-trigger and continues up to `fifo_tbins` bins in total.

The raw triads pass through a 6-clock delay first. This makes time bin `fifo_pretrig` the crossing whose start bits caused the pre-trigger.

After `drift_delay` clocks the sequencer latches the resolver's two CLCTs. A CLCT below `nph_pattern` layers counts as an invalid pattern, and its buffer is freed. The sequencer then waits out the flush timer and re-arms.

## ALCT*CLCT matching (`tmb_match`)

The ALCT LCTs are first delayed by `alct_delay`. When a CLCT comes, a window of `clct_width` clocks opens, and there are three outcomes:

- The first valid delayed ALCT inside the window makes a match, and its position in the window is recorded.
- If no ALCT arrives, the event is CLCT-only.
- An ALCT with no window open is ALCT-only.

The allow bits in register 86 decide which of the three go to the MPC; the rest are TMB rejects. An ALCT-only event has no raw-hits buffer, so it goes to the MPC but is never read out.

Two LCTs are sent as two 16-bit frames each, in the layout of registers 88–8E. The MPC accept bits are sampled `mpc_delay` clocks later and stored with the event.

Only one CLCT is matched at a time. A second CLCT that comes while the first is still waiting for its ALCT is dropped, and its buffer is freed.

## L1A window and readout stack

Each sent event that holds a buffer is queued in `l1a_window` with its pre-trigger time. Its window is open from `l1a_delay` (128) to `l1a_delay+l1a_window` clocks after the pre-trigger. Events are handled oldest first:

- An L1A inside the open window selects the event.
- An L1A with no open window makes an L1A-only event, which is read out with the short header.
- An event whose window closes without an L1A has its buffer freed, or is read out as a no-L1A event if SEQMOD allows it.

Each accepted event becomes a readout request. Requests go into `l1a_stack`, a 16-entry first-in first-out stack.

## DMB readout format (`dmb_readout`)

The readout pops one request at a time and sends one 16-bit frame per write, with first/last flags. There are three formats:

| format | when | frames |
|---|---|---|
| full | `fifo_mode` 1 (all CFEBs) or 2 (CFEBs active at pre-trigger) | 22 header + E0B + 6 × CFEBs × time bins + E0C + pad + 2 CRC + E0F + word count |
| header only | `fifo_mode` 0 | 28 |
| short header | `fifo_mode` 3, or an event without a buffer | 8 (4 header + 2 CRC + EEF + word count) |

`fifo_mode` 4 reads nothing out. At the defaults (5 CFEBs, 7 time bins) a full event is 240 frames, as in the document.

Raw hits go out CFEB by CFEB, then time bin by time bin, then layers 0–5. Each frame is {CFEB, time bin, 8 triad bits}. An optional 2AAA/5555 pair makes the frame count a multiple of four.

The CRC is 22 bits. It covers every frame before the first CRC frame and is sent in two 11-bit halves. It is computed by `crc22` with polynomial x^22+x+1, least significant bit first; the document does not give the polynomial. Trailer frames carry DDU code 101 in bits 14:12.

The header includes:

- the bunch-crossing numbers at pre-trigger and at L1A;
- the L1A count;
- both CLCTs and the match result;
- the MPC frames and accept bits;
- the discard counters.

## CFEB pattern injector (`cfeb_injector`)

For tests without a chamber, the injector feeds patterns in at the CFEB inputs. Each CFEB has three RAMs of 256 × 16 bits, one for each layer pair (0/1, 2/3, 4/5). A word holds the triad line values of one time bin:

- bits 7:0 carry the 8 di-strip lines of the even layer;
- bits 15:8 carry those of the odd layer.

So one hit is written as its three triad bits (start, strip, 1/2-strip) at three successive addresses.

Over VME, these registers control the RAMs:

| register | role |
|---|---|
| 42 | picks the CFEBs to access and the CFEBs to inject into |
| 44 | picks the RAMs to write or read and the address |
| 46 | writing it stores the word one clock later |
| 48 | reads a word back |

A rising edge of the start bit (register 42 bit 15) plays addresses 0–255 once, one per clock. The same happens on `clct_ext_trig` when register 68 bit 8 routes it to the injector. The played words are ORed with the cable triads, so an injected muon goes through the whole trigger path, including the raw-hits storage.

## MPC test-pattern injector (`mpc_injector`)

Four RAMs of 256 × 16 bits hold MPC frame sets, one set per address:

| RAM | frame |
|---|---|
| 0 | muon 0, frame 0 |
| 1 | muon 0, frame 1 |
| 2 | muon 1, frame 0 |
| 3 | muon 1, frame 1 |

Over VME:

- Register 92 selects the RAMs to write or read and the address.
- Writing register 94 stores a word.
- Register 96 reads a word back.

A rising edge of register 90 bit 8 starts a transfer. So does the TTC MPC-inject command (24), when bit 9 allows it, which it does by default. The injector then sends addresses 0 to `mpc_nframes−1` (default 5), one set per clock. While it sends, these frames replace the trigger path's frames on the MPC outputs.

The MPC's accept bits are taken `mpc_delay` clocks after each set and stored at that set's address. Register 90 bits 11:10 read them back.

## Logic-analyzer scope (`scope`)

The scope records 96 probe channels for 256 clocks, as six banks of 16. The channel list follows the board's:

| channels | signals |
|---|---|
| 0, 32, 48, 64 | sequencer pre-trigger |
| 16–27 | CLCT layer counts and latches |
| 33–37 | MPC transmit and accept, L1A |
| 41–46 | thresholds |
| 50–53 | busy-buffer count |
| 59–62 | L1A counter |
| 65–76 | crossing number |
| 80–95 | DMB data |

Channels for signals this core does not have read as 0.

To use it:

- Writing 1 to register 98 bit 0 arms it.
- It records continuously and triggers on channel 0 or on a rising edge of the force bit (bit 1).
- It keeps 16 samples before the trigger and 239 after, then stops. Bit 7 (done) then reads 1; bit 6 reads 1 while it waits.
- Register 98 bits 4:2 choose the bank and bits 15:8 the sample, with 0 the oldest and 16 the trigger sample. Register 9A returns the 16 channels of that bank.

The board's feature list speaks of 16 channels, but its channel table lists 96 in six banks. This design records all 96. The sequencer readout of the scope into the DMB stream is not built.

## TTC, crossing counter and FMM

`ttc_decoder` decodes these CCB command codes into one-clock pulses:

| command | code (hex) |
|---|---|
| bx0 | 01 |
| l1reset | 03 |
| start_trigger | 06 |
| stop_trigger | 07 |
| MPC inject | 24 |
| bxreset | 32 |

A VME-driven command generator can take the place of the backplane.

The FMM machine powers up in STOP:

- stop_trigger returns it to STOP from any state.
- l1reset goes through RESYNC.
- Leaving STOP or RESYNC, it waits for the next bx0 and then runs.

`bxn_counter` counts crossings from 0 to `lhc_cycle−1` (3564 at LHC) and loads `bxn_offset` at bx0. It sets `sync_err` if bx0 comes when the count is not where it should be.

## VME interface

The VME interface is an A24/D16 slave that accepts address modifiers 39 and 3D. Address bits A[23:19] must match the geographic address. The values 26 (all TMBs) and 27 (all peripheral-crate modules) are also accepted, for writes only. A[7:1] selects one of 128 16-bit registers.

Writable registers power up at the defaults given in the register tables, for example:

- `triad_persist` 5, thresholds 4, `drift_delay` 2;
- `fifo_tbins` 7, `fifo_pretrig` 2;
- `l1a_delay` 128, `l1a_window` 3;
- `alct_delay` 1, `clct_width` 3, `mpc_delay` 7;
- `lhc_cycle` 3564.

Read-only registers return live status:

- ID words;
- CCB status;
- CLCT and MPC results;
- buffer status and trigger source;
- the FMM state.

Registers for hardware outside this core are kept as plain storage. This covers the delay chips, ADCs, serial-number chips, JTAG and the ALCT injector. The CFEB injector, MPC injector and scope registers drive those blocks.

## Choices not taken from the document

The document leaves these points open, and this design settles them as follows:

- Envelope shapes, the pattern tie-break and the CLCT resolver ranking are this design's own. So is the minimum separation of 5 keys between the two CLCTs.
- Equal-rank keys resolve to the lowest key.
- Raw triads are delayed 6 clocks before storage.
- A raw-hits start while a write is in progress is ignored.
- A second CLCT that comes while matching is in progress is dropped.
- ALCT-only events get no buffer.
- The CRC polynomial is x^22+x+1, LSB first.
- The FMM machine has extra RESYNC/WAITBX0 states.
- The injector plays all 256 time bins per start; the scope keeps 16 samples before its trigger.
- A printed 7-digit default for the 8-bit hot-channel masks is read as all ones.
- A default printed as "0 (2)" for `alct_pre_trig_dly` is read as 0.

## Not built

These parts of the board are not in this core:

- **ALCT injector.** The ALCT injector (registers 32–36) is not built.
- **Scope readout into the DMB stream.** The scope's sequencer readout mode is not built.
- **ALCT raw-hits RAM.** Not built.
- **RPC inputs.** Not built.
- **Board hardware.** These are outside the FPGA core or not described well enough to model: PHOS4 delay chips, ADCs, one-wire serial numbers, PROM/JTAG and the bootstrap CPLD, clock DLLs, and the 80 MHz LVDS/GTLP cable multiplexing.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example, with Verilator:

```
verilator --binary --timing -Irtl rtl/tmb_pkg.sv rtl/*.sv tb/tb_tmb_top.sv --top-module tb_tmb_top -o sim
obj_dir/sim
```

A block testbench needs only the package, its block and that block's sub-blocks: `crc22` for `dmb_readout`, and `pulse_delay` for the sequencer and top.

| testbench | checks |
|---|---|
| tb_ttc_decoder | 135 |
| tb_bxn_counter | 107 |
| tb_triad_decoder | 6801 |
| tb_pattern_finder | 6483 |
| tb_clct_resolver | 1752 |
| tb_buffer_manager | 20168 |
| tb_raw_hits_ram | 2549 |
| tb_clct_sequencer | 25 |
| tb_tmb_match | 446 |
| tb_l1a_stack | 9114 |
| tb_l1a_window | 42 |
| tb_dmb_readout | 67 |
| tb_crc22 | 403 |
| tb_vme_interface | 326 |
| tb_mpc_injector | 987 |
| tb_cfeb_injector | 23835 |
| tb_scope | 4629 |
| tb_tmb_top | 882 |

`tb_tmb_top` drives the whole board at default settings. It covers:

- a matched muon with a full 240-frame readout, checking CRC, word count, padding and raw-hit placement;
- an L1A-only event;
- CLCT-only with no L1A;
- an ALCT-only reject;
- an invalid pattern;
- a burst of ten muons that runs out of buffers;
- header-only mode;
- a muon played from the CFEB injector, captured by the scope and read back over VME;
- five MPC frame sets sent by the MPC injector on a TTC command;
- stop_trigger.

It counts how often each trigger mechanism fires.
