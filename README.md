# Mini-DAQ fast control and front-end emulation in SystemVerilog

An upgraded LHCb-style readout reads every bunch crossing at 40 MHz. A
readout supervisor (S-ODIN) decides what happens on each crossing and sends
that decision as a timing-and-fast-control (TFC) word. An interface board
(SOL40) forwards a shorter form of the word to the front ends inside the GBT
optical links. Each front end then sends one GBT frame per clock back to a
readout board (TELL40). Its events change in size from crossing to crossing,
so a front end needs a derandomizer buffer and a rule for packing
variable-length events into fixed 80-bit (or 112-bit) frames.

This RTL reproduces that chain for simulation and for studying link
efficiency:

```
 run/resync/throttle
        |
  sodin_tfc_gen --64-bit TFC word--> sol40_tfc_relay --24-bit word--> gbt_tfc_elink_tx
                                                                          | 12 DDR e-links
                                 +----------------------------------------+----- ... (NUM_FE links)
                                 v
  fe_data_gen:  fe_tfc_decoder -> fe_event_source -> fe_derandomizer -> fe_gbt_packer -> GBT frame
               (DDR capture,     (one event per     (bit-level        (VV / FV / FF,
                per-command       crossing, hits,    occupancy,        idle and alignment
                delays)           BXID errors)       BufferFull)       frames)
```

`minidaq_top` has one S-ODIN, one SOL40 and six front-end links. The links
have 500 channels of 4 bits each, with mean occupancies of 3.6, 3.5, 3.4,
3.3, 3.2 and 3.1 %. Each has a derandomizer of 160 frame words, 80-bit frames
and the variable-header (VV) packing. The readout board is not part of the
RTL. The testbenches contain a software decoder of the link stream that takes
its place (`tb/tell40_model_pkg.sv`).

## Clocks and timing

- `clk` is the 40 MHz bunch-crossing clock.
- `clk90` is the same clock delayed by a quarter period. It is used only to sample the TFC e-links.
- The orbit is 3564 crossings. BXIDs run from 0 to 3563.

S-ODIN sends each command 16 clocks before the crossing it names. The word
seen while its local counter `bx_now` reads N carries BXID N+16. The path to
the front end takes:

| stage | clocks |
|---|---|
| S-ODIN word register → SOL40 register → e-link register | 2 |
| capture on clk90 and retiming to clk | 1 |
| per-command local delay at the front end (`DLY_*`, default 13) | 13 |

So a command acts at the front end exactly 16 clocks after S-ODIN issued it.
The event for that crossing enters the derandomizer 3 clocks later. An
alignment frame appears on the link 4 clocks after SYNCH reaches the front
end.

## The TFC words

The layouts are in `rtl/minidaq_pkg.sv`.

**64-bit word to the readout boards** (`tfc_tell40_t`), from MSB to LSB:
- BXID[11:0]
- reserve
- MEP accept, MEP destination[31:0]
- trigger type[3:0], calibration type[3:0]
- SYNCH, snapshot, trigger, BX veto, NZS, header only
- BE reset, FE reset, EID reset, BXID reset

**24-bit word to the front ends** (`tfc_fe_t`), from MSB to LSB:
- BXID[11:0]
- reserve, SYNCH, snapshot, calibration type[3:0]
- BX veto, NZS, header only, FE reset, BXID reset

SOL40 copies the fields across. It adds a fixed offset (0xD8B) to the BXID,
modulo 3564.

On the e-links, line i carries bit 2i+1 while `clk` is high and bit 2i while
it is low: the odd bit goes first, as the MSB. The front end samples the odd
bits on the rising edge of `clk90` and the even bits on its falling edge.
Both samples fall in the middle of their half period.

## S-ODIN run sequence and commands

A rising edge of `run` starts this sequence:

1. one reset word (FE, BE, EID and BXID reset);
2. 250 clocks of silence;
3. 10 words with SYNCH;
4. 2 clocks of silence;
5. running.

`resync` repeats steps 3 to 5. When `run` falls, the sequence returns to idle.

While running:

- Every crossing is triggered except crossings 3444–3563, which are vetoed (BX veto) as the empty abort gap.
- Calibration A fires on BXID 0x0C0F of every orbit. B, C and D have their own BXID and period but are disabled.
- One NZS (non-zero-suppressed) trigger is sent per orbit. It is followed by 5 crossings marked HEADER ONLY, so the front ends can drain the large event. With `NZS_CONSECUTIVE_ENB` set, a burst of `NZS_CONSECUTIVE` NZS triggers is sent instead.
- A snapshot is sent every 0x37B0 clocks, which is 4 orbits.
- HEADER ONLY is set while the `throttle` input is high. It stands for the readout boards asking for relief.
- BXID reset is set on BXID 0.
- MEP accept is set every 16 triggers. The MEP destination rotates over 4 addresses.

## Front-end event emulation

Each crossing's command picks the event kind, in this priority:

1. FE reset: no event. The buffer and the stream are emptied.
2. SYNCH: alignment frame.
3. HEADER ONLY or BX veto: header only.
4. NZS: all 500 channels.
5. Otherwise: zero-suppressed, carrying only the hit channels.

Hits are emulated without storing any data:
- Channel `ch` of event number `n` is hit when `mix16(n, ch) < occ·65536/10000`. Here `mix16` is a fixed integer hash, and `n` counts crossings since the FE reset.
- The k-th hit value is the low 4 bits of `mix16(n ^ 0xA5C3, k)`, with 0 replaced by 1.
- An NZS channel value is the low 4 bits of `mix16(n ^ 0x3C5A, ch)`.

So any event can be rebuilt from its number alone. The derandomizer stores
only descriptors, and the readout-side model in the testbenches checks every
value without keeping copies.

Two deliberate BXID errors can be enabled to test decoders. Both are off by
default.
- **Skip:** every 0x545th event gets BXID + 0x00C.
- **Swap:** every 0x641st event exchanges its BXID with the next event.

Skip wins over swap.

## Derandomizer and BufferFull

The buffer holds `DEPTH` × `DATA_W` = 160 × 80 = 12 800 bits. It keeps a FIFO
of event descriptors plus a counter of the link bits those events will take.
Each event adds its encoded size, and each data frame that leaves removes 80.

An event with data is accepted only if, afterwards, there is still room for
one more header. Otherwise it is turned into a header-only event, which is
the BufferFull case, so every crossing always keeps its header. An event is
lost only if even a header cannot be stored. That does not happen while the
link is running, and `n_lost` counts it in case it does.

FE reset and SYNCH empty the buffer.

## Packing events into GBT frames

Each frame is a 4-bit GBT header plus the data field:
- 0x5 for data;
- 0x6 for an idle frame, whose data field is all zeros.

Bits go most significant first.

**VV** (variable frame length, variable header):
- Header: BXID[BXW−1:0] and a NoData bit.
- When there is data, a length field follows. It holds the hit count, or the all-ones NZS code for a full event. The field is 9 bits for 500 channels.
- The 4-bit channel values come last.

A vetoed crossing thus costs 13 bits, and a typical event at 3.1 %
occupancy costs 12 + 1 + 9 + 15.5·4 ≈ 84 bits.

**FV** (variable frame length, fixed header):
- Header: BXID, a 2-bit info field {NZS, NoData}, and the length, always present.
- The values follow, as in VV.

**FF** (fixed frame length):
- Exactly one event per frame: header, then as many values as fit (14 at 80 bits).
- Values that do not fit are truncated and counted in `n_trunc`.
- There is no derandomizer, and a crossing without an event sends an idle frame.

For VV and FV, events are packed back to back into a continuous stream.
- A frame can hold the end of one event, several short events, and the start of another.
- A data frame is sent only when a full data field is waiting. Otherwise the link sends an idle frame and the waiting bits stay for the next clock.

To keep the link busy when events are only 13-bit headers, the packer
appends in one clock:
- up to 20 more values of the event in progress;
- then as many new events (up to `NH` = 8 at 80 bits) as it needs to complete the next frame.

A SYNCH crossing sends the alignment frame instead. It has BXID[11:0] and the
pattern `1011010011` at the top of the data field, and zeros below. It also
empties the stream, so the readout board can realign on it.

## Link efficiency

The two efficiency examples were run through the full chain
(`tb/tb_workloads.sv`, 16 000 clocks):

| configuration | bits needed per crossing | link payload | efficiency |
|---|---|---|---|
| 500 × 4 bits, 3.1 %, depth 160, 12-bit BXID, VV, 80 bits | 83.4 | 80 | 98.1 % |
| 500 × 4 bits, 3.6 %, depth 160, 4-bit BXID, VV, 80 bits | 85.2 | 80 | 96.6 % |
| 500 × 4 bits, 3.1 %, depth 160, 12-bit BXID, FV, 112 bits | 83.8 | 112 | 100 % |

Efficiency here is the fraction of data events that reach the readout with
their data, not as a BufferFull header. The bits needed include the vetoed
crossings, the NZS event of each orbit and its header-only recovery
crossings. In both 80-bit examples the mean demand is slightly above the
link's 80 bits, so the buffer fills and BufferFull events appear in steady
state.

## Files

`rtl/`:

| file | contents |
|---|---|
| `minidaq_pkg.sv` | word layouts, constants, encodings, hit hash, event size |
| `sodin_tfc_gen.sv` | S-ODIN run sequencer and command generator |
| `sol40_tfc_relay.sv` | 64-bit to 24-bit word, BXID offset |
| `gbt_tfc_elink_tx.sv` | DDR e-link output of the 24-bit word |
| `fe_tfc_decoder.sv` | e-link capture and per-command delays |
| `delay_line.sv` | parameterised shift register used by the decoder |
| `fe_event_source.sv` | event kind, hit count, event number, BXID errors |
| `fe_derandomizer.sv` | descriptor FIFO, bit occupancy, BufferFull |
| `fe_gbt_packer.sv` | VV/FV/FF packing, idle and alignment frames |
| `fe_data_gen.sv` | one front-end link: decoder → source → derandomizer → packer |
| `minidaq_top.sv` | S-ODIN, SOL40, e-links and `NUM_FE` links |

`tb/`:
- Each block `X` has a testbench `tb_X.sv`.
- `tb_minidaq_top.sv` runs the whole design at its default sizes for 24 000 clocks. It covers start of run, four orbits, a throttle window, a resync and end of run. It decodes all six links event by event and requires every mechanism to occur at least once: FE reset, SYNCH and alignment frames, resync, BX veto, NZS, HEADER ONLY, calibration, snapshot, BXID reset, MEP accept, BufferFull, idle frames, and frames holding several events.
- `tb_workloads.sv` runs the efficiency table above, using the per-link checker `wl_link_check.sv`.
- `tell40_model_pkg.sv` is the readout-side stream decoder and the reference formulas.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the repository root:

```
RTL="rtl/minidaq_pkg.sv rtl/delay_line.sv rtl/sodin_tfc_gen.sv rtl/sol40_tfc_relay.sv \
     rtl/gbt_tfc_elink_tx.sv rtl/fe_tfc_decoder.sv rtl/fe_event_source.sv \
     rtl/fe_derandomizer.sv rtl/fe_gbt_packer.sv rtl/fe_data_gen.sv rtl/minidaq_top.sv"
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb $RTL tb/tell40_model_pkg.sv \
     tb/tb_minidaq_top.sv --top-module tb_minidaq_top -Mdir obj_top
./obj_top/Vtb_minidaq_top
```

For `tb_workloads`, also add `tb/wl_link_check.sv`. Block testbenches need
only the package, their block and its sub-blocks.

To change the configuration, change the parameters:
- `minidaq_top`: `NUM_FE`, `OCC_E4` (occupancy in units of 0.01 %), `ENC`, `CHANNELS`, `CHW`, `DEPTH`, `DATA_W` (80 or 112), `BXW`;
- `fe_data_gen`: the BXID offset and skip/swap settings;
- `sodin_tfc_gen`: the S-ODIN enables, periods and BXIDs.

## Where this design fills in details

The overall chain is specified in the original Mini-DAQ description. So are
the word layouts, the header codes, the alignment pattern and the
configuration values listed above. The following are this design's own
choices:

- **S-ODIN**
  - the 3444–3563 veto window;
  - one NZS per orbit and the use of HEADER ONLY for the NZS recovery wait;
  - the `throttle` input as the source of HEADER ONLY;
  - the trigger-type codes and one-hot calibration type;
  - the MEP scheme;
  - the order of the start-of-run sequence.
- **Timing:** the 13-clock default local delay and the quarter-period sampling clock.
- **Event content:** the hash-based hits and values, which stand in for real detector data.
- **VV/FV fields:** the 9-bit length field, the NZS code and the 2-bit FV info field.
- **FF frame:** its layout.
- **Derandomizer:**
  - the descriptor-plus-size organisation;
  - the rule that keeps room for one more header.
- **Packer:** the limit on how much it appends per clock.

Frames fill from the most significant bit down. The oldest bits are placed
next to the GBT header, and later events follow towards bit 0.

Not part of the RTL:
- the readout-board decoding (modelled only in the testbenches);
- the GBT transceiver itself (frame encoding, FEC, serialiser);
- slow control through GBT-SCA;
- the throttle link from the readout boards;
- the link to the older ODIN system;
- injection of front-end data from text files.
