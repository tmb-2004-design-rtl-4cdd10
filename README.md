# TMB2004 trigger motherboard: trigger-path RTL

The Trigger Motherboard (TMB) of a cathode strip chamber (CSC) sits between
the chamber's front-end electronics and the muon port card (MPC) of the
level-1 muon trigger. Every 25 ns bunch crossing it receives comparator hits
from five cathode front-end boards (CFEBs) and up to two anode track segments
from the anode board (ALCT). From these it:

1. finds the two best cathode track segments (CLCTs) by matching the
   half-strip hit image of the six chamber layers against a set of bend
   patterns,
2. lines them up in time with the anode segments, and
3. sends the combined local charged tracks (LCTs) to the MPC as two 16-bit
   frames each, with a 4-bit quality code.

A VME register file configures everything. TTC commands arriving over the
CCB backplane control the bunch counter and the run state.

This repository holds synthesizable SystemVerilog for that trigger path and
its test aids (pattern injectors, logic analyser, JTAG chain select), with
a self-checking testbench for every module and an end-to-end testbench for
the whole board. It runs on one 40 MHz clock. The 80 MHz links are captured
on both clock edges.

## Data flow

```
 CFEB0..4 (24 pins x 80 MHz each)
   -> ddr_demux      48 bits / crossing
   -> pin map        cable pairs -> layer x di-strip triad bits
   -> [cfeb_injector] test RAMs may replace the cable data while playing
   -> triad_decoder  triads -> half-strip one-shots, hot-channel masks
   -> clct_sequencer 160 x pattern_unit + best2_clct, pre-trigger / drift / latch / flush
                     -> CLCT0, CLCT1 (21-bit words)
 ALCT words ------------------------------\
   -> alct_clct_match   ALCT delay line, CLCT window -> match / CLCT-only / ALCT-only
   -> lct_duplicate     fill the missing second muon
   -> lct_quality       4-bit quality per LCT
   -> mpc_tx            2 x 2 frames on 32 pins at 80 MHz; accept answer latched mpc_delay later
      [mpc_injector]    test RAMs of ready-made frames, sent in place of LCTs
 CCB command -> ttc_decoder -> bxn_counter (bxn, bx0_local, sync_err), run flag
 VME A24/D16 -> vme_regs     -> configuration words to all of the above, status back
```

## Cathode pattern finding

This is the heart of the board and the least obvious part.

### Triads

A CFEB reports each **di-strip** (two cathode strips, i.e. four half-strips)
of each layer as a **triad**: a 3-bit serial word, one bit per crossing.

- The first bit is a 1 and marks a hit.
- The second bit selects the strip within the di-strip.
- The third bit selects the half of that strip.

The decoded half-strip is therefore `4*distrip + {strip, half}`.
`triad_decoder` holds that half-strip on for `triad_persist + 1` crossings.
This one-shot gives hits that arrive at slightly different times a common
window. The default of 5 gives 150 ns.

Two kinds of mask act before decoding:

- A per-di-strip hot-channel mask (registers `4A`–`66`, two layers per word).
- A whole-board enable per CFEB (register `42`, bits 4:0).

### The cable pin map

Each CFEB cable carries 48 triad bits on 24 LVDS pairs, two per pair per
crossing. The board's connector table assigns them, for example:

- pair 1 carries layer 0 di-strip 0, then layer 3 di-strip 0;
- pair 3 carries layers 5 and 4 of di-strip 0.

`tmb_pkg::CFEB_PIN_MAP` holds this table. Pair 13 returns the clock to the
CFEB and is skipped, so `cfeb_rx[c][i]` is the i-th *input* pair. The
first-listed signal of each pair is taken to be the one sent in the first
half of the crossing.

### Patterns

Each key half-strip `k` (0..159 across the five CFEBs) gets one
`pattern_unit`. It looks at a window of four half-strips on every layer:
`k-1 .. k+2`, so the key sits at position 1 of the window, and layer 3 is the
key layer.

The 4-bit window of each layer addresses a 16-bit look-up table. The LUT
bit says whether that layer is hit for that pattern. For example:

- `CCCC` means "position 1 hit".
- `F0F0` means "position 2 hit".
- `FEFE` means "any of positions 0–2 hit".

There are two kinds of LUT set:

- **The envelope** (`FEFE` on all layers except `CCCC` on the key layer)
  gives the number of layers with any hit near the key. This number drives
  the pre-trigger.
- **Seven bend patterns** (straightest = 7) each give a layer count. The best
  pattern has the most layers. Ties go to the higher, straighter pattern.

All the tables are in `tmb_pkg::PAT_LUT`.

### Best two

`best2_clct` ranks every key by `{layers hit, pattern number}`.

- The best key wins. Ties go to the lowest key.
- The second CLCT is the best key more than two half-strips away from the
  first.

### Sequencer (`clct_sequencer`)

The sequencer steps through four states:

| State | What happens |
|---|---|
| IDLE | Waits for any key's envelope count to reach `hs_thresh` (default 4). That is a **pre-trigger**. It also records which CFEBs held such keys (the "active FEB" list sent to the readout), or all of them if `all_cfebs_active` is set. |
| DRIFT | Waits `drift_delay` crossings (default 2) for late drift-time hits. |
| latch | Stores both CLCTs in the 21-bit CLCT word (layout in `tmb_pkg::clct_t`). A CLCT is valid when its layer count reaches `nph_pattern` (default 4). An invalid first CLCT raises `invp`. |
| FLUSH | Waits at least `clct_flush_delay` crossings, and until no key is over threshold, then returns to IDLE. |

Timing: hits sampled at edge T give a pre-trigger pulse in the cycle after T.
The latched CLCTs come from the hits sampled at T + `drift_delay`.

## ALCT/CLCT matching and LCT building

**Matching (`alct_clct_match`).**

- The ALCT pair passes through a delay line of `alct_delay` crossings
  (default 1).
- A latched CLCT opens a window of `clct_width` crossings (default 3; 0
  acts as 1).
- The first delayed ALCT seen in the window gives a **match**. Its position
  in the window is reported.
- A window that closes empty gives **CLCT-only**.
- An ALCT seen with no window open gives **ALCT-only**.
- Each type can be disabled in register `86`.

**Duplication (`lct_duplicate`).**

- If there are two CLCTs but only one ALCT, the ALCT is copied into the
  second LCT, and vice versa.
- A CLCT-only event gets a dummy ALCT that carries the CLCT's two bunch-count
  bits.

**Quality (`lct_quality`).** The layer count is `nlayers = alct_quality + 3
+ clct_layers`. The quality code is:

| Case | Quality |
|---|---|
| match with nlayers ≥ 8 | 11 + (nlayers − 8) for half-strip patterns, 6 + (nlayers − 8) for di-strip patterns |
| CLCT-only | 5 (half-strip) or 4 (di-strip) |
| ALCT-only | 3 |
| match of an accelerator muon | 2 |
| anything else | 0 |

## MPC link (`mpc_tx`)

Each LCT is sent as two 16-bit frames. The field layouts are in `tmb_pkg`.

- **Frame 0:** valid flag, quality, half-strip flag, pattern, ALCT key wire
  group.
- **Frame 1:** CSC id, bx0_local, ALCT bxn bit 0, sync error, bend, and the
  8-bit key half-strip (CFEB*32 + key).

The 32 pins carry both LCTs' frame 0 in the first half of the crossing and
both frames 1 in the second half.

The MPC answers on one 80 MHz pin: LCT0's accept first, then LCT1's.
`mpc_delay` crossings after sending (default 7), the answer is latched into
`mpc_accept[1:0]`. The capture takes two crossings, so `mpc_delay` must be
at least 2. A 16-stage shift register remembers when each pair was sent, so
pairs sent on successive crossings each get their own answer. Changing
`mpc_delay` while answers are pending can drop them. The last frames sent can be read back over VME (registers
`88`–`8E`).

## Test injectors

Two pattern injectors let the trigger path be exercised without beam.

**CFEB injector (`cfeb_injector`).** Each CFEB has three 256-word RAMs, one
per layer pair (0/1, 2/3, 4/5). Word `t` holds the raw triad bits of time
bin `t`: bits 7:0 are the eight di-strips of the even layer and bits 15:8
those of the odd layer. A track is therefore loaded as three successive
words: start bits, strip bits, half-strip bits.

- Register `42` holds `inj_febsel` [9:5] (CFEBs for RAM access),
  `injector_mask` [14:10] (CFEBs that take injected data) and the start bit
  [15].
- Register `44` holds the write enables [2:0], read enables [5:3] and time
  bin [13:6]. `46` is the write data and `48` reads back.
- A RAM is written every clock while its write enable is set. Set the data
  and address first, then pulse the enable.
- A rising edge of the start bit plays all 256 bins once. While it plays,
  the masked CFEBs' cable data is replaced, so the injected triads go
  through the same decoders and pattern finder as real hits.

**MPC injector (`mpc_injector`).** Four 256-word RAMs hold ready-made
frames: LCT0 frame 0, LCT0 frame 1, LCT1 frame 0, LCT1 frame 1.

- Register `90` holds `mpc_nframes` [7:0] (default 5), the VME start bit [8]
  and the TTC-start enable [9] (default on). It reads back the stored answer
  [11:10].
- Register `92` holds write enables [3:0], read enables [7:4] and address
  [15:8]. `94` is the write data and `96` reads back.
- A run starts on a rising edge of the VME bit, or on the TTC MPC-inject
  command (24) when enabled. It sends pairs 0..nframes−1, one per crossing,
  through `mpc_tx`, ahead of any real LCT.
- The MPC's answer to each injected pair is stored in a fifth RAM at the
  pair's address, in order.

## Logic analyser (`scope`)

An on-board logic analyser records 128 internal signals for 256 crossings,
so the trigger can be watched in a running system.

- Register `98` controls it: run [0], force trigger [1], read bank [4:2] and
  read address [15:8]. It reports waiting [6] and done [7].
- Setting the run bit arms it. The trigger is channel 0 (the pre-trigger)
  or a rising edge of the force bit.
- The crossing of the trigger is stored at address 0, followed by the next
  255. There is no history from before the trigger. Then done goes high.
- Register `9A` reads 16 channels at a time: the bank picks channels
  16·bank to 16·bank+15 of the word at the read address.
- Clearing the run bit stops the recorder and clears both flags.

The channel list follows the board's own list where it names a signal.
Channels 0, 32, 48 and 64 carry the pre-trigger. 16–23 carry the CLCT
layer counts and keys. 24–29 carry the latch and ALCT valid flags. 33–36
carry the MPC signals. 65–76 carry the bunch counter. Channels the list
names but this build lacks (DMB readout, RPC) read 0.

## JTAG chain select (`jtag_chain_mux`)

The board has five JTAG chains. Each is picked by a 4-bit select:

| Select | Chain |
|---|---|
| 00xx | ALCT |
| 01xx | mezzanine FPGA and its PROMs |
| 10xx | user PROMs |
| 1100 | FPGA monitor |
| 1101 | RAT module |

Two sources can drive them. One is the bootstrap register: board logic
outside the FPGA that also works when the FPGA is unconfigured. The other is
the FPGA's user register `10`: TDI [0], TMS [1], TCK [2], select [6:3], and
TDO read back at [15]. Bootstrap bit 7 picks the source. The top takes the
bootstrap bits as the `boot_jtag` input and returns TDO on `boot_tdo`.

The selected chain gets TCK, TMS and TDI, and its TDO comes back. Every
other chain is held with TCK low and TMS high. The select path has no clock:
software toggles the bits, so TCK is far slower than the board clock.

## Bunch counter and TTC commands

**TTC commands (`ttc_decoder`).** The decoder turns CCB broadcast commands
into one-clock pulses:

| Code | Command |
|---|---|
| 01 | BX0 |
| 03 | L1 reset (resync) |
| 06 | start trigger |
| 07 | stop trigger |
| 24 | MPC inject |
| 32 | tmb_bxreset |

Register `9C` can disconnect the backplane and issue commands from VME.

**Bunch counter (`bxn_counter`).**

- The counter wraps at `lhc_cycle` (default 3564; 924 for test-beam running).
- tmb_bxreset loads `bxn_offset`.
- A BX0 that arrives while the counter is not at 0 sets the sticky
  `sync_err`.
- L1 reset clears `sync_err`.

**Run flag.** Start trigger sets a run flag and stop trigger clears it. The
flag gates CLCT triggering. It is set after reset.

## VME registers (`vme_regs`)

The register interface works as follows:

- A24/D16 access, address modifiers 39h and 3Dh.
- `A[23:19]` selects the board. It is either the slot's geographic address
  or the rotary-switch address, chosen by `geo_sel`.
- Addresses 26 (all TMBs) and 27 (all crate modules) are broadcasts and are
  accepted for writes only.
- Register byte addresses run 00..CC.

Each word holds its writable bits, with their power-up defaults. The other
bits read status from the design.

Registers 00–06 are the ID words: type/version/slot, month-day, year and a
14-bit revcode. With the default date 06/08/2004 the revcode reads
`38C8`. Registers 0A/0C read back the last write address.

The bus handshake is simplified. The upstream logic must synchronise the VME
strobes into a one-clock `vme_strobe`. DTACK (and the read data) follow one
clock later.

Registers used by the trigger path:

| Byte adr | Field (bits) | Default |
|---|---|---|
| 42 | CFEB enable `mask_all` [4:0]; CFEB injector control [15:5] | 7C1F |
| 44–48 | CFEB injector RAM address / write data / read data | 0 |
| 4A–66 | hot-channel masks, 8 di-strips per layer | all enabled |
| 68 | `clct_pat_trig_en` [0], `all_cfebs_active` [9] | 1, 0 |
| 10 | user JTAG TDI [0], TMS [1], TCK [2], chain select [6:3]; TDO [15] | 0 |
| 6E | CSC id [8:5] | 5 |
| 70 | `triad_persist` [3:0], `hs_thresh` [6:4], `nph_pattern` [12:10], `drift_delay` [14:13] | 5, 4, 4, 2 |
| 76 | `bxn_offset` [15:4] | 0 |
| 86 | sync-error enables [1:0], allow ALCT-only [2], CLCT-only [3], match [4], `mpc_delay` [8:5]; MPC accept read-back [10:9] | 00FB |
| 90–96 | MPC injector control, RAM address, write data, read data | 0205, 0 |
| 98 | logic analyser run [0], force [1], bank [4:2], address [15:8]; waiting [6], done [7] | 0 |
| 9A | logic analyser read data | – |
| 9C | VME command enable [0], strobe [1], command [15:8] | 0 |
| AC | `clct_flush_delay` [3:0], valid CLCT required [7] | 01C1 |
| B2 | `alct_delay` [3:0], `clct_width` [7:4] | 1, 3 |
| B4 | `lhc_cycle` [11:0] | 3564 |

Status words: `2E` holds the last CCB command and `3A`/`3C` the last valid
ALCT pair. `78`/`7A`/`B0` hold the latched CLCTs. `AE` holds the sequencer
state and the match-window position.

## Top level (`tmb2004_top`)

The top has plain ports:

| Port | Meaning |
|---|---|
| `cfeb_rx[5][24]` | CFEB pins |
| `alct0_rx`, `alct1_rx` | ALCT words, 13 bits each, already on the 40 MHz clock |
| `ccb_cmd`, `ccb_cmd_strobe` | CCB command and its strobe |
| VME bus signals, `ga`, `sw_adr`, `geo_sel` | register access and board address |
| `mpc_tx_pins[31:0]`, `mpc_accept_pin` | MPC link |

It also brings out one-clock event pulses for observation:

- `pretrig`, `clct_latch`, `invp`
- `tmb_trig` and the match type
- `mpc_accept_latched`

It also brings out the run state: `active_feb`, `bxn`, `sync_err`,
`run_enable`, `cfeb_inj_active` and `mpc_inj_send`.

The JTAG side has the bootstrap-register input `boot_jtag[7:0]`, its TDO
`boot_tdo`, and `jtag_tck`, `jtag_tms`, `jtag_tdi` and `jtag_tdo`, five bits
each (one per chain).

The only top parameters are the firmware date words. Array sizes come from
`tmb_pkg`:

- 5 CFEBs
- 6 layers
- 8 di-strips per CFEB
- 7 patterns

## Choices made in this implementation

The original design specifies the pattern tables, register map, data
formats, pin map, quality code and duplication rules. These details are this
implementation's own:

- the triad bit meaning, and the one-shot restarting on a repeat hit;
- the window alignment (key = position 1 of every layer, no layer stagger);
- the pattern tie rule, the key tie rule and the ±2 half-strip exclusion for
  the second CLCT;
- the sequencer states and the flush re-arm rule;
- the match-window rule (opens on the CLCT, ALCT-only when no window is
  open);
- the layer count used for quality;
- which half of an 80 MHz pair is first;
- the VME handshake;
- broadcast reads ignored;
- the run flag driven by start/stop trigger;
- the sync-error clear on L1 reset;
- the injector write-enable handling, play-out length and start rules, and
  which RAM holds which MPC frame;
- the logic analyser recording from the trigger on, and its arming rules;
- the idle levels of unselected JTAG chains.

The clct0 line of the duplication rule passes CLCT0 through unchanged in
both cases. It is kept that way.

The ALCT and CLCT words are carried whole through the pipeline. The MPC
frames use only some of their bits, so lint reports the rest of those bits
as unused in `mpc_tx`. This is intended.

## Not included

- The DAQ readout to the DMB (header words, raw-hit buffers, CRC22, word
  count).
- The logic analyser's mode that inserts its data into the DAQ readout.
- The RPC receiver.
- The ALCT and RPC injectors.
- Di-strip pattern finding. The CLCT half-strip flag is always 1.
- Layer staggering.
- The ALCT cable receiver (the top takes decoded ALCT words).
- Clock-delay chips, DCMs, PROMs, ADCs and serial-number chips. These are
  board parts, not logic.

## Simulation

Every module has a testbench `tb/tb_<module>.sv`. Each one:

- checks its module against an independent model,
- prints `TB_RESULT checks=N failures=M`,
- has a watchdog.

The testbenches use only two-state constructs and `$urandom`.

| Testbench | Covers |
|---|---|
| `tb_ddr_demux` | both-edge capture |
| `tb_ttc_decoder` | command decoding, VME substitution |
| `tb_bxn_counter` | 3564 and random short cycles, offset, sync error |
| `tb_triad_decoder` | triads, one-shot length, masks |
| `tb_pattern_unit` | random windows against a reference built from allowed-position masks |
| `tb_best2_clct` | ranking, tie rules, exclusion zone |
| `tb_clct_sequencer` | pre-trigger / drift / latch / flush timing, invalid pattern, active FEBs |
| `tb_alct_clct_match` | all three match types, window edges, delays |
| `tb_lct_duplicate` | duplication rules |
| `tb_lct_quality` | quality codes |
| `tb_mpc_tx` | frames on the pins, accept latency for `mpc_delay` 2..15 |
| `tb_cfeb_injector` | RAM write/read with multiple selects, play-out timing and data, start edges |
| `tb_mpc_injector` | RAM read-back, runs of random length from VME and TTC, ignored restarts, stored answers |
| `tb_scope` | arming, trigger on channel 0 and on force, stored window, bank read-back, re-arm |
| `tb_jtag_chain_mux` | every select code from both sources, idle levels, TDO return |
| `tb_vme_regs` | ID words and revcode, defaults, write masks, rejected accesses, broadcasts, switch address |
| `tb_tmb2004_top` | end to end at full size and default parameters |

`tb_tmb2004_top` plays the CFEBs (through the real cable pin map), the ALCT,
the CCB and the MPC. It counts each mechanism and fails if one never
happened:

- pre-trigger and latch
- match, CLCT-only and ALCT-only
- duplication
- invalid pattern
- hot-channel masking
- stop/start
- counter wrap
- sync error and its clear
- VME-issued commands
- MPC accept
- a track played from the CFEB injector
- frames sent by the MPC injector
- a logic-analyser trace triggered by a pre-trigger
- JTAG routed from both sources

It also checks the MPC frames field by field.

Run one with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl \
  --top-module tb_tmb2004_top rtl/tmb_pkg.sv tb/tb_tmb2004_top.sv -Mdir obj -o sim
./obj/sim
```

Replace the module name to run any other testbench. All of them finish in
seconds.
