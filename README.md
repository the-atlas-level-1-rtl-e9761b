# ATLAS Level-1 Calorimeter Trigger — a synthesizable slice in SystemVerilog

At the LHC, bunches cross every 25 ns. For each crossing, the first-level calorimeter
trigger must decide within a fixed, short latency whether the event might hold a
high-ET electron, photon, tau or jet, or large total or missing transverse energy. It
works on about 7200 coarse "trigger towers" (mostly 0.1 × 0.1 in η × φ), each
sampled by a 10-bit ADC at 40 MHz. This RTL follows the published ATLAS architecture
and implements every digital stage of that chain:

```
ADC samples ─► PreProcessor ─┬─► Cluster Processor (e/γ, τ) ─► CMM ×2 ─┐
 (EM + had)   (timing, BCID,  │                                         ├─► CTP bits
              ET calibration) └─► Jet/Energy Processor ─► jet CMM ──────┤
                                   (jets, Ex/Ey/ET)      energy CMM ────┘
every module ─► scrolling readout memories ─► Readout Driver ─► event fragment
```

The top level, `l1calo_top`, is one **slice** of the system. It has PreProcessor
channels for a 22 × 14 (φ × η) grid of towers in both the EM and the hadronic layer,
which is 616 channels in 154 multi-chip modules. It also has one Cluster Processor
Module (CPM), one Jet/Energy Module (JEM), the four merger functions acting as system
mergers, four readout controllers and one Readout Driver (ROD). The rest of the system
(other CPM and JEM slots, other crates) enters through ports, as ready-made 25-bit
words. The full system is this slice repeated; it is not instantiated here.

Everything runs on a single 40 MHz clock with an active-low asynchronous reset. The
analogue electronics, the ADCs, the fine-delay chips, the serial links, the backplane
and the timing-system receiver are not logic. The digital words they would carry
appear as ports or as parallel wires instead.

## 1. PreProcessor: turning pulses into one number per crossing

A calorimeter pulse spans several 25 ns crossings. The PreProcessor must put its
energy into exactly one of them. This is bunch-crossing identification (BCID), the
most delicate part of the chain. Each channel (`ppr_channel`) does the following:

1. **Coarse alignment** (`ppr_sync_fifo`). Cables differ in length, so each channel
   delays its samples by 0–15 crossings. The delay is programmable, so that all
   towers of one crossing meet in the same clock.
2. **BCID** (`ppr_bcid`), three methods running in parallel:
   * **FIR filter plus peak finder.** Five consecutive samples are weighted with
     4-bit coefficients and summed. A crossing is the peak when its sum is greater
     than the previous crossing's sum and at least equal to the next one. The split
     between `>` and `>=` stops a flat top of two equal sums from giving two peaks.
     The sum is shifted right by `drop` bits and clipped to 10 bits.
   * **Saturated pulses.** Once the ADC clips, the FIR shape is meaningless. Let `t`
     be the first saturated sample. The peak is put at `t` when sample `t-1` is
     above `sat_high` and sample `t-2` is above `sat_low` (a fast rise). Otherwise
     it is put at `t+1`. Near a saturated sample the FIR peak is suppressed, so the
     saturated method alone decides.
   * **External.** A delayed, edge-detected discriminator bit. It is reported but
     does not change the ET.
3. **Look-up table** (`ppr_lut`, 1024 × 8). The 10-bit FIR value addresses a table
   of 8-bit ET values in 1 GeV steps. Pedestal subtraction, calibration, the noise
   cut and switching off a channel are all table contents.
4. **ET out.** The ET is 255 on a saturated-pulse peak, the table value on a FIR
   peak, and 0 on every other crossing. A rate counter counts crossings with ET
   above a threshold. A playback memory (256 samples) can replace the ADC input
   for tests.

The output for crossing *n* appears `sync_delay + 6` clocks after its sample.

### BC-mux: two towers on one link

A peak is always followed by a zero in the same channel, because the next crossing
cannot also be a maximum. So the two φ-neighbours of a pair can share one link
(`ppr_bcmux_enc` / `cp_bcmux_dec`). The 10-bit word is `{odd parity, flag, ET[7:0]}`:

| slot | when | ET carried | flag |
|---|---|---|---|
| first | a tower of the pair is non-zero | A if non-zero, else B | 0 = A was sent, 1 = B was sent |
| second | the crossing after a first slot | the other tower | 0 = same crossing as the first, 1 = following crossing |

The decoder follows the slot phase and rebuilds both towers. Each tower comes out
with the same fixed latency, whichever case applied. A word with bad parity is
taken as zero and flagged. An assertion in the encoder checks the "peak is followed
by zero" rule.

A multi-chip module (`ppr_mcm`) holds four channels, a 2 × 2 tower block. It drives
two BC-mux links (one per η column) and one jet link, `{odd parity, 9-bit sum}`.
The jet sum is set to its full scale, 511, when it overflows or when any of its
towers is at 255.

## 2. Cluster Processor: electrons, photons and taus

Each CP chip (`cp_chip`) evaluates 2 × 4 overlapping windows of 4 × 4 towers. For one
window:

* **e/γ cluster**: the largest of the four EM tower pairs (two vertical, two
  horizontal) in the central 2 × 2, saturating at 255. It must be **greater than**
  the cluster threshold, so a threshold of 255 switches it off.
* **τ cluster**: the same pair plus the 2 × 2 hadronic core, saturating at 255.
* **Isolation**: the 12 EM towers and the 12 hadronic towers of the ring around the
  core, and (e/γ only) the hadronic core as a veto. Each is saturated at 63 and must
  be **at or below** its threshold, so 63 switches the cut off.
* **Local maximum**: the 2 × 2 EM+hadronic core sum must beat its eight overlapping
  neighbours. Equal sums are common in digital data, so the rule is lopsided. The
  comparison is strict (`>`) against the three +η neighbours and the (0, +φ) one,
  and `>=` against the three −η neighbours and the (0, −φ) one. Two equal
  neighbours therefore produce exactly one hit.

There are 16 threshold sets. Sets 0–7 are e/γ. Each of sets 8–15 is τ or e/γ
according to its `is_tau` bit. Because of the local-maximum rule, at most one window
per 2 × 2 block of windows can fire. Each half-chip (4 windows) therefore reports one
16-bit region of interest (RoI).

The CPM (`cpm`) decodes 140 BC-mux links into 20 × 7 towers per layer. The pairing
leaves the −φ row unused. It feeds 8 chips arranged along φ (chip *k* sees tower
rows 2k+1 … 2k+5). For each set it counts the 16 half-chip hits, saturating at 7.
The result is two 25-bit words, `{odd parity, eight 3-bit counts}`: one for sets
0–7 and one for sets 8–15. Latency is 4 clocks from a pair's first-slot word.

## 3. Jet/Energy Processor

The 0.2 × 0.2 jet element (`jem_input`) is the EM plus the hadronic 2 × 2 sum, 10
bits wide. It is set to 1023 if either input is at its full scale of 511. The
jet algorithm (`jet_processor`) runs on an 11 × 7 element environment whose core is
8 × 4:

* 2 × 2 cluster sums must form a local maximum, using the same strict/non-strict
  split as the CP. The core holds 8 subregions of 2 × 2 positions, and each reports
  at most one maximum (an RoI).
* Each of 8 threshold sets pairs a window size (2 × 2, 3 × 3 or 4 × 4 elements
  around the maximum) with a 10-bit threshold. The window ET must be greater than
  the threshold, so 1023 turns the set off. There are four possible 3 × 3 (and
  4 × 4) windows around a 2 × 2 maximum; the one with the largest sum is used. A
  window holding a saturated element passes every threshold below 1023.
* The module result is 8 three-bit multiplicities with odd parity.

Energy sums (`jem_energy_sum`) are taken over the 32 core elements. Ex and Ey use
the factors `round(256·cos((k+½)·π/16))` = 255, 245, 226, 198, 162, 121, 74, 25 for
the eight φ rows of a quadrant. `quad_odd` swaps cosine and sine for the other kind
of quadrant. Elements at or below the noise thresholds are left out. Products are
kept to quarter-GeV precision, and the sums are rounded to 12 bits, saturating at
4095. Each sum is then sent in an 8-bit **quad-linear code**: a 6-bit mantissa times
1, 4, 16 or 64. Code `0xFF` means overflow or saturation.

## 4. Merging: the CMMs

* `cmm_hit_sum` adds up to 16 module words and then up to 3 remote crate words, per
  set, saturating at 7. Words with bad parity are left out and flagged. The slice
  uses two of these for the CP (14 slots, 3 remote crates) and one for jets (16
  slots, 1 remote crate).
* `cmm_energy` decodes the quad-linear codes and sums ET. For Ex and Ey it
  *subtracts* slots 8–15 from slots 0–7, because the two halves of a crate cover
  opposite quadrants (`flip_ex/flip_ey` choose the sign). It then adds the remote
  crate. Total ET is compared with four thresholds in 4 GeV steps. Missing ET uses
  a 16 K × 8 table addressed by `{range, |Ex|>>range, |Ey|>>range}`. The range (0–3)
  is the smallest one in which the larger component fits 6 bits. Each table bit
  says whether the quadrature sum passes one of eight thresholds. Overflow, or a
  component of 512 or more, sets all bits.
* `cmm_jet_et` estimates the total jet ET as Σ mᵢ·wᵢ over the 8 jet multiplicities.
  Choose the sets in rising threshold order and set each wᵢ to the step between
  the energies assigned to neighbouring bands. The sum then equals "jets per band ×
  band value", which is what the original look-up tables compute. The estimate is
  compared with four thresholds.

## 5. Readout

Every module writes its per-crossing data into a scrolling memory (`readout_ctrl`,
256 crossings). On a Level-1 Accept it queues the event (up to 4). It then copies a
header word, holding the bunch-crossing number, into a 64-word FIFO, followed by
`nslices` consecutive crossings centred `offset` crossings back. The FIFO drains
through a valid/ready stream with odd parity.

The ROD (`rod`, 18 inputs) buffers each input and keeps a FIFO of L1A data (event
id, BCN, trigger type). For each event it emits one fragment:

```
0xEE1234EE | L1 id | BCN | trigger type
{input[4:0], slice[2:0], data[23:0]}   ... per enabled input and slice
status: bit0 parity error, bit1 BCN mismatch, bit2 missing module header or slice
payload word count
```

With zero suppression on, all-zero data words are dropped and not counted. BUSY is
raised while any input buffer holds more than `busy_thr` words, and falls when all of
them are at or below it. The builder spends one clock per input, enabled or not.

## 6. Latency through the slice

With `sync_delay = d`, in clocks after the ADC sample of the crossing:

| point | latency |
|---|---|
| tower ET | d+6 |
| BC-mux first slot, jet link word | d+7 |
| towers decoded in the CPM | d+9 |
| CPM result / CP multiplicities at the CTP | d+11 / d+13 |
| JEM results / jet multiplicities at the CTP | d+9 / d+11 |
| total-ET and missing-ET bits | d+12 |
| jet-ET estimate / its threshold bits | d+12 / d+13 |

## 7. Choices made in this design

The architecture, the algorithms, the word formats (10-bit BC-mux and jet links,
25-bit module words, quad-linear code), the saturation values and the comparison
directions follow the published ATLAS design. The following are this design's own:

* The flag polarities of the BC-mux word. When both towers of a pair are non-zero,
  tower A goes first.
* Parity errors: the word is taken as zero (links) or left out (merger inputs), and
  a flag is raised.
* Sizes the description leaves open: 16-deep alignment FIFO, 256-sample playback
  memory, 16-bit rate counters, readout memory and FIFO depths, and the ROD's field
  layout and header marker.
* The isolation and hadronic-veto cuts pass at equality. This keeps 63 as the "cut
  off" setting.
* The missing-ET table addressing (6-bit scaled components in four ranges).
* The jet-ET estimate is done as weighted counts instead of tables. It gives the
  same values.
* Settings in the slice are shared per layer, and table writes are broadcast to all
  channels of a layer.

### Not built

* Analogue receivers, ADCs, the fine-delay chip, LVDS, G-Link and backplane
  serialisation: only their digital words appear.
* Sharing of towers and jet elements between neighbouring modules over the
  backplane: each module gets its whole environment directly.
* The full-system replication: 56 CPMs, 32 JEMs and about 124 PreProcessor modules.
* The forward-calorimeter jet and energy contributions.
* Lossless compression of ADC readout data. An RoI-flavour ROD. Spreading one ROD
  over several output links.
* The VME control path, the timing-system decoder and the monitoring microcontroller.
  Settings are plain input ports.

## 8. Files and simulation

`rtl/l1calo_pkg.sv` holds the shared widths, structs (`ppr_cfg_t`, `cp_thr_t`,
`jet_thr_t`, `crate_esum_t`, link words) and helper functions. Each module is in
`rtl/<module>.sv`. Each block has a self-checking testbench `tb/tb_<block>.sv`, and
`tb/tb_bcmux.sv` covers the encoder and decoder together. The testbenches compare
against behavioural reference models in `tb/l1calo_ref_pkg.sv`. Those models are
written separately: cosines come from real arithmetic and windows are scanned
procedurally. Every testbench prints `TB_RESULT checks=… failures=…` and has a
watchdog.

`tb/tb_l1calo_top.sv` runs the whole slice at its default size. Every tower gets its
own sample stream of pedestal, noise, isolated and clustered pulses, saturating
pulses and BC-mux pairs, and the hadronic samples arrive one crossing late. The
testbench predicts every tower ET, the decoded CPM towers, all CTP words, the rate
counters and every readout fragment, and compares them all. It also counts each
mechanism (FIR and saturated BCID, both BC-mux cases, e/γ and τ hits, local-maximum
vetoes, each jet window size, saturated jets, partial ET/missing-ET/jet-ET results,
zero suppression, BUSY rising and falling) and fails if any never happened.

Example (any testbench; `-y rtl` finds the modules):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
  rtl/l1calo_pkg.sv tb/l1calo_ref_pkg.sv tb/tb_l1calo_top.sv \
  --top-module tb_l1calo_top -Mdir obj_top
obj_top/Vtb_l1calo_top +verilator+rand+reset+2
```

`-Wno-fatal` is needed because the testbenches assign 32-bit `$urandom` values to
narrower variables. The RTL itself lints clean under `--lint-only -Wall`, apart from a
few unused-signal notes that each module's header comment explains.
`+verilator+rand+reset+2` starts uninitialised state at random values, which shows
that the design depends only on its reset.

The full slice builds in under a minute and simulates in a few seconds, including
about 17 000 clocks spent loading the tables.
