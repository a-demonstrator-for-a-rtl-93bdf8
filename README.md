# Time-multiplexed Level-1 calorimeter trigger: demonstrator and system RTL

A conventional calorimeter trigger cuts the detector into many small regions and
gives each processor one region for every bunch crossing. Neighbouring processors
then have to share their boundary towers, which takes complex backplanes. A
**time-multiplexed** trigger turns this around: all the data of one bunch crossing
go to one processor, which has several bunch crossings to receive and process them.
Ten processors take turns, round robin. Each one sees a whole half of the
calorimeter, so almost no boundary data has to be shared.

This repository holds synthesizable SystemVerilog for two things:

* **The laboratory demonstrator firmware** (`minit5_fw`). It is the firmware of a
  double-width AMC card with 5 Gb/s optical links. It streams the calorimeter into
  a 2x2 electron-clustering algorithm one phi row per clock. The algorithm input
  can come from the links, from a counter-based test pattern or from injection
  RAMs. DAQ capture units record the data before and after the algorithm.
* **The full time-multiplexed system it prototypes** (`tm_system`). It has
  2 x 36 Pre-Processor (PP) cards and 10 Main-Processor (MP) nodes. Each node is
  made of an MP- card and an MP+ card, and each card runs the same electron
  finder on a whole eta half.

`l1_trigger_top` instantiates both parts side by side. They share no signals and
each has its own clock and reset.

The design follows the published description of the CMS calorimeter trigger
demonstrator built on MicroTCA. That description gives the architecture, the
link counts and rates, the tower granularity and the names of the firmware
blocks. It does not give most word formats, handshakes, the internals of the
2x2 algorithm or the DAQ and RAM organisation. Those are this design's own
choices and are listed under "Departures and own choices" below.

## Calorimeter geometry and numbers used

| quantity | value |
|---|---|
| towers in phi | 72 (granularity 0.087) |
| towers in eta, barrel and endcap | 56 (28 per half) |
| HF (forward) | 8 rings per side, each 2 towers wide in eta (16 towers), HCAL only |
| bunch-crossing clock | 40 MHz, 3564 bunch crossings per orbit |
| demonstrator fabric | 120 MHz = 3 clocks per bunch crossing, 8-bit towers |
| system fabric | 240 MHz = 6 clocks per bunch crossing, 12-bit towers (worst case) |

## Time multiplexing (`pp_tmux`, `mp_unpack`, `mp_card`, `tm_system`)

Each PP card owns one eta ring: 72 phi towers, each with a 12-bit ECAL and a
12-bit HCAL energy. That is 1728 bits per bunch crossing. The ring arrives on 36
input links at 2.4 Gb/s. With 8b/10b coding, 36 x 2.4 Gb/s x 0.8 x 25 ns is
exactly 1728 bits, so each link carries one byte per 240 MHz clock and six bytes
per bunch crossing. Link `i` carries phi towers `2i` and `2i+1`. Byte `s`, sent
on clock `s` of the bunch crossing, is bits `8s+7:8s` of
`{HCAL(2i+1), ECAL(2i+1), HCAL(2i), ECAL(2i)}`.

The 8 outermost PPs of each half serve the forward calorimeter. It has no
ECAL, so each of these rings is two towers wide in eta. The PP logic is the same;
only the meaning of the two 12-bit fields changes: the low field holds the HCAL
energy of the inner tower and the high field that of the outer tower.

The PP sends bunch crossing `n` to node `n mod 10` over one 9.6 Gb/s output
link. At 240 MHz with 8b/10b that link carries one 32-bit word per clock, or 60
words in the 10 bunch crossings before the same node's turn comes again. A frame
uses 55 of these words:

```
clock after the 6th input byte:  header  {8'hBC, node[3:0], 8'h00, bx[11:0]}
next 54 clocks:                  ring bits 31:0, 63:32, ... 1727:1696
                                 (tower t = bits 24t+23:24t = {HCAL, ECAL})
5 clocks:                        idle (valid low)
```

Inside `pp_tmux`, the six bytes of each link are gathered. On the sixth clock
the whole ring is copied into the frame buffer of the node whose turn it is,
and that node's output link starts its frame on the next clock. A frame lasts
exactly ten bunch crossings. The buffer of node `k` is therefore overwritten on
the very clock after its last frame clock, and a single buffer per node is
enough. The round-robin counter runs freely from reset, so all PPs must be reset
together. It is deliberately not derived from the bunch-crossing number, because
3564 is not a multiple of 10.

Each MP card receives 40 links. 36 come from the PPs of its own half, and 4 come
from the four rings of the opposite half nearest eta = 0. Those four PPs drive
the same frame to both cards of the node. Link `l` of the card is eta ring `l`:
links 0-3 are the opposite half's rings, outermost first, and links 4-39 are the
card's own rings from eta = 0 outwards. This lets the card build clusters that
straddle eta = 0. Both cards report such clusters. Links 32-39 are the forward
rings; the card splits each into two eta columns with zero ECAL, so it works on
32 + 2 x 8 = 48 eta columns (`N_ETA = N_LINKS + N_HF`).

`mp_unpack` appends each 32-bit word to a bit accumulator. Whenever 48 bits are
present it emits two towers, so every three words give two beats. The 40
unpackers run in lockstep, and each beat together is two complete phi rows of 48
eta columns. These rows feed the electron finder at two rows per clock. The 72
rows take 36 beats spread over the 54 data words, which fits inside the
60-clock frame. One row per clock would need 72 clocks and would not fit.

Each card reports once per event (`gt_*`): the electron window with the largest
ECAL sum, its eta and phi, the number of electron windows and the bunch-crossing
number. The report comes 58 clocks (under 10 bunch crossings) after the frame
header. How the real system sorts and formats candidates for the Global Trigger
is left open by the source; this maximum is a placeholder for that sort.

## The 2x2 electron finder (`electron_finder`)

The finder is fed whole rows of constant phi, `ROWS` rows per beat, with
`in_first` on the beat that holds phi 0. It forms every overlapping 2x2 window,
built from towers (eta, phi), (eta+1, phi), (eta, phi+1) and (eta+1, phi+1).
Eta does not wrap. Phi does wrap: window 71 joins row 71 with row 0. For each
window it outputs:

* the ECAL sum (`TOWER_W+2` bits);
* the HCAL sum;
* an electron flag: `esum >= E_THRESH` and `hsum <= esum >> H_SHIFT`, which is a
  hadronic veto.

Only two rows are stored: the last row of the previous beat, which joins beats,
and row 0 of the event, which is held for the wrap window. The output has
`ROWS` slots, each with its own valid and phi. Slot `r` of beat `b` holds the
windows whose lower row is `b*ROWS + r - 1`. Slot 0 of the first beat is
therefore empty. The wrap window comes out in slot 0 one clock after the result
of the last beat, so the next event can start on the very next clock. The
results are registered, one clock after their beat.

No local-maximum search or overlap removal is done. The source only names the
2x2 algorithm, so this is the simplest version that does what the name says.

## Demonstrator firmware (`minit5_fw`)

All blocks run at 120 MHz:

```
rx_data/rx_start --> link_aligner --+--> pattern_ram x N (capture) --+
                                    |                                |
bx_pattern_gen (counter pattern) ---+----- source select <-----------+ (play)
                                           |            \--> tx_data
                                    daq_capture -> daq_buffer   (input copy)
                                           |
                                    electron_finder --> cl_*
                                           |
                                    daq_capture -> daq_buffer   (cluster copy)
```

* **Link words.** Each 32-bit word holds two eta towers of one phi row:
  ECAL(2i) in bits 7:0, ECAL(2i+1) in 15:8, HCAL(2i) in 23:16 and HCAL(2i+1) in
  31:24. With the default 12 links, one clock loads a row of 24 towers. 72
  clocks (24 bunch crossings) load the whole calorimeter.
* **`link_aligner`.** Each link carries a frame-start marker. After `align`, the
  aligner measures when each link's marker arrives and delays every link to
  match the latest one. The data path is one register plus a tap multiplexer,
  so the latest link sees one clock of latency. The skew range is `MAX_SKEW` = 8
  clocks.
* **Sources.**
  * `SRC_LINK` takes the aligned links, starting each phi loop at the marker.
  * `SRC_PATTERN` takes `bx_pattern_gen`. Its word for link `i` is
    `{i[7:0], sub[3:0], frame_clock[7:0], bx[11:0]}`, with a phi loop every 72
    clocks.
  * `SRC_RAM` plays the injection RAMs, starting a loop at RAM word 0 and every
    72 words after it.

  The transmitters (`tx_data`) carry either the pattern or the RAM words.
* **`pattern_ram`.** One 1024 x 32 memory per link. Playback loops over
  addresses `0..play_last`. Capture fills the memory once and raises `full`.
  A control port reads and writes any word.
* **DAQ.** `daq_capture` runs every clock's array through a circular RAM of
  `LATENCY` entries. On a Level-1 accept it copies `WINDOW` arrays, starting
  with the one that entered `LATENCY` clocks earlier, into `daq_buffer`, a FIFO
  with an end-of-event flag. An accept that arrives while a window is being
  copied is dropped and counted (`daq_l1a_lost`). The cluster copy packs window
  `k` as `{electron, hsum, esum}` in word `k`, and puts `{valid, phi}` in the
  last word.

## Modules

| module | role |
|---|---|
| `l1_pkg` | constants, source and RAM-mode enums |
| `l1_trigger_top` | both parts side by side |
| `minit5_fw` | demonstrator firmware |
| `link_aligner`, `bx_pattern_gen`, `pattern_ram`, `daq_capture`, `daq_buffer` | demonstrator infrastructure |
| `electron_finder` | 2x2 clustering, shared by both parts |
| `tm_system` | 72 PPs and 10 x 2 MP cards, with the boundary links |
| `pp_tmux` | PP time multiplexer |
| `mp_unpack` | MP link receiver and unpacker |
| `mp_card` | MP card: 40 unpackers, forward-ring split, finder and report |

Main parameters and their defaults:

* `minit5_fw.N_LINKS` = 12. The full laboratory system would use 28 links (56
  eta towers), and that value works as a parameter.
* `RAM_DEPTH` = 1024.
* `DAQ_LAT` = 64, `DAQ_WIN` = 3, `DAQ_DEPTH` = 64.
* `tm_system`: `N_PP` = 36, `N_IN` = 36, `N_NODES` = 10, `N_BOUND` = 4,
  `N_HF` = 8 (forward PPs per half, the outermost ones). Keep
  `N_PP - N_HF` at least `N_BOUND`.
* `E_THRESH` = 8 in the demonstrator (8-bit towers) and 16 on the MP cards
  (12-bit towers), with `H_SHIFT` = 3.

## Departures and own choices

Taken from the source:

* the time-multiplexed architecture with 10 nodes in round robin;
* 36 PPs per half (28 barrel and endcap, 8 forward with two-tower rings),
  40 links per MP card, including 4 boundary links;
* link rates of 2.4 and 9.6 Gb/s;
* 8-bit towers in the laboratory and 12-bit towers in the system;
* 72 phi x 56 eta towers, loaded one row per clock (72 clocks);
* the 2x2 clustering;
* 32-bit link words;
* bunch-crossing-counter and RAM pattern sources, and RAM capture;
* DAQ capture before and after the algorithm, triggered by a Level-1 accept.

This design's own choices:

* all bit layouts (link words, PP input bytes, frame header, packing) and the
  240 MHz, 32-bit internal link width;
* the electron flag (threshold and hadronic veto) and the absence of
  local-maximum logic;
* two rows per clock on the MP cards;
* which half of a forward link's tower field holds the inner tower;
* the per-event maximum as the Global Trigger report;
* how the aligner learns its delays, the marker framing and `MAX_SKEW`;
* RAM depth, playback and capture behaviour;
* DAQ pipeline length, window, buffer depth and busy rule;
* the 3564-bunch-crossing orbit.

Known simplifications:

* The links into an MP card are assumed to arrive aligned. The system part has
  no link aligner.
* Redirecting a failed node's bunch crossings to a spare node, which the
  time-multiplexed scheme allows, is not built: the round robin always uses
  the 10 nodes in order.
* The demonstrator's algorithm clock is 120 MHz, three clocks per bunch
  crossing. The source also mentions a 125 MHz fabric for 5 Gb/s links; nothing
  in the RTL depends on the exact frequency.
* The serial transceivers, optics, LVDS IO, IPMI controller, MicroTCA
  backplane protocols, jet finder and sort, and the Global Trigger are not part
  of this RTL. The ports stop at the 32-bit fabric words.

## Simulation

Every testbench is self-checking. It computes the expected results on its own
from the stimulus, prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. They run with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/l1_pkg.sv tb/tb_l1_trigger_top.sv \
    --top tb_l1_trigger_top
./obj_dir/Vtb_l1_trigger_top
```

`-Irtl -Itb` lets Verilator find each module in its own file.

| testbench | what it checks |
|---|---|
| `tb_electron_finder` | every window and flag, phi order and wrap, for 1 row/clock (24 eta, 8-bit; a phi loop is 72 clocks = 24 bx) and 2 rows/clock (12-bit) |
| `tb_bx_pattern_gen` | counter, orbit wrap, bc0 resync, frame marker, pattern words |
| `tb_pattern_ram` | load, playback (full and short loop), capture until full, readback |
| `tb_link_aligner` | random skews: equal words on all outputs, marker position, latency = max skew + 1 |
| `tb_daq_capture` | window contents and latency, `wr_last`, dropped accepts |
| `tb_daq_buffer` | FIFO order, event count, overflow |
| `tb_minit5_fw` | demonstrator end to end (via `demo_exerciser`) |
| `tb_minit5_fw_full_lab` | the same with 28 links: the full laboratory system, 56 eta towers per row |
| `tb_pp_tmux` | round robin, header bx and timing, frame contents, 60-clock frame spacing |
| `tb_mp_unpack` | tower order with gaps, first flag, header bx, bad header |
| `tb_mp_card` | all windows of 40-link events (48 eta columns with the forward rings), report contents and latency |
| `tb_tm_system` | full-size system over 12 bunch crossings (via `tm_exerciser`), all 10 nodes, boundary clusters |
| `tb_l1_trigger_top` | the whole top at default sizes, counting each mechanism: alignment, each source, DAQ readout, a lost Level-1 accept, RAM capture, all nodes, boundary clusters |

The full-size top test builds in about two minutes and simulates in seconds.
