# VELO L1 electronics board in SystemVerilog

This board sits between the analog front end of a silicon vertex detector and two
data links. It takes the digitised samples of 16 front-end chips, 128 channels
each, and stores every L0-accepted event in a per-chip buffer. In parallel it
builds a fast, compact list of hit clusters for the Level-1 trigger. Later, when
the Level-1 decision arrives, it reads the accepted events back out, zero-suppresses
them and sends them to the DAQ. Everything runs on one 60 MHz clock. The board has
to keep up with an L0 accept every 900 ns, which is 54 clocks.

`velo_l1_board` (the top) contains:

| unit | modules | job |
|---|---|---|
| fast control (FSC) | `fsc_cmd_decoder`, `fsc_tagger`, `fsc_l1_decision`, `throttle_ctrl`, `board_ready` | decodes TTC broadcasts, numbers events, hands decisions to the DSPs, ORs the throttles |
| front-end emulator | `fem` | copies the pipeline column number (PCN) the front-end chips attach to each event |
| 16 × preprocessor (SPP) | `spp_fpga` = `spp_formatter` + `hit_detect` + `cluster_encoder` + `spp_l1t_tx`, plus `l1_buffer` | sync check, buffer write, hit finding, cluster list |
| 16 × buffer processor | `l1b_dsp` | L1 derandomizer, zero suppression, DAQ fragment |
| trigger link | `l1t_fpga` = 16 `sync_fifo` + `l1t_event_builder` + `slink_tx` | merges the 16 cluster lists into one trigger event |
| DAQ link | `daq_fpga` = 16 `sync_fifo` + `daq_event_builder` + `slink_tx` | merges the 16 DSP fragments into one DAQ event |

Shared types and constants live in `l1_pkg` (TTC commands, tags, configuration
struct) and `dsp_pkg` (fragment layout).

## Event identity and synchronisation

An event has three identities, and the board checks them against each other at
every merge point:

* The **L0ID** is a 12-bit counter in the FSC. It counts L0 accepts, and the first
  event after a reset is 1. It is cleared by L0_Reset (a TTC broadcast) and by
  the TTC event-counter reset.
* The **BCID** is taken from the TTC bunch counter.
* The **PCN** is the 8-bit pipeline column number. The emulator `fem` sends it as
  two nibbles with DataValid, high nibble first. Each front-end link also carries
  its own PCN in bits 3..0 of its first two words.

The tagger waits a fixed front-end latency (`FE_LATENCY`, 8 clocks by default)
and then gives every SPP a tag {L0ID, BCID, PCN}. The tag must arrive before the
first link word of the event. Each SPP compares the PCN of all four of its links
with the tag and sets one error bit per link (the E bits). These bits travel
with the event to both outputs. The DAQ builder also compares L1ID, L0ID, BCID
and PCN across all 16 fragments and counts a sync error on any mismatch. The L1T
builder compares the L0IDs of its 16 inputs in the same way.

## Preprocessor: from samples to clusters

Each chip has four 8-bit links, 32 channels per link. In link k, word 2+j is
channel 32k+31−j. For every event the formatter writes 38 words into a 64-word
slot of the 128K×32 L1 buffer:

* 2 header words. Word 1 is {0, E bits, 0, PCN}.
* 32 words of samples, one byte from each link per word.
* 4 words of hit map.

The slot number is the low 11 bits of the event count, so the buffer holds the
last 2048 events.

`hit_detect` marks a channel as hit when its sample is above its pedestal plus
a threshold. The pedestals are written through ECS. `cluster_encoder` turns the
128-bit hit map into clusters, one per clock. A cluster is one channel, or two
adjacent channels with the S bit set. The 7-bit channel address is the lower of
the two. The list ends early in two cases, and either one sets the T bit:

* the 7-bit ECS cluster limit is reached;
* the optional time-out runs out (`TIMEOUT_DEFAULT` = 16 clocks).

**Overload rule.** Encoding is the only part of the SPP that is not a fixed
pipeline. A busy chip can therefore still be encoding when the next event's
hits are ready. Events queue in an 8-entry event queue. An event that arrives
while another is already waiting is queued *without its hits*. It is later sent
as T=1 with no clusters. As a result, every L0 accept still produces exactly
one event on every SPP bus, in order. The L1T merge relies on this. The
`forced` output counts such events. The L1 buffer copy of the event is complete
either way.

The SPP sends each event to the trigger FPGA over an 8-bit bus:
L0ID<7..0>; {error, BCID<1..0>, L0ID<11..8>}; {T, N}; then N cluster bytes
{S, address}.

## Trigger link event

`l1t_event_builder` starts when all 16 input FIFOs (8 bits × 256 words) hold
data. It reads the three header bytes of all chips in parallel. It then reads
clusters one per clock, chip by chip. Each cluster is extended to 16 bits as
{0, S, chip<3:0>, address<6:0>}, and two clusters are packed per 32-bit word,
the first in the low half. Clusters beyond the ECS limit (8 bits) are dropped
and the GT bit is set. The event is

```
h0  {L0ID<11:0>, BCID<1:0>, err1 = L0ID mismatch, err0 = any chip error, link id<15:0>}
h1  {board<7:0>, N<7:0>, T bits<15:0>}
h2  {GT, 0, size in words}
    clusters, two per word
```

It is written into a 32×512 output FIFO. Its length goes into a 16-entry length
queue, and `slink_tx` sends only complete events. While that queue is full the
builder sees no free space and holds the next event.

Because clusters are read serially, a board-wide cluster count of about 20
clusters per event already takes the whole 54-clock budget. The ECS limit is
there to keep the average below that.

## Buffer processor (DSP) and the Level-1 decision

A Level-1 decision broadcast carries a 3-bit type and L0ID<1:0>. A non-zero type
means accept. `fsc_l1_decision` keeps the slot pointer of the oldest undecided
event and, for an accept, sends {type, L0ID<1:0>} and the 11-bit pointer to all
16 DSPs.

For each accept, `l1b_dsp`:

1. increments its 16-bit L1ID;
2. copies the 38 words of the event from the L1 buffer into a 16-event
   derandomizer;
3. checks that the L0ID of the copied event matches the decision;
4. builds a fragment of 16-bit words:

```
{L1ID}  {E, L0ID}  {R, Z, 00, BCID}  {PCN, N}  {T, M<6:0>, 00}
DAQ clusters: head {0, len<2:0>, first channel<6:0>}, then the raw values, two per word
L1T clusters: the same bytes the SPP sent, two per word
non-processed channels: NP samples starting at channel 4·L1ID<4:0>
```

Zero suppression keeps runs of channels above pedestal+threshold, up to 8 long.
In Z mode (no processing) the fragment carries all 128 samples and no clusters.

The DSP raises its throttle when the derandomizer holds at least `derand_thr`
events. This is an ECS register with default 13. `throttle_ctrl` masks and ORs
the 16 throttles into the board throttle. An outside readout supervisor must
then stop L0 accepts. The DSP model does not protect itself against a
supervisor that ignores the throttle.

## DAQ link event

`daq_event_builder` merges the 16 fragments from the 16×128 input FIFOs. A full
input FIFO is the back pressure to its DSP. The builder keeps its own 32-bit
L1ID. The event it writes is:

```
0  L1ID<31:0>
1  {L0ID, BCID, PCN}
2  E bits 63..32
3  E bits 31..0
4  {link id, board, R, Z, GT, SyncErr, DT, 000}
5  {N DAQ clusters<11:0>, N L1T clusters<11:0>, 0}
6  {T bits<15:0>, size}
   16-bit halves: DAQ heads {0, len, 0, dsp<3:0>, addr<6:0>} with their values,
   L1T clusters {000, S, 0, dsp<3:0>, addr<6:0>} up to the L1T limit (GT),
   non-processed samples; padded to a whole word
```

The output FIFO has 512 words. A Z-mode event of 2048 samples cannot fit. The
data part is therefore capped at 504 words, and DT marks the event as cut.

## Resets and control

* **L0_Reset** clears the L0ID and, through a 2-clock pulse, the emulator.
* **L1_Reset** empties the DSP derandomizers, the SPP event queues and the
  link FIFOs.
* **L1ID_Reset** clears the L1ID counters.
* Several reset bits can be set in one broadcast.
* A link reset over ECS runs the S-LINK URESET# sequence.
* `board_ready` is the AND of the TTC, FPGA-initialised, DSP, ECS and link-up
  signals.

## Where this design decides for itself

The board description names the contents of headers, clusters and buses more
often than it gives their layout. The following are this design's own choices:

* every header and fragment word layout above;
* the channel order within a link;
* the nibble order of the PCN;
* the front-end latency (8 clocks);
* the time-out length (16 clocks);
* the emulator's 54-clock frame;
* the SPP overload rule and its 8-entry queue;
* the 504-word DAQ cap;
* the meaning of the decision type bits (non-zero = accept).

The non-processed channel group is addressed with L1ID<4:0>, because 32 groups
of four channels cover 128 channels.

Three things are known to be missing or simplified:

* The DSP is fixed logic, not a program. It does not track pedestals and noise;
  pedestals are written through ECS.
* ECS, the TTC receiver, the ADCs and the S-LINK cards are outside the design.
  They appear as ports: a configuration struct, a command struct and plain link
  signals.
* The S-LINK handshake is reduced to UD/UWEN#/LFF#/LDOWN#/URESET#.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Build one with, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_spp_fpga \
  rtl/l1_pkg.sv rtl/dsp_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/tb_spp_fpga.sv
./obj_dir/Vtb_spp_fpga
```

`tb_daq_fpga` also covers `daq_event_builder`.

`tb_velo_l1_board` runs the whole board at its default size: 16 chips, the
full buffers and FIFOs. It takes about a minute. It generates samples from a
hash of (event, chip, channel) and models the L0 source with throttle,
the TTC decisions and both link receivers. It checks every trigger and DAQ
event word for word against a model. Its phases are:

1. normal running;
2. low cluster limits with busy chips;
3. the time-out;
4. SPP overload with the time-out off;
5. Z mode and non-processed channels;
6. a DAQ link that is almost always full, which drives throttle and back
   pressure;
7. link reset, L1_Reset with L1ID_Reset, and L0_Reset with event-counter reset.

At the end it fails if any mechanism never occurred: truncation, time-out,
forced events, GT, DT, sync errors, throttle, stalls, resets and the rest.
