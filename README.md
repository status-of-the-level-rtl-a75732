# Barrel Sector Logic for a Level-0 RPC muon trigger

One Sector Logic FPGA serves one sector of a muon spectrometer barrel. Up to
50 on-detector Data Collector and Transmitter boards (DCTs) send it
zero-suppressed hits from Resistive Plate Chambers (RPCs) in four stations:
inner (BI), two middle (BM1, BM2) and outer (BO). From these hits the FPGA
has two jobs:

* **Trigger.** Every bunch crossing (BC, 25 ns), find muon tracks that hit
  at least three of the four stations. A BI-BO pair also counts, to cover
  the areas the middle stations miss. Form up to four 128-bit candidates per
  half sector. Send them to an MDT track processor (MDT-TP), and pass the
  ones it confirms to the central trigger interface (MUCTPI).
* **Readout.** Keep every hit for 10 µs. When a Level-0 Accept (L0A)
  arrives for a BC, send that BC's hits from all DCTs to the readout system
  (FELIX). Otherwise delete them.

The RTL is written in synthesizable SystemVerilog for a 320 MHz clock, which
is eight cycles per BC. `barrel_sl_top` is the whole FPGA, apart from the
serial-link and clock IP around it.

## Floorplan: four dies, four roles

The target FPGA is built from four dies, called super logic regions (SLR0
to SLR3). The logic follows that split, and signals crossing dies are
registered once per die boundary:

```
   SLR0                    SLR1                    SLR2
 20 BM/BO DCTs        10 BI DCTs, Tile,       20 BM/BO DCTs
 half_sector_trigger   BC timing              half_sector_trigger
   |    ^  BI (1 reg)  |       | BI (1 reg)      ^    |
   |    +--------------+       +-----------------+    |
   | MDT-TP / MUCTPI                     MDT-TP / MUCTPI
   |                                                  |
   | BM/BO (3 regs)        BI (2 regs)     BM/BO (1 reg)
   v                           v                      v
   +------------------------ SLR3 --------------------+
        50 readout_buffers -> readout_builder -> FELIX
```

DCT link numbering at the top ports:

| links  | contents                                     |
|--------|----------------------------------------------|
| 0..19  | SLR0 BM/BO: BM1 0..6, BM2 7..13, BO 14..19   |
| 20..24 | BI DCTs for the SLR0 half sector             |
| 25..29 | BI DCTs for the SLR2 half sector             |
| 30..49 | SLR2 BM/BO, in the same order as SLR0        |

Each `slr_pipe` delays its signals by a whole number of cycles. The readout
buffers judge a frame's age from the BCID the frame carries, not from when
it arrives, so the extra cycles change nothing.

## DCT frames and the uplink

Each DCT link comes in as the 224-bit user payload of one uplink frame per
BC. That is 8.96 Gb/s at 40 MHz. `frame_splitter` shifts out the eight
28-bit DCT frames in it, one per 320 MHz cycle, lowest bits first. Each
frame is one hit (`sl_pkg::dct_frame_t`):

| bits  | field  | meaning                                             |
|-------|--------|-----------------------------------------------------|
| 27    | hit    | frame holds a hit (0 = idle)                        |
| 26:17 | bcid   | low 10 bits of the BC the hit occurred in           |
| 16:8  | chan   | front-end channel, 0..287                           |
| 7:0   | ftime  | time within the BC, in units of 25 ns / 256          |

The counts are fixed by the system: 28-bit frames, 288 channels per DCT and
eight frames per BC. The bit layout is this design's choice. Ten BCID bits
are enough because a hit is at most about 20 BCs old on arrival.
`sl_pkg::bc_age` works out the age across the orbit wrap. An orbit is 3564
BCs, numbered 0..3563 by `bc_timing`, which `ttc_bcr` resets.

## Putting hits back in BC order (`derandomizer`)

This is the least obvious part of the design. Hits reach the FPGA 5 to 20
BCs after they occurred, and not in order. The trigger needs a complete
picture of one BC at a time. Each DCT therefore has a derandomizer: a ring
of 32 per-BC hit maps, with one bit per channel and, for BI DCTs, an 8-bit
first-hit time per channel.

* **Write.** A frame whose hit is `age` BCs old sets its channel's bit in
  the slot of BC `bcid − age`. Only the first time in a BC is kept. Frames
  older than `MAX_AGE` are dropped and counted in `late_cnt`.
* **Release.** On each BC strobe, the slot `MAX_AGE` = 21 BCs old is output
  as a complete BC (`out_valid`, `out_hits`, `out_time`) and then cleared,
  ready to take hits again.
* **Same-cycle merge.** A hit written in the release cycle for the BC being
  released is merged into the output.

The release age is 21 rather than 20. The extra BC covers a frame that
arrives at the end of its 20th BC and is delayed by the splitter and a
crossing register. All derandomizers share `bc_strobe`, so every station of
a half sector hands its BC to the trigger in the same cycle.

Storage is a per-channel bit vector (and byte vector for BI), not one wide
memory. This is what lets 288 independent channel writes per cycle
synthesize.

## From strips to stations (`half_sector_trigger`)

A half sector has 25 DCTs:

| station | DCTs | chamber | layers                 | local coincidence |
|---------|------|---------|------------------------|-------------------|
| BM1     | 7    | doublet | 2                      | 1 of 2            |
| BM2     | 7    | doublet | 2                      | 1 of 2            |
| BO      | 6    | doublet | 2                      | 1 of 2            |
| BI      | 5    | triplet | 3, read at both ends   | 2 of 3            |

`local_coinc` applies the per-strip majority over a chamber's layers.

Channel maps:

* **BM/BO.** `chan = layer*144 + strip`. Strips 0..95 are eta strips and
  96..143 are phi strips.
* **BI.** `chan = layer*96 + end*48 + strip`. BI chambers have eta strips
  only, read at ends A and B.

`bi_phi_timing` finds the position along a BI strip from the difference of
the times at its two ends. It takes `dt = tA − tB`, clamps it to ±64
fine-time units and maps it linearly onto 48 phi bins. An eta hit needs
either end to fire. A phi hit needs both ends to fire in the same BC.

`strip_bins` then puts each station onto a common trigger grid of 48 eta by
48 phi bins, with `bin = floor(strip * 48 / nstrips)`:

* **Eta.** Eta strips of a station's DCTs are laid end to end.
* **Phi.** Phi strips of a station's DCTs are ORed.

The counts of DCTs per station, the channel maps, the grid size and the
linear timing map are all this design's choices. The system fixes only the
majorities and the fact that BI phi comes from timing.

## Coincidence and candidates

**`trig_view`** runs once for the eta grid and once for the phi grid. It
starts from a pivot hit and looks for the other stations within a window
around the pivot's bin. There are four pT thresholds, with window
half-widths 3, 2, 1 and 0 bins. A narrower window means a straighter track
and a higher pT. A bin becomes a candidate in either of two cases:

* **BM2 pivot.** At least two of BI, BM1 and BO are inside the window (3 of
  4 stations).
* **BO pivot, no BM2.** BI is present. This catches BI+BM1+BO, and BI+BO
  alone (the `bibo` flag).

Only the first bin of a run of adjacent pivot hits starts a candidate, so
one track gives one candidate. The outputs per bin are:

* the highest threshold passed;
* the stations seen;
* the charge, which is the side the outer hit bends to.

**`trigger_logic`** ANDs the two views: a track must pass in eta and in phi.
It takes up to four eta candidates, lowest bin first, and pairs each with
the phi candidate of the highest threshold. Each pair's threshold is the
lower of its two views, and its pT code comes from that threshold's window.
The Tile flag for the eta region (eight regions over 48 bins) is copied into
the candidate. Results appear two cycles after the release.

Candidate layout (`sl_pkg::cand_t`, 128 bits, MSB first): valid, bcid[12],
side, idx[2], eta[8], phi[8], pt[8], thr[3], charge, eta_st[4], phi_st[4],
bibo, tile, mdt_ok, reserved[73]. The field list and the 128-bit width are
fixed by the system. The order, the widths and the station flags are this
design's choice.

## MDT confirmation (`mdt_confirm`)

All four candidate slots are sent to the MDT-TP in the BC they are formed.
Each is also stored in a 512-entry table indexed by BCID. A reply
(`mdt_reply_t`: valid, bcid, idx, accept, refined pt) is checked against the
stored candidate's BCID. Then:

* **Accepted.** The candidate goes to the MUCTPI with the refined pT and
  `mdt_ok` set.
* **Rejected.** The candidate is counted and not sent.
* **BCID mismatch.** The reply is counted (`nomatch_cnt`) and ignored.

## Readout (`readout_buffer`, `readout_builder`)

Each DCT has an 8192 × 32 RAM, seen as 512 BC slots of 16 words. Frames are
written as `{4'h0, frame}` into the slot of their own BC, so the RAM is
reordered by BC while keeping arrival order within a BC. Per slot:

* **Word count and overflow.** A 17th word is dropped and sets the overflow
  flag.
* **Deletion.** A slot is deleted at the BC strobe 400 BCs (10 µs) after its
  BC.
* **Late frames.** Frames more than 24 BCs old are dropped and counted.

The counts are read combinationally and the data one cycle after the
address.

`readout_builder` queues up to 16 L0As and turns each into one event on a
32-bit valid/ready stream, one word per cycle when `fx_ready` is high:

```
{4'hE, 4'h0, event_count[11:0], bcid[11:0]}        event header
  per DCT 0..49:
  {4'hD, dct[5:0], ovf, count[4:0], 16'h0}         DCT header
  count data words                                  in arrival order
{4'hF, 8'h0, words_in_event[19:0]}                  trailer, fx_last = 1
```

`words_in_event` counts the header and the trailer. An L0A that finds the
queue full is counted in `l0a_drop_cnt`. The event format and the queue are
this design's choices. The system description fixes only the memory
geometry, the 10 µs deletion and sending the data in arrival order.

## Latency and rates

| quantity                      | value in this RTL                          |
|-------------------------------|--------------------------------------------|
| BC release by derandomizers   | 21 BCs after the hit BC                    |
| release to candidate          | 4 cycles (12.5 ns), measured end to end    |
| candidate to MUCTPI           | 1 cycle after the MDT-TP reply             |
| readout write rate            | 32 bits/cycle per DCT = 10.24 Gb/s         |
| readout output                | 1 word/cycle, 52 + hits words per event    |
| memory holds                  | 512 BCs; deleted after 400                 |

The trigger is specified to produce candidates within 390 ns. Hits can
arrive up to 20 BCs (500 ns) late, so the 390 ns cannot be counted from the
hit. Here it is taken as the processing time after the BC is complete, and
the design uses 12.5 ns of it.

At 1 MHz of L0As, the readout keeps up while events average at most 268
hit words.

## Own choices and departures

This design is written from a system description that gives the structure,
the counts and the rates, not the algorithm tables or the data formats.
These parts are this design's own:

* **Formats.** The DCT frame layout, the candidate layout, the MDT-TP reply
  and the event format.
* **Geometry.** The station assignment of DCTs, the channel maps and the
  48 × 48 trigger grid. The real system uses chamber-specific strip
  geometry and pT look-up windows. Here they are replaced by a linear bin
  map and four fixed windows, which set the size of the logic but not the
  physics performance.
* **Release age.** 21 BCs instead of 20, as explained above.
* **Tile input.** The Tile calorimeter input is an 8-bit flag per half
  sector. Its link decoding is not included.
* **Readout stream.** The readout is a single 32-bit stream. The FPGA sends
  it over three transceiver links, and splitting it over them is left to
  the link layer.
* **Missing parts.** The serial transceivers, the uplink decoder and
  downlink encoder, the 40 → 320 MHz clock generation, the downlink
  (TTC/configuration) content and the link to the endcap Sector Logic are
  not part of this RTL. Their signals are ports of the top.

## Files

| file                          | role                                                |
|-------------------------------|-----------------------------------------------------|
| `rtl/sl_pkg.sv`               | constants, frame and candidate types, BC arithmetic |
| `rtl/bc_timing.sv`            | cycle phase, BC strobe, BCID                        |
| `rtl/frame_splitter.sv`       | 224-bit uplink payload to 28-bit frames             |
| `rtl/slr_pipe.sv`             | die-crossing registers                              |
| `rtl/derandomizer.sv`         | BC reordering of one DCT's hits                     |
| `rtl/local_coinc.sv`          | layer majority                                      |
| `rtl/bi_phi_timing.sv`        | BI phi from end-to-end timing                       |
| `rtl/strip_bins.sv`           | strips onto the trigger grid                        |
| `rtl/trig_view.sv`            | station coincidence in one view                     |
| `rtl/trigger_logic.sv`        | eta-phi AND, candidate selection                    |
| `rtl/mdt_confirm.sv`          | MDT-TP hand-off and MUCTPI output                   |
| `rtl/half_sector_trigger.sv`  | one trigger die                                     |
| `rtl/readout_buffer.sv`       | per-DCT readout RAM                                 |
| `rtl/readout_builder.sv`      | L0A queue and event building                        |
| `rtl/barrel_sl_top.sv`        | the whole FPGA                                      |

Each module has a testbench `tb/tb_<module>.sv`. Each testbench:

* checks the module against values computed in the testbench itself;
* prints `TB_RESULT checks=N failures=M`;
* stops itself through a watchdog if the module hangs.

`tb_barrel_sl_top` runs the whole FPGA at its default size. It uses:

* all 50 links;
* tracks in both half sectors;
* out-of-order and late frames;
* a BI-BO track;
* an MDT accept and a reject;
* a readout overflow;
* L0As that read events back word for word;
* a deleted BC;
* stalls on the FELIX stream.

It counts each of these and checks the candidate latency.

## Simulating

With Verilator 5, from the repository root (the package goes first):

```
verilator --binary --timing -Wno-fatal -Irtl rtl/*.sv tb/tb_trig_view.sv \
    --top-module tb_trig_view -o sim && ./obj_dir/sim
```

Replace `tb_trig_view` with any other testbench. The top-level testbench
builds in a few minutes and runs in well under that. The simulator has two
states, so every register that is read is reset or initialised.

Parameters that size the design (`DEPTH`, `MAX_AGE`, `NETA`/`NPHI`, `WIN`,
`SLOTS`, `WPB`, `DELETE_BC`, `QDEPTH`) are module parameters. Their defaults
are the system's numbers where it gives one, and the values above
otherwise.
