# Segment data path of an upgraded L1 drift-chamber trigger

This is the RTL for moving drift-chamber track segments from the track segment finders (TSF) to
a new set of z-track processors (ZPD), and for switching the global trigger (GLT) between the
old and new systems. Each ZPD tries to fit tracks in 3D. For that it needs many more segments,
from a wider range of azimuth, than the old pT discriminator (PTD) got. The problem is
bandwidth: a fixed number of backplane pins and 28-bit channel links, with a new event every
267 ns. The design handles this in three steps:

1. **Select at the source.** Each TSF keeps the 3 best segments per 2π/16 sector and per
   superlayer. Only segments with fine-φ data count. A small rank table decides what "best"
   means.
2. **One segment per pin.** Every kept segment gets a link pin of its own. On that pin it is
   sent serially over a 16-word frame: 16 clocks at 60 MHz, one event per 267 ns. This makes
   it trivial to drop a whole segment group later.
3. **Mask at the sink.** A ZPD needs data from 9 TSFs, which is 180 segment pins. Its
   backplane can take only 144 segment pins. The ZPD interface board (ZPD_i) drops the 12
   groups of 3 pins that lie outside the ZPD's pT coverage.

Everything is synthesizable SystemVerilog-2017. The parameter defaults are the full system:
16 TSFX boards, 8 TSFY boards, 8 ZPD_i boards and one GLT_i.

## System and data flow

```
 TSF segment finder (not in this RTL)
      | cand_x / cand_y: 16 candidates per group, per event
      v
 tsf_zpd_out ─ per group: seg_rank_lut -> seg_selector (3 best)   tsf_coarse_phi -> BLT
      |          all groups -> tsf_frame_tx (28-bit word, 16 words / event)
      v
 tsfi_fanout ─ retime, 3 identical copies (or test pattern)
      |  tsfi_x / tsfi_y  ──>  DS90CR287 / cable / DS90CR288 (outside)  ──>  zpdi_lx / zpdi_ly
      v
 zpdi ─ 3 x zpdi_mask_fpga: 9 links (X0..X5, Y0..Y2) -> 144 segment pins + 9 frame pins
      |                                                   -> ZPD backplane (ZPD not in this RTL)
 ZPD result (6 bits) -> zpdi -> glti_switch -> two 16-bit GLT slots
```

| Board | Azimuth | Groups on its link (group g drives pins 3g+1..3g+3) |
|---|---|---|
| TSFX (16) | 2π/16 | A10, V9, U8, A4, V3, U2, A1: 7 groups, 21 pins |
| TSFY (8) | 2π/8 | A7 s1, A7 s0, V6 s1, V6 s0, U5 s1, U5 s0: 6 groups, 18 pins (s = 2π/16 half) |

ZPD k processes seeds from the central boards: TSFX 2k and 2k+1, and TSFY k. It also receives
the two TSFX on either side and one TSFY on either side: TSFX (2k-2 … 2k+3) mod 16 and TSFY
(k-1 … k+1) mod 8. So every TSF feeds exactly three ZPDs. The top-level port comment
(`dct_upgrade_top.sv`) gives the copy-to-ZPD cable map.

## The link frame

This is the central convention. All the other blocks depend on it. A link word has 28 bits:

- Bit 0 is the frame bit. It is 1 on word 15 of each frame and 0 on words 0–14.
- Bit 1 + 3g + k carries segment k (0 = best) of group g.
- Unused pins stay 0.

Over the 16 words of a frame, one segment pin carries these bits:

| word | 0 | 1 2 3 4 | 5 6 7 8 9 10 | 11 12 13 | 14 15 |
|---|---|---|---|---|---|
| bit | mask (slot used) | loc[3] loc[2] loc[1] loc[0] | phi[5] … phi[0] | dPhi[2] dPhi[1] dPhi[0] | 0 0 |

`loc` is the candidate position inside the 2π/16 sector, from 0 to 15. `phi` and `dPhi` are
passed through from the segment finder. `dct_pkg::seg_frame_bit` encodes this layout, and
`tb/tb_ref_pkg.sv::decode_pin` decodes it independently.

A frame starts when the selectors deliver a result, and word 0 follows the event tick by 2
clocks. Once started, frames run back to back:

- If no event arrives, the next frame is empty: all masks are 0, but the frame bit is still
  sent.
- An event that arrives in mid-frame restarts the frame.
- Before the first event the link is all zero.

## Segment selection

`seg_selector` handles one group: 16 candidate positions. A candidate is eligible if it is
`valid` and has `fine` φ data (φ error < 5 mm). The selector makes three arg-max passes over
the eligible candidates. Each pass takes the highest rank; between equal ranks the lower
position wins. The selection is evaluated on the `tick` clock edge and registered. It is
written into slots 0, 1 and 2 in rank order. An unused slot has mask 0.

`seg_rank_lut` gives the rank. It is a 64-entry by 4-bit table addressed by
{layer hit pattern[3:0], weight[1:0]}. Reset loads rank = 4·(hit layers − 1, or 0 below 2
layers) + weight. All tables of all boards share one write port (`lut_we/lut_addr/lut_wdata`),
so the ranking can be reloaded at run time.

Assertions in `seg_selector` check that the slots fill from slot 0 upward and in falling
rank. Assertions in `tsf_frame_tx` check that the frame bit marks word 15 only and that the
word number steps by one.

`tsf_coarse_phi` builds the map for the BLT. It ORs all found segments (fine or not) of each
supercell (2π/32) into one bit. Positions 0–7 form supercell 0 and positions 8–15 form
supercell 1. The map bits are `coarse_phi[2g+c]`.

## Masking on the ZPD_i

Each `zpdi_mask_fpga` takes two TSFX links and one TSFY link. Its parameter `KEEP` has one bit
per group:

- bits [6:0]: link 0 (TSFX)
- bits [13:7]: link 1 (TSFX)
- bits [19:14]: link 2 (TSFY)

The kept groups are packed in order onto the output pins. The frame bits go out on three pins
of their own.

`zpdi` assigns the links to its three FPGAs as follows. FPGA 0 takes X0, X1 and Y0. FPGA 1
takes X2, X3 and Y1. FPGA 2 takes X4, X5 and Y2. By default it drops these 12 groups:

- U8, V9 and A10 of X0;
- A1, U2 and V3 of X5;
- U5, V6 and A7 of the outer half of Y0 (sector 0) and of the outer half of Y2 (sector 1).

The FPGAs then drive 42 + 60 + 42 = 144 segment pins. Which groups should really be dropped
depends on the pT-coverage study behind the system. The defaults are a plausible choice, not a
measured one: change `KEEP0/1/2` to match your coverage. The pin count follows from the
number of 1 bits in the masks, so the top's 144-bit port then needs the same total.

## Test patterns and the GLT switch

Both the TSFi fanout and the ZPD_i FPGAs can replace their data with a test pattern
(`tsfi_test_en`, `zpdi_test_en`). The pattern uses the same 16-word framing. Word w of frame f
carries {f[4:0], w[3:0]} three times over bits 27..1, and the frame bit on word 15.

`glti_switch` fills the two 16-bit GLT slots. With `use_new` = 1 (the new system), ZPD k
bits [1:0] go to slot A bits [2k+1:2k] and ZPD k bits [3:2] go to slot B. With `use_new` = 0
(the old system), slot A takes PTD k's 2 bits and slot B takes EMT X. ZPD result bits [5:4]
are carried through the ZPD_i but not used.

## Timing summary (60 MHz clock, `tick` once per 16 clocks)

| Point | Clocks after tick |
|---|---|
| coarse-φ maps, selector result | 1 |
| TSF link word 0 | 2 |
| TSFi outputs word 0 | 4 |
| ZPD backplane word 0 (+ channel link latency L) | 5 + L |
| GLT slot from ZPD result / from PTD, EMT X | 2 / 1 after the input |

## Where this RTL follows the specification and where it chooses

The specification fixes the following, and the RTL follows it:

- the quota of 3 per 2π/16 sector;
- the fine-φ condition and the 4-bit rank;
- one segment per pin, with the pin and word layout above;
- the 28-bit link, 16 words per 267 ns, and 3 copies per TSF;
- 9 TSFs per ZPD, 12 masked groups of 3, and 144 pins;
- 6 ZPD output bits, of which 4 are used;
- the two 16-bit GLT slots and the old/new switch.

The following are this design's own choices:

- 16 candidates per group (the range of `loc`);
- the rank-table address and its reset contents;
- tie breaking and slot order;
- all register stages and latencies, and the event-tick interface;
- idle and empty-frame behaviour;
- which groups are masked and how the links are split over the three FPGAs;
- the test pattern;
- the GLT bit mapping.

Not in this RTL:

- the TSF segment finder and fine-φ calibration;
- the ZPD algorithm;
- the BLT, PTD, EMT and GLT themselves;
- the channel-link serializer and deserializer chips (DS90CR287/288);
- the GLINK receivers, crate controller, backplanes and power.

At the top, their signals are ports.

## Files

- `rtl/dct_pkg.sv`: types (`cand_t`, `seg_t`), sizes, the frame-bit, default-rank and
  test-pattern functions.
- `rtl/seg_rank_lut.sv`, `seg_selector.sv`, `tsf_coarse_phi.sv`, `tsf_frame_tx.sv`,
  `tsf_zpd_out.sv`: the TSF output stage.
- `rtl/tsfi_fanout.sv`, `test_pattern_gen.sv`: the TSFi FPGA.
- `rtl/zpdi_mask_fpga.sv`, `zpdi.sv`: the ZPD_i.
- `rtl/glti_switch.sv`: the GLT_i.
- `rtl/dct_upgrade_top.sv`: the whole system.
- `tb/tb_<module>.sv`: a self-checking testbench per module. `tb/tb_ref_pkg.sv` holds the
  reference selection and the frame decoder.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dct_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_seg_selector.sv -y rtl +libext+.sv --top-module tb_seg_selector -o sim
./obj_dir/sim
```

`tb_dct_upgrade_top` runs the full-size system with default parameters. It models each channel
link as two clock stages with the cable map above. It runs:

- back-to-back events, and one missing event;
- a rank-table reload;
- both test modes;
- both GLT switch positions.

It decodes every ZPD backplane pin of every event against the reference selection. It also
counts that each mechanism occurred: quota overflow, rejected coarse-only segments, rank ties,
masked groups that held data, empty frames, table reload, test modes and both GLT positions.
Building it takes a few minutes with verilator; the run itself takes well under a second.
