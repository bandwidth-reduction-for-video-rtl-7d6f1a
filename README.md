# Data-unit memory interface for a video decoder on DDR SDRAM

A video decoder fetches small, oddly placed pixel blocks from off-chip
memory: 17×17 prediction blocks, 16×8 field blocks, macroblocks to write
back, and whole lines for display. An SDRAM only moves data efficiently in
bursts, and a burst costs a row activation that takes a fixed time per bank.
So every request is rounded up to whole bursts. The extra pixels this rounding
moves are the **overhead**, and depending on how pixels are placed in memory
it can exceed 100 % of what was asked for.

This RTL stores the picture in **data units**. A data unit is one burst: eight
64-bit words (BL = 8 on a 64-bit DDR bus), 64 bytes, holding **M×N = 16×4
pixels**. The four lines of a unit come from *one field* (every second frame
line). Units are spread over the four SDRAM banks so that consecutive bursts
of almost any block fall in different banks. The controller can then overlap
one bank's row activation with another bank's data transfer, and the bus
stays busy.

The design has three parts:

* The **memory interface proper.** It turns block transfers from two clients
  into data-unit bursts. It arbitrates per burst with the bank state in view,
  and it issues SDRAM commands.
* A **statistics collector**. It records which block shapes are requested,
  where they sit relative to the unit grid, and how many pixels were really
  moved. With these numbers the unit shape can be chosen off-line for a given
  application.
* A **display path**. It reads the picture in grid-aligned units, so display
  traffic has no overhead, and turns the units back into video lines in a
  small on-chip line memory.

The clients are the decoder's motion-compensation unit (**MC**: prediction
reads, macroblock writes) and the video output (**VO**: display reads).

## Block diagram

```
            MC transfers                         vo_start
                 │                                  │
                 │                            ┌─────▼──────┐  released
                 │                            │ vo_req_gen │◄──────────┐
                 │                            └─────┬──────┘           │
        ┌────────┴───────┐                 ┌────────┴───────┐          │
        │ block_xlate MC │                 │ block_xlate VO │          │
        └────────┬───────┘                 └────────┬───────┘          │
                 │ data units       ┌──────────┐    │                  │
                 └─────────────────►│unit_     │◄───┘                  │
   comm_analyzer ◄── both           │arbiter   │◄── bank_busy          │
   (statistics)      transfer       └────┬─────┘         │             │
                     streams             │ ACT + RDA/WRA │             │
                                   ┌─────▼───────────────┴──┐          │
                                   │      sdram_sched       │── SDRAM  │
                                   └─────┬──────────────────┘  pins    │
                       read bursts, MC ◄─┤ by tag                      │
                                         └────► line_mem ──► pixels ───┘
```

| Module | Role |
|---|---|
| `mif_pkg` | Widths, request and tag structs, SDRAM command enum, the table of prediction block types, `classify()` |
| `du_addr_map` | Combinational: (field, unit row, unit column) → bank, row, column |
| `block_xlate` | One transfer → the list of data units it overlaps, each with its SDRAM address |
| `unit_arbiter` | Per-unit choice between the MC and VO streams; a unit whose bank is free wins |
| `sdram_sched` | ACT / RDA / WRA command timing, read and write data pipes, tags |
| `comm_analyzer` | Per-class counters and a position histogram, readable afterwards |
| `vo_req_gen` | Issues aligned 16×4 field-unit reads strip by strip, under a credit limit |
| `line_mem` | Two strip buffers of N lines; takes units, gives out lines |
| `mem_if_top` | Wires everything together; MC, VO, statistics and SDRAM ports |

## How pixels are placed in the SDRAM

This is the core of the design. The mapping is in `du_addr_map`.

A picture of `line` pixels per line is cut into units per field.

* Unit column `ucol = x / M`.
* Unit row `urow = (frame line / 2) / N`, counted separately in each field.

Each unit is assigned a bank and an address as follows.

```
bank[0] = field ^ urow[1]        fields in opposite bank pairs; the pairs
                                 swap every 2 unit rows (16 frame lines)
bank[1] = ucol[0] ^ urow[0]      checkerboard inside one field
index   = base + urow * ceil(line / 2M) + ucol / 2     (per bank)
row     = index / 32,  col = (index % 32) * 8
```

What this placement achieves:

* **Fields use opposite bank pairs.** Over one 16-line group, field 0 uses
  banks {0, 2} and field 1 uses banks {1, 3}. In the next group the two swap.
  A frame block that touches both fields therefore alternates between the
  pairs.
* **Neighbours differ in bank.** Within a field, units that are next to each
  other horizontally or vertically are in different banks.
* **Every burst is one page access.** A page holds 32 bursts (256 words of
  64 bits). Each unit is its own burst, so the design always uses
  ACT → column command with auto-precharge. It never keeps a page open.
* **Picture start.** `base` is where the picture starts in each bank, in
  units. A 1920×1088 frame takes 8160 units per bank.

## The transfer interface and what a block costs

A request (`xfer_req_t`) has the following fields:

* `rd`: read or write.
* `bx`, `by`: block width and height.
* `x`, `y`: position of the top-left pixel.
* `interl`: the block is a field block.
* `line`: pixels per line.
* `base`: where the picture starts in memory.

A field block (`interl = 1`) covers lines y, y+2, …, y+2(by−1), all of the
field that y lies in. A frame block covers by consecutive lines. It is split
into its two field parts, and each part is fetched on its own.

Starting from the block's offset (m, n) inside the unit grid,
`block_xlate` works out how many units the block covers:
`(1 + ⌊(bx+m−1)/M⌋) · (1 + ⌊(by+n−1)/N⌋)`.
For a frame block, m is the same for both field parts, and each part gets its
own n and height. The translator then lists those units: unit row, then unit
column, then field. For example, a 17×17 frame prediction block at a random
position touches 2 unit columns and 3 unit rows per field, which is 12 units
or 768 pixels for 289 wanted.

One unit leaves the translator per clock. An idle clock separates two
transfers.

## SDRAM command scheduling

`sdram_sched` accepts a unit when it can issue its ACT. It then issues the
column command (RDA or WRA, both with auto-precharge) T_RCD later. The rules
it follows:

* Column commands have priority over ACT on the shared command bus.
* A bank is busy from its ACT until T_RC has passed and its precharge has
  finished. This covers both T_RAS + T_RP and the write recovery T_WR.
* Data bursts on the bus never overlap.
* One turnaround clock is left between a read and a write burst.

The bus is DDR, so one clock carries two words and a burst takes BL/2 = 4
clocks. Read data returns T_CL clocks after RDA. The scheduler asks the
client for write data one clock after WRA (`wd_req`) and passes it straight
through to `dq_out` in the same clock, so those bits are combinational.

Because T_RC = 10 clocks and a burst lasts 4 clocks, a single bank can supply
at most one burst every 10 clocks. The data bus is only kept full when
successive units go to at least three different banks.

Measured with the behavioural SDRAM model:

| Traffic | Clocks per burst |
|---|---|
| Units cycling over 4 banks | 4 (bus full) |
| Units cycling over 3 banks | 4 (bus full) |
| Two banks alternating | 5 (two bursts per T_RC) |
| HD macroblock writes (8160 MBs, 32640 bursts) | 5.26 |

For macroblock writes, consecutive macroblocks sometimes repeat a bank, and
that costs the extra clocks.

Timing parameters (module parameters of `sdram_sched` and `mem_if_top`):

| Parameter | Default | Basis |
|---|---|---|
| T_RC | 10 | row cycle time typical of DDR SDRAM; it is why BL = 8 is needed (BL ≥ 2·T_RC/4) |
| T_RCD / T_RAS / T_RP | 3 / 7 / 3 | typical DDR-266 values, chosen so T_RAS + T_RP = T_RC |
| T_CL | 2 | typical |
| T_WR, write latency, turnaround | 2, 1, 1 | own choice |

Not built: refresh, the power-up mode-register sequence, and page hits. Every
access activates its row.

## Arbitration

Both clients feed data units into `unit_arbiter`. The arbiter decides as
follows:

1. If only one client's next unit has a free bank, that client wins.
2. Otherwise the winner is chosen round-robin.

Transfers from the two clients interleave at the granularity of single
units. The policy itself is this design's own choice: "arbitrate depending on
bank state" is the only requirement it was built to.

## Statistics collector

`comm_analyzer` sees every transfer exactly once. The top only accepts a
transfer when both the translator and the collector are ready, so a busy
collector throttles the clients. Each transfer is sorted into one of 25
classes:

* classes 0–7: progressive prediction shapes;
* classes 8–21: interlaced prediction shapes (16×16, 17×17, 16×8, 18×9,
  16×4, … listed in `mif_pkg::BTYPES`);
* 22: write; 23: display read; 24: other.

For each class it keeps four things:

* the number of requests;
* the pixels requested, bx·by;
* the pixels transferred, units·M·N;
* a histogram of the position (x mod M, n). Here n = field line mod N for
  field blocks and y mod 2N for frame blocks.

Each event takes two clocks. After reset the tables are cleared by a sweep of
25·M·2N clocks, while `an_busy` is high.

To read the tables, set `an_rd_en`, `an_rd_sel` (0 count, 1 requested,
2 transferred, 3 histogram) and `an_rd_addr`. The data appears one clock
later.

From the histogram and the counts, software can work out the overhead that
any other M×N would have produced. The collector gathers the data; it does
not do that evaluation.

## Display path

`vo_req_gen` reads a frame field by field. For each field it reads strip by
strip, N field lines per strip, and within a strip unit by unit. Every read
is a grid-aligned M×N field unit, so display reads move exactly what they
ask for.

It holds two credits, one per line-memory buffer. It starts a new strip only
when it holds a credit, and `line_mem` returns the credit (`released`) after
the last pixel of a strip has left.

`line_mem` has two buffers, each N lines of up to LINE_MAX = 1920 pixels.
Units may arrive in any order within a strip, because the write address
comes from the unit column and the burst beat. Pixels leave on `px_*` as
64-bit words of 8 pixels, with the first pixel in the low byte. `px_sol` and
`px_eol` mark the start and end of each line, and `px_eof` marks the last
word of a strip.

## Interfaces of `mem_if_top`

* **MC port.**
  * `mc_req_valid/ready/req` takes a transfer.
  * Read bursts come back on `mc_rd_valid/tag/beat/data`, two words per
    clock. Each burst carries the tag of its unit: field, unit row, unit
    column, and a last flag.
  * Cutting the wanted pixels out of the units is left to the client.
  * For writes, `mc_wd_req/tag/beat` asks for a beat and `mc_wd_data` must
    answer in the same clock.
* **VO port.**
  * `vo_start` starts one frame, using `vo_line`, `vo_height` and `vo_base`.
    Hold these three inputs steady for the whole frame.
  * `vo_busy` is high while the frame is still being read.
  * Pixels leave on `px_*`.
* **SDRAM port.** `sd_cmd` (NOP/ACT/RDA/WRA), `sd_ba`, `sd_addr` (row for
  ACT, column for RDA/WRA), `sd_dq_out`, `sd_dq_oe` and `sd_dq_in`.
* **Statistics port.** `an_busy` and `an_rd_*`, described above.

Reset is asynchronous and active low. All handshakes are valid/ready,
sampled on the rising clock edge.

## Parameters and their limits

* **M×N.** The default 16×4 is the best 64-byte shape for MPEG-2 decoding
  when a line memory is used. The modules are parameterised by M and N:
  * M must be a power of two ≥ 8 (whole 64-bit words per unit line);
  * N must be a power of two ≥ 2;
  * M·N must equal 8·BL, so that one unit is one burst of BL 64-bit words.

  32×2 and 8×8 therefore fit; `tb_unit_shapes` runs both. The 64×1 shape and 32-bit buses are not
  supported: the data path is fixed at 64 bits in `mif_pkg::DQ_W`.
* **Address space.** Up to 2^17 units per bank (4 × 8 MB = 32 MB). A
  1920×1088 4:2:0 picture needs about 3.1 MB.

## Verification

Each block has a self-checking testbench in `tb/`. The SDRAM itself is
modelled by `tb/ddr_sdram_model.sv`. This model:

* stores every written word;
* returns a hash of the address for words never written;
* counts every breach of T_RC, T_RCD, precharge time, closed-bank access and
  bus overlap.

| Testbench | What it checks |
|---|---|
| `tb_du_addr_map` | Every unit of a 1920×1088 frame at a random base: distinct addresses, burst-aligned columns, field bank pairs swapping every 16 lines, different banks for all neighbours |
| `tb_block_xlate` | Random field and frame blocks up to 40×40: the emitted units equal a set built pixel by pixel, each once, `last` on the final one; unit count against the formula; one unit per clock |
| `tb_unit_arbiter` | Grant choice against a reference model, bank-rule overrides, fairness, handshake |
| `tb_sdram_sched` | Zero model violations; data integrity for random read/write mixes; clocks per burst for 4-, 3- and 2-bank patterns |
| `tb_comm_analyzer` | All four tables against a software model, for random events on both ports with back-pressure |
| `tb_line_mem` | Pixel order and flags for strips written in random unit order, buffer hand-over |
| `tb_vo_req_gen` | Sequence and positions of display reads, the credit limit |
| `tb_mem_if_top` | The full system at its default parameters (see below) |

`tb_mem_if_top` runs the whole design at default size:

1. It writes a complete 1920×1088 luminance frame as 8160 macroblocks.
2. It displays the frame while issuing 3000 random prediction reads.
3. It compares every pixel on the display output and every MC read burst with
   what was written.
4. It reads back the statistics tables and checks them against what it
   issued. The aligned display reads must show no overhead.
5. It requires zero SDRAM timing violations.

It also counts how often each mechanism occurred and fails if any count is
zero:

* bank-aware arbitration overriding round-robin;
* ACT waiting for a busy bank;
* read/write turnaround;
* bank interleaving;
* display waiting for a credit;
* both line buffers full;
* statistics back-pressure.

It takes about one second.

### The same workload at three unit shapes

`tb_unit_shapes` runs three copies of the whole design side by side, one per
64-byte unit shape: 16×4, 32×2 and 8×8. Each copy has its own SDRAM model
and its own driver (`tb/shape_run.sv`). Each copy:

* writes and displays a full 1920×1088 frame;
* issues 4000 prediction reads, drawn from a measured MPEG-2 mix of block
  types;
* checks every data word;
* checks the unit count of every read against the unit-count formula;
* checks the statistics totals against its own sums.

It then prints the overhead of each shape:

| Shape | Prediction-read overhead | All traffic |
|---|---|---|
| 16×4 | 155 % | 20.5 % |
| 8×8 | 168 % | 22.1 % |
| 32×2 | 214 % | 71.4 % |

The ranking matches published measurements on real MPEG-2 streams, where
16×4 is best. The absolute values do not match, because this testbench's
block positions are synthetic: half the luminance blocks sit on the
macroblock grid and the rest are uniform.

32×2 does badly on all traffic for a second reason. Its macroblock writes
cover only half a unit, and the design always writes whole units (there is
no byte-mask support). The test stays correct only because its write data
supplies the full unit. With the default 16×4 shape every macroblock write
covers whole units.

Each testbench ends with the line `TB_RESULT checks=<n> failures=<n>`. To run
one with plain Verilator (`-Wno-fatal` keeps style warnings, such as unused
struct fields, from stopping the build):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mem_if_top rtl/mif_pkg.sv tb/tb_mem_if_top.sv
./obj_dir/Vtb_mem_if_top
```

## What follows the published scheme and what does not

Taken from the published scheme:

* data units of one burst taken from one field;
* 16×4 as the unit shape;
* BL = 8 and T_RC = 10;
* ACT followed by a column command with auto-precharge for every unit;
* the field/bank-pair assignment that swaps every 16 video lines;
* the unit-count formula;
* splitting frame blocks into their field parts;
* arbitration between MC and VO that depends on bank state;
* the list of statistics collected;
* aligned M×N display reads into line memories.

This design's own choices:

* the checkerboard within a field;
* the in-bank address formula and the page size;
* all SDRAM timings other than T_RC;
* the arbitration policy;
* the unit order within a transfer;
* the class list and counter widths;
* line-memory size, organisation and credit flow;
* pixel packing;
* reading the display field by field.

One point of interpretation: in the first 16-line group, the first line of
the picture is taken as belonging to the field mapped onto banks 0 and 2.

Left out:

* refresh and SDRAM initialisation;
* cutting the requested pixels out of the returned units (left to the MC);
* byte masks for writes that cover only part of a unit;
* the off-line overhead evaluation that picks M and N from the statistics;
* the decoder itself.
