# FIFO Controller for a parallel-EBCOT JPEG 2000 encoder

A JPEG 2000 encoder gets its speed from running several EBCOT entropy coders side by side,
each coding its own code block. Each coder pushes its compressed bytes into a private FIFO
at a rate that depends on the image content. Something has to empty those FIFOs before they
overflow. It must put the bytes of every code block somewhere the rate-control stage can find
them, and record where each code block landed.

That is the job of the **FIFO Controller** in this RTL. It:

- picks one FIFO at a time by a fixed priority scheme driven by the FIFO fill flags and by
  whether the FIFO's coder is still working;
- moves one byte from that FIFO into the **compressed code block memory (CCBM)**, which is
  cut into pages interleaved between the FIFOs;
- when a coder has finished and its FIFO has run dry, writes a record
  `{CCBM start address, CCBM end address, logical address}` into the **memory allocation
  table (MAT)**, at an address equal to the code block's index in the tile.

The top module `jp2k_fc_top` holds six EBCOT FIFOs, the FIFO Controller, the CCBM and the
MAT. The EBCOT coders, the code block allocator (CBA), the master controller and the rate
control unit are outside it and connect through ports.

```
            master controller: sys_clk, sys_reset_n, start_fc, cw
                              |
  CBA: cb_valid, cb_sel, la --+--> +------------------ fifo_controller ------------------+
                                   |  la_memory --> mat_addr_gen --> MAT write port ---- |--> MAT  (4096 x 48)
  EBCOT i --> flag_fifo i ---------|  fifo_arbiter --> ccbm_addr_gen --> CCBM write port |--> CCBM (2^18 x 8)
     ^  ebcot_done i --------------|                                                     |
     +-- fifo_flags i (F AF AE EMP)+-----------------------------------------------------+
                                                         rate control reads CCBM and MAT
```

## Choosing a FIFO

This part decides whether FIFOs overflow, and it is the least obvious, so it gets the most
room here.

Arbitration runs once per **arbitration cycle**, which is two system clocks long. Each FIFO
reports four flags: full (F), almost full (AF), almost empty (AE) and empty (EMP). Each coder
reports `ebcot_done`. The arbiter first sorts each FIFO into a single level, full, else almost
full, else almost empty, else "in between". It then applies two rules, and rule 1 always beats
rule 2:

| rank | rule | coder | FIFO level | why |
|---|---|---|---|---|
| 1 | 1 | working | full | about to lose data |
| 2 | 1 | working | almost full | soon full |
| 3 | 1 | working | almost empty (not empty) | little data, cheap to serve |
| 4 | 2 | finished | almost empty (not empty) | code block nearly complete, close it |
| 5 | 2 | finished | almost full | |
| 6 | 2 | finished | full | |
| 7 | 2 | finished | in between | drain the tail of a finished code block |

When several FIFOs share the best rank, the highest-numbered FIFO wins (FIFO 5 down to FIFO 0).
An empty FIFO is never picked. The choice is combinational and is registered at the end of the
first clock of the arbitration cycle. The outputs `arb_valid`, `arb_fifo` and `arb_class` (an
`arb_class_e`, values 1 to 7 as ranked above) show it.

Things to know about this scheme:

- Rule 1 has no "in between" level. While a coder is working and its FIFO sits between the two
  thresholds, that FIFO is not served. In steady state a fast coder's FIFO therefore hovers
  around the almost-full threshold. A slow coder's FIFO stays almost empty and is served
  byte by byte.
- A finished coder's FIFO is only served when no working coder's FIFO qualifies under rule 1.
  With many fast coders, finished code blocks can wait a long time to be closed. The FIFO depth
  has to absorb this.
- Rank 7 is this design's addition. Without it, a finished code block whose FIFO sits between
  the thresholds would never be drained.

## CCBM pages

The CCBM (2^18 bytes by default) is divided into pages of `PAGE` = 166 locations, offsets 0 to
165. Page *p* belongs to FIFO *p* mod 6, so FIFO *i* owns pages *i*, *i*+6, *i*+12, and so on.
For every FIFO, `ccbm_addr_gen` keeps:

- `Add_mem[i]`: base address of the FIFO's current page, reset to `i*166`;
- `count_mem[i]`: offset inside that page, reset to 0.

A byte from FIFO *i* goes to `Add_mem[i] + count_mem[i]`. After offset 165 the counter returns
to 0 and `Add_mem[i]` moves 6 pages (996 locations) ahead. The n-th byte ever taken from FIFO
*i* therefore lands at

```
address = (i + 6*k) * 166 + (n mod 166),   k = (n / 166) mod 263
```

Here 263 is the number of whole pages each FIFO owns: 262144 / 166 = 1579 pages, divided by 6.
After its 263rd page a FIFO goes back to its first one, so each FIFO has a circular region of
43658 bytes. The rate control must consume the data before it is overwritten. Nothing in the
RTL enforces that. `ccbm_page_end` and `ccbm_region_wrap` flag the byte that ends a page, and
the byte that ends the region.

A code block is not aligned to a page. It starts wherever its FIFO's counter happens to be, and
may span several of the FIFO's pages. To read a code block back, follow the same page formula
from its start address to its end address.

## Code block records (MAT)

For each FIFO the address generator keeps a start-address register and an end-address
register:

- the first byte moved after a code block opens sets the start address, and no other byte
  changes it until the block is closed;
- every byte sets the end address.

In the first clock of each arbitration cycle the controller looks for a FIFO that has an open
code block, whose `ebcot_done` is high and whose empty flag is high. That code block is complete.
The controller then:

- reads the code block's logical address (LA) from `la_memory`, which holds one word per
  coder, written by the CBA through `cb_valid`/`cb_sel`/`la`;
- turns the LA into the MAT address in `mat_addr_gen`;
- writes the record `{start[17:0], end[17:0], la[11:0]}` (48 bits).

One record is written per arbitration cycle. If several code blocks complete together, the
lowest-numbered FIFO goes first. **A coder must keep `ebcot_done` high until its record has
been written** (`mat_we` with its LA), and only then start a new code block.

### MAT address

The LA is `{res[2:0], sb[1:0], cb[6:0]}`:

- `res`: resolution level;
- `sb`: subband, 0 = LL (resolution 0 only), 1 = HL, 2 = LH, 3 = HH;
- `cb`: code block number inside the subband.

The control word `cw` gives three sides as log2 values: `tile_size`, `sb_size` (the LL subband
of the lowest resolution) and `cb_size`. The number of decomposition levels is
`tile_size - sb_size`. With `side(0) = sb_size` and `side(r) = sb_size + r - 1` for r >= 1, a
subband at resolution r holds `n(r) = 4^max(0, side(r) - cb_size)` code blocks. The subbands
are numbered LL, then HL/LH/HH of resolution 1, 2, and so on:

```
index = cb                                             (r = 0)
index = n(0) + 3*(n(1)+...+n(r-1)) + (sb-1)*n(r) + cb    (r >= 1)
```

For example, a 256x256 tile (`tile_size=8`) with an 8x8 LL subband (`sb_size=3`) and 32x32
code blocks (`cb_size=5`) has 70 code blocks, at MAT addresses 0 to 69. An LA that cannot
exist raises `mat_la_err` with the record. The record is still written. An LA cannot exist if:

- its resolution is above the number of levels;
- its subband is wrong for its resolution;
- its code block number is past the end of the subband;
- its index is past the end of the MAT.

## Timing

```
clock       : |  A  |  B  |  A  |  B  |  ...      (A/B alternate once start_fc has been seen)
A (1st clk) : arbiter samples flags, registers its choice; completed code block -> MAT record registered
B (2nd clk) : fifo_rd of the chosen FIFO high; FIFO head byte registered for the CCBM
next A      : ccbm_we/ccbm_waddr/ccbm_wdata high for that byte; mat_we for the record of the last A
```

- Peak throughput is one byte every two clocks for the whole stage, shared by all FIFOs.
- A byte is written into the CCBM two clocks after the arbitration that chose it.
- Nothing moves after reset until a one-clock `start_fc` pulse. From then on the controller
  runs until the next reset.
- The FIFOs have an asynchronous (fall-through) read. The head byte is valid in the same clock
  as the read strobe.
- The CCBM and MAT read ports, used by rate control, return data one clock after the address.

## Parameters

| parameter (top) | default | meaning | origin |
|---|---|---|---|
| `N` | 6 | coders / FIFOs / page interleave | original design |
| `CCBM_A` | 18 | CCBM address bits | original design |
| `PAGE` | 166 | CCBM page length (offsets 0..165) | original design |
| `W` | 8 | byte width | byte-stream; chosen here |
| `DEPTH` | 512 | FIFO depth | chosen here |
| `AE_LVL`, `AF_LVL` | 64, 448 | almost empty (count <= AE_LVL) / almost full (count >= AF_LVL) | chosen here |
| `MAT_A` | 12 | MAT address bits (4096 records) | chosen here |

The shared constants and types (`la_t`, `cw_t`, `fifo_flags_t`, `arb_class_e`) are in
`rtl/fc_pkg.sv`. Changing `N` changes the page interleave. The CCBM region per FIFO is always
`floor(floor(2^CCBM_A / PAGE) / N)` pages.

## Where this RTL goes beyond, or departs from, the original description

Following the original: the four units of the controller; the two-clock arbitration cycle;
the two priority rules and the FIFO 5 to FIFO 0 order; the six-way page interleave with
166-location pages in an 18-bit CCBM; `Add_mem`/`count_mem`; start/end address registers;
the contents of a MAT record; the interface of the controller (clock, reset, start,
CW[sb_size, cb_size, tile_size], Cb_valid, 12-bit LA, F/AF/AE/EMP, EBCOT_Done, CCBM and MAT
data/address).

Choices made here:

- **End address.** The original has two conditions for it. One is "finished coder, FIFO
  empty"; the other is "finished coder, FIFO with none of its flags set". This RTL uses the
  first: the end address is the address of the last byte of the code block, and the record is
  written once that byte has been taken. Closing is checked beside the arbiter, not through
  it, because an empty FIFO is never arbitrated.
- **Start address.** It is taken at the first byte of a code block even if the coder has
  already finished. A short block that finishes before its first byte is moved still gets a
  start address.
- **Extra arbitration level.** Rank 7 (finished coder, FIFO between the thresholds) is added.
- **Empty FIFOs are never picked**, under rule 1 as well as rule 2.
- **Tri-state output.** Where the original releases the arbiter output, `arb_valid` is low.
- **Added ports.** `cb_sel` tells `la_memory` which coder an LA belongs to. The original only
  has `cb_valid` and the LA.
- **MAT addressing.** The LA field widths, the CW encoding and the MAT index formula are this
  design's own.
- **FIFO details.** The FIFO depth and thresholds, the single clock for the FIFOs, and the
  handling of a write into a full FIFO (dropped and flagged on `fifo_ovf`) are chosen here.
- **CCBM region wrap.** Each FIFO's region wraps round as described above.
- **Memory ports and outputs.** The CCBM and MAT each have one write and one registered read port, and
  all controller outputs are registered.

Not built:

- The FIFO sizing analysis (exponential and Weibull models of the coder output rate) is
  offline arithmetic. It yields no numbers that reach the hardware; the FIFO depth is simply
  a parameter.
- The EBCOT coders, the code block allocator, the master controller and rate control are
  outside this RTL.
- The original synthesis results (an Actel RTAX1000S FPGA at 92.5 MHz) are not reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fifo_arbiter` | 6000 random flag/done patterns against a rank-based model: every rank wins at some point, the choice holds between arbitration cycles, reset clears it |
| `tb_ccbm_addr_gen` | default-size and a small (512-location, 10-location pages) instance against the closed-form page formula, including region wraps; start/end registers |
| `tb_mat_addr_gen` | five CW settings: every existing LA against a walk of the tile's subbands; invalid LAs raise `la_err` |
| `tb_la_memory` | random writes/reads against a model |
| `tb_flag_fifo` | 16-word FIFO against a queue: data, all four flags, overflow |
| `tb_sram_1w1r` | MAT-shaped and CCBM-sized instances, random read/write |
| `tb_fifo_controller` | controller with modelled FIFOs and coders, small CCBM: each read against the priority rules, exactly 50 bytes in 100 clocks, every CCBM write and MAT record, all seven ranks, page jumps, wraps |
| `tb_jp2k_fc_top` | whole stage **at default sizes**, 6 coders, roughly 400 000 bytes, until every FIFO has wrapped its CCBM region; listed below |

`tb_jp2k_fc_top` checks:

- arbitration, addresses and data of every CCBM write;
- every MAT record;
- that no FIFO overflows;
- the 0.5 byte/clock rate;
- a read-back of the MAT and of sampled CCBM bytes through the rate-control ports.

It also requires each of these to happen at least once: all seven ranks, a full FIFO stalling
its coder, page jumps, region wraps, an invalid LA, and the wait for `start_fc`. It runs in a
few seconds.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fc_pkg.sv tb/tb_jp2k_fc_top.sv --top-module tb_jp2k_fc_top -o sim
./obj_dir/sim
```

Each testbench was also run against a deliberately broken copy of its module, and each one
reports failures. The broken copies were:

- reversed tie order in the arbiter;
- wrong page stride;
- wrong subband offset;
- LA memory ignoring the select input;
- off-by-one almost-full flag;
- wrong SRAM read address;
- closing on almost full instead of empty;
- FIFO data crossed in the top.

What the tests do not cover:

- a second clock domain for the FIFOs (there is none);
- timing closure;
- a coder that lowers `ebcot_done` before its record is written, which breaks the protocol
  above.

## Files

- `rtl/fc_pkg.sv`: sizes and types.
- `rtl/fifo_arbiter.sv`, `rtl/ccbm_addr_gen.sv`, `rtl/mat_addr_gen.sv`, `rtl/la_memory.sv`:
  the four units of the controller.
- `rtl/fifo_controller.sv`: the controller.
- `rtl/flag_fifo.sv`: the coder FIFO.
- `rtl/sram_1w1r.sv`: CCBM and MAT.
- `rtl/jp2k_fc_top.sv`: the stage.
- `tb/`: one testbench per module, as listed above.
