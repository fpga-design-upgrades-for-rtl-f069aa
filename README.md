# ATLAS Pixel ROD slave: Smart L1A forwarding and clean hit extraction

The Readout Driver (ROD) of the ATLAS Pixel detector collects module data for every
Level-1 accept (L1A) and builds event fragments for the central DAQ. In calibration
runs it also fills per-pixel histograms. This SystemVerilog models the datapath of one
ROD *slave* FPGA, built around two fixes that matter at Run-3 trigger rates (~100 kHz).

1. **Smart L1A forwarding.** A Pixel module's readout chip (MCC) buffers at most 16
   events. Triggers that arrive while the buffer is full are dropped and counted. That
   skip count is sent to the ROD, but it is sometimes wrong. A wrong count shifts the
   module's event stream against the ROD's until the next event counter reset.
   The ROD therefore counts, per link, the triggers sent that the module has not yet
   answered ("triggers in flight"). It holds back new triggers to a module whose count
   is above a programmable threshold. The module's buffer then never overflows, so it
   never needs to report a skip. The ROD fills the gap left by each held-back trigger
   with an empty "ROD veto" event.
2. **Hits only from module data.** In calibration mode the router picks hits out of the
   fragment stream by their type bits 31:29 = `100`. S-Link header word 7 holds
   `{ECRID[7:0], L1ID[23:0]}`. Once the ECR counter reaches 0x80, this header word also
   starts with `100` and was counted as a hit. The fragment builder now marks module
   data words with a flag (`am_i_dataword`). The router only accepts a hit when the
   flag is set.

## Data path

```
             l1a, l1a_info (L1ID, BCID, ECRID, trigger type)
                 |
     +-----------v-----------+    xc_trig[7:0] -> serial command lines to modules
     |    l1a_forwarder      |---------------------------------------------->
     | (per-link veto, 80 /  |<-- pend_ok[15:0] (one per formatter link)
     |  160 Mb/s line map)   |
     +-----------+-----------+
          sent[15:0] (registered, one cycle after l1a)
                 |
  half slave 0 (links 0-7)                    half slave 1 (links 8-15): same
  +-------------v-----------------------------------------------------+
  | trigger FIFO --> formatter 0 (links 0-3) --+                       |
  | trigger FIFO --> formatter 1 (links 4-7) --+--> efb_gen_fragment --+--> router --> S-Link
  |   lk_data[l] --> link FIFOs, pending       |        ^              |      |
  |                  counters, fifo_readout    |   event FIFO (l1a)    |      v hits
  |                                                                    | histogrammer <-> SSRAM
  |                                                                    |      v
  |                                                                    | histo_readout --> dma_*
  +--------------------------------------------------------------------+
  desynch_monitor (event and inefficiency counters of both halves)
  slave_regs      (register bus)
```

| Module | Role |
|---|---|
| `rod_pkg` | Word formats, header bit positions, empty-event encodings, `ev_info_t`, `hit_t` |
| `sync_fifo` | First-word-fall-through FIFO with count, almost-full and sticky overflow |
| `pending_trig_counter` | Triggers in flight of one link; threshold compare; underflow guard |
| `l1a_forwarder` | Sends or inhibits each L1A per serial line; 80 and 160 Mb/s link mapping |
| `fifo_readout` | Formatter readout controller: one event per link and trigger; inserts empty events; L1ID correction |
| `formatter` | Four link FIFOs, link watcher, four pending counters and `fifo_readout` |
| `efb_gen_fragment` | S-Link fragment builder; L1ID/BCID check; `am_i_dataword` |
| `router` | Sends fragments to the S-Link, or extracts hits for the histogrammer |
| `histogrammer` | Read-modify-write of occupancy, ΣToT and ΣToT² in a 36-bit SSRAM word |
| `histo_readout` | Packs the 36-bit words into 32-bit words; four readout schemes |
| `desynch_monitor` | 19-bit reset-on-read counters per link and a global event counter |
| `slave_regs` | Configuration and status registers |
| `rod_slave_top` | The whole slave |

Everything runs on one clock, with an asynchronous active-low reset. All streams use
valid/ready handshakes.

## Smart L1A forwarding in detail

### Triggers in flight

Each formatter link has a `pending_trig_counter`. The count goes up by one when the
forwarder sends a trigger on the link's serial line. It goes down when a module event
ends on the link, detected at the module trailer. The decrement is 1 plus the skip count
from that event's header, because the module's skipped triggers were never answered
either. When an increment and a decrement happen in the same cycle, both apply.

The threshold is register 0x814 (`PEND_TRIG_THR`, 8 bits):

- **0xFF** switches the mechanism off. This is the reset value.
- **Any other value** uses bits [5:0] as the threshold. `pend_ok` goes low while the
  count is strictly *greater* than the threshold.

So with threshold 15, sixteen triggers may be in flight. The 17th is inhibited. That
matches the 16-event MCC buffer exactly, and 15 is the recommended setting. Lower
values waste buffer space on vetoes. Higher values let skips, and with them
desynchronisation, return.

**Underflow guard.** A corrupted skip count can make the decrement larger than the
count. An unsigned counter would then wrap to a huge value, and that link would be
vetoed for ever. Instead the count stops at zero and a sticky per-link flag is set.
Register 0x818 shows the flags; COMMAND bit 3 clears them.

### Which links share a serial line

There are eight serial command lines (`xc_trig`) but sixteen formatter links. A line is
inhibited when **any** enabled link it serves has `pend_ok = 0`.

| Readout | Line i serves | Links read out |
|---|---|---|
| 80 Mb/s | links i and i+8 | all 16 |
| 160 Mb/s | link 2i (i even) or 2i−1 (i odd) | 0, 1, 4, 5, 8, 9, 12, 13 |

At 80 Mb/s, one congested or dead module also holds back the module that shares its
line. That module then gets ROD-veto events too. The top-level testbench shows this.

### What the formatter emits

For every L1A, the trigger FIFO of each formatter records which of its links actually
had the trigger forwarded. For each entry, `fifo_readout` visits the enabled links in
order and emits exactly one event per link:

| Situation | Event emitted | Trailer |
|---|---|---|
| Trigger inhibited for this link | ROD-veto empty event | `0x4080_lBAD` |
| Earlier header reported k skips, k not yet used up | skipped-trigger empty event (one per skip) | `0x400l_ACCA` |
| Link silent for `timeout_lim` cycles | module-timeout empty event | `0x4040_lBAD` |
| Otherwise | the module's event, copied from the link FIFO | pending count in bits [9:4] |

In the trailers, `l` is the link number. Every empty event has the header
`0x21l0_BAAD`, with the link number in bits 23:20.

**L1ID correction.** A module never sees a trigger that was inhibited for it. Its own
L1ID counter therefore falls one step behind the ROD's for every veto. `fifo_readout`
keeps an offset per link that each veto increments. It adds this offset to the L1ID
byte of every later module header from that link. The header then matches the ROD's
L1ID, and real events after a veto are not flagged as desynchronised.

**Live pending count in the trailer.** Bits [9:4] of each module trailer are replaced
by the link's current triggers-in-flight count, saturated at 63.

### Module header format used by this design

| Bits | Field |
|---|---|
| 31:29 | `001` |
| 26 | L1ID mismatch, set by the fragment builder |
| 25 | BCID mismatch, set by the fragment builder |
| 24 | Event inserted by the ROD |
| 23:20 | link number |
| 19:16 | MCC skip count |
| 15:8 | L1ID[7:0] |
| 7:0 | BCID[7:0] |

Hit words start with `100`, trailers with `010`.

## Event fragments

`efb_gen_fragment` takes the L1ID, BCID, ECRID and trigger type of each L1A from the
event FIFO, then emits one fragment:

- **Header, 10 words:** `B0F00000`, `EE1234EE`, 9, format version, source ID, run
  number, `{ECRID, L1ID}`, BCID, trigger type, 0.
- **Module data:** formatter 0's data up to its end-of-trigger mark, then formatter 1's.
- **Trailer, 6 words:** error flags, 0, 2, number of data words, 0, `E0F00000`.

Each module header is compared with the event's L1ID[7:0] and BCID[7:0], and a
mismatch sets bit 26 or bit 25. The `am_i_dataword` flag is high only on module words.
At every module trailer the builder reports the event's kind, link and
desynchronisation to the monitor.

## Histogramming

In calibration mode (CONTROL bit 1) the router stops sending fragments to the S-Link.
It turns every flagged hit word into `{chip, row, col, ToT}`:

| Hit bits | Field |
|---|---|
| 7:0 | row |
| 12:8 | column |
| 15:13 | MCC |
| 23:16 | ToT |
| 27:24 | FE |

The chip number is `{bit 28, MCC, FE}`. Setting CONTROL bit 2 also fills histograms
during datataking.

**Accumulation.** The histogrammer computes the pixel address as
`(chip·18 + col)·160 + row`, because an FE-I3 chip has 18 columns and 160 rows. It then
does a read-modify-write of the 36-bit SSRAM word. Every field saturates.

| Mode | Word layout |
|---|---|
| ToT mode | `[35:28]` occupancy, `[27:16]` ΣToT, `[15:0]` ΣToT² |
| Occupancy mode (CONTROL bit 3) | `[23:0]` occupancy |

A hit takes `RD_LAT + 1` cycles. Back-to-back hits on the same pixel are therefore
always counted. Hits with a chip number outside `NUM_CHIPS` are dropped in one cycle.

**Readout.** A COMMAND write with bit 1 walks every pixel in address order. With bit 2
also set, it zeroes each word as it reads it. `histo_readout` packs the 36-bit words
for a 32-bit memory, using the scheme in CONTROL bits [5:4]:

| Scheme | Output |
|---|---|
| 0 LONG_TOT | two words per pixel: bits [31:0], then bits [35:32] |
| 1 SHORT_TOT | `{missing hits[7:0], ΣToT[11:0], ΣToT²[15:4]}`; missing = expected − occupancy, floored at 0 |
| 2 ONLINE_OCCUPANCY | `{8'b0, occupancy[23:0]}` |
| 3 OFFLINE_OCCUPANCY | four 8-bit occupancies per word, first pixel in [7:0]; COMMAND bit 4 flushes a partial word |

## Monitoring counters and registers

`desynch_monitor` keeps five 19-bit saturating counters per link:

- module events;
- inefficient events (every empty event, plus module events with an L1ID or BCID
  mismatch);
- ROD vetoes;
- skipped triggers;
- timeouts.

It also keeps a global count of fragments, which includes events the ROD inserted.
COMMAND bit 0 copies every counter to a snapshot and restarts the counter, with no gap
between read intervals.

All addresses are byte addresses. Reads return data one cycle after `rd_en`.

| Address | Register | Content |
|---|---|---|
| 0x800 | FMT_LINK_EN | [15:0] formatter link enables (reset 0xFFFF) |
| 0x804 | CONTROL | [0] 160 Mb/s, [1] calibration, [2] histogram during datataking, [3] occupancy-only, [5:4] readout scheme, [15:8] expected hits |
| 0x808 | TIMEOUT | module timeout in clock cycles (reset 2048) |
| 0x80C | RUN_NUMBER | run number for the S-Link header |
| 0x810 | COMMAND | pulses: [0] read the monitor, [1] start histogram readout, [3] clear underflow flags, [4] flush the packer. Bit [2], clear while reading, is a level. |
| 0x814 | PEND_TRIG_THR | Smart L1A threshold; 0xFF = off (reset) |
| 0x818 | UNDERFLOW | per-link underflow flags (read-only) |
| 0x81C | STATUS | `{histogram readout busy, busy, link FIFO overflow[15:0]}` (read-only) |
| 0x820 | GLOBAL | global event count snapshot |
| 0x840 + 4·l | PENDING | triggers in flight of link l |
| 0x900 + 4·(16·t + l) | MONITOR | snapshot t of link l; t = 0 events, 1 inefficient, 2 veto, 3 skipped, 4 timeout |

The ROD `busy` output is high while any link FIFO, trigger FIFO or event FIFO is
nearly full. For link FIFOs that means a quarter of the depth left; for trigger and
event FIFOs, 16 entries left.

## Parameters of `rod_slave_top`

| Parameter | Default | Meaning |
|---|---|---|
| `LINK_FIFO_DEPTH` | 256 | words per formatter link FIFO |
| `TRIG_FIFO_DEPTH` | 64 | entries of the trigger and event FIFOs |
| `NUM_CHIPS` | 128 | front-end chips per half-slave histogram (8 MCCs × 16 FE) |
| `SSRAM_RD_LAT` | 2 | SSRAM read latency in cycles |
| `SS_AW` | 19 | SSRAM address width, clog2(128 · 2880) |

At these defaults, yosys maps the top to about 3,600 cells and 5,000 flip-flop bits.
The link FIFOs hold about 139 kbit of memory. The histograms live in the external
SSRAM.

## Origins of the design

**Taken from the original system:**

- the Smart L1A counting rule: sent minus received, with received including the skip
  count;
- the "greater than, not equal" threshold compare;
- the 8-bit register with its 6-bit threshold and 0xFF meaning off;
- the underflow problem and the fix of blocking the decrement;
- the 80 and 160 Mb/s line-to-link mapping;
- the three kinds of empty event;
- the pending count in trailer bits [9:4];
- the `am_i_dataword` rule and the S-Link header position of the extended L1ID;
- the read-modify-write histogram with 36-bit words and its four readout schemes;
- the 19-bit reset-on-read counters and the global event counter.

**Choices made here**, where the original gives no detail:

- every register address except 0x814;
- all FIFO depths, the timeout trailer code and the module header bit layout;
- the S-Link words other than the markers and the extended L1ID;
- the histogram field widths (8/12/16) and the address formula;
- the L1ID-offset method of correcting vetoed links;
- the handshakes and latencies.

**Not included:**

- the MCC itself and the optical/back-of-crate link decoding (module words enter
  already decoded on `lk_valid`/`lk_data`);
- the ROD master FPGA and its processor (the L1A with its event information is an
  input);
- the TTC interface and the external SSRAM chips;
- the soft CPU, DMA and DDR2 that take histograms off the board (this design stops at
  the `dma_*` stream);
- the merging of the two S-Link streams used at 160 Mb/s;
- the formatter's 24-bit occupancy monitor.

The global counter counts fragments of half slave 0 only.

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the outputs with a reference model written independently in the testbench,
has a watchdog, and prints `TB_RESULT checks=N failures=M`. Two behavioural models
support them:

- `tb/ssram_model.sv`: a pipelined SSRAM;
- `tb/mcc_model.sv`: a module with a 16-event buffer, skip counting, an optional wrong
  skip count and an optional dead mode.

`tb_rod_slave_top` runs the whole slave at its default parameters. It drives 16
modules and two SSRAMs and parses every S-Link fragment, checking:

- the framing;
- the extended L1ID;
- one event per active link, in link order;
- the error flags;
- the data count.

It then runs the following phases and counts each mechanism:

1. Triggers faster than the modules can answer, with the mechanism off. Skipped-trigger
   events appear. One module sends wrong skip counts, which shows flagged desynchronised
   events and trips the underflow guard.
2. Threshold 15. ROD-veto events replace the skips, and no module buffer overflows any
   more. Events after a veto are not flagged, which shows the L1ID correction works. The
   monitor counters read over the register bus equal the counts seen on the S-Link.
3. S-Link back-pressure. The link FIFOs fill and `busy` rises. Triggers are held while
   busy.
4. A silent module. Timeout events appear, then vetoes. At 80 Mb/s its line partner is
   vetoed too.
5. 160 Mb/s mode. Only the eight mapped links are read out.
6. Calibration with ECRID 0x80–0x8F and empty events. The histograms must read back all
   zero.
7. Calibration with hits. The total occupancy must equal the number of hits the modules
   sent.

The run takes about 20 seconds with Verilator. To run it, or any other testbench:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -y rtl -y tb +libext+.sv rtl/rod_pkg.sv tb/tb_rod_slave_top.sv \
  --top-module tb_rod_slave_top -Mdir obj_top
./obj_top/Vtb_rod_slave_top
```

Replace `tb_rod_slave_top` with any other `tb_<module>` to run that block's testbench.
The assertions in the RTL need `--assert`. They cover FIFO pops on emit and hits only
from data words.
