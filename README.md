# SPAD time-to-digital converter with on-chip histogramming

This is the digital core of one pixel channel of a scanning LiDAR receiver.
A laser shot starts a *capture cycle*; for the next 2 µs every period of a fast
*TDC clock* is one time bin, and the number of SPAD (single-photon avalanche
diode) pulses that arrive in that period is added to the bin. Repeating this
over many shots builds a photon arrival histogram in SRAM, whose peak gives
the time of flight. The time resolution is simply the clock period: 2 ns at
500 MHz, 1 ns at 1 GHz. There is no analog delay line; everything is standard
cells and SRAM.

Three ideas make it work at full clock rate:

* **Synchronous Summation (SST).** The 100 SPAD inputs are sampled on the TDC
  clock and the pulses of each cycle are added into one photon count per bin,
  so there is a single histogram per pixel rather than one per SPAD.
* **Interleaved SRAMs.** Every bin needs a read, an addition and a write per
  clock cycle, which SRAM macros cannot do at 500 MHz. The bins are spread
  over `DIV` SRAMs (2 at 500 MHz, 4 at 1 GHz) so that each SRAM, and its adder,
  only works once every `DIV` cycles.
* **Ping-pong banks.** Two complete histogram memories: one is being filled
  while a DSP reads the previous histogram out of the other.

The block also has SPI control registers and a memory built-in self test
(MBIST). Typically a LiDAR receiver instantiates one such block per vertical
pixel.

## Structure

```
             spad_i[99:0]            trig_i
                  |                    |
            +-----v------+      +------v-----+  bin, first, valid
            | sst_summer |      |  acq_ctrl  |------------+
            | sample,    |      | bins, shots|   2-cycle  |
            | edge, sum  |      | bank swap  |   delay    |
            +-----+------+      +--+------+--+            |
                  | count (7 b)    |cap_sel ^ pipe_busy   |
                  +----------------+------|-------------- +
                                   |      |
          +------------------------v------+---------------------+
          |  hist_bank 0 (capture)          hist_bank 1 (readout) |
          |  bin b -> lane b % DIV           ro_en/ro_bin -> ro_data
          |  +-----------+ +-----------+                          |
          |  | hist_lane | | hist_lane | ...  each: hist_sram     |
          |  +-----------+ +-----------+      + read-add-write    |
          +-----^----------------------------------^--------------+
                | slot[DIV-1:0]                    | SRAM test port
           +----+----+                        +----+----+
           | clk_div |                        |  mbist  |<-- start
           +---------+                        +---------+
                         +----------+
           SPI pins <--->| spi_regs |--> enable, HIST_LEN, NUM_SHOTS
                         +----------+<-- status, counters
```

| File | Role |
|---|---|
| `rtl/tdc_pkg.sv` | register map, SPI frame layout, status/config structs |
| `rtl/tdc_hist_top.sv` | top level: wiring, bin-tag alignment, bank selection |
| `rtl/sst_summer.sv` | SPAD sampling and per-cycle pulse sum |
| `rtl/acq_ctrl.sv` | bin counter, shot counter, drain and bank swap |
| `rtl/clk_div.sv` | divided clock and per-SRAM slot strobes |
| `rtl/hist_bank.sv` | SRAM multiplexor over `DIV` lanes, readout port |
| `rtl/hist_lane.sv` | one SRAM with its read-add-write pipeline |
| `rtl/hist_sram.sv` | SRAM model, 1 read + 1 write port |
| `rtl/spi_regs.sv` | SPI slave and register file |
| `rtl/mbist.sv` | March C- memory self test |

Everything runs on one clock, `clk`, the TDC clock. Reset `rst_n` is
asynchronous and active low.

## One capture cycle, cycle by cycle

`trig_i` is sampled high at clock edge T0 (only when enabled and idle).
Bin *b* is the clock period between edges T0+b and T0+b+1. A SPAD pulse whose
rising level is first sampled at edge T0+b+1 counts in bin *b*:

| Edge | sst_summer | acq_ctrl | histogram bank |
|---|---|---|---|
| T0 | – | bin 0 becomes current | – |
| T0+b+1 | SPAD levels of bin *b* sampled | bin *b*+1 current | – |
| T0+b+2 | count of new rising levels registered | | bin tag *b* reaches the end of the 2-stage delay line; count and tag enter the lane |
| later | | | lane reads, then adds and writes (next section) |

A pulse is counted when its sampled level goes from 0 to 1, so a pulse that
spans several clock periods is counted once, in the bin where it starts.
The bin number is delayed by the summer's two stages in the top level, so that
count and bin meet at the bank input. One bin enters the bank every cycle;
the capture cycle lasts exactly `HIST_LEN` cycles (1000 by default: 2 µs at
500 MHz). Triggers that arrive while a capture cycle is running are dropped
and counted (`DROP_CNT`).

## The interleaved read-add-write pipeline

This is the part that sets the throughput. A bank of `BINS` words is split
into `DIV` lanes; bin *b* lives in lane `b % DIV` at word `b / DIV`. Since
consecutive bins go to different lanes, each lane receives at most one bin
every `DIV` cycles. `clk_div` gives each lane a *slot*, one cycle in every
`DIV`, and the lane touches its SRAM only in its slot:

1. **Hold.** The incoming bin (word address, count, first flag) is loaded
   into a holding register at full clock rate. It stays there for `DIV`
   cycles, and exactly one slot of the lane falls in that window.
2. **Read slot.** The held word is read from the SRAM, and the bin moves to
   the P stage.
3. **Next slot.** The SRAM output plus the count, saturated at 4095, is
   written back, while the next held bin is read in the same slot (the SRAM
   has one read and one write port).

The adder therefore has a whole slot period (`DIV` clock periods) to settle,
and the SRAM runs at `clk/DIV`: 250 MHz in the 500 MHz configuration, 250
MHz again in the 1 GHz one with `DIV = 4`. Example for `DIV = 2`, with the
lane 0 slot on even cycles and bins arriving from cycle 0:

| Cycle | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| bin entering bank | 0 (lane 0) | 1 (lane 1) | 2 (lane 0) | 3 (lane 1) | 4 (lane 0) | 5 |
| lane 0 hold | – | bin 0 | bin 0 | bin 2 | bin 2 | bin 4 |
| lane 0 slot | – | | read bin 0 | | read bin 2, write bin 0 | |

A word is never read while its own write is still pending, because the two
accesses of a lane in one slot always belong to different bins (an assertion
in `hist_lane` checks this). Writes are done even for a zero count, so the
SRAM activity does not depend on the photon rate; this keeps supply current,
and with it the delay of the TDC clock tree, steady.

**Clearing by overwrite.** The first capture cycle of each histogram carries a
`first` flag; for it the lane writes the count instead of old word + count.
No clearing pass is needed between histograms, and old contents of the bank
(including the MBIST pattern) never leak into a new histogram.

**Drain.** A lane's last write happens up to `2*DIV` cycles after its last
bin. `busy_o` from the banks and the bin delay line form `pipe_busy`, and the
controller only swaps banks when it is low.

## Histograms, banks and readout

A histogram is `NUM_SHOTS` capture cycles. After the last one and the drain,
`acq_ctrl` toggles the capture bank, pulses `frame_done_o` and increments
`FRAME_CNT`. The bank just filled is now the readout bank (`ro_bank_o`),
and the next histogram is captured into the other one.

Readout port: assert `ro_en_i` with a bin number `ro_bin_i`, and
`ro_valid_o`/`ro_data_o` follow exactly two cycles later (SRAM read, output
register). A request may be issued every cycle; sequential bins visit each
SRAM only once every `DIV` cycles. The DSP has until the next `frame_done_o`
to read a histogram: there is no back-pressure, and the swap does not wait
for the reader. Only bins below `HIST_LEN` are valid; words above it keep
old data.

## Configurations

| Parameter | Default (500 MHz) | 1 GHz configuration | Meaning |
|---|---|---|---|
| `N_SPAD` | 100 | 100 | SPAD inputs summed per pixel |
| `BINS` | 1024 | 2048 | histogram words per bank |
| `DIV` | 2 | 4 | SRAMs per bank = clock division for the SRAM side |
| `WIDTH` | 12 | 12 | bits per bin, saturating |
| `HIST_LEN` register | 1000 | set to 2000 | bins per capture cycle (2 µs) |

`BINS` must be a multiple of `DIV`, and `DIV` at most 4 (the STATUS register
reports up to eight failing SRAMs). The SRAMs per block are `2*DIV`: four of
512 × 12 bits at 500 MHz, eight of 512 × 12 bits at 1 GHz. Coarse synthesis
of the default top gives about 580 flip-flop bits and 24,576 memory bits.

## SPI registers

SPI mode 0 (SCLK idles low, MOSI sampled on the rising edge, MISO changes on
the falling edge), MSB first, 24-bit frames framed by `cs_n_i` low:
`{rw, addr[6:0], data[15:0]}`. `rw = 1` writes; `rw = 0` reads, with the
register value shifted out on MISO during the last 16 bits. The pins are
sampled by the TDC clock through two-flop synchronisers, so SCLK must be
slower than a quarter of the TDC clock.

| Addr | Name | Access | Content |
|---|---|---|---|
| 0x00 | CTRL | rw | [0] enable acquisition; [1] write 1 to start MBIST (reads 0) |
| 0x01 | HIST_LEN | rw | bins per capture cycle, reset 1000; 0 or > `BINS` means `BINS` |
| 0x02 | NUM_SHOTS | rw | capture cycles per histogram, reset 32; 0 means 1 |
| 0x03 | STATUS | r | [0] capture bank, [1] readout bank, [2] acquisition busy, [3] MBIST busy, [4] MBIST done, [5] MBIST fail, [15:8] failing SRAMs |
| 0x04 | FRAME_CNT | r | completed histograms |
| 0x05 | ID | r | 0x7DC1 |
| 0x06 | DROP_CNT | r | triggers dropped while busy (saturating) |

Clearing `enable` lets the running capture cycle finish; an unfinished
histogram continues at the next enable.

## Memory self test

`mbist` runs March C- (`⇑w0; ⇑r0w1; ⇑r1w0; ⇓r0w1; ⇓r1w0; ⇑r0`) on all SRAMs of
both banks in parallel, one operation per cycle, `10*WORDS+1` cycles in all
(5,121 cycles by default). It starts only while acquisition is idle, and
blocks new capture cycles while it runs. It destroys the histograms; the
next capture overwrites them anyway.

## Where this design comes from and what is its own

The design follows the architecture of the study "Modelling TDC Circuit
Performance for SPAD Sensor Arrays" (called the reference study in the
source comments), which compares a 500 MHz and a 1 GHz implementation of it
in a 40 nm SPAD process. Taken from it: the overall architecture
(SST front end, histogram over many capture cycles, two banks for capture and
readout, SRAMs pipelined two-way at 500 MHz and four-way at 1 GHz, a clock
divider after the SRAM multiplexor at 1 GHz, SPI control, MBIST) and the
sizes (100 SPADs, 2 µs, 1024/2048 bins, 12 bits).

Choices of this design, where the study gives no detail: the rising-edge
counting rule and the two-stage summer; the trigger input and the
bin-to-pulse alignment; the modulo interleaving and the hold/read/write
schedule of a lane; saturation; the first-capture overwrite instead of a
clear pass; the drain-then-swap rule without reader handshake; the readout
port; the SPI protocol and register map; the March C- algorithm; and the
programmable histogram length and shot count (reset 1000 and 32).

Departures and things not modelled:

* **One clock domain.** The SRAM side is described as running on a divided
  clock. Here it runs on the TDC clock with one-in-`DIV` clock enables (the
  slots); `clk_div_o` gives the divided clock for a netlist that wants it,
  but no logic uses it. Timing closure then needs multicycle constraints of
  `DIV` cycles on the SRAM and adder paths of each lane.
* **Flip-flops at the input.** The SPAD inputs are sampled by flip-flops, with
  no pulse stretcher or metastability filter; pulses shorter than a clock
  period that fall between two edges are missed, so the front end must
  deliver pulses at least one period wide.
* **SRAM model.** `hist_sram` is a plain array with one read and one write
  port and registered output; replace it with the process macro and its
  wrapper.
* Not in RTL because they have no logic function or are not specified: the
  SPAD array and analog front end, the TDC clock tree (whose supply-dependent
  delay, 20–83 ps in the study, limits accuracy), the power grid and
  decoupling, scan chains (inserted by the DFT flow) and the DSP.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert rtl/tdc_pkg.sv \
    $(ls rtl/*.sv | grep -v tdc_pkg) tb/tdc_hist_top_tb.sv \
    --top-module tdc_hist_top_tb -o sim
./obj_dir/sim
```

The package must be read first. For a block testbench, name that testbench
and its top module instead; the unused RTL files do no harm.

| Testbench | What it checks |
|---|---|
| `tdc_hist_top_tb` | full default size: MBIST over SPI, four 3-shot histograms of 1000 bins with random SPAD activity and 100-SPAD bursts, readout of each during the next capture, bank alternation, overwrite of an old histogram, a dropped trigger, saturation at 4095, readout latency, drain time, register readback; counts every mechanism |
| `tdc_hist_1ghz_tb` | the same at `BINS=2048, DIV=4`, 2000-bin window |
| `sst_summer_tb` | per-cycle rising-edge counts against a reference, long pulses, bursts |
| `acq_ctrl_tb` | bin sequence, first flag, drain-then-swap, dropped triggers, clamping |
| `hist_bank_tb` | `DIV=4` bank: contiguous bins, random-order readout with 2-cycle latency |
| `hist_lane_tb` | lane pipeline at `DIV=4`, random slot phase, overwrite, saturation, drain |
| `hist_sram_tb` | SRAM model against a reference, read during write |
| `clk_div_tb` | slot strobes and divided clock for `DIV=2` and `4` |
| `spi_regs_tb` | SPI protocol, all registers, one-cycle MBIST start |
| `mbist_tb` | run length; detection of stuck-at-1, stuck-at-0 and decoder faults per memory |

The full-size testbench takes about two seconds.
