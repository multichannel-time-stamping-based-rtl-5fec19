# Multichannel photon time-stamper and photon-stream simulator

Fluorescence correlation spectroscopy and dynamic light scattering measure
how molecules move by correlating the arrival times of single photons. With
several detectors (different colours or scattering angles) the interesting
quantity is the full matrix of auto- and cross-correlations, and the
simplest way to get it is to record *when* every photon arrived on *which*
detector and correlate the list in software.

This RTL implements the two FPGA cards of such a system:

* **MTC, the time-stamper** (`mtc_fpga`). It watches 16 detector lines at
  80 MHz. Every clock in which one or more lines rose becomes an *event*:
  a 32-bit timestamp (one count = 12.5 ns) and a 16-bit flag saying which
  lines fired. Events are streamed to the host through three DMA FIFOs.
* **MHS, the hardware simulator** (`mhs_fpga`). It does the reverse: the host
  streams events into three DMA FIFOs, and the card replays them as
  three-clock TTL pulses on 16 outputs, standing in for 16 photon detectors.
  It is used to test correlators, the MTC first of all.

`mtc_mhs_system` puts both cards side by side, each with its own
40 MHz board clock and an on-chip ×2 clock multiplier. Connecting the MHS
outputs to the MTC inputs reproduces the loopback test of the whole chain.

The design follows the system described in I. P. Lescano-Mendoza,
*Multichannel Time-Stamping-Based Correlator and Hardware Simulator for
Photon Correlation Spectroscopy*, M.S. thesis, University of Tennessee, 2008.
There the cards were built in a graphical FPGA tool on commercial
reconfigurable I/O boards. This is an independent RTL rendering. The
section *Choices and departures* lists where details had to be supplied.

## The event record: pairs spread over three FIFOs

Both cards use the same record format. Understanding it is the key to both.

A card has three DMA channels and each moves 32-bit words. To use all three
at once, events travel **in pairs**:

| FIFO | word *i* holds |
|------|----------------|
| 0 | timestamp of event 2*i* (the older one of the pair) |
| 1 | timestamp of event 2*i*+1 (the newer one) |
| 2 | `{flag of event 2i+1, flag of event 2i}`, i.e. the older flag in bits 15:0 and the newer one in bits 31:16 |

Each FIFO moves one word per pair, so three words carry two events, and a
host reading the three channels independently can rebuild the stream by
taking word *i* of each. An event can have several flag bits set: photons on
different channels in the same 12.5 ns clock are one event. So the photon
rate can be higher than the event rate.

Each FPGA-side FIFO holds 1023 words (`dma_fifo`, `DEPTH = 1023`), so a card
buffers 1023 pairs, or 2046 events, of burst while the DMA engine and the
host catch up. The DMA engine, the host-side half of the FIFO and the PCI
interface belong to the board and are not part of this RTL. Their side of
each FIFO is a top-level port: `*_dma_rd_en/rd_data/empty` on the MTC, and
`*_dma_wr_en/wr_data/full` on the MHS.

## MTC: from detector edges to pairs

```
din[15:0] -> input_edge_detector -> rise[15:0] --+
                                                  +-> mtc_pair_packer -> 3 x dma_fifo -> DMA
             timestamp_counter ---> time_now -----+
```

* `input_edge_detector` passes every line through a two-flop synchronizer.
  It then reports a rise for one clock when the synchronized level goes
  0 → 1. Reset fills the synchronizer with ones, so a line that is already
  high after reset is not counted.
* `mtc_pair_packer` treats any clock with a rise (while `run` is high) as an
  event. The first event of a pair waits in temporary registers. At the
  second event the pair is written into all three FIFOs in the same clock.
  Events may come on every clock, so the write rate is at most one pair
  every two clocks and never stalls the input.
* **Timing.** If a line change is first sampled at clock edge *k*, the event
  is stamped with the counter value of the clock after edge *k*+2. Every
  timestamp therefore carries the same fixed offset of `SYNC_STAGES`+1
  counts against the counter value in the clock before the sampling edge.
  A constant offset does not change any correlation.
* **Overflow.** If any FIFO is full when a pair is due, the pair is dropped.
  The sticky `overflow` flag is set and `dropped` counts the lost pairs. The
  pairing itself is not disturbed: the next event starts a new pair.
* An odd last event stays in the packer until another event arrives.

## MHS: from pairs back to pulses

```
DMA -> 3 x dma_fifo -> mhs_pair_loader -> fire, flags -> mhs_pulse_generator -> dout[15:0]
                             ^
        timestamp_counter ---+
```

* `mhs_pair_loader` pops one word from each FIFO, but only when it holds no
  unused timestamp and all three FIFOs have data. The pair goes into
  registers. Each clock it compares the older timestamp, and then the newer
  one, with the counter. On **exact equality** it fires with that event's
  flag. When the newer timestamp fires, the next pair is popped in the same
  clock, so consecutive events may be one clock apart even across pairs.
* `mhs_pulse_generator` gives each flagged channel a pulse exactly three
  clocks long (37.5 ns). An event stamped *T* drives its channels high while
  the counter reads *T*+1, *T*+2 and *T*+3.
* `run` starts the counter, so the host can preload the FIFOs first.

The stream the host sends must respect the replay rules:

1. Timestamps must be strictly increasing, with the first one later than the
   counter value at which it is loaded. A timestamp that is already past
   when it is compared is not skipped: the loader waits for it until the
   32-bit counter wraps (53.7 s). This is exact-match replay, as in the
   original design.
2. A channel should not fire again within 4 clocks. Otherwise its two
   pulses merge into one longer pulse, because a repeat restarts the
   three-clock count.
3. The host must keep the FIFOs ahead of the counter.

## Clocks and reset

`derived_clock_pll` is a **behavioural model**, not synthesizable logic. It
stands for the FPGA's PLL / clock manager, which multiplies the 40 MHz board
clock by `MULT = 2`. It measures the input period, raises `locked` after a
few cycles and then produces the multiplied clock. In a real build it is
replaced by the vendor's clock primitive.

In `mtc_mhs_system` each card has:

* a PLL reset, `*_pll_rst`, active high;
* a logic reset, `*_rst_n`, active low and asynchronous.

The card logic is also held in reset while its PLL is unlocked. The
registers use an asynchronous reset, but the reset must overlap a running
derived clock to be seen reliably in a two-state simulation, and in
hardware it should be released synchronously anyway. So keep `*_rst_n` low
for a few derived clocks after `*_locked` rises. The testbenches do exactly
that.

Each card is a single clock domain: the DMA sides of its FIFOs run on that
card's 80 MHz clock, which is brought out as `*_clk80`. The two cards share
nothing, just as two boards in two PCs share nothing.

## Files

| file | contents |
|------|----------|
| `rtl/pcs_pkg.sv` | shared constants: 16 channels, 32-bit timestamps and words, FIFO depth 1023, pulse length 3 |
| `rtl/timestamp_counter.sv` | 32-bit time counter with `run` enable |
| `rtl/input_edge_detector.sv` | synchronizer and rising-edge detector, 16 lines |
| `rtl/mtc_pair_packer.sv` | event pairing, FIFO write, overflow accounting |
| `rtl/dma_fifo.sv` | FPGA-side DMA FIFO, first-word-fall-through, any depth |
| `rtl/mhs_pair_loader.sv` | pair fetch, hold and timestamp match |
| `rtl/mhs_pulse_generator.sv` | three-clock pulse shaper per channel |
| `rtl/mtc_fpga.sv` | MTC card logic |
| `rtl/mhs_fpga.sv` | MHS card logic |
| `rtl/derived_clock_pll.sv` | behavioural clock multiplier |
| `rtl/mtc_mhs_system.sv` | top: both cards and their clock multipliers |

Approximate sizes after generic synthesis, with FIFO storage counted as
memory bits:

* `mtc_fpga`: about 270 flip-flops and 3 × 1023 × 32 = 98,208 memory bits;
* `mhs_fpga`: about 170 flip-flops and the same memory.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_timestamp_counter` | counting, hold, clear and wrap (8-bit and 32-bit) |
| `tb_input_edge_detector` | random line activity against a delayed-edge model; no false edge after reset |
| `tb_dma_fifo` | full-size FIFO against a queue model: fill to exactly 1023, drain, random traffic |
| `tb_mtc_pair_packer` | pairing order, FIFO word contents, dropping on full, `run` gating |
| `tb_mhs_pair_loader` | each event fires at exactly its timestamp, with back-to-back pairs and a FIFO outage |
| `tb_mhs_pulse_generator` | pulse shape against a model; isolated pulses exactly 3 clocks |
| `tb_derived_clock_pll` | lock, 80 MHz output from 40 MHz, behaviour in reset |
| `tb_mtc_fpga` | full MTC: random traffic with a slow host, an event on every clock, and an overflow burst with exact loss accounting |
| `tb_mhs_fpga` | full MHS: 6000 events replayed and compared with the expected outputs clock by clock |
| `tb_mtc_mhs_system` | end to end at default sizes: MHS → cable → MTC, 3000 events, recovered = sent + constant offset; also checks that lock, multi-channel events, MHS FIFO back-pressure, an MTC FIFO backlog and pulses on all 16 channels each happened |
| `tb_workload_mtc_pulse_train` | fixed-period trains on all 16 inputs (exact spacing, flag `FFFF`) and dark counts at 56 counts/s |
| `tb_workload_clock_mismatch` | loopback with the MHS board clock 160 ppm slow: recovered timestamps stay within ±1 count of the expected drifting line |
| `tb_workload_system_loopback` | evenly spaced 16-channel events, then a burst-like two-channel stream. The log2-binned auto- and cross-correlation histograms of the sent and the recovered streams must match bin by bin |

Run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    --top-module tb_mtc_mhs_system rtl/pcs_pkg.sv tb/tb_mtc_mhs_system.sv
./obj_dir/Vtb_mtc_mhs_system
```

Adding `+verilator+rand+reset+2` to the run line starts every register at
a random value. That shows that everything read is properly reset; all
testbenches pass this way.
All testbenches use the default sizes except `tb_timestamp_counter`, which
also tests an 8-bit counter for its wrap. Each finishes in a few seconds.

With both cards on ideal clocks of equal frequency the loopback is exact:
recovered = sent + constant. Two real boards have independent oscillators,
and their outputs jitter. An edge from one card is then sampled one clock
early or late now and then, so recovered timestamps carry a ±1-count error
(`tb_workload_clock_mismatch` shows this for a frequency offset). In a
correlation that error matters only in the shortest delay bins.

## Choices and departures

These follow the original design:

* 16 channels, an 80 MHz sample clock from a 40 MHz board clock, a 32-bit
  counter and 16-bit flags;
* events are every clock with at least one rising edge;
* the pairing over three 32-bit FIFOs of depth 1023, with the older
  timestamp in FIFO 0, the newer one in FIFO 1 and the older flag in the
  low half of FIFO 2;
* MHS fetch only when the held pair is used up, exact-match comparison and
  three-clock pulses.

These are this design's own choices where no detail was available:

* the newer flag sits in the **upper** half of the FIFO 2 word;
* the two-flop input synchronizer, and the fixed timestamp offset it causes;
* overflow dropping and counting on the MTC (the original relies on the
  FIFOs being deep enough);
* `run` inputs, reset values and reset sequencing;
* first-word-fall-through FIFOs with a combinational read, and the MHS
  popping the next pair in the same clock as the last match;
* MHS FIFOs of the same size as the MTC ones;
* on the MHS, a repeated event on a channel that is still pulsing stretches
  the pulse;
* the clock multiplier model's lock behaviour.

Not included: the DMA engines, the host-side FIFOs, the PCI interface and
the configuration flash are parts of the commercial board. The host
programs and the correlation software are PC software. The correlation
itself, a histogram of log-spaced delays between photon arrival times on
every pair of channels, runs on the host. The loopback testbench contains a
small reference version of it for checking.

The original design mentions running the MTC at 160 MHz (6.25 ns per
count). Nothing in this RTL depends on the frequency. Whether 160 MHz meets
timing depends on the target device; the FIFO read paths would be the first
candidates for a register stage.

## Changing the design

* **Channels.** `N_CH` on `mtc_fpga` and `mhs_fpga`. The flag word packs
  two flags into one FIFO word, so `2*N_CH` must not exceed the 32-bit word.
  32 channels would need a wider FIFO 2 or a fourth FIFO.
* **Buffering.** `DEPTH` sets the depth of all FIFOs; it need not be a power
  of two.
* **Pulse width.** `PULSE_CLKS` on `mhs_fpga`.
* **Synchronizer depth.** `SYNC_STAGES` on `mtc_fpga`. It changes the fixed
  timestamp offset to `SYNC_STAGES`+1 counts.
