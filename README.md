# LDACS1 air-to-ground baseband with a shared reconfigurable slot

An aircraft using LDACS1 with dynamic spectrum access has to do two
expensive pieces of signal processing, but never at the same time:

* **before it transmits** it must find a free reverse-link channel, which it
  does by splitting the received band into subbands with a *fast filter
  bank* (FFB) and measuring the energy in each;
* **while it transmits** it must shape its signal with a steep *channel
  filter* (order 200) so that the neighbouring DME and LDACS1 channels are
  not disturbed.

Both are multiplier-heavy. Because they are mutually exclusive, the design
gives them one *partially reconfigurable region* (PRR) on the FPGA: software
loads the filter bank, scans the channels, then loads the channel filter and
transmits. In plain receive operation the region holds a simple bypass. The
DSP budget is then set by the larger of the two filters, not their sum.

This repository is the programmable-logic part of that radio in
SystemVerilog: the two filters, the energy detectors and the sensing
sequencer, the buffers around them, a reconfiguration manager and a
register interface for the processor. The processor, DMA engines, RF
transceiver interface and the FPGA configuration primitive are outside the
RTL and appear as ports.

## Operating phases and data paths

```
                 +-------------------+     +-----------------------------------+
 rf_rx_* ------> | rx_double_buffer  | --> | prr                               | --> dma_rx_*
 (4 MHz I/Q)     | 2 banks, bursts   |     |  MODE_BYPASS: register stage      |
                 +-------------------+     |  MODE_FFB:    ffb -> 4 x energy   | --> energies
                                           |               detectors           |
 dma_tx_* ---------------------------------|  MODE_CF:     FIFO -> channel     | --> rf_tx_*
                                           |               filter -> FIFO      |
                                           +-----------------------------------+
 dma_bs_* --> reconfig_ctrl --> icap_*           ^ mode, decouple
                    |____________________________|
 sense_ctrl: tune_* handshake to the RF side, starts detectors, keeps results
 register bus (cfg_*): requests, coefficients, status, results
```

| Phase | PRR holds | What flows |
|---|---|---|
| receive (ground-to-air) | bypass | RF -> Rx buffer -> bypass -> receive baseband (`dma_rx_*`) |
| spectrum sensing | filter bank + detectors | RF -> Rx buffer -> FFB -> 4 energy detectors -> result table |
| transmit (air-to-ground) | channel filter | `dma_tx_*` -> Tx FIFO -> channel filter -> output FIFO -> RF |

A typical sequence from software: request the filter bank (write the
bitstream length, then the mode), start a scan at once without waiting for
the load to finish, wait for the scan interrupt, read
the occupied flags and energies, pick a channel, load the channel filter and
stream the frame.

## The fast filter bank (`ffb`, `ffb_filter`)

This is the least obvious part of the design.

The bank splits the 4 MHz complex band into 8 subbands of 500 kHz. It is a
3-stage binary tree; every node is the same kind of filter and produces two
outputs, its response and the complementary response (input delayed by the
filter's group delay, minus the response), so each node splits what it
receives into two disjoint halves:

```
F10(z^4) --orig--> F20(z^2) --orig--> F30(z)  orig:    0 MHz   comp: +2 MHz
         |                  \-comp--> F31(z)  orig:   +1 MHz   comp: -1 MHz
         \-comp--> F21(z^2) --orig--> F32(z)  orig: +0.5 MHz   comp: -1.5 MHz
                            \-comp--> F33(z)  orig: -0.5 MHz   comp: +1.5 MHz
```

* **Interpolation.** Stage *i* uses its prototype with every delay replaced
  by 2^(3-i) delays (M = 4, 2, 1). A half-band low-pass H(z) interpolated
  by 4 passes 500 kHz-wide bands every 1 MHz, so the first node already
  separates the four bands centred on whole MHz from the four centred on
  odd half-MHz. Each later stage halves the number of bands.
* **Frequency shifts.** A node that must pass a band not centred on 0 uses
  its prototype shifted in frequency. The shift is carried entirely in the
  complex coefficients that software loads:
  `c[n] = h[n] * exp(j * w0 * M * (n - D))`, with `D = (TAPS-1)/2`. The
  modulation is centred on the middle tap so that the complementary output
  stays a plain delay-and-subtract. Shifts used: F21 +500 kHz,
  F31 +1 MHz, F32 +500 kHz, F33 -500 kHz, the others none.
* **Outputs.** `subband[k]` is the band centred at k x 500 kHz (modulo
  4 MHz). The four LDACS1 channels seen in one pass (1 MHz spacing, in the
  gaps between DME channels) are subbands 6, 0, 2, 4, that is -1, 0, +1 and
  +2 MHz from the RF centre frequency. The other four subbands lie on
  DME channels and are not detected.
* **Sizes.** The prototypes are 35, 19 and 15 taps long. Because a
  prototype is symmetric, a node's coefficients are conjugate-symmetric,
  c[2D-n] = conj(c[n]). Only c[0..D] are stored, and each pair of taps
  shares one coefficient: `c*a + conj(c)*b = Re(c)*(a+b) + j*Im(c)*(a-b)`.
  That gives 18 + 2x10 + 4x8 = 70 coefficient multipliers for the whole
  bank, the size the architecture was dimensioned for. Each of them is a
  real-by-complex pair of products, 4 real multipliers.
* **Timing.** One sample per clock, each node adds one register, so the 8
  subbands appear 3 cycles after the input. There is no backpressure.

With half-band Hamming-window prototypes (the ones the testbenches load),
a tone at the centre of any band keeps about 48 dB more energy in its own
subband than in any other, at unit gain.

## Spectrum scan (`sense_ctrl`, `energy_detector`)

A scan covers the 23 reverse-link channels, four per pass, in six passes.
For each pass `sense_ctrl` raises `tune_req` with `tune_group` = g and holds
it until the RF side returns `tune_ack` (the RF front end is then tuned so
that channels 4g..4g+3 sit at -1, 0, +1, +2 MHz). It then flushes the Rx
buffer and the filter bank, so nothing from the old tuning is measured,
and starts the four energy detectors together as soon as the filter bank
is live (`meas_ok`). If the filter bank is still being loaded, the samples
received meanwhile wait in the Rx buffer, so the load time is hidden
behind acquisition instead of added to the scan. Each detector sums
I^2 + Q^2 over `N_SAMPLES` = 20000 subband samples (48-bit total). When all
four have finished, the energies are stored under their channel numbers
(the 24th slot of the last pass is dropped). After the sixth pass `done`
pulses and the top raises `irq`. `occupied[c]` is `energy[c] > threshold`,
evaluated continuously against the threshold register.

The scan is paced by the received samples. At 4 MHz, 6 x 20000 samples
take 30 ms. In the full-size simulation, with bank filling after each
retune and a 1500-word filter-bank load running during the first pass, a
scan takes about 124 020 sample periods (it varies by a few with the
random retune delays), or 31.0 ms at 4 MHz. The
filter bank's start-up transient (about 190 samples after a flush) is
included in each window.

## Receive double buffer (`rx_double_buffer`)

Two banks of 2000 samples. The RF side writes one bank at the sample rate.
When that bank is full it is handed to the read side, and writing continues
in the other bank. The read side sends the full bank as a burst at up to one
sample per clock. Processing a bank therefore overlaps with filling the next
one, and the filter bank runs in short bursts, not continuously at 4 MHz.
A bank is only offered once full. A sample that arrives while both banks
are full is dropped and sets a sticky overflow bit (status bit 5). A flush
empties both banks; it happens on each retune and when a module load is
requested. During a load the region takes nothing, so the two banks hold
up to 4000 samples (1 ms at 4 MHz) for the module being loaded. The same
buffer feeds the bypass in receive mode.

## Channel filter and its FIFOs (`channel_filter`, `stream_fifo`)

An order-200 (201-tap) linear-phase FIR in transposed direct form. The
coefficients are symmetric, so only h[0..100] are stored. Each input
value is multiplied by those 101 values once (stage 1, registered), and
every product feeds the two adders of the transposed chain that use it
(stage 2). I and Q pass through the same real filter and share its 101
multipliers: a complex sample is accepted, its I part is multiplied in
that cycle and its Q part in the next. I and Q each keep their own adder
chain, which advances only on its own turn. The filter therefore takes one
complex sample every second clock (`in_ready` is low in between), which is
far above the 4 MHz sample rate. The output, I and Q together, appears three
cycles after the accepting cycle. The coefficients are loaded by software
(Q1.17); the testbenches use a Blackman-window low-pass at 300 kHz.

The transmit stream enters a 512-word FIFO and leaves through another
512-word FIFO to the RF side. This lets DMA deliver in bursts while the RF
side takes samples at its own rate. A sample leaves the input FIFO only
when the output FIFO has room for it and for the two samples inside the
filter pipeline. A slow RF side therefore stalls the filter and then
deasserts `dma_tx_ready`, and no sample is lost. An assertion in `prr`
checks this credit rule.

## Reconfiguration (`reconfig_ctrl`, `prr`)

On the device, the PRR is physically rewritten with a partial bitstream.
RTL cannot change its own logic, so `prr` contains all three modules and
`mode` selects which one is live. The others get no data, their outputs are
ignored, and the received stream is accepted and dropped in the
channel-filter mode, which does not use it. The model keeps the behaviour software sees:

1. A write of the mode register starts `reconfig_ctrl`. A request made
   while a load is running is ignored.
2. The Rx buffer is emptied and `decouple` rises. Decouple clears every
   module's state in the region and holds back the received stream, which
   collects in the Rx buffer.
3. `bs_words` 32-bit words are taken from `dma_bs_*`, one per clock, and
   written to the configuration port. `icap_csib` and `icap_rdwrb` are low
   for each word, one cycle after the word is accepted.
4. After the last word the live module changes. `decouple` stays high for
   one more cycle, so the new module starts from a cleared state. Then
   `irq` pulses.

Coefficients are kept across loads and are cleared only by `rst`, so
software loads them once after reset. The RTL does not check what the
bitstream contains.

## Register map (`cfg_*`, word addresses)

`cfg_we` writes on the rising edge. `cfg_rdata` is a combinational read of
`cfg_addr`.

| Address | Access | Meaning |
|---|---|---|
| 0x000 | W | bits 1:0: module to load (0 bypass, 1 filter bank, 2 channel filter) |
| 0x001 | RW | bitstream length in words (23:0) |
| 0x002 | R | 1:0 live module, 2 load busy, 3 scan busy, 4 scan done (sticky), 5 Rx overflow |
| 0x003 | W | bit 0: start a scan |
| 0x004 / 0x005 | RW | threshold bits 31:0 / 47:32 |
| 0x006 | R | occupied flags, bit c = channel c |
| 0x040 + 2c, +1 | R | energy of channel c, bits 31:0 and 47:32 |
| 0x100 + i | W | channel filter h[i] = h[200-i], i = 0..100 (bits 17:0) |
| 0x400 + 64f + n | W | filter-bank node f, coefficient c[n], n = 0..(taps-1)/2, real part (held until the next write) |
| 0x800 + 64f + n | W | imaginary part; writes both parts of c[n] |

Node numbers f: 0 = F10, 1 = F20, 2 = F21, 3..6 = F30..F33.

## Number formats and interfaces

* Samples: `cplx_t` from `ldacs_pkg`, 16-bit signed I and Q packed in
  32 bits, I in the upper half.
* Coefficients: 18-bit signed Q1.17. Filter outputs are rounded (half up)
  and saturated to 16 bits.
* One clock domain with a synchronous, active-high reset. The RF sample
  rate is carried by `rf_rx_valid` strobes and `rf_tx_ready`. Crossing into
  a separate RF clock is left to the RF interface.
* Streams use valid/ready, except inside the filters, which take one sample
  per valid cycle.

## Where this RTL goes beyond, or departs from, the architecture

The architecture fixes the block structure: the shared region and its
three modules, the 3-stage 8-subband bank, the four detected bands, 23
channels, the 20000-sample window, the order-200 transposed filter with
101 multipliers, the double buffer and the FIFOs. The following are choices
of this implementation:

* The filter coefficients are not built in. Both filters load them at run
  time.
* The prototype lengths (35/19/15), the shift assignment and the subband
  order of the bank.
* Each of the 70 filter-bank coefficient multipliers is built as 4 real
  multipliers, and the bank takes one sample per clock with no time
  sharing. That is 280 real multipliers, well above the roughly 100 DSP
  slices a region on a small Zynq part would hold. The 4 MHz sample rate
  leaves room for about 60-fold sharing at 250 MHz; a DSP-lean bank would
  fold its taps over several clocks, and that is not built here. The
  channel filter, with I and Q sharing its 101 multipliers, stays at 101.
* Word widths, the register map and bus, the retune handshake, the
  threshold compare, the bank and FIFO depths, and the single clock domain.
* Partial reconfiguration is modelled by a mode select, as described
  above. Power and area savings cannot be seen in this RTL.
* No timing closure at 250 MHz is claimed. The filter-bank nodes add all
  their taps in one combinational stage.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_ffb_filter` | bit-exact original and complementary outputs against a convolution; 1-cycle latency; flush |
| `tb_ffb` | a tone in each of the 8 bands: own-band gain near 1 and at least 20 dB rejection elsewhere; 3-cycle latency |
| `tb_energy_detector` | exact window sums, window length, done timing |
| `tb_channel_filter` | bit-exact output at order 200 against a convolution; impulse response; 3-cycle latency; at most one sample every second cycle |
| `tb_stream_fifo` | order, count, full and empty flags against a queue model |
| `tb_rx_double_buffer` | order, full-bank bursts, overlap of reading and writing, overflow, flush |
| `tb_sense_ctrl` | retune sequence, flush before measuring, no start before the filter bank is live, energy table, occupied flags, done |
| `tb_reconfig_ctrl` | word count and order at the configuration port, decouple window, mode switch, ignored requests |
| `tb_prr` | all three modules: bypass stream, tone detection, bit-exact channel filter with RF stalls, decouple (clears, holds back the received stream) |
| `tb_ldacs_radio_top` | end to end at reduced sizes (window 1024, banks 64, FIFOs 16) |
| `tb_ldacs_radio_full` | the same sequence with every parameter at its default |

The end-to-end sequence (`tb/tb_radio_seq.svh`) programs everything
through registers. It requests the filter bank with a bitstream long
enough to last a third of a buffer bank and starts the scan straight away,
so reception overlaps the load; it scans against an RF model
that puts tones in a random set of channels and requires the occupied
flags to match that set exactly. It checks the scan time against 6
windows plus buffering. It then loads the channel filter and checks a
transmit burst bit-exactly against a slow, stalling RF side, and finally
streams through the bypass. It counts module loads of each kind, retunes,
overlapped buffer reads, transmit back-pressure, bypass transfers,
samples received during the filter-bank load, and scans, and fails if any
of them never happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/ldacs_pkg.sv tb/tb_util_pkg.sv tb/tb_ldacs_radio_full.sv \
    --top-module tb_ldacs_radio_full -o sim
./obj_dir/sim
```

Change the last two file and module names for another testbench. The
full-size run takes about a second.

## Files

* `rtl/ldacs_pkg.sv`: types, widths, channel counts, register addresses,
  rounding helpers
* `rtl/ffb_filter.sv`, `rtl/ffb.sv`: filter-bank node and tree
* `rtl/energy_detector.sv`, `rtl/sense_ctrl.sv`: detection and scan
  sequencing
* `rtl/channel_filter.sv`, `rtl/stream_fifo.sv`: transmit filter and FIFOs
* `rtl/rx_double_buffer.sv`: receive ping-pong buffer
* `rtl/prr.sv`, `rtl/reconfig_ctrl.sv`: reconfigurable region and its
  manager
* `rtl/ldacs_radio_top.sv`: top level with the register interface
* `tb/tb_util_pkg.sv`: coefficient design used by the testbenches
  (half-band prototypes, node modulation, channel low-pass) and reference
  rounding
