# Dual-FPGA time-to-digital converter for cross-delay-line detectors

A cross-delay-line (CDL) detector tells you where and when a particle hit by timing pulses.
Behind a microchannel plate sit two meandering transmission lines, one for x and one for y.
The charge cloud of a particle couples into both lines. On each line, a pulse runs to each of
the two ends. Only four time differences carry the information:

* the position along a line is the difference of the arrival times at its two ends
  (`x = t1 - t2`, `y = t3 - t4`);
* the time of the event is the mean of the two arrival times, minus the full propagation
  time `tp` of the line;
* the two lines must agree on that time within a window set by the geometry. This is how the
  x and y halves of the same particle are recognised.

Picosecond timing of every pulse is therefore the whole job. This RTL splits it over two
FPGAs:

* The **TDC side** (`tdc_fpga`) timestamps the pulses on nine STOP inputs (eight signals plus
  a sync) with a tapped delay line, in units of 2.34375 ps.
* The **master side** (`master_fpga`) receives the timestamps over an 8-bit GMII link. It
  cleans them per channel, pairs the ends of each line, pairs the two lines, and computes
  `(x, y, t)`. It refers the result to an optional START channel and emits 64-bit records
  for a Gigabit Ethernet interface.

Keeping the converter alone on its own chip, and joining the two chips by a serial transceiver
link instead of a wide parallel bus, keeps switching noise away from the delay lines.

`cdl_tdc_system` is the top. It instantiates both sides and wires the GMII bytes straight from
one to the other, in place of the transceivers.

## Time base

Everything follows from one choice: the TDC clock period is exactly 1024 LSB.

| quantity | value |
|---|---|
| LSB | 2.34375 ps |
| TDC clock | 416.67 MHz, period 2.4 ns = 1024 LSB |
| fine part of a timestamp | 10 bits, from the delay line |
| coarse counter | 42 bits, free-running on the TDC clock |
| TDC timestamp | 52 bits = 2^52 × 2.34375 ps ≈ 10.55 s before wrapping |
| link field | 26 bits ≈ 157 µs |
| master timestamp | 56 bits (4 extension bits added on the master side) |
| re-binned bin | LSB × 2^`cfg_rebin`; `cfg_rebin = 2` gives 9.375 ps |

Because the period is a power of two in LSB, the timestamp is just
`{coarse, 10'b0} - d`. Here `d` is the calibrated time from the hit to the capturing clock
edge. No multiplier is needed anywhere.

## The TDC side

### Delay line and capture (`tdl_delay_line`, `tdc_channel`)

`tdl_delay_line` is a **behavioural model** of the carry chain, not synthesizable logic. It has
192 taps whose delays repeat 6, 22, 10, 22 ps. That spread imitates the uneven bins of a real
FPGA carry chain. The total is 2880 ps, longer than one clock period, so every edge is caught
by exactly one capture.

On a real device this module is replaced by the vendor carry primitives. The tap vector is
its only output.

`tdc_channel` has a four-stage pipeline:

1. **Capture.** Every TDC clock edge registers all taps.
2. **Detect and count.** A new hit is declared when tap 0 was low in the previous capture and
   is high in this one. The number of ones in the capture (`thermo_decoder`) is the bin: how
   many taps the edge has passed. Counting ones, rather than finding the first zero, tolerates
   the bubbles of a real delay line.
3. **Calibrate.** `tdc_calib_lut` maps the bin to a delay `d` in LSB. There is one table per
   channel, 193 entries of 11 bits.
4. **Subtract.** `ts = {coarse, 10'b0} - d`.

The timestamp leaves 4 clocks after the capturing edge.

The hit rule implies that a pulse must be high for at least one clock and low for at least
one clock. A channel therefore takes at most one hit per two clocks: 4.8 ns, or 208 Mhits/s.

### Calibration tables

At reset each table holds the ramp `d = bin × 102 / 16`, that is 6.375 LSB ≈ 14.94 ps per
tap. This is the mean tap of the model.

In use, the tables are loaded through `cal_we / cal_ch / cal_addr / cal_data` on the TDC
clock. The usual way to find the values is a code-density test: feed uncorrelated hits, histogram
the bins, and take the running sum of the histogram, scaled to 1024 LSB per period. Each entry
should hold the midpoint of its bin. The channel testbench works out these midpoints from the
tap delays of the model and loads them. It then checks that every timestamp lies within
6 LSB of the true time.

### Bundling, packing and the link (`tdc_fpga`, `tdc_word_packer`, `gmii_word_tx`)

Every TDC clock in which any channel fires writes one bundle into an asynchronous FIFO
(`async_fifo`, Gray-coded pointers, 16 bundles deep). A bundle is a 9-bit channel mask plus
nine 52-bit timestamps. If the FIFO is full, the bundle is dropped and `tdc_overflow_count`
increments.

On the 125 MHz link clock, `tdc_word_packer` unrolls the bundles into 32-bit words:

```
 31      30..26    25..0
[flag | channel | field]
  0      ch        ts[25:0]      fine word: one per hit
  1      ch        ts[51:26]     coarse word: only when ts[51:26] changed
```

A coarse word precedes the first hit and any hit whose upper field differs from the last one
sent. At high rates almost every word is therefore a hit.

`gmii_word_tx` sends each word as four bytes, most significant first, with `tx_en` high. It
drops `tx_en` for at least one clock whenever it is idle. The receiver restarts its byte count
on every rising `rx_dv`, so framing recovers after any gap.

The link carries 125 MHz × 8 bit / 32 bit = **31.25 M words/s**. This, not the converter, is
the limit on the sustained total hit rate. Bursts above it are absorbed by the FIFO until it
fills.

## The master side

### Rebuilding timestamps (`gmii_word_rx`, `ts_extender`)

`gmii_word_rx` reassembles the words. `ts_extender` remembers the last coarse field. It
increments a 4-bit extension counter whenever a new coarse field is smaller than the stored one,
which means the 52-bit TDC time wrapped. Each fine word becomes
`{ext, coarse, field} >> cfg_rebin`.

Every hit is also sent out at this point, before any filtering, on `raw_valid / raw_data`
(`{3'b000, ch, 56-bit time}`). This is the "list mode" stream that time-only experiments use.

### Channel conditioning (`chan_conditioner`)

Each channel has a dead time and an offset:

* **Dead time.** A hit closer than `cfg_dead[ch]` (in bins) to the last *accepted* hit of the
  same channel is dropped. The filter is non-paralysable, so a long train of ringing cannot
  lock the channel out. It is meant against reflections on badly matched cables. A value of 0
  turns it off. Drops are counted in `dead_drop_count`.
* **Offset.** The signed value `cfg_offset[ch]` is added to the time to compensate cable
  lengths.

### Coincidence (`coinc_pair`)

This is the hardest part of the design to get right, and the same unit is used three times.

Each side has an 8-entry queue in arrival order. When both queues are non-empty, the heads are
compared:

* if `lo < a - b < hi`, the two heads are one event: they are output together and both are
  popped;
* otherwise the **older** head (smaller time; A on a tie) cannot pair with anything later,
  since later hits on the other side only get later. It is discarded and counted.

One decision is made per clock. The rule only works if each input stream is in time order.
That holds: each line queue is fed by a single channel, and a constant offset does not
reorder one channel. The x/y queues receive line results in the order the line pairs were
formed, which is time order as well.

The three uses:

| instance | A | B | window |
|---|---|---|---|
| x line | `cfg_ch_x1` | `cfg_ch_x2` | `-tp_x < t1 - t2 < tp_x` |
| y line | `cfg_ch_y1` | `cfg_ch_y2` | `-tp_y < t3 - t4 < tp_y` |
| x/y | `t_x` | `t_y` | `cfg_txy_lo < t_x - t_y < cfg_txy_hi` |

`cdl_line_calc` turns a line pair into `x = t1 - t2` (24-bit signed) and
`t_x = (t1 + t2)/2 - tp_x`. The image point takes `t = (t_x + t_y)/2`. Positions stay in time
units; the conversion to micrometres is a single scale factor per axis, applied by the host.

Discards on the line pairs and the x/y pair are counted separately
(`line_discard_count`, `xy_discard_count`). A lone pulse from one end of a line, or a line
without a partner on the other line, therefore shows up as a count rather than as a wrong
position.

### START reference (`ref_subtract`)

With `cfg_ref_en` set, hits on `cfg_ref_ch` are not output. Instead, they become the reference
subtracted from every image time and every single-channel time.

Two references are kept. An image point reaches this stage several clocks after its hits. By
then a newer reference may already have arrived. In that case the event is referred to the
previous reference, so every output time is non-negative relative to the START that preceded
it.

With `cfg_ref_en` low, times stay relative to the start of the acquisition.

### Records (`record_formatter`)

The output is a valid/ready stream of 64-bit records, `{header[7:0], payload[55:0]}`:

| header | payload |
|---|---|
| `0x40` | `{x, y}`, each sign-extended to 28 bits |
| `0x80` | image time; always follows its `0x40` record |
| `{3'b000, ch}` | time of a hit on a channel that is neither a CDL channel nor the reference |

Image points take priority over single-channel hits. Each kind has a 16-entry queue. Records
lost to a full queue are counted in `rec_drop_count`.

## Configuration summary

All `cfg_*` inputs are on the link clock and are meant to be static during an acquisition.

| port | meaning |
|---|---|
| `cfg_rebin` | right shift applied to 56-bit times (0 to 7) |
| `cfg_dead[ch]`, `cfg_offset[ch]` | per-channel dead time (bins) and signed offset (bins) |
| `cfg_ch_x1/x2/y1/y2` | which inputs are the four line ends |
| `cfg_tp_x`, `cfg_tp_y` | full propagation time of each line (bins) |
| `cfg_txy_lo`, `cfg_txy_hi` | strict window on `t_x - t_y` |
| `cfg_ref_en`, `cfg_ref_ch` | START reference channel |

Top-level parameters:

| parameter | default |
|---|---|
| `N_CH` | 9 |
| `N_TAPS` | 192 |
| `CAL_W` | 11 |
| `DT_W` | 16 |
| `OFS_W` | 24 |
| `X_W` | 24 |

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl \
    rtl/cdl_pkg.sv tb/tb_cdl_tdc_system.sv --top-module tb_cdl_tdc_system
./obj_dir/Vtb_cdl_tdc_system
```

Swap in any other `tb/tb_<block>.sv`. The two-state simulator starts all state at random
values; every register that is read has a reset.

`tb_cdl_tdc_system` runs the whole system at its default parameters. It builds and runs in
about a minute and simulates about 170 µs. It generates particle hits at random positions on
both lines and predicts each record with its own model, and it also exercises:

* a wrap of the 26-bit link field;
* reflections removed by the dead time;
* lone line ends and unmatched lines discarded by the correlators;
* a START reference channel;
* an auxiliary channel;
* re-binning by 4;
* a final burst that overflows the TDC FIFO.

It fails if any of these never happens.

Three more system-level testbenches run the measurements the system is meant for, also at
the default parameters:

* `tb_tdc_precision` splits one pulse to two channels with a delay from -19 ns to +19 ns,
  and then 123 ns, 250 ns and 499.9 ns. For
  each delay it checks the mean interval to within 5 ps and the spread to below 12 ps r.m.s.
  With the tap model and midpoint calibration, it measures 6 to 10 ps.
* `tb_imaging_rate` runs the imaging configuration at 5 M and then 10 M particles/s. At 5 M/s
  every particle must come out as a correct image point. At 10 M/s the FIFO must overflow,
  and the output must stay between 4 and 7.8 M points/s (see the rate limits below).
* `tb_pump_probe` gives a START pulse on each 864 ns ring revolution and two detector hits
  10 ns apart on each revolution, plus background. It runs at the 9.375 ps bin, builds the
  time histogram of the records, and checks that no hit is lost and that every time falls
  within its revolution.

The other testbenches cover the details:

* the capture and calibration of a single channel against the tap delays;
* the word packer's coarse-word rule;
* link framing after gaps;
* wrap extension;
* dead-time edge cases;
* coincidence tie and window-edge cases;
* reference ordering;
* record priority and back-pressure;
* the 4-clock channel latency and the 32-clocks-per-8-words link throughput.

## Departures and limits

* **No sub-interpolation.** The converter uses one delay line per channel and gets one
  timestamp per hit. Its resolution is one tap (6 to 22 ps in the model), not the few
  picoseconds that several interleaved measurements would give. The 2.34375 ps LSB is the
  unit of the arithmetic, not the resolution of this RTL. The precision of a real build
  depends on the device and placement and cannot be judged from simulation.
* **Dead time.** The converter's own limit is two clocks, 4.8 ns, for pulses at least one
  clock wide. It is a hit-detection rule, not a pipeline hazard.
* **Range of the fine field.** The 26-bit link field spans about 157 µs. The 52-bit TDC
  timestamp spans about 10.5 s and the 56-bit master time about 168 s.
* **Link.** The transceivers and their 8b/10b coding are left out. GMII bytes go directly from
  `gmii_word_tx` to `gmii_word_rx`, and there is one link. The parallel-bus alternative to the
  transceivers is not built.
* **Ethernet/UDP.** The Gigabit Ethernet MAC, UDP stack and host software are not part of the
  RTL. `rec_*` and `raw_*` are the streams such a block would carry. Histograms (for example
  the pump-probe time spectra) are assumed to be built on the host.
* **Analog front end.** The amplifiers and discriminators that make logic pulses from the
  detector signals are outside the design. `hit[]` expects clean logic pulses.
* **Clocking.** The PLLs are not modelled. The top takes `clk_tdc` and `clk_link` as inputs.
* **Choices not fixed by the described system:**
  * the word header layout and the coarse-word-on-change rule;
  * the bundle FIFO depth;
  * the 8-entry correlator queues and the tie rule;
  * the mean of `t_x` and `t_y` as the image time;
  * the two-reference START logic;
  * all record header codes;
  * every width in the configuration table above.
* **Rate limits.** A detector at 10 Mcounts/s produces 40 M timestamps/s, which exceeds the
  31.25 M words/s of one link. The link alone would allow 7.8 M
  particles/s. Overflow, however, drops single hits, and the link still carries the other
  hits of each broken particle. Measured: 5 M particles/s in gives 5.0 M image points/s out
  with no loss; 10 M particles/s in gives about 5.0 M points/s out. Short bursts above the
  link rate are absorbed by the FIFO. On the output side, each image point is two
  64-bit records, so 1 Gbit/s carries a few million image points per second.
