# Bio-signal accelerators for a wearable SoC-FPGA monitor

A wearable monitor that processes its sensor data on the device, rather than
streaming raw samples to a server, needs enough compute for two jobs. One is
heart rate from a photoplethysmography (PPG) sensor. The other is an emotional
state from EEG features. This RTL is the programmable-logic half of such a
monitor on a Zynq-7000-class SoC FPGA. Two accelerators take the costly inner
loops of both algorithms. A processor beside them runs the control flow and the
cheap final decisions.

- **PPG path.** `ppg_core` takes a buffer of red and infra-red samples. It
  removes DC and linear drift, measures how well the two channels agree, and
  computes autocorrelation values on request. The processor calls the
  autocorrelation for growing delays until it finds the pulse period.
- **EEG path.** `eeg_calcdist` computes the Canberra distance from one test
  feature vector to every training vector streamed past it. It feeds
  `eeg_sortdist` directly, and that core keeps the 21 nearest training
  instances. The processor reads their indexes and takes the majority class
  (k-nearest-neighbour classification).

`wearable_pl_top` places the two paths side by side. Each path has its own
AXI4-Stream data ports, fed by a DMA engine in the full system, and its own
AXI4-Lite control port, driven by the processor.

```
             AXI4-Stream 32b             AXI4-Stream 64b
  DMA ──────────────────────► ppg_core ───────────────────► DMA
  CPU ◄─── AXI4-Lite ───────►    │  (preprocess / R(m))
                                 
             AXI4-Stream 64b            16b distances
  DMA ──────────────────────► eeg_calcdist ──────────► eeg_sortdist ◄── AXI4-Lite ──► CPU
                              (8 x canberra)            (21 x sort_cell)
```

One clock drives everything, and one active-low asynchronous reset. The
original system ran the fabric at 100 MHz, and the cycle counts below are
converted at that rate.

## Work split between fabric and processor

| Step | Where |
|---|---|
| PPG: DC mean, DC removal, linear regression, detrending, mean squares, channel correlation, quality test | `ppg_core`, one command |
| PPG: autocorrelation R(m) for one delay m | `ppg_core`, one command per m |
| PPG: first local maximum of R, heart rate = fs·60/k | processor |
| EEG: feature extraction and normalisation to [0,1] | outside this design (features arrive ready) |
| EEG: Canberra distance to each training vector | `eeg_calcdist` |
| EEG: keeping the K = 21 nearest | `eeg_sortdist` |
| EEG: majority vote of the 21 classes | processor |

The end-to-end testbench performs the processor's steps itself. Those steps are
the peak search, the heart-rate formula and the class vote.

## PPG core (`ppg_core`)

### The preprocessing chain

Samples are 16-bit unsigned sensor codes. Each 32-bit input word carries one
sample pair: RED in bits 15:0 and IR in bits 31:16. Both channels pass through
the same chain side by side. n is the buffer length (2..1024, LEN register),
and all arithmetic is integer.

1. **DC mean.** `mean = Σx / n`. The sum is taken while the buffer loads, one
   sample per clock.
2. **DC removal.** `x' = x − mean`.
3. **Linear regression.** The index is centred and doubled so it stays an
   integer: `t = 2i − (n−1)`, which gives −(n−1), …, −1, +1, …, n−1 for even n.
   The slope is `(Σ x'·t << 16) / Σ t²`. Σt² is accumulated in the same pass as
   Σx'·t, so no constant table is needed.
4. **Detrending.** `x'' = x' − ((slope·t) >>> 16)`.
5. **Mean square.** `msq = Σ x''² / n`.
6. **Channel correlation.** `cov = Σ x''_red · x''_ir / n`.

Steps 2 and 3 share one pass over the buffer (pass A). Steps 4 to 6 share a
second pass (pass B). Each pass reads a sample and writes it back one clock
later. The detrended samples stay in the core for the autocorrelation commands.

**Why the slope keeps fraction bits.** Everything else in the chain is an
integer, as in the reference design, which dropped all fraction bits. But the
slope of a realistic drift is well under one code per sample, so an integer
slope would always be zero and detrending would do nothing. The slope therefore
carries `SLOPE_FB = 16` fraction bits.

**Quality test.** The Pearson coefficient of the two channels is
`r = cov / sqrt(msq_red · msq_ir)`. A buffer is usable if r ≥ 0.8. The core
decides this without a square root or a division: it checks `cov ≥ 0` and
`25·cov² ≥ 16·msq_red·msq_ir`, with 40-bit operands. The result is shown in
bit 0 of the last result word and in the QUALITY status bit. Discarding a bad
buffer is up to the processor.

**Divisions.** A single 64-bit sequential divider (`seq_div`, one bit per clock)
serves all seven divisions in turn. Like integer division in C, it truncates
toward zero.

**Storage.** Detrended values are stored 19 bits wide and signed. DC removal
adds one bit. The trend can be up to about 1.7 times the sample range (a
Cauchy–Schwarz bound), which adds two more.

### Autocorrelation and heart rate

`AUTOCORR` computes `R(m) = Σ_{i=0}^{n−1−m} x''(i)·x''(i+m)` on one stored
channel: IR by default, RED if LAG bit 16 is set. It returns R(m) as one 64-bit
word with TLAST. The core reads the two samples of each product through the two
read ports of the buffer, one product per clock. If m ≥ n, the sum is empty and
R(m) = 0.

The processor's loop looks like this:

```
R1 = AUTOCORR(1); R2 = AUTOCORR(2)
for m = 3, 4, ...:  Rm = AUTOCORR(m)
                    if R(m-1) > R(m-2) and R(m-1) >= R(m): k = m-1; stop
HR [bpm] = fs * 60 / k            (fs = 125 Hz in the tests)
```

A 72 bpm pulse sampled at 125 Hz gives k = 104 (72.1 bpm). This takes about
100 commands of about 1000 clocks each. The loop of short commands is why the
periodicity search gained little from hardware in the reference system.

### Registers and result packet

| Word (byte addr) | Access | Meaning |
|---|---|---|
| 0 (0x00) CTRL | W | bits 1:0 operation: 1 = PREPROCESS, 2 = AUTOCORR. Ignored while busy. |
| 0 (0x00) STATUS | R | bit 0 BUSY, bit 1 DONE, bit 2 QUALITY |
| 1 (0x04) LEN | R/W | n, clamped to 2..1024. Reset value 1024. |
| 2 (0x08) LAG | R/W | bits 15:0 delay m, bit 16 channel (0 IR, 1 RED) |

PREPROCESS returns 8 words of 64 bits, with TLAST on the last word:

`mean_red, mean_ir, slope_red, slope_ir, msq_red, msq_ir, cov, {n[47:32], quality[0]}`.

If TLAST arrives before n samples, the load ends early and n becomes the number
of samples received. The `done` output goes high when the last result word has
been taken. It clears when the next command starts.

### Timing

- PREPROCESS: n clocks to load, n + 2 clocks per pass (two passes), 7 × 66
  clocks of division, and 8 result words. For n = 1024 this measured 3555
  clocks (35.6 µs at 100 MHz). The complete hardware/software preprocessing
  step of the reference system took 61 µs.
- AUTOCORR: n − m + 3 clocks plus the result word.

## EEG distance core (`eeg_calcdist`)

A feature vector holds 160 features of 8 bits, each an unsigned fraction in
[0,1). It travels as 20 words of 64 bits: feature 8w + l sits in byte lane l of
word w. (160 features would be, for example, 32 electrodes × 5 frequency bands.)

A packet is the test vector (20 words) followed by any number of training
vectors. TLAST marks the last word of the last training vector. The first 20
words go into the test buffer. After that, each incoming word meets the matching
test word in eight `canberra` units, one per byte lane. Their eight terms are
added in the same clock, pass one register, and go into the accumulator. After
word 19 of a training vector, the 16-bit distance goes out on the output stream.
The last distance carries TLAST.

**Canberra term.** `canberra` computes `floor(255·|u−v| / (u+v))`, with 0/0
defined as 0. Scaling by 255 rather than 256 lets the largest term (one feature
zero, the other not) fit exactly in 8 bits. The full distance is at most
160 × 255 = 40800, so it fits in 16 bits.

**Rate.** The core takes one word per clock unless the output back-pressures.
A training vector therefore costs 20 clocks, and the distance appears two clocks
after its last word. At full size (1024 training vectors) the test measured
20,502 clocks from the first word to DONE in the sorting core. That is 205 µs
at 100 MHz. The reference system took 235 µs for the same job, including
software overhead.

## EEG sorting chain (`eeg_sortdist`, `sort_cell`)

The chain keeps a running "K best so far" list without ever sorting the whole
set. It has K = 21 cells, each holding a distance and a 10-bit index. A new
distance enters cell 0 with its arrival number as the index. Each cell compares
the incoming distance with its own (strict `<`):

- **Smaller:** the cell stores the incoming pair and passes its old pair on.
- **Otherwise:** it keeps its pair and passes the incoming pair on.

The pass-on path is combinational, so a distance settles through all 21 cells
in one clock. After every clock the cells hold the 21 smallest distances so far,
in ascending order. Whatever falls out of cell 20 is discarded. Empty cells hold
0xFFFF, which is larger than any real distance.

Because the comparison is strict, equal distances keep no particular relative
order. The sorted distances and the set of indexes are exact. Among equal
distances, the index order (and which ones survive at the K-th place) depends on
arrival order.

| Word (byte addr) | Access | Meaning |
|---|---|---|
| 0 (0x00) | W | bit 0 START: empty the chain, reset the index counter, accept data |
| 0 (0x00) | R | bit 0 RUNNING, bit 1 DONE, bits 26:16 distances received |
| 1+i (0x04·(1+i)) | R | cell i (0 = nearest): {distance[15:0], 6'b0, index[9:0]} |

After reset the core accepts data, as if START had been written. The distance
that carries TLAST sets DONE (also the `done` output). The core then holds its
input ready low until the next START, so results cannot be overwritten before
they are read.

## AXI4-Lite front end (`axil_regs`)

`axil_regs` is a small slave shared by both controllable cores. A write is
accepted when address and data are both valid, and the OKAY response follows on
the next clock. A read is accepted when no read response is pending; the core's
register value is looked up combinationally and returned on the next clock. One
transaction of each kind is in flight at a time. Assertions check that responses
stay valid until taken and that stream outputs hold steady under back-pressure.

## Sizes

| Parameter | Default | Meaning |
|---|---|---|
| `PPG_N` / `N_MAX` | 1024 | PPG buffer depth per channel |
| `SAMPLE_W` | 16 | PPG sample width |
| `SLOPE_FB` | 16 | fraction bits of the regression slope (own choice) |
| `EEG_NW` / `WORDS` | 20 | 64-bit words per feature vector (160 features) |
| `KNN_K` / `K` | 21 | nearest neighbours kept |
| index width | 10 | up to 1024 training instances per search (indexes wrap beyond) |
| `AXIL_AW` | 8 | AXI4-Lite byte-address width |

Shared widths and operation codes are in `wearable_pkg`. Storage at the
defaults: two 1024 × 19-bit PPG buffers (38,912 bits) and a 20 × 64-bit test
buffer. The training set is streamed and never stored, so its size is limited
only by the 10-bit index.

## Where this departs from the reference design

- **Distance summation.** The reference block diagram shows one multiplexer
  feeding the eight Canberra terms into the adder one at a time. That would take
  8 clocks per word, but the reference run time needs about one word per clock.
  This design adds all eight terms in one clock.
- **Training data.** Training words are compared as they arrive instead of being
  collected into a training buffer first.
- **Autocorrelation range.** The sum stops at the end of the buffer (n − m
  products). There are no samples beyond it.
- **Own choices.** The quality test is done inside the PPG core. The slope keeps
  16 fraction bits. Not taken from the reference: the register maps, stream
  packing, packet framing, the START/DONE protocol, the empty-cell value, and
  the run-time buffer length.
- **Not included.** The processor, the DMA engines, the AXI interconnects, the
  reset generator, the on-chip ADC for an analog EEG front end, and an EEG
  feature extractor. Only their connections appear, as top-level ports.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/wearable_pkg.sv tb/tb_wearable_pl_top.sv --top-module tb_wearable_pl_top
./obj_dir/Vtb_wearable_pl_top
```

Replace the top module to run another testbench:

| Testbench | What it shows |
|---|---|
| `tb_wearable_pl_top` | Full size, default parameters. One 1024-sample PPG buffer gives the heart rate through the autocorrelation loop; a noise buffer fails the quality test; two 1024-vector EEG searches, each checked against a reference sort, vote for the right class. Counts every mechanism. |
| `tb_ppg_core` | Preprocessing results bit-exact against a 64-bit integer model, for 1024- and 100-sample buffers, a noise buffer and an early TLAST; every R(m) checked; heart rate at 72 and 110 bpm; cycle budget |
| `tb_eeg_calcdist` | Distances against a reference, with random gaps, back-pressure and many zero/equal features; one word per clock |
| `tb_eeg_sortdist` | K nearest against a reference sort, with heavy ties, fewer than K inputs, the stall after TLAST, START |
| `tb_canberra` | All 65,536 input pairs against a floating-point reference |
| `tb_sort_cell` | Take, pass on, ties and clear against a model |
| `tb_axil_regs` | Random AXI4-Lite reads and writes with independent address/data timing and byte strobes |
| `tb_seq_div` | Signed division against integer division, with edge cases (zero, ±1, largest magnitudes, division by zero) and the fixed latency |

`tb/axil_master_bfm.sv` is the AXI4-Lite master used by the testbenches. Every
simulation finishes in well under a second.
