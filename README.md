# Leading eigenvector generator for on-chip PCA spike sorting

An implanted neural recorder cannot send every raw sample over its radio.
One way to cut the data is to sort spikes on the chip. Each detected spike
waveform of N samples is projected onto a few principal components (PCs),
and only those few feature scores are sent. The PCs are the leading
eigenvectors of the covariance matrix of the spikes recorded on a channel.
They have to be computed (trained) on the chip too, and retrained now and
then, using very little area and power.

This RTL implements that training engine. It finds the leading eigenvectors
of an N x N covariance matrix with nothing more than one multiplier, one
adder/subtractor, a shift-by-one unit and a comparator. It needs no divider,
no square root and no floating point. Around it sits the rest of the digital
core: a unit that builds a channel's covariance matrix from its detected
spikes, a PC memory for 16 channels, and an inner-product engine that turns
each detected spike into its feature scores.

The RTL follows the architecture of *Design and Implementation of Leading
Eigenvector Generator for On-chip Principal Component Analysis Spike Sorting
System*. The section "Departures and own choices" lists where it goes beyond
that description.

Default configuration: 32 samples per spike, 9-bit covariance entries and PC
elements, up to 4 PCs and up to 128 iterations per PC, and 16 channels.

## The algorithm the hardware runs

Power iteration with deflation, in integer form:

```
for p = 0 .. num_pc-1
    phi = [1, 1, ..., 1]
    repeat num_iter times
        phi = C * phi                                  # distilling
        level_adjust(phi)
        for j = 0 .. p-1                               # Gram-Schmidt, division-free
            phi = (pc_j' pc_j) * phi - (phi' pc_j) * pc_j
            level_adjust(phi)
    pc_p = phi

level_adjust(phi):
    while some element of phi is outside [-2^(BW-1), 2^(BW-1)-1]
        phi = (phi + 1) >> 1          # every element, arithmetic shift, rounding
```

Multiplying by C again and again makes the dominant eigenvector stand out.
Removing the components along the PCs already found makes the p-th one stand
out next. Typical convergence takes 5 to 15 iterations. The capability
figures below use 20.

### Why no division is needed

The textbook Gram-Schmidt step is `phi -= (phi'u)u` with `u = pc_j/|pc_j|`.
Multiplying the whole update by `|pc_j|^2 = pc_j'pc_j` gives

    phi' = (pc_j' pc_j) * phi - (phi' pc_j) * pc_j

This is the same vector up to a positive scale factor, so it has the same
direction. The norm has moved from the divisor into a multiplier, and the
explicit normalisation at the end of each iteration is dropped. Only
multiply and add remain.

### Adaptive level shifting: a block exponent for a vector

Without normalisation the vector grows at every step. With 9-bit inputs and
32 samples, one distilling step adds about 9 + 5 bits. One Gram-Schmidt step
adds about 2·9 + 5 bits. Instead of saturating at a fixed level, the vector
is halved (with rounding) until its largest element fits in BW signed bits
again. All elements share one implicit exponent, which is discarded. The
vector therefore always uses the full BW-bit range whatever the signal level.
This is what lets 9-bit precision give PCs that sort spikes about as well as
floating point.

Consequences a user must know:

* **The output PCs are mutually orthogonal but not unit length.** Each is
  scaled so that its largest element fits in BW bits and, whenever the last
  step needed a halving, is at least 2^(BW-2) in magnitude. All PCs
  therefore have similar scales, which is
  enough for distance-based clustering of the scores. Normalise them
  afterwards if true projections are needed.
* **The sign of a PC is arbitrary**, as with any eigenvector routine.
* **The run time depends on the data.** Each halving costs one N-cycle pass
  over the vector, and the number of halvings depends on how fast the vector
  grows, which depends on the eigenvalues.

## Datapath

```
                 +--------------------- control engine (eig_ctrl) ----------------------+
                 |  control word dp_ctrl_t + addresses                                  |
   cov entries   v                                                                      |
  ----------> cov_mem --+                                                               |
                        |  A-mux: cov / phi / pc_j / a / b                              |
  eig_regfile ----------+--> eig_mult (IW x BW) --> eig_addsub --+--> acc, a, b, phi    |
   phi[2][N], acc, a, b |    B-mux: phi / pc_j       ^  addend:   |                     |
                        |                            |  0/acc/phi |                     |
  pc_regfile -----------+                            +------------+                     |
   (final PCs, pc_j)    +--> eig_rshift ((x+1)>>1) --> phi write                        |
                        +--> eig_cmp (|x| fits BW?) --> overflow flag ------------------+
```

* **`cov_mem`** holds the N x N matrix at BW bits: 32·32·9 = 9216 bits.
* **`eig_regfile`** holds phi in two banks of N words of IW bits. A
  distilling pass reads the old vector from one bank while it writes the new
  one into the other. The two banks then swap. It also holds the running
  partial sum and the two scalars of the Gram-Schmidt step:
  a = pc_j'pc_j and b = phi'pc_j.
* **`pc_regfile`** holds the finished PCs at BW bits. These PCs act as pc_j
  during later Gram-Schmidt steps, and the PC output reads them.
* **`eig_mult`** and **`eig_addsub`** form the single multiply-accumulate
  unit. Every arithmetic step of the algorithm goes through it.
* **`eig_rshift`** computes `(x + 1) >>> 1`.
* **`eig_cmp`** compares one element per cycle with one limit. The limit is
  chosen by the element's sign: 2^(BW-1) for non-negative elements, -2^(BW-1)
  for negative ones.

### Schedule (eig_ctrl)

| State | Cycles | MAC activity |
|---|---|---|
| `S_INIT` | 1 | phi := all ones |
| `S_DISTILL` | N·N | row i: acc = Σ_k C[i][k]·phi[k]; written to the other bank at k = N-1 |
| `S_CHECK` | N | each phi element goes through the comparator; the flags are ORed |
| `S_SHIFT` | N per shift | phi[i] := (phi[i]+1)>>1; the comparator checks the halved value |
| `S_ORTH` | 4·N per earlier PC | pass 1: a = Σ pc_j²; pass 2: b = Σ phi·pc_j; pass 3: phi := a·phi; pass 4: phi := phi − b·pc_j |
| `S_OUTPUT` | N | phi is copied into the final-PC registers and streamed out |

After a distilling pass or a Gram-Schmidt step, one check pass runs. If any
element overflowed, shift passes follow, and each shift pass also checks its
own output. The FSM leaves the shift loop after the first pass that leaves
every element in range. A level adjustment that needs s halvings therefore
costs N·(1+s) cycles.

Training time for one channel:

    T = Σ_p [ 1 + num_iter·( N² + N(1+s) + Σ_{j<p} (4N + N(1+s)) ) + N ]

With 4 PCs, 20 iterations, N = 32 and BW = 9, a synthetic matrix takes
**191,908 cycles**. That is 312 channels per minute at 1 MHz, in line with
the published ≈192k cycles. At N = 16 the count is 72,964 cycles, against
the published ≈73k.

### Word widths

Before any multiplication the vector is back within BW bits, so every
product has one BW-bit operand (phi or pc_j). The other operand is at most
2·BW + log2 N bits wide (the scalars a and b). The largest intermediate value
is `a·phi − b·pc_j`, and by Cauchy-Schwarz its magnitude is at most
2·N·2^(3BW−3). The internal width is therefore
`IW = 3·BW + log2(N)`, which is 32 bits at the defaults (equal to the
published 3n+5 for N = 32). No sum or product can overflow at that width.

## The surrounding spike-sorting core (spike_sort_top)

* **Collection.** `collect_start` with `collect_ch` makes **`cov_unit`**
  gather the next 64 spikes of that channel from the detected-spike stream
  (see below) and write their covariance matrix into the generator's memory.
  A matrix computed elsewhere can instead be written through the direct
  `cov_we`/`cov_row`/`cov_col`/`cov_wdata` port; the covariance unit has
  priority on the write port while it is writing.
* **Training path.** Once a matrix is loaded, `train_start` starts a run with `train_ch`, `num_pc` and
  `num_iter`. The finished PCs stream out of the generator, one element per
  cycle, into **`pc_mem`** at the slot of the latched channel. Channels are
  trained one after another.
* **Sorting path.** **`feat_extract`** receives detected spikes as a sample
  stream (`spk_valid`, `spk_first` on sample 0, `spk_ch`, `spk_sample`).
  Idle cycles between samples are allowed. Four MACs run in parallel, each
  reading its PC element from `pc_mem` for the current sample. One cycle
  after the 32nd sample, `score_valid` pulses with the four full-precision
  scores (2·BW + log2 N = 23 bits each). Sorting continues on other channels
  while a channel trains.

### Covariance matrix unit (cov_unit)

For S = 2^LOG2S = 64 spikes x of one channel the unit accumulates the
N x N sums Σ x·xᵀ and the N sums Σ x, and then writes

    c[i][k] = S·Σ x_i x_k − (Σ x_i)(Σ x_k)

which is S² times the mean-removed covariance. No division is needed, and
the constant factor does not change the eigenvectors. The matrix is then
brought to BW bits the same way the generator treats its vector. The unit
halves the largest and smallest entries with `(v + 1) >>> 1` until both fit.
For s halvings, each entry is written as ⌈c / 2^s⌉, which is the same value
as s rounded halvings.

Timing: one sample per cycle is buffered while a spike arrives. The spike's
N·N products are then added into the sums, one per cycle, on one
multiplier. A spike of the same channel that starts during that update is
ignored and counted in `dropped`. Spikes of other channels pass by
untouched. After the 64th spike the unit makes one pass to find the
extremes (N·N cycles), one cycle per halving, and one write pass (N·N
cycles). From the last sample to `done` this is 3·N·N + s + 1 cycles, which
is 3,090 cycles for the test data at the defaults. The number of spikes,
the mean removal, the scaling rule and the sequential structure are this
design's own choices. The text this design is based on names the unit and
its job, and nothing more.

Some parts of the full system are not in this RTL: the programmable control
processor, filtering and spike detection, the
system bus, the telemetry and the analog front end. Their signals are plain
ports of `spike_sort_top`.

## Interfaces

`eig_gen` (the generator on its own):

| Signal | Dir | Meaning |
|---|---|---|
| `cov_we, cov_row, cov_col, cov_wdata` | in | write one covariance entry (while idle) |
| `start, num_pc (1..H), num_iter (1..ITER_MAX)` | in | sampled while idle; assertions flag values out of range |
| `busy, done` | out | busy from the cycle after start until the last output element; done is a one-cycle pulse after it |
| `pc_valid, pc_sel, pc_idx, pc_data` | out | PC element stream, N cycles per PC |
| `rd_sel, rd_idx → rd_data` | in/out | combinational read of the final PCs |
| `state, shift_cnt` | out | FSM state; number of shift passes since reset |

`spike_sort_top` adds `train_ch`, the collection controls (`collect_start`,
`collect_ch`, `collect_busy`, `collect_done`, `spikes_dropped`), the spike
input stream and the score output described above. Reset (`rst_n`) is asynchronous and active low. It
clears control state and scalars. The data arrays are not reset because
they are always written before they are read.

## Departures and own choices

* Memories are register arrays with combinational reads. This makes a
  distilling pass exactly N·N cycles, as in the published schedule. A real
  SRAM macro with synchronous read would need its address issued one cycle
  earlier, which adds one cycle per pass.
* The shift pass re-checks its own output. This is the reading that matches
  the published cycle budget. An extra check pass after every shift would
  cost about 280k cycles instead of 192k at the defaults.
* The covariance matrix unit is built from its stated job alone. Its
  spike count (64), mean removal and scaling to BW bits are this design's
  own choices (see its section above).
* The initial vector is all ones, set in one cycle.
* The output pass takes N cycles.
* The start/done handshake, the streaming interfaces, the PC memory layout
  (one word per sample holding all H PCs) and the parallel MACs of the
  feature extractor are this design's own choices.
* The published budgets for 16-bit words (246k cycles for N = 32, 666k for
  N = 64) are lower than what this RTL takes on the synthetic test matrices
  (266,596 and 713,284 cycles). The RTL follows the algorithm exactly (the
  bit-exact model agrees), and the count depends on the data. At 16 bits the
  test matrices simply need about 25 halvings per level adjustment, against
  about 22 in the published figure.
* Everything runs at the top's clock. The fabricated system's separate
  clocks for the processor and the dedicated processors are not modelled.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. The most informative ones:

* `tb_eig_gen` builds a symmetric matrix from random spike shapes with
  weights 64:16:4:1 and quantises it to 9 bits. It compares every PC
  element, and the exact busy-cycle count, with an independent 64-bit model
  of the algorithm above. It also checks that PC1 and PC2 point along the
  true leading eigenvectors (|correlation| > 0.99 against a floating-point
  power iteration).
* `tb_eig_ctrl` plays the comparator so that level adjustments with 0, 1
  and 2 halvings all occur. It then compares the full sequence of FSM states
  and their lengths with the schedule table.
* `tb_spike_sort_top` is the end-to-end test at the default size. It trains
  channel 3 (4 PCs × 20 iterations) and channel 9 (2 PCs × 5 iterations),
  and sorts spikes on both, including one spike during training and spikes
  with idle cycles between samples. It checks the PCs, the training time,
  each score and the one-cycle score latency. It then collects 64 spikes on
  channel 12, interleaving channel 3 spikes and one spike that must be
  dropped. It trains channel 12 (2 PCs × 10 iterations) from the collected
  matrix, and checks the result against the covariance model followed by
  the generator model. It also counts that level shifts after distilling,
  level shifts after a Gram-Schmidt step, clean checks, Gram-Schmidt steps,
  sorting during training and during collection, the collection and the
  dropped spike all happened.
* `tb_cov_unit` compares all 1,024 written entries with the model above,
  and checks symmetry, the drop counter and the 3·N·N + s + 1 cycle count.
* `tb_eig_capability` runs four sizes side by side: 64/16, 32/16, 32/9 and
  16/9 samples/bits. Each size trains 4 PCs × 20 iterations and is checked
  bit-exactly, and its cycle count is compared with the published budget.

The test data are synthetic. The recorded neural data sets behind the
published accuracy figures are not included, so this RTL's sorting accuracy
on real recordings has not been measured here.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/eig_pkg.sv rtl/*.sv \
          tb/tb_spike_sort_top.sv --top-module tb_spike_sort_top
./obj_dir/Vtb_spike_sort_top
```

Replace the testbench file and top module to run another test.
`tb_eig_capability` also needs `tb/eig_cfg_run.sv`. Each run takes a few
seconds. To change the configuration, override `N`, `BW`, `H`,
`ITER_MAX`, `CH` or `LOG2S` on `spike_sort_top`, or the matching ones on
`eig_gen` or `cov_unit`. `IW` follows from `N`
and `BW`.

## Files

| File | Contents |
|---|---|
| `rtl/eig_pkg.sv` | FSM states, MAC operand selects, datapath control word |
| `rtl/eig_gen.sv` | leading eigenvector generator (wires the units below) |
| `rtl/eig_ctrl.sv` | control engine FSM |
| `rtl/cov_mem.sv`, `rtl/eig_regfile.sv`, `rtl/pc_regfile.sv` | storage |
| `rtl/eig_mult.sv`, `rtl/eig_addsub.sv`, `rtl/eig_rshift.sv`, `rtl/eig_cmp.sv` | processing units |
| `rtl/cov_unit.sv` | covariance matrix unit |
| `rtl/pc_mem.sv`, `rtl/feat_extract.sv` | on-line feature extraction |
| `rtl/spike_sort_top.sv` | top level |
| `tb/tb_*.sv` | one testbench per module, plus `tb_eig_capability` (with helper `eig_cfg_run.sv`) |
