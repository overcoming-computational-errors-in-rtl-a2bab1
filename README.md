# DDHR: sensor classifiers that learn their own hardware faults

Low-power sensing hardware built in aggressively scaled or loosely margined technology will
compute wrong values. This design takes the view that, for a classifier, a wrong feature is
not necessarily a wrong decision: if the feature-extraction hardware is faulty in a
consistent way, a machine-learning model that was trained on the *faulty* features still
separates the classes. The idea is called data-driven hardware resilience (DDHR).

The design therefore splits each sensing system in two:

* a large **fault-affected** part, the feature extractor, which may contain stuck-at faults
  and is not protected at all, and
* a small **fault-protected** part: the support-vector-machine (SVM) classifier, the epoch
  control and the training buffer. In a real chip this part is built with margins (or
  redundancy) that the extractor does not get.

At start-up the classifier holds a model trained on error-free data. While the system runs,
an *active-learning* buffer keeps the feature vectors that land close to the decision
boundary, together with the correct label produced by a separate, error-free *auxiliary
labeling system*. A trainer (software on a microcontroller) builds a new, error-aware model
from those vectors and loads it into the classifier. Only the vectors near the boundary are
needed, so one 2 kB buffer per system is enough.

Two systems are built, and stand side by side in `ddhr_top`:

| system | input | features | kernel |
|---|---|---|---|
| EEG seizure detector | 2 channels, 12-bit, 600 Hz | 7 band energies x 3 epochs x 2 channels = 42 | RBF |
| ECG arrhythmia detector | 1 channel, 16-bit | 7-stage wavelet transform of 256 samples = 256 | polynomial (degree 2) |

The microcontroller, the auxiliary labeling system and the trainer are software and are not
part of the RTL. `ddhr_top` gives them ports: a configuration write bus, a label input per
system, and buffer status, clear and read ports.

## Module hierarchy

```
ddhr_top
├── seizure_detector
│   ├── eeg_channel  (x2)
│   │   ├── fir_mac            decimation filter, 143 taps, keeps 1 of 8
│   │   ├── fir_mac  (x7)      band-pass filters, 47 taps
│   │   ├── abs_accum (x7)     sum of |x| over an epoch
│   │   └── epoch_buffer       epochs N, N-1, N-2
│   ├── epoch_counter          shared, fault-protected
│   ├── fault_injector         1092 stuck-at muxes on the feature bits
│   └── svm_classifier         fault-protected, RBF model
├── arrhythmia_detector
│   ├── dwt_engine             7-stage wavelet transform
│   ├── fault_injector         8704 stuck-at muxes on the feature bits
│   └── svm_classifier         fault-protected, polynomial model
├── al_buffer (EEG)            14 entries in 2 kB
└── al_buffer (ECG)            1 entry in 2 kB
```

`ddhr_pkg` holds the configuration map and the kernel enumeration. Every module opens with a
comment that gives its function, interface and cycle timing.

## The SVM kernel (`svm_classifier`)

This is the heart of the design and its least obvious arithmetic.

### Decision function

For an input vector x the classifier computes

```
dval = sum_j  a_j * K(sv_j, x)  +  b          a_j = y_j * alpha_j (signed, 16 bit)
cls  = (dval >= thresh)
mdist = dval - thresh
```

`mdist` is the signed distance from the decision boundary. It decides the class and it is also
the quantity active learning looks at. The threshold is a register rather than fixed at zero,
so the operating point (sensitivity against false alarms) can be moved without retraining.

### Schedule

One multiply-accumulate unit works through the model sequentially:

* for support vector j, D cycles accumulate either the dot product `x . sv_j` (linear and
  polynomial kernels) or the squared distance `|x - sv_j|^2` (RBF) in full precision;
* one more cycle turns the sum into a kernel value and adds `a_j * K` to the decision sum;
* after the last support vector one cycle adds the bias and compares with the threshold.

`done` therefore rises **nsv·(D+1)+2 cycles** after `start`, where `nsv` is the number of
support vectors loaded (register, up to the NSV parameter, 16 by default). At the defaults
that is 690 cycles for the seizure model and 4114 cycles for the arrhythmia model, far below
the time between vectors (2 s of EEG, 256 ECG samples).

### Kernel evaluation in fixed point

The accumulated sum s is first scaled: `z = s >>> kshift` (kshift is a register). Then:

| kernel | value K |
|---|---|
| linear | `z`, saturated to 33 bits |
| poly2 | `(sat16(z) + poly_c)^2` |
| RBF | `2^16 · 2^-(v)`, with `v = sat24(z) · gamma / 2^16` |

The RBF kernel `exp(-|x-sv|^2 / 2σ²)` is rewritten with base 2, so that the integer part n of
v becomes a right shift. The fractional part f uses the chord `2^-f ≈ 1 - f/2`. The chord
is exact at f = 0 and f = 1 and reads at most 6.1 % high in between. That error has the same
sign for every support vector, so it bends the kernel slightly but leaves it monotonic. To
load a given σ choose

```
gamma = 2^(16 + kshift) · log2(e) / (2 σ²)
```

K = 2^16 stands for 1.0. The kernel values are 33-bit signed numbers and the decision sum is
64 bits wide, so it cannot overflow at 16 support vectors.

### Model memory and loading

The support vectors are stored as features of the same width as the input (26-bit unsigned for
EEG, 34-bit signed for ECG), so a trained model can use any vector taken from the training
buffer directly. All model state is written through the configuration bus (next section). A
new model can be loaded between two classifications. The trainer watches `*_svm_busy` and
loads while it is low.

## Seizure-detector feature extraction

Each EEG channel (`eeg_channel`) runs:

1. **Decimation filter** (`fir_mac`, 143 taps, order 142, 12-bit taps in Q1.11). It keeps
   one output in eight: 600 Hz in, 75 Hz out, 12-bit saturated output.
2. **Seven band-pass filters** (`fir_mac`, 47 taps, order 46, 8-bit taps) with centres 0, 4,
   7, 10, 13, 16, 19 Hz and 5 Hz bandwidth. Their outputs are kept at full 26-bit precision
   (12 + 8 + 6 bits of growth).
3. **Energy accumulators** (`abs_accum`). Each sums |band output| over a 2 s epoch
   (150 decimated samples) and saturates at 2^26-1.
4. **Epoch buffer** (`epoch_buffer`). It keeps the seven energies of the current and the two
   previous epochs: 21 features per channel, newest epoch first, bands in order within an epoch.

`fir_mac` is one sequential MAC with a circular delay line. It takes TAPS cycles per output
and computes only the outputs that the decimation keeps. `in_ready` drops while it computes,
and data arriving at the sample rate never sees it low.

The `epoch_counter` is shared by all channels and counts band-output strobes of channel 0.
It belongs to the fault-protected part: a fault in it would misalign every feature.
`seizure_detector` concatenates the channel vectors (channel 0 first) into the 42-feature
vector and starts the classifier when it is complete, once per epoch. The first vector
appears after three epochs (6 s).

The filter coefficients are loaded at run time. Only the bands and orders are fixed.

## Arrhythmia-detector wavelet transform (`dwt_engine`)

The ECG is cut into non-overlapping blocks of 256 samples. For each block a 7-stage
discrete wavelet transform runs. Stage s splits its input into a high-pass and a low-pass
half with a pair of order-4 (5-tap) filters, decimated by two:

```
hp[n] = sat34( sum_k h[k] · x[2n+1-k] >>> 14 )      lp[n] likewise with g[k]
```

with zero history before the block. The low-pass half feeds the next stage. The 256 features
are S1 HPF (128 values), S2 HPF (64), …, S7 HPF (2) and finally S7 LPF (2). All values are 34
bits wide. The same programmable h/g pair serves every stage. The halving bandwidth of
the later stages (90 Hz, 45 Hz, …) comes from the decimation, not from different taps.

One pair of MAC units serves all stages. Two ping-pong buffers hold the running low-pass
sequence, and the first of them also collects the input samples. A transform takes
**1525 cycles** (`(128+64+…+2)·6 + 1`). `run_en` holds the transform back while the
classifier is still reading the previous features. That is the only back-pressure in the
system: while a transform is held, `in_ready` is low.

## Fault emulation (`fault_injector`)

Each feature bit passes through a 2:1 multiplexer:

```
node_out[i] = faultCtrl[i] ? faultVal[i] : node_in[i]
```

Setting `faultCtrl[i]` makes the bit stuck at `faultVal[i]`. The control and value bits are
registers, written as 64-bit words through the configuration bus: local address 2w is
`faultCtrl[64w+63:64w]`, 2w+1 is `faultVal[64w+63:64w]`. The seizure detector has 1092
injectable bits (42 × 26), the arrhythmia detector 8704 (256 × 34). A reset clears every fault.

Faults act on the feature outputs of the extractors, so any stuck-at pattern on the features
can be produced. Faults deep inside a filter would spread through later samples as well; this
model does not produce that.

## Active learning (`al_buffer`)

After every classification, with active learning enabled, the result is *selected* when

```
|mdist| <= margin
```

`margin` is a 64-bit register per system. A selected vector is stored together with the auxiliary label,
which must be valid on `*_aux_label` in the cycle of `*_done`. Each entry holds D features plus one label bit. The
depth is the number of entries that fit in 2 kB:

* EEG: 42 × 26 + 1 = 1093 bits per entry → 14 entries
* ECG: 256 × 34 + 1 = 8705 bits per entry → 1 entry

`*_al_sel` pulses for each selection. When the buffer is full, further selections are counted
in `*_al_dropped` and discarded. The trainer reads entries with `*_rd_entry`/`*_rd_feat`
(combinational read of one feature and the entry's label). After it has loaded a new model
it pulses `*_al_clear`, which starts the next iteration.

## Configuration map

`cfg_addr[19:16]` selects the target, `cfg_addr[15:0]` is the address inside it, and
`cfg_wdata` is 64 bits (narrower registers use the low bits).

| target | contents | local address |
|---|---|---|
| 0 | EEG decimation taps | tap |
| 1 | EEG band-pass taps | band·64 + tap |
| 2 | seizure SVM model | see below |
| 3 | seizure fault registers | 2w ctrl, 2w+1 value |
| 4 | wavelet taps | 0–4 high-pass, 8–12 low-pass |
| 5 | arrhythmia SVM model | see below |
| 6 | arrhythmia fault registers | 2w ctrl, 2w+1 value |
| 7 | active learning | 0 EEG enable, 1 EEG margin, 2 ECG enable, 3 ECG margin |

The tap writes go to both EEG channels. SVM model addresses: `j·D + i` is feature i of support vector j;
`F000+j` is a_j; `F100` bias, `F101` threshold, `F102` kernel (0 linear, 1 poly2, 2 RBF),
`F103` kshift, `F104` gamma, `F105` poly_c, `F106` number of support vectors. After reset the
kernel is RBF and no support vectors are loaded (dval = bias = 0).

## Departures from the described hardware and choices made here

* **Fault placement.** Faults are meant to sit on random output nodes of the synthesized
  gate-level extractor (up to ~110k nodes for EEG). Here they are muxes on the feature bits,
  because RTL has no gate netlist. The document's counts of faulted nodes (4–40 for EEG, up to
  4000 for ECG) fit in the 1092 and 8704 available muxes.
* **Polynomial kernel.** The arrhythmia model uses a "low-energy" polynomial formulation that
  is not described. A plain degree-2 kernel is built.
* **RBF exponential** by base-2 shift plus a linear chord (above); other approximations are possible.
* **Filter and wavelet coefficients** are not given; all taps are run-time registers. The tap
  widths (12-bit decimator, 8-bit band filters, 16-bit wavelet taps in Q2.14) are choices.
* **Energy feature** is the sum of absolute values, as the block diagram labels it, not a sum
  of squares.
* **Number of support vectors** (16), all fixed-point formats, and sequential one-MAC
  schedules are choices.
* **Training buffer** size is read as 2 kB for vectors plus labels. Overflow behaviour, clear
  and the read port are choices. The random-selection learner is an alternative that was only
  compared against, and it is not built.
* **EEG channel count** is 2 (the demonstrated configuration). Up to 18 are possible with
  `EEG_NCH`, and then the buffer holds a single vector.
* **Not built:** the microcontroller, the auxiliary labeling system, the trainer, the power
  monitor and the FPGA/Ethernet test set-up. They are replaced by ports, and the testbench
  takes their role.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv` that compares against values
computed independently (`tb/ddhr_ref_pkg.sv` holds bit-exact reference models of the FIR
channel, the wavelet transform and the SVM). Every testbench ends with the line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

With Verilator 5 (the simulator used has two states; everything read is reset):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ddhr_pkg.sv tb/ddhr_ref_pkg.sv tb/tb_ddhr_top.sv \
    --top-module tb_ddhr_top -o sim
./obj_dir/sim
```

Only the two packages and the testbench need to be listed. Verilator finds the modules in
`rtl/` through `-Irtl`. For another block, replace the testbench file and `--top-module` with
`tb_<block>`. The package `ddhr_ref_pkg` is needed only by the testbenches that import it, but
listing it does no harm. The full-size run builds in well under a minute and simulates in
about 8 s.

`tb_ddhr_top` runs the whole design at its default parameters: both detectors at full
size, 16 support vectors each, 2 kB buffers. It acts as the microcontroller. It loads
taps and initial models, streams random EEG and ECG data at once, and checks every decision
against the reference models. It also checks which vectors land in the buffers, reads them back,
reloads models, clears buffers and switches stuck-at faults on part way through. It counts each
mechanism (epoch close, classification, faulted classification, selection, overflow,
read-back, reload, clear, transform stall) and fails if any never happens. It runs in
seconds. `tb_dwt_engine`, `tb_arrhythmia_detector` and `tb_epoch_counter` also run at the
default sizes. The other block testbenches set smaller filter lengths, epochs, vector sizes or
support-vector counts so that each corner case is reached in few cycles.
