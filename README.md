# Spatial-spectral hyperspectral pixel classifier (PCA + SVM + KNN)

This RTL labels every pixel of a hyperspectral image, such as a brain-tissue
image with 128 bands, with one of C classes (default 4). It combines what
the pixel's spectrum says with what its neighbours say, in three stages:

* **PCA** reduces each spectrum to one number, its first principal
  component. That number measures how similar two pixels look.
* **SVM**: a linear one-vs-one support vector machine turns each spectrum
  into a vector of C class probabilities.
* **KNN** filters those probabilities spatially. Each pixel takes the
  class that wins among the K pixels nearest to it (K = 40). "Nearest" is
  measured in the space (principal component, row, column), searched
  inside a sliding window of W = 2976 pixels in raster order.

PCA and SVM are independent and run side by side on the same pass over the
image. KNN starts once both have finished. The whole design is fixed point,
synthesizable SystemVerilog with no vendor IP.

```
              pass 1 (shared)         +-----------+   PCA value per pixel
 image  ----+------------------------>| pca_kernel|--------------------+
 samples    |   pass 2 (projection)   +-----------+                    v
 (host) ----+                                                    +-----------+
            |                         +-----------+   C probs    |knn_kernel | --> label map
            +------------------------>| svm_kernel|------------->| (memories)|
                                      +-----------+              +-----------+
```

## Data flow and the host protocol

The image is not stored on chip. At 128 bands x 219,232 pixels it would take
hundreds of Mbit. Instead `hsi_classifier_top` asks the host for two passes
over it, and the `img_pass` output says which pass it wants:

1. **Pass 1 (`img_pass = 1`).** Every sample goes to both the PCA
   statistics unit and the SVM at once. `img_ready` is the AND of their two
   ready signals, so the slower of the two stalls the stream. At 128 bands
   that is the PCA's correlation accumulation. With only a few bands it is
   the SVM's probability stage.
2. **Pass 2 (`img_pass = 2`).** This starts after the power method has found
   the eigenvector. The samples go only to the PCA projection, at one
   sample per cycle.

Samples arrive pixel by pixel in raster order, band 0 first. Each sample is
an unsigned Q0.16 value, so reflectance must already be normalised to
[0, 1).

Every PCA value and every probability vector is written into the KNN
stage's on-chip memories as soon as it is produced. A small join starts
KNN once both the PCA and the SVM have signalled `done`. Labels then leave
on `label_valid`/`label_idx`/`label_out` in raster order, and `done`
pulses after the last one.

Before `start`, the SVM model is written through `cfg_we`/`cfg_sel`/
`cfg_addr`/`cfg_data`:

| `cfg_sel` | table                          | `cfg_addr`                     | format       |
|-----------|--------------------------------|--------------------------------|--------------|
| 0         | weight vector of a classifier  | classifier x B_MAX + band      | Q15.32       |
| 1         | bias rho                       | classifier 0..C(C-1)/2-1       | Q15.32       |
| 2         | sigmoid slope A                | classifier                     | Q15.32       |
| 3         | sigmoid offset B               | classifier                     | Q15.32       |
| 4         | class label                    | class 0..C-1                   | integer      |

Classifiers are numbered in pair order (0,1), (0,2), ... (0,C-1), (1,2), ...
Class labels reset to 1..C.

Status outputs report:

* the dominant eigenvalue, the number of power iterations, and whether the
  power method converged;
* how many pixels KNN handled with each of its three window shapes
  (see below).

## Number formats (`hsi_pkg`)

| type     | format          | use                                              |
|----------|-----------------|--------------------------------------------------|
| `pix_t`  | unsigned Q0.16  | image samples                                    |
| `fx_t`   | signed Q15.32   | every internal value: means, covariances, eigenvector, decision values, probabilities |
| `pca_t`  | signed Q15.16   | first principal component handed to KNN          |
| `prob_t` | unsigned Q1.15  | class probabilities handed to KNN (1.0 = 0x8000) |

The reference algorithm works in single and double floating point. The
fixed-point choice is this design's. Products are formed at full width
(96 bits) and truncated back. Two helpers handle every iterative step that
needs one:

* `fx_div`: a shared radix-2 restoring divider, 80 cycles.
* `fx_sqrt`: a digit-by-digit square root, 48 cycles.

## PCA stage

`pca_kernel` runs three units in sequence.

**`pca_stats`: one pass for the mean and the covariance.** Each pixel's
bands are buffered. Then the upper triangle of the correlation matrix
Σ x·xᵀ is accumulated, one multiply-accumulate per cycle, together with the
band sums. After the last pixel a single division gives 2⁶⁴/N. From it the
unit forms the mean μ and the covariance VM = CM/N − μμᵀ (population
divisor). Doing this in one pass avoids a centred copy of the image.
Cost: B(B+1)/2 cycles per pixel, which is 8,256 cycles at 128 bands. This
is the slowest part of the design.

**`pca_power`: power method.** The method:

1. Start from x = 0.1 in every band.
2. Compute v = VM·x, at one product per cycle.
3. Estimate the eigenvalue by the Rayleigh quotient λ = (x·v)/(x·x).
4. Scale v to unit length with one square root and one reciprocal.
5. Stop when |λ − λ_prev| < 10⁻⁶, after at least two iterations, or after
   100 iterations.

`converged` tells the two stop conditions apart. The unit-length scaling is
this design's choice: it keeps the vector inside Q15.32.

**`pca_project`: second pass.** Computes Σ_b (x_b − μ_b)·e_b with the
centring done on the fly, at one sample per cycle. Each pixel's result
appears one cycle after its last band.

## SVM stage

`svm_kernel` has three units in a pipeline, each handling one pixel at a
time.

**`svm_decision`** accumulates all C(C−1)/2 decision values
Σ x_b·w_b − ρ in parallel, one band per cycle. It holds its result until
the next stage takes it. While it holds, the input stalls.

**`svm_sigmoid`** turns a decision value into the pairwise probability
σ = 1/(1+e^f), where f = dec·A + B.

* It uses the numerically safe split form: it computes e^−|f| and then
  takes either 1/(1+e^−|f|) or its complement.
* The exponential is 2^−(|f|·log₂e).
  * The integer part of the exponent is a shift.
  * The fraction part comes from a 33-entry table of 2^−k/32 with linear
    interpolation. The table is built from that formula.
* Absolute error is below 2·10⁻⁵.
* One reciprocal by `fx_div` follows. About 85 cycles per classifier.

**`svm_coupling`** merges the C(C−1)/2 pairwise probabilities into C class
probabilities, using the iterative Q-matrix method of LIBSVM:

* Q_tt = Σ_j r_jt² and Q_tj = −r_jt·r_tj.
* Start from p = 1/C.
* Each iteration forms Qp and pᵀQp. It stops when max_t |Qp_t − pᵀQp|
  < 0.005/C, or after 100 iterations.
* Otherwise it updates each class in turn: p_t += (pᵀQp − Qp_t)/Q_tt,
  followed by renormalisation through 1/(1+diff).
  * That is two divisions per class, about 170 cycles.
  * An iteration for C = 4 therefore costs about 700 cycles.

The coupling unit copies Q at start. The sigmoid unit can therefore already
work on the next pixel's pairs while coupling runs.

The kernel writes the probabilities into their class-label positions. It
also reports the label of the most probable class, with ties going to the
first class.

## KNN stage

`knn_kernel` keeps two preloaded memories of N_MAX entries:

* the PCA value of every pixel (32 bits);
* the C probabilities of every pixel (C x 16 bits).

For query pixel i it works in four steps.

1. **Window (`knn_window`).** Candidates are the pixels
   [max(0, i−SW), min(N, i+SW)), where SW = W/2. For the first SW pixels
   only the upper bound moves: this is the *top* window. In the middle both
   bounds move: the *constant* window of W pixels. For the last SW pixels
   only the lower bound moves: the *bottom* window. The reference
   implementation runs these three cases as three kernels. Here one
   datapath serves all three, and `knn_cnt_top/const/bot` count how many
   pixels each shape handled.
2. **Distance.** d = (PCA_i − PCA_j)² + (row_i − row_j)² + (col_i − col_j)².
   * A row or column step weighs the same as one unit of the principal
     component.
   * The squared distance is kept, since only the order matters.
   * Row and column come from counters that follow the raster scan. There
     is no division by the image width.
   * One candidate is scanned per cycle.
3. **Neighbour list (`knn_kselect`).** A sorted list of K entries.
   * Each new distance is inserted behind all entries that are smaller *or
     equal*, so ties keep their scan order.
   * Zero distances are skipped. That drops the query itself, and also any
     exact duplicate.
   * The result is the same set the reference gets with its K passes over
     the window, where each pass takes the next larger distance with all
     its ties, in scan order. The testbench checks this equivalence
     directly.
4. **Vote.** The kernel sums the C probabilities of the kept neighbours and
   labels the pixel with argmax + 1. The reference divides by K first,
   which does not change the argmax.

Cost: about (window length + neighbours + 6) cycles per pixel, which is
about 3,000 cycles at W = 2976.

## Sizes and capacity

Default parameters of `hsi_classifier_top`:

* `B_MAX = 128` bands
* `N_MAX = 219232` pixels
* `C = 4`
* `K = 40`
* `W = 2976`

Band and pixel counts are run-time inputs up to those maxima.

At these defaults, yosys coarse synthesis gives:

* about 2,100 cells;
* 9 kbit of flip-flops;
* 22.7 Mbit of memory. Almost all of it is the two KNN memories,
  219,232 x (32 + 64) bits.

| image (bands)                 | pixels    | runs on the default build? |
|-------------------------------|-----------|----------------------------|
| brain PB1C1, 496 x 442 (128)  | 219,232   | yes, exactly at N_MAX      |
| brain PB2C1, 493 x 475 (128)  | 184,875   | yes                        |
| brain PB3C1, 329 x 377 (128)  | 124,033   | yes                        |
| skin PD1C1, 1000 x 1000 (100) | 1,000,000 | no: the KNN memories would need N_MAX = 1,000,000 (about 96 Mbit) |

### Run time at full size

Estimated cycle counts for a 219,232-pixel, 128-band image, using the
per-unit costs above:

| phase                         | cost per pixel                     | total            |
|-------------------------------|------------------------------------|------------------|
| pass 1 (statistics)           | 128 + 8,256 cycles                 | about 1.84 G     |
| pass 1 (SVM, runs alongside)  | about 500 cycles of sigmoids, plus about 700 per coupling iteration, overlapped | hidden behind PCA |
| pass 2 (projection)           | 128 cycles                         | about 28 M       |
| KNN                           | about 3,000 cycles                 | about 0.66 G     |

The total is about 2.5 G cycles. Every datapath does one multiply-accumulate
or one comparison per cycle. To go faster, widen the correlation
accumulation in `pca_stats` (several MACs per cycle) and the window scan in
`knn_kernel`. No clock frequency is claimed here.

## Departures from the reference algorithm

* Fixed point instead of float and double. PCA results agree with a
  double-precision model to about 10⁻³, and class probabilities to about
  3·10⁻³.
* exp() is approximated by a table with interpolation.
* The eigenvector is normalised to unit length at every power-method
  iteration.
* The convergence test uses |Δλ|.
* The KNN window scan takes one candidate per cycle. The reference reads
  its local PCA memory 12 values at a time (loop unroll of 12, with
  replicated RAMs).
* One KNN datapath replaces the three region kernels. A sorted insertion
  list replaces the K-pass neighbour search; both give the same neighbours.
* The KNN vote is not divided by K.
* The image is streamed from the host twice, not read from a host buffer.
* Not built:
  * image preprocessing (calibration, denoising, band averaging,
    normalisation);
  * the host program;
  * the FPGA board shell.

## Simulation

Every block has a self-checking testbench in `tb/`, which ends with a
`TB_RESULT checks=… failures=…` line. The reference models are in
`tb/tb_ref_pkg.sv` and work in double precision:

* power iteration;
* sigmoid;
* pairwise coupling;
* the K-pass neighbour search.

| testbench               | what it checks                                                        |
|-------------------------|-----------------------------------------------------------------------|
| `tb_pca_stats`          | means and covariance against the direct two-pass formulas; cycle count |
| `tb_pca_power`          | eigenvalue and unit eigenvector against a 1000-iteration float power method; convergence |
| `tb_pca_project`        | projections, pixel numbering, one sample per cycle                    |
| `tb_pca_kernel`         | full PCA stage on a small image with one dominant direction           |
| `tb_svm_decision`       | decision values; input held while the consumer stalls                 |
| `tb_svm_sigmoid`        | sigmoid over both signs and saturating ranges; latency                |
| `tb_svm_coupling`       | coupling against the float iteration; consistent inputs give back their p |
| `tb_svm_kernel`         | whole SVM chain with shuffled labels                                  |
| `tb_knn_window`         | bounds and region against the incremental window updates              |
| `tb_knn_kselect`        | neighbour set against the K-pass search, with many ties and zeros     |
| `tb_knn_kernel`         | every label against a KNN model; region counts                        |
| `tb_hsi_classifier_top` | end to end at small size (see below)                                  |
| `tb_hsi_full`           | end to end at the default parameters (see below)                      |

`tb_hsi_classifier_top` runs a 6 x 8-pixel, 6-band image with C = 4, K = 4
and W = 10. It checks:

* every PCA value and probability vector against the float models;
* every final label against the KNN model, applied to the design's own
  intermediate values, so that comparison is exact.

It also counts the mechanisms of the design and fails if one never
happened:

* stalls of the shared first pass;
* the switch to the projection pass;
* power-method convergence;
* coupling iterations;
* all three window shapes;
* labels changed by the spatial filter.

`tb_hsi_full` instantiates the top with no parameter overrides. It uses a
128-band, 30 x 100-pixel image: 3,000 pixels is just more than one window,
so all three window shapes occur. The checks are:

* all PCA values and probabilities;
* every 25th label against the KNN model;
* the order and range of all labels;
* the exact region counts (1488/24/1488).

It takes about two minutes in Verilator.

To run one testbench with Verilator (5.x) from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style -Irtl -Itb -y rtl -y tb \
  rtl/hsi_pkg.sv tb/tb_ref_pkg.sv tb/tb_hsi_classifier_top.sv \
  --top-module tb_hsi_classifier_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one.
