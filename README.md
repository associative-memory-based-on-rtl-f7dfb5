# Sparse clustered-neural-network associative memory for oriented edge detection

An associative memory returns a stored pattern when it is given only part of
it, or a noisy version of it. This design stores a bank of small image
patterns (oriented edges of given intensities in N x N patches) and, given a
quantised patch from an image, returns the stored edge closest to it. The
memory is a *Sparse Clustered-based Neural Network* (Sparse-CbNN):

* the network has **c clusters** of **l neurons**; cluster j stands for
  pixel j of the patch, and neuron i of a cluster for the pixel value i+1
  (value 0, a black pixel, has no neuron);
* a pattern is **stored** by setting to 1 the binary connections between the
  neurons it activates, one per non-zero pixel, in every pair of clusters;
* a noisy patch is **decoded** iteratively: initialise the neuron states from
  the patch, then repeat ITER = 4 times a *dynamic rule* (give every neuron a
  score from its connections to active neurons) followed by an *activation
  rule* (decide which neurons stay active).

The RTL implements the architecture described in the article *"Associative
Memory based on Clustered Neural Networks: Improved Model and Architecture
for Oriented Edge Detection"*, in its four variants, selected by a
parameter. The default is the most capable variant (V4), at the size of the
5 x 5 pattern set (25 clusters of 8 neurons).

## The decoding rules and the four architectures

| ARCH      | initialisation | dynamic rule        | activation            | handles              |
|-----------|----------------|---------------------|-----------------------|----------------------|
| `ARCH_V1` | Hamming        | Boolean equation    | none (rule gives states) | erasures          |
| `ARCH_V2` | Hamming        | Sum-of-Max (SoM)    | G-WtA (k = 1)         | erasures, some intrusions |
| `ARCH_V3` | Hamming        | SoM                 | k-G-WtA, k = 4,3,2,1  | erasures, intrusions |
| `ARCH_V4` | Euclidean      | Integer-SoM (I-SoM) | k-G-WtA, k = 4N, 3N, 2N, N | additive noise and intrusions |

With e the state of a neuron, W the connection bits and j' running over the
other clusters:

* **Hamming initialisation**: in each cluster only the neuron of the pixel
  value is active.
* **Euclidean initialisation**: every neuron gets an *action potential*
  `p_i = l^2 - (v_in - v_i)^2` (a parabolic kernel of the distance between
  the pixel value and the neuron's value), and the S neurons with the highest
  potentials, i.e. the S values nearest to the pixel, are activated. A pixel
  at 0 activates nothing and gives zero potentials.
* **SoM**: `s_i = e_i + sum_j' max_i' W e_i'` - one point per distant
  cluster holding an active neuron connected to this one.
* **I-SoM**: `s_i = e_i p_i + sum_j' max_i' W e_i' p_i'` - each distant
  cluster contributes the largest potential among the active neurons
  connected to this one.
* **Boolean equation**: a neuron is active if it is connected to at least one
  active neuron in every cluster that has an active neuron. Clusters with no
  active neuron are ignored ("by-pass"), which is what lets erased pixels be
  filled in.
* **k-G-WtA**: every neuron whose score is at least the k-th highest score of
  the whole network is activated (ties included, so more than k neurons may
  win); k decreases after every iteration. G-WtA is the case k = 1.

## Datapath

```
 states(l) -> [SPM j] --idx--> [storing module j] --contributions--+
                                  (c-1 block RAMs)                 |  crossbar: module j' sends
                                                                   |  one l-bit row to each j != j'
 scores(l) <- [scoring module j] <---------------------------------+
 all scores -> [k-G-WtA] -> next states (c x l)
```

One iteration proceeds serially over the active neurons, in parallel over
the clusters:

1. **Serial Pass Module** (`spm`, one per cluster) holds the state vector of
   its cluster and emits the index of one active neuron per cycle, lowest
   first, clearing it behind.
2. **Storing module** (`storing_module`, one per cluster) holds c-1 block
   RAMs (`conn_ram`), one per distant cluster; word i of the RAM for cluster
   j' is the l-bit row of connections between local neuron i and the neurons
   of j'. Every connection is kept twice, once on each side. Reading word
   idx in all c-1 RAMs at once gives the *contribution* of the emitted neuron
   to every distant cluster; its action potential travels with it.
3. **Scoring module** (one per cluster) receives, every cycle, at most one
   contribution from each distant cluster. Per neuron and per distant
   cluster it keeps an intermediate register that folds the contributions in
   as they arrive: an OR of bits (`scoring_som`, `scoring_bool`) or the
   maximum of potentials (`scoring_isom`, b = clog2(l^2+1) bits). The
   Boolean variant presets the register of an empty distant cluster to 1
   (the by-pass). When all contributions are in, one more cycle adds the c-1
   registers and the neuron's own term (adder tree), or ANDs them (Boolean).
4. **Activation module** (`kgwta`, one for the network) finds the k-th
   highest score bit-serially from the MSB: for each bit it counts how many
   scores reach the threshold with that bit set and keeps the bit if at least
   k do. After m cycles (m = score width) the threshold is the k-th highest
   score and every neuron at or above it (and above 0) wins.

### Slot numbering and the contribution crossbar

Each cluster j numbers the other clusters with *slots* r = 0 .. c-2: slot r
is cluster r when r < j, and r+1 otherwise (`cbnn_pkg::slot_cluster`,
`cluster_slot`). The RAM in slot r of storing module j' holds the
connections to cluster `slot_cluster(j', r)`; the scoring module of cluster j
takes on its slot r the contribution of cluster j' = `slot_cluster(j, r)`
from that module's slot `cluster_slot(j', j)`. The crossbar thus has
c(c-1) l-bit links, the c^2 l^2 wiring cost inherent to the architecture.

### Storing

Storing a pattern uses the same path: the SPMs emit the (single) active
neuron of each cluster, each storing module reads its row in all c-1 RAMs,
then writes it back with the bit of the active neuron of each distant cluster
set. The memory is erased with a clear command that writes zeros to every
address, one address per cycle.

## Interface and timing (`cbnn_am`)

| port        | dir | width        | meaning |
|-------------|-----|--------------|---------|
| `clk`, `rst_n` | in | 1         | clock, asynchronous active-low reset |
| `cmd_valid` | in  | 1            | a command is presented |
| `cmd`       | in  | `cmd_e`      | `CMD_CLEAR`, `CMD_STORE`, `CMD_DECODE` |
| `patch`     | in  | C x clog2(L+1) | quantised pixels, 0 = black, 1..L |
| `cmd_ready` | out | 1            | idle; the command is taken when valid and ready are high |
| `done`      | out | 1            | one-cycle pulse at the end of a decode |
| `states`    | out | C x L        | neuron states; `states[j][i]` = pixel j has value i+1 |

Cycle counts, counted from the cycle that accepts the command:

* clear: L + 1 cycles; store: 4 cycles;
* decode: `1 + sum over the ITER iterations of (max(a_max,1) + 4)` for V1
  and `1 + sum of (max(a_max,1) + m + 4)` for V2-V4, where a_max is the
  largest number of active neurons in one cluster at the start of the
  iteration and m the score width (clog2(c+1) for SoM, clog2(c l^2+1) for
  I-SoM). The 4 fixed cycles are the SPM load, the block-RAM read of the
  last contribution, the sum, and the state write (which for k-G-WtA is the
  cycle after its m search cycles).

For the 5 x 5 set with one active neuron per cluster this gives 21 cycles
(V1) and 41 cycles (V2/V3); V4 with S = 8 and a_max = 8, 4, 3, 2 gives 78.
The article's own latency estimates are lower (8, 13 and about 32 cycles)
because they count a_max + 1 cycles per iteration for the scoring and the m
activation cycles only once; this RTL spends the extra cycles on the SPM
load, the synchronous RAM read and the state update, and runs the activation
in every iteration.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `C`       | 25      | clusters = pixels of the patch (25 = 5 x 5, 49 = 7 x 7) |
| `L`       | 8       | neurons per cluster = quantised intensities |
| `ARCH`    | `ARCH_V4` | variant, see the table above |
| `ITER`    | 4       | decoding iterations |
| `S`       | 8       | neurons activated per cluster by the Euclidean initialisation (V4) |
| `K_INIT`, `K_STEP` | from ARCH | k schedule: V2 1/0, V3 ITER/1, V4 4N/N with N = sqrt(C) |

k never goes below 1. The memory holds C(C-1)L^2 connection bits (38 400 at
the defaults, 150 528 for 49 x 8).

## Choices made in this design

The article describes the four modules, the rules and the register
organisation of the scoring modules; the following are this design's own:

* the command interface, the sequencing state machine and the memory clear;
* one-cycle synchronous RAM reads, one l-bit word per local neuron;
* lowest-index-first order in the SPM;
* the k-G-WtA search (one population count per score bit) - the article
  only names the bit-serial algorithm it uses; zero scores never win;
* the Boolean rule's own-state term: a neuron keeps its previous state
  unless its own cluster is empty, in which case it may be switched on (this
  reconciles the "previous state" input of the Boolean scoring module with
  the rule that erased clusters are filled in);
* I-SoM uses the neuron's own potential for its own term (`e_i p_i`);
* the Euclidean initialisation activates S neurons in each cluster with a
  non-zero pixel, nearest values first, the lower value first on a tie;
  pixel values above L are treated as L;
* score widths clog2(c+1) and clog2(c l^2+1), potential width clog2(l^2+1).

Not included: the image preprocessing that produces the patches
(Laplacian-of-Gaussian filter, sub-quantisation, sub-sampling), which the
article names without detail, and the earlier fully parallel
register-based architecture it compares against.

## Files

`rtl/`

* `cbnn_pkg.sv` - `arch_e`, `cmd_e`, slot mapping, widths and k defaults
* `cbnn_am.sv` - top level: clusters, crossbar, activation, sequencer
* `cluster_init.sv` - potentials and Hamming / Euclidean initialisation
* `spm.sv` - Serial Pass Module
* `storing_module.sv`, `conn_ram.sv` - connection store and its block RAM
* `scoring_som.sv`, `scoring_isom.sv`, `scoring_bool.sv` - dynamic rules
* `kgwta.sv` - k-G-WtA activation

`tb/`

* `cbnn_ref_pkg.sv` - behavioural reference model (full adjacency matrix,
  rules applied literally), oriented-edge pattern generator, Gaussian noise
* `tb_<module>.sv` - one self-checking testbench per module
* `tb_cbnn_am.sv` - default configuration (V4, 25 x 8): stores the 64
  patterns of the 5 x 5 set, decodes clean, additive-noise and
  additive-plus-intrusion patches, checks states and latency against the
  reference
* `tb_cbnn_archs.sv` - V1, V2 and V3 side by side on clean, erased and
  intruded patches
* `tb_cbnn_example.sv` - a hand-worked 6 x 9 network with three stored
  patterns: checks the exact SoM scores of an erasure and of an intrusion
  case, and that G-WtA fails on the intrusion where 3-G-WtA recovers it

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if the design hangs. The RTL carries concurrent
assertions (enabled with `--assert`): the k-G-WtA module is started only
while idle and with k >= 1, and no serial pass lasts longer than L cycles.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cbnn_pkg.sv tb/cbnn_ref_pkg.sv rtl/*.sv tb/tb_cbnn_am.sv \
  --top-module tb_cbnn_am -o sim
./obj_dir/sim
```

Replace `tb_cbnn_am` with any other testbench. The top-level testbenches take
a few minutes to compile (the 25-cluster design has some 40 000 flip-flops)
and well under a second to run. Typical results of `tb_cbnn_am` (random
noise, so they vary with the seed): all clean patterns are returned
exactly; with additive noise of variance 0.5, 1.5 and with variance 1.5 plus
two intrusions the original pattern comes back in roughly 80 %, 60 % and 70 %
of the trials (the rest are other, often equally close, stored edges). In
`tb_cbnn_archs` V3 returns the original pattern in every clean, erased and
intruded trial, V2 in most, and V1, which cannot reject intruding neurons,
in about half.

The 49 x 8 and 49 x 16 configurations elaborate and pass Verilator lint,
but their Verilator simulation models take more than 25 minutes to compile,
so the 7 x 7 pattern set has not been simulated; the largest size simulated
is the default 25 x 8. `tb_cbnn_am` can be pointed at the 7 x 7 set by
setting its `C`, `NS`, `NOR`, `K0`, `KS` localparams to 49, 7, 16, 28, 7 and
instantiating the top with `#(.C(49))`.

## Changing the design

* Size: set `C` (a square number, so that the V4 default k schedule is
  defined) and `L`; all widths follow.
* Variant: set `ARCH`; only the chosen scoring module and, for V2-V4, the
  activation module are elaborated.
* A different k schedule: override `K_INIT` and `K_STEP`.
* To shorten a decode, the SPM load can be merged with the state update and
  the RAM read with the first accumulation; the testbenches compute the
  expected latency from the formula above, so it must be updated with them.
