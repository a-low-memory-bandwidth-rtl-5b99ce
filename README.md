# GMM output-probability processor with vector look-ahead

In HMM speech recognition, most of the decoding time goes into evaluating
Gaussian mixture models: for every active HMM state *j* and every frame *t*,
the recogniser needs the output probability ln b_j(x_t) of the frame's feature
vector under that state's GMM. Doing this in hardware is limited less by
arithmetic than by memory traffic, because each evaluation reads all of a
GMM's means, variances and weights.

This design attacks that with two ideas:

* **Parallel mixtures.** Four Gaussians of the same GMM are evaluated at once,
  and their results are combined by a small tree of four log-add ("addlog")
  units.
* **Vector look-ahead.** The processor buffers the present feature vector and
  the seven that follow it. When a state's parameters are fetched, they are
  applied to all eight vectors at once. The present frame's answer is returned.
  The other seven are cached. HMM states have self-transitions, so the same
  state is usually active again in the next frames, and those requests are
  answered from the cache without any memory access.

All arithmetic is 24-bit fixed point in the natural-log domain.

## What a request does

The host (the recogniser software) talks to `gmm_processor` through three streams:

1. **Feature vectors** (`fv_wr_*`): one 24-bit dimension per beat. The first
   eight vectors fill the window (frames t..t+7). After each frame advance
   (`frame_adv`), the next vector overwrites the slot the old present vector used.
2. **State requests** (`req_*`): one state ID at a time. A request is accepted
   only when the whole window is loaded.
3. **Results** (`res_*`): a one-cycle pulse carrying the state ID, ln b_j(x_t)
   and `res_hit`, which says whether the value came from the cache.

For each request, the controller (`gmm_controller`) does the following:

* **LOOKUP.** The state's cache tag holds the frame in which this state was
  last computed. If the tag is valid and the present frame is 1 to 7 frames
  after it, the cached word is returned. That takes 1 clock edge.
* **FETCH.** On a miss, the controller streams the state's parameter block from
  external memory, one word per cycle while `mem_ready` is high. Words come back
  in order, with any latency, and are decoded into lane beats as they arrive.
  Reading and computing therefore overlap.
* **WAIT.** Each of the eight `gmm_lane`s finishes ln b_j for its own frame.
  Lane 0 (frame t) is returned. Lanes 1..7 are written into the cache in one
  cycle, tagged with frame t.

With a memory that never stalls and has latency L, a miss takes
(MIX/4)·(P+1) + L + 4 clock edges from acceptance to result. That is 111 at
the default size with L = 3. The next request is accepted one edge after a
result.

## Parameter memory layout

Each memory word is 192 bits, `gmm_pkg::param_word_t`: four `mu` fields and
four `sigma` fields, one per mixture processed in parallel. A state's GMM
occupies MIX/4 groups of P+1 consecutive words:

| word in group | `mu[k]`                 | `sigma[k]`                      |
|---------------|-------------------------|---------------------------------|
| 0             | w of mixture 4g+k       | unused (0)                      |
| 1..P          | mean, dimension d-1     | −1/(2·variance), dimension d-1  |

The state's block starts at word `state · (MIX/4) · (P+1)`.

The constant w = ln λ − ½ ln((2π)^P ∏σ²) folds in the mixture weight and the
Gaussian normalisation. Both w and the `sigma` coefficients are computed
offline, so the hardware needs only one subtraction, two multiplications and
one addition per dimension.

## Arithmetic

**Word format.** All values are signed 24-bit with 10 fractional bits, giving
a range of ±8192 and a resolution of about 0.001.

**`gauss_unit`** computes w + Σ_d (x_d − μ_d)²·σ_d in two pipeline stages:

* Stage 1 squares the difference and rescales it.
* Stage 2 multiplies by σ and adds to a 48-bit accumulator.

The final score saturates to 24 bits.

**`addlog`** computes ln(e^a + e^b) as max(a,b) + f(|a−b|), where
f(d) = ln(1 + e^−d). f is read from a 256-entry table with a step of 1/32,
sampled at the centre of each step. For d ≥ 8 the correction is dropped. The
table is computed from that formula when the design is elaborated, so no data
file is involved. The worst-case error against exact log-add is a few
hundredths.

**`addlog_tree`** holds four addlog units that work at the same time:

* two combine mixtures (0,1) and (2,3);
* one combines those two results;
* one folds the group's result into the running sum for the GMM.

A GMM with MIX mixtures therefore takes MIX/4 passes through the tree.

**Cache tags.** The frame counter is 16 bits, and cache hits are decided
modulo 2^16. A tag left over from 65,536·k + 1 to 65,536·k + 7 frames
earlier would therefore look current. That is about 11 minutes of speech at a
10 ms frame shift.

## Module map

| module | role |
|---|---|
| `gmm_pkg` | word format, sizes, parameter-word struct, addlog table function |
| `gmm_processor` | top level: wires everything below |
| `feature_vector_ram` | 8-slot ring of feature vectors; reads one dimension of all slots, present frame first |
| `address_calculator` | parameter base address, cache hit test and read address, seven cache write addresses |
| `prob_cache` | 7 banks × N_ST words of cached probabilities, plus a frame tag and valid bit per state |
| `gmm_controller` | request FSM, memory request counter, decode of returned words into lane beats |
| `gmm_lane` (×8) | four `gauss_unit`s plus an `addlog_tree` for one vector |
| `gauss_unit` | one mixture's log-likelihood |
| `addlog_tree` | 4-input log-add plus accumulation over groups |
| `addlog` | 2-input log-add with table |

## Parameters and defaults

| parameter | default | origin |
|---|---|---|
| Gaussians in parallel (`NPAR`) | 4 | architecture |
| look-ahead vectors (`LA`) | 7 | architecture |
| word width (`DATA_W`) | 24 | architecture |
| fractional bits (`FRAC_BITS`) | 10 | chosen here |
| feature dimensions (`P`) | 25 | chosen here (typical MFCC + Δ + ΔE set) |
| mixtures per state (`MIX`) | 16 | chosen here; must be a multiple of 4 |
| states (`N_ST`) | 2048 | chosen here; must be a power of two |
| frame counter (`FW`) | 16 | chosen here |

The architecture fixes the parallelism, the look-ahead depth and the word
width. The model sizes are those of a typical large-vocabulary triphone model.
Set `P`, `MIX`, `N_ST` and `LA` on `gmm_processor` to match your acoustic
model. `NPAR` is fixed at 4 because the addlog tree is built for four inputs.

## Where this implementation makes its own choices

The architecture defines the blocks and their roles: the feature vector RAM,
the address calculator, the cache, four parallel Gaussians, four LUT addlog
units, and overlapped memory reading and computing. The following details are
this implementation's own choices:

* valid/ready handshakes on every port, with one request in flight;
* a direct-mapped cache with one entry per state and no replacement;
* requests held until all eight vectors are loaded, so the host must pad the
  window at the end of an utterance;
* the memory word format and layout above;
* the fixed-point scaling, the table size, the pipeline depths, and an
  active-low asynchronous reset that clears control state and cache valid bits
  (but not data arrays).

The processor has no notion of utterance boundaries. To start a new utterance,
reset it, or make sure no old tag can fall within 7 frames of a new frame number.

The cache data RAM and the feature RAM use combinational reads (distributed
RAM style). To map them onto block RAM, add a read register and one LOOKUP
cycle.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
reference functions in `tb/gmm_ref_pkg.sv`, which recompute log-add, the
Gaussian score and the full GMM with plain integer and real arithmetic. GMM
parameters and feature values are generated from hash functions of the memory
address or of (frame, dimension), so no data files are needed.
`tb/gmm_param_mem_model.sv` models the external memory. It has a fixed latency
and can drop `mem_ready` at random.

`tb_gmm_processor` runs the whole processor at its default size for 24 frames
with about ten active states per frame, 90 % of which persist into the next
frame. It checks:

* every result, bit-exact;
* the hit flag, against a model of the cache;
* the hit latency, and the miss latency while memory does not stall;
* that the number of memory reads equals misses × 104.

It also requires each of these mechanisms to occur at least once:

* a cache hit;
* a miss on a new state;
* a miss on an expired tag;
* a memory stall;
* a request held while the vector window refills;
* a vector slot being overwritten.

A typical run gives about 200 hits against about 60 misses.

`tb_lookahead_sweep` (with its helper `tb/gmm_sweep_harness.sv`) runs one
fixed trace on processors of look-ahead depth 1, 3, 5 and 7. The trace is 16
frames with 12 active states per frame, and each state persists with 90 %
probability. The testbench checks every result and requires memory reads and
busy cycles to fall as the depth grows. On this trace the parameter words read,
compared with a design without cache, drop by 45 %, 68 %, 75 % and 79 %.
Busy cycles fall from 12,154 to 5,004.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/gmm_pkg.sv tb/gmm_ref_pkg.sv tb/tb_gmm_processor.sv --top-module tb_gmm_processor
./obj_dir/Vtb_gmm_processor
```

Each testbench prints `TB_RESULT checks=N failures=M` at the end. The unit
testbenches (`tb_addlog`, `tb_gauss_unit`, `tb_addlog_tree`, `tb_gmm_lane`,
`tb_feature_vector_ram`, `tb_address_calculator`, `tb_prob_cache`,
`tb_gmm_controller`) build the same way with their own top module.

## Known limits

* Throughput has not been measured on hardware. The architecture aims at
  real-time 20,000-word recognition at about 30 MHz with about 47 Mbit/s of
  parameter bandwidth. At 30.4 MHz and a 10 ms frame, this design has 304,000
  cycles per frame. A miss costs 111 cycles and a hit 2, so even 2048 misses
  per frame would fit.
* Depths 1, 3, 5 and 7 are simulated; other depths are available through
  `LA`. Depth 0 (no cache at all) is not supported by this RTL.
* No timing or area results are given for any FPGA.
