# Reconfigurable interconnected PUF network

A single arbiter PUF is a linear function of its challenge in disguise.
Given a few thousand challenge-response pairs (CRPs), logistic regression or a
small neural network learns it almost perfectly. This design makes the function
much harder to learn in two ways:

1. **Interconnection.** Many arbiter PUFs are wired into a network. The
   responses of one group of PUFs (a *node*) become the challenge of the next
   node, after their bit order has been permuted by a *shuffler*. Several such
   chains run side by side, and their outputs are XORed.
2. **Reconfiguration.** The shuffler permutations are held in registers. A
   counter counts the CRPs handed out. After `THETA` of them, a new random
   permutation is drawn for every shuffler, which gives a completely different
   challenge-response mapping. `THETA` is chosen below the number of CRPs an
   attacker needs to model one mapping, so the attacker never collects enough.

The default size is a 64-bit network with depth 4 and width 4, reconfigured
every 358,350 CRPs. That is half of an estimated 716,703 CRPs needed to predict
one response bit with 95 % accuracy.

## Structure

```
                 +-------------------- ipn_network ---------------------+
challenge[N] --->| path 0: node(N x N) -> shuf -> node -> shuf -> node -> shuf -> node(K x N) |--+
             +-->| path 1: ...                                          |  |  XOR
             +-->| path 2: ...                                          |  +-----> response[K]
             +-->| path 3: ...                                          |  |
                 +------------------------------------------------------+
                            ^ cfg: WIDTH*(DEPTH-1) permutations of N entries
 crp_counter --threshold--> config_gen <--rnd-- config_rng
```

| module | what it is |
|---|---|
| `ipn_top` | The whole block: challenge/response handshake, CRP counter, random source, configuration generator, network |
| `ipn_network` | `WIDTH` chains fed by the same challenge; their K-bit outputs are XORed |
| `ipn_chain` | `DEPTH` nodes in a row, with a shuffler between each pair |
| `ipn_node` | `M` arbiter PUFs of `N` stages that share one challenge |
| `ipn_shuffler` | An N-bit permutation: `data_o[cfg[i]] = data_i[i]` |
| `apuf` | Behavioural model of an arbiter PUF (numerical delay race) |
| `crp_counter` | Counts CRPs. Pulses `reached` on every `THETA`-th one and restarts at 0 |
| `config_rng` | 32-bit Galois LFSR, x^32 + x^22 + x^2 + x + 1 |
| `config_gen` | Holds the permutations and redraws them with an in-place Fisher-Yates shuffle |
| `ipn_pkg` | Delay-hash functions, the per-PUF seed scheme |

### Terms

* **Node of size M and length N.** M arbiter PUFs, each with N stages, all
  receiving the same N-bit challenge. It produces M response bits. If M = N the
  node is *homogeneous*.
* **Edge / shuffler.** Connects one node to the next. Its *configuration
  vector* lists, for each input bit, the binary number of the output bit it
  goes to. For example, bit reversal is {N-1, ..., 1, 0}.
* **Depth.** The number of nodes on the shortest path from input to output.
* **Width.** The number of nodes that share the same input. Here, that is the
  number of parallel chains.

## The configuration and its redrawing

This is the part that needs the most care.

**Storage.** `config_gen` holds `NVEC = WIDTH*(DEPTH-1)` vectors of N entries,
each entry `$clog2(N)` bits wide. At the defaults that is 12 × 64 × 6 = 4,608
flip-flops. Vector `p*(DEPTH-1)+d` drives the shuffler after node `d` of
path `p`. Reset loads the identity permutation into every vector.

**Drawing.** A shuffler only behaves as a true edge if its vector is a
permutation. A random bit string would send two inputs to one output and leave
another output empty. So the vectors are not filled with raw random bits.
Instead they are shuffled in place. For each vector, and for i = N-1 down to 1,
the generator:

* takes a random index `j = floor(rnd * (i+1) / 2^32)`, which lies in 0..i;
* swaps entries i and j.

This is one swap per clock, and each swap uses one fresh 32-bit LFSR word.
Every intermediate state is still a permutation. Shuffling an existing
permutation with fresh randomness gives a uniformly random new one, so
nothing needs to be cleared between drawings. A drawing takes exactly
`NVEC*(N-1)` cycles: 756 at the defaults.

**Timing at the top** (`ipn_top`):

* After reset, `reconfiguring` is high and `chal_ready` is low for
  1 + `NVEC*(N-1)` cycles. In that time the first random configuration is
  drawn. No challenge is ever answered with the identity configuration.
* A challenge is accepted when `chal_valid && chal_ready`. Its response is
  registered and appears with `resp_valid` in the next cycle.
* The `THETA`-th CRP since the last drawing is still answered with the old
  configuration. From the next cycle, `chal_ready` is low for `NVEC*(N-1)`
  cycles while the new configuration is drawn. The vectors change during this
  time, so the network is not sampled; an assertion checks this.
* `reconfig_count` counts completed drawings, including the one at power-up.
  `crp_count` shows the position inside the current period.

**Randomness.** The LFSR is deterministic. Its seed (`RNG_SEED`) fixes the
whole sequence of configurations, which is convenient for verification. A
deployed device would feed `config_gen.rnd` from a true random source; the
interface does not change.

## The arbiter PUF model

A real arbiter PUF races two edges through N switch stages. Challenge bit i
decides whether stage i passes the two edges straight through or crosses them.
An arbiter latch at the end reports which edge arrived first. The outcome
depends on manufacturing variation, so the block cannot be written as logic.
`apuf` is therefore a behavioural model of that race:

```
diff = 0
for stage i = 0 .. N-1:
    if c[i] == 0: diff = diff + a_i        # straight, keeps the sign
    else:         diff = -diff + b_i       # crossed, the edges swap
response = (diff > 0)
```

`a_i` and `b_i` are the straight and crossed delay differences of stage i.
They are fixed at elaboration by `ipn_pkg::stage_delay(seed, i, crossed)`:

* a 32-bit integer hash of the seed and the stage number;
* its four bytes summed and centred, giving a roughly Gaussian value in
  [-510, 510].

Every PUF in the network has its own seed,
`puf_seed(CHIP_SEED, path, level, index)`. Changing `CHIP_SEED` gives a
different "chip". The model is noise-free, and a tie answers 0.

The model is synthesizable in the narrow sense that it is only adders and sign
flips. It is not a PUF, though: anyone who knows `CHIP_SEED` can compute every
response. For silicon, `apuf` must be replaced by a real delay-chain arbiter
PUF with the same ports (`challenge[N-1:0]` in, `response` out).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | challenge width; length and size of the inner nodes; shuffler width |
| `DEPTH` | 4 | nodes per path (at least 2) |
| `WIDTH` | 4 | parallel paths |
| `K` | 64 | size of the last node of each path, i.e. response width (≤ N) |
| `THETA` | 358,350 | CRPs per configuration |
| `CHIP_SEED` | 0x1F2E3D4C | selects the modelled PUF delays |
| `RNG_SEED` | 0xACE12468 | LFSR start value (0 is replaced by 1) |

At the defaults the network holds 1,024 arbiter PUFs of 64 stages (65,536
stages in total) and 4,608 configuration bits. The threshold `THETA` comes
from a sample-complexity estimate made off-chip:

    Theta = (m * k * n' + ln(1/delta)) / epsilon

where m is the depth, k the number of stages, n' the minimum path width,
delta the failure probability and epsilon the learning error. The hardware
only compares the count with the constant.

## Where this design makes its own choices

The network's structure and the reconfiguration principle are as described
above. The following choices are this implementation's own:

* **Node sizes.** In general, node sizes may shrink along a chain
  (n ≥ m ≥ l ≥ k). Here every inner node is homogeneous (N × N), so all
  shufflers are N wide and one generator serves them all. Only the last node
  may be smaller (`K`).
* **Merging parallel paths.** Paths are merged by bitwise XOR, in the manner of
  an XOR PUF. Richer topologies (one-to-many, many-to-one, many-to-many edges
  between nodes) are not built.
* **Interface.** The valid/ready handshake, the one-cycle response latency,
  stalling during reconfiguration and drawing at power-up.
* **Random source and drawing.** The LFSR and the Fisher-Yates drawing with
  multiply-based range reduction. Its bias is below 2^-26 per index.
* **Storage of the configuration.** The vectors sit in plain registers. Hiding
  the configuration vectors behind a further set of PUFs, so that they need
  not be stored, is a possible extension but is not implemented.
* **Response width.** `K` = 64, i.e. homogeneous last nodes. Security figures
  for such networks usually refer to a single response bit.

## Verification

Each testbench compares against a reference model in `tb/ipn_ref_pkg.sv`,
which is written independently of the RTL:

* The arbiter PUF is evaluated in its linear parity-feature form,
  `2·diff = Σ P(i+1)(a_i+b_i) + P(i)(a_i−b_i)` with `P(i) = Π_{j≥i} (c_j ? −1 : 1)`,
  rather than by the stage recurrence. Both forms must agree.
* The shuffler, the LFSR and the Fisher-Yates drawing are modelled separately.

| testbench | what it checks |
|---|---|
| `tb_apuf` | 3 instances (64 and 16 stages) on 3,000 challenges; responses not stuck; instances differ |
| `tb_ipn_shuffler` | 64- and 8-bit shufflers, bit reversal and random permutations |
| `tb_ipn_node` | homogeneous 64×64 and heterogeneous 16×8 nodes, PUF by PUF |
| `tb_ipn_chain` | 16-bit depth-3 chain under 8 random configurations |
| `tb_ipn_network` | 16-bit depth-3 width-3 network under 4 configurations |
| `tb_crp_counter` | thresholds 7 and 358,350 with random event gaps; pulse positions and counts |
| `tb_config_rng` | every state against a bitwise model; zero seed |
| `tb_config_gen` | exact busy length, `done` position, permutation invariant in every cycle, equality with a reference shuffle fed the same words |
| `tb_ipn_top` | end to end at N=16, depth 3, width 2, THETA=40: every response, stall lengths, counters; counts reconfigurations, stalled offers, checked responses and remaps of a fixed probe challenge |
| `tb_ipn_top_full` | `ipn_top` at its defaults: power-up drawing, one full period of 358,350 CRPs (sampled responses checked), the reconfiguration it triggers, the probe afterwards |

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ipn_pkg.sv tb/ipn_ref_pkg.sv tb/tb_ipn_top.sv --top-module tb_ipn_top
./obj_dir/Vtb_ipn_top
```

`tb_ipn_top` and `tb_ipn_top_full` share their checks through
`tb/ipn_top_checks.svh`. Build times:

* Each of the 1,024 PUF instances becomes a separately specialised module.
  The full-size build takes about a minute of C++ compilation.
* The full-size run simulates about 450,000 cycles in 4 to 5 minutes.

## Limits

* `apuf` is a model; see above. The network cannot be used as a security
  primitive until real PUFs take its place.
* No noise, ageing or temperature effects are modelled. Error correction or
  majority voting of responses is therefore not present.
* Only straight chains merged by XOR are built. Other topologies need a new
  `ipn_network`.
