# Stochastic iterative decoder for short LDPC and Hamming codes

A belief-propagation decoder normally passes real-valued probabilities
between the variable and check nodes of a code's factor graph and needs
multipliers and dividers at every node. This design passes each message as a
random bit stream instead. The fraction of 1s in the stream is the
probability that the message stands for. With that encoding:

- a check node becomes an XOR gate;
- a variable ("equality") node becomes two AND gates and a JK flip-flop;
- every graph edge becomes two wires, one for each direction.

The whole graph does one update per clock cycle. A signed up/down counter
on each variable node's decision stream averages the result. When decoding
stops, the counter's inverted sign bit is the decoded bit.

The plain version of this idea works on a small (16,8) LDPC code with
variable-node degree 3. It fails badly on codes with higher-degree variable
nodes, such as the (7,4) Hamming code, because the equality nodes "lock up".
Most of this design exists to prevent that lockup. The default build is the
combined decoder:

- (7,4) Hamming code;
- channel values scaled so the largest magnitude is 0.8 (LLR scaling);
- 16 copies of the graph with edges permuted between them (layering);
- every node primed with the channel bit on the first cycle (broadcast
  initialization);
- check nodes without flip-flops.

Two more variants are available through parameters:

- supernodes, where each variable node computes in fixed point;
- the first prototype's operating mode, with parity flip-flops and T_INIT /
  T_CHECK early stopping.

## Stochastic messages and the two node circuits

A message is a stream of bits that are independently 1 with probability p.
Two operations are needed.

**Check node (parity constraint).** For independent inputs, the XOR of the
input bits is 1 with exactly the probability that belief propagation gives
for the check-node output. `stoch_parity_circuit` is therefore a single
XOR gate of any width. The optional output flip-flop (`REGISTERED`) exists
only for the prototype mode.

**Variable node (equality constraint).** The required output is

    P = pa*pb / (pa*pb + (1-pa)*(1-pb))

In `stoch_equality_circuit`:

- J is the AND of the inputs;
- K is the AND of the inverted inputs;
- both drive a JK flip-flop.

When all inputs are 1, the flip-flop sets. When all are 0, it clears.
Otherwise it holds. In steady state the output density is P(J)/(P(J)+P(K)),
which is the formula above. Nothing is multiplied or divided anywhere.

**Nodes from circuits.** A node of degree d has one circuit per edge, and
each circuit reads every input except its own edge's input:

- `stoch_parity_node` has d XORs of d-1 inputs;
- `stoch_equality_node` has one JK circuit per graph edge, and each of
  these also reads the channel stream;
- a further equality circuit sees every input, including the channel
  stream. Its output is the node's decision stream, which goes to the
  counter.

**Accuracy.** The estimate from N bits has a statistical error of roughly
1/sqrt(N). The XOR circuit adds almost nothing to that error. The JK
circuit adds more, and more again as inputs are added. `tb_feedforward_accuracy`
measures this with open-loop random inputs over 2000 bits:

- mean absolute error of about 0.009 for XOR;
- 0.013, 0.019 and 0.029 for JK circuits with 2, 3 and 4 inputs.

## Why equality nodes lock up, and the four remedies

A JK equality circuit changes state only when all its inputs agree. With
more inputs, agreement becomes rarer. For random inputs each added input
roughly halves the chance of a transition.

The outputs also feed back through the check nodes. Once the graph's
outputs stop moving, nothing the channel stream does can restart them. The
decision bits then freeze, often on something that is not a codeword. This
gets worse at high SNR, where the channel streams are nearly constant.

Each remedy below raises switching activity or gives the graph a better
starting point.

**Broadcast initialization.** On the first run cycle (`bcast`), every JK
flip-flop of an equality node loads that node's current channel bit. The
first values the graph sends therefore carry the channel's hard decision,
and not the zeros left by reset.

The check-node flip-flops are removed at the same time. If they stayed,
their reset contents would reach the equality nodes one cycle later and
undo the priming. In this design, `PARITY_FF = 0` is the default, and
`bcast` is the load input of `stoch_equality_circuit`.

**Check-node output randomization.** Every check node gets one extra input
stream. That input feeds every XOR of the node. A 1 on it inverts all the
node's outputs for that cycle; a 0 leaves them unchanged.

The stream comes from a sequence generator set by the `rand_prob` input,
where 0 switches randomization off. Use a small probability, for example
8/256.

**LLR scaling.** Before the channel values are turned into probabilities,
each one is multiplied by beta/max|n_i| over the codeword (`llr_scaler`,
beta = 0.8 by default). This pulls probabilities toward 0.5, so the channel
streams keep toggling even when the noise is low. `LLR_SCALE = 0` removes the
scaling, so the single-technique decoders can be built for comparison.

**Layering.** `layered_factor_graph` builds L copies of the factor graph
(default L = 16). Each copy has the same node-to-node structure, but every
edge is rotated across the layers. For edge e, the equality node of column
j in layer l reads the check-node answer produced in layer
(l + off_j(e)) mod L. The check node in layer l reads the equality output
from layer (l - off_j(e)) mod L. Here

    off_j(e) = (5e + L - 1) mod L

so that neighbouring edges land on different layers. With three layers of
the Hamming graph, edge 0 (E0-P0) joins E0 of layer 0 to P0 of layer 2, E0
of layer 1 to P0 of layer 0, and E0 of layer 2 to P0 of layer 1.

With `HIGH_INTRICACY = 1`, the K gate of each equality circuit reads a
second rotation:

    off_k(e) = (off_j(e) + 1 + (3e mod (L-1))) mod L

The K side also takes its channel bit from the same codeword bit's generator
in layer (l + 1) mod L. Since the channel bit enters every gate, a shared
channel bit would keep J and K from ever being high together. With
separate routing, the J and K gates see different streams. The flip-flop
can now toggle, and its two inputs are decorrelated. The routing of the
channel input is this design's choice.

Each layer has its own channel and randomizing generators. One up/down
counter per codeword bit adds the decision bits of all L layers in every
cycle. The rotation formula is this design's choice; the method only asks
for a permutation of the edges between layers.

## Supernodes (`SUPERNODE = 1`)

A supernode replaces a JK equality node with a small arithmetic unit. It
still exchanges bit streams with XOR check nodes that have no flip-flops,
but it updates its outputs only once every `nc_cycles` cycles. Each
`supernode` has:

- one accumulator per edge, which counts the 1s arriving on that edge;
- one sequence generator per edge output;
- one sequence generator for the decision output.

At start, all generators are loaded with the channel probability (broadcast
initialization). Then, every n_c cycles:

1. Each count becomes p_i = count * 2^K / n_c.
2. For each edge k, the unit computes the product over the channel and
   every edge except k:

       q_k = p_ch*prod p_i / (p_ch*prod p_i + (1-p_ch)*prod(1-p_i))

   The decision output uses the product over every edge.
3. The results are loaded into the generators, and the accumulators
   restart.

The products are kept at full width, with one division per output. This
turns the decoder into an iterative decoder whose messages are packets of
n_c stochastic bits. With n_c = 2000 and 20,000 cycles per codeword, the
decoder runs ten iterations.

The fixed-point arithmetic (8-bit probabilities, exact products, truncating
division, 0/0 giving 1/2) is this design's own; the method itself allows
any arithmetic. `supernode_graph` wires the supernodes to combinational
check nodes that have a randomizing input, in a single layer.

## Making the streams: pipelined modulators and one PRBS

Each stream starts as a K-bit probability (K = 8, resolution 1/256).
`stoch_seq_gen` converts it to bits with a chain of K registered modulator
stages (`stoch_modulator`). The chain's input is a constant 0 stream. Each
stage combines the stream so far with a fresh carrier stream of density 1/2:

- with mod bit 0, the stage outputs `in AND carrier`, so p_out = p_in/2;
- with mod bit 1, it outputs `in OR carrier`, so p_out = p_in/2 + 1/2.

After K stages the density is exactly prob/2^K.

The halving means the last stage sets the weight of 1/2. So the LSB drives
the first stage and the MSB the last stage. A description that puts the MSB
first contradicts its own stage equations; this design follows the
equations.

A new probability needs K cycles to flush through the pipeline. The
controller allows for this before it broadcasts.

Every stage of every generator needs a carrier that is uncorrelated with
the others. `prbs_carrier_source` builds them all from one 31-bit maximal
LFSR (x^31 + x^28 + 1) that feeds a long shift register, and every register
bit is a carrier tap. Generator g takes the 2K taps starting at 2K*g. Stage
s of that generator uses tap 2K*g + (K-1-s), so the register shifts against
the direction of the pipeline. Successive stages therefore never see the
same bit, and the register is at least 2K long.

At reset, the register holds the values the LFSR would have shifted in, so
all taps are live from the first cycle. The polynomial, seed and tap
spacing are this design's choices.

Per layer, the carriers go to one generator per equality node (channel
stream) and one per check node (randomizing stream). The default build has
(7+3)*16 = 160 generators on a 2560-bit register.

## Channel front end

- `llr_scaler` takes N signed 8-bit channel values (bit 0 sent as +1; the
  scale cancels).
  It finds the largest magnitude and outputs n_i*beta/max|n_i| as Q1.7,
  rounded toward zero and saturated. beta is `BETA_Q/2^BETA_FRAC`; the
  default 205/256 is about 0.8. The result is registered for one cycle.
- `prob_mapper` turns a scaled value y into P(bit = 1) = 1/(1 + exp(g*y)),
  with `chan_gain` g = 2/sigma^2 in Q4.4. It looks up a 256-entry table
  that is computed at elaboration from that formula and indexed by g*y in
  steps of 1/16 over [-8, 8). The result is an 8-bit probability.

## Decoding sequence and timing (`decoder_ctrl`)

Hold `noisy`, `chan_gain`, `rand_prob`, `t_init`, `t_check`, `max_cycles`
and `nc_cycles` stable, then pulse `start` for one cycle. The controller
then steps through these states:

| state | cycles | what happens |
|-------|--------|--------------|
| SCALE | 1 | LLR scaling is registered |
| LOAD  | 1 | probabilities are latched into the generators; supernodes load and clear |
| FILL  | K+1 | generator pipelines fill; counters are cleared |
| BCAST | 1 | every equality JK flip-flop loads its channel bit |
| RUN   | up to `max_cycles` | the graph iterates; the counters count after `t_init` cycles |
| DONE  | 1 | `done` pulses; `decoded`, `cw_valid`, `early` and `cycles` hold until the next start |

With `t_check = 0` the run has a fixed length of `max_cycles` cycles. From
`start` to `done` this takes K+5+max_cycles cycles.

With `t_check != 0` (the prototype's rule), the run ends early. This
happens once every counter's magnitude is at least `t_check` and the hard
decisions satisfy every parity check (`syndrome_check`); `early` then goes
high. `max_cycles` always bounds the run, so a codeword that never settles
still finishes.

The counters are `CNT_W = 24` bits wide. Each adds 2*(ones) - L per cycle,
summed over the layers. Their inverted sign bit is the decision, so a
count of zero decodes as 1.

## Parameters and ports of the top (`stochastic_decoder`)

| parameter | default | meaning |
|-----------|---------|---------|
| N, M, H | 7, 3, Hamming | code length, number of checks, parity-check matrix (`bit [0:M-1][0:N-1]`) |
| L | 16 | number of graph layers |
| K | 8 | probability resolution in bits (generator pipeline length) |
| IN_W | 8 | channel value width |
| BETA_Q / BETA_FRAC | 205 / 8 | LLR scaling factor beta |
| HIGH_INTRICACY | 0 | separate layer routing for the J and K gates |
| SUPERNODE | 0 | build the supernode decoder (single layer) |
| PARITY_FF | 0 | flip-flop in every parity circuit (prototype mode) |
| LLR_SCALE | 1 | 0 bypasses LLR scaling; the top 8 bits of `noisy` are then read as Q1.7 |
| SEED | 31'h5A5A1234 | LFSR seed |

`stoch_pkg` also provides a (16,8) irregular ring-structured LDPC matrix
(`LDPC16_H`) with check degree 3 and variable degree at most 2 plus the
channel. These are the degrees and the ring shape of the code that the
first stochastic decoder was built for, but it is not that code's exact
matrix.

| port | dir | meaning |
|------|-----|---------|
| clk, rst_n | in | clock, active-low reset |
| start | in | one-cycle pulse that starts a decode |
| noisy[N][IN_W] | in | signed channel values, + means bit 0; any common scale with LLR scaling on, Q1.7 with it off |
| chan_gain[8] | in | 2/sigma^2, Q4.4 |
| rand_prob[K] | in | probability of the check-node randomizing stream, 0 = off |
| t_init, t_check, max_cycles | in | training cycles, early-stop threshold (0 = off), run limit |
| nc_cycles[16] | in | supernode update interval (supernode build only) |
| busy, done | out | decode in progress, one-cycle completion pulse |
| decoded[N] | out | hard decisions |
| cw_valid | out | decisions satisfy every parity check |
| early | out | the run ended through the t_check rule |
| cycles | out | run cycles used |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/stoch_pkg.sv \
        tb/tb_stochastic_decoder.sv --top-module tb_stochastic_decoder
    ./obj_dir/Vtb_stochastic_decoder

Replace the testbench name to run another test. Every module under `rtl/`
has a `tb/tb_<module>.sv`, and six more tests cover the whole decoder:

| testbench | what it runs |
|-----------|--------------|
| tb_stochastic_decoder | default build; noiseless codewords with a latency check, single weak errors that must be corrected, AWGN at 4 dB, T_INIT/T_CHECK early stop, randomization on; counts every mechanism |
| tb_stochastic_decoder_supernode | supernode build, n_c = 100 and 200, then n_c = 2000 with 20,000 cycles per word |
| tb_stochastic_decoder_variants | 5 layers, higher intricacy, beta = 0.9; counts JK toggles |
| tb_ldpc16_initial | (16,8) LDPC code, one layer, parity flip-flops, no LLR scaling, T_INIT/T_CHECK operation |
| tb_ber_sweep | bit errors at Eb/N0 = 2 to 6 dB of the default build and of a broadcast-only build (one layer, no LLR scaling) on the same words |
| tb_feedforward_accuracy | open-loop accuracy of parity and equality circuits of 2 to 4 inputs over 2000-bit streams |

The unit tests compare each block against an independent model. For most
blocks that model is cycle-exact; the layered graph is tested at L = 3 with
both intricacy settings.

## Departures and own choices

- The bit order of the modulator chain follows the stage equations (LSB
  first), not the contradicting sentence that puts the MSB first.
- Probabilities have 8-bit resolution throughout. The channel mapping
  assumes BPSK on a Gaussian channel.
- The layer permutation is a fixed rotation per edge (formulas above), not
  a random permutation.
- Supernodes use exact fixed-point arithmetic and not floating point.
- The baseline decoder's reset of node outputs to random values is not
  built. Reset and initialization clear or broadcast-load every flip-flop
  instead.
- The carrier streams come from one LFSR and a long tap register. Analog
  alternatives, such as ring-oscillator noise sources, are not modelled.
- `max_cycles` bounds the T_CHECK mode. It is an addition; the original
  rule has no upper bound.
- A 1024-bit (3,6) LDPC code can be built by passing its H through the
  parameters, but no such matrix is included. At 16 layers it would need
  about 16,000 equality nodes.

## Verification status

All unit testbenches and the six system tests pass. Each unit testbench was
also run against a deliberately broken copy of its module, and it reported
failures.

In the default build's test:

- 20 of 20 codewords with one weak wrong bit were corrected;
- at 4 dB, 13 raw hard-decision bit errors went down to 1 after decoding;
- every early-stop decode ended with a valid codeword.

The (16,8) prototype test reduced 40 raw bit errors to 3.

The sweep over 2800 bits per point gave these bit-error counts:

| Eb/N0 | sign decision | broadcast only | combined |
|-------|---------------|----------------|----------|
| 2 dB | 230 | 82 | 77 |
| 3 dB | 180 | 50 | 52 |
| 4 dB | 154 | 23 | 21 |
| 5 dB | 69 | 10 | 14 |
| 6 dB | 47 | 1 | 1 |

The combined build and the broadcast-only build are close at this sample
size. The sweep checks only that the combined build beats the sign decision
at every point and is not clearly worse than broadcast only.

These are small samples and not bit-error-rate curves.
