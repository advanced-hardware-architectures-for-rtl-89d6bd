# Iteration-unrolled turbo decoders for 100 Gb/s and beyond

Turbo decoders are normally iterative: one soft-in/soft-out decoder core runs
again and again, alternately as component decoder 1 and 2, until a fixed number
of iterations is done. That loop caps throughput at a few Gb/s. The decoders
here remove the loop. Every half-iteration (HI) has its own hardware stage.
Every stage is a pipeline that processes whole frames, and a new 128-bit frame
slot enters every clock cycle. At 800 MHz that is 128 bit × 800 MHz = 102.4 Gb/s,
independent of how many iterations are unrolled.

Two decoders are provided and instantiated side by side in `turbo_decoder_top`:

* **`ff_uxmap` – frame-flexible decoder.** 8 pipelined HI stages (4 full
  iterations). The 128-bit slot can carry one 128-bit frame, two 64-bit frames,
  four 32-bit frames, or one 64-bit and two 32-bit frames. The choice is made
  per slot, so modes can change every cycle.
* **`ab_uxmap` – decoder with afterburner.** Only 6 pipelined HI stages. Frames
  that do not look converged afterwards get 8 more HIs in a small iterative
  "afterburner" stage, which holds up to 32 frames. Most frames converge early,
  so a short pipeline plus a small iterative back-up replaces a long pipeline.

## Decoding algorithm and number formats

* Component code: 8-state recursive systematic code. Feedback is 1+D²+D³ and
  the parity is 1+D+D³, as in LTE. The code is tail-biting, so there are no tail
  bits. The architecture does not fix the code; this choice is this design's
  own. It lives in `trel_next`/`trel_par` of `tdec_pkg`.
* Max-Log-MAP with radix-4 trellis steps (two bits per step).
* Inputs are 6-bit two's-complement LLRs per bit: systematic, parity 1 and
  parity 2. The sign convention is ln(P(0)/P(1)), so positive means "0".
* Extrinsic values are 7 bits. Before they are passed on, they are scaled by
  0.75, computed as floor(3x/4), and saturated to ±63.
* State metrics are 12 bits and branch metrics 10 bits. After every step the
  metrics are normalised so that state 0 is 0, then saturated. These widths are
  this design's choice.
* Interleaver: Almost Regular Permutation, Π_K(i) = (9·i + S[i mod 4]) mod K
  with S = {3, 13, 27, 5}, for K = 32, 64 and 128. The same P, S and Q serve
  all three sizes, so Π_128 and two copies of Π_64 agree on 68 of the 128
  positions. Those positions are plain wires in the multiplexer network; the
  other 60 need a multiplexer.

Component decoder 2 works in interleaved order: its position i holds the
information bit Π(i).

## The X-element: one pipelined MAP decoder for a sub-block (`x_element`)

This is the core of the design and the part that takes most care.

A frame slot is split into 4 sub-blocks of 32 bits, each decoded by one
X-element. A 32-bit sub-block is N = 16 radix-4 steps, and the X-element is a
16-stage pipeline:

```
stage b:  forward unit  computes alpha[b+1]    from alpha[b],    step b
          backward unit computes beta[N-1-b]   from beta[N-b],   step N-1-b
          if b >= N/2:  LLR unit for step b     (alpha[b],     beta[b+1])
                        LLR unit for step N-1-b (alpha[N-1-b], beta[N-b])
```

The forward and backward recursions run towards each other and cross in the
middle of the pipeline, hence the "X". After the crossing, both metrics around
the steps being passed are known. Two LLR units per stage then finish the two
steps that just became complete, so all 16 steps are done at stage 15. Each
stage has two branch-metric units, one per recursion, and the LLR units reuse
their results.

Pipeline registers keep a value only while it is still needed:

* a forward metric until its step's LLR is computed;
* an a-priori value until its step's LLR is computed;
* finished extrinsic values and hard decisions until the output.

All channel values (systematic, parity 1, parity 2) travel through the whole
pipeline: this is the X-element's channel-value FIFO. Later stages need them,
and keeping them next to the logic that uses them avoids a separate
frame-wide channel pipeline.

Latency is 16 cycles, and a new sub-block is accepted every cycle.

### Sub-block borders: next-iteration initialisation

A recursion that starts at a sub-block border needs starting metrics. Each
X-element outputs its final forward metric (`alpha_end`) and its first backward
metric (`beta_start`). In the next iteration of the same component decoder,
two HI stages later, its neighbours start from these:

* X-element x starts its forward recursion from `alpha_end` of x−1.
* It starts its backward recursion from `beta_start` of x+1.
* At the two ends of a frame the neighbours wrap around inside that frame,
  which is what makes the code tail-biting.

Which X-elements form a frame depends on the slot configuration.

In the first iteration (stages 0 and 1) all border metrics are zero. Metrics
from stage h−1 have to reach stage h+1, so each stage delays the previous
stage's metrics by its own latency (`nii_carry_in` → `nii_carry_out`).

## Half-iteration stage (`hi_stage`)

Each stage has:

* four X-elements;
* a **configuration FIFO** (`delay_line`) carrying the slot's valid bit,
  2-bit configuration, output permutation and a tag next to the data;
* the border-metric FIFO described above;
* at its output, the **(de-)interleaver** (`arp_interleaver`).

The interleaver moves each position's systematic value, extrinsic value and
hard decision. Parities stay in place: parity 1 is stored in natural order and
parity 2 in interleaved order, so every decoder finds its own parity at its own
position.

In `ff_uxmap`:

* Even stages are decoder 1 and end in Π.
* Odd stages are decoder 2 and end in Π⁻¹.
* The last stage (odd, 8 stages) returns the hard decisions in natural order.

Stage latency is 16 cycles, so `ff_uxmap` has a latency of 128 cycles.

## Afterburner (`ab_control`, `afterburner`, `ab_uxmap`)

* **HDA test.** After the 6 pipelined stages, `ab_control` applies a
  hard-decision-aided stopping test. A frame passes if the hard decisions of
  the last two half-iterations are identical. The earlier decisions are
  delayed by one stage latency so that both belong to the same frame.
* **Passing frames** leave on output 0, 96 cycles after entry.
* **Failing frames** go into the afterburner, if it has a free place this
  cycle. The afterburner is one HI stage closed into a loop by a 16-deep delay
  line, so the loop holds exactly 32 frame slots. Each slot passes the loop
  head every 32 cycles.
* **Inside the afterburner**, pass n acts as decoder 1 followed by Π when n is
  even, and as decoder 2 followed by Π⁻¹ when n is odd. Each slot carries the
  border metrics of its last two passes, so next-iteration initialisation
  continues seamlessly from the pipeline.
* **Leaving the afterburner.** After 8 passes (14 HIs in total) the frame
  leaves on output 1, 96 + 256 cycles after entry. Its place is reused in the
  same cycle.
* **Overflow.** If a failing frame finds no free place, it leaves on output 0
  undecoded, with `out0_hda_fail` set. This overflow policy is this design's
  choice.
* **Tags.** Frames leave out of order, so each frame carries an 8-bit tag.

## Interfaces and timing

All ports are plain signals or arrays. `chan_t` holds {sys, p1, p2}, 6 bits
each; `cfg_e` is 0 = 128, 1 = 64/64, 2 = 4×32, 3 = 64/32/32. Frames are packed
from position 0, and in 64/32/32 the 64-bit frame comes first.

The reset is asynchronous and active low. It clears only the valid bits of the
configuration FIFOs and the afterburner loop; the datapath has no reset. There
is no back-pressure: the decoders accept a slot every cycle and always deliver
it.

| module | accepts | latency |
|---|---|---|
| `ff_uxmap` | 1 slot/cycle | 128 cycles |
| `ab_uxmap` output 0 | 1 frame/cycle | 96 cycles |
| `ab_uxmap` output 1 | (afterburner) | 352 cycles |

## What was checked

Every module has a self-checking testbench in `tb/`. The reference model
`tb/tdec_ref_pkg.sv` is written separately, in plain integer arithmetic. It
covers the trellis, the recursions, the soft output, the ARP permutation, the
HI stage with border metrics, the unrolled decoder and a tail-biting turbo
encoder.

* **Arithmetic units and `x_element`:** bit-exact against the model on random
  inputs, including saturation. The 16-cycle latency is checked.
* **`hi_stage`:** bit-exact against the model, with random configuration,
  decoder, permutation and border metrics on every cycle.
* **`ff_uxmap`, `ab_uxmap`, `afterburner` and the top:** encoded frames go
  through the decoder at full size.
  * Outputs are compared bit for bit with the model.
  * The latencies are checked.
  * Lightly disturbed frames must decode without error.
  * Noisy frames are counted as corrected or not.
  * All four slot configurations must occur, as must the three afterburner
    outcomes: pass, afterburner and overflow.

Run any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_turbo_decoder_top \
  -y rtl -y tb +libext+.sv rtl/tdec_pkg.sv tb/tdec_ref_pkg.sv tb/tb_turbo_decoder_top.sv
./obj_dir/Vtb_turbo_decoder_top
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. The full-size
decoders take several minutes to compile.

## Departures and limits

* **Component code, metric widths, ESF rounding, sign convention.** These
  details are not fixed by the architecture and were chosen here (see above).
  Error-rate curves will differ slightly from other implementations.
* **Pipeline depth.** One radix-4 step per pipeline stage is this design's
  reading of the X-element. Timing closure at 800 MHz in a 28 nm process was
  not attempted; the RTL is written only for function and cycle behaviour.
* **HDA criterion.** Taken as exact agreement of all hard decisions of the
  last two half-iterations.
* **Afterburner.** It has no early exit, and it supports 128-bit frames only.
  The frame-flexible decoder has no afterburner.
* **CRC stopping criterion.** The alternative CRC-based criterion, which
  needs one fewer pipelined HI, is not built.
* **Reordering.** The afterburner decoder's output is not put back in order;
  use the tag.
