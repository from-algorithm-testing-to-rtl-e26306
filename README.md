# SOVA decoder for a 16-state turbo component code

A turbo decoder runs two convolutional decoders in turn, and each must pass the
other not only its bit decisions but how sure it is of each bit. This design is
that soft-in/soft-out component decoder, built on the soft output Viterbi
algorithm (SOVA): an ordinary Viterbi decoder for the 16-state recursive
systematic code with generators (37, 21) octal, extended so that every decoded
bit leaves together with a reliability, and from it the *extrinsic information*
for the next decoder.

Its main architectural point is that both the hard decisions and the
reliabilities are kept with the **register exchange** method. Register exchange
costs a lot of flip-flops, but it lets the reliability update run in the same
clock cycle as the hard-decision update. The decoder therefore takes one trellis
step per clock, and its only latency is the truncation path length (50 steps).

## Data flow

```
 SNR (4) ─┐
 Y   (4) ─┼─> ACS unit ──hard values 16x1──> hard update ──┬──> dec_bit (1)
 X+E (5) ─┤          └──delta 16x10──────> soft update <───┘ survivor histories
          │   RAM control ─ clear / write / read state ─> hard and soft update
          └──> delay (50 steps) ────────> soft output <── soft update ──> ext_info (4)
```

| Module | Role |
|---|---|
| `sova_pkg` | word lengths, trellis functions, encoder functions |
| `sova_acs` | branch metrics, add-compare-select, normalisation, deltas |
| `sova_ram_control` | clear, write enable, read state, output-valid of the registers |
| `sova_hard_update` | 16 x 50-bit register exchange of decisions |
| `sova_soft_update` | 16 x 50 x 10-bit register exchange of reliabilities |
| `sova_delay` | 50-step delay of the X+E input |
| `sova_soft_output` | signed LLR minus delayed X+E, saturated to 4 bits |
| `sova_decoder` | top level |

Word lengths: 4-bit channel symbols and channel-state weight, 5-bit X+E (systematic
symbol plus incoming extrinsic value), 10-bit path metrics and reliabilities, and
4-bit extrinsic output. These sizes come from bit-true simulations of the decoder
at 2.5 dB. Below 10 internal bits, or with wider inputs at 10 bits, the
error rate rises sharply because clipped metrics make paths tie. All inputs and
`ext_info` are two's complement.

## The code and its trellis

Feedback polynomial 37 = 1+D+D²+D³+D⁴ and feed-forward 21 = 1+D⁴. With the state
`{a[k-1], a[k-2], a[k-3], a[k-4]}`, the encoder computes
`a[k] = u ^ a[k-1] ^ a[k-2] ^ a[k-3] ^ a[k-4]` and the parity `p = a[k] ^ a[k-4]`,
and the next state is `{a[k], state[3:1]}`. The two predecessors of state `s` are
`{s[2:0], 0}` and `{s[2:0], 1}`. Because the feedback uses the last tap, the two
branches into a state always carry **opposite information bits**. Two things
follow, and the RTL relies on both:

* The 1-bit hard value per state is enough to tell which predecessor survived
  (`surv_sel` in `sova_pkg`). No separate decision bit is needed.
* The survivor and the competitor always differ in their newest bit, so the
  newest reliability of each state is simply its delta.

## Add-compare-select (`sova_acs`)

The branch metric is

    bm = (u ? X+E : 0) + (p ? (SNR*Y) >>> 2 : 0)

It equals the usual correlation metric ½(±(X+E) ± Lc·Y), up to a constant that is
the same for every branch of a step. As a result, a difference of two path
metrics is directly a log-likelihood ratio in the units of X+E. SNR is an unsigned
weight with two fractional bits, so 4 means 1.0. Each state keeps the larger of
its two candidates; on a tie, the predecessor `{s[2:0],0}` wins. The absolute
difference of the two candidates is the state's *delta*, saturated to 10 bits.

After the selection, the largest of the 16 new metrics is subtracted from all of
them. The best state therefore always holds 0 and the others hold negative
values. Metrics below -512 are clipped. The ACS unit also outputs the index of
the best state, the lowest index on a tie.

The decisions and deltas are combinational. They are written straight into the
register-exchange registers, which serve as the pipeline register of the ACS
stage. This is what keeps the latency at exactly 50 steps, at the cost of a long
path: ACS, then the 16-way maximum, then the exchange multiplexers.

## Register exchange of hard and soft values

On each step the hard register of state `s` becomes the register of its
surviving predecessor, shifted by one, with the new hard value entering at index 0.

The soft registers move the same way. The new entry at index 0 is the delta.
Every older entry `j` is then updated by the SOVA rule: if the survivor history
and the competitor history disagree at `j`, the entry becomes
`min(old value, delta)`; otherwise it keeps the old value. The two histories are
the hard registers of the two predecessors, taken before the step. This is why
`sova_soft_update` reads the whole 16 x 50 hard register array.

The output is read from the row of the state that was best after the last step:
`dec_bit` is its oldest hard bit and the reliability is its oldest soft value.
Soft registers start at 1023, which means no competitor has been seen yet.

In a register-exchange decoder, the histories of all states agree after enough
steps, and from then on the soft values no longer change. The parameter
`SOFT_DEPTH` (default: equal to `DEPTH`, the worst case for area) shortens the
soft registers accordingly. With `SOFT_DEPTH < DEPTH`, the oldest soft value of
the best row is read one step after it was written and passes a single-row delay
of `DEPTH-SOFT_DEPTH` words, so that it leaves together with its decoded bit.
This saves `16*(DEPTH-SOFT_DEPTH)` soft words. It is safe at high SNR, where the
paths merge early. The sign of the output always comes from the full-length
hard decision.

## Extrinsic output (`sova_delay`, `sova_soft_output`)

The reliability gets the sign of the decoded bit (positive for a 1). The X+E
value of the same step is subtracted from it; `sova_delay` holds that value for
the 50 steps. The result is saturated to [-8, 7]. Subtracting X+E removes the
decoder's own input from the LLR, so the next decoder receives only new
information. No scaling factor is applied. With 4-bit outputs, many values end up
at the saturation limits, the "sure" values.

## Interface and timing (`sova_decoder`)

| Port | Dir | Width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse: new frame, encoder in state 0 (any `in_valid` in that cycle is ignored) |
| `in_valid` | in | 1 | `snr`, `y`, `xe` hold one trellis step |
| `snr` | in | 4 | channel state weight, unsigned, 2 fractional bits |
| `y` | in | 4 | parity symbol |
| `xe` | in | 5 | systematic symbol + a-priori extrinsic value |
| `out_valid` | out | 1 | outputs valid |
| `dec_bit` | out | 1 | decoded bit |
| `ext_info` | out | 4 | extrinsic information |

* The pipeline moves only on `in_valid`, so idle cycles may be placed between
  steps. At most one step is taken per clock.
* After the clock edge of step `t` (counting from 0 after `start`), the outputs
  belong to step `t-49`. `out_valid` rises after step 49 and stays high until the
  next `start`.
* The decoder streams and has no flush logic. To get the last 49 outputs of a
  frame, feed 49 more steps, for example zero-valued ones.
* Trellis termination is not used. The output is always taken from the best
  state.

The parameter `DEPTH` (default 50) is the truncation path length and
`SOFT_DEPTH` (default `DEPTH`) the length of the soft registers. The word
lengths are constants in `sova_pkg`.

## Size

The decoder holds 8000 soft-value flip-flops, 800 hard-decision flip-flops, 250
delay flip-flops, 160 path-metric flip-flops and a few control bits. The
soft-value exchange dominates the area, by roughly an order of magnitude over
everything else. Each bit of internal word length removed saves 16 × 50
flip-flops. The soft registers are written as
one packed vector, so synthesis sees them as plain flip-flops rather than as a
memory with hundreds of write ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_sova_decoder` is the end-to-end test at full size. It encodes random bits
  with its own encoder, adds approximately Gaussian noise and random a-priori
  values, and decodes four frames: noiseless, all-ones input, noisy with idle
  cycles, and very noisy. Every `dec_bit` and `ext_info` is compared with a
  reference that uses a different method: integer ACS, then a traceback of the
  best path, and for each step on that path a traceback of the competing path.
  The test also checks the 50-step latency and error-free decoding without noise.
  It counts metric clipping, minimum updates, saturated and unsaturated outputs,
  idle cycles, restarts and corrected channel errors, and fails if any of them
  never happened.
* The unit testbenches compare each block with a model written in the testbench:
  ACS against the integer model, the register exchanges against queue models,
  the soft output exhaustively.
* `tb_sova_decoder_short` runs the same frames with `SOFT_DEPTH = 25`. Its
  reference takes the reliability from the best path at the end of the shortened
  soft registers.
* `tb_sova_awgn_frames` decodes two 128 x 128 = 16384-bit frames at
  Eb/N0 = 2.5 dB (BPSK, AWGN, 4-bit quantisation). It checks every output against
  the reference and prints a histogram of the extrinsic values. With random
  bits, 72 of 16384 are decoded wrongly (bit error rate 4.4e-3), against 1611
  raw channel errors. With all-ones input, 80 % of the extrinsic outputs sit at
  the +7 limit.
* `sova_ref_pkg` holds the shared reference model.

Simulate with Verilator 5, for example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/sova_pkg.sv tb/sova_ref_pkg.sv tb/tb_sova_decoder.sv --top-module tb_sova_decoder
    ./obj_dir/Vtb_sova_decoder

The full-size end-to-end run takes a few seconds.

## Departures and open points

* The branch-metric formula, where SNR is applied (to the parity only), its
  fixed-point format, the tie rules and the initial values are choices of this
  design.
* The control signals of the RAM control block are also this design's choice.
  The block is described only as supervising the registers.
* The extrinsic output is neither scaled nor normalised.
* How shortened soft registers (`SOFT_DEPTH < DEPTH`) are aligned with the
  output is this design's own choice.
* The interleaver, the second component decoder and the iteration control of a
  full turbo decoder are outside this design.
* No gate-level netlist is given. The published estimate for this block is about
  129 k gates, of which 110 k are for the soft values. It has not been reproduced.
