# Low-power link codecs for a network-on-chip

On the links of a network-on-chip, a large share of the energy goes into the
coupling capacitance between neighbouring wires. How much is spent depends on
how two adjacent lines switch together from one flit to the next: one line
switching next to a quiet one costs one unit, two lines switching in opposite
directions cost two, and lines that switch together or stay quiet cost almost
nothing. This design reduces that cost without touching the routers or the
links. The transmitting network interface (NI) looks at each body flit before
it enters the network. It compares the flit with the flit that was last sent
on the link. Then it decides whether sending the flit with its odd lines, its
even lines or all of its lines inverted would switch less coupling capacitance.
A small code on extra lines tells the receiving NI which inversion to undo.
Because wormhole switching sends every flit of a packet through the same links
in the same order, a choice that helps the first link helps every link on the
route.

Three encoding schemes of increasing strength are provided:

| scheme | inversions it may choose | code lines | code values |
|--------|--------------------------|------------|-------------|
| I      | odd                      | 1          | 1 odd, 0 none |
| II     | odd, full                | 2          | 01 odd, 11 full, 00 none |
| III    | odd, even, full          | 2          | 01 odd, 10 even, 11 full, 00 none |

Body payloads are converted to Gray code before the encoder and back after the
decoder. Header flits are neither Gray coded nor inverted, so routers can read
them.

The link between the two NIs is a variable-frequency link. Header flits and
idle slots run at a base clock F1. Body flits follow the path the header has
already reserved, so they are sent on a boosted clock of 1, 2 or 4 times F1. A
link controller picks the boost factor once per short control period from how
busy the link was.

## Transition types and what an inversion does to them

Take two adjacent lines i and i+1. Let `a` be their values in flit t-1, the
flit already on the link, and `b` their values in flit t, the incoming flit.
The pair falls into one of four types:

| type | what happens | weight in the coupling activity |
|------|--------------|--------------------------|
| I    | one line switches, the other stays | 1 |
| II   | both switch, in opposite directions | 2 |
| III  | both switch, in the same direction | 0 |
| IV   | neither switches | 0 |

The link's coupling activity is `T1 + 2*T2`, where `Tk` is the number of pairs
of type k. The full cost also has a self-switching part, the number of 0->1
transitions. It carries about a quarter of the weight, because the coupling
capacitance is taken as four times the substrate capacitance. The decision
logic leaves it out. That approximation is part of the schemes.

Odd inversion and even inversion each invert exactly one line of every pair.
That makes Types II, III and IV become Type I. A Type I pair becomes:

* Type IV, if the inverted line is the one that was switching;
* Type II, if the inverted line is the quiet one and the two lines differed at
  t-1;
* Type III, if the inverted line is the quiet one and the two lines were equal
  at t-1.

Which line of a pair is odd alternates along the word. So "Type I pairs that
odd inversion turns into Type II" and "... that even inversion turns into Type
II" are two different counts. `transition_counter` gives both, in the form the
conditions use:

* `Ty = T1 + T2 - T1(odd -> II)`
* `Te = T1 + T2 - T1(even -> II)`
* `T4**` = Type IV pairs whose lines differ. Full inversion turns these into
  Type II, and it turns Type II into Type IV.

With `w-1` adjacent pairs (`w = DATA_W`), the cost of each choice is:

* none: `T1 + 2*T2`
* odd: `(w-1) - T1 + 2*T1(odd->II)`
* even: `(w-1) - T1 + 2*T1(even->II)`
* full: `T1 + 2*T4**`

Each encoder compares these costs with integer inequalities and uses no
multiplier:

* scheme I: odd if `Ty > (w-1)/2`. This is a majority vote over the pairs.
* scheme II:
  * odd if `2(T2-T4**) < 2Ty-(w-1)` and `Ty > (w-1)/2`
  * full if `2(T2-T4**) > 2Ty-(w-1)` and `T2 > T4**`
* scheme III:
  * even if `Te > (w-1)/2`, `Te > Ty` and `2(T2-T4**) < 2Te-(w-1)`
  * full if `2(T2-T4**)` is greater than both `2Te-(w-1)` and `2Ty-(w-1)`,
    and `T2 > T4**`
  * odd if `2(T2-T4**) < 2Ty-(w-1)`, `Te < Ty` and `Ty > (w-1)/2`

In every scheme the chosen inversion is the one whose coupling activity is
strictly lower than that of every other option the scheme allows. If no option
is strictly lowest, the flit is sent as it is. This includes a tie between odd
and even inversion in scheme III. The unit testbenches check exactly this
rule: they compute each option's cost by brute force, and they agree with the
hardware on every flit.

## One channel, flit by flit

```
in_* ──> ni_tx ─────────────────────────> vf_link ──────> ni_rx ──> out_*
         gray_enc -> enc_sN                  ^    link_*   dec_sN -> gray_dec
         (transition_counter + decision      |
          + link register)             dfs_link_ctrl (boost)
```

* **`ni_tx`** has a valid/ready input. It Gray-codes body payloads and passes
  them to `enc_s1`, `enc_s2` or `enc_s3` (parameter `SCHEME`). The encoder's
  output register is the word on the link, and it is also flit t-1 for the next
  decision. So the type count and the threshold decision both happen in the
  cycle the flit is accepted. The encoded flit is on the register one cycle
  later. The register holds it until the link takes it. An assertion checks
  this. The stream runs at one flit per cycle.
* **`vf_link`** runs on the fastest clock, `BASE_DIV * F1` (4 x F1). A slot
  counter lets the link register change only on edges of the clock that
  applies:
  * a header flit or an idle slot lasts `BASE_DIV` cycles;
  * a body flit lasts `BASE_DIV/boost` cycles.

  `link_strobe` pulses for one cycle when a flit is launched. `boost` is read
  at each launch.
* **`dfs_link_ctrl`** counts the cycles in which a flit waits for the link or
  is occupying it, over `CTRL_PERIOD` cycles. It then sets the boost factor:
  1 below `TH_LOW`, 2 below `TH_HIGH`, and 4 otherwise.
* **`ni_rx`** decodes the flit with the received code. For body flits it then
  Gray-decodes the payload. The result appears on `out_*` one cycle after
  `link_strobe`. It has no backpressure.

The decoders are pure XOR with a mask that the code selects. Header flits
always carry code 00.

## Top level: `noc_codec_top`

`noc_codec_top` puts three channels side by side:

* lane 0 uses scheme I;
* lane 1 uses scheme II;
* lane 2 uses scheme III.

A system would use one of them. Packed arrays index the ports by lane:

| port | width per lane | meaning |
|------|----------------|---------|
| `in_valid`, `in_ready`, `in_head`, `in_tail`, `in_data` | 1,1,1,1,`DATA_W` | flit stream into the transmitting NI |
| `link_data`, `link_inv`, `link_strobe` | `DATA_W`, 2, 1 | the link lines and the launch pulse (lane 0 uses `link_inv[0]` only) |
| `boost` | 3 | current boost factor, 1, 2 or 4 |
| `out_valid`, `out_head`, `out_tail`, `out_data` | 1,1,1,`DATA_W` | decoded flits |

Parameters and their defaults:

* `DATA_W = 16` payload lines;
* `BASE_DIV = 4`, the fastest clock over F1;
* `CTRL_PERIOD = 64` cycles;
* `TH_LOW = 16`, `TH_HIGH = 40` busy cycles.

Latency: the encoder takes 1 cycle. The flit then waits for the next slot
boundary on the link. It reaches `out_*` 1 cycle after its launch.

## What the encoding achieves

These figures come from `tb/tb_workload_random.sv`. It sends 20000 uniformly
random 16-bit body flits through each scheme and counts activity on the 16
data lines. The code lines are not counted.

| | 0->1 transitions | T1+2T2 | T0->1 + 4(T1+2T2) | saving |
|---|---|---|---|---|
| Gray coded, no inversion | 80158 | 225062 | 980406 | - |
| scheme I | 73738 | 183039 | 805894 | 17.8 % |
| scheme II | 66806 | 167173 | 735498 | 25.0 % |
| scheme III | 63349 | 159715 | 702209 | 28.4 % |

The same run measures how often each type occurs between two random words:
0.499, 0.126, 0.126 and 0.249 for Types I to IV. The expected values are 1/2,
1/8, 1/8 and 1/4.

These are switching-activity figures, not power figures. Power and area depend
on the cell library and the wire geometry, and only a gate-level flow can give
them.

## Choices made here, and where this departs from the original schemes

* **Width.** The schemes are described for a `w`-bit link that carries `w-1`
  payload bits and one inversion line. Here, the payload keeps all
  `DATA_W = 16` bits and the code lines are added: 17 lines for scheme I and
  18 for schemes II and III. The transition counts cover the `DATA_W` data
  lines, which gives 15 pairs. The code lines are not counted. With an odd
  number of pairs, the majority vote can never tie.
* **Code width.** Scheme III is also described as using a single inversion bit.
  That bit could not tell the decoder which inversion to undo, so the two-bit
  code is used.
* **Approximate conditions.** The decision logic follows the approximated
  conditions, without the self-switching terms, exactly as written. The
  strict inequalities are kept. As a result, scheme III sends an odd/even
  tie uninverted. The code lines themselves are not part of the cost, so
  their own switching is not minimised.
* **Odd lines** are y1, y3, ... (bit index odd), and **even lines** are y0,
  y2, ....
* **Timing.** The encoder is described in two stages: type detection, then the
  threshold. Each decision needs the previously encoded flit, so the two stages
  form a feedback loop. They are therefore done in one cycle, with one output
  register.
* **Handshakes, resets and the Gray circuit are this design's own.** These
  cover the valid/ready streams, reset of the previous-flit register to zero,
  and the reflected binary Gray code.
* **Clocks are modelled, not generated.** The variable-frequency link uses one
  fast clock and slot counters instead of separate F1, 2F1 and 4F1 clock
  domains. The clock sources themselves are not part of this RTL.
* **Link controller values are this design's own.** The utilization measure,
  the period length and the two thresholds are parameters. The source gives
  only the principle: a short control period, with boost chosen from link
  utilization.
* **No routers.** The routers between the two NIs are not modelled. The codec
  does not depend on them.

## Simulating

Each unit has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the reference
models:

* the pair classification;
* brute-force cost of each inversion;
* the Gray code.

These models are written from the definitions, not from the RTL. Build one
with Verilator 5, for example the end-to-end test at default parameters:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/codec_pkg.sv tb/tb_ref_pkg.sv tb/tb_noc_codec_top.sv --top-module tb_noc_codec_top
./obj_dir/Vtb_noc_codec_top
```

`tb_noc_codec_top` runs light, medium and saturated traffic on all three
lanes. It checks each of the following:

* every flit arrives intact and in order;
* the one-cycle output latency;
* header flits cross unencoded;
* the boosted body-flit rate.

It also requires each of these to happen at least once:

* every code each scheme can send;
* every boost factor;
* an input stall.

The other testbenches each cover one module:

* `tb_transition_counter`
* `tb_enc_s1`, `tb_enc_s2`, `tb_enc_s3`
* `tb_dec_s1`, `tb_dec_s2`, `tb_dec_s3`
* `tb_gray_enc`, `tb_gray_dec`
* `tb_ni_tx`, `tb_ni_rx`
* `tb_vf_link`
* `tb_dfs_link_ctrl`

`tb_workload_random` gives the activity figures above.

## Files

| file | contents |
|------|----------|
| `rtl/codec_pkg.sv` | inversion-code enum and mask helper |
| `rtl/transition_counter.sv` | pair classification and the Ty, Te, T2, T4** counts |
| `rtl/enc_s1.sv`, `enc_s2.sv`, `enc_s3.sv` | encoders of schemes I, II, III with the link register |
| `rtl/dec_s1.sv`, `dec_s2.sv`, `dec_s3.sv` | decoders |
| `rtl/gray_enc.sv`, `gray_dec.sv` | Gray conversion |
| `rtl/ni_tx.sv`, `ni_rx.sv` | transmitting and receiving network interfaces |
| `rtl/vf_link.sv` | variable-frequency link |
| `rtl/dfs_link_ctrl.sv` | link controller choosing the boost factor |
| `rtl/noc_codec_top.sv` | three channels, one per scheme |
