# Viterbi decoder with hybrid register exchange and 4-phase handshaking

This is a soft-decision Viterbi decoder for the rate-1/2, constraint-length-3
convolutional code. Its encoder is included. Two ideas shape it, and both aim
at low switching activity:

* **Hybrid register exchange (HREM) survivor memory.** Plain register
  exchange moves every survivor register at every trellis step. Plain trace-back
  needs a LIFO and repeated reads. HREM does a short trace-back of m = 2 steps
  and then one register exchange. As a result the survivor registers are
  written only every second step.
* **Handshaking pipeline.** The encoder, branch metric unit, add-compare-select
  unit and survivor memory are stages. They are linked by single-rail
  bundled-data channels that use a 4-phase request/acknowledge protocol. A stage
  works only when a token reaches it. A full stage holds back the stage that
  feeds it.

The top level, `enc_dec`, takes information bits, encodes them, turns the code
bits into soft symbols and decodes them. It returns each frame of 12 decoded
bits as one 12-bit word, `dec_out[11:0]`.

```
 e_inp ─►[conv_encoder]─►[soft_mapper]─►[bmu]─►[acsu: acs + PMM]─►[hrem_smu]─► dec_out[11:0]
  (+ e_noise0/1)      ch_enc          (in decoder)  ch_bm        ch_acs
        └── every arrow between stages is a 4-phase req/ack/data channel ──┘
```

## The code and its trellis

The encoder has two delay stages, D0 (the newest past bit) and D1. For an
input bit u, two modulo-2 adders produce:

```
V1 = u ^ D0 ^ D1        V2 = u ^ D1
```

Then u shifts into D0, and D0 shifts into D1.

The RTL numbers states as `S = {D1,D0}`, so input u moves `{D1,D0}` to
`{D0,u}`. With this numbering, a state's two bits are the last two information
bits, oldest first. The survivor memory relies on this when it appends a
state's own bits to a register (see below). State `{a,b}` has two
predecessors, `{0,a}` and `{1,a}`. Both reach it with input bit b.

**Framing.** The decoder works on frames of `FRAME_LEN` = 12 bits, the width of
`dec_out`. The encoder clears D0 and D1 after every 12th bit, so every frame
starts in S0. No tail bits are sent, so the frame can end in any state. The
decoder ends a frame on the state with the smallest path metric.

## Soft symbols and branch metrics

`soft_mapper` sends a code bit 0 as -3 and a code bit 1 as +3. It first adds a
4-bit signed channel perturbation, which comes in with every information bit
(`e_noise0` for V1, `e_noise1` for V2). It then clips the sum to -3..+3. With
zero perturbation the symbols are exactly ±3. The perturbation is there so that
channel errors can be simulated at the top level.

`bmu` turns the soft pair (i0 for V1, i1 for V2) into one branch metric for
each expected code pair {V1,V2}:

```
bm[v1 v2] = (v1 ? -i0 : i0) + (v2 ? -i1 : i1)      e.g. bm[01] = i0 - i1
```

A branch whose bits agree with the received levels gets -6, and one that
disagrees with both gets +6. The metrics are 5-bit two's complement numbers.
The decoder keeps the path with the **smallest** sum.

## Add-compare-select and path metric memory

`acs` is combinational. For each state it adds the branch metric to each of the
two predecessor path metrics and keeps the smaller sum. It also outputs:

* a decision bit per state: 1 when predecessor `{1,a}` won;
* `best`, the state with the smallest new metric.

On a tie, `{0,a}` wins, and `best` takes the lowest index.

`acsu` wraps `acs` around the path metric memory (PMM). The new metrics are
written back and become the old metrics of the next step. At the first step of
a frame the ACS reads fixed starting metrics instead: S0 = 0 and every other
state = 2·6·FRAME_LEN = 144. Because 144 is larger than any metric a path from
S0 can reach within a frame, paths that start elsewhere never win. Metrics are
`PM_W` = 9-bit signed numbers (`viterbi_pkg::pm_width`), which is wide enough
for a whole frame, so no normalisation is needed. Each output token holds:

* the 4 decision bits;
* the best state;
* a `last` flag on step 12.

## Hybrid register exchange (`hrem_smu`)

Each state s has a `FRAME_LEN`-bit survivor register. The unit alternates
between two kinds of step:

* **Odd step (1, 3, 5, …):** only the four decision bits are stored
  (`dec_prev`). The registers do not change.
* **Even step:** each state is traced back two steps (the *pretraceback*).
  Then its register is replaced in one exchange:

```
x1  = dec_t  [s]            predecessor at t-1 is {x1, a}   (s = {a,b})
x2  = dec_t-1[{x1, a}]      state at t-2 is pre = {x2, x1}
reg[s] <= { reg[pre] << 2 , a , b }
```

The two appended bits are the information bits of steps t-1 and t. By the
state numbering above, these are the bits of s itself. Register contents move
half as often as in plain register exchange.

Worked example (state bits oldest first; registers right-aligned):

| step | S3 | S2 | S1 | S0 |
|------|----|----|----|----|
| t=2  | `11` | `10` | `01` | `00` |
| t=4  | `10`+`11` = `1011` (pre S2) | `10`+`10` = `1010` (pre S2) | `11`+`01` = `1101` (pre S3) | `0000` (pre S0) |
| t=6  | – | `1101`+`10` = `110110` (pre S1) | `1011`+`01` = `101101` (pre S3) | `000000` (pre S0) |

`tb_hrem_smu` drives the decisions that produce exactly these registers and
checks them.

After step 12, `hrem_smu` sends the register of `best` (the ACS unit's
smallest-metric state) as the frame word. The first decoded bit is in the MSB.
The registers are then cleared. `FRAME_LEN` must be even. The unit is written
for m = 2, which means K = 3.

This gives the same result as a full Viterbi decoder that keeps complete
survivor paths. The testbenches compare against such a reference.

## The 4-phase handshake and its timing

Each channel has a request wire, an acknowledge wire and a data bundle. One
transfer goes through four phases:

1. The sender puts out data and raises `req`.
2. The receiver takes the data and raises `ack`.
3. The sender lowers `req`. From now on the data may change.
4. The receiver lowers `ack`. The next transfer may start only after this.

`bd_channel` is the interface used for every internal link. It carries
assertions for these rules and for stable data while `req` is high.

`hs_ctrl` is the controller each stage uses:

* `load` is high for one clock when a request arrives while the stage's
  output register is empty. On that clock the stage computes and stores its
  result.
* `in_ack` is raised on the next clock and held until `req` returns to zero.
* The stored token is offered on `out_req` one clock later.
* `out_req` is withdrawn one clock after `out_ack` is seen.
* A new `out_req` waits until `out_ack` has returned to zero.

The survivor memory loads with `produce` low except on the last step, so it
takes 12 tokens and sends one.

The handshake wires are registered and sampled on `clk`. The pipeline behaves
like an asynchronous one, in that it moves only on tokens and stalls on
back-pressure. Timing is still counted in clocks. Measured with a source and
sink that react in one clock:

* The chain accepts one information bit every **4 clocks**, so a frame takes
  48 clocks.
* The word's `dec_req` rises **7 clocks** after the 12th bit has been
  acknowledged.

## Top-level ports (`enc_dec`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `reset` | in | 1 | clock; synchronous reset, active high |
| `e_inp` | in | 1 | information bit |
| `e_noise0`, `e_noise1` | in | 4 (signed) | perturbation added to the V1 / V2 soft symbol of this bit |
| `e_req` / `e_ack` | in / out | 1 | 4-phase handshake of the input channel |
| `dec_out` | out | `FRAME_LEN` (12) | decoded frame, first bit in the MSB |
| `dec_req` / `dec_ack` | out / in | 1 | 4-phase handshake of the output channel |

`viterbi_decoder` is the decoder alone. Its input channel takes a soft pair
(`sym_t`, two signed 3-bit symbols), and its output channel gives the frame
word.

## Where this RTL departs from the original design, and what it adds

The following come from the original design:

* the code (K = 3, rate 1/2, V1/V2 equations, two delay stages);
* the ±3 soft levels;
* four 5-bit branch metrics, with bm[01] = i0 − i1;
* the BMU → ACSU (ACS + PMM loop) → SMU structure;
* the HREM rule and its worked example;
* 4-phase single-rail bundled-data channels;
* the top-level names `enc_dec`, `clk`, `reset`, `e_inp` and `dec_out(11:0)`.

The following are choices made for this RTL:

* **Clocked handshakes.** The original targets an FPGA with a clock. Here the
  request/acknowledge wires are clocked registers rather than self-timed
  circuits.
* **Extra top-level ports.** The handshake ports, the perturbation inputs and
  the soft mapper's clipping are additions.
* **Rate.** One information bit per 4 clocks. The original's waveform suggests
  one bit per clock.
* **Framing.** The 12-bit frames, the S0 start of each frame, the missing tail
  bits, and the smallest-metric end state are all choices made here. So are
  the PMM starting metrics, the 9-bit path metrics and the tie rules.
* **Soft symbol width.** The soft inputs are 3 bits, because −3..+3 does not
  fit in 2.
* **Parallel branch metrics.** They go to the ACSU in parallel, not bit-serially.
* **Code rate.** One summary of the original mentions rate 1/3. Everything else
  there, and this RTL, is rate 1/2.
* **Worked example.** It is only partly consistent, and the RTL follows its
  general rule. The S3 entry at t=6 and the t=8 column of the original
  illustration cannot all occur in one K = 3 trellis, so they are not
  reproduced.
* **Power.** The reported power figures (28 mW total, about 1 mW dynamic on a
  Spartan-3) are not reproduced or checked here.

## Files

| file | contents |
|------|----------|
| `rtl/viterbi_pkg.sv` | constants, token structs, branch-code and path-metric sizing functions |
| `rtl/bd_channel.sv` | 4-phase bundled-data channel interface with protocol assertions |
| `rtl/hs_ctrl.sv` | stage handshake controller |
| `rtl/conv_encoder.sv` | encoder stage |
| `rtl/soft_mapper.sv` | bits → ±3 soft symbols (+ perturbation, clipped) |
| `rtl/bmu.sv` | branch metric stage |
| `rtl/acs.sv` | combinational add-compare-select, 4 states |
| `rtl/acsu.sv` | ACS + path metric memory stage |
| `rtl/hrem_smu.sv` | hybrid register exchange survivor memory stage |
| `rtl/viterbi_decoder.sv` | BMU → ACSU → SMU |
| `rtl/enc_dec.sv` | top: encoder + mapper + decoder |
| `tb/vit_ref_pkg.sv` | reference encoder, metric and full-path Viterbi decoder for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each one
has a watchdog. Example, the end-to-end test at the default size:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_enc_dec \
  -y rtl -y tb +libext+.sv rtl/viterbi_pkg.sv tb/vit_ref_pkg.sv tb/tb_enc_dec.sv
./obj_dir/Vtb_enc_dec
```

Replace `tb_enc_dec` with another testbench name to run that one. Packages must
be listed first. Every other file is found through `-y`.

What the testbenches establish:

* `tb_enc_dec` runs 36 frames at the default parameters. The frames are of
  three kinds:
  * clean: the output must equal the input;
  * one symbol driven to the opposite level: the error must be corrected;
  * random perturbation: the output must equal the reference decoder's.

  Every fourth output word is acknowledged late, which stalls the whole chain
  back to the input. The test also counts decisions of 1, survivor register
  moves, odd-step holds, frames ending outside S0, clipped symbols and input
  stalls, and fails if any of them never happened.
* `tb_viterbi_decoder` runs clean, single-flip and noisy frames through the
  decoder alone. It also bounds the output latency.
* `tb_acsu` checks decisions, best state, path metrics and the end-of-frame
  flag against a reference trellis.
* `tb_hrem_smu` checks the worked example above, that registers move only on
  even steps, and the frame words against the reference decoder.
* `tb_bmu` and `tb_soft_mapper` check every input value.
* `tb_acs` checks 2000 random cases, including ties.
* `tb_hs_ctrl` and `tb_conv_encoder` check token order, the protocol and the
  one-clock offer timing.

## Changing it

* **`FRAME_LEN`** (a parameter of `enc_dec`, `viterbi_decoder`, `acsu`,
  `hrem_smu` and `conv_encoder`) sets the frame and output word length. It must
  be even. The path-metric width follows from it automatically.
* **Another code** means changing `branch_code` in the package and the encoder
  equations. A longer constraint length also needs a deeper pretraceback in
  `hrem_smu`, which is written for m = 2.
