# Challenge-obfuscated arbiter PUF with power side-channel countermeasures

An arbiter PUF (physically unclonable function) turns a challenge into a
response bit by racing one edge down two nominally identical delay paths; the
manufacturing variation of the die decides which path wins. Two attacks can
clone it:

* **Modelling from challenge/response pairs.** Challenge obfuscation defeats
  this: the external challenge `C` is first passed through a Multiple Input
  Signature Register (MISR) together with a secret nonce `alpha`, and only the
  resulting `C-hat` reaches the delay paths. A model trained on `(C, response)`
  pairs is then no better than guessing.
* **Modelling from the power drawn by the response flip-flop.** Obfuscation does
  nothing against this. The flip-flop that stores the response draws a current
  that differs for a stored 0 and a stored 1, so an attacker who records the
  supply current during the capture learns the response without ever seeing
  it — and can model the PUF from those traces alone.

This RTL implements the obfuscated PUF and two countermeasures against the
second attack, which can be used alone or together:

* **Dual flip-flop.** The arbiter latch has complementary outputs Q and Q-bar.
  A second, identical flip-flop stores Q-bar on the same edge, so at every
  capture one output rises exactly when the other falls. The masking only works
  if the two outputs drive equal loads — a layout requirement, not something
  the RTL can enforce; `response_b` is brought out so it can be given a load
  matched to `response`.
* **Randomized response setting.** Before each query the response flip-flop is
  loaded with a pseudo-random bit, so whether it switches at capture no longer
  depends on the previous response. The generator is re-seeded on every query
  with `C-hat[0]`, a bit the attacker cannot see.
* **Hybrid** (the default): both at once. The Q flip-flop gets the random bit,
  the Q-bar flip-flop its complement, so the pair is always complementary and
  each capture switches either both outputs or neither. The direction of the
  switching carries no information about the response.

## Block diagram

```
 challenge C ──► misr_obfuscator ──C-hat──► apuf_delay_chain ──t_top,t_bot──► sr_arbiter
 nonce alpha ──►  (MISR, N bits)             (N apuf_switch_stage)              (NAND S-R latch)
                        │ C-hat[0]                                                 │Q    │Q-bar
                        ▼                                                          ▼     ▼
                  rand_resp_init ──set/rst──────────────────────────────────► dual_ff_storage
                   (16-bit LFSR)                                           (response_ff ×1 or ×2)
                                                                              │          │
                                                                          response   response_b
```

| File | Role |
|---|---|
| `rtl/copuf_pkg.sv` | shared types (`fs_t`, `mitigation_e`), the per-die delay draw, MISR polynomials |
| `rtl/copuf_top.sv` | the whole PUF; parameter `MITIGATION` selects the storage variant |
| `rtl/misr_obfuscator.sv` | challenge obfuscation (MISR + nonce register + C-hat register) |
| `rtl/apuf_switch_stage.sv` | behavioural model of one straight/crossed switch stage |
| `rtl/apuf_delay_chain.sv` | behavioural model of the N-stage pair of delay paths |
| `rtl/sr_arbiter.sv` | behavioural model of the cross-coupled NAND arbiter latch |
| `rtl/response_ff.sv` | response flip-flop, set has priority over reset |
| `rtl/dual_ff_storage.sv` | one or two response flip-flops (dual flip-flop countermeasure) |
| `rtl/rand_resp_init.sv` | LFSR and set/reset drive for the randomized setting |

## How a query runs

The sequencing logic that issues the strobes of a query is not part of this
design. The four strobes are top-level ports, and whatever issues them must
follow this order (the testbenches do):

| Step | Strobe | Effect | Cycles |
|---|---|---|---|
| 1 | `chal_load` with `challenge` | MISR preset to `alpha`, `C` captured; `chal_ready` drops | 1 |
| | wait for `chal_ready` | MISR runs; `C-hat` is then registered and drives the switches | `MISR_CYCLES` (64) |
| 2 | `init` | response flip-flop(s) load the random bit (and its complement) | 1 |
| 3 | raise and hold `launch` | edge races down both paths; latch locks to the winner | `ceil(max(t_top,t_bot)/CLK_FS)`, 2 at the defaults |
| 4 | `capture`, then drop `launch` | flip-flop(s) store Q (and Q-bar); `response` valid next cycle | 1 |

A full query therefore takes about 70 clocks at the defaults, almost all of it
in the MISR. An assertion in `copuf_top` flags a `launch` raised while the MISR
is busy. Capturing before any edge has reached the latch stores 1 in both
flip-flops, because a NAND S-R latch with both inputs low drives both outputs
high.

`init` is ignored in the `MIT_NONE` and `MIT_DUAL_FF` variants. The nonce is
written with `nonce_we`/`nonce` and is held in a register that resets to 0.

## The obfuscation

`misr_obfuscator` computes, for `CYCLES` clocks starting from `state = alpha`,

```
state <= {state[N-2:0], 0} ^ (state[N-1] ? POLY : 0) ^ C
```

and `C-hat` is the final state. The map is affine over GF(2) in `C` and `alpha`.
A verifier that knows `alpha` can therefore recompute `C-hat`. The feedback
spreads every challenge bit over many `C-hat` bits, which is what breaks the
linear delay model an attacker would fit against external challenges. `POLY`
comes from `copuf_pkg::misr_poly(N)`: x^64+x^4+x^3+x+1 for 64 bits, and
primitive polynomials for 16 and 24 bits. `CYCLES` defaults to `N`.

The MISR structure itself is this design's interpretation of "a MISR taking
the challenge and a programmed nonce". The preset-with-nonce/XOR-challenge
arrangement, the polynomials and the cycle count are all choices made here. An
implementation that must interoperate with an existing verifier has to match
that verifier's MISR instead.

## The analog parts are models

The switch stages and the arbiter are analog in silicon and are modelled here
so that the whole design can be simulated cycle by cycle:

* **Delays as numbers.** An edge is represented by its arrival time in
  femtoseconds (`copuf_pkg::fs_t`, 32 bits). A stage adds the delay of the
  multiplexer path taken. Challenge bit 0 passes the edges straight; bit 1
  crosses them. Bit `i` steers stage `i`, and stage 0 is nearest the launch
  point.
* **Process variation as a seed.** Each of the 4·N path delays is
  `20 ps + 1 ps · g`. Here `g` is an approximately standard-normal draw (a sum
  of twelve uniform values) hashed from `DIE_SEED`, the stage and the path. A
  given seed stands for one die, and different seeds give different dies: two
  seeds disagree on about half of all challenges. The nominal 20 ps and the 5 %
  spread are assumed values. The real spread would come from transistor-level
  Monte-Carlo simulation.
* **The race in time.** `sr_arbiter` advances a time base by `CLK_FS` every
  clock while `launch` is high. A path signal rises in the first cycle whose
  time reaches that path's arrival time. The latch follows
  `q = NAND(top, qb)`, `qb = NAND(bot, q)`. When both edges land in one cycle,
  the exact arrival times decide. An exact tie, which would be metastability in
  silicon, resolves to `q = 0`. The result is `response = (t_bot < t_top)`.

Synthesizing `copuf_top` works, but the delay arithmetic becomes 32-bit adders.
A physical PUF needs hand-placed, symmetric multiplexer chains and a latch in
their place. The synthesizable parts proper are `misr_obfuscator`,
`rand_resp_init`, `response_ff` and `dual_ff_storage`.

## Randomized setting in detail

`rand_resp_init` holds a 16-bit Fibonacci LFSR (x^16+x^15+x^13+x^4+1, reset
value `16'hACE1`). On each `init` it steps once, with `C-hat[0]` XORed into
the feedback bit. The new feedback bit is the random bit `rbit`. The bit
reaches the flip-flop through its set/reset pins: `RST` is asserted for the
whole `init` cycle and `SET = rbit`. Because set has priority, the flip-flop
ends up holding `rbit`. In the hybrid variant the Q-bar flip-flop gets
`SET = ~rbit`. The LFSR type, width, taps and the way the seed bit enters are
this design's choices; only "a PRNG seeded with the LSB of the obfuscated
challenge" and the set/reset priority are given.

Set, reset and capture are all synchronous to `clk`, with `capture` acting as a
clock enable. The flip-flops have no power-on reset. Without the randomized
setting they hold arbitrary values until the first capture.

## Parameters of `copuf_top`

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 64 | challenge length = number of switch stages |
| `MITIGATION` | `MIT_HYBRID` | `MIT_NONE`, `MIT_DUAL_FF`, `MIT_RAND` or `MIT_HYBRID` |
| `MISR_CYCLES` | `N` | MISR clocks per challenge |
| `DIE_SEED` | `32'h1234` | identity of the modelled die |
| `CLK_FS` | 1 000 000 | femtoseconds of race time per clock (1 GHz) |
| `PRNG_W` | 16 | LFSR width (the default taps suit 16 bits) |

`N` = 16 and 24 work too; `misr_poly` gives their polynomials. For other
lengths it falls back to x^N+x+1, which works but is not necessarily primitive.
If `PRNG_W` is changed, `rand_resp_init.TAPS` has to be given a matching
polynomial.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with a
reference computed inside the testbench and prints
`TB_RESULT checks=<n> failures=<n>`:

* `tb_apuf_switch_stage`, `tb_apuf_delay_chain`: arrival times against a
  stage-by-stage race, and different dies give different responses.
* `tb_sr_arbiter`: the latch output every cycle, for top-first,
  bottom-first, same-cycle and exact-tie races at 10 ps resolution.
* `tb_response_ff`, `tb_dual_ff_storage`: set-over-reset priority, capture,
  and the single-flip-flop variant.
* `tb_rand_resp_init`: the LFSR sequence and the set/reset encoding.
* `tb_misr_obfuscator`: C-hat and the 64-clock latency; a new nonce changes
  C-hat.
* `tb_copuf_top`: 2000 complete queries at the default parameters (64-bit,
  hybrid). It checks the response pair after `init` and after `capture`. It
  also counts each mechanism and fails if one never occurs: obfuscation,
  random setting to 0 and to 1, captures that flip and keep the initial value,
  both response values, nonce changes, and a capture before the race settles.
* `tb_copuf_workloads`: 15 000 random challenges each on the unprotected PUF
  at 16, 24 and 64 bits, and on the 64-bit PUF with each countermeasure. Each
  configuration is a different die, driven by the helper `tb/copuf_harness.sv`.
  Besides response correctness it checks the switching property that each
  variant should have at capture. In the dual variants as many outputs rise as
  fall, and this holds at every capture. In the single variants a switching
  flip-flop always moves towards the response, which is the leak.
* `tb_crp_modeling`: a modelling attack from challenge/response pairs. It
  collects 10 000 pairs from one die, once with the delay chain fed the
  external challenge (a plain arbiter PUF) and once through `copuf_top`. A
  perceptron is trained on the standard arbiter-PUF parity features with 5000
  pairs and tested on the other 5000. It reaches about 97 % on the plain PUF
  and about 51 % on the obfuscated one, and the testbench requires at least
  90 % and at most 65 %.

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/copuf_pkg.sv tb/tb_copuf_top.sv --top-module tb_copuf_top
./obj_dir/Vtb_copuf_top
```

Each of these runs finishes in seconds.

## Limits and departures

* The protection is about currents and loads. This RTL shows only the logic
  behaviour: which flip-flops switch, and in which direction. How much the
  countermeasures actually reduce the leaked signal depends on matched
  flip-flop cells and matched output loads. It has to be judged with
  transistor-level or silicon power measurements, not with this code.
* The delay model is linear and additive, with no noise. Every query of a die
  gives the same response, so the reliability problems of a real PUF are not
  modelled. The reliability circuitry that full obfuscated-PUF designs add is
  not included.
* The MISR arrangement, the PRNG, the clocking, the reset and the query order
  are choices of this design, as described in the sections above.
