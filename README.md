# Adaptive Viterbi decoder (K = 3 … 7)

A Viterbi decoder's error-correcting power grows with the constraint length K
of the convolutional code, but so do its state count (2^(K-1)), its
trace-back length, its switching activity and the clocks it needs per
symbol. A receiver on a good channel does not need K = 7 to reach its target
bit error rate. This design therefore holds five rate-1/2 decoders, for
K = 3, 4, 5, 6 and 7, and runs exactly one of them at a time. A small
controller watches the channel's signal-to-noise ratio and, once per
reconfiguration interval (250,000 symbols), switches to the smallest K that
still reaches a bit error rate of 10^-5 at that SNR.

The decoder structure, the per-K clock schedule and the switching policy come
from an adaptive decoder that was mapped onto a multi-context dynamically
reconfigurable processor (NEC's DRP-1). On that device the five decoders are
sets of hardware contexts that share one processing-element array. Here they
are five ordinary blocks of synchronous logic. The section
[Departures from the reference design](#departures-from-the-reference-design)
lists every place where this RTL fills in or changes something.

## Block structure

```
adaptive_viterbi_top
├── adaptive_controller        K choice from SNR, interval counter, clock request
└── viterbi_core #(K) × 5      K = 3, 4, 5, 6, 7
    ├── context_sequencer      per-symbol context loop
    ├── acs_unit × 2^(K-1)     add-compare-select, one per state
    ├── ranking                smallest path metric and its state
    ├── pm_update              path-metric registers, init and normalisation
    └── systolic_traceback     5(K-1)-stage pipelined trace-back
viterbi_pkg                    types, per-K tables, trellis helpers
```

## Code and trellis conventions

- Code rate 1/2. Each symbol is two code bits, sent first bit first.
- Generator polynomials (octal, MSB taps the current input bit): (7,5) for
  K=3, (17,15) for K=4, (35,23) for K=5, (75,53) for K=6 and (171,133) for
  K=7. The first code bit uses the first polynomial.
- A state is the last K-1 input bits, with the newest bit in the MSB. States
  2n and 2n+1 at time t therefore both lead to state n (input 0) and to state
  n + 2^(K-2) (input 1) at time t+1. The predecessors of state j are
  p0 = 2·(j mod 2^(K-2)) and p1 = p0+1. The input bit of a state is its MSB.
- Input and output are one bit wide. The decoder is hard-decision: the branch
  metric is the Hamming distance (0..2) between the received pair and the
  branch label.
- Path metrics are 8 bits wide. After reset or init, state 0 starts at 0 and
  every other state at 64, so decoding starts from the all-zero encoder state.
  Each symbol, the smallest metric is subtracted from all of them. The ACS
  sums saturate at 255.

## One symbol, context by context

Each decoder steps through a fixed loop of *contexts*, one clock each. In the
reconfigurable original, each context was one hardware configuration; here
each is one state of `context_sequencer`, and the datapath blocks act on the
context they belong to.

| context        | work done                                                        |
|----------------|------------------------------------------------------------------|
| `INIT`         | path metrics to start values, trace-back cleared (once, on entry)|
| `INPUT1`       | first code bit taken (waits for `in_valid`)                      |
| `INPUT2`       | second code bit taken (waits for `in_valid`)                     |
| `ACS`          | all 2^(K-1) ACS units in parallel; results and decisions stored  |
| `RANK1`        | minimum of each group of 8 states registered                     |
| `RANK2_SA1`    | global minimum → path-metric update; trace-back group 1          |
| `SA2`          | trace-back group 2                                               |
| `SA3_OUT`      | trace-back group 3, decoded bit out                              |

The larger decoders need more contexts per symbol:

| K | states | trace-back stages | loop                                              | clocks/symbol | decode delay (symbols) |
|---|--------|-------------------|---------------------------------------------------|---------------|------------------------|
| 3 | 4      | 10                | IN1 IN2 ACS RANK2_SA1 (ranking in one clock)      | 4             | 19                     |
| 4 | 8      | 15                | IN1 IN2 ACS RANK1 RANK2_SA1                       | 5             | 29                     |
| 5 | 16     | 20                | IN1 IN2 ACS RANK1 RANK2_SA1                       | 5             | 39                     |
| 6 | 32     | 25 (13+12)        | IN1 IN2 ACS RANK1 RANK2_SA1 SA3_OUT               | 6             | 48                     |
| 7 | 64     | 30 (10+10+10)     | IN1 IN2 ACS RANK1 RANK2_SA1 SA2 SA3_OUT           | 7             | 57                     |

Throughput is one decoded bit per symbol, that is f_clk / (clocks per symbol).
At the clock frequencies below, this gives 9.95, 8.95, 7.41, 6.08 and
4.71 Mbit/s.

## The systolic trace-back

This is the least obvious part of the design. The trace-back is a chain of
L = 5(K-1) stages. Stage 0 takes the best state of the current symbol, which
comes straight from the ranking in `RANK2_SA1`. Each stage replaces its state
s by the predecessor `{s[K-3:0], d}`, where d is the ACS decision that was
stored for state s at the right trellis time. It then passes the result on
through a register. The MSB of the state that leaves the last stage is the
decoded bit, traced back L steps.

Every stage works once per symbol, and a state needs one symbol per stage to
move down the chain. So the state that stage i works on is older than the
current symbol. When two neighbouring stages work in the same context, the
second one reads the value the first wrote one symbol earlier, so the age
grows by 2 per stage. When the stages sit on either side of a context
boundary (K = 6 and 7), the later stage reads the value written earlier in
the same symbol, and the age grows by only 1. `viterbi_pkg::sa_tap(K, i)`
computes this age, and stage i reads the decision vector of that age. The
decision vectors are kept in a shift register that is `decode_delay(K)`
symbols deep and is pushed in the `ACS` context. That is 57 × 64 bits for
K = 7.

The decoded bit that leaves in symbol t is the input bit of symbol
t − decode_delay(K). `decode_delay(K) = sa_tap(K, L-1) + 1`, which gives the
delay column of the table above. The core suppresses `out_valid` for the
first `decode_delay(K)` symbols after init.

## Adaptation

`adaptive_controller` counts the symbols the active decoder completes. At the
end of every `RECONF_INTERVAL`-th symbol it samples `snr_db10` (signed, in
units of 0.1 dB) and picks K from this table:

| SNR ≥ (dB) | 5.3 | 4.9 | 4.3 | 3.8 | below |
|------------|-----|-----|-----|-----|-------|
| K          | 3   | 4   | 5   | 6   | 7     |

These are the SNRs at which each decoder of the reference design reaches a
BER of 10^-5. With `adapt_en` low the choice is always K = 7; this is the
non-adaptive baseline. After reset, K = 7.

`clk_khz` tells an external clock generator what frequency the selected
decoder should run at. With `max_rate` high it is the decoder's maximum
(39.8, 44.76, 37.05, 36.51, 32.95 MHz for K = 3…7), so throughput rises on
good channels. With `max_rate` low it is the frequency that holds the
throughput at 4.71 Mbit/s (18.83, 23.54, 23.54, 28.25, 32.95 MHz), so power
falls instead. These figures are those of the original device. This RTL does
not change its own clock.

**Switch protocol.** K changes on the clock edge that ends the interval's
last symbol, so every switch lands on a symbol boundary. The old decoder
drops back into `INIT`. The new one spends one clock in `INIT` and then takes
input, with its trellis restarted from state 0. As a result:

- the transmitter must restart its encoder from the all-zero state at the
  first symbol of an interval whose K differs from the previous one;
- the last `decode_delay(K_old)` bits before a switch never leave the old
  decoder. A link layer that cannot lose them must treat them as padding;
- the old decoder's last decoded bit appears one clock after the switch.
  The top ORs the decoder outputs, and an assertion checks that only one is
  ever valid. `out_k` names the decoder that produced `out_bit`.

If the interval ends with the same K, nothing happens and decoding continues
without loss.

## Top-level interface (`adaptive_viterbi_top`)

| port         | dir | width | meaning                                                     |
|--------------|-----|-------|-------------------------------------------------------------|
| `clk`, `rst_n` | in | 1    | clock, asynchronous active-low reset                        |
| `adapt_en`   | in  | 1     | 0: always K = 7                                             |
| `snr_db10`   | in  | 10    | signed SNR estimate, 0.1 dB                                 |
| `max_rate`   | in  | 1     | clock request mode (maximum / 4.71 Mbit/s)                  |
| `in_valid`, `in_bit`, `in_ready` | in/in/out | 1 | code-bit stream, a bit moves when valid and ready are both high |
| `out_valid`, `out_bit` | out | 1 | decoded bit, one-clock pulse, no back-pressure       |
| `out_k`      | out | 3     | K of the decoder that produced `out_bit`                    |
| `k_active`   | out | 3     | K currently selected                                        |
| `reconfig`   | out | 1     | one-clock pulse when K changes                              |
| `ctx_active` | out | 3     | context of the active decoder (`viterbi_pkg::ctx_e`)        |
| `clk_khz`    | out | 16    | requested clock frequency, kHz                              |

Parameter: `RECONF_INTERVAL` (default 250,000 symbols). Each `viterbi_core`
takes `K` (3…7), and the rest of its sizes follow from K through
`viterbi_pkg`. At the default parameters, synthesis gives about 8,700
flip-flops for the whole top. Most of them are the K = 7 decision history
and path metrics.

## Simulation

All files are plain SystemVerilog-2017. Compile the package files first. For
example, to run the end-to-end test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/viterbi_pkg.sv tb/vit_tb_pkg.sv tb/tb_adaptive_viterbi_top.sv \
  --top-module tb_adaptive_viterbi_top -o sim
./obj_dir/sim
```

Every testbench checks its results and ends with a line
`TB_RESULT checks=N failures=M`. `tb/vit_tb_pkg.sv` holds the reference
convolutional encoder and the expected per-K tables, written separately from
the RTL.

| testbench                   | what it shows                                                                 |
|-----------------------------|-------------------------------------------------------------------------------|
| `tb_acs_unit`               | every ACS unit of K=3 and K=7 against encoder branch labels, incl. saturation |
| `tb_ranking`                | two-clock and one-clock minimum search, tie rule, hold                        |
| `tb_pm_update`              | init values, normalised update, hold, priority                               |
| `tb_systolic_traceback`     | K=4/6/7 trace a random trellis path with the listed delays                   |
| `tb_context_sequencer`      | context loops of all K, input stalls, return to init                         |
| `tb_viterbi_core`           | all five decoders: bit-exact decoding with channel errors and stalls, delay, clocks/symbol, re-init |
| `tb_adaptive_controller`    | thresholds (at the exact boundary values), interval timing, baseline mode, clock request |
| `tb_adaptive_viterbi_top`   | end to end with a 150-symbol interval: K goes 7→3→3→4→5→6→7→7 (adaptation off)→3, with errors and stalls; every decoded bit checked, and every mechanism is counted |
| `tb_adaptive_viterbi_full`  | the top at its default parameters: six 250,000-symbol intervals (K = 7, 3, 4, 5, 6, 7, adaptation off for one), about 8.5 M clocks, about 15 s |
| `tb_viterbi_ber`            | BER over a simulated channel (encoder → BPSK → Gaussian noise → 1-bit quantiser → decoder) |

The BER run (50,000 symbols per point, Eb/N0 in dB) prints, for one seed:

| Eb/N0 | raw    | K=3    | K=4    | K=5    | K=6    | K=7    |
|-------|--------|--------|--------|--------|--------|--------|
| 3.2   | 7.6e-2 | 2.7e-2 | 3.1e-2 | 2.9e-2 | 2.8e-2 | 2.5e-2 |
| 4.3   | 5.0e-2 | 8.1e-3 | 8.2e-3 | 8.5e-3 | 4.3e-3 | 3.7e-3 |
| 5.3   | 3.2e-2 | 2.3e-3 | 1.3e-3 | 8.6e-4 | 2.6e-4 | 1.8e-4 |

From about 4.3 dB up, larger K clearly corrects more. With a 1-bit quantiser
the absolute BERs are well above 10^-5 at these SNRs, so the SNR thresholds
in the controller are best treated as configuration values to be calibrated
for the real receiver.

## Departures from the reference design

- **Fixed logic instead of contexts.** On the reconfigurable device, the five
  decoders share one processing-element array, and a switch loads other
  contexts. Here all five exist side by side, and the unselected ones sit in
  `INIT`. The behaviour (one decoder at a time, a one-clock switch) is kept,
  but the area is not shared.
- **Own choices, where the reference gives no detail:** the generator
  polynomials; hard-decision Hamming metrics; 8-bit saturating metrics and
  normalisation by the minimum; the start metric of 64; splitting the ranking
  into groups of 8; the decision shift register and the stage timing inside
  the trace-back; the equal split of the trace-back stages between contexts;
  the valid/ready input, the output without back-pressure, and suppressing
  output until the trace-back is full; stalling in the input contexts; the
  SNR encoding; K = 7 after reset; the switch protocol above.
- **K = 3 schedule.** Four clocks per symbol leave no room for a separate
  first ranking clock, so the K = 3 decoder ranks in a single clock.
- **Not built:** the reconfigurable processor itself (processing elements,
  tile memories, state-transition controllers, multipliers, memory and PCI
  controllers, PLLs); any clock or power control beyond the `clk_khz`
  request; SNR estimation, which is an input here. The reference's power and
  frequency figures are properties of that silicon and are not modelled.
- **BER.** The thresholds are carried over unchanged. This decoder does not
  reach 10^-5 at those SNRs with a hard-decision channel (see the table
  above).
