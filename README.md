# Max-Log-MAP decoder for the (7,5) recursive systematic code

This is a soft-in soft-out (SISO) decoder for the 4-state, rate-1/2
recursive systematic convolutional (RSC) code with generators (7,5) octal.
Two of these decoders, with an interleaver between them, make up a turbo
decoder. For each trellis step it takes three inputs:

- the noisy systematic sample `yd`;
- the noisy parity sample `yp`;
- the a priori log ratio `app` from the other constituent decoder.

At the end of a frame it returns one signed log-likelihood ratio `l` per
bit. A positive `l` means the bit was 1; its size says how sure the decision is.

The algorithm is Max-Log-MAP, the log-domain BCJR algorithm with
`ln(e^a + e^b)` replaced by `max(a, b)`. The hardware rests on three ideas:

1. **Branch metrics without multipliers.** Max-Log-MAP gives the same
   decisions whatever the channel noise variance, so the variance is fixed at
   N0 = 2. The branch metric then becomes the sum of ±yd, ±yp and a logarithmic
   a priori term from a 17-entry table.
2. **No memory for β.** The forward recursion (α) runs while the frame
   arrives. The branch metrics γ and the α values go into two memories. When
   the frame ends, the backward recursion (β) and the LLR run together,
   reading both memories from the last step back to the first. Each β value
   is used as soon as it is made and is never stored. Only two frame-sized
   memories are needed, not three.
3. **8-bit integer metrics.** Every metric is an 8-bit two's-complement
   integer. All additions saturate, and each step is normalised by
   subtracting the largest of the four metrics.

## The code and its trellis

The encoder has two memory cells, M1 and M2. Its state is (M1, M2), written
as 2·M1 + M2. For an input bit d:

- feedback a = d ⊕ M1 ⊕ M2
- parity p = a ⊕ M2
- next state = (a, M1)

The BPSK mapping is 0 → -1 and 1 → +1. A branch label is the pair
(systematic, parity) that the branch sends.

| from state | input -1: next state, label | input +1: next state, label |
|---|---|---|
| 0 | 0, 00 | 2, 11 |
| 1 | 2, 00 | 0, 11 |
| 2 | 3, 01 | 1, 10 |
| 3 | 1, 01 | 3, 10 |

Each step therefore has only four distinct branch metrics, one per label.
The trellis is terminated: each frame starts and ends in state 0. The last
two symbols of every frame must be the tail that returns the encoder to
state 0. These tables are in `rtl/map_pkg.sv` as `PRED_A/PRED_B/GA/GB`
(predecessors, used by α) and `SUCC0/SUCC1/GS0/GS1` (successors, used by β).

## Branch metrics (`add_sub`, `app_lut`, `gamma_add`)

With N0 = 2, the four branch metrics of step t are:

```
g00 = -yd - yp + lnAP(-1)        g10 = +yd - yp + lnAP(+1)
g01 = -yd + yp + lnAP(-1)        g11 = +yd + yp + lnAP(+1)
```

**`add_sub`** forms the four channel sums from the 6-bit inputs. The inputs
are signed, with 3 fraction bits, so they range from -4.0 to +3.875. Each sum
is rounded to the nearest integer, with ties rounding up, and kept as a
metric.

**`app_lut`** turns the log a priori ratio APP = ln(P(+1)/P(-1)) into the two
log probabilities:

```
lnAP(+1) = -ln(1 + e^-APP)
lnAP(-1) = -ln(1 + e^+APP)
```

- APP is clamped to [-8, 8].
- Outputs are rounded to integers and lie in [-8, 0].
- Rounded, `ln(1 + e^k)` is `max(k, 0)` plus 1 at k = 0 (where the value is ln 2).
- The table is computed from this formula when the design elaborates; it is
  not stored as data.

**`gamma_add`** adds the two parts and registers the four metrics.
The symbol is accepted on one clock edge; its γ is valid after the next edge.

## Forward and backward recursions (`alpha_unit`, `beta_unit`)

There is one add-compare-select unit per state, so all four states update at
once:

```
alpha_t(s)     = max over the two predecessors s' of [alpha_{t-1}(s') + g_t(s'->s)]
beta_{t-1}(s') = max over the two successors s   of [beta_t(s)       + g_t(s'->s)]
```

Each step takes two clock cycles:

- **Cycle 1:** the eight sums are registered.
- **Cycle 2:** each state keeps the larger of its two sums. The maximum of the
  four results is then subtracted, so the best state sits at 0 and the others
  are negative.

Other rules:

- Every addition and the subtraction saturate to [-128, 127].
- -128 stands for minus infinity, i.e. a state that cannot be reached.
- α starts, and β ends, at {0, -128, -128, -128}: state 0 is certain.
- Each unit has an assertion that its input strobe never comes in two
  consecutive cycles.

α and β are each normalised by their own maximum. Normalisation adds the same
constant to all four states, so the LLR is unchanged.

## Soft output (`llr_unit`)

For step t, the unit takes:

- α_{t-1} from memory;
- γ_t from memory;
- the β_t that the β unit has just produced.

It computes

```
l_t = max over +1 branches [alpha_{t-1}(s') + beta_t(s) + g_t]
    - max over -1 branches [alpha_{t-1}(s') + beta_t(s) + g_t]
```

in a five-stage pipeline:

1. α + β for the eight branches;
2. add γ;
3. pairwise maxima inside each group of four;
4. group maxima;
5. the saturating difference.

A new step can enter every cycle. In this schedule one enters every second
cycle.

## Frame schedule (`map_ctrl`, `metric_ram`)

The decoder works on one frame at a time, in two phases.

**Forward phase (`busy` low between symbols).**

- A `start` pulse while `busy` is low takes one symbol from the bus.
- `busy` is high in the cycle after each accepted symbol, because α needs two
  cycles per step. At most one symbol is accepted every two cycles.
- When the symbol's γ is ready, it is written to RAM1 at address t. The α
  vector that comes before it, α_{t-1}, is written to RAM2 at the same address.
- When MAX_FRAME symbols have been taken, `busy` stays high until `block`.

**Backward phase (`busy` high).**

- `block` ends the frame. It may come with the last symbol or any time after it.
- One cycle later the β unit is loaded with the end-of-frame metrics.
- Both memories are read from address N-1 down to 0, one address every two
  cycles.
- In the cycle after each read, the β unit and the LLR unit both take the
  word.
- After the last read, five cycles let the LLR pipeline empty. The α unit is
  then reset for the next frame and `busy` falls.

Timing, measured when `block` comes with the last symbol, counting that edge as cycle 0:

```
cycle      0        1..           7        9       ...   2N+5       2N+6
           block    gamma of the  first l  next l        last l     busy low,
           +last    last symbol,  (bit     (bit                     next frame
           symbol   reads start   N-1)     N-2)                     may start
```

A frame of N symbols takes 2N cycles to load at full rate. It then needs
2N + 6 more cycles to decode. The LLRs come out **last bit first**, one every
two cycles, each flagged by `l_valid`.

Each memory is a single-port synchronous RAM of MAX_FRAME words. Each word is
32 bits: four 8-bit metrics. At the default size that is 1024 × 32 bits, or
4 KB per memory, which is enough for 1024 trellis steps. `metric_ram` is
written as an array so that synthesis can map it to a RAM macro.

## Interface of `map_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all registers use the rising edge |
| `rst` | in | 1 | synchronous reset, active high |
| `start` | in | 1 | a symbol is on `yd`/`yp`/`app`; taken only if `busy` is low |
| `block` | in | 1 | one-cycle pulse: end of frame (with or after the last symbol) |
| `yd`, `yp` | in | DATA_W (6) | signed samples, DATA_FRAC (3) fraction bits |
| `app` | in | APP_W (5) | signed integer log a priori ratio; values beyond ±8 are clamped |
| `l` | out | 8 | signed LLR, positive = bit 1 |
| `l_valid` | out | 1 | `l` holds a new LLR |
| `busy` | out | 1 | `start` is not taken this cycle |

`start` and `block` are ignored during the backward phase. A `block` with no
symbol in the frame is also ignored. A frame holds 1 to MAX_FRAME symbols,
tail included.

Parameters are `MAX_FRAME` (1024), `DATA_W` (6), `DATA_FRAC` (3) and `APP_W`
(5). The metric width (8) is a package constant.

## Where this design departs from the original description

- **Latency.** The original chip quotes 11 cycles from a symbol to its LLR.
  Here the last symbol's LLR appears 7 cycles after it. Over a whole frame the
  decoder needs about 4 cycles per bit, against the 11 the original figure
  implies. The two-cycle α/β steps and the five-stage LLR pipeline are kept.
  The control schedule is this design's own.
- **Input width.** Data inputs are 6 bits, as the quantisation study
  recommends. The original pin list had 5.
- **β normalisation.** β is normalised by its own maximum, as the
  normalisation study recommends. The original reference code subtracted the
  α maximum.
- **Ports.** `l_valid` and `busy` are added; without them the output cannot be
  used. The original had only `l` as an output.
- **Clock edge.** The whole design uses the rising edge.
- **Output order.** LLRs come out in reverse order, just as they are computed.
  Any reordering belongs to the interleaver of the surrounding turbo decoder.
- **Not built:**
  - the I/O pad ring of the chip;
  - the turbo loop: the second constituent decoder, the interleaver and
    the extrinsic information exchange. This block is one SISO decoder.
- **Rounding.** Rounding the channel sums and the a priori table to integers
  is the simplest reading of "integer metrics". The exact rounding rule is
  this design's choice.

## Performance

The original implementation reports a 143 MHz clock in 0.18 µm CMOS. No
timing analysis was done for this RTL.

At 143 MHz, this schedule decodes a 512-bit block in 2062 cycles. That is
about 35 Mb/s for one SISO pass. A turbo decoder with I iterations makes 2·I
passes, so its rate is lower by that factor.

In simulation over AWGN, with one pass and no a priori input, the bit error
rate of the decoded frames is well below that of hard decisions on the
systematic samples. For example, at Eb/N0 = 2.5 dB:

- 512-bit blocks: 0.0046 decoded, against 0.091 uncoded.
- 400-bit blocks: 0.0058 decoded.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference model
`tb/map_ref_pkg.sv` is separate from the RTL. It builds the trellis from the
encoder equations and the a priori table from real-valued `ln`/`exp`. It
clamps after every addition, in the same order as the hardware, so the
hardware must match it bit for bit.

| testbench | what it checks |
|---|---|
| `tb_add_sub` | all 4096 input pairs against rounded real sums |
| `tb_app_lut` | every APP code against `ln(1+e^x)` |
| `tb_gamma_add`, `tb_alpha_unit`, `tb_beta_unit`, `tb_llr_unit` | random and extreme metrics against the reference arithmetic, plus pipeline latencies |
| `tb_metric_ram` | write/read against a model |
| `tb_map_ctrl` | the schedule: addresses, strobes, 2N + 6 cycle backward phase, full frame, refused starts |
| `tb_map_decoder` | end to end, default parameters (below) |
| `tb_map_ber` | 512- and 400-bit blocks at three noise levels (below) |

**`tb_map_decoder`** runs the whole decoder at its default parameters:

- frames of random length and one of the full 1024 symbols;
- noisy and clean channels, random a priori values, starts on every cycle
  and with gaps;
- every LLR compared with the reference;
- the cycle timing above checked;
- it counts saturation, normalisation, refused starts, full frames,
  clamped APP values and error-free decodes, and fails if any of them never
  happens.

**`tb_map_ber`** also measures bit error rate and throughput.

Simulation with Verilator 5 (list the two packages first):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/map_pkg.sv tb/map_ref_pkg.sv tb/tb_map_decoder.sv --top-module tb_map_decoder
./obj_dir/Vtb_map_decoder
```

Replace `tb_map_decoder` with any other testbench name. Unit testbenches that
do not use the reference package can leave out `tb/map_ref_pkg.sv`. Each run
takes well under a second.

## Files

| file | content |
|---|---|
| `rtl/map_pkg.sv` | metric type, saturating arithmetic, trellis tables |
| `rtl/add_sub.sv` | channel sums ±yd±yp |
| `rtl/app_lut.sv` | a priori table |
| `rtl/gamma_add.sv` | branch metric register |
| `rtl/alpha_unit.sv`, `rtl/beta_unit.sv` | forward and backward add-compare-select with normalisation |
| `rtl/llr_unit.sv` | five-stage soft output pipeline |
| `rtl/metric_ram.sv` | single-port RAM for γ and α |
| `rtl/map_ctrl.sv` | frame controller |
| `rtl/map_decoder.sv` | top level |
