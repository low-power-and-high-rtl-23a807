# Variable-precision LMS receiver and wave-pipelined multiplier

This repository holds two arithmetic datapaths for a software-defined radio
baseband. Both aim to save power.

1. **An adaptive-modulation receiver.** It has a 32-tap complex delayed-LMS
   equalizer and a QPSK/16/64/256-QAM slicer. Its multipliers narrow their
   word when the modulation gets simpler. A simpler constellation tolerates
   more quantisation noise. A narrower multiplier has a shorter critical path,
   so the supply voltage can be lowered while throughput stays the same.
   Voltage and precision are switched together per modulation scheme:

   | scheme  | multiplier precision | supply requested |
   |---------|----------------------|------------------|
   | QPSK    | 9 bits               | 1.35 V           |
   | 16-QAM  | 11 bits              | 1.50 V           |
   | 64-QAM  | 13 bits              | 1.65 V           |
   | 256-QAM | 15 bits              | 1.80 V           |

2. **A 9 × 9 unsigned array multiplier organised as a 15-stage wave
   pipeline.** It has 9 carry-save rows plus a 6-stage Kogge-Stone adder. The
   stages are grouped three to a clock period, so it delivers one product per
   clock with a latency of 5 clocks. The target circuit is footed, blocking
   wave-Domino logic at 1.48 GHz, which gives a latency of 3.38 ns. In RTL the
   wave pipeline is a register pipeline with the same stage split. Two
   behavioural models describe the circuit level: the 3-phase clock delay line
   and the Domino cells.

The two datapaths share only clock and reset in the top module,
`sdr_arith_top`.

## Numbers and formats

- Every receiver word is a signed 15-bit Q1.14 value (`sdr_pkg::word_t`).
  Complex values are the struct `cplx_t {re, im}`.
- The modulation scheme is the enum `mod_e`:
  `MOD_QPSK`, `MOD_QAM16`, `MOD_QAM64`, `MOD_QAM256`.
  Each scheme has b = 1, 2, 3, 4 bits per dimension.
- The constellation uses a half-scale grid. The levels are (2k+1−L)/(2L) for
  k = 0..L−1, with L = 2^b, so every point lies in [−½, ½). The other half of
  the Q1.14 range is headroom for channel gain and noise. The weights needed to
  invert a moderate channel then stay below 1.

## The variable-precision multiplier (`vp_mult`)

`vp_mult` is a 15 × 15 signed Baugh-Wooley array. The partial-product bit a_i·b_j
is complemented when exactly one of i, j is the sign position (14). Two
correction ones are added: one at bit 2N−1 and one at bit N.

Reduced precision p (9..15) keeps only the top p bits of each operand, with
the values aligned to the MSB:

- Partial-product rows and columns with index below L = 15 − p are gated to
  zero.
- The lower correction one moves from bit N to bit N + L, because the
  Baugh-Wooley identity now holds for a p-bit array sitting at offset L in both
  operands.

With that move, the result equals the exact product of the two truncated
operands. The testbench checks this for every precision. Gated cells do not
toggle, which is where the power saving comes from. The model is a flat
carry-save sum of gated rows. It is combinational.

`cmac` builds one complex multiply-accumulate from four `vp_mult` instances:
r = c + a·b, or c + a·conj(b). Each product is brought back to Q1.14 by
**rounding to nearest**: half an LSB is added, then the product is shifted
right by 14 + SHIFT. Cutting instead of rounding looks harmless but is not. In
the weight update the half-LSB bias of a cut is integrated every cycle. The
resulting weight drift was large enough to break 64-QAM and 256-QAM decisions.

## The delayed-LMS equalizer (`lms_equalizer`)

The equalizer uses the delayed direct form, with retiming.

**Filter.** The input x(n) is broadcast to all taps. Tap k computes
v_k·x(n) + s_{k+1}, where s_{k+1} is the registered partial sum from the tap
above it, and registers the result. The output is the combinational sum at
tap 0. Every stage has one multiplier and one 3-input adder in its path. This
gives y(n) = Σ v_k(n−k)·x(n−k).

**Update.** The error and the input are each delayed by D = NTAPS = 32 cycles.
Tap k sees x(n−D−k), and each weight does

    v_k ← v_k + 2^-MU_SHIFT · e(n−D) · conj(x(n−D−k))

MU_SHIFT = 7 gives μ = 2^-7 ≈ 0.0078, the power of two nearest the intended
0.01. The weights are stored conjugated: v = conj(w), so y = Σ v_k x_k.

μ is applied as a shift of the full update product, inside `cmac`. It is not
applied to the error before the multiplier. The reason: at 9-bit precision the
operand gating would round a small μ·e to zero, and adaptation would stop.

Other controls:

- `adapt` enables the update.
- `load_en`, `load_idx` and `load_w` write a single weight instead.
- Weights reset to zero.
- `prec` sets all 256 multipliers at once (32 taps × 2 complex MACs × 4).

Related blocks:

- `lms_err` forms e = d − y with saturation. The reference d is the pilot
  while `train` is set, and the slicer's decision afterwards.
- `quantizer` rounds the received sample to prec − 2 bits, round-half-up with
  saturation. The data word is two bits shorter than the weight word.
- `qam_demod` slices I and Q on their own. The level index is the component
  plus ½, cut to b fraction bits and clamped. It outputs the indices and the
  ideal point.

## Word-length and voltage control (`wl_ctrl`)

`wl_ctrl` maps the scheme to a precision and a supply request, given as
`vdd_mv` in millivolts. A longer word needs the higher voltage first:

- **Widening.** The controller raises `vdd_mv` at once, holds `busy` for SETTLE
  cycles, and then widens `prec`. The new precision shows SETTLE + 1 = 17
  cycles after the mode change.
- **Narrowing.** `prec` and `vdd_mv` both change in the next cycle.

`switched` pulses for one cycle whenever a new precision takes effect. After
reset the controller is at 15 bits and 1800 mV. The regulator itself is not
part of this design. Its interface is `vdd_mv` and `vdd_busy` on the top.

## The wave-pipelined multiplier (`wd_mult`)

Stage layout (one logic stage each):

| stages | block | work |
|--------|-------|------|
| 1 | `wd_csa_array` | row 0 = x AND y0 |
| 2–9 | `wd_csa_array` | add row k−1 with one carry-save (full-adder) row; carries shift one column left |
| 10 | `ks_adder` | propagate/generate |
| 11–14 | `ks_adder` | Kogge-Stone prefix levels at distances 1, 2, 4, 8 |
| 15 | `ks_adder` | sum |

The adder is 10 bits wide and covers product bits 8..17. The low 8 product bits
are already final after the array, so they travel beside the adder as
side-band bits.

In the target circuit a shared delay line gives three local clocks per global
clock. Each local clock is shifted by Tc/3 and drives one of every three
stages, so there are no latches between stages. The RTL models this with a
register after every third stage (`PHASES = 3`), giving 15 / 3 = 5 cycles of
latency and one product per cycle. With `PHASES = 1` the module has a register
after every stage, 15 cycles of latency.

The `ks_adder` parameter `STAGE0` tells it how many stages precede it, so that
registers fall on the same global boundaries.

### Circuit-level models

These two files use delays and are for simulation only:

- **`clk_delay_line`** is a chain of buffer delays from the global clock.
  Tap i rises i·Tc/3 after the global edge. The three shifts add up to exactly
  one period, so the fourth phase lines up with the next global edge. That
  alignment is what stops delay variation from accumulating along the line.
  The default is Tc = 0.676 ns, that is 1.48 GHz.
- **`domino_cell`** models footed Domino AND, REPEATER and CARRY cells
  (single-rail) and a dual-rail SUM (XOR3) cell. A dynamic node is precharged
  high while the clock is low and discharged during evaluation, so `out` is
  low during precharge and can only rise. The raw complement (`out_n_raw`) is
  precharged high. Feeding it into the next wave causes the precharge race.
  `out_n` is the pass-transistor inverting gate: the raw complement ANDed with
  the clock. It is low through precharge. Right after the clock rises it can
  pulse high until the node discharges. With blocking clocks that glitch is
  harmless.

## Top module (`sdr_arith_top`)

The receiver chain, in order:

    rx_x → quantizer → lms_equalizer → eq_y → qam_demod → sym_i / sym_q / decision
                              ↑                            │
                              └─ e ← lms_err ←─ pilot / decision

`wl_ctrl` drives `prec` of the quantizer and equalizer.

The multiplier ports are separate: `wm_in_valid`, `wm_x`, `wm_y`,
`wm_out_valid`, `wm_p`.

Timing:

- `eq_y`, the decisions and `eq_err` are combinational from `rx_x` within a
  cycle.
- Weights move on the clock edge.
- Default parameters: NTAPS = 32, D = 32, MU_SHIFT = 7, SETTLE = 16,
  PHASES = 3.

The two circuit models are not instantiated in the top. The register pipeline
of `wd_mult` stands in for them in synthesizable logic.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values are
computed in the testbench itself:

- exact truncated-operand products;
- a cycle-level reference model of the DLMS with the same rounding;
- brute-force nearest-level slicing;
- latency counts for `wd_csa_array` (3), `ks_adder` and `wd_mult` (5);
- the settle timing of `wl_ctrl`;
- phase offsets of the delay line;
- precharge, evaluation and monotonicity of every Domino cell.

`tb_sdr_arith_top` runs the whole design at its default size, with no
parameter overrides. The channel is x(n) = 1.25·s(n) + (0.25+0.125j)·s(n−1)
plus ±32-LSB uniform noise. This channel is chosen for the test: it is not
taken from the original study. For each scheme in turn (QPSK, 16-QAM, 64-QAM,
256-QAM, back to QPSK) the test:

- switches the mode;
- checks precision, voltage and the 1-cycle or 17-cycle switch timing;
- trains on random pilots and checks the MSE;
- runs decision-directed and counts symbol errors. Every scheme had 0 symbol
  errors in the runs made at the default size.

The top testbench also loads a weight and streams back-to-back products
through the wave multiplier, checking them against x·y after 5 cycles. It counts every
mechanism: narrowing, widening, settle cycles, training, decision-directed
operation, reduced precision, weight load and back-to-back multiplies. A
mechanism that never happens counts as a failure. The run takes about
3 minutes.

`tb_sum_wave_pipeline` chains six `domino_cell` SUM cells on one
`clk_delay_line`. Stages 1–3 and 4–6 share Clk1..Clk3, so two waves are in
flight with no register anywhere. It checks the parity result of 200 waves on
both rails, and that each wave reaches stage 6 5·Tc/3 after it entered.

To simulate with plain Verilator (5.x), put the package first:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/sdr_pkg.sv tb/tb_sdr_arith_top.sv --top-module tb_sdr_arith_top
    ./obj_dir/Vtb_sdr_arith_top

Replace `tb_sdr_arith_top` with any other `tb_<block>` to test one block. The
simulator is 2-state: every register that is read is reset.

## Where this design departs from, or fills in, the original study

- **Word lengths.** The source gives two sets of word lengths. The
  per-scheme table lists 9/11/12/14 bits plus sign. The multiplier section
  concludes 9, 11 and 13 bits with 15 kept for 256-QAM, and its voltage table
  uses these. This design follows the multiplier section, with the sign
  counted in the precision.
- **Gating.** The source leaves one corner of the multiplier array ungated,
  to save gating logic. This model gates every partial product of a dropped
  bit, so the product depends only on the kept bits, whatever the dropped
  bits hold.
- **Step size.** μ = 2^-7 instead of 0.01. It is applied after the update
  multiplier.
- **Rounding and scale.** Products are rounded to nearest. The adders wrap in
  15 bits and the error saturates. The constellation is half-scale. All of
  these are this design's choices.
- **Demodulator.** The slicer's bit mapping is natural binary per dimension.
  There are no Gray code and no soft outputs. The source does not specify
  them.
- **Voltage switching.** The settle counter and the order of voltage and
  precision changes are this design's. The regulator is not modelled.
- **Wave multiplier.** The multiplier is modelled by registers, not by
  wave-Domino timing. Operating frequency, power and the behaviour under
  parametric variation are circuit results that RTL cannot reproduce. The
  Kogge-Stone adder is the textbook prefix tree, built to the stated 6 stages
  and cell types.
- **Not built.** The static non-pipelined multiplier and the repeater-based
  inverting gate are comparison baselines and are not included. Neither is any
  OFDM block (FFT, coding). Of the 7-bit multiplier used to study parametric
  variation, only its 6-stage Sum-cell chain is simulated, as a testbench
  (below), without the variation.
- **Domino delays.** The delay values of the Domino models (50 ps precharge,
  80 ps evaluation) are placeholders.
