# RSSE: acquiring an m-sequence by recursive soft estimation

A spread-spectrum receiver cannot despread anything until its local PN
generator runs in step with the transmitter. For an m-sequence made by an
S-stage shift register there is a shortcut: S consecutive chips are the whole
generator state. Load S received chips into a local copy of the generator and
it predicts every later chip. The classic hard-decision version of this idea
fails at low SNR, because all S chips must be right at the same moment.

This design uses the recursive soft sequential estimation (RSSE) method of
L.-L. Yang and L. Hanzo. The m-sequence obeys its own recursion,
`c_i = c_{i-s_1} * c_{i-s_2} * ... * c_{i-S}` with chips in {+1, -1}. So each
new chip can be estimated twice: once from the channel, and once from earlier
chip estimates. A soft-in/soft-out decoder adds both as log-likelihood ratios
(LLRs). The result goes into a register of S soft values, and these feed the
next estimate. At a usable SNR the LLRs grow as more chips arrive. When all S
of them are large, their signs are loaded into the local generator, and a
despreading check confirms the code phase. The hardware grows linearly with
S. So does the number of chips needed, where serial search needs on the order
of 2^S dwells.

The default configuration is the 13-stage generator
`g(D) = 1 + D + D^3 + D^4 + D^13` (period 8191).

## Signal flow

```
 z, lc, lapr ──► siso_decoder ──L(y_i)──► soft_chip_reg (S LLRs) ──► reliability_monitor
                     ▲                        │                     │ ready    │ signs
                     └──── LLRs at taps ──────┘                     ▼          ▼
                                                              acq_controller ─load─► mseq_gen
 z ─────────────────────────────► code_track_loop ◄──── replica chip ──────────────┘
                                    │ dump / pass
                                    └──────────────► acq_controller (lock / reload)
```

| module | role |
|---|---|
| `rsse_pkg` | default sizes, generator taps, fixed-point formats, controller state type |
| `siso_decoder` | combinational soft-output equation (below) |
| `soft_chip_reg` | S soft-chip delay units; newest LLR at index 0 |
| `reliability_monitor` | loading condition, hard decisions, smallest \|LLR\| |
| `mseq_gen` | loadable local generator producing the replica |
| `code_track_loop` | despread, integrate-and-dump, "phase held" decision |
| `acq_controller` | start, load, verify, lock, reload |
| `rsse_acq` | top level |

## The recursion in hardware

For every received sample `Z_i` the decoder computes

```
L(y_i) = Lc*Z_i + L(c_i) + Le(c_i)
Le(c_i) = [ product over taps of sign L(y_{i-s_m}) ] * min over taps |L(y_{i-s_m})|
```

- `Lc*Z_i + L(c_i)` is the chip's LLR from the channel, plus an optional
  a priori LLR (`lapr`, normally 0).
- `Le` is the extrinsic LLR that the recursion gives about `c_i`. It is the
  sign/min approximation of combining the LLRs of the chips at the tap
  positions. The XOR of their sign bits gives the sign, and the smallest
  magnitude gives the size.
- The new value enters soft-chip unit 0, and the oldest value drops out. The
  decoder reads unit `k-1` as `L(y_{i-k})`. With `TAPS = 13'h100D` it reads
  units 0, 2, 3 and 12.

This is a feedback loop through one register stage, so it processes one chip
per clock. It cannot be pipelined without changing the recursion, because
`L(y_{i-1})` is needed for chip `i`. The critical path runs from the
multiplier through a min over M tap values to a saturating adder.

The soft-chip register starts at all zeros. Until the first S chips have
arrived, the minimum in `Le` is therefore 0, and the decoder output is just
the channel LLR. This matches the method's assumption that there is no
extrinsic information before time 0.

### Number formats

The method is defined in real numbers. The formats are this design's choice:

| quantity | format | 1.0 equals |
|---|---|---|
| `z` (sample) | 8-bit signed, 5 fractional bits | 32 |
| `lc` (Lc = 4·α·Ec/N0) | 8-bit unsigned, 4 fractional bits | 16 |
| LLRs | 12-bit signed, 3 fractional bits, saturated to ±2047 | 8 |

The full product `z*lc` is rounded half up to the LLR grid, with a shift of
5 + 4 − 3 = 6 bits. The final sum saturates symmetrically, and `llr_sat`
flags when it does. Saturation is normal after a few thousand chips.
Saturated LLRs then keep regenerating a self-consistent m-sequence that the
channel term (about ±25 per chip at −1 dB) can no longer overturn. This is
why a loss of lock clears the register (see below).

The receiver must supply `lc` for every chip. With fading it should include
the fading amplitude α_i. How Ec/N0 and α_i are estimated is outside this
design. A badly scaled `lc` changes the balance between the channel term and
the extrinsic term.

## Loading, verification and reload

`acq_controller` has four states:

- `ST_IDLE`: waits for `start`. `start`, from any state, clears the soft-chip
  register and the counters.
- `ST_ACQ`: the decoder recurses on each chip. When the smallest \|LLR\| in
  the register is at least `load_thr`, the **loading command** fires. The
  signs of the S units go into `mseq_gen`, and the tracking dwell restarts.
- `ST_VERIFY`: the replica despreads the input. `code_track_loop` sums
  `±z` over `DWELL` = 128 chips.
  - If the sum reaches `lock_thr`, the controller moves to `ST_LOCK`.
  - If it does not, that is the **reloading command**. The controller returns
    to `ST_ACQ`, keeping the soft-chip register. The next load then uses the
    better reliabilities gathered so far, usually at once.
- `ST_LOCK`: acquired. Dwells go on. A failing dwell means the phase was lost.
  That also triggers a reload, and this time the soft-chip register is
  cleared as well.

Clearing on loss of lock is this design's choice. Without it, the saturated
old phase would be reloaded forever.

A sensible `lock_thr` is half the noiseless correlation: `DWELL * 32 / 2 = 2048`.
A correct load gives about 4096. A wrong phase gives about 0, because an
m-sequence's off-peak autocorrelation is −1/N. At −1 dB the 128-chip noise
standard deviation is about 290.

`load_thr` trades acquisition time against the chance of a wrong first load.
At −1 dB (AWGN), a threshold of 320 (40 in LLR units) was reached after
500–870 chips (L/S ≈ 38–67) in the end-to-end test, depending on the noise
draw, and the first load was right.

### Timing

- One chip per `z_valid` cycle. `z_valid` may be high every cycle.
- `load` is combinational (`ST_ACQ && ready`) and acts at the same clock
  edge. The generator is loaded with `L(y_{i-1})..L(y_{i-S})`, the register
  contents before chip `i`, and in that cycle it already produces replica
  chip `c_i`.
- `chip` is the replica for the `z` presented in the same cycle. It is
  combinational from the generator stages, or from the load vector during a
  load.
- `dump`, `pass` and `corr` are registered. They appear in the cycle after
  the 128th chip of a dwell.
- `chips_at_load` is the number of chips received before the most recent
  load. This is the acquisition-time measure.

## What is not here

- **Fine code-phase tracking.** The method hands the despread, low-pass
  filtered signal to a code tracking loop but does not design that loop. This
  design assumes one sample per chip with chip timing already recovered. It
  implements only the decision the acquisition needs: is the phase held
  (integrate-and-dump against a threshold)? An early/late delay-locked loop
  would need several samples per chip.
- **Front end.** Carrier removal, chip-timing recovery, matched filtering,
  and Ec/N0 and fading estimation are not included. The design starts at the
  per-chip samples `z` and the reliability `lc`.
- **The hard-decision baseline** that the method is compared with is not
  built.

## How far it has been checked

Each module has a self-checking testbench in `tb/` that compares it against
an independent reference:

| testbench | what it checks |
|---|---|
| `tb_mseq_gen` | every chip against a tap-by-tap model of the recursion; period 8191; 4096/4095 balance; load, and load together with shift |
| `tb_soft_chip_reg` | shift, clear, clear over shift, reset |
| `tb_siso_decoder` | 20 000 random and corner cases against a real-valued evaluation of the equation on the same grid, including saturation |
| `tb_reliability_monitor` | minimum, threshold and sign decisions |
| `tb_code_track_loop` | correlation, pass decision and dump timing, with gaps and mid-dwell clears |
| `tb_acq_controller` | every transition, command and counter against an explicit state model |
| `tb_rsse_acq` | the top at its default size, over a simulated AWGN channel at −1 dB (see below) |
| `tb_rsse_workloads` | statistics of the published operating points |

`tb_rsse_acq` runs three acquisitions:

1. A deliberately tiny threshold, so that wrong early loads must be rejected
   and reloaded. Here: 3 reloads, then lock after 533 chips.
2. A jump of the transmitted phase while locked. This must be seen as a loss
   of lock within two dwells and then re-acquired.
3. A fresh start with a high threshold, which must lock on the first load.
   In this run, idle cycles are inserted between some of the chips.

After each lock, the replica must match the transmitted chips exactly, for
1000 chips (9000 in the last run, long enough for the LLRs to saturate).

Measured with `tb_rsse_workloads`: random start phases, with the S
hard decisions compared with the true chips.

| operating point | measured erroneous loads | reported for the method |
|---|---|---|
| AWGN, Ec/N0 = −0.5 dB, L = 40·S = 520 chips | 1 / 400 | reliable, about 1e-4 |
| AWGN, −1 dB, L = 80·S = 1040 chips | 0 / 400 | about 1e-3 |
| Rayleigh, −1 dB, L = 500·S = 6500 chips, fading correlation 0.99 per chip | 1 / 100 | about 1e-3 |
| Rayleigh, −1 dB, 6500 chips, fading independent per chip | 42 / 100 | — |

The mean decision reliability \|L(y_i)\| grows with L/S:

- S = 13 at −1 dB: 7.5, 10.6, 16.6 and 27.8 at L/S = 5, 10, 20 and 40.
- S = 5 at −4 dB, with `g(D) = 1 + D^2 + D^5` supplied as parameters: 4.5,
  6.6, 11.3 and 19.6.

These trial counts are too small to resolve probabilities of 1e-3 or 1e-4.
They show the right order of magnitude, not the published curves.

**Performance under fading depends on how fast the fading is.** The fading
rate behind the published result is unknown. In the test channel the fading
gain changes slowly from chip to chip (a Gauss-Markov process with
correlation 0.99 per chip, i.e. a coherence time of roughly 100 chips). That
is realistic at chip rate, and there the design meets the reported figure.

If instead a new fading amplitude is drawn for every chip, the sign/min
recursion stops growing its reliabilities (mean \|L\| stays near 6), and
acquisition mostly fails. A floating-point model of the same equations
behaves the same way, so this is a property of the method under that
channel, not of the fixed-point implementation.

## Simulating

Any simulator that handles SystemVerilog-2017 works. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_rsse_acq \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rsse_pkg.sv tb/tb_rsse_acq.sv
./obj_dir/Vtb_rsse_acq
```

Replace `tb_rsse_acq` with any testbench name. Each testbench ends with
`TB_RESULT checks=N failures=M`. Each also has a watchdog that counts a
failure if the test hangs. All of them finish in seconds. `tb_rsse_workloads`
takes a few seconds and instantiates a helper, `tb/rsse_trial_runner.sv`. The
testbenches draw randomness from `$urandom`, so pass `+verilator+seed+N` to
vary the seed.

## Changing it

- **Another m-sequence.** Set `S` and `TAPS` on `rsse_acq`. Bit `k-1` of
  `TAPS` is the coefficient g_k, so `c_i` is the product of `c_{i-k}` over
  the set bits. Bit S-1 must be set. The polynomial must be primitive, or the
  generator will not produce an m-sequence. The decoder and the generator
  take the same mask, so they always agree.
- **Word widths.** The `Z_*`, `LC_*` and `LLR_*` parameters set the widths.
  `Z_FRAC + LC_FRAC` must exceed `LLR_FRAC`. A wider `LLR_W` delays
  saturation but does not change the acquisition behaviour.
- **Dwell.** `DWELL` sets the dwell length. The correlator width follows it.
  Scale `lock_thr` with it.
- **Chip encoding.** Throughout, bit 0 means chip +1 and bit 1 means chip −1.
  A product of chips is therefore an XOR, and the sign bit of an LLR is its
  hard decision.
