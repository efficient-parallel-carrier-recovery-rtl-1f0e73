# Parallel two-stage carrier recovery for 16-QAM coherent receivers

An intradyne coherent optical receiver has to remove the difference between
the transmit laser and the local oscillator before it can decide symbols.
That difference has three parts:

- a frequency offset;
- random laser phase noise;
- a slow but large frequency wander. Mechanical vibration or supply noise
  frequency-modulates a laser by hundreds of MHz at tens of kHz.

Feed-forward phase estimators such as the blind phase search (BPS) handle
phase noise well. They assume the frequency offset is constant, though, and
for 16-QAM they lose a lot of performance under the wander.

This RTL recovers the carrier in two stages:

1. A **decision-directed, phase-domain, type II digital PLL** follows the
   frequency offset and the wander.
2. A **blind phase search** removes the remaining phase noise.

Both stages know the phase only modulo pi/2, so the symbols are coded
differentially in quadrant, and a decoder at the end turns the decisions
into data bits that a pi/2 cycle slip corrupts for one symbol only.

At 32 GBd no loop can run at the symbol rate, so the design processes
**P = 64 symbols per clock** (500 MHz). The hard part is the PLL: its
feedback loop is nonlinear, so the usual unfolding of a linear recursion
does not apply. The parallel DPLL here uses an approximation: inside one
block, every symbol's NCO phase is computed from the one phase fed back at
the end of the previous block. The tentative symbol decisions are also
computed a cycle early. The loop then contains only one subtraction, one
P-term sum and one addition.

## Data path

One block of P equalized complex samples enters per clock. Lane 0 holds the
oldest sample.

```
r_in --> cordic_vec --> pdpll ----------------> psi (NCO phase per lane)
 (P lanes)  (theta,|r|)   prop_loop (F_k, W_m)     |
                          pec x P                  v
                          int_loop         r --> derotator --> bps --> qam16_slicer --> r_hat, dec
                          gear_shift (gains)                                    |
                                                                  qam16_diff_decoder --> data
```

| cycle | block | work |
|---|---|---|
| 0 | `cordic_vec` x P | rectangular to polar: phase theta, magnitude \|r\| |
| 1 | `pdpll` input, `prop_loop` | phi = theta - psi_i per lane; tentative decisions F_k; register |
| 2 | `prop_loop` W_m, `pec`, `int_loop` | proportional NCO phase of every lane, phase errors, integral update; register psi |
| 3 | `derotator` x P | r * exp(-j psi) |
| 4 | `bps` | P x B test-phase branches: rotate, slice, \|d\|^2 |
| 5 | `bps` | window sums, minimum, unwrap, derotate |
| 6 | `qam16_slicer` x P | decisions, registered outputs |
| 7 | `qam16_diff_decoder` | quadrant change and position bits per lane |

`out_valid` follows `in_valid` by 7 cycles and `data_valid` by 8. The phase search centres its
N-symbol window, so output lane k carries the sample (N-1)/2 = 10 symbols
older than input lane k. A cycle with `in_valid` low is a bubble. It moves
down the pipeline and leaves all loop state unchanged.

## Number formats (`cr_pkg`)

- **Phases** are 12-bit binary angles: 4096 is one full turn. Adding modulo
  2*pi is plain wrap-around. Reducing modulo pi/2, which the phase-domain
  loop does everywhere, keeps the low 10 bits. "theta >= pi/4" is bit 9 of
  that. Phase errors are signed 11-bit values.
- **Samples** are signed 10-bit I/Q. The 16-QAM levels are +-64 and +-192.
- **Magnitudes** come from the CORDIC. They include its gain of 1.6468.
- **NCO accumulators** carry extra fraction bits below the phase LSB: 6 for
  the proportional NCO and 12 for the integral NCO and frequency word. The
  power-of-two gains Kp = 2^-np and Ki = 2^-ni are therefore exact shifts.

The widths are this design's choice. They are package parameters and can be
changed in one place.

## The low-latency parallel DPLL (`pdpll`)

A serial phase-domain type II PLL per symbol n works as follows:

```
e_n    = (theta_n - psi_{n-1}) mod pi/2  -  rho_n           phase error
psi_n  = psi_{n-1} + Kp*e_n + Ki*sum_{k<n} e_k               NCO
```

Here rho_n is the first-quadrant phase of the transmitted symbol. It comes
from a tentative decision: pi/4 for the inner and outer ring, and
arctan(1/3) or arctan(3) on the middle ring, depending on which side of
pi/4 the demodulated phase lies. The PLL is split into a proportional part
psi_p and an integral part psi_i, with psi = psi_p + psi_i.

**Integral loop (`int_loop`).** The accumulated error changes slowly, so it
is held constant over a block. The integral phase of the m-th symbol of a
block is then `base + (m+1)*f`, where f = Ki * (accumulated error) is the
frequency estimate per symbol. The NCO advances `base` by P*f for every
block that enters. The integral phase is subtracted from theta at the input
of the DPLL, so the proportional part only sees a slowly varying phase.

Here Ki multiplies the block's error sum before it is accumulated. For a
fixed gain this is the same number as scaling afterwards, and it keeps f
continuous when the gear shift changes Ki.

Errors of block j reach the input of block j+2, an integral latency of one
block (L = P). This path is not critical.

**Proportional loop (`prop_loop`, `f_block`, `w_block`).** The terms Kp*e
inside a block are neglected, because Kp is much smaller than 1. Every
symbol's proportional phase then comes from the fed-back phase
psi_p_{n-1}:

```
psi_p_{n+m} = psi_p_{n-1} + Kp * sum_{k=0..m} [ (phi_{n+k} - psi_p_{n-1}) mod pi/2 - rho_{n+k} ]
```

`w_block` W_m computes this sum with m+1 terms. All P of them work in
parallel, and W_{P-1} closes the loop through one register.

The tentative decisions rho would otherwise sit inside the loop. Instead,
`f_block` F_k computes them one cycle earlier, while the block enters, from
the phase fed back for the previous block (psi_p_{n-1-P}). The two
comparisons (ring, pi/4) select one of the constants alpha0 = pi/4,
alpha1 = arctan(1/3) and alpha2 = arctan(3).

Only the middle-ring symbols depend on this early phase, and the wander is
slow against the symbol rate, so the error this adds is small.

**Phase error (`pec`).** One per lane:
`e_k = (phi_k - psi_p_{k-1}) mod pi/2 - rho_k`. Lane m uses the output of
W_{m-1}; lane 0 uses the fed-back phase. The errors feed the integral loop.
The phase `psi = psi_i + psi_p_{k-1}` of every lane is the phase by which
`carrier_recovery` derotates that sample.

### Loop gains, stability and gear shifting

Updating once per block turns the loop gains into per-block gains:

- the proportional gain is Kp*P;
- the integral gain is Ki*P^2.

The characteristic equation of the block loop is roughly
`z^2 + (Kp*P + Ki*P^2 - 2) z + (1 - Kp*P) = 0`.

| P | Kp | Ki | Kp*P | Ki*P^2 | behaviour |
|---|---|---|---|---|---|
| 64 | 2^-6 | 2^-10 | 1 | 4 | does not settle (simulated) |
| 64 | 2^-6 | 2^-12 | 1 | 1 | deadbeat, locks (default) |
| 32 | 2^-5 | 2^-10 | 1 | 1 | deadbeat |

The published gains for P = 64 are Kp = 2^-6 and Ki = 2^-10. With these,
the block loop has a root outside the unit circle, and in simulation the
residual phase never drops below about 80 LSB. This RTL therefore uses
**Ki = 2^-12** as the P = 64 tracking default. Kp = 2^-6 is as published.
To try other gains, change `NP_TRK`/`NI_TRK` on `carrier_recovery`.

`gear_shift` starts with larger acquisition gains, Kp = 2^-5 and
Ki = 2^-11, for 512 blocks. It then switches once to the tracking gains.
The acquisition gains cannot be much larger, because Kp*P above 2 is
unstable.

## Blind phase search (`bps`, `bps_branch`)

There are B = 32 test phases b*pi/64 in [0, pi/2). For each test phase and
each lane, `bps_branch` does three things:

1. rotates the sample by the test phase, using constant cos/sin values;
2. slices it to the nearest 16-QAM point;
3. forms the squared distance |d|^2.

The next cycle finds, for every lane and test phase, the sum of |d|^2 over
N = 21 consecutive symbols. These windows reach back into the previous
block, so the last N-1 lanes' distances and samples are kept. Prefix sums
over the 84 values give every window with one subtraction.

The smallest sum picks the estimate. Ties go to the lower b. The estimate
belongs to the middle sample of the window.

Estimates live in [0, pi/2), so an unwrapper runs serially across the lanes,
starting from the last estimate of the previous block. A step larger than
pi/4 between neighbours counts as a quadrant crossing. The unwrapped phase
is kept modulo 2*pi in steps of 2*pi/128. It is output as `bps_phase`, and
the middle sample is rotated back by it (`derotator` with a 128-entry
table).

Because the DPLL already removes the frequency, the BPS phase hovers around
a multiple of pi/2. Quadrant crossings of the unwrapper are therefore
routine, not rare.

## Interfaces

`carrier_recovery` (parameters `P=64, B=32, N=21, NP_TRK=6, NI_TRK=12,
NP_ACQ=5, NI_ACQ=11, ACQ_CYCLES=512, RHO_L, RHO_U`):

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | | clock (1/(P*T)); asynchronous active-low reset |
| `in_valid` | in | 1 | a block of P samples is present |
| `r_in[P]` | in | `cplx_t` | equalized samples, lane 0 oldest |
| `out_valid` | out | 1 | output block valid |
| `r_hat[P]` | out | `cplx_t` | carrier-recovered samples |
| `dec[P]` | out | 4 | `{I index, Q index}`, 0..3 = -192, -64, 64, 192 |
| `bps_phase[P]` | out | 7 | phase-search estimate, 128 = 2*pi |
| `freq_est` | out | 24 | frequency estimate, phase LSB / 4096 per symbol (two's complement) |
| `tracking` | out | 1 | tracking gains in use |
| `data_valid` | out | 1 | decoded data valid |
| `data[P]` | out | 4 | `{dq, pos}`: quadrant change mod 4, position in the quadrant |

Convert `freq_est` to Hz as `freq_est / 4096 / 4096 * symbol_rate`.

The carrier phase is only recovered modulo pi/2. The decisions can
therefore be rotated by a multiple of pi/2, which stays fixed while the loop
is locked, and changes when the loop slips a cycle.

`qam16_diff_decoder` removes that ambiguity. It numbers quadrants 0..3
counter-clockwise, starting from I > 0, Q > 0. For each symbol it outputs
two groups of bits:

- `dq = (q_n - q_(n-1)) mod 4`, the change of quadrant from the previous
  symbol;
- `pos = {|I'| = 3A, |Q'| = 3A}`, taken after turning the point back into
  the first quadrant.

Neither group changes under a fixed rotation by a multiple of pi/2. A
slip therefore costs one symbol. The last lane's quadrant carries over to
lane 0 of the next block. The first symbol after reset compares with
quadrant 0. This bit mapping is this design's choice; the transmitter
must use the matching encoder, which `tb_qam16_diff_decoder` models.

The ring bounds `RHO_L` = 241 and `RHO_U` = 390 lie midway between the
16-QAM ring radii sqrt(2), sqrt(10) and sqrt(18), in units of 64 times the
CORDIC gain. They must be rescaled if the input level changes.

## What follows the published design and what is this design's own

Follows the published architecture:

- the two-stage structure;
- the phase-domain DPLL split into proportional and integral loops;
- the W_m sums, the early tentative decision and the F_k comparator/mux
  with its constants;
- the per-lane phase error;
- the (m+1)*f integral phases;
- power-of-two gains, and gear shifting during capture;
- the BPS with B = 32 test phases over pi/2 and an N = 21 window centred on
  its sample;
- P = 64 and Kp = 2^-6.

This design's own choices:

- all word widths and the level scale;
- the CORDIC front end and the table-based derotators;
- the ring bounds;
- the bit mapping of the differential quadrant code;
- the pipeline split and the valid/stall handling;
- the NCO advancing per entering block;
- Ki applied before accumulation;
- the integral latency (one block);
- the gear-shift schedule and acquisition gains;
- the BPS window layout, tie rule and unwrap rule;
- the default Ki = 2^-12 (see above).

On two boundaries the decision rule has two published forms: |r| equal to
the upper ring bound, and theta exactly pi/4. `f_block` uses the
comparator form (`rho_l < |r| <= rho_u`, `theta >= pi/4`).

Not included:

- the equalizer (dispersion compensation) that produces `r_in`;
- a coarse frequency recovery ahead of it;
- the Viterbi-Viterbi alternative to the BPS.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_f_block` | decision rule against an integer reference, ring/pi/4 boundaries, all three outcomes |
| `tb_pec` | phase error against integer arithmetic |
| `tb_w_block` | W sum with fraction bits and every gain |
| `tb_qam16_slicer` | all 1024 inputs |
| `tb_cordic_vec` | phase within 2 LSB of atan2, magnitude within 2 LSB |
| `tb_derotator` | within 2 LSB of floating-point rotation |
| `tb_gear_shift` | switch after exactly ACQ_CYCLES valid blocks, stalls not counted |
| `tb_prop_loop` | cycle-exact against a behavioural model (P = 8) under stalls and gain changes; lock onto a phase offset |
| `tb_int_loop` | cycle-exact against a model (P = 8) |
| `tb_pdpll` | P = 16 closed loop, 16-QAM with a 200 MHz offset and stalls: 2-cycle latency, residual phase within 12 LSB, frequency within 0.25 LSB/symbol |
| `tb_bps` | P = 16, N = 9, turning phase and noise: 2-cycle latency, no symbol errors through 13 quadrant crossings, phase within 2 steps |
| `tb_qam16_diff_decoder` | P = 8, against a transmitter model through random pi/2 slips and stalls; 1-cycle latency |
| `tb_carrier_recovery` | full default size |

`tb_carrier_recovery` runs at the full default size (P = 64, B = 32,
N = 21) for 1100 clocks. Its channel has these impairments:

- 16-QAM with additive noise;
- a 200 MHz frequency offset;
- a 40 MHz sinusoidal frequency wander at 2 MHz;
- 250 kHz laser linewidth;
- input stalls.

It checks:

- the 7-cycle latency of the decisions and the 8-cycle latency of the data;
- that all of about 16,000 decisions after settling are correct, up to the
  fixed pi/2 rotation;
- that the decoded data of those symbols are correct, with no rotation
  allowed;
- the frequency estimate;
- that stalls, the gear shift, all three tentative decisions and BPS
  quadrant crossings each happened.

It takes about two minutes with Verilator. The wander tone is much faster
than a real 35 kHz vibration so that it shows within a short run. The
published Monte-Carlo BER surfaces (OSNR penalty against linewidth, wander
amplitude and P) are far beyond RTL simulation and were not reproduced.

To run one testbench with plain Verilator, from the directory above `rtl/`
and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv rtl/cr_pkg.sv tb/tb_carrier_recovery.sv --top-module tb_carrier_recovery
./obj_dir/Vtb_carrier_recovery
```

## Resource notes

- The BPS is the largest block. It has P x B = 2048 branches, each with
  four constant multipliers and two squarers, plus 32 prefix-sum chains of
  84 values.
- The W blocks have P(P+1)/2 = 2080 terms. A synthesis tool can share the
  per-lane subtractions between them.
- The critical feedback path is inside `prop_loop`: subtract, 64-term sum,
  add, register.
- The BPS unwrap and the integral update are long combinational chains
  outside any tight loop. They can be pipelined if timing requires.
