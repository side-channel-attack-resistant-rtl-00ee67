# Balanced elliptic-curve scalar multiplier with a word-parallel GF(2^m) multiplier

Binary-field elliptic-curve cryptography works with field elements whose
length (131, 163, 193 or 233 bits in the standard curves) is not a multiple of
the machine word. If a field product is split into 32-bit words and the words
are shared among several multiplier units ("cores"), the last round of
work is short. Some units have nothing to do, and the last word holds only a
few real bits. Two things follow. Idle units waste energy. And the
multiplication pattern of a point addition differs from that of a point
doubling. An observer of power or timing can then tell additions from
doublings, and so read the key bits of the add-and-double loop.

This design computes S = d·P on a curve y² + xy = x³ + ax² + b over
GF(2^M) and uses three measures against that:

* **Word-parallel multiplier.** A field product A·B is cut into ⌈M/W⌉ words
  of A. P lanes work on them in rounds. Each lane reduces its own partial
  product, and the reduced results are XORed together.
* **Balanced point operations.** The doubling is rewritten so that it issues
  the same sequence of 14 multiplications and 7 additions as the mixed
  addition. Squarings are written as products, some values are multiplied by 1,
  and five *dummy* operations fill the gaps.
* **Multiplier adjuster.** The lane that gets the short last word scans only
  its real bits (3 of 32 for M = 131) instead of a full word. This wins back
  most of the time the dummies cost.

Defaults: M = 131, W = 32, P = 4 lanes, 131-bit scalar, reduction polynomial
x^131 + x^8 + x^3 + x^2 + 1.

## Word-parallel field multiplication (`mul_lane`, `gf_mul`)

Field elements are in polynomial basis, so bit i is the coefficient of x^i.
Addition is XOR. For NW = ⌈M/W⌉ words, A = Σ a_t·x^(tW), which gives

    A·B mod f = Σ_t ( a_t · x^(tW) · B  mod f )

Each term is independent. That is the work of one lane (`mul_lane`):

1. **Multiply**, one bit of a_t per cycle, LSB first. A register holding
   B·x^(tW) is shifted up one place per cycle and XORed into the accumulator
   when the current bit is 1. The accumulator is NW·W + M − 1 bits wide,
   enough for the largest t.
2. **Reduce**, one degree per cycle. The scan runs from the highest degree
   the partial product can have down to M. Whenever that bit is set, f
   shifted to that degree is XORed in.

A lane given word t with n bits to scan finishes n + (tW + n − 1) cycles
after its start. The reduction time grows with t, so later words take
longer.

`gf_mul` hands words 0..P−1 to the lanes in round 0, words P..2P−1 in round
1, and so on. A round ends when its slowest lane is done. Lanes with no word
stay idle, which `lane_busy` shows. The reduced results are XORed into the
product. Every round adds 2 cycles, one to issue and one to collect. The
product takes Σ over rounds of (2 + latency of the round's slowest lane).

| field, lanes | words | rounds | idle lanes in last round | cycles, adjuster on | cycles, off |
|---|---|---|---|---|---|
| GF(2^131), 4 | 5 | 2 | 3 | 296 | 354 |
| GF(2^163), 2 | 6 | 3 | 0 | 451 | 483 |
| GF(2^233), 8 | 8 | 1 | 0 | 257 | 289 |
| GF(2^193), 1 | 7 | 7 | 0 | 1065 | 1127 |

`tb_gf_mul` checks the formula for all four rows. `tb_gf_mul_sizes` checks it
for fields of 131 to 571 bits on 1, 2, 4 and 8 lanes. It also checks, for
each case, the number of rounds and of lanes idle in the last round:
p·⌈f/(p·s)⌉ − ⌈f/s⌉ for field size f, word size s and p lanes. Examples are
3 idle lanes for 131 bits on 4 lanes and 7 for 283 bits on 8 lanes.

### The multiplier adjuster

The last word has LASTB = M − (NW−1)·W real bits (W when M divides evenly).
With `adj_en = 1` its lane scans only LASTB bits, so it also starts its
reduction from a degree that is lower by W − LASTB. When the last word is
alone in its round, as for GF(2^131) on 4 lanes, that round shrinks by almost
2·(W − LASTB) cycles, and the product drops from 354 to 296 cycles. When it
shares the round, the saving is whatever the round's slowest lane saves. With `adj_en = 0` the lane scans the full word, whose upper bits
are zero. This is the behaviour of a plain word-parallel multiplier.

## Balanced point operations (`point_seq`, `ecc_pkg`)

S is kept in Jacobian coordinates (X, Y, Z), with x = X/Z² and y = Y/Z³.
P stays affine, that is Z = 1. A point operation is a short program of
field operations over a 32-entry register file. The programs sit in
`ecc_pkg::prog_uop`, one micro-operation per entry:

* **PA** adds P to S with the mixed formulas (A = X₁·Z₂², C = A + X₂,
  F = Y₁·Z₂³ + Y₂, Z₃ = C·Z₂, and so on). It has 14 MUL and 7 ADD.
* **PD** doubles S. Plain doubling needs far fewer operations, and its
  squarings would give it a different pattern. The program therefore uses
  these forms:
  * every square is a product, so Z₂² becomes Z₂·Z₂;
  * D₂ = X₂² is computed as X₂·(X₂·1);
  * B² is computed as B·(B·1).

  Five dummies complete the program:

  * Dummy1 = Px·Z₂ (MUL)
  * Dummy2 = X₂ + Dummy1 (ADD)
  * Dummy3 = Dummy1 + Px (ADD)
  * Dummy4 = Dummy3 + Dummy2 (ADD)
  * Dummy5 = X₃₁·X₃ (MUL)

  Their results are never used. They sit where PA has a MUL or ADD that PD
  lacks, so the two programs show the same MUL/ADD sequence, 14 MUL and 7
  ADD.
* **COMMIT** copies the new point into S, and **LOADP** copies P into S.
  Both are three register moves.

The doubling formula needs a constant c with c⁴ = b, so
X₃ = (X₂ + c·Z₂²)⁴. This c is an input (`curve_c`), computed once per curve.
The testbench reference takes it by repeated squaring, since in GF(2^M)
x^(1/4) = x^(2^(M−2)).

`dummy_en = 0` skips the five dummies, one cycle each, which gives the
unprotected operation count. The products with 1 stay in the program.

With dummies on, PD and PA take exactly the same number of cycles: 4180 for
M = 131 on 4 lanes, with the adjuster. Without dummies PD takes 3586.

`point_seq` executes one micro-operation at a time:

* MUL: 1 cycle plus the multiplier latency; the operands come straight from
  register-file read ports A and B;
* ADD and MOV: 1 cycle;
* a skipped dummy: 1 cycle;
* END: 1 cycle.

The strobes `fop_fire`, `fop_mul` and `fop_dummy` show each issued operation.

## Add-and-double and the point at infinity (`ad_ctrl`)

The key is scanned from its most significant bit:

    S = (d[K-1] ? P : O)
    for i = K-2 .. 0:  S = 2S;  if d[i]: S = S + P

Jacobian formulas cannot hold the point at infinity O. The controller keeps
a flag for it, `s_inf`, and never branches on it in a way that changes
timing:

* the doubling always runs, then COMMIT (doubling O is O, and the flag
  stays);
* an addition runs PA, then COMMIT if S was finite, or LOADP if S was O
  (O + P = P), which takes as long as COMMIT.

The controller also spends one idle cycle after each doubling, whether an
addition or the next doubling follows. So each point step, with the dummies
on, takes the same number of cycles, whatever the key bit. The *number* of
additions still depends on the key, as in any add-and-double. The
protection is that the steps cannot be told apart, not that their count is
hidden.

Before the loop the controller writes P, the constant 1, a and c into the
register file (5 cycles). After it, it reads out S (3 cycles) and pulses
`done`. The result is given in Jacobian coordinates: affine x = X/Z²,
y = Y/Z³. The final inversion is left to the user.

## Top level (`ecc_mc_top`)

```
 start,d,P,a,c ──► ad_ctrl ──prog──► point_seq ──MUL A,B──► gf_mul (P × mul_lane)
                     │  write/read C     │ read A,B / write        │ product
                     └──────────► fe_regfile ◄──────────────────────┘
```

* **Handshake.** Pulse `start` while `busy` is low, with `d`, `px`, `py`,
  `curve_a` and `curve_c` valid. `done` pulses when `sx`, `sy`, `sz` and
  `s_inf` are valid. They hold until the next start.
* **Modes.** `adj_en` and `dummy_en` are sampled at `start`. Both set is the
  protected configuration. Both clear is the plain baseline.
* **Reset.** `rst_n` is an active-low asynchronous reset.
* **Activity outputs.** `lane_busy`, `step_pd`, `step_pa` and the `fop_*`
  strobes expose what a power trace would show, for the testbenches.

Measured at M = 131, P = 4:

| run | cycles |
|---|---|
| one random 131-bit key (130 doublings, 69 additions), both measures on | 833 627 |
| keys 1..99 (7-bit), baseline | 3 950 340 |
| keys 1..99, dummies only | 4 372 080 (+10.7 %) |
| keys 1..99, dummies and adjuster | 3 662 392 (−7.3 % against baseline) |

The dummies cost about 11 % in time. The adjuster more than pays for
them in this hardware form, because a lane's reduction time is proportional
to its scan length.

Across the other field sizes and lane counts (six 7-bit keys each, in
`tb_workload_fields`) the dummies cost 11.5–11.7 % in every case. How much
the adjuster wins back depends on how much of the slowest round it
shortens:

| lanes | GF(2^131) | GF(2^163) | GF(2^193) | GF(2^233) |
|---|---|---|---|---|
| 1 | 101.6 % | 104.2 % | 105.5 % | 108.0 % |
| 2 | 97.4 % | 104.3 % | 102.3 % | 107.0 % |
| 4 | 92.7 % | 102.4 % | 103.1 % | 103.7 % |
| 8 | 93.3 % | 95.9 % | 97.8 % | 99.4 % |

The table gives the run time with both measures on, as a percentage of the
unprotected baseline. The GF(2^131) row for 4 lanes is from the 99-key
sweep.

## Choices of this design, and departures

* **Lanes instead of cores.** The original scheme runs each word product as a
  software thread on one core of a multi-core processor. Here each "core" is
  a hardware lane. The processors, caches and buses of that platform are not
  part of this RTL. The energy numbers of such a platform cannot be
  reproduced here; only cycle counts are.
* **Reduction polynomials** are not given with the field sizes. The defaults
  are the standard ones: x^131+x^8+x^3+x^2+1, x^163+x^7+x^6+x^3+1,
  x^193+x^15+1 and x^233+x^74+1. Set `F_POLY` for other fields.
* **D₂ in the doubling.** The doubling's operation table gives D₂ = X₂·D₂₁.
  One listing of the same routine multiplies D₂₁ by a dummy value instead,
  which does not compute a doubling. The table's version is used.
* **Adjusted word length.** The adjuster scans exactly the remaining bits
  of the last word (3 for GF(2^131)). The alternative is to round up to a
  quarter- or half-width multiplier, which would scan 8 bits. The exact
  count is never slower.
* **Bit-serial lanes.** Each lane does one bit per cycle, for the multiply
  and for the reduction. These latencies are this design's own.
* **Controller details.** The infinity flag, the LOADP program, the idle
  cycle after each doubling and the operand-load sequence are this design's
  own.
* **Cost of the dummies.** Run as software on a multi-core processor, the
  dummies were reported to cost about 7–9 % in run time. Here they cost
  about 11.6 %. The reason is that every operation in this datapath is
  a multiplier or register step with nothing else around it.
* **Run-time modes.** The adjuster and the dummies are run-time inputs, so
  that the baseline and the protected design can be compared on one netlist.

## Files

| file | what |
|---|---|
| `rtl/ecc_pkg.sv` | register map, micro-operation type, the PA/PD/COMMIT/LOADP programs |
| `rtl/mul_lane.sv` | one lane: word × B·x^(tW), bit-serial, then bit-serial reduction |
| `rtl/gf_mul.sv` | rounds of words over P lanes, XOR combine, adjuster |
| `rtl/fe_regfile.sv` | 32 × M-bit registers, 3 read ports, 1 write port |
| `rtl/point_seq.sv` | executes one point-operation program |
| `rtl/ad_ctrl.sv` | add-and-double controller |
| `rtl/ecc_mc_top.sv` | top |
| `tb/gf_ref_pkg.sv` | reference GF(2^m) and affine-curve arithmetic for the testbenches |
| `tb/tb_<block>.sv` | one self-checking testbench per module |
| `tb/tb_ecc_mc_top.sv` | end to end, 8-bit keys, all four mode combinations, counts every mechanism |
| `tb/tb_ecc_full.sv` | one full 131-bit key at default parameters (~0.8 M cycles) |
| `tb/tb_workload_d99.sv` | keys 1..99 in the three configurations, with cycle totals |
| `tb/tb_gf_mul_sizes.sv`, `tb/gfm_runner.sv` | the multiplier at 131 to 571 bits × 1/2/4/8 lanes: products, latency, rounds, idle lanes |
| `tb/tb_workload_fields.sv`, `tb/wl_runner.sv` | GF(2^131/163/193/233) × 1/2/4/8 lanes, six keys each, three configurations |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops, and has a
watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_ecc_mc_top \
    rtl/ecc_pkg.sv tb/gf_ref_pkg.sv rtl/*.sv tb/tb_ecc_mc_top.sv
./obj_dir/Vtb_ecc_mc_top
```

Replace the testbench name for the others. `tb_workload_fields` also needs
`tb/wl_runner.sv`, and `tb_gf_mul_sizes` needs `tb/gfm_runner.sv`. The testbenches compare against
an independent software model. That model uses plain shift-and-add field
multiplication, Fermat inversion and affine point formulas. Results are
converted to affine before they are compared. Random operands come from
`$urandom`.

## Limits

* No affine conversion (field inversion) in hardware. The output is
  Jacobian.
* The add-and-double loop is not constant-time over keys with different
  numbers of one bits.
* Full scalar multiplications have been simulated for fields of 131, 163,
  193 and 233 bits with 1, 2, 4 and 8 lanes. For 239, 283, 409 and 571 bits
  only the field multiplier has been simulated, with 1 to 8 lanes.
