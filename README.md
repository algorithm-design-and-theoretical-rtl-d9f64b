# CMM-MSD modular exponentiation with an MCR-scanned Montgomery multiplier

This is synthesizable SystemVerilog for a modular exponentiation engine
(A^E mod N, 1024-bit operands by default) that combines two ideas.

1. **Skip zero digits in the multiplier.** The multiplier of each Montgomery
   multiplication is recoded into canonical signed digits (non-adjacent form:
   digits -1, 0, +1, never two nonzero digits side by side, about one digit in
   three nonzero). It is then read as *pairs*: a count k of zero digits and
   the nonzero digit that follows them. One clock handles one whole pair: add
   or subtract 2^k·Y, add a (k+1)-bit multiple of the modulus, shift right by
   k+1. A multiplication takes about n/3 clocks instead of n. This is called
   the M4 multiplier (modified Montgomery modular multiplication), and the
   pair format is called MCR (modified canonical recoding).
2. **Share the multiplier.** Right-to-left exponentiation multiplies the
   running square S into accumulators. The exponent is recoded to signed
   digits and cut into three equal parts. Positions where all three parts
   have the same nonzero digit form a common part. Eight accumulators (C1..C4
   for +1 digits, D1..D4 for -1 digits) collect the common part and the rest
   of each third. In every iteration S is MCR-encoded **once**. That single
   pair stream then drives up to nine multiplications in lock step: S·S and
   S·(each selected accumulator). This is the common-multiplicand
   multiplication (CMM) idea applied to minimal-signed-digit (MSD) exponents.

The engine returns the eight accumulators. The final step turns them into
A^E: inverting the negative-digit products and combining the three thirds.
That step is not part of this RTL (see "Finishing the exponentiation").

## One multiplication step

`m4_pe` holds an operand register Y and a signed partial result S. For a
pair (k, z), z ∈ {-1, 0, +1}, it computes:

```
p  = S + z · 2^k · Y
q  = (p · mprime) mod 2^(k+1)          mprime = -M^-1 mod 2^(KMAX+1)
S' = (p + q·M) >> (k+1)                exact: the low k+1 bits of p + qM are zero
```

- **Shifts.** Both shifts are variable but small. The left shift is 0..KMAX
  and the right shift is 1..KMAX+1. Each goes through `lim_barrel_shifter`,
  which has log2(KMAX+1) stages.
- **Zero-run limit.** Zero runs are capped at KMAX = 6. A longer run is
  emitted as a *digit-0 pair* (k = 6, z = 0), which consumes seven zeros.
  Such runs are rare: about 2 % of the pairs at 1024 bits.
- **Negative partial results.** Because z can be -1, S can go negative. With
  Y < M, S stays within (-M, 2M), so it is stored in NB+2 bits. Step
  arithmetic is NB+KMAX+4 bits wide.
- **Final correction.** The step that carries the `last` flag brings the
  result into [0, M). It subtracts M when the result is ≥ M and adds M when
  it is negative. The result is written back into Y. In lock-step use, that
  register is both the accumulator and the next operand.

### Why every multiplication shifts by exactly n+1

Montgomery arithmetic needs every product to carry the same factor 2^-L. The
recoding of an n-bit number has n+1 digit positions. If the pair stream
stopped at the leading nonzero digit, L would depend on the operand. So
`mcr_encoder` keeps emitting digit-0 pairs for the zeros above the leading
digit until exactly L = n+1 positions have been consumed. Every product is
therefore X·Y·2^-(n+1) mod M. All values inside the engine are in the
Montgomery form x·2^(n+1) mod N.

## The pair stream (`mcr_encoder`)

- **On `load`:** `cr_recoder` turns x into n+1 signed digits, held as a
  positive mask and a negative mask. The recoder uses the canonical-recoding
  carry recurrence, c(i+1) = maj(x(i), x(i+1), c(i)).
- **Each clock:** the encoder looks at the lowest KMAX+1 digits (fewer near
  the top) and finds the first nonzero one, at offset j. It emits (j, digit)
  and shifts both masks down by j+1 through the limited barrel shifter. If
  the window holds no nonzero digit, it emits a digit-0 pair and shifts by
  the whole window.
- **Pair format:** `cmm_pkg::mcr_pair_t` holds a 4-bit k, a 2-bit digit
  (`SD_ZERO` = 00, `SD_POS` = 01, `SD_NEG` = 11) and a `last` flag.

Example: 478 = 111011110b recodes to 2^9 - 2^5 - 2^1. Its first pairs are
(1, -1), (3, -1), (3, +1), followed by digit-0 padding pairs.

## Exponentiation schedule (`cmm_msd_modexp`)

| phase | clocks | what happens |
|---|---|---|
| start | 1 | latch A, N; `exp_cmm_split` recodes E |
| PRE | 2L | `mont_const` doubles 1 modulo N 2L times: r1 = 2^L mod N, r2 = 2^2L mod N; also mprime |
| CONV | 1 + pairs(A) | S = M4(A, r2) = A·2^L mod N; all C/D registers load r1 (Montgomery one) |
| LOOP | MP × (1 + pairs(S_i)) | per iteration: load MCR(S), then one pair per clock into S and the selected C/D datapaths |
| done | 1 | `done` pulse; `c_out`, `d_out` hold until the next start |

- **Iterations.** MP = ceil((EB+1)/3), so MP = 342 for a 1024-bit exponent.
  S_i = A^(2^i) in Montgomery form.
- **Total time.** Start to `done` takes
  2L + 3 + pairs(A) + Σ_i (1 + pairs(S_i)) clocks. Each iteration costs one
  clock more than its pair count. That clock is for loading the encoder.
- **Measured.** Two 1024-bit / 1024-bit exponentiations took 121,513 and
  121,829 clocks. The mean over all multiplications was 347.8 steps, against
  (n+1)/3 = 341.7.
- **Digit selection.** `exp_cmm_split` keeps the three thirds of the recoded
  exponent in shift registers: E1 is the top third, E3 the bottom. At each
  position it compares the three current digits:
  - all three equal and nonzero: C1 (if +1) or D1 (if -1) is multiplied.
  - otherwise: for each third j whose digit is nonzero, C(j+1) or D(j+1) is
    multiplied.

  Those datapaths clear their partial result at the start of the iteration
  and step with the pair stream. The datapaths that are not selected hold
  their value.

Per-clock critical path: one NB+10-bit three-operand addition, a
7×7-bit multiply for q, a 7×NB-bit product q·M and two small barrel shifts.
The core is nine such datapaths, one encoder and the constant unit. At the
default size, coarse synthesis gives about 26.7 k flip-flop bits, plus 2.7 k
bits of exponent-digit registers.

## Finishing the exponentiation

With R = 2^(n+1) and `x̂ = x · R^-1 mod N` (for example an M4 multiply by 1):

```
X_j = Ĉ1 · Ĉ(j+1) · (D̂1 · D̂(j+1))^-1      j = 1, 2, 3
A^E = X_1^(2^(2·MP)) · X_2^(2^MP) · X_3   (mod N)
```

The hardware for this step, including how the inverse of the D products is
avoided, is not provided. The testbench checks the outputs with the
inverse-free identity P = A^E · Q (mod N). Here P is the expression above
built from the C values only, and Q the same expression built from the D
values.

## Files

| file | contents |
|---|---|
| `rtl/cmm_pkg.sv` | default sizes, signed-digit enum, `mcr_pair_t`, `neg_inv16()` |
| `rtl/cr_recoder.sv` | canonical recoding, combinational, W → W+1 digits |
| `rtl/lim_barrel_shifter.sv` | barrel shifter limited to MAXSH |
| `rtl/mcr_encoder.sv` | MCR pair stream, one pair per clock |
| `rtl/m4_pe.sv` | one M4 datapath |
| `rtl/m4_mult.sv` | encoder + datapath = stand-alone M4 multiplier; exports its pairs |
| `rtl/exp_cmm_split.sv` | exponent recoding, three-way split, C/D selection |
| `rtl/mont_const.sv` | 2^L mod N, 2^2L mod N, -N^-1 mod 2^(KMAX+1) |
| `rtl/cmm_msd_modexp.sv` | top: FSM, m4_mult for S, eight m4_pe for C1..C4/D1..D4 |

Top parameters: `NB` (modulus width, 1024), `EB` (exponent width, 1024) and
`KMAX` (zero-run limit, 6; KMAX ≤ 14). Inputs must meet these conditions:

- N is odd and greater than 1 (asserted).
- A fits in NB bits. It need not be reduced below N.
- `start` is given only while the engine is idle (asserted).

Reset is synchronous and active low.

## Simulation

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.
Build one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cmm_msd_modexp \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cmm_pkg.sv tb/tb_cmm_msd_modexp.sv
./obj_dir/Vtb_cmm_msd_modexp
```

| testbench | size | checks |
|---|---|---|
| `tb_cr_recoder` | 64 bit | digits rebuild x, non-adjacency, equality with (3x - x)/2 |
| `tb_lim_barrel_shifter` | 40 bit | all three modes, every shift, against the shift operators |
| `tb_mcr_encoder` | 64 bit | value rebuilt from pairs, k ≤ KMAX, n+1 positions, pair count vs. a model, the 478 example |
| `tb_m4_pe` | 64 bit | X·Y·2^-(n+1) mod M from testbench-made pairs, against a step-by-step reference |
| `tb_m4_mult` | 128 bit | product, exact clock count, mean steps ≈ L/3 |
| `tb_exp_cmm_split` | 30 bit | selects rebuild E; common/part exclusivity |
| `tb_mont_const` | 64 bit | r1, r2, mprime, latency 2L |
| `tb_cmm_msd_modexp` | 64 / 48 bit, 6 runs | all eight outputs, the end-to-end identity, exact clock count, mean step count; every mechanism must occur (±1 digits, digit-0 pairs, full KMAX shifts, common digits of both signs, all eight accumulators) |
| `tb_cmm_msd_modexp_full` | 1024 / 1024 bit, defaults, 2 runs | the same checks; about 20 s |

`modexp_harness.sv` holds the shared end-to-end checker. It computes all
reference values with its own wide-integer arithmetic and its own recoding,
independent of the RTL.

## Where this design makes its own choices

The pair format and the algorithms (canonical recoding, the M4 step, the
three-way CMM split with C/D registers, MCR encoding overlapped so each
iteration costs one extra clock, the zero-run limit of 6) follow the
published CMM-MSD / M4 algorithm. The following are this design's own:

- **Fixed factor.** The Montgomery factor is 2^-(n+1) with padded pair
  streams, not 2^-n.
- **Digit-0 pairs.** They are used both for runs above the limit and for the
  padding.
- **Negative correction.** The final correction also adds M to a negative
  result. The published algorithm only subtracts M when S ≥ M.
- **Quotient digit.** It is q = -p·M^-1 mod 2^(k+1), taken from the low
  KMAX+1 bits of -M^-1.
- **Common digits.** "E1 AND E2 AND E3" is read as "same nonzero digit in all
  three parts". The rest of each third is its non-common part.
- **Digit set.** The exponent digit set is {-1, 0, +1} (canonical recoding).
  A radix-3 / ±2 digit set mentioned in the complexity discussion is not
  used.
- **Constants.** 2^L and 2^2L mod N come from a modular doubling chain (2L
  clocks), and -N^-1 from Hensel lifting. The published text only says that
  A·R mod N and R mod N are formed first.
- **Sizes.** The operand and exponent widths (1024) are a choice. The
  published analysis is for symbolic n and k.
- **Clock counts.** The published step count, 0.611k(n^2-5n-3), amounts to
  about (n/3)(n+1) per multiplication, a bit-level cost per digit. This
  datapath adds full words and takes 1 + about (n+1)/3 clocks per
  multiplication. The two figures are not directly comparable.
- **Last iteration.** The loop squares S in its last iteration too, as the
  algorithm is written, although that square is not used.
- **Control.** The control FSM and the start/done handshake are this
  design's.
