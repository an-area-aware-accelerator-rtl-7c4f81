# Area-aware GF(2^m) point multiplier for binary elliptic curves

This is a small, latency-conscious hardware engine for the core operation of elliptic-curve
cryptography, the point multiplication Q = k·P. It works on binary curves
y² + xy = x³ + ax² + b over the NIST fields GF(2^163), GF(2^233), GF(2^283), GF(2^409) and
GF(2^571), in polynomial basis. It uses the Montgomery ladder in López-Dahab projective
coordinates. The area is kept low by using very little hardware:

* one finite-field adder and one finite-field multiplier, with no separate squarer or inverter;
* eight m-bit registers;
* a two-stage pipeline, with the pipeline registers placed at the ALU inputs.

The latency is kept low in two ways. The multiplier is a single-cycle digit-parallel design with
41-bit digits. The ladder's point-addition and point-doubling instructions are also interleaved,
so that the pipeline almost never waits for a result.

The default build is m = 571, which takes **12054 clock cycles** per point multiplication.

## Datapath

```
            +-------------------- register file (8 x m) -------------------+
            |  X1  X2  Z1  Z2  T1  T2  T3  T4                               |
            |   M1 (8:1) ----+         M2 (8:1) ---------+      Dmux (1:8)  |
            +----------------|---------------------------|--------^--------+
                             v                           |        |
           xp, yp, b --->  M3 (4:1)                      |        | Mplex_out
                             |                           |        |
                        [OP_1 reg]                  [OP_2 reg]    |
                             |  A(x)                     | B(x)   |
                             +-----> adder (XOR) --------+--> M4 -+
                             +-----> DP-LSD mult + NIST reduction -^
```

* **Register file** (`ecc_regfile`). It holds the ladder's two points (X1:Z1) and (X2:Z2) and
  four temporaries, T1 to T4. M1 and M2 read the registers combinationally. The Dmux writes the
  ALU result at the end of the execute cycle. There is no bypass.
* **Operand stage** (`ecc_operand_stage`). M3 chooses the A operand from four sources: the
  register file, the base-point coordinates xp and yp, or the curve constant b. The B operand
  always comes from the register file. Both operands are registered. The operation and the
  destination address are registered with them.
* **ALU** (`ecc_alu`). It contains the XOR adder (`gf2m_add`) and the multiplier. The multiplier
  is `gf2m_dplsd_mul` followed by `gf2m_nist_reduce`. M4 selects which result is written back.
  A squaring is a multiplication with both operands from the same register.
* **Control unit** (`ecc_cu`). It issues one instruction per cycle. Each instruction holds the
  operation, the M3 select, and the M1, M2 and Dmux addresses (`ecc_pkg::uop_t`).

### Pipeline timing

An instruction is read in cycle t and executed and written back in cycle t+1. The next
instruction is read in cycle t+1, so it must not use the result of the instruction just before
it. The instruction after that can use it. The hardware has no interlock. Every instruction
sequence is scheduled for this rule, with explicit no-ops where nothing useful fits.
`ecc_pm_top` contains an immediate assertion that flags any violation in simulation.

## The multiplier

`gf2m_dplsd_mul` splits B(x) into ⌈m/41⌉ digits, least significant first. For m = 571 that is
13 digits of 41 bits and a final digit of 38 bits.

* Each digit has its own lane (`gf2m_digit_mul`). A lane multiplies A(x) by its digit without
  carries, giving a partial product of 41+m−1 bits. Inside a lane are 41 AND-gated, shifted
  copies of A(x), combined with XOR.
* The lanes' results are shifted by the digit position and combined with XOR into the 2m−1-bit
  product.

The whole multiplier is combinational, so a multiplication takes one cycle. The cost is a long
combinational path. That path sets the clock rate, and the pipeline registers in front of the
ALU keep the register-file read out of it.

`gf2m_nist_reduce` reduces the product with the identity x^m ≡ r(x), where
f(x) = x^m + r(x) is the NIST polynomial:

| m   | f(x)                         |
|-----|------------------------------|
| 163 | x^163 + x^7 + x^6 + x^3 + 1  |
| 233 | x^233 + x^74 + 1             |
| 283 | x^283 + x^12 + x^7 + x^5 + 1 |
| 409 | x^409 + x^87 + 1             |
| 571 | x^571 + x^10 + x^5 + x^2 + 1 |

The upper half of the product, multiplied by r(x), is folded onto the lower half. This is a few
shifted XORs. A second fold removes what the first fold pushed to degree m or higher. In every
NIST polynomial the degree of r(x) is below m/2, so two folds are always enough.

## One point multiplication, step by step

The interface is simple. Hold `k`, `xp`, `yp` and `b` stable, then pulse `start` for one cycle.
After `ecc_pkg::pm_latency(m)` cycles, counted from the cycle in which `start` is high, `done`
is high for one cycle. `xq` and `yq` then hold the affine result until the next start.

**1. Conversion to projective form (10 cycles).** M3 cannot supply the constant 1, so the
starting points are given in an equivalent projective form:

* P = (X1 : Z1) = (xp² : xp), which is the same point as (xp : 1);
* 2P = (X2 : Z2) = (xp⁴ + b : xp²).

The first instruction, T4 = T4 + T4, makes a zero. Then Z1 = xp + T4 loads xp into the
register file. The chain of dependent operations needs 10 cycles.

**2. Montgomery ladder (17 cycles per key bit, bits k[m−2] down to k[0]).** Each key bit takes
three kinds of cycle:

* one cycle inspects the bit;
* 15 issue slots hold the 14 ladder instructions and one bubble;
* one cycle writes back the last instruction.

The issue order interleaves the point addition (PA, instructions 1 to 7) with the point doubling
(PD, instructions 8 to 14). Each result therefore has a cycle to come back before it is used:

| slot | instruction | operation       | slot | instruction | operation       |
|------|-------------|-----------------|------|-------------|-----------------|
| 0    | inst1       | Z1 = X2·Z1      | 8    | inst9       | T2 = Z2²        |
| 1    | inst2       | X1 = X1·Z2      | 9    | inst7       | X1 = X1 + T1    |
| 2    | inst11      | X2 = X2²        | 10   | inst10      | T2 = b·T2       |
| 3    | inst3       | T1 = X1 + Z1    | 11   | inst12      | Z2 = X2·Z2      |
| 4    | inst4       | X1 = X1·Z1      | 12   | inst13      | X2 = X2²        |
| 5    | inst5       | Z1 = T1²        | 13   | —           | bubble          |
| 6    | inst8       | Z2 = Z2²        | 14   | inst14      | X2 = X2 + T2    |
| 7    | inst6       | T1 = xp·Z1      |      |             |                 |

The table is written for k_i = 1. For k_i = 0 the control unit exchanges the addresses of X1
and X2, and of Z1 and Z2 (`ecc_pkg::ladder_swap`). T1 holds the addition's temporary and T2 the
doubling's, so the two can run interleaved. The only bubble is before inst14, which needs the
result of inst13. The scalar's top bit k[m−1] must be 1: the ladder starts from (P, 2P) and
processes the remaining m−1 bits.

**3. Reconversion to affine coordinates.** This step uses the standard López-Dahab y-recovery:

* xq = X1 / Z1
* yq = (xp + xq) · [(X1 + xp·Z1)(X2 + xp·Z2) + (xp² + yp)·Z1·Z2] · (xp·Z1·Z2)⁻¹ + yp

It runs in three parts:

* 12 cycles compute the bracket U into T1 and xp·Z1·Z2 into T4.
* The first inversion turns Z1 into Z1⁻¹. One multiplication then gives xq in X1.
* The second inversion turns T4 into W = (xp·Z1·Z2)⁻¹. Eight more cycles form yq in Z1.

### Inversion

An inversion uses only the multiplier, following the Itoh-Tsujii method. With
β_j = a^(2^j − 1), it uses β_{2j} = β_j^(2^j)·β_j and β_{j+1} = β_j²·a. It walks the binary
representation of m−1 from the top to reach β_{m−1}, then squares once more to get
a⁻¹ = a^(2^m − 2).

An inversion costs m−1 squarings and ⌊log₂(m−1)⌋ + HW(m−1) − 1 multiplications, where HW is the
number of one bits. Those counts are 9, 10, 11, 11 and 13 multiplications for the five field
sizes. Each operation depends on the one before it, so each is followed by a no-op: an inversion
takes 2 cycles per operation. Two scratch registers hold β and the previous β, taking turns.

### Cycle count

pm_latency(m) = 32 + 17·(m−1) + 4·(m−1 + ⌊log₂(m−1)⌋ + HW(m−1) − 1)

| m   | cycles (this RTL) | cycles reported for the original design |
|-----|-------------------|-----------------------------------------|
| 163 | 3470              | 3798                                    |
| 233 | 4944              | 5402                                    |
| 283 | 5998              | 6568                                    |
| 409 | 8644              | 9454                                    |
| 571 | 12054             | 12329                                   |

The original design reports 340 MHz on a Virtex-7 and 2.2 GHz in a 16 nm ASIC for m = 571. This
RTL has not been taken through either flow.

## Where this RTL follows the original design, and where it departs

These parts follow it:

* the architecture: an 8 × m register file, M1/M2/Dmux, M3 with xp/yp/b, pipeline registers at
  the ALU inputs, one XOR adder, one multiplier with NIST reduction, and M4;
* the 41-bit digit-parallel LSD multiplier, with 14 digits for m = 571;
* the 2-stage issue order of the ladder instructions, with T1/T2 as the PA/PD temporaries;
* 17 cycles per key bit.

These parts are this design's own. The original either gives only their function or nothing:

* The conversion takes 10 cycles, where the original reports 6. It starts from (xp² : xp)
  instead of (xp : 1), because M3 offers no constant 1.
* The reconversion sequence and its use of T3 and T4 are this design's own. The original gives
  34 cycles plus two inversions, with no sequence.
* The inversion uses the plain binary Itoh-Tsujii chain. For m = 283 and m = 571 the original
  reports one multiplication fewer, and its chain is not known.
* The two-cycle cost per inversion step is this design's own. The cycle totals reported for the
  original (table above) cannot be reproduced from its own formula, so they were not matched.
* The reduction circuit, the reset (asynchronous, active-low, clearing all state), and the
  start/busy/done handshake are this design's own.
* xp, yp and b are input ports. The original treats them as fixed base-point and curve
  constants; tie the ports to constants to get that behaviour.
* xq and yq are read directly from registers X1 and Z1.
* The non-pipelined and 3-stage schedules were compared in the original and rejected, so they
  are not built.

Limits: k[m−1] must be 1. Results are undefined if xp = 0, or if k·P or (k+1)·P is the point at
infinity. The inputs must stay stable while `busy` is high.

## Files

| file | contents |
|------|----------|
| `rtl/ecc_pkg.sv` | register addresses, instruction format, NIST polynomial terms, `pm_latency` |
| `rtl/ecc_pm_top.sv` | top level: datapath, control unit, read-after-write assertion |
| `rtl/ecc_regfile.sv` | 8 × m register file with M1, M2, Dmux |
| `rtl/ecc_operand_stage.sv` | M3 and the pipeline registers |
| `rtl/ecc_alu.sv` | adder, multiplier, reduction, M4 |
| `rtl/gf2m_add.sv`, `rtl/gf2m_dplsd_mul.sv`, `rtl/gf2m_digit_mul.sv`, `rtl/gf2m_nist_reduce.sv` | field arithmetic |
| `rtl/ecc_cu.sv` | control unit |
| `tb/gf_ref_pkg.sv` | independent bit-serial field arithmetic and affine curve arithmetic used as the reference |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/pm_field_runner.sv` | helper that runs one field size for `tb_ecc_pm_fields` |

Parameters: `M`, the field size (default 571; it must be one of the five NIST sizes), and `D`,
the digit size (default 41).

## Verification

Every testbench prints `TB_RESULT checks=N failures=F`. The end-to-end tests work as follows:

* Each draws a random point and chooses b so that the point lies on the curve, with a = 1.
* Each compares the accelerator's result with an affine double-and-add computed in the
  testbench, using extended-Euclid inversion.
* Each checks the exact cycle count.

| testbench | what it covers |
|-----------|----------------|
| `tb_ecc_pm_top` | m = 163, five scalars, including all ones (every ladder step takes the k_i = 1 branch) and 100…0 (every step takes the k_i = 0 branch). It counts both ladder branches, pipeline bubbles, inversions and read-after-write violations, and fails if a mechanism never occurs. |
| `tb_ecc_pm_top_full` | the same test with default parameters (m = 571), three scalars. |
| `tb_ecc_pm_fields` | all five NIST sizes side by side; prints the cycle counts. |
| `tb_ecc_cu` | the instruction stream: ladder slot order and address swap for every key bit, 17-cycle spacing, the read-after-write rule, the counts of additions and multiplications, latency. |
| `tb_ecc_alu`, `tb_gf2m_dplsd_mul`, `tb_gf2m_nist_reduce`, `tb_gf2m_add` | arithmetic at all field sizes against bit-serial models. |
| `tb_ecc_regfile`, `tb_ecc_operand_stage` | storage and operand routing against scoreboards. |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ecc_pkg.sv tb/gf_ref_pkg.sv \
    tb/tb_ecc_pm_top_full.sv --top-module tb_ecc_pm_top_full -o sim
./obj_dir/sim
```

The full-size run simulates three 571-bit point multiplications in a couple of seconds.
