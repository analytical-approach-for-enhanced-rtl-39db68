# DRAMM: a dual-field residue-arithmetic modular multiplier

Public-key cryptography spends most of its time multiplying very large numbers
modulo a prime p (RSA, ECC over GF(p)) or multiplying polynomials over GF(2)
modulo an irreducible polynomial p(x) (ECC over GF(2^n)). This design does both
on one datapath. It uses a residue number system. A large operand is stored as L
small residues, one per modulus m_1..m_L, and products are formed channel by
channel with no carries between channels. Integers use the RNS and polynomials
use its polynomial counterpart (PRNS). The two cases differ only in their
arithmetic: integer adds with carries, or XOR with no carries. Every unit in
the datapath has one field-select bit that suppresses the carries.

Modular reduction by p does not fit residues well, since residues give no cheap
division. It is done with RNS Montgomery multiplication, which needs two bases
A and B. The same L multiply-accumulate (MAC) lanes also convert binary
operands to residues, convert residues back to binary by mixed-radix conversion
(MRC), and run modular exponentiation.

Default configuration: L = 4 lanes, each R = 16 bits wide, so the range of each
base is about 64 bits. The exponent is 64 bits.

## Number representation

* **Field select** `fsel`: 0 = GF(p), integers. 1 = GF(2^n), polynomials with
  bit k as the coefficient of x^k. It is given with each command.
* **Bases.** Lane j holds one modulus of base A (`a_j`) and one of base B
  (`b_j`). They are loaded by the host and fully programmable:
  * integer moduli: 2 <= m < 2^16, pairwise coprime;
  * polynomial moduli: degree exactly 16 (17-bit value with bit 16 set),
    pairwise coprime.
  * A = prod a_j and Q = prod b_j.
* **Registers.** Each lane has 8 residue registers, used in pairs. Pair k is
  register 2k (the residue modulo `a_j`) and register 2k+1 (modulo `b_j`). So a
  pair holds one value in both bases, the representation over T = A u B that
  Montgomery multiplication uses. Pairs 0-2 are free for the host. Pair 3 is
  scratch.
* **Binary operands** enter and leave as L digits of R bits, least significant
  first: z = sum z^(i) 2^(R i), or sum z^(i) x^(R i) for polynomials.

## The lane step

Everything the unit does is a sequence of one operation, applied to all lanes
in the same clock:

    acc_j  <-  < addend + X * Y >_{m_j}        (lanes with lane_en[j] set)
    reg_j[rd] <- same value                    (if wr)

The modulus m_j comes from base A or base B of lane j. The operand mux
(`mux_logic`) picks each input:

* X: a lane register, the broadcast bus (one register of one chosen lane, sent
  to every lane), or the external binary digit.
* Y: a lane register, or a precomputed constant from the lane's bank.
* addend: zero, the accumulator, or a lane register.

The controller (`dramm_ctrl`) issues one such step (`mac_ctrl_t` in
`dramm_pkg`) per clock. Each lane applies it with its own modulus and its own
constants. The broadcast bus lets a mixed-radix digit, found in one lane, reach
all the others.

## Commands and how they map onto steps

| command | what it computes | steps / latency |
|---|---|---|
| `OP_B2R` dst | binary `din` -> residues in both bases | L per base |
| `OP_RMUL` dst,s1,s2 | channel-wise product, both bases | 1 per base |
| `OP_RMM` dst,s1,s2 | Montgomery product s1*s2*Q^-1 mod p | 4L+5 |
| `OP_R2B` s1 | MRC of s1's base-A residues, then binary digits | L + L |
| `OP_EXP` dst,s1,e | dst <- dst * s1^e (Montgomery domain) | (4L+5) per bit + (4L+5) per one bit |

`done` is high for one cycle. It is seen at the (steps+1)-th rising edge after
the edge that accepted the command: RMM takes 22 clocks at L = 4, B2R and R2B
take 9, RMUL takes 3.

**Binary to residue.** Step i adds z^(i) * <2^(R i)>_{m_j}, with
<x^(R i)>_{m_j} for polynomials. After L steps each lane holds z mod m_j. The
same steps then run for the other base.

**Mixed-radix conversion.** This is the hard part. A value z in base M is
rewritten as z = U_1 + W_2 U_2 + ... + W_L U_L, where W_i = m_1 ... m_{i-1} and
U_i is a digit below m_i. The unit solves for the digits one lane at a time:

* Step 0: every lane j forms z_j * <W_j^-1>_{m_j}.
* Step i >= 1: lane i-1 now holds its final digit U_{i-1}. The broadcast bus
  sends U_{i-1} to all lanes. Only lanes j >= i add U_{i-1} * <-W_{i-1} W_j^-1>_{m_j}.
* After L steps lane i holds U_i.

For polynomials the minus signs vanish: negation is the identity in GF(2).

**Base extension.** The digits U_i are broadcast one per step. Every lane of
the other base accumulates U_i * <W_i>_{m'_j}, so after L steps it holds the
same value modulo its own modulus. The conversion is exact: no correction
factor and no approximation.

**RNS Montgomery multiplication** (`OP_RMM`). a and b are pairs; Q is the
product of base B.

1. s = a*b in both bases (2 steps).
2. t_B = s_B * <-p^-1>_B (1 step).
3. t_A from t_B: MRC in base B, then extension into A (2L steps).
4. v_A = s_A + t_A * p_A (1 step: the addend comes from a register).
5. c_A = v_A * <Q^-1>_A (1 step). v = s + t p is divisible by Q, so this is
   the exact quotient.
6. c_B from c_A: MRC in base A, then extension into B (2L steps).

For integers, inputs below 2p give a result below 2p, provided 4p < Q. The
result can be fed straight back in. For polynomials the result is fully
reduced if deg p <= 64.

**Residue to binary** (`OP_R2B`). After MRC, z = sum U_i W_i. Digit k of z is
the column sum over lanes of U_i * W_i^(k), plus the carry from digit k-1.
Here W_i^(k) is the k-th R-bit digit of W_i, a loaded constant. Each lane
multiplies. `r2b_column` adds the L products along a chain of dual-field
adders, keeps the low R bits as the digit, and registers the rest as the carry.
For polynomials the "carry" is the high half of each carry-less product. The
mixed-radix digits themselves appear on `dout_mr`.

**Exponentiation** (`OP_EXP`). Left-to-right square-and-multiply over the EW
exponent bits, MSB first, with one RMM per square and one per multiply. The
host loads the base in Montgomery form (g*Q mod p) into s1, and the Montgomery
one (Q mod p) into dst. The result is g^e * Q mod p.

## Constants the host loads

Each lane has two banks, 0 for base A and 1 for base B, written through
`cfg_we/cfg_lane/cfg_base/cfg_addr/cfg_data`. The addresses below are for
lane j of a bank whose base moduli are m_1..m_L; the other base is m'. The
functions in `dramm_pkg` give the addresses for any L.

| address | content |
|---|---|
| `c_pow(i)` = i | <2^(R i)>_{m_j}, or <x^(R i)>_{m_j} |
| `c_mrck(L,i)` = L+i, i < j | <-W_i W_j^-1>_{m_j} (unused for i >= j) |
| `c_bext(L,i)` = 2L+i | <W'_i>_{m_j}, W' of the other base |
| `c_wdig(L,k)` = 3L+k | R-bit digit k of W_j (binary weight) |
| `c_mrcinv(L)` = 4L | <W_j^-1>_{m_j} |
| `c_negpinv(L)` = 4L+1 | <-p^-1>_{m_j} (used from bank B) |
| `c_pmod(L)` = 4L+2 | <p>_{m_j} (used from bank A) |
| `c_qinv(L)` = 4L+3 | <(product of other base)^-1>_{m_j} (used from bank A) |
| `c_mod(L)` = 4L+4 | the modulus m_j itself (17 bits) |

To change field, reload the banks and issue commands with the other `fsel`.
`tb/dramm_ref_pkg.sv` holds a plain software model (`make_const`) that
produces all of these from the moduli and p.

## Arithmetic units

* `dual_field_adder`: a Kogge-Stone parallel-prefix adder. Its generate terms
  and carry-in are forced to 0 in polynomial mode, so it becomes an XOR.
* `dual_field_multiplier`: R x R partial products. They are accumulated in
  carry-save form by a chain of 3:2 compressors, whose carries are also forced
  to 0 in polynomial mode. A dual-field prefix adder does the final add.
* `modular_reduction`: a combinational long division. For integers it is a
  restoring compare-and-subtract per bit. For polynomials a set top coefficient
  triggers an XOR with the shifted modulus.
* `dual_field_mac`: multiplier, then prefix adder for the addend, then
  reduction. It is combinational, so one lane step takes one clock. It also
  brings out the unreduced product for the binary digit chain.

## What follows the method and what is this design's own

These follow the source method:
* the dual-field residue approach;
* the MAC-based conversions: binary-to-residue with precomputed powers of the
  radix, and MRC-based residue-to-binary with a chain of lane results;
* the seven-step RNS Montgomery algorithm;
* the use of carry-save and parallel-prefix adders;
* four MAC units.

This design's own choices:
* the channel width R = 16 and the 64-bit exponent;
* programmable moduli. The method mentions {2^n+1, 2^n, 2^n-1} sets only as
  background; no special-form moduli are exploited;
* the mixed-radix formula with explicit inverse weights;
* base extension by MRC;
* the register pairs, the command set and the handshake;
* single-cycle combinational MACs. The method's remark that the adder and
  multiplier of a MAC may overlap rows of the binary conversion is not
  modelled;
* long-division reduction;
* square-and-multiply exponentiation;
* the async active-low reset. Constant banks are not reset.

Not covered:
* The source claims up to about 10 % less delay than earlier designs. That is
  a gate-level timing result and is not reproduced here.
* Reconstruction through the Chinese Remainder Theorem is the usual
  alternative to MRC. It is not built: it needs a correction factor that MRC
  avoids, and every conversion here uses MRC.
* Plain (non-RNS) Montgomery multiplication is the starting point of the
  method only. It has no hardware of its own here.
* At the defaults the dynamic range is 64 bits per base, far below RSA sizes.
  Larger operands need a larger L and/or R. The reduction and multiplier are
  generic in R; the constant-address field (`CIW` = 6 bits) limits L to 14.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
They use `tb/dramm_ref_pkg.sv`, an independent 256-bit software model of
integer and GF(2) arithmetic. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dramm_pkg.sv tb/dramm_ref_pkg.sv tb/tb_dramm.sv --top-module tb_dramm
    ./obj_dir/Vtb_dramm

* `tb_dramm` runs the whole unit at default size in both fields. Integer mode
  uses p = 2^61 - 1 with eight 16-bit primes. Polynomial mode uses
  p(x) = x^63 + x + 1 with eight irreducible degree-16 polynomials. It covers:
  * binary round trips, including the largest representable value, with
    mixed-radix digit checks;
  * channel-wise products;
  * Montgomery products, single and chained (which checks the base-B result);
  * exponentiations;
  * the latency of every command;
  * switching fields back and forth.
* `tb_mac_array` applies thousands of random lane steps against a shadow
  model.
* `tb_dramm_ctrl` checks the step sequences: MRC masks, broadcast order,
  result registers, and multiply counts in exponentiation.
* The remaining testbenches check each arithmetic unit against direct
  formulas.

## Files

* `rtl/dramm_pkg.sv`: types, command codes, constant-bank layout.
* `rtl/dramm.sv`: top level.
* `rtl/dramm_ctrl.sv`: command sequencer.
* `rtl/mac_array.sv`: L lanes.
* `rtl/mux_logic.sv`, `rtl/dual_field_mac.sv`, `rtl/dual_field_multiplier.sv`,
  `rtl/dual_field_adder.sv`, `rtl/modular_reduction.sv`: lane datapath.
* `rtl/r2b_column.sv`: binary digit chain.
* `tb/`: one testbench per module, plus the reference package.
