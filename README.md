# Carry-save common-multiplicand Montgomery exponentiation for RSA

This is RTL for RSA modular exponentiation, C = M^e mod n, with a 1024-bit
modulus. Three ideas shape it:

* **Montgomery powering ladder.** Every exponent bit costs exactly one modular
  multiplication and one modular squaring, whatever the bit's value. The
  sequence of operations therefore does not reveal the exponent bits to simple
  power analysis.
* **Common multiplicand.** In every ladder step the multiplication and the
  squaring share one operand, P. The step computes P·R and P·P. Montgomery
  reduction of the shared multiplicand (the repeated halving modulo n) is done
  once. Its successive values are fed to two accumulators: one weighted by the
  bits of R, the other by the bits of P. One pass gives both results.
* **Carry-save datapath.** All wide additions keep their results as two
  vectors (sum and carry), so no carry chain is longer than one bit. The clock
  period does not depend on the 1036-bit operand width. Only at the end of a
  multiplication are the two vectors added into binary, 48 bits per cycle, on
  an adder of the kind found in an FPGA DSP slice (a DSP48E).

The top module is `rsa_modexp`. At its default size (k = 1024) one 1024-bit
encryption with e = 2^16+1 takes 20368 clock cycles.

## The multiplication: what one `cscmmm` pass computes

Let n be an odd k-bit modulus, 2^(k-1) < n < 2^k, and let

    g = 1 + ceil(log2(k+1))          (g = 12 for k = 1024)

P and R are (k+g)-bit numbers. One pass of the multiplier returns

    X = P·R·2^-(k+2g) mod n          Y = P·P·2^-(k+2g) mod n

Both are (k+g)-bit numbers. X and Y are *congruent* to these values and
below 2^(k+g). They are not necessarily below n. The g guard bits make that
bound hold without any final subtraction, so a result can be fed straight back
as an operand. Every multiplication of the exponentiation works with this one
bound.

The pass runs k+2g iterations. Written with plain integers:

    T := P
    for i = 1 .. k+2g:
        q := T mod 2
        T := (T + q·n) / 2                      -- T = P·2^-i mod n (up to multiples of n)
        if i >= g+1:
            X += r[k+2g-i] · T                  -- multiplier bits MSB first,
            Y += p[k+2g-i] · T                  --   r[k+g-1] down to r[0]

X sums r_j·P·2^-(k+2g-j) over all bits j. That equals P·R·2^-(k+2g) modulo n. No
shifts are needed in the accumulators, because the weighting by powers of two
is already inside the T values.

### The carry-save version

In hardware T, X and Y are each held as a pair of vectors:

* **Reduction** (`common_reduction_unit`). T = T1 + T2. The quotient bit is
  q = T1[0] xor T2[0]. One row of full adders forms S, C = T1 + T2 + q·n in
  carry-save form. Because n is odd, S[0] is always 0. So the halving is exact
  and free: T1' = S >> 1 and T2' = C. The carry vector already carries the
  weight two that the halving removes. The path is one XOR, one 2:1 mux and
  one full adder. With T1, T2, n < 2^(k+g), the new vectors stay below
  2^(k+g).
* **Accumulation** (`accumulation_unit`, one each for X and Y). A 2:1 mux
  selects (T1, T2) or zero by the multiplier bit. Two rows of full adders (a
  4:2 compressor) fold A1 + A2 + T1 + T2 back into two vectors. The vectors are
  1056 bits wide: 22 chunks of 48 bits. Carries out of the top are dropped.
  Since the true sum is below 2^1036, the arithmetic modulo 2^1056 is exact.
* **Pipelining.** In iteration i the reduction computes T[i+1] while the
  accumulators add the registered T[i]. The accumulation therefore lags by
  one iteration and runs for i = g+2 .. k+2g+1. That is k+g cycles, one per
  multiplier bit. The reduction runs for i = 1 .. k+2g.
* **Conversion to binary** (`rb_adder` around `dsp_add48`). Both accumulator
  pairs shift right 48 bits per cycle. Each pair feeds a 48-bit adder that
  computes chunk_a + chunk_b + carry. The carry in is zero for the first
  chunk; after that it is the adder's registered carry out of the previous
  chunk. Sum chunks collect in the X (Y) result register. That register is
  the adder's 48-bit output register (the top chunk) plus a 21-chunk shift
  register (the lower chunks). Binary results are needed because the next
  multiplication scans its multiplier from the most significant bit.

### Cycle budget of one multiplication (k = 1024)

| phase | cycles |
|---|---|
| load operands (T1 = 0, T2 = P, accumulators cleared) | 1 |
| iterations i = 1 .. k+2g+1 | 1049 |
| conversion, 48 bits per cycle, ceil(1036/48) chunks | 22 |
| **total, load to results valid** | **1072** |

In general the total is 1 + (k+2g+1) + ceil((k+g)/48). A new multiplication
may be loaded in the same cycle in which `out_valid` announces the previous
results. X and Y stay valid until the next multiplication reaches its
conversion phase.

## The exponentiation: `rsa_modexp`

The inputs are M < n, the exponent e (k bits), the modulus n, and two constants
precomputed from n:

    lambda = 2^(2k+4g) mod n         Z = 2^(k+2g) mod n  (1 in the Montgomery domain)

The sequence, with CSCMMM(P, R) returning (X, Y) as above:

    P      := X of CSCMMM(M, lambda)        -- M into the Montgomery domain
    R      := Z
    for each bit e_i, from the most significant set bit down to bit 0:
        e_i = 1:  (R, P) := CSCMMM(P, R)    -- R := P·R,  P := P²
        e_i = 0:  (P, R) := CSCMMM(R, P)    -- P := R·P,  R := R²
    C      := X of CSCMMM(1, R)             -- back to the integer domain

For e = 2^16+1 this is 1 + 17 + 1 = 19 multiplications: 19 × 1072 = 20368
cycles. In general the count is (bitlength(e) + 2) × 1072.

**Operand routing without copies.** P and R are never copied into registers
of their own. After each multiplication they sit in the multiplier's X and Y
result registers. After the first multiplication R is instead the stored Z.
Two state bits say which register holds which value: the kind of the last
operation and its exponent bit. The next multiplication's operands are
multiplexed from X, Y and Z, in the very cycle the previous results appear.
There is no gap between multiplications, and the only wide registers outside
the multiplier are n, Z and e.

## Module hierarchy

    rsa_modexp                 exponentiation sequencer (top)
    └── cscmmm                 one common-multiplicand Montgomery multiplier
        ├── io_interface       valid/ready handshake for operands and results
        ├── cscmmm_ctrl        control unit: idle / run / convert FSM
        ├── iter_counter       iteration and chunk counter, decoded loop bounds
        ├── operand_regs       n, and MSB-first shift registers for the bits of R and P
        ├── common_reduction_unit   T1/T2 registers, quotient, carry-save halving
        ├── accumulation_unit ×2    X and Y carry-save accumulators
        └── rb_adder ×2             carry-save to binary conversion, X and Y result registers
            └── dsp_add48           48-bit adder with carry in/out (DSP48E function)
    cscmmm_pkg                 g(k), chunk count, state and operation enums

The sized modules take one parameter, `K` (the modulus width, default 1024);
`dsp_add48` takes its adder `WIDTH` (48). Everything else is derived from K:
g, W = K+g, the chunk count and the counter width.

## Interfaces

`rsa_modexp` (k = 1024, g = 12):

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | sampled while `busy` is low; all data inputs are taken in this cycle |
| `m_in`, `e_in`, `n_in` | in | 1024 | message, exponent, odd modulus |
| `lambda_in`, `z_in` | in | 1024 | 2^(2k+4g) mod n and 2^(k+2g) mod n |
| `busy` | out | 1 | exponentiation running |
| `done` | out | 1 | one-cycle pulse; `c_out` valid from here until the next start |
| `c_out` | out | 1036 | result, ≡ M^e (mod n), < 2^1036 |

`cscmmm`: `in_valid`/`in_ready` with `p_in`, `r_in` (1036 bits), `n_in` (1024
bits); `out_valid`/`out_ready` with `x_out`, `y_out` (1036 bits). `in_ready`
is high whenever the unit is idle. `out_valid` rises 1072 cycles after the
load and falls on `out_ready` or on the next load.

## Where this RTL follows the source design and where it chooses

These follow the original description:

* the three algorithms: the common-multiplicand multiplication, its carry-save
  form with pipelined reduction and accumulation, and the powering ladder;
* the sizes: g, the 1036-bit operands, the 48-bit DSP adders with the carry
  fed back, and 22 conversion cycles;
* the block list of the multiplier;
* the cycle counts: 1050 + 22 per multiplication and 20368 per RSA-1024
  encryption with e = 2^16+1.

The following are this design's own choices:

* **Results are not reduced below n.** The multiplier's bound is
  X, Y < 2^(k+g), and no final subtraction is described, so `c_out` is only
  congruent to M^e mod n. It is frequently several times n. A consumer that
  needs the canonical value must reduce it, for example with a few conditional
  subtractions or a division.
* **Leading zero bits of e are skipped.** This matches the 19-multiplication
  count for e = 2^16+1. It makes the run time depend on the bit length of e,
  though not on its bit values. For a secret exponent, pass a fixed-length
  exponent with its top bit set, or remove the skip.
* **lambda and Z are inputs.** They depend only on n and are computed outside.
* Handshakes, reset, the three-state control FSM, and the counter shared
  between the iterations and the conversion chunks.
* Shift registers (rather than indexed multiplexers) supply the multiplier
  bits, and the accumulators double as shift registers during conversion.
* The X/Y result register is the DSP output register plus a shift register,
  so the conversion takes exactly 22 cycles. The DSP adder's clock enable holds
  the last sum; in the DSP48E configuration the source uses, CE is left
  inactive.
* `dsp_add48` is generic RTL with the function of the configured DSP slice
  (P = C + CONCAT + CARRYIN, registered, with CARRYOUT), not a vendor
  primitive.

Not modelled: the FPGA-specific results (clock frequency, slice and LUT
counts, power). For reference, a generic synthesis of `rsa_modexp` reports
about 14,600 flip-flops. Most of them are the two 1056-bit accumulator pairs,
the T vectors, the operand shift registers and the result registers.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | size | checks |
|---|---|---|
| `tb_dsp_add48` | 48 bit | sum and carry out against a 49-bit add; CE hold |
| `tb_common_reduction_unit` | k = 64 | T1+T2 and q against a binary reduction, every step |
| `tb_accumulation_unit` | k = 128 | accumulated sum against a reference, read out through the chunk shift |
| `tb_rb_adder` | k = 128 | binary result, including full carry ripple; latency; hold |
| `tb_iter_counter` | k = 64 | count and loop-bound flags |
| `tb_operand_regs` | k = 64 | MSB-first bit order with random shift stalls |
| `tb_io_interface` | — | handshake against a reference model |
| `tb_cscmmm_ctrl` | k = 64 | number of reduction, accumulation and conversion cycles; latency |
| `tb_cscmmm` | k = 64 | X, Y bit-exact against a plain binary model and modulo n; latency 1 + (k+2g+1) + chunks = 84 cycles; back-to-back loads |
| `tb_rsa_modexp` | k = 64 | 24 exponentiations (e = 2^16+1, 0, 1, 3, a single top bit, random) against M^e mod n; cycle count; counts every mechanism |
| `tb_rsa_modexp_full` | k = 1024 | RSA-1024 with e = 2^16+1 (20368 cycles), with e = 3, and with a random full-length 1024-bit exponent (1099872 cycles) |

`tb_rsa_modexp` counts each mechanism and fails if one never occurs. The
mechanisms are:

* conversion into and out of the Montgomery domain;
* ladder steps for bit 1 and for bit 0;
* skipped leading zeros;
* back-to-back issue of multiplications;
* a carry passing between conversion chunks;
* a result above n.

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        rtl/cscmmm_pkg.sv tb/tb_rsa_modexp_full.sv --top-module tb_rsa_modexp_full
    ./obj_dir/Vtb_rsa_modexp_full

The full-size run, about 1.1 million cycles, takes a few seconds. To change the key size, set `K` on
`rsa_modexp` (or on any submodule). Everything else follows from it.
