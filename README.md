# Area-lean BCH engine for helper-data key recovery

This RTL protects a 128-bit device identifier (for example a ring-oscillator
PUF response) with a shortened binary BCH code over GF(2^8) that corrects up
to 10 bit errors. It does two jobs:

- **Enrollment.** It computes *helper data*: the BCH parity of the identifier.
  The helper data is stored outside the chip and is not secret.
- **Authentication.** It takes a re-measured identifier, which may differ from
  the enrolled one in a few bits, together with the stored helper data. It
  returns the corrected identifier.

The main idea is to spend as little logic as possible. The engine does not
store precomputed code constants. After reset it derives everything itself,
using block RAMs and sequential, mostly bit-serial datapaths:

- the table of field elements;
- the minimal polynomials m_1(x) .. m_20(x);
- the generator polynomial g(x).

Field elements appear in two forms, and each operation uses the form that is
cheap for it:

- **Binary vector.** M bits, the coefficients of a polynomial in alpha of
  degree below M. Addition is XOR.
- **Power of alpha.** Multiplication is an addition of exponents modulo 2^M-1.

The element table converts a power into a binary vector. A linear search of
the same table converts the other way.

## Data formats

- A polynomial over GF(2) is a bit vector: bit i is the coefficient of x^i.
- An identifier `id[K-1:0]` is the polynomial id(x). Bit K-1 is the highest
  power.
- g(x) has degree r = `gen_deg`, which is 76 at the default size. The helper
  data is the low r bits of `helper_o`; the upper T*M-r bits are zero.
- The word that is checked is r(x) = id(x)·x^r + helper(x). It has K + r = 204
  positions. Position p is the coefficient of x^p: positions 0..r-1 are helper
  bits, and positions r..r+K-1 are identifier bits.
- Syndromes come out as powers of alpha (`syn_pow_o[j]`), with a flag
  (`syn_zero_o[j]`) for the zero element, which has no power.

## Start-up: the element table

`gf_elem_gen` walks alpha^0, alpha^1, ... . Each step shifts the previous
element left by one bit. When a 1 leaves bit M-1, it XORs in the primitive
polynomial. Element alpha^i is written at address i of a 2^M x M RAM. Address
2^M-1 holds alpha^(2^M-1) = 1. The default polynomial is
x^8+x^4+x^3+x^2+1 (0x11D). Filling the table takes 2^M cycles.

## Start-up: minimal polynomials (the unusual part)

m_i(x) is the product of (x + alpha^p) over the cyclotomic coset
p = i, 2i, 4i, ... (mod 2^M-1). Multiplying this out with field arithmetic
would need a GF multiplier in the loop. `gf_minpoly` avoids that by keeping
every coefficient as a **formal sum of powers of alpha**:

- A coefficient is a 2^M-bit word. Bit p set means that alpha^p is one of the
  terms. For example, alpha^9 + alpha^3 is bits 9 and 3.
- Adding two such sums is a bitwise XOR. This is exact, because equal terms
  cancel in characteristic 2.
- Multiplying a sum by alpha^p moves every set bit up by p places, modulo
  2^M-1.

The unit works in three phases:

1. **Coset.** Doubling modulo 2^M-1 is a 1-bit rotate of the exponent. Each
   new power goes into a small power-of-alpha memory (M x M). It is also
   marked in a 2^M x 1 *valid* memory. The coset is complete when a power
   repeats. The valid memory is cleared at each start, which takes 2^M cycles.
2. **Product.** Two coefficient memories (2M words x 2^M bits) hold the
   running product. They are used as ping-pong buffers: each factor reads
   one memory and writes the other. Multiplying by (x + alpha^p) gives
   `new[a] = old[a]·alpha^p + old[a-1]`. The shift by p is done one source bit
   per cycle. The XOR with `old[a-1]` takes one more memory read.
3. **Reduction.** Each final coefficient is still a sum of powers. For every
   set bit p, the unit reads alpha^p from the element table and XORs it into
   an accumulator. For a minimal polynomial the result is always 0 or 1, and
   an assertion checks this. That value becomes one bit of m_i(x).

Worked example in GF(2^4) with x^4+x+1, computing m_3:

- The coset is {3, 6, 12, 9}.
- After the first factor, memory A holds x + alpha^3: word 0 has bit 3 set,
  and word 1 has bit 0 set.
- After (x + alpha^6), memory B holds x^2 + (alpha^3+alpha^6)x + alpha^9.
- After all four factors, the reduction gives x^4+x^3+x^2+x+1.

Cost per minimal polynomial of degree d is about:

- 2^M cycles to clear the valid memory;
- (f+2)(2^M+5) cycles for factor f;
- (d+1)(2^M+3) cycles for the reduction.

The top computes m_j for j = 1..2T. Each new result is compared with the
earlier ones, and `first_q[j]` records the smallest j that has the same
polynomial.

## Start-up: generator polynomial

`gf2_poly_mul` is the one polynomial multiplier. It holds the running product
and multiplies in one minimal polynomial per request, using Horner's rule with
one operand bit per cycle (M+1 cycles). The top feeds it m_1, m_3, ...,
m_(2T-1), skipping any j whose minimal polynomial repeats an earlier one.
Distinct minimal polynomials are co-prime, so the product is their least
common multiple.

- At the default size all ten are distinct. g(x) has degree 76, because
  m_17 has degree 4.
- In GF(2^5) with t = 5, m_9 equals m_5 and is skipped.

The whole start-up takes about 261,000 cycles at the default size. After that
`init_done` rises.

## Enrollment

`bch_encoder` is a shift-register divider whose taps come from the g(x)
register. It shifts the identifier in, most significant bit first, for K
cycles. The result is (id·x^r) mod g(x), which is the helper data.

## Authentication

The steps are:

1. **Syndrome polynomials.** For each j = 1..2T with `first_q[j] == j`,
   `bch_syndrome_div` computes S_j(x) = r(x) mod m_j(x). It is a serial
   divider with variable taps and takes K + r cycles. A j that shares its
   minimal polynomial with an earlier one copies that remainder. At the
   default size only 10 divisions are needed for 20 syndromes.
2. **Syndrome values.** `syndrome_reduce` evaluates S_j(alpha^j). For every set
   bit l of S_j(x), it reads alpha^(l·j) from the table and XORs it in. The
   exponent l·j is kept as a running power, advanced by `gf_pow_mul` (an
   exponent adder with a modulo correction). It then searches the table for
   the value to get its power of alpha.

   Worked example in GF(2^4), with received word 10001110111:
   - S_1(x) = x^3+1, so S_1 = alpha^14;
   - S_2 = alpha^13;
   - S_3(x) = x^3+x, so S_3 = alpha.
3. **Error-free shortcut.** If every syndrome is zero, the identifier is
   returned unchanged, with `err_detected` = 0.
4. **Error locator.** `bch_err_locator` runs the inversion-free
   Berlekamp–Massey algorithm on the binary-vector syndromes, using three
   `gf_mul_vec` multipliers. The result is Lambda(x) and the error count L.
   It takes 2T(2T+2)+1 = 441 cycles.
5. **Root search.** `bch_chien` tests the positions p = 0..K+r-1, one per
   cycle, for Lambda(alpha^-p) = 0. The code is binary, so every error value
   is 1. The identifier bits at the positions found are flipped.
6. **Failure check.** `auth_fail` is set when L > T, or when the number of
   roots found differs from L. When that happens the identifier is returned
   unmodified.

An authentication takes about 2,300 cycles for a clean word and 4,000–6,500
cycles for a word with errors.

## Top-level interface (`bch_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| busy | out | 1 | start-up or an operation is running |
| init_done | out | 1 | table, minimal polynomials and g(x) are ready |
| gen_poly, gen_deg | out | T·M+1, ⌈log2(T·M+1)⌉ | g(x) and its degree |
| enroll_start | in | 1 | pulse while idle |
| enroll_id | in | K | identifier; hold until done |
| enroll_done | out | 1 | pulse |
| helper_o | out | T·M | helper data |
| auth_start | in | 1 | pulse while idle |
| auth_id, auth_helper | in | K, T·M | re-measured identifier and stored helper data; hold until done |
| auth_done | out | 1 | pulse |
| auth_id_o | out | K | corrected identifier |
| auth_nerr | out | ⌈log2(2T+1)⌉ | errors found |
| auth_fail | out | 1 | word not correctable |
| err_detected | out | 1 | some syndrome was non-zero |
| syn_pow_o, syn_zero_o | out | 2T × M, 2T × 1 | syndromes S_1..S_2T as powers of alpha |

Handshake rules:

- Start pulses are ignored until `init_done`, and whenever `busy` is high.
- An assertion requires that enrollment and authentication are not requested
  in the same cycle.
- Internal assertions check that no unit is started while it is busy and
  that the two users of the element table never read it in the same cycle.
- Results hold until the next operation of the same kind.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| M | 8 | field GF(2^M) |
| PRIM | 0x11D | primitive polynomial, including x^M |
| T | 10 | correctable errors |
| K | 128 | identifier bits |

They are set in `bch_pkg` and can be overridden on every module. The code
length K + deg g must not exceed 2^M-1. The test benches also run:

- M = 4 with PRIM = 0x13;
- M = 5 with PRIM = 0x25, T = 5, K = 11 (the BCH(31,11) code).

## Modules

| File | Role |
|---|---|
| `rtl/bch_pkg.sv` | default field, code size and primitive polynomial |
| `rtl/bch_top.sv` | sequencing of start-up, enrollment and authentication |
| `rtl/gf_elem_gen.sv` | element table (power → vector), filled after reset |
| `rtl/sdp_ram.sv` | block RAM: one write port, one synchronous read port |
| `rtl/gf_minpoly.sv` | minimal polynomial of alpha^i |
| `rtl/gf2_poly_mul.sv` | generator-polynomial multiplier |
| `rtl/bch_encoder.sv` | helper-data divider |
| `rtl/bch_syndrome_div.sv` | syndrome-polynomial divider |
| `rtl/syndrome_reduce.sv` | S_j(alpha^j) and its power of alpha |
| `rtl/gf_pow_mul.sv` | multiply/divide in power-of-alpha form |
| `rtl/gf_mul_vec.sv` | multiply in binary-vector form |
| `rtl/bch_err_locator.sv` | Berlekamp–Massey error locator |
| `rtl/bch_chien.sv` | Chien search |

Every module starts with a comment that gives its function, interface and
timing, and says which parts follow the reference method and which are
choices made here.

## Simulating

Each block has a self-checking test bench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=F`. The expected values come from
`tb/bch_ref_pkg.sv`, which works only in binary-vector form: shift-and-add
field multiplication, multiplying out the (x + beta) factors directly, and
long division. It therefore shares neither the tables nor the bit-per-power
format of the RTL.

The test benches are:

- `tb_bch_top_full` runs the default-size design with no parameter
  overridden, through start-up, 26 enrollments and 26 authentications. It
  uses 0–10 errors, helper-only errors and 14-error words, and counts each
  path taken.
- `tb_bch_top` adds a GF(2^5) instance, in which a repeated minimal
  polynomial must be skipped.

Example, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/bch_pkg.sv tb/bch_ref_pkg.sv tb/tb_bch_top_full.sv \
  --top-module tb_bch_top_full
./obj_dir/Vtb_bch_top_full
```

Verilator finds the modules through `-y` (one module per file, named after
it). `-Wno-fatal` keeps width warnings from the test benches' wide reference
arithmetic from stopping the build. The full-size run takes a few seconds. Verilator has only two logic states,
so every register that is read is reset, and every RAM word is written
before it is read.

## Where this design departs from, or adds to, the reference method

- **Primitive polynomial.** The reference gives no polynomial for GF(2^8).
  0x11D is used because it produces the example element values quoted for
  GF(2^8), though at exponents one lower than quoted (for example 0x66 is
  alpha^126 here). No primitive polynomial matches the quoted exponents
  exactly.
- **Coefficient memory depth.** 2M words (16 at M = 8) are enough for degree
  M. This follows the worked GF(2^4) example, which uses 8 words.
- **Decoder back end.** The reference lists the decoding steps (error
  locator, roots, correction) but does not describe their hardware.
  Berlekamp–Massey and the Chien search are standard choices made here. They
  use binary-vector multipliers rather than the power form.
- **Storage choices.** Minimal polynomials, syndromes and Lambda are kept in
  registers, not in RAM. They are small: 20 × 9, 20 × 8 and 11 × 8 bits.
- **Shared table port.** One read port serves both the minimal-polynomial
  unit and the syndrome reduction. They never run at the same time.
- **Outside the design.** The identifier source (ring oscillators) and the
  storage of the helper data are outside this RTL and appear as ports.
- **Larger fields.** The reference mentions a variant for very large fields
  (for example n = 163) that generates elements when needed instead of
  storing them. It is not built. The table and the 2^M-bit coefficient words
  limit this design to small M.
- **Resource use.** No FPGA resource comparison has been made. The main RAMs
  at the default size are:
  - the 256 × 8 element table;
  - two 16 × 256 coefficient memories;
  - a 256 × 1 valid memory and an 8 × 8 power memory.
