// gf_pow_mul: multiplication and division of GF(2^M) elements held as powers
// of alpha.
//
// With a = alpha^ea and b = alpha^eb, a*b = alpha^(ea+eb) and
// a/b = alpha^(ea-eb), the exponents taken modulo 2^M-1. The block therefore
// needs only an M-bit adder or subtractor and one correction by 2^M-1. A zero
// element has no power and is carried by a separate flag: a zero factor gives
// a zero product; division by zero returns zero with `div_by_zero` set.
// Purely combinational.
//
// Multiplying in the power-of-alpha form with an adder and a subtraction of
// 2^M-1 follows the source design; the zero flags are this design's own.
module gf_pow_mul #(
  parameter int unsigned M = bch_pkg::GF_M,
  localparam int unsigned N = (1 << M) - 1
) (
  input  logic [M-1:0] a_pow,
  input  logic         a_zero,
  input  logic [M-1:0] b_pow,
  input  logic         b_zero,
  input  logic         div,          // 0: a*b, 1: a/b
  output logic [M-1:0] y_pow,
  output logic         y_zero,
  output logic         div_by_zero
);

  logic [M:0] s;

  always_comb begin
    if (!div) begin
      s = {1'b0, a_pow} + {1'b0, b_pow};
      if (s >= (M+1)'(N)) s = s - (M+1)'(N);
    end else begin
      if (a_pow >= b_pow) s = {1'b0, a_pow} - {1'b0, b_pow};
      else                s = {1'b0, a_pow} + (M+1)'(N) - {1'b0, b_pow};
    end
    // An exponent of N (possible only on an unreduced input) equals 0.
    if (s == (M+1)'(N)) s = '0;
    y_pow       = s[M-1:0];
    y_zero      = a_zero || b_zero;
    div_by_zero = div && b_zero;
  end

endmodule
