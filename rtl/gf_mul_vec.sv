// gf_mul_vec: multiplication of two GF(2^M) elements in binary-vector form.
//
// The classical shift-and-add method: the product is built from the most
// significant bit of b down, shifting the partial result by one position and
// subtracting (XORing) the primitive polynomial whenever a bit reaches
// position M, and adding a for every set bit of b. For alpha^10 * alpha^11 in
// GF(2^4): 0111 * 1110 mod 10011 = 1100. Purely combinational.
//
// The binary-vector multiplication modulo the primitive polynomial follows
// the source design; it is used here by the error-locator and Chien-search
// blocks, whose operands are binary vectors.
module gf_mul_vec #(
  parameter int unsigned M    = bch_pkg::GF_M,
  parameter int unsigned PRIM = bch_pkg::GF_PRIM
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);

  always_comb begin
    logic [M:0] r;
    r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = {r[M-1:0], 1'b0};
      if (r[M]) r = r ^ PRIM[M:0];
      if (b[i]) r = r ^ {1'b0, a};
    end
    y = r[M-1:0];
  end

endmodule
