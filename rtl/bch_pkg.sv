// bch_pkg: constants and helper functions shared by the BCH(n,k,t) blocks.
//
// The default field is GF(2^8) built on the primitive polynomial
// x^8 + x^4 + x^3 + x^2 + 1 (0x11D); the default code protects a 128-bit
// identifier against up to 10 bit errors. The field order, the 128-bit
// identifier and the 10-error limit follow the source design; the choice of
// 0x11D is this design's own, picked because it reproduces the
// sequence of example elements quoted for that design (as alpha^126,
// alpha^127, alpha^129, alpha^130 = 0x66, 0xCC, 0x17, 0x2E).
package bch_pkg;

  // Field order m of GF(2^m).
  localparam int unsigned GF_M     = 8;
  // Primitive polynomial including the x^m term.
  localparam int unsigned GF_PRIM  = 'h11D;
  // Correctable errors.
  localparam int unsigned BCH_T    = 10;
  // Message (identifier) length in bits.
  localparam int unsigned BCH_K    = 128;

  // Number of non-zero field elements, 2^m - 1.
  function automatic int unsigned gf_n(input int unsigned m);
    return (1 << m) - 1;
  endfunction


endpackage
