// aes_sbox_composite: the AES S-box in logic gates, using composite-field
// arithmetic instead of a lookup table.
//
// The byte is mapped by a constant 8x8 binary matrix (XOR gates) into
// GF((2^4)^2), where an element is hi*y + lo with hi, lo in GF(2^4). Its
// inverse there needs only one inversion in the 16-element subfield:
//   D   = hi^2 * LAMBDA + hi*lo + lo^2
//   inv = (hi * D^-1) * y + ((hi + lo) * D^-1)
// The GF(2^4) inverse is a 4-input, 4-output function written as the power
// D^14. The result is mapped back with the inverse matrix and passed through
// the AES affine transform. Zero maps to zero, as AES requires.
//
// Building the S-box from subfield inversion in GF(2^4) follows the design,
// which uses this form where gate count matters. The field polynomials,
// LAMBDA and the isomorphism are this design's choice; they are chosen at
// elaboration in aes_gcm_pkg. Combinational, in_byte -> out_byte.
module aes_sbox_composite
  import aes_gcm_pkg::*;
(
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  function automatic logic [3:0] gf4_inv(input logic [3:0] d);
    logic [3:0] d2, d4, d8;
    d2 = gf4_mul(d, d);
    d4 = gf4_mul(d2, d2);
    d8 = gf4_mul(d4, d4);
    return gf4_mul(gf4_mul(d8, d4), d2);   // d^14 = d^-1, 0 -> 0
  endfunction

  logic [7:0] c, ci;
  logic [3:0] hi, lo, delta, dinv;

  assign c  = mat_apply(COMP_MAP_FWD, in_byte);
  assign hi = c[7:4];
  assign lo = c[3:0];

  assign delta = gf4_mul(gf4_mul(hi, hi), COMP_LAMBDA) ^ gf4_mul(hi, lo) ^ gf4_mul(lo, lo);
  assign dinv  = gf4_inv(delta);
  assign ci    = {gf4_mul(hi, dinv), gf4_mul(hi ^ lo, dinv)};

  assign out_byte = sbox_affine(mat_apply(COMP_MAP_INV, ci));

endmodule
