// gf128_pow2: H^(2^J) in GF(2^128), built with XOR gates only.
//
// Squaring in a binary field is linear, so H^(2^J) is a fixed linear map of
// H. This module realises that map in one flat network computed directly
// from H (the "parallel" realisation), rather than as a chain of J squarers
// each feeding the next; after logic optimisation its depth does not grow
// like J full squarer delays. Combinational, GCM bit order.
module gf128_pow2
  import aes_gcm_pkg::*;
#(
  parameter int unsigned J = 1
) (
  input  block_t h,
  output block_t h_pow
);

  always_comb begin
    block_t t;
    t = h;
    for (int k = 0; k < int'(J); k++) t = gf128_sqr(t);
    h_pow = t;
  end

endmodule
