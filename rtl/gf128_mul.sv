// gf128_mul: multiplication in GF(2^128) as GHASH defines it.
//
// Operands use the GCM bit order (bit [127] is the coefficient of x^0), so
// they are first bit-reversed into ordinary polynomial order, multiplied
// carry-less by gf2_polymul, and the 255-bit product is reduced modulo
// x^128 + x^7 + x^2 + x + 1 by folding each coefficient of degree >= 128 back
// with x^128 = x^7 + x^2 + x + 1. The result is reversed back.
//
// KO_STEPS selects the multiplier: 0 is the bit-parallel multiplier of
// quadratic complexity (the default, as used for the q = 8 engine), 1..6
// apply that many Karatsuba-Ofman steps (KO1..KO6), trading gates for delay.
// Purely combinational, no clock.
module gf128_mul
  import aes_gcm_pkg::*;
#(
  parameter int unsigned KO_STEPS = 0
) (
  input  block_t a,
  input  block_t b,
  output block_t p
);

  logic [127:0] pa, pb;
  logic [254:0] prod;

  for (genvar i = 0; i < 128; i++) begin : g_rev
    assign pa[i] = a[127-i];
    assign pb[i] = b[127-i];
  end

  gf2_polymul #(.N(128), .STEPS(KO_STEPS)) u_mul (.a(pa), .b(pb), .c(prod));

  always_comb begin
    logic [254:0] r;
    r = prod;
    for (int i = 254; i >= 128; i--) begin
      r[i-121] ^= r[i];
      r[i-126] ^= r[i];
      r[i-127] ^= r[i];
      r[i-128] ^= r[i];
      r[i]      = 1'b0;
    end
    for (int i = 0; i < 128; i++) p[127-i] = r[i];
  end

endmodule
