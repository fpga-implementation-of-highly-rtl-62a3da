// gf2_polymul: carry-less (GF(2)[x]) multiplication of two N-bit polynomials,
// giving a (2N-1)-bit product. Bit i holds the coefficient of x^i.
//
// With STEPS = 0 the product is formed bit-parallel: every partial product
// a_i b_j is ANDed and XORed into coefficient i+j, written as N shifted
// rows (quadratic gate count, shortest delay). With STEPS > 0 one
// Karatsuba-Ofman step is applied and the three half-size products are built by recursive instances with STEPS-1:
//   a = a1 x^h + a0,  b = b1 x^h + b0,
//   a b = a1b1 x^2h + ((a0+a1)(b0+b1) + a0b0 + a1b1) x^h + a0b0.
// STEPS = i corresponds to the KOi multiplier family. N must be divisible
// by 2^STEPS. Purely combinational.
module gf2_polymul #(
  parameter int unsigned N     = 128,
  parameter int unsigned STEPS = 0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] c
);

  if (STEPS == 0 || N < 2 || (N % 2) != 0) begin : g_school
    // Row i is b shifted up by i, gated by a_i; the rows are XORed.
    always_comb begin
      c = '0;
      for (int i = 0; i < int'(N); i++)
        c ^= {(2*N-1){a[i]}} & ((2*N-1)'(b) << i);
    end
  end else begin : g_karatsuba
    localparam int unsigned H = N / 2;
    logic [2*H-2:0] lo, hi, mid;
    logic [2*N-2:0] acc;

    gf2_polymul #(.N(H), .STEPS(STEPS-1)) u_lo
      (.a(a[H-1:0]), .b(b[H-1:0]), .c(lo));
    gf2_polymul #(.N(H), .STEPS(STEPS-1)) u_hi
      (.a(a[N-1:H]), .b(b[N-1:H]), .c(hi));
    gf2_polymul #(.N(H), .STEPS(STEPS-1)) u_mid
      (.a(a[H-1:0] ^ a[N-1:H]), .b(b[H-1:0] ^ b[N-1:H]), .c(mid));

    always_comb begin
      acc = '0;
      acc[2*H-2:0]     ^= lo;
      acc[2*N-2:2*H]   ^= hi;
      acc[H +: 2*H-1]  ^= mid ^ lo ^ hi;
    end
    assign c = acc;
  end

endmodule
