// hash_key_powers: derives H^1 .. H^Q from the hash subkey H.
//
// Powers of the form H^(2^j) come from gf128_pow2 XOR networks directly from
// H (no multiplier). Every other power H^k is one multiplication
// H^(2^m) * H^(k-2^m), with 2^m the largest power of two below k; this uses
// the fewest GF(2^128) multipliers (Q - log2(Q) - 1, i.e. four for Q = 8:
// H^3, H^5, H^6, H^7). The power registers are updated every cycle from the
// registered values of the previous cycle, so a power whose exponent has p
// one-bits is correct after p cycles.
//
// Timing: start (with h) in cycle t; ready rises at t + DEPTH + 1, where DEPTH
// is the largest number of one-bits among 1..Q (3 for Q = 8). h need only be
// valid in the start cycle. Q must be a power of two.
module hash_key_powers
  import aes_gcm_pkg::*;
#(
  parameter int unsigned Q        = 8,
  parameter int unsigned KO_STEPS = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t h,
  output block_t powers [Q],   // powers[i] = H^(i+1)
  output logic   ready
);

  function automatic int unsigned ones(input int unsigned v);
    int unsigned n = 0;
    for (int i = 0; i < 32; i++) n += (v >> i) & 1;
    return n;
  endfunction

  function automatic int unsigned max_ones(input int unsigned q);
    int unsigned m = 0;
    for (int unsigned k = 1; k <= q; k++) if (ones(k) > m) m = ones(k);
    return m;
  endfunction

  function automatic int unsigned top_pow2(input int unsigned k);
    int unsigned p = 1;
    while (2 * p <= k) p = 2 * p;
    return p;
  endfunction

  localparam int unsigned DEPTH = max_ones(Q);

  block_t h_q;                 // H captured at start
  block_t pw_d [Q];
  logic [3:0] cnt;
  logic       busy;

  for (genvar k = 1; k <= Q; k++) begin : g_pow
    if (ones(k) == 1) begin : g_sq
      if (k == 1) begin : g_one
        assign pw_d[0] = h_q;
      end else begin : g_pw2
        gf128_pow2 #(.J($clog2(k))) u_pow2 (.h(h_q), .h_pow(pw_d[k-1]));
      end
    end else begin : g_mul
      localparam int unsigned P = top_pow2(k);
      gf128_mul #(.KO_STEPS(KO_STEPS)) u_mul (
        .a(powers[P-1]), .b(powers[k-P-1]), .p(pw_d[k-1]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_q   <= '0;
      busy  <= 1'b0;
      ready <= 1'b0;
      cnt   <= '0;
      for (int i = 0; i < int'(Q); i++) powers[i] <= '0;
    end else begin
      for (int i = 0; i < int'(Q); i++) powers[i] <= pw_d[i];
      if (start) begin
        h_q   <= h;
        busy  <= 1'b1;
        ready <= 1'b0;
        cnt   <= '0;
      end else if (busy) begin
        if (cnt == 4'(DEPTH)) begin
          busy  <= 1'b0;
          ready <= 1'b1;
        end else begin
          cnt <= cnt + 4'd1;
        end
      end
    end
  end

endmodule
