// ghash_parallel: GHASH_H absorbing up to Q blocks per clock cycle.
//
// For a beat of r valid blocks B_1..B_r (lanes 0..r-1) the accumulator is
// updated as
//   Y <- (Y xor B_1) H^r  xor  B_2 H^(r-1)  xor ...  xor  B_r H,
// which equals r steps of the serial rule Y <- (Y xor B) H. The Q
// multiply-add lanes work side by side, each multiplier taking its power of
// H from h_powers; lane j of an r-block beat uses H^(r-j). A full beat
// (r = Q) uses H^Q .. H^1. Partial beats (r < Q) only change which power
// each lane takes, so any message length is handled without extra cycles.
//
// Interface: clear zeroes Y (a beat in the same cycle is absorbed into the
// zeroed value); in_valid with in_count (1..Q) and in_blocks absorbs a beat
// at the clock edge. y is the registered accumulator. h_powers[i] = H^(i+1)
// must be stable while beats arrive.
module ghash_parallel
  import aes_gcm_pkg::*;
#(
  parameter int unsigned Q        = 8,
  parameter int unsigned KO_STEPS = 0,
  localparam int unsigned CW      = $clog2(Q + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic [CW-1:0] in_count,
  input  block_t        in_blocks [Q],
  input  block_t        h_powers  [Q],
  output block_t        y
);

  block_t base;
  block_t opnd [Q];
  block_t pwr  [Q];
  block_t prod [Q];
  block_t y_next;

  assign base = clear ? '0 : y;

  always_comb begin
    for (int j = 0; j < int'(Q); j++) begin
      if (j < int'(in_count)) begin
        opnd[j] = (j == 0) ? (base ^ in_blocks[0]) : in_blocks[j];
        pwr[j]  = h_powers[int'(in_count) - 1 - j];
      end else begin
        opnd[j] = '0;
        pwr[j]  = '0;
      end
    end
  end

  for (genvar j = 0; j < Q; j++) begin : g_lane
    gf128_mul #(.KO_STEPS(KO_STEPS)) u_mul (.a(opnd[j]), .b(pwr[j]), .p(prod[j]));
  end

  always_comb begin
    y_next = '0;
    for (int j = 0; j < int'(Q); j++) y_next ^= prod[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        y <= '0;
    else if (in_valid) y <= y_next;
    else if (clear)    y <= '0;
  end

endmodule
