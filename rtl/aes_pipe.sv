// aes_pipe: fully unrolled, pipelined AES-128 encryption.
//
// The ten rounds are laid out one after another with a pipeline register
// after each round. The initial AddRoundKey is folded into the first stage,
// and the tenth round omits MixColumns. A new block can enter every cycle;
// its ciphertext leaves ten cycles later, so after the first ten cycles one
// result is delivered per cycle. A valid bit travels with each block.
//
// Interface: in_valid/in_block in, out_valid/out_block out after exactly
// AES_ROUNDS (10) clock cycles; round_keys must stay stable while blocks are
// in flight. The pipeline has no back-pressure.
module aes_pipe
  import aes_gcm_pkg::*;
#(
  parameter bit COMPOSITE_SBOX = 1'b0   // 1: logic S-boxes instead of tables
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_block,
  input  block_t round_keys [AES_ROUNDS+1],
  output logic   out_valid,
  output block_t out_block
);

  block_t stage_q [AES_ROUNDS+1];   // stage_q[0] is the combinational input
  block_t stage_d [1:AES_ROUNDS];
  logic   vld_q   [1:AES_ROUNDS];

  assign stage_q[0] = in_block ^ round_keys[0];

  for (genvar r = 1; r <= AES_ROUNDS; r++) begin : g_round
    aes_round #(.LAST(r == AES_ROUNDS), .COMPOSITE_SBOX(COMPOSITE_SBOX)) u_round (
      .state_in (stage_q[r-1]),
      .round_key(round_keys[r]),
      .state_out(stage_d[r])
    );

    always_ff @(posedge clk) begin
      stage_q[r] <= stage_d[r];
      if (!rst_n) vld_q[r] <= 1'b0;
      else        vld_q[r] <= (r == 1) ? in_valid : vld_q[r-1];
    end
  end

  assign out_valid = vld_q[AES_ROUNDS];
  assign out_block = stage_q[AES_ROUNDS];

endmodule
