// aes_key_expand: AES-128 key schedule, one round key per clock cycle.
//
// A pulse on start loads the cipher key as round key 0; in each of the next
// ten cycles the next round key is derived from the previous one
// (RotWord, SubWord through four S-boxes, XOR with Rcon, then the chained
// word XORs) and stored. ready rises once all eleven keys are held and stays
// high until the next start. The round keys are held in registers and shared
// by every AES lane, since all lanes of the engine use the same key.
//
// Timing: start in cycle t, ready high from cycle t+11 (ten derivation
// cycles after the load). round_keys[i] is valid while ready is high.
module aes_key_expand
  import aes_gcm_pkg::*;
#(
  parameter bit COMPOSITE_SBOX = 1'b0   // 1: logic S-boxes instead of tables
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  output block_t round_keys [AES_ROUNDS+1],
  output logic   ready
);

  logic [3:0] idx;      // index of the next round key to derive (1..10)
  logic       busy;
  logic [7:0] rcon;
  block_t     prev, next;
  logic [31:0] rot, subw;

  assign prev = round_keys[idx-4'd1];
  assign rot  = {prev[23:0], prev[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    if (COMPOSITE_SBOX) begin : g_gates
      aes_sbox_composite u_sbox (.in_byte(rot[8*b +: 8]), .out_byte(subw[8*b +: 8]));
    end else begin : g_lut
      aes_sbox u_sbox (.in_byte(rot[8*b +: 8]), .out_byte(subw[8*b +: 8]));
    end
  end

  always_comb begin
    logic [31:0] w0, w1, w2, w3;
    w0 = prev[127:96] ^ subw ^ {rcon, 24'h0};
    w1 = prev[95:64] ^ w0;
    w2 = prev[63:32] ^ w1;
    w3 = prev[31:0]  ^ w2;
    next = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      idx   <= 4'd1;
      rcon  <= 8'h01;
      for (int i = 0; i <= AES_ROUNDS; i++) round_keys[i] <= '0;
    end else if (start) begin
      round_keys[0] <= key;
      busy          <= 1'b1;
      ready         <= 1'b0;
      idx           <= 4'd1;
      rcon          <= 8'h01;
    end else if (busy) begin
      round_keys[idx] <= next;
      rcon            <= xtime(rcon);
      if (idx == 4'(AES_ROUNDS)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end else begin
        idx <= idx + 4'd1;
      end
    end
  end

endmodule
