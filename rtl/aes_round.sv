// aes_round: one AES encryption round, combinational.
//
// SubBytes (16 lookup-table S-boxes), ShiftRows (row r of the state rotated
// left by r bytes), MixColumns (each column multiplied by the fixed
// polynomial {03}x^3 + {01}x^2 + {01}x + {02}) and AddRoundKey (XOR with the
// round key). With LAST = 1 the MixColumns step is left out, as the AES final
// round requires. COMPOSITE_SBOX = 0 uses lookup-table S-boxes (aes_sbox),
// 1 the composite-field logic S-boxes (aes_sbox_composite). The pipeline
// registers live in aes_pipe, not here.
//
// Interface: state_in and round_key in, state_out out; byte 0 of the state
// is bits [127:120], bytes run down columns.
module aes_round
  import aes_gcm_pkg::*;
#(
  parameter bit LAST           = 1'b0,
  parameter bit COMPOSITE_SBOX = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  logic [15:0][7:0] sb;   // sb[15-k] is state byte k (packed order)
  logic [7:0]       sub [16];
  logic [7:0]       shf [16];
  logic [7:0]       mix [16];
  block_t           pre_key;

  assign sb = state_in;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    if (COMPOSITE_SBOX) begin : g_gates
      aes_sbox_composite u_sbox (.in_byte(sb[15-k]), .out_byte(sub[k]));
    end else begin : g_lut
      aes_sbox u_sbox (.in_byte(sb[15-k]), .out_byte(sub[k]));
    end
  end

  always_comb begin
    // ShiftRows: out(r, c) = in(r, (c + r) mod 4)
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shf[4*c+r] = sub[4*((c+r)%4)+r];
    // MixColumns
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = shf[4*c]; a1 = shf[4*c+1]; a2 = shf[4*c+2]; a3 = shf[4*c+3];
      mix[4*c]   = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      mix[4*c+1] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      mix[4*c+2] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      mix[4*c+3] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    for (int k = 0; k < 16; k++)
      pre_key[127-8*k -: 8] = LAST ? shf[k] : mix[k];
  end

  assign state_out = pre_key ^ round_key;

endmodule
