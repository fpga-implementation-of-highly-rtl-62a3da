// aes_gcm_top: AES-128-GCM authenticated encryption/decryption engine that
// processes Q (= 8) 128-bit blocks per clock cycle.
//
// Structure. Q unrolled, pipelined AES-128 cores run in counter mode
// (gctr_parallel, ten-cycle latency, one beat of Q blocks per cycle) and feed
// a GHASH unit with Q parallel GF(2^128) multiply-add lanes
// (ghash_parallel), which absorbs a whole beat per cycle using the powers
// H^1..H^Q of the hash subkey. Those powers come from hash_key_powers
// (squarings for H^2, H^4, H^8, four multipliers for the rest). One shared
// key schedule (aes_key_expand) serves all lanes.
//
// Everything that GHASH needs - AAD, the length block, J0 and the zero block
// that yields H - is sent through the same ten-cycle pipeline as the data,
// tagged with its kind, so GHASH sees every block in message order without
// any reordering logic.
//
// Operation.
//  1. key_load with key: the key schedule runs (11 cycles), then the zero
//     block is encrypted (10 cycles) to give H, then H^1..H^Q are formed
//     (4 cycles). key_ready then rises; in_ready is low until then.
//  2. msg_start with iv (96 bits) and decrypt, accepted when in_ready: issues
//     the J0 = iv || 0^31 || 1 beat. Do not assert in_valid in that cycle.
//  3. Beats (in_valid && in_ready): in_aad = 1 for AAD beats, which must
//     come before the data beats; in_count (1..Q) valid blocks in lanes
//     0..in_count-1; in_last on the final beat of the message (it may be an
//     AAD beat when there is no data). A beat with in_count = 0 carries no
//     blocks; it is how a message with no AAD and no data is ended. Only
//     whole 128-bit blocks are handled.
//  4. In the cycle after the last beat in_ready is low while the unit
//     inserts the len(A) || len(C) block (in bits).
//  5. Data beats come out on out_valid/out_count/out_blocks ten cycles after
//     they went in: ciphertext when encrypting, plaintext when decrypting.
//     tag_valid pulses with the 128-bit tag eleven cycles after the length
//     block was inserted. When decrypting the caller compares the tag.
// Parameters: Q lanes (8), KO_STEPS (0 = bit-parallel GF(2^128)
// multipliers, i = Karatsuba-Ofman KOi), COMPOSITE_SBOX (0 = lookup-table
// S-boxes, suited to FPGAs; 1 = composite-field logic S-boxes).
//
// Messages may follow each other back to back; the key must not change while
// one is in flight.
module aes_gcm_top
  import aes_gcm_pkg::*;
#(
  parameter int unsigned Q        = 8,
  parameter int unsigned KO_STEPS = 0,
  parameter bit COMPOSITE_SBOX    = 1'b0,
  localparam int unsigned CW      = $clog2(Q + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // key
  input  logic          key_load,
  input  block_t        key,
  output logic          key_ready,
  // message input
  input  logic          msg_start,
  input  logic [95:0]   iv,
  input  logic          decrypt,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_aad,
  input  logic [CW-1:0] in_count,
  input  logic          in_last,
  input  block_t        in_blocks [Q],
  // results
  output logic          out_valid,
  output logic [CW-1:0] out_count,
  output block_t        out_blocks [Q],
  output logic          tag_valid,
  output block_t        tag
);

  typedef enum logic [2:0] {
    S_IDLE, S_KEYEXP, S_HKEY, S_HWAIT, S_POWERS, S_READY
  } state_e;

  state_e state;

  block_t round_keys [AES_ROUNDS+1];
  logic   rk_ready;

  // Input-side sequencing
  logic          len_pending;
  logic          mode_q;          // decrypt flag of the current message
  logic [56:0]   a_blocks, c_blocks;  // lengths in blocks (x128 = bits)

  logic          g_valid;
  beat_kind_e    g_kind;
  logic [CW-1:0] g_count;
  logic          g_decrypt;
  block_t        g_blocks [Q];

  // Output side
  logic          o_valid;
  beat_kind_e    o_kind;
  logic [CW-1:0] o_count;
  block_t        o_blocks [Q];
  block_t        h_blocks [Q];
  block_t        ej0_q, y;
  block_t        h_powers [Q];
  logic          pw_start, pw_ready;

  assign in_ready  = (state == S_READY) && !len_pending;
  assign key_ready = (state == S_READY);

  aes_key_expand #(.COMPOSITE_SBOX(COMPOSITE_SBOX)) u_keys (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (key_load),
    .key       (key),
    .round_keys(round_keys),
    .ready     (rk_ready)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else if (key_load) begin
      state <= S_KEYEXP;
    end else begin
      unique case (state)
        S_IDLE:   ;
        S_KEYEXP: if (rk_ready) state <= S_HKEY;
        S_HKEY:   state <= S_HWAIT;
        S_HWAIT:  if (o_valid && o_kind == BEAT_HKEY) state <= S_POWERS;
        S_POWERS: if (pw_ready) state <= S_READY;
        S_READY:  ;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // Beat issued into the counter-mode pipeline this cycle.
  always_comb begin
    g_valid   = 1'b0;
    g_kind    = BEAT_DATA;
    g_count   = CW'(1);
    g_decrypt = mode_q;
    for (int i = 0; i < int'(Q); i++) g_blocks[i] = in_blocks[i];
    if (state == S_HKEY) begin
      g_valid = 1'b1;
      g_kind  = BEAT_HKEY;
      for (int i = 0; i < int'(Q); i++) g_blocks[i] = '0;
    end else if (state == S_READY && len_pending) begin
      g_valid = 1'b1;
      g_kind  = BEAT_LEN;
      for (int i = 0; i < int'(Q); i++) g_blocks[i] = '0;
      g_blocks[0] = {a_blocks, 7'd0, c_blocks, 7'd0};
    end else if (in_ready && msg_start) begin
      g_valid   = 1'b1;
      g_kind    = BEAT_J0;
      g_decrypt = decrypt;
      for (int i = 0; i < int'(Q); i++) g_blocks[i] = '0;
      g_blocks[0] = {iv, 32'd1};
    end else if (in_ready && in_valid) begin
      g_valid = 1'b1;
      g_kind  = in_aad ? BEAT_AAD : BEAT_DATA;
      g_count = in_count;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      len_pending <= 1'b0;
      mode_q      <= 1'b0;
      a_blocks    <= '0;
      c_blocks    <= '0;
    end else if (key_load) begin
      len_pending <= 1'b0;
    end else if (g_valid) begin
      unique case (g_kind)
        BEAT_J0: begin
          mode_q   <= decrypt;
          a_blocks <= '0;
          c_blocks <= '0;
        end
        BEAT_AAD:  a_blocks <= a_blocks + 57'(in_count);
        BEAT_DATA: c_blocks <= c_blocks + 57'(in_count);
        BEAT_LEN:  len_pending <= 1'b0;
        default: ;
      endcase
      if ((g_kind == BEAT_AAD || g_kind == BEAT_DATA) && in_last)
        len_pending <= 1'b1;
    end
  end

  gctr_parallel #(.Q(Q), .COMPOSITE_SBOX(COMPOSITE_SBOX)) u_gctr (
    .clk        (clk),
    .rst_n      (rst_n),
    .round_keys (round_keys),
    .in_valid   (g_valid),
    .in_kind    (g_kind),
    .in_count   (g_count),
    .in_decrypt (g_decrypt),
    .in_blocks  (g_blocks),
    .out_valid  (o_valid),
    .out_kind   (o_kind),
    .out_count  (o_count),
    .out_blocks (o_blocks),
    .hash_blocks(h_blocks)
  );

  // Hash subkey H = E_K(0) starts the derivation of its powers.
  assign pw_start = o_valid && o_kind == BEAT_HKEY;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ej0_q <= '0;
    end else if (o_valid && o_kind == BEAT_J0) begin
      ej0_q <= o_blocks[0];
    end
  end

  hash_key_powers #(.Q(Q), .KO_STEPS(KO_STEPS)) u_powers (
    .clk   (clk),
    .rst_n (rst_n),
    .start (pw_start),
    .h     (o_blocks[0]),
    .powers(h_powers),
    .ready (pw_ready)
  );

  ghash_parallel #(.Q(Q), .KO_STEPS(KO_STEPS)) u_ghash (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (o_valid && o_kind == BEAT_J0),
    .in_valid (o_valid && o_count != '0 &&
               (o_kind == BEAT_AAD || o_kind == BEAT_DATA || o_kind == BEAT_LEN)),
    .in_count (o_count),
    .in_blocks(h_blocks),
    .h_powers (h_powers),
    .y        (y)
  );

  // Results
  always_ff @(posedge clk) begin
    if (!rst_n) tag_valid <= 1'b0;
    else        tag_valid <= o_valid && o_kind == BEAT_LEN;
  end
  assign tag = y ^ ej0_q;

  assign out_valid  = o_valid && o_kind == BEAT_DATA && o_count != '0;
  assign out_count  = o_count;
  assign out_blocks = o_blocks;

  // Handshake rules
  a_no_start_with_beat: assert property (@(posedge clk) disable iff (!rst_n)
    !(msg_start && in_valid && in_ready));
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready && !msg_start) |-> (in_count <= CW'(Q)) && (in_count != '0 || in_last));

endmodule
