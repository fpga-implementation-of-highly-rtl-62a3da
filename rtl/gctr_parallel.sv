// gctr_parallel: the GCTR_K counter-mode front end with Q parallel AES lanes.
//
// Q unrolled pipelined AES-128 cores (aes_pipe) share one set of round keys.
// Every beat entering the unit travels, with its kind, block count, mode bit
// and input blocks, through a delay line as long as the AES pipelines, so it
// leaves together with its key stream ten cycles later:
//   BEAT_DATA : lane i encrypts counter block CB+i from gcm_inc; the output is
//               in_block[i] xor E_K(CB+i). The counter advances by in_count.
//   BEAT_J0   : lane 0 encrypts in_blocks[0] (J0); the counter is loaded with
//               inc32(J0) for the message's data. out_blocks[0] = E_K(J0).
//   BEAT_HKEY : lane 0 encrypts in_blocks[0] (zero); out_blocks[0] = H.
//   BEAT_AAD, BEAT_LEN : pass through unchanged, lanes idle.
// hash_blocks is what GHASH must absorb: the ciphertext, which for
// encryption is the output and for decryption is the delayed input.
//
// Timing: fixed latency of AES_ROUNDS (10) cycles, one beat per cycle, no
// back-pressure. Lanes beyond in_count are not started.
module gctr_parallel
  import aes_gcm_pkg::*;
#(
  parameter int unsigned Q              = 8,
  parameter bit          COMPOSITE_SBOX = 1'b0,  // 1: logic S-boxes
  localparam int unsigned CW             = $clog2(Q + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  block_t        round_keys [AES_ROUNDS+1],
  input  logic          in_valid,
  input  beat_kind_e    in_kind,
  input  logic [CW-1:0] in_count,
  input  logic          in_decrypt,
  input  block_t        in_blocks [Q],
  output logic          out_valid,
  output beat_kind_e    out_kind,
  output logic [CW-1:0] out_count,
  output block_t        out_blocks  [Q],
  output block_t        hash_blocks [Q]
);

  typedef struct packed {
    logic          valid;
    beat_kind_e    kind;
    logic [CW-1:0] count;
    logic          decrypt;
  } side_t;

  side_t  side_q [AES_ROUNDS];
  block_t data_q [AES_ROUNDS][Q];
  block_t ctr_blocks [Q];
  block_t lane_in    [Q];
  logic   lane_vld   [Q];
  block_t lane_out   [Q];
  logic   lane_ovld  [Q];

  logic is_data, is_key_beat;
  assign is_data     = in_valid && (in_kind == BEAT_DATA);
  assign is_key_beat = in_valid && (in_kind == BEAT_J0 || in_kind == BEAT_HKEY);

  gcm_inc #(.Q(Q)) u_inc (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (in_valid && in_kind == BEAT_J0),
    .load_value(inc32(in_blocks[0], 32'd1)),
    .advance   (is_data),
    .advance_by(in_count),
    .ctr_blocks(ctr_blocks)
  );

  always_comb begin
    for (int i = 0; i < int'(Q); i++) begin
      if (i == 0 && is_key_beat) begin
        lane_in[i]  = in_blocks[0];
        lane_vld[i] = 1'b1;
      end else begin
        lane_in[i]  = ctr_blocks[i];
        lane_vld[i] = is_data && (i < int'(in_count));
      end
    end
  end

  for (genvar i = 0; i < Q; i++) begin : g_lane
    aes_pipe #(.COMPOSITE_SBOX(COMPOSITE_SBOX)) u_aes (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (lane_vld[i]),
      .in_block  (lane_in[i]),
      .round_keys(round_keys),
      .out_valid (lane_ovld[i]),
      .out_block (lane_out[i])
    );
  end

  // Delay line matching the AES latency.
  always_ff @(posedge clk) begin
    for (int s = 0; s < int'(AES_ROUNDS); s++) begin
      if (s == 0) begin
        side_q[0] <= '{valid: in_valid, kind: in_kind, count: in_count,
                       decrypt: in_decrypt};
        for (int i = 0; i < int'(Q); i++) data_q[0][i] <= in_blocks[i];
      end else begin
        side_q[s] <= side_q[s-1];
        for (int i = 0; i < int'(Q); i++) data_q[s][i] <= data_q[s-1][i];
      end
    end
    if (!rst_n)
      for (int s = 0; s < int'(AES_ROUNDS); s++) side_q[s].valid <= 1'b0;
  end

  side_t last;
  assign last      = side_q[AES_ROUNDS-1];
  assign out_valid = last.valid;
  assign out_kind  = last.kind;
  assign out_count = last.count;

  always_comb begin
    for (int i = 0; i < int'(Q); i++) begin
      unique case (last.kind)
        BEAT_DATA:           out_blocks[i] = data_q[AES_ROUNDS-1][i] ^ lane_out[i];
        BEAT_J0, BEAT_HKEY:  out_blocks[i] = (i == 0) ? lane_out[0] : '0;
        default:             out_blocks[i] = data_q[AES_ROUNDS-1][i];
      endcase
      hash_blocks[i] = (last.kind == BEAT_DATA && !last.decrypt)
                       ? out_blocks[i] : data_q[AES_ROUNDS-1][i];
    end
  end

  // Each lane's own valid bit must agree with the delay line's record of
  // which lanes the beat used.
  for (genvar i = 0; i < Q; i++) begin : g_chk
    a_lane_in_step: assert property (@(posedge clk) disable iff (!rst_n)
      lane_ovld[i] == (last.valid &&
                       ((last.kind == BEAT_DATA && i < int'(last.count)) ||
                        (i == 0 && (last.kind == BEAT_J0 || last.kind == BEAT_HKEY)))));
  end

endmodule
