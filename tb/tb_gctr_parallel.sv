// tb_gctr_parallel: drives the counter-mode front end with a hash-key beat,
// a J0 beat, AAD and data beats of varying width, in encrypt and decrypt
// mode, and checks each output beat, its kind and count, the hash blocks
// and the 10-cycle latency against the reference AES.
module tb_gctr_parallel;
  import gcm_ref_pkg::*;
  import aes_gcm_pkg::*;
  localparam int Q = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, in_decrypt = 0, out_valid;
  beat_kind_e in_kind, out_kind;
  logic [3:0] in_count, out_count;
  blk_t in_blocks [Q];
  blk_t out_blocks [Q];
  blk_t hash_blocks [Q];
  blk_t rk [AES_ROUNDS+1];
  blk_t key;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct {
    beat_kind_e kind;
    int         count;
    blk_t       out [Q];
    blk_t       hsh [Q];
    int         t;
  } exp_t;
  exp_t exp_q[$];

  gctr_parallel #(.Q(Q)) dut (.clk, .rst_n, .round_keys(rk), .in_valid, .in_kind, .in_count,
    .in_decrypt, .in_blocks, .out_valid, .out_kind, .out_count, .out_blocks, .hash_blocks);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (exp_q.size() == 0) begin failures++; checks++; $display("FAIL unexpected beat"); end
    else begin
      e = exp_q.pop_front();
      checks += 2;
      if (out_kind != e.kind || int'(out_count) != e.count) begin
        failures++; $display("FAIL kind/count %0d/%0d", out_kind, out_count);
      end
      if (cycle - e.t != 10) begin failures++; $display("FAIL latency %0d", cycle - e.t); end
      for (int i = 0; i < e.count; i++) begin
        checks += 2;
        if (out_blocks[i] !== e.out[i]) begin
          failures++; $display("FAIL kind %0d lane %0d out %h exp %h", e.kind, i, out_blocks[i], e.out[i]);
        end
        if (e.kind inside {BEAT_DATA, BEAT_AAD} && hash_blocks[i] !== e.hsh[i]) begin
          failures++; $display("FAIL lane %0d hash %h exp %h", i, hash_blocks[i], e.hsh[i]);
        end
      end
    end
  end

  blk_t cb;

  task automatic send(input beat_kind_e k, input int c, input bit dec);
    exp_t e;
    @(negedge clk);
    in_valid = 1; in_kind = k; in_count = 4'(c); in_decrypt = dec;
    for (int i = 0; i < Q; i++) in_blocks[i] = {$urandom, $urandom, $urandom, $urandom};
    if (k == BEAT_HKEY) in_blocks[0] = '0;
    e.kind = k; e.count = c; e.t = cycle;
    for (int i = 0; i < c; i++) begin
      case (k)
        BEAT_HKEY, BEAT_J0: e.out[i] = aes_encrypt(key, in_blocks[0]);
        BEAT_DATA: begin
          cb[31:0] = cb[31:0] + 1;
          e.out[i] = in_blocks[i] ^ aes_encrypt(key, cb);
        end
        default: e.out[i] = in_blocks[i];
      endcase
      e.hsh[i] = (k == BEAT_DATA && !dec) ? e.out[i] : in_blocks[i];
    end
    if (k == BEAT_J0) cb = in_blocks[0];
    exp_q.push_back(e);
  endtask

  initial begin
    key = {$urandom, $urandom, $urandom, $urandom};
    key_schedule(key, rk);
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(BEAT_HKEY, 1, 0);
    for (int m = 0; m < 4; m++) begin
      bit dec = m[0];
      send(BEAT_J0, 1, dec);
      send(BEAT_AAD, 1 + $urandom % Q, dec);
      for (int n = 0; n < 6; n++) send(BEAT_DATA, (n % 2) ? Q : 1 + $urandom % Q, dec);
      send(BEAT_LEN, 1, dec);
      @(negedge clk); in_valid = 0;
    end
    @(negedge clk); in_valid = 0;
    repeat (14) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d beats missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
