// tb_aes_pipe: streams one block per cycle (with gaps) through the pipelined
// AES-128, checks every ciphertext against the reference, the published
// FIPS-197 example, and that each result appears exactly 10 cycles after
// its block went in.
module tb_aes_pipe;
  import gcm_ref_pkg::*;
  import aes_gcm_pkg::AES_ROUNDS;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  blk_t in_block, out_block, key;
  blk_t rk [AES_ROUNDS+1];
  int checks = 0, failures = 0, cycle = 0;
  blk_t exp_q[$];
  int   t_q[$];

  aes_pipe dut (.clk, .rst_n, .in_valid, .in_block, .round_keys(rk), .out_valid, .out_block);

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
    checks += 2;
    if (exp_q.size() == 0) begin failures += 2; $display("FAIL unexpected output"); end
    else begin
      blk_t e;
      int   t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      if (out_block !== e) begin failures++; $display("FAIL got %h exp %h", out_block, e); end
      if (cycle - t != 10) begin failures++; $display("FAIL latency %0d", cycle - t); end
    end
  end

  task automatic send(input blk_t b);
    @(negedge clk);
    in_valid = 1; in_block = b;
    exp_q.push_back(aes_encrypt(key, b));
    t_q.push_back(cycle);
  endtask

  initial begin
    key = 128'h000102030405060708090a0b0c0d0e0f;
    key_schedule(key, rk);
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(128'h00112233445566778899aabbccddeeff);
    @(negedge clk); in_valid = 0;
    repeat (12) @(negedge clk);
    for (int n = 0; n < 60; n++) begin
      send({$urandom, $urandom, $urandom, $urandom});
      if (n % 17 == 16) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (15) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Published example: checked separately on its own output.
  initial begin
    wait (rst_n);
    @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (!(out_valid && out_block === 128'h69c4e0d86a7b0430d8cdb78070b4c55a)) begin
      failures++; $display("FAIL FIPS-197 example %h", out_block);
    end
  end
endmodule
