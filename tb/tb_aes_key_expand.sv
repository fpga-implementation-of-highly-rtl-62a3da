// tb_aes_key_expand: loads keys, checks that ready rises exactly 11 cycles
// after start and that all eleven round keys match the reference schedule
// (and the published last round key of the FIPS-197 example key).
module tb_aes_key_expand;
  import gcm_ref_pkg::*;
  import aes_gcm_pkg::AES_ROUNDS;
  logic clk = 0, rst_n = 0, start = 0;
  blk_t key;
  blk_t rk [AES_ROUNDS+1];
  logic ready;
  int checks = 0, failures = 0;

  aes_key_expand dut (.clk, .rst_n, .start, .key, .round_keys(rk), .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input blk_t k);
    blk_t exp [11];
    int   cyc = 0;
    key_schedule(k, exp);
    @(negedge clk); key = k; start = 1;
    @(negedge clk); start = 0; key = '1;  // key need only be valid with start
    cyc = 1;
    while (!ready && cyc < 50) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 11) begin failures++; $display("FAIL latency %0d", cyc); end
    for (int i = 0; i <= 10; i++) begin
      checks++;
      if (rk[i] !== exp[i]) begin
        failures++;
        $display("FAIL rk[%0d] got %h expected %h", i, rk[i], exp[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL published rk10 %h", rk[10]);
    end
    for (int n = 0; n < 10; n++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
