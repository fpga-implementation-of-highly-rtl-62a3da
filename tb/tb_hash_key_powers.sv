// tb_hash_key_powers: starts the power derivation for random hash subkeys,
// checks that ready rises 4 cycles after start (three multiplier levels plus
// the capture of H) and that powers[i] = H^(i+1) for i = 0..7.
module tb_hash_key_powers;
  import gcm_ref_pkg::*;
  localparam int Q = 8;
  logic clk = 0, rst_n = 0, start = 0, ready;
  blk_t h;
  blk_t powers [Q];
  int checks = 0, failures = 0;

  hash_key_powers #(.Q(Q)) dut (.clk, .rst_n, .start, .h, .powers, .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      blk_t hv, e;
      int cyc;
      hv = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); start = 1; h = hv;
      @(negedge clk); start = 0; h = '0;
      cyc = 1;
      while (!ready && cyc < 40) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 5) begin failures++; $display("FAIL ready after %0d cycles", cyc); end
      e = hv;
      for (int i = 0; i < Q; i++) begin
        checks++;
        if (powers[i] !== e) begin
          failures++; $display("FAIL H^%0d got %h exp %h", i + 1, powers[i], e);
        end
        e = gmul(e, hv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
