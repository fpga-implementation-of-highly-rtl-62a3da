// tb_ghash_parallel: feeds random sequences of beats with 1..8 blocks each
// (full and partial beats, idle cycles, clear) and compares the accumulator
// with the serial GHASH of the same blocks after every beat.
module tb_ghash_parallel;
  import gcm_ref_pkg::*;
  localparam int Q = 8;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [3:0] in_count;
  blk_t in_blocks [Q];
  blk_t h_powers  [Q];
  blk_t y, h;
  blk_q_t seen;
  int checks = 0, failures = 0, partial = 0, full = 0;

  ghash_parallel #(.Q(Q)) dut (.clk, .rst_n, .clear, .in_valid, .in_count, .in_blocks, .h_powers, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      h = {$urandom, $urandom, $urandom, $urandom};
      h_powers[0] = h;
      for (int i = 1; i < Q; i++) h_powers[i] = gmul(h_powers[i-1], h);
      @(negedge clk); clear = 1; in_valid = 0;
      @(negedge clk); clear = 0;
      seen.delete();
      checks++;
      if (y !== '0) begin failures++; $display("FAIL clear"); end
      for (int n = 0; n < 25; n++) begin
        int c;
        c = (n % 4 == 0) ? Q : 1 + $urandom % Q;
        if (c == Q) full++; else partial++;
        in_valid = 1; in_count = 4'(c);
        for (int i = 0; i < Q; i++) begin
          in_blocks[i] = {$urandom, $urandom, $urandom, $urandom};
          if (i < c) seen.push_back(in_blocks[i]);
        end
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (y !== ghash(h, seen)) begin
          failures++; $display("FAIL after %0d blocks got %h", seen.size(), y);
        end
        if (n % 7 == 3) @(negedge clk);
      end
    end
    checks++;
    if (partial == 0 || full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
