// tb_gcm_inc: loads counter blocks (including one whose low word is about to
// wrap), advances by varying block counts and checks all Q counter blocks
// against an independent model of inc32.
module tb_gcm_inc;
  import gcm_ref_pkg::*;
  localparam int Q = 8;
  logic clk = 0, rst_n = 0, load = 0, advance = 0;
  blk_t load_value;
  logic [3:0] advance_by;
  blk_t ctr_blocks [Q];
  blk_t model;
  int checks = 0, failures = 0;

  gcm_inc #(.Q(Q)) dut (.clk, .rst_n, .load, .load_value, .advance, .advance_by, .ctr_blocks);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < Q; i++) begin
      blk_t e = model;
      e[31:0] = model[31:0] + 32'(i);
      checks++;
      if (ctr_blocks[i] !== e) begin
        failures++; $display("FAIL lane %0d got %h exp %h", i, ctr_blocks[i], e);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      @(negedge clk);
      load = 1;
      load_value = {$urandom, $urandom, $urandom, (m == 1) ? 32'hffff_fffa : $urandom};
      @(negedge clk);
      load = 0; model = load_value;
      compare();
      for (int n = 0; n < 30; n++) begin
        advance = ($urandom % 4) != 0;
        advance_by = 4'(1 + $urandom % Q);
        if (n % 3 == 0) advance_by = 4'(Q);
        @(negedge clk);
        if (advance) model[31:0] = model[31:0] + 32'(advance_by);
        advance = 0;
        compare();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
