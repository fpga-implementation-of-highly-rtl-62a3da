// tb_aes_sbox: checks all 256 S-box entries against the reference model
// (brute-force inverse plus affine map) and two published values.
module tb_aes_sbox;
  import gcm_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(din), .out_byte(dout));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int x = 0; x < 256; x++) begin
      din = 8'(x);
      #1;
      check(dout, sbox_t[x], $sformatf("sbox(%02h)", x));
    end
    din = 8'h00; #1; check(dout, 8'h63, "sbox(00) published");
    din = 8'h53; #1; check(dout, 8'hed, "sbox(53) published");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
