// tb_gf128_mul: compares the bit-parallel multiplier (KO_STEPS = 0) and a
// Karatsuba-Ofman variant (KO_STEPS = 4) against the bit-serial algorithm of
// the GCM specification, on random operands and special values.
module tb_gf128_mul;
  import gcm_ref_pkg::*;
  blk_t a, b, p0, p4;
  int checks = 0, failures = 0;

  gf128_mul #(.KO_STEPS(0)) dut0 (.a, .b, .p(p0));
  gf128_mul #(.KO_STEPS(4)) dut4 (.a, .b, .p(p4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      if (n == 0) a = {1'b1, 127'h0};   // the field element 1
      if (n == 1) b = 128'h1;           // x^127
      if (n == 2) begin a = '1; b = '1; end
      #1;
      checks += 2;
      if (p0 !== gmul(a, b)) begin failures++; $display("FAIL bp %h*%h=%h", a, b, p0); end
      if (p4 !== gmul(a, b)) begin failures++; $display("FAIL ko4 %h*%h=%h", a, b, p4); end
    end
    // Published GHASH subkey squared product check: H of the all-zero key.
    a = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e; b = 128'h0388dace60b6a392f328c2b971b2fe78;
    #1; checks++;
    if (p0 !== 128'h5e2ec746917062882c85b0685353deb7) begin
      failures++; $display("FAIL published product %h", p0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
