// tb_gf128_pow2: checks H^2, H^4 and H^8 from the XOR-only networks against
// repeated reference multiplications.
module tb_gf128_pow2;
  import gcm_ref_pkg::*;
  blk_t h, p2, p4, p8;
  int checks = 0, failures = 0;

  gf128_pow2 #(.J(1)) d1 (.h, .h_pow(p2));
  gf128_pow2 #(.J(2)) d2 (.h, .h_pow(p4));
  gf128_pow2 #(.J(3)) d3 (.h, .h_pow(p8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      blk_t e2, e4, e8;
      h = {$urandom, $urandom, $urandom, $urandom};
      #1;
      e2 = gmul(h, h); e4 = gmul(e2, e2); e8 = gmul(e4, e4);
      checks += 3;
      if (p2 !== e2) begin failures++; $display("FAIL H^2 of %h", h); end
      if (p4 !== e4) begin failures++; $display("FAIL H^4 of %h", h); end
      if (p8 !== e8) begin failures++; $display("FAIL H^8 of %h", h); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
