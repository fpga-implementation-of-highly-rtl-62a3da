// tb_aes_round: drives random states and round keys into a normal round and
// a final round (no MixColumns), each with table and with composite-field
// S-boxes, and compares with the reference round.
module tb_aes_round;
  import gcm_ref_pkg::*;
  blk_t st, rk, out_mid, out_last, out_mid_c, out_last_c;
  int checks = 0, failures = 0;

  aes_round #(.LAST(1'b0)) dut_mid  (.state_in(st), .round_key(rk), .state_out(out_mid));
  aes_round #(.LAST(1'b1)) dut_last (.state_in(st), .round_key(rk), .state_out(out_last));
  aes_round #(.LAST(1'b0), .COMPOSITE_SBOX(1'b1)) dut_mid_c
    (.state_in(st), .round_key(rk), .state_out(out_mid_c));
  aes_round #(.LAST(1'b1), .COMPOSITE_SBOX(1'b1)) dut_last_c
    (.state_in(st), .round_key(rk), .state_out(out_last_c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      st = {$urandom, $urandom, $urandom, $urandom};
      rk = (n < 5) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks += 4;
      if (out_mid_c !== aes_round_ref(st, rk, 1'b0) || out_last_c !== aes_round_ref(st, rk, 1'b1)) begin
        failures += 2;
        $display("FAIL composite S-box round st=%h rk=%h", st, rk);
      end
      if (out_mid !== aes_round_ref(st, rk, 1'b0)) begin
        failures++;
        $display("FAIL round st=%h rk=%h got %h", st, rk, out_mid);
      end
      if (out_last !== aes_round_ref(st, rk, 1'b1)) begin
        failures++;
        $display("FAIL last round st=%h rk=%h got %h", st, rk, out_last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
