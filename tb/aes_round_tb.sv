// aes_round_tb: random states and keys through a middle round and a last
// round, compared with the reference round; plus the FIPS-197 appendix B
// round-1 state.
module aes_round_tb;
  import gcm_ref_pkg::*;
  b128_t s, k, y_mid, y_last;
  int checks = 0, failures = 0;

  aes_round #(.LAST(1'b0)) u_mid  (.state_i(s), .rkey_i(k), .state_o(y_mid));
  aes_round #(.LAST(1'b1)) u_last (.state_i(s), .rkey_i(k), .state_o(y_last));

  task automatic check(input b128_t got, input b128_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 appendix B: start of round 1 and the round-1 key.
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    k = 128'ha0fafe1788542cb123a339392a6c7605;
    #1;
    check(y_mid, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS round 1");
    for (int i = 0; i < 200; i++) begin
      s = r_urand128();
      k = r_urand128();
      #1;
      check(y_mid,  r_round(s, k, 1'b0), "mid round");
      check(y_last, r_round(s, k, 1'b1), "last round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
