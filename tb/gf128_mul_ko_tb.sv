// gf128_mul_ko_tb: random operands against the bit-serial GCM multiplier,
// the identity element, and H*X from a published GCM test vector.
module gf128_mul_ko_tb;
  import gcm_ref_pkg::*;
  b128_t a, b, y;
  int checks = 0, failures = 0;

  gf128_mul_ko dut (.a_i(a), .b_i(b), .y_o(y));

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
    // 1 is the block 0x80..00 in GCM bit order.
    a = r_urand128(); b = {1'b1, 127'h0}; #1; check(y, a, "a*1");
    // GCM test case 2: X1 = C1*H with H = 66e94bd4ef8a2c3b884cfa59ca342b2e.
    a = 128'h0388dace60b6a392f328c2b971b2fe78;
    b = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
    #1; check(y, 128'h5e2ec746917062882c85b0685353deb7, "TC2 C1*H");
    for (int i = 0; i < 500; i++) begin
      a = r_urand128();
      b = r_urand128();
      if (i < 20) a = b128_t'(1) << $urandom_range(127);  // single-term operands
      #1;
      check(y, r_gmul(a, b), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
