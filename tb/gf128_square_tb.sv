// gf128_square_tb: random operands squared, against the bit-serial multiplier
// applied to (a, a); also the single-term operands, which exercise every fold
// of the reduction.
module gf128_square_tb;
  import gcm_ref_pkg::*;
  b128_t a, y;
  int checks = 0, failures = 0;

  gf128_square dut (.a_i(a), .y_o(y));

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
    for (int i = 0; i < 128; i++) begin
      a = b128_t'(1) << i;
      #1;
      check(y, r_gmul(a, a), $sformatf("x^%0d squared", 127 - i));
    end
    for (int i = 0; i < 300; i++) begin
      a = r_urand128();
      #1;
      check(y, r_gmul(a, a), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
