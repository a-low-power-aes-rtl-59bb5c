// aes_sbox_tb: checks all 256 S-box entries against an inverse found by
// search plus the affine map, and two FIPS-197 entries.
module aes_sbox_tb;
  import gcm_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.x(x), .y(y));

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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      check(y, r_sbox(x), $sformatf("S(%02h)", i));
    end
    x = 8'h00; #1; check(y, 8'h63, "S(00) FIPS");
    x = 8'h53; #1; check(y, 8'hed, "S(53) FIPS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
