// ghash_subkey_gen_tb: loads random H and E_K(J0) values and checks H, H^2,
// H^4 and the kept E_K(J0) against the reference multiplier, and that done
// rises three edges after the load edge (load edge included).
module ghash_subkey_gen_tb;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;
  logic  clk = 0, start;
  b128_t hin, ein, h, h2, h4, e;
  logic  done;
  int checks = 0, failures = 0;

  ghash_subkey_gen dut (
    .clk(clk), .start(start), .h_i(hin), .ekj0_i(ein),
    .h_o(h), .h2_o(h2), .h4_o(h4), .ekj0_o(e), .done_o(done)
  );

  always #5 clk = ~clk;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; hin = '0; ein = '0;
    @(negedge clk);
    for (int i = 0; i < 30; i++) begin
      b128_t hh, h2e;
      int edges;
      hh = r_urand128(); hin = hh; ein = r_urand128(); start = 1;
      @(posedge clk); #1; start = 0; edges = 1;
      hin = r_urand128();  // must not matter any more
      while (!done && edges < 20) begin @(posedge clk); #1; edges++; end
      h2e = r_gmul(hh, hh);
      check(128'(edges), 128'd3, "edges until done");
      check(h, hh, "H");
      check(h2, h2e, "H^2");
      check(h4, r_gmul(h2e, h2e), "H^4");
      check(e, ein, "E_K(J0)");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
