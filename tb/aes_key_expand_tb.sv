// aes_key_expand_tb: FIPS-197 appendix A.1 key schedule and random keys
// against the word-based reference schedule; checks that done rises exactly
// 11 edges after the load edge (load edge included).
module aes_key_expand_tb;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;
  logic  clk = 0, load;
  b128_t key;
  blk_t  rk [NROUNDS+1];
  logic  done;
  int checks = 0, failures = 0;

  aes_key_expand dut (.clk(clk), .load(load), .key_i(key), .rkeys_o(rk), .done_o(done));

  always #5 clk = ~clk;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic run(input b128_t k);
    int edges;
    key  = k;
    load = 1;
    @(posedge clk); #1;
    load  = 0;
    edges = 1;
    while (!done && edges < 50) begin @(posedge clk); #1; edges++; end
    check(128'(edges), 128'(NROUNDS + 1), "edges until done");
    for (int r = 0; r <= NROUNDS; r++) check(rk[r], r_round_key(k, r), $sformatf("round key %0d", r));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0;
    key  = '0;
    @(posedge clk); #1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(rk[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10");
    for (int i = 0; i < 20; i++) run(r_urand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
