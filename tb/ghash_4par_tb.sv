// ghash_4par_tb: GHASH of n = 1..21 random blocks (all group fillings, with
// random idle cycles between groups) against the serial definition
// X_i = (X_{i-1} + A_i) H. Checks the number of edges from the last group to
// done (1, or 2 when a flush step is needed), the operand schedule of the
// 10-block example, and that flush steps and H^3 splits both occurred.
module ghash_4par_tb;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;
  logic             clk = 0, clear, in_valid, done;
  logic [CNT_W-1:0] n;
  blk_t             blk [LANES];
  b128_t            h, h2, h4, hash;
  int checks = 0, failures = 0;
  int n_flush = 0, n_split3 = 0, n_one = 0;

  ghash_4par dut (
    .clk(clk), .clear(clear), .n_blocks_i(n), .in_valid(in_valid), .in_blk_i(blk),
    .h_i(h), .h2_i(h2), .h4_i(h4), .hash_o(hash), .done_o(done)
  );

  always #5 clk = ~clk;

  // Mechanism counters, sampled at each edge.
  always @(posedge clk) begin
    if (dut.flush) n_flush++;
    for (int j = 0; j < LANES; j++) begin
      if (dut.advance && dut.op[j] == OP_ONE) n_one++;
      if (dut.advance && dut.op[j] == OP_H2 && dut.step + 1 < dut.n_steps) n_split3++;
    end
  end

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nb, input bit check_eq5);
    b128_t a [$];
    b128_t x;
    int    edges;
    hop_e  sched [3][LANES];
    for (int i = 0; i < nb; i++) a.push_back(r_urand128());
    x = 0;
    foreach (a[i]) x = r_gmul(x ^ a[i], h);
    n = CNT_W'(nb);
    clear = 1; in_valid = 0;
    @(negedge clk); clear = 0;
    for (int g = 0; g < (nb + 3) / 4; g++) begin
      while ($urandom_range(2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int j = 0; j < LANES; j++) blk[j] = (4*g + j < nb) ? a[4*g + j] : '0;
      if (check_eq5) for (int j = 0; j < LANES; j++) sched[g][j] = dut.op[j];
      @(negedge clk);
    end
    in_valid = 0;
    for (int j = 0; j < LANES; j++) blk[j] = r_urand128();  // ignored when idle
    edges = 1;
    if (check_eq5 && !done) for (int j = 0; j < LANES; j++) sched[2][j] = dut.op[j];
    while (!done && edges < 10) begin @(negedge clk); edges++; end
    check(hash, x, $sformatf("GHASH n=%0d", nb));
    check(128'(edges), (nb % 4 == 0 || nb % 4 == 3) ? 128'd2 : 128'd1, $sformatf("edges to done n=%0d", nb));
    if (check_eq5) begin
      // ((A1 H4 + A5) H4 + A9) H2 + ((A2 H4 + A6) H4 + A10) H
      //   + ((A3 H4 + A7) 1 + 0) H4 + ((A4 H4 + A8) H2 + 0) H
      hop_e exp5 [3][LANES];
      exp5 = '{'{OP_H4, OP_H4, OP_H4, OP_H4}, '{OP_H4, OP_H4, OP_ONE, OP_H2}, '{OP_H2, OP_H, OP_H4, OP_H}};
      for (int g = 0; g < 3; g++)
        for (int j = 0; j < LANES; j++)
          check(128'(sched[g][j]), 128'(exp5[g][j]), $sformatf("eq.5 operand step %0d lane %0d", g, j));
    end
  endtask

  initial begin
    clear = 0; in_valid = 0; n = 1;
    for (int j = 0; j < LANES; j++) blk[j] = '0;
    h  = r_urand128();
    h2 = r_gmul(h, h);
    h4 = r_gmul(h2, h2);
    @(negedge clk);
    run(10, 1'b1);
    for (int nb = 1; nb <= 21; nb++) run(nb, 1'b0);
    h  = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
    h2 = r_gmul(h, h);
    h4 = r_gmul(h2, h2);
    for (int i = 0; i < 10; i++) run($urandom_range(40, 1), 1'b0);
    checks += 3;
    if (n_flush == 0)  begin failures++; $display("FAIL no flush step seen"); end
    if (n_split3 == 0) begin failures++; $display("FAIL no H^2-then-H split seen"); end
    if (n_one == 0)    begin failures++; $display("FAIL no multiply-by-one step seen"); end
    $display("flush steps %0d, H^3 splits %0d, by-one steps %0d", n_flush, n_split3, n_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
