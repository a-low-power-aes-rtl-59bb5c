// aes_pipeline_tb: streams one block per clock (with some idle slots) into
// the pipeline and checks each output against the reference cipher exactly
// NROUNDS edges after it entered, together with its payload. Includes the
// FIPS-197 appendix C.1 vector.
module aes_pipeline_tb;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;
  localparam int PW = 8;
  logic          clk = 0, rst_n = 0;
  blk_t          rk [NROUNDS+1];
  b128_t         key, din, dout;
  logic [PW-1:0] pin, pout;
  int checks = 0, failures = 0;
  b128_t         exp_q [$];
  logic [PW-1:0] pay_q [$];

  aes_pipeline #(.PW(PW)) dut (
    .clk(clk), .rst_n(rst_n), .rkeys_i(rk), .blk_i(din), .pay_i(pin), .blk_o(dout), .pay_o(pout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: the entry queued at edge t must appear after edge t+NROUNDS.
  int edge_no = 0;
  int in_edge [$];
  always @(posedge clk) if (rst_n) begin
    edge_no++;
    #1;
    if (pout != 0) begin
      checks += 3;
      if (exp_q.size() == 0) begin failures += 3; $display("FAIL unexpected output"); end
      else begin
        b128_t e; logic [PW-1:0] p; int t;
        e = exp_q.pop_front(); p = pay_q.pop_front(); t = in_edge.pop_front();
        if (dout !== e) begin failures++; $display("FAIL data %032h exp %032h", dout, e); end
        if (pout !== p) begin failures++; $display("FAIL payload"); end
        if (edge_no - t != NROUNDS) begin failures++; $display("FAIL latency %0d", edge_no - t); end
      end
    end
  end

  initial begin
    key = 128'h000102030405060708090a0b0c0d0e0f;
    for (int r = 0; r <= NROUNDS; r++) rk[r] = r_round_key(key, r);
    din = '0; pin = '0;
    #12 rst_n = 1;
    @(negedge clk);
    din = 128'h00112233445566778899aabbccddeeff; pin = 8'h5a;
    exp_q.push_back(128'h69c4e0d86a7b0430d8cdb78070b4c55a); pay_q.push_back(pin); in_edge.push_back(edge_no);
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin din = r_urand128(); pin = '0; end
      else begin
        din = r_urand128(); pin = 8'($urandom_range(255, 1));
        exp_q.push_back(r_aes(key, din)); pay_q.push_back(pin); in_edge.push_back(edge_no);
      end
    end
    @(negedge clk); pin = '0;
    repeat (NROUNDS + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d blocks never left", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
