// gcm_ctrl_tb: runs the controller through messages of random size (with
// idle input cycles), with a modelled GHASH that reports done some cycles
// after the length block. Checks, cycle by cycle: the phase lengths and clock
// select (11 key, 10 run with hgen, 3 subkey cycles), the one-cycle strobes,
// that the lane kinds form AAD^a TEXT^t LEN packed from lane 0, the length
// block contents, in_ready, and the done pulse with all clocks off.
module gcm_ctrl_tb;
  import aes_gcm_pkg::*;
  logic             clk = 0, rst_n = 0, start, in_valid, in_ready, gh_done;
  logic [CNT_W-1:0] n_aad, n_text, n_blocks;
  cg_sel_e          sel;
  logic             key_load, sub_start, ctr_load, hgen, gh_clear, busy, done;
  kind_e            kind [LANES];
  blk_t             len_blk;
  int checks = 0, failures = 0;
  int n_bubbles = 0, n_len_alone = 0, n_len_shared = 0, n_mixed = 0;

  gcm_ctrl dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .n_aad_i(n_aad), .n_text_i(n_text),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .ghash_done_i(gh_done), .sel_o(sel),
    .key_load_o(key_load), .sub_start_o(sub_start), .ctr_load_o(ctr_load), .hgen_o(hgen),
    .ghash_clear_o(gh_clear), .lane_kind_o(kind), .len_blk_o(len_blk), .n_blocks_o(n_blocks),
    .busy_o(busy), .done_o(done)
  );

  always #5 clk = ~clk;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int a, input int t);
    kind_e seq [$];
    int    cyc, wait_done;
    n_aad = CNT_W'(a); n_text = CNT_W'(t);
    start = 1;
    @(negedge clk); start = 0;
    n_aad = '1; n_text = '1;  // captured at start; later values must not matter
    for (int c = 0; c < NROUNDS + 1; c++) begin
      check(128'(sel), 128'(CG_KEY), "sel in key phase");
      check(128'(key_load), 128'(c == 0), "key_load");
      @(negedge clk);
    end
    for (int c = 0; c < NROUNDS; c++) begin
      check(128'(sel), 128'(CG_RUN), "sel in hgen phase");
      check(128'({hgen, gh_clear, ctr_load}), 128'({2'b11, c == 0}), "hgen strobes");
      @(negedge clk);
    end
    for (int c = 0; c < 3; c++) begin
      check(128'(sel), 128'(CG_SUB), "sel in subkey phase");
      check(128'(sub_start), 128'(c == 0), "sub_start");
      check(128'(in_ready), 128'd0, "not ready before data");
      @(negedge clk);
    end
    check(n_blocks, CNT_W'(a + t + 1), "n_blocks");
    check(len_blk, {64'(a) * 128, 64'(t) * 128}, "length block");
    wait_done = -1;
    cyc = 0;
    while (!done && cyc < 200) begin
      int nk;
      bit gap;
      in_valid = ($urandom_range(3) != 0);
      #1;
      check(128'(sel), 128'(CG_RUN), "sel in data phase");
      check(128'(in_ready), 128'(seq.size() < a + t), "in_ready");
      nk = 0; gap = 0;
      for (int j = 0; j < LANES; j++) begin
        if (kind[j] == K_NONE) gap = 1;
        else begin
          nk++;
          if (gap) begin failures++; $display("FAIL lane kinds not packed"); end
          seq.push_back(kind[j]);
        end
      end
      if (in_ready && !in_valid) n_bubbles++;
      if (kind[0] == K_LEN) n_len_alone++;
      for (int j = 1; j < LANES; j++) if (kind[j] == K_LEN) n_len_shared++;
      for (int j = 1; j < LANES; j++) if (kind[j] == K_TEXT && kind[j-1] == K_AAD) n_mixed++;
      if (kind.or() with (item == K_LEN)) wait_done = 5;
      gh_done = (wait_done == 0);
      if (wait_done > 0) wait_done--;
      @(negedge clk);
      cyc++;
    end
    check(128'(done), 128'd1, "done reached");
    check(128'(sel), 128'(CG_NONE), "clocks off at done");
    check(128'(seq.size()), 128'(a + t + 1), "number of blocks issued");
    for (int i = 0; i < seq.size(); i++)
      check(128'(seq[i]), 128'((i < a) ? K_AAD : (i < a + t) ? K_TEXT : K_LEN), $sformatf("kind of block %0d", i));
    gh_done = 0;
    @(negedge clk);
    check(128'({done, busy}), 128'd0, "back to idle");
  endtask

  initial begin
    start = 0; in_valid = 0; gh_done = 0; n_aad = '0; n_text = '0;
    #12 rst_n = 1;
    @(negedge clk);
    run(0, 0);
    run(0, 1);
    run(2, 5);
    run(3, 4);
    for (int i = 0; i < 12; i++) run($urandom_range(9), $urandom_range(13));
    checks += 4;
    if (n_bubbles == 0)    begin failures++; $display("FAIL no input bubble"); end
    if (n_len_alone == 0)  begin failures++; $display("FAIL no length block in a group of its own"); end
    if (n_len_shared == 0) begin failures++; $display("FAIL no length block sharing a group"); end
    if (n_mixed == 0)      begin failures++; $display("FAIL no group mixing AAD and plaintext"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
