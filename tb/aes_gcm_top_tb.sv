// aes_gcm_top_tb: end-to-end AES-GCM encryption through the complete core.
//
// Runs published GCM test vectors (empty message; one zero block under the
// zero key; the four-block "feffe992..." message), a message of exactly ten
// GHASH blocks (2 AAD, 7 plaintext, length block) and random messages with
// AAD and plaintext of random block counts, with random idle input cycles.
// Ciphertext blocks are collected in order from the output lanes and, with
// the tag, compared against a reference GCM built from the reference AES and
// the bit-serial GF(2^128) multiplier. The cycle count from the start edge to
// done is checked against 35 + D + f + idle cycles, where D is the number of
// input groups (AAD, plaintext and length block, four per cycle) and f = 1
// when the final GHASH needs a flush step. The mechanisms of the design are
// counted and each must occur: edges on each gated clock, input idle cycles,
// flush steps, H^3 split into H^2 then H, multiply-by-one steps, a length
// block alone and sharing a group, and a group mixing AAD and plaintext.
module aes_gcm_top_tb;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;
  logic             clk = 0, rst_n = 0, start, in_valid, in_ready, ct_valid, busy, done;
  blk_t             key;
  logic [IV_W-1:0]  iv;
  logic [CNT_W-1:0] n_aad, n_text;
  blk_t             in_blk [LANES], ct_blk [LANES], tag;
  logic [LANES-1:0] ct_mask;
  int checks = 0, failures = 0;
  int e_key = 0, e_sub = 0, e_run = 0, n_bubble = 0, n_flush = 0, n_split3 = 0, n_one = 0;
  int n_len_alone = 0, n_len_shared = 0, n_mixed = 0;
  b128_t ct_got [$];

  aes_gcm_top dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .key_i(key), .iv_i(iv), .n_aad_i(n_aad),
    .n_text_i(n_text), .in_valid_i(in_valid), .in_ready_o(in_ready), .in_blk_i(in_blk),
    .ct_valid_o(ct_valid), .ct_mask_o(ct_mask), .ct_blk_o(ct_blk), .tag_o(tag),
    .busy_o(busy), .done_o(done)
  );

  always #5 clk = ~clk;

  always @(posedge dut.gclk[0]) e_key++;
  always @(posedge dut.gclk[1]) e_sub++;
  always @(posedge dut.gclk[2]) begin
    e_run++;
    if (dut.u_ghash.flush) n_flush++;
    for (int j = 0; j < LANES; j++) begin
      if (dut.u_ghash.advance && dut.u_ghash.op[j] == OP_ONE) n_one++;
      if (dut.u_ghash.advance && dut.u_ghash.op[j] == OP_H2 && dut.u_ghash.step + 1 < dut.u_ghash.n_steps)
        n_split3++;
    end
  end
  always @(posedge clk) begin
    if (in_ready && !in_valid) n_bubble++;
    if (dut.lane_kind[0] == K_LEN) n_len_alone++;
    for (int j = 1; j < LANES; j++) begin
      if (dut.lane_kind[j] == K_LEN) n_len_shared++;
      if (dut.lane_kind[j] == K_TEXT && dut.lane_kind[j-1] == K_AAD) n_mixed++;
    end
    if (ct_valid)
      for (int j = 0; j < LANES; j++) if (ct_mask[j]) ct_got.push_back(ct_blk[j]);
  end

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encrypt one message. With have_tag set, the reference model is first held
  // against the published tag exp_tag (and ciphertext exp_ct).
  task automatic run(input b128_t k, input logic [95:0] v, input b128_t aad [$], input b128_t pt [$],
                     input bit have_tag, input b128_t exp_tag, input b128_t exp_ct [$], input bit bubbles);
    b128_t stream [$];
    b128_t ct [$];
    b128_t hk, x, t;
    int    nu, groups, f, cycles, idle;
    // Reference GCM.
    hk = r_aes(k, '0);
    foreach (pt[i]) ct.push_back(pt[i] ^ r_aes(k, {v, 32'(i + 2)}));
    x = '0;
    foreach (aad[i]) x = r_gmul(x ^ aad[i], hk);
    foreach (ct[i])  x = r_gmul(x ^ ct[i], hk);
    x = r_gmul(x ^ {64'(aad.size()) * 128, 64'(pt.size()) * 128}, hk);
    t = x ^ r_aes(k, {v, 32'd1});
    if (have_tag) check(t, exp_tag, "reference model against published tag");
    foreach (exp_ct[i]) check(ct[i], exp_ct[i], "reference model against published ciphertext");
    // Drive the core.
    stream = {aad, pt};
    nu     = stream.size();
    groups = (nu + 1 + 3) / 4;
    f      = ((nu + 1) % 4 == 0 || (nu + 1) % 4 == 3) ? 1 : 0;
    ct_got.delete();
    key = k; iv = v;
    n_aad = CNT_W'(aad.size()); n_text = CNT_W'(pt.size());
    start = 1;
    @(negedge clk); start = 0;
    cycles = 0; idle = 0;
    while (!done && cycles < 5000) begin
      in_valid = bubbles ? ($urandom_range(3) != 0) : 1'b1;
      for (int j = 0; j < LANES; j++) in_blk[j] = r_urand128();
      if (in_ready) begin
        int base;
        base = nu - int'(dut.u_ctrl.n_user - dut.u_ctrl.issued);
        for (int j = 0; j < LANES; j++) if (base + j < nu) in_blk[j] = stream[base + j];
        if (!in_valid) idle++;
      end
      @(negedge clk);
      cycles++;
    end
    in_valid = 0;
    check(tag, t, $sformatf("tag (aad %0d, text %0d)", aad.size(), pt.size()));
    check(128'(ct_got.size()), 128'(ct.size()), "number of ciphertext blocks");
    foreach (ct[i]) if (i < ct_got.size()) check(ct_got[i], ct[i], $sformatf("ciphertext block %0d", i));
    check(128'(cycles), 128'(35 + groups + f + idle), "cycles from start to done");
    @(negedge clk);
    check(tag, t, "tag held after done");
    check(128'(busy), 128'd0, "idle after done");
  endtask

  initial begin
    b128_t none [$];
    b128_t aad [$];
    b128_t pt [$];
    b128_t ct3 [$];
    start = 0; in_valid = 0; key = '0; iv = '0; n_aad = '0; n_text = '0;
    for (int j = 0; j < LANES; j++) in_blk[j] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    // GCM test case 1: empty message, zero key and IV.
    run('0, '0, none, none, 1'b1, 128'h58e2fccefa7e3061367f1d57a4e7455a, none, 1'b0);
    // Test case 2: one zero block.
    pt = '{128'h0};
    ct3 = '{128'h0388dace60b6a392f328c2b971b2fe78};
    run('0, '0, none, pt, 1'b1, 128'hab6e47d42cec13bdf53a67b21257bddf, ct3, 1'b0);
    // Test case 3: four blocks.
    pt = '{128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
           128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
    ct3 = '{128'h42831ec2217774244b7221b784d0d49c, 128'he3aa212f2c02a4e035c17e2329aca12e,
            128'h21d514b25466931c7d8f6a5aac84aa05, 128'h1ba30b396a0aac973d58e091473f5985};
    run(128'hfeffe9928665731c6d6a8f9467308308, 96'hcafebabefacedbaddecaf888, none, pt, 1'b1,
        128'h4d5c2af327cd64a62cf35abd2ba6fab4, ct3, 1'b0);
    // Ten GHASH blocks (2 AAD + 7 plaintext + length), the document's example size.
    aad.delete(); pt.delete();
    repeat (2) aad.push_back(r_urand128());
    repeat (7) pt.push_back(r_urand128());
    run(r_urand128(), {$urandom, $urandom, $urandom}, aad, pt, 1'b0, '0, none, 1'b0);
    // Random messages.
    for (int i = 0; i < 8; i++) begin
      aad.delete(); pt.delete();
      repeat ($urandom_range(6)) aad.push_back(r_urand128());
      repeat ($urandom_range(9)) pt.push_back(r_urand128());
      if (i == 0) begin aad.delete(); aad.push_back(r_urand128()); end  // 1 + 4 blocks
      run(r_urand128(), {$urandom, $urandom, $urandom}, aad, pt, 1'b0, '0, none, i % 2 == 1);
    end
    checks += 10;
    if (e_key == 0)        begin failures++; $display("FAIL key clock never ran"); end
    if (e_sub == 0)        begin failures++; $display("FAIL subkey clock never ran"); end
    if (e_run == 0)        begin failures++; $display("FAIL run clock never ran"); end
    if (n_bubble == 0)     begin failures++; $display("FAIL no idle input cycle"); end
    if (n_flush == 0)      begin failures++; $display("FAIL no GHASH flush step"); end
    if (n_split3 == 0)     begin failures++; $display("FAIL no H^2-then-H split"); end
    if (n_one == 0)        begin failures++; $display("FAIL no multiply-by-one step"); end
    if (n_len_alone == 0)  begin failures++; $display("FAIL no length block alone"); end
    if (n_len_shared == 0) begin failures++; $display("FAIL no length block sharing a group"); end
    if (n_mixed == 0)      begin failures++; $display("FAIL no AAD/plaintext mixed group"); end
    $display("edges key/sub/run %0d/%0d/%0d, idle %0d, flush %0d, H^3 splits %0d, by-one %0d, len alone %0d, shared %0d, mixed %0d",
             e_key, e_sub, e_run, n_bubble, n_flush, n_split3, n_one, n_len_alone, n_len_shared, n_mixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
