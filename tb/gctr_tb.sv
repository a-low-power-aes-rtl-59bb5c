// gctr_tb: counter-mode lanes. After 10 cycles with hgen high, lanes 0 and 1
// must give E_K(0) and E_K(J0). Then groups with mixed AAD / plaintext /
// length / empty lanes (and idle cycles) are streamed; every output slot is
// checked NROUNDS cycles after entry: plaintext -> P xor E_K(IV || ctr) with
// ctr counting 2, 3, ... over plaintext lanes only, other kinds unchanged.
module gctr_tb;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;
  logic            clk = 0, rst_n = 0, ctr_load, hgen;
  blk_t            rk [NROUNDS+1];
  b128_t           key;
  logic [IV_W-1:0] iv;
  kind_e           ikind [LANES], okind [LANES];
  blk_t            iblk [LANES], oblk [LANES], ks [LANES];
  int checks = 0, failures = 0;

  typedef struct { kind_e k [LANES]; b128_t d [LANES]; } grp_t;
  grp_t exp_q [$];
  bit   track = 0;

  gctr dut (
    .clk(clk), .rst_n(rst_n), .rkeys_i(rk), .iv_i(iv), .ctr_load(ctr_load), .hgen_i(hgen),
    .in_kind_i(ikind), .in_blk_i(iblk), .out_kind_o(okind), .out_blk_o(oblk), .ks_o(ks)
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

  // Each edge retires the group that entered NROUNDS edges earlier.
  always @(posedge clk) if (track) begin
    #1;
    if (exp_q.size() > NROUNDS - 1) begin
      grp_t g;
      g = exp_q.pop_front();
      for (int j = 0; j < LANES; j++) begin
        check(128'(okind[j]), 128'(g.k[j]), "kind");
        check(oblk[j], g.d[j], $sformatf("lane %0d data", j));
      end
    end
  end

  initial begin
    int ctr;
    key = r_urand128();
    iv  = {$urandom, $urandom, $urandom};
    for (int r = 0; r <= NROUNDS; r++) rk[r] = r_round_key(key, r);
    ctr_load = 0; hgen = 0;
    for (int j = 0; j < LANES; j++) begin ikind[j] = K_NONE; iblk[j] = '0; end
    #12 rst_n = 1;
    @(negedge clk);
    hgen = 1; ctr_load = 1;
    @(negedge clk); ctr_load = 0;
    repeat (NROUNDS - 1) @(negedge clk);
    hgen = 0;
    check(ks[0], r_aes(key, '0), "H = E_K(0)");
    check(ks[1], r_aes(key, {iv, 32'd1}), "E_K(J0)");
    for (int j = 0; j < LANES; j++) check(128'(okind[j]), 128'(K_NONE), "hgen slot kind");
    track = 1;
    ctr = 2;
    for (int i = 0; i < 80; i++) begin
      grp_t g;
      int   na, nt;
      na = $urandom_range(4);
      nt = $urandom_range(4 - na);
      for (int j = 0; j < LANES; j++) begin
        b128_t d;
        d = r_urand128();
        iblk[j] = d;
        if ($urandom_range(5) == 0) begin
          ikind[j] = K_NONE; g.k[j] = K_NONE; g.d[j] = '0;
        end else if (j < na) begin
          ikind[j] = K_AAD;  g.k[j] = K_AAD;  g.d[j] = d;
        end else if (j < na + nt) begin
          ikind[j] = K_TEXT; g.k[j] = K_TEXT; g.d[j] = d ^ r_aes(key, {iv, 32'(ctr)});
          ctr++;
        end else if (j == na + nt && $urandom_range(3) == 0) begin
          ikind[j] = K_LEN;  g.k[j] = K_LEN;  g.d[j] = d;
        end else begin
          ikind[j] = K_NONE; g.k[j] = K_NONE; g.d[j] = '0;
        end
      end
      exp_q.push_back(g);
      @(negedge clk);
    end
    for (int j = 0; j < LANES; j++) ikind[j] = K_NONE;
    repeat (NROUNDS) begin
      grp_t g;
      for (int j = 0; j < LANES; j++) begin g.k[j] = K_NONE; g.d[j] = '0; end
      exp_q.push_back(g);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
