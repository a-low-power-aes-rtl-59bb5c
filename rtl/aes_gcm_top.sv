// aes_gcm_top: four-parallel AES-GCM authenticated-encryption core.
//
// Encrypts a message of whole 128-bit blocks with AES-128 in counter mode and
// produces the 128-bit GCM tag over its additional authenticated data (AAD)
// and ciphertext, taking up to four blocks per clock:
//   gcm_ctrl         - phase FSM, input handshake, length block, clock select
//   clk_gate_demux   - steers the clock to the key, subkey or run registers
//   aes_key_expand   - round keys (key clock)
//   ghash_subkey_gen - H, H^2, H^4 by squaring, plus E_K(J0) (subkey clock)
//   gctr             - four AES-128 pipelines in counter mode (run clock)
//   ghash_4par       - four Karatsuba-Ofman multipliers (run clock)
// The ciphertext leaves gctr on ct_* ten run-clock edges after its plaintext
// entered; tag = GHASH_H(AAD, C, len) xor E_K(J0) is valid while done_o is high
// and holds until the next start.
//
// Usage: with key_i and iv_i stable until done_o, pulse start_i in idle with
// n_aad_i/n_text_i; after 24 setup cycles in_ready_o rises; present packed
// groups on in_blk_i (AAD blocks first, then plaintext, block 4g+j+1 in lane
// j) with in_valid_i. Lengths are whole blocks; the IV is 96 bits.
module aes_gcm_top
  import aes_gcm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  blk_t             key_i,
  input  logic [IV_W-1:0]  iv_i,
  input  logic [CNT_W-1:0] n_aad_i,
  input  logic [CNT_W-1:0] n_text_i,
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  blk_t             in_blk_i  [LANES],
  output logic             ct_valid_o,        // some lane of ct_blk_o holds ciphertext
  output logic [LANES-1:0] ct_mask_o,         // lanes holding ciphertext
  output blk_t             ct_blk_o  [LANES],
  output blk_t             tag_o,
  output logic             busy_o,
  output logic             done_o
);
  cg_sel_e          sel;
  logic [CG_OUTS-1:0] gclk;
  logic             key_load, sub_start, ctr_load, hgen, gh_clear, gh_done, sub_done, key_done;
  kind_e            lane_kind [LANES];
  kind_e            out_kind  [LANES];
  blk_t             lane_blk  [LANES];
  blk_t             out_blk   [LANES];
  blk_t             ks        [LANES];
  blk_t             len_blk, h, h2, h4, ekj0, hash;
  blk_t             rkeys [NROUNDS+1];
  logic [CNT_W-1:0] n_blocks;
  logic             gh_valid;

  gcm_ctrl u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (start_i),
    .n_aad_i      (n_aad_i),
    .n_text_i     (n_text_i),
    .in_valid_i   (in_valid_i),
    .in_ready_o   (in_ready_o),
    .ghash_done_i (gh_done),
    .sel_o        (sel),
    .key_load_o   (key_load),
    .sub_start_o  (sub_start),
    .ctr_load_o   (ctr_load),
    .hgen_o       (hgen),
    .ghash_clear_o(gh_clear),
    .lane_kind_o  (lane_kind),
    .len_blk_o    (len_blk),
    .n_blocks_o   (n_blocks),
    .busy_o       (busy_o),
    .done_o       (done_o)
  );

  clk_gate_demux u_cg (.clk(clk), .sel(sel), .gclk_o(gclk));

  aes_key_expand u_key (
    .clk    (gclk[0]),
    .load   (key_load),
    .key_i  (key_i),
    .rkeys_o(rkeys),
    .done_o (key_done)
  );

  always_comb begin
    for (int j = 0; j < LANES; j++)
      lane_blk[j] = (lane_kind[j] == K_LEN) ? len_blk : in_blk_i[j];
  end

  gctr u_gctr (
    .clk       (gclk[2]),
    .rst_n     (rst_n),
    .rkeys_i   (rkeys),
    .iv_i      (iv_i),
    .ctr_load  (ctr_load),
    .hgen_i    (hgen),
    .in_kind_i (lane_kind),
    .in_blk_i  (lane_blk),
    .out_kind_o(out_kind),
    .out_blk_o (out_blk),
    .ks_o      (ks)
  );

  ghash_subkey_gen u_sub (
    .clk   (gclk[1]),
    .start (sub_start),
    .h_i   (ks[0]),
    .ekj0_i(ks[1]),
    .h_o   (h),
    .h2_o  (h2),
    .h4_o  (h4),
    .ekj0_o(ekj0),
    .done_o(sub_done)
  );

  always_comb begin
    gh_valid = 1'b0;
    for (int j = 0; j < LANES; j++) begin
      gh_valid     = gh_valid || (out_kind[j] != K_NONE);
      ct_mask_o[j] = (out_kind[j] == K_TEXT);
    end
  end

  ghash_4par u_ghash (
    .clk       (gclk[2]),
    .clear     (gh_clear),
    .n_blocks_i(n_blocks),
    .in_valid  (gh_valid),
    .in_blk_i  (out_blk),
    .h_i       (h),
    .h2_i      (h2),
    .h4_i      (h4),
    .hash_o    (hash),
    .done_o    (gh_done)
  );

  assign ct_valid_o = |ct_mask_o;
  assign ct_blk_o   = out_blk;
  assign tag_o      = hash ^ ekj0;

  // The key schedule and the subkeys must be complete before data flows.
  property p_ready_when_set_up;
    @(posedge clk) in_ready_o |-> (key_done && sub_done);
  endproperty
  a_ready_when_set_up: assert property (p_ready_when_set_up);
endmodule
