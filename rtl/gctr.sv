// gctr: four-lane GCTR (counter-mode) encryption.
//
// Each lane holds one pipelined AES-128 (aes_pipeline) fed with a counter
// block IV || ctr, and xors the keystream with the plaintext that travels
// beside it, so up to four plaintext blocks are encrypted per clock. Lanes of
// kind K_TEXT get consecutive counter values in lane order; AAD and length
// blocks pass through unencrypted and keep their slot, so the output stream
// is exactly the GHASH input stream, ten clocks later.
//
// Counter: J0 = IV || 0^31 || 1 for a 96-bit IV; the i-th plaintext block uses
// IV || (1+i). ctr_load sets the next counter to 2. While hgen_i is high, lane
// 0 encrypts the zero block (giving H) and lane 1 encrypts J0 (giving the tag
// mask); these slots leave as K_NONE and appear only on ks_o.
//
// Timing: inputs are taken on every edge of the gated run clock; out_* is
// valid NROUNDS (10) edges later. Lane kinds, the counter rule and the use of
// lane 1 for E_K(J0) are this design's choices; the document gives GCTR as
// pipelined AES plus the initial counter block with a 96-bit IV.
module gctr
  import aes_gcm_pkg::*;
(
  input  logic      clk,                   // gated run-domain clock
  input  logic      rst_n,                 // async reset (empties the pipelines)
  input  blk_t      rkeys_i [NROUNDS+1],   // round keys
  input  logic [IV_W-1:0] iv_i,            // 96-bit IV, stable during a message
  input  logic      ctr_load,              // restart the counter at IV || 2
  input  logic      hgen_i,                // encrypt 0 and J0 in lanes 0 and 1
  input  kind_e     in_kind_i [LANES],     // slot kinds entering this cycle
  input  blk_t      in_blk_i  [LANES],     // plaintext / AAD / length blocks
  output kind_e     out_kind_o [LANES],    // slot kinds leaving
  output blk_t      out_blk_o  [LANES],    // ciphertext / AAD / length blocks, 0 if empty
  output blk_t      ks_o       [LANES]     // raw AES output of each lane
);
  localparam int unsigned PW = 2 + BLK_W;

  logic [CNT_W-1:0] ctr;          // counter value of the next plaintext block
  logic [CNT_W-1:0] ctr_lane [LANES];
  logic [CNT_W-1:0] n_text;
  blk_t             aes_in  [LANES];
  logic [PW-1:0]    pay_in  [LANES];
  logic [PW-1:0]    pay_out [LANES];

  always_comb begin
    n_text = '0;
    for (int j = 0; j < LANES; j++) begin
      ctr_lane[j] = ctr + n_text;
      if (in_kind_i[j] == K_TEXT) n_text = n_text + 1'b1;
    end
    for (int j = 0; j < LANES; j++) begin
      aes_in[j] = {iv_i, ctr_lane[j]};
      pay_in[j] = {in_kind_i[j], in_blk_i[j]};
      if (hgen_i) begin
        pay_in[j] = {K_NONE, {BLK_W{1'b0}}};
        aes_in[j] = (j == 1) ? {iv_i, 32'd1} : '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ctr_load)     ctr <= 32'd2;
    else if (!hgen_i) ctr <= ctr + n_text;
  end

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    kind_e k;
    aes_pipeline #(.PW(PW)) u_aes (
      .clk    (clk),
      .rst_n  (rst_n),
      .rkeys_i(rkeys_i),
      .blk_i  (aes_in[j]),
      .pay_i  (pay_in[j]),
      .blk_o  (ks_o[j]),
      .pay_o  (pay_out[j])
    );
    assign k             = kind_e'(pay_out[j][PW-1 -: 2]);
    assign out_kind_o[j] = k;
    always_comb begin
      unique case (k)
        K_TEXT:       out_blk_o[j] = pay_out[j][BLK_W-1:0] ^ ks_o[j];
        K_AAD, K_LEN: out_blk_o[j] = pay_out[j][BLK_W-1:0];
        default:      out_blk_o[j] = '0;
      endcase
    end
  end
endmodule
