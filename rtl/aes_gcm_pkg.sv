// aes_gcm_pkg: types, constants and pure functions shared by the AES-GCM core.
//
// Holds the AES-128 sizes, the GF(2^8) helpers from which the S-box table is
// computed at elaboration (multiplicative inverse as x^254, then the affine map),
// the GF(2^128) reduction by f(x) = x^128 + x^7 + x^2 + x + 1 used by both the
// Karatsuba-Ofman multiplier and the squarer, the per-lane block kinds that
// travel with each 128-bit block through the four lanes, and the encoding of
// the clock-domain select driven by the controller into the clock demultiplexer.
//
// Bit order: a 128-bit block is held as logic [127:0] with bit 127 being the
// first bit of the first byte, as in the GCM specification. In GCM that first
// bit is the coefficient of x^0, so the field arithmetic works on a bit-reversed
// copy (poly[i] = coefficient of x^i). The reduction polynomial follows the
// document; the lane kinds and select encoding are this design's own choices.
package aes_gcm_pkg;

  localparam int unsigned BLK_W   = 128;  // AES / GHASH block width
  localparam int unsigned NROUNDS = 10;   // AES-128 rounds
  localparam int unsigned LANES   = 4;    // degree of parallelism
  localparam int unsigned IV_W    = 96;   // IV width (J0 = IV || 0^31 || 1)
  localparam int unsigned CNT_W   = 32;   // width of block counts per message

  typedef logic [BLK_W-1:0] blk_t;
  typedef blk_t             lane_blk_t [LANES];

  // What a lane carries in a given cycle.
  typedef enum logic [1:0] {
    K_NONE = 2'd0,  // empty slot
    K_AAD  = 2'd1,  // additional authenticated data: hashed, not encrypted
    K_TEXT = 2'd2,  // plaintext: encrypted, ciphertext is hashed
    K_LEN  = 2'd3   // final length block len(A)||len(C): hashed only
  } kind_e;

  // Clock demultiplexer select: which register group receives the clock.
  typedef enum logic [1:0] {
    CG_NONE = 2'd0,  // all gated clocks off
    CG_KEY  = 2'd1,  // key-schedule registers
    CG_SUB  = 2'd2,  // hash-subkey registers
    CG_RUN  = 2'd3   // AES pipelines, counter and GHASH accumulators
  } cg_sel_e;
  localparam int unsigned CG_OUTS = 3;

  // GHASH multiplier operand for one lane.
  typedef enum logic [1:0] {
    OP_ONE = 2'd0,
    OP_H   = 2'd1,
    OP_H2  = 2'd2,
    OP_H4  = 2'd3
  } hop_e;

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf8_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // S-box entry: inverse (a^254, 0 maps to 0) followed by the AES affine map.
  function automatic logic [7:0] sbox_calc(input logic [7:0] x);
    logic [7:0] inv, sq, y;
    inv = 8'h01;
    sq  = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) inv = gf8_mul(inv, sq);  // 254 = 0b11111110
      sq = gf8_mul(sq, sq);
    end
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  typedef logic [255:0][7:0] sbox_table_t;

  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  // Computed once, at elaboration; every S-box instance reads this table.
  localparam sbox_table_t SBOX = sbox_table();

  // -------------------------------------------------------------- GF(2^128)
  function automatic blk_t bitrev128(input blk_t a);
    blk_t r;
    for (int i = 0; i < BLK_W; i++) r[i] = a[BLK_W-1-i];
    return r;
  endfunction

  // Reduce a 255-bit polynomial product modulo x^128 + x^7 + x^2 + x + 1.
  // Every coefficient of x^(128+i) is folded onto x^i, x^(i+1), x^(i+2), x^(i+7),
  // from the top down so that folds landing at or above x^128 are folded again.
  function automatic blk_t gf128_reduce(input logic [254:0] d);
    logic [254:0] t;
    t = d;
    for (int i = 254; i >= 128; i--) begin
      if (t[i]) begin
        t[i-128] ^= 1'b1;
        t[i-127] ^= 1'b1;
        t[i-126] ^= 1'b1;
        t[i-121] ^= 1'b1;
        t[i]      = 1'b0;
      end
    end
    return t[127:0];
  endfunction

endpackage
