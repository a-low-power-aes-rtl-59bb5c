// gf128_mul_ko: combinational GF(2^128) multiplier for GHASH, Karatsuba-Ofman.
//
// The 128x128 carry-less product is split with two levels of Karatsuba-Ofman
// (KO with i = 2): 128 -> three 64-bit products -> nine 32-bit products, each
// computed by a plain schoolbook carry-less multiplier. Splitting a = x^(m/2)Ah + Al
// and b likewise, a*b = x^m AhBh + x^(m/2)((Ah+Al)(Bh+Bl) + AhBh + AlBl) + AlBl.
// The 255-bit product is then reduced modulo x^128 + x^7 + x^2 + x + 1.
// Ports use GCM bit order (bit 127 is the coefficient of x^0); the operands
// are bit-reversed on the way in and the result on the way out. No clock.
module gf128_mul_ko
  import aes_gcm_pkg::*;
(
  input  blk_t a_i,  // multiplicand, GCM bit order
  input  blk_t b_i,  // multiplier, GCM bit order
  output blk_t y_o   // a*b mod f(x), GCM bit order
);
  function automatic logic [62:0] clmul32(input logic [31:0] a, input logic [31:0] b);
    logic [62:0] p;
    p = '0;
    for (int i = 0; i < 32; i++)
      if (b[i]) p ^= 63'(a) << i;
    return p;
  endfunction

  function automatic logic [126:0] ko64(input logic [63:0] a, input logic [63:0] b);
    logic [62:0] hh, ll, mm;
    hh = clmul32(a[63:32], b[63:32]);
    ll = clmul32(a[31:0], b[31:0]);
    mm = clmul32(a[63:32] ^ a[31:0], b[63:32] ^ b[31:0]) ^ hh ^ ll;
    return (127'(hh) << 64) ^ (127'(mm) << 32) ^ 127'(ll);
  endfunction

  function automatic logic [254:0] ko128(input blk_t a, input blk_t b);
    logic [126:0] hh, ll, mm;
    hh = ko64(a[127:64], b[127:64]);
    ll = ko64(a[63:0], b[63:0]);
    mm = ko64(a[127:64] ^ a[63:0], b[127:64] ^ b[63:0]) ^ hh ^ ll;
    return (255'(hh) << 128) ^ (255'(mm) << 64) ^ 255'(ll);
  endfunction

  assign y_o = bitrev128(gf128_reduce(ko128(bitrev128(a_i), bitrev128(b_i))));
endmodule
