// gf128_square: combinational GF(2^128) squaring for the hash-subkey powers.
//
// Classic squaring in two parts. First the polynomial product d = a*a, which
// in characteristic 2 needs no multiplier: the square of sum a_i x^i is
// sum a_i x^(2i), so d is the operand with a zero between every two bits.
// Then the reduction by the matrix R of f(x) = x^128 + x^7 + x^2 + x + 1:
// column i of R holds x^(128+i) mod f(x), and
//   c(j) = d(j) xor (xor over i of R(j,i) and d(128+i)),  j = 0..127.
// R is a constant computed at elaboration from f, so the hardware is only the
// xor trees selected by its one-bits.
// Ports use GCM bit order (bit 127 is the coefficient of x^0). No clock.
module gf128_square
  import aes_gcm_pkg::*;
(
  input  blk_t a_i,  // operand, GCM bit order
  output blk_t y_o   // a*a mod f(x), GCM bit order
);
  typedef logic [126:0][127:0] rmat_t;  // [i] = column i = x^(128+i) mod f

  function automatic rmat_t reduction_matrix();
    rmat_t r;
    blk_t  col;
    col = 128'h87;                       // x^128 mod f = x^7 + x^2 + x + 1
    for (int i = 0; i < 127; i++) begin
      r[i] = col;
      col  = {col[126:0], 1'b0} ^ (col[127] ? 128'h87 : 128'h0);  // times x
    end
    return r;
  endfunction

  localparam rmat_t R = reduction_matrix();

  logic [254:0] d;
  blk_t         p, c;

  always_comb begin
    p = bitrev128(a_i);
    d = '0;
    for (int i = 0; i < BLK_W; i++) d[2*i] = p[i];
    c = d[127:0];
    for (int i = 0; i < 127; i++)
      if (d[128+i]) c ^= R[i];
  end

  assign y_o = bitrev128(c);
endmodule
