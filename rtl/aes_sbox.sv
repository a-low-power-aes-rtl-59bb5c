// aes_sbox: AES SubBytes substitution of one byte.
//
// A 256-entry read-only table indexed by the input byte. The table is not
// typed in: it is aes_gcm_pkg::SBOX, computed once at elaboration by sbox_table(), which
// takes the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 and
// applies the AES affine transform. Purely combinational, no clock.
module aes_sbox
  import aes_gcm_pkg::*;
(
  input  logic [7:0] x,  // byte to substitute
  output logic [7:0] y   // S(x)
);
  assign y = SBOX[x];
endmodule
