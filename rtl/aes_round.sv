// aes_round: one AES-128 encryption round, combinational.
//
// SubBytes (16 S-boxes), ShiftRows, MixColumns and AddRoundKey, in that order.
// With LAST = 1 MixColumns is left out, as in the tenth round. State byte n is
// bits [127-8n -: 8], byte n is row n%4 of column n/4 (FIPS-197 layout).
// The pipeline register after each round lives in aes_pipeline.
module aes_round
  import aes_gcm_pkg::*;
#(
  parameter bit LAST = 1'b0  // 1: final round, no MixColumns
) (
  input  blk_t state_i,  // state entering the round
  input  blk_t rkey_i,   // round key
  output blk_t state_o   // state after AddRoundKey
);
  logic [7:0] sb [16];
  logic [7:0] sr [16];
  logic [7:0] mc [16];

  for (genvar n = 0; n < 16; n++) begin : g_sub
    aes_sbox u_sbox (.x(state_i[127-8*n -: 8]), .y(sb[n]));
  end

  always_comb begin
    // ShiftRows: row r is rotated left by r columns.
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[4*c + r] = sb[4*((c + r) % 4) + r];
    // MixColumns over each column.
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        mc[4*c + r] = xtime(sr[4*c + r]) ^ xtime(sr[4*c + (r+1)%4]) ^ sr[4*c + (r+1)%4]
                    ^ sr[4*c + (r+2)%4] ^ sr[4*c + (r+3)%4];
      end
    end
    for (int n = 0; n < 16; n++)
      state_o[127-8*n -: 8] = (LAST ? sr[n] : mc[n]) ^ rkey_i[127-8*n -: 8];
  end
endmodule
