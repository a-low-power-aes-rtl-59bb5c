// aes_pipeline: fully pipelined AES-128 encryption, one block per clock.
//
// The initial AddRoundKey is merged into the first stage; rounds 1..10 each
// end in a 128-bit register. A block presented on blk_i is captured by the
// next edge and its ciphertext is on blk_o after the NROUNDS-th (10th) edge
// counted from that one, i.e. a latency of 10 cycles; a new block can be
// presented every cycle. A side payload of
// PW bits (here: the block kind and the plaintext it will be xored with)
// travels through a matching delay line so that it leaves with its block.
// Registers between rounds follow the document's pipelined AES figure; the
// side payload is this design's choice. Only the payload can be reset
// (asynchronously, to all-zero), which marks every stage empty.
module aes_pipeline
  import aes_gcm_pkg::*;
#(
  parameter int unsigned PW = 8  // side payload width
) (
  input  logic          clk,                  // gated run-domain clock
  input  logic          rst_n,                // async reset of the payload
  input  blk_t          rkeys_i [NROUNDS+1],  // round keys, stable while running
  input  blk_t          blk_i,                // block to encrypt
  input  logic [PW-1:0] pay_i,                // payload entering with blk_i
  output blk_t          blk_o,                // E_K(blk_i) NROUNDS edges later
  output logic [PW-1:0] pay_o                 // payload leaving with blk_o
);
  blk_t          st  [NROUNDS+1];  // st[0]: input after AddRoundKey, st[r]: stage register r
  blk_t          rnd [1:NROUNDS];  // combinational output of round r
  logic [PW-1:0] pay [1:NROUNDS];

  assign st[0] = blk_i ^ rkeys_i[0];

  for (genvar r = 1; r <= NROUNDS; r++) begin : g_round
    aes_round #(.LAST(r == NROUNDS)) u_round (
      .state_i(st[r-1]),
      .rkey_i (rkeys_i[r]),
      .state_o(rnd[r])
    );

    always_ff @(posedge clk) st[r] <= rnd[r];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pay[r] <= '0;
      else        pay[r] <= (r == 1) ? pay_i : pay[r-1];
    end
  end

  assign blk_o = st[NROUNDS];
  assign pay_o = pay[NROUNDS];
endmodule
