// aes_key_expand: iterative AES-128 key schedule.
//
// Produces the eleven 128-bit round keys and keeps them in registers for the
// whole message, so all four AES pipelines share one schedule. One round key
// is produced per clock with four S-boxes (RotWord/SubWord/Rcon on the last
// word, then the xor chain across the four words).
//
// Timing: assert load for one cycle with key_i valid; round key 0 is written
// on that edge, key i on the i-th following edge, and done rises after ten
// more edges (11 edges in all). The clock is the gated key-domain clock, so the
// registers only toggle while the schedule is being computed. The document
// states only "128-bit key, 10 rounds"; the iterative schedule is this
// design's choice.
module aes_key_expand
  import aes_gcm_pkg::*;
(
  input  logic clk,                 // gated key-domain clock
  input  logic load,                // start a new schedule from key_i
  input  blk_t key_i,               // cipher key
  output blk_t rkeys_o [NROUNDS+1], // round keys 0..10
  output logic done_o               // all round keys valid
);
  blk_t       rk [NROUNDS+1];
  logic [3:0] idx;     // index of the next round key to produce
  logic [7:0] rcon;
  blk_t       prev, next;
  logic [31:0] w3_sub;

  assign prev = rk[idx - 4'd1];

  for (genvar b = 0; b < 4; b++) begin : g_sub
    // RotWord then SubWord on the last word of the previous key.
    aes_sbox u_sbox (.x(prev[31 - 8*((b+1)%4) -: 8]), .y(w3_sub[31-8*b -: 8]));
  end

  always_comb begin
    logic [31:0] t;
    rcon = 8'h01;
    for (int i = 1; i < 11; i++)
      if (4'(i) < idx) rcon = xtime(rcon);
    t = w3_sub ^ {rcon, 24'h0};
    next[127:96] = prev[127:96] ^ t;
    next[95:64]  = prev[95:64]  ^ next[127:96];
    next[63:32]  = prev[63:32]  ^ next[95:64];
    next[31:0]   = prev[31:0]   ^ next[63:32];
  end

  always_ff @(posedge clk) begin
    if (load) begin
      rk[0] <= key_i;
      idx   <= 4'd1;
    end else if (idx <= 4'(NROUNDS)) begin
      rk[idx] <= next;
      idx     <= idx + 4'd1;
    end
  end

  assign rkeys_o = rk;
  assign done_o  = (idx == 4'(NROUNDS + 1));
endmodule
