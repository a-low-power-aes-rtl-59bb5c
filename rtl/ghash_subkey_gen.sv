// ghash_subkey_gen: hash-subkey generator, H, H^2 and H^4 by squaring.
//
// The 4-parallel GHASH only multiplies by H, H^2 and H^4 (and 1). H^2 and H^4
// are powers of two of H, so one classic squarer (gf128_square) replaces the
// block multiplier a subkey generator would otherwise need. The same register
// group also keeps E_K(J0), which masks the final hash to form the tag.
//
// Timing, on the gated subkey-domain clock: the edge with start high loads H
// and E_K(J0); the next edge writes H^2 = H*H; the one after writes
// H^4 = H^2*H^2 and raises done_o (three edges in all). Outputs hold while the
// clock is gated off. The squaring method follows the document; sharing one
// squarer over two cycles and keeping E_K(J0) here are this design's choices.
module ghash_subkey_gen
  import aes_gcm_pkg::*;
(
  input  logic clk,      // gated subkey-domain clock
  input  logic start,    // load h_i and ekj0_i
  input  blk_t h_i,      // E_K(0^128)
  input  blk_t ekj0_i,   // E_K(J0)
  output blk_t h_o,
  output blk_t h2_o,
  output blk_t h4_o,
  output blk_t ekj0_o,
  output logic done_o    // H^2 and H^4 valid
);
  blk_t       h, h2, h4, ekj0, sq_in, sq_out;
  logic [1:0] step;      // 1: square H next, 2: square H^2 next, 3: done

  assign sq_in = (step == 2'd1) ? h : h2;

  gf128_square u_sq (.a_i(sq_in), .y_o(sq_out));

  always_ff @(posedge clk) begin
    if (start) begin
      h    <= h_i;
      ekj0 <= ekj0_i;
      step <= 2'd1;
    end else begin
      unique case (step)
        2'd1:    begin h2 <= sq_out; step <= 2'd2; end
        2'd2:    begin h4 <= sq_out; step <= 2'd3; end
        default: ;
      endcase
    end
  end

  assign h_o    = h;
  assign h2_o   = h2;
  assign h4_o   = h4;
  assign ekj0_o = ekj0;
  assign done_o = (step == 2'd3);
endmodule
