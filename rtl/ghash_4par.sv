// ghash_4par: four-parallel GHASH with fixed operands H, H^2, H^4 and 1.
//
// GHASH of blocks A_1..A_n is X = A_1 H^n + A_2 H^(n-1) + ... + A_n H. Blocks
// arrive four per clock in order; block A_i goes to lane (i-1) mod 4, and each
// lane keeps an accumulator Y_j <- (Y_j + A) * op_j using its own
// Karatsuba-Ofman multiplier. While more blocks follow in the lane, op_j = H^4.
// At the end each lane's last block still needs H^e, e in 1..4, so that all
// four lanes finish on the same clock; the final X is Y_0+Y_1+Y_2+Y_3.
// H^3 is never stored: an exponent is split over the lane's last two steps as
// e=1 -> (1, H), e=2 -> (1, H^2), e=3 -> (H^2, H), e=4 -> (1, H^4), where a
// step with no data multiplies a zero-padded accumulator. With only one step
// left, H^e is used directly (e is then 1, 2 or 4). For n = 10 this gives
// exactly the schedule ((A1 H^4+A5)H^4+A9)H^2 + ((A2 H^4+A6)H^4+A10)H +
// ((A3 H^4+A7)1+0)H^4 + ((A4 H^4+A8)H^2+0)H. When the last group holds 3 or
// 4 blocks one extra data-free flush step is appended.
//
// Interface: clear (one edge) empties the accumulators; n_blocks_i must then
// hold the total block count, including the length block, until done_o.
// A group is taken on each edge with in_valid high; lanes beyond the last
// block must be zero. done_o rises on the edge after the last step (one edge
// after the last group, two with a flush step) and hash_o is then valid.
// The splitting rule for general n is this design's generalisation of the
// document's 10-block example.
module ghash_4par
  import aes_gcm_pkg::*;
(
  input  logic             clk,              // gated run-domain clock
  input  logic             clear,            // start a new hash
  input  logic [CNT_W-1:0] n_blocks_i,       // total number of blocks n >= 1
  input  logic             in_valid,         // a group of blocks is present
  input  blk_t             in_blk_i [LANES], // group, lane j = block 4g+j+1
  input  blk_t             h_i,
  input  blk_t             h2_i,
  input  blk_t             h4_i,
  output blk_t             hash_o,           // X_n
  output logic             done_o
);
  blk_t             y      [LANES];
  blk_t             mul_a  [LANES];
  blk_t             mul_b  [LANES];
  blk_t             mul_y  [LANES];
  hop_e             op     [LANES];
  logic [CNT_W-1:0] step;      // steps done so far
  logic [CNT_W-1:0] n_groups;  // G = ceil(n/4)
  logic [CNT_W-1:0] n_steps;   // T = G, or G+1 with a flush step
  logic [2:0]       k_last;    // blocks in the last group, 1..4
  logic             advance;
  logic             data_step;
  logic             flush;     // this step is the data-free flush

  function automatic hop_e pow_op(input int e);
    unique case (e)
      1:       return OP_H;
      2:       return OP_H2;
      4:       return OP_H4;
      default: return OP_ONE;
    endcase
  endfunction

  always_comb begin
    n_groups  = (n_blocks_i + 32'd3) >> 2;
    k_last    = 3'(n_blocks_i - ((n_groups - 32'd1) << 2));
    n_steps   = n_groups + ((k_last >= 3'd3) ? 32'd1 : 32'd0);
    data_step = (step < n_groups);
    flush   = !data_step && (step < n_steps);
    advance   = (data_step && in_valid) || flush;
  end

  // Operand schedule.
  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      int gl, e, s, p;
      gl = (j < int'(k_last)) ? int'(n_groups) - 1 : int'(n_groups) - 2;
      e  = (j < int'(k_last)) ? int'(k_last) - j : 4 + int'(k_last) - j;
      s  = int'(n_steps) - gl;
      p  = int'(step) - gl;
      if (gl < 0 || p < 0)   op[j] = OP_H4;
      else if (s == 1)       op[j] = pow_op(e);
      else if (p < s - 2)    op[j] = OP_ONE;
      else if (p == s - 2)   op[j] = (e == 3) ? OP_H2 : OP_ONE;
      else                   op[j] = (e == 3) ? OP_H  : pow_op(e);
    end
  end

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    always_comb begin
      mul_a[j] = y[j] ^ ((data_step && in_valid) ? in_blk_i[j] : '0);
      unique case (op[j])
        OP_H:    mul_b[j] = h_i;
        OP_H2:   mul_b[j] = h2_i;
        OP_H4:   mul_b[j] = h4_i;
        default: mul_b[j] = '0;
      endcase
    end

    gf128_mul_ko u_mul (.a_i(mul_a[j]), .b_i(mul_b[j]), .y_o(mul_y[j]));

    always_ff @(posedge clk) begin
      if (clear)        y[j] <= '0;
      else if (advance) y[j] <= (op[j] == OP_ONE) ? mul_a[j] : mul_y[j];
    end
  end

  always_ff @(posedge clk) begin
    if (clear)        step <= '0;
    else if (advance) step <= step + 1'b1;
  end

  assign done_o = !clear && (step == n_steps);
  assign hash_o = y[0] ^ y[1] ^ y[2] ^ y[3];
endmodule
