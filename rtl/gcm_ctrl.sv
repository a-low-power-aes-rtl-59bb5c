// gcm_ctrl: control FSM of the AES-GCM core and source of the clock select.
//
// Sequence for one message (all counts in 128-bit blocks):
//   IDLE  - wait for start; n_aad_i and n_text_i are captured.
//   KEY   - 11 cycles on the key clock: round keys 0..10 (load on cycle 0).
//   HGEN  - 10 cycles on the run clock: lanes 0/1 of the AES pipelines
//           encrypt 0 and J0; the counter is set to 2, the GHASH is cleared.
//   SUB   - 3 cycles on the subkey clock: capture H and E_K(J0), square twice.
//   DATA  - run clock: take up to four blocks per cycle from the input
//           (AAD first, then plaintext) and append the length block
//           len(A)||len(C) in the first free lane, in a group of its own if
//           the last input group was full.
//   DRAIN - run clock until the GHASH reports its last step.
//   DONE  - one cycle, all clocks gated off, done_o high: the tag is valid.
// sel_o is registered and names the register group clocked by the next edge,
// so each phase's registers see exactly the edges of that phase and no others.
//
// Input handshake: a group is taken on an edge where in_valid_i and in_ready_o
// are both high; it must be packed (four blocks except possibly the last).
// The document only says that sel comes from an FSM-based control block; the
// phases, their lengths and the handshake are this design's choices.
module gcm_ctrl
  import aes_gcm_pkg::*;
(
  input  logic             clk,                 // free-running clock
  input  logic             rst_n,               // async reset, active low
  input  logic             start_i,             // begin a message (in IDLE)
  input  logic [CNT_W-1:0] n_aad_i,             // AAD blocks
  input  logic [CNT_W-1:0] n_text_i,            // plaintext blocks
  input  logic             in_valid_i,          // input group present
  output logic             in_ready_o,          // input group accepted
  input  logic             ghash_done_i,        // GHASH finished
  output cg_sel_e          sel_o,               // clock demultiplexer select
  output logic             key_load_o,          // start the key schedule
  output logic             sub_start_o,         // capture H and E_K(J0)
  output logic             ctr_load_o,          // reset the counter
  output logic             hgen_o,              // encrypt 0 / J0
  output logic             ghash_clear_o,       // clear the hash
  output kind_e            lane_kind_o [LANES], // kind of each lane this cycle
  output blk_t             len_blk_o,           // len(A)||len(C) in bits
  output logic [CNT_W-1:0] n_blocks_o,          // GHASH block count n
  output logic             busy_o,
  output logic             done_o               // tag valid (one cycle)
);
  typedef enum logic [2:0] {S_IDLE, S_KEY, S_HGEN, S_SUB, S_DATA, S_DRAIN, S_DONE} state_e;

  state_e           state, state_n;
  logic [3:0]       cnt;        // cycles spent in the current phase
  logic [CNT_W-1:0] n_aad, n_text, issued;
  logic [CNT_W-1:0] n_user;
  logic             issue, len_here;
  logic [2:0]       n_take;

  function automatic cg_sel_e dom(input state_e s);
    unique case (s)
      S_KEY:                 return CG_KEY;
      S_SUB:                 return CG_SUB;
      S_HGEN, S_DATA, S_DRAIN: return CG_RUN;
      default:               return CG_NONE;
    endcase
  endfunction

  assign n_user     = n_aad + n_text;
  assign n_blocks_o = n_user + 1'b1;
  assign len_blk_o  = {25'd0, n_aad, 7'd0, 25'd0, n_text, 7'd0};

  always_comb begin
    in_ready_o = (state == S_DATA) && (issued < n_user);
    issue      = (state == S_DATA) && ((issued < n_user) ? in_valid_i : 1'b1);
    len_here   = 1'b0;
    n_take     = '0;
    for (int j = 0; j < LANES; j++) begin
      logic [CNT_W-1:0] idx;
      idx = issued + CNT_W'(j);
      lane_kind_o[j] = K_NONE;
      if (issue) begin
        if (idx < n_aad)       lane_kind_o[j] = K_AAD;
        else if (idx < n_user) lane_kind_o[j] = K_TEXT;
        else if (idx == n_user) begin
          lane_kind_o[j] = K_LEN;
          len_here       = 1'b1;
        end
        if (idx < n_user) n_take = n_take + 3'd1;
      end
    end
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:  if (start_i) state_n = S_KEY;
      S_KEY:   if (cnt == 4'(NROUNDS)) state_n = S_HGEN;
      S_HGEN:  if (cnt == 4'(NROUNDS - 1)) state_n = S_SUB;
      S_SUB:   if (cnt == 4'd2) state_n = S_DATA;
      S_DATA:  if (len_here) state_n = S_DRAIN;
      S_DRAIN: if (ghash_done_i) state_n = S_DONE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      sel_o  <= CG_NONE;
      cnt    <= '0;
      n_aad  <= '0;
      n_text <= '0;
      issued <= '0;
    end else begin
      state <= state_n;
      sel_o <= dom(state_n);
      cnt   <= (state_n != state) ? '0 : cnt + 4'd1;
      if (state == S_IDLE && start_i) begin
        n_aad  <= n_aad_i;
        n_text <= n_text_i;
        issued <= '0;
      end else if (issue) begin
        issued <= issued + CNT_W'(n_take);
      end
    end
  end

  assign key_load_o    = (state == S_KEY)  && (cnt == 4'd0);
  assign sub_start_o   = (state == S_SUB)  && (cnt == 4'd0);
  assign ctr_load_o    = (state == S_HGEN) && (cnt == 4'd0);
  assign ghash_clear_o = (state == S_HGEN);
  assign hgen_o        = (state == S_HGEN);
  assign busy_o        = (state != S_IDLE);
  assign done_o        = (state == S_DONE);
endmodule
