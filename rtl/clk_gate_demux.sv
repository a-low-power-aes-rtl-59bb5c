// clk_gate_demux: clock gating by a demultiplexer.
//
// The free-running clock is steered to at most one of CG_OUTS register groups,
// chosen by sel (cg_sel_e: CG_KEY -> gclk_o[0], CG_SUB -> gclk_o[1],
// CG_RUN -> gclk_o[2], CG_NONE -> none). A group receives clock edges only in
// the phase in which its registers have to change. sel comes from a register
// of the control FSM and changes just after a rising edge; it is caught in a
// latch that is transparent while clk is low, so a gated clock can only start
// or stop while clk is low and no output pulse is ever cut short.
//
// Timing: a sel value registered on edge t selects the destination of edge
// t+1. The demultiplexer follows the document's clock-gating structure; the
// low-phase latch that keeps the gated clocks free of glitches is this
// design's addition (the latch reported by lint is that intended latch).
module clk_gate_demux
  import aes_gcm_pkg::*;
(
  input  logic             clk,     // free-running clock
  input  cg_sel_e          sel,     // destination of the next clock pulse
  output logic [CG_OUTS-1:0] gclk_o // gated clocks
);
  cg_sel_e sel_l;

  always_latch begin
    if (!clk) sel_l = sel;
  end

  for (genvar i = 0; i < CG_OUTS; i++) begin : g_out
    assign gclk_o[i] = clk && (sel_l == cg_sel_e'(i + 1));
  end
endmodule
