// clk_gate_demux_tb: holds each select value for a random number of cycles
// (select changed just after a rising edge, as the controller does) and
// counts the rising edges on every gated clock: the selected output must see
// exactly one edge per cycle, the others none. Also checks that a select
// change while the clock is high does not reach the outputs gprev the next
// low phase.
module clk_gate_demux_tb;
  import aes_gcm_pkg::*;
  logic    clk = 0;
  cg_sel_e sel;
  logic [CG_OUTS-1:0] gclk;
  int cnt [CG_OUTS];
  int checks = 0, failures = 0;

  clk_gate_demux dut (.clk(clk), .sel(sel), .gclk_o(gclk));

  always #5 clk = ~clk;

  for (genvar i = 0; i < CG_OUTS; i++) begin : g_cnt
    always @(posedge gclk[i]) cnt[i]++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = CG_NONE;
    @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      int n;
      cg_sel_e s;
      s = cg_sel_e'($urandom_range(3));
      n = $urandom_range(5, 1);
      #1 sel = s;  // just after the edge, like a register output
      for (int i = 0; i < CG_OUTS; i++) cnt[i] = 0;
      repeat (n) @(posedge clk);
      #0;
      for (int i = 0; i < CG_OUTS; i++) begin
        checks++;
        // The edge that ends the hold is the n-th edge routed by s.
        if (cnt[i] != ((int'(s) == i + 1) ? n : 0)) begin
          failures++;
          $display("FAIL sel=%0d out %0d saw %0d edges, hold %0d", s, i, cnt[i], n);
        end
      end
      // While clk is high the latch is closed: outputs must not change.
      #1;
      begin
        logic [CG_OUTS-1:0] gprev;
        gprev = gclk;
        sel = cg_sel_e'((int'(s) % 3) + 1);
        #2;
        checks++;
        if (gclk !== gprev) begin failures++; $display("FAIL gated clock changed during high phase"); end
        sel = s;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
