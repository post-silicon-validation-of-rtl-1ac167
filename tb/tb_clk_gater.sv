// tb_clk_gater: checks the clock gate.  With the enable changed only while
// the clock is low, the gated clock must pulse exactly in the enabled
// cycles; an enable that drops while the clock is high must not shorten
// the pulse already started.
module tb_clk_gater;
  logic clk = 0, en = 0, g;
  int checks = 0, failures = 0;
  int pulses = 0;

  clk_gater dut (.clk(clk), .en(en), .gclk(g));

  always #5 clk = ~clk;
  always @(posedge g) pulses++;

  initial begin
    #5000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int expect_p = 0;
    @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      en = ($urandom % 2) == 1;
      if (en) expect_p++;
      @(negedge clk);
    end
    checks++;
    if (pulses != expect_p) begin failures++; $display("FAIL pulses %0d expected %0d", pulses, expect_p); end
    // enable dropped in the high phase: pulse must last the whole high phase
    en = 1;
    @(posedge clk); #2 en = 0;
    #1; checks++;
    if (g !== 1'b1) begin failures++; $display("FAIL gated clock cut short"); end
    @(negedge clk); #1; checks++;
    if (g !== 1'b0) begin failures++; $display("FAIL gated clock not low"); end
    @(posedge clk); #1; checks++;
    if (g !== 1'b0) begin failures++; $display("FAIL gated clock pulsed while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
