// tb_hermes_reset_gen: checks the processor reset sequence after the
// board reset: ColdReset high from the start, one PLL reset pulse of two
// bus cycles, ColdReset released after the PLL reset has ended, and both
// then stay low for good.
module tb_hermes_reset_gen;
  logic clk = 0, rst_n = 1, pr, cr;
  int checks = 0, failures = 0;

  hermes_reset_gen dut (.clk(clk), .rst_n(rst_n), .pll_reset(pr), .cold_reset(cr));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pr_rise, pr_fall, cr_fall, pulses;
    for (int r = 0; r < 3; r++) begin
      pr_rise = -1; pr_fall = -1; cr_fall = -1; pulses = 0;
      @(negedge clk); rst_n = 0; #1;
      check(cr && !pr, "reset values");
      @(negedge clk); rst_n = 1;
      for (int c = 1; c < 40; c++) begin
        logic pp, pc;
        pp = pr; pc = cr;
        @(negedge clk);
        if (pr && !pp) begin pr_rise = c; pulses++; end
        if (!pr && pp) pr_fall = c;
        if (!cr && pc) cr_fall = c;
        if (cr && !pc) check(0, "ColdReset rose again");
      end
      check(pulses == 1, "exactly one PLL reset pulse");
      check(pr_fall - pr_rise == 2, $sformatf("PLL reset pulse %0d cycles", pr_fall - pr_rise));
      check(cr_fall > pr_fall, "ColdReset released before the PLL reset ended");
      check(!cr && !pr, "resets not released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
