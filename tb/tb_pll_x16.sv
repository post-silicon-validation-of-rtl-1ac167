// tb_pll_x16: checks the PLL model.  Open loop: the output period equals
// 2 x (base + ones(coarse) x coarse step + ones(fine) x fine step) for
// several settings.  Closed loop: the output runs at 16 x the reference.
// tdc_sel is always a thermometer code.
module tb_pll_x16;
  logic ref_clk = 0, lc = 0, pclk;
  logic [31:0] co = 0, fi = 0, tdc;
  int checks = 0, failures = 0;

  pll_x16 dut (.openloop_clk(ref_clk), .loop_cntrl(lc), .coarse(co), .fine(fi), .pll_clk(pclk), .tdc_sel(tdc));

  always #20 ref_clk = ~ref_clk;     // 40 ns reference

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic period(output realtime p);
    realtime t0;
    @(posedge pclk); @(posedge pclk); t0 = $realtime;
    repeat (10) @(posedge pclk);
    p = ($realtime - t0) / 10.0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge ref_clk) begin
    #1;
    checks++;
    if (((tdc + 32'd1) & tdc) != 0) begin failures++; $display("FAIL tdc_sel %h not thermometer", tdc); end
  end

  initial begin
    realtime p, e;
    int cs [4] = '{0, 3, 8, 31};
    int fs [4] = '{0, 5, 2, 32};
    for (int i = 0; i < 4; i++) begin
      co = (cs[i] == 32) ? '1 : ((32'd1 << cs[i]) - 1);
      fi = (fs[i] == 32) ? '1 : ((32'd1 << fs[i]) - 1);
      period(p);
      e = 2.0 * (200 + cs[i] * 40 + fs[i] * 5) / 1000.0;   // ns
      check(p > e * 0.99 && p < e * 1.01, $sformatf("open loop period %f ns expected %f", p, e));
    end
    lc = 1;
    repeat (4) @(posedge ref_clk);
    period(p);
    check(p > 2.49 && p < 2.51, $sformatf("closed loop period %f ns expected 2.5", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
