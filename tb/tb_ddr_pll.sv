// tb_ddr_pll: checks the DDR PLL block end to end, the way its logic was
// verified before tape-out: configure coarse, fine and divset through the
// configuration port and compare the divided clock's period with the PLL
// period times divset; an upset injected into the registers must not
// change the frequency.
module tb_ddr_pll;
  logic cclk = 0, rst_n = 1, we = 0, refc = 0, pclk, dclk, mm;
  logic [1:0] a = 0;
  logic [31:0] d = 0, tdc, im = 0;
  logic [2:0] ic = 0;
  logic [5:0] dv;
  int checks = 0, failures = 0;

  ddr_pll dut (.cfg_clk(cclk), .rst_n(rst_n), .cfg_we(we), .cfg_addr(a), .cfg_data(d),
    .openloop_clk(refc), .loop_cntrl(1'b0), .inj_copy(ic), .inj_mask(im), .pll_clk(pclk),
    .clk_div_out(dclk), .tdc_sel(tdc), .cfg_mismatch(mm), .divset(dv));

  always #10 cclk = ~cclk;
  always #20 refc = ~refc;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [1:0] aa, input logic [31:0] dd);
    @(negedge cclk); we = 1; a = aa; d = dd;
    @(negedge cclk); we = 0;
  endtask

  task automatic per(output realtime p);
    realtime t0;
    @(posedge dclk); @(posedge dclk); t0 = $realtime;
    repeat (4) @(posedge dclk);
    p = ($realtime - t0) / 4.0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime p, e;
    #1 rst_n = 0; #2 rst_n = 1;
    wr(2'd0, 32'h0000_00FF);   // 8 coarse steps
    wr(2'd1, 32'h0000_0003);   // 2 fine steps
    wr(2'd2, 32'd6);
    e = 6 * 2.0 * (200 + 8 * 40 + 2 * 5) / 1000.0;
    per(p);
    check(p > e * 0.98 && p < e * 1.02, $sformatf("divided period %f expected %f", p, e));
    wr(2'd2, 32'd10);
    e = 10 * 2.0 * (200 + 8 * 40 + 2 * 5) / 1000.0;
    per(p);
    check(p > e * 0.98 && p < e * 1.02, $sformatf("divided period %f expected %f", p, e));
    @(negedge cclk); ic = 3'b100; im = '1;
    @(negedge cclk); ic = 0;
    check(mm, "upset not flagged");
    per(p);
    check(p > e * 0.98 && p < e * 1.02, "frequency changed by an upset");
    check(!mm && dv == 6'd10, "upset not scrubbed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
