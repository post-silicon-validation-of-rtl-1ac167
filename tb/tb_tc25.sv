// tb_tc25: checks the TC25 chip through its pins, with the SRAM arrays cut
// to 8 rows per bank half to keep the run short.  The chip clock comes from
// the XOR multiplier (input 0 only); the testbench writes the special
// registers, writes and reads random words in all three arrays with the
// data replicated on both 32-bit halves of the 64-bit output, reads them on
// the pads through BLK_SEL, and checks the output mux for the HERMES and
// PLL selections.  It then times the divide-by-8 output with 1, 2 and 8
// phase-shifted XOR inputs and with the DDR PLL selected by CLK_SEL.
module tb_tc25 import tc25_pkg::*; ;
  localparam int ROWS = 8;
  logic [7:0] xc = 0;
  logic csel = 0, rst_n = 1, rd = 0, wr = 0, sclk = 0;
  logic [1:0] blk = 2'(BLK_SRAM), ssel = 0;
  logic [13:0] addr = 0;
  logic [31:0] din = 0;
  logic [3:0] sa = 0;
  logic pcc = 0, pwe = 0, pref = 0, ploop = 0;
  logic [1:0] pa = 0;
  logic [31:0] pdat = 0, pim = 0;
  logic [2:0] pic = 0;
  logic [78:0] hout = 0, pads;
  logic hclk, cdo, cclk, puf, pmm, pdc;
  logic [7:0] ga, gb;
  int checks = 0, failures = 0;
  int phases = 1;

  tc25 #(.SRAM_ROWS(ROWS)) dut (.xor_clk(xc), .clk_sel(csel), .blk_sel(blk), .chip_rst_n(rst_n),
    .sram_sel(ssel), .address(addr), .datain(din), .read(rd), .write(wr), .spreg_clk(sclk), .spreg_addr(sa),
    .pll_cfg_clk(pcc), .pll_cfg_we(pwe), .pll_cfg_addr(pa), .pll_cfg_data(pdat),
    .pll_openloop_clk(pref), .pll_loop_cntrl(ploop), .pll_inj_copy(pic), .pll_inj_mask(pim),
    .hermes_out(hout), .hermes_core_clk(hclk), .pad_out(pads), .clk_div_out(cdo), .chip_clk(cclk),
    .sram_bank_gclk_a(ga), .sram_bank_gclk_b(gb), .sram_puf_mode(puf), .pll_cfg_mismatch(pmm),
    .pll_div_clk(pdc));

  always #10 xc[0] = ~xc[0];          // 50 MHz test clock on XOR input 0
  for (genvar k = 1; k < 8; k++) begin : g_x
    always @(xc[0]) begin
      if (k < phases) xc[k] <= #(1.25ns * k * (8 / phases)) xc[0];
      else            xc[k] <= 1'b0;
    end
  end
  always #10 pref = ~pref;
  always #15 pcc = ~pcc;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic spw(input logic [3:0] a, input logic [31:0] d);
    @(negedge cclk); sa = a; din = d;
    @(negedge cclk); sclk = 1;
    @(negedge cclk); sclk = 0;
  endtask

  task automatic acc(input logic [1:0] s, input logic [13:0] a, input bit w, input logic [31:0] d);
    @(negedge cclk); ssel = s; addr = a; wr = w; rd = !w; din = d;
    @(negedge cclk); wr = 0; rd = 0;
  endtask

  task automatic measure_div(output realtime p);
    realtime t0;
    @(posedge cdo); @(posedge cdo); t0 = $realtime;
    repeat (4) @(posedge cdo);
    p = ($realtime - t0) / 4.0;
  endtask

  function automatic logic [13:0] rand_addr(logic [1:0] s);
    // bank, half, row (below ROWS), column
    logic [13:0] a = {3'($urandom), 1'($urandom), 7'($urandom_range(ROWS - 1)), 3'($urandom)};
    return a;
  endfunction

  function automatic logic [13:0] key(logic [1:0] s, logic [13:0] a);
    return a;
  endfunction

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [13:0] a [64];
    logic [31:0] d [64];
    logic [1:0]  s [64];
    realtime p, e;
    #1 rst_n = 0; #5 rst_n = 1;
    spw(4'd1, 32'h0000_00FF);
    spw(4'd2, 32'hA5A5_0001);
    spw(4'd3, 32'h0000_1234);
    check(!puf && dut.u_sram.sa_delay == 16'h00FF, "special register 1");
    check(dut.u_sram.dat_cfg2 == 32'hA5A5_0001 && dut.u_sram.dat_cfg3 == 32'h0000_1234, "special registers 2 and 3");
    for (int i = 0; i < 64; i++) begin
      s[i] = 2'($urandom_range(2));
      forever begin
        bit clash;
        clash = 0;
        a[i] = rand_addr(s[i]);
        for (int j = 0; j < i; j++) if (key(s[j], a[j]) == key(s[i], a[i]) && s[j] == s[i]) clash = 1;
        if (!clash) break;
      end
      d[i] = $urandom;
      acc(s[i], a[i], 1, d[i]);
    end
    for (int i = 63; i >= 0; i--) begin
      logic dup;
      dup = 0;
      for (int j = i + 1; j < 64; j++) if (key(s[j], a[j]) == key(s[i], a[i]) && s[j] == s[i]) dup = 1;
      if (dup) continue;
      acc(s[i], a[i], 0, 0); #1;
      check(pads == {15'h0, d[i], d[i]}, $sformatf("array %0d addr %h: %h expected %h", s[i], a[i], pads[63:0], d[i]));
      if (pads != {15'h0, d[i], d[i]}) for (int j = 0; j < 64; j++) if (d[j] == pads[31:0]) $display("  = word %0d array %0d addr %h (i=%0d)", j, s[j], a[j], i);
    end
    hout = {15'($urandom), $urandom, $urandom};
    blk = 2'(BLK_HERMES); #1 check(pads == hout, "HERMES outputs on the pads");
    blk = 2'(BLK_PLL);    #1 check(pads[78:32] == 0 && ((pads[31:0] + 32'd1) & pads[31:0]) == 0, "PLL TDC on the pads");
    blk = 2'(BLK_OFF);    #1 check(pads == 0, "pads off");
    // XOR multiplier: 50 MHz input, div8 of 1x, 2x, 8x
    measure_div(p); check(p > 159.0 && p < 161.0, $sformatf("div8 1x: %f", p));
    phases = 2; repeat (3) @(posedge xc[0]);
    measure_div(p); check(p > 79.0 && p < 81.0, $sformatf("div8 2x: %f", p));
    phases = 8; repeat (3) @(posedge xc[0]);
    measure_div(p); check(p > 19.0 && p < 21.0, $sformatf("div8 8x: %f", p));
    phases = 1;
    // PLL as the chip clock
    @(negedge pcc); pwe = 1; pa = 0; pdat = 32'h0000_0003;
    @(negedge pcc); pa = 2; pdat = 32'd8;
    @(negedge pcc); pwe = 0;
    csel = 1;
    e = 8 * 8 * 2.0 * (200 + 2 * 40) / 1000.0;
    measure_div(p); check(p > e * 0.98 && p < e * 1.02, $sformatf("div8 of PLL: %f expected %f", p, e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
