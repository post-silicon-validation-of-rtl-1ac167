// tb_sram_block: checks the SRAM block through its pins.  The special
// registers are loaded; the same addresses in the two 6T arrays and the 8T
// array hold different data, chosen by SRAM_Sel; the 32 datain bits appear
// in both halves of the 64-bit dataout; unselected arrays get no bank
// clocks; PUF mode set through register 1 changes what a 6T read returns.
module tb_sram_block;
  logic clk = 0, rst_n = 0;
  logic [1:0] sel;
  logic [13:0] addr;
  logic read = 0, write = 0, sclk = 0;
  logic [31:0] din;
  logic [3:0] sa;
  logic [63:0] dout;
  logic sat, dat, puf;
  logic [15:0] dly;
  logic [31:0] c2, c3;
  logic [7:0] ga, gb;
  int checks = 0, failures = 0;
  int pa = 0, pb = 0;

  sram_block dut (.clk(clk), .rst_n(rst_n), .sram_sel(sel), .addr(addr), .read(read), .write(write),
    .datain(din), .spreg_clk(sclk), .spreg_addr(sa), .dataout(dout), .satest_en(sat), .dat_en(dat),
    .sa_delay(dly), .dat_cfg2(c2), .dat_cfg3(c3), .puf_mode(puf), .bank_gclk_a(ga), .bank_gclk_b(gb));

  always #5 clk = ~clk;
  always @(posedge (|ga)) pa++;
  always @(posedge (|gb)) pb++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic spw(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); sa = a; din = d;
    @(negedge clk); sclk = 1;
    @(negedge clk); sclk = 0;
  endtask

  task automatic acc(input logic [1:0] s, input logic [13:0] a, input bit w, input logic [31:0] d);
    @(negedge clk); sel = s; addr = a; din = d; write = w; read = !w;
    @(negedge clk); write = 0; read = 0;
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sel = 0; addr = 0; din = 0; sa = 0;
    #12 rst_n = 1;
    spw(4'd1, 32'h0000_00FF);
    spw(4'd2, 32'h0000_0055);
    spw(4'd3, 32'h0000_00AA);
    check(dly == 16'h00FF && !puf && c2 == 32'h55 && c3 == 32'hAA, "special registers");
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < 8; i++)
        acc(2'(s), 14'(i * 2047), 1, 32'h1000_0000 * (s + 1) + 32'(i));
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < 8; i++) begin
        logic [31:0] e;
        e = 32'h1000_0000 * (s + 1) + 32'(i);
        acc(2'(s), 14'(i * 2047), 0, '0);
        #1 check(dout == {e, e}, $sformatf("array %0d word %0d read %h", s, i, dout));
      end
    // bank clocks only in the selected 6T array
    begin
      int a0, b0;
      a0 = pa; b0 = pb;
      acc(2'd0, 14'h0400, 0, '0);
      acc(2'd2, 14'h0400, 0, '0);
      check(pa - a0 == 1 && pb - b0 == 0, $sformatf("bank clock pulses a=%0d b=%0d", pa - a0, pb - b0));
    end
    // PUF mode: read of all-zero words returns a non-zero fingerprint
    for (int i = 0; i < 8; i++) acc(2'd1, 14'(i), 1, 32'h0);
    spw(4'd1, 32'h8000_00FF);
    check(puf, "PUF bit not set");
    begin
      int ones;
      ones = 0;
      for (int i = 0; i < 8; i++) begin acc(2'd1, 14'(i), 0, '0); #1 ones += $countones(dout); end
      check(ones > 100 && ones < 412, $sformatf("PUF read gave %0d ones of 512", ones));
    end
    spw(4'd1, 32'h0000_00FF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
