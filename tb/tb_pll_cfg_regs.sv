// tb_pll_cfg_regs: checks the three DDR PLL configuration registers:
// address decoding of writes, divset taking the low six bits, and an
// injected upset in one copy of every register leaving the outputs intact.
module tb_pll_cfg_regs;
  logic clk = 0, rst_n = 1, we = 0, mm;
  logic [1:0] a = 0;
  logic [31:0] d = 0, co, fi, im = 0;
  logic [2:0] ic = 0;
  logic [5:0] dv;
  int checks = 0, failures = 0;

  pll_cfg_regs dut (.cfg_clk(clk), .rst_n(rst_n), .cfg_we(we), .cfg_addr(a), .cfg_data(d),
                    .inj_copy(ic), .inj_mask(im), .coarse(co), .fine(fi), .divset(dv), .mismatch(mm));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [1:0] aa, input logic [31:0] dd);
    @(negedge clk); we = 1; a = aa; d = dd;
    @(negedge clk); we = 0;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0; #2 rst_n = 1;
    check(co == 0 && fi == 0 && dv == 0, "reset");
    wr(2'd0, 32'h0000_FFFF);
    check(co == 32'h0000_FFFF && fi == 0 && dv == 0, "coarse write");
    wr(2'd1, 32'h0000_000F);
    check(fi == 32'h0000_000F && co == 32'h0000_FFFF, "fine write");
    wr(2'd2, 32'hFFFF_FFC8);
    check(dv == 6'h08 && fi == 32'hF && co == 32'hFFFF, "divset write");
    wr(2'd3, 32'h1234_5678);
    check(dv == 6'h08 && fi == 32'hF && co == 32'hFFFF, "address 3 wrote a register");
    @(negedge clk); ic = 3'b010; im = 32'hFFFF_FFFF;
    @(negedge clk); ic = 0;
    check(dv == 6'h08 && fi == 32'hF && co == 32'hFFFF && mm, "upset reached outputs");
    @(negedge clk);
    check(!mm, "upset not scrubbed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
