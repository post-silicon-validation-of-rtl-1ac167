// tb_clk_div8: checks the divide-by-8 divider: after reset the output must
// have a period of exactly 8 input clocks with 4 high and 4 low.
module tb_clk_div8;
  logic clk = 0, rst_n = 0, q;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, last_fall = -1;

  clk_div8 dut (.clk(clk), .rst_n(rst_n), .clk_div_out(q));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge q) begin
    if (last_rise >= 0) begin
      checks++;
      if (cyc - last_rise != 8) begin failures++; $display("FAIL period %0d", cyc - last_rise); end
    end
    last_rise = cyc;
  end
  always @(negedge q) begin
    if (last_rise >= 0) begin
      checks++;
      if (cyc - last_rise != 4) begin failures++; $display("FAIL high time %0d", cyc - last_rise); end
    end
    last_fall = cyc;
  end

  initial begin
    #23 rst_n = 1;
    repeat (200) @(posedge clk);
    checks++;
    if (last_rise < 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
