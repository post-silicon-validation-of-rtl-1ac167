// tb_pll_clk_div: checks the TMR divider: for several divset values the
// output period is divset input cycles (2 for divset 0 and 1) and the high
// time divset/2 cycles.
module tb_pll_clk_div;
  logic clk = 0, rst_n = 1, q;
  logic [5:0] ds;
  int checks = 0, failures = 0;
  int cyc = 0;

  pll_clk_div dut (.clk(clk), .rst_n(rst_n), .divset(ds), .clk_div_out(q));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int vals [6] = '{0, 2, 3, 8, 13, 63};
    int r0, f0, r1, n;
    for (int i = 0; i < 6; i++) begin
      ds = 6'(vals[i]);
      n  = (vals[i] < 2) ? 2 : vals[i];
      rst_n = 1; #1 rst_n = 0; #1 rst_n = 1;
      repeat (3) @(posedge q);
      r0 = cyc;
      @(negedge q); f0 = cyc;
      @(posedge q); r1 = cyc;
      check(r1 - r0 == n, $sformatf("divset %0d period %0d", vals[i], r1 - r0));
      check(f0 - r0 == n / 2, $sformatf("divset %0d high %0d", vals[i], f0 - r0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
