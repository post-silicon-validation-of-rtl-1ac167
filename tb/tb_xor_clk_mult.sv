// tb_xor_clk_mult: checks the XOR clock multiplier.  All 256 input patterns
// must give the parity of the inputs; then two input clocks 90 degrees apart
// must give an output at twice their frequency, and eight clocks 22.5
// degrees apart an output at eight times.
module tb_xor_clk_mult;
  logic [7:0] xc;
  logic       y;
  int checks = 0, failures = 0;
  int edges;

  xor_clk_mult dut (.xor_clk(xc), .clk_out(y));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count output rising edges
  always @(posedge y) edges++;

  initial begin
    for (int v = 0; v < 256; v++) begin
      xc = 8'(v);
      #1;
      check(y == ^xc, $sformatf("pattern %02h gave %0b", xc, y));
    end
    // x2: XOR_CLK0 and XOR_CLK1, period 80, 90 degrees (20) apart, 10 periods
    xc = '0; #5; edges = 0;
    for (int t = 0; t < 800; t++) begin
      xc[0] = (t % 80) < 40;
      xc[1] = ((t + 60) % 80) < 40;   // 20 later
      #1;
    end
    check(edges == 20, $sformatf("x2: %0d output edges in 10 input periods", edges));
    // x8: eight clocks 22.5 degrees apart (period 160, step 10), 10 periods
    xc = '0; #5; edges = 0;
    for (int t = 0; t < 1600; t++) begin
      for (int i = 0; i < 8; i++) xc[i] = ((t + 160 - 10 * i) % 160) < 80;
      #1;
    end
    check(edges >= 79 && edges <= 80, $sformatf("x8: %0d output edges in 10 input periods", edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
