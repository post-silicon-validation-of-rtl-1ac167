// tb_clk_mux2: checks that CLK_SEL picks the XOR clock (0) or the PLL clock (1).
module tb_clk_mux2;
  logic a, b, s, y;
  int checks = 0, failures = 0;

  clk_mux2 dut (.clk_xor(a), .clk_pll(b), .clk_sel(s), .clk_out(y));

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, b, a} = 3'(v);
      #1;
      checks++;
      if (y != (s ? b : a)) begin failures++; $display("FAIL sel=%0b a=%0b b=%0b y=%0b", s, a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
