// tb_tb_clk_gen: checks the gated test clock: while bram_full is high the
// output toggles on every system clock edge (half the system frequency);
// when bram_full drops the clock stops low within one system cycle and
// restarts when bram_full rises again.
module tb_tb_clk_gen;
  logic sys_clk = 0, rst_n = 1, full = 1, tclk;
  int checks = 0, failures = 0;

  tb_clk_gen dut (.sys_clk(sys_clk), .rst_n(rst_n), .bram_full(full), .tb_clk(tclk));

  always #5 sys_clk = ~sys_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic prev;
    #1 rst_n = 0; #2 rst_n = 1;
    check(tclk == 0, "reset");
    repeat (3) begin
      for (int i = 0; i < 20; i++) begin
        prev = tclk;
        @(negedge sys_clk);
        check(tclk == ~prev, "clock did not toggle while bram_full high");
      end
      full = 0;
      @(negedge sys_clk);
      for (int i = 0; i < 10; i++) begin
        @(negedge sys_clk);
        check(tclk == 0, "clock runs while bram_full low");
      end
      full = 1;
      @(negedge sys_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
