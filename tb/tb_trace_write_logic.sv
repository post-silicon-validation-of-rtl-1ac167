// tb_trace_write_logic: checks the trace write controller over three fill
// cycles: one write per BRAM clock with addresses 0..511 in order and the
// input sample of that clock as data; bram_full low after the 512th write
// with the write enable off and the address held; the address back to 0 on
// the rising edge of program_clk_enable and bram_full high again only
// after its falling edge.
module tb_trace_write_logic;
  localparam int D = 512;
  logic clk = 0, rst_n = 1, pce = 0, we, full;
  logic [15:0] din = 0, wd, fc;
  logic [8:0] wa;
  int checks = 0, failures = 0;

  trace_write_logic #(.DEPTH(D), .W(16)) dut (.bram_clk(clk), .rst_n(rst_n), .din(din),
    .program_clk_enable(pce), .we(we), .waddr(wa), .wdata(wd), .bram_full(full), .fill_count(fc));

  always #5 clk = ~clk;
  // new data after every write clock, as the test clock would deliver it
  always @(negedge clk) #1 din <= din + 16'd1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, bad;
    logic [15:0] first;
    #1 rst_n = 0; #2 rst_n = 1;
    check(full && !we && fc == 0, "reset");
    for (int fill = 0; fill < 3; fill++) begin
      n = 0; bad = 0;
      // count the writes seen at the BRAM (rising edge)
      while (full || we) begin
        @(posedge clk);
        if (we) begin
          if (n == 0) first = wd;
          if (wa != 9'(n) || wd != first + 16'(n)) bad++;
          n++;
        end
      end
      check(n == D, $sformatf("fill %0d: %0d writes", fill, n));
      check(bad == 0, $sformatf("fill %0d: %0d writes out of order", fill, bad));
      check(fc == 16'(fill + 1), "fill count");
      repeat (20) @(negedge clk);
      check(!full && !we && wa == 9'(D - 1), "full state not held");
      @(posedge clk); pce = 1;
      repeat (3) @(negedge clk);
      check(!full && wa == 0 && !we, "rising program_clk_enable must reset the address only");
      @(posedge clk); pce = 0;
      @(negedge clk); #1;
      check(full, "falling program_clk_enable must raise bram_full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
