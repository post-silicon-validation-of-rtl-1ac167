// tb_trace_read_logic: checks the host-side read controller: every
// pipe_read cycle (sampled on the falling host clock edge) issues one read
// at the next address, addresses run 0..511 and wrap, and no read is
// issued while pipe_read is low.
module tb_trace_read_logic;
  localparam int D = 512;
  logic clk = 0, rst_n = 1, pr = 0, re;
  logic [8:0] ra;
  int checks = 0, failures = 0;

  trace_read_logic #(.DEPTH(D)) dut (.ok_clk(clk), .rst_n(rst_n), .pipe_read(pr), .re(re), .raddr(ra));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int expect_a = 0, reads = 0, bad = 0, idle_bad = 0;
    #1 rst_n = 0; #2 rst_n = 1;
    while (reads < 2 * D + 17) begin
      @(posedge clk);
      pr = ($urandom_range(3) != 0);
      @(negedge clk); #1;
      if (pr) begin
        if (!re || ra != 9'(expect_a)) bad++;
        expect_a = (expect_a + 1) % D;
        reads++;
      end else if (re) idle_bad++;
    end
    check(bad == 0, $sformatf("%0d reads at the wrong address", bad));
    check(idle_bad == 0, "read issued without pipe_read");
    check(expect_a == 17, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
