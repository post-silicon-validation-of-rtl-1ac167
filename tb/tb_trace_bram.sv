// tb_trace_bram: checks the 512 x 72 two-clock trace memory: random writes
// on the write clock, reads on an unrelated read clock with one cycle of
// latency, and read data held while the read enable is low.
module tb_trace_bram;
  localparam int D = 512;
  logic wclk = 0, rclk = 0, we = 0, re = 0;
  logic [8:0] wa = 0, ra = 0;
  logic [71:0] wd = 0, rd;
  logic [71:0] model [D];
  int checks = 0, failures = 0;

  trace_bram dut (.wclk(wclk), .we(we), .waddr(wa), .wdata(wd), .rclk(rclk), .re(re), .raddr(ra), .rdata(rd));

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [71:0] held;
    for (int i = 0; i < D; i++) begin
      @(negedge wclk); we = 1; wa = 9'(i); wd = {8'($urandom), $urandom, $urandom};
      model[i] = wd;
    end
    @(negedge wclk); we = 0;
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(D - 1);
      @(negedge rclk); re = 1; ra = 9'(a);
      @(negedge rclk); re = 0;
      check(rd == model[a], $sformatf("read %0d", a));
      held = rd;
      ra = 9'($urandom);
      @(negedge rclk);
      check(rd == held, "data changed without read enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
