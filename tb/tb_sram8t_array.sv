// tb_sram8t_array: checks the two-port 8T array: writes and reads in the
// same cycle to different words, a write that collides with a read of the
// same word landing, and read data appearing at the falling edge after the
// read.
module tb_sram8t_array;
  logic clk = 0, we = 0, re = 0;
  logic [13:0] wa, ra;
  logic [63:0] din, dout;
  int checks = 0, failures = 0;

  sram8t_array dut (.clk(clk), .sel(1'b1), .we(we), .waddr(wa), .din(din), .re(re), .raddr(ra), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] pat(input logic [13:0] a, input int k);
    return {18'(k), a, 18'(k * 3), a} ^ 64'hDEAD_BEEF_0000_0000;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill 64 words spread over the array
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; wa = 14'(i * 257); din = pat(14'(i * 257), 0);
    end
    @(negedge clk); we = 0;
    // read word i while writing word i+1 with new data
    for (int i = 0; i < 63; i++) begin
      @(negedge clk);
      re = 1; ra = 14'(i * 257);
      we = 1; wa = 14'((i + 1) * 257); din = pat(14'((i + 1) * 257), 1);
      @(posedge clk); #1;
      @(negedge clk); #1;
      check(dout == pat(14'(i * 257), (i == 0) ? 0 : 1), $sformatf("read %0d got %h", i, dout));
      re = 0; we = 0;
    end
    // same-word read and write: old data
    @(negedge clk); re = 1; ra = 14'd5; we = 1; wa = 14'd5; din = 64'h1111;
    @(negedge clk); re = 0; we = 0;
    @(negedge clk); re = 1; ra = 14'd5;
    @(negedge clk); re = 0; #1;
    check(dout == 64'h1111, "word written in read/write collision cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
