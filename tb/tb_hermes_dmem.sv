// tb_hermes_dmem: checks the data memory: byte-enabled writes and reads in
// both regions (0x0000 and 0x1000) against a model, the regions kept
// apart, the hello-world text preloaded at 0x1000, and the hit flag.
module tb_hermes_dmem;
  logic clk = 0, rden = 0, wren = 0, hit;
  logic [3:0] be = 0;
  logic [31:0] a = 0, wd = 0, rd;
  logic [31:0] model [2][32];
  logic [31:0] hello [4];
  int checks = 0, failures = 0;

  hermes_dmem #(.INIT_1000("tb/hermes_hello.hex")) dut (.clk(clk), .rden(rden), .wren(wren), .be(be),
    .addr(a), .wdata(wd), .rdata(rd), .hit(hit));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] addr_of(int r, int w);
    return {2'b00, (r == 0) ? 14'h0000 : 14'h1000, 16'(4 * w)};
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    $readmemh("tb/hermes_hello.hex", hello);
    for (int w = 0; w < 4; w++) begin
      @(negedge clk); rden = 1; a = addr_of(1, w);
      @(negedge clk); rden = 0;
      check(rd == hello[w], $sformatf("hello word %0d = %h", w, rd));
    end
    for (int r = 0; r < 2; r++) for (int w = 0; w < 32; w++) begin
      model[r][w] = $urandom;
      @(negedge clk); wren = 1; be = 4'hF; a = addr_of(r, w); wd = model[r][w];
    end
    @(negedge clk); wren = 0;
    for (int i = 0; i < 300; i++) begin
      int r, w;
      r = $urandom_range(1);
      w = $urandom_range(31);
      if ($urandom_range(1)) begin
        logic [31:0] v;
        logic [3:0] b;
        v = $urandom;
        b = 4'($urandom);
        @(negedge clk); wren = 1; be = b; a = addr_of(r, w); wd = v;
        for (int k = 0; k < 4; k++) if (b[k]) model[r][w][8*k +: 8] = v[8*k +: 8];
        @(negedge clk); wren = 0;
      end else begin
        @(negedge clk); rden = 1; a = addr_of(r, w);
        @(negedge clk); rden = 0;
        check(rd == model[r][w], $sformatf("read region %0d word %0d", r, w));
      end
    end
    a = 32'h0000_0040; #1; check(hit, "region 0x0000 hit");
    a = 32'h1000_0040; #1; check(hit, "region 0x1000 hit");
    a = 32'h0FFF_0040; #1; check(!hit, "other region hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
