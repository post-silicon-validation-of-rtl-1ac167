// tb_hermes_imem: checks the instruction memory: the boot region 0x1FC0
// (loaded from hermes_boot.hex) returns the file's words, the region
// 0x0000 returns the words written into its BRAM array, all five regions
// report a hit and an address outside them does not, and the output mux
// follows the region of the previous read (one BRAM-clock latency).
module tb_hermes_imem;
  logic clk = 0, rden = 0, hit;
  logic [31:0] a = 0, rd;
  logic [31:0] boot [8];
  int checks = 0, failures = 0;

  hermes_imem #(.INIT_1FC0("tb/hermes_boot.hex")) dut (.clk(clk), .rden(rden), .rdaddr(a), .rdata(rd), .hit(hit));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic rd_word(input logic [31:0] addr, output logic [31:0] d);
    @(negedge clk); rden = 1; a = addr;
    @(negedge clk); rden = 0; d = rd;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    logic [13:0] regions [5] = '{14'h1FC0, 14'h0000, 14'h0FFF, 14'h1000, 14'h1FFF};
    $readmemh("tb/hermes_boot.hex", boot);
    for (int i = 0; i < 8; i++) begin
      rd_word({2'b10, 14'h1FC0, 16'(4 * i)}, d);   // kseg1 alias: bits 31:30 ignored
      check(d == boot[i], $sformatf("boot word %0d = %h", i, d));
    end
    for (int i = 0; i < 16; i++) dut.u_b0000.mem[i] = 32'hA000_0000 + 32'(i);
    for (int i = 0; i < 16; i++) begin
      rd_word({2'b00, 14'h0000, 16'(4 * i)}, d);
      check(d == 32'hA000_0000 + 32'(i), "region 0x0000 word");
      rd_word({2'b10, 14'h1FC0, 16'(4 * (i % 8))}, d);
      check(d == boot[i % 8], "alternating regions");
    end
    foreach (regions[r]) begin
      a = {2'b00, regions[r], 16'(4 * $urandom_range(511))}; #1;
      check(hit, $sformatf("region %h not hit", regions[r]));
    end
    a = {2'b00, 14'h0123, 16'h0000}; #1;
    check(!hit, "address outside the regions hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
