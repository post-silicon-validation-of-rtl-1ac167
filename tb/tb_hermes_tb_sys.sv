// tb_hermes_tb_sys: plays the processor against the FPGA-side HERMES test
// bench.  After the board reset it waits through the PLL reset pulse,
// reads the clock ratio while ColdReset is high, then does what a boot and
// a hello-world program do on the external bus: fetch the boot words from
// 0x1FC00000 (the bus address of the kseg1 reset vector 0xBFC00000), read the text from the data region 0x1000 one word per
// request, copy it into the data region 0x0000 with byte writes and read
// it back.  Every reply must arrive one bus cycle after its request.
module tb_hermes_tb_sys;
  logic bclk = 0, rst_n = 1, av = 0, ins = 0, wr = 0, rv, plr, cr;
  logic [31:0] a = 0, wd = 0, rdat;
  logic [3:0] be = 0;
  logic [31:0] boot [8], hello [4];
  int checks = 0, failures = 0;

  hermes_tb_sys #(.IMEM_1FC0("tb/hermes_boot.hex"), .DMEM_1000("tb/hermes_hello.hex")) dut (
    .bus_clk(bclk), .rst_n(rst_n), .eb_avalid(av), .eb_instr(ins), .eb_write(wr), .eb_a(a),
    .eb_be(be), .eb_wdata(wd), .eb_rdata(rdat), .eb_rdval(rv), .si_pll_reset(plr), .si_cold_reset(cr));

  always #5 bclk = ~bclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus(input logic i, input logic w, input logic [31:0] addr, input logic [3:0] b,
                     input logic [31:0] d, output logic [31:0] q);
    @(posedge bclk); #1 av = 1; ins = i; wr = w; a = addr; be = b; wd = d;
    @(posedge bclk); #1 av = 0; ins = 0; wr = 0;
    q = rdat;
    if (!w) check(rv, "reply valid one cycle after the request");
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] q;
    int seen_plr = 0;
    $readmemh("tb/hermes_boot.hex", boot);
    $readmemh("tb/hermes_hello.hex", hello);
    #1 rst_n = 0; #1 rst_n = 1;
    while (cr) begin
      @(posedge bclk); #1;
      if (plr) seen_plr++;
      if (cr) check(rdat == 32'd4 || seen_plr == 0, "clock ratio on the bus during ColdReset");
    end
    check(seen_plr == 2, "PLL reset pulse before ColdReset release");
    for (int i = 0; i < 8; i++) begin
      bus(1, 0, 32'h1FC0_0000 + 32'(4 * i), 4'h0, 0, q);
      check(q == boot[i], $sformatf("boot fetch %0d", i));
    end
    for (int i = 0; i < 4; i++) begin
      bus(0, 0, 32'h1000_0000 + 32'(4 * i), 4'h0, 0, q);
      check(q == hello[i], "hello text read");
      for (int b = 0; b < 4; b++) bus(0, 1, 32'h0000_0100 + 32'(4 * i), 4'b1 << b, hello[i], q);
    end
    for (int i = 0; i < 4; i++) begin
      bus(0, 0, 32'h0000_0100 + 32'(4 * i), 4'h0, 0, q);
      check(q == hello[i], "copied text read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
