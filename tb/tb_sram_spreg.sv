// tb_sram_spreg: checks the special registers: reset to zero, each address
// 1..3 loads only its register on a Spreg_Clk edge, other addresses load
// nothing, and the decoded fields (PUF bit 31, satest, DAT, SA delay)
// follow register 1.
module tb_sram_spreg;
  logic sclk = 0, rst_n = 1;
  logic [3:0] a;
  logic [31:0] d, r1, r2, r3;
  logic puf, sat, dat;
  logic [15:0] dly;
  int checks = 0, failures = 0;

  sram_spreg dut (.spreg_clk(sclk), .rst_n(rst_n), .spreg_addr(a), .din(d), .spreg1(r1),
                  .spreg2(r2), .spreg3(r3), .puf_mode(puf), .satest_en(sat), .dat_en(dat), .sa_delay(dly));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [3:0] aa, input logic [31:0] dd);
    a = aa; d = dd; #5 sclk = 1; #5 sclk = 0; #5;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = 0; d = 0;
    #1 rst_n = 1; #1 rst_n = 0; #1 rst_n = 1; #2;
    check(r1 == 0 && r2 == 0 && r3 == 0, "not reset to zero");
    wr(4'd1, 32'h8000_00FF);
    check(r1 == 32'h8000_00FF && r2 == 0 && r3 == 0, "reg1 write");
    check(puf && !sat && !dat && dly == 16'h00FF, "reg1 fields");
    wr(4'd2, 32'h1234_5678);
    check(r2 == 32'h1234_5678 && r1 == 32'h8000_00FF && r3 == 0, "reg2 write");
    wr(4'd3, 32'hCAFE_F00D);
    check(r3 == 32'hCAFE_F00D && r2 == 32'h1234_5678, "reg3 write");
    wr(4'd0, 32'hFFFF_FFFF);
    wr(4'd7, 32'hFFFF_FFFF);
    check(r1 == 32'h8000_00FF && r2 == 32'h1234_5678 && r3 == 32'hCAFE_F00D, "write to unused address changed a register");
    wr(4'd1, 32'h6000_0010);
    check(!puf && sat && dat && dly == 16'h0010, "satest+DAT fields");
    // Spreg_Clk low: no write however datain changes
    a = 4'd1; d = 32'h0; #20;
    check(r1 == 32'h6000_0010, "register changed without Spreg_Clk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
