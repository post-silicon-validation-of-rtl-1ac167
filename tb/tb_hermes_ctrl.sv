// tb_hermes_ctrl: checks the bus control logic with stand-in memory data:
// the strobes decoded from EB_AValid/EB_Instr/EB_Write, EB_RData carrying
// the clock ratio while ColdReset is high, and otherwise the instruction
// or data word, or zero, one bus cycle after the request, with EB_RdVal
// marking exactly the read replies.
module tb_hermes_ctrl;
  logic bclk = 0, rst_n = 1, cold = 1, av = 0, ins = 0, wr = 0;
  logic ird, drd, dwr, rv;
  logic [31:0] idat = 32'h1111_1111, ddat = 32'h2222_2222, rdat;
  int checks = 0, failures = 0;

  hermes_ctrl #(.CLK_RATIO(32'd4)) dut (.bus_clk(bclk), .bram_clk(~bclk), .rst_n(rst_n), .cold_reset(cold),
    .eb_avalid(av), .eb_instr(ins), .eb_write(wr), .imem_rd(ird), .dmem_rd(drd), .dmem_wr(dwr),
    .imem_rdata(idat), .dmem_rdata(ddat), .eb_rdata(rdat), .eb_rdval(rv));

  always #5 bclk = ~bclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    repeat (3) @(posedge bclk);
    #1 check(rdat == 32'd4 && !rv, "clock ratio during ColdReset");
    @(negedge bclk); cold = 0;
    for (int i = 0; i < 200; i++) begin
      int k;
      k = $urandom_range(3);          // 0 idle, 1 instr read, 2 data read, 3 write
      @(posedge bclk); #1;
      av = (k != 0); ins = (k == 1) || (k == 3 && $urandom_range(1) == 1); wr = (k == 3);
      idat = $urandom; ddat = $urandom;
      #1 check(ird == (k == 1) && drd == (k == 2) && dwr == (k == 3), "strobe decode");
      @(posedge bclk); #1;
      av = 0; ins = 0; wr = 0;
      case (k)
        1: check(rv && rdat == idat, "instruction reply");
        2: check(rv && rdat == ddat, "data reply");
        default: check(!rv && rdat == 0, "no reply expected");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
