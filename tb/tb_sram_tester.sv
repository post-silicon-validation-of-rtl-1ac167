// tb_sram_tester: checks the SRAM test sequencer on a 64-word sweep in all
// four modes.  Watching the pins at the SRAM's sampling edge it checks:
// special registers 1 and 2 written with the configured values (PUF bit
// cleared) before start_write_read; start_write_read at the fixed start-up
// count (counter value 15 on the 16th falling edge after reset); every address written exactly once with the selected pattern
// (write modes) and read exactly once (read modes); in PUF mode a second
// read sweep with register 1's PUF bit set, bracketed by register writes;
// read and write never together; stop_test at the end.
module tb_sram_tester import tc25_pkg::*; ;
  localparam int N = 64;
  logic clk = 0, rst_n = 1;
  logic [1:0] mode = 0, pat = 0, ssel = 0;
  logic [31:0] sp1 = 32'h8000_00FF, sp2 = 32'h1234_5678;
  logic [13:0] addr;
  logic [31:0] din;
  logic rd, wr, spclk, swr, stop, puf;
  logic [1:0] osel;
  logic [3:0] spa;
  int checks = 0, failures = 0;

  sram_tester #(.N_ADDR(N), .START_ADDR(14'h0004), .START_CNT(15)) dut (
    .tb_clk(clk), .rst_n(rst_n), .cfg_mode(mode), .cfg_pattern(pat), .cfg_sram_sel(ssel),
    .cfg_spreg1(sp1), .cfg_spreg2(sp2), .address(addr), .datain(din), .read(rd), .write(wr),
    .sram_sel(osel), .spreg_clk(spclk), .spreg_addr(spa), .start_write_read(swr),
    .stop_test(stop), .puf_phase(puf));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // special-register writes as seen by the chip
  logic [31:0] sp_seen [4];
  int sp_writes;
  always @(posedge spclk) begin sp_seen[spa] = din; sp_writes++; end

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int wcnt [N], rcnt [N], pcnt [N];
    int badpat, both, cyc, swr_cyc, bad_addr, puf_sp;
    #1 rst_n = 0; #1 rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      mode = 2'(m); pat = 2'($urandom); ssel = 2'($urandom_range(2));
      foreach (wcnt[i]) begin wcnt[i] = 0; rcnt[i] = 0; pcnt[i] = 0; end
      badpat = 0; both = 0; cyc = 0; swr_cyc = -1; bad_addr = 0; puf_sp = 0;
      sp_writes = 0; sp_seen = '{default: 0};
      @(posedge clk); #1 rst_n = 0; #1 rst_n = 1;
      while (!stop && cyc < 2000) begin
        @(posedge clk); cyc++;
        if (swr && swr_cyc < 0) begin
          swr_cyc = cyc;
          check(sp_seen[1] == (sp1 & 32'h7FFF_FFFF) && sp_seen[2] == sp2, "register values before start");
        end
        if (rd && wr) both++;
        if ((rd || wr) && addr >= 14'(N)) bad_addr++;
        else if (wr) begin
          wcnt[addr]++;
          if (din != pattern_data(sram_pat_e'(pat), addr)) badpat++;
        end else if (rd && puf) pcnt[addr]++;
        else if (rd) rcnt[addr]++;
        if (puf && sp_seen[1][SP1_PUF_BIT]) puf_sp = 1;
      end
      check(stop, $sformatf("mode %0d: no stop_test", m));
      check(swr_cyc == 16, $sformatf("mode %0d: start_write_read in cycle %0d", m, swr_cyc));
      check(both == 0 && bad_addr == 0, "read with write, or address outside sweep");
      check(osel == ssel, "array select");
      for (int i = 0; i < N; i++) begin
        if (wcnt[i] != ((m == 2) ? 0 : 1)) begin check(0, $sformatf("mode %0d: addr %0d written %0d times", m, i, wcnt[i])); break; end
        if (rcnt[i] != ((m == 1) ? 0 : 1)) begin check(0, $sformatf("mode %0d: addr %0d read %0d times", m, i, rcnt[i])); break; end
        if (pcnt[i] != ((m == 3) ? 1 : 0)) begin check(0, $sformatf("mode %0d: addr %0d PUF-read %0d times", m, i, pcnt[i])); break; end
      end
      check(badpat == 0, "pattern data");
      if (m == 3) begin
        check(puf_sp == 1, "PUF reads without the PUF bit set");
        check(sp_seen[1] == (sp1 & 32'h7FFF_FFFF), "PUF bit not cleared afterwards");
        check(sp_writes == 4, "register write count in PUF mode");
      end else check(sp_writes == 2, "register write count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
