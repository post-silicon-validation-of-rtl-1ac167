// tb_tc25_system: full-size, end-to-end test of the FPGA test bench and the
// TC25 chip together, with every parameter at its default.
//
// The testbench plays the host PC and the board around tc25_system:
//  - it drives the system clock (which is also the trace BRAM clock), a
//    separate host-interface clock and the board reset;
//  - a host process drains the trace memory whenever it reports full: it
//    streams all 512 lines of both BRAMs out through the two pipes and
//    re-arms the capture with a program_clk_enable pulse, and it checks each
//    line as it arrives.
// Run 1 writes all 16384 addresses of 6T array A with the address pattern
// and reads them back (WR_RD mode); every read value seen on the pads is
// checked against the address being read.  Run 2 writes 6T array B with
// all ones and reads it back in PUF mode (sense-amplifier delay at its
// longest), then in normal mode.  After that the chip clock is switched
// to the XOR multiplier with 2 and 8 phase-shifted inputs and then to the
// DDR PLL, and the divide-by-8 output is timed each time; one copy of the
// PLL's triple-redundant configuration is upset; the output mux is stepped
// through all four block selections; and the HERMES external-bus bench is
// exercised with the clock-ratio read during ColdReset, boot fetches and
// data writes and reads, which must then appear in the HERMES trace
// (three BRAMs, drained together with the SRAM trace).
// Each mechanism is counted, and one that never happened is a failure.
module tb_tc25_system import tc25_pkg::*; ;
  localparam int NA = 16384;

  logic sys_clk = 0, ok_clk = 0, rst_n = 1, pce = 0;
  logic [1:0] pr = 0;
  logic [127:0] pd;
  logic [2:0] prh = 0, perrh;
  logic [191:0] pdh;
  logic fullh;
  logic [15:0] fch;
  logic [1:0] perr;
  logic full, stop, tclk, swr;
  logic [15:0] fc;
  logic [1:0] mode = 0, pat = 0, ssel = 0, blk = 2'd1;
  logic [31:0] sp1 = 0, sp2 = 0;
  logic csel = 0;
  logic [7:1] xhi = 0;
  logic pcc = 0, pwe = 0, pref = 0, ploop = 0;
  logic [1:0] pa = 0;
  logic [31:0] pdat = 0, pim = 0;
  logic [2:0] pic = 0;
  logic [78:0] hout = 0, pads;
  logic hclk, cdo, puf, pmm, pdc;
  logic av = 0, ins = 0, wr = 0, rv, plr, cr;
  logic [31:0] ea = 0, ewd = 0, erd;
  logic [3:0] ebe = 0;
  logic [7:0] gclk_a, gclk_b;

  tc25_system dut (
    .sys_clk(sys_clk), .bram_clk(sys_clk), .ok_clk(ok_clk), .rst_n(rst_n),
    .program_clk_enable(pce), .pipe_read(pr), .pipe_data(pd), .parity_err(perr),
    .pipe_read_h(prh), .pipe_data_h(pdh), .parity_err_h(perrh), .bram_full_h(fullh), .fill_count_h(fch),
    .bram_full(full), .fill_count(fc), .stop_test(stop), .tb_clk(tclk),
    .cfg_mode(mode), .cfg_pattern(pat), .cfg_sram_sel(ssel), .cfg_spreg1(sp1), .cfg_spreg2(sp2),
    .clk_sel(csel), .blk_sel(blk), .xor_clk_hi(xhi),
    .pll_cfg_clk(pcc), .pll_cfg_we(pwe), .pll_cfg_addr(pa), .pll_cfg_data(pdat),
    .pll_openloop_clk(pref), .pll_loop_cntrl(ploop), .pll_inj_copy(pic), .pll_inj_mask(pim),
    .hermes_out(hout), .hermes_core_clk(hclk),
    .eb_avalid(av), .eb_instr(ins), .eb_write(wr), .eb_a(ea), .eb_be(ebe), .eb_wdata(ewd),
    .eb_rdata(erd), .eb_rdval(rv), .si_pll_reset(plr), .si_cold_reset(cr),
    .pad_out(pads), .clk_div_out(cdo), .sram_bank_gclk_a(gclk_a), .sram_bank_gclk_b(gclk_b),
    .sram_puf_mode(puf), .pll_cfg_mismatch(pmm), .pll_div_clk(pdc), .start_write_read(swr));

  always #5 sys_clk = ~sys_clk;     // 100 MHz system / BRAM clock
  always #4 ok_clk  = ~ok_clk;      // 125 MHz host-interface clock
  always #10 pref   = ~pref;        // 50 MHz PLL reference
  always #15 pcc    = ~pcc;         // PLL configuration clock

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_fill = 0, n_rearm = 0, n_lines = 0, n_parity = 0;
  int n_spreg = 0, n_start = 0, n_stop = 0;
  int n_wr_lines = 0, n_bad_wr = 0, n_rd_ok = 0, n_bad_rd = 0, n_stale = 0;
  int n_puf_reads = 0, n_puf_flips = 0, n_clk_stopped = 0, n_clk_ran_full = 0;
  int n_gate_a = 0, n_gate_b = 0, n_gate_wrong = 0;
  int run = 0;
  bit wseen [NA];
  bit rseen [NA];
  sram_trace_t prev_line;
  int n_h_lines = 0, n_h_rdval = 0, n_h_data = 0, n_h_ratio = 0, n_h_writes = 0, n_h_parity = 0;

  // a line of the HERMES bus trace
  task automatic take_hline(hermes_trace_t h);
    n_h_lines++;
    if (h.eb_rdval) n_h_rdval++;
    if (h.eb_rdval && h.eb_rdata[31:16] == 16'hC0DE) n_h_data++;
    if (h.si_cold_reset && h.eb_rdata == 32'd4) n_h_ratio++;
    if (h.eb_avalid && h.eb_write && h.eb_wdata[31:16] == 16'hC0DE) n_h_writes++;
  endtask

  function automatic logic [13:0] prev_addr(logic [13:0] a);
    return ((a ^ 14'h0400) - 14'd1) ^ 14'h0400;
  endfunction

  task automatic take_line(sram_trace_t l);
    n_lines++;
    if (l.spreg_clk && !prev_line.spreg_clk) n_spreg++;
    if (l.start_write_read && !prev_line.start_write_read) n_start++;
    if (l.stop_test && !prev_line.stop_test) n_stop++;
    if (l.write && l.blk_sel == 2'(BLK_SRAM)) begin
      n_wr_lines++;
      wseen[l.address] = 1;
      if (l.datain != pattern_data(sram_pat_e'(pat), l.address)) n_bad_wr++;
    end
    if (l.read && l.puf_phase) begin
      n_puf_reads++;
      n_puf_flips += 64 - $countones(l.pad_out[63:0]);
    end else if (l.read && run == 1) begin
      logic [31:0] d = l.pad_out[31:0];
      if (d[31:14] == 0 && l.pad_out[63:32] == d &&
          (d[13:0] == l.address || d[13:0] == prev_addr(l.address))) begin
        if (!rseen[d[13:0]]) n_rd_ok++;
        rseen[d[13:0]] = 1;
      end else if (l.address == 14'h0400 || prev_line.write) n_stale++;  // first read of the sweep
      else begin
        n_bad_rd++;
        if (n_bad_rd < 10) $display("bad read t=%0t addr %h prev %h dout %h", $time, l.address, prev_line.address, l.pad_out);
      end
    end
    // the last read's data arrives after read has dropped
    if (!l.read && prev_line.read && !prev_line.puf_phase && run == 1 &&
        l.pad_out == {2{18'h0, prev_line.address}}) rseen[prev_line.address] = 1;
    prev_line = l;
  endtask

  // host: drain the trace whenever it fills, then re-arm it
  initial begin
    forever begin
      @(negedge full);
      n_fill++;
      repeat (3) @(posedge ok_clk);
      check(!fullh, "the two trace memories must fill together");
      #1 pr = 2'b11; prh = 3'b111;
      for (int i = 1; i <= 512; i++) begin
        @(posedge ok_clk); #1;
        if (i == 512) begin pr = 2'b00; prh = 3'b000; end
        if (perr != 0) n_parity++;
        if (perrh != 0) n_h_parity++;
        take_line(sram_trace_t'(pd));
        take_hline(hermes_trace_t'(pdh));
      end
      @(posedge sys_clk); #1 pce = 1;
      repeat (3) @(posedge sys_clk);
      #1 pce = 0;
      repeat (2) @(posedge sys_clk);
      if (full) n_rearm++;
    end
  end

  // the test clock must stand still while the trace is full
  bit was_full = 0;
  always @(negedge sys_clk) begin
    #1;
    if (was_full && !full) begin
      if (tclk) n_clk_ran_full++; else n_clk_stopped++;
    end
    was_full = !full;
  end

  // bank clock gating: only the selected array's banks may pulse
  bit started = 0;
  always @(posedge gclk_a[0] or posedge gclk_a[1] or posedge gclk_a[2] or posedge gclk_a[3] or
           posedge gclk_a[4] or posedge gclk_a[5] or posedge gclk_a[6] or posedge gclk_a[7]) begin
    if (started) n_gate_a++;
    if (started && ($countones(gclk_a) != 1 || ssel != 2'(SEL_6T_A))) begin n_gate_wrong++; if (n_gate_wrong < 5) $display("gate a %b t=%0t", gclk_a, $time); end
  end
  always @(posedge gclk_b[0] or posedge gclk_b[1] or posedge gclk_b[2] or posedge gclk_b[3] or
           posedge gclk_b[4] or posedge gclk_b[5] or posedge gclk_b[6] or posedge gclk_b[7]) begin
    if (started) n_gate_b++;
    if (started && ($countones(gclk_b) != 1 || ssel != 2'(SEL_6T_B))) begin n_gate_wrong++; if (n_gate_wrong < 5) $display("gate b %b t=%0t ssel %0d", gclk_b, $time, ssel); end
  end

  // XOR multiplier inputs: copies of the test clock, shifted in phase
  int xor_phases = 1;
  for (genvar k = 1; k < 8; k++) begin : g_x
    always @(tclk) begin
      if (k < xor_phases) xhi[k] <= #(1.25ns * k * (8 / xor_phases)) tclk;
      else                xhi[k] <= 1'b0;
    end
  end

  // ---------------- helpers ----------------
  // shortest of 8 periods: the test clock pauses while the trace is drained
  task automatic measure_div(output realtime p);
    realtime t0;
    @(posedge cdo); @(posedge cdo);
    p = 1.0e9;
    repeat (8) begin
      t0 = $realtime;
      @(posedge cdo);
      if ($realtime - t0 < p) p = $realtime - t0;
    end
  endtask

  task automatic pll_wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge pcc); pwe = 1; pa = a; pdat = d;
    @(negedge pcc); pwe = 0;
  endtask

  task automatic bus(input logic i, input logic w, input logic [31:0] a, input logic [3:0] b,
                     input logic [31:0] d, output logic [31:0] q, output logic v);
    @(posedge tclk); #1 av = 1; ins = i; wr = w; ea = a; ebe = b; ewd = d;
    @(posedge tclk); #1 av = 0; ins = 0; wr = 0;
    q = erd; v = rv;
  endtask

  task automatic sram_run(input logic [1:0] m, input logic [1:0] p, input logic [1:0] s, input logic [31:0] r1);
    mode = m; pat = p; ssel = s; sp1 = r1; sp2 = 32'h0000_0000;
    foreach (wseen[i]) begin wseen[i] = 0; rseen[i] = 0; end
    #1 rst_n = 0; #10 rst_n = 1;
    started = 1;
    wait (stop);
    // let the last samples reach the host
    repeat (1200) @(posedge sys_clk);
  endtask

  function automatic int count_seen(bit s []);
    int n = 0;
    foreach (s[i]) n += s[i];
    return n;
  endfunction

  initial begin
    #60ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime p, p1;
    int nw, nr;
    logic [31:0] q;
    logic v;
    logic [31:0] boot [8];

    // ---- run 1: WR_RD, address pattern, 6T array A ----
    run = 1;
    sram_run(2'd0, 2'(PAT_ADDR), 2'(SEL_6T_A), 32'h0000_0010);
    nw = 0; nr = 0;
    foreach (wseen[i]) begin nw += wseen[i]; nr += rseen[i]; end
    check(nw == NA, $sformatf("run 1: %0d addresses written", nw));
    check(nr == NA, $sformatf("run 1: %0d addresses read back correctly", nr));
    check(n_bad_wr == 0 && n_bad_rd == 0, $sformatf("run 1: %0d bad writes, %0d bad reads", n_bad_wr, n_bad_rd));
    check(n_stale <= 2, "stale read data");
    check(n_gate_a > 0 && n_gate_b == 0, "run 1: bank clocks");
    $display("run 1: %0d trace lines in %0d fills", n_lines, n_fill);

    // ---- run 2: PUF on 6T array B, all-ones pattern ----
    run = 2;
    sram_run(2'd3, 2'(PAT_ONES), 2'(SEL_6T_B), 32'h0000_00FF);
    nw = 0;
    foreach (wseen[i]) nw += wseen[i];
    check(nw == NA, "run 2: addresses written");
    check(n_puf_reads >= NA, $sformatf("run 2: %0d PUF reads", n_puf_reads));
    // a share of the cells (the "grey" ones) resolve by chance when the
    // sense amplifier fires on a precharged, undriven bit line
    check(n_puf_flips > n_puf_reads * 64 / 100 && n_puf_flips < n_puf_reads * 64 / 2,
          $sformatf("run 2: %0d of %0d bits read as 0 in PUF mode", n_puf_flips, n_puf_reads * 64));
    check(n_gate_b > 0, "run 2: bank clocks of array B");
    check(!puf, "PUF mode left on");

    // ---- XOR clock multiplier and the divide-by-8 output ----
    blk = 2'(BLK_OFF);
    measure_div(p);
    check(p > 159.0 && p < 161.0, $sformatf("div8 of the test clock: %f ns", p));
    xor_phases = 2;
    repeat (4) @(posedge tclk);
    measure_div(p);
    check(p > 79.0 && p < 81.0, $sformatf("div8 with 2 XOR inputs: %f ns", p));
    xor_phases = 8;
    repeat (4) @(posedge tclk);
    measure_div(p);
    check(p > 19.0 && p < 21.0, $sformatf("div8 with 8 XOR inputs: %f ns", p));
    xor_phases = 1;
    repeat (4) @(posedge tclk);

    // ---- DDR PLL as chip clock, TMR upset ----
    pll_wr(2'd0, 32'h0000_000F);     // 4 coarse steps
    pll_wr(2'd1, 32'h0000_0000);
    pll_wr(2'd2, 32'd4);
    csel = 1;
    measure_div(p);
    p1 = 8 * 4 * 2.0 * (200 + 4 * 40) / 1000.0;
    check(p > p1 * 0.98 && p < p1 * 1.02, $sformatf("PLL clock through div8: %f ns, expected %f", p, p1));
    @(negedge pcc); pic = 3'b001; pim = 32'hFFFF_FFFF;
    @(negedge pcc); pic = 0;
    check(pmm, "PLL register upset not flagged");
    measure_div(p);
    check(p > p1 * 0.98 && p < p1 * 1.02, "PLL frequency changed by an upset");
    check(!pmm, "PLL register upset not corrected");
    ploop = 1;
    repeat (4) @(posedge pref);
    measure_div(p);
    // closed loop: 16 x the 50 MHz reference = 1.25 ns, x 4 x 8 = 40 ns
    check(p > 39.5 && p < 40.5, $sformatf("closed-loop PLL through divset 4 and div8: %f ns", p));
    csel = 0; ploop = 0;

    // ---- output mux ----
    for (int i = 0; i < 4; i++) begin
      hout = {15'($urandom), $urandom, $urandom};
      blk = 2'(i);
      #1;
      case (i)
        0: check(pads == hout, "HERMES outputs on the pads");
        1: check(pads[78:64] == 0, "SRAM outputs on the pads");
        2: check(pads[78:32] == 0 && ((pads[31:0] + 32'd1) & pads[31:0]) == 0, "PLL TDC code on the pads");
        3: check(pads == 0, "pads off");
      endcase
    end

    // ---- HERMES external-bus bench ----
    $readmemh("tb/hermes_boot.hex", boot);
    foreach (boot[i]) dut.u_hermes_tb.u_imem.u_b1fc0.mem[i] = boot[i];
    #1 rst_n = 0; #10 rst_n = 1;
    @(posedge tclk); #1;
    check(cr && erd == 32'd4, "clock ratio during ColdReset");
    wait (!cr);
    for (int i = 0; i < 8; i++) begin
      bus(1, 0, 32'h1FC0_0000 + 32'(4 * i), 0, 0, q, v);
      check(v && q == boot[i], "boot fetch");
    end
    for (int i = 0; i < 8; i++) bus(0, 1, 32'h1000_0000 + 32'(4 * i), 4'hF, 32'hC0DE_0000 + 32'(i), q, v);
    for (int i = 0; i < 8; i++) begin
      bus(0, 0, 32'h1000_0000 + 32'(4 * i), 0, 0, q, v);
      check(v && q == 32'hC0DE_0000 + 32'(i), "data read back");
    end

    // let the bus activity reach the host through the HERMES trace
    begin
      int r0;
      r0 = n_rearm;
      wait (n_rearm >= r0 + 2);
    end
    $display("HERMES trace: %0d lines, %0d replies (%0d data), %0d ratio samples, %0d data writes",
             n_h_lines, n_h_rdval, n_h_data, n_h_ratio, n_h_writes);
    check(n_h_lines == n_lines && n_h_parity == 0, "HERMES trace lines / parity");
    check(n_h_rdval >= 2 * 16 && n_h_data >= 2 * 8, "bus replies recorded in the HERMES trace");
    check(n_h_writes >= 2 * 8, "bus writes recorded in the HERMES trace");
    check(n_h_ratio > 0, "clock ratio recorded during ColdReset");

    // ---- every mechanism must have happened ----
    $display("fills %0d, re-arms %0d, lines %0d, register writes %0d, PUF reads %0d (%0d bits read 0)",
             n_fill, n_rearm, n_lines, n_spreg, n_puf_reads, n_puf_flips);
    $display("bank clock pulses A %0d B %0d, test clock held %0d cycles", n_gate_a, n_gate_b, n_clk_stopped);
    check(n_fill >= 2 * (4 * NA) / 512, "trace fills");
    check(n_rearm == n_fill, "every fill re-armed");
    check(n_parity == 0, "parity errors");
    check(n_spreg >= 6, "special-register writes");
    check(n_start >= 2 && n_stop >= 2, "start_write_read / stop_test");   // the last reset starts a third run
    check(n_clk_stopped > 0 && n_clk_ran_full == 0, "test clock held while the trace is full");
    check(n_gate_wrong == 0, "bank clock gating");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
