// tb_trace_memory: checks the complete trace path, as the host sees it:
// a counting sample stream is captured into both BRAMs until they are
// full, the clock source is stopped, the host reads all 512 lines of each
// BRAM through its pipes (data one host cycle after the read strobe) and
// re-arms the capture with a program_clk_enable pulse.  Every line must be
// the sample of its write clock, with good parity.  A parity bit is then
// corrupted by writing to the BRAM array directly and must be flagged.
module tb_trace_memory;
  localparam int D = 512;
  logic bclk = 0, okclk = 0, rst_n = 1, pce = 0, full;
  logic [127:0] din = 0, pd;
  logic [1:0] pr = 0, perr;
  logic [15:0] fc;
  logic [63:0] cnt = 0;
  int checks = 0, failures = 0;

  trace_memory #(.N_BRAM(2), .DEPTH(D)) dut (.bram_clk(bclk), .ok_clk(okclk), .rst_n(rst_n), .din(din),
    .program_clk_enable(pce), .pipe_read(pr), .pipe_data(pd), .parity_err(perr), .bram_full(full), .fill_count(fc));

  always #5 bclk = ~bclk;
  always #8 okclk = ~okclk;
  // the sample source only advances while the trace has room
  always @(posedge bclk) if (full) begin cnt <= cnt + 1; din <= {~(cnt + 64'd1), cnt + 64'd1}; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] first, first0, w;
    int bad, perrs;
    #1 rst_n = 0; #2 rst_n = 1;
    for (int fill = 0; fill < 2; fill++) begin
      wait (!full);
      repeat (4) @(posedge okclk);
      bad = 0; perrs = 0;
      for (int i = 0; i < D; i++) begin
        @(posedge okclk); pr = 2'b11;
        @(posedge okclk); pr = 2'b00;
        @(posedge okclk);
        w = pd[63:0];
        if (i == 0) first = w;
        if (w != first + 64'(i) || pd[127:64] != ~w) bad++;
        if (perr != 0) perrs++;
      end
      check(bad == 0, $sformatf("fill %0d: %0d lines wrong", fill, bad));
      check(perrs == 0, "parity error on clean data");
      check(fc == 16'(fill + 1), "fill count");
      if (fill == 0) first0 = first;
      if (fill == 1) check(first == first0 + 64'(D), $sformatf("second fill starts at %0d after %0d", first, first0));
      first0 = first;
      @(posedge bclk); pce = 1;
      repeat (3) @(posedge bclk); pce = 0;
      repeat (3) @(posedge bclk);
      check(full, "capture not re-armed");
    end
    // corrupt one stored parity bit and read it back (line 0 of BRAM 1)
    wait (!full);
    dut.g_bram[1].u_bram.mem[0][64] = ~dut.g_bram[1].u_bram.mem[0][64];
    @(posedge okclk); pr = 2'b11;
    @(posedge okclk); pr = 2'b00;
    @(posedge okclk);
    check(perr == 2'b10, "parity error not flagged on corrupted line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
