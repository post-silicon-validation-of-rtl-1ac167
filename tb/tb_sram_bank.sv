// tb_sram_bank: checks one 16 kB bank.  Normal mode: random words written
// to random addresses read back correctly, with dout changing only at the
// falling edge after the read edge.  PUF mode, with no noisy cells: a PUF
// read gives a fingerprint that does not depend on what was written.  PUF
// mode with the default fraction of noisy cells: two PUF reads of the same
// words differ in some, but not most, bits.
module tb_sram_bank;
  logic clk = 0;
  logic [10:0] addr;
  logic read = 0, write = 0, puf = 0;
  logic [63:0] din, dout, dout_p;
  int checks = 0, failures = 0;

  sram_bank dut (.clk(clk), .addr(addr), .read(read), .write(write), .din(din),
                 .puf_mode(puf), .dout(dout));
  sram_bank #(.GREY_PER_256(0)) dut_p (.clk(clk), .addr(addr), .read(read), .write(write),
                 .din(din), .puf_mode(puf), .dout(dout_p));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [10:0] a, input logic [63:0] d);
    @(negedge clk); addr = a; din = d; write = 1; read = 0;
    @(negedge clk); write = 0;
  endtask

  task automatic rd(input logic [10:0] a, output logic [63:0] d, output logic [63:0] dp);
    @(negedge clk); addr = a; read = 1; write = 0;
    @(negedge clk); read = 0; #1 d = dout; dp = dout_p;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [10:0] as [32];
    logic [63:0] ds [32];
    logic [63:0] r, rp, prev;
    logic [63:0] fp [16];
    int diff;
    // distinct random addresses
    for (int i = 0; i < 32; i++) begin
      as[i] = 11'(i * 61 + 7);
      ds[i] = {$urandom, $urandom};
      wr(as[i], ds[i]);
    end
    for (int i = 0; i < 32; i++) begin
      rd(as[i], r, rp);
      check(r == ds[i] && rp == ds[i], $sformatf("read %03h got %h exp %h", as[i], r, ds[i]));
    end
    // timing: dout holds through the rising edge, changes at the falling edge
    @(negedge clk); addr = as[0]; read = 1;
    prev = dout;
    @(posedge clk); #1 check(dout == prev, "dout changed prev the falling edge");
    @(negedge clk); read = 0; #1 check(dout == ds[0], "dout not updated at the falling edge");
    // PUF fingerprint independent of written data (no noisy cells)
    puf = 1;
    for (int i = 0; i < 16; i++) begin
      puf = 0; wr(11'(i), '0); puf = 1;
      rd(11'(i), r, fp[i]);
    end
    for (int i = 0; i < 16; i++) begin
      puf = 0; wr(11'(i), '1); puf = 1;
      rd(11'(i), r, rp);
      check(rp == fp[i], $sformatf("fingerprint of %0d depends on written data", i));
      check(rp != '0 && rp != '1, "fingerprint is all equal bits");
    end
    // noisy cells: second PUF read differs in some bits
    diff = 0;
    for (int i = 0; i < 64; i++) begin
      logic [63:0] r1, r2;
      rd(11'(100 + i), r1, rp);
      rd(11'(100 + i), r2, rp);
      diff += $countones(r1 ^ r2);
    end
    check(diff > 100 && diff < 1200, $sformatf("%0d of 4096 bits changed between PUF reads", diff));
    // back to normal mode: a write/read works again
    puf = 0;
    wr(11'h7FF, 64'h0123_4567_89AB_CDEF);
    rd(11'h7FF, r, rp);
    check(r == 64'h0123_4567_89AB_CDEF, "normal read after PUF mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
