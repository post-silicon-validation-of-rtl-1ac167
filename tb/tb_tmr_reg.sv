// tb_tmr_reg: checks the self-correcting TMR register: writes land, an
// upset injected into any single copy never reaches the voted output and
// is scrubbed at the next edge (mismatch high for exactly one cycle), and
// without a write the value is held.
module tb_tmr_reg;
  logic clk = 0, rst_n = 1, we = 0, mm;
  logic [2:0] ic = 0;
  logic [31:0] d = 0, im = 0, q;
  int checks = 0, failures = 0;

  tmr_reg #(.W(32)) dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .inj_copy(ic), .inj_mask(im), .q(q), .mismatch(mm));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v;
    #1 rst_n = 0; #2 rst_n = 1;
    check(q == 0 && !mm, "reset");
    for (int it = 0; it < 30; it++) begin
      v = $urandom;
      @(negedge clk); we = 1; d = v;
      @(negedge clk); we = 0;
      check(q == v && !mm, "write");
      // upset one copy
      ic = 3'b001 << (it % 3); im = $urandom | 32'h1;
      @(negedge clk); ic = 0;
      check(q == v, $sformatf("upset of copy %0d reached the output", it % 3));
      check(mm, "mismatch not flagged after upset");
      @(negedge clk);
      check(q == v && !mm, "upset not scrubbed after one cycle");
    end
    repeat (5) @(negedge clk);
    check(q == v, "value not held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
