// tb_sram6t_array: checks the 1 Mb 6T array.  Words written to every bank
// (first and last word line, both halves) read back correctly, each bank
// keeping its own data; during an access only the addressed bank's gated
// clock pulses; an unselected array ignores reads and writes.
module tb_sram6t_array;
  logic clk = 0, sel = 1;
  logic [13:0] addr;
  logic read = 0, write = 0;
  logic [63:0] din, dout;
  logic [7:0] gclk;
  int checks = 0, failures = 0;
  int pulses [8];

  sram6t_array dut (.clk(clk), .sel(sel), .addr(addr), .read(read), .write(write), .din(din),
                    .puf_mode(1'b0), .dout(dout), .bank_gclk(gclk));

  always #5 clk = ~clk;
  for (genvar b = 0; b < 8; b++) begin : g_cnt
    always @(posedge gclk[b]) pulses[b]++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] pat(input logic [13:0] a);
    return {a, 2'b01, a, 2'b10, a, 2'b11, a[7:0]} ^ 64'hA5A5_0000_5A5A_FFFF;
  endfunction

  task automatic access(input logic [13:0] a, input bit w, input logic [63:0] d);
    @(negedge clk); addr = a; din = d; write = w; read = !w;
    @(negedge clk); write = 0; read = 0;
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [13:0] list [$];
    for (int b = 0; b < 8; b++)
      for (int h = 0; h < 2; h++) begin
        list.push_back({3'(b), 1'(h), 7'd0, 3'd1});
        list.push_back({3'(b), 1'(h), 7'd127, 3'd7});
      end
    foreach (list[i]) access(list[i], 1, pat(list[i]));
    foreach (list[i]) begin
      int prev [8];
      prev = pulses;
      access(list[i], 0, '0);
      #1 check(dout == pat(list[i]), $sformatf("addr %04h read %h", list[i], dout));
      for (int b = 0; b < 8; b++)
        check((pulses[b] - prev[b]) == ((b == list[i][13:11]) ? 1 : 0),
              $sformatf("bank %0d clock pulses %0d on access to bank %0d", b, pulses[b] - prev[b], list[i][13:11]));
    end
    // unselected: a write must not land
    sel = 0;
    access(list[0], 1, '0);
    sel = 1;
    access(list[0], 0, '0);
    #1 check(dout == pat(list[0]), "write landed in an unselected array");
    // idle cycles: no bank clocks
    begin
      int prev [8];
      int tot;
      prev = pulses;
      repeat (10) @(negedge clk);
      tot = 0;
      for (int b = 0; b < 8; b++) tot += pulses[b] - prev[b];
      check(tot == 0, "bank clocks ran while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
