// tb_blk_out_mux: checks that BLK_SEL routes HERMES, SRAM (zero-extended),
// DDR PLL (zero-extended) or nothing to the 79 output pads.
module tb_blk_out_mux;
  import tc25_pkg::*;
  logic [1:0]  sel;
  logic [78:0] h, p;
  logic [63:0] s;
  logic [31:0] l;
  int checks = 0, failures = 0;

  blk_out_mux dut (.blk_sel(sel), .hermes_out(h), .sram_out(s), .pll_out(l), .pad_out(p));

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [78:0] exp;
    for (int it = 0; it < 50; it++) begin
      h = {15'($urandom), $urandom, $urandom};
      s = {$urandom, $urandom};
      l = $urandom;
      sel = 2'(it % 4);
      #1;
      case (sel)
        2'd0: exp = h;
        2'd1: exp = {15'b0, s};
        2'd2: exp = {47'b0, l};
        default: exp = '0;
      endcase
      checks++;
      if (p !== exp) begin failures++; $display("FAIL sel=%0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
