// tb_clk_gen: test-bench clock generator on the FPGA (divide-by-2 with gating).
//
// tb_clk clocks the test chip and the block-specific test bench.  A flop on
// sys_clk loads its own inverse while bram_full is high, giving sys_clk / 2;
// when the trace memory fills, bram_full goes low, the flop loads 0 and
// tb_clk stops low, so no signal activity goes unrecorded.  When the trace
// has been read out and bram_full returns high, tb_clk restarts with a
// rising edge.  sys_clk and BRAM_clk come from the FPGA PLL (not modelled).
// bram_full keeps the polarity of the document's BRAM_Full: high while there
// is room, low when full.
module tb_clk_gen (
  input  logic sys_clk,
  input  logic rst_n,
  input  logic bram_full,
  output logic tb_clk
);
  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) tb_clk <= 1'b0;
    else        tb_clk <= bram_full ? ~tb_clk : 1'b0;
  end
endmodule
