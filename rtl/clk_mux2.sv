// clk_mux2: the 2:1 clock multiplexer of the test chip.
//
// CLK_SEL picks the clock for the HERMES and SRAM blocks: the XOR clock
// multiplier (CLK_SEL = 0) or the divided DDR PLL clock (CLK_SEL = 1).  The
// polarity of CLK_SEL is this design's choice.  CLK_SEL is a static pad
// setting, so no glitch-free switching is attempted.
module clk_mux2 (
  input  logic clk_xor,
  input  logic clk_pll,
  input  logic clk_sel,
  output logic clk_out
);
  always_comb clk_out = clk_sel ? clk_pll : clk_xor;
endmodule
