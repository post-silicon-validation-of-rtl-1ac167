// xor_clk_mult: XOR clock multiplier of the test chip.
//
// Eight input clocks are XORed in pairs, the results again in pairs, until one
// clock is left.  With two inputs 90 degrees apart and the other six held
// constant the output runs at twice the input frequency; with all eight
// inputs 22.5 degrees apart it runs at eight times.  A single toggling input
// passes through unchanged, which is how the chip is first brought up.
// Purely combinational: the output changes a few gate delays after an input.
// The balanced tree shape is this design's choice; only "XOR every pair until
// one is left" is given.
module xor_clk_mult #(
  parameter int unsigned N_CLK = 8    // must be a power of two
) (
  input  logic [N_CLK-1:0] xor_clk,
  output logic             clk_out
);
  localparam int unsigned LEVELS = $clog2(N_CLK);

  // level l holds N_CLK >> l signals
  logic [N_CLK-1:0] lvl [0:LEVELS];

  assign lvl[0] = xor_clk;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < (N_CLK >> (l + 1)); i++) begin : g_pair
      assign lvl[l+1][i] = lvl[l][2*i] ^ lvl[l][2*i+1];
    end
    if ((N_CLK >> (l + 1)) < N_CLK) begin : g_pad
      assign lvl[l+1][N_CLK-1:(N_CLK >> (l + 1))] = '0;
    end
  end

  assign clk_out = lvl[LEVELS][0];
endmodule
