// blk_out_mux: the 4:1 output multiplexer of the test chip.
//
// The outputs of the three blocks share one set of 79 output pads.  BLK_SEL
// chooses which block drives them; narrower outputs are zero-extended.  The
// encoding (0 HERMES, 1 SRAM, 2 DDR PLL, 3 all pads low) is this design's
// choice.  Combinational.
module blk_out_mux
  import tc25_pkg::*;
(
  input  logic [1:0]              blk_sel,
  input  logic [HERMES_OUT_W-1:0] hermes_out,
  input  logic [SRAM_DW-1:0]      sram_out,
  input  logic [PLL_OUT_W-1:0]    pll_out,
  output logic [HERMES_OUT_W-1:0] pad_out
);
  always_comb begin
    unique case (blk_sel_e'(blk_sel))
      BLK_HERMES: pad_out = hermes_out;
      BLK_SRAM:   pad_out = HERMES_OUT_W'(sram_out);
      BLK_PLL:    pad_out = HERMES_OUT_W'(pll_out);
      default:    pad_out = '0;
    endcase
  end
endmodule
