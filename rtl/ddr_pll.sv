// ddr_pll: the DDR PLL block of the test chip.
//
// Three TMR configuration registers set the coarse and fine delays of the
// custom PLL (pll_x16, a behavioural model) and the division factor of the
// TMR clock divider.  The divided clock clk_div_out is one of the two chip
// clocks chosen by CLK_SEL; tdc_sel goes to the output pads.  Structure and
// widths follow the block diagram of the DDR PLL; register map and divider
// details are this design's (see the sub-blocks).
module ddr_pll (
  input  logic        cfg_clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_data,
  input  logic        openloop_clk,
  input  logic        loop_cntrl,
  input  logic [2:0]  inj_copy,
  input  logic [31:0] inj_mask,
  output logic        pll_clk,
  output logic        clk_div_out,
  output logic [31:0] tdc_sel,
  output logic        cfg_mismatch,
  output logic [5:0]  divset
);
  logic [31:0] coarse, fine;

  pll_cfg_regs u_cfg (
    .cfg_clk(cfg_clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data), .inj_copy(inj_copy), .inj_mask(inj_mask),
    .coarse(coarse), .fine(fine), .divset(divset), .mismatch(cfg_mismatch)
  );

  pll_x16 u_pll (
    .openloop_clk(openloop_clk), .loop_cntrl(loop_cntrl), .coarse(coarse),
    .fine(fine), .pll_clk(pll_clk), .tdc_sel(tdc_sel)
  );

  pll_clk_div u_div (
    .clk(pll_clk), .rst_n(rst_n), .divset(divset), .clk_div_out(clk_div_out)
  );
endmodule
