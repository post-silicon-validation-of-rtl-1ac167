// tc25: the test chip -- clocking, SRAM block, DDR PLL block and the shared
// output pads.
//
// The chip clock comes from the XOR clock multiplier (eight XOR_CLK pads) or
// from the DDR PLL's divided clock, chosen by CLK_SEL; it clocks the SRAM
// block and is the HERMES core clock, and a divide-by-8 copy goes to the
// CLK_DIV_OUT pad.  BLK_SEL routes the outputs of one block to the 79 shared
// output pads.  The HERMES processor is not part of this model: its core
// clock leaves on hermes_core_clk and its 79 outputs come back in on
// hermes_out.  On silicon the input pads are shared by the three blocks;
// here each block has its own input ports, since the pad assignment is not
// part of this design.  chip_rst_n (reset of the dividers and registers) is
// this design's addition.  pll_inj_* are simulation fault-injection inputs
// of the PLL's TMR registers; tie them to zero in use.
module tc25
  import tc25_pkg::*;
#(
  parameter int unsigned SRAM_ROWS = 128
) (
  input  logic [7:0]              xor_clk,
  input  logic                    clk_sel,
  input  logic [1:0]              blk_sel,
  input  logic                    chip_rst_n,
  // SRAM block
  input  logic [1:0]              sram_sel,
  input  logic [SRAM_AW-1:0]      address,
  input  logic [31:0]             datain,
  input  logic                    read,
  input  logic                    write,
  input  logic                    spreg_clk,
  input  logic [3:0]              spreg_addr,
  // DDR PLL block
  input  logic                    pll_cfg_clk,
  input  logic                    pll_cfg_we,
  input  logic [1:0]              pll_cfg_addr,
  input  logic [31:0]             pll_cfg_data,
  input  logic                    pll_openloop_clk,
  input  logic                    pll_loop_cntrl,
  input  logic [2:0]              pll_inj_copy,
  input  logic [31:0]             pll_inj_mask,
  // HERMES (external)
  input  logic [HERMES_OUT_W-1:0] hermes_out,
  output logic                    hermes_core_clk,
  // pads
  output logic [HERMES_OUT_W-1:0] pad_out,
  output logic                    clk_div_out,
  // observation
  output logic                    chip_clk,
  output logic [N_BANKS-1:0]      sram_bank_gclk_a,
  output logic [N_BANKS-1:0]      sram_bank_gclk_b,
  output logic                    sram_puf_mode,
  output logic                    pll_cfg_mismatch,
  output logic                    pll_div_clk
);
  logic        xor_out;
  logic [63:0] sram_dout;
  logic [31:0] pll_tdc;
  logic        pll_clk;
  logic [5:0]  pll_divset;

  // SRAM analog test-mode settings (go to analog circuits / pads)
  logic        satest_en, dat_en;
  logic [15:0] sa_delay;
  logic [31:0] dat_cfg2, dat_cfg3;

  xor_clk_mult #(.N_CLK(8)) u_xor (.xor_clk(xor_clk), .clk_out(xor_out));

  clk_mux2 u_clkmux (.clk_xor(xor_out), .clk_pll(pll_div_clk), .clk_sel(clk_sel), .clk_out(chip_clk));

  clk_div8 u_div8 (.clk(chip_clk), .rst_n(chip_rst_n), .clk_div_out(clk_div_out));

  assign hermes_core_clk = chip_clk;

  sram_block #(.ROWS(SRAM_ROWS)) u_sram (
    .clk(chip_clk), .rst_n(chip_rst_n), .sram_sel(sram_sel), .addr(address),
    .read(read), .write(write), .datain(datain), .spreg_clk(spreg_clk),
    .spreg_addr(spreg_addr), .dataout(sram_dout), .satest_en(satest_en),
    .dat_en(dat_en), .sa_delay(sa_delay), .dat_cfg2(dat_cfg2), .dat_cfg3(dat_cfg3),
    .puf_mode(sram_puf_mode), .bank_gclk_a(sram_bank_gclk_a), .bank_gclk_b(sram_bank_gclk_b)
  );

  ddr_pll u_pll (
    .cfg_clk(pll_cfg_clk), .rst_n(chip_rst_n), .cfg_we(pll_cfg_we), .cfg_addr(pll_cfg_addr),
    .cfg_data(pll_cfg_data), .openloop_clk(pll_openloop_clk), .loop_cntrl(pll_loop_cntrl),
    .inj_copy(pll_inj_copy), .inj_mask(pll_inj_mask), .pll_clk(pll_clk),
    .clk_div_out(pll_div_clk), .tdc_sel(pll_tdc), .cfg_mismatch(pll_cfg_mismatch),
    .divset(pll_divset)
  );

  blk_out_mux u_omux (
    .blk_sel(blk_sel), .hermes_out(hermes_out), .sram_out(sram_dout),
    .pll_out(pll_tdc), .pad_out(pad_out)
  );
endmodule
