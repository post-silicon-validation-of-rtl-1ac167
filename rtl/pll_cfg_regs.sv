// pll_cfg_regs: the three configuration registers of the DDR PLL block.
//
// Coarse delay (32 bits) and fine delay (32 bits) set the delay lines of the
// PLL; divset (6 bits) sets the division factor of the output clock divider.
// Each is a self-correcting TMR register.  Write: on a rising cfg_clk edge
// with cfg_we high, cfg_addr 0 / 1 / 2 selects coarse / fine / divset and
// cfg_data is loaded (divset from cfg_data[5:0]).  The address map, write
// strobe and reset to zero are this design's choices; the register widths
// are the document's.  inj_copy/inj_mask reach all three registers for fault
// injection in simulation.
module pll_cfg_regs (
  input  logic        cfg_clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_data,
  input  logic [2:0]  inj_copy,
  input  logic [31:0] inj_mask,
  output logic [31:0] coarse,
  output logic [31:0] fine,
  output logic [5:0]  divset,
  output logic        mismatch
);
  logic [2:0] mm;

  tmr_reg #(.W(32)) u_coarse (
    .clk(cfg_clk), .rst_n(rst_n), .we(cfg_we && cfg_addr == 2'd0), .d(cfg_data),
    .inj_copy(inj_copy), .inj_mask(inj_mask), .q(coarse), .mismatch(mm[0])
  );
  tmr_reg #(.W(32)) u_fine (
    .clk(cfg_clk), .rst_n(rst_n), .we(cfg_we && cfg_addr == 2'd1), .d(cfg_data),
    .inj_copy(inj_copy), .inj_mask(inj_mask), .q(fine), .mismatch(mm[1])
  );
  tmr_reg #(.W(6)) u_divset (
    .clk(cfg_clk), .rst_n(rst_n), .we(cfg_we && cfg_addr == 2'd2), .d(cfg_data[5:0]),
    .inj_copy(inj_copy), .inj_mask(inj_mask[5:0]), .q(divset), .mismatch(mm[2])
  );

  assign mismatch = |mm;
endmodule
