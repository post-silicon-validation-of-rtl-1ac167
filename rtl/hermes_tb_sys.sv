// hermes_tb_sys: the FPGA test bench of the HERMES processor.
//
// Reset generation, instruction memory, data memory and control logic,
// connected to the processor's external bus (EB_*) and reset pins.  The
// memories run on the inverted bus clock (180 degrees out of phase), so a
// request placed after a rising bus-clock edge is served mid-cycle and its
// data is on EB_RData for the next bus cycle.  The processor itself is not
// part of this design: these ports connect to it.
module hermes_tb_sys #(
  parameter string       IMEM_1FC0 = "",
  parameter string       IMEM_0000 = "",
  parameter string       DMEM_1000 = "",
  parameter logic [31:0] CLK_RATIO = 32'd4
) (
  input  logic        bus_clk,
  input  logic        rst_n,
  // processor external bus
  input  logic        eb_avalid,
  input  logic        eb_instr,
  input  logic        eb_write,
  input  logic [31:0] eb_a,
  input  logic [3:0]  eb_be,
  input  logic [31:0] eb_wdata,
  output logic [31:0] eb_rdata,
  output logic        eb_rdval,
  // resets to the processor
  output logic        si_pll_reset,
  output logic        si_cold_reset
);
  logic        bram_clk;
  logic        imem_rd, dmem_rd, dmem_wr;
  logic [31:0] imem_rdata, dmem_rdata;
  logic        imem_hit, dmem_hit;

  assign bram_clk = ~bus_clk;

  hermes_reset_gen u_rst (
    .clk(bus_clk), .rst_n(rst_n), .pll_reset(si_pll_reset), .cold_reset(si_cold_reset)
  );

  hermes_imem #(.INIT_1FC0(IMEM_1FC0), .INIT_0000(IMEM_0000)) u_imem (
    .clk(bram_clk), .rden(imem_rd), .rdaddr(eb_a), .rdata(imem_rdata), .hit(imem_hit)
  );

  hermes_dmem #(.INIT_1000(DMEM_1000)) u_dmem (
    .clk(bram_clk), .rden(dmem_rd), .wren(dmem_wr), .be(eb_be), .addr(eb_a),
    .wdata(eb_wdata), .rdata(dmem_rdata), .hit(dmem_hit)
  );

  hermes_ctrl #(.CLK_RATIO(CLK_RATIO)) u_ctrl (
    .bus_clk(bus_clk), .bram_clk(bram_clk), .rst_n(rst_n), .cold_reset(si_cold_reset),
    .eb_avalid(eb_avalid), .eb_instr(eb_instr), .eb_write(eb_write),
    .imem_rd(imem_rd), .dmem_rd(dmem_rd), .dmem_wr(dmem_wr),
    .imem_rdata(imem_rdata), .dmem_rdata(dmem_rdata),
    .eb_rdata(eb_rdata), .eb_rdval(eb_rdval)
  );

  // every access must land in one of the memories
  a_imem_hit: assert property (@(posedge bus_clk) disable iff (!rst_n) imem_rd |-> imem_hit);
  a_dmem_hit: assert property (@(posedge bus_clk) disable iff (!rst_n) (dmem_rd || dmem_wr) |-> dmem_hit);
endmodule
