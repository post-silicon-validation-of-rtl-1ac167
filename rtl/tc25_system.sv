// tc25_system: the TC25 test chip together with its FPGA test bench.
//
// FPGA side: tb_clk_gen divides sys_clk by two into tb_clk and stops it
// while the trace memory is full; sram_tester (on tb_clk) drives the SRAM
// block's pins; trace_memory records those pins and the chip's output pads
// in two 512-line BRAMs, one line per BRAM_clk cycle, for the host to read
// out over the pipe ports; hermes_tb_sys serves the HERMES processor's
// external bus from instruction and data BRAMs and makes its resets.
// Chip side: tc25 with XOR_CLK0 driven by tb_clk and the other seven XOR
// clocks from ports, so in the SRAM test the chip clock is tb_clk itself.
//
// Not modelled, so brought out as ports: the FPGA PLL (sys_clk, bram_clk,
// same frequency and phase), the USB host interface and its endpoints
// (rst_n and program_clk_enable wire-ins; bram_full and stop_test
// wire-outs; pipe_read / pipe_data pipe-outs on ok_clk), the HERMES core
// (its bus, resets, core clock and output pads) and the DDR PLL's
// configuration pins.  The test-selection inputs stand for what is fixed in
// each test bitstream.  The trace line layout is tc25_pkg::sram_trace_t.
// A second trace memory with three BRAMs records the HERMES external bus
// (tc25_pkg::hermes_trace_t) on its own pipes; both memories fill in step,
// share program_clk_enable, and the test clock runs only while both have
// room.
module tc25_system
  import tc25_pkg::*;
(
  // FPGA clocks and host interface
  input  logic                    sys_clk,
  input  logic                    bram_clk,
  input  logic                    ok_clk,
  input  logic                    rst_n,
  input  logic                    program_clk_enable,
  input  logic [1:0]              pipe_read,
  output logic [127:0]            pipe_data,
  output logic [1:0]              parity_err,
  input  logic [2:0]              pipe_read_h,      // HERMES trace pipes
  output logic [191:0]            pipe_data_h,
  output logic [2:0]              parity_err_h,
  output logic                    bram_full_h,
  output logic [15:0]             fill_count_h,
  output logic                    bram_full,
  output logic [15:0]             fill_count,
  output logic                    stop_test,
  output logic                    tb_clk,
  // SRAM test selection
  input  logic [1:0]              cfg_mode,
  input  logic [1:0]              cfg_pattern,
  input  logic [1:0]              cfg_sram_sel,
  input  logic [31:0]             cfg_spreg1,
  input  logic [31:0]             cfg_spreg2,
  // chip static pins
  input  logic                    clk_sel,
  input  logic [1:0]              blk_sel,
  input  logic [7:1]              xor_clk_hi,
  // DDR PLL configuration pins
  input  logic                    pll_cfg_clk,
  input  logic                    pll_cfg_we,
  input  logic [1:0]              pll_cfg_addr,
  input  logic [31:0]             pll_cfg_data,
  input  logic                    pll_openloop_clk,
  input  logic                    pll_loop_cntrl,
  input  logic [2:0]              pll_inj_copy,
  input  logic [31:0]             pll_inj_mask,
  // HERMES processor (external)
  input  logic [HERMES_OUT_W-1:0] hermes_out,
  output logic                    hermes_core_clk,
  input  logic                    eb_avalid,
  input  logic                    eb_instr,
  input  logic                    eb_write,
  input  logic [31:0]             eb_a,
  input  logic [3:0]              eb_be,
  input  logic [31:0]             eb_wdata,
  output logic [31:0]             eb_rdata,
  output logic                    eb_rdval,
  output logic                    si_pll_reset,
  output logic                    si_cold_reset,
  // chip outputs and observation
  output logic [HERMES_OUT_W-1:0] pad_out,
  output logic                    clk_div_out,
  output logic [N_BANKS-1:0]      sram_bank_gclk_a,
  output logic [N_BANKS-1:0]      sram_bank_gclk_b,
  output logic                    sram_puf_mode,
  output logic                    pll_cfg_mismatch,
  output logic                    pll_div_clk,
  output logic                    start_write_read
);
  logic [13:0] address;
  logic [31:0] datain;
  logic        read, write, spreg_clk;
  logic [1:0]  sram_sel;
  logic [3:0]  spreg_addr;
  logic        puf_phase;
  logic        chip_clk;
  sram_trace_t trace;
  hermes_trace_t htrace;
  logic        room;

  assign room = bram_full && bram_full_h;

  tb_clk_gen u_clkgen (.sys_clk(sys_clk), .rst_n(rst_n), .bram_full(room), .tb_clk(tb_clk));

  sram_tester u_tester (
    .tb_clk(tb_clk), .rst_n(rst_n), .cfg_mode(cfg_mode), .cfg_pattern(cfg_pattern),
    .cfg_sram_sel(cfg_sram_sel), .cfg_spreg1(cfg_spreg1), .cfg_spreg2(cfg_spreg2),
    .address(address), .datain(datain), .read(read), .write(write), .sram_sel(sram_sel),
    .spreg_clk(spreg_clk), .spreg_addr(spreg_addr), .start_write_read(start_write_read),
    .stop_test(stop_test), .puf_phase(puf_phase)
  );

  tc25 u_chip (
    .xor_clk({xor_clk_hi, tb_clk}), .clk_sel(clk_sel), .blk_sel(blk_sel), .chip_rst_n(rst_n),
    .sram_sel(sram_sel), .address(address), .datain(datain), .read(read), .write(write),
    .spreg_clk(spreg_clk), .spreg_addr(spreg_addr),
    .pll_cfg_clk(pll_cfg_clk), .pll_cfg_we(pll_cfg_we), .pll_cfg_addr(pll_cfg_addr),
    .pll_cfg_data(pll_cfg_data), .pll_openloop_clk(pll_openloop_clk),
    .pll_loop_cntrl(pll_loop_cntrl), .pll_inj_copy(pll_inj_copy), .pll_inj_mask(pll_inj_mask),
    .hermes_out(hermes_out), .hermes_core_clk(hermes_core_clk),
    .pad_out(pad_out), .clk_div_out(clk_div_out), .chip_clk(chip_clk),
    .sram_bank_gclk_a(sram_bank_gclk_a), .sram_bank_gclk_b(sram_bank_gclk_b),
    .sram_puf_mode(sram_puf_mode), .pll_cfg_mismatch(pll_cfg_mismatch), .pll_div_clk(pll_div_clk)
  );

  always_comb begin
    trace.pad_out          = pad_out[63:0];
    trace.datain           = datain;
    trace.address          = address;
    trace.read             = read;
    trace.write            = write;
    trace.spreg_addr       = spreg_addr;
    trace.spreg_clk        = spreg_clk;
    trace.sram_sel         = sram_sel;
    trace.xor_clk0         = tb_clk;
    trace.blk_sel          = blk_sel;
    trace.clk_sel          = clk_sel;
    trace.clk_div_out      = clk_div_out;
    trace.stop_test        = stop_test;
    trace.start_write_read = start_write_read;
    trace.puf_phase        = puf_phase;
    trace.chip_clk         = chip_clk;
  end

  trace_memory #(.N_BRAM(2)) u_trace (
    .bram_clk(bram_clk), .ok_clk(ok_clk), .rst_n(rst_n), .din(trace),
    .program_clk_enable(program_clk_enable), .pipe_read(pipe_read),
    .pipe_data(pipe_data), .parity_err(parity_err), .bram_full(bram_full),
    .fill_count(fill_count)
  );

  always_comb begin
    htrace.hermes_out    = hermes_out;
    htrace.eb_a          = eb_a;
    htrace.eb_wdata      = eb_wdata;
    htrace.eb_rdata      = eb_rdata;
    htrace.eb_be         = eb_be;
    htrace.eb_avalid     = eb_avalid;
    htrace.eb_instr      = eb_instr;
    htrace.eb_write      = eb_write;
    htrace.eb_rdval      = eb_rdval;
    htrace.si_pll_reset  = si_pll_reset;
    htrace.si_cold_reset = si_cold_reset;
    htrace.bus_clk       = tb_clk;
    htrace.spare         = '0;
  end

  trace_memory #(.N_BRAM(3)) u_htrace (
    .bram_clk(bram_clk), .ok_clk(ok_clk), .rst_n(rst_n), .din(htrace),
    .program_clk_enable(program_clk_enable), .pipe_read(pipe_read_h),
    .pipe_data(pipe_data_h), .parity_err(parity_err_h), .bram_full(bram_full_h),
    .fill_count(fill_count_h)
  );

  hermes_tb_sys u_hermes_tb (
    .bus_clk(tb_clk), .rst_n(rst_n), .eb_avalid(eb_avalid), .eb_instr(eb_instr),
    .eb_write(eb_write), .eb_a(eb_a), .eb_be(eb_be), .eb_wdata(eb_wdata),
    .eb_rdata(eb_rdata), .eb_rdval(eb_rdval), .si_pll_reset(si_pll_reset),
    .si_cold_reset(si_cold_reset)
  );
endmodule
