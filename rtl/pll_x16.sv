// pll_x16: behavioural model of the custom PLL of the DDR PLL block.
//
// This is a behavioural model (delays, real time), not synthesizable logic;
// the real part is a full-custom radiation-hardened PLL whose circuit is not
// given.  Its oscillator period is set by a coarse and a fine delay line,
// each controlled by a 32-bit thermometer-style setting.  Model:
//   open loop (loop_cntrl = 0): half period = T_BASE + ones(coarse)*T_COARSE
//                                             + ones(fine)*T_FINE
//   closed loop (loop_cntrl = 1): the oscillator runs at 16 x the
//                                 frequency of openloop_clk (the "x16").
// tdc_sel is a thermometer code of the time from the last rising pll_clk
// edge to each rising openloop_clk edge, in T_FINE steps, saturating at 32.
// The step sizes, the closed-loop behaviour and the meaning of tdc_sel are
// this model's assumptions; only the port names and widths come from the
// block diagram.
module pll_x16 #(
  parameter int unsigned T_BASE_PS   = 200,
  parameter int unsigned T_COARSE_PS = 40,
  parameter int unsigned T_FINE_PS   = 5
) (
  input  logic        openloop_clk,
  input  logic        loop_cntrl,
  input  logic [31:0] coarse,
  input  logic [31:0] fine,
  output logic        pll_clk,
  output logic [31:0] tdc_sel
);
  localparam realtime PS = 1ps;   // one picosecond in this module's time unit

  realtime t_ref_last, t_ref_period, t_pll_rise;

  initial begin
    t_ref_last   = 0;
    t_ref_period = 0;
    t_pll_rise   = 0;
    tdc_sel      = '0;
  end

  function automatic realtime half_period();
    if (loop_cntrl && t_ref_period > 0)
      return t_ref_period / 32.0;
    return realtime'(T_BASE_PS + $countones(coarse) * T_COARSE_PS
                     + $countones(fine) * T_FINE_PS) * PS;
  endfunction

  initial begin
    pll_clk = 1'b0;
    forever begin
      #(half_period());
      pll_clk = ~pll_clk;
      if (pll_clk) t_pll_rise = $realtime;
    end
  end

  always @(posedge openloop_clk) begin
    automatic int unsigned steps;
    if (t_ref_last > 0) t_ref_period = $realtime - t_ref_last;
    t_ref_last = $realtime;
    steps = int'(($realtime - t_pll_rise) / (T_FINE_PS * PS));
    if (steps > 32) steps = 32;
    tdc_sel = (steps == 32) ? '1 : ((32'd1 << steps) - 32'd1);
  end
endmodule
