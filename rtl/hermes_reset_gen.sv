// hermes_reset_gen: reset sequencer for the HERMES processor.
//
// A 4-bit counter counts test-bench clock cycles after the FPGA reset and
// saturates at 15.  PLLReset (active high) starts low, is high while the
// count is in [PLL_ON, PLL_OFF) -- two cycles -- and loads the processor's
// PLL configuration and bus-to-core clock ratio.  ColdReset (active high)
// starts high and is released when the count reaches COLD_OFF.  Both are
// registered outputs.  The counter and the two-cycle PLLReset pulse are as
// documented; the exact counts are read from the reset timing diagram and
// are parameters.
module hermes_reset_gen #(
  parameter logic [3:0] PLL_ON   = 4'd1,
  parameter logic [3:0] PLL_OFF  = 4'd3,
  parameter logic [3:0] COLD_OFF = 4'd7
) (
  input  logic clk,
  input  logic rst_n,
  output logic pll_reset,
  output logic cold_reset
);
  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      pll_reset  <= 1'b0;
      cold_reset <= 1'b1;
    end else begin
      if (cnt != 4'hF) cnt <= cnt + 4'd1;
      pll_reset  <= (cnt >= PLL_ON) && (cnt < PLL_OFF);
      cold_reset <= (cnt < COLD_OFF);
    end
  end
endmodule
