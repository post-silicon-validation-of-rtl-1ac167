// clk_div8: divide-by-8 clock divider of the test chip.
//
// Divides the multiplexed chip clock by eight and drives the CLK_DIV_OUT pad,
// the first thing checked on a new part to see that the clocks work.  A
// 2-bit counter toggles the output flop every fourth rising edge, giving a
// 50% duty cycle.  The active-low reset is this design's addition.
module clk_div8 (
  input  logic clk,
  input  logic rst_n,
  output logic clk_div_out
);
  logic [1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      clk_div_out <= 1'b0;
    end else begin
      cnt <= cnt + 2'd1;
      if (cnt == 2'd3) clk_div_out <= ~clk_div_out;
    end
  end
endmodule
