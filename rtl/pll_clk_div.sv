// pll_clk_div: TMR clock divider of the DDR PLL block.
//
// Divides PLL_Clk by N = divset (values 0 and 1 are treated as 2, this
// design's choice).  The output is high for the first N/2 input cycles of
// each period of N, so even N gives a 50% duty cycle.  The counter and the
// output flop are triplicated and every copy reloads from the majority vote
// each cycle, so one upset copy is corrected at the next edge.  The output
// is a registered signal, changing just after rising PLL_Clk edges.
module pll_clk_div (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] divset,
  output logic       clk_div_out
);
  logic [5:0] cnt [3];
  logic [2:0] o;
  logic [5:0] cnt_v, n, cnt_nx;

  always_comb begin
    cnt_v       = (cnt[0] & cnt[1]) | (cnt[0] & cnt[2]) | (cnt[1] & cnt[2]);
    clk_div_out = (o[0] & o[1]) | (o[0] & o[2]) | (o[1] & o[2]);
    n           = (divset < 6'd2) ? 6'd2 : divset;
    cnt_nx      = (cnt_v >= n - 6'd1) ? 6'd0 : cnt_v + 6'd1;
  end

  for (genvar i = 0; i < 3; i++) begin : g_tmr
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[i] <= '0;
        o[i]   <= 1'b1;
      end else begin
        cnt[i] <= cnt_nx;
        o[i]   <= (cnt_nx < (n >> 1));
      end
    end
  end
endmodule
