// clk_gater: latch-based clock gate, one per 16 kB SRAM bank.
//
// The enable is caught by a latch that is transparent while the clock is low,
// so it must be stable before the rising edge and cannot cut a high phase
// short; the gated clock is clk AND the latched enable.  A bank that is not
// selected sees no clock edges at all, which saves its switching power.  The
// document gives only the function; the latch-and-AND structure is the usual
// integrated clock gate.  The latch is intentional.
module clk_gater (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;
endmodule
