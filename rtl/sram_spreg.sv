// sram_spreg: the three 32-bit special registers of the SRAM block.
//
// They have their own clock (Spreg_Clk) and 4-bit address (Spreg_addr) and
// share the 32 datain pads with the arrays.  On a rising edge of Spreg_Clk the
// register named by Spreg_addr (1, 2 or 3; other values write nothing) takes
// datain.  Register 1 enables the test modes and sets the sense-amplifier
// turn-off delay; registers 2 and 3 are used only in direct-access-test (DAT)
// mode.  Bit 31 of register 1 is PUF mode, as documented; satest in bit 30,
// DAT in bit 29 and the delay in bits [15:0] (longest setting 16'h00ff) are
// this design's layout, as are the address numbering and the reset to zero
// (normal mode).
module sram_spreg
  import tc25_pkg::*;
(
  input  logic        spreg_clk,
  input  logic        rst_n,
  input  logic [3:0]  spreg_addr,
  input  logic [31:0] din,
  output logic [31:0] spreg1,
  output logic [31:0] spreg2,
  output logic [31:0] spreg3,
  output logic        puf_mode,
  output logic        satest_en,
  output logic        dat_en,
  output logic [15:0] sa_delay
);
  always_ff @(posedge spreg_clk or negedge rst_n) begin
    if (!rst_n) begin
      spreg1 <= '0;
      spreg2 <= '0;
      spreg3 <= '0;
    end else begin
      case (spreg_addr)
        4'd1:    spreg1 <= din;
        4'd2:    spreg2 <= din;
        4'd3:    spreg3 <= din;
        default: ;
      endcase
    end
  end

  assign puf_mode  = spreg1[SP1_PUF_BIT];
  assign satest_en = spreg1[SP1_SATEST_BIT];
  assign dat_en    = spreg1[SP1_DAT_BIT];
  assign sa_delay  = spreg1[15:0];
endmodule
