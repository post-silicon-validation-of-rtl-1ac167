// sram8t_array: the 1 Mb array built from 8T bit cells.
//
// 8T cells have a separate read port, so the array has an independent write
// port (we, waddr, din) and read port (re, raddr).  16384 words of 64 bits.
// The document gives only this; the timing is taken to match the 6T banks:
// ports are sampled at the rising edge and read data leaves through
// falling-edge flops.  The array clock is gated off when the array is not
// selected or idle.  A read and a write to the same word in one cycle return
// the old word (this design's choice).  The 8T array has no test modes.
module sram8t_array
  import tc25_pkg::*;
#(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned DW    = SRAM_DW
) (
  input  logic                     clk,
  input  logic                     sel,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [DW-1:0]            din,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [DW-1:0]            dout
);
  logic [DW-1:0] mem [WORDS];
  logic [DW-1:0] rd_q;
  logic          rd_pend;
  logic          gclk;

  clk_gater u_cg (.clk(clk), .en(sel && (we || re)), .gclk(gclk));

  always_ff @(posedge gclk) begin
    if (we) mem[waddr] <= din;
    rd_pend <= re;
    if (re) rd_q <= mem[raddr];
  end

  always_ff @(negedge gclk) begin
    if (rd_pend) dout <= rd_q;
  end
endmodule
