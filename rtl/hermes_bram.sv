// hermes_bram: one 512 x 32 block RAM of the HERMES instruction or data
// memory.  Read: with en high, rdata takes mem[addr] at the rising clock
// edge.  Write: bytes with we[i] high take wdata at the same edge.  Contents
// start from INIT_FILE (hex, one word per line) when one is given, otherwise
// zero, as block RAMs are initialised in the FPGA bitstream.
module hermes_bram #(
  parameter int unsigned DEPTH     = 512,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [3:0]               we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      if (we[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    end
    if (en) rdata <= mem[addr];
  end
endmodule
