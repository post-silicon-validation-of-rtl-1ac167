// hermes_dmem: data memory of the HERMES test bench.
//
// Two 512 x 32 BRAMs serve the regions 14'h0000 and 14'h1000 of address bits
// [29:16] (for example kseg0 address 0x9000_00F0 falls in 14'h1000).  Reads
// work as in the instruction memory: region match enables the BRAM, the
// flopped match selects the output, zero when nothing matched.  A write
// (wren with byte enables be) goes to the matching BRAM at the next rising
// BRAM-clock edge, word address bits [10:2].  Regions and structure follow
// the document; the byte enables and index bits are this design's choice.
module hermes_dmem #(
  parameter string INIT_0000 = "",
  parameter string INIT_1000 = ""
) (
  input  logic        clk,      // BRAM clock (inverted bus clock)
  input  logic        rden,
  input  logic        wren,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        hit
);
  logic [1:0]  sel, sel_q;
  logic [31:0] dout0, dout1;

  assign sel[0] = (addr[29:16] == 14'h0000);
  assign sel[1] = (addr[29:16] == 14'h1000);

  hermes_bram #(.INIT_FILE(INIT_0000)) u_b0000 (
    .clk(clk), .en(rden && sel[0]), .we((wren && sel[0]) ? be : 4'b0),
    .addr(addr[10:2]), .wdata(wdata), .rdata(dout0)
  );
  hermes_bram #(.INIT_FILE(INIT_1000)) u_b1000 (
    .clk(clk), .en(rden && sel[1]), .we((wren && sel[1]) ? be : 4'b0),
    .addr(addr[10:2]), .wdata(wdata), .rdata(dout1)
  );

  always_ff @(posedge clk) sel_q <= sel;

  always_comb begin
    unique case (sel_q)
      2'b01:   rdata = dout0;
      2'b10:   rdata = dout1;
      default: rdata = '0;
    endcase
  end

  assign hit = |sel;
endmodule
