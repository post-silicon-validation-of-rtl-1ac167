// hermes_imem: instruction memory of the HERMES test bench.
//
// Five 512 x 32 BRAMs serve five 64 KB regions of the physical address
// space, chosen by address bits [29:16]: 14'h1FC0 (boot code, reached
// through kseg1 at 0xBFC0_0000), 14'h0000, 14'h0FFF, 14'h1000 and 14'h1FFF.
// Bits [29:16] are compared with each region; the match enables that BRAM's
// read and is also flopped on the BRAM clock, and the flopped selects pick
// the BRAM whose data goes onto the output bus (zero if none matched).  A
// read issued at one rising BRAM-clock edge gives its word on rdata until
// the next edge.  Each BRAM is addressed by word address bits [10:2]; the
// BRAM contents are parameters (hex files), as the instructions are built
// into the bitstream.  The regions and the flopped-select mux follow the
// document; the 9-bit index bits are this design's choice.
module hermes_imem #(
  parameter string INIT_1FC0 = "",
  parameter string INIT_0000 = "",
  parameter string INIT_0FFF = "",
  parameter string INIT_1000 = "",
  parameter string INIT_1FFF = ""
) (
  input  logic        clk,      // BRAM clock (inverted bus clock)
  input  logic        rden,
  input  logic [31:0] rdaddr,
  output logic [31:0] rdata,
  output logic        hit       // address fell in one of the regions
);
  localparam int N = 5;
  localparam logic [13:0] REGION [N] = '{14'h1FC0, 14'h0000, 14'h0FFF, 14'h1000, 14'h1FFF};

  logic [N-1:0] sel, sel_q;
  logic [31:0]  dout [N];

  for (genvar i = 0; i < N; i++) begin : g_sel
    assign sel[i] = (rdaddr[29:16] == REGION[i]);
  end

  hermes_bram #(.INIT_FILE(INIT_1FC0)) u_b1fc0 (.clk(clk), .en(rden && sel[0]), .we('0), .addr(rdaddr[10:2]), .wdata('0), .rdata(dout[0]));
  hermes_bram #(.INIT_FILE(INIT_0000)) u_b0000 (.clk(clk), .en(rden && sel[1]), .we('0), .addr(rdaddr[10:2]), .wdata('0), .rdata(dout[1]));
  hermes_bram #(.INIT_FILE(INIT_0FFF)) u_b0fff (.clk(clk), .en(rden && sel[2]), .we('0), .addr(rdaddr[10:2]), .wdata('0), .rdata(dout[2]));
  hermes_bram #(.INIT_FILE(INIT_1000)) u_b1000 (.clk(clk), .en(rden && sel[3]), .we('0), .addr(rdaddr[10:2]), .wdata('0), .rdata(dout[3]));
  hermes_bram #(.INIT_FILE(INIT_1FFF)) u_b1fff (.clk(clk), .en(rden && sel[4]), .we('0), .addr(rdaddr[10:2]), .wdata('0), .rdata(dout[4]));

  always_ff @(posedge clk) sel_q <= sel;

  always_comb begin
    rdata = '0;
    for (int i = 0; i < N; i++) if (sel_q[i]) rdata = dout[i];
  end

  assign hit = |sel;
endmodule
