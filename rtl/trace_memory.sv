// trace_memory: the FPGA memory module that records the test-chip I/O.
//
// N_BRAM block RAMs of 512 x (64 data + 8 parity) bits store N_BRAM*64
// signals, one line per BRAM_clk cycle, i.e. two lines per tb_clk cycle (two
// BRAMs for the SRAM and DDR PLL blocks, three for HERMES).  One write logic
// fills all BRAMs in step and controls bram_full; each BRAM has its own
// read logic, fed by its pipe-out read strobe on okClk, and its 64-bit line
// is presented as two 32-bit pipe words (pipe_data[64*i +: 32] and
// [64*i+32 +: 32]).  The parity bits are even parity per data byte (this
// design's use of them); parity_err flags a line read back with bad parity.
module trace_memory #(
  parameter int unsigned N_BRAM = 2,
  parameter int unsigned DEPTH  = 512
) (
  input  logic                  bram_clk,
  input  logic                  ok_clk,
  input  logic                  rst_n,
  input  logic [N_BRAM*64-1:0]  din,
  input  logic                  program_clk_enable,
  input  logic [N_BRAM-1:0]     pipe_read,
  output logic [N_BRAM*64-1:0]  pipe_data,
  output logic [N_BRAM-1:0]     parity_err,
  output logic                  bram_full,
  output logic [15:0]           fill_count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic                  we;
  logic [AW-1:0]         waddr;
  logic [N_BRAM*64-1:0]  wdata;

  function automatic logic [7:0] byte_parity(input logic [63:0] d);
    logic [7:0] p;
    for (int i = 0; i < 8; i++) p[i] = ^d[8*i +: 8];
    return p;
  endfunction

  trace_write_logic #(.DEPTH(DEPTH), .W(N_BRAM*64)) u_wr (
    .bram_clk(bram_clk), .rst_n(rst_n), .din(din),
    .program_clk_enable(program_clk_enable), .we(we), .waddr(waddr),
    .wdata(wdata), .bram_full(bram_full), .fill_count(fill_count)
  );

  for (genvar i = 0; i < N_BRAM; i++) begin : g_bram
    logic          re;
    logic [AW-1:0] raddr;
    logic [71:0]   rdata;

    trace_read_logic #(.DEPTH(DEPTH)) u_rd (
      .ok_clk(ok_clk), .rst_n(rst_n), .pipe_read(pipe_read[i]), .re(re), .raddr(raddr)
    );

    trace_bram #(.DEPTH(DEPTH), .DW(64), .PW(8)) u_bram (
      .wclk(bram_clk), .we(we), .waddr(waddr),
      .wdata({byte_parity(wdata[64*i +: 64]), wdata[64*i +: 64]}),
      .rclk(ok_clk), .re(re), .raddr(raddr), .rdata(rdata)
    );

    assign pipe_data[64*i +: 64] = rdata[63:0];
    assign parity_err[i]         = (byte_parity(rdata[63:0]) != rdata[71:64]);
  end
endmodule
