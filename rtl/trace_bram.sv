// trace_bram: simple dual-port block RAM used to record test-chip signals.
//
// DEPTH lines of DW data bits plus PW parity bits (512 x 72 as on the FPGA:
// 64 data + 8 parity).  The write port (wclk) writes wdata at the rising edge
// when we is high; the read port (rclk) loads rdata at the rising edge when
// re is high, so read data appears one cycle after the request.  A read of
// the line being written in the same cycle would see the new data (write
// first), though the test bench never does both at once.
module trace_bram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned DW    = 64,
  parameter int unsigned PW    = 8
) (
  input  logic                     wclk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW+PW-1:0]         wdata,
  input  logic                     rclk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW+PW-1:0]         rdata
);
  logic [DW+PW-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
