// sram6t_array: one 1 Mb array of 6T bit cells (eight 16 kB banks).
//
// The 3-bit bank field of the address (banksel) is decoded to one of eight
// banks.  Each bank has its own clock gater: only the addressed bank of the
// selected array gets clock edges, and only in a cycle with a read or a
// write, so the other seven banks stay still.  The eight 2:1 power muxes that
// also cut the supply of idle banks are analog and not modelled.  The 32
// datain pads feed both halves of the 64-bit word (this design's choice).
//
// Timing follows the bank: controls change after the falling edge, the access
// happens at the rising edge, dout changes at the next falling edge.  The
// output mux follows the bank of the last read and switches on that same
// falling edge, so a change of bank never shows the old bank's data.
// bank_gclk exposes the gated bank clocks so that the gating can be observed.
// The address keeps its full-size layout {bank, half, wordline, column} when
// ROWS is reduced for simulation; the upper wordline bits are then ignored.
module sram6t_array
  import tc25_pkg::*;
#(
  parameter int unsigned N_BANKS_P      = N_BANKS,
  parameter int unsigned ROWS           = 128,
  parameter int unsigned YMUX           = 8,
  parameter int unsigned SEED           = 0,
  parameter int unsigned GREY_PER_256   = 67,
  parameter int unsigned STABLE_PER_256 = 0
) (
  input  logic                    clk,
  input  logic                    sel,        // this array is selected by SRAM_Sel
  input  logic [SRAM_AW-1:0]      addr,       // {bank, half, wordline, column}
  input  logic                    read,
  input  logic                    write,
  input  logic [SRAM_DW-1:0]      din,
  input  logic                    puf_mode,
  output logic [SRAM_DW-1:0]      dout,
  output logic [N_BANKS_P-1:0]    bank_gclk
);
  localparam int unsigned BAW = $clog2(2*ROWS*YMUX);
  localparam int unsigned BSW = $clog2(N_BANKS_P);

  logic [BSW-1:0]     banksel;
  logic [BAW-1:0]     baddr;
  logic [SRAM_DW-1:0] bank_dout [N_BANKS_P];
  logic [BSW-1:0]     rd_bank_p, rd_bank_q;
  logic               rd_p;

  localparam int unsigned YW  = $clog2(YMUX);
  localparam int unsigned RW  = $clog2(ROWS);

  // the chip address keeps its full-size layout {bank[2:0], half, wl[6:0],
  // ymux[2:0]}; with fewer rows only the low wordline bits are used
  assign banksel = addr[SRAM_AW-1 -: BSW];
  assign baddr   = {addr[YW+7], addr[YW +: RW], addr[YW-1:0]};

  for (genvar b = 0; b < N_BANKS_P; b++) begin : g_bank
    logic en;
    assign en = sel && (banksel == BSW'(b)) && (read || write);

    clk_gater u_cg (.clk(clk), .en(en), .gclk(bank_gclk[b]));

    sram_bank #(
      .ROWS(ROWS), .YMUX(YMUX), .DW(SRAM_DW), .SEED(SEED * 16 + b),
      .GREY_PER_256(GREY_PER_256), .STABLE_PER_256(STABLE_PER_256)
    ) u_bank (
      .clk(bank_gclk[b]), .addr(baddr), .read(read), .write(write),
      .din(din), .puf_mode(puf_mode), .dout(bank_dout[b])
    );
  end

  // the output mux moves to a new bank together with that bank's data, on
  // the falling edge that follows the read
  always_ff @(posedge clk) begin
    rd_p <= sel && read && !write;
    if (sel && read && !write) rd_bank_p <= banksel;
  end

  always_ff @(negedge clk) begin
    if (rd_p) rd_bank_q <= rd_bank_p;
  end

  assign dout = bank_dout[rd_bank_q];
endmodule
