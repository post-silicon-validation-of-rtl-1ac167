// sram_block: the SRAM block of the test chip.
//
// Two 1 Mb 6T arrays, one 1 Mb 8T array and three special registers.
// SRAM_Sel is decoded to select one array; only that array sees read and
// write (the others get no clock edges).  The 32 datain pads are written to
// both 32-bit halves of the 64-bit word, and the 64-bit dataout of the array
// last read is muxed to the output pads.  The 8T array's separate read and
// write addresses are both driven from the shared address pads, in the same
// {bank, half, wordline, column} layout as the 6T arrays.  The special
// registers (separate Spreg_Clk/Spreg_addr, datain shared) put the 6T arrays
// into PUF mode and set the sense-amplifier delay and the satest/DAT test
// modes, whose analog circuits are outside this model; those settings are
// brought out as ports.
//
// Timing: one access per clk cycle; controls change after the falling edge,
// the array is accessed at the rising edge and dataout changes at the next
// falling edge.  The SRAM_Sel encoding is this design's choice (tc25_pkg).
module sram_block
  import tc25_pkg::*;
#(
  parameter int unsigned ROWS         = 128,
  parameter int unsigned GREY_PER_256 = 67
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [1:0]            sram_sel,
  input  logic [SRAM_AW-1:0]    addr,
  input  logic                  read,
  input  logic                  write,
  input  logic [SRAM_DIN_W-1:0] datain,
  input  logic                  spreg_clk,
  input  logic [3:0]            spreg_addr,
  output logic [SRAM_DW-1:0]    dataout,
  // test-mode settings to the analog test circuits
  output logic                  satest_en,
  output logic                  dat_en,
  output logic [15:0]           sa_delay,
  output logic [31:0]           dat_cfg2,
  output logic [31:0]           dat_cfg3,
  output logic                  puf_mode,
  // gated bank clocks of the two 6T arrays, for observation
  output logic [N_BANKS-1:0]    bank_gclk_a,
  output logic [N_BANKS-1:0]    bank_gclk_b
);
  logic [SRAM_DW-1:0] din64, dout_a, dout_b, dout_8t;
  logic [31:0]        spreg1;
  logic               sel_a, sel_b, sel_8t;
  sram_sel_e          rd_sel_p, rd_sel_q;
  logic               rd_p;

  assign din64 = {datain, datain};

  // array select decoder
  always_comb begin
    sel_a  = (sram_sel_e'(sram_sel) == SEL_6T_A);
    sel_b  = (sram_sel_e'(sram_sel) == SEL_6T_B);
    sel_8t = (sram_sel_e'(sram_sel) == SEL_8T);
  end

  sram_spreg u_spreg (
    .spreg_clk(spreg_clk), .rst_n(rst_n), .spreg_addr(spreg_addr), .din(datain),
    .spreg1(spreg1), .spreg2(dat_cfg2), .spreg3(dat_cfg3),
    .puf_mode(puf_mode), .satest_en(satest_en), .dat_en(dat_en), .sa_delay(sa_delay)
  );

  sram6t_array #(.ROWS(ROWS), .SEED(1), .GREY_PER_256(GREY_PER_256)) u_arr_a (
    .clk(clk), .sel(sel_a), .addr(addr), .read(read), .write(write), .din(din64),
    .puf_mode(puf_mode), .dout(dout_a), .bank_gclk(bank_gclk_a)
  );

  sram6t_array #(.ROWS(ROWS), .SEED(2), .GREY_PER_256(GREY_PER_256)) u_arr_b (
    .clk(clk), .sel(sel_b), .addr(addr), .read(read), .write(write), .din(din64),
    .puf_mode(puf_mode), .dout(dout_b), .bank_gclk(bank_gclk_b)
  );

  // the 8T array uses the same {bank, half, wordline, column} layout
  localparam int unsigned RW8 = $clog2(ROWS);
  logic [RW8+7-1:0] addr_8t;
  assign addr_8t = {addr[13:10], addr[3 +: RW8], addr[2:0]};

  sram8t_array #(.WORDS(2 ** (RW8 + 7))) u_arr_8t (
    .clk(clk), .sel(sel_8t), .we(write), .waddr(addr_8t), .din(din64),
    .re(read && !write), .raddr(addr_8t), .dout(dout_8t)
  );

  // data output mux follows the array of the last read
  // (switched on the falling edge, when the selected array's data arrives)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sel_p <= SEL_6T_A;
      rd_p     <= 1'b0;
    end else begin
      rd_p <= read && !write;
      if (read && !write) rd_sel_p <= sram_sel_e'(sram_sel);
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)    rd_sel_q <= SEL_6T_A;
    else if (rd_p) rd_sel_q <= rd_sel_p;
  end

  always_comb begin
    unique case (rd_sel_q)
      SEL_6T_A: dataout = dout_a;
      SEL_6T_B: dataout = dout_b;
      SEL_8T:   dataout = dout_8t;
      default:  dataout = '0;
    endcase
  end
endmodule
