// sram_bank: behavioural model of one custom 16 kB bank of the 6T SRAM array.
//
// This is a behavioural model of a full-custom macro, not synthesizable logic
// for the bit cells.  A bank has a 7:128 word-line decoder, 64 column groups
// each split into top and bottom halves with an 8:1 column mux, and a shared
// write driver / sense amplifier / latch per column group: 2 x 128 x 8 words
// of 64 bits.  The 11-bit bank address is {half, wordline[6:0], ymux[2:0]}.
//
// Timing (clk is the bank's gated clock): read/write and the address change
// after a falling edge and are decoded while the clock is low; at the rising
// edge the word line fires and the word is written or sensed; sensed data is
// captured by falling-edge flops, so dout changes at the falling edge that
// ends the access cycle and holds until the next read.
//
// PUF mode (special register 1 bit 31): a read turns on the word line with
// the bit cells destabilised, and every cell falls to a state set by its
// mismatch and by noise.  The model gives each cell a fixed preferred value
// from a hash of (SEED, address, bit); a fraction GREY_PER_256/256 of cells
// are "well matched" and fall randomly (driven by an LFSR noise source), and a fraction STABLE_PER_256/256
// stay stable and keep their written value.  Both fractions depend on the
// supply voltages on silicon and are parameters here; the hash and the
// defaults are this model's own choices.  The word read in PUF mode is the
// resolved word.
module sram_bank
  import tc25_pkg::*;
#(
  parameter int unsigned ROWS           = 128,
  parameter int unsigned YMUX           = 8,
  parameter int unsigned DW             = 64,
  parameter int unsigned SEED           = 0,
  parameter int unsigned GREY_PER_256   = 67,   // about 26 %
  parameter int unsigned STABLE_PER_256 = 0
) (
  input  logic                                clk,
  input  logic [$clog2(2*ROWS*YMUX)-1:0]      addr,
  input  logic                                read,
  input  logic                                write,
  input  logic [DW-1:0]                       din,
  input  logic                                puf_mode,
  output logic [DW-1:0]                       dout
);
  localparam int unsigned WORDS = 2 * ROWS * YMUX;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [DW-1:0] mem [WORDS];
  logic [DW-1:0] sa_q;       // sense amplifier latch
  logic          rd_pend;

  // per-cell mixing hash
  function automatic logic [31:0] cell_hash(input logic [AW-1:0] a, input int unsigned b,
                                            input int unsigned salt);
    logic [31:0] h;
    h = (32'(a) * 32'h9E37_79B1) ^ (32'(b) * 32'h85EB_CA6B) ^ (32'(SEED) * 32'hC2B2_AE35)
        ^ (32'(salt) * 32'h27D4_EB2F);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // noise source: a 32-bit LFSR stepped on every bank clock
  logic [31:0] noise;
  always_ff @(posedge clk) begin
    noise <= (noise == '0) ? 32'h1 : {noise[30:0], noise[31] ^ noise[21] ^ noise[1] ^ noise[0]};
  end

  function automatic logic [DW-1:0] puf_resolve(input logic [AW-1:0] a, input logic [DW-1:0] old,
                                                input logic [31:0] nz);
    logic [DW-1:0] r;
    for (int unsigned b = 0; b < DW; b++) begin
      logic [31:0] hc, hp, hn;
      hc = cell_hash(a, b, 1);
      hp = cell_hash(a, b, 2);
      hn = cell_hash(a ^ AW'(nz), b, nz);
      if (hc[7:0] < 8'(STABLE_PER_256))
        r[b] = old[b];                                  // still stable
      else if (hc[15:8] < 8'(GREY_PER_256))
        r[b] = hn[0];                                   // noise decides
      else
        r[b] = hp[0];                                   // mismatch decides
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    logic [DW-1:0] res;
    res = puf_resolve(addr, mem[addr], noise);
    rd_pend <= 1'b0;
    if (write) begin
      mem[addr] <= din;
    end else if (read) begin
      rd_pend <= 1'b1;
      if (puf_mode) begin
        sa_q      <= res;
        mem[addr] <= res;
      end else begin
        sa_q <= mem[addr];
      end
    end
  end

  always_ff @(negedge clk) begin
    if (rd_pend) dout <= sa_q;
  end
endmodule
