// tc25_pkg: constants and types shared by the TC25 test chip model and the
// FPGA test bench around it.
//
// The SRAM address is 14 bits, split {bank[2:0], half, wordline[6:0],
// ymux[2:0]}: eight 16 kB banks, each with top/bottom halves of 128 word lines
// and an 8:1 column mux, 64 bits per word, 16384 words per 1 Mb array.  The
// field order follows the way bad addresses are written down for the chip
// (e.g. 14'b000_1_0000000_001).  The block-select and SRAM-select encodings
// and the special-register bit positions other than the PUF bit are this
// design's own choices.
package tc25_pkg;

  // ---- SRAM geometry ----
  localparam int unsigned SRAM_AW    = 14;   // 16384 words per 1 Mb array
  localparam int unsigned SRAM_DW    = 64;   // 64 column groups -> 64 data bits
  localparam int unsigned SRAM_DIN_W = 32;   // datain pads (shared with spregs)
  localparam int unsigned BANK_AW    = 11;   // {half, wordline[6:0], ymux[2:0]}
  localparam int unsigned N_BANKS    = 8;

  typedef struct packed {
    logic [2:0] bank;
    logic       half;      // 1 = top half, 0 = bottom half (assumed)
    logic [6:0] wl;
    logic [2:0] ymux;
  } sram_addr_t;

  // ---- SRAM_Sel encoding (assumed) ----
  typedef enum logic [1:0] {
    SEL_6T_A = 2'd0,
    SEL_6T_B = 2'd1,
    SEL_8T   = 2'd2,
    SEL_NONE = 2'd3
  } sram_sel_e;

  // ---- special register 1 fields ----
  localparam int unsigned SP1_PUF_BIT    = 31;  // document: bit 31 turns on PUF mode
  localparam int unsigned SP1_SATEST_BIT = 30;  // assumed
  localparam int unsigned SP1_DAT_BIT    = 29;  // assumed
  // sense amplifier delay in bits [15:0]; 16'h00ff is the longest setting used

  // ---- BLK_SEL encoding (assumed) ----
  typedef enum logic [1:0] {
    BLK_HERMES = 2'd0,
    BLK_SRAM   = 2'd1,
    BLK_PLL    = 2'd2,
    BLK_OFF    = 2'd3
  } blk_sel_e;

  localparam int unsigned HERMES_OUT_W = 79;  // digital outputs of HERMES
  localparam int unsigned PLL_OUT_W    = 32;  // digital outputs of the DDR PLL

  // ---- SRAM test-bench data patterns ----
  typedef enum logic [1:0] {
    PAT_ONES   = 2'd0,   // 32'hFFFF_FFFF
    PAT_ZEROS  = 2'd1,   // 32'h0
    PAT_ADDR   = 2'd2,   // {18'h0, address}
    PAT_NADDR  = 2'd3    // {18'h3_FFFF, ~address}
  } sram_pat_e;

  // One trace line pair of the SRAM test: what the FPGA records about the
  // SRAM block's pins every BRAM_clk cycle (first 64 bits: inputs and
  // status, second 64 bits: the output pads).
  typedef struct packed {
    logic [63:0] pad_out;
    logic [31:0] datain;
    logic [13:0] address;
    logic        read;
    logic        write;
    logic [3:0]  spreg_addr;
    logic        spreg_clk;
    logic [1:0]  sram_sel;
    logic        xor_clk0;
    logic [1:0]  blk_sel;
    logic        clk_sel;
    logic        clk_div_out;
    logic        stop_test;
    logic        start_write_read;
    logic        puf_phase;
    logic        chip_clk;
  } sram_trace_t;

  // one 192-bit line of the HERMES trace (three 64-bit BRAMs): the
  // processor's external bus, its resets and its 79 output pins
  typedef struct packed {
    logic [78:0] hermes_out;
    logic [31:0] eb_a;
    logic [31:0] eb_wdata;
    logic [31:0] eb_rdata;
    logic [3:0]  eb_be;
    logic        eb_avalid;
    logic        eb_instr;
    logic        eb_write;
    logic        eb_rdval;
    logic        si_pll_reset;
    logic        si_cold_reset;
    logic        bus_clk;
    logic [5:0]  spare;
  } hermes_trace_t;

  // datain for a pattern at an address
  function automatic logic [31:0] pattern_data(sram_pat_e p, logic [13:0] a);
    case (p)
      PAT_ONES:  return 32'hFFFF_FFFF;
      PAT_ZEROS: return 32'h0;
      PAT_ADDR:  return {18'h0, a};
      default:   return {18'h3_FFFF, ~a};
    endcase
  endfunction

  // majority of three
  function automatic logic [31:0] maj3(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
