// hermes_ctrl: control logic between the HERMES external bus and the
// test-bench memories.
//
// From the processor's EB_AValid, EB_Instr and EB_Write it makes the memory
// strobes: an instruction read (AValid, Instr, not Write), a data read
// (AValid, not Instr, not Write) or a data write (AValid, Write); write data
// goes straight to the data memory.  The memories are clocked by the inverted
// bus clock, so a request made in one bus cycle is served at its middle.  At
// the next rising bus-clock edge a 4:1 mux loads EB_RData, for exactly one
// bus cycle, with: the instruction word, the data word, the bus-to-core clock
// ratio (while ColdReset is high, so the processor picks it up when reset),
// or zero.  EB_RdVal marks that cycle.  The ratio encoding (the number
// itself, default 4 for a core clock four times the bus clock) and EB_RdVal
// are this design's choices.
module hermes_ctrl #(
  parameter logic [31:0] CLK_RATIO = 32'd4
) (
  input  logic        bus_clk,
  input  logic        bram_clk,
  input  logic        rst_n,
  input  logic        cold_reset,
  input  logic        eb_avalid,
  input  logic        eb_instr,
  input  logic        eb_write,
  output logic        imem_rd,
  output logic        dmem_rd,
  output logic        dmem_wr,
  input  logic [31:0] imem_rdata,
  input  logic [31:0] dmem_rdata,
  output logic [31:0] eb_rdata,
  output logic        eb_rdval
);
  typedef enum logic [1:0] {SRC_ZERO, SRC_IMEM, SRC_DMEM, SRC_RATIO} src_e;

  src_e src_q;   // what the memories served this cycle (BRAM-clock domain)
  src_e mux_sel;

  always_comb begin
    imem_rd = eb_avalid && eb_instr && !eb_write;
    dmem_rd = eb_avalid && !eb_instr && !eb_write;
    dmem_wr = eb_avalid && eb_write;
  end

  always_ff @(posedge bram_clk or negedge rst_n) begin
    if (!rst_n)       src_q <= SRC_ZERO;
    else if (imem_rd) src_q <= SRC_IMEM;
    else if (dmem_rd) src_q <= SRC_DMEM;
    else              src_q <= SRC_ZERO;
  end

  assign mux_sel = cold_reset ? SRC_RATIO : src_q;

  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) begin
      eb_rdata <= '0;
      eb_rdval <= 1'b0;
    end else begin
      unique case (mux_sel)
        SRC_IMEM:  eb_rdata <= imem_rdata;
        SRC_DMEM:  eb_rdata <= dmem_rdata;
        SRC_RATIO: eb_rdata <= CLK_RATIO;
        default:   eb_rdata <= '0;
      endcase
      eb_rdval <= (mux_sel == SRC_IMEM) || (mux_sel == SRC_DMEM);
    end
  end
endmodule
