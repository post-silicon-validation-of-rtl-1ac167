// trace_write_logic: fills the trace BRAMs one line per BRAM_clk cycle.
//
// BRAM_clk runs at twice the tb_clk frequency, so every tb_clk cycle is
// recorded as two lines.  Address, data and write enable are registered on
// the falling edge of BRAM_clk and the BRAM writes on the rising edge.
// Writing starts at 9'h000 and runs to 9'h1FF; together with the last line
// bram_full drops (stopping tb_clk), write enable goes low and the address
// stays at 9'h1FF.  When the host has read the data it pulses
// program_clk_enable: its rising edge sets the address back to 9'h000 and its
// falling edge raises bram_full again, restarting tb_clk and the writes.
// fill_count counts completed fills.
module trace_write_logic #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 128
) (
  input  logic                     bram_clk,
  input  logic                     rst_n,
  input  logic [W-1:0]             din,
  input  logic                     program_clk_enable,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic [W-1:0]             wdata,
  output logic                     bram_full,
  output logic [15:0]              fill_count
);
  typedef enum logic [1:0] {RUN, FULL, ARMED} wstate_e;

  localparam int unsigned AW = $clog2(DEPTH);

  wstate_e       st;
  logic [AW-1:0] wptr;
  logic          pce_q;

  always_ff @(negedge bram_clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= RUN;
      wptr       <= '0;
      we         <= 1'b0;
      waddr      <= '0;
      wdata      <= '0;
      bram_full  <= 1'b1;
      pce_q      <= 1'b0;
      fill_count <= '0;
    end else begin
      pce_q <= program_clk_enable;
      unique case (st)
        RUN: begin
          we    <= 1'b1;
          waddr <= wptr;
          wdata <= din;
          wptr  <= wptr + 1'b1;
          if (wptr == AW'(DEPTH - 1)) begin
            bram_full  <= 1'b0;
            fill_count <= fill_count + 16'd1;
            st         <= FULL;
          end
        end
        FULL: begin
          we <= 1'b0;
          if (program_clk_enable && !pce_q) begin
            waddr <= '0;
            st    <= ARMED;
          end
        end
        ARMED: begin
          we <= 1'b0;
          if (!program_clk_enable && pce_q) begin
            bram_full <= 1'b1;
            wptr      <= '0;
            st        <= RUN;
          end
        end
        default: st <= RUN;
      endcase
    end
  end
endmodule
