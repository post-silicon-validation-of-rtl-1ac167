// trace_read_logic: reads a trace BRAM out to the host, one line per okClk.
//
// pipe_read is the pipe-out read strobe from the USB host interface.  On the
// falling edge of okClk the strobe becomes the BRAM read enable and the read
// pointer becomes the read address; the BRAM reads on the rising edge, so the
// data is valid in the okClk cycle after the one in which pipe_read was high.
// The pointer advances with every read and wraps from the last line back to
// 9'h000, where it waits, read enable low, for the next readout.
module trace_read_logic #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     ok_clk,
  input  logic                     rst_n,
  input  logic                     pipe_read,
  output logic                     re,
  output logic [$clog2(DEPTH)-1:0] raddr
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0] rptr;

  always_ff @(negedge ok_clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      re    <= 1'b0;
      raddr <= '0;
    end else begin
      re <= pipe_read;
      if (pipe_read) begin
        raddr <= rptr;
        rptr  <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      end else begin
        raddr <= rptr;
      end
    end
  end
endmodule
