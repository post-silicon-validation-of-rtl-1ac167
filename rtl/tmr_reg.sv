// tmr_reg: self-correcting triple-modular-redundant register.
//
// Three copies of the register are kept; the output is their bitwise
// majority.  On every clock edge each copy loads either the new data (we) or
// the voted value, so an upset in one copy is outvoted at once and scrubbed
// at the next edge.  mismatch is high while the copies disagree.
// inj_copy/inj_mask are simulation fault-injection inputs: at a clock edge a
// copy whose inj_copy bit is set loads the voted value XOR inj_mask instead
// (tie both to zero in use).  The document says the DDR PLL logic is
// triplicated and that self-correcting TMR protects key state; this
// structure is the usual way to build that.
module tmr_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  input  logic [2:0]   inj_copy,
  input  logic [W-1:0] inj_mask,
  output logic [W-1:0] q,
  output logic         mismatch
);
  logic [W-1:0] c [3];

  always_comb begin
    q        = (c[0] & c[1]) | (c[0] & c[2]) | (c[1] & c[2]);
    mismatch = (c[0] != c[1]) || (c[0] != c[2]);
  end

  for (genvar i = 0; i < 3; i++) begin : g_copy
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)           c[i] <= '0;
      else if (inj_copy[i]) c[i] <= (we ? d : q) ^ inj_mask;
      else                  c[i] <= we ? d : q;
    end
  end
endmodule
