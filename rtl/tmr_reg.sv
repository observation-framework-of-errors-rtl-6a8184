// tmr_reg: register protected by triple modular redundancy.
//
// The design description hardens the IP's configuration registers and its
// software log bank with TMR. Here each register is held in three copies;
// the output is the bitwise majority of the three, and every cycle all three
// copies are rewritten with that majority (or with new data when written), so
// a single upset in one copy is outvoted at once and repaired on the next
// clock edge. Writing TMR as three explicit copies with per-cycle repair is
// this design's choice; a netlist must keep the copies apart (no register
// merging) for the protection to survive synthesis.
//
// Interface: we/d write the register at the clock edge; q is the voted value
// (combinational from the three copies); mismatch is high while the copies
// disagree. With RESETTABLE = 0 the register ignores rst_n, as needed for a
// bank that must survive a reset of the system.
module tmr_reg #(
  parameter int unsigned W          = 32,
  parameter bit          RESETTABLE = 1'b1,
  parameter logic [W-1:0] RST_VAL   = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         mismatch
);

  logic [W-1:0] r0, r1, r2;
  logic [W-1:0] nxt;

  assign q        = (r0 & r1) | (r1 & r2) | (r0 & r2);
  assign mismatch = (r0 != r1) || (r1 != r2);
  assign nxt      = we ? d : q;

  if (RESETTABLE) begin : g_rst
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r0 <= RST_VAL;
        r1 <= RST_VAL;
        r2 <= RST_VAL;
      end else begin
        r0 <= nxt;
        r1 <= nxt;
        r2 <= nxt;
      end
    end
  end else begin : g_norst
    always_ff @(posedge clk) begin
      r0 <= nxt;
      r1 <= nxt;
      r2 <= nxt;
    end
  end

endmodule
