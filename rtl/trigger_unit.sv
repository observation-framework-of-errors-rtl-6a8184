// trigger_unit: the external trigger of the error detector.
//
// Every enabled assertion hit sets its sticky flag. Two masks select which
// flags stop the trace recording and which freeze the pipeline of the
// observed core; once set, stop_rec and halt_cpu stay high until the flags
// are cleared through the debug bus, so the recorded trace and the core state
// are preserved for readout. Making selected assertions stop recording or
// freeze the pipeline follows the design description; the sticky behaviour
// and the clear command are this design's choices.
//
// Timing: flags, stop_rec and halt_cpu are registered; they rise in the cycle
// after the hit. irq is high while any flag is set. Assertions check that a
// rising stop or halt is always explained by a flag selected in its mask.
module trigger_unit #(
  parameter int unsigned N_FLAGS = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [N_FLAGS-1:0] hits,
  input  logic [N_FLAGS-1:0] assert_en,
  input  logic [N_FLAGS-1:0] stop_mask,
  input  logic [N_FLAGS-1:0] halt_mask,
  output logic [N_FLAGS-1:0] flags,
  output logic               stop_rec,
  output logic               halt_cpu,
  output logic               irq
);

  logic [N_FLAGS-1:0] new_flags;

  assign new_flags = flags | (hits & assert_en);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags    <= '0;
      stop_rec <= 1'b0;
      halt_cpu <= 1'b0;
    end else if (clear) begin
      flags    <= '0;
      stop_rec <= 1'b0;
      halt_cpu <= 1'b0;
    end else begin
      flags    <= new_flags;
      stop_rec <= stop_rec | |(new_flags & stop_mask);
      halt_cpu <= halt_cpu | |(new_flags & halt_mask);
    end
  end

  assign irq = |flags;

  // Stop and halt are only ever raised by a flag selected in their mask.
  a_stop_cause: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(stop_rec) |-> |(flags & stop_mask));
  a_halt_cause: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(halt_cpu) |-> |(flags & halt_mask));

endmodule
