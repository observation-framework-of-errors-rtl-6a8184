// checkpoint_counter: counts how often the program reaches a given address.
//
// Each retired instruction whose PC equals match_addr increments the count;
// the checkpoint flags (hit) once the count has reached the programmed
// threshold, which lets the firmware's functions be checked for the number of
// times they are entered. Counting PC matches against a threshold follows the
// design description; the saturating counter, the level (not pulse) hit, and
// threshold 0 meaning "never flag" are this design's choices.
//
// Timing: the count is registered, hit is combinational from it, so hit rises
// in the cycle after the matching instruction retires. clear restarts the
// count.
module checkpoint_counter #(
  parameter int unsigned CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          pc_valid,
  input  logic [31:0]   pc,
  input  logic [31:0]   match_addr,
  input  logic [CW-1:0] threshold,
  output logic [CW-1:0] count,
  output logic          hit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   count <= '0;
    else if (clear)                               count <= '0;
    else if (pc_valid && pc == match_addr && count != '1) count <= count + 1'b1;
  end

  assign hit = (threshold != '0) && (count >= threshold);

endmodule
