// watchdog_timer: flags when the program stops coming back to a given point.
//
// While run is high the counter advances every clock cycle and the watchdog
// flags once it reaches the threshold. It restarts from zero whenever the
// observed core retires the instruction at kick_addr (for instance the top of
// the benchmark loop), when clear is pulsed, or while run is low. Counting
// clock cycles against a threshold follows the design description; the
// restart on a PC match is this design's choice, since no refresh mechanism
// is described. Threshold 0 means "never flag".
//
// Timing: hit is registered-count based and rises in the cycle after the
// count reaches the threshold; a kick in that cycle restarts the count.
module watchdog_timer #(
  parameter int unsigned CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          clear,
  input  logic          pc_valid,
  input  logic [31:0]   pc,
  input  logic [31:0]   kick_addr,
  input  logic [CW-1:0] threshold,
  output logic          hit
);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              cnt <= '0;
    else if (!run || clear)                  cnt <= '0;
    else if (pc_valid && pc == kick_addr)    cnt <= '0;
    else if (cnt != '1)                      cnt <= cnt + 1'b1;
  end

  assign hit = run && (threshold != '0) && (cnt >= threshold);

endmodule
