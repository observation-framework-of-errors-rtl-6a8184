// tb_depth_sweep: the capture flow at several buffer depths taken from the
// depth sweep of the evaluation (16, 64 = the 1 KB configuration, 992, a
// depth that is not a power of two). Each depth must hold exactly its last
// DEPTH retired instructions when the watchpoint stops recording.
module tb_depth_sweep;
  logic clk = 0, rst_n = 0;
  logic [2:0] done;
  int c [3], f [3];

  always #5 clk = ~clk;

  depth_capture #(.DEPTH(16))  u_d16  (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  depth_capture #(.DEPTH(64))  u_d64  (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  depth_capture #(.DEPTH(992)) u_d992 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end
endmodule
