// tb_watchdog_timer: checks that the watchdog flags exactly when the number
// of cycles since the last refresh reaches the threshold, that a retired
// instruction at the refresh address restarts it, and that run/clear stop it.
module tb_watchdog_timer;
  logic clk = 0, rst_n = 0, run = 0, clear = 0, pc_valid = 0, hit;
  logic [31:0] pc, kick_addr, threshold;
  int checks = 0, failures = 0;

  watchdog_timer #(.CW(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since;   // cycles counted since the last restart
    int flagged = 0;
    kick_addr = 32'h2000; threshold = 32'd25; pc = 32'h100;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!hit, "idle while not running");
    run = 1;
    since = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      // model the edge just taken
      if (!run || clear || (pc_valid && pc == kick_addr)) since = 0;
      else since++;
      @(negedge clk);
      check(hit == (run && since >= 25), $sformatf("cycle %0d since %0d hit %b", i, since, hit));
      if (hit) flagged++;
      pc_valid = ($urandom_range(3) != 0);
      // kick regularly in the first part, then stop kicking
      pc = (i < 300 && (i % 20) == 0) ? kick_addr : 32'h100 + 4 * (i % 8);
      clear = (i == 450);
      run = !(i >= 500 && i < 520);
    end
    check(flagged > 0, "watchdog fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
