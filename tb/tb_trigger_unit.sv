// tb_trigger_unit: checks sticky flag capture with the enable mask, the stop
// and halt actions selected by their masks, their one-cycle latency, and
// clearing.
module tb_trigger_unit;
  localparam int N = 20;
  logic clk = 0, rst_n = 0, clear = 0, stop_rec, halt_cpu, irq;
  logic [N-1:0] hits, assert_en, stop_mask, halt_mask, flags;
  logic [N-1:0] ref_flags;
  int checks = 0, failures = 0;

  trigger_unit #(.N_FLAGS(N)) dut (.*);

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
    int stops = 0, halts = 0;
    hits = '0; assert_en = '0; stop_mask = '0; halt_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      ref_flags = '0;
      check(flags == 0 && !stop_rec && !halt_cpu && !irq, "cleared");
      assert_en = N'($urandom());
      stop_mask = N'(1) << $urandom_range(N - 1);
      halt_mask = N'(1) << $urandom_range(N - 1);
      for (int c = 0; c < 12; c++) begin
        hits = ($urandom_range(3) == 0) ? N'(1) << $urandom_range(N - 1) : '0;
        ref_flags |= hits & assert_en;
        @(negedge clk);
        check(flags == ref_flags, "sticky flags");
        check(stop_rec == |(ref_flags & stop_mask), "stop follows mask, one cycle after hit");
        check(halt_cpu == |(ref_flags & halt_mask), "halt follows mask, one cycle after hit");
        check(irq == |ref_flags, "irq");
        hits = '0;
      end
      if (stop_rec) stops++;
      if (halt_cpu) halts++;
    end
    check(stops > 0 && halts > 0, "stop and halt both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
