// tb_tmr_reg: self-checking test of the TMR register.
// Checks reset value, writes, hold, that one corrupted copy is outvoted
// immediately and repaired at the next edge (mismatch falls), and that the
// un-resettable variant keeps its value through a reset.
module tb_tmr_reg;
  logic clk = 0, rst_n = 0, we = 0;
  logic [31:0] d, q, qn;
  logic mm, mmn;
  int checks = 0, failures = 0;

  tmr_reg #(.W(32), .RESETTABLE(1'b1), .RST_VAL(32'h0000_00A5)) dut
    (.clk, .rst_n, .we, .d, .q, .mismatch(mm));
  tmr_reg #(.W(32), .RESETTABLE(1'b0)) dutn
    (.clk, .rst_n, .we, .d, .q(qn), .mismatch(mmn));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1 check(q == 32'hA5 && !mm, "reset value");
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [31:0] v;
      v = $urandom();
      @(negedge clk) begin we = 1; d = v; end
      @(negedge clk) begin we = 0; d = ~v; end
      check(q == v && qn == v && !mm, $sformatf("write %h", v));
      repeat (3) @(negedge clk);
      check(q == v, "hold");
      // corrupt one copy
      case (t % 3)
        0: dut.r0 = dut.r0 ^ 32'h0000_0100;
        1: dut.r1 = dut.r1 ^ 32'h8000_0001;
        default: dut.r2 = ~dut.r2;
      endcase
      #1;
      check(q == v && mm, "single copy upset is outvoted");
      @(negedge clk);
      check(q == v && !mm && dut.r0 == v && dut.r1 == v && dut.r2 == v, "upset repaired");
    end
    @(negedge clk) begin we = 1; d = 32'hCAFE_F00D; end
    @(negedge clk) we = 0;
    rst_n = 0;
    @(negedge clk);
    check(q == 32'hA5, "resettable copy cleared");
    check(qn == 32'hCAFE_F00D, "un-resettable copy kept");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
