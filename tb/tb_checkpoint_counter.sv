// tb_checkpoint_counter: drives a random retirement stream and compares the
// checkpoint count and hit against a reference count of PC matches.
module tb_checkpoint_counter;
  logic clk = 0, rst_n = 0, clear = 0, pc_valid = 0, hit;
  logic [31:0] pc, match_addr, threshold, count;
  int checks = 0, failures = 0;
  int ref_cnt = 0;

  checkpoint_counter #(.CW(32)) dut (.*);

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
    int hits_seen = 0;
    match_addr = 32'h0000_0404; threshold = 32'd7; pc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      check(int'(count) == ref_cnt, $sformatf("count %0d vs %0d", count, ref_cnt));
      check(hit == (ref_cnt >= 7), "hit at threshold");
      if (hit) hits_seen++;
      if (i == 200) begin
        clear = 1; pc_valid = 0;
        ref_cnt = 0;
      end else begin
        clear = 0;
        pc_valid = ($urandom_range(3) != 0);
        pc = ($urandom_range(9) == 0) ? match_addr : 32'h400 + 4 * $urandom_range(8);
        if (pc_valid && pc == match_addr) ref_cnt++;
      end
    end
    check(hits_seen > 0, "threshold reached at least once");
    threshold = 0;
    #1 check(!hit, "threshold 0 disables");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
