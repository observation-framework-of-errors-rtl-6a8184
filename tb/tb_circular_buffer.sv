// tb_circular_buffer: self-checking test of the ECC ring buffer.
// A reference queue models the ring: events are written, the buffer is read
// back oldest-first and compared, before and after it wraps. Single bit
// upsets injected into stored words must be corrected (rd_sec) and double
// upsets in one word flagged (rd_ded). clear must empty it. Runs at a small
// depth and then checks that writes go at one event per clock cycle.
module tb_circular_buffer;
  import obs_pkg::*;
  localparam int DEPTH = 16;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [EV_W-1:0] wr_data, rd_data;
  logic [AW-1:0] rd_idx, wr_ptr;
  logic [AW:0] count;
  logic rd_sec, rd_ded;
  logic [EV_W-1:0] model[$];
  int checks = 0, failures = 0;

  circular_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic write_ev(input logic [EV_W-1:0] v);
    @(negedge clk) begin wr_en = 1; wr_data = v; end
    @(negedge clk) wr_en = 0;
    model.push_back(v);
    if (model.size() > DEPTH) void'(model.pop_front());
  endtask

  task automatic read_ev(input int idx, output logic [EV_W-1:0] v, output logic s, output logic d);
    @(negedge clk) begin rd_en = 1; rd_idx = AW'(idx); end
    @(negedge clk) begin rd_en = 0; v = rd_data; s = rd_sec; d = rd_ded; end
  endtask

  task automatic compare_all(input string tag);
    logic [EV_W-1:0] v; logic s, d;
    check(int'(count) == model.size(), $sformatf("%s count %0d vs %0d", tag, count, model.size()));
    for (int i = 0; i < model.size(); i++) begin
      read_ev(i, v, s, d);
      check(v == model[i] && !s && !d, $sformatf("%s entry %0d", tag, i));
    end
  endtask

  function automatic logic [EV_W-1:0] rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [EV_W-1:0] v; logic s, d;
    int t0, t1;
    wr_data = '0; rd_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(count == 0, "empty after reset");
    for (int i = 0; i < 5; i++) write_ev(rnd());
    compare_all("partial");
    for (int i = 0; i < DEPTH + 7; i++) write_ev(rnd());
    check(count == DEPTH, "saturated count");
    check(int'(wr_ptr) == (5 + DEPTH + 7) % DEPTH, "write pointer wraps");
    compare_all("wrapped");
    // single upset in each word of the oldest entry (physical = wr_ptr)
    for (int w = 0; w < 4; w++) begin
      dut.mem[wr_ptr][w*39 + 5 + w] = ~dut.mem[wr_ptr][w*39 + 5 + w];
      read_ev(0, v, s, d);
      check(v == model[0] && s && !d, $sformatf("single upset word %0d corrected", w));
      dut.mem[wr_ptr][w*39 + 5 + w] = ~dut.mem[wr_ptr][w*39 + 5 + w];
    end
    // double upset in one word of entry 3
    begin
      int p;
      p = (int'(wr_ptr) + 3) % DEPTH;
      dut.mem[p][40] = ~dut.mem[p][40];
      dut.mem[p][45] = ~dut.mem[p][45];
      read_ev(3, v, s, d);
      check(d, "double upset detected");
      dut.mem[p][40] = ~dut.mem[p][40];
      dut.mem[p][45] = ~dut.mem[p][45];
    end
    // rate: back-to-back writes, one per cycle
    @(negedge clk);
    t0 = int'(wr_ptr);
    wr_en = 1;
    for (int i = 0; i < 6; i++) begin
      wr_data = rnd();
      model.push_back(wr_data);
      if (model.size() > DEPTH) void'(model.pop_front());
      @(negedge clk);
    end
    wr_en = 0;
    t1 = int'(wr_ptr);
    check(((t1 - t0 + DEPTH) % DEPTH) == 6, "one write per cycle");
    compare_all("burst");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    model.delete();
    check(count == 0 && wr_ptr == 0, "clear empties");
    for (int i = 0; i < 3; i++) write_ev(rnd());
    compare_all("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
