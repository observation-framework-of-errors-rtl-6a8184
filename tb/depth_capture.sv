// depth_capture: one capture run of the observation IP at a given buffer
// depth, used by tb_depth_sweep.
//
// A behavioural core runs a loop of sequential code with a loop-back jump,
// the jump filter is off so every retired instruction is one event, and the
// history of retired PCs is kept here. After enough instructions to wrap the
// ring several times, the flow jumps to a trap handler guarded by a
// watchpoint; the IP must stop, halt the core, and hold exactly the last
// DEPTH retired instructions, oldest first, ending with the handler entry.
// Results leave through done/checks/failures.
module depth_capture
  import obs_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam logic [31:0] HANDLER = 32'h300;

  probe_t probes [2];
  logic [1:0] halt;
  logic psel, penable, pwrite;
  logic [15:0] paddr;
  logic [31:0] pwdata, prdata;
  logic pready, pslverr, stop_rec, irq_err;
  logic [31:0] hist[$];
  logic [31:0] pc;
  logic        go, fault;

  obs_ip_top #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL (DEPTH=%0d): %s", DEPTH, msg);
    end
  endtask

  task automatic apb(input logic wr, input logic [15:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk) begin psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d; end
    @(negedge clk) penable = 1;
    #1 r = prdata;
    @(posedge clk);
    #1 begin psel = 0; penable = 0; end
  endtask

  // core 0: loop 0x100..0x1FC, then the handler; core 1 idle
  always @(negedge clk) begin
    probes[0] = '0;
    probes[1] = '0;
    if (rst_n && go && !halt[0]) begin
      probes[0].pc_valid = 1'b1;
      probes[0].pc    = pc;
      probes[0].instr = 32'h13;
      probes[0].sp    = 32'h2000;
      probes[0].alu1  = pc;
      if (!stop_rec) hist.push_back(pc);
      if (hist.size() > DEPTH) void'(hist.pop_front());
      pc = fault ? HANDLER : (pc == 32'h1FC) ? 32'h100 : pc + 4;
      if (fault) fault = 1'b0;
    end
  end

  initial begin
    logic [31:0] r;
    int n;
    checks = 0; failures = 0; done = 0;
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    pc = 32'h100; go = 0; fault = 0;
    @(posedge rst_n);
    apb(1, A_WP_ADDR, HANDLER, r);
    apb(1, A_ASSERT_EN, 32'(1) << F_WP, r);
    apb(1, A_STOP_MASK, 32'(1) << F_WP, r);
    apb(1, A_HALT_MASK, 32'(1) << F_WP, r);
    apb(1, A_CTRL, 32'h21, r);            // record, detector on, core 0, SP/ALU1
    @(negedge clk) go = 1;
    repeat (3 * DEPTH + 37) @(negedge clk);
    fault = 1;
    n = 0;
    while (!halt[0] && n < 1000) begin @(negedge clk); n++; end
    check(halt[0] && stop_rec, "watchpoint stopped recording and halted the core");
    apb(0, A_BUF_INFO, 0, r);
    check(int'(r[15:0]) == DEPTH, $sformatf("buffer full: %0d events", r[15:0]));
    for (int i = 0; i < DEPTH && i < hist.size(); i++) begin
      apb(0, A_BUF + 16'(16 * i + 4), 0, r);
      check(r == hist[i], $sformatf("event %0d pc %h exp %h", i, r, hist[i]));
    end
    check(hist.size() == DEPTH && hist[DEPTH-1] == HANDLER, "newest entry is the handler entry");
    done = 1;
  end

endmodule
