// tb_trace_encoder: self-checking test of the trace encoder.
// A synthetic program flow (mixed 16- and 32-bit instructions, random jumps,
// idle cycles) is fed through the probe bundle. A reference model, written
// from the rules (sequential PC = previous PC + instruction length; START
// for the first instruction after enable; timestamp = clock cycles between
// events), predicts every event; each event, its type, timestamp, PC and
// register pair is compared, with the jump filter on and off and with each of
// the three register pairs. Also checks that the event leaves one cycle after
// the instruction retires.
module tb_trace_encoder;
  import obs_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, jump_filter = 0;
  reg_sel_e reg_sel;
  probe_t probe;
  logic ev_valid;
  trace_event_t ev;
  int checks = 0, failures = 0;
  int n_jump = 0, n_start = 0, n_instr = 0, n_filtered = 0;

  trace_encoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic         m_have;       // an instruction has retired since enable
  logic [31:0]  m_next;
  int           m_last, cyc;
  logic         exp_valid;
  trace_event_t exp_ev;

  // Evaluate the model at each rising edge with the inputs in force.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    exp_valid = 1'b0;
    if (rst_n && en) begin
      if (probe.pc_valid) begin
        ev_type_e t;
        logic [31:0] a, b;
        t = !m_have ? EV_START : (probe.pc != m_next) ? EV_JUMP : EV_INSTR;
        case (reg_sel)
          SEL_SP_ALU1: begin a = probe.sp; b = probe.alu1; end
          SEL_SP_ALU2: begin a = probe.sp; b = probe.alu2; end
          default:     begin a = probe.alu1; b = probe.alu2; end
        endcase
        if (!jump_filter || t != EV_INSTR) begin
          exp_valid = 1'b1;
          exp_ev = '{etype: t, tstamp: TS_W'(cyc - m_last), pc: probe.pc, reg0: a, reg1: b};
          m_last = cyc;
          case (t)
            EV_START: n_start++;
            EV_JUMP:  n_jump++;
            default:  n_instr++;
          endcase
        end else n_filtered++;
        m_have = 1'b1;
        m_next = probe.pc + ((probe.instr[1:0] == 2'b11) ? 4 : 2);
      end
    end else begin
      m_have = 1'b0;
      m_last = cyc + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      check(ev_valid == exp_valid, $sformatf("ev_valid at cycle %0d", cyc));
      if (exp_valid && ev_valid)
        check(ev == exp_ev, $sformatf("event at cycle %0d: got %h exp %h", cyc, ev, exp_ev));
    end
  end

  task automatic run_program(input int n);
    logic [31:0] pc;
    pc = 32'h0000_1000;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      probe.pc_valid = ($urandom_range(4) != 0);
      probe.pc    = pc;
      probe.instr = ($urandom_range(2) == 0) ? {$urandom()} & 32'hFFFF_FFFC : {$urandom()} | 32'h3;
      probe.sp    = $urandom();
      probe.alu1  = $urandom();
      probe.alu2  = $urandom();
      if (probe.pc_valid) begin
        if ($urandom_range(5) == 0) pc = 32'h0000_1000 + ($urandom_range(255) << 1);
        else pc = pc + ((probe.instr[1:0] == 2'b11) ? 4 : 2);
      end
    end
    @(negedge clk) probe.pc_valid = 0;
  endtask

  initial begin
    probe = '0;
    cyc = 0; m_last = 0; m_have = 0; m_next = 0;
    reg_sel = SEL_SP_ALU1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 6; mode++) begin
      @(negedge clk) begin
        en = 0;
        jump_filter = mode[0];
        reg_sel = reg_sel_e'(mode / 2);
      end
      repeat (3) @(negedge clk);
      en = 1;
      repeat ($urandom_range(4)) @(negedge clk);
      run_program(300);
    end
    @(negedge clk) en = 0;
    repeat (3) @(negedge clk);
    check(n_start > 0 && n_jump > 0 && n_instr > 0 && n_filtered > 0, "all event kinds and the filter exercised");
    $display("events: start=%0d jump=%0d instr=%0d filtered=%0d", n_start, n_jump, n_instr, n_filtered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
