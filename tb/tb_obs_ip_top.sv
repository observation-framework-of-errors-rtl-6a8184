// tb_obs_ip_top: end-to-end test of the observation IP at its default size
// (1024-event buffer, two cores).
//
// Two behavioural core models run a small benchmark loop (sequential code
// with 16- and 32-bit instructions, a call and return, a loop-back branch,
// data accesses to RAM), one observed, the other running unrelated code. The
// test plays the measurement flow: the controller configures the IP over
// the debug bus, the firmware logs into the register bank, a fault is
// injected into the observed core's flow, an assertion stops recording and
// freezes the core, and the controller dumps the buffer. One run per
// assertion kind: watchpoint (trap handler entry), PC range (init code
// re-entered), PC scope, data range (unused IP), data scope, checkpoint
// (function entered too often), watchdog (endless loop). A reference model
// of the trace encoder predicts every event; the whole dump (oldest first,
// after the ring has wrapped) is compared with it, including an upset
// injected into the buffer memory that the ECC must correct. Also checked:
// the halt reaches only the observed core, the core model stops retiring,
// the failing instruction is the newest event, core switching, jump filter
// on and off, all three register pairs. Each mechanism is counted and must
// occur at least once.
module tb_obs_ip_top;
  import obs_pkg::*;
  localparam int DEPTH = 1024;
  localparam logic [31:0] LOOP = 32'h100, CALL = 32'h1F0, FUNC = 32'h200,
                          RET = 32'h23C, BACK = 32'h1FC, HANDLER = 32'h300;

  logic clk = 0, rst_n = 0;
  probe_t probes [2];
  logic [1:0] halt;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [15:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr, stop_rec, irq_err;
  int checks = 0, failures = 0;

  obs_ip_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- debug bus master ----------------
  task automatic apb(input logic wr, input logic [15:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk) begin psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d; end
    @(negedge clk) penable = 1;
    #1 begin r = prdata; check(!pslverr, $sformatf("bus access %h", a)); end
    @(posedge clk);
    #1 begin psel = 0; penable = 0; end
  endtask
  task automatic wr32(input logic [15:0] a, input logic [31:0] d);
    logic [31:0] r;
    apb(1, a, d, r);
  endtask
  task automatic rd32(input logic [15:0] a, output logic [31:0] r);
    apb(0, a, 0, r);
  endtask

  // ---------------- core models ----------------
  typedef enum int {F_NONE, F_JUMP, F_DATA, F_LOOP, F_CALLS} fault_e;
  logic [31:0] cpc [2];
  fault_e      fmode;
  logic [31:0] ftarget, fdata;
  logic        inject;       // request: apply fault at next retire of observed core
  logic [31:0] fault_pc;     // PC (or data access instruction) of the failure
  int          halted_retires;
  int          obs;          // observed core (tb view)

  function automatic logic [31:0] seq_next(logic [31:0] pc);
    // compressed code in 0x140-0x15F
    return pc + ((pc >= 32'h140 && pc < 32'h160) ? 2 : 4);
  endfunction

  function automatic logic [31:0] instr_at(logic [31:0] pc);
    return (pc >= 32'h140 && pc < 32'h160) ? {16'h0, pc[15:2], 2'b01} : {pc[29:0], 2'b11};
  endfunction

  // Drive both cores on each falling edge.
  always @(negedge clk) begin
    for (int c = 0; c < 2; c++) begin
      probe_t p;
      logic [31:0] pc;
      p = '0;
      pc = cpc[c];
      if (!rst_n) begin
        cpc[c] = LOOP;
      end else if (halt[c]) begin
        // frozen pipeline: nothing retires
      end else if (c != obs) begin
        // unrelated code far outside the observed program
        p.pc_valid = 1;
        p.pc = 32'hF000_0000 + 32'($urandom_range(1023) * 4);
        p.instr = 32'h3;
        p.d_req = 1; p.d_addr = 32'h8000;
      end else if ($urandom_range(5) != 0) begin
        p.pc_valid = 1;
        p.pc = pc;
        p.instr = instr_at(pc);
        p.sp = 32'h1F00 - {pc[7:0], 2'b0};
        p.alu1 = pc ^ 32'h5A5A_0000;
        p.alu2 = seq_next(pc);
        if (pc[3:2] == 2'b01) begin p.d_req = 1; p.d_addr = 32'h1000 + {pc[11:0]}; end
        // next PC of the program
        if (pc == CALL) pc = FUNC;
        else if (pc == RET) pc = CALL + 4;
        else if (pc == BACK) pc = LOOP;
        else pc = seq_next(pc);
        if (inject) begin
          inject = 0;
          fault_pc = p.pc;
          case (fmode)
            F_JUMP: pc = ftarget;
            F_DATA: begin p.d_req = 1; p.d_addr = fdata; end
            F_LOOP: pc = 32'h180;
            default: ;
          endcase
          if (fmode == F_DATA) fmode = F_NONE;
        end else if (fmode == F_LOOP && p.pc == 32'h18C) pc = 32'h180;
        else if (fmode == F_CALLS && p.pc == BACK) pc = CALL;   // loop skips back to the call
        else if (fmode == F_JUMP && p.pc >= ftarget) ;           // keeps running wild
        cpc[c] = pc;
      end
      probes[c] = p;
    end
  end

  // count retires of a halted core (must stay 0)
  always @(posedge clk) if (rst_n && halt[obs] && probes[obs].pc_valid) halted_retires++;

  // ---------------- trace encoder reference model ----------------
  logic          m_have;
  logic [31:0]   m_next;
  int            m_last, cyc;
  logic          m_rec, m_filter;
  reg_sel_e      m_sel;
  trace_event_t  m_q[$];
  int n_jump_ev = 0, n_instr_ev = 0, n_start_ev = 0;

  always @(posedge clk) begin
    probe_t p;
    cyc <= cyc + 1;
    p = probes[obs];
    if (rst_n && m_rec && !stop_rec) begin
      if (p.pc_valid) begin
        ev_type_e t;
        logic [31:0] a, b;
        t = !m_have ? EV_START : (p.pc != m_next) ? EV_JUMP : EV_INSTR;
        case (m_sel)
          SEL_SP_ALU1: begin a = p.sp; b = p.alu1; end
          SEL_SP_ALU2: begin a = p.sp; b = p.alu2; end
          default:     begin a = p.alu1; b = p.alu2; end
        endcase
        if (!m_filter || t != EV_INSTR) begin
          m_q.push_back('{etype: t, tstamp: TS_W'(cyc - m_last), pc: p.pc, reg0: a, reg1: b});
          if (m_q.size() > DEPTH) void'(m_q.pop_front());
          m_last = cyc;
          if (t == EV_JUMP) n_jump_ev++; else if (t == EV_START) n_start_ev++; else n_instr_ev++;
        end
        m_have = 1;
        m_next = p.pc + ((p.instr[1:0] == 2'b11) ? 4 : 2);
      end
    end else begin
      m_have = 0;
      m_last = cyc + 1;
    end
  end

  // ---------------- helpers ----------------
  int n_wrap = 0, n_ecc_fix = 0, n_halt = 0, n_stop = 0, n_core_switch = 0;
  int n_kind [7];
  int n_pair [3];
  int n_filter_on = 0, n_filter_off = 0;

  task automatic configure(input int core, input logic filter, input reg_sel_e sel);
    wr32(A_CTRL, 32'h0);
    m_rec = 0;
    @(negedge clk);
    obs = core;
    cpc[core] = LOOP;         // observed core restarts the benchmark
    wr32(A_CMD, 32'h3);       // clear flags, halt and buffer
    m_q.delete();
    m_filter = filter;
    m_sel = sel;
    wr32(A_CTRL, {26'd0, 1'b1, 1'(core), 2'(sel), filter, 1'b1});
    // recording starts from the edge that writes CTRL
    m_rec = 1;
    if (filter) n_filter_on++; else n_filter_off++;
    n_pair[int'(sel)]++;
  endtask

  task automatic dump_and_compare(input string tag, input logic [31:0] last_pc, input logic check_last);
    logic [31:0] r, w [4];
    int cnt;
    rd32(A_BUF_INFO, r);
    cnt = int'(r[15:0]);
    check(cnt == m_q.size(), $sformatf("%s: %0d events held, model %0d", tag, cnt, m_q.size()));
    if (cnt == DEPTH) n_wrap++;
    for (int i = 0; i < cnt && i < m_q.size(); i++) begin
      for (int k = 0; k < 4; k++) rd32(A_BUF + 16'(16*i + 4*k), w[k]);
      check({w[0], w[1], w[2], w[3]} == m_q[i], $sformatf("%s: event %0d got %h_%h_%h_%h exp %h", tag, i, w[0], w[1], w[2], w[3], m_q[i]));
    end
    if (check_last && m_q.size() > 0)
      check(m_q[m_q.size()-1].pc == last_pc && cnt > 0, $sformatf("%s: newest event is the failing instruction %h", tag, last_pc));
  endtask

  task automatic run_fault(input string tag, input int kind, input fault_e fm, input logic [31:0] tgt,
                           input logic [31:0] dat, input int pre_cycles, input int flag_bit,
                           input logic check_last);
    logic [31:0] r;
    int t0;
    fmode = F_NONE;
    repeat (pre_cycles) @(negedge clk);
    ftarget = tgt; fdata = dat;
    fmode = fm;
    if (fm == F_CALLS) ;            // no single faulting instruction
    else inject = 1;
    halted_retires = 0;
    t0 = cyc;
    while (!halt[obs] && cyc - t0 < 20000) @(negedge clk);
    check(halt[obs], $sformatf("%s: core halted", tag));
    check(halt[1-obs] == 0, $sformatf("%s: only the observed core halts", tag));
    check(stop_rec && irq_err, $sformatf("%s: recording stopped", tag));
    if (halt[obs]) n_halt++;
    if (stop_rec) n_stop++;
    rd32(A_FLAGS, r);
    check(r[flag_bit], $sformatf("%s: flag %0d set (flags %h)", tag, flag_bit, r));
    if (r[flag_bit]) n_kind[kind]++;
    repeat (20) @(negedge clk);
    check(halted_retires == 0, $sformatf("%s: no instruction retires while halted", tag));
    dump_and_compare(tag, (fm == F_JUMP) ? tgt : fault_pc, check_last);
    fmode = F_NONE;
    inject = 0;
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [31:0] r;
    obs = 0; fmode = F_NONE; inject = 0; cyc = 0; m_last = 0; m_have = 0; m_next = 0;
    m_rec = 0; m_filter = 0; m_sel = SEL_SP_ALU1;
    cpc[0] = LOOP; cpc[1] = LOOP;
    for (int i = 0; i < 7; i++) n_kind[i] = 0;
    for (int i = 0; i < 3; i++) n_pair[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // firmware log bank
    for (int i = 0; i < 16; i++) wr32(A_LOG + 16'(4*i), 32'hA000_0000 + 32'(i));
    for (int i = 0; i < 16; i++) begin rd32(A_LOG + 16'(4*i), r); check(r == 32'hA000_0000 + 32'(i), "log bank"); end

    // assertions: benchmark at 0x100-0x2FF, init code 0x000-0x0FF,
    // handler 0x300, RAM 0x1000-0x1FFF, unused IP 0x8000-0x80FF
    wr32(A_WP_ADDR,      HANDLER);
    wr32(A_PCR_LO,       32'h000); wr32(A_PCR_HI,     32'h0FF);
    wr32(A_PCR_LO + 4,   32'h100); wr32(A_PCR_HI + 4, 32'h2FF);
    wr32(A_DR_LO,        32'h8000); wr32(A_DR_HI,     32'h80FF);
    wr32(A_DR_LO + 4,    32'h1000); wr32(A_DR_HI + 4, 32'h1FFF);
    wr32(A_SCOPE,        32'h0000_0202);
    wr32(A_CP_ADDR,      FUNC);     wr32(A_CP_THR, 32'd0);
    wr32(A_WD_KICK,      LOOP);     wr32(A_WD_THR, 32'd600);
    wr32(A_STOP_MASK,    32'hF_FFFF);
    wr32(A_HALT_MASK,    32'hF_FFFF);

    // 1. watchpoint: flow diverges into the trap handler (filter off, wraps)
    wr32(A_ASSERT_EN, 32'(1) << F_WP);
    configure(0, 0, SEL_SP_ALU1);
    run_fault("watchpoint", 0, F_JUMP, HANDLER, 0, 1500, F_WP, 1);

    // 2. PC range: init code entered again (filter on)
    wr32(A_ASSERT_EN, 32'(1) << F_PCR);
    configure(0, 1, SEL_SP_ALU2);
    run_fault("pc range", 1, F_JUMP, 32'h040, 0, 3000, F_PCR, 1);

    // 3. PC scope: jump out of the benchmark, ECC upset in the buffer first
    wr32(A_ASSERT_EN, 32'(1) << F_PCSCOPE);
    configure(0, 1, SEL_ALU1_ALU2);
    run_fault("pc scope", 2, F_JUMP, 32'h4000, 0, 2000, F_PCSCOPE, 1);
    begin
      int p;
      logic [31:0] e0, e1;
      rd32(A_ECC_CNT, e0);
      p = 2;
      dut.u_buf.mem[p][39 + 7] = ~dut.u_buf.mem[p][39 + 7];
      dump_and_compare("pc scope with upset", 32'h4000, 1);
      rd32(A_ECC_CNT, e1);
      check(e1[15:0] > e0[15:0], "buffer upset corrected on readout");
      if (e1[15:0] > e0[15:0]) n_ecc_fix++;
    end

    // 4. data range: access to an unused IP
    wr32(A_ASSERT_EN, 32'(1) << F_DR);
    configure(0, 0, SEL_SP_ALU1);
    run_fault("data range", 3, F_DATA, 0, 32'h8004, 800, F_DR, 1);

    // 5. data scope: access outside every allowed data range (jump filter
    //    on: the sequential faulting instruction itself leaves no event)
    wr32(A_ASSERT_EN, 32'(1) << F_DSCOPE);
    configure(0, 1, SEL_SP_ALU1);
    run_fault("data scope", 4, F_DATA, 0, 32'h0000_7000, 900, F_DSCOPE, 0);

    // 6. checkpoint: the function is entered far more often than normal
    wr32(A_CP_THR, 32'd40);
    wr32(A_ASSERT_EN, 32'(1) << F_CP);
    configure(0, 1, SEL_SP_ALU2);
    run_fault("checkpoint", 5, F_CALLS, 0, 0, 300, F_CP, 0);
    rd32(A_CP_CNT, r);
    check(r >= 40, "checkpoint count read back");
    wr32(A_CP_THR, 32'd0);

    // 7. watchdog: endless loop inside the benchmark; core 1 observed
    n_core_switch++;
    wr32(A_ASSERT_EN, 32'(1) << F_WD);
    configure(1, 1, SEL_SP_ALU1);
    run_fault("watchdog", 6, F_LOOP, 0, 0, 1000, F_WD, 0);

    // core 0 running code outside the program is not observed while core 1 is
    wr32(A_ASSERT_EN, (32'(1) << F_PCSCOPE) | (32'(1) << F_DR));
    configure(1, 1, SEL_SP_ALU1);
    repeat (300) @(negedge clk);
    rd32(A_FLAGS, r);
    check(r == 0 && halt == 0, "unobserved core does not trigger");

    // summary of mechanisms
    begin
      string names [7] = '{"watchpoint", "pc range", "pc scope", "data range", "data scope", "checkpoint", "watchdog"};
      for (int i = 0; i < 7; i++) check(n_kind[i] > 0, $sformatf("%s assertion exercised", names[i]));
      for (int i = 0; i < 3; i++) check(n_pair[i] > 0, $sformatf("register pair %0d exercised", i));
      check(n_wrap > 0, "buffer wrapped");
      check(n_ecc_fix > 0, "ECC correction");
      check(n_halt > 0 && n_stop > 0, "halt and stop");
      check(n_core_switch > 0, "core switch");
      check(n_filter_on > 0 && n_filter_off > 0, "jump filter on and off");
      check(n_jump_ev > 0 && n_instr_ev > 0 && n_start_ev > 0, "all event types");
      $display("mechanisms: wrap=%0d ecc=%0d halt=%0d stop=%0d switch=%0d jump_ev=%0d instr_ev=%0d start_ev=%0d",
               n_wrap, n_ecc_fix, n_halt, n_stop, n_core_switch, n_jump_ev, n_instr_ev, n_start_ev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
