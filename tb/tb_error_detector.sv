// tb_error_detector: self-checking test of the assertion set.
// Watchpoints, PC ranges, the PC scope, data ranges and the data scope are
// checked in the cycle of each probe against a reference written from their
// definitions; checkpoint counts and hits and watchdog hits are checked
// against reference counters. Each assertion kind must fire at least once.
module tb_error_detector;
  import obs_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  det_cfg_t cfg;
  probe_t probe;
  logic [N_FLAGS-1:0] hits;
  logic [N_CP-1:0][XLEN-1:0] cp_count;
  int checks = 0, failures = 0;
  int fired [N_FLAGS];

  error_detector dut (.*);

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

  int cp_ref [N_CP];
  int wd_ref [N_WD];

  function automatic logic inr(logic [31:0] a, logic [31:0] lo, logic [31:0] hi);
    return a >= lo && a <= hi;
  endfunction

  // reference counters advance on each rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N_CP; i++)
        if (clear) cp_ref[i] = 0;
        else if (en && probe.pc_valid && probe.pc == cfg.cp_addr[i]) cp_ref[i]++;
      for (int i = 0; i < N_WD; i++)
        if (!(en && cfg.assert_en[F_WD+i]) || clear || (probe.pc_valid && probe.pc == cfg.wd_kick[i])) wd_ref[i] = 0;
        else wd_ref[i]++;
    end
  end

  initial begin
    logic [N_FLAGS-1:0] exp;
    logic any;
    probe = '0;
    cfg = '0;
    for (int i = 0; i < N_FLAGS; i++) fired[i] = 0;
    for (int i = 0; i < N_CP; i++) cp_ref[i] = 0;
    for (int i = 0; i < N_WD; i++) wd_ref[i] = 0;
    // program memory 0x000-0x3FF: 0x000-0x0FF init code, 0x100-0x2FF app,
    // 0x300-0x3FF handlers; data 0x1000-0x1FFF RAM, 0x8000-0x80FF an IP.
    for (int i = 0; i < N_WP; i++) cfg.wp_addr[i] = 32'h300 + 32'(i * 16);
    for (int i = 0; i < N_CP; i++) begin
      cfg.cp_addr[i] = 32'h100 + 32'(i * 32);
      cfg.cp_thr[i]  = 32'(3 + 3 * i);
    end
    cfg.pcr_lo[0] = 32'h000; cfg.pcr_hi[0] = 32'h0FF;   // init code: excluded
    cfg.pcr_lo[1] = 32'h100; cfg.pcr_hi[1] = 32'h2FF;   // application
    cfg.pcr_lo[2] = 32'h300; cfg.pcr_hi[2] = 32'h33F;   // handlers
    cfg.pcr_lo[3] = 32'h380; cfg.pcr_hi[3] = 32'h3FF;
    cfg.pc_scope_sel = 4'b0010;
    cfg.dr_lo[0] = 32'h8000; cfg.dr_hi[0] = 32'h80FF;   // unused IP: excluded
    cfg.dr_lo[1] = 32'h1000; cfg.dr_hi[1] = 32'h1FFF;   // RAM
    cfg.dr_lo[2] = 32'h9000; cfg.dr_hi[2] = 32'h900F;
    cfg.dr_lo[3] = 32'hA000; cfg.dr_hi[3] = 32'hA00F;
    cfg.d_scope_sel = 4'b0010;
    cfg.wd_kick[0] = 32'h100; cfg.wd_thr[0] = 32'd60;
    cfg.wd_kick[1] = 32'h104; cfg.wd_thr[1] = 32'd400;
    cfg.assert_en = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      clear = (c % 1000 == 999);
      probe.pc_valid = ($urandom_range(3) != 0);
      case ($urandom_range(19))
        0:       probe.pc = 32'h300 + 32'($urandom_range(N_WP - 1) * 16);
        1:       probe.pc = 32'($urandom_range(32'h0FF)) & ~32'h1;
        2, 3:    probe.pc = 32'h100 + 32'($urandom_range(N_CP - 1) * 32);
        4:       probe.pc = 32'h380 + 32'($urandom_range(32'h7F));
        default: probe.pc = (c > 1500 && c < 1800) ? 32'h200 : 32'h100 + 32'($urandom_range(32'h1FF));
      endcase
      probe.d_req = ($urandom_range(2) == 0);
      case ($urandom_range(9))
        0:       probe.d_addr = 32'h8000 + 32'($urandom_range(255));
        1:       probe.d_addr = ($urandom_range(1) == 0 ? 32'h9000 : 32'hA000) + 32'($urandom_range(31));
        2:       probe.d_addr = $urandom();
        default: probe.d_addr = 32'h1000 + 32'($urandom_range(32'hFFF));
      endcase
      #1;
      exp = '0;
      for (int i = 0; i < N_WP; i++)
        exp[F_WP+i] = probe.pc_valid && probe.pc == cfg.wp_addr[i];
      for (int i = 0; i < N_CP; i++)
        exp[F_CP+i] = cp_ref[i] >= int'(cfg.cp_thr[i]);
      any = 0;
      for (int i = 0; i < N_PCR; i++) begin
        logic r;
        r = inr(probe.pc, cfg.pcr_lo[i], cfg.pcr_hi[i]);
        exp[F_PCR+i] = probe.pc_valid && r;
        if (cfg.pc_scope_sel[i] && r) any = 1;
      end
      exp[F_PCSCOPE] = probe.pc_valid && !any;
      any = 0;
      for (int i = 0; i < N_DR; i++) begin
        logic r;
        r = inr(probe.d_addr, cfg.dr_lo[i], cfg.dr_hi[i]);
        exp[F_DR+i] = probe.d_req && r;
        if (cfg.d_scope_sel[i] && r) any = 1;
      end
      exp[F_DSCOPE] = probe.d_req && !any;
      for (int i = 0; i < N_WD; i++)
        exp[F_WD+i] = wd_ref[i] >= int'(cfg.wd_thr[i]);
      check(hits == exp, $sformatf("cycle %0d hits %h exp %h", c, hits, exp));
      for (int i = 0; i < N_CP; i++)
        check(int'(cp_count[i]) == cp_ref[i], $sformatf("cp count %0d", i));
      for (int i = 0; i < N_FLAGS; i++) if (hits[i]) fired[i]++;
    end
    // detector disabled: nothing flags
    @(negedge clk) begin en = 0; clear = 1; probe.pc_valid = 1; probe.pc = 32'h300; probe.d_req = 1; end
    @(negedge clk) clear = 0;
    #1 check(hits == '0, "disabled detector is silent");
    for (int i = 0; i < N_FLAGS; i++) check(fired[i] > 0, $sformatf("assertion %0d fired", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
