// tb_obs_interface: self-checking test of the debug-bus register interface.
// An APB master task writes and reads every configuration register and
// checks the configuration outputs field by field; checks the command
// pulses, status and flag reads, checkpoint counts, that the log bank keeps
// its contents through a reset while configuration returns to zero, the
// buffer window (event and word order, ECC counters) against a small
// memory model, and pslverr on unmapped addresses. Every access must complete
// in two cycles (no wait states).
module tb_obs_interface;
  import obs_pkg::*;
  localparam int DEPTH = 64;
  localparam int BAW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [15:0] paddr;
  logic [31:0] pwdata, prdata;
  logic pready, pslverr;
  ctrl_t ctrl;
  det_cfg_t det_cfg;
  logic [N_FLAGS-1:0] stop_mask, halt_mask, flags;
  logic clr_flags, clr_buf, stop_rec, halt_cpu;
  logic [N_CP-1:0][XLEN-1:0] cp_count;
  logic buf_rd_en, buf_rd_sec, buf_rd_ded;
  logic [BAW-1:0] buf_rd_idx, buf_wr_ptr;
  logic [EV_W-1:0] buf_rd_data;
  logic [BAW:0] buf_count;
  int checks = 0, failures = 0;
  int n_clr_flags = 0, n_clr_buf = 0;

  obs_interface #(.DEPTH(DEPTH), .N_LOG(16)) dut (.*);

  always #5 clk = ~clk;

  // buffer model: entry i word w = {i[15:0], w[15:0]} ; entry 5 reports sec, 6 ded
  always @(posedge clk) if (buf_rd_en) begin
    for (int w = 0; w < 4; w++) buf_rd_data[(3 - w) * 32 +: 32] <= {16'(buf_rd_idx), 16'(w)};
    buf_rd_sec <= (buf_rd_idx == 5);
    buf_rd_ded <= (buf_rd_idx == 6);
  end
  always @(posedge clk) begin
    if (clr_flags) n_clr_flags++;
    if (clr_buf)   n_clr_buf++;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic apb(input logic wr, input logic [15:0] a, input logic [31:0] d,
                     output logic [31:0] r, output logic err);
    @(negedge clk) begin psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d; end
    @(negedge clk) penable = 1;
    #1 begin
      check(pready, "no wait state");
      r = prdata; err = pslverr;
    end
    @(posedge clk);
    #1 begin psel = 0; penable = 0; end
  endtask

  task automatic wr32(input logic [15:0] a, input logic [31:0] d);
    logic [31:0] r; logic e;
    apb(1, a, d, r, e);
    check(!e, $sformatf("write %h accepted", a));
  endtask

  task automatic rd32(input logic [15:0] a, output logic [31:0] r);
    logic e;
    apb(0, a, 0, r, e);
    check(!e, $sformatf("read %h accepted", a));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, v;
    logic e;
    logic [31:0] vals [logic [15:0]];
    flags = '0; stop_rec = 0; halt_cpu = 0; cp_count = '0; buf_count = '0; buf_wr_ptr = '0;
    paddr = '0; pwdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // configuration registers
    vals[A_CTRL] = 32'h39; vals[A_ASSERT_EN] = 32'h000F_5A5A; vals[A_STOP_MASK] = 32'h000A_0001;
    vals[A_HALT_MASK] = 32'h0000_1000; vals[A_SCOPE] = 32'h0000_0905;
    for (int i = 0; i < N_WP; i++) vals[A_WP_ADDR + 16'(4*i)] = $urandom();
    for (int i = 0; i < N_CP; i++) vals[A_CP_ADDR + 16'(4*i)] = $urandom();
    for (int i = 0; i < N_CP; i++) vals[A_CP_THR  + 16'(4*i)] = $urandom();
    for (int i = 0; i < N_PCR; i++) vals[A_PCR_LO + 16'(4*i)] = $urandom();
    for (int i = 0; i < N_PCR; i++) vals[A_PCR_HI + 16'(4*i)] = $urandom();
    for (int i = 0; i < N_DR; i++) vals[A_DR_LO + 16'(4*i)] = $urandom();
    for (int i = 0; i < N_DR; i++) vals[A_DR_HI + 16'(4*i)] = $urandom();
    for (int i = 0; i < N_WD; i++) vals[A_WD_KICK + 16'(4*i)] = $urandom();
    for (int i = 0; i < N_WD; i++) vals[A_WD_THR + 16'(4*i)] = $urandom();
    foreach (vals[a]) wr32(a, vals[a]);
    foreach (vals[a]) begin
      rd32(a, r);
      check(r == vals[a], $sformatf("readback %h: %h vs %h", a, r, vals[a]));
    end
    check(ctrl.rec_en && !ctrl.jump_filter && ctrl.reg_sel == SEL_ALU1_ALU2 && ctrl.core_sel && ctrl.det_en, "ctrl fields");
    check(det_cfg.assert_en == N_FLAGS'(32'h000F_5A5A), "assert_en");
    check(stop_mask == N_FLAGS'(32'h000A_0001) && halt_mask == N_FLAGS'(32'h1000), "masks");
    check(det_cfg.pc_scope_sel == 4'h5 && det_cfg.d_scope_sel == 4'h9, "scope selections");
    for (int i = 0; i < N_WP; i++) check(det_cfg.wp_addr[i] == vals[A_WP_ADDR + 16'(4*i)], "wp_addr");
    for (int i = 0; i < N_CP; i++) check(det_cfg.cp_addr[i] == vals[A_CP_ADDR + 16'(4*i)], "cp_addr");
    for (int i = 0; i < N_CP; i++) check(det_cfg.cp_thr[i] == vals[A_CP_THR + 16'(4*i)], "cp_thr");
    for (int i = 0; i < N_PCR; i++) check(det_cfg.pcr_lo[i] == vals[A_PCR_LO + 16'(4*i)] && det_cfg.pcr_hi[i] == vals[A_PCR_HI + 16'(4*i)], "pcr");
    for (int i = 0; i < N_DR; i++) check(det_cfg.dr_lo[i] == vals[A_DR_LO + 16'(4*i)] && det_cfg.dr_hi[i] == vals[A_DR_HI + 16'(4*i)], "dr");
    for (int i = 0; i < N_WD; i++) check(det_cfg.wd_kick[i] == vals[A_WD_KICK + 16'(4*i)] && det_cfg.wd_thr[i] == vals[A_WD_THR + 16'(4*i)], "wd");
    // log bank
    for (int i = 0; i < 16; i++) wr32(A_LOG + 16'(4*i), 32'hC0DE_0000 + 32'(i * 3));
    // status inputs
    flags = N_FLAGS'(32'h8_0421); stop_rec = 1; halt_cpu = 1; buf_count = (BAW+1)'(DEPTH); buf_wr_ptr = BAW'(9);
    for (int i = 0; i < N_CP; i++) cp_count[i] = 32'(100 + i);
    rd32(A_FLAGS, r);    check(r == 32'h8_0421, "flags read");
    rd32(A_STATUS, r);   check(r[3:0] == 4'b1110 && !r[4], $sformatf("status %h", r));
    rd32(A_BUF_INFO, r); check(r == {16'd9, 16'(DEPTH)}, "buf info");
    for (int i = 0; i < N_CP; i++) begin rd32(A_CP_CNT + 16'(4*i), r); check(r == 32'(100 + i), "cp count read"); end
    stop_rec = 0;
    rd32(A_STATUS, r);   check(r[0], "recording bit");
    // commands
    wr32(A_CMD, 32'h1); wr32(A_CMD, 32'h2); wr32(A_CMD, 32'h3);
    check(n_clr_flags == 2 && n_clr_buf == 2, "command pulses, one cycle each");
    // buffer window
    for (int ev = 0; ev < 8; ev++)
      for (int w = 0; w < 4; w++) begin
        rd32(A_BUF + 16'(16*ev + 4*w), r);
        check(r == {16'(ev), 16'(w)}, $sformatf("buffer event %0d word %0d: %h", ev, w, r));
      end
    rd32(A_BUF + 16'(16*(DEPTH-1) + 12), r);
    check(r == {16'(DEPTH-1), 16'd3}, "last buffer entry");
    rd32(A_ECC_CNT, r);
    check(r == {16'd4, 16'd4}, $sformatf("ECC counters %h", r));
    // unmapped
    apb(0, 16'h0300, 0, r, e); check(e, "unmapped read errors");
    apb(0, A_BUF + 16'(16*DEPTH), 0, r, e); check(e, "beyond buffer errors");
    // reset: configuration clears, log bank survives
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    rd32(A_CTRL, r); check(r == 0, "ctrl reset");
    rd32(A_WP_ADDR, r); check(r == 0, "wp reset");
    for (int i = 0; i < 16; i++) begin
      rd32(A_LOG + 16'(4*i), r);
      check(r == 32'hC0DE_0000 + 32'(i * 3), "log bank survives reset");
    end
    // one configuration copy upset: voted value, status shows disagreement
    wr32(A_WP_ADDR, 32'h1234_5678);
    dut.g_cfg[5].u_reg.r1 = 32'hFFFF_0000;
    #1 check(det_cfg.wp_addr[0] == 32'h1234_5678, "voted configuration");
    @(negedge clk);
    rd32(A_WP_ADDR, r); check(r == 32'h1234_5678, "upset repaired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
