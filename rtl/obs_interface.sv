// obs_interface: debug-bus slave of the observation IP.
//
// Everything the IP holds is reachable on the debug bus, by a JTAG remote
// controller or by the firmware itself, without disturbing the running
// program: the control and assertion configuration registers, the status and
// sticky assertion flags, the checkpoint counts, a bank of general-purpose
// log registers that survives reset (the firmware writes its run counter,
// error codes and CPU status there), and a read window onto the circular
// buffer. Configuration registers and the log bank are held in TMR registers
// (tmr_reg) as the design description asks; the log bank has no reset.
//
// Bus: AMBA APB-style, 16-bit byte address, 32-bit data, no wait states
// (pready is always high). A buffer read uses the setup phase to start the
// synchronous memory read, so its data is ready in the access phase. pslverr
// is raised for an address that maps to nothing. Assertions check that the
// master keeps to the APB setup/access order and holds its request stable. The bus protocol, the
// register map (obs_pkg A_*) and the ECC error counters are this design's
// choices.
//
//   CTRL      rw  [0] rec_en [1] jump_filter [3:2] reg_sel [4] core_sel [5] det_en
//   CMD       w   [0] clear flags, stop and halt, restart counters [1] clear buffer
//   STATUS    r   [0] recording [1] halt [2] stopped [3] buffer full [4] TMR copies disagree
//   FLAGS     r   sticky assertion flags
//   ASSERT_EN, STOP_MASK, HALT_MASK   rw, one bit per assertion
//   BUF_INFO  r   [15:0] entries held, [31:16] write pointer
//   ECC_CNT   r   [15:0] corrected reads, [31:16] uncorrectable reads
//   SCOPE     rw  [7:0] PC scope selection, [15:8] data scope selection
//   WP_ADDR, CP_ADDR, CP_THR, CP_CNT(r), PCR_LO/HI, DR_LO/HI, WD_KICK, WD_THR: +4 per unit
//   LOG       rw  N_LOG words, not reset
//   BUF       r   A_BUF + 16*event + 4*word, event 0 = oldest held
module obs_interface
  import obs_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned N_LOG = 16,
  localparam int unsigned BAW  = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // debug bus
  input  logic                      psel,
  input  logic                      penable,
  input  logic                      pwrite,
  input  logic [15:0]               paddr,
  input  logic [31:0]               pwdata,
  output logic [31:0]               prdata,
  output logic                      pready,
  output logic                      pslverr,
  // configuration out
  output ctrl_t                     ctrl,
  output det_cfg_t                  det_cfg,
  output logic [N_FLAGS-1:0]        stop_mask,
  output logic [N_FLAGS-1:0]        halt_mask,
  output logic                      clr_flags,
  output logic                      clr_buf,
  // status in
  input  logic [N_FLAGS-1:0]        flags,
  input  logic                      stop_rec,
  input  logic                      halt_cpu,
  input  logic [N_CP-1:0][XLEN-1:0] cp_count,
  // buffer read port
  output logic                      buf_rd_en,
  output logic [BAW-1:0]            buf_rd_idx,
  input  logic [EV_W-1:0]           buf_rd_data,
  input  logic                      buf_rd_sec,
  input  logic                      buf_rd_ded,
  input  logic [BAW:0]              buf_count,
  input  logic [BAW-1:0]            buf_wr_ptr
);

  // ---- configuration register file (TMR) -------------------------------
  localparam int unsigned I_CTRL = 0, I_AEN = 1, I_STOP = 2, I_HALT = 3, I_SCOPE = 4;
  localparam int unsigned I_WP   = 5;
  localparam int unsigned I_CPA  = I_WP   + N_WP;
  localparam int unsigned I_CPT  = I_CPA  + N_CP;
  localparam int unsigned I_PCL  = I_CPT  + N_CP;
  localparam int unsigned I_PCH  = I_PCL  + N_PCR;
  localparam int unsigned I_DRL  = I_PCH  + N_PCR;
  localparam int unsigned I_DRH  = I_DRL  + N_DR;
  localparam int unsigned I_WDK  = I_DRH  + N_DR;
  localparam int unsigned I_WDT  = I_WDK  + N_WD;
  localparam int unsigned N_CFG  = I_WDT  + N_WD;

  function automatic logic [15:0] cfg_addr(int unsigned i);
    if (i == I_CTRL)  return A_CTRL;
    if (i == I_AEN)   return A_ASSERT_EN;
    if (i == I_STOP)  return A_STOP_MASK;
    if (i == I_HALT)  return A_HALT_MASK;
    if (i == I_SCOPE) return A_SCOPE;
    if (i < I_CPA)    return A_WP_ADDR + 16'(4 * (i - I_WP));
    if (i < I_CPT)    return A_CP_ADDR + 16'(4 * (i - I_CPA));
    if (i < I_PCL)    return A_CP_THR  + 16'(4 * (i - I_CPT));
    if (i < I_PCH)    return A_PCR_LO  + 16'(4 * (i - I_PCL));
    if (i < I_DRL)    return A_PCR_HI  + 16'(4 * (i - I_PCH));
    if (i < I_DRH)    return A_DR_LO   + 16'(4 * (i - I_DRL));
    if (i < I_WDK)    return A_DR_HI   + 16'(4 * (i - I_DRH));
    if (i < I_WDT)    return A_WD_KICK + 16'(4 * (i - I_WDK));
    return A_WD_THR + 16'(4 * (i - I_WDT));
  endfunction

  logic             wr, rd_setup, rd;
  logic [31:0]      cfg_q [N_CFG];
  logic [N_CFG-1:0] cfg_mm;
  logic [31:0]      log_q [N_LOG];
  logic [N_LOG-1:0] log_mm;

  assign wr       = psel && penable && pwrite;
  assign rd       = psel && penable && !pwrite;
  assign rd_setup = psel && !penable && !pwrite;

  for (genvar i = 0; i < N_CFG; i++) begin : g_cfg
    tmr_reg #(.W(32), .RESETTABLE(1'b1)) u_reg (
      .clk, .rst_n,
      .we       (wr && paddr == cfg_addr(i)),
      .d        (pwdata),
      .q        (cfg_q[i]),
      .mismatch (cfg_mm[i])
    );
  end

  for (genvar i = 0; i < N_LOG; i++) begin : g_log
    tmr_reg #(.W(32), .RESETTABLE(1'b0)) u_reg (
      .clk, .rst_n,
      .we       (wr && paddr == A_LOG + 16'(4 * i)),
      .d        (pwdata),
      .q        (log_q[i]),
      .mismatch (log_mm[i])
    );
  end

  // ---- configuration outputs -------------------------------------------
  assign ctrl      = ctrl_t'(cfg_q[I_CTRL][5:0]);
  assign stop_mask = cfg_q[I_STOP][N_FLAGS-1:0];
  assign halt_mask = cfg_q[I_HALT][N_FLAGS-1:0];

  always_comb begin
    det_cfg = '0;
    det_cfg.assert_en    = cfg_q[I_AEN][N_FLAGS-1:0];
    det_cfg.pc_scope_sel = cfg_q[I_SCOPE][N_PCR-1:0];
    det_cfg.d_scope_sel  = cfg_q[I_SCOPE][8 +: N_DR];
    for (int i = 0; i < N_WP; i++)  det_cfg.wp_addr[i] = cfg_q[I_WP + i];
    for (int i = 0; i < N_CP; i++)  det_cfg.cp_addr[i] = cfg_q[I_CPA + i];
    for (int i = 0; i < N_CP; i++)  det_cfg.cp_thr[i]  = cfg_q[I_CPT + i];
    for (int i = 0; i < N_PCR; i++) det_cfg.pcr_lo[i]  = cfg_q[I_PCL + i];
    for (int i = 0; i < N_PCR; i++) det_cfg.pcr_hi[i]  = cfg_q[I_PCH + i];
    for (int i = 0; i < N_DR; i++)  det_cfg.dr_lo[i]   = cfg_q[I_DRL + i];
    for (int i = 0; i < N_DR; i++)  det_cfg.dr_hi[i]   = cfg_q[I_DRH + i];
    for (int i = 0; i < N_WD; i++)  det_cfg.wd_kick[i] = cfg_q[I_WDK + i];
    for (int i = 0; i < N_WD; i++)  det_cfg.wd_thr[i]  = cfg_q[I_WDT + i];
  end

  assign clr_flags = wr && paddr == A_CMD && pwdata[0];
  assign clr_buf   = wr && paddr == A_CMD && pwdata[1];

  // ---- buffer window -----------------------------------------------------
  logic        in_buf;
  logic [15:0] buf_off;

  assign buf_off    = paddr - A_BUF;
  assign in_buf     = (paddr >= A_BUF) && (32'(buf_off >> 4) < DEPTH);
  assign buf_rd_idx = BAW'(buf_off >> 4);
  assign buf_rd_en  = rd_setup && in_buf;

  // ECC event counters on buffer readout.
  logic [15:0] ecc_corr, ecc_fail;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ecc_corr <= '0;
      ecc_fail <= '0;
    end else if (rd && in_buf) begin
      if (buf_rd_sec && ecc_corr != '1) ecc_corr <= ecc_corr + 1'b1;
      if (buf_rd_ded && ecc_fail != '1) ecc_fail <= ecc_fail + 1'b1;
    end
  end

  // ---- read mux ------------------------------------------------------------
  logic hit;
  always_comb begin
    prdata = '0;
    hit    = 1'b0;
    for (int unsigned i = 0; i < N_CFG; i++) begin
      if (paddr == cfg_addr(i)) begin
        prdata = cfg_q[i];
        hit    = 1'b1;
      end
    end
    for (int unsigned i = 0; i < N_LOG; i++) begin
      if (paddr == A_LOG + 16'(4 * i)) begin
        prdata = log_q[i];
        hit    = 1'b1;
      end
    end
    for (int unsigned i = 0; i < N_CP; i++) begin
      if (paddr == A_CP_CNT + 16'(4 * i)) begin
        prdata = cp_count[i];
        hit    = 1'b1;
      end
    end
    unique case (paddr)
      A_CMD:     hit = 1'b1;
      A_STATUS:  begin
        prdata = {27'd0, (|cfg_mm) | (|log_mm), buf_count == (BAW+1)'(DEPTH),
                  stop_rec, halt_cpu, ctrl.rec_en && !stop_rec};
        hit = 1'b1;
      end
      A_FLAGS:   begin prdata = 32'(flags); hit = 1'b1; end
      A_BUF_INFO: begin prdata = {16'(buf_wr_ptr), 16'(buf_count)}; hit = 1'b1; end
      A_ECC_CNT: begin prdata = {ecc_fail, ecc_corr}; hit = 1'b1; end
      default: ;
    endcase
    if (in_buf) begin
      prdata = buf_rd_data[(3 - 32'(paddr[3:2])) * 32 +: 32];
      hit    = 1'b1;
    end
  end

  assign pready  = 1'b1;
  assign pslverr = psel && penable && !hit;

  // ---- bus protocol rules ----------------------------------------------------
  // An access phase always follows a setup phase of the same transfer, and
  // the address, direction and write data hold through it.
  a_apb_setup_first: assert property (@(posedge clk) disable iff (!rst_n)
    (psel && penable) |-> $past(psel && !penable));
  a_apb_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (psel && penable) |-> ($stable(paddr) && $stable(pwrite) && $stable(pwdata)));

endmodule
