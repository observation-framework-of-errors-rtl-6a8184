// error_detector: programmable assertions on the program counter and on the
// data access addresses of the observed core.
//
// Kinds of assertion, as listed in the design description:
//   watchpoints      flag when the retired PC equals a programmed address
//                    (typically the entry of a trap handler);
//   checkpoints      count PC matches and flag at a threshold;
//   PC range checkers flag when the retired PC is inside their range (e.g.
//                    initialisation code that must not run again);
//   PC scope         flags when the retired PC is outside every range
//                    selected in pc_scope_sel (keeps the core inside the
//                    application); an empty selection disables it;
//   data range checkers and data scope: the same on the data access address
//                    (Harvard core), e.g. to forbid accesses to unused IPs;
//   watchdogs        flag when too many cycles pass without the PC reaching
//                    a refresh address.
// The output hits has one bit per assertion in the order of obs_pkg (F_WP,
// F_CP, F_PCR, F_PCSCOPE, F_DR, F_DSCOPE, F_WD). Hits are not masked here;
// cfg.assert_en gates them in the trigger unit and starts the watchdogs. The
// numbers of each kind and the bit order are this design's choices.
//
// Timing: watchpoint and range hits are combinational from the probes (same
// cycle as pc_valid or d_req); checkpoint and watchdog hits come from
// registered counters and appear one cycle later. clear restarts counters.
module error_detector
  import obs_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      clear,
  input  det_cfg_t                  cfg,
  input  probe_t                    probe,
  output logic [N_FLAGS-1:0]        hits,
  output logic [N_CP-1:0][XLEN-1:0] cp_count
);

  logic [N_WP-1:0]  wp_hit;
  logic [N_CP-1:0]  cp_hit;
  logic [N_PCR-1:0] pcr_in;
  logic [N_DR-1:0]  dr_in;
  logic [N_WD-1:0]  wd_hit;
  logic             pc_ok, d_ok;

  assign pc_ok = en && probe.pc_valid;
  assign d_ok  = en && probe.d_req;

  for (genvar i = 0; i < N_WP; i++) begin : g_wp
    assign wp_hit[i] = pc_ok && (probe.pc == cfg.wp_addr[i]);
  end

  for (genvar i = 0; i < N_CP; i++) begin : g_cp
    checkpoint_counter #(.CW(XLEN)) u_cp (
      .clk, .rst_n, .clear,
      .pc_valid   (pc_ok),
      .pc         (probe.pc),
      .match_addr (cfg.cp_addr[i]),
      .threshold  (cfg.cp_thr[i]),
      .count      (cp_count[i]),
      .hit        (cp_hit[i])
    );
  end

  for (genvar i = 0; i < N_PCR; i++) begin : g_pcr
    range_checker #(.AW(XLEN)) u_rc (
      .addr (probe.pc), .lo (cfg.pcr_lo[i]), .hi (cfg.pcr_hi[i]), .in_range (pcr_in[i])
    );
  end

  for (genvar i = 0; i < N_DR; i++) begin : g_dr
    range_checker #(.AW(XLEN)) u_rc (
      .addr (probe.d_addr), .lo (cfg.dr_lo[i]), .hi (cfg.dr_hi[i]), .in_range (dr_in[i])
    );
  end

  for (genvar i = 0; i < N_WD; i++) begin : g_wd
    watchdog_timer #(.CW(XLEN)) u_wd (
      .clk, .rst_n, .clear,
      .run       (en && cfg.assert_en[F_WD + i]),
      .pc_valid  (probe.pc_valid),
      .pc        (probe.pc),
      .kick_addr (cfg.wd_kick[i]),
      .threshold (cfg.wd_thr[i]),
      .hit       (wd_hit[i])
    );
  end

  always_comb begin
    hits = '0;
    hits[F_WP  +: N_WP]  = wp_hit;
    hits[F_CP  +: N_CP]  = cp_hit;
    hits[F_PCR +: N_PCR] = pc_ok ? pcr_in : '0;
    hits[F_PCSCOPE]      = pc_ok && (cfg.pc_scope_sel != '0) && ((pcr_in & cfg.pc_scope_sel) == '0);
    hits[F_DR  +: N_DR]  = d_ok ? dr_in : '0;
    hits[F_DSCOPE]       = d_ok && (cfg.d_scope_sel != '0) && ((dr_in & cfg.d_scope_sel) == '0);
    hits[F_WD  +: N_WD]  = wd_hit;
  end

endmodule
