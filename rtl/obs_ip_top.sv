// obs_ip_top: failure-reason capturing IP for a processor under radiation
// test.
//
// The IP records what the processor did just before it failed. It watches
// one of N_CORES cores through a probe bundle (retired PC and instruction,
// stack pointer, two ALU result registers, data access address). The trace
// encoder turns the retirement stream into timestamped events carrying two of
// the three registers, and the circular buffer keeps the last DEPTH events
// under SECDED protection. In parallel the error detector checks the PC and
// the data addresses against programmable assertions; through the trigger
// unit, a selected assertion stops the recording (so the buffer holds the
// error propagation) and/or freezes the core's pipeline. A remote controller
// then reads the buffer, the flags and the firmware's log registers over the
// debug bus.
//
//   probes[c] --> core select --> trace_encoder --> circular_buffer
//                      |                                 ^ stop
//                      +--> error_detector --> trigger_unit --> halt[c]
//   debug bus <--> obs_interface (config, status, log bank, buffer window)
//
// The structure, the 1024-event buffer, two cores with one observed at a time
// and the stop/halt actions follow the design description; the probe timing,
// the bus protocol and the register map are this design's choices (see
// obs_pkg and obs_interface). One clock domain: the processor clock.
//
// Timing: an event is written to the buffer two cycles after its instruction
// retires. An assertion hit raises stop_rec (and halt) at the next clock
// edge; that edge still lets the encoder take the instruction that caused the
// hit, and the event already in flight is written, so the failing instruction
// is the newest entry of the buffer for PC and data assertions. Checkpoints
// and watchdogs flag from registered counters, one cycle later, so one more
// instruction may be recorded after the one that reached the threshold.
module obs_ip_top
  import obs_pkg::*;
#(
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned N_CORES = 2,
  parameter int unsigned N_LOG   = 16,
  localparam int unsigned CSW    = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  probe_t             probes [N_CORES],
  output logic [N_CORES-1:0] halt,
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [15:0]        paddr,
  input  logic [31:0]        pwdata,
  output logic [31:0]        prdata,
  output logic               pready,
  output logic               pslverr,
  output logic               stop_rec,
  output logic               irq_err
);

  localparam int unsigned BAW = $clog2(DEPTH);

  ctrl_t                     ctrl;
  det_cfg_t                  det_cfg;
  logic [N_FLAGS-1:0]        stop_mask, halt_mask, flags, hits;
  logic                      clr_flags, clr_buf, halt_cpu;
  logic [N_CP-1:0][XLEN-1:0] cp_count;
  probe_t                    probe;
  logic                      ev_valid;
  trace_event_t              ev;
  logic                      buf_rd_en, buf_rd_sec, buf_rd_ded;
  logic [BAW-1:0]            buf_rd_idx, buf_wr_ptr;
  logic [EV_W-1:0]           buf_rd_data;
  logic [BAW:0]              buf_count;
  logic [CSW-1:0]            core;

  // Core select: the buffer and the detector observe one core at a time.
  assign core  = CSW'(ctrl.core_sel);
  assign probe = probes[core];

  always_comb begin
    halt = '0;
    halt[core] = halt_cpu;
  end

  trace_encoder u_enc (
    .clk, .rst_n,
    .en          (ctrl.rec_en && !stop_rec),
    .jump_filter (ctrl.jump_filter),
    .reg_sel     (ctrl.reg_sel),
    .probe       (probe),
    .ev_valid    (ev_valid),
    .ev          (ev)
  );

  circular_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .clear   (clr_buf),
    .wr_en   (ev_valid),
    .wr_data (ev),
    .rd_en   (buf_rd_en),
    .rd_idx  (buf_rd_idx),
    .rd_data (buf_rd_data),
    .rd_sec  (buf_rd_sec),
    .rd_ded  (buf_rd_ded),
    .count   (buf_count),
    .wr_ptr  (buf_wr_ptr)
  );

  error_detector u_det (
    .clk, .rst_n,
    .en       (ctrl.det_en),
    .clear    (clr_flags),
    .cfg      (det_cfg),
    .probe    (probe),
    .hits     (hits),
    .cp_count (cp_count)
  );

  trigger_unit #(.N_FLAGS(N_FLAGS)) u_trig (
    .clk, .rst_n,
    .clear     (clr_flags),
    .hits      (hits),
    .assert_en (det_cfg.assert_en),
    .stop_mask (stop_mask),
    .halt_mask (halt_mask),
    .flags     (flags),
    .stop_rec  (stop_rec),
    .halt_cpu  (halt_cpu),
    .irq       (irq_err)
  );

  obs_interface #(.DEPTH(DEPTH), .N_LOG(N_LOG)) u_if (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .ctrl, .det_cfg, .stop_mask, .halt_mask, .clr_flags, .clr_buf,
    .flags, .stop_rec, .halt_cpu, .cp_count,
    .buf_rd_en, .buf_rd_idx, .buf_rd_data, .buf_rd_sec, .buf_rd_ded,
    .buf_count, .buf_wr_ptr
  );

endmodule
