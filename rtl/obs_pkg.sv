// obs_pkg: types and constants shared by the failure-reason capturing IP.
//
// The IP watches one processor core through a bundle of probes (retired PC,
// instruction, three pipeline registers and the data access address), records
// trace events into an ECC-protected circular buffer and checks the PC and
// data addresses with programmable assertions. This package defines the probe
// bundle, the 128-bit trace event, the assertion configuration and the
// debug-bus register map.
//
// Taken from the design description: 32-bit addresses and registers, the
// three probed registers (stack pointer, first ALU result, second ALU result
// used for jump targets), 16 bytes per event (1024 events = 16 KB), and the
// assertion kinds. The event field layout, the number of assertions of each
// kind, the flag bit order and the register map are this design's own choices.
package obs_pkg;

  localparam int unsigned XLEN = 32;

  // Number of assertions of each kind (own choice).
  localparam int unsigned N_WP  = 4;  // watchpoints
  localparam int unsigned N_CP  = 4;  // checkpoints
  localparam int unsigned N_PCR = 4;  // PC range checkers
  localparam int unsigned N_DR  = 4;  // data-address range checkers
  localparam int unsigned N_WD  = 2;  // watchdogs

  // Flag vector layout: one bit per assertion.
  localparam int unsigned F_WP     = 0;
  localparam int unsigned F_CP     = F_WP + N_WP;
  localparam int unsigned F_PCR    = F_CP + N_CP;
  localparam int unsigned F_PCSCOPE = F_PCR + N_PCR;
  localparam int unsigned F_DR     = F_PCSCOPE + 1;
  localparam int unsigned F_DSCOPE = F_DR + N_DR;
  localparam int unsigned F_WD     = F_DSCOPE + 1;
  localparam int unsigned N_FLAGS  = F_WD + N_WD;   // 20

  // Probes taken from one core. All fields are sampled together, in the cycle
  // an instruction retires (pc_valid) or a data access is requested (d_req).
  typedef struct packed {
    logic            pc_valid;  // an instruction retires this cycle
    logic [XLEN-1:0] pc;        // its address
    logic [XLEN-1:0] instr;     // its instruction word
    logic [XLEN-1:0] sp;        // register file x2 (stack pointer)
    logic [XLEN-1:0] alu1;      // first ALU result register
    logic [XLEN-1:0] alu2;      // second ALU result register (jump targets)
    logic            d_req;     // a data load/store is requested
    logic [XLEN-1:0] d_addr;    // its address
  } probe_t;

  // Trace event types.
  typedef enum logic [3:0] {
    EV_INSTR = 4'd0,  // sequential instruction (jump filter off)
    EV_JUMP  = 4'd1,  // first instruction after a discontinuity
    EV_START = 4'd2   // first instruction after the encoder is enabled
  } ev_type_e;

  localparam int unsigned TS_W = 28;

  // One buffer entry: 128 bits, stored as four 32-bit words.
  // word 0 = {etype, tstamp}, word 1 = pc, word 2 = reg0, word 3 = reg1.
  typedef struct packed {
    ev_type_e        etype;
    logic [TS_W-1:0] tstamp;   // cycles since the previous event (saturating)
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] reg0;
    logic [XLEN-1:0] reg1;
  } trace_event_t;

  localparam int unsigned EV_W = $bits(trace_event_t);  // 128

  // Register pair written with each event.
  typedef enum logic [1:0] {
    SEL_SP_ALU1   = 2'd0,
    SEL_SP_ALU2   = 2'd1,
    SEL_ALU1_ALU2 = 2'd2
  } reg_sel_e;

  // Assertion configuration.
  typedef struct packed {
    logic [N_WP-1:0][XLEN-1:0]  wp_addr;
    logic [N_CP-1:0][XLEN-1:0]  cp_addr;
    logic [N_CP-1:0][XLEN-1:0]  cp_thr;
    logic [N_PCR-1:0][XLEN-1:0] pcr_lo;
    logic [N_PCR-1:0][XLEN-1:0] pcr_hi;
    logic [N_PCR-1:0]           pc_scope_sel;  // ranges forming the allowed PC scope
    logic [N_DR-1:0][XLEN-1:0]  dr_lo;
    logic [N_DR-1:0][XLEN-1:0]  dr_hi;
    logic [N_DR-1:0]            d_scope_sel;   // ranges forming the allowed data scope
    logic [N_WD-1:0][XLEN-1:0]  wd_kick;       // PC that restarts the watchdog
    logic [N_WD-1:0][XLEN-1:0]  wd_thr;
    logic [N_FLAGS-1:0]         assert_en;
  } det_cfg_t;

  // CTRL register.
  typedef struct packed {
    logic     det_en;       // bit 5
    logic     core_sel;     // bit 4
    reg_sel_e reg_sel;      // bits 3:2
    logic     jump_filter;  // bit 1
    logic     rec_en;       // bit 0
  } ctrl_t;

  // Debug-bus register map (byte addresses, 16-bit address space).
  localparam logic [15:0] A_CTRL      = 16'h0000;
  localparam logic [15:0] A_CMD       = 16'h0004;  // write 1: bit0 clear flags, bit1 clear buffer
  localparam logic [15:0] A_STATUS    = 16'h0008;
  localparam logic [15:0] A_FLAGS     = 16'h000C;
  localparam logic [15:0] A_ASSERT_EN = 16'h0010;
  localparam logic [15:0] A_STOP_MASK = 16'h0014;
  localparam logic [15:0] A_HALT_MASK = 16'h0018;
  localparam logic [15:0] A_BUF_INFO  = 16'h001C;  // {wr_ptr, count}
  localparam logic [15:0] A_ECC_CNT   = 16'h0020;  // {uncorrectable, corrected}
  localparam logic [15:0] A_SCOPE     = 16'h0024;  // {d_scope_sel @8, pc_scope_sel @0}
  localparam logic [15:0] A_WP_ADDR   = 16'h0100;  // +4*i
  localparam logic [15:0] A_CP_ADDR   = 16'h0120;
  localparam logic [15:0] A_CP_THR    = 16'h0140;
  localparam logic [15:0] A_CP_CNT    = 16'h0160;  // read only
  localparam logic [15:0] A_PCR_LO    = 16'h0180;
  localparam logic [15:0] A_PCR_HI    = 16'h01A0;
  localparam logic [15:0] A_DR_LO     = 16'h01C0;
  localparam logic [15:0] A_DR_HI     = 16'h01E0;
  localparam logic [15:0] A_WD_KICK   = 16'h0200;
  localparam logic [15:0] A_WD_THR    = 16'h0220;
  localparam logic [15:0] A_LOG       = 16'h0400;  // +4*i, un-resettable log bank
  localparam logic [15:0] A_BUF       = 16'h4000;  // +16*event +4*word, event 0 = oldest

endpackage
