// trace_encoder: turns the probed retirement stream of a core into trace
// events for the circular buffer.
//
// The encoder follows the program flow from the retired PC and instruction
// word. For each retired instruction it computes where the next sequential
// instruction would be (PC + 2 for a compressed instruction, instr[1:0] !=
// 2'b11, else PC + 4); when the next retired PC is elsewhere the flow has
// jumped (jump, taken branch, trap, return). With the jump filter off every
// retired instruction produces an event; with it on, only the first
// instruction after enable (START) and each jump target (JUMP) do, which is
// enough to rebuild the flow against the program image. Each event carries
// the number of clock cycles since the previous event and two of the three
// probed registers (stack pointer, ALU result, second ALU result), chosen by
// reg_sel.
//
// What follows the design description: flow reconstruction from PC and
// instruction probes, the jump filter, cycle-count timestamps, two 32-bit
// registers chosen from three. This design's own choices: the discontinuity
// test in place of the RISC-V trace packet formats (no branch maps), the
// 128-bit event layout of obs_pkg, and a saturating 28-bit timestamp.
//
// Timing: probes are sampled in the cycle pc_valid is high; the event is
// registered and ev_valid is high for one cycle, one cycle later. The
// timestamp counts from the cycle of the previous event (or of enable).
module trace_encoder
  import obs_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         jump_filter,
  input  reg_sel_e     reg_sel,
  input  probe_t       probe,
  output logic         ev_valid,
  output trace_event_t ev
);

  typedef enum logic [0:0] {S_IDLE, S_TRACK} state_e;

  state_e          state;
  logic [XLEN-1:0] next_seq;   // expected PC if no jump
  logic [TS_W-1:0] ts;         // cycles since last event
  logic            jump, emit;
  ev_type_e        etype;
  logic [XLEN-1:0] r0, r1;

  assign jump = (state == S_TRACK) && (probe.pc != next_seq);

  always_comb begin
    if (state == S_IDLE)  etype = EV_START;
    else if (jump)        etype = EV_JUMP;
    else                  etype = EV_INSTR;
  end

  assign emit = en && probe.pc_valid && (!jump_filter || etype != EV_INSTR);

  always_comb begin
    unique case (reg_sel)
      SEL_SP_ALU1:   begin r0 = probe.sp;   r1 = probe.alu1; end
      SEL_SP_ALU2:   begin r0 = probe.sp;   r1 = probe.alu2; end
      SEL_ALU1_ALU2: begin r0 = probe.alu1; r1 = probe.alu2; end
      default:       begin r0 = probe.sp;   r1 = probe.alu1; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      next_seq <= '0;
      ts       <= '0;
      ev_valid <= 1'b0;
      ev       <= '0;
    end else begin
      ev_valid <= emit;
      if (!en) begin
        state <= S_IDLE;
        ts    <= '0;
      end else begin
        if (probe.pc_valid) begin
          state    <= S_TRACK;
          next_seq <= probe.pc + ((probe.instr[1:0] == 2'b11) ? 32'd4 : 32'd2);
        end
        if (emit) begin
          ev.etype  <= etype;
          ev.tstamp <= ts;
          ev.pc     <= probe.pc;
          ev.reg0   <= r0;
          ev.reg1   <= r1;
          ts        <= TS_W'(1);
        end else if (ts != '1) begin
          ts <= ts + 1'b1;
        end
      end
    end
  end

endmodule
