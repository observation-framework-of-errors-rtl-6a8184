// circular_buffer: ECC-protected ring memory holding the most recent trace
// events.
//
// Events are written at processor clock speed to position W, which then
// advances and wraps; once the ring is full each new event overwrites the
// oldest one, so after recording stops the memory holds the last DEPTH
// events before the failure. The depth (1024 events of 16 bytes, 16 KB) and
// the SECDED protection follow the design description. Each 32-bit word of an
// event is stored with its own SECDED check bits (4 x 39 = 156 bits per
// entry); single upsets are corrected and double upsets flagged on readout.
//
// Interface and timing:
//   wr_en/wr_data  write one event per cycle (ignored during clear).
//   clear          empties the buffer (W and the fill count return to 0).
//   rd_en/rd_idx   read entry rd_idx counted from the oldest entry held
//                  (rd_idx = 0 is the position R just after W when full);
//                  rd_data, rd_sec and rd_ded are valid the next cycle.
//   count          entries held (saturates at DEPTH); wr_ptr = W.
// Write and read ports are independent (simple dual-port memory), so the
// buffer can be read while it still records; that, the readout order and the
// per-word code are this design's choices. The memory array has no reset.
// Assertions check that the fill count stays within the depth and tracks the
// write pointer until the ring wraps.
module circular_buffer
  import obs_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned NW   = EV_W / 32,          // 32-bit words per event
  localparam int unsigned CW   = 39                  // codeword per word
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              wr_en,
  input  logic [EV_W-1:0]   wr_data,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_idx,
  output logic [EV_W-1:0]   rd_data,
  output logic              rd_sec,
  output logic              rd_ded,
  output logic [AW:0]       count,
  output logic [AW-1:0]     wr_ptr
);

  logic [NW*CW-1:0] mem [DEPTH];
  logic [NW*CW-1:0] wr_code, rd_code;
  logic [NW-1:0]    sec_w, ded_w;
  logic [AW-1:0]    rd_phys;

  // Encode each word of the incoming event; decode each word read back.
  for (genvar i = 0; i < NW; i++) begin : g_ecc
    logic [31:0] unused_dout;
    logic        unused_sec, unused_ded;
    logic [CW-1:0] unused_code;
    secded_codec #(.DATA_W(32)) u_enc (
      .data_in  (wr_data[i*32 +: 32]),
      .code_out (wr_code[i*CW +: CW]),
      .code_in  ('0),
      .data_out (unused_dout),
      .sec      (unused_sec),
      .ded      (unused_ded)
    );
    secded_codec #(.DATA_W(32)) u_dec (
      .data_in  ('0),
      .code_out (unused_code),
      .code_in  (rd_code[i*CW +: CW]),
      .data_out (rd_data[i*32 +: 32]),
      .sec      (sec_w[i]),
      .ded      (ded_w[i])
    );
  end

  assign rd_sec = |sec_w;
  assign rd_ded = |ded_w;

  // Pointer and fill count.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      count  <= '0;
    end else if (wr_en) begin
      wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (count != (AW+1)'(DEPTH)) count <= count + 1'b1;
    end
  end

  // Oldest entry is at 0 until the ring has wrapped, then at W.
  always_comb begin
    if (count == (AW+1)'(DEPTH)) begin
      rd_phys = (AW+1)'(wr_ptr) + (AW+1)'(rd_idx) >= (AW+1)'(DEPTH)
              ? AW'((AW+1)'(wr_ptr) + (AW+1)'(rd_idx) - (AW+1)'(DEPTH))
              : wr_ptr + rd_idx;
    end else begin
      rd_phys = rd_idx;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !clear) mem[wr_ptr] <= wr_code;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_code <= mem[rd_phys];
  end

  // The fill count never exceeds the depth, and the write pointer equals the
  // count until the ring has wrapped.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (AW+1)'(DEPTH));
  a_ptr_before_wrap: assert property (@(posedge clk) disable iff (!rst_n)
    (count < (AW+1)'(DEPTH)) |-> ((AW+1)'(wr_ptr) == count));

endmodule
