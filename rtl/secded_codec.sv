// secded_codec: single-error-correcting, double-error-detecting code for one
// memory word (extended Hamming code).
//
// The trace buffer keeps every 32-bit word of an event with its own check
// bits so that an upset in the buffer itself, which is exposed to the same
// radiation as the processor, does not corrupt the recorded trace. SECDED
// protection of the buffer follows the design description; the choice of an
// extended Hamming code and of one codeword per 32-bit word is this design's.
//
// Code layout: codeword bit 0 is the overall parity; bits 1..N use Hamming
// positions, with check bits at the power-of-two positions and data bits, in
// ascending order, at the others. For DATA_W = 32 there are 6 Hamming check
// bits plus the overall parity: 39 bits.
//
// Interface: the encoder (data_in -> code_out) and the decoder (code_in ->
// data_out, sec, ded) are independent and purely combinational. sec: one bit
// was wrong and has been corrected; ded: two bits were wrong, data_out is not
// to be trusted.
module secded_codec #(
  parameter int unsigned DATA_W = 32,
  localparam int unsigned P      = hamming_bits(DATA_W),
  localparam int unsigned CODE_W = DATA_W + P + 1
) (
  input  logic [DATA_W-1:0] data_in,
  output logic [CODE_W-1:0] code_out,
  input  logic [CODE_W-1:0] code_in,
  output logic [DATA_W-1:0] data_out,
  output logic              sec,
  output logic              ded
);

  // Smallest p with 2**p >= DATA_W + p + 1.
  function automatic int unsigned hamming_bits(int unsigned dw);
    int unsigned p = 1;
    while ((1 << p) < dw + p + 1) p++;
    return p;
  endfunction

  localparam int unsigned N = DATA_W + P;  // highest Hamming position

  function automatic logic is_pow2(int unsigned v);
    return (v != 0) && ((v & (v - 1)) == 0);
  endfunction

  // Encoder
  always_comb begin
    logic [N:0] c;
    int unsigned d;
    c = '0;
    d = 0;
    for (int unsigned pos = 1; pos <= N; pos++) begin
      if (!is_pow2(pos)) begin
        c[pos] = data_in[d];
        d++;
      end
    end
    for (int unsigned k = 0; k < P; k++) begin
      logic par;
      par = 1'b0;
      for (int unsigned pos = 1; pos <= N; pos++)
        if (((pos >> k) & 1) == 1 && !is_pow2(pos)) par ^= c[pos];
      c[1 << k] = par;
    end
    c[0] = ^c[N:1];
    code_out = c;
  end

  // Decoder
  always_comb begin
    logic [P-1:0] syn;
    logic         overall;
    logic [N:0]   c;
    int unsigned  d;
    c = code_in;
    for (int unsigned k = 0; k < P; k++) begin
      syn[k] = 1'b0;
      for (int unsigned pos = 1; pos <= N; pos++)
        if (((pos >> k) & 1) == 1) syn[k] ^= c[pos];
    end
    overall = ^c;
    sec = 1'b0;
    ded = 1'b0;
    if (overall) begin
      // Odd number of flips: assume one, at position syn (0 = parity bit).
      sec = 1'b1;
      if (int'(syn) <= N) c[syn] = ~c[syn];
      else begin
        sec = 1'b0;
        ded = 1'b1;
      end
    end else if (syn != '0) begin
      ded = 1'b1;
    end
    data_out = '0;
    d = 0;
    for (int unsigned pos = 1; pos <= N; pos++) begin
      if (!is_pow2(pos)) begin
        data_out[d] = c[pos];
        d++;
      end
    end
  end

endmodule
