// tb_secded_codec: self-checking test of the SECDED code.
// Random words are encoded; the codeword is decoded unchanged (no flags),
// with every single bit flipped in turn (word restored, sec set) and with
// random pairs of bits flipped (ded set). Codewords of words one bit apart
// must differ in at least four bits (minimum distance of SECDED).
module tb_secded_codec;
  localparam int DW = 32, CW = 39;
  logic [DW-1:0] din, dout;
  logic [CW-1:0] cout, cin;
  logic sec, ded;
  int checks = 0, failures = 0;

  secded_codec #(.DATA_W(DW)) dut (.data_in(din), .code_out(cout), .code_in(cin),
                                   .data_out(dout), .sec(sec), .ded(ded));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] c0, c1;
    for (int t = 0; t < 200; t++) begin
      din = $urandom();
      if (t == 0) din = '0;
      if (t == 1) din = '1;
      #1;
      c0  = cout;
      cin = c0;
      #1;
      check(dout == din && !sec && !ded, $sformatf("clean decode %h", din));
      for (int b = 0; b < CW; b++) begin
        cin = c0 ^ (CW'(1) << b);
        #1;
        check(dout == din && sec && !ded, $sformatf("single flip bit %0d of %h", b, din));
      end
      for (int k = 0; k < 10; k++) begin
        int b1, b2;
        b1 = $urandom_range(CW - 1);
        b2 = (b1 + 1 + $urandom_range(CW - 2)) % CW;
        cin = c0 ^ (CW'(1) << b1) ^ (CW'(1) << b2);
        #1;
        check(ded && !sec, $sformatf("double flip %0d,%0d", b1, b2));
      end
      din = din ^ (DW'(1) << $urandom_range(DW - 1));
      #1;
      c1 = cout;
      check($countones(c0 ^ c1) >= 4, "minimum distance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
