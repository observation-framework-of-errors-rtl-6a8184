// tb_range_checker: compares the range test with a reference on edge cases
// (addresses at and beside both bounds, empty range) and random values.
module tb_range_checker;
  logic [31:0] a, lo, hi;
  logic in_r;
  int checks = 0, failures = 0;

  range_checker #(.AW(32)) dut (.addr(a), .lo, .hi, .in_range(in_r));

  task automatic try(input logic [31:0] av, lov, hiv);
    logic exp;
    a = av; lo = lov; hi = hiv;
    #1;
    exp = !(av < lov) && !(av > hiv);
    checks++;
    if (in_r !== exp) begin
      failures++;
      $display("FAIL a=%h lo=%h hi=%h got %b", av, lov, hiv, in_r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32'h100, 32'h100, 32'h1FF);
    try(32'h1FF, 32'h100, 32'h1FF);
    try(32'h0FF, 32'h100, 32'h1FF);
    try(32'h200, 32'h100, 32'h1FF);
    try(32'h150, 32'h1FF, 32'h100);
    try(32'h0, 32'h0, 32'h0);
    try(32'hFFFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] l, h;
      l = $urandom(); h = l + ($urandom() >> 8);
      if (h < l) h = 32'hFFFF_FFFF;
      try((i % 2) ? l + ($urandom() >> 7) : $urandom(), l, h);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
