// range_checker: tells whether an address lies in a programmed range.
//
// One comparator pair of the error detector. The PC range checkers, the PC
// scope, the data-address range checkers and the data scope are all built
// from it: a range checker flags when the address is inside its range, a
// scope flags when the address is outside every range selected for it.
// The bounds are inclusive (this design's choice). Purely combinational.
module range_checker #(
  parameter int unsigned AW = 32
) (
  input  logic [AW-1:0] addr,
  input  logic [AW-1:0] lo,
  input  logic [AW-1:0] hi,
  output logic          in_range
);

  assign in_range = (addr >= lo) && (addr <= hi);

endmodule
