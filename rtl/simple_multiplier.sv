// simple_multiplier: the ALU's conventional multiplier (select code 7).
//
// An unsigned W x W product written with the multiply operator, so that the
// synthesis tool chooses the multiplier structure itself. It serves as the
// reference point the other multipliers are compared against. That the
// conventional multiplier is unsigned and left to the tool is this design's
// reading.
//
// Interface: x, y (W bits, unsigned) -> p (2W bits, unsigned).
// Timing: purely combinational, no clock.
module simple_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] p
);
  assign p = (2*W)'(x) * (2*W)'(y);
endmodule
