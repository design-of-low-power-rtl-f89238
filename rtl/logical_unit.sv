// logical_unit: logical AND, OR and NOT (ALU select codes 8, 9 and 13).
//
// A logical operator treats a whole operand as one truth value: false when
// it is zero, true otherwise, and always yields a single bit. So X || Y is 1
// when either operand is non-zero, X && Y is 1 when both are, and !X is 1
// only when X is zero. With X = 2 and Y = 0: X && Y = 0, X || Y = 1, !X = 0,
// !Y = 1. The result is placed in bit 0 of a W-bit output whose other bits
// are zero. The operator semantics follow the specification; the op
// encoding and the zero-extension of the result are this design's.
//
// Interface: x, y (W bits), op (log_op_e) -> r (W bits, r[W-1:1] = 0).
// Timing: purely combinational, no clock.
module logical_unit
  import alu_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  log_op_e      op,
  output logic [W-1:0] r
);
  logic xt, yt;   // truth value of each operand
  logic res;

  assign xt = |x;
  assign yt = |y;

  always_comb begin
    unique case (op)
      LOG_OR:  res = xt | yt;
      LOG_AND: res = xt & yt;
      LOG_NOT: res = ~xt;
      default: res = 1'b0;
    endcase
  end

  assign r = {{(W-1){1'b0}}, res};
endmodule
