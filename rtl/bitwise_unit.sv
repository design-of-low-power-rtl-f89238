// bitwise_unit: bitwise NOT, AND, OR and XOR (ALU select codes 14, 11, 10
// and 12).
//
// Each result bit is the operation applied to the bits of the same position
// in X and Y (NOT uses X only). An operand narrower than W is to be
// zero-extended by the instantiating logic before it reaches this unit.
// With X = 4'b1010, Y = 4'b1101: ~X = 0101, X & Y = 1000, X | Y = 1111,
// X ^ Y = 0111 in the low four bits. Operator semantics follow the
// specification; the op encoding is this design's.
//
// Interface: x, y (W bits), op (bit_op_e) -> r (W bits).
// Timing: purely combinational, no clock.
module bitwise_unit
  import alu_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  bit_op_e      op,
  output logic [W-1:0] r
);
  always_comb begin
    unique case (op)
      BIT_OR:  r = x | y;
      BIT_AND: r = x & y;
      BIT_XOR: r = x ^ y;
      BIT_NOT: r = ~x;
      default: r = '0;
    endcase
  end
endmodule
