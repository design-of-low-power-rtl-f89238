// qfa_cell: quaternary full adder (QFA) cell. Adds two base-4 digits and a
// carry: t = a + b + ci (0..7), giving the digit s = t mod 4 and the carry
// co = (t >= 4). Each quaternary digit travels as a 2-bit binary code
// (0..3), since the cell is built from standard two-level logic rather than
// from multi-valued signal levels. Purely combinational.
module qfa_cell (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       ci,
  output logic [1:0] s,
  output logic       co
);
  // Carry out of the low binary position of the digit.
  logic c1;
  assign s[0] = a[0] ^ b[0] ^ ci;
  assign c1   = (a[0] & b[0]) | (ci & (a[0] ^ b[0]));
  assign s[1] = a[1] ^ b[1] ^ c1;
  // The digit carry: the sum reached 4 or more.
  assign co   = (a[1] & b[1]) | (c1 & (a[1] ^ b[1]));
endmodule
