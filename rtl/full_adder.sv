// full_adder: one-bit binary full adder, the cell that the ripple carry adder
// and the array multiplier are built from. Adds three single bits and gives a
// sum bit and a carry bit. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
