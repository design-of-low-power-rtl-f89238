// ripple_carry_adder: the ALU's conventional adder (select code 1).
//
// W full-adder cells are cascaded; the carry out of bit i is the carry in of
// bit i+1, so the sum settles after the carry has rippled through all W
// cells. This is the structure the specification gives for the conventional
// adder. The width parameter and the port names are this design's.
//
// Interface: a, b (W bits, unsigned), cin -> sum (W bits), cout.
// Timing: purely combinational, no clock.
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
