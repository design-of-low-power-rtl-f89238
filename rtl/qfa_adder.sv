// qfa_adder: the ALU's quaternary adder (select code 2).
//
// The operands are read as W/2 quaternary (base-4) digits, digit k being bits
// [2k+1:2k]. A chain of W/2 quaternary full adder cells adds them digit by
// digit, the digit carry rippling from one cell to the next, so the carry
// path is half as long as in the binary ripple carry adder. The result is the
// same binary sum as that of the conventional adder. The specification calls
// this a multi-valued logic adder; here the digits are carried as 2-bit
// binary codes, which is this design's choice, as are the width and port
// names.
//
// Interface: a, b (W bits, unsigned), cin -> sum (W bits), cout. W must be even.
// Timing: purely combinational, no clock.
module qfa_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned D = W / 2;

  if (W % 2 != 0) begin : g_bad_width
    $error("qfa_adder: W must be even");
  end

  logic [D:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < D; k++) begin : g_digit
    qfa_cell u_qfa (
      .a (a[2*k +: 2]),
      .b (b[2*k +: 2]),
      .ci(c[k]),
      .s (sum[2*k +: 2]),
      .co(c[k+1])
    );
  end

  assign cout = c[D];
endmodule
