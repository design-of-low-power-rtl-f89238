// booth_radix2_multiplier: signed radix-2 Booth multiplier (ALU select code 4).
//
// The multiplier y is recoded bit by bit with the radix-2 Booth table: the
// pair (y[i], y[i-1]), with y[-1] = 0, gives digit 0 for 00 and 11, +1 for
// 01 and -1 for 10. Partial product i is digit_i * x, sign-extended to 2W
// bits and shifted left by i; the W partial products are summed. Operands
// and product are two's complement. Recoding and summing follow the Booth
// algorithm named by the specification; signed operands, the width and the
// port names are this design's choice.
//
// Interface: x, y (W bits, signed) -> p (2W bits, signed).
// Timing: purely combinational, no clock.
module booth_radix2_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]   x,
  input  logic signed [W-1:0]   y,
  output logic signed [2*W-1:0] p
);
  logic signed [2*W-1:0] xe;      // x sign-extended to product width
  logic        [W:0]     ye;      // {y, 0}: y with the appended zero bit
  logic signed [2*W-1:0] pp [W];  // recoded, shifted partial products

  assign xe = (2*W)'(x);
  assign ye = {y, 1'b0};

  always_comb begin
    for (int i = 0; i < W; i++) begin
      unique case (ye[i+1 -: 2])
        2'b01:   pp[i] = xe <<< i;
        2'b10:   pp[i] = (-xe) <<< i;
        default: pp[i] = '0;
      endcase
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < W; i++) p = p + pp[i];
  end
endmodule
