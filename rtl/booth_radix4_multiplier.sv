// booth_radix4_multiplier: signed radix-4 (modified) Booth multiplier
// (ALU select code 5).
//
// The multiplier y is recoded three bits at a time, the groups overlapping
// by one bit: group k is (y[2k+1], y[2k], y[2k-1]) with y[-1] = 0, and its
// digit is -2*y[2k+1] + y[2k] + y[2k-1], one of 0, +-1, +-2. Partial product
// k is digit_k * x, sign-extended to 2W bits and shifted left by 2k, so an
// 8-bit multiplier needs four partial products instead of eight.
// partial_sum[k] is the running sum after partial product k has been added;
// the last one is the product. For x = 18, y = -15 the digits are +1, 0, -1,
// 0 and the running sums 18, 18, -270, -270.
// The recoding follows the specification; signed operands, the width, the
// port names and the running-sum output are this design's.
//
// Interface: x, y (W bits, signed, W even) -> p (2W bits, signed),
//            partial_sum (W/2 running sums of 2W bits).
// Timing: purely combinational, no clock.
module booth_radix4_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]   x,
  input  logic signed [W-1:0]   y,
  output logic signed [2*W-1:0] p,
  output logic signed [2*W-1:0] partial_sum [W/2]
);
  localparam int unsigned G = W / 2;

  if (W % 2 != 0) begin : g_bad_width
    $error("booth_radix4_multiplier: W must be even");
  end

  logic signed [2*W-1:0] xe;      // x sign-extended to product width
  logic        [W:0]     ye;      // {y, 0}
  logic signed [2*W-1:0] pp [G];  // recoded, shifted partial products

  assign xe = (2*W)'(x);
  assign ye = {y, 1'b0};

  always_comb begin
    for (int k = 0; k < G; k++) begin
      unique case (ye[2*k+2 -: 3])
        3'b001, 3'b010: pp[k] = xe <<< (2*k);           // +1
        3'b011:         pp[k] = xe <<< (2*k+1);         // +2
        3'b100:         pp[k] = (-xe) <<< (2*k+1);      // -2
        3'b101, 3'b110: pp[k] = (-xe) <<< (2*k);        // -1
        default:        pp[k] = '0;                     // 000, 111
      endcase
    end
  end

  always_comb begin
    partial_sum[0] = pp[0];
    for (int k = 1; k < G; k++) partial_sum[k] = partial_sum[k-1] + pp[k];
  end

  assign p = partial_sum[G-1];
endmodule
