// array_multiplier: unsigned W x W array multiplier (ALU select code 3).
//
// Partial product j is the multiplicand ANDed with multiplier bit y[j]: the
// multiplicand when that bit is one, zero when it is zero. The partial
// products are summed row by row with ripple carry adders built from full
// adder cells: row j adds partial product j to the upper W bits of the
// running sum left by row j-1 (with that row's carry out as its top bit).
// The lowest bit of each row is a final product bit. For W = 4 this is a
// grid of 16 AND terms and 3 rows of 4 full adders. The AND-and-ripple
// structure follows the specification; the exact row arrangement is this
// design's.
//
// Interface: x, y (W bits, unsigned) -> p (2W bits, unsigned).
// Timing: purely combinational, no clock.
module array_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] p
);
  // Partial products (bitwise AND).
  logic [W-1:0] pp [W];
  for (genvar j = 0; j < W; j++) begin : g_pp
    assign pp[j] = x & {W{y[j]}};
  end

  // acc[j] is the (W+1)-bit result of row j: carry out and W sum bits.
  logic [W:0] acc [W];
  assign acc[0] = {1'b0, pp[0]};
  assign p[0]   = acc[0][0];

  for (genvar j = 1; j < W; j++) begin : g_row
    logic [W:0] c;
    assign c[0] = 1'b0;
    for (genvar i = 0; i < W; i++) begin : g_col
      full_adder u_fa (
        .a (acc[j-1][i+1]),
        .b (pp[j][i]),
        .ci(c[i]),
        .s (acc[j][i]),
        .co(c[i+1])
      );
    end
    assign acc[j][W] = c[W];
    assign p[j]      = acc[j][0];
  end

  assign p[2*W-1:W] = acc[W-1][W:1];
endmodule
