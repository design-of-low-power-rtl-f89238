// mul_bank: the ALU's multiplier selection, a bank of five W x W multipliers
// of which the select input picks one.
//
// All five multipliers (array, radix-2 Booth, radix-4 Booth, Wallace tree
// and conventional) are present side by side, so an application can pick
// the one whose delay, area and power suit it. To keep the unselected ones
// from switching, each multiplier's operands are forced to zero unless it
// is the selected one (operand isolation), and the product port takes the
// selected multiplier's result. Nothing is computed when en is low: all
// operands are held at zero and p reads zero. The two Booth multipliers
// treat x and y as signed two's complement, the other three as unsigned.
// Having all five multipliers selectable follows the specification; the
// operand isolation and the enable are this design's.
//
// Interface: x, y (W bits), sel (mul_kind_e), en -> p (2W bits).
// Timing: purely combinational, no clock.
module mul_bank
  import alu_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  input  mul_kind_e      sel,
  input  logic           en,
  output logic [2*W-1:0] p
);
  localparam int unsigned NK = 5;

  logic [NK-1:0]  act;            // one-hot: which multiplier is active
  logic [W-1:0]   xi [NK];        // isolated operands
  logic [W-1:0]   yi [NK];
  logic [2*W-1:0] pk [NK];        // each multiplier's product
  logic signed [2*W-1:0] r4_sums [W/2];

  always_comb begin
    act = '0;
    if (en) begin
      unique case (sel)
        MUL_ARRAY:   act[0] = 1'b1;
        MUL_RADIX2:  act[1] = 1'b1;
        MUL_RADIX4:  act[2] = 1'b1;
        MUL_WALLACE: act[3] = 1'b1;
        MUL_SIMPLE:  act[4] = 1'b1;
        default:     act    = '0;
      endcase
    end
  end

  for (genvar k = 0; k < NK; k++) begin : g_iso
    assign xi[k] = x & {W{act[k]}};
    assign yi[k] = y & {W{act[k]}};
  end

  array_multiplier #(.W(W)) u_array (
    .x(xi[0]), .y(yi[0]), .p(pk[0])
  );

  booth_radix2_multiplier #(.W(W)) u_radix2 (
    .x(xi[1]), .y(yi[1]), .p(pk[1])
  );

  booth_radix4_multiplier #(.W(W)) u_radix4 (
    .x(xi[2]), .y(yi[2]), .p(pk[2]), .partial_sum(r4_sums)
  );

  wallace_multiplier #(.W(W)) u_wallace (
    .x(xi[3]), .y(yi[3]), .p(pk[3])
  );

  simple_multiplier #(.W(W)) u_simple (
    .x(xi[4]), .y(yi[4]), .p(pk[4])
  );

  // Isolated multipliers output zero, so OR-ing the products selects one.
  always_comb begin
    p = '0;
    for (int k = 0; k < NK; k++) p = p | (pk[k] & {(2*W){act[k]}});
  end
endmodule
