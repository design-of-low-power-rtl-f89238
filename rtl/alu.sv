// alu: low-power, application-specific 8-bit ALU.
//
// The ALU holds several implementations of the same arithmetic function so
// that an application can use the one whose speed, area and power suit it:
// two adders (a binary ripple carry adder and a quaternary full adder
// chain) and five multipliers (array, radix-2 Booth, radix-4 Booth, Wallace
// tree and a conventional one), plus logical and bitwise operators. A 4-bit
// select line N picks the unit:
//
//    1 ripple carry adder  A + B + CIN -> {COUT, SUM}
//    2 quaternary adder    A + B + CIN -> {COUT, SUM}
//    3 array multiplier    X * Y (unsigned) -> Product
//    4 radix-2 Booth       X * Y (signed)   -> Product
//    5 radix-4 Booth       X * Y (signed)   -> Product
//    6 Wallace tree        X * Y (unsigned) -> Product
//    7 conventional        X * Y (unsigned) -> Product
//    8 X || Y   9 X && Y   13 !X            -> LOGICOP (bit 0)
//   10 X | Y   11 X & Y    12 X ^ Y   14 ~X -> LOGICOP
//    0, 15 no operation
//
// Codes 1 to 12 and the split into adder operands (A, B, CIN) and
// multiplier/logic operands (X, Y) with separate SUM/COUT, Product and
// LOGICOP outputs follow the specification; codes 13 and 14 for the two
// NOT operations are this design's. Only the selected unit sees its
// operands: every other unit's inputs are held at zero (operand isolation),
// so the unselected units do not switch, and an output group that does not
// belong to the selected unit reads zero. The isolation is this design's
// way of having only the chosen unit active.
//
// Timing: purely combinational, no clock and no state; results are valid
// one combinational delay after N and the operands settle.
module alu
  import alu_pkg::*;
#(
  parameter int unsigned W = ALU_W
) (
  input  logic [3:0]     N,
  input  logic [W-1:0]   A,
  input  logic [W-1:0]   B,
  input  logic           CIN,
  input  logic [W-1:0]   X,
  input  logic [W-1:0]   Y,
  output logic [W-1:0]   SUM,
  output logic           COUT,
  output logic [2*W-1:0] Product,
  output logic [W-1:0]   LOGICOP
);
  alu_op_e op;
  assign op = alu_op_e'(N);

  // ---------------------------------------------------------------- decode
  logic      rca_en, qfa_en, mul_en, log_en, bit_en;
  mul_kind_e mul_sel;
  log_op_e   log_op;
  bit_op_e   bit_op;

  always_comb begin
    rca_en  = 1'b0;
    qfa_en  = 1'b0;
    mul_en  = 1'b0;
    log_en  = 1'b0;
    bit_en  = 1'b0;
    mul_sel = MUL_ARRAY;
    log_op  = LOG_OR;
    bit_op  = BIT_OR;
    unique case (op)
      OP_ADD_RCA:     rca_en = 1'b1;
      OP_ADD_QFA:     qfa_en = 1'b1;
      OP_MUL_ARRAY:   begin mul_en = 1'b1; mul_sel = MUL_ARRAY;   end
      OP_MUL_RADIX2:  begin mul_en = 1'b1; mul_sel = MUL_RADIX2;  end
      OP_MUL_RADIX4:  begin mul_en = 1'b1; mul_sel = MUL_RADIX4;  end
      OP_MUL_WALLACE: begin mul_en = 1'b1; mul_sel = MUL_WALLACE; end
      OP_MUL_SIMPLE:  begin mul_en = 1'b1; mul_sel = MUL_SIMPLE;  end
      OP_LOG_OR:      begin log_en = 1'b1; log_op  = LOG_OR;      end
      OP_LOG_AND:     begin log_en = 1'b1; log_op  = LOG_AND;     end
      OP_LOG_NOT:     begin log_en = 1'b1; log_op  = LOG_NOT;     end
      OP_BIT_OR:      begin bit_en = 1'b1; bit_op  = BIT_OR;      end
      OP_BIT_AND:     begin bit_en = 1'b1; bit_op  = BIT_AND;     end
      OP_BIT_XOR:     begin bit_en = 1'b1; bit_op  = BIT_XOR;     end
      OP_BIT_NOT:     begin bit_en = 1'b1; bit_op  = BIT_NOT;     end
      default:        ;   // OP_NONE, OP_RESERVED: everything idle
    endcase
  end

  // ---------------------------------------------------------------- adders
  logic [W-1:0] rca_a, rca_b, rca_sum, qfa_a, qfa_b, qfa_sum;
  logic         rca_ci, rca_co, qfa_ci, qfa_co;

  assign rca_a  = A & {W{rca_en}};
  assign rca_b  = B & {W{rca_en}};
  assign rca_ci = CIN & rca_en;
  assign qfa_a  = A & {W{qfa_en}};
  assign qfa_b  = B & {W{qfa_en}};
  assign qfa_ci = CIN & qfa_en;

  ripple_carry_adder #(.W(W)) u_rca (
    .a(rca_a), .b(rca_b), .cin(rca_ci), .sum(rca_sum), .cout(rca_co)
  );

  qfa_adder #(.W(W)) u_qfa (
    .a(qfa_a), .b(qfa_b), .cin(qfa_ci), .sum(qfa_sum), .cout(qfa_co)
  );

  // Isolated adders give zero, so OR-ing selects the active one.
  assign SUM  = rca_sum | qfa_sum;
  assign COUT = rca_co | qfa_co;

  // ----------------------------------------------------------- multipliers
  mul_bank #(.W(W)) u_mul (
    .x(X), .y(Y), .sel(mul_sel), .en(mul_en), .p(Product)
  );

  // ------------------------------------------------- logical and bitwise
  logic [W-1:0] log_x, log_y, log_r, bit_x, bit_y, bit_r;

  assign log_x = X & {W{log_en}};
  assign log_y = Y & {W{log_en}};
  assign bit_x = X & {W{bit_en}};
  assign bit_y = Y & {W{bit_en}};

  logical_unit #(.W(W)) u_log (
    .x(log_x), .y(log_y), .op(log_op), .r(log_r)
  );

  bitwise_unit #(.W(W)) u_bit (
    .x(bit_x), .y(bit_y), .op(bit_op), .r(bit_r)
  );

  // bitwise_unit gives ~0 for NOT of an isolated (zero) X, so gate its output.
  assign LOGICOP = (log_r & {W{log_en}}) | (bit_r & {W{bit_en}});
endmodule
