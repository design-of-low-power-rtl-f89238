// alu_pkg: widths and operation codes shared by the ALU and its units.
//
// The ALU is steered by a 4-bit select line N. Codes 1 to 12 are the ones
// the design is specified with (two adders, five multipliers, two logical
// and three bitwise operations). The specification also describes logical
// NOT and bitwise NOT without giving them a code; here they take codes 13
// and 14. Codes 0 and 15 select nothing and every result port reads zero.
package alu_pkg;

  // Operand width of the ALU (an 8-bit ALU).
  parameter int unsigned ALU_W = 8;

  // Top-level select codes, values 1..12 as specified, 13/14 chosen here.
  typedef enum logic [3:0] {
    OP_NONE        = 4'd0,
    OP_ADD_RCA     = 4'd1,   // conventional (ripple carry) adder
    OP_ADD_QFA     = 4'd2,   // quaternary full adder chain
    OP_MUL_ARRAY   = 4'd3,   // unsigned array multiplier
    OP_MUL_RADIX2  = 4'd4,   // signed radix-2 Booth multiplier
    OP_MUL_RADIX4  = 4'd5,   // signed radix-4 Booth multiplier
    OP_MUL_WALLACE = 4'd6,   // unsigned Wallace tree multiplier
    OP_MUL_SIMPLE  = 4'd7,   // unsigned conventional multiplier
    OP_LOG_OR      = 4'd8,   // X || Y
    OP_LOG_AND     = 4'd9,   // X && Y
    OP_BIT_OR      = 4'd10,  // X | Y
    OP_BIT_AND     = 4'd11,  // X & Y
    OP_BIT_XOR     = 4'd12,  // X ^ Y
    OP_LOG_NOT     = 4'd13,  // !X
    OP_BIT_NOT     = 4'd14,  // ~X
    OP_RESERVED    = 4'd15
  } alu_op_e;

  // Multiplier choice inside the multiplier bank.
  typedef enum logic [2:0] {
    MUL_ARRAY   = 3'd0,
    MUL_RADIX2  = 3'd1,
    MUL_RADIX4  = 3'd2,
    MUL_WALLACE = 3'd3,
    MUL_SIMPLE  = 3'd4
  } mul_kind_e;

  // Logical (1-bit result) operations.
  typedef enum logic [1:0] {
    LOG_OR  = 2'd0,
    LOG_AND = 2'd1,
    LOG_NOT = 2'd2
  } log_op_e;

  // Bitwise operations.
  typedef enum logic [1:0] {
    BIT_OR  = 2'd0,
    BIT_AND = 2'd1,
    BIT_XOR = 2'd2,
    BIT_NOT = 2'd3
  } bit_op_e;

endpackage
