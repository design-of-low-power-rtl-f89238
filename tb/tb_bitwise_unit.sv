// tb_bitwise_unit: self-check of the bitwise unit. First the worked example
// X = 4'b1010, Y = 4'b1101 zero-extended to 8 bits (~X low nibble 0101,
// X & Y = 1000, X | Y = 1111, X ^ Y = 0111), then every operand pair at
// W = 8 against a bit-by-bit reference loop.
module tb_bitwise_unit;
  import alu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] x, y, r;
  bit_op_e    op;

  bitwise_unit #(.W(8)) dut (.x(x), .y(y), .op(op), .r(r));

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_r(input logic [7:0] exp, input string what);
    #1;
    checks++;
    if (r !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%b y=%b got %b expected %b", what, x, y, r, exp);
    end
  endtask

  initial begin
    x = 8'b0000_1010; y = 8'b0000_1101;
    op = BIT_NOT; expect_r(8'b1111_0101, "~X");
    op = BIT_AND; expect_r(8'b0000_1000, "X&Y");
    op = BIT_OR;  expect_r(8'b0000_1111, "X|Y");
    op = BIT_XOR; expect_r(8'b0000_0111, "X^Y");
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        logic [7:0] e_or, e_and, e_xor, e_not;
        x = 8'(a); y = 8'(b);
        for (int i = 0; i < 8; i++) begin
          e_or[i]  = (x[i] == 1'b1) || (y[i] == 1'b1);
          e_and[i] = (x[i] == 1'b1) && (y[i] == 1'b1);
          e_xor[i] = (x[i] != y[i]);
          e_not[i] = (x[i] == 1'b0);
        end
        op = BIT_OR;  expect_r(e_or, "or");
        op = BIT_AND; expect_r(e_and, "and");
        op = BIT_XOR; expect_r(e_xor, "xor");
        op = BIT_NOT; expect_r(e_not, "not");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
