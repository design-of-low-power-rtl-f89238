// tb_logical_unit: self-check of the logical unit. First the worked example
// A = 2, B = 0 (A && B = 0, A || B = 1, !A = 0, !B = 1), then every operand
// pair at W = 8 for all three operations against a reference written with
// explicit zero tests.
module tb_logical_unit;
  import alu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] x, y, r;
  log_op_e    op;

  logical_unit #(.W(8)) dut (.x(x), .y(y), .op(op), .r(r));

  initial begin
    repeat (400000) @(posedge clk);
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
      if (failures < 10) $display("FAIL %s x=%0d y=%0d got %0d expected %0d", what, x, y, r, exp);
    end
  endtask

  initial begin
    x = 8'd2; y = 8'd0;
    op = LOG_AND; expect_r(8'd0, "2 && 0");
    op = LOG_OR;  expect_r(8'd1, "2 || 0");
    op = LOG_NOT; expect_r(8'd0, "!2");
    x = 8'd0;     expect_r(8'd1, "!0");
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        logic at, bt;
        x = 8'(a); y = 8'(b);
        at = (a != 0); bt = (b != 0);
        op = LOG_OR;  expect_r({7'd0, at || bt}, "or");
        op = LOG_AND; expect_r({7'd0, at && bt}, "and");
        op = LOG_NOT; expect_r({7'd0, !at}, "not");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
