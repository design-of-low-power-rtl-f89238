// tb_qfa_adder: exhaustive self-check of the quaternary (QFA) adder at
// W = 8 (every a, b and cin) and a random check at W = 4. The reference is
// the integer sum a + b + cin.
module tb_qfa_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] a8, b8, s8;
  logic       ci8, co8;
  logic [3:0] a4, b4, s4;
  logic       ci4, co4;

  qfa_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  qfa_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ref8, ref4;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(a); b8 = 8'(b); ci8 = 1'(c);
          #1;
          ref8 = a + b + c;
          checks++;
          if ({co8, s8} !== 9'(ref8)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d+%0d+%0d got %0d", a, b, c, {co8, s8});
          end
        end
    for (int n = 0; n < 200; n++) begin
      a4 = 4'($urandom); b4 = 4'($urandom); ci4 = 1'($urandom);
      #1;
      ref4 = a4 + b4 + ci4;
      checks++;
      if ({co4, s4} !== 5'(ref4)) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d got %0d", a4, b4, ci4, {co4, s4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
