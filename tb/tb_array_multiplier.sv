// tb_array_multiplier: exhaustive self-check of the unsigned array
// multiplier at W = 4 (the 4x4 size the comparison uses) and W = 8. The
// reference is the integer product x * y.
module tb_array_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] x4, y4;
  logic [7:0] p4;
  logic [7:0] x8, y8;
  logic [15:0] p8;

  array_multiplier #(.W(4)) dut4 (.x(x4), .y(y4), .p(p4));
  array_multiplier #(.W(8)) dut8 (.x(x8), .y(y8), .p(p8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        x4 = 4'(a); y4 = 4'(b);
        #1;
        checks++;
        if (p4 !== 8'(a * b)) begin
          failures++;
          $display("FAIL W=4 %0d*%0d got %0d", a, b, p4);
        end
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b);
        #1;
        checks++;
        if (p8 !== 16'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 %0d*%0d got %0d", a, b, p8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
