// tb_booth_radix2_multiplier: exhaustive self-check of the signed radix-2
// Booth multiplier at W = 4 and W = 8, including the worked example
// 18 * -15 = -270. The reference is the signed integer product.
module tb_booth_radix2_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [3:0]  x4, y4;
  logic signed [7:0]  p4;
  logic signed [7:0]  x8, y8;
  logic signed [15:0] p8;

  booth_radix2_multiplier #(.W(4)) dut4 (.x(x4), .y(y4), .p(p4));
  booth_radix2_multiplier #(.W(8)) dut8 (.x(x8), .y(y8), .p(p8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x8 = 8'sd18; y8 = -8'sd15;
    #1;
    checks++;
    if (p8 !== -16'sd270) begin
      failures++;
      $display("FAIL 18*-15 got %0d", p8);
    end
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++) begin
        x4 = 4'(a); y4 = 4'(b);
        #1;
        checks++;
        if (p4 !== 8'(a * b)) begin
          failures++;
          $display("FAIL W=4 %0d*%0d got %0d", a, b, p4);
        end
      end
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
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
