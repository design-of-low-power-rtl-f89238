// tb_booth_radix4_multiplier: self-check of the signed radix-4 Booth
// multiplier. First the worked example x = 18, y = -15: the four running
// sums must be 18, 18, -270 and -270 and the product -270. Then every
// operand pair at W = 8 and W = 4 against the signed integer product.
module tb_booth_radix4_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [3:0]  x4, y4;
  logic signed [7:0]  p4;
  logic signed [7:0]  ps4 [2];
  logic signed [7:0]  x8, y8;
  logic signed [15:0] p8;
  logic signed [15:0] ps8 [4];

  booth_radix4_multiplier #(.W(4)) dut4 (.x(x4), .y(y4), .p(p4), .partial_sum(ps4));
  booth_radix4_multiplier #(.W(8)) dut8 (.x(x8), .y(y8), .p(p8), .partial_sum(ps8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: recoded digits +1, 0, -1, 0.
    int signed exp_ps [4];
    exp_ps = '{18, 18, -270, -270};
    x8 = 8'sd18; y8 = -8'sd15;
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (ps8[k] !== 16'(exp_ps[k])) begin
        failures++;
        $display("FAIL example running sum %0d: got %0d expected %0d", k, ps8[k], exp_ps[k]);
      end
    end
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
