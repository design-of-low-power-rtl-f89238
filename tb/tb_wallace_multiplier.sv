// tb_wallace_multiplier: exhaustive self-check of the unsigned Wallace tree
// multiplier at W = 4 (the 4x4 size the comparison uses), W = 5 and W = 8,
// and a random check at W = 16. The
// reference is the integer product x * y.
module tb_wallace_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] x4, y4;
  logic [7:0] p4;
  logic [7:0] x8, y8;
  logic [15:0] p8;

  wallace_multiplier #(.W(4)) dut4 (.x(x4), .y(y4), .p(p4));
  wallace_multiplier #(.W(8)) dut8 (.x(x8), .y(y8), .p(p8));

  // A wider and an odd width exercise the elaborated tree layout.
  logic [15:0] x16, y16;
  logic [31:0] p16;
  logic [4:0]  x5, y5;
  logic [9:0]  p5;
  wallace_multiplier #(.W(16)) dut16 (.x(x16), .y(y16), .p(p16));
  wallace_multiplier #(.W(5))  dut5  (.x(x5), .y(y5), .p(p5));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        x5 = 5'(a); y5 = 5'(b);
        #1;
        checks++;
        if (p5 !== 10'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL W=5 %0d*%0d got %0d", a, b, p5);
        end
      end
    for (int n = 0; n < 5000; n++) begin
      longint unsigned e;
      x16 = 16'($urandom); y16 = 16'($urandom);
      if (n == 0) begin x16 = '1; y16 = '1; end
      #1;
      e = longint'(x16) * longint'(y16);
      checks++;
      if (p16 !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 %0d*%0d got %0d", x16, y16, p16);
      end
    end
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
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        x5 = 5'(a); y5 = 5'(b);
        #1;
        checks++;
        if (p5 !== 10'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL W=5 %0d*%0d got %0d", a, b, p5);
        end
      end
    for (int n = 0; n < 5000; n++) begin
      longint unsigned e;
      x16 = 16'($urandom); y16 = 16'($urandom);
      if (n == 0) begin x16 = '1; y16 = '1; end
      #1;
      e = longint'(x16) * longint'(y16);
      checks++;
      if (p16 !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 %0d*%0d got %0d", x16, y16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
