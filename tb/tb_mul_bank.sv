// tb_mul_bank: self-check of the multiplier bank at W = 8. For random and
// corner operand pairs every selection must give its own product (signed
// for the two Booth multipliers, unsigned for the others); with en low the
// product must be zero. It also checks operand isolation: the inputs of
// every multiplier that is not selected must be held at zero.
module tb_mul_bank;
  import alu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  x, y;
  logic [15:0] p;
  mul_kind_e   sel;
  logic        en;

  mul_bank #(.W(8)) dut (.x(x), .y(y), .sel(sel), .en(en), .p(p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_p(mul_kind_e k, logic [7:0] a, logic [7:0] b);
    if (k == MUL_RADIX2 || k == MUL_RADIX4)
      return 16'($signed(a) * $signed(b));
    return 16'(int'(a) * int'(b));
  endfunction

  task automatic run(input logic [7:0] a, input logic [7:0] b);
    mul_kind_e kinds [5];
    kinds = '{MUL_ARRAY, MUL_RADIX2, MUL_RADIX4, MUL_WALLACE, MUL_SIMPLE};
    x = a; y = b;
    foreach (kinds[k]) begin
      sel = kinds[k]; en = 1'b1;
      #1;
      checks++;
      if (p !== ref_p(kinds[k], a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%s %0d*%0d got %0d", kinds[k].name(), a, b, p);
      end
      // Unselected multipliers see zero operands.
      for (int j = 0; j < 5; j++) begin
        if (j != k) begin
          checks++;
          if (dut.xi[j] !== 8'd0 || dut.yi[j] !== 8'd0) begin
            failures++;
            if (failures < 10) $display("FAIL isolation: unit %0d active with sel=%s", j, kinds[k].name());
          end
        end
      end
    end
    en = 1'b0;
    #1;
    checks++;
    if (p !== 16'd0) begin
      failures++;
      $display("FAIL en=0 gave %0d", p);
    end
  endtask

  initial begin
    run(8'd18, 8'hF1);          // 18 and -15
    run(8'hFF, 8'hFF);
    run(8'h80, 8'h80);
    run(8'h80, 8'h7F);
    run(8'd0, 8'd77);
    for (int n = 0; n < 2000; n++) run(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
