// tb_alu: end-to-end self-check of the ALU at its default width (8 bits).
//
// For every select code 0..15 the ALU is driven with corner and random
// operands, and all four output groups are compared with a reference model
// written here from plain integer arithmetic: the selected group must hold
// the result, the other groups must read zero. It also counts how often each
// mechanism happened and fails if one never did: each of the 16 select codes,
// a carry out of each adder, a negative product from each Booth multiplier,
// and operand isolation (the units that are not selected see zero inputs).
// The worked examples 18 * -15 = -270 (radix-4 Booth), 2 && 0 / 2 || 0 and
// the 4-bit bitwise example are run as well.
module tb_alu;
  import alu_pkg::*;

  localparam int W = ALU_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]     N;
  logic [W-1:0]   A, B, X, Y;
  logic           CIN;
  logic [W-1:0]   SUM, LOGICOP;
  logic           COUT;
  logic [2*W-1:0] Product;

  alu dut (
    .N(N), .A(A), .B(B), .CIN(CIN), .X(X), .Y(Y),
    .SUM(SUM), .COUT(COUT), .Product(Product), .LOGICOP(LOGICOP)
  );

  // Mechanism counters.
  int n_code [16];
  int n_rca_carry = 0, n_qfa_carry = 0;
  int n_r2_neg = 0, n_r4_neg = 0;
  int n_isolated = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d A=%0d B=%0d CIN=%0d X=%0d Y=%0d: %s", N, A, B, CIN, X, Y, what);
    end
  endtask

  task automatic apply(input logic [3:0] n, input logic [W-1:0] a, input logic [W-1:0] b,
                       input logic ci, input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0]     e_add;
    logic [2*W-1:0] e_prod;
    logic [W-1:0]   e_log;
    logic           add_sel, mul_sel, log_sel;
    int             active_units;

    N = n; A = a; B = b; CIN = ci; X = x; Y = y;
    #1;
    n_code[n]++;

    e_add   = '0;
    e_prod  = '0;
    e_log   = '0;
    add_sel = (n == 1 || n == 2);
    mul_sel = (n >= 3 && n <= 7);
    log_sel = (n >= 8 && n <= 14);
    if (add_sel) e_add = (W+1)'(int'(a) + int'(b) + int'(ci));
    case (n)
      3, 6, 7: e_prod = (2*W)'(int'(x) * int'(y));
      4, 5:    e_prod = (2*W)'(int'($signed(x)) * int'($signed(y)));
      8:       e_log  = W'((x != 0) || (y != 0));
      9:       e_log  = W'((x != 0) && (y != 0));
      10:      e_log  = x | y;
      11:      e_log  = x & y;
      12:      e_log  = x ^ y;
      13:      e_log  = W'(x == 0);
      14:      e_log  = ~x;
      default: ;
    endcase

    check({COUT, SUM} === e_add, "adder output");
    check(Product === e_prod, "product output");
    check(LOGICOP === e_log, "logic output");

    if (n == 1 && COUT) n_rca_carry++;
    if (n == 2 && COUT) n_qfa_carry++;
    if (n == 4 && Product[2*W-1]) n_r2_neg++;
    if (n == 5 && Product[2*W-1]) n_r4_neg++;

    // Operand isolation: count units whose operands are not all zero.
    active_units = 0;
    if (dut.rca_a != 0 || dut.rca_b != 0 || dut.rca_ci) active_units++;
    if (dut.qfa_a != 0 || dut.qfa_b != 0 || dut.qfa_ci) active_units++;
    for (int k = 0; k < 5; k++)
      if (dut.u_mul.xi[k] != 0 || dut.u_mul.yi[k] != 0) active_units++;
    if (dut.log_x != 0 || dut.log_y != 0) active_units++;
    if (dut.bit_x != 0 || dut.bit_y != 0) active_units++;
    check(active_units <= 1, "more than one unit sees operands");
    if ((n == 0 || n == 15) && (a != 0 || x != 0)) begin
      check(active_units == 0, "idle code leaves a unit active");
    end
    if (active_units == 1 && (a != 0 || b != 0 || x != 0 || y != 0)) n_isolated++;
  endtask

  initial begin
    // Worked examples.
    apply(4'd5, '0, '0, 1'b0, W'(18), W'(-15));
    check($signed(Product) === -(2*W)'(270), "18 * -15 = -270");
    apply(4'd9,  '0, '0, 1'b0, W'(2), W'(0));
    check(LOGICOP === W'(0), "2 && 0 = 0");
    apply(4'd8,  '0, '0, 1'b0, W'(2), W'(0));
    check(LOGICOP === W'(1), "2 || 0 = 1");
    apply(4'd13, '0, '0, 1'b0, W'(2), W'(0));
    check(LOGICOP === W'(0), "!2 = 0");
    apply(4'd13, '0, '0, 1'b0, W'(0), W'(2));
    check(LOGICOP === W'(1), "!0 = 1");
    apply(4'd11, '0, '0, 1'b0, W'(4'b1010), W'(4'b1101));
    check(LOGICOP[3:0] === 4'b1000, "1010 & 1101");
    apply(4'd10, '0, '0, 1'b0, W'(4'b1010), W'(4'b1101));
    check(LOGICOP[3:0] === 4'b1111, "1010 | 1101");
    apply(4'd12, '0, '0, 1'b0, W'(4'b1010), W'(4'b1101));
    check(LOGICOP[3:0] === 4'b0111, "1010 ^ 1101");
    apply(4'd14, '0, '0, 1'b0, W'(4'b1010), W'(4'b1101));
    check(LOGICOP[3:0] === 4'b0101, "~1010");

    // Corners and random operands on every code.
    for (int n = 0; n < 16; n++) begin
      apply(4'(n), '1, '1, 1'b1, '1, '1);
      apply(4'(n), '0, '0, 1'b0, '0, '0);
      apply(4'(n), W'(1) << (W-1), W'(1) << (W-1), 1'b0, W'(1) << (W-1), W'(1) << (W-1));
      for (int r = 0; r < 2000; r++)
        apply(4'(n), W'($urandom), W'($urandom), 1'($urandom), W'($urandom), W'($urandom));
    end

    for (int n = 0; n < 16; n++) check(n_code[n] > 0, $sformatf("code %0d never used", n));
    check(n_rca_carry > 0, "ripple carry adder never carried out");
    check(n_qfa_carry > 0, "QFA adder never carried out");
    check(n_r2_neg > 0, "radix-2 product never negative");
    check(n_r4_neg > 0, "radix-4 product never negative");
    check(n_isolated > 0, "operand isolation never observed");
    $display("mechanisms: rca_carry=%0d qfa_carry=%0d r2_neg=%0d r4_neg=%0d isolated=%0d",
             n_rca_carry, n_qfa_carry, n_r2_neg, n_r4_neg, n_isolated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
