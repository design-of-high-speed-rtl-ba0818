// tb_vedic_mul16: checks the 16x16 Vedic multiplier, with both
// Brent-Kung and Kogge-Stone final adders, against the simulator's own
// product: corner cases (0, 1, all ones, single high bits) and 3000 random operand pairs.
module tb_vedic_mul16;
  import alu_pkg::*;
  localparam int N = 16;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_bk, p_ks;
  int checks = 0, failures = 0;

  vedic_mul16                           dut_bk (.a(a), .b(b), .p(p_bk));
  vedic_mul16 #(.ADDER(ADD_KOGGE_STONE)) dut_ks (.a(a), .b(b), .p(p_ks));

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic [2*N-1:0] exp;
    a = ta; b = tb_;
    #1;
    exp = (2*N)'(ta) * (2*N)'(tb_);
    checks += 2;
    if (p_bk !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL bk %h*%h got %h exp %h", ta, tb_, p_bk, exp);
    end
    if (p_ks !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL ks %h*%h got %h exp %h", ta, tb_, p_ks, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    check('0, '0); check('1, '1); check('1, 1); check(1, '1); check('1, 0);
    check({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});


    for (int i = 0; i < 3000; i++) check(N'($urandom()), N'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
