// tb_arith_unit: checks add (with carry), subtract (with borrow) and the
// 64-bit product of the 32-bit arithmetic unit against the simulator's
// arithmetic, on corner cases and 1000 random pairs per operation, and
// that the unused opcode gives 0.
module tb_arith_unit;
  import alu_pkg::*;
  logic [31:0] a, b;
  logic [63:0] y;
  logic flag;
  arith_op_e op;
  int checks = 0, failures = 0;
  arith_unit dut (.a(a), .b(b), .op(op), .y(y), .flag(flag));

  task automatic check(input int o, input logic [31:0] ta, input logic [31:0] tb_);
    logic [64:0] exp;
    a = ta; b = tb_; op = arith_op_e'(o);
    #1;
    case (o)
      0: exp = {32'd0, 1'b0, {1'b0, ta} + {1'b0, tb_}};
      1: exp = {32'd0, ta < tb_, ta - tb_};
      2: exp = {1'b0, 64'(ta) * 64'(tb_)};
      default: exp = '0;
    endcase
    // exp is {flag, y} for multiply, {y[63:33]=0, flag, y[31:0]} otherwise
    checks++;
    if (o == 2 || o == 3) begin
      if ({flag, y} !== exp) failures++;
    end else if (y !== {32'd0, exp[31:0]} || flag !== exp[32]) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h f=%b", o, ta, tb_, y, flag);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int o = 0; o < 4; o++) begin
      check(o, '1, '1); check(o, '1, 1); check(o, 0, 1); check(o, 20, 10);
      for (int i = 0; i < 1000; i++) check(o, $urandom(), $urandom());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
