// tb_alu32: checks every opcode of the 32-bit ALU (add, subtract, multiply
// and the eight logical operations) against a reference model written with
// the simulator's operators, on corner cases and 500 random pairs per
// opcode, including the 20 x 10 = 200 multiply example.
module tb_alu32;
  import alu_pkg::*;
  logic [31:0] a, b;
  logic [63:0] y;
  logic flag;
  alu_op_e op;
  int checks = 0, failures = 0;
  alu32 dut (.a(a), .b(b), .op(op), .y(y), .flag(flag));

  localparam alu_op_e OPS[11] = '{OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR,
                                  OP_NAND, OP_NOR, OP_XNOR, OP_NOT, OP_BUF};

  function automatic logic [64:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    logic [32:0] s;
    case (o)
      OP_ADD:  begin s = {1'b0, x} + {1'b0, z}; return {s[32], 32'd0, s[31:0]}; end
      OP_SUB:  return {x < z, 32'd0, x - z};
      OP_MUL:  return {1'b0, 64'(x) * 64'(z)};
      OP_AND:  return {33'd0, x & z};
      OP_OR:   return {33'd0, x | z};
      OP_XOR:  return {33'd0, x ^ z};
      OP_NAND: return {33'd0, ~(x & z)};
      OP_NOR:  return {33'd0, ~(x | z)};
      OP_XNOR: return {33'd0, ~(x ^ z)};
      OP_NOT:  return {33'd0, ~x};
      default: return {33'd0, x};
    endcase
  endfunction

  task automatic check(input alu_op_e o, input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_; op = o;
    #1;
    checks++;
    if ({flag, y} !== model(o, ta, tb_)) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h f=%b", o.name(), ta, tb_, y, flag);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    foreach (OPS[k]) begin
      check(OPS[k], 20, 10); check(OPS[k], '1, '1); check(OPS[k], 0, '1);
      for (int i = 0; i < 500; i++) check(OPS[k], $urandom(), $urandom());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
