// logic_unit: the ALU's logical unit, bitwise on WIDTH-bit operands:
// AND, OR, XOR, NAND, NOR, XNOR, NOT (of a) and data buffer (passes a).
// op is a logic_op_e. Combinational.
module logic_unit
  import alu_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic_op_e        op,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (op)
      LG_AND:  y = a & b;
      LG_OR:   y = a | b;
      LG_XOR:  y = a ^ b;
      LG_NAND: y = ~(a & b);
      LG_NOR:  y = ~(a | b);
      LG_XNOR: y = ~(a ^ b);
      LG_NOT:  y = ~a;
      LG_BUF:  y = a;
    endcase
  end
endmodule
