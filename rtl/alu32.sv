// alu32: the WIDTH-bit (default 32) ALU built around the Vedic multiplier.
// The arithmetic unit (add, subtract, multiply) and the logical unit
// (AND, OR, XOR, NAND, NOR, XNOR, NOT, buffer) both see a and b; bit 3 of
// the 4-bit opcode (alu_op_e) picks which result drives y. y is 2*WIDTH
// bits so a product needs no second cycle; logical and add/subtract
// results sit in the low half with the high half 0. flag is the carry of
// ADD and the borrow of SUB, else 0. With the defaults the port count is
// 32 + 32 + 4 + 64 + 1 = 133 bits. The operation set is the design's; the
// opcode encoding and the flag output are this design's choices.
// Fully combinational: the result is valid one propagation delay after the
// inputs settle.
module alu32
  import alu_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  alu_op_e            op,
  output logic [2*WIDTH-1:0] y,
  output logic               flag
);
  logic [2*WIDTH-1:0] ar_y;
  logic               ar_flag;
  logic [WIDTH-1:0]   lg_y;

  arith_unit #(.WIDTH(WIDTH)) u_arith (
    .a(a), .b(b), .op(arith_op_e'(op[1:0])), .y(ar_y), .flag(ar_flag));
  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .a(a), .b(b), .op(logic_op_e'(op[2:0])), .y(lg_y));

  always_comb begin
    if (op[3]) begin
      y    = {{WIDTH{1'b0}}, lg_y};
      flag = 1'b0;
    end else begin
      y    = ar_y;
      flag = ar_flag;
    end
  end
endmodule
