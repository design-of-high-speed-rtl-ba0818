// alu_pkg: types shared by the Vedic ALU and its adders.
// fa_style_e picks the logic form of the full adder cell: the conventional
// two-XOR cell or the MUX-based cell with a single XOR (the modified cell the
// design prefers). adder_kind_e picks the prefix network used inside the
// Vedic multiplier. alu_op_e is the ALU opcode; its numeric encoding is this
// design's own choice, the operation set is the design's (add, subtract,
// multiply and eight logical operations).
package alu_pkg;
  typedef enum logic {FA_CONV = 1'b0, FA_MUX = 1'b1} fa_style_e;
  typedef enum logic {ADD_BRENT_KUNG = 1'b0, ADD_KOGGE_STONE = 1'b1} adder_kind_e;

  // Arithmetic unit operations.
  typedef enum logic [1:0] {AR_ADD = 2'd0, AR_SUB = 2'd1, AR_MUL = 2'd2} arith_op_e;

  // Logical unit operations.
  typedef enum logic [2:0] {
    LG_AND = 3'd0, LG_OR  = 3'd1, LG_XOR = 3'd2, LG_NAND = 3'd3,
    LG_NOR = 3'd4, LG_XNOR = 3'd5, LG_NOT = 3'd6, LG_BUF = 3'd7
  } logic_op_e;

  // ALU opcode: bit 3 selects the logical unit, bits 2:0 its operation;
  // with bit 3 clear, bits 1:0 select the arithmetic operation.
  typedef enum logic [3:0] {
    OP_ADD  = 4'h0, OP_SUB  = 4'h1, OP_MUL = 4'h2,
    OP_AND  = 4'h8, OP_OR   = 4'h9, OP_XOR = 4'hA, OP_NAND = 4'hB,
    OP_NOR  = 4'hC, OP_XNOR = 4'hD, OP_NOT = 4'hE, OP_BUF  = 4'hF
  } alu_op_e;
endpackage
