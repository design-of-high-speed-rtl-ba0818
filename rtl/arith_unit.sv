// arith_unit: the ALU's arithmetic unit. Three units work in parallel on
// the same operands: a WIDTH-bit ripple carry adder of full adder cells
// (AR_ADD), a WIDTH-bit subtractor (AR_SUB) and the WIDTH x WIDTH Vedic
// multiplier (AR_MUL); op picks one result. y is 2*WIDTH bits wide so that
// the full product fits; for add and subtract the upper half is 0 and
// flag carries the adder's carry-out or the subtractor's borrow. An unused
// opcode gives y = 0, flag = 0. WIDTH may be 32 (the design's size), 16,
// 8 or 4, the sizes for which a Vedic multiplier level exists.
// Combinational.
module arith_unit
  import alu_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  arith_op_e          op,
  output logic [2*WIDTH-1:0] y,
  output logic               flag
);
  logic [WIDTH-1:0]   sum, diff;
  logic               cout, borrow;
  logic [2*WIDTH-1:0] prod;

  rca #(.WIDTH(WIDTH)) u_add (.a(a), .b(b), .cin(1'b0), .sum(sum), .cout(cout));
  subtractor #(.WIDTH(WIDTH)) u_sub (.a(a), .b(b), .diff(diff), .borrow(borrow));
  if (WIDTH == 32) begin : g_mul32
    vedic_mul32 u_mul (.a(a), .b(b), .p(prod));
  end else if (WIDTH == 16) begin : g_mul16
    vedic_mul16 u_mul (.a(a), .b(b), .p(prod));
  end else if (WIDTH == 8) begin : g_mul8
    vedic_mul8 u_mul (.a(a), .b(b), .p(prod));
  end else begin : g_mul4
    vedic_mul4 u_mul (.a(a[3:0]), .b(b[3:0]), .p(prod[7:0]));
    if (WIDTH > 4) begin : g_pad
      assign prod[2*WIDTH-1:8] = '0;
    end
  end

  always_comb begin
    y    = '0;
    flag = 1'b0;
    unique case (op)
      AR_ADD: begin y[WIDTH-1:0] = sum;  flag = cout;   end
      AR_SUB: begin y[WIDTH-1:0] = diff; flag = borrow; end
      AR_MUL: y = prod;
      default: ;
    endcase
  end
endmodule
