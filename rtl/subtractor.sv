// subtractor: WIDTH-bit unsigned subtractor, diff = a - b (mod 2^WIDTH).
// It is a ripple chain of full adder cells adding a, the inverted b and a
// carry-in of 1 (two's complement). borrow = 1 when a < b, the inverse of
// the chain's carry-out. Combinational.
module subtractor
  import alu_pkg::*;
#(
  parameter int        WIDTH = 32,
  parameter fa_style_e STYLE = FA_MUX
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] diff,
  output logic             borrow
);
  logic cout;
  rca #(.WIDTH(WIDTH), .STYLE(STYLE)) u_rca (
    .a(a), .b(~b), .cin(1'b1), .sum(diff), .cout(cout));
  assign borrow = ~cout;
endmodule
