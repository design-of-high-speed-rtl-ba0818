// increment_circuit: the correction stage of the carry increment adder.
// A block's ripple adder runs with carry-in 0 and produces a temporary sum
// (sum_in) and carry (cy_blk). When the carry from the previous stage (cin)
// arrives, a chain of half adders adds it to the temporary sum. The stage's
// carry-out is the OR of the half-adder chain's carry and the block's own
// carry; the two can never both be 1 because a + b <= 2^(2*WIDTH)-2 leaves
// the temporary sum below all-ones whenever cy_blk is 1. Combinational.
module increment_circuit #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] sum_in,
  input  logic             cy_blk,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_ha
    half_adder u_ha (.a(sum_in[i]), .b(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH] | cy_blk;
endmodule
