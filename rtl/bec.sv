// bec: WIDTH-bit binary to excess-1 converter, y = x + 1 (mod 2^WIDTH)
// without an adder: bit 0 is inverted and bit i flips when all bits below
// it are 1. It replaces the carry-in-1 adder of a carry select adder.
// Combinational.
module bec #(
  parameter int WIDTH = 5
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] ones;  // ones[i]: bits below i are all 1
  assign ones[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_ones
    assign ones[i] = ones[i-1] & x[i-1];
  end
  assign y = x ^ ones;
endmodule
