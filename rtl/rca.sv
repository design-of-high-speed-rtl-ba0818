// rca: WIDTH-bit ripple carry adder, a chain of full_adder cells in which
// each cell's carry-out is the next cell's carry-in. {cout, sum} = a + b + cin.
// Combinational; delay grows linearly with WIDTH. STYLE selects the full
// adder cell. Default WIDTH 32 as in the design's 32-bit adder comparison.
module rca
  import alu_pkg::*;
#(
  parameter int        WIDTH = 32,
  parameter fa_style_e STYLE = FA_MUX
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder #(.STYLE(STYLE)) u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
