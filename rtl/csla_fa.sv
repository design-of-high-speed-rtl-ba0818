// csla_fa: WIDTH-bit (default 8) carry select adder of full adder cells.
// The low half is a ripple carry adder fed with cin. The high half is
// computed twice in parallel by two ripple carry adders, one with carry-in
// 0 and one with carry-in 1, and the low half's carry-out selects one of
// the two results (sum bits and carry-out) through 2:1 multiplexers.
// The split into two halves is this design's choice. Combinational.
module csla_fa
  import alu_pkg::*;
#(
  parameter int        WIDTH = 8,
  parameter fa_style_e STYLE = FA_MUX
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int L = WIDTH / 2;
  localparam int H = WIDTH - L;
  logic         c_lo, c0, c1;
  logic [H-1:0] s0, s1;

  rca #(.WIDTH(L), .STYLE(STYLE)) u_lo (
    .a(a[L-1:0]), .b(b[L-1:0]), .cin(cin), .sum(sum[L-1:0]), .cout(c_lo));
  rca #(.WIDTH(H), .STYLE(STYLE)) u_hi0 (
    .a(a[WIDTH-1:L]), .b(b[WIDTH-1:L]), .cin(1'b0), .sum(s0), .cout(c0));
  rca #(.WIDTH(H), .STYLE(STYLE)) u_hi1 (
    .a(a[WIDTH-1:L]), .b(b[WIDTH-1:L]), .cin(1'b1), .sum(s1), .cout(c1));

  assign sum[WIDTH-1:L] = c_lo ? s1 : s0;
  assign cout           = c_lo ? c1 : c0;
endmodule
