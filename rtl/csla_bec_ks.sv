// csla_bec_ks: WIDTH-bit (default 8) modified carry select adder, the
// fastest of the design's 8-bit adders. Kogge-Stone prefix adders replace
// the ripple carry adders: the low half adds with cin; the high half adds
// once with carry-in 0, and a binary to excess-1 converter (bec) forms the
// carry-in-1 result as that sum plus one instead of a second adder. The low
// half's carry-out selects between the two through 2:1 multiplexers. The
// split into two halves is this design's choice. Combinational.
module csla_bec_ks #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int L = WIDTH / 2;
  localparam int H = WIDTH - L;
  logic         c_lo, c0;
  logic [H-1:0] s0;
  logic [H:0]   r1;

  kogge_stone_adder #(.WIDTH(L)) u_lo (
    .a(a[L-1:0]), .b(b[L-1:0]), .cin(cin), .sum(sum[L-1:0]), .cout(c_lo));
  kogge_stone_adder #(.WIDTH(H)) u_hi (
    .a(a[WIDTH-1:L]), .b(b[WIDTH-1:L]), .cin(1'b0), .sum(s0), .cout(c0));
  bec #(.WIDTH(H+1)) u_bec (.x({c0, s0}), .y(r1));

  assign {cout, sum[WIDTH-1:L]} = c_lo ? r1 : {c0, s0};
endmodule
