// cla_ripple: WIDTH-bit adder made of 4-bit carry look-ahead blocks (cla4)
// whose carries ripple from block to block: four blocks for the default 16
// bits. Look-ahead shortens the carry path inside each block, the ripple
// between blocks keeps the gate count low. WIDTH must be a multiple of 4
// (the design names 4-, 8- and 16-bit versions). Combinational.
module cla_ripple #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NB = WIDTH / 4;
  logic [NB:0] c;
  assign c[0] = cin;
  for (genvar k = 0; k < NB; k++) begin : g_cla
    cla4 u_cla (.a(a[4*k +: 4]), .b(b[4*k +: 4]), .cin(c[k]),
                .sum(sum[4*k +: 4]), .cout(c[k+1]));
  end
  assign cout = c[NB];
endmodule
