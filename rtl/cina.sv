// cina: carry increment adder. The operands are cut into BLOCK-bit groups
// (four groups of 8 for the default 32 bits). The lowest group is a ripple
// carry adder fed with the real carry-in. Every higher group is a ripple
// carry adder with carry-in 0, so all groups add at once; an
// increment_circuit per higher group then adds the carry of the group below
// to the temporary sum and ORs in the group's own carry. Only the half-adder
// increment chains ripple one after another. Layout follows the design's
// 32-bit, four-block arrangement. Combinational. WIDTH must be a multiple
// of BLOCK.
module cina
  import alu_pkg::*;
#(
  parameter int        WIDTH = 32,
  parameter int        BLOCK = 8,
  parameter fa_style_e STYLE = FA_MUX
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NB = WIDTH / BLOCK;
  logic [NB:0] c;   // carry into each block (c[1] is c1 of the first RCA)
  assign c[0] = cin;

  rca #(.WIDTH(BLOCK), .STYLE(STYLE)) u_rca0 (
    .a(a[BLOCK-1:0]), .b(b[BLOCK-1:0]), .cin(cin),
    .sum(sum[BLOCK-1:0]), .cout(c[1]));

  for (genvar k = 1; k < NB; k++) begin : g_blk
    logic [BLOCK-1:0] sum1;
    logic             cy;
    rca #(.WIDTH(BLOCK), .STYLE(STYLE)) u_rca (
      .a(a[k*BLOCK +: BLOCK]), .b(b[k*BLOCK +: BLOCK]), .cin(1'b0),
      .sum(sum1), .cout(cy));
    increment_circuit #(.WIDTH(BLOCK)) u_inc (
      .sum_in(sum1), .cy_blk(cy), .cin(c[k]),
      .sum(sum[k*BLOCK +: BLOCK]), .cout(c[k+1]));
  end
  assign cout = c[NB];
endmodule
