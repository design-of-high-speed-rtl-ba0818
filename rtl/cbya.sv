// cbya: carry bypass (carry skip) adder. The operands are cut into
// BLOCK-bit ripple carry groups. Each group also forms the AND of its
// propagate bits (a ^ b); when every bit propagates, the group's carry-out
// is taken straight from its carry-in through a 2:1 multiplexer, skipping
// the ripple chain; otherwise the ripple carry-out is used (which then does
// not depend on the carry-in). The design only names this adder; the
// skip structure is the standard one and the 8-bit group size, matching the
// carry increment adder, is this design's choice. Combinational. WIDTH must
// be a multiple of BLOCK.
module cbya
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
  logic [NB:0] c;
  assign c[0] = cin;
  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic rc;
    logic skip;
    rca #(.WIDTH(BLOCK), .STYLE(STYLE)) u_rca (
      .a(a[k*BLOCK +: BLOCK]), .b(b[k*BLOCK +: BLOCK]), .cin(c[k]),
      .sum(sum[k*BLOCK +: BLOCK]), .cout(rc));
    assign skip   = &(a[k*BLOCK +: BLOCK] ^ b[k*BLOCK +: BLOCK]);
    assign c[k+1] = skip ? c[k] : rc;
  end
  assign cout = c[NB];
endmodule
