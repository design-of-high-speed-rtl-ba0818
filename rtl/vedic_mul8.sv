// vedic_mul8: 8x8 unsigned Vedic multiplier, p = a * b (16 bits).
// Four vedic_mul4 sub-multipliers form the vertical (lo*lo, hi*hi) and crosswise
// (hi*lo, lo*hi) products of the 4-bit operand halves, all at once, and
// vedic_combine merges them with a carry-save row and a 16-bit prefix
// adder (Brent-Kung unless ADDER selects Kogge-Stone).
// Combinational.
module vedic_mul8
  import alu_pkg::*;
#(
  parameter adder_kind_e ADDER = ADD_BRENT_KUNG
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);
  logic [7:0] ll, hl, lh, hh;

  vedic_mul4 #(.ADDER(ADDER)) u_ll (.a(a[3:0]), .b(b[3:0]), .p(ll));
  vedic_mul4 #(.ADDER(ADDER)) u_hl (.a(a[7:4]), .b(b[3:0]), .p(hl));
  vedic_mul4 #(.ADDER(ADDER)) u_lh (.a(a[3:0]), .b(b[7:4]), .p(lh));
  vedic_mul4 #(.ADDER(ADDER)) u_hh (.a(a[7:4]), .b(b[7:4]), .p(hh));

  vedic_combine #(.N(8), .ADDER(ADDER)) u_comb (
    .ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p));
endmodule
