// vedic_mul4: 4x4 unsigned Vedic multiplier, p = a * b (8 bits).
// Four vedic_mul2 sub-multipliers form the vertical (lo*lo, hi*hi) and crosswise
// (hi*lo, lo*hi) products of the 2-bit operand halves, all at once, and
// vedic_combine merges them with a carry-save row and a 8-bit prefix
// adder (Brent-Kung unless ADDER selects Kogge-Stone).
// Combinational.
module vedic_mul4
  import alu_pkg::*;
#(
  parameter adder_kind_e ADDER = ADD_BRENT_KUNG
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] ll, hl, lh, hh;

  vedic_mul2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(ll));
  vedic_mul2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(hl));
  vedic_mul2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(lh));
  vedic_mul2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(hh));

  vedic_combine #(.N(4), .ADDER(ADDER)) u_comb (
    .ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p));
endmodule
