// vedic_mul16: 16x16 unsigned Vedic multiplier, p = a * b (32 bits).
// Four vedic_mul8 sub-multipliers form the vertical (lo*lo, hi*hi) and crosswise
// (hi*lo, lo*hi) products of the 8-bit operand halves, all at once, and
// vedic_combine merges them with a carry-save row and a 32-bit prefix
// adder (Brent-Kung unless ADDER selects Kogge-Stone).
// Combinational.
module vedic_mul16
  import alu_pkg::*;
#(
  parameter adder_kind_e ADDER = ADD_BRENT_KUNG
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] ll, hl, lh, hh;

  vedic_mul8 #(.ADDER(ADDER)) u_ll (.a(a[7:0]), .b(b[7:0]), .p(ll));
  vedic_mul8 #(.ADDER(ADDER)) u_hl (.a(a[15:8]), .b(b[7:0]), .p(hl));
  vedic_mul8 #(.ADDER(ADDER)) u_lh (.a(a[7:0]), .b(b[15:8]), .p(lh));
  vedic_mul8 #(.ADDER(ADDER)) u_hh (.a(a[15:8]), .b(b[15:8]), .p(hh));

  vedic_combine #(.N(16), .ADDER(ADDER)) u_comb (
    .ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p));
endmodule
