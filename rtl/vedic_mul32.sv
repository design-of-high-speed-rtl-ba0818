// vedic_mul32: 32x32 unsigned Vedic multiplier, p = a * b (64 bits).
// Four vedic_mul16 sub-multipliers form the vertical (lo*lo, hi*hi) and crosswise
// (hi*lo, lo*hi) products of the 16-bit operand halves, all at once, and
// vedic_combine merges them with a carry-save row and a 64-bit prefix
// adder (Brent-Kung unless ADDER selects Kogge-Stone).
// This is the multiplier of the 32-bit ALU. Its adders are described both
// as Brent-Kung and as Kogge-Stone; Brent-Kung is the default, and the
// ADDER parameter switches every level to Kogge-Stone.
// Combinational.
module vedic_mul32
  import alu_pkg::*;
#(
  parameter adder_kind_e ADDER = ADD_BRENT_KUNG
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);
  logic [31:0] ll, hl, lh, hh;

  vedic_mul16 #(.ADDER(ADDER)) u_ll (.a(a[15:0]), .b(b[15:0]), .p(ll));
  vedic_mul16 #(.ADDER(ADDER)) u_hl (.a(a[31:16]), .b(b[15:0]), .p(hl));
  vedic_mul16 #(.ADDER(ADDER)) u_lh (.a(a[15:0]), .b(b[31:16]), .p(lh));
  vedic_mul16 #(.ADDER(ADDER)) u_hh (.a(a[31:16]), .b(b[31:16]), .p(hh));

  vedic_combine #(.N(32), .ADDER(ADDER)) u_comb (
    .ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p));
endmodule
