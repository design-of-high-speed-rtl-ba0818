// lfsr_adder_bench: built-in test arrangement for 8-bit adders. A 16-bit
// bit-swapping LFSR (bs_lfsr) produces one pattern per enabled clock; its
// bits [7:0] and [15:8] are the two 8-bit addends and the LFSR's feedback
// bit is the carry-in. The same pattern drives the three adders the design
// compares as circuits under test: a ripple carry adder, a carry select
// adder of full adders and the carry select adder with BEC and Kogge-Stone
// adders. Each 9-bit result is {cout, sum}. Which LFSR signal serves as
// carry-in is this design's choice.
// Timing: the pattern changes at each clock edge with en high; the sums
// follow combinationally. rst_n is active-low, asynchronous.
module lfsr_adder_bench (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] pattern,
  output logic        cin,
  output logic [8:0]  sum_rca,
  output logic [8:0]  sum_csla,
  output logic [8:0]  sum_bec
);
  bs_lfsr #(.WIDTH(16)) u_tpg (
    .clk(clk), .rst_n(rst_n), .en(en), .out(pattern), .fb(cin));

  rca #(.WIDTH(8)) u_rca (
    .a(pattern[7:0]), .b(pattern[15:8]), .cin(cin),
    .sum(sum_rca[7:0]), .cout(sum_rca[8]));
  csla_fa #(.WIDTH(8)) u_csla (
    .a(pattern[7:0]), .b(pattern[15:8]), .cin(cin),
    .sum(sum_csla[7:0]), .cout(sum_csla[8]));
  csla_bec_ks #(.WIDTH(8)) u_bec (
    .a(pattern[7:0]), .b(pattern[15:8]), .cin(cin),
    .sum(sum_bec[7:0]), .cout(sum_bec[8]));
endmodule
