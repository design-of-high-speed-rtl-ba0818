// vedic_alu_top: the whole design. Three independent parts stand side by
// side, each with its own ports:
//  * the 32-bit Vedic ALU (alu32): add, subtract, 32x32 Vedic multiply and
//    eight logical operations, combinational, 64-bit result;
//  * the 32-bit adders the design compares, all on the same operands:
//    ripple carry (rca), carry increment (cina), carry bypass (cbya), and
//    the 16-bit adder of rippled 4-bit look-ahead blocks (cla_ripple), which
//    adds the low 16 bits;
//  * the bit-swapping-LFSR test arrangement for 8-bit adders
//    (lfsr_adder_bench), the only clocked part.
// Sharing the adder operands among the four adders is this design's choice.
module vedic_alu_top
  import alu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // ALU
  input  logic [31:0] alu_a,
  input  logic [31:0] alu_b,
  input  alu_op_e     alu_op,
  output logic [63:0] alu_y,
  output logic        alu_flag,
  // 32-bit adders
  input  logic [31:0] add_a,
  input  logic [31:0] add_b,
  input  logic        add_cin,
  output logic [32:0] rca_sum,
  output logic [32:0] cina_sum,
  output logic [32:0] cbya_sum,
  output logic [16:0] cla_sum,
  // LFSR test arrangement
  input  logic        tpg_en,
  output logic [15:0] tpg_pattern,
  output logic        tpg_cin,
  output logic [8:0]  tpg_sum_rca,
  output logic [8:0]  tpg_sum_csla,
  output logic [8:0]  tpg_sum_bec
);
  alu32 #(.WIDTH(32)) u_alu (
    .a(alu_a), .b(alu_b), .op(alu_op), .y(alu_y), .flag(alu_flag));

  rca #(.WIDTH(32)) u_rca (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(rca_sum[31:0]), .cout(rca_sum[32]));
  cina #(.WIDTH(32), .BLOCK(8)) u_cina (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(cina_sum[31:0]), .cout(cina_sum[32]));
  cbya #(.WIDTH(32), .BLOCK(8)) u_cbya (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(cbya_sum[31:0]), .cout(cbya_sum[32]));
  cla_ripple #(.WIDTH(16)) u_cla (
    .a(add_a[15:0]), .b(add_b[15:0]), .cin(add_cin),
    .sum(cla_sum[15:0]), .cout(cla_sum[16]));

  lfsr_adder_bench u_bench (
    .clk(clk), .rst_n(rst_n), .en(tpg_en), .pattern(tpg_pattern), .cin(tpg_cin),
    .sum_rca(tpg_sum_rca), .sum_csla(tpg_sum_csla), .sum_bec(tpg_sum_bec));
endmodule
