// vedic_mul2: 2x2 unsigned multiplier in the Urdhva-Tiryagbhyam
// ("vertically and crosswise") form: four AND gates make the vertical
// (a0b0, a1b1) and crosswise (a1b0, a0b1) products, and two half adders
// sum the columns. p = a * b. It is the leaf of the recursive Vedic
// multiplier. Combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;
  assign p[0] = a[0] & b[0];
  half_adder u_ha0 (.a(a[1] & b[0]), .b(a[0] & b[1]), .sum(p[1]), .cout(c1));
  half_adder u_ha1 (.a(a[1] & b[1]), .b(c1),          .sum(p[2]), .cout(p[3]));
endmodule
