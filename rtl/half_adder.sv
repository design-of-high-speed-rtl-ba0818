// half_adder: adds two bits. sum = a xor b, cout = a and b. Purely
// combinational. Used by the increment circuit of the carry increment adder
// and by the 2x2 Vedic multiplier.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
