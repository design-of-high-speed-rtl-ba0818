// full_adder: one-bit full adder cell, the building block of every ripple,
// increment and bypass adder in this design.
// STYLE = FA_CONV is the conventional cell: two XORs form the sum and the
// carry is the majority of the three inputs. STYLE = FA_MUX is the modified
// cell with a single XOR: p = a ^ b drives two 2:1 multiplexers,
// sum = p ? ~cin : cin and cout = p ? cin : a. Both give the same function;
// the MUX form (the design's preferred cell) is the default. The exact MUX
// arrangement is this design's own reading of "one XOR plus multiplexers".
// Combinational, no clock.
module full_adder
  import alu_pkg::*;
#(
  parameter fa_style_e STYLE = FA_MUX
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  if (STYLE == FA_CONV) begin : g_conv
    assign sum  = (a ^ b) ^ cin;
    assign cout = (a & b) | (a & cin) | (b & cin);
  end else begin : g_mux
    logic p;
    assign p    = a ^ b;
    assign sum  = p ? ~cin : cin;
    assign cout = p ? cin : a;
  end
endmodule
