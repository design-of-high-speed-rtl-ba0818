// bs_lfsr: bit-swapping LFSR test pattern generator.
// A WIDTH-bit (default 16) Fibonacci LFSR shifts towards its MSB each
// enabled clock, feeding back the XOR of its tap stages (x^16 + x^14 +
// x^13 + x^11 + 1, a maximal-length polynomial, for the default width).
// Its last stage, q[WIDTH-1], steers a row of 2:1 multiplexers: when it is
// 0, neighbouring output bits
// of the remaining WIDTH-1 stages are swapped pairwise (for 16 bits,
// pairs (1,0) to (13,12), with stage 14 left in place); when it is 1 they
// pass straight. Swapping keeps the pattern sequence but lowers the number
// of bit transitions between successive patterns, and so the switching
// power of the circuit under test. The generator, its width and the 2:1
// multiplexers are the design's; the polynomial, the swap rule and the
// seed are this design's choices.
// Timing: out and fb change at the clock edge where en is high; the
// active-low asynchronous reset rst_n loads SEED.
// Interface: fb is the feedback bit that will enter q[0] on the next shift.
module bs_lfsr #(
  parameter int               WIDTH = 16,
  parameter logic [WIDTH-1:0] SEED  = 16'hACE1,
  parameter logic [WIDTH-1:0] TAPS  = 16'b1011_0100_0000_0000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] out,
  output logic             fb
);
  logic [WIDTH-1:0] q;

  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= {q[WIDTH-2:0], fb};
  end

  // Swap network: pairs (2i+1, 2i) among q[WIDTH-2:0]; a leftover stage
  // (when WIDTH-1 is odd) and the selecting stage pass straight.
  always_comb begin
    out = q;
    if (!q[WIDTH-1]) begin
      for (int i = 0; i + 1 < WIDTH - 1; i = i + 2) begin
        out[i]   = q[i+1];
        out[i+1] = q[i];
      end
    end
  end
endmodule
