// brent_kung_adder: WIDTH-bit parallel-prefix adder with a Brent-Kung
// carry network. Bit i forms generate g = a & b and propagate p = a ^ b;
// the carry-in is folded into bit 0's generate. An up-sweep combines
// (g, p) pairs at distances 1, 2, 4, ... into every 2d-th position, and a
// down-sweep fills in the remaining positions, giving about 2*log2(WIDTH)
// levels with few prefix cells. The combine operator is
// (g, p) o (g', p') = (g | p & g', p & p'). After the network, position i
// holds the carry out of bit i, and sum = p ^ {carries, cin}.
// The network is the textbook Brent-Kung one; the design only names the
// adder. Combinational. WIDTH should be a power of two.
module brent_kung_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] p, gg, pp;

  assign p = a ^ b;

  always_comb begin
    gg = a & b;
    pp = p;
    gg[0] = gg[0] | (pp[0] & cin);
    // up-sweep
    for (int d = 1; d < WIDTH; d = d * 2) begin
      for (int i = 2 * d - 1; i < WIDTH; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    end
    // down-sweep
    for (int d = WIDTH / 4; d >= 1; d = d / 2) begin
      for (int i = 3 * d - 1; i < WIDTH; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    end
  end

  assign sum  = p ^ {gg[WIDTH-2:0], cin};
  assign cout = gg[WIDTH-1];
endmodule
