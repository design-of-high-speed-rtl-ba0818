// kogge_stone_adder: WIDTH-bit parallel-prefix adder with a Kogge-Stone
// carry network: log2(WIDTH) levels, and at level k every position i >= 2^k
// combines its (g, p) pair with the pair 2^k positions below, so each
// level halves the remaining carry distance with minimum depth and the most
// wiring. The carry-in is folded into bit 0's generate; after the last
// level position i holds the carry out of bit i. The design names this
// adder (in its 32-bit multiplier and its fastest carry select adder); the
// network is the textbook one. Combinational.
module kogge_stone_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] g_l [LEVELS+1];
  logic [WIDTH-1:0] p_l [LEVELS+1];

  assign p = a ^ b;
  assign g_l[0] = {a[WIDTH-1:1] & b[WIDTH-1:1], (a[0] & b[0]) | (p[0] & cin)};
  assign p_l[0] = p;

  for (genvar k = 0; k < LEVELS; k++) begin : g_lvl
    localparam int D = 1 << k;
    for (genvar i = 0; i < WIDTH; i++) begin : g_pos
      if (i >= D) begin : g_cell
        assign g_l[k+1][i] = g_l[k][i] | (p_l[k][i] & g_l[k][i-D]);
        assign p_l[k+1][i] = p_l[k][i] & p_l[k][i-D];
      end else begin : g_pass
        assign g_l[k+1][i] = g_l[k][i];
        assign p_l[k+1][i] = p_l[k][i];
      end
    end
  end

  if (WIDTH > 1) begin : g_wide
    assign sum = p ^ {g_l[LEVELS][WIDTH-2:0], cin};
  end else begin : g_one
    assign sum = p ^ cin;
  end
  assign cout = g_l[LEVELS][WIDTH-1];
endmodule
