// vedic_combine: the adder stage of one level of the Vedic multiplier.
// An N x N product is assembled from the four (N/2) x (N/2) products of the
// operand halves: the vertical ones lo*lo (ll) and hi*hi (hh) and the
// crosswise ones hi*lo (hl) and lo*hi (lh), as in Urdhva-Tiryagbhyam.
// p = {hh, ll} + (hl << N/2) + (lh << N/2). One row of 3:2 carry-save cells
// (the Wallace step) reduces the three 2N-bit terms to a sum and a carry
// vector, and a 2N-bit parallel-prefix adder adds them: Brent-Kung by
// default, Kogge-Stone with ADDER = ADD_KOGGE_STONE. The single carry-save
// row and the 2N-bit final adder are this design's reading of a "Vedic
// Wallace" multiplier. Combinational. N even, at least 4.
module vedic_combine
  import alu_pkg::*;
#(
  parameter int          N     = 32,
  parameter adder_kind_e ADDER = ADD_BRENT_KUNG
) (
  input  logic [N-1:0]   ll,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   hh,
  output logic [2*N-1:0] p
);
  localparam int H = N / 2;
  logic [2*N-1:0] x, y, z, s, c;
  logic           unused_cout;

  assign x = {hh, ll};
  assign y = {{H{1'b0}}, hl, {H{1'b0}}};
  assign z = {{H{1'b0}}, lh, {H{1'b0}}};

  // 3:2 carry-save row. The carry out of the top bit is dropped: the full
  // product always fits in 2N bits.
  assign s = x ^ y ^ z;
  assign c = {(x[2*N-2:0] & y[2*N-2:0]) | (x[2*N-2:0] & z[2*N-2:0])
              | (y[2*N-2:0] & z[2*N-2:0]), 1'b0};

  if (ADDER == ADD_KOGGE_STONE) begin : g_ks
    kogge_stone_adder #(.WIDTH(2*N)) u_add (
      .a(s), .b(c), .cin(1'b0), .sum(p), .cout(unused_cout));
  end else begin : g_bk
    brent_kung_adder #(.WIDTH(2*N)) u_add (
      .a(s), .b(c), .cin(1'b0), .sum(p), .cout(unused_cout));
  end
endmodule
