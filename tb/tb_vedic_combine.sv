// tb_vedic_combine: checks the combine stage of a 32-bit Vedic level with
// both final adders: given four 32-bit half products (random, and all
// ones, as produced by real 16x16 operands), p must equal
// {hh, ll} + (hl << 16) + (lh << 16).
module tb_vedic_combine;
  import alu_pkg::*;
  localparam int N = 32;
  logic [N-1:0] ll, hl, lh, hh;
  logic [2*N-1:0] p_bk, p_ks;
  int checks = 0, failures = 0;

  vedic_combine                           dut_bk (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p_bk));
  vedic_combine #(.ADDER(ADD_KOGGE_STONE)) dut_ks (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p_ks));

  task automatic check(input logic [15:0] ah, input logic [15:0] al,
                       input logic [15:0] bh, input logic [15:0] bl);
    logic [2*N-1:0] exp;
    // the same products, independently of the stage's wiring
    ll = 32'(al) * 32'(bl); hl = 32'(ah) * 32'(bl);
    lh = 32'(al) * 32'(bh); hh = 32'(ah) * 32'(bh);
    #1;
    exp = 64'({ah, al}) * 64'({bh, bl});
    checks += 2;
    if (p_bk !== exp) begin failures++; if (failures < 10) $display("FAIL bk %h", exp); end
    if (p_ks !== exp) begin failures++; if (failures < 10) $display("FAIL ks %h", exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    check('1, '1, '1, '1); check(0, 0, 0, 0); check(16'h8000, 0, 16'h8000, 0);
    for (int i = 0; i < 3000; i++) check(16'($urandom()), 16'($urandom()), 16'($urandom()), 16'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
