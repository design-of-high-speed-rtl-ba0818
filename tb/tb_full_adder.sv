// tb_full_adder: exhaustive check of both full adder cell styles (the
// conventional two-XOR cell and the one-XOR MUX cell) against the truth
// table of a + b + cin, all eight input combinations each.
module tb_full_adder;
  import alu_pkg::*;
  logic a, b, cin;
  logic s_conv, c_conv, s_mux, c_mux;
  int checks = 0, failures = 0;

  full_adder #(.STYLE(FA_CONV)) dut_conv (.a(a), .b(b), .cin(cin), .sum(s_conv), .cout(c_conv));
  full_adder                    dut_mux  (.a(a), .b(b), .cin(cin), .sum(s_mux),  .cout(c_mux));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp;
      {a, b, cin} = 3'(v);
      #1;
      exp = 2'(v[2]) + 2'(v[1]) + 2'(v[0]);
      checks += 2;
      if ({c_conv, s_conv} !== exp) begin failures++; $display("FAIL conv v=%0d", v); end
      if ({c_mux, s_mux} !== exp)   begin failures++; $display("FAIL mux v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
