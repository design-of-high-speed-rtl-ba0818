// tb_half_adder: exhaustive check of the half adder against a + b.
module tb_half_adder;
  logic a, b, sum, cout;
  int checks = 0, failures = 0;
  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(v[1]) + 2'(v[0])) begin failures++; $display("FAIL v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
