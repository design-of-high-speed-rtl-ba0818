// tb_increment_circuit: checks the 8-bit increment stage of the carry
// increment adder. For every temporary sum with every incoming carry, and
// for the block carry values a real 8-bit block can produce alongside that
// sum, it expects sum = sum_in + cin and cout = carry of that addition OR
// the block carry.
module tb_increment_circuit;
  localparam int W = 8;
  logic [W-1:0] sum_in, sum;
  logic cy_blk, cin, cout;
  int checks = 0, failures = 0;

  increment_circuit #(.WIDTH(W)) dut (.sum_in(sum_in), .cy_blk(cy_blk), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < (1 << W); s++)
      for (int cy = 0; cy < 2; cy++)
        for (int c = 0; c < 2; c++) begin
          logic [W:0] exp;
          // a block's carry of 1 never comes with an all-ones temporary sum
          if (cy == 1 && s == (1 << W) - 1) continue;
          sum_in = W'(s); cy_blk = cy[0]; cin = c[0];
          #1;
          exp = {1'b0, W'(s)} + (W+1)'(c);
          exp[W] = exp[W] | cy[0];
          checks++;
          if ({cout, sum} !== exp) begin
            failures++;
            $display("FAIL s=%h cy=%0d c=%0d got %h exp %h", s, cy, c, {cout, sum}, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
