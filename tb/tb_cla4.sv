// tb_cla4: self-checking testbench for cla4 at its default width (4 bits).
// Applies directed corner cases (zero, all ones, carry chains through the
// whole word, all-propagate words with both carry-in values) and then
// 3000 random operand pairs, and compares {cout, sum} with a + b + cin
// computed by the simulator's own arithmetic. A watchdog ends the run if it
// stalls.
module tb_cla4;
  localparam int W = 4;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b got %h expected %h", ta, tb_, tc, {cout, sum}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] r;
    for (int c = 0; c < 2; c++) begin
      check('0, '0, c[0]);
      check('1, '0, c[0]);
      check('1, '1, c[0]);
      check('1, W'(1), c[0]);
      check(W'(1), '1, c[0]);
      check({1'b0, {(W-1){1'b1}}}, W'(1), c[0]);
    end
    for (int i = 0; i < 200; i++) begin
      r = W'($urandom()) ^ (W'($urandom()) << (W > 32 ? 32 : 0));
      check(r, ~r, 1'b0);
      check(r, ~r, 1'b1);
    end
    for (int i = 0; i < 3000; i++) begin
      check(W'({$urandom(), $urandom()}), W'({$urandom(), $urandom()}), 1'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
