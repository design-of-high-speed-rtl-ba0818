// tb_subtractor: checks the 32-bit subtractor against a - b and the borrow
// flag against a < b, on corner cases and 3000 random pairs.
module tb_subtractor;
  localparam int W = 32;
  logic [W-1:0] a, b, diff;
  logic borrow;
  int checks = 0, failures = 0;
  subtractor dut (.a(a), .b(b), .diff(diff), .borrow(borrow));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    a = ta; b = tb_;
    #1;
    checks++;
    if (diff !== ta - tb_ || borrow !== (ta < tb_)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got %h/%b", ta, tb_, diff, borrow);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    check(0, 0); check(0, 1); check(1, 0); check('1, '1); check(5, 7); check('1, 0);
    for (int i = 0; i < 3000; i++) check($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
