// tb_lfsr_adder_bench: runs the LFSR adder test arrangement for 3000
// patterns. For each one it checks that all three 8-bit adders under test
// return pattern[7:0] + pattern[15:8] + cin, and that the patterns change
// every enabled clock and hold while en is low.
module tb_lfsr_adder_bench;
  logic clk = 1'b0, rst_n, en;
  logic [15:0] pattern, last;
  logic cin;
  logic [8:0] s_rca, s_csla, s_bec;
  int checks = 0, failures = 0, carries = 0;

  lfsr_adder_bench dut (.clk(clk), .rst_n(rst_n), .en(en), .pattern(pattern), .cin(cin),
                        .sum_rca(s_rca), .sum_csla(s_csla), .sum_bec(s_bec));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] exp;
    rst_n = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    last = pattern;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pattern !== last) begin failures++; $display("FAIL pattern moved with en low"); end
    en = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      #1;
      exp = 9'(pattern[7:0]) + 9'(pattern[15:8]) + 9'(cin);
      if (exp[8]) carries++;
      checks += 4;
      if (s_rca !== exp)  begin failures++; $display("FAIL rca %h", pattern); end
      if (s_csla !== exp) begin failures++; $display("FAIL csla %h", pattern); end
      if (s_bec !== exp)  begin failures++; $display("FAIL bec %h", pattern); end
      if (pattern === last) begin failures++; $display("FAIL pattern stuck"); end
      last = pattern;
    end
    checks++;
    if (carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
