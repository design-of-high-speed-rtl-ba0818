// tb_bs_lfsr: checks the 16-bit bit-swapping LFSR cycle by cycle against
// an independent model: a shift register with feedback from stages
// 16, 14, 13 and 11 (counted from 1), loaded with the seed on reset, whose
// output has the bit pairs (1,0)...(13,12) exchanged while the last stage
// is 0. It also checks that the enable holds the state, that the sequence
// has the maximal period 65535, and that both the swapped and the straight
// output occur.
module tb_bs_lfsr;
  logic clk = 1'b0, rst_n, en;
  logic [15:0] out;
  logic fb;
  logic [15:0] m;     // model state
  int checks = 0, failures = 0, swapped = 0, straight = 0;
  int period;

  bs_lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .out(out), .fb(fb));

  always #5 clk = ~clk;

  function automatic logic [15:0] model_out(input logic [15:0] s);
    logic [15:0] o = s;
    if (s[15] == 1'b0)
      for (int i = 0; i < 14; i += 2) begin o[i] = s[i+1]; o[i+1] = s[i]; end
    return o;
  endfunction

  function automatic logic model_fb(input logic [15:0] s);
    return s[15] ^ s[13] ^ s[12] ^ s[10];
  endfunction

  task automatic compare();
    checks++;
    if (out !== model_out(m) || fb !== model_fb(m)) begin
      failures++;
      if (failures < 10) $display("FAIL state %h out=%h exp %h", m, out, model_out(m));
    end
    if (m[15]) straight++; else swapped++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0;
    m = 16'hACE1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    // enable low: state must hold
    repeat (3) @(posedge clk);
    #1 compare();
    en = 1'b1;
    period = 0;
    do begin
      @(posedge clk);
      m = {m[14:0], model_fb(m)};
      period++;
      #1;
      if (period < 2000) compare();
    end while (m != 16'hACE1 && period < 70000);
    compare();
    checks++;
    if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    checks++;
    if (swapped == 0 || straight == 0) begin failures++; $display("FAIL swap %0d/%0d", swapped, straight); end
    $display("period=%0d swapped=%0d straight=%0d", period, swapped, straight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
