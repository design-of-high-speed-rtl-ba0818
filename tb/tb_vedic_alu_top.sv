// tb_vedic_alu_top: end-to-end test of the whole design at its default
// sizes. Three threads run side by side:
//  * the ALU executes every opcode on corner and random operands, checked
//    against a reference model;
//  * the four stand-alone adders (32-bit ripple, carry increment, carry
//    bypass; 16-bit rippled look-ahead) add the same operands, checked
//    against a + b + cin;
//  * the LFSR test arrangement runs for 3000 clocks with all three 8-bit
//    adders under test checked on every pattern.
// It counts how often each mechanism occurs (each ALU operation, adder
// carry-out, subtract borrow, a carry crossing a whole block of the
// increment adder, a bypassed block of the bypass adder, swapped and
// straight LFSR patterns) and counts a failure for any that never occurs.
module tb_vedic_alu_top;
  import alu_pkg::*;
  logic clk = 1'b0, rst_n;
  logic [31:0] alu_a, alu_b, add_a, add_b;
  alu_op_e alu_op;
  logic [63:0] alu_y;
  logic alu_flag, add_cin, tpg_en, tpg_cin;
  logic [32:0] rca_sum, cina_sum, cbya_sum;
  logic [16:0] cla_sum;
  logic [15:0] tpg_pattern;
  logic [8:0]  tpg_sum_rca, tpg_sum_csla, tpg_sum_bec;

  int checks = 0, failures = 0;
  int n_op[16];
  int n_add_carry = 0, n_sub_borrow = 0, n_inc_cross = 0, n_bypass = 0;
  int n_swapped = 0, n_straight = 0, n_cut_carry = 0;
  logic alu_done = 1'b0, add_done = 1'b0, tpg_done = 1'b0;

  vedic_alu_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [64:0] alu_model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    logic [32:0] s;
    case (o)
      OP_ADD:  begin s = {1'b0, x} + {1'b0, z}; return {s[32], 32'd0, s[31:0]}; end
      OP_SUB:  return {x < z, 32'd0, x - z};
      OP_MUL:  return {1'b0, 64'(x) * 64'(z)};
      OP_AND:  return {33'd0, x & z};
      OP_OR:   return {33'd0, x | z};
      OP_XOR:  return {33'd0, x ^ z};
      OP_NAND: return {33'd0, ~(x & z)};
      OP_NOR:  return {33'd0, ~(x | z)};
      OP_XNOR: return {33'd0, ~(x ^ z)};
      OP_NOT:  return {33'd0, ~x};
      default: return {33'd0, x};
    endcase
  endfunction

  localparam alu_op_e OPS[11] = '{OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR,
                                  OP_NAND, OP_NOR, OP_XNOR, OP_NOT, OP_BUF};

  // ALU thread: one operation per clock
  initial begin
    logic [64:0] exp;
    alu_op = OP_ADD; alu_a = '0; alu_b = '0;
    @(posedge rst_n);
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      alu_op = OPS[i % 11];
      alu_a  = (i < 11) ? 32'd20 : (i < 22) ? 32'hFFFF_FFFF : $urandom();
      alu_b  = (i < 11) ? 32'd10 : (i < 22) ? 32'hFFFF_FFFF : $urandom();
      #1;
      exp = alu_model(alu_op, alu_a, alu_b);
      checks++;
      if ({alu_flag, alu_y} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL alu %s %h %h -> %h", alu_op.name(), alu_a, alu_b, alu_y);
      end else begin
        n_op[alu_op]++;
        if (alu_op == OP_ADD && alu_flag) n_add_carry++;
        if (alu_op == OP_SUB && alu_flag) n_sub_borrow++;
      end
    end
    alu_done = 1'b1;
  end

  // Adder thread
  initial begin
    logic [32:0] exp;
    logic [16:0] exp16;
    logic [8:0]  c;
    add_a = '0; add_b = '0; add_cin = 1'b0;
    @(posedge rst_n);
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      add_cin = 1'($urandom());
      add_a   = $urandom();
      // every fourth vector is an all-propagate word, to exercise skips and
      // carries that cross whole blocks
      add_b   = (i % 4 == 0) ? ~add_a : $urandom();
      #1;
      exp   = {1'b0, add_a} + {1'b0, add_b} + 33'(add_cin);
      exp16 = {1'b0, add_a[15:0]} + {1'b0, add_b[15:0]} + 17'(add_cin);
      checks += 4;
      if (rca_sum  !== exp)   begin failures++; $display("FAIL rca %h %h", add_a, add_b); end
      if (cina_sum !== exp)   begin failures++; $display("FAIL cina %h %h", add_a, add_b); end
      if (cbya_sum !== exp)   begin failures++; $display("FAIL cbya %h %h", add_a, add_b); end
      if (cla_sum  !== exp16) begin failures++; $display("FAIL cla %h %h", add_a, add_b); end
      // carry into each 8-bit block, from the reference sum
      c[0] = add_cin;
      for (int k = 0; k < 4; k++) begin
        logic [8:0] t;
        t = 9'(add_a[8*k +: 8]) + 9'(add_b[8*k +: 8]) + 9'(c[k]);
        c[k+1] = t[8];
        if (k > 0 && c[k] && (add_a[8*k +: 8] + add_b[8*k +: 8]) == 8'hFF &&
            9'(add_a[8*k +: 8]) + 9'(add_b[8*k +: 8]) < 9'h100)
          n_inc_cross++;
        if ((add_a[8*k +: 8] ^ add_b[8*k +: 8]) == 8'hFF) n_bypass++;
      end
    end
    add_done = 1'b1;
  end

  // LFSR test arrangement thread
  initial begin
    logic [8:0] exp;
    tpg_en = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    tpg_en = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      #1;
      exp = 9'(tpg_pattern[7:0]) + 9'(tpg_pattern[15:8]) + 9'(tpg_cin);
      checks += 3;
      if (tpg_sum_rca  !== exp) begin failures++; $display("FAIL tpg rca"); end
      if (tpg_sum_csla !== exp) begin failures++; $display("FAIL tpg csla"); end
      if (tpg_sum_bec  !== exp) begin failures++; $display("FAIL tpg bec"); end
      if (exp[8]) n_cut_carry++;
      // the swap is visible in the output: with the last stage 0 the
      // pattern differs from the register in the swapped pairs
      if (tpg_pattern[15]) n_straight++; else n_swapped++;
    end
    tpg_done = 1'b1;
  end

  initial begin
    wait (alu_done && add_done && tpg_done);
    foreach (OPS[k]) begin
      checks++;
      if (n_op[OPS[k]] == 0) begin failures++; $display("FAIL never ran %s", OPS[k].name()); end
    end
    checks += 7;
    if (n_add_carry == 0)  begin failures++; $display("FAIL no ALU add carry"); end
    if (n_sub_borrow == 0) begin failures++; $display("FAIL no ALU borrow"); end
    if (n_inc_cross == 0)  begin failures++; $display("FAIL no carry across an increment block"); end
    if (n_bypass == 0)     begin failures++; $display("FAIL no bypassed block"); end
    if (n_swapped == 0)    begin failures++; $display("FAIL no swapped pattern"); end
    if (n_straight == 0)   begin failures++; $display("FAIL no straight pattern"); end
    if (n_cut_carry == 0)  begin failures++; $display("FAIL no 8-bit carry"); end
    $display("ops: each %0d; add carries %0d, borrows %0d, increment crossings %0d, bypasses %0d",
             n_op[OP_ADD], n_add_carry, n_sub_borrow, n_inc_cross, n_bypass);
    $display("LFSR: swapped %0d, straight %0d, 8-bit carries %0d", n_swapped, n_straight, n_cut_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
