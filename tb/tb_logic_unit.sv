// tb_logic_unit: checks all eight logical operations of the 32-bit logical
// unit on corner and random operands against the simulator's bitwise
// operators.
module tb_logic_unit;
  import alu_pkg::*;
  logic [31:0] a, b, y;
  logic_op_e op;
  int checks = 0, failures = 0;
  logic_unit dut (.a(a), .b(b), .op(op), .y(y));

  function automatic logic [31:0] model(input int o, input logic [31:0] x, input logic [31:0] z);
    case (o)
      0: return x & z;
      1: return x | z;
      2: return x ^ z;
      3: return ~(x & z);
      4: return ~(x | z);
      5: return ~(x ^ z);
      6: return ~x;
      default: return x;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++)
      for (int o = 0; o < 8; o++) begin
        a = (i == 0) ? 32'hF0F0_00FF : $urandom();
        b = (i == 0) ? 32'hFF00_0F0F : $urandom();
        op = logic_op_e'(o);
        #1;
        checks++;
        if (y !== model(o, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h", o, a, b, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
