// Self-checking test of the integer ALU: random operands for every function,
// compared with values computed here.
module tb_ditto_alu;
  import ditto_pkg::*;
  alu_op_e op;
  word_t a, b, y, exp;
  int checks = 0, failures = 0;

  ditto_alu dut (.op(op), .a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      op = alu_op_e'($urandom_range(0, 8));
      a  = $urandom;
      b  = (n % 7 == 0) ? a : $urandom;
      #1;
      case (op)
        ALU_ADD: exp = a + b;
        ALU_SUB: exp = a - b;
        ALU_AND: exp = a & b;
        ALU_OR:  exp = a | b;
        ALU_XOR: exp = a ^ b;
        ALU_SLT: exp = (int'(a) < int'(b)) ? 1 : 0;
        ALU_LUI: exp = b << 16;
        ALU_EQ:  exp = (a == b) ? 1 : 0;
        default: exp = (a != b) ? 1 : 0;
      endcase
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 5) $display("ALU op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
