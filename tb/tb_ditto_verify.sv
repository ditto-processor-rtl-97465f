// Self-checking test of the verify logic: each way check 1 can fail
// (instruction code, long-latency class, branch target, source operands,
// missing operand entry) and check 2 for ALU, branch and memory clones, with
// the matching cases passing.
module tb_ditto_verify;
  import ditto_pkg::*;
  logic c1_valid, c2_valid, c1_err, c2_err;
  uop_t c1_uop;
  word_t c1_inst, c1_srca, c1_srcb, c2_value, c2_exp_result, c2_exp_addr;
  db_entry_t c1_main, c1_ops;
  fu_e c2_fu;
  int checks = 0, failures = 0;

  ditto_verify dut (.*);

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("VERIFY %s got %b exp %b", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      word_t inst, a, b, t;
      inst = $urandom; a = $urandom; b = $urandom; t = $urandom;
      // short ALU clone, everything equal
      c1_valid = 1; c1_uop = '0; c1_uop.fu = FU_ALU; c1_inst = inst;
      c1_srca = a; c1_srcb = b;
      c1_main = '{operands: 0, has_ops: 0, pc: 0, inst: inst, w0: 0, w1: 0};
      c1_ops = '0;
      #1 chk("alu ok", c1_err, 0);
      c1_inst = inst ^ (32'd1 << (n % 32));
      #1 chk("inst differs", c1_err, 1);
      c1_inst = inst; c1_valid = 0;
      #1 chk("not valid", c1_err, 0);
      c1_valid = 1;
      // branch target
      c1_uop.fu = FU_BRANCH; c1_uop.target = t; c1_main.w1 = t;
      #1 chk("target ok", c1_err, 0);
      c1_main.w1 = t + 4;
      #1 chk("target differs", c1_err, 1);
      // long-latency with operands
      c1_uop = '0; c1_uop.fu = FU_MUL; c1_uop.is_long = 1;
      c1_main = '{operands: 0, has_ops: 1, pc: 0, inst: inst, w0: 0, w1: 0};
      c1_ops  = '{operands: 1, has_ops: 0, pc: 0, inst: inst, w0: a, w1: b};
      #1 chk("long ok", c1_err, 0);
      c1_srca = a + 1;
      #1 chk("srca differs", c1_err, 1);
      c1_srca = a; c1_srcb = ~b;
      #1 chk("srcb differs", c1_err, 1);
      c1_srcb = b; c1_ops.operands = 0;
      #1 chk("operand entry missing", c1_err, 1);
      c1_ops.operands = 1; c1_main.has_ops = 0;
      #1 chk("class differs", c1_err, 1);
      // check 2
      c2_valid = 1; c2_exp_result = a; c2_exp_addr = b;
      c2_fu = FU_ALU; c2_value = a;
      #1 chk("c2 alu ok", c2_err, 0);
      c2_value = a ^ 32'h8000_0000;
      #1 chk("c2 alu differs", c2_err, 1);
      c2_fu = FU_BRANCH; c2_value = a;
      #1 chk("c2 branch ok", c2_err, 0);
      c2_fu = FU_LOAD; c2_value = b;
      #1 chk("c2 addr ok", c2_err, 0);
      c2_fu = FU_STORE; c2_value = a;
      #1 chk("c2 addr differs", c2_err, a != b);
      c2_fu = FU_MUL; c2_value = ~a;
      #1 chk("c2 skips long", c2_err, 0);
      c2_fu = FU_ALU; c2_valid = 0;
      #1 chk("c2 not valid", c2_err, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
