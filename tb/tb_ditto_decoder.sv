// Self-checking test of the decoder: one instruction of every kind, with
// unit, registers, write enable, long-latency class, immediate and target
// compared with hand-derived values.
module tb_ditto_decoder;
  import ditto_pkg::*;
  word_t pc, inst;
  uop_t  uop;
  int checks = 0, failures = 0;

  ditto_decoder dut (.pc(pc), .inst(inst), .uop(uop));

  task automatic chk(string name, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("DEC %s got=%h exp=%h (inst=%h)", name, got, exp, inst);
    end
  endtask

  task automatic expect_uop(word_t i, fu_e fu, logic lng, logic we, reg_t dest, reg_t rs, reg_t rt,
                            logic use_imm, word_t imm);
    inst = i;
    #1;
    chk("fu", word_t'(uop.fu), word_t'(fu));
    chk("long", word_t'(uop.is_long), word_t'(lng));
    chk("we", word_t'(uop.we), word_t'(we));
    if (we) chk("dest", word_t'(uop.dest), word_t'(dest));
    chk("rs", word_t'(uop.rs), word_t'(rs));
    chk("rt", word_t'(uop.rt), word_t'(rt));
    chk("use_imm", word_t'(uop.use_imm), word_t'(use_imm));
    if (use_imm) chk("imm", uop.imm, imm);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 32'h0000_0100;
    expect_uop(enc_r(FN_ADDU, 3, 1, 2), FU_ALU, 0, 1, 3, 1, 2, 0, 0);
    chk("aluop", word_t'(uop.alu_op), word_t'(ALU_ADD));
    expect_uop(enc_r(FN_SUBU, 1, 1, 4), FU_ALU, 0, 1, 1, 1, 4, 0, 0);
    chk("aluop", word_t'(uop.alu_op), word_t'(ALU_SUB));
    expect_uop(enc_r(FN_SLT, 5, 6, 7), FU_ALU, 0, 1, 5, 6, 7, 0, 0);
    chk("aluop", word_t'(uop.alu_op), word_t'(ALU_SLT));
    expect_uop(enc_r(FN_MUL, 1, 2, 3), FU_MUL, 1, 1, 1, 2, 3, 0, 0);
    expect_uop(enc_r(FN_DIVU, 9, 2, 3), FU_DIV, 1, 1, 9, 2, 3, 0, 0);
    expect_uop(enc_r(FN_ADDU, 0, 1, 2), FU_ALU, 0, 0, 0, 1, 2, 0, 0);   // rd = 0: no write
    expect_uop(enc_i(OP_ADDIU, 4, 5, 16'hFFF0), FU_ALU, 0, 1, 4, 5, 0, 1, 32'hFFFF_FFF0);
    expect_uop(enc_i(OP_ORI, 4, 5, 16'h8001), FU_ALU, 0, 1, 4, 5, 0, 1, 32'h0000_8001);
    expect_uop(enc_i(OP_LUI, 8, 0, 16'h1234), FU_ALU, 0, 1, 8, 0, 0, 1, 32'h0000_1234);
    chk("aluop", word_t'(uop.alu_op), word_t'(ALU_LUI));
    expect_uop(enc_i(OP_LW, 3, 1, 16'd16), FU_LOAD, 1, 1, 3, 1, 0, 1, 32'd16);
    expect_uop(enc_i(OP_SW, 3, 1, 16'd8), FU_STORE, 1, 0, 0, 1, 3, 1, 32'd8);
    expect_uop(enc_i(OP_BNE, 5, 4, 16'hFFFC), FU_BRANCH, 0, 0, 0, 4, 5, 0, 0);
    chk("target", uop.target, 32'h0000_0104 - 32'd16);
    chk("aluop", word_t'(uop.alu_op), word_t'(ALU_NE));
    expect_uop(enc_i(OP_BEQ, 0, 0, 16'd3), FU_BRANCH, 0, 0, 0, 0, 0, 0, 0);
    chk("target", uop.target, 32'h0000_0104 + 32'd12);
    expect_uop(enc_j(26'h40), FU_JUMP, 0, 0, 0, 0, 0, 0, 0);
    chk("target", uop.target, 32'h0000_0100);
    expect_uop({OP_HALT, 26'd0}, FU_HALT, 0, 0, 0, 0, 0, 0, 0);
    expect_uop({6'h3A, 26'h155}, FU_ALU, 0, 0, 0, 0, 0, 0, 0);           // unknown: no-op
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
