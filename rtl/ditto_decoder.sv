// Instruction decoder of the Ditto core.
//
// Turns one 32-bit instruction into a micro-op: which unit runs it, its ALU
// function, source and destination registers, the extended immediate and, for
// branches and jumps, the target address. It also sets the long-latency bit
// that steers an instruction onto one of the two verification paths:
// multiply, divide and memory references are long latency (executed twice
// right after decode), everything else is short latency (re-executed as a
// clone after commit). The core holds two copies, one per half of the split
// decode stage: one for the normal stream and one for the cloned stream.
//
// Purely combinational. The encoding is MIPS32 where the operation exists;
// MUL and DIVU writing rd directly, HALT, and decoding unknown opcodes as a
// no-op are this design's own choices.
module ditto_decoder
  import ditto_pkg::*;
(
  input  word_t pc,
  input  word_t inst,
  output uop_t  uop
);

  logic [5:0]  op, fn;
  reg_t        rs, rt, rd;
  logic [15:0] imm16;
  word_t       simm, zimm, pc4;

  always_comb begin
    op    = inst[31:26];
    fn    = inst[5:0];
    rs    = inst[25:21];
    rt    = inst[20:16];
    rd    = inst[15:11];
    imm16 = inst[15:0];
    simm  = {{16{imm16[15]}}, imm16};
    zimm  = {16'd0, imm16};
    pc4   = pc + 32'd4;

    uop         = '0;
    uop.fu      = FU_ALU;
    uop.alu_op  = ALU_ADD;
    uop.rs      = rs;
    uop.rt      = rt;
    uop.imm     = simm;
    uop.target  = pc4 + {simm[29:0], 2'b00};

    unique case (op)
      OP_RTYPE: begin
        uop.use_rs = 1'b1;
        uop.use_rt = 1'b1;
        uop.dest   = rd;
        uop.we     = 1'b1;
        unique case (fn)
          FN_ADDU: uop.alu_op = ALU_ADD;
          FN_SUBU: uop.alu_op = ALU_SUB;
          FN_AND:  uop.alu_op = ALU_AND;
          FN_OR:   uop.alu_op = ALU_OR;
          FN_XOR:  uop.alu_op = ALU_XOR;
          FN_SLT:  uop.alu_op = ALU_SLT;
          FN_MUL:  begin uop.fu = FU_MUL; uop.is_long = 1'b1; end
          FN_DIVU: begin uop.fu = FU_DIV; uop.is_long = 1'b1; end
          default: begin uop.we = 1'b0; uop.use_rs = 1'b0; uop.use_rt = 1'b0; end
        endcase
      end
      OP_ADDIU, OP_ANDI, OP_ORI, OP_LUI: begin
        uop.use_rs  = (op != OP_LUI);
        uop.use_imm = 1'b1;
        uop.dest    = rt;
        uop.we      = 1'b1;
        unique case (op)
          OP_ANDI: begin uop.alu_op = ALU_AND; uop.imm = zimm; end
          OP_ORI:  begin uop.alu_op = ALU_OR;  uop.imm = zimm; end
          OP_LUI:  begin uop.alu_op = ALU_LUI; uop.imm = zimm; end
          default: uop.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        uop.fu      = FU_LOAD;
        uop.is_long = 1'b1;
        uop.use_rs  = 1'b1;
        uop.use_imm = 1'b1;
        uop.dest    = rt;
        uop.we      = 1'b1;
      end
      OP_SW: begin
        uop.fu      = FU_STORE;
        uop.is_long = 1'b1;
        uop.use_rs  = 1'b1;
        uop.use_rt  = 1'b1;
        uop.use_imm = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        uop.fu     = FU_BRANCH;
        uop.alu_op = (op == OP_BEQ) ? ALU_EQ : ALU_NE;
        uop.use_rs = 1'b1;
        uop.use_rt = 1'b1;
      end
      OP_J: begin
        uop.fu     = FU_JUMP;
        uop.target = {pc4[31:28], inst[25:0], 2'b00};
      end
      OP_HALT: uop.fu = FU_HALT;
      default: ;  // unknown opcode: no-op
    endcase

    if (uop.dest == 5'd0) uop.we = 1'b0;
    if (!uop.use_rs) uop.rs = 5'd0;
    if (!uop.use_rt) uop.rt = 5'd0;
  end

endmodule
