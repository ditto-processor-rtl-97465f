// Test program and reference instruction-set model for the end-to-end tests
// of the Ditto core.
//
// The program is built around the loop of multiply / subtract / load / add /
// branch used to illustrate the pipeline, extended with stores, divides,
// logic operations and a jump so that every unit and every path of the core
// is used. ref_run executes it instruction by instruction to give the
// expected final registers, memory and instruction count.
package tb_ditto_prog_pkg;
  import ditto_pkg::*;

  localparam int PROG_MAX = 64;

  function automatic void build(output word_t p [PROG_MAX], output int n, input int iters);
    int i;
    i = 0;
    for (int k = 0; k < PROG_MAX; k++) p[k] = '0;
    p[i++] = enc_i(OP_ADDIU, 2, 0, 16'd3);             // r2 = 3
    p[i++] = enc_i(OP_ADDIU, 4, 0, 16'd100);           // r4 = 100
    p[i++] = enc_i(OP_ADDIU, 7, 0, 16'd4);             // r7 = 4
    p[i++] = enc_i(OP_ADDIU, 10, 0, 16'h1000);         // r10 = data pointer
    p[i++] = enc_i(OP_ADDIU, 6, 0, 16'(iters));        // r6 = loop count
    p[i++] = enc_i(OP_LUI, 12, 0, 16'h00F0);           // r12 = 0x00F00000
    // loop (index 6): the illustrated sequence plus stores and a divide
    p[i++] = enc_r(FN_MUL, 1, 2, 7);                   // mul  r1 = r2 * r7
    p[i++] = enc_r(FN_SUBU, 1, 1, 4);                  // subu r1 = r1 - r4
    p[i++] = enc_i(OP_SW, 1, 10, 16'd16);              // sw   r1 -> 16(r10)
    p[i++] = enc_i(OP_LW, 3, 10, 16'd16);              // lw   r3 <- 16(r10)
    p[i++] = enc_r(FN_ADDU, 4, 3, 2);                  // addu r4 = r3 + r2
    p[i++] = enc_r(FN_DIVU, 8, 12, 2);                 // divu r8 = r12 / r2
    p[i++] = enc_r(FN_DIVU, 13, 8, 7);                 // divu r13 = r8 / r7
    p[i++] = enc_r(FN_ADDU, 9, 9, 13);                 // addu r9 += r13
    p[i++] = enc_r(FN_XOR, 14, 9, 4);
    p[i++] = enc_r(FN_SLT, 15, 4, 14);
    p[i++] = enc_r(FN_AND, 16, 14, 12);
    p[i++] = enc_r(FN_OR, 17, 16, 15);
    p[i++] = enc_i(OP_ADDIU, 2, 2, 16'd5);             // r2 += 5
    p[i++] = enc_i(OP_ADDIU, 10, 10, 16'd4);
    p[i++] = enc_i(OP_ADDIU, 6, 6, 16'hFFFF);          // r6 -= 1
    p[i++] = enc_i(OP_BEQ, 0, 6, 16'd1);               // beq r6, r0, +1 (exit)
    p[i++] = enc_j(26'd6);                             // j loop
    p[i++] = enc_i(OP_BNE, 0, 0, 16'd5);               // never taken
    p[i++] = enc_j(26'd26);                            // j over one
    p[i++] = enc_i(OP_ADDIU, 20, 0, 16'd99);           // skipped
    p[i++] = enc_i(OP_ORI, 18, 9, 16'h8001);           // index 26
    p[i++] = enc_i(OP_ANDI, 19, 18, 16'h00FF);
    p[i++] = enc_i(OP_SW, 18, 0, 16'h0800);
    p[i++] = enc_i(OP_LW, 21, 0, 16'h0800);
    p[i++] = enc_r(FN_SUBU, 22, 21, 19);
    p[i++] = enc_r(FN_MUL, 23, 22, 22);
    p[i++] = {OP_HALT, 26'd0};
    n = i;
  endfunction

  typedef struct {
    word_t regs [32];
    word_t mem [int];
    int    count;    // dynamic instructions up to and including HALT
  } ref_state_t;

  function automatic void ref_run(input word_t p [PROG_MAX], output ref_state_t s);
    word_t pc;
    for (int r = 0; r < 32; r++) s.regs[r] = '0;
    s.mem.delete();
    s.count = 0;
    pc = 0;
    for (int steps = 0; steps < 100000; steps++) begin
      word_t i, a, b, simm, npc, res;
      logic [5:0] op, fn;
      reg_t rs, rt, rd;
      logic wr;
      reg_t wd;
      i = p[pc[31:2] % PROG_MAX];
      op = i[31:26]; fn = i[5:0]; rs = i[25:21]; rt = i[20:16]; rd = i[15:11];
      a = s.regs[rs]; b = s.regs[rt];
      simm = {{16{i[15]}}, i[15:0]};
      npc = pc + 4; wr = 0; wd = 0; res = 0;
      s.count++;
      case (op)
        OP_RTYPE: begin
          wr = 1; wd = rd;
          case (fn)
            FN_ADDU: res = a + b;
            FN_SUBU: res = a - b;
            FN_AND:  res = a & b;
            FN_OR:   res = a | b;
            FN_XOR:  res = a ^ b;
            FN_SLT:  res = (int'(a) < int'(b)) ? 1 : 0;
            FN_MUL:  res = a * b;
            FN_DIVU: res = (b == 0) ? 32'hFFFF_FFFF : a / b;
            default: wr = 0;
          endcase
        end
        OP_ADDIU: begin wr = 1; wd = rt; res = a + simm; end
        OP_ANDI:  begin wr = 1; wd = rt; res = a & {16'd0, i[15:0]}; end
        OP_ORI:   begin wr = 1; wd = rt; res = a | {16'd0, i[15:0]}; end
        OP_LUI:   begin wr = 1; wd = rt; res = {i[15:0], 16'd0}; end
        OP_LW: begin
          wr = 1; wd = rt;
          res = s.mem.exists(int'((a + simm) >> 2)) ? s.mem[int'((a + simm) >> 2)] : 32'hDEAD_BEEF;
        end
        OP_SW:  s.mem[int'((a + simm) >> 2)] = b;
        OP_BEQ: if (a == b) npc = pc + 4 + (simm << 2);
        OP_BNE: if (a != b) npc = pc + 4 + (simm << 2);
        OP_J:   npc = {npc[31:28], i[25:0], 2'b00};
        OP_HALT: return;
        default: ;
      endcase
      if (wr && wd != 0) s.regs[wd] = res;
      pc = npc;
    end
  endfunction

endpackage
