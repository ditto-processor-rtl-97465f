// Shared types and constants of the Ditto core.
//
// The core is a time-redundant processor: every committed instruction is
// cloned, re-fetched, re-decoded and (if short latency) re-executed, and its
// result is checked against the original before the register state it
// produced is called verified. Long-latency operations (multiply, divide,
// memory reference) are instead executed twice right away and their clones
// only check the instruction code and the source operand values.
//
// This package holds the instruction subset (a MIPS-like 32-bit encoding, the
// design's own choice since only MIPS mnemonics are given), the micro-op
// record produced by the decoders, the records stored in the reorder buffer,
// the LP-ROB and the delay buffer, and the fault-injection sites used to
// exercise the checking mechanisms.
package ditto_pkg;

  typedef logic [31:0] word_t;
  typedef logic [4:0]  reg_t;

  // Primary opcodes (bits 31:26).
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;
  localparam logic [5:0] OP_HALT  = 6'h3F;

  // R-type function codes (bits 5:0).
  localparam logic [5:0] FN_MUL  = 6'h18;
  localparam logic [5:0] FN_DIVU = 6'h1B;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_SLT  = 6'h2A;

  // Which unit executes a micro-op.
  typedef enum logic [2:0] {
    FU_ALU    = 3'd0,
    FU_MUL    = 3'd1,
    FU_DIV    = 3'd2,
    FU_LOAD   = 3'd3,
    FU_STORE  = 3'd4,
    FU_BRANCH = 3'd5,
    FU_JUMP   = 3'd6,
    FU_HALT   = 3'd7
  } fu_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_AND = 4'd2,
    ALU_OR  = 4'd3,
    ALU_XOR = 4'd4,
    ALU_SLT = 4'd5,
    ALU_LUI = 4'd6,
    ALU_EQ  = 4'd7,
    ALU_NE  = 4'd8
  } alu_op_e;

  // Decoded micro-op.
  typedef struct packed {
    fu_e     fu;
    alu_op_e alu_op;
    reg_t    rs;        // source A
    reg_t    rt;        // source B
    reg_t    dest;      // destination register
    logic    use_rs;
    logic    use_rt;
    logic    use_imm;   // ALU operand B is imm instead of rt
    logic    we;        // writes dest (never set for dest == 0)
    logic    is_long;   // long-latency class: MUL, DIVU, LW, SW
    word_t   imm;       // sign/zero-extended immediate
    word_t   target;    // branch / jump target
  } uop_t;

  // Normal-stream ROB entry.
  typedef struct packed {
    word_t pc;
    word_t inst;
    fu_e   fu;
    reg_t  dest;
    logic  we;
    logic  is_long;     // extra bit: long-latency operation
    logic  done;        // first (original) result present
    logic  x2_issued;   // second execution issued; done & is_long & !x2_issued
                        // is the "ready to execute a second time" status
    logic  verified;    // both executions completed and matched
    word_t result;      // register value, or next PC for branch / jump
    word_t addr;        // data address (LW/SW) or decoded target (branch/jump)
    word_t srca;        // source operand values, kept for the delay buffer
    word_t srcb;
  } rob_entry_t;

  // Delay-buffer entry as seen outside the buffer (data words corrected).
  // A long-latency instruction uses two consecutive entries: the main one
  // and, right after it, an operand entry holding its source values.
  typedef struct packed {
    logic  operands;    // this is the operand entry of the previous one
    logic  has_ops;     // main entry followed by an operand entry
    word_t pc;
    word_t inst;
    word_t w0;          // main: result / next PC.  operands: source A value
    word_t w1;          // main: data address / target. operands: source B
  } db_entry_t;

  // Fault-injection sites.
  typedef enum logic [2:0] {
    INJ_FETCH     = 3'd0,  // normal fetched instruction word
    INJ_ALU       = 3'd1,  // normal-stream ALU result
    INJ_MUL       = 3'd2,  // first execution of a multiply
    INJ_CLONE_SRC = 3'd3,  // clone source operand A at register read
    INJ_CLONE_ALU = 3'd4,  // clone ALU result
    INJ_COMMIT    = 3'd5,  // register data in the second commit copy
    INJ_DB        = 3'd6   // single stored bit of the delay buffer
  } inj_site_e;

  // One-cycle event pulses of the core, brought out for counting.
  typedef struct packed {
    logic commit;            // normal instruction retired into the delay buffer
    logic verify;            // clone verified, register state verified
    logic exec2;             // second execution of a long-latency op issued
    logic redirect;          // mispredicted branch / jump redirected fetch
    logic pred_hit;          // taken branch / jump correctly predicted at fetch
    logic clone_bypass;      // clone source served from the LP-ROB copy
    logic ecc_corrected;     // delay-buffer word corrected on read
    logic err_check1;        // instruction / target / operand mismatch
    logic err_check2;        // clone result mismatch
    logic err_dup;           // two executions of a long op differ
    logic err_commit;        // the two commit-logic copies differ
    logic err_ecc;           // uncorrectable delay-buffer word
    logic rollback;          // recovery flush
    logic stall_operand;     // issue waits for a source value
    logic stall_rob_full;    // issue waits for a ROB entry
    logic stall_store_order; // load waits for older stores to be verified
    logic stall_fu;          // issue waits for a busy unit
    logic stall_db_full;     // commit waits for delay-buffer room
    logic stall_lp_full;     // clone fetch waits for an LP-ROB entry
  } ditto_events_t;

  // Instruction builders, used by testbenches to assemble programs.
  function automatic word_t enc_r(logic [5:0] fn, reg_t rd, reg_t rs, reg_t rt);
    return {OP_RTYPE, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, reg_t rt, reg_t rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic word_t enc_j(logic [25:0] idx);
    return {OP_J, idx};
  endfunction

endpackage
