// Ditto core: a time-redundant, fault-detecting processor.
//
// Two instruction streams share one core. The normal stream fetches, decodes,
// issues in order (reading operands from the register file or from done ROB
// entries), executes and completes out of order into the ROB, and commits in
// order. Long-latency operations (MUL, DIVU, LW) are executed twice as soon as
// their first result is in: the ROB offers them for a second execution on the
// same unit and compares the two results; a long-latency instruction commits
// only when both agree. Every committing instruction writes the register file
// (value marked transient) and is copied into the delay buffer; long-latency
// instructions also copy their source operand values.
//
// The cloned stream takes delay-buffer entries in order: the clone program
// counter re-fetches the instruction from its address, the clone decoder
// re-decodes it, it is placed in the LP-ROB with the original result copied
// (ECC-corrected) from the delay buffer, and reads its sources either from an
// older clone's copied result in the LP-ROB or from the verified register
// values. Check 1 (after register read) compares instruction code, decoded
// target and, for long-latency clones, source values against the delay buffer.
// Short-latency clones are re-executed and check 2 compares their result
// (next PC for branches, address for loads/stores) with the original.
// A clone that passes marks its register value verified, writes memory if it
// is a store, and advances the verified PC. Commit logic is held twice and
// the copies compared.
//
// Any detected fault (check 1, check 2, long-op mismatch, commit mismatch,
// uncorrectable delay-buffer word) is registered and, the next cycle, flushes
// everything in flight, restores every transient register to its verified
// value and restarts fetch after the last verified instruction: fetch resumes
// two cycles after detection.
//
// Clone pipeline: CF (delay-buffer entry -> clone PC), CD (re-fetch, decode,
// LP-ROB allocate), CR (register read, check 1, delay-buffer pop), CX
// (execute), CW (check 2, verify, LP-ROB retire). It never stalls once
// started. Normal pipeline: F (gshare/BTB prediction of the next address),
// D, I (schedule, register read, 1-cycle ALU, branch resolve against the
// predicted next address, redirect on mismatch, ROB allocate), unit
// latencies MUL_LAT / DIV_LAT / LOAD_LAT, commit from the ROB head.
//
// Follows the reference design: delay buffer with instruction address, code,
// result and operand entry; split fetch/decode with a second PC; ROB of 128
// entries split into 112 normal and 16 LP-ROB entries; long-op double
// execution with status and verify bits; the two checks; transient/verified
// register status; rollback; duplicated commit; unit latencies; gshare
// predictor and BTB sizes. This design's own choices: one instruction per
// cycle per stream (the reference machine is 8-wide), in-order issue,
// predictor updated at issue, stores written to memory at verification with
// loads held while a store is unverified, full squash on every fault,
// always-hit memories, and the fault-injection port (inj_*), which flips bits
// at one chosen site of the next instruction passing it.
module ditto_top
  import ditto_pkg::*;
#(
  parameter int unsigned ROB_ENTRIES    = 128,
  parameter int unsigned LP_ROB_ENTRIES = 16,
  parameter int unsigned DB_ENTRIES     = 128,
  parameter int unsigned IMEM_WORDS     = 4096,
  parameter int unsigned DMEM_WORDS     = 4096,
  parameter int unsigned MUL_LAT        = 3,
  parameter int unsigned DIV_LAT        = 20,
  parameter int unsigned LOAD_LAT       = 3,
  parameter int unsigned BP_PHT_ENTRIES = 64,
  parameter int unsigned BP_BTB_ENTRIES = 8192,
  parameter int unsigned BP_BTB_WAYS    = 8,
  parameter int unsigned BP_IDX_W       = $clog2(BP_PHT_ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // program load
  input  logic          imem_we,
  input  word_t         imem_waddr,
  input  word_t         imem_wdata,
  // fault injection
  input  logic          inj_valid,
  input  inj_site_e     inj_site,
  input  word_t         inj_mask,
  // observation
  output logic          halted,
  output ditto_events_t ev,
  input  word_t         dmem_dbg_addr,
  output word_t         dmem_dbg_data,
  input  reg_t          arf_dbg_addr,
  output word_t         arf_dbg_data,
  output word_t         arf_dbg_vdata,
  output logic [31:0]   arf_transient
);

  localparam int unsigned NROB   = ROB_ENTRIES - LP_ROB_ENTRIES;
  localparam int unsigned RIDX_W = $clog2(NROB);
  localparam int unsigned LIDX_W = $clog2(LP_ROB_ENTRIES);
  localparam int unsigned DIDX_W = $clog2(DB_ENTRIES);

  // ------------------------------------------------------------------
  // Recovery and fault injection
  // ------------------------------------------------------------------
  logic      flush;            // registered detection: squash everything
  logic      err_now;
  word_t     verified_pc;      // address after the last verified instruction
  logic      inj_pend;
  inj_site_e inj_s;
  word_t     inj_m;
  logic      inj_use;          // the pending fault was applied this cycle

  function automatic logic inj_at(logic pend, inj_site_e s, inj_site_e site);
    return pend && s == site;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_pend <= 1'b0;
      inj_s    <= INJ_FETCH;
      inj_m    <= '0;
    end else if (inj_valid) begin
      inj_pend <= 1'b1;
      inj_s    <= inj_site;
      inj_m    <= inj_mask;
    end else if (inj_use) begin
      inj_pend <= 1'b0;
    end
  end

  // ------------------------------------------------------------------
  // Memories
  // ------------------------------------------------------------------
  word_t f_pc, clone_pc, imem_a, imem_b;
  logic  f_pc_valid, clone_valid;

  ditto_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .addr_a(f_pc), .data_a(imem_a), .addr_b(clone_pc), .data_b(imem_b)
  );

  logic              ld_valid, ld_second, ld_out_valid, ld_out_second;
  word_t             ld_addr, ld_out_data;
  logic [RIDX_W-1:0] ld_tag, ld_out_tag;
  logic              st_we;
  word_t             st_addr, st_data;

  ditto_dmem #(.WORDS(DMEM_WORDS), .LOAD_LAT(LOAD_LAT), .TAG_W(RIDX_W)) u_dmem (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .rd_valid(ld_valid), .rd_addr(ld_addr), .rd_tag(ld_tag), .rd_second(ld_second),
    .rd_out_valid(ld_out_valid), .rd_out_tag(ld_out_tag), .rd_out_second(ld_out_second),
    .rd_out_data(ld_out_data),
    .we(st_we), .waddr(st_addr), .wdata(st_data),
    .dbg_addr(dmem_dbg_addr), .dbg_data(dmem_dbg_data)
  );

  // ------------------------------------------------------------------
  // Normal stream: fetch and decode
  // ------------------------------------------------------------------
  logic  i_valid, i_fire, i_ready, redirect, stopped, halt_issue;
  word_t redirect_pc;
  logic  d_valid;
  word_t d_pc, d_inst, d_pred_npc;
  logic  bp_taken, bp_upd;
  word_t bp_target;
  logic [BP_IDX_W-1:0] bp_idx, d_bp_idx, i_bp_idx;
  uop_t  d_uop;
  logic  clone_load;
  word_t clone_addr;

  ditto_fetch u_fetch (
    .clk(clk), .rst_n(rst_n),
    .stall(!i_ready), .stop(stopped || halt_issue),
    .pred_taken(bp_taken), .pred_target(bp_target),
    .redirect(redirect), .redirect_pc(redirect_pc),
    .rollback(flush), .rollback_pc(verified_pc),
    .pc(f_pc), .pc_valid(f_pc_valid),
    .clone_load(clone_load), .clone_addr(clone_addr),
    .clone_pc(clone_pc), .clone_valid(clone_valid)
  );

  logic inj_fetch;
  assign inj_fetch = inj_at(inj_pend, inj_s, INJ_FETCH) && i_ready && f_pc_valid &&
                     !halt_issue && !redirect && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid    <= 1'b0;
      d_pc       <= '0;
      d_inst     <= '0;
      d_pred_npc <= '0;
      d_bp_idx   <= '0;
    end else if (flush || redirect || halt_issue) begin
      d_valid <= 1'b0;
    end else if (i_ready) begin
      d_valid    <= f_pc_valid && !stopped;
      d_pc       <= f_pc;
      d_pred_npc <= bp_taken ? bp_target : f_pc + 32'd4;
      d_bp_idx   <= bp_idx;
      d_inst  <= imem_a ^ (inj_fetch ? inj_m : '0);
    end
  end

  ditto_decoder u_dec_normal (.pc(d_pc), .inst(d_inst), .uop(d_uop));

  // ------------------------------------------------------------------
  // Normal stream: issue (schedule + register read + ALU)
  // ------------------------------------------------------------------
  word_t i_pc, i_inst, i_pred_npc, actual_npc;
  uop_t  i_uop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_valid    <= 1'b0;
      i_pc       <= '0;
      i_inst     <= '0;
      i_uop      <= '0;
      i_pred_npc <= '0;
      i_bp_idx   <= '0;
    end else if (flush || redirect || halt_issue) begin
      i_valid <= 1'b0;
    end else if (i_ready) begin
      i_valid    <= d_valid;
      i_pc       <= d_pc;
      i_pred_npc <= d_pred_npc;
      i_bp_idx   <= d_bp_idx;
      i_inst  <= d_inst;
      i_uop   <= d_uop;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            stopped <= 1'b0;
    else if (flush)        stopped <= 1'b0;
    else if (halt_issue)   stopped <= 1'b1;
  end

  // rename lookups and operand values
  reg_t              src_reg [2];
  logic              src_busy [2];
  logic [RIDX_W-1:0] src_tag [2];
  word_t             rf_val [2];
  rob_entry_t        rob_rd [2];
  logic              src_ok [2];
  word_t             src_val [2];

  assign src_reg[0] = i_uop.rs;
  assign src_reg[1] = i_uop.rt;

  for (genvar k = 0; k < 2; k++) begin : g_src
    assign src_ok[k]  = !src_busy[k] || rob_rd[k].done;
    assign src_val[k] = src_busy[k] ? rob_rd[k].result : rf_val[k];
  end

  word_t srca, srcb, alu_b, alu_y, alu_res;
  logic  ops_ready, taken;

  assign ops_ready = (!i_uop.use_rs || src_ok[0]) && (!i_uop.use_rt || src_ok[1]);
  assign srca      = i_uop.use_rs ? src_val[0] : '0;
  assign srcb      = i_uop.use_rt ? src_val[1] : '0;
  assign alu_b     = i_uop.use_imm ? i_uop.imm : srcb;

  ditto_alu u_alu (.op(i_uop.alu_op), .a(srca), .b(alu_b), .y(alu_y));

  logic inj_alu;
  assign inj_alu = inj_at(inj_pend, inj_s, INJ_ALU) && i_fire && i_uop.fu == FU_ALU;
  assign alu_res = alu_y ^ (inj_alu ? inj_m : '0);
  assign taken   = (i_uop.fu == FU_JUMP) || (i_uop.fu == FU_BRANCH && alu_y[0]);

  // ROB and second-execution arbitration
  logic              rob_full, rob_head_valid, rob_mismatch, x2_valid, x2_go, rob_retire;
  logic [RIDX_W:0]   rob_count;
  logic [RIDX_W-1:0] rob_alloc_idx, rob_head_idx, rob_mismatch_idx, x2_idx;
  rob_entry_t        rob_alloc_e, rob_head, x2_e;
  logic              cmp_valid [3];
  logic [RIDX_W-1:0] cmp_idx [3];
  logic              cmp_second [3];
  word_t             cmp_data [3];
  logic              div_busy;

  assign x2_go = x2_valid && !flush && (x2_e.fu != FU_DIV || !div_busy);

  logic       fu_ok, store_block;
  logic [8:0] stores_pending;   // stores issued and not yet verified
  assign store_block = (i_uop.fu == FU_LOAD) && (stores_pending != '0);
  always_comb begin
    unique case (i_uop.fu)
      FU_MUL:  fu_ok = !(x2_go && x2_e.fu == FU_MUL);
      FU_DIV:  fu_ok = !div_busy && !(x2_go && x2_e.fu == FU_DIV);
      FU_LOAD: fu_ok = !(x2_go && x2_e.fu == FU_LOAD);
      default: fu_ok = 1'b1;
    endcase
  end

  assign i_fire      = i_valid && !flush && !rob_full && ops_ready && fu_ok && !store_block;
  assign i_ready     = !i_valid || i_fire;
  assign actual_npc  = taken ? i_uop.target : i_pc + 32'd4;
  assign redirect    = i_fire && actual_npc != i_pred_npc;
  assign redirect_pc = actual_npc;
  assign bp_upd      = i_fire && (i_uop.fu == FU_BRANCH || i_uop.fu == FU_JUMP);

  ditto_bpred #(
    .PHT_ENTRIES(BP_PHT_ENTRIES), .BTB_ENTRIES(BP_BTB_ENTRIES), .BTB_WAYS(BP_BTB_WAYS)
  ) u_bpred (
    .clk(clk), .rst_n(rst_n),
    .f_pc(f_pc), .pred_taken(bp_taken), .pred_target(bp_target), .pred_idx(bp_idx),
    .upd_valid(bp_upd), .upd_cond(i_uop.fu == FU_BRANCH), .upd_pc(i_pc),
    .upd_taken(taken), .upd_target(i_uop.target), .upd_idx(i_bp_idx)
  );
  assign halt_issue  = i_fire && i_uop.fu == FU_HALT;

  always_comb begin
    rob_alloc_e           = '0;
    rob_alloc_e.pc        = i_pc;
    rob_alloc_e.inst      = i_inst;
    rob_alloc_e.fu        = i_uop.fu;
    rob_alloc_e.dest      = i_uop.dest;
    rob_alloc_e.we        = i_uop.we;
    rob_alloc_e.is_long   = i_uop.is_long;
    rob_alloc_e.srca      = srca;
    rob_alloc_e.srcb      = srcb;
    rob_alloc_e.done      = 1'b1;
    rob_alloc_e.verified  = (i_uop.fu == FU_STORE);
    unique case (i_uop.fu)
      FU_ALU:    rob_alloc_e.result = alu_res;
      FU_BRANCH: begin
        rob_alloc_e.result = taken ? i_uop.target : i_pc + 32'd4;
        rob_alloc_e.addr   = i_uop.target;
      end
      FU_JUMP: begin
        rob_alloc_e.result = i_uop.target;
        rob_alloc_e.addr   = i_uop.target;
      end
      FU_LOAD: begin
        rob_alloc_e.done = 1'b0;
        rob_alloc_e.addr = alu_y;
      end
      FU_STORE:        rob_alloc_e.addr = alu_y;
      FU_MUL, FU_DIV:  rob_alloc_e.done = 1'b0;
      default: ;
    endcase
  end

  ditto_rename #(.IDX_W(RIDX_W)) u_rename (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .q_reg(src_reg), .q_busy(src_busy), .q_tag(src_tag),
    .set_en(i_fire && i_uop.we), .set_reg(i_uop.dest), .set_tag(rob_alloc_idx),
    .clr_en(rob_retire && rob_head.we), .clr_reg(rob_head.dest), .clr_tag(rob_head_idx)
  );

  ditto_rob #(.ENTRIES(NROB), .NCMP(3), .IDX_W(RIDX_W)) u_rob (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .alloc_valid(i_fire), .alloc_entry(rob_alloc_e), .alloc_idx(rob_alloc_idx),
    .full(rob_full), .count(rob_count),
    .cmp_valid(cmp_valid), .cmp_idx(cmp_idx), .cmp_second(cmp_second), .cmp_data(cmp_data),
    .mismatch(rob_mismatch), .mismatch_idx(rob_mismatch_idx),
    .rd_idx(src_tag), .rd_entry(rob_rd),
    .x2_valid(x2_valid), .x2_idx(x2_idx), .x2_entry(x2_e), .x2_take(x2_go),
    .head_valid(rob_head_valid), .head_idx(rob_head_idx), .head_entry(rob_head),
    .retire(rob_retire)
  );

  // ------------------------------------------------------------------
  // Long-latency units (first execution from issue, second from the ROB)
  // ------------------------------------------------------------------
  logic              mul_in, mul_out, mul_out_second;
  logic [RIDX_W-1:0] mul_out_tag;
  word_t             mul_y;
  logic              div_in, div_out, div_out_second;
  logic [RIDX_W-1:0] div_out_tag;
  word_t             div_y;
  logic              x2_mul, x2_div, x2_ld;

  assign x2_mul = x2_go && x2_e.fu == FU_MUL;
  assign x2_div = x2_go && x2_e.fu == FU_DIV;
  assign x2_ld  = x2_go && x2_e.fu == FU_LOAD;
  assign mul_in = x2_mul || (i_fire && i_uop.fu == FU_MUL);
  assign div_in = x2_div || (i_fire && i_uop.fu == FU_DIV);

  ditto_mul #(.LAT(MUL_LAT), .TAG_W(RIDX_W)) u_mul (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .in_valid(mul_in), .in_tag(x2_mul ? x2_idx : rob_alloc_idx), .in_second(x2_mul),
    .a(x2_mul ? x2_e.srca : srca), .b(x2_mul ? x2_e.srcb : srcb),
    .out_valid(mul_out), .out_tag(mul_out_tag), .out_second(mul_out_second), .y(mul_y)
  );

  ditto_div #(.LAT(DIV_LAT), .TAG_W(RIDX_W)) u_div (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .in_valid(div_in), .in_tag(x2_div ? x2_idx : rob_alloc_idx), .in_second(x2_div),
    .a(x2_div ? x2_e.srca : srca), .b(x2_div ? x2_e.srcb : srcb), .busy(div_busy),
    .out_valid(div_out), .out_tag(div_out_tag), .out_second(div_out_second), .y(div_y)
  );

  assign ld_valid  = x2_ld || (i_fire && i_uop.fu == FU_LOAD);
  assign ld_addr   = x2_ld ? x2_e.addr : alu_y;
  assign ld_tag    = x2_ld ? x2_idx : rob_alloc_idx;
  assign ld_second = x2_ld;

  logic inj_mul;
  assign inj_mul = inj_at(inj_pend, inj_s, INJ_MUL) && mul_out && !mul_out_second;

  assign cmp_valid[0]  = mul_out;
  assign cmp_idx[0]    = mul_out_tag;
  assign cmp_second[0] = mul_out_second;
  assign cmp_data[0]   = mul_y ^ (inj_mul ? inj_m : '0);
  assign cmp_valid[1]  = div_out;
  assign cmp_idx[1]    = div_out_tag;
  assign cmp_second[1] = div_out_second;
  assign cmp_data[1]   = div_y;
  assign cmp_valid[2]  = ld_out_valid;
  assign cmp_idx[2]    = ld_out_tag;
  assign cmp_second[2] = ld_out_second;
  assign cmp_data[2]   = ld_out_data;

  // ------------------------------------------------------------------
  // Duplicated commit logic, register file, delay buffer
  // ------------------------------------------------------------------
  logic [DIDX_W:0]   db_count, db_free;
  logic [DIDX_W-1:0] db_head, cf_ptr;
  logic              cm_fire [2], cm_we [2];
  reg_t              cm_addr [2];
  word_t             cm_data [2];
  logic [1:0]        cm_push [2];
  db_entry_t         cm_e [2][2];
  rob_entry_t        cm_head [2];
  logic              inj_commit, commit_mismatch;

  // applied when the head is about to retire a register write
  assign inj_commit = inj_at(inj_pend, inj_s, INJ_COMMIT) && !flush && rob_head_valid &&
                      rob_head.we && rob_head.done && (!rob_head.is_long || rob_head.verified) &&
                      db_free >= (DIDX_W+1)'(2);
  assign cm_head[0] = rob_head;
  always_comb begin
    cm_head[1]        = rob_head;
    cm_head[1].result = rob_head.result ^ (inj_commit ? inj_m : '0);
  end

  for (genvar c = 0; c < 2; c++) begin : g_commit
    ditto_commit #(.DB_CNT_W(DIDX_W + 1)) u_commit (
      .head_valid(rob_head_valid), .head(cm_head[c]), .db_free(db_free), .block(flush),
      .fire(cm_fire[c]), .rf_we(cm_we[c]), .rf_addr(cm_addr[c]), .rf_data(cm_data[c]),
      .db_push_n(cm_push[c]), .db_e(cm_e[c])
    );
  end

  assign commit_mismatch = (cm_fire[0] != cm_fire[1]) || (cm_we[0] != cm_we[1]) ||
                           (cm_addr[0] != cm_addr[1]) || (cm_data[0] != cm_data[1]) ||
                           (cm_push[0] != cm_push[1]) || (cm_e[0][0] != cm_e[1][0]) ||
                           (cm_e[0][1] != cm_e[1][1]);
  assign rob_retire = cm_fire[0] && !commit_mismatch;

  // clone-stream register read ports
  reg_t  c_src_reg [2];
  word_t c_vr_val [2];
  logic  cw_verify;
  uop_t  cw_uop;
  word_t lp_e_result, lp_e_addr;

  ditto_arf u_arf (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .rs_addr(src_reg), .rs_data(rf_val),
    .vr_addr(c_src_reg), .vr_data(c_vr_val),
    .cw_en(rob_retire && cm_we[0]), .cw_addr(cm_addr[0]), .cw_data(cm_data[0]),
    .vw_en(cw_verify && cw_uop.we), .vw_addr(cw_uop.dest), .vw_data(lp_e_result),
    .transient(arf_transient),
    .dbg_addr(arf_dbg_addr), .dbg_data(arf_dbg_data), .dbg_vdata(arf_dbg_vdata)
  );

  db_entry_t db_rd [2];
  logic      db_corr, db_unc;
  logic [1:0] db_pop;
  logic      inj_db;

  assign inj_db = inj_at(inj_pend, inj_s, INJ_DB) && rob_retire;

  ditto_delay_buffer #(.ENTRIES(DB_ENTRIES), .IDX_W(DIDX_W)) u_db (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .push_n(rob_retire ? cm_push[0] : 2'd0), .push_e(cm_e[0]), .inj_flip(inj_db),
    .count(db_count), .free(db_free), .head_ptr(db_head),
    .rd_ptr(cf_ptr), .rd_e(db_rd), .rd_corrected(db_corr), .rd_uncorrectable(db_unc),
    .pop_n(db_pop)
  );

  // ------------------------------------------------------------------
  // Cloned stream
  // ------------------------------------------------------------------
  logic [DIDX_W:0]   cf_fetched;   // entries fetched, not yet popped
  logic [DIDX_W:0]   cf_avail;
  logic [1:0]        cf_n;
  logic              lp_full;
  logic [LIDX_W:0]   lp_count;
  logic              lp_room, cf_go;

  assign cf_avail = db_count - cf_fetched;
  assign cf_n     = db_rd[0].has_ops ? 2'd2 : 2'd1;
  assign lp_room  = (lp_count + (LIDX_W+1)'(clone_valid)) < (LIDX_W+1)'(LP_ROB_ENTRIES);
  assign cf_go    = !flush && !halted && cf_avail >= (DIDX_W+1)'(cf_n) && lp_room;
  assign clone_load = cf_go;
  assign clone_addr = db_rd[0].pc;

  // CD stage registers (clone_pc / clone_valid live in the fetch unit)
  db_entry_t cd_main, cd_ops;
  logic [1:0] cd_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cf_ptr     <= '0;
      cf_fetched <= '0;
      cd_main    <= '0;
      cd_ops     <= '0;
      cd_n       <= '0;
    end else if (flush) begin
      cf_ptr     <= '0;
      cf_fetched <= '0;
    end else begin
      if (cf_go) begin
        cf_ptr  <= DIDX_W'((int'(cf_ptr) + int'(cf_n)) % DB_ENTRIES);
        cd_main <= db_rd[0];
        cd_ops  <= db_rd[0].has_ops ? db_rd[1] : '0;
        cd_n    <= cf_n;
      end
      cf_fetched <= cf_fetched + (DIDX_W+1)'(cf_go ? cf_n : 2'd0) - (DIDX_W+1)'(db_pop);
    end
  end

  // CD: re-decode and LP-ROB allocation
  uop_t              cd_uop;
  logic [LIDX_W-1:0] lp_alloc_idx, lp_head_idx;
  logic              lp_head_valid;
  logic              lp_hit [2];
  word_t             lp_val [2];
  logic              cr_valid;
  logic [LIDX_W-1:0] cr_lp_idx, cw_lp_idx;
  logic              cw_valid;

  ditto_decoder u_dec_clone (.pc(clone_pc), .inst(imem_b), .uop(cd_uop));

  ditto_lp_rob #(.ENTRIES(LP_ROB_ENTRIES), .IDX_W(LIDX_W)) u_lp_rob (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .alloc_valid(clone_valid && !flush), .alloc_dest(cd_uop.dest), .alloc_we(cd_uop.we),
    .alloc_result(cd_main.w0), .alloc_addr(cd_main.w1), .alloc_idx(lp_alloc_idx),
    .full(lp_full), .count(lp_count),
    .q_idx(cr_lp_idx), .q_src(c_src_reg), .q_hit(lp_hit), .q_val(lp_val),
    .e_idx(cw_lp_idx), .e_result(lp_e_result), .e_addr(lp_e_addr),
    .head_valid(lp_head_valid), .head_idx(lp_head_idx), .retire(cw_verify)
  );

  // CR: register read and check 1
  uop_t      cr_uop;
  word_t     cr_pc, cr_inst;
  db_entry_t cr_main, cr_ops;
  logic [1:0] cr_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_valid  <= 1'b0;
      cr_uop    <= '0;
      cr_pc     <= '0;
      cr_inst   <= '0;
      cr_main   <= '0;
      cr_ops    <= '0;
      cr_n      <= '0;
      cr_lp_idx <= '0;
    end else begin
      cr_valid  <= clone_valid && !flush;
      cr_uop    <= cd_uop;
      cr_pc     <= clone_pc;
      cr_inst   <= imem_b;
      cr_main   <= cd_main;
      cr_ops    <= cd_ops;
      cr_n      <= cd_n;
      cr_lp_idx <= lp_alloc_idx;
    end
  end

  assign c_src_reg[0] = cr_uop.rs;
  assign c_src_reg[1] = cr_uop.rt;

  word_t c_srca, c_srcb;
  logic  inj_csrc, c1_err, c2_err;
  word_t cw_value, cw_pc, cw_srcb;
  assign inj_csrc = inj_at(inj_pend, inj_s, INJ_CLONE_SRC) && cr_valid && cr_uop.is_long && !flush;
  assign c_srca = (cr_uop.use_rs ? (lp_hit[0] ? lp_val[0] : c_vr_val[0]) : '0) ^
                  (inj_csrc ? inj_m : '0);
  assign c_srcb =  cr_uop.use_rt ? (lp_hit[1] ? lp_val[1] : c_vr_val[1]) : '0;
  assign db_pop = (cr_valid && !flush) ? cr_n : 2'd0;

  ditto_verify u_verify (
    .c1_valid(cr_valid && !flush), .c1_uop(cr_uop), .c1_inst(cr_inst),
    .c1_srca(c_srca), .c1_srcb(c_srcb), .c1_main(cr_main), .c1_ops(cr_ops), .c1_err(c1_err),
    .c2_valid(cw_valid && !flush), .c2_fu(cw_uop.fu), .c2_value(cw_value),
    .c2_exp_result(lp_e_result), .c2_exp_addr(lp_e_addr), .c2_err(c2_err)
  );

  // CX: clone execution (short-latency clones; long ones pass through)
  logic              cx_valid;
  uop_t              cx_uop;
  word_t             cx_pc, cx_srca, cx_srcb, cx_alu_y, cx_value;
  logic [LIDX_W-1:0] cx_lp_idx;
  logic              inj_calu;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx_valid  <= 1'b0;
      cx_uop    <= '0;
      cx_pc     <= '0;
      cx_srca   <= '0;
      cx_srcb   <= '0;
      cx_lp_idx <= '0;
    end else begin
      cx_valid  <= cr_valid && !flush && !c1_err;
      cx_uop    <= cr_uop;
      cx_pc     <= cr_pc;
      cx_srca   <= c_srca;
      cx_srcb   <= c_srcb;
      cx_lp_idx <= cr_lp_idx;
    end
  end

  ditto_alu u_clone_alu (.op(cx_uop.alu_op), .a(cx_srca),
                         .b(cx_uop.use_imm ? cx_uop.imm : cx_srcb), .y(cx_alu_y));

  assign inj_calu = inj_at(inj_pend, inj_s, INJ_CLONE_ALU) && cx_valid && cx_uop.fu == FU_ALU && !flush;
  always_comb begin
    unique case (cx_uop.fu)
      FU_BRANCH: cx_value = cx_alu_y[0] ? cx_uop.target : cx_pc + 32'd4;
      FU_JUMP:   cx_value = cx_uop.target;
      default:   cx_value = cx_alu_y ^ (inj_calu ? inj_m : '0);
    endcase
  end

  // CW: check 2 and verification

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw_valid  <= 1'b0;
      cw_uop    <= '0;
      cw_value  <= '0;
      cw_pc     <= '0;
      cw_srcb   <= '0;
      cw_lp_idx <= '0;
    end else begin
      cw_valid  <= cx_valid && !flush;
      cw_uop    <= cx_uop;
      cw_value  <= cx_value;
      cw_pc     <= cx_pc;
      cw_srcb   <= cx_srcb;
      cw_lp_idx <= cx_lp_idx;
    end
  end

  assign cw_verify = cw_valid && !flush && !c2_err;
  assign st_we     = cw_verify && cw_uop.fu == FU_STORE;
  assign st_addr   = lp_e_addr;
  assign st_data   = cw_srcb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      verified_pc    <= '0;
      halted         <= 1'b0;
      stores_pending <= '0;
    end else begin
      if (cw_verify) begin
        verified_pc <= (cw_uop.fu == FU_BRANCH || cw_uop.fu == FU_JUMP) ? lp_e_result
                                                                       : cw_pc + 32'd4;
        if (cw_uop.fu == FU_HALT) halted <= 1'b1;
      end
      if (flush) stores_pending <= '0;
      else stores_pending <= stores_pending + 9'(i_fire && i_uop.fu == FU_STORE) - 9'(st_we);
    end
  end

  // ------------------------------------------------------------------
  // Error collection and rollback
  // ------------------------------------------------------------------
  logic e_c1, e_c2, e_dup, e_cm, e_ecc;
  assign e_c1  = c1_err;
  assign e_c2  = c2_err;
  assign e_dup = rob_mismatch && !flush;
  assign e_cm  = commit_mismatch && !flush;
  assign e_ecc = cf_go && db_unc;
  assign err_now = e_c1 || e_c2 || e_dup || e_cm || e_ecc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flush <= 1'b0;
    else        flush <= err_now && !flush;
  end

  assign inj_use = inj_fetch || inj_alu || inj_mul || inj_csrc || inj_calu || inj_commit || inj_db;

  // ------------------------------------------------------------------
  // Event pulses
  // ------------------------------------------------------------------
  always_comb begin
    ev                   = '0;
    ev.commit            = rob_retire;
    ev.verify            = cw_verify;
    ev.exec2             = x2_go;
    ev.redirect          = redirect;
    ev.pred_hit          = i_fire && taken && !redirect;
    ev.clone_bypass      = cr_valid && !flush &&
                           ((cr_uop.use_rs && lp_hit[0]) || (cr_uop.use_rt && lp_hit[1]));
    ev.ecc_corrected     = cf_go && db_corr;
    ev.err_check1        = e_c1;
    ev.err_check2        = e_c2;
    ev.err_dup           = e_dup;
    ev.err_commit        = e_cm;
    ev.err_ecc           = e_ecc;
    ev.rollback          = flush;
    ev.stall_operand     = i_valid && !flush && !ops_ready;
    ev.stall_rob_full    = i_valid && !flush && ops_ready && rob_full;
    ev.stall_store_order = i_valid && !flush && ops_ready && store_block;
    ev.stall_fu          = i_valid && !flush && ops_ready && !fu_ok;
    ev.stall_db_full     = rob_head_valid && !flush && rob_head.done &&
                           (!rob_head.is_long || rob_head.verified) && !cm_fire[0];
    ev.stall_lp_full     = !flush && !halted && cf_avail >= (DIDX_W+1)'(cf_n) && !lp_room;
  end

  // Unused in this build: LP-ROB head index (retirement is in order at CW),
  // ROB occupancy and mismatch index, delay-buffer head pointer.
  logic unused;
  assign unused = ^{lp_head_idx, lp_head_valid, lp_full, rob_count, rob_mismatch_idx, db_head};

endmodule
