// End-to-end test of the Ditto core at reduced buffer sizes (ROB 12 of which
// LP-ROB 2, delay buffer 4, 256-word memories) so that every full-buffer
// stall occurs. A program of loops with multiplies, divides, loads, stores,
// branches and a jump runs to HALT while one fault is injected at each site
// (normal fetch, normal ALU, first multiply, clone source operand, clone ALU,
// second commit copy, delay-buffer bit). The final registers (committed and
// verified copies), memory and number of verified instructions are compared
// with a reference model; every detection mechanism, the recovery timing and
// every stall kind must have occurred.
module tb_ditto_top;
  import ditto_pkg::*;
  import tb_ditto_prog_pkg::*;

  localparam int ITERS   = 20;
  localparam int MAXCYC  = 20000;
  localparam int IWORDS  = 256;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  word_t imem_waddr = 0, imem_wdata = 0;
  logic inj_valid = 0;
  inj_site_e inj_site = INJ_FETCH;
  word_t inj_mask = 0;
  logic halted;
  ditto_events_t ev;
  word_t dmem_dbg_addr = 0, dmem_dbg_data, arf_dbg_data, arf_dbg_vdata;
  reg_t arf_dbg_addr = 0;
  logic [31:0] arf_transient;

  ditto_top #(.ROB_ENTRIES(12), .LP_ROB_ENTRIES(2), .DB_ENTRIES(4), .IMEM_WORDS(256), .DMEM_WORDS(2048)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  // event counters
  int n_pred = 0, n_commit = 0, n_verify = 0, n_exec2 = 0, n_redirect = 0, n_bypass = 0, n_ecc = 0;
  int n_c1 = 0, n_c2 = 0, n_dup = 0, n_cm = 0, n_eccerr = 0, n_rb = 0;
  int n_st_op = 0, n_st_rob = 0, n_st_ord = 0, n_st_fu = 0, n_st_db = 0, n_st_lp = 0;
  int n_bad_penalty = 0;
  logic err_prev = 0;

  always @(posedge clk) if (rst_n) begin
    cycle++;
    n_commit   += int'(ev.commit);
    n_verify   += int'(ev.verify);
    n_exec2    += int'(ev.exec2);
    n_redirect += int'(ev.redirect);
    n_pred     += int'(ev.pred_hit);
    n_bypass   += int'(ev.clone_bypass);
    n_ecc      += int'(ev.ecc_corrected);
    n_c1       += int'(ev.err_check1);
    n_c2       += int'(ev.err_check2);
    n_dup      += int'(ev.err_dup);
    n_cm       += int'(ev.err_commit);
    n_eccerr   += int'(ev.err_ecc);
    n_rb       += int'(ev.rollback);
    n_st_op    += int'(ev.stall_operand);
    n_st_rob   += int'(ev.stall_rob_full);
    n_st_ord   += int'(ev.stall_store_order);
    n_st_fu    += int'(ev.stall_fu);
    n_st_db    += int'(ev.stall_db_full);
    n_st_lp    += int'(ev.stall_lp_full);
    // recovery: every detection is followed by the flush on the next cycle
    if (err_prev != ev.rollback) n_bad_penalty++;
    err_prev = ev.err_check1 | ev.err_check2 | ev.err_dup | ev.err_commit | ev.err_ecc;
    err_prev = err_prev && !ev.rollback;
  end

  initial begin
    #(10 * MAXCYC + 100000);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("TOP check failed: %s", what); end
  endtask

  task automatic inject(inj_site_e s, word_t m);
    @(negedge clk);
    inj_valid = 1; inj_site = s; inj_mask = m;
    @(negedge clk);
    inj_valid = 0;
  endtask

  word_t prog [PROG_MAX];
  int    plen;
  ref_state_t exp_s;

  initial begin
    build(prog, plen, ITERS);
    ref_run(prog, exp_s);
    // load the program; the rest of memory holds zero words (no-ops)
    for (int k = 0; k < IWORDS; k++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = word_t'(k * 4); imem_wdata = (k < PROG_MAX) ? prog[k] : '0;
    end
    @(negedge clk) imem_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one fault at each site, spaced apart
    repeat (60) @(negedge clk);
    inject(INJ_ALU, 32'h0000_0100);
    repeat (120) @(negedge clk);
    inject(INJ_MUL, 32'h0000_0001);
    repeat (120) @(negedge clk);
    inject(INJ_FETCH, 32'h0000_0001);
    repeat (120) @(negedge clk);
    inject(INJ_CLONE_SRC, 32'h0000_0010);
    repeat (120) @(negedge clk);
    inject(INJ_CLONE_ALU, 32'h8000_0000);
    repeat (120) @(negedge clk);
    inject(INJ_COMMIT, 32'h0000_0004);
    repeat (120) @(negedge clk);
    inject(INJ_DB, 32'h0);
    while (!halted && cycle < MAXCYC) @(negedge clk);
    repeat (4) @(negedge clk);

    chk("halted", halted);
    for (int r = 1; r < 32; r++) begin
      arf_dbg_addr = reg_t'(r);
      #1;
      chk($sformatf("r%0d = %h (exp %h)", r, arf_dbg_data, exp_s.regs[r]), arf_dbg_data == exp_s.regs[r]);
      chk($sformatf("r%0d verified copy", r), arf_dbg_vdata == exp_s.regs[r]);
    end
    chk("no transient register left", arf_transient == '0);
    foreach (exp_s.mem[a]) begin
      dmem_dbg_addr = word_t'(a) << 2;
      #1;
      chk($sformatf("mem[%h] = %h (exp %h)", a * 4, dmem_dbg_data, exp_s.mem[a]), dmem_dbg_data == exp_s.mem[a]);
    end
    chk($sformatf("verified count %0d == instruction count %0d", n_verify, exp_s.count),
        n_verify == exp_s.count);
    chk("commits cover all instructions", n_commit >= exp_s.count);
    chk("detection to flush is one cycle", n_bad_penalty == 0);
    // every mechanism happened
    chk("second executions", n_exec2 > 0);
    chk("branch / jump redirects", n_redirect > 0);
    chk("taken branches predicted at fetch", n_pred > 0);
    chk("clone LP-ROB bypass", n_bypass > 0);
    chk("ECC correction", n_ecc > 0);
    chk("check-1 detection", n_c1 > 0);
    chk("check-2 detection", n_c2 > 0);
    chk("duplicated-execution detection", n_dup > 0);
    chk("commit-copy detection", n_cm > 0);
    chk("no uncorrectable word", n_eccerr == 0);
    chk("rollbacks", n_rb == n_c1 + n_c2 + n_dup + n_cm);
    chk("operand stall", n_st_op > 0);
    chk("store-order stall", n_st_ord > 0);
    chk("unit busy stall", n_st_fu > 0);
    chk("ROB-full stall", n_st_rob > 0);
    chk("delay-buffer-full stall", n_st_db > 0);
    chk("LP-ROB-full stall", n_st_lp > 0);
    $display("cycles=%0d instructions=%0d commits=%0d verifies=%0d exec2=%0d redirects=%0d predicted=%0d bypass=%0d",
             cycle, exp_s.count, n_commit, n_verify, n_exec2, n_redirect, n_pred, n_bypass);
    $display("errors: check1=%0d check2=%0d dup=%0d commit=%0d ecc_fixed=%0d rollbacks=%0d",
             n_c1, n_c2, n_dup, n_cm, n_ecc, n_rb);
    $display("stalls: operand=%0d rob_full=%0d store_order=%0d unit=%0d db_full=%0d lp_full=%0d",
             n_st_op, n_st_rob, n_st_ord, n_st_fu, n_st_db, n_st_lp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
