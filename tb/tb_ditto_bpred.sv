// Self-checking test of the branch predictor: random lookups and updates
// from a small pool of branch addresses (so that BTB sets overflow and
// round-robin replacement happens), checked every cycle against a reference
// model of the gshare counters, global history and BTB.
module tb_ditto_bpred;
  import ditto_pkg::*;
  localparam int PHT = 16, BTB = 32, WAYS = 4, SETS = BTB / WAYS, PW = $clog2(PHT);

  logic clk = 0, rst_n = 0;
  word_t f_pc = 0, pred_target, upd_pc = 0, upd_target = 0;
  logic pred_taken, upd_valid = 0, upd_cond = 0, upd_taken = 0;
  logic [PW-1:0] pred_idx, upd_idx = 0;
  int checks = 0, failures = 0;

  ditto_bpred #(.PHT_ENTRIES(PHT), .BTB_ENTRIES(BTB), .BTB_WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int unsigned m_pht [PHT];
  int unsigned m_ghr;
  logic  m_v [SETS][WAYS];
  logic  m_c [SETS][WAYS];
  word_t m_pc [SETS][WAYS];
  word_t m_t [SETS][WAYS];
  int    m_vic [SETS];

  function automatic void m_lookup(word_t pc, output logic tk, output word_t tg, output int idx);
    int s = int'(pc[31:2]) % SETS;
    idx = int'((pc[31:2] ^ m_ghr) % PHT);
    tk = 0; tg = 0;
    for (int w = 0; w < WAYS; w++)
      if (m_v[s][w] && m_pc[s][w] == {pc[31:2], 2'b00}) begin
        tk = !m_c[s][w] || m_pht[idx] >= 2;
        tg = {m_t[s][w][31:2], 2'b00};
      end
  endfunction

  function automatic void m_update(word_t pc, logic cond, logic tk, word_t tg, int idx);
    int s = int'(pc[31:2]) % SETS;
    int hit = -1;
    if (cond) begin
      m_ghr = ((m_ghr << 1) | tk) % PHT;
      if (tk && m_pht[idx] < 3) m_pht[idx]++;
      if (!tk && m_pht[idx] > 0) m_pht[idx]--;
    end
    if (tk) begin
      for (int w = 0; w < WAYS; w++)
        if (m_v[s][w] && m_pc[s][w] == {pc[31:2], 2'b00}) hit = w;
      if (hit < 0) begin
        hit = m_vic[s];
        m_vic[s] = (m_vic[s] + 1) % WAYS;
      end
      m_v[s][hit] = 1; m_c[s][hit] = cond; m_pc[s][hit] = {pc[31:2], 2'b00}; m_t[s][hit] = tg;
    end
  endfunction

  word_t pool [48];
  logic  pool_cond [48];
  int n_hit_taken = 0, n_hit_nt = 0;

  initial begin
    logic e_tk; word_t e_tg; int e_idx;
    m_ghr = 0;
    for (int i = 0; i < PHT; i++) m_pht[i] = 1;
    for (int s = 0; s < SETS; s++) begin
      m_vic[s] = 0;
      for (int w = 0; w < WAYS; w++) begin m_v[s][w] = 0; m_c[s][w] = 0; m_pc[s][w] = 0; m_t[s][w] = 0; end
    end
    for (int i = 0; i < 48; i++) begin pool[i] = ($urandom & 32'h0000_FFFF) << 2; pool_cond[i] = ($urandom_range(0, 3) != 0); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      f_pc = ($urandom_range(0, 7) == 0) ? $urandom : pool[$urandom_range(0, 47)];
      #1;
      m_lookup(f_pc, e_tk, e_tg, e_idx);
      checks += 2;
      if (pred_taken !== e_tk || (e_tk && pred_target !== e_tg)) begin
        failures++; if (failures < 5) $display("pc %h taken %b/%b target %h/%h", f_pc, pred_taken, e_tk, pred_target, e_tg);
      end
      if (int'(pred_idx) != e_idx) failures++;
      n_hit_taken += int'(e_tk);
      upd_valid = ($urandom_range(0, 1) == 0);
      begin
        int k;
        k = $urandom_range(0, 47);
        upd_pc = pool[k]; upd_cond = pool_cond[k];
        upd_taken = upd_cond ? ($urandom_range(0, 3) != 0) : 1'b1;
        upd_target = {$urandom_range(0, 15), 2'b00} + pool[k];
        upd_idx = PW'($urandom);
      end
      @(negedge clk);
      if (upd_valid) m_update(upd_pc, upd_cond, upd_taken, upd_target, int'(upd_idx));
    end
    checks++;
    if (n_hit_taken < 100) failures++;
    $display("taken predictions %0d", n_hit_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
