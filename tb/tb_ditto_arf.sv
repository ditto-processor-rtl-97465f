// Self-checking test of the register file with transient / verified status:
// commit writes (transient), verify writes in commit order (verified), and a
// flush that must restore every register to its last verified value.
// A reference model with a queue of unverified commits drives the verifies.
module tb_ditto_arf;
  import ditto_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, cw_en = 0, vw_en = 0;
  reg_t rs_addr [2], vr_addr [2], cw_addr = 0, vw_addr = 0, dbg_addr = 0;
  word_t rs_data [2], vr_data [2], cw_data = 0, vw_data = 0, dbg_data, dbg_vdata;
  logic [31:0] transient;
  word_t m_val [32], m_ver [32];
  int    m_pend [32];
  reg_t  qa [$];
  word_t qd [$];
  int checks = 0, failures = 0, nflush = 0;

  ditto_arf dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) begin m_val[r] = 0; m_ver[r] = 0; m_pend[r] = 0; end
    rs_addr[0] = 0; rs_addr[1] = 0; vr_addr[0] = 0; vr_addr[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        rs_addr[p] = reg_t'($urandom_range(0, 31));
        vr_addr[p] = reg_t'($urandom_range(0, 31));
      end
      dbg_addr = reg_t'($urandom_range(0, 31));
      #1;
      for (int p = 0; p < 2; p++) begin
        checks += 2;
        if (rs_data[p] !== m_val[rs_addr[p]]) begin failures++; if (failures < 5) $display("ARF val r%0d", rs_addr[p]); end
        if (vr_data[p] !== m_ver[vr_addr[p]]) begin failures++; if (failures < 5) $display("ARF ver r%0d", vr_addr[p]); end
      end
      for (int r = 1; r < 32; r++) begin
        checks++;
        if (transient[r] !== (m_pend[r] != 0)) begin failures++; if (failures < 5) $display("ARF status r%0d", r); end
      end
      cw_en = ($urandom_range(0, 2) != 0) && qa.size() < 100;
      cw_addr = reg_t'($urandom_range(0, 7)); cw_data = $urandom;
      vw_en = qa.size() > 0 && $urandom_range(0, 1);
      if (vw_en) begin vw_addr = qa[0]; vw_data = qd[0]; end
      flush = (n % 400 == 399);
      @(posedge clk);
      if (flush) begin
        nflush++;
        for (int r = 0; r < 32; r++) begin m_val[r] = m_ver[r]; m_pend[r] = 0; end
        qa.delete(); qd.delete();
      end else begin
        if (vw_en) begin
          if (vw_addr != 0) m_ver[vw_addr] = vw_data;
          m_pend[vw_addr]--;
          void'(qa.pop_front()); void'(qd.pop_front());
        end
        if (cw_en) begin
          if (cw_addr != 0) m_val[cw_addr] = cw_data;
          m_pend[cw_addr]++;
          qa.push_back(cw_addr); qd.push_back(cw_data);
        end
        m_pend[0] = 0;
      end
    end
    checks++;
    if (nflush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
