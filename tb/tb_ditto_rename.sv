// Self-checking test of the rename table against a reference map: random
// set / clear traffic, lookups compared each cycle, flush clears all busy.
module tb_ditto_rename;
  import ditto_pkg::*;
  localparam int IW = 7;
  logic clk = 0, rst_n = 0, flush = 0, set_en = 0, clr_en = 0;
  reg_t q_reg [2], set_reg = 0, clr_reg = 0;
  logic q_busy [2];
  logic [IW-1:0] q_tag [2], set_tag = 0, clr_tag = 0;
  logic m_busy [32];
  logic [IW-1:0] m_tag [32];
  int checks = 0, failures = 0;

  ditto_rename #(.IDX_W(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) begin m_busy[r] = 0; m_tag[r] = 0; end
    q_reg[0] = 0; q_reg[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // compare lookups
      for (int p = 0; p < 2; p++) begin
        q_reg[p] = reg_t'($urandom_range(0, 31));
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        logic eb;
        eb = m_busy[q_reg[p]] && q_reg[p] != 0;
        checks++;
        if (q_busy[p] !== eb || (eb && q_tag[p] !== m_tag[q_reg[p]])) begin
          failures++;
          if (failures < 5) $display("RN r%0d busy=%b exp=%b", q_reg[p], q_busy[p], eb);
        end
      end
      set_en = $urandom_range(0, 1); set_reg = reg_t'($urandom_range(0, 7)); set_tag = IW'($urandom);
      clr_en = $urandom_range(0, 1); clr_reg = reg_t'($urandom_range(0, 7));
      clr_tag = ($urandom_range(0, 3) != 0) ? m_tag[clr_reg] : IW'($urandom);
      flush = (n % 500 == 499);
      @(posedge clk);
      if (flush) for (int r = 0; r < 32; r++) m_busy[r] = 0;
      else begin
        if (clr_en && m_busy[clr_reg] && m_tag[clr_reg] == clr_tag) m_busy[clr_reg] = 0;
        if (set_en && set_reg != 0) begin m_busy[set_reg] = 1; m_tag[set_reg] = set_tag; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
