// Self-checking test of the fetch unit's two program counters: sequential
// advance, predicted-taken advance, stall, stop, redirect, rollback priority, and the clone PC loaded
// from a delay-buffer address with its valid one cycle later.
module tb_ditto_fetch;
  import ditto_pkg::*;
  logic clk = 0, rst_n = 0, pred_taken = 0, stall = 0, stop = 0, redirect = 0, rollback = 0, clone_load = 0;
  word_t pred_target = 0, redirect_pc = 0, rollback_pc = 0, pc, clone_addr = 0, clone_pc;
  logic pc_valid, clone_valid;
  word_t exp_pc;
  int checks = 0, failures = 0;

  ditto_fetch #(.RESET_PC(32'h40)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_pc = 32'h40;
    for (int n = 0; n < 2000; n++) begin
      checks += 2;
      if (pc !== exp_pc) begin failures++; if (failures < 5) $display("pc %h exp %h", pc, exp_pc); end
      if (pc_valid !== !stop) failures++;
      stall = ($urandom_range(0, 3) == 0);
      stop = ($urandom_range(0, 9) == 0);
      pred_taken = ($urandom_range(0, 3) == 0); pred_target = $urandom & 32'hFFFC;
      redirect = ($urandom_range(0, 5) == 0); redirect_pc = $urandom & 32'hFFFC;
      rollback = ($urandom_range(0, 9) == 0); rollback_pc = $urandom & 32'hFFFC;
      clone_load = 1'($urandom); clone_addr = $urandom;
      #1;
      checks++;
      if (pc_valid !== !stop) failures++;
      @(negedge clk);
      if (rollback) exp_pc = rollback_pc;
      else if (redirect) exp_pc = redirect_pc;
      else if (!stall && !stop) exp_pc = pred_taken ? pred_target : exp_pc + 4;
      checks++;
      if (clone_valid !== (clone_load && !rollback) || (clone_load && clone_pc !== clone_addr)) begin
        failures++; if (failures < 5) $display("clone pc %h valid %b", clone_pc, clone_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
