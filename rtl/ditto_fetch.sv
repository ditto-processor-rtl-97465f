// Program counters of the split fetch unit.
//
// The normal half fetches at pc: it advances each cycle to the predicted next
// address (the branch predictor's target when it predicts taken, else pc+4),
// holds on stall or after a HALT has been seen (stop), is redirected by a
// branch or jump that resolves at issue to a different next address than the
// predicted one, and on rollback is loaded with the address after the last
// verified instruction. The clone half has its own
// program counter, clone_pc, loaded from the instruction address of the
// delay-buffer entry being cloned, so the committed instruction is re-fetched
// from the same address the next cycle. Priority: rollback, redirect, stall.
// Both counters update at the clock edge.
module ditto_fetch
  import ditto_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  stall,
  input  logic  stop,
  input  logic  pred_taken,    // predictor: the instruction at pc is a taken branch
  input  word_t pred_target,
  input  logic  redirect,
  input  word_t redirect_pc,
  input  logic  rollback,
  input  word_t rollback_pc,
  output word_t pc,
  output logic  pc_valid,
  input  logic  clone_load,
  input  word_t clone_addr,
  output word_t clone_pc,
  output logic  clone_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc          <= RESET_PC;
      clone_pc    <= '0;
      clone_valid <= 1'b0;
    end else begin
      if (rollback)               pc <= rollback_pc;
      else if (redirect)          pc <= redirect_pc;
      else if (!stall && !stop)   pc <= pred_taken ? pred_target : pc + 32'd4;
      clone_valid <= clone_load && !rollback;
      if (clone_load) clone_pc <= clone_addr;
    end
  end

  assign pc_valid = !stop;

endmodule
