// Verify logic: the two checking mechanisms of the cloned stream.
//
// Check 1, after the clone's register read: the re-fetched instruction word
// must equal the instruction code kept in the delay buffer (a fault in fetch
// or decode of either copy), a branch or jump's decoded target must equal the
// kept target, and for a long-latency clone the source operand values it read
// must equal the values kept in the operand entry (a fault in renaming or
// register read). A long-latency clone that passes is finished: its result
// was already checked by the duplicated execution.
// Check 2, after the clone's execution (short-latency clones only): the
// clone's result must equal the original result copied into the LP-ROB; for
// a branch or jump the compared value is the next PC, for a load or store the
// data address. Both checks are combinational; any error starts a rollback.
module ditto_verify
  import ditto_pkg::*;
(
  // check 1
  input  logic      c1_valid,
  input  uop_t      c1_uop,
  input  word_t     c1_inst,
  input  word_t     c1_srca,
  input  word_t     c1_srcb,
  input  db_entry_t c1_main,
  input  db_entry_t c1_ops,
  output logic      c1_err,
  // check 2
  input  logic      c2_valid,
  input  fu_e       c2_fu,
  input  word_t     c2_value,
  input  word_t     c2_exp_result,
  input  word_t     c2_exp_addr,
  output logic      c2_err
);

  always_comb begin
    c1_err = 1'b0;
    if (c1_valid) begin
      if (c1_inst != c1_main.inst) c1_err = 1'b1;
      if (c1_uop.is_long != c1_main.has_ops) c1_err = 1'b1;
      if ((c1_uop.fu == FU_BRANCH || c1_uop.fu == FU_JUMP) && c1_uop.target != c1_main.w1)
        c1_err = 1'b1;
      if (c1_uop.is_long && (!c1_ops.operands || c1_srca != c1_ops.w0 || c1_srcb != c1_ops.w1))
        c1_err = 1'b1;
    end
  end

  always_comb begin
    c2_err = 1'b0;
    if (c2_valid) begin
      unique case (c2_fu)
        FU_ALU, FU_BRANCH, FU_JUMP: c2_err = (c2_value != c2_exp_result);
        FU_LOAD, FU_STORE:          c2_err = (c2_value != c2_exp_addr);
        default:                    c2_err = 1'b0;
      endcase
    end
  end

endmodule
